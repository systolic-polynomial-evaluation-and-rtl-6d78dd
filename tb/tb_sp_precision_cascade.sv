// tb_sp_precision_cascade: 40 words of s + a_0*b_0 + a_1*b_1 + a_2*b_2 with
// 24-bit a and s and 22-bit b on a three-stage cascade of rows of three 8-bit
// cells; stimulus and checks are in chk_cascade.
`timescale 1ns/1ps
module tb_sp_precision_cascade;
  localparam int W = 8, G = 3, N = 3, P = 24;
  logic clk = 1'b0, rst_n = 1'b0, run, s_in, s_out;
  logic [N-1:0] a_in, a_out;
  logic [G-1:0][N-1:0] b_in, b_out;
  int checks, failures, words;
  logic done;

  sp_precision_cascade #(.W(W), .G(G), .N(N), .P(P)) dut (.*);
  chk_cascade #(.W(W), .G(G), .N(N), .P(P)) chk (.clk, .rst_n, .run, .a_in, .s_in, .b_in, .s_out,
                                         .checks, .failures, .words, .done);
  always #5 clk = ~clk;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end
  initial begin
    fork
      wait (done);
      repeat (20000) @(posedge clk);
    join_any
    if (!done) begin
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    end else begin
      $display("products checked: %0d", words);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    end
    $finish;
  end
endmodule
