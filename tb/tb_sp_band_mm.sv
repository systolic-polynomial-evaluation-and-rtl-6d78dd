// tb_sp_band_mm: band matrix product on a 3 x 3 band array with 8-bit words;
// stimulus and checks are in chk_band_mm (tridiagonal A and B, 7 x 7).
`timescale 1ns/1ps
module tb_sp_band_mm;
  localparam int W = 8;
  logic clk = 1'b0, rst_n = 1'b0, run, b_latchout;
  logic [2:0] a_in, a_out, b_in, b_out;
  logic [4:0] s_in, s_out;
  int checks, failures, rows;
  logic done;

  sp_band_mm #(.W1(3), .W2(3), .W(W)) dut (.*);
  chk_band_mm #(.W(W), .N(7)) chk (.clk, .rst_n, .run, .a_in, .b_in, .s_in, .s_out,
                                   .checks, .failures, .rows_done(rows), .done);
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
      $display("product rows checked: %0d", rows);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    end
    $finish;
  end
endmodule
