// tb_sp_poly_eval: 3 polynomials of 4 coefficients at 3 points on a 4 x 3
// polynomial array with 8-bit words; stimulus and checks are in chk_poly_eval.
`timescale 1ns/1ps
module tb_sp_poly_eval;
  localparam int N = 4, MX = 3, W = 8;
  logic clk = 1'b0, rst_n = 1'b0, run, b_latchout;
  logic [N-1:0] coef_in, coef_out;
  logic [N+MX-2:0] x_in, x_out;
  logic [MX-1:0] result;
  int checks, failures, evals;
  logic done;

  sp_poly_eval #(.N(N), .MX(MX), .W(W)) dut (.*);
  chk_poly_eval #(.N(N), .MX(MX), .W(W)) chk (.clk, .rst_n, .run, .coef_in, .x_in, .result,
                                            .checks, .failures, .evals, .done);
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
      $display("evaluations checked: %0d", evals);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    end
    $finish;
  end
endmodule
