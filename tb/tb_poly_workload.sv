// tb_poly_workload: the large polynomial workload, 100 polynomials of 100
// coefficients (degree 99) evaluated at 100 points with 32-bit words, on a
// 100 x 100 polynomial array of 10,000 cells.
//
// Stimulus and checking are those of the block test (chk_poly_eval): random
// coefficients and points, expected values from Horner's rule modulo 2^32,
// every result bit compared in the cycle it must leave the array. The run
// takes N periods of point preloading, then K = 100 latch periods of 32
// cycles plus the pipeline depth; all 10,000 values must appear on time.
// The array size comes from the document's workload; the cellwidth of 32 bits
// is the document's too. Expect a long C++ build for this many cells.
`timescale 1ns/1ps
module tb_poly_workload;
  localparam int N = 100, MX = 100, W = 32;
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
      repeat (400000) @(posedge clk);
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
