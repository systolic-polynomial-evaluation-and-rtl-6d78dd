// tb_sp_chip: one hexagonal chip (side 3, 19 cells, 8-bit cellwidth) run as a
// band matrix multiplier, switched to polynomial mode and run as a polynomial
// evaluator; stimulus and checks are in chk_chip.
`timescale 1ns/1ps
module tb_sp_chip;
  import sp_pkg::*;
  localparam int W = 8;
  logic clk = 1'b0, rst_n = 1'b0, b_latch, b_latchout;
  mode_e mode;
  logic [4:0] a_in, a_out, b_in, b_out, s_in, s_out;
  int checks, failures, mw, pw, ms;
  logic done;

  sp_chip #(.M(3), .W(W)) dut (.*);
  chk_chip #(.W(W)) chk (.clk, .rst_n, .mode, .b_latch, .b_latchout, .a_in, .b_in, .s_in,
                         .s_out, .checks, .failures, .matrix_words(mw), .poly_words(pw),
                         .mode_switches(ms), .done);
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
      $display("matrix words %0d, polynomial values %0d, mode switches %0d", mw, pw, ms);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    end
    $finish;
  end
endmodule
