// tb_chip_sizes: the two larger chip sizes, a hexagon of side 5 (61 cells,
// 54 data pins, for a 64-pin package) and one of side 8 (169 cells, 90 data
// pins, for a 100-pin package), both with 32-bit cellwidth.
//
// Each chip runs the same sequence as the 19-cell chip test (chk_chip): a
// tridiagonal matrix product on the central 3 x 3 diamond with every other
// line fed zeros, a switch of the mode pin, then polynomial evaluation on the
// three bottom rows. Every output bit of every S line is checked in its
// cycle, and b-latchout must follow b-latch by 2M-1 cycles. The two chips run
// side by side; the test ends when both checkers are done.
`timescale 1ns/1ps
module tb_chip_sizes;
  import sp_pkg::*;
  localparam int W = 32;
  localparam int M5 = 5, M8 = 8;
  logic clk = 1'b0, rst_n = 1'b0;

  mode_e mode5, mode8;
  logic lat5, lat8, latout5, latout8;
  logic [2*M5-2:0] a5_in, a5_out, b5_in, b5_out, s5_in, s5_out;
  logic [2*M8-2:0] a8_in, a8_out, b8_in, b8_out, s8_in, s8_out;
  int checks5, failures5, mw5, pw5, ms5;
  int checks8, failures8, mw8, pw8, ms8;
  logic done5, done8;

  sp_chip #(.M(M5), .W(W)) u_chip5 (
    .clk, .rst_n, .mode(mode5), .b_latch(lat5), .b_latchout(latout5),
    .a_in(a5_in), .a_out(a5_out), .b_in(b5_in), .b_out(b5_out), .s_in(s5_in), .s_out(s5_out));
  chk_chip #(.M(M5), .W(W)) u_chk5 (
    .clk, .rst_n, .mode(mode5), .b_latch(lat5), .b_latchout(latout5), .a_in(a5_in),
    .b_in(b5_in), .s_in(s5_in), .s_out(s5_out), .checks(checks5), .failures(failures5),
    .matrix_words(mw5), .poly_words(pw5), .mode_switches(ms5), .done(done5));

  sp_chip #(.M(M8), .W(W)) u_chip8 (
    .clk, .rst_n, .mode(mode8), .b_latch(lat8), .b_latchout(latout8),
    .a_in(a8_in), .a_out(a8_out), .b_in(b8_in), .b_out(b8_out), .s_in(s8_in), .s_out(s8_out));
  chk_chip #(.M(M8), .W(W)) u_chk8 (
    .clk, .rst_n, .mode(mode8), .b_latch(lat8), .b_latchout(latout8), .a_in(a8_in),
    .b_in(b8_in), .s_in(s8_in), .s_out(s8_out), .checks(checks8), .failures(failures8),
    .matrix_words(mw8), .poly_words(pw8), .mode_switches(ms8), .done(done8));

  always #5 clk = ~clk;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end
  initial begin
    fork
      wait (done5 && done8);
      repeat (50000) @(posedge clk);
    join_any
    if (!(done5 && done8)) begin
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks5 + checks8, failures5 + failures8 + 1);
    end else begin
      $display("side 5: %0d matrix words, %0d polynomial values, %0d mode switch", mw5, pw5, ms5);
      $display("side 8: %0d matrix words, %0d polynomial values, %0d mode switch", mw8, pw8, ms8);
      $display("TB_RESULT checks=%0d failures=%0d", checks5 + checks8, failures5 + failures8);
    end
    $finish;
  end
endmodule
