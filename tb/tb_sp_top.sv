// tb_sp_top: end-to-end test of sp_top with every parameter at its default
// (32-bit cellwidth).
//
// Runs, at the same time, the five parts of the design with their checkers:
//   chip:    a 6 x 6 band matrix product, a switch of the mode pin, then three
//            polynomials at three points (chk_chip);
//   poly:    three polynomials of 3 coefficients at 3 points (chk_poly_eval);
//   mm:      a 7 x 7 tridiagonal-by-tridiagonal product (chk_band_mm);
//   mp:      40 words of s plus three products of 64-bit a and 63-bit b on
//            the two-stage cascade of three-cell rows (chk_cascade);
//   mt:      20 products of 64-bit a and 63-bit b on one cell in two passes,
//            each checked against the value computed here and for its
//            latency of 2*(32+64+1) cycles.
// It counts how often each mechanism happened (matrix-mode words, polynomial
// values, mode switches, b-latch propagation through the chip, signed
// multi-stage products) and fails if one never did.
`timescale 1ns/1ps
module tb_sp_top;
  import sp_pkg::*;
  localparam int W = 32;
  logic clk = 1'b0, rst_n = 1'b0;

  mode_e chip_mode;
  logic chip_b_latch, chip_b_latchout;
  logic [4:0] chip_a_in, chip_a_out, chip_b_in, chip_b_out, chip_s_in, chip_s_out;
  logic poly_run, poly_b_latchout;
  logic [2:0] poly_coef_in, poly_coef_out, poly_result;
  logic [4:0] poly_x_in, poly_x_out;
  logic mm_run, mm_b_latchout;
  logic [2:0] mm_a_in, mm_a_out, mm_b_in, mm_b_out;
  logic [4:0] mm_s_in, mm_s_out;
  logic mp_run, mp_s_in, mp_s_out;
  logic [2:0] mp_a_in, mp_a_out;
  logic [1:0][2:0] mp_b_in, mp_b_out;
  logic mt_start = 1'b0, mt_busy, mt_done;
  logic [63:0] mt_a_word, mt_s_word, mt_result, mt_exp;
  logic [62:0] mt_b_word;

  sp_top dut (.*);

  int c_chk, c_fail, c_mw, c_pw, c_ms;   logic c_done;
  int p_chk, p_fail, p_ev;               logic p_done;
  int m_chk, m_fail, m_rows;             logic m_done;
  int x_chk, x_fail, x_words;            logic x_done;

  chk_chip #(.W(W)) u_c (
    .clk, .rst_n, .mode(chip_mode), .b_latch(chip_b_latch), .b_latchout(chip_b_latchout),
    .a_in(chip_a_in), .b_in(chip_b_in), .s_in(chip_s_in), .s_out(chip_s_out),
    .checks(c_chk), .failures(c_fail), .matrix_words(c_mw), .poly_words(c_pw),
    .mode_switches(c_ms), .done(c_done));
  chk_poly_eval #(.N(3), .MX(3), .W(W)) u_p (
    .clk, .rst_n, .run(poly_run), .coef_in(poly_coef_in), .x_in(poly_x_in),
    .result(poly_result), .checks(p_chk), .failures(p_fail), .evals(p_ev), .done(p_done));
  chk_band_mm #(.W(W), .N(7)) u_m (
    .clk, .rst_n, .run(mm_run), .a_in(mm_a_in), .b_in(mm_b_in), .s_in(mm_s_in),
    .s_out(mm_s_out), .checks(m_chk), .failures(m_fail), .rows_done(m_rows), .done(m_done));
  chk_cascade #(.W(W), .G(2), .N(3), .P(64)) u_x (
    .clk, .rst_n, .run(mp_run), .a_in(mp_a_in), .s_in(mp_s_in), .b_in(mp_b_in),
    .s_out(mp_s_out), .checks(x_chk), .failures(x_fail), .words(x_words), .done(x_done));

  always #5 clk = ~clk;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  // precision over time: sequential products
  int t_chk = 0, t_fail = 0, t_words = 0, t_neg = 0;
  logic t_done = 1'b0;
  initial begin
    int t0;
    wait (rst_n);
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      mt_a_word = {$urandom, $urandom};
      mt_s_word = {$urandom, $urandom};
      mt_b_word = 63'({$urandom, $urandom});
      if (n == 0) begin mt_a_word = '1; mt_b_word = {1'b1, 62'd0}; end
      if (mt_b_word[62]) t_neg++;
      mt_exp = mt_s_word + mt_a_word * 64'(signed'(mt_b_word));
      mt_start = 1'b1;
      @(posedge clk); t0 = $time;
      @(negedge clk); mt_start = 1'b0;
      @(posedge mt_done);
      t_chk += 2;
      if (($time - t0) / 10 != 2 * (32 + 64 + 1)) t_fail++;
      @(negedge clk);
      if (mt_result !== mt_exp) t_fail++;
      t_words++;
    end
    if (t_neg == 0) t_fail++;
    t_done = 1'b1;
  end

  int latchouts = 0;
  always @(posedge clk) if (chip_b_latchout) latchouts++;

  initial begin
    int checks, failures;
    fork
      wait (c_done && p_done && m_done && x_done && t_done);
      repeat (50000) @(posedge clk);
    join_any
    checks = c_chk + p_chk + m_chk + x_chk + t_chk;
    failures = c_fail + p_fail + m_fail + x_fail + t_fail;
    if (!(c_done && p_done && m_done && x_done && t_done)) begin
      $display("watchdog expired");
      failures++;
    end
    $display("chip: %0d matrix words, %0d polynomial values, %0d mode switches, %0d b-latchout pulses",
             c_mw, c_pw, c_ms, latchouts);
    $display("poly: %0d values; band: %0d product rows; cascade: %0d products; multi-pass: %0d products",
             p_ev, m_rows, x_words, t_words);
    if (c_mw == 0 || c_pw == 0 || c_ms == 0 || latchouts == 0 || p_ev == 0 || m_rows == 0 || x_words == 0 || t_words == 0)
      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
