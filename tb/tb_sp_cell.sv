// tb_sp_cell: self-checking test of one bit-serial cell.
//
// Streams NWORD words of P bits through the cell with W < P, a new random
// multiplicand b (W bits, signed) latched at the start of every word, and the
// mode chosen at random per word. Each output word is compared with
// s + a*b (matrix mode) or a + s*b (polynomial mode) modulo 2^P, computed
// here with integer arithmetic, bit by bit in the cycles where it must appear
// (one cycle after the matching input bit). A and B are checked to leave the
// cell 1 and W cycles after they entered. Includes extreme values (most
// negative b, all-ones a and s) to exercise the sign extension.
`timescale 1ns/1ps
module tb_sp_cell;
  import sp_pkg::*;
  localparam int W = 8;
  localparam int P = 12;
  localparam int NWORD = 60;
  localparam int T0 = 20;          // latch cycle of word 0

  logic clk = 1'b0, rst_n = 1'b0;
  mode_e mode;
  logic b_latch, a_in, b_in, s_in, a_out, b_out, s_out;

  sp_cell #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  logic [P-1:0] aw [NWORD];
  logic [P-1:0] sw [NWORD];
  logic [W-1:0] bw [NWORD];
  mode_e        mw [NWORD];
  logic [P-1:0] exp_w [NWORD];
  logic         a_hist [$];
  logic         b_hist [$];
  int           n_poly = 0, n_matrix = 0;

  function automatic logic [P-1:0] sext_b(logic [W-1:0] b);
    return P'(signed'(b));
  endfunction

  initial begin
    for (int k = 0; k < NWORD; k++) begin
      aw[k] = P'($urandom);
      sw[k] = P'($urandom);
      bw[k] = W'($urandom);
      mw[k] = mode_e'($urandom_range(0, 1));
      if (k == 1) begin aw[k] = '1; sw[k] = '1; bw[k] = {1'b1, {(W-1){1'b0}}}; end
      if (k == 2) begin aw[k] = '1; sw[k] = '1; bw[k] = '1; mw[k] = MODE_POLY; end
      if (k == 3) begin aw[k] = '1; sw[k] = '1; bw[k] = {1'b1, {(W-1){1'b0}}}; mw[k] = MODE_MATRIX; end
      if (mw[k] == MODE_MATRIX) exp_w[k] = sw[k] + aw[k] * sext_b(bw[k]);
      else                      exp_w[k] = aw[k] + sw[k] * sext_b(bw[k]);
    end
  end

  // drive inputs for cycle cyc and check outputs of cycle cyc at the falling edge
  always @(negedge clk) begin
    int k, i, kb, ib, ko, io;
    if (cyc >= 2) rst_n <= 1'b1;
    // word and bit index of A/S inputs
    k = (cyc - T0) / P;  i = (cyc - T0) % P;
    b_latch = (cyc >= T0) && (i == 0) && (k < NWORD);
    a_in = 1'b0; s_in = 1'b0; mode = MODE_MATRIX;
    if (cyc >= T0 && k < NWORD) begin
      a_in = aw[k][i]; s_in = sw[k][i]; mode = mw[k];
    end
    // B word k enters during the W cycles before its latch
    kb = (cyc - T0 + W) / P; ib = (cyc - T0 + W) % P;
    b_in = 1'b0;
    if (cyc - T0 + W >= 0 && kb < NWORD && ib < W) b_in = bw[kb][ib];
    // output bit i of word k appears one cycle after the input bit
    ko = (cyc - T0 - 1) / P; io = (cyc - T0 - 1) % P;
    if (cyc - T0 - 1 >= 0 && ko < NWORD) begin
      checks++;
      if (s_out !== exp_w[ko][io]) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d bit %0d: s_out=%b exp=%b (mode %s)", ko, io, s_out, exp_w[ko][io], mw[ko].name());
      end
      if (io == 0) begin
        if (mw[ko] == MODE_POLY) n_poly++; else n_matrix++;
      end
    end
    // pass-through latencies
    if (cyc > 4) begin
      checks += 2;
      if (a_out !== a_hist[$]) failures++;
      if (b_out !== b_hist[0]) failures++;
    end
    a_hist.push_back(a_in);
    if (a_hist.size() > 1) void'(a_hist.pop_front());
    b_hist.push_back(b_in);
    if (b_hist.size() > W) void'(b_hist.pop_front());
    cyc++;
    if (cyc == T0 + NWORD * P + 4) begin
      if (n_poly == 0 || n_matrix == 0) failures++;
      $display("words: poly=%0d matrix=%0d", n_poly, n_matrix);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
