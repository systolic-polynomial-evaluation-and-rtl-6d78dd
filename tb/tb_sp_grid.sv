// tb_sp_grid: the generic array in its polynomial shape (4 rows of 3 cells,
// 8-bit cells), with the mode input held at polynomial mode, S inputs at zero
// and the b-latch pulse made here from the checker's run signal (one pulse
// every W cycles). Stimulus and checks are in chk_poly_eval; in addition the
// b-latch pulse must leave lat_out NP = 6 cycles after it enters.
`timescale 1ns/1ps
module tb_sp_grid;
  import sp_pkg::*;
  localparam int N = 4, MX = 3, W = 8, NP = N + MX - 1;
  logic clk = 1'b0, rst_n = 1'b0, run, lat_in, lat_out;
  logic [N-1:0] a_in, a_out;
  logic [NP-1:0] b_in, b_out;
  logic [MX-1:0] s_out;
  int checks, failures, evals, lat_checks = 0, lat_fail = 0, cnt = 0;
  logic done;
  logic hist [$];

  sp_grid #(.SHAPE(1), .D1(N), .D2(MX), .W(W)) dut (
    .clk, .rst_n, .mode(MODE_POLY), .lat_in, .lat_out,
    .a_in, .a_out, .b_in, .b_out, .s_in('0), .s_out);
  chk_poly_eval #(.N(N), .MX(MX), .W(W)) chk (.clk, .rst_n, .run, .coef_in(a_in), .x_in(b_in),
                                            .result(s_out), .checks, .failures, .evals, .done);

  always #5 clk = ~clk;
  always_comb lat_in = run && (cnt % W == 0);
  always @(posedge clk) begin
    cnt <= run ? cnt + 1 : 0;
    hist.push_front(lat_in);
    if (hist.size() > NP) begin
      void'(hist.pop_back());
    end
  end
  always @(negedge clk) if (hist.size() == NP) begin
    lat_checks++;
    if (lat_out !== hist[NP-1]) lat_fail++;
  end

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
      $display("TB_RESULT checks=%0d failures=%0d", checks + lat_checks, failures + lat_fail + 1);
    end else begin
      $display("evaluations checked: %0d", evals);
      $display("TB_RESULT checks=%0d failures=%0d", checks + lat_checks, failures + lat_fail);
    end
    $finish;
  end
endmodule
