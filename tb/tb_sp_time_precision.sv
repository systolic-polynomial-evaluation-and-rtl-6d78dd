// tb_sp_time_precision: random products s + a*b on the single-cell,
// multi-pass multiplier (W = 8, G = 3 passes, b of 22 bits, P = 24), plus the
// extreme cases (most negative b, all-ones a and s). Each result is compared
// with the value computed here modulo 2^P, and the time from start to done
// must be G*(W+P+1) cycles.
`timescale 1ns/1ps
module tb_sp_time_precision;
  localparam int W = 8, G = 3, P = 24, NTEST = 30;
  localparam int BW = (G - 1) * (W - 1) + W;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  logic [P-1:0] a_word, s_word, result, exp_r;
  logic [BW-1:0] b_word;

  sp_time_precision #(.W(W), .G(G), .P(P)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, negb = 0;

  initial begin
    int t0, lat;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NTEST; n++) begin
      @(negedge clk);
      a_word = P'($urandom); s_word = P'($urandom); b_word = BW'($urandom);
      if (n == 0) begin a_word = '1; b_word = {1'b1, {(BW-1){1'b0}}}; end
      if (n == 1) begin a_word = '1; s_word = '1; b_word = '1; end
      if (b_word[BW-1]) negb++;
      exp_r = s_word + a_word * P'(signed'(b_word));
      start = 1'b1;
      @(posedge clk); t0 = $time;
      @(negedge clk); start = 1'b0;
      @(posedge done);
      lat = ($time - t0) / 10;
      @(negedge clk);
      checks += 2;
      if (result !== exp_r) begin
        failures++;
        $display("FAIL test %0d: got %h exp %h", n, result, exp_r);
      end
      if (lat != G * (W + P + 1)) begin
        failures++;
        $display("FAIL test %0d: latency %0d", n, lat);
      end
    end
    if (negb == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
