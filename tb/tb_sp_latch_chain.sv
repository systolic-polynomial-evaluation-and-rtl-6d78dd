// tb_sp_latch_chain: checks that column i sees the b-latch pulse exactly i
// cycles after it enters and that b-latchout follows the last column by one
// cycle, for a random pulse train, against a history of the input kept here.
`timescale 1ns/1ps
module tb_sp_latch_chain;
  localparam int NCOL = 5;
  logic clk = 1'b0, rst_n = 1'b0, lat_in = 1'b0, lat_out;
  logic [NCOL-1:0] col_latch;
  sp_latch_chain #(.NCOL(NCOL)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0, pulses = 0;
  logic hist [$];

  always @(negedge clk) begin
    if (cyc == 2) rst_n <= 1'b1;
    lat_in = (cyc >= 3) && ($urandom_range(0, 3) == 0);
    if (lat_in) pulses++;
    hist.push_front(lat_in);       // hist[i] = input i cycles ago
    if (hist.size() > NCOL + 1) void'(hist.pop_back());
    #1;
    if (cyc >= 3 + NCOL + 1) begin
      for (int i = 0; i < NCOL; i++) begin
        checks++;
        if (col_latch[i] !== hist[i]) failures++;
      end
      checks++;
      if (lat_out !== hist[NCOL]) failures++;
    end
    cyc++;
    if (cyc == 400) begin
      if (pulses == 0) failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
