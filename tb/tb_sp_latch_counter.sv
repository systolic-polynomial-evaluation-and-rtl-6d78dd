// tb_sp_latch_counter: checks the latch pulse train: a pulse in the cycle run
// rises, one every P cycles while run stays high, none while run is low, and a
// fresh start after run is dropped and raised again. The expected pulses come
// from a cycle count kept here.
`timescale 1ns/1ps
module tb_sp_latch_counter;
  localparam int P = 7;
  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0, latch;
  sp_latch_counter #(.P(P)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0, since = 0, restarts = 0, npulse = 0;

  always @(negedge clk) begin
    logic exp;
    if (cyc == 2) rst_n <= 1'b1;
    // run high from 5 to 60, low to 70, high again from 70 to 130
    run = (cyc >= 5 && cyc < 60) || (cyc >= 70 && cyc < 130);
    if (cyc == 70) restarts++;
    if (run && (cyc == 5 || cyc == 70)) since = 0;
    exp = run && (since % P == 0);
    #1;
    checks++;
    if (latch !== exp) begin
      failures++;
      $display("FAIL cyc %0d latch=%b exp=%b", cyc, latch, exp);
    end
    if (latch) npulse++;
    if (run) since++;
    cyc++;
    if (cyc == 140) begin
      if (restarts == 0 || npulse < 10) failures++;
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
