// sp_latch_counter: generates the b-latch pulse of an array.
//
// While run is high the counter steps 0,1,..,P-1,0,.. and latch is high when it
// reads 0, so the first pulse comes in the cycle run rises and the next ones
// every P cycles after it (P is the word length on the A and S paths). When
// run falls the count returns to 0, so the next run starts a new word.
//
// The document asks only for simple counters that make the latch signals; the
// counter and its run input are this design's own. Synchronous active-low reset.
module sp_latch_counter #(
  parameter int unsigned P = 32   // word length in bits (clock cycles)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic run,
  output logic latch
);
  localparam int unsigned CW = (P > 1) ? $clog2(P) : 1;
  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (!rst_n || !run)            count <= '0;
    else if (count == CW'(P - 1))  count <= '0;
    else                           count <= count + 1'b1;
  end

  assign latch = run && (count == '0);
endmodule
