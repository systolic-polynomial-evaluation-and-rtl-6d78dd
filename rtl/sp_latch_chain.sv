// sp_latch_chain: distributes the b-latch pulse over the columns of an array.
//
// All cells of one column (cells sharing a B path) load their B latch in the
// same cycle, and each column does so one cycle after the column before it
// along the A path. The chain is a shift register of one flip-flop per column:
// col_latch[0] is the input pulse itself, col_latch[i] is the input delayed by
// i cycles, and lat_out (the chip's b-latchout pin) is col_latch[NCOL-1]
// delayed by one more cycle, so that a next chip's first column latches one
// cycle after this chip's last one.
//
// The one-cycle step per column is the document's; the register chain is the
// simplest circuit that gives it. Synchronous active-low reset.
module sp_latch_chain #(
  parameter int unsigned NCOL = 5   // columns (2M-1 for a hexagon of side M=3)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            lat_in,
  output logic [NCOL-1:0] col_latch,
  output logic            lat_out
);
  logic [NCOL-1:0] stage;   // stage[i] = lat_in delayed by i+1 cycles

  always_ff @(posedge clk) begin
    if (!rst_n) stage <= '0;
    else        stage <= {stage[NCOL-2:0], lat_in};
  end

  assign col_latch = {stage[NCOL-2:0], lat_in};
  assign lat_out   = stage[NCOL-1];
endmodule
