// sp_chip: one chip of the systolic evaluator, a hexagon of cells.
//
// A hexagon with M cells per side holds 3M(M-1)+1 cells (19 for M=3, the size
// that fits a 40-pin package). Each of the A, B and S paths crosses the chip
// on 2M-1 parallel lines, so the chip has 2M-1 input and 2M-1 output pins per
// path, 12M-6 data pins in all. Besides them it has the mode pin (matrix or
// polynomial for all cells), the b-latch pin and the b-latchout pin that
// passes the latch pulse to the next chip. The cell connections, line numbering
// and timing are described in sp_grid; the b-latch pulse enters the column
// at the start of the A path and moves one column per cycle.
//
// The hexagonal layout, the pin counts and the control pins follow the
// document. The single clock replaces the two-phase clock of the original, and
// the reset pin is this design's addition (the original relies on b-latch to
// clear the accumulators).
module sp_chip
  import sp_pkg::*;
#(
  parameter int unsigned M = 3,    // cells per side of the hexagon
  parameter int unsigned W = 32    // cellwidth
) (
  input  logic           clk,
  input  logic           rst_n,
  input  mode_e          mode,
  input  logic           b_latch,
  output logic           b_latchout,
  input  logic [2*M-2:0] a_in,
  output logic [2*M-2:0] a_out,
  input  logic [2*M-2:0] b_in,
  output logic [2*M-2:0] b_out,
  input  logic [2*M-2:0] s_in,
  output logic [2*M-2:0] s_out
);
  sp_grid #(.SHAPE(0), .D1(M), .D2(M), .W(W)) u_grid (
    .clk, .rst_n, .mode,
    .lat_in  (b_latch),
    .lat_out (b_latchout),
    .a_in, .a_out, .b_in, .b_out, .s_in, .s_out
  );
endmodule
