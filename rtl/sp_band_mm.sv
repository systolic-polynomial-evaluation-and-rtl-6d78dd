// sp_band_mm: band matrix multiplier S = S0 + A*B on a W1 x W2 diamond of cells.
//
// All cells are in matrix mode (s' = s + a*b). The array has W1 A lines (one
// per diagonal of the band of A), W2 B lines (one per diagonal of the band of
// B) and W1+W2-1 S lines (one per diagonal of the band of the product). With
// word length P = W, one row i of the product is produced per word:
//   A line q carries A[i][i - q + c1] in word i,
//   B line p carries the diagonal B[m][m + p + c2 - c1], one element per word
//     (element m is latched by the top cell of column p in word m - c1 and
//     moves down one row per word, so cell (p,q) holds B[i-q+c1][i-q+p+c2]
//     in word i; it is shifted in during the word before its latch),
//   S line d (pin index d) carries S0[i][i + d - (W1-1) + c2] in and
//     S[i][i + d - (W1-1) + c2] out,
// where c1 is the offset of A's highest diagonal and c2-c1 the offset of B's
// lowest diagonal. An N x N band product therefore takes N words, P*N cycles,
// plus the start-up of a few words.
//
// Timing: run starts the internal latch counter; column p latches p cycles
// after the counter's pulse, a word enters A line q at the latch time of
// column 0 and S line d at the latch time of column max(0, d-(W1-1)), and
// leaves one cycle per cell later. The band array with its three crossing
// data paths follows the document; the counter, the word schedule above and
// P = W are this design's.
module sp_band_mm
  import sp_pkg::*;
#(
  parameter int unsigned W1 = 3,    // band width of A
  parameter int unsigned W2 = 3,    // band width of B
  parameter int unsigned W  = 32    // cellwidth = word length P
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  output logic             b_latchout,
  input  logic [W1-1:0]    a_in,
  output logic [W1-1:0]    a_out,
  input  logic [W2-1:0]    b_in,
  output logic [W2-1:0]    b_out,
  input  logic [W1+W2-2:0] s_in,
  output logic [W1+W2-2:0] s_out
);
  logic lat;

  sp_latch_counter #(.P(W)) u_cnt (.clk, .rst_n, .run, .latch(lat));

  sp_grid #(.SHAPE(2), .D1(W1), .D2(W2), .W(W)) u_grid (
    .clk, .rst_n,
    .mode    (MODE_MATRIX),
    .lat_in  (lat),
    .lat_out (b_latchout),
    .a_in, .a_out, .b_in, .b_out, .s_in, .s_out
  );
endmodule
