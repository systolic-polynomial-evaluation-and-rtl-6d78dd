// sp_poly_eval: systolic evaluation of polynomials by Horner's rule.
//
// N rows of MX cells, all in polynomial mode (s' = a + s*b). Row q receives the
// q-th coefficient (highest power first) of the polynomial being evaluated on
// coef_in[q]; column p receives the evaluation points on x_in[p]. Diagonal j
// (cells (j,0),(j+1,1),..) starts from 0 and performs one Horner step per row,
// so each of its MX diagonals delivers f(x) on result[j] after N rows.
//
// Timing (word length P = W): run starts the internal latch counter; the
// latch pulse reaches column p p cycles after the counter's pulse. In word k
// (the k-th latch period) every cell of row q uses the same coefficient word,
// which therefore enters coef_in[q] at the latch time of column q, and
// cell (p,q) holds the point that entered x_in[p] k-(q-qtop(p))-1 words
// earlier, qtop(p) = max(0,p-MX+1) being the column's top row. Diagonal j in
// word k evaluates the word-k polynomial at the point held by cell (j,0); its
// result leaves result[j] starting N cycles after column j latched, LSB first.
// With the points of column p fed in as the sequence x[(p - q + k) mod M]
// every word, one polynomial is evaluated at MX points per word. All values
// are two's complement; results are exact modulo 2^P.
//
// The arrangement (coefficients along A, results along S with zero at the top,
// points along B, one column latching one cycle after the other, on-chip
// counters for the latch) follows the document. Word length equal to the
// cellwidth, so that a point moves down one row per word, is this design's
// requirement.
module sp_poly_eval
  import sp_pkg::*;
#(
  parameter int unsigned N  = 3,    // coefficients per polynomial (rows)
  parameter int unsigned MX = 3,    // cells per row: max(K polynomials, M points)
  parameter int unsigned W  = 32    // cellwidth = word length P
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  output logic            b_latchout,
  input  logic [N-1:0]    coef_in,
  output logic [N-1:0]    coef_out,
  input  logic [N+MX-2:0] x_in,
  output logic [N+MX-2:0] x_out,
  output logic [MX-1:0]   result
);
  logic lat;

  sp_latch_counter #(.P(W)) u_cnt (.clk, .rst_n, .run, .latch(lat));

  sp_grid #(.SHAPE(1), .D1(N), .D2(MX), .W(W)) u_grid (
    .clk, .rst_n,
    .mode    (MODE_POLY),
    .lat_in  (lat),
    .lat_out (b_latchout),
    .a_in    (coef_in),
    .a_out   (coef_out),
    .b_in    (x_in),
    .b_out   (x_out),
    .s_in    ('0),
    .s_out   (result)
  );
endmodule
