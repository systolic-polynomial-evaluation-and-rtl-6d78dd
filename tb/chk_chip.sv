// chk_chip: stimulus and checker for one hexagonal chip of side M
// (3M(M-1)+1 cells), used first as a band matrix multiplier and then, after a
// mode switch, as a polynomial evaluator.
//
// Lattice of the chip: L = 2M-1 columns p and rows q, H = M-1, cells where
// |p-q| <= H; S line d (pin index) is the diagonal p-q = d-H. Column p
// latches p cycles after the b-latch pin; latch period k starts at cycle
// T0 + p + k*W there.
//
// Matrix phase (periods 0..NM-1): the central 3 x 3 diamond (rows and
// columns H-1..H+1) multiplies tridiagonal NM x NM matrices; all other rows
// and columns are fed zeros, so the cells around the diamond add nothing.
// Period k = row i of S0 + A*B: A line q carries A[i][i-q+H], the cell (p,q)
// holds B[i-q+H][i-q+p], S line d carries S0[i][i+d-H] in and the product row
// out (zero words on the lines outside the diamond).
// Polynomial phase (periods NM+L ..): the three bottom rows carry the
// coefficients of one polynomial per period (the rows above carry zero,
// harmless leading coefficients), the S lines that end on the bottom row
// (d = 0..H) deliver the values at the points x[(d-H+k) mod 3]. The gap of L
// periods lets the B words of the two phases pass each other in the columns,
// and the mode pin switches once the last matrix word has left.
// Expected values are computed here in integer arithmetic modulo 2^W and
// compared bit by bit in the cycles the results must leave the chip; the
// b-latchout pin is checked to follow b-latch by L cycles.
module chk_chip
  import sp_pkg::*;
#(
  parameter int M = 3,
  parameter int W = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  output mode_e      mode,
  output logic       b_latch,
  input  logic       b_latchout,
  output logic [2*M-2:0] a_in,
  output logic [2*M-2:0] b_in,
  output logic [2*M-2:0] s_in,
  input  logic [2*M-2:0] s_out,
  output int         checks,
  output int         failures,
  output int         matrix_words,
  output int         poly_words,
  output int         mode_switches,
  output logic       done
);
  localparam int NM = 6;             // matrix size
  localparam int NC = 3, KP = 3, NX = 3;   // coefficients, polynomials, points
  localparam int K1L = NM - 1;       // last matrix period
  localparam int L = 2 * M - 1, H = M - 1;   // lines per direction, offset
  localparam int K2 = NM + L;        // first polynomial period
  localparam int T0 = (M + 4) * W;
  localparam int TSWITCH = T0 + (K1L + 2) * W + L + 1;
  localparam int TEND = T0 + (K2 + KP + 1) * W + L + 3;

  int cyc = 0;
  logic [W-1:0] am [NM][NM];
  logic [W-1:0] bm [NM][NM];
  logic [W-1:0] s0 [NM][NM];
  logic [W-1:0] c  [KP][NC];
  logic [W-1:0] x  [NX];
  logic         lat_hist [$];

  function automatic int fdiv(int a, int b);
    return (a >= 0) ? a / b : -((-a + b - 1) / b);
  endfunction
  function automatic int pmod(int a, int b);
    return a - fdiv(a, b) * b;
  endfunction
  function automatic int imax(int a, int b);
    return (a > b) ? a : b;
  endfunction
  function automatic int imin(int a, int b);
    return (a < b) ? a : b;
  endfunction
  function automatic logic [W-1:0] aget(int i, int j);
    if (i < 0 || j < 0 || i >= NM || j >= NM) return '0;
    return am[i][j];
  endfunction
  function automatic logic [W-1:0] bget(int i, int j);
    if (i < 0 || j < 0 || i >= NM || j >= NM) return '0;
    return bm[i][j];
  endfunction
  function automatic logic [W-1:0] sget(int i, int j);
    if (i < 0 || j < 0 || i >= NM || j >= NM) return '0;
    return s0[i][j];
  endfunction
  function automatic logic [W-1:0] product(int i, int j);
    logic [W-1:0] r = sget(i, j);
    for (int m = 0; m < NM; m++) r += aget(i, m) * bget(m, j);
    return r;
  endfunction
  function automatic logic [W-1:0] horner(int kp, int xi);
    logic [W-1:0] f = '0;
    for (int q = 0; q < NC; q++) f = f * x[xi] + c[kp][q];
    return f;
  endfunction
  // word held by the top cell of column p in period t
  function automatic logic [W-1:0] btop(int p, int t);
    int qt = imax(0, p - H);
    if (t <= K1L) return (p >= H - 1 && p <= H + 1) ? bget(t - qt + H, t - qt + p) : '0;
    return x[pmod(p - qt + t, NX)];
  endfunction

  initial begin
    checks = 0; failures = 0; matrix_words = 0; poly_words = 0; mode_switches = 0;
    done = 1'b0; mode = MODE_MATRIX; b_latch = 1'b0; a_in = '0; b_in = '0; s_in = '0;
    for (int i = 0; i < NM; i++)
      for (int j = 0; j < NM; j++) begin
        am[i][j] = (j - i >= -1 && j - i <= 1) ? W'($urandom) : '0;
        bm[i][j] = (j - i >= -1 && j - i <= 1) ? W'($urandom) : '0;
        s0[i][j] = (j - i >= -2 && j - i <= 2) ? W'($urandom) : '0;
      end
    for (int k = 0; k < KP; k++)
      for (int q = 0; q < NC; q++) c[k][q] = W'($urandom);
    for (int i = 0; i < NX; i++) x[i] = W'($urandom);
  end

  always @(negedge clk) begin
    int rel, k, j, dd, pf, pl;
    logic [W-1:0] wd;
    if (rst_n && !done) begin
      if (cyc == TSWITCH) begin
        mode = MODE_POLY;
        mode_switches++;
      end
      rel = cyc - T0; k = fdiv(rel, W); j = rel - k * W;
      b_latch = (rel >= 0) && (j == 0);
      // A lines
      for (int q = 0; q < L; q++) begin
        rel = cyc - T0 - imax(0, q - H); k = fdiv(rel, W); j = rel - k * W;
        wd = '0;
        if (rel >= 0 && k <= K1L && q >= H - 1 && q <= H + 1) wd = aget(k, k - q + H);
        if (k >= K2 && k < K2 + KP && q >= L - NC) wd = c[k - K2][q - (L - NC)];
        a_in[q] = wd[j];
      end
      // B lines: the word for period k+1 of the top cell enters in period k
      for (int p = 0; p < L; p++) begin
        rel = cyc - T0 - p; k = fdiv(rel, W); j = rel - k * W;
        wd = btop(p, k + 1);
        b_in[p] = wd[j];
      end
      // S lines
      for (int d = 0; d < L; d++) begin
        dd = d - H;
        pf = imax(0, dd);
        rel = cyc - T0 - pf; k = fdiv(rel, W); j = rel - k * W;
        wd = (rel >= 0 && k <= K1L) ? sget(k, k + dd) : '0;
        s_in[d] = wd[j];
        pl = imin(L - 1, L - 1 + dd);
        rel = cyc - T0 - pl - 1; k = fdiv(rel, W); j = rel - k * W;
        if (rel >= 0 && k <= K1L) begin
          wd = product(k, k + dd);
          checks++;
          if (j == W - 1 && dd >= -2 && dd <= 2) matrix_words++;
          if (s_out[d] !== wd[j]) begin
            failures++;
            if (failures < 10) $display("chip matrix FAIL cyc %0d line %0d row %0d bit %0d", cyc, d, k, j);
          end
        end
        if (k >= K2 && k < K2 + KP && dd <= 0) begin
          wd = horner(k - K2, pmod(dd + k, NX));
          checks++;
          if (j == W - 1) poly_words++;
          if (s_out[d] !== wd[j]) begin
            failures++;
            if (failures < 10) $display("chip poly FAIL cyc %0d line %0d poly %0d bit %0d", cyc, d, k - K2, j);
          end
        end
      end
      // b-latchout follows b-latch by one cycle per column
      lat_hist.push_front(b_latch);
      if (lat_hist.size() > L + 1) void'(lat_hist.pop_back());
      if (lat_hist.size() == L + 1) begin
        checks++;
        if (b_latchout !== lat_hist[L]) failures++;
      end
      cyc++;
      if (cyc == TEND) begin
        if (matrix_words != 5 * NM || poly_words != M * KP || mode_switches != 1) failures++;
        done = 1'b1;
      end
    end
  end
endmodule
