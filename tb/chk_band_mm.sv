// chk_band_mm: stimulus and checker for a band matrix multiplier.
//
// Multiplies two random N x N band matrices: A tridiagonal (offsets -1..1,
// W1 = 3 lines), B likewise (W2 = 3), so that S0 + A*B has the 5 diagonals
// -2..2 carried by the 5 S lines. Words are P = W bits; row i of the product
// is formed in latch period k = i + 1 (period 0 preloads B). The stimulus
// follows the schedule documented in sp_band_mm: A line q carries
// A[i][i-q+1], B line p carries B[m][m+p-1] for m = period, S line d carries
// S0[i][i+d-2]. Every output bit is compared, in the cycle it must appear,
// with the product worked out here in integer arithmetic modulo 2^P, which
// also checks the latency (N+2 latch periods for the whole product).
// done rises when the last result bit has been checked.
module chk_band_mm #(
  parameter int W = 8,
  parameter int N = 7
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic       run,
  output logic [2:0] a_in,
  output logic [2:0] b_in,
  output logic [4:0] s_in,
  input  logic [4:0] s_out,
  output int         checks,
  output int         failures,
  output int         rows_done,
  output logic       done
);
  localparam int W1 = 3, W2 = 3, ND = W1 + W2 - 1;
  localparam int C1 = 1, C2 = 0;     // offsets of the band layout, see above
  localparam int T0 = 2 * W;         // cycle, after reset, in which run rises
  localparam int KLAST = N + 1;      // last latch period checked

  int cyc = 0, nonzero = 0;
  logic [W-1:0] am [N][N];
  logic [W-1:0] bm [N][N];
  logic [W-1:0] s0 [N][N];

  function automatic logic [W-1:0] aget(int i, int j);
    if (i < 0 || j < 0 || i >= N || j >= N) return '0;
    return am[i][j];
  endfunction
  function automatic logic [W-1:0] bget(int i, int j);
    if (i < 0 || j < 0 || i >= N || j >= N) return '0;
    return bm[i][j];
  endfunction
  function automatic logic [W-1:0] sget(int i, int j);
    if (i < 0 || j < 0 || i >= N || j >= N) return '0;
    return s0[i][j];
  endfunction
  function automatic logic [W-1:0] expected(int i, int j);
    logic [W-1:0] r = sget(i, j);
    for (int m = 0; m < N; m++) r += aget(i, m) * bget(m, j);
    return r;
  endfunction
  function automatic int fdiv(int x, int y);
    return (x >= 0) ? x / y : -((-x + y - 1) / y);
  endfunction

  initial begin
    checks = 0; failures = 0; rows_done = 0; done = 1'b0;
    run = 1'b0; a_in = '0; b_in = '0; s_in = '0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        am[i][j] = (j - i >= -1 && j - i <= 1) ? W'($urandom) : '0;
        bm[i][j] = (j - i >= -1 && j - i <= 1) ? W'($urandom) : '0;
        s0[i][j] = (j - i >= -2 && j - i <= 2) ? W'($urandom) : '0;
      end
  end

  always @(negedge clk) begin
    int rel, k, j, i, dd, pf, pl;
    logic [W-1:0] wd;
    if (rst_n && !done) begin
      run = (cyc >= T0);
      for (int q = 0; q < W1; q++) begin
        rel = cyc - T0; k = fdiv(rel, W); j = rel - k * W; i = k - 1;
        wd = (rel >= 0) ? aget(i, i - q + C1) : '0;
        a_in[q] = wd[j];
      end
      // B lines: the word for period k+1 of the top cell enters in period k
      for (int p = 0; p < W2; p++) begin
        rel = cyc - T0 - p; k = fdiv(rel, W); j = rel - k * W; i = k;
        wd = (rel >= -W) ? bget(i + C1, i + p + C2) : '0;
        b_in[p] = wd[j];
      end
      for (int d = 0; d < ND; d++) begin
        dd = d - (W1 - 1);
        pf = (dd > 0) ? dd : 0;
        rel = cyc - T0 - pf; k = fdiv(rel, W); j = rel - k * W; i = k - 1;
        wd = (rel >= 0) ? sget(i, i + dd + C2) : '0;
        s_in[d] = wd[j];
        pl = (dd + W1 - 1 < W2 - 1) ? dd + W1 - 1 : W2 - 1;
        rel = cyc - T0 - pl - 1; k = fdiv(rel, W); j = rel - k * W; i = k - 1;
        if (rel >= 0 && k >= 1 && k <= KLAST) begin
          wd = expected(i, i + dd + C2);
          if (j == 0 && wd != 0) nonzero++;
          if (j == W - 1 && d == ND - 1) rows_done++;
          checks++;
          if (s_out[d] !== wd[j]) begin
            failures++;
            if (failures < 10) $display("band_mm FAIL cyc %0d line %0d row %0d bit %0d: got %b exp %b", cyc, d, i, j, s_out[d], wd[j]);
          end
        end
      end
      cyc++;
      if (cyc == T0 + (KLAST + 1) * W + W1 + W2 + 2) begin
        if (nonzero < N) failures++;
        run = 1'b0;
        done = 1'b1;
      end
    end
  end
endmodule
