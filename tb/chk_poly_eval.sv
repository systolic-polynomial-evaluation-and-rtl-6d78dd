// chk_poly_eval: stimulus and checker for the polynomial evaluation array.
//
// Evaluates K random polynomials of N coefficients at NX random points. Latch
// period k evaluates polynomial k at the points x[(j+k) mod NX] on result line
// j, j = 0..MX-1, so with MX = NX = K all K*NX values appear in K periods.
// Stimulus follows the schedule in sp_poly_eval: row q gets coefficient q
// (highest power first) of polynomial k in period k, column p gets the point
// sequence x[(p - qtop(p) + n) mod NX], one word per period. Expected values
// come from Horner's rule in integer arithmetic modulo 2^W, cross-checked once
// against the power form. Each result is checked in the exact cycles it must
// leave the array, which also checks the latency (N + j cycles after the
// latch of period k, K periods in all).
module chk_poly_eval #(
  parameter int N  = 4,
  parameter int MX = 3,
  parameter int W  = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          run,
  output logic [N-1:0]  coef_in,
  output logic [N+MX-2:0] x_in,
  input  logic [MX-1:0] result,
  output int            checks,
  output int            failures,
  output int            evals,
  output logic          done
);
  localparam int K = MX, NX = MX;
  localparam int NP = N + MX - 1;
  localparam int T0 = (N + 2) * W;

  int cyc = 0;
  logic [W-1:0] c [K][N];
  logic [W-1:0] x [NX];

  function automatic int fdiv(int a, int b);
    return (a >= 0) ? a / b : -((-a + b - 1) / b);
  endfunction
  function automatic int pmod(int a, int b);
    return a - fdiv(a, b) * b;
  endfunction
  function automatic logic [W-1:0] horner(int kp, int xi);
    logic [W-1:0] f = '0;
    for (int q = 0; q < N; q++) f = f * x[xi] + c[kp][q];
    return f;
  endfunction

  initial begin
    logic [W-1:0] ps, xp;
    checks = 0; failures = 0; evals = 0; done = 1'b0;
    run = 1'b0; coef_in = '0; x_in = '0;
    for (int k = 0; k < K; k++)
      for (int q = 0; q < N; q++) c[k][q] = W'($urandom);
    for (int i = 0; i < NX; i++) x[i] = W'($urandom);
    ps = '0; xp = 1;
    for (int q = N - 1; q >= 0; q--) begin ps += c[0][q] * xp; xp *= x[0]; end
    if (ps != horner(0, 0)) failures = 1;
  end

  always @(negedge clk) begin
    int rel, k, j, qt;
    logic [W-1:0] wd;
    if (rst_n && !done) begin
      run = (cyc >= T0);
      for (int q = 0; q < N; q++) begin
        rel = cyc - T0 - q; k = fdiv(rel, W); j = rel - k * W;
        wd = (rel >= 0 && k < K) ? c[k][q] : '0;
        coef_in[q] = wd[j];
      end
      for (int p = 0; p < NP; p++) begin
        qt = (p - MX + 1 > 0) ? p - MX + 1 : 0;
        rel = cyc - T0 - p; k = fdiv(rel, W); j = rel - k * W;
        wd = x[pmod(p - qt + k + 1, NX)];
        x_in[p] = wd[j];
      end
      for (int l = 0; l < MX; l++) begin
        rel = cyc - T0 - (l + N - 1) - 1; k = fdiv(rel, W); j = rel - k * W;
        if (rel >= 0 && k < K) begin
          wd = horner(k, pmod(l + k, NX));
          checks++;
          if (j == W - 1) evals++;
          if (result[l] !== wd[j]) begin
            failures++;
            if (failures < 10) $display("poly FAIL cyc %0d line %0d poly %0d bit %0d: got %b exp %b", cyc, l, k, j, result[l], wd[j]);
          end
        end
      end
      cyc++;
      if (cyc == T0 + K * W + NP + 4) begin
        if (evals != K * NX) failures++;
        run = 1'b0;
        done = 1'b1;
      end
    end
  end
endmodule
