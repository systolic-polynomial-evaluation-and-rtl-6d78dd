// chk_cascade: stimulus and checker for the multi-stage precision cascade.
//
// Forms s + sum of N products a_i*b_i, with random P-bit a_i and s and random
// b_i of (G-1)*(W-1)+W bits. Each b_i is cut into groups here: stages below
// the last get W-1 bits with a zero on top, the last stage the top W bits with
// the sign. Each group enters its cell's B input in the W cycles before that
// cell latches (cell i of stage g latches g*(W+N-1)+i cycles after cell 0 of
// stage 0); a_i enters i cycles after s. Every result bit is compared with the
// sum modulo 2^P, computed here, in the cycle it must leave (G*N cycles after
// the matching bit of s). Word 1 uses the most negative b and all-ones a,
// word 2 all-ones everywhere.
module chk_cascade #(
  parameter int W = 8,
  parameter int G = 3,
  parameter int N = 2,
  parameter int P = 24,
  parameter int NWORD = 40
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic         run,
  output logic [N-1:0] a_in,
  output logic         s_in,
  output logic [G-1:0][N-1:0] b_in,
  input  logic         s_out,
  output int           checks,
  output int           failures,
  output int           words,
  output logic         done
);
  localparam int BW = (G - 1) * (W - 1) + W;
  localparam int T0 = 2 * G * W;
  localparam int DS = W + N - 1;

  int cyc = 0, negb = 0;
  logic [P-1:0]  aw [NWORD][N];
  logic [P-1:0]  sw [NWORD];
  logic [BW-1:0] bw [NWORD][N];
  logic [P-1:0]  ew [NWORD];

  function automatic logic [W-1:0] group(logic [BW-1:0] b, int g);
    logic [W-1:0] r;
    if (g < G - 1) r = {1'b0, b[g*(W-1) +: W-1]};
    else           r = b[BW-W +: W];
    return r;
  endfunction

  initial begin
    checks = 0; failures = 0; words = 0; done = 1'b0;
    run = 1'b0; a_in = '0; s_in = 1'b0; b_in = '0;
    for (int k = 0; k < NWORD; k++) begin
      sw[k] = P'({$urandom, $urandom});
      if (k == 2) sw[k] = '1;
      ew[k] = sw[k];
      for (int i = 0; i < N; i++) begin
        aw[k][i] = P'({$urandom, $urandom});
        bw[k][i] = BW'({$urandom, $urandom, $urandom});
        if (k == 1) begin aw[k][i] = '1; bw[k][i] = {1'b1, {(BW-1){1'b0}}}; end
        if (k == 2) begin aw[k][i] = '1; bw[k][i] = '1; end
        ew[k] += aw[k][i] * P'(signed'(bw[k][i]));
        if (bw[k][i][BW-1]) negb++;
      end
    end
  end

  always @(negedge clk) begin
    int rel, k, j;
    logic [W-1:0] gw;
    if (rst_n && !done) begin
      run = (cyc >= T0);
      rel = cyc - T0; k = rel / P; j = rel % P;
      s_in = (rel >= 0 && k < NWORD) ? sw[k][j] : 1'b0;
      for (int i = 0; i < N; i++) begin
        rel = cyc - T0 - i; k = rel / P; j = rel % P;
        a_in[i] = (rel >= 0 && k < NWORD) ? aw[k][i][j] : 1'b0;
        for (int g = 0; g < G; g++) begin
          rel = cyc - T0 - g * DS - i + W; k = rel / P; j = rel % P;
          b_in[g][i] = 1'b0;
          if (rel >= 0 && k < NWORD && j < W) begin
            gw = group(bw[k][i], g);
            b_in[g][i] = gw[j];
          end
        end
      end
      rel = cyc - T0 - G * N; k = rel / P; j = rel % P;
      if (rel >= 0 && k < NWORD) begin
        checks++;
        if (j == P - 1) words++;
        if (s_out !== ew[k][j]) begin
          failures++;
          if (failures < 10) $display("cascade FAIL word %0d bit %0d: got %b exp %b", k, j, s_out, ew[k][j]);
        end
      end
      cyc++;
      if (cyc == T0 + NWORD * P + G * N + 2) begin
        if (negb == 0) failures++;
        run = 1'b0;
        done = 1'b1;
      end
    end
  end
endmodule
