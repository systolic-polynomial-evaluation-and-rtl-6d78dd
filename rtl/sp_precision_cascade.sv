// sp_precision_cascade: inner-product row with b wider than one cell, built
// by cascading stages.
//
// Computes, per word of P bits, s_out = s_in + sum_i a_i * b_i (mod 2^P) for
// N products, where each b_i has BW = (G-1)*(W-1) + W bits. The cells form G
// stages; each stage is a row of N W-bit cells in matrix mode with the S path
// running through the row. Cell i of every stage multiplies the stream a_i.
// Stage g (g < G-1) holds bits [g(W-1), (g+1)(W-1)) of each b_i with a 0
// above them, so the group counts as a positive number; the last stage holds
// the top W bits, sign included. Each cell has its own B input, fed
// bit-serially, LSB first, in the W cycles before that cell latches. With a
// single row per stage no b word has to move on to another cell, so the word
// length P can exceed W.
//
// How it works: stage 0 forms s + sum a_i*b_i,0; the low W-1 bits of its
// result are final and are taken off. Its remaining bits go on as the S input
// of stage 1, whose cells therefore latch W+N-1 cycles after those of stage 0
// (N cycles through the row plus W-1 bits dropped). The a streams reach stage
// 1 W+N-1 cycles later too, so that each a's LSB meets bit W-1 of the partial
// sum. Stage 1 adds sum a_i*b_i,1 (weight 2^(W-1)), and so on. The output
// stream picks, bit by bit, the stage that produces that bit: bits
// [g(W-1), (g+1)(W-1)) from stage g, the rest from the last stage, after each
// stage's stream has been delayed so that all line up.
//
// Timing: run starts a latch counter of period P. With cell 0 of stage 0
// latching at cycle T, cell i of stage g latches at T + g(W+N-1) + i, bit j of
// a word enters a_in[i] at T+i+j and s_in at T+j, and bit j of the result
// leaves s_out at T+G*N+j. P must be at least W.
//
// The row of cells chained through S and the splitting of b into groups of
// W-1 bits plus a sign bit, the extraction of W-1 final bits per stage and the
// feeding of the rest into the next stage follow the document. The row length
// N, the delay lines and the output selection are this design's own.
module sp_precision_cascade
  import sp_pkg::*;
#(
  parameter int unsigned W = 32,   // cellwidth
  parameter int unsigned G = 2,    // number of stages
  parameter int unsigned N = 3,    // cells (products) per stage
  parameter int unsigned P = 64    // word length of a and s
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         run,
  input  logic [N-1:0]          a_in,
  input  logic                  s_in,
  input  logic [G-1:0][N-1:0]   b_in,    // b_in[g][i]: cell i of stage g
  output logic [N-1:0]          a_out,   // A streams after the last stage
  output logic [G-1:0][N-1:0]   b_out,
  output logic                  s_out
);
  localparam int unsigned CW = $clog2(P + 1);
  localparam int unsigned DS = W + N - 1;   // latch offset between stages

  logic                lat0;
  logic [G-1:0]        lat;      // latch pulse of cell 0 of each stage
  logic [G-1:0][N-1:0] a_st, a_nx;
  logic [G-1:0]        s_st, s_nx;
  logic [G-1:0]        s_al;     // stage outputs aligned to the final bit time

  sp_latch_counter #(.P(P)) u_cnt (.clk, .rst_n, .run, .latch(lat0));

  for (genvar g = 0; g < int'(G); g++) begin : g_stage
    if (g == 0) begin : g_first
      assign lat[0]  = lat0;
      assign a_st[0] = a_in;
      assign s_st[0] = s_in;
    end else begin : g_next
      // latch pulse DS cycles after the previous stage, each A stream DS-1
      // cycles after it leaves the matching cell of the previous stage
      logic [DS-1:0] lat_d;
      always_ff @(posedge clk) begin
        if (!rst_n) lat_d <= '0;
        else        lat_d <= DS'({lat_d, lat[g-1]});
      end
      assign lat[g]  = lat_d[DS-1];
      for (genvar i = 0; i < int'(N); i++) begin : g_adelay
        logic [DS-2:0] a_d;
        always_ff @(posedge clk) begin
          if (!rst_n) a_d <= '0;
          else        a_d <= (DS-1)'({a_d, a_nx[g-1][i]});
        end
        assign a_st[g][i] = a_d[DS-2];
      end
      assign s_st[g] = s_nx[g-1];
    end

    // the row: cell i latches i cycles after cell 0, S runs through it
    logic [N-1:0] lat_c;
    logic [N:0]   s_c;
    assign lat_c[0] = lat[g];
    assign s_c[0]   = s_st[g];
    for (genvar i = 0; i < int'(N); i++) begin : g_cell
      if (i > 0) begin : g_lat
        always_ff @(posedge clk) begin
          if (!rst_n) lat_c[i] <= 1'b0;
          else        lat_c[i] <= lat_c[i-1];
        end
      end
      sp_cell #(.W(W)) u_cell (
        .clk, .rst_n,
        .mode    (MODE_MATRIX),
        .b_latch (lat_c[i]),
        .a_in    (a_st[g][i]),
        .b_in    (b_in[g][i]),
        .s_in    (s_c[i]),
        .a_out   (a_nx[g][i]),
        .b_out   (b_out[g][i]),
        .s_out   (s_c[i+1])
      );
    end
    assign s_nx[g] = s_c[N];

    // stage g's result bit j appears at T+N*(g+1)+j; delay to T+G*N+j
    if (g == int'(G) - 1) begin : g_nodelay
      assign s_al[g] = s_nx[g];
    end else begin : g_delay
      localparam int unsigned SD = (G - 1 - g) * N;
      logic [SD-1:0] sd;
      always_ff @(posedge clk) begin
        if (!rst_n) sd <= '0;
        else        sd <= SD'({sd, s_nx[g]});
      end
      assign s_al[g] = sd[SD-1];
    end
  end

  assign a_out = a_nx[G-1];

  // bit position of the output stream: restart G*N cycles after stage 0
  // latches
  logic [G*N-1:0] lat0_d;  // lat0_d[i] = lat0 delayed i+1 cycles
  localparam int unsigned GW = $clog2(G + 1);
  logic          first;
  logic [CW-1:0] pos, pos_c;   // bit index inside the current group
  logic [GW-1:0] grp, grp_c;   // stage that produces the current bit

  always_ff @(posedge clk) begin
    if (!rst_n) lat0_d <= '0;
    else        lat0_d <= (G*N)'({lat0_d, lat0});
  end
  assign first = lat0_d[G*N-1];

  always_comb begin
    pos_c = first ? '0 : pos;
    grp_c = first ? '0 : grp;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pos <= '0;
      grp <= '0;
    end else if (grp_c != GW'(G - 1) && pos_c == CW'(W - 2)) begin
      pos <= '0;
      grp <= grp_c + 1'b1;
    end else begin
      pos <= (pos_c == CW'(P)) ? pos_c : pos_c + 1'b1;
      grp <= grp_c;
    end
  end

  always_comb begin
    s_out = 1'b0;
    for (int g = 0; g < int'(G); g++) if (grp_c == GW'(g)) s_out = s_al[g];
  end
endmodule
