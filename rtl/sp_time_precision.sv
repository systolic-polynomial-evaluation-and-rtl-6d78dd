// sp_time_precision: multiplier with b wider than one cell, using one cell
// repeatedly.
//
// Computes s_word + a_word * b_word modulo 2^P, where b has
// BW = (G-1)*(W-1) + W bits, with a single W-bit cell and G passes. Pass g
// loads group g of b into the cell (bits [g(W-1), (g+1)(W-1)) with a 0 on top
// for g < G-1, the top W bits of b, sign included, for the last pass) and
// streams a and the running partial sum through it. Of the pass's result the
// low W-1 bits are final and go to the result register; the bits above them
// are stored and fed back as the S input of the next pass, which adds a times
// the next group of b. The last pass delivers all remaining bits.
//
// Storage: a (P bits, re-sent each pass), the partial sum (P bits, read LSB
// first while the new partial sum is written W-1 places lower, so one
// register serves) and the result (P bits).
// Timing: start (one cycle, with a_word, s_word and b_word valid) begins the
// first pass; each pass takes W cycles to shift the b group in, P cycles to
// stream the word and one cycle for the last output bit; done is high for one
// cycle G*(W+P+1) cycles after start, with result valid from then until the
// next start. Busy is high in between; start is ignored while busy.
//
// Re-using one set of cells with successive groups of b, extracting low bits
// of s and feeding the high-order bits back through extra storage is the
// document's scheme; it says w bits are extracted per pass, here W-1 are,
// matching its signed grouping of w-1 bits plus a sign bit. The controller and
// the parallel word interface are this design's. The cell's A and B outputs
// are left unconnected: a single cell has no neighbour to pass them to.
module sp_time_precision
  import sp_pkg::*;
#(
  parameter int unsigned W = 32,   // cellwidth
  parameter int unsigned G = 2,    // passes (groups of b)
  parameter int unsigned P = 64,   // word length of a and s
  // derived, not meant to be overridden
  parameter int unsigned BW = (G - 1) * (W - 1) + W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [P-1:0]  a_word,
  input  logic [P-1:0]  s_word,
  input  logic [BW-1:0] b_word,
  output logic          busy,
  output logic          done,
  output logic [P-1:0]  result
);
  typedef enum logic [1:0] {IDLE, LOAD, RUN, TAIL} state_e;

  localparam int unsigned CW = $clog2(P + 1);
  localparam int unsigned GW = $clog2(G + 1);

  state_e        state;
  logic [CW-1:0] cnt;
  logic [GW-1:0] pass;
  logic [P-1:0]  a_st, fb;
  logic [BW-1:0] b_st;
  logic [W-1:0]  grp;

  logic cell_a, cell_b, cell_s, cell_lat, cell_s_out;
  logic cell_a_out, cell_b_out;

  // group of b used by the current pass
  always_comb begin
    grp = '0;
    for (int g = 0; g < int'(G); g++) begin
      if (pass == GW'(g)) begin
        if (g < int'(G) - 1) grp = {1'b0, b_st[g*(W-1) +: W-1]};
        else                 grp = b_st[BW-W +: W];
      end
    end
  end

  always_comb begin
    cell_b   = (state == LOAD) ? grp[cnt[$clog2(W)-1:0]] : 1'b0;
    cell_lat = (state == RUN) && (cnt == '0);
    cell_a   = (state == RUN) ? a_st[cnt[$clog2(P)-1:0]] : 1'b0;
    cell_s   = (state == RUN) ? fb[cnt[$clog2(P)-1:0]]   : 1'b0;
  end

  sp_cell #(.W(W)) u_cell (
    .clk, .rst_n,
    .mode    (MODE_MATRIX),
    .b_latch (cell_lat),
    .a_in    (cell_a),
    .b_in    (cell_b),
    .s_in    (cell_s),
    .a_out   (cell_a_out),
    .b_out   (cell_b_out),
    .s_out   (cell_s_out)
  );

  // output bit j of the pass leaves the cell while cnt = j+1 (TAIL for j = P-1)
  int unsigned j_out, idx;
  always_comb begin
    j_out = (state == TAIL) ? P - 1 : 32'(cnt) - 1;
    idx   = 32'(pass) * (W - 1) + j_out;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= IDLE;
      cnt    <= '0;
      pass   <= '0;
      a_st   <= '0;
      fb     <= '0;
      b_st   <= '0;
      result <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      // capture the bit the cell is putting out
      if ((state == RUN && cnt != '0) || state == TAIL) begin
        if (pass == GW'(G - 1) || j_out < W - 1) begin
          if (idx < P) result[idx] <= cell_s_out;
        end else begin
          fb[j_out - (W - 1)] <= cell_s_out;
        end
      end
      case (state)
        IDLE: if (start) begin
          a_st   <= a_word;
          fb     <= s_word;
          b_st   <= b_word;
          result <= '0;
          pass   <= '0;
          cnt    <= '0;
          state  <= LOAD;
        end
        LOAD: if (cnt == CW'(W - 1)) begin
          cnt   <= '0;
          state <= RUN;
        end else cnt <= cnt + 1'b1;
        RUN: if (cnt == CW'(P - 1)) begin
          cnt   <= '0;
          state <= TAIL;
        end else cnt <= cnt + 1'b1;
        TAIL: begin
          // bits above the new partial sum's top are not part of the result
          for (int k = 0; k < int'(W) - 1; k++) fb[P-1-k] <= 1'b0;
          if (pass == GW'(G - 1)) begin
            state <= IDLE;
            done  <= 1'b1;
          end else begin
            pass  <= pass + 1'b1;
            state <= LOAD;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);
endmodule
