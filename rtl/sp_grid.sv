// sp_grid: a systolic array of sp_cell on a hexagonal lattice.
//
// Each cell sits at lattice point (p,q). Three bit-serial data paths cross the
// array along the three lattice axes:
//   A: from (p,q) to (p+1,q)     one line per row q     (1 cycle per cell)
//   B: from (p,q) to (p,q+1)     one line per column p  (W cycles per cell)
//   S: from (p,q) to (p+1,q+1)   one line per diagonal d = p-q (1 cycle per cell)
// A cell whose upstream neighbour on a path is not part of the array takes
// that input from the array's input pin for the line; the last cell of each
// line drives the line's output pin. The S direction is the sum of the A and B
// directions, which is the connection pattern shared by the polynomial array
// (A left, B down, S down-left) and the band matrix array (A down-right,
// B down-left, S down) of the document.
//
// SHAPE selects which lattice points hold cells:
//   0 (hexagon, a chip): side D1; p,q in [0,2*D1-1), |p-q| <= D1-1;
//     3*D1*(D1-1)+1 cells and 2*D1-1 lines on each path.
//   1 (polynomial array): D1 rows of D2 cells, q in [0,D1), p-q in [0,D2);
//     every S line runs through all D1 rows.
//   2 (band array): p in [0,D2), q in [0,D1), a D1 x D2 diamond; D1 A lines,
//     D2 B lines, D1+D2-1 S lines.
// Pin index of S line p-q is p-q+DOFF (DOFF = D1-1 for shapes 0 and 2).
//
// Timing: all cells of column p load b together; the b-latch pulse enters
// column 0 from lat_in and reaches column p p cycles later through an
// sp_latch_chain, which also produces lat_out. A word on an A or S line thus
// keeps its alignment with the latch as it moves one cell, and one cycle, at a
// time. With word length equal to W, a b word moves down one row per word
// while the a and s words run through a whole row or diagonal within one word.
// The hexagonal chip and the three-axis connection are the document's; the
// generic shape parameter is this design's way of building all three arrays
// from one description.
module sp_grid
  import sp_pkg::*;
#(
  parameter int unsigned SHAPE = 0,
  parameter int unsigned D1    = 3,
  parameter int unsigned D2    = 3,
  parameter int unsigned W     = 32,
  // derived sizes, not meant to be overridden
  parameter int unsigned NP    = (SHAPE == 0) ? 2*D1-1 : (SHAPE == 1) ? D1+D2-1 : D2,
  parameter int unsigned NQ    = (SHAPE == 0) ? 2*D1-1 : D1,
  parameter int unsigned ND    = (SHAPE == 0) ? 2*D1-1 : (SHAPE == 1) ? D2 : D1+D2-1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  mode_e         mode,
  input  logic          lat_in,
  output logic          lat_out,
  input  logic [NQ-1:0] a_in,
  output logic [NQ-1:0] a_out,
  input  logic [NP-1:0] b_in,
  output logic [NP-1:0] b_out,
  input  logic [ND-1:0] s_in,
  output logic [ND-1:0] s_out
);
  localparam int DOFF = (SHAPE == 1) ? 0 : int'(D1) - 1;

  function automatic bit in_grid(int p, int q);
    if (p < 0 || q < 0 || p >= int'(NP) || q >= int'(NQ)) return 1'b0;
    case (SHAPE)
      0:       return (p - q <= int'(D1) - 1) && (q - p <= int'(D1) - 1);
      1:       return (p - q >= 0) && (p - q < int'(D2));
      default: return 1'b1;
    endcase
  endfunction

  // last column of row q
  function automatic int last_p(int q);
    int r = 0;
    for (int p = 0; p < int'(NP); p++) if (in_grid(p, q)) r = p;
    return r;
  endfunction

  // last row of column p
  function automatic int last_q(int p);
    int r = 0;
    for (int q = 0; q < int'(NQ); q++) if (in_grid(p, q)) r = q;
    return r;
  endfunction

  // last column of S line with pin index d
  function automatic int last_pd(int d);
    int r = 0;
    for (int p = 0; p < int'(NP); p++) if (in_grid(p, p - d + DOFF)) r = p;
    return r;
  endfunction

  logic [NP-1:0] col_latch;
  logic          ao [NP][NQ];
  logic          bo [NP][NQ];
  logic          so [NP][NQ];

  sp_latch_chain #(.NCOL(NP)) u_latch (
    .clk, .rst_n, .lat_in, .col_latch, .lat_out
  );

  for (genvar p = 0; p < int'(NP); p++) begin : g_p
    for (genvar q = 0; q < int'(NQ); q++) begin : g_q
      if (in_grid(p, q)) begin : g_cell
        logic a_src, b_src, s_src;
        if (in_grid(p - 1, q))     begin : g_a_int assign a_src = ao[p-1][q]; end
        else                       begin : g_a_pin assign a_src = a_in[q]; end
        if (in_grid(p, q - 1))     begin : g_b_int assign b_src = bo[p][q-1]; end
        else                       begin : g_b_pin assign b_src = b_in[p]; end
        if (in_grid(p - 1, q - 1)) begin : g_s_int assign s_src = so[p-1][q-1]; end
        else                       begin : g_s_pin assign s_src = s_in[p - q + DOFF]; end

        sp_cell #(.W(W)) u_cell (
          .clk, .rst_n, .mode,
          .b_latch (col_latch[p]),
          .a_in    (a_src),
          .b_in    (b_src),
          .s_in    (s_src),
          .a_out   (ao[p][q]),
          .b_out   (bo[p][q]),
          .s_out   (so[p][q])
        );
      end else begin : g_empty
        assign ao[p][q] = 1'b0;
        assign bo[p][q] = 1'b0;
        assign so[p][q] = 1'b0;
      end
    end
  end

  for (genvar q = 0; q < int'(NQ); q++) begin : g_aout
    assign a_out[q] = ao[last_p(q)][q];
  end
  for (genvar p = 0; p < int'(NP); p++) begin : g_bout
    assign b_out[p] = bo[p][last_q(p)];
  end
  for (genvar d = 0; d < int'(ND); d++) begin : g_sout
    assign s_out[d] = so[last_pd(d)][last_pd(d) - d + DOFF];
  end
endmodule
