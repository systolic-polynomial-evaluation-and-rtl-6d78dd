// sp_top: the bit-serial systolic polynomial evaluator and matrix multiplier.
//
// Side by side, each with its own ports:
//   chip_*  one chip: a hexagon of 19 cells (side 3) with 32-bit cellwidth,
//           mode pin, b-latch and b-latchout, 5 input and 5 output pins on each
//           of the A, B and S paths (sp_chip);
//   poly_*  the polynomial evaluation array of 3 rows of 3 cells in polynomial
//           mode with its latch counter (sp_poly_eval);
//   mm_*    the band matrix multiplier for band widths 3 and 3 in matrix mode
//           with its latch counter (sp_band_mm);
//   mp_*    a two-stage cascade of rows of three 32-bit cells that forms
//           s + a_0*b_0 + a_1*b_1 + a_2*b_2 with b of 63 bits on 64-bit words
//           (sp_precision_cascade);
//   mt_*    the same product with one 32-bit cell used in two passes, the
//           high bits of each pass stored and fed back (sp_time_precision).
// All five are built from the same cell (sp_cell) and share clock and reset.
// The data formats and timing of each are described in its own module.
module sp_top
  import sp_pkg::*;
#(
  parameter int unsigned W  = 32,   // cellwidth
  parameter int unsigned M  = 3,    // cells per side of the chip
  parameter int unsigned N  = 3,    // polynomial array: coefficients (rows)
  parameter int unsigned MX = 3,    // polynomial array: cells per row
  parameter int unsigned W1 = 3,    // band width of A
  parameter int unsigned W2 = 3,    // band width of B
  parameter int unsigned G  = 2,    // cascade stages / passes
  parameter int unsigned NR = 3,    // cascade: cells per stage row
  parameter int unsigned P  = 64    // cascade word length
) (
  input  logic            clk,
  input  logic            rst_n,
  // chip
  input  mode_e           chip_mode,
  input  logic            chip_b_latch,
  output logic            chip_b_latchout,
  input  logic [2*M-2:0]  chip_a_in,
  output logic [2*M-2:0]  chip_a_out,
  input  logic [2*M-2:0]  chip_b_in,
  output logic [2*M-2:0]  chip_b_out,
  input  logic [2*M-2:0]  chip_s_in,
  output logic [2*M-2:0]  chip_s_out,
  // polynomial evaluator
  input  logic            poly_run,
  output logic            poly_b_latchout,
  input  logic [N-1:0]    poly_coef_in,
  output logic [N-1:0]    poly_coef_out,
  input  logic [N+MX-2:0] poly_x_in,
  output logic [N+MX-2:0] poly_x_out,
  output logic [MX-1:0]   poly_result,
  // band matrix multiplier
  input  logic            mm_run,
  output logic            mm_b_latchout,
  input  logic [W1-1:0]   mm_a_in,
  output logic [W1-1:0]   mm_a_out,
  input  logic [W2-1:0]   mm_b_in,
  output logic [W2-1:0]   mm_b_out,
  input  logic [W1+W2-2:0] mm_s_in,
  output logic [W1+W2-2:0] mm_s_out,
  // precision cascade
  input  logic            mp_run,
  input  logic [NR-1:0]   mp_a_in,
  input  logic            mp_s_in,
  input  logic [G-1:0][NR-1:0] mp_b_in,
  output logic [NR-1:0]   mp_a_out,
  output logic [G-1:0][NR-1:0] mp_b_out,
  output logic            mp_s_out,
  // precision over time
  input  logic                       mt_start,
  input  logic [P-1:0]               mt_a_word,
  input  logic [P-1:0]               mt_s_word,
  input  logic [(G-1)*(W-1)+W-1:0]   mt_b_word,
  output logic                       mt_busy,
  output logic                       mt_done,
  output logic [P-1:0]               mt_result
);
  sp_chip #(.M(M), .W(W)) u_chip (
    .clk, .rst_n,
    .mode       (chip_mode),
    .b_latch    (chip_b_latch),
    .b_latchout (chip_b_latchout),
    .a_in (chip_a_in), .a_out (chip_a_out),
    .b_in (chip_b_in), .b_out (chip_b_out),
    .s_in (chip_s_in), .s_out (chip_s_out)
  );

  sp_poly_eval #(.N(N), .MX(MX), .W(W)) u_poly (
    .clk, .rst_n,
    .run        (poly_run),
    .b_latchout (poly_b_latchout),
    .coef_in    (poly_coef_in),
    .coef_out   (poly_coef_out),
    .x_in       (poly_x_in),
    .x_out      (poly_x_out),
    .result     (poly_result)
  );

  sp_band_mm #(.W1(W1), .W2(W2), .W(W)) u_mm (
    .clk, .rst_n,
    .run        (mm_run),
    .b_latchout (mm_b_latchout),
    .a_in (mm_a_in), .a_out (mm_a_out),
    .b_in (mm_b_in), .b_out (mm_b_out),
    .s_in (mm_s_in), .s_out (mm_s_out)
  );

  sp_precision_cascade #(.W(W), .G(G), .N(NR), .P(P)) u_mp (
    .clk, .rst_n,
    .run   (mp_run),
    .a_in  (mp_a_in),
    .s_in  (mp_s_in),
    .b_in  (mp_b_in),
    .a_out (mp_a_out),
    .b_out (mp_b_out),
    .s_out (mp_s_out)
  );

  sp_time_precision #(.W(W), .G(G), .P(P)) u_mt (
    .clk, .rst_n,
    .start  (mt_start),
    .a_word (mt_a_word),
    .s_word (mt_s_word),
    .b_word (mt_b_word),
    .busy   (mt_busy),
    .done   (mt_done),
    .result (mt_result)
  );
endmodule
