// sp_cell: bit-serial multiply-accumulate cell.
//
// The multiplicand b (W bits, two's complement) arrives bit-serially on b_in,
// least significant bit first, through a W-bit shift register whose far end is
// b_out, so B leaves the cell W cycles after it enters. A pulse on b_latch
// copies the shift register into the B latch and clears the accumulator: the
// cycle in which b_latch is high is the first bit of a new word.
//
// The streamed multiplier bit m and the addend bit c enter LSB first. Every
// cycle the accumulator (W+2 bits) is shifted right with its top bit kept
// (sign extension), and m * sext(b) + c is added; the low bit of the result is
// the next output bit. After P cycles the P bits that left on s_out are the low
// P bits of  c_word + m_word * b , so any word length P works on the A and S
// paths while b is limited to W bits.
//
// mode (see sp_pkg::mode_e) chooses which input is multiplied:
//   MODE_MATRIX: m = a_in, c = s_in   ->  s_out word = s + a*b   (R1)
//   MODE_POLY:   m = s_in, c = a_in   ->  s_out word = a + s*b   (R2)
// In both modes a_in is forwarded to a_out through a 1-bit register, so A and
// S both have one cycle of latency per cell and stay aligned.
//
// Follows the document: the B shift register and latch, the 1-bit A latch, the
// mode switch on A_in/S_in, the serial accumulator of W+2 bits with the sign
// of b added into its top bits and its top bit held on the shift, and the
// accumulator clear on b_latch. This design's own choices: one clock edge does
// the add and the shift that two clock phases do in the original; the A
// register always takes A_in so that the A stream passes on unchanged in both
// modes; and a synchronous active-low reset clears every register.
module sp_cell
  import sp_pkg::*;
#(
  parameter int unsigned W = 32   // cellwidth: bits of b held by the cell
) (
  input  logic  clk,
  input  logic  rst_n,
  input  mode_e mode,
  input  logic  b_latch,  // first cycle of a new word: load b, clear accumulator
  input  logic  a_in,
  input  logic  b_in,
  input  logic  s_in,
  output logic  a_out,
  output logic  b_out,
  output logic  s_out
);
  localparam int unsigned AW = W + 2;

  logic [W-1:0]  b_shift;   // B shift register, bit 0 is the output end
  logic [W-1:0]  b_reg;     // B latch
  logic          a_reg;     // 1-bit A latch
  logic [AW-1:0] acc;       // accumulator / shift register

  logic          mul_bit, add_bit;
  logic [W-1:0]  b_cur;
  logic [AW-1:0] b_ext, base, sum;

  always_comb begin
    mul_bit = (mode == MODE_POLY) ? s_in : a_in;
    add_bit = (mode == MODE_POLY) ? a_in : s_in;
    b_cur   = b_latch ? b_shift : b_reg;
    b_ext   = {{2{b_cur[W-1]}}, b_cur};
    base    = b_latch ? '0 : {acc[AW-1], acc[AW-1:1]};
    sum     = base + (mul_bit ? b_ext : '0) + AW'(add_bit);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      b_shift <= '0;
      b_reg   <= '0;
      a_reg   <= 1'b0;
      acc     <= '0;
    end else begin
      b_shift <= {b_in, b_shift[W-1:1]};
      if (b_latch) b_reg <= b_shift;
      a_reg   <= a_in;
      acc     <= sum;
    end
  end

  assign a_out = a_reg;
  assign b_out = b_shift[0];
  assign s_out = acc[0];
endmodule
