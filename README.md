# Bit-serial systolic polynomial evaluator and matrix multiplier

This is synthesizable SystemVerilog for a systolic array built from a single, very small
bit-serial cell. The cell holds one multiplicand `b` and an accumulator. It streams the
other operands through itself one bit per clock, least significant bit first. Words on two
of the three data paths can be any length. Only `b` is limited by the cell, to W bits, and
cells can be chained to make it wider. One mode bit picks between two recurrences:

| mode          | recurrence        | used for                         |
|---------------|-------------------|----------------------------------|
| `MODE_MATRIX` | s' = s + a·b (R1) | inner products, matrix products  |
| `MODE_POLY`   | s' = a + s·b (R2) | one step of Horner's rule        |

An array of N×N such cells can evaluate N polynomials of N coefficients at N points. It can
also multiply band matrices in time linear in the matrix size. The RTL has:

* the cell;
* a generic array on a hexagonal lattice;
* one chip: a hexagon of 19 cells, which is the 40-pin package size;
* a polynomial-evaluation array and a band-matrix array;
* two ways to multiply by a `b` wider than one cell: stages in space, or passes in time.

## The cell (`sp_cell`)

```
 b_in ──► [ W-bit shift register ] ──► b_out         (W cycles later)
                   │ b_latch
              [ W-bit B latch ]
 a_in ─┬─────────────────────────────► [1-bit reg] ──► a_out   (1 cycle later)
       │   mode: which of a_in / s_in is multiplied
 s_in ─┴─► acc ← (acc >>> 1) + m·sext(b) + c ; s_out = acc[0] (1 cycle later)
```

* **Serial multiply-accumulate.** In every cycle the accumulator shifts right by one bit and
  adds `m·b + c`:
  * `m` is the bit being multiplied: `a_in` in matrix mode, `s_in` in polynomial mode.
  * `c` is the addend bit: the other input.

  The low bit of the sum is final, so it leaves on `s_out` in the next cycle. After P cycles
  the P bits that came out are `c_word + m_word·b mod 2^P`. This works for any word length
  P ≥ 1.
* **Two's complement.** The accumulator has W+2 bits. `b` is sign-extended into the two extra
  bits, and the top bit is kept when the accumulator shifts. The multiplier word `m_word` is
  taken as unsigned, but only the low P bits are kept, so the result is still correct modulo
  2^P for signed operands.
* **Word boundaries.** `b_latch` marks the first bit of a word. In that cycle the cell copies
  the shift register into the B latch, uses the new `b` straight away, and starts the
  accumulator from zero. This clears the sign bits that a negative product leaves behind. The
  next `b` is shifted in during the W cycles before its latch, while the current word is
  being processed.
* **Latency.** A and S both pass through the cell in one cycle. Words that enter together stay
  aligned as they move from cell to cell. B takes W cycles per cell.

## Arrays: three data paths on a hexagonal lattice (`sp_grid`)

Each cell sits at a lattice point (p, q). Each data path connects a cell to one neighbour:

| path | from → to        | one line per      | delay per cell |
|------|------------------|-------------------|----------------|
| A    | (p,q) → (p+1,q)   | row q             | 1 cycle        |
| B    | (p,q) → (p,q+1)   | column p          | W cycles       |
| S    | (p,q) → (p+1,q+1) | diagonal d = p−q  | 1 cycle        |

The S direction is the sum of the A and B directions. This is the geometry of both arrays:

* In the polynomial array, coefficients move left, points move down and results move down
  and to the left.
* In the band-matrix array, `a` moves down-right, `b` moves down-left and `s` moves down.

Where a cell's upstream neighbour is missing, that input comes from an input pin of the
array. The last cell on each line drives an output pin. The parameter `SHAPE` picks which
lattice points hold cells: a hexagon (a chip), a parallelogram (polynomial array) or a
diamond (band array).

### Timing: latch periods

Every cell in a column loads its `b` in the same cycle. Each column does so one cycle after
the column before it along the A path: a shift register carries the `b_latch` pulse across
the columns (`sp_latch_chain`). Its last stage is the chip's `b_latchout` pin, which starts
the next chip. `sp_latch_counter` produces the pulse, one every P cycles.

Because of this skew, a word on A or S reaches every cell exactly at that cell's latch. Call
each P-cycle interval a *latch period* k:

* **A:** an `a` word passes along a whole row within one period.
* **S:** an `s` word passes down a whole diagonal within one period, so a diagonal adds up
  the contributions of all its cells in period k.
* **B:** a `b` word moves down one row per period. This holds only when the word length
  **P equals the cellwidth W**, which the arrays require.

Hence, at word level:

```
a(q,k)   = word on row q in period k          (the same in every cell of the row)
b(p,q,k) = b(p,q-1,k-1)                        (b moves down one row per period)
s_out of diagonal d in period k = s_in + Σ over cells (p,q) on d of  a(q,k) ⊙ b(p,q,k)
```

Here ⊙ is `a·b` added in matrix mode, or one Horner step in polynomial mode. Input data must
follow the schedules below. The testbenches generate them bit by bit.

### Polynomial evaluation (`sp_poly_eval`)

The array has N rows of MX cells: q in [0,N), p−q in [0,MX). Every diagonal runs through all
N rows and starts from `s = 0`.

* **Coefficients.** In period k, row q carries coefficient q (highest power first) of the
  polynomial evaluated in that period. It enters `coef_in[q]` in the latch cycle of column q.
* **Points.** Cell (p,q) holds point x[(p−q+k) mod M] in period k. Column p is therefore fed
  the rotating sequence x[(p−qtop+n) mod M] of the M points, one word per period. `qtop` is
  the column's top row.
* **Results.** Diagonal j applies Horner's rule, f ← f·x + c, once per row, always with the
  same point. It delivers f(x[(j+k) mod M]) on `result[j]`, LSB first. The first bit appears
  N cycles after column j latched.

Each period evaluates one polynomial at MX points. K polynomials take K periods of P cycles
plus N+MX cycles of pipeline, after N periods that preload the points. The coefficients are
fed in once. Each point stream is about K+N−1 words long.

### Band matrix multiplication (`sp_band_mm`)

A W1×W2 diamond of cells computes S = S0 + A·B for band matrices, one row i of the product
per period:

* **A.** Line q carries the diagonal A[i][i−q+c1].
* **B.** Column p is fed the diagonal B[m][m+p+c2−c1], which moves down one row per period.
* **S.** Line d carries S0[i][i+d−(W1−1)+c2] in and the matching entry of S out.

Here c1 is the offset of A's highest diagonal and c2−c1 the offset of B's lowest. An N×N
product takes N periods, P·N cycles, plus one period of preload and W1+W2 cycles of pipeline.

### The chip (`sp_chip`)

The chip is a hexagon with M cells per side: 3M(M−1)+1 cells, and 2M−1 lines on each of A, B
and S. It therefore has 12M−6 data pins, plus `mode`, `b_latch`, `b_latchout`, the clock and
the reset.

| M | cells | data pins | package |
|---|-------|-----------|---------|
| 3 | 19    | 30        | 40 pin  |
| 5 | 61    | 54        | 64 pin  |
| 8 | 169   | 90        | 100 pin |

The chip serves both uses. Extra cells cost nothing if they are fed zeros:

* **Band matrices.** Any diamond inside the hexagon works as a band array.
* **Polynomials.** Use the diagonals that end on the bottom row. Rows above the coefficient
  rows get zero coefficients, which act as leading zeros in Horner's rule.

The chip test does exactly this. It multiplies matrices, switches the `mode` pin and then
evaluates polynomials. The two phases are 2M−1 periods apart (five for the 19-cell chip), so
that the B words of the two phases can pass each other in the columns.

## Wider b

A cell holds only W bits of `b`. A wider `b` is cut into groups of W−1 bits, and each group
gets a sign bit on top. The lower groups get a 0 there, because they are positive parts of
`b`. The top group gets the sign of `b`. Total precision is (G−1)(W−1)+W bits for G groups.

* **Stages in space (`sp_precision_cascade`).** G stages. Each stage is a row of N cells with
  S chained through the row, so it forms s + Σ a_i·b_i. Each cell has its own `a` stream and
  its own B input. Stage g multiplies by group g of every b_i:
  * The low W−1 bits of its result are final and are taken off.
  * The rest continues as the S input of the next stage. That stage latches W+N−1 cycles
    later: N cycles through the row, plus the W−1 bits taken off.
  * Each `a` stream reaches the next stage equally late, so that a's LSB meets bit W−1 of
    the partial sum.

  The output stream is assembled from the stages and leaves G·N cycles after the input.
  Stages are single rows because in a row no `b` word moves on to another cell, so P can
  exceed W. In a multi-row array P = W (below), which leaves no high bits to pass on.
* **Passes in time (`sp_time_precision`).** One cell, G passes. Each pass shifts in the next
  group of `b`, streams `a` and the stored partial sum through the cell, keeps W−1 final
  bits, and stores the rest to feed back in the next pass. It needs three P-bit registers
  (a, partial sum, result). A product takes G·(W+P+1) cycles.

## The top (`sp_top`)

`sp_top` places the five parts side by side, each with its own prefixed ports, on one clock
and reset:

| prefix  | part                                                    |
|---------|---------------------------------------------------------|
| `chip_` | the 19-cell chip                                        |
| `poly_` | the 3×3 polynomial array                                |
| `mm_`   | the 3×3 band array                                      |
| `mp_`   | the two-stage cascade of 3-cell rows: 63-bit `b`, 64-bit words |
| `mt_`   | the two-pass multiplier                                 |

Defaults: W = 32 for every part. P = 64 for the two wide-`b` parts.

## Departures and open points

* **Clocking.** One rising edge does both the add and the shift. The original uses a
  two-phase clock with the add on φ1 and the shift on φ2. A synchronous active-low `rst_n`
  clears every register; the original relies on `b_latch` to clear the accumulators.
* **The A register.** It always takes `a_in`. The mode switch only chooses which input is
  multiplied and which is added. A register placed after the switch would send the partial
  result, not the coefficient, along the row in polynomial mode, and the polynomial array
  would not work.
* **Word length.** In the arrays P = W. With W-bit shift registers and one latch per column,
  a `b` word moves down one row every W cycles. The schedules here need it to move down one
  row per latch period.
* **Word schedule.** The published drawings of the two arrays show all data moving one cell
  per step, with coefficient rows staggered by whole words. The bit-serial cell cannot follow
  that timing: A and S cross a cell in one cycle, while B takes W cycles. The schedules above
  are what the cell actually needs, and they are checked bit by bit.
* **Cascade stages.** The original draws each stage as a whole chip with several S lines. Here
  each stage is one row with one S line, for the word-length reason given above. Several S
  lines are independent copies of the row.
* **Latency.** The polynomial array needs N periods to preload the points. The published
  cycle count, (2·Max(K,M)−1) + K·P, does not include this preload.
* **Not built:**
  * full (non-band) matrix multiplication by feeding results back into the array, whose
    routing is not specified;
  * the sequencing memories that would feed a multi-chip array;
  * multi-chip assemblies, although `b_latchout` and the pins allow them.
* **Large workloads.** Defaults are the small sizes of the worked examples. Larger sizes are
  parameters, and these have been simulated:
  * 100 polynomials of 100 coefficients at 100 points, on `sp_poly_eval` with N = MX = 100
    (10,000 cells, W = 32, `tb_poly_workload`). All 10,000 values are correct and on time.
    The C++ build takes a few minutes.
  * Chips of side 5 and 8 (61 and 169 cells, `tb_chip_sizes`).

## Files and simulation

* `rtl/sp_pkg.sv`: the `mode_e` type.
* `rtl/sp_cell.sv`, `sp_latch_chain.sv`, `sp_latch_counter.sv`, `sp_grid.sv`, `sp_chip.sv`,
  `sp_poly_eval.sv`, `sp_band_mm.sv`, `sp_precision_cascade.sv`, `sp_time_precision.sv`,
  `sp_top.sv`: the design.
* `tb/tb_<module>.sv`: one self-checking testbench per module.
* `tb/tb_poly_workload.sv`, `tb/tb_chip_sizes.sv`: the large polynomial workload and the
  larger chips.
* `tb/chk_*.sv`: stimulus and checkers that the block tests and the top test share. They
  compute expected values with integer arithmetic: matrix products, Horner's rule
  cross-checked against the power form, and s + a·b. They compare every output bit in the
  cycle it must appear, which also checks latency.

Example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sp_pkg.sv tb/tb_sp_top.sv \
          --top-module tb_sp_top -Mdir obj_top && obj_top/Vtb_sp_top
```

Every testbench ends with a line `TB_RESULT checks=N failures=F`. `tb_sp_top` runs the whole
top at its default sizes:

* the chip in both modes, including a mode switch;
* the polynomial array;
* a 7×7 band product;
* 40 cascade words (each s plus three products) and 20 multi-pass products, with 64-bit
  words and 63-bit `b`.

It also counts each mechanism and fails if one never occurred. The block testbenches use
8-bit cells to keep the runs short. Each of them also fails on a deliberately broken copy of
its module.
