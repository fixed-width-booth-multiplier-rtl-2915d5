# Fixed-width Booth multiplier with an adaptive conditional-probability estimator, and a 2-D DCT built on it

Many DSP datapaths multiply two L-bit numbers but keep only an L-bit result.
An L x L multiplier makes a 2L-bit product. You could build the whole
partial-product array and round it afterwards (*post-truncation*, exact but
large). Or you could drop the lower half of the array before adding it
(*direct truncation*, about half the adder cells, but biased by several LSBs).
This design sits between the two. It adds only the upper half of a radix-4
Booth array, the **main part (MP)**, and replaces the discarded lower half,
the **truncation part (TP)**, with a compensation value `sigma` that is cheap
to compute:

* the `W` truncated columns next to the output, **TP_major**, are summed
  exactly. `W` is the *column information*, the knob that trades area for
  accuracy;
* the remaining columns, **TP_minor**, are not built at all. Their expected
  value is estimated from information the multiplier already has: which Booth
  digits are zero.

The result is within 1 LSB of the correctly rounded product at L = 8 and
within 2 LSB at L = 14, 16 and 18. Its mean error is almost zero, where direct truncation
is off by 1.3 to 2.4 LSB on average. As an application, four 14-bit instances
form the kernel of an 8x8 two-dimensional DCT.

## The partial-product array

Operands `x` (multiplicand) and `y` (multiplier) are L-bit two's complement
numbers, with L even. `y` is recoded into Q = L/2 radix-4 digits
`d_i = -2*y[2i+1] + y[2i] + y[2i-1]` (`booth_encoder`). Each digit selects a
row of L+1 bits `p_{j,i}`, the magnitude 0, X or 2X, inverted when `d_i < 0`
(`booth_pp_row`). A negation bit `n_i` completes the two's complement. Bit
`p_{j,i}` has weight `2^(j+2i)`.

The array is arranged so that the lower half is as regular as possible:

| item | column(s) | notes |
|---|---|---|
| `p_{j,i}`, j < L | j + 2i | |
| `n_i`, i < Q-1 | 2i | inside TP |
| `e_{Q-1}` | L-2 | replaces `p_{0,Q-1}` |
| `lambda` | L-1 | |
| `S2 S1 S0` | L+2 .. L | replace row 0's sign `p_{L,0}` |
| `~p_{L,i}`, i >= 1 | L + 2i | sign extension |
| constant | >= L+3 | `-(2^(L+2) + sum_{i=1}^{Q-1} 2^(L+2i)) mod 2^(2L)` |

The last row's negation bit `n_{Q-1}` would land at column L-2, next to
`p_{0,Q-1}`. `booth_lastrow_map` adds the two in advance with an 8-entry
mapping table:

| n_{Q-1} | p_{0,Q-1} | p_{L,0} | S2 S1 S0 | lambda | e_{Q-1} |
|---|---|---|---|---|---|
| 0 | 0 | 0 | 100 | 1 | 0 |
| 0 | 0 | 1 | 011 | 1 | 0 |
| 0 | 1 | 0 | 100 | 1 | 1 |
| 0 | 1 | 1 | 011 | 1 | 1 |
| 1 | 0 | 0 | 100 | 1 | 1 |
| 1 | 0 | 1 | 011 | 1 | 1 |
| 1 | 1 | 0 | 101 | 0 | 0 |
| 1 | 1 | 1 | 100 | 0 | 0 |

In arithmetic terms, with `c = n*p0`: `e = n xor p0`, `S = 4 - p_{L,0} + c`
and `lambda = 1 - c`. The carry `c` is put in at column L, through S, instead
of at column L-1. `lambda` at column L-1 makes up for it and also contributes
`2^(L-1)`. As a result, **the complete array adds up to `X*Y + 2^(L-1)`**. Its
upper half is therefore the *rounded* product, and the reference for this
multiplier is `floor((X*Y + 2^(L-1)) / 2^L)`. This identity holds for every
8-bit operand pair; the testbench model relies on it.

## The compensation: what `sigma` estimates

The output is

    p = MP + sigma,    sigma = floor( (TP_major + E[TP_minor]) / 2^L )

where TP_major covers columns L-W .. L-1 and TP_minor covers columns
0 .. L-W-1 (`acpe_comp`).

* **TP_major** is exact. `acpe_booth_mult` routes every bit in those columns
  to `acpe_comp`: one W-bit slice per partial-product row, plus one slice for
  the `n_i` bits and `lambda`. `acpe_comp` adds the slices.
* **E[TP_minor]** is a conditional expectation. A zero Booth digit makes its
  whole row zero, and the encoder already knows which digits are zero. For a
  nonzero digit, each bit of the row, including `n_i`, is taken to be 1 with
  probability 1/2. The row's bits in the minor columns (weights
  `2^(2i) .. 2^(L-W-1)`) plus `n_i` (weight `2^(2i)`) then have an expected
  sum of exactly `2^(L-W-1)`. This is independent of i, for every nonzero row
  with `2i <= L-W-1`. For W = 1 the last row also adds `e_{Q-1}`, worth
  `2^(L-3)` on average.

In units of `2^(L-W-2)` the whole circuit is

    sigma = (4*M + 2*N + [W==1]*nz_{Q-1}) >> (W+2)

with M the weighted sum of the major bits and N the number of qualifying
nonzero digits. That is one small adder and a popcount, with no table. Two
remarks:

* With W = 1, the last term (1/8 of an output LSB) never changes the floor,
  because the other terms are multiples of 1/4. It is kept for exactness.
* `lambda` already carries the rounding half. The floor is therefore the
  right operator: rounding to nearest instead roughly triples the MSE.

Error against the rounded exact product (uniform random operands, 20 000 pairs):

| L | W | mean error (LSB) | MSE | max abs. error | direct truncation: mean / MSE / max |
|---|---|---|---|---|---|
| 8 | 1 | 0.03 | 0.18 | 1 | -1.25 / 2.10 / 4 |
| 8 | 2 | 0.04 | 0.09 | 1 | |
| 8 | 3 | 0.02 | 0.05 | 1 | |
| 14 | 1 | 0.07 | 0.25 | 2 | -2.36 / 6.41 / 6 |
| 14 | 2 | 0.06 | 0.13 | 1 | |
| 14 | 3 | 0.03 | 0.07 | 1 | |

"Direct truncation" here means the same array with `sigma = 0`.

## Multiplier datapath

`acpe_booth_mult` is purely combinational. Its main part consists of Q + 2
rows of L bits:

* row 0: S2 S1 S0;
* rows 1 .. Q-1: partial products and inverted signs;
* the sign-extension constant;
* `sigma`.

A carry-save tree (`csa_tree`) reduces these rows to two. Each `csa_level`
takes rows four at a time into rows of 4-2 compressors (`compressor_4_2`,
made of two `full_adder`s). Its `cout` depends only on the four inputs, so
carries move one column per level. A remainder of three rows goes through a
row of full adders. For L = 8 (6 rows) the tree has two levels, and for
L = 14 (9 rows) three. A Kogge-Stone parallel-prefix adder (`prefix_adder`)
adds the last two rows. Arithmetic is modulo `2^L` throughout, which is
correct because the product's upper half fits in L bits.

Example: `x = 01011001` (89), `y = 01001101` (77). The product is 6853, so
`p = 27`, which equals `round(6853/256)`.

## 2-D DCT core

`dct2d_core` computes the orthonormal 8x8 DCT-II of 8-bit pixels with a
single 1-D kernel and one 8x8 shift-register array.

**Kernel (`dct_1d_kernel`).** An input butterfly, loaded in one cycle, forms
`s_n = x_n + x_{7-n}` and `d_n = x_n - x_{7-n}` for n = 0..3. After that, each
cycle computes one coefficient as a length-4 dot product on the four 14-bit
ACPE multipliers: `s` for even k, `d` for odd k. The coefficients are
`0.5*c(k)*cos((2n+1)k*pi/16) * 2^14`, with seven distinct magnitudes
`round(2^13*cos(m*pi/16))`, m = 1..7, generated by `acpe_pkg::dct_coef`. A
14 x 14 fixed-width product keeps bits 27..14, so the result comes back in
data units. The four products are summed, saturated to 14 bits and registered,
giving a latency of one cycle after `issue`.

**Shift-register array (`transpose_sra`).** The array is both the block buffer
and the transposition memory.

* `shift_in` moves all 64 words one place along a row-major chain, entering
  at `a[7][7]`.
* `shift_col` rotates every row one place left.
* Row 0 and column 0 are always visible.

**Schedule.** A block goes through three phases:

1. **LOAD**, 64 cycles. Each pixel is level-shifted by -128, scaled by
   `2^FRAC` (FRAC = 2 fraction bits) and shifted in.
2. **Row pass**, 8 x 10 cycles. The kernel loads row 0 and issues k = 0..7.
   The 8 results shift into the tail, which retires row 0, so the next row
   moves to the head. After 8 rows, the array holds the row-transformed block
   in row-major order.
3. **Column pass**, 8 x 10 cycles. The kernel loads column 0 while the rows
   rotate left, then issues k = 0..7. Results leave on `coef`, rounded back by
   `2^FRAC`.

**Interface and timing.**

* `pix_valid`/`pix_ready` is a valid/ready handshake on the input. Pixels go
  in row-major order. `pix_ready` is high only during LOAD, so the input
  stalls during the two passes.
* The output has no backpressure. `coef_valid`, `coef` (signed), `coef_u`
  (vertical frequency) and `coef_v` (horizontal frequency) come out with
  `coef_v` as the outer loop and `coef_u` as the inner loop. `block_done`
  marks the 64th coefficient.
* With a continuous input, one block takes 224 cycles. The first coefficient
  appears 146 cycles after the first pixel is accepted.
* Reset is asynchronous and active low.

**Accuracy.** The RMS error per coefficient against a floating-point DCT is
about 0.5, with a worst case of 3 (at the DC term of an all-black block).
Ten synthetic 512 x 512 images go through DCT, then an exact inverse DCT and
rounding to 8 bits, and come back at about 53.4 dB PSNR.

## What follows the published design and what is this design's own

Taken from the published design:

* the fixed-width radix-4 Booth multiplier;
* the MP/TP split;
* the TP_major/TP_minor split with the column-information parameter;
* the last-row mapping table (reproduced exactly);
* the tree-based CSA reduction with 4-2 compressors and a parallel-prefix
  final adder;
* the 2-D DCT made of a shift-register array and a 1-D kernel with four
  14-bit multipliers;
* the 8-bit example operands.

Chosen or derived here:

* **The TP_minor estimator.** The published ACPE formula is not reproduced
  here. The estimator above, a conditional expectation given the zero/nonzero
  Booth digits, followed by a floor, is this design's own and was tuned only
  by measuring its error. Accuracy and area therefore differ from any
  published figures for the original estimator.
* **Bit placement.** The column positions of S, lambda and e, and the
  sign-extension constant, were derived so that the mapping table is exact.
* **Structure choices:** the Kogge-Stone prefix topology, the 4-2/3-2
  grouping of the tree, and a fully combinational multiplier with no
  pipeline.
* **The whole DCT organisation:** the 8x8 block, the orthonormal scaling,
  the even/odd butterfly, one coefficient per cycle, the single-array
  transposition, the sequential load/row/column schedule, the level shift,
  FRAC = 2, saturation and the handshake.
* **Defaults:** L = 8 and W = 1 for the stand-alone multiplier, 14 bits for
  the DCT.

Not included:

* the post-truncated and direct-truncated baselines the method is compared
  against;
* the FPGA area and power measurements;
* the real test images (the image testbench generates synthetic ones).

## Files

`rtl/`:

* `acpe_pkg.sv`: the Booth digit type and the DCT coefficients.
* `booth_encoder.sv`, `booth_pp_row.sv`, `booth_lastrow_map.sv`,
  `acpe_comp.sv`, `full_adder.sv`, `compressor_4_2.sv`, `csa_level.sv`,
  `csa_tree.sv`, `prefix_adder.sv`, `acpe_booth_mult.sv`: the multiplier.
* `dct_1d_kernel.sv`, `transpose_sra.sv`, `dct2d_core.sv`: the DCT. The top
  module is `dct2d_core`.

Parameters:

* `acpe_booth_mult`: `L` (even, at least 4) and `W` (1 .. L-2).
* `dct2d_core`: `DW` (data and multiplier width), `W` and `FRAC`.

`tb/`:

* One self-checking testbench `<module>_tb.sv` per module. Each prints
  `TB_RESULT checks=N failures=M`.
* `acpe_mult_model_pkg.sv`: an integer reference model of the multiplier,
  built on the array identity above.
* `dct_ref_pkg.sv`: a floating-point DCT/IDCT.
* `dct2d_core_tb.sv`: end to end at default parameters. It checks
  coefficients, order, latency (146), block period (224), stalls and bubbles.
* `dct2d_image_tb.sv`: the ten-image PSNR run, about 20 s.

To simulate with Verilator 5 (the `-I` paths also serve as module search
paths):

    verilator --binary --timing --assert -Irtl -Itb --top-module dct2d_core_tb \
        rtl/acpe_pkg.sv tb/dct_ref_pkg.sv tb/dct2d_core_tb.sv
    ./obj_dir/Vdct2d_core_tb

For the multiplier, use `--top-module acpe_booth_mult_tb` with
`rtl/acpe_pkg.sv tb/acpe_mult_model_pkg.sv tb/acpe_booth_mult_tb.sv`.

To lint: `verilator --lint-only -Wall -Irtl rtl/acpe_pkg.sv rtl/dct2d_core.sv`.
The remaining lint warnings are intentional:

* the dropped TP_minor bits and the carries out of the top column are
  unused;
* the reset also disables the SVA assertions.
