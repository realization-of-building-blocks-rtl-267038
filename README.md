# Floating-point FFT butterfly on binary signed-digit arithmetic

A radix-2 FFT butterfly computes `X0 = A + B·W` and `X1 = A − B·W` for complex
operands. In floating point this takes four real multiplications and six real
additions or subtractions. In a conventional design each of these units ends
with a carry-propagating adder, a normalization and a rounding. This design
removes nearly all of that. Between the multipliers and the adders, numbers
stay in a *redundant* floating-point form: an exponent plus a significand in
binary signed-digit (BSD) notation. BSD numbers add in constant time with no
carry chain. Only the four butterfly outputs are converted back to binary,
normalized and rounded, so each output is rounded once.

The interface is IEEE-754 single precision (8-bit exponent, 23-bit fraction,
bias 127). The whole butterfly is combinational between an input register
and an output register.

## Binary signed digits

Each significand digit is in {−1, 0, +1}. It travels on two wires: a
*posibit* `p` (weight +1) and a *negabit* `n` (weight −1), so the digit is
`p − n`. A BSD vector is stored as two ordinary bit vectors `pos` and `neg`,
and its value is `pos − neg`. The notation has two useful properties:

* **Negation is free.** Swapping `pos` and `neg` negates a number, and so
  does inverting both: `(1−p) − (1−n) = n − p`. The partial-product
  generator and the subtractors rely on this. No "+1" correction is needed,
  unlike with two's complement.
* **Addition is carry-limited.** See the next section.

The redundant floating-point value that flows between units (`rfp_t` in
`bsd_pkg`) is

    value = (pos − neg) · 2^(exp − 127 − 46)

with 56 BSD digits and an 11-bit signed exponent. The binary point sits 46
digits up, where the exact product of two 24-bit significands puts it. The
sign is carried by the digits, and the significand is not normalized.

## The carry-limited BSD adder (`bsd_adder_slice`, `bsd_adder`)

This is the heart of the design and the part that takes the most care to
follow. The adder is made of two-digit slices. Each slice has four full
adders and handles digits `i` and `i+1` of operands `x` and `y`. From the
slice below it receives a posibit transfer `c_in` and a negabit transfer
`cn_in`, both of weight 2^i.

An inverted negabit `~n = 1 − n` is a posibit with a bias of −1. With that
trick, every input can go into an ordinary full adder:

| adder | inputs                         | sum → | carry (weight 2) → |
|-------|--------------------------------|-------|--------------------|
| FA0   | `~x_neg[0]`, `~y_neg[0]`, `y_pos[0]` | `u`  | `v`; `s_neg[1] = ~v` |
| FA1   | `u`, `x_pos[0]`, `c_in`        | `s_pos[0]` | `w` (into digit i+1) |
| FA2   | `x_pos[1]`, `~x_neg[1]`, `y_pos[1]` | `p` | `c_out` (into digit i+2) |
| FA3   | `p`, `~y_neg[1]`, `w`          | `s_pos[1]` | `k`; `cn_out = ~k` |

Also, `s_neg[0] = cn_in`. The −1 biases of the inverted negabits cancel
against the inverted carries. As a result each slice satisfies exactly

    X + Y + c_in − cn_in = S + 4·(c_out − cn_out)

where `X`, `Y` and `S` are the two-digit values.

The key point is what each output depends on. `c_out` comes only from the
slice's own digits. `cn_out` comes only from the slice's own digits and
`c_in`. A transfer therefore never travels further than into the next slice.
An N-digit adder, which is simply a row of slices, has the delay of one
slice whatever N is.

The four-full-adder arrangement and the net names follow the published slice.
Which pins carry an inversion is this design's reading, fixed by the identity
above. The testbench checks that identity over all 1024 input combinations.
This slice has six inverted signals, whereas the published comparison gives
five inverters.

## Redundant multiplier (`bsd_fp_mult`, `pp_gen`, `csd_recode`)

`B·W` takes a data operand `B` and a twiddle factor `W`, which is a constant
in an FFT. `B` has a 24-digit BSD significand (`bsd_fp_t`), so it could come
straight from a previous redundant stage. At the butterfly inputs,
`fp_to_bsd` makes it from an IEEE number: the significand goes on the
posibits, or on the negabits if the number is negative. `W` is an IEEE
single.

1. **Signs and exponent.** `B`'s sign is in its digits. The exponent is
   `eB + eW − 127`.
2. **Recoding the constant.** `W`'s significand is recoded into 25 canonical
   signed digits (non-adjacent form: digit `i = bit(i+1) of 3W − bit(i+1) of
   W`). `W`'s sign flips every non-zero digit. Because no two neighbouring
   digits are non-zero, each digit pair `(i+1, i)` asks for exactly one of
   0, ±B or ±2B.
3. **Partial-product generation.** One `pp_gen` per digit pair (13 of them).
   It forms `2B` gated by digit `i+1` and `B` gated by digit `i`, each
   negated by its digit's sign. A 2:1 multiplexer, selected by "digit `i+1`
   is non-zero", picks one. The result is a 25-digit BSD partial product at
   weight 4^j.
4. **Partial-product reduction.** A tree of 56-digit BSD adders reduces the
   13 operands through 7, 4 and 2 to 1. It has no final carry-propagating
   adder: the product leaves the multiplier still redundant.

A zero operand (exponent 0) gives a zero product with exponent 0, so it
never dominates a later alignment.

## Fused dot product and fused add-subtract (`rfp_dot2`, `rfp_addsub`, `rfp_fused_addsub`)

The butterfly is organized as two kinds of fused operation. Neither rounds
anything.

**Two-term dot product (`rfp_dot2`)** computes `b1·w1 ± b2·w2`. It is built
from two redundant multipliers and one redundant adder/subtractor. Two
instances give `(BW)re = Bre·Wre − Bim·Wim` and `(BW)im = Bre·Wim + Bim·Wre`.

The adder/subtractor (`rfp_addsub`) works in three steps:

1. It compares the exponents.
2. It shifts both digit vectors of the operand with the smaller exponent to
   the right by the difference, using two barrel shifters. Digits that fall
   off are dropped, and a difference of 63 or more clears the operand.
3. It adds the two significands with one 56-digit BSD adder.

Subtraction first swaps the second operand's posibits and negabits. The
result keeps the larger exponent and stays unnormalized.

**Add-subtract (`rfp_fused_addsub`)** takes `A` and `B·W` for one part (real
or imaginary) and produces both `A + B·W` and `A − B·W`. The two results
share one exponent comparison and one alignment. Two BSD adders then form
`a + b` and `a + (−b)`, where `−b` is the aligned `b` with its wires swapped.
Together with the dot product this forms the fused dot-product-add path
`A ± (B1·W1 ± B2·W2)`, which is rounded once.

## Normalize and round (`rfp_to_fp`)

This is the one carry-propagating step. It works in five steps:

1. Compute `v = pos − neg` in two's complement.
2. Split `v` into sign and magnitude.
3. Find the leading one with a priority search.
4. Shift the magnitude left with a barrel shifter so the leading one is on top.
5. Keep 24 bits and round to nearest, ties to even, using a guard bit and a
   sticky bit. A carry out of the rounding increments the exponent.

Results above the single range become infinity. Results below the normal
range become a signed zero; there are no subnormals. A zero significand
gives +0.

## Barrel shifter (`barrel_shifter`)

The shifter has three stages: input reversal, a left shift/rotate core, and
output reversal. A right shift reverses the word, shifts it left and
reverses it back. The core has `log2(WIDTH)` rows of `WIDTH` 2:1
multiplexers, and row `s` moves the word by `2^s` places. That makes
`WIDTH·log2(WIDTH)` multiplexers, or 160 at the default 32 bits (24, 64 and
384 at 8, 16 and 64 bits). The testbench runs all four modes at 8, 16, 32,
56 and 64 bits.

Two parameters fix the operation:

* `ROTATION`: 0 is a logical shift with zero fill, 1 is a rotation.
* `DIRECTION`: 0 is left, 2 (any non-zero value) is right.

The butterfly uses 56-bit instances: right shifts for alignment and a left
shift for normalization.

## Interface and timing (`fp_butterfly`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset (clears the valid flags only) |
| `in_valid` | in | 1 | capture `a_*`, `b_*`, `w_*` on this edge |
| `a_re`, `a_im`, `b_re`, `b_im`, `w_re`, `w_im` | in | 32 | IEEE single operands |
| `out_valid` | out | 1 | results valid |
| `x0_re`, `x0_im` | out | 32 | A + B·W |
| `x1_re`, `x1_im` | out | 32 | A − B·W |

The unit accepts one operand set per cycle. Results appear two cycles after
the edge that captured them. The path from the input register to the output
register is combinational: multipliers, the dot-product adder, the
add-subtract unit, then rounding.

## Accuracy

Each output is rounded once. Before that, the only loss is truncation of
alignment-shifted digits below the 46 fraction digits of the larger operand.
So each output is within one unit in the last place of the correctly rounded
result, plus about 2^−40 times the largest term that entered it. The second
term only matters when terms cancel heavily. Infinities, NaNs and subnormal
inputs are not handled: an exponent field of 0 reads as zero, and 255 is
treated as an ordinary exponent.

## Departures from the published description, and choices made here

* The published architecture merges the last additions into a
  "three-operand adder" that also normalizes and rounds. Its insides are not
  described. Here, the dot-product result feeds a two-input fused
  add-subtract unit, and a separate normalize-and-round stage sits at each
  output. The block diagram draws separate adders for `A + BW` and `A − BW`;
  here they share their alignment.
* The encoding of the multiplier digits (a non-zero flag plus a sign) and
  their canonical-signed-digit recoding are this design's reading of the
  generator's W+/W− inputs.
* The butterfly's ports are IEEE singles, so `B` is converted to BSD at the
  input. The multiplier itself accepts any BSD significand. A multi-stage
  FFT could pass redundant values between stages, but that would need a
  24-digit reduction of the 56-digit results, which is not provided.
* The following are all this design's own choices: the 56-digit significand,
  the 11-bit exponent, the register stages and valid flag, round-to-nearest-
  even, and the handling of zero, overflow and underflow.
* The barrel shifter's direction and shift/rotate choices are parameters, as
  the component is described, although its block diagram draws them as
  inputs.
* The 4-bit carry-select adder that serves as the comparison baseline is not
  part of this design.

## Files

| file | contents |
|------|----------|
| `rtl/bsd_pkg.sv` | formats, constants, `rfp_t` |
| `rtl/full_adder.sv` | one-bit full adder |
| `rtl/bsd_adder_slice.sv` | two-digit carry-limited BSD adder slice |
| `rtl/bsd_adder.sv` | N-digit BSD adder (default 2 digits = one slice) |
| `rtl/csd_recode.sv` | canonical signed-digit recoder for the constant operand |
| `rtl/pp_gen.sv` | partial-product generator (0, ±B, ±2B) |
| `rtl/bsd_fp_mult.sv` | redundant FP multiplier |
| `rtl/barrel_shifter.sv` | shift/rotate unit |
| `rtl/fp_to_rfp.sv` | IEEE single to redundant FP (for `A`) |
| `rtl/fp_to_bsd.sv` | IEEE single to BSD-significand operand (for `B`) |
| `rtl/rfp_addsub.sv` | redundant FP adder/subtractor |
| `rtl/rfp_dot2.sv` | fused two-term dot product (two multipliers + adder) |
| `rtl/rfp_fused_addsub.sv` | fused add-subtract (a + b and a − b, shared alignment) |
| `rtl/rfp_to_fp.sv` | normalize and round to IEEE single |
| `rtl/fp_butterfly.sv` | top level |
| `tb/tb_fp_pkg.sv` | reference conversions and rounding for the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`, and `failures=0`
means it passed. For example, for the full butterfly:

    verilator --binary --timing --assert --top-module tb_fp_butterfly \
        rtl/bsd_pkg.sv tb/tb_fp_pkg.sv rtl/*.sv tb/tb_fp_butterfly.sv
    ./obj_dir/Vtb_fp_butterfly

`tb_fp_butterfly` runs at the default sizes. It streams 3,003 operand sets
through the butterfly and compares them with a double-precision reference.
The twiddle factors include the sixteen 16-point roots of unity. The bench
checks the two-cycle latency. It also requires each of these events to occur
at least once: an alignment shift, an operand shifted out entirely, a zero
operand, a negative result, cancellation to exact zero, a rounding increment
and overflow to infinity.

The block testbenches check exact values:

* The slice and the BSD adder are checked against the arithmetic identity.
* The multiplier is checked against the exact integer product, with
  arbitrary BSD multiplicands.
* The adders are checked against independently computed truncated sums.
* The dot product is checked against exact integer products.
* The rounder is checked against an integer round-to-nearest-even model.

To change the precision, edit the constants in `bsd_pkg`: `SIG_BITS`,
`RFP_DIGITS` and `FRAC_DIGITS`. `RFP_DIGITS` must stay even, because the
adder is built from whole two-digit slices.
