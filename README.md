# Fused floating-point dot-product unit (single precision)

This unit computes

    Y = A*B + C*D        (or A*B - C*D)

on four IEEE-754 single-precision operands and rounds **once**. A conventional
dot product uses two floating-point multipliers and a floating-point adder,
and rounds three times. Here, both significand products stay unrounded and in
carry-save form. They are aligned against each other in one wide two's-complement window
and merged by a 4:2 carry-save stage. The merged value then passes through the
back half of an ordinary floating-point multiplier: carry-propagate adder,
leading-zero anticipation, complement, normalisation and rounding. Compared
with a plain multiplier, the extra hardware is a second multiplier tree, an
aligner and the 4:2 stage. Everything after the 4:2 stage exists only once.

The published design behind this RTL reports, for a 45 nm implementation, a
dot product in about 150% of the time of one floating-point multiplication
and about 70% of the area of the parallel multiplier-multiplier-adder
arrangement. It also reports about a third of the rounding error, since it
rounds once instead of three times. This repository gives synthesizable
SystemVerilog for the unit. It gives no timing or area data for any process.

The same unit also serves as a floating-point adder or a multiplier. In
addition-only mode, A and C bypass the multiplier trees (B and D act as 1.0).
In multiplication-only mode, C·D bypasses the aligner.

## Interface and timing

`fdp_top` is the top level. The core (`fdp_unit`) is a single combinational
path, followed by one output register.

| port | dir | width | meaning |
|---|---|---|---|
| `clk_i`, `rst_ni` | in | 1 | clock, synchronous active-low reset |
| `in_valid_i` | in | 1 | operands valid this cycle |
| `a_i`, `b_i`, `c_i`, `d_i` | in | 32 | IEEE-754 single-precision operands |
| `op_sub_i` | in | 1 | 0: add the C·D term, 1: subtract it |
| `mode_i` | in | 2 | 0 dot product, 1 addition only (A ± C), 2 multiplication only (±C·D) |
| `y_valid_o` | out | 1 | result valid; exactly one cycle after `in_valid_i` |
| `y_o` | out | 32 | rounded result |
| `flags_o` | out | 4 | `{negative adder result, sticky collapse, effective subtraction, A·B had the larger exponent}` for `y_o` (observation only) |

A new operation can be issued every cycle. A concurrent assertion in `fdp_top`
checks the one-cycle latency. In addition-only mode B and D are ignored. In
multiplication-only mode A and B are ignored.

## Data path

```
 A  B           C  D
 |  |           |  |
 unpack x4 (sign, exponent, 1.fraction, zero/inf/NaN)
 |  |           |  |
 multiplier tree  multiplier tree      exponent compare (ea+eb-127, ec+ed-127,
 (carry-save)     (carry-save)           bigger/smaller, shift = bigger-smaller)
      \             /                          |
       swap so the product with the smaller exponent is shifted
                 |                             |
         align (window, sticky) <--------------+
                 |
         2's complement of the smaller pair on effective subtraction
                 |
         4:2 CSA (4 vectors + 2 carry-ins -> 2 vectors)
            /            \
      adder (101 bits)    LZA (predicts shift, +-1 bit)
            |              |
       complement          |
            |              |
       normalize <---------+
            |
   round & post-normalize --- exponent adjust ---> exponent compare
            |                                          |
            +<---------------- result exponent --------+
            |
          Y[31:0]
```

| module | role |
|---|---|
| `fdp_pkg` | widths, window size, operand and carry-save types, mode enum |
| `fdp_unpack` | field split and classification of one operand |
| `fdp_mult_tree` | 24×24 AND-array and 3:2-compressor tree, carry-save output |
| `fdp_exp_compare` | product exponents, bigger/smaller selection, alignment distance, result exponent |
| `fdp_align` | places both carry-save pairs in the window, shifts the smaller, collapses to sticky |
| `fdp_twos_comp` | inverts the smaller pair on effective subtraction; returns the two +1s as carry-ins |
| `fdp_csa42` | 4:2 reduction as two rows of 3:2 compressors |
| `fdp_adder` | carry-propagate adder (behavioural `+`) |
| `fdp_lza` | leading-zero anticipator on the adder's inputs |
| `fdp_complement` | two's-complement result to sign and magnitude |
| `fdp_normalize` | left shift by the anticipated count |
| `fdp_round` | ±1-bit correction, round to nearest even, post-normalisation, exponent adjustment, packing |
| `fdp_unit` | wires the above, the forwarding multiplexers and the special-value logic |
| `fdp_top` | output register and valid flag |

## The accumulation window

This is the part that needs the most care. All of it is set in `fdp_pkg`.

The window is `WIN_W = PROD_W + ALIGN_EXT + 3 = 101` bits, two's complement:

```
 bit 100  99   98        97 ........... 50   49 ............ 0
   sign  sign  headroom  bigger product (48)  ALIGN_EXT = 50 bits
```

**The product with the larger exponent is never shifted.** Its sum and carry
vectors are placed at bits 97..50. The other product's vectors are shifted right by
the exponent difference `d`. A zero product is never chosen as the bigger
one. The "bigger" product is chosen by exponent alone, so it can be up to
about 4× smaller in value than the other when `d` is 0 or 1. The sum is then
negative, and the complement stage fixes the sign.

**No carry-save wrap-around.** The multiplier tree adds only non-negative
partial products with exact 3:2 compressors, and their total is conserved.
So neither output vector can exceed the product, which is below 2^48.
`sum + carry` is the exact product, and the two vectors can be shifted
separately into a wider field without losing a carry out of bit 47.

**Exact alignment up to `ALIGN_EXT`, sticky beyond it.** For `d ≤ 50` the shifted
vectors fit in the window and nothing is dropped. For `d > 50`, the smaller product
is non-zero and smaller than 2^47 window units. It is replaced by a single 1
in bit 0, and its value is dropped. The bigger product has zeros in its 50 low bits,
and its leading one is at bit 95 or higher. So the true sum and the
surrogate have the same bits above bit 50 and both have a non-zero remainder
below it. That holds for addition and subtraction alike, so they round identically. This argument
needs `ALIGN_EXT ≥ 47`.

**Subtraction without an incrementer.** Negating a carry-save pair means
inverting both vectors and adding 2. The two 1s enter the 4:2 stage in the
least-significant bit of each carry row, which a shifted carry always leaves
empty.

**Why two sign bits.** The magnitude of any sum is below 2^99, so bits 100
and 99 always equal the sign. The leading-zero anticipator (Schmookler–Nowka-style
indicator string on the adder's two inputs) is then within one bit of the
true leading one, in either direction. The direction depends on sign and
carry pattern: a negative power of two comes out one low. With only one sign
bit, sums that reach the top bit give larger errors.
`fdp_unit` asserts that the sign bits stay clear.

**Correcting the anticipator.** `fdp_normalize` shifts by the predicted
count, so the leading one ends at bit 100, 99 or 98. `fdp_round` looks at
those three bits and applies a final 0/1/2-bit shift. It takes 24 significand
bits, a guard bit and a sticky OR of the rest, and rounds to nearest, ties to even.
A rounding carry (significand 2^24) becomes 1.0 with the exponent one higher.

## Exponent path

Each product's biased exponent is `ea + eb - 127`. The result exponent is

    bigger exponent + adjust,   adjust = 3 - lz + correction + rounding_carry

where 3 is the distance from the bigger product's `1.x` position to bit 99,
`lz` is the anticipated count and `correction` ∈ {+1, 0, −1}. The rounder
produces `adjust` and sends it to `fdp_exp_compare`. There one adder forms
the result exponent, which goes back into the rounder's packing logic. The two
halves of `fdp_round` sit in separate `always_comb` blocks, so this is not a
combinational loop.

Products are not normalised before their exponents are compared (a product
of two significands lies in [1, 4)). The window's headroom bit and the
normaliser absorb the extra factor of two instead of a "product overflow"
increment of the exponent.

## Numerical conventions

These are this design's choices. The published design names only IEEE-754 single
precision and a single rounding.

- Rounding: to nearest, ties to even, once per operation.
- Subnormal operands read as zero. Results whose exponent after rounding is
  below the normal range become a zero of the result's sign. No subnormal outputs.
- Overflow gives ±infinity.
- NaN: any NaN operand in a used pair, infinity × 0, or +∞ plus −∞ gives the quiet NaN
  `0x7FC00000`. Otherwise an infinite product gives an infinity of its sign.
- Exact zero: +0, except that two zero products that are both −0 give −0.
- `op_sub_i` negates the C·D term (A·B − C·D). In multiplication-only mode it negates the result.

## Departures from the published block diagram

- The diagram draws the aligner on the C·D path only. Its exponent circuit
  selects "bigger" and "smaller" exponents with an "A·B > C·D" signal. Here the two
  carry-save products are swapped, so the smaller-exponent one is always the one shifted.
  "A·B > C·D" is computed from the product exponents (≥), not taken as an input.
- The "product overflow" inputs of the exponent circuit are omitted (see
  above).
- The "Operation" input of the 2's-complement block is taken to be add/subtract
  of the C·D term.
- Multiplier-tree structure, adder architecture, anticipator method, window
  width, rounding mode and special-value handling are not specified there.
  The choices above are the simplest that give a correctly rounded result.
- The output register and valid flag are framing added here. The published unit
  is one combinational path.
- The conventional adder, multiplier, and parallel and serial dot-product units
  that the design was compared with are not included.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with
`TB_RESULT checks=N failures=M` and has a watchdog. The reference model
`tb/fdp_ref_pkg.sv` computes the result with 640-bit integers, independently of the unit's
structure. It forms both products exactly, shifts the larger-exponent one left to a
common exponent, adds, and rounds once.

| testbench | what it checks |
|---|---|
| `tb_fdp_unit` | 80,000 operations: directed ties, cancellation, overflow, underflow, NaN/∞, both forwarding modes; random close exponents, wide spreads, full range, near-equal products. Counts swaps, effective subtractions, sticky collapses and negative sums |
| `tb_fdp_top` | 30,000 cycles of back-to-back and gapped traffic at full size, one-cycle latency, all mechanisms counted (swap, subtraction, sticky, negative sum, both modes, overflow, underflow flush, NaN, exact cancellation, post-normalisation after a rounding carry, anticipator correction) |
| `tb_fdp_fft_butterfly` | radix-2 DIF butterfly `x = a+b`, `y = (a−b)·w` on the top level, 4,000 butterflies |
| one per block | exact arithmetic or bit-level properties of each stage (e.g. the anticipator within ±1 bit with both error directions seen, rounding ties and rounding carries seen) |

The butterfly testbench runs the fused flow (four additions and two dot products) and
a discrete flow (four individually rounded multiplications and two additions,
using the unit's forwarding modes). It compares both with double precision.
With inputs in [−1, 1) and 1024-point twiddles, it measured:

| flow | error range | mean abs. error |
|---|---|---|
| fused | −1.48e−7 … 1.35e−7 | 2.07e−8 |
| discrete | −2.19e−7 … 1.85e−7 | 2.58e−8 |

The discrete flow's error range is about 40% wider, in line with the published
comparison (whose absolute values depend on its unstated input scale).

## Limits

- Verification is simulation against the reference model, not a formal
  proof. A separate run of two million random operations (all operand
  ranges and modes) showed no mismatch.
- No subnormal inputs or outputs. Only round-to-nearest-even. No IEEE-754
  exception flags.
- No timing or area figures for any process. The combinational path from
  operands to `y_o` is long (multiplier tree, 101-bit adder, shifter), so
  expect to pipeline it for high clock rates.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_fdp_top \
    rtl/fdp_pkg.sv tb/fdp_ref_pkg.sv tb/tb_fdp_top.sv -o sim
./obj_dir/sim
```

Other modules are found through `-Irtl` by file name. Replace `tb_fdp_top` with any
other testbench. Each runs in well under a second of simulation time.

## Changing it

- `ALIGN_EXT` (window bits below the bigger product) can be raised freely. It must stay ≥ 47 for the
  sticky argument above. `WIN_W`, `LZ_W` (must count to `WIN_W`) and the
  exponent adjustment follow from it.
- The field widths (`EXP_W`, `FRAC_W`) are in `fdp_pkg`. The special-value
  constants and the testbenches' reference model assume single precision.
- The unit is purely combinational. To pipeline it, the natural cuts are after
  the multiplier trees (carry-save pairs plus the exponent compare) and after the 4:2 stage.
- Yosys coarse synthesis of `fdp_top` gives about 1,800 word-level cells and 37
  flip-flop bits (the output register).
