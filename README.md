# Multiple-precision fused multiply-add unit (one double or two singles per cycle)

This is a pipelined floating-point multiply-add fused (MAF) unit. It computes
`R = A×B + C` with a single rounding. Each cycle it takes three 64-bit registers and
does one of two things:

* one IEEE double-precision operation (`dbl = 1`), or
* two independent IEEE single-precision operations (`dbl = 0`). The singles are packed
  as in a SIMD register: lane 2 in bits 63:32, lane 1 in bits 31:0.

The main idea is not to build a single-precision unit next to a double one. The double
datapath is split instead. Its mantissa parts (multiplier, alignment shifter, adder,
leading-zero anticipator, normalizer) are always exactly twice as wide as what one
single needs. So they are cut into two lanes by *precision-mode multiplexers*, and a
spare bit is left between the lanes so that no carry or shifted bit crosses from one
lane to the other. Exponent processing and rounding are cheap and sit on the critical
path, so those are *duplicated*: they get an extra single-precision datapath.

The architecture is the one in “A New Architecture For Multiple-Precision Floating-Point
Multiply-Add Fused Unit Design”. Where that description is incomplete, this RTL fills in
the details itself. Those places are listed under
[Departures and own choices](#departures-and-own-choices).

## Interface and timing

`rtl/maf_top.sv`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset of all pipeline registers |
| `in_valid` | in | 1 | an operation is presented this cycle |
| `dbl` | in | 1 | 1: one double, 0: two singles |
| `rm` | in | 2 | rounding mode, `maf_pkg::rmode_e`: 0 nearest-even, 1 toward zero, 2 toward +∞, 3 toward −∞ |
| `a`, `b`, `c` | in | 64 | operands |
| `out_valid` | out | 1 | `result` and `flags` are valid |
| `result` | out | 64 | the double result, or `{lane 2, lane 1}` singles |
| `flags` | out | 8 | `maf_flags_t`: `invalid`, `overflow`, `underflow`, `inexact`, 2 bits each (bit 0 = double or lane 1) |

The latency is three cycles. An operation presented with `in_valid` at clock edge *k*
comes out with `out_valid` after edge *k*+3. A new operation can enter every cycle.
`dbl` and `rm` travel down the pipeline with their data, so mixing doubles and singles
back to back costs nothing. There is no stall or back-pressure.

| stage | work |
|---|---|
| 1 Multiply & Align | operand unpacking, signs, exponent difference, array multiplier to carry-save form, alignment shift of C, negation, 3-2 CSA |
| 2 Add & LZA | 106-bit adder with incrementer for the upper 55 bits, complementer, leading-zero anticipation in parallel |
| 3 Normalize & Round | constant shift, variable shift, position correction, two rounders, result formatting and exception flags |

**Numeric domain.** The operands must be normalized numbers. The unit is designed
around that: the alignment and normalization ranges depend on every mantissa having a
leading one. An operand with an all-zero or all-one exponent field (zero, subnormal,
infinity, NaN) gives the default quiet NaN and sets `invalid` for its lane. Overflow
gives infinity or the largest finite number, depending on rounding mode and sign.
Results below the normal range are flushed to a signed zero, with `underflow` and
`inexact` set. An exact zero sum is +0, or −0 when rounding toward −∞.

## Where the single lanes live

All the sharing depends on where each single operation sits inside the double-width
buses. Each lane is a scaled-down copy of the double layout, with one empty bit between
the lanes:

| bus | double | single lane 1 | gap | single lane 2 |
|---|---|---|---|---|
| A mantissa (53) | 52:0 | 23:0 | 24 | 48:25 |
| B, C mantissa (53) | 52:0 | 23:0 | – | 47:24 |
| product (106) | 105:0 | 47:0 | 48 | 96:49 |
| alignment/add/normalize window (161) | 160:0 | 73:0 | 74 | 148:75 |
| aligned-C upper part (55) | 54:0 | 25:0 | 26 | 52:27 |
| shift amount (14) | 7:0 | 6:0 | – | 13:7 |
| exponents | 13-bit path | 13-bit path | – | separate 10-bit path |

Inside the window, C is placed two bits above the product's MSB before it is shifted:
bits 160:108 for a double, bits 73:50 for lane 1. The alignment shift is therefore
`ea+eb−ec−967` for a double and `ea+eb−ec−100` for a single
(`L = 56 / 27`, the distance from C's MSB to the product's binary point). It is clamped
to `[0, 161]` or `[0, 74]`. At the clamp limits the smaller operand ends up wholly below
the other's rounding position. It then affects the result only through the sticky bit,
and that is why the window needs no more bits.

## Stage 1: multiply, align, negate

**Exponent unit** (`maf_exponent_unit`, `maf_exp_path`). Adder 1 forms `ea+eb−OFF`
through a 3-2 CSA. The result is the exponent of the window's top bit. Adder 2 subtracts
`ec` to get the shift `δ`, and *shift adjust* clamps it. When `δ < 0`, C is the larger
term, and the exponent of the top bit is `ec` itself. The double path also serves lane 1
(its constant, clamp and threshold are switched by `dbl`). A second 10-bit path serves
lane 2. The unit also decides whether the result's leading one can only be in the low
part of the window (`lowwin`, when `δ ≥ 54` for a double or `δ ≥ 25` for a single).

**Subword multiplier** (`maf_subword_multiplier`). This is an array multiplier. Booth
encoding is avoided because it would put carries across the lane boundary inside the
carry-save result. Partial-product bit `a_i·b_j` is gated with `dbl` everywhere except
in the two regions that the single products use (A1×B1, A2×B2). In single mode the cross
terms therefore vanish. The two products land at bits 47:0 and 96:49, and bit 48 stays
empty. A Wallace-order tree of 3-2 CSAs reduces the 53 rows to a sum word and a carry
word. All rows are non-negative, so the two words add to the exact product with no
wrap-around.

**Alignment shifter** (`maf_align_shifter`). This is a logarithmic right shifter
(stages 1, 2, …, 128). Each stage is split into three slices:

* bits 160:75 follow the lane-2 shift bit in single mode;
* the 2^i bits just below bit 75 take their shifted-in bits from above only in double
  mode;
* the rest is an ordinary shifter stage.

The 128 stage is off in single mode. The extra cost is about one multiplexer per bit of
centre slice. The partial sticky `st1` (one bit per lane) records whether any bit of C
fell off the bottom. It is computed in parallel from C and the shift amount.

**Negation and 3-2 CSA** (`maf_negate_csa`). For an effective subtraction
(`s_a⊕s_b⊕s_c`), the aligned C is inverted *after* the shift, so the shifter only ever
shifts in zeros. Multiplexers repack the inverted window:

* a 106-bit low part lined up with the product, which the 3-2 CSA adds to the
  carry-save product;
* a 55-bit upper part, with one sign bit per lane, which waits for the incrementer.

The two's complement still needs its +1. The CSA's carry word is always empty at bit 0,
and in single mode also at bit 49, so the +1 goes there. It is added only when
`sub & ~st1`. If bits of C were lost, the inverted window plus the lost fraction is
already the exact negated value.

## Stage 2: add, complement, anticipate

**Mantissa adder** (`maf_mantissa_adder`). A 106-bit carry-propagate adder sums the CSA
words. Its carry-out increments the upper part. In single mode the lane-1 carry appears
at result bit 48 and the lane-2 carry at bit 97. The adder needs no split at all,
because the operands' gap bit absorbs the carry. The incrementer is built from two
carry-select halves. In single mode each half serves one lane; in double mode they are
chained. The sum is a signed 162-bit number (double) or two signed 75-bit numbers.

**Complementer** (`maf_complementer`). A negative sum is replaced by its magnitude. If
`st1` is set, the exact sum is the window value plus a positive fraction. Its magnitude
is then the one's complement plus a positive fraction, so the +1 is left out and the
fraction stays in the sticky bit. The complementer also flags an exactly zero lane.

**Leading-zero anticipator** (`maf_lza`, `maf_lza_preenc`, `maf_lod`). The LZA works on
the same two operands as the adder, at the same time, and predicts where the sum's
leading digit is. The pre-encoding is the usual one for two's complement operands
(T = A⊕B, G = AB, Z = ĀB̄), so it handles positive and negative sums alike:

```
f[n-1] = ~T[n-1] & T[n-2]
f[i]   = T[i+1]&(G[i]&~Z[i-1] | Z[i]&~G[i-1]) | ~T[i+1]&(Z[i]&~Z[i-1] | G[i]&~G[i-1])
```

The stage-1 `lowwin` decision says which part of the window can hold the leading digit.
Only that part of `f` is encoded:

* double: 108 bits, `f[161:54]` or `f[108:1]`;
* single: 50 bits per lane.

The pieces are packed into a 114-bit string: double at bits 113:6, singles at 113:64
and 49:0. A 64-bit LOD covers bits 113:50 and a 50-bit LOD covers bits 49:0. Each LOD is
a binary tree of 2-input nodes, and every level adds one bit to the count. In double
mode their outputs combine like a 128-bit LOD. The result is a 12-bit shift amount:
`{5'b0, 7-bit count}` or two 6-bit counts. The prediction can be off by one position.
In random testing it was within −1…+1 of the true count.

## Stage 3: normalize, round, format

**Two-step normalization** (`maf_norm_shifter`). When `lowwin` is set, a constant left
shift (53 or 24 bits) first brings the low part of the window to the top. Then a
variable left shifter with 108-bit (double) or 50-bit (single) reach shifts by the LZA
count. This shifter is split at bit 75 like the alignment shifter. The anticipated
count may be one off, so the variable shifter shifts by *count − 2*. A final 4-way stage
then looks at each lane's top three bits and adds the missing 0–3 positions. After that
the leading one is at bit 160 (double), bit 73 (lane 1) or bit 148 (lane 2). The total
shift is subtracted from the exponent of the window's top bit.

**Rounders** (`maf_rounder`). Rounder 1 is 53 bits wide and handles the double, or
lane 1 in its narrow 24-bit mode. The duplicated Rounder 2 handles lane 2. Each one
takes the mantissa, a round bit and a sticky bit (the OR of the remaining window bits
and `st1`). It supports the four IEEE modes. A carry out of the mantissa renormalizes it
and bumps the exponent.

**Result formatter** (`maf_result_format`, `maf_lane_pack`). It builds the IEEE words
and flags per lane, then selects the double word or the two packed singles.

## Departures and own choices

* **Constant-shift decision.** The low window is used when `δ ≥ L−2` (54 / 25). The
  published control is "d > 0", where `d = L − δ` is C's exponent lead over the product.
  With `d = 1`, though, a near-total cancellation can leave the leading one below the
  upper 108 bits. The threshold was moved so that a 108-bit variable shifter always
  suffices.
* **LZA position correction.** The concurrent correction trees (positive and negative
  detection trees) are not built. The normalizer's final 0–3 shift corrects the error
  instead. This costs one small multiplexer stage after the shifter.
* **LZA pre-encoding.** Each lane is pre-encoded over its full signed width (three
  pre-encoders), and the window is cut afterwards. The windows include the sign
  position.
* **Two's complement of the sum.** The complementer forms the full magnitude before
  normalization. The published design defers the +1 until after the shift.
* **+1 of the negated addend.** It goes into the 3-2 CSA's output carry word, not into
  the multiplier's carry word. Both have an empty slot, and the sum is the same.
* **Sign handling.** The sign of the negated addend is kept as one extra bit per lane,
  so the 161-bit sum is treated as a signed 162-bit number.
* **Own additions.** Valid bit and reset, the rounding-mode encoding, the flag set,
  flush-to-zero on underflow, and the NaN response to operands outside the normalized
  domain are all this design's own choices.
* **Not modelled.** Gate-level timing and area. The published evaluation is a 0.18 µm
  standard-cell synthesis and cannot be reproduced here. Yosys generic synthesis of
  `maf_top` gives about 12,400 word-level cells and 588 flip-flops.

## Verification

Every block has a self-checking testbench in `tb/` that compares the block with values
computed another way (wide-integer arithmetic, plain shifts, case-by-case IEEE rules).
Each one prints `TB_RESULT checks=N failures=M`.

`tb/tb_maf_top.sv` runs the whole unit at its real size. It issues 20,000 operations,
one per cycle, with random precision and rounding modes. Each result is compared bit for
bit, together with its flags, against `tb/maf_ref_pkg.sv`. That package is an exact
reference: it adds product and addend as integers on a common scale and rounds once.
The testbench also checks the three-cycle latency of every result. Its operand classes
include:

* massive cancellation, giving negative and tiny sums;
* far-apart exponents, clamping the alignment at both ends;
* overflow and underflow;
* an all-ones mantissa that rounds up into the next binade;
* exact zero sums;
* invalid operands.

It counts how often each datapath mechanism fires (mode switch, effective subtraction,
negative sum, constant shift, both alignment clamps, `st1`, LZA correction, rounding
carry-out, each exception) and fails if one never does. All testbenches pass.

Concurrent assertions inside `maf_top` check that every non-zero lane leaves the
normalizer with its leading one at the lane's top bit. They would catch an anticipation
error beyond the correction range.

To simulate with Verilator (the packages first):

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/maf_pkg.sv tb/maf_ref_pkg.sv $(ls rtl/*.sv | grep -v maf_pkg) tb/tb_maf_top.sv \
  --top-module tb_maf_top -Mdir obj && ./obj/Vtb_maf_top
```

Replace `tb_maf_top` with any `tb_maf_<block>` to run one block's test.

## Files

| file | content |
|---|---|
| `rtl/maf_pkg.sv` | widths, offsets, rounding-mode enum, flag struct |
| `rtl/maf_top.sv` | three-stage pipeline |
| `rtl/maf_operand_select.sv` | operand multiplexers M1–M3 |
| `rtl/maf_sign_unit.sv` | product signs, effective subtraction |
| `rtl/maf_exponent_unit.sv`, `rtl/maf_exp_path.sv` | exponent difference, shift adjust, MAF exponent |
| `rtl/maf_align_shifter.sv` | split 161-bit alignment shifter, partial sticky |
| `rtl/maf_subword_multiplier.sv` | 53-bit / dual 24-bit array multiplier |
| `rtl/maf_negate_csa.sv` | negation, repacking M4/M5, 3-2 CSA |
| `rtl/maf_mantissa_adder.sv` | 106-bit adder and upper incrementer |
| `rtl/maf_complementer.sv` | magnitude and zero detect |
| `rtl/maf_lza.sv`, `rtl/maf_lza_preenc.sv`, `rtl/maf_lod.sv` | leading-zero anticipator |
| `rtl/maf_norm_shifter.sv` | constant + variable normalization shift, correction |
| `rtl/maf_rounder.sv` | rounding (used twice) |
| `rtl/maf_result_format.sv`, `rtl/maf_lane_pack.sv` | result packing and exceptions |
| `tb/maf_ref_pkg.sv` | exact FMA reference model |
| `tb/tb_*.sv` | testbenches |
