# Single-precision floating-point MAC with a Vedic multiplier and Kogge-Stone adders

This is a multiply-accumulate unit for IEEE-754 single-precision (binary32)
numbers. On every enabled clock it computes `acc <= acc + a * b`. The
significand product comes from a multiplier built on the Urdhva-Tiryakbhyam
("vertically and crosswise") rule of Vedic arithmetic: the operands are cut
into halves again and again, and the partial products are summed by
parallel-prefix (Kogge-Stone) adders instead of a carry-save tree. The
floating-point adder's mantissa addition uses the same Kogge-Stone adder.

The whole multiply-add path is combinational and ends in the accumulator
register. One accumulate completes per clock, and the result shows on
`acc_out` one clock after the operands are applied. The unit supports:

- all four IEEE rounding modes;
- denormal operands and results;
- NaN and infinity;
- clipping of the accumulator to the largest finite value on overflow.

```
             mul_a ──┐
                     ├─► fp_multiplier ──► product ──┐
             mul_b ──┘     (vedic_multiplier)        ├─► fp_adder ──► clip ──► acc register ──► acc_out
                                                     │  (kogge_stone_adder)              │
                                                     └──────────── acc_out ◄─────────────┘
```

## Interface of the top, `fp_mac`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst` | in | 1 | synchronous, active high; clears the accumulator to +0.0 and both flag words |
| `en` | in | 1 | when 1, the next rising edge loads `acc + mul_a * mul_b` |
| `rmode` | in | 2 | rounding mode: `00` nearest-even, `01` toward zero, `10` toward +inf, `11` toward -inf |
| `mul_a`, `mul_b` | in | 32 | binary32 operands |
| `acc_out` | out | 32 | accumulator register |
| `mul_flags` | out | 5 | multiplier flags of the accumulate that produced `acc_out` |
| `add_flags` | out | 5 | adder flags of the same accumulate |

Both flag words are `{invalid, infinity, overflow, underflow, inexact}`:

- `invalid`: the result is NaN.
- `infinity`: the result is an infinity.
- `overflow`: the rounded result passed the finite range.
- `underflow`: the result was below 2^-126 before rounding, and inexact.
- `inexact`: the rounded result differs from the exact one.

The flags are registered together with the accumulator. The same rounding
mode drives the multiplier and the adder.

Two concurrent assertions in `fp_mac` state the register rules. A reset
clears the accumulator and both flag words. A cycle with `en = 0` holds them.

Parameters of `fp_mac`:

- `SATURATE` (default 1) turns on the clipping.
- `SPARSITY` (default 2) sets the group size of every Kogge-Stone adder.

## Clipping on overflow

A long run of accumulations can overflow. When the multiplier or the
accumulate adder reports overflow, the accumulator takes the largest finite
magnitude (0x7F7FFFFF or 0xFF7FFFFF) with the sign of the result. It does not
take an infinity. Without this, one overflow would leave the accumulator at
infinity for good. With clipping, a later product of the opposite sign can
still pull the value back. A NaN result is never replaced.

The original design states this rule for a signed integer adder: the result
takes the largest positive or negative value. Applying it to floating-point
overflow is this implementation's reading. Set `SATURATE = 0` to get plain
IEEE-754 results, where overflow gives infinity in nearest-even mode.

## The Vedic multiplier (`vedic_multiplier`, `vedic_leaf`, `vedic_combine`)

The 24x24 significand multiplier is the part that differs most from a
textbook design. For A = AH:AL and B = BH:BL:

```
A * B = AH*BH * 2^N  +  (AH*BL + AL*BH) * 2^(N/2)  +  AL*BL
```

- The two vertical products, AH*BH and AL*BL, do not overlap. They are
  placed side by side as `{AH*BH, AL*BL}` with no adder.
- One Kogge-Stone adder sums the two crosswise products.
- A second Kogge-Stone adder adds that sum at weight 2^(N/2).

`vedic_combine` holds these two adders. Each of the four sub-products is the
same construction at half the width. The halving continues while the block
width is even and larger than 2. For 24 bits this gives 24 → 12 → 6 → 3.

A 3x3 leaf (`vedic_leaf`) works one result column at a time. For column k it
sums the bit products a[i]·b[j] with i + j = k: a vertical product in the
outer columns, crosswise products in the inner ones. The column sums are then
added with weights 2^k.

| level | block width | products at this level | built by |
|---|---|---|---|
| 0 | 3 | 8 x 8 = 64 | `vedic_leaf` |
| 1 | 6 | 4 x 4 = 16 | `vedic_combine` (H = 3) |
| 2 | 12 | 2 x 2 = 4 | `vedic_combine` (H = 6) |
| 3 | 24 | 1 | `vedic_combine` (H = 12) |

The tree is written as generate loops over a table `pr[level][i][j]`, where
entry (i, j) is the product of digit block i of `a` and digit block j of `b`.
It is not written as a module that instantiates itself. The hardware is the
same, but some tools mis-handle a recursive module when it is the top of
their run.

Other widths work too:

- 8 bits: 8 → 4 → 2, with 2x2 leaves.
- An odd width is a single Urdhva leaf.

The halving rule and the 3x3 leaf are choices of this implementation. The
original design states only the N/2 decomposition.

## Sparse Kogge-Stone adder (`kogge_stone_adder`)

The design asks for Kogge-Stone adders "in sparse mode". This adder works in
three steps:

1. It reduces the bit generate/propagate signals to group signals over
   `SPARSITY` bits.
2. It runs a Kogge-Stone prefix tree over the groups, with levels at distance
   1, 2, 4, …. The carry-in is folded into group 0.
3. It ripples the carries inside each group from that group's carry-in.

`SPARSITY = 1` gives the dense Kogge-Stone adder. The group size is not
given, so 2 is this implementation's choice. The adder is parameterised in
width, and is used at these sizes:

- 28 bits for the mantissa adder;
- 6 to 48 bits inside the multiplier.

## Floating-point adder (`fp_adder`)

The stages run in order, all in one combinational path:

1. **Pre-processor** (`fp_preprocessor`, shared with the multiplier). It
   classifies each operand as NaN, infinity, zero or denormal. It also makes
   the hidden bit explicit. A denormal is treated as exponent 1 with hidden
   bit 0.
2. **Alignment** (`fp_align`). It orders the operands by magnitude, so an
   effective subtraction is always big − small and never goes negative. The
   smaller significand is shifted right by the exponent difference into
   24 + 2 bits (guard and round). Every bit shifted further is ORed into a
   *presticky* bit.
3. **Mantissa adder**. This is a 28-bit Kogge-Stone adder. Its inputs are
   `{0, big, 000}` and `{0, small_aligned, presticky}`. For a subtraction the
   second input is inverted and the carry-in is 1. Putting the sticky bit in
   the least significant position is enough for correct rounding in every
   mode.
4. **Normalizer** (`fp_normalizer`). A carry out shifts the sum right by one.
   Otherwise a leading-one detector shifts it left. The left shift stops at
   exponent 1, so a result below the normal range comes out as a denormal
   with exponent field 0. This stage also produces the round and sticky bits
   and the zero and inexact indications.
5. **Rounder** (`fp_rounder`, shared with the multiplier). See below.
6. **Finalizer**. It handles the special cases:
   - A NaN operand, or inf − inf, gives the quiet NaN 0x7FC00000 with
     `invalid` set.
   - An infinite operand passes through.
   - An exact zero from operands of opposite sign is +0, or −0 in
     round-toward-minus-infinity.

## Floating-point multiplier (`fp_multiplier`)

1. **Pre-processor**: as in the adder.
2. **Pre-normalizer** (`fp_prenormalizer`). A denormal significand is
   shifted left until its top bit is 1. The exponent is lowered by the same
   amount into a signed 10-bit value, which reaches −22.
3. **Multiplier**: the 24x24 `vedic_multiplier`. Product bit 47 set means the
   product has two integer bits.
4. **Exponenter**: `e = ea + eb − 127`, plus 1 when bit 47 is set.
5. **Shifter** (`fp_mul_shifter`). When `e < 1` the normalised product is
   shifted right by `1 − e` to form a denormal. The shifter reports whether
   this lost precision. That report is the multiplier's underflow flag.
6. **Rounder**: `fp_rounder`.
7. **Flagger**. A NaN operand, or inf × 0, gives the quiet NaN with
   `invalid` set. Otherwise an infinite operand gives infinity, and a zero
   operand gives a zero with the XOR of the signs.

## Rounding (`fp_rounder`)

The rounder's inputs are:

- a normalised 24-bit mantissa (hidden bit in bit 23, 0 for a denormal);
- a round bit and a sticky bit;
- the exponent field (0 for a denormal; 255 and above means already
  overflowed).

The increment depends on the mode:

| mode | increment |
|---|---|
| nearest-even | `round & (sticky \| lsb)` |
| toward zero | 0 |
| toward +inf | `inexact & ~sign` |
| toward −inf | `inexact & sign` |

The increment is added to the packed 31-bit `{exponent, fraction}` word. A
carry out of the fraction therefore moves into the exponent by itself:

- a denormal that rounds up becomes the smallest normal number;
- the largest finite number that rounds up becomes infinity, which is the
  overflow case.

On overflow the result is infinity or the largest finite value, following
IEEE-754 for the mode.

## Timing and size

No stage is pipelined. The path from `mul_a` / `mul_b` through multiplier,
adder and clipping mux into the accumulator is a single combinational path,
and the clock period must cover it. The design has 42 flip-flops: a 32-bit
accumulator and two 5-bit flag registers. Generic coarse synthesis (yosys)
gives about 3500 word-level cells. No FPGA timing is given here.

## Choices this implementation makes

The original description gives the block structure, the stage lists, the
exponent formula, the rounding-mode encoding and the overflow clipping rule.
These points were decided here:

- **Timing**: one accumulate per clock. Reset is synchronous and active high.
  The flags are registered with the accumulator.
- **Flags**: the 5-bit word and its bit order. Every NaN result sets
  `invalid`, and NaN results are the canonical quiet NaN.
- **Underflow**: tininess is detected before rounding.
- **Kogge-Stone adders**: a group size of 2.
- **Vedic multiplier**: the way odd block widths end in an Urdhva leaf.
- **Sign of zero**: the sign of an exact zero sum.
- **Rounding modes in the adder**: the adder uses the same mode encoding as
  the multiplier.

Not included:

- pipelining, which the original names only as a future improvement;
- double or variable precision;
- the alternative multipliers (Wallace, Braun, array, serial-parallel) and
  adders (ripple-carry, carry-lookahead) it was compared against.

## Files

`rtl/` (one module or package per file):

| file | content |
|---|---|
| `fp_pkg.sv` | `fp32_t`, `rmode_e`, `fp_flags_t`, `fp_class_t`, constants |
| `fp_mac.sv` | top: multiplier, accumulate adder, clipping, registers |
| `fp_multiplier.sv`, `fp_adder.sv` | the two floating-point units |
| `fp_preprocessor.sv`, `fp_rounder.sv` | stages shared by both units |
| `fp_align.sv`, `fp_normalizer.sv` | adder stages |
| `fp_prenormalizer.sv`, `fp_mul_shifter.sv` | multiplier stages |
| `vedic_multiplier.sv`, `vedic_combine.sv`, `vedic_leaf.sv` | significand multiplier |
| `kogge_stone_adder.sv` | sparse Kogge-Stone adder |

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`, and
`fp_ref_pkg.sv`, the reference model. Every testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.

## Verification

The floating-point testbenches compare against `fp_ref_pkg`. That model does
not copy the RTL's algorithm:

1. It decodes each operand to an integer times a power of two.
2. It forms the exact sum or product as a 320-bit integer.
3. It rounds once, by comparing the discarded remainder with half an ulp.

The checks per testbench are:

- **`tb_fp_adder`**: about 50,000 vectors in all modes, including
  cancellation, ties, overflow and denormals.
- **`tb_fp_multiplier`**: about 50,000 vectors, including denormal results
  and inf × 0.
- **`tb_fp_mac`**: runs the whole unit at its default parameters against a
  cycle-level model, checking the one-clock latency on every cycle. It
  reproduces 1.0 × 1.0 accumulated five times (1, 2, 3, 4, 5). It then runs
  30,000 random cycles with resets and enable gaps, plus directed overflow
  runs. It counts each mechanism (accumulate, hold, reset, clipping through
  the adder, clipping through the multiplier, NaN, underflow, inexact,
  infinity, each rounding mode) and fails if one never happened.
- **Stage testbenches**: check value-preserving invariants, for example that
  the normalizer's output encodes the same number as its input.
- **`tb_kogge_stone_adder`**: compares against `+` at several widths and
  group sizes.
- **`tb_vedic_multiplier`**: compares against `*` at widths 24, 8 and 5.

To run one testbench with Verilator 5, from the folder above `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fp_pkg.sv tb/fp_ref_pkg.sv tb/tb_fp_mac.sv --top-module tb_fp_mac
./obj_dir/Vtb_fp_mac
```

Each testbench finishes in about a second. To lint the design:

```
verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/fp_pkg.sv rtl/fp_mac.sv --top-module fp_mac
```
