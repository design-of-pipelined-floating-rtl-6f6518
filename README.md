# FP-AU: a two-stage floating-point arithmetic unit for mobile shaders

This is the floating-point add/convert/compare unit of a small programmable
vertex shader. It executes seventeen graphics operations on IEEE-754 single
precision numbers and 24-bit integers. A new operation can enter every clock,
and each result comes out two clocks later. The goal is a short, cheap
pipeline rather than full IEEE conformance. Results saturate instead of
becoming infinite, and denormals are flushed to zero.

The adder is built around three ideas:

* **A dual-path adder whose near path never rounds.** An add or subtract goes
  down one of two paths. The *far* path aligns the operands by shifting and
  needs at most a 1-bit normalization. The *near* path handles the cases that
  can cancel many leading bits, so it needs a full normalization. The split
  is chosen so that the near path's result is always exact. The near path
  therefore has no rounding hardware at all.
* **Rounding merged into the addition.** In the far path one *compound adder*
  produces both X+Y and X+Y+1. The correctly rounded and normalized result is
  always one of these two sums, shifted by 0 or 1 bit. Rounding is reduced to
  selecting the right one.
* **An MSB-first leading-one detector** in the near path. It produces the
  normalization shift amount most-significant bit first. The shifter's
  first stage can therefore start before the whole count is known.

## Operations

| op (code) | meaning | executed by | result |
|---|---|---|---|
| NOP (0) | nothing | - | no `out_valid` |
| ABS (1), NEG (2), MOV (3) | \|Rs\|, -Rs, Rs | sign unit | raw bit copy with sign changed |
| ADD (4), SUB (5) | Rs + Rt, Rs - Rt | near or far path | float, round to nearest even |
| MAX (6), MIN (7) | max/min(Rs, Rt) | comparator | Rs or Rt unchanged |
| ITOF (8) | 24-bit integer to float | near path | float, exact |
| FLOOR (9) | floor(Rs) | far path | 24-bit integer |
| FTOI (10) | Rs rounded to nearest even | far path | 24-bit integer |
| SEQ (11), SGE (12), SLT (13) | Rs == / >= / < Rt | comparator | 1.0 or 0.0 |
| SGN (14) | sign of Rs | sign unit | -1.0, 0.0 or 1.0 |
| CLAMP (15) | limit Rs to [-MAXPOWER, +MAXPOWER] | comparator + constant select | float |
| CMP (16) | LT flag ? Rt : Rs | sign unit | Rs or Rt unchanged |

CMP uses the LT flag left by the most recent SLT. Together, SLT and CMP make a
compare-and-select. CLAMP exists for the shader LIT (lighting coefficient)
operation, which limits the specular power. MAXPOWER is a parameter with a
default of 128.0.

### Number conventions

* An exponent field of 0 means zero: denormal inputs read as zero. An
  exponent of 255 is treated as an ordinary, very large number. Infinities
  and NaNs are not recognised.
* A float result above the largest finite value becomes ±0x7F7FFFFF. A result
  below the smallest normal becomes a zero with the result's sign. An exact
  cancellation gives +0.
* Integers are 24-bit two's complement, held sign-extended in a 32-bit word.
  FTOI and FLOOR saturate to +2^23-1 and -2^23. Every 24-bit integer has an
  exact float value, so ITOF never rounds.
* The comparisons treat +0 and -0 as equal.

## Pipeline and interface

```
          EX1 (stage 1)                         EX2 (stage 2)
 rs,rt ─┬─ far path: align, sticky, invert ─║─ compound add, round, select ─┐
 op     ├─ near path: 1-bit align, subtract ║─ LOD + normalize shifter ─────┤
        ├─ comparator (+ CLAMP operand mux) ║─ CLAMP select, flags ─────────┼─► result reg
        ├─ sign unit, zero bypass, near/far ║─ result source select ────────┘
        └─ controller decode ───────────────║─ controller decode
```

`fpau` ports: `clk`, `rst_n` (asynchronous, active low), `in_valid`, `op`
(`fpau_pkg::op_e`), `rs`, `rt`, and the outputs `out_valid`, `result`,
`lt_flag` and `near_taken`.

* An operation presented with `in_valid` at a rising edge has its result in
  `result`, with `out_valid` high, after the second following rising edge.
  The unit has no stall and no back-pressure.
* `near_taken` shows whether the last add/subtract came from the near path.
  It is only for observation.
* The LT flag register is written at the end of SLT's first stage. A CMP
  issued in the very next clock already uses it.

The controller (`fpa_ctrl`) is *data-stationary*. The opcode moves down the
pipeline together with its operands, and each stage decodes its own controls
from the opcode it holds.

## The dual-path rule

Let `d` be the exponent difference, and let "effective subtraction" mean that
the signs differ after SUB has flipped Rt.

* **Near path:** an effective subtraction with d = 0, or with d = 1 when the
  larger operand's significand is below 1.5 (its first fraction bit is 0).
* **Far path:** everything else: every effective addition, subtractions with
  d ≥ 2, and d = 1 when the larger significand is 1.5 or more.

Why the near path never rounds:

* With d = 0, the difference of two 24-bit significands fits in 24 bits.
* With d = 1, the result is A - B/2. A < 1.5 and B/2 ≥ 0.5 give a result
  below 1. It needs at least one left shift, so the one bit that B lost to
  alignment (the guard bit) shifts back into the significand.

The classic split puts every d = 1 subtraction on the near path. The 1.5 rule
instead moves the d = 1 cases that could produce a result ≥ 1 to the far
path, where rounding hardware exists.

The far path's result always lies in [0.5, 4). It therefore needs a
normalization of one bit right, none, or one bit left.

The two paths balance their pipeline stages in opposite ways. The near path
puts its adder in stage 1 and its long normalization shifter in stage 2. The
far path puts its long alignment shifter in stage 1 and its adder in
stage 2.

Both paths compute every cycle. The classification is made in stage 1 and
picks one of the two results in stage 2. An add or subtract with a zero
operand bypasses both paths.

## Far path: rounding by choosing a sum (`fpa_far_path`)

**Stage 1**

* The exponent difference unit subtracts the exponents and decides the swap.
* The smaller significand B is shifted right by d into 24 bits plus a guard
  bit `g` and a round bit `r`.
* The sticky bit `s` comes from the sticky generator (described below).
* For an effective subtraction, B is inverted (`Y = ~B`), and `(g,r,s)` is
  replaced by its 3-bit two's complement. `C_I = ((g,r,s) == 0)` records that
  the true integer difference is X+Y+1 rather than X+Y.

**Stage 2**

The compound adder forms S0 = X+Y and S1 = X+Y+1, with flags `cout0`,
`cout1`, `s0_msb`, `s1_msb`, `bit[0]` and `bit[1]`. The result selector then
picks one of these cases:

| case | detected by | significand | exponent |
|---|---|---|---|
| add, fraction overflow | `cout0` | round bit is S0[0]; round up → `{cout1,S1}>>1`, else `{1,S0}>>1` | e+1 |
| add, no overflow | `!cout0` | round up (`g & (r\|s\|bit[0])`) → S1, else S0; S1 carrying out → 1.0 | e or e+1 |
| sub, no underflow | MSB of S0 or S1 (chosen by `C_I`) | `C_I` or round up → S1, else S0 | e |
| sub, fraction underflow | MSB clear | shift left 1; `g` enters as the new LSB (`g_in`); round up on `r & (s\|g)`, taking S1 when the increment ripples | e-1 (e if it rounds up to 1.0) |

Each case reproduces exactly what an exact sum followed by one
round-to-nearest-even step would produce. The tests check this against such
a model.

### FTOI and FLOOR on the same path

The conversions reuse the far path with the larger operand fixed:

* The larger exponent is the constant 150 (bias + 23), and X = 0.
* The alignment shift is then `150 - exp`. It leaves the integer part of the
  operand in the 24-bit window, with g, r and s below it.
* A positive operand is computed as 0 + B, and a negative one as 0 - B, so
  the adder output is already the two's-complement integer.
* A negative shift (exponent above 150) is an overflow.

FTOI applies the same nearest-even round-up rule, which holds for two's
complement too.

FLOOR never increments. It takes the truncated two's-complement sum, which
is exactly floor(x). For example, -2.25 = -3 + 0.75, which truncates to -3.

## Near path: sign-magnitude without a negation (`fpa_near_path`)

**Stage 1**

* The exponent estimator needs only the two low exponent bits, because the
  path only receives |d| ≤ 1.
* B is shifted right by 0 or 1 bit. The bit that falls out is the guard bit
  `g_b`.
* The compound adder adds X = A and Y = ~B. Its output is selected as
  follows:

| condition | output | value |
|---|---|---|
| `g_b = 1` | X+Y, with a fraction bit of 1 | A - B (always positive) |
| `g_b = 0` and X+Y+1 carries out | X+Y+1 | A - B ≥ 0 |
| `g_b = 0`, no carry | ~(X+Y), sign flipped | B - A |

The last row uses the identity -(X - Y) = ~(X + ~Y). The adder that already
exists yields the magnitude with a bit inversion instead of a second
addition.

**Stage 2**

The 25-bit value `{difference, g_b}` goes through the MSB-first leading-one
detector and the normalization shifter. The result exponent is the larger
exponent minus the shift. A zero detector flags exact cancellation.

**ITOF** runs on the same hardware with X = 0. A negative integer is computed
as 0 - B (X+Y+1 with Y = ~B), and a positive one as 0 + B. The magnitude is
then normalized with exponent base 150.

## Building blocks

**Compound adder (`fpa_compound_adder`, N = 24).** This is a flagged prefix
adder built on a Sklansky parallel-prefix tree.

* Every bit position gets the group generate GG_i (carry out of bits i..0)
  and the group propagate GP_i (bits i..0 all propagate).
* The output cells form S0_i = P_i ^ GG_{i-1} and S1_i = P_i ^ (GG_{i-1} |
  GP_{i-1}). The "+1" costs one OR gate per bit.
* The flags come straight from the tree: `cout0 = GG_{N-1}`,
  `cout1 = GG_{N-1} | GP_{N-1}`, `bit[0] = P_0` and `bit[1] = P_1 ^ G_0`.

The same adder is used with other widths. At 8 bits it is the exponent
difference unit (`fpa_exp_diff`), where d = S1 or ~S0. At 31 bits it is the
magnitude comparator.

**Sticky generator (`fpa_sticky_gen`).** It does not OR the shifted-out bits.
Instead it counts the trailing zeros LEN of the unshifted significand and
tests `d >= LEN + 3`. Its parts are:

* a trailing-one detector that produces LEN;
* a 6-bit carry-save stage followed by a carry-propagate stage, which
  computes d - LEN - 3;
* a final step that takes the inverted sign of that sum as the sticky bit.
  When any of d[7:5] is set, the sticky bit is forced to 1.

This work runs in parallel with the alignment shifter, not after it.

**MSB-first LOD normalizer (`fpa_lod_norm`).** It normalizes the 25-bit
near-path value to 24 bits in five shifter stages: <<16, <<8, <<4, <<2 and
<<1.

* L4 is the NOR of the top 16 input bits.
* L3 is the NOR of the 8-bit window that the <<16 stage will bring to the
  top. A multiplexer controlled by L4 selects that window from the
  *unshifted* input.
* The lower control bits follow the same pattern.

Each shifter stage can begin once its own control bit exists. The detector
and the shifter therefore overlap, where a conventional tree LOD must finish
before shifting starts.

**Comparator and CLAMP (`fpa_cmp_clamp`).**

* Stage 1 compares Rs with a second operand. For CLAMP it is ±MAXPOWER,
  chosen by the sign of Rs. Otherwise it is Rt.
* The magnitudes go through a 31-bit compound adder, and the signs are
  combined with the result into the EQ, GT and LT flags, which are
  registered.
* In stage 2, CLAMP_True is set for a positive Rs above +MAXPOWER or a
  negative Rs below -MAXPOWER. The constant then replaces Rs.
* The same flags drive SEQ, SGE, SLT, MAX and MIN.

## Where this RTL departs from the original description

* **Operations on separate hardware.** The original shares the near-path
  adder for the compare-type operations and for ABS, NEG, MOV and SGN. Here
  they use a separate 31-bit comparator and a small sign unit. The results
  are identical, but the unit is somewhat larger than a fully shared design.
* **Design choices.** The following are choices of this design, not part of
  the original specification:
  * the opcode encoding and the valid-only interface;
  * the 1.0/0.0 format of the set and sign results;
  * MAXPOWER = 128.0;
  * flush-to-zero for underflow and the zero bypass;
  * treating exponent 255 as an ordinary number;
  * the Sklansky tree topology;
  * FLOOR producing a 24-bit integer rather than a float.
* **Not included.** The surrounding vertex shader is not part of this RTL:
  the multiplier, the special function unit, the register files, the
  swizzle unit and the instruction sequencer. The unit's ports are where it
  would attach to them.

Timing (250 MHz in a 0.18 µm library) and area (about 5,900 gates) have not
been reproduced. They depend on the cell library and synthesis flow.

## Files

| file | contents |
|---|---|
| `rtl/fpau_pkg.sv` | opcodes, control-word structs, constants |
| `rtl/fpau.sv` | top level: classification, sign unit, LT flag, stage-2 select, output register |
| `rtl/fpa_ctrl.sv` | data-stationary controller |
| `rtl/fpa_far_path.sv`, `rtl/fpa_near_path.sv` | the two adder paths |
| `rtl/fpa_compound_adder.sv`, `rtl/fpa_exp_diff.sv` | flagged prefix compound adder, exponent difference |
| `rtl/fpa_sticky_gen.sv`, `rtl/fpa_lod_norm.sv` | sticky generator, MSB-first LOD normalizer |
| `rtl/fpa_cmp_clamp.sv` | comparator and CLAMP |
| `tb/fpau_ref_pkg.sv` | reference models: wide-integer exact add with a single rounding, conversions, comparison |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_fpau` runs the whole unit |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
It also has a cycle watchdog. For example, the whole-unit test:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_fpau \
  rtl/fpau_pkg.sv rtl/fpa_*.sv rtl/fpau.sv tb/fpau_ref_pkg.sv tb/tb_fpau.sv
./obj_dir/Vtb_fpau
```

Replace `tb_fpau` with `tb_fpa_far_path`, `tb_fpa_near_path` and so on to test
a single block. Keep the same file list, with the package first.

`tb_fpau` runs the unit at its default parameters:

* It issues about 60,000 random operations over all seventeen opcodes, with
  random idle cycles.
* It checks every result and its exact two-clock latency.
* It fails if any of these mechanisms never occurs: near path, far path,
  negative near-path result, zero bypass, fraction overflow and underflow,
  float saturation, flush to zero, integer saturation, CLAMP at either limit,
  CMP with the LT flag set and clear, and CMP directly behind an SLT.

The block testbenches compare the adder paths with the reference model on
tens of thousands of operands each, with directed corner cases for
rounding, carries, cancellation and conversion limits.
