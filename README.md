# Floating-point adders and multipliers in SystemVerilog

An IEEE 754 adder spends most of its delay and power on work that most
operand pairs do not need. A large left shift after a subtraction is needed
only when the exponents are nearly equal. A full alignment shift is needed
only when they are not. Special operands need no arithmetic at all. The
**triple path adder** here sorts every operation into one of three paths as
early as possible. Each path has only the hardware its operands need. A path
that is not in use keeps its registers still, so its logic does not switch.
The same idea drives the **dual data path multiplier**: special operands go
around the significand multiplier instead of through it.

Beside these two designs, the code holds the other units they are built from
or compared with:

| unit | module | format | timing |
|---|---|---|---|
| triple path adder/subtractor | `tdpfadd` | single | 3 register banks, 1 op/cycle |
| five-stage pipelined triple path adder | `tpfadd_pipe` | single | 6 register banks, 1 op/cycle |
| two-path (FAR/CLOSE) adder with rounding merged into the addition | `dpfadd` | single | combinational |
| single-path adder with leading-zero anticipation | `fpadd_lza` (with `lza`) | double | 4 register banks, 1 op/cycle |
| single data path multiplier | `fp_mul` | single | combinational |
| pipelined dual data path multiplier | `fpm_ddp` | double | 4 register banks, 1 op/cycle |
| divider | `fp_div` | single | combinational |
| compound significand adder (flagged prefix "+1" sum) with rounding | `compound_adder` | 24 bits | combinational |
| barrel shifter examples | `barrel_rshift4`, `barrel_rotate4`, `dist_barrel_shifter`, `norm_shifter`, `rshift_grs` | 4 and 8 bits | combinational |

`fp_arith_top` places them all side by side. Each unit keeps its own ports,
because none of them feeds another.

## Number format and common rules

All floating-point units take `EW` (exponent width) and `FW` (fraction width)
as parameters. Single precision is `EW=8, FW=23`. Double precision is
`EW=11, FW=52`. The significand width is `p = FW+1`. A word is
`{sign, biased exponent, fraction}`, and the bias is `2^(EW-1)-1`.

These rules hold for every unit:

* **Rounding.** Results are rounded to nearest, ties to even. One is added at
  the LSB when the round bit R is set and either the LSB or the sticky bit S
  is set. S is the OR of every bit below R. If the addition carries out of
  the significand, the result is shifted right once more and the exponent goes
  up by one. `fp_round` does this for every unit except the two-path adder,
  which rounds by choosing among precomputed sums. That adder and the
  compound adder also offer the other three IEEE rounding modes.
* **Range.** The exponent is checked after rounding. A result that is too
  large becomes a signed infinity, with the overflow and inexact flags set. A
  result below the smallest normal number becomes a signed zero, with the
  underflow and inexact flags set.
* **Denormals.** They are not supported. An operand whose exponent field is
  zero is read as zero (flush to zero).
* **Flags.** Every unit has a 5-bit flag word, `fp_pkg::fp_flags_t`, equal to
  `{overflow, underflow, divide_by_zero, invalid, inexact}`. The invalid cases
  are inf − inf, 0 × inf, 0/0 and inf/inf. These give the quiet NaN
  `{0, all ones, 1, 0...}`. A NaN operand gives the same quiet NaN without
  setting invalid.

## The triple path adder (`tdpfadd`)

### Choosing a path

`tdp_exp_ctrl` holds the exponent logic and control logic. It compares the
two operands by magnitude: first the exponent field, then the fraction. The
larger operand becomes `x` and the smaller becomes `y`. For a subtraction,
the sign of `b` is flipped first. Because `|x| >= |y|`, a difference is never
negative. No path therefore needs a complement stage after its adder. Let
`d = ex - ey`, and let an effective subtraction mean that the signs of `x`
and `y` differ. The path is chosen as follows:

| path | state | taken when | hardware |
|---|---|---|---|
| bypass | I | an operand is zero, infinite or NaN, or `d > p+1` | `tdp_bypass`: picks the answer, no arithmetic |
| LZA (close) | J | effective subtraction with `d` = 0 or 1 | `tdp_lza_path`: 0/1-bit pre-align, subtract, count leading zeros, full left shift |
| LZB (far) | K | everything else | `tdp_lzb_path`: full right alignment with G/R/S, add or subtract, 1-bit normalization |

Why `d > p+1` is safe for the bypass: `y` is then below a quarter of an ulp
of `x`. That holds even when `x` is a power of two and a subtraction moves
the result into the binade below. Round to nearest therefore returns `x`
unchanged. The bypass returns `x` and sets inexact.

### The two significand paths

**LZB (far).** The smaller significand goes through `rshift_grs`. This
shifter keeps the first two bits shifted out as the guard and round bits and
ORs all later bits into the sticky bit. The two operands then become p+4-bit
words: `{0, significand, G, R, S}`. They are added or subtracted. Because
`d >= 2` for a subtraction, the result has lost at most one leading bit.
Normalization is therefore one of three cases:

* a carry out: shift right by 1 and increment the exponent;
* already normalized: no change;
* one place short: shift left by 1 and decrement the exponent.

G and R are both kept so that a left shift still leaves a correct round bit
(the old R) and sticky bit (the old S).

**LZA (close).** With `d <= 1`, only one bit can be shifted out. The
subtraction is done on p+1 bits. `lzc` counts the leading zeros of the
difference. `norm_shifter` shifts the difference left by that count, and the
count is taken off the exponent. A non-zero count means the low bit is zero
after the shift, so rounding matters only when the count is zero. An exact
zero difference gives +0.

### Pipeline and path state machine

```
 a,b,sub --[bank 1]--> exponent/control logic --[bank 2: state + per-path operand regs]-->
          bypass | LZA path | LZB path --> result integration --[bank 3]--> result, flags
```

* Bank 2 loads only the operand registers of the chosen path. The other
  paths keep their previous operands, so their logic sees no new inputs.
* The path state register (`state`: I, J or K) moves, on every valid
  operation, to the state of that operation's path. Any state can go to any
  other. The state also drives the output multiplexer.
* Operands sampled on rising edge *n* give `out_valid` with the result on
  edge *n+2*: three register banks counting the input bank. A new operation
  can enter on every cycle. `in_valid` may have gaps.
* Reset (`rst_n`) is asynchronous and active low. It clears the valid bits
  and puts the state in I.

### Five-stage version (`tpfadd_pipe`)

The same three paths are split by five register banks, to shorten the clock
period:

1. operands;
2. after the exponent/control logic;
3. after the data selectors and pre-alignment;
4. after the adders;
5. after the result selectors, the leading-zero count and the exponent
   update.

A final bank follows the left shift, the rounding and the result
integration. Each stage register of a path loads only for operations on that
path. A path tag travels with each operation. The latency is 6 banks. In the
original arrangement, rounding sits with the adders. Here it sits in the last
stage, which gives the same IEEE result.

## Single-path adder with leading-zero anticipation (`fpadd_lza`)

This is the conventional alternative to splitting paths. One pipeline
handles every operation, and it removes the slow part of a cancelling
subtraction: the leading-zero count that would follow the adder. The count
is anticipated from the adder inputs instead, in the same stage as the
56-bit (p+3) significand adder.

| stage | work | bank |
|---|---|---|
| 1 | exponent difference; its sign routes the operand with the larger exponent to the left | 1 |
| 2 | compare significands (for equal exponents), right-shift the smaller one with G/R/S, invert the smaller one for a subtraction | 2 |
| 3 | 56-bit adder, with the LZA logic and counter beside it | 3 |
| 4 | exponent minus the anticipated count, left shift by it (or a 1-bit right shift after an addition carry) | 4 |
| — | one-bit compensation shift, rounding, exponent increment | output |

**The anticipator (`lza`).** It sees the adder's inputs, `A` and the
inverted smaller operand `B' = ~B`. Let `T = A XOR B'` and `Z = ~A AND ~B'`.
The indicator is

```
f[i] = ~T[i] & ~Z[i-1]        (Z[-1] = 0)
```

Its leading one falls where the first run of borrow positions `(a=0, b=1)`
ends, counting from the first bit where `A` and `B` differ. The difference
`A − B` has its leading one either there or one place lower. Which one it is
depends on a borrow from the bits further down, and only the adder knows
that. The anticipated count is therefore exact or one short, never too
large. After the left shift, the compensation shifter looks at the MSB and
shifts one more place when it is 0. The testbench of `lza` confirms this
bound exhaustively at 10 bits and randomly at 56 bits.

Operands sampled on rising edge *n* give `out_valid` and the result after
edge *n+3*. Special operands are resolved in stage 1 and ride down the
pipeline.

## Two-path adder with merged rounding (`dpfadd`)

This adder keeps two of the triple path adder's ideas: a close path for
cancelling subtractions and a far path for everything else. It also removes
the separate rounding step. Each path uses a compound adder that yields the
sum and the sum + 1 together. Rounding then becomes a choice between
ready-made sums. The path split is the same as LZA/LZB above: CLOSE takes
effective subtractions with `d` = 0 or 1. Special operands go through
`tdp_bypass`. A large `d` stays on the FAR path, where the shifter turns
`y` into a sticky bit.

The hard part is that the LSB's position is not known until after the
addition. The far path can need a one-bit shift either way, and the rounding
must happen at the LSB after that shift. The select logic therefore looks at
the carry out (addition) or the MSB (subtraction). Let `S` be the +0 sum of
the p-bit significands (`x + y'` or `x + ~y'`), and let `g, r, s` be the bits
shifted out of `y`. The cases are:

| FAR case | LSB is | guard | sticky | rounded up |
|---|---|---|---|---|
| addition, no carry | S[0] | g | r, s | S + 1 |
| addition, carry out | S[1] | S[0] | g, r, s | S + 1 if S[0] = 1, else S + 2 |
| subtraction, MSB set | bit 0 of the integer part | f2 | f1, f0 | S + 1 |
| subtraction, MSB clear (shift left) | f2 | f1 | f0 | +1 sum shifted left |

For a subtraction, `f2 f1 f0` is the 3-bit two's complement of `g r s`. The
integer part is `S` when `grs ≠ 0`, because a borrow was taken from it, and
`S + 1` otherwise. A sticky bit inside the complement stays a valid sticky
bit, since only f0 depends on it. The only place a third sum (`S + 2`) is
needed is a carry out whose new guard bit is 0, when a directed mode rounds
away from zero. A rounded result that reaches the next power of two is
renormalized.

On the CLOSE path, the only bit shifted out of `y` is its LSB, `g`. If the
difference is still normalized, `g` is the guard bit with nothing below it.
A tie rounds to even by taking the +1 sum when the +0 sum is odd. If the
difference lost its MSB, the (p+1)-bit value `{integer part, g}` is exact.
`lzc` and `norm_shifter` then normalize it without rounding.

The rounding mode (`rm`) is applied to the magnitude:

* nearest even;
* truncate;
* round away from zero when any discarded bit is set.

Toward +inf rounds positive results away from zero, and toward −inf does the
same for negative results. In a mode that rounds toward zero, overflow gives
the largest finite number instead of infinity. An exact zero difference is −0
only when rounding toward −inf.

## Multipliers

**`fp_mul` (single data path, combinational).** The steps, in order:

1. The exponent is `e1 + e2 − bias`, and the sign is the XOR of the operand
   signs.
2. The p×p multiplication gives a 2p-bit product in [1, 4).
3. If the product MSB is set, the product is taken one place lower and the
   exponent is incremented.
4. The product is rounded, with a one-bit correction shift on a rounding
   carry.
5. The flag logic and a result selector replace the product for special
   operands.

Two published single-precision cases are reproduced bit for bit:
0x408051EB × 0x40566666 = 0x4156EF9C (4.01 × 3.35), and 0x40066666² =
0x408D1EB7 (2.1²).

**`fpm_ddp` (pipelined dual data path, double by default).**

* Bank 1 holds the operands.
* Bank 2 follows the exponent logic and the control/sign logic. It loads
  either the multiplier's operands or a 3-bit class code for a special
  operand (path 2, bypass), never both.
* Bank 3 holds the full 2p-bit product, or the finished bypass result.
* Rounding is merged with the carry-propagate stage. Two rounded versions of
  the upper half are made in parallel: one for a product in [1, 2), and one
  for [2, 4) with the exponent incremented. The product MSB then picks one.
  This removes the normalize-then-round sequence from the critical path.
* An output bank follows. The latency is 4 banks, and `bypassed` tells which
  path produced the result.

## Divider (`fp_div`)

The sign is the XOR of the operand signs, and the exponent is `e1 − e2 + bias`.
The significand quotient lies in (0.5, 2). It is formed with p+3 bits, so
that after a possible one-place left normalization a round bit still follows
the p result bits. The remainder is ORed into the sticky bit. The division
uses the `/` and `%` operators, because no iterative algorithm is prescribed.
For a real implementation, replace these with the divider of your choice.
Dividing a finite number by zero gives infinity and sets divide-by-zero.

## Compound adder (`compound_adder`)

The compound adder avoids a separate rounding increment. It computes
`A + B'` (the "+0" sum) and `A + B' + 1` (the "+1" sum) side by side, where
`B' = B XOR sub`. The rounding logic then only chooses one of the two. Which
sum is the answer is the least obvious part:

| case | value | "+0" sum is | "+1" sum is |
|---|---|---|---|
| addition | A + B + 0.grs | A + B | A + B + 1 (round up) |
| subtraction, grs = 0, A ≥ B | A − B | A − B − 1 | **A − B** |
| subtraction, grs = 0, A < B | −(B − A) | complement gives **B − A** | — |
| subtraction, grs ≠ 0 (needs A > B) | (A − B − 1) + (1 − 0.grs) | truncated result | rounded-up result |

In the last row the fraction bits come from the 3-bit two's complement of
g, r, s.

The "+1" sum needs no second carry chain. It is produced as a flagged
prefix adder. Flag i is the group propagate of bits i−1..0 of A and B'.
A Kogge-Stone tree computes it, alongside the adder. When flag i is set,
bits i−1..0 of the "+0" sum are all ones. So the "+1" sum is the "+0" sum
XOR the flags, and the flag above the top bit supplies the "+1" sum's carry
out.

The rounding modes (`fp_pkg::rmode_t`):

* **Nearest even:** round up when the first fraction bit is set and either the
  LSB or a later fraction bit is set.
* **Toward zero:** truncate.
* **Toward +inf:** round up a positive result that has any fraction bit set.
* **Toward −inf:** round up a negative result that has any fraction bit set.

Rounding is made at the N-bit LSB. A normalizing shift after a carry out
belongs to the path around the block. `dpfadd` contains the select logic
that rounds across that shift.

## Barrel shifters

These are the shifter structures the adders are built from, at the sizes of
their worked examples:

* `barrel_rshift4`: four 4:1 multiplexers; a right shift by 0–3 with zero fill.
* `barrel_rotate4`: four 4:1 multiplexers. Select *n* rotates left *n* places,
  so select 1 gives `Y3..Y0 = D2 D1 D0 D3`.
* `dist_barrel_shifter`: three rows of 2:1 multiplexers that shift right by
  1, 2 and 4. The inputs above bit 7 take the `fill` input. For example,
  `s = 101` sends x5 to y0.
* `norm_shifter`: rows that shift left by 1, 2 and 4 for normalization, with
  zeros entering at the LSB. It is parameterized, and the close path uses it
  at p+1 bits.
* `rshift_grs`: an 8-bit alignment shifter with a 5-bit shift amount and
  G/R/S outputs. It is parameterized, and the far path uses it at p bits.

## Simulating

Every module has a self-checking testbench in `tb/`, named `tb_<module>`.
The floating-point testbenches compare against `tb/fp_ref_pkg.sv`. That
package widens single-precision operands to `real` and computes in double
precision, then rounds back in its own code. For +, −, × and ÷, double
precision has more than 2p+2 bits, so this double rounding is exact. The
double-precision multiplier is checked with exact products and with
hand-worked rounding cases. Example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/fp_pkg.sv tb/fp_ref_pkg.sv tb/tb_tdpfadd.sv --top-module tb_tdpfadd
./obj_dir/Vtb_tdpfadd
```

Each testbench ends with one line, `TB_RESULT checks=N failures=M`. The
pipelined testbenches check the latency of every result. They also count how
often each path, state transition and exception occurred, and fail if one
never did. `tb_fp_arith_top` runs all units at their default sizes.
`tb_fpm_ddp` runs the multiplier at single precision, so that its random
results can be checked exactly. `tb_fpadd_lza` runs the LZA adder at its
default double precision against the simulator's double-precision `real`
sum. `tb_tpfadd_double` does the same for both triple path adders at
`EW=11, FW=52`. `tb_dpfadd` covers all four rounding modes; its reference
(`ref_add_rm`) rounds the exact double sum in each mode.

## Limits and departures

* Round to nearest even is the only rounding mode of the triple path adders,
  the multipliers and the divider. The two-path adder and the compound adder
  offer all four modes. Denormals are flushed to zero everywhere.
* Exact cycle counts are not specified for the original designs. The
  latencies above follow the register banks of their block diagrams. The
  triple path adders and the multiplier add an output bank; `fpadd_lza`
  does not.
* The path thresholds (`d <= 1` for LZA, `d > p+1` for bypass) and the
  magnitude swap are this design's choices.
* The close paths of the triple path and two-path adders count leading zeros
  of the finished difference. Only `fpadd_lza` anticipates the count. The
  two-path adder's block diagram has a leading-one predictor with concurrent
  position correction, which removes even the compensation shift. Its logic
  is not built.
* In `fpadd_lza`, rounding comes after the compensation shift. In the
  original arrangement it comes before, in the same stage as the left shift.
  Rounding after the shift puts the rounding point in the right place every
  time.
* In the two-path adder, the operands are ordered by a full magnitude
  comparison (shared with the triple path adder), not only by the sign of
  the exponent difference.
* The 56-bit double-precision pipelined adder variant is obtained by
  instantiating `tdpfadd` or `tpfadd_pipe` with `EW=11, FW=52`. The defaults
  are single precision. `tb_tpfadd_double` tests that size.
