# Pipelined IEEE-754 double precision multiplier with a Dadda significand tree

`doublefpm` multiplies two IEEE-754 binary64 numbers and delivers one rounded
product per clock cycle, three cycles after the operands go in. The work is
split into three pipeline stages:

1. **multiply**: the signs are XORed, the exponents are added and the bias is
   removed, and the two 53-bit significands are multiplied in a Dadda
   reduction tree. The product is then normalized.
2. **round**: the product is rounded to 53 bits in one of four IEEE rounding
   modes.
3. **exceptions**: special operands (zero, infinity, NaN), overflow and
   underflow are resolved, and the status flags are produced.

The main idea is that the slowest part, the 53 × 53 significand product, is a
Dadda tree of full and half adders rather than a carry-save array. A Dadda tree
reduces the partial products in about log₁.₅(53) ≈ 9 adder levels instead of
about 53. The pipeline cuts the rest of the path (exponent, rounding, exception
logic) into three register-to-register stages.

The architecture follows a published FPGA design. That design names the three
modules, the ports, the widths of the buses between the stages and the use of
a Dadda multiplier. It leaves the rounding-mode encoding, the exact exception
rules, reset and the `enable` handshake unspecified. The choices made here for
those are listed under [Departures and own choices](#departures-and-own-choices).

## Top-level interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, all registers on the rising edge |
| `rst` | in | 1 | synchronous reset, active high; clears every pipeline register and `ready` |
| `enable` | in | 1 | clock enable for the whole pipeline; each cycle with `enable` high accepts one operation |
| `rmode` | in | 2 | rounding mode of the operation being accepted (see below) |
| `operandA`, `operandB` | in | 64 | binary64 operands |
| `output_FPM` | out | 64 | binary64 product |
| `exception`, `inexact`, `invalid`, `overflow`, `underflow` | out | 1 each | status flags of the result on `output_FPM` |
| `ready` | out | 1 | `output_FPM` and the flags hold the result of an accepted operation |

**Timing.** An operation accepted on an enabled clock edge appears on
`output_FPM` after the third enabled edge, counting the accepting edge. The
pipeline takes one operation per enabled cycle. With `enable` low, every
register holds: the pipeline stalls and the output keeps its value. The operands
and `rmode` travel down the pipeline with their operation. A new `rmode` can
therefore be given with every operation.

Worked example: `operandA = 64'hC032000000000000` (−18.0) and
`operandB = 64'h4023000000000000` (9.5) give `output_FPM = 64'hC065600000000000`
(−171.0), with every flag 0 and `ready = 1`.

## Number format

A binary64 word is `{sign[63], exponent[62:52], fraction[51:0]}`. A normal
number's value is (−1)^sign × 1.fraction × 2^(exponent − 1023), with exponent
1 … 2046. Exponent 2047 encodes infinity (fraction 0) or NaN (fraction ≠ 0).
Exponent 0 encodes zero and the subnormals. This design treats all of
those as zero (see departures).

## Stage 1: `fpm_multiplier`

The operands are unpacked into sign, exponent and fraction. The hidden one is
put in front of each fraction, which gives the 53-bit significands `mulA` and
`mulB`. Three units work side by side:

* `fpm_sign_unit`: `sign = signA ^ signB`.
* `fpm_exponent_unit`: `expA + expB − 1023`. The sum is formed on 12 bits. The
  difference is kept as a **13-bit signed** value, because it spans
  −1021 … 3071 (after normalization, up to 3072). Negative and too-large
  exponents must survive to stage 3, where they become underflow and
  overflow.
* `dadda_mult`: the 106-bit product `mulA × mulB`.

Both significands lie in [1, 2), so the product lies in [1, 4). When product bit
105 is set, the product is taken one place higher and the exponent is
incremented. The stage hands on a **56-bit word** together with the sign and the
exponent:

```
 55   54 ............................ 2   1       0
 0  | 53-bit significand, 1 at bit 54  | guard | sticky
```

The guard bit is the first bit below the significand. The sticky bit is the OR
of every bit below the guard bit. Bit 55 is left zero so that the rounding
increment in stage 2 has room to carry.

## The Dadda tree (`dadda_mult`)

This module is the largest part of the design by far: for N = 53, 2,809 AND
gates, 2,600 full adders and 52 half adders. Its generate structure takes some
reading.

**Partial products.** Column `c` (weight 2^c) starts with the bits
`a[c−i] & b[i]` for every valid `i`. Its height is `c+1` for `c < N`,
`2N−1−c` above that, and 0 for the top column `2N−1`.

**Targets.** The Dadda sequence is d₁ = 2, dⱼ₊₁ = ⌊1.5 dⱼ⌋: 2, 3, 4, 6, 9, 13,
19, 28, 42, 63, … The stages use the targets below N, largest first. For N = 53
that makes nine stages: 42, 28, 19, 13, 9, 6, 4, 3, 2.

**Adders per column.** A stage works on the columns from the lowest up. Column
`c` holds `h` bits and receives `cin` carries from the adders of column `c−1` in
the same stage. The height above the target is `excess = h + cin − target`.
If the excess is positive, the column gets `excess / 2` full adders (each
turns 3 bits into 1) and `excess % 2` half adders (each turns 2 into 1). This is
the fewest adders that bring the column down to its target. The heights for the
next stage are `h − 2·FA − HA + cin`.

**How it is built.** The function `build()` replays this recipe once at
elaboration. It returns three tables (`HT` heights, `FAT` full adders, `HAT`
half adders), indexed by stage and column. Each stage `s` and column `c` is a
generate scope `g_st[s].g_col[c]` holding the vector `bits` of that column's
bits entering stage `s`. A scope fills its vector from the previous stage in a
fixed order:

```
[ sums of own FAs | sums of own HAs | carries of FAs in c−1 | carries of HAs in c−1 | untouched bits ]
```

A full adder takes 3 consecutive bits of the column (`3k … 3k+2`). The half
adders take the next pairs. The remaining bits pass through. A full adder's sum
is computed in its own column and its carry (the majority of the same three
bits) in the column above, so there are no references between scopes of the
same stage.

**Final adder.** After the last stage, every column has at most two bits. They
form two 106-bit rows, added with a plain `+`, so the synthesis tool chooses the
carry-propagate adder.

The parameter `N` can be set to any value from 2 to 64. The testbench checks a
6 × 6 tree exhaustively as well as the 53 × 53 one.

## Stage 2: `fpm_rounding`

| `rmode` | mode | add one ulp when |
|---|---|---|
| `00` | nearest, ties to even | `guard & (sticky \| lsb)` |
| `01` | toward zero | never |
| `10` | toward +∞ | positive and `guard \| sticky` |
| `11` | toward −∞ | negative and `guard \| sticky` |

Adding one ulp to an all-ones significand (1.11…1) overflows it to 10.00…0. The
significand is then shifted back to 1.00…0 and the exponent is incremented.
The stage outputs three things:

* the packed word `{sign, exponent[10:0], fraction}` (`round_out`);
* the full signed exponent (`exponent_final`);
* the guard and sticky bits (`round_bits`), from which stage 3 derives
  `inexact`.

## Stage 3: `fpm_exceptions`

The stage looks at the operation's original operands and the rounded result.
The first matching rule wins:

| condition | `output_FPM` | flags raised |
|---|---|---|
| an operand is NaN | `7FF8000000000000` | `invalid` if that NaN is signalling (fraction MSB 0); `exception` |
| ∞ × 0 | `7FF8000000000000` | `invalid`, `exception` |
| ∞ × anything else | ±∞ | `exception` |
| an operand is zero (or subnormal) | ±0 | none |
| rounded exponent ≥ 2047 | ±∞, or ±`7FEFFFFFFFFFFFFF` if the mode rounds toward zero for that sign | `overflow`, `inexact`, `exception` |
| rounded exponent ≤ 0 | ±0 | `underflow`, `inexact`, `exception` |
| otherwise | the rounded result | `inexact` if guard or sticky was set |

`ready` is the valid bit of this stage.

## Departures and own choices

The following were not specified by the original description, or differ from
strict IEEE-754:

* **Rounding-mode encoding.** The four modes are assigned the codes in the order
  IEEE-754 lists them (nearest, zero, +∞, −∞).
* **Subnormals are flushed.** Subnormal operands count as zero. Results below
  the normal range become a signed zero, with `underflow` and `inexact` set. A
  strictly IEEE result would be subnormal. Underflow is judged after rounding.
* **NaN results.** Every NaN result is the one quiet NaN `7FF8000000000000`. The
  operand's payload is not propagated.
* **`exception`.** The original names this flag without defining it. Here it
  is the OR of invalid, overflow and underflow, together with "an operand is
  infinite or NaN".
* **Internal exponent width.** The exponent buses are 13 bits signed. The
  original block diagram has 12 bits, which cannot hold the signed range.
* **`enable`, `rst`, `ready`.** The original shows these pins without
  describing them. `enable` is a pipeline clock enable and `rst` a synchronous
  active-high reset. `ready` marks a valid output.
* **Operand alignment.** In the original block diagram, the operands and
  `rmode` go straight to the rounding and exceptions modules. Here they are
  delayed to stay with their operation, so back-to-back operations with
  different modes and operands work.
* **Normalization placement.** Normalization (with the exponent adjustment)
  is placed in stage 1 and rounding in stage 2, as in the original stage
  description.

The original FPGA figures (Virtex-6, about 414–489 MHz, 648–888 slices; two sets
of numbers are quoted) concern a vendor flow. This RTL has not been run through
such a flow, so they cannot be judged from it.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` at the end and has a watchdog.

| testbench | checks |
|---|---|
| `tb_dadda_mult` | 53 × 53 against `*` on corner and 6,000 random operands; 6 × 6 exhaustively |
| `tb_fpm_sign_unit` | all four sign pairs |
| `tb_fpm_exponent_unit` | extreme and 5,000 random exponent pairs |
| `tb_fpm_multiplier` | sign, exponent and 56-bit product word against `*`; reset, latency, stall |
| `tb_fpm_rounding` | all modes × signs × remainders, carry-out cases, 4,000 random; latency, stall |
| `tb_fpm_exceptions` | NaN, sNaN, ∞ × 0, ∞, zeros, overflow in every mode and sign, underflow, inexact; `ready` |
| `tb_doublefpm` | 20,000 operations end to end with random stalls; see below |

`tb_doublefpm` runs the full-size design. It keeps a three-entry model of the
pipeline that advances only on enabled edges, so it checks the 3-cycle latency,
the hold during a stall and one result per cycle. The expected values come from
`tb/fpm_ref_pkg.sv`, a separately written model that compares the whole
discarded remainder with one half. In nearest-even mode, for results in range,
that model is itself checked against the simulator's native `real`
multiplication. The testbench counts how often each mechanism happens:
normalization shift, rounding increment, rounding carry-out, tie, overflow,
underflow, invalid, NaN, infinity and zero operands, each rounding mode, stall,
and the worked example. A mechanism that never happens is a failure.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fpm_pkg.sv tb/fpm_ref_pkg.sv tb/tb_doublefpm.sv --top-module tb_doublefpm -o sim
./obj_dir/sim
```

Replace `tb_doublefpm` with any other testbench name. Elaborating the Dadda
tree takes a few seconds.

## Files

| file | content |
|---|---|
| `rtl/fpm_pkg.sv` | widths, bias, rounding-mode enum, binary64 struct, quiet NaN |
| `rtl/dadda_mult.sv` | parameterized Dadda multiplier |
| `rtl/fpm_sign_unit.sv`, `rtl/fpm_exponent_unit.sv` | sign and exponent units |
| `rtl/fpm_multiplier.sv` | stage 1 |
| `rtl/fpm_rounding.sv` | stage 2 |
| `rtl/fpm_exceptions.sv` | stage 3 |
| `rtl/doublefpm.sv` | top level: the three stages and the alignment registers |
| `tb/fpm_ref_pkg.sv` | reference model for the testbenches |
| `tb/tb_*.sv` | testbenches |
