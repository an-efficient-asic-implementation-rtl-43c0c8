# Shift-add binary logarithm generator (16-bit input, 13-bit fraction)

This is combinational hardware that computes log2(N) for an unsigned 16-bit integer N,
for use in things like the logarithmic luminance transform of an HDR image encoder. It
has no multiplier and only a 640-bit table. It rests on three ideas:

* **The integer part** comes from a *leading-one detector and encoder* (LODE). The LODE
  gives the position of the most significant '1' in binary directly. For wide words it
  splits the input into four quarters that are searched in parallel.
* **The fraction x** is the bits below the leading one, left aligned. A barrel shifter
  extracts it. The shifter needs only log2(W) control bits, because the last 1-bit shift
  is fixed wiring.
* **log2(1+x)** is computed as x plus a correction. The correction is a two-segment,
  power-of-two-slope fit of the error of the plain `log2(1+x) ≈ x` approximation
  (Mitchell's). The fit is mirrored about x = 0.5, and a small signed table takes out
  what the fit leaves.

With N = 2^n (1+x), 0 ≤ x < 1:

    log2(N) = n + log2(1+x)

The result is the fixed-point number `{n, F}`: 4 integer bits and 13 fraction bits.

## Interface of the top, `log2_gen`

| port   | dir | width | meaning |
|--------|-----|-------|---------|
| `n_in` | in  | W = 16 | N, unsigned |
| `n`    | out | K = 4  | integer part: the position of the leading one of N |
| `f`    | out | L = 13 | fraction part F ≈ log2(1+x), LSB = 2^-13 |
| `z`    | out | 1      | **1 when N is nonzero**, 0 when N = 0 |

The design has no clock, no reset and no registers: it is a single combinational path
from `n_in` to the outputs. Register it at the outputs if your timing requires it.

Watch `z` for N = 0. log2(0) has no value, so the outputs then hold n = 0 and F = 9
(the approximation at x = 0), and only `z` = 0 tells this case apart from N = 1. The
polarity of `z` (1 = nonzero) follows the truth table of the 4-bit LODE.

Parameters: `W` (16; 32 and 64 also elaborate, because the LODE supports them) and `L`
(13). All testing is at W = 16.

## Data path

```
 N ─┬──────────► lode_split ──── n ──────────────────────────► n
    │              │  └───────── z ──────────────────────────► z
    │              n
    │              ▼
    │           lode_inv  (W-1-n = ~n)
    │              │ shamt
    ▼              ▼
 mod_barrel_shifter  ── x (13 b) ──► log2_frac ──── F (13 b) ─► f
```

### Split LODE (`lode_split`, `lode4`, `lode_merged`)

`lode4` is the 4-bit merged LODE. It outputs a1a0 = 3, 2, 1, 0 for inputs 1xxx, 01xx,
001x and 0001, with z = 1. For 0000 it outputs a = 0, z = 0.

`lode_split` with W = 16 works in four steps:

1. Four `lode4` units search the quarters d15..12, d11..8, d7..4 and d3..0 in parallel.
   Each gives a 2-bit local position A_i and a flag z_i.
2. An OR4 of z3..z0 gives z.
3. A 2-bit priority encoder of z3..z0 gives q, the highest nonzero quarter.
4. One MUX4 picks A_q. A second MUX4 picks the constant 0000, 0100, 1000 or 1100 (that
   is, 4q). A 4-bit adder forms `a = 4q + A_q`.

Because the constant's low bits are zero, the adder never carries. Its job is really to
concatenate q with A_q.

Wider versions keep the same structure with wider primitives:

* **W = 32** uses four 8-bit `lode_merged` units. `lode_merged` is a plain priority
  encoder of any width.
* **W = 64** uses four 16-bit split LODEs. The module instantiates itself once, one level
  deep.

### INV and the modified barrel shifter (`lode_inv`, `mod_barrel_shifter`)

The leading one of N sits at bit n. To expose x, N must move left by W−n. The first W−1−n
of those shifts bring the leading one to the top bit, and the last shift pushes it out.

W−n can be as large as W, which needs K+1 control bits. So the INV block gives instead
W−1−n, which for a power-of-two W is just `~n`, K inverters. That value drives a
conventional K-stage logarithmic left shifter. The final 1-bit shift is wiring.

The top 13 of the remaining 15 bits are x. The 2 bits below them are truncated, which adds
at most 2^-13/ln2 ≈ 1.8e-4 of error to log2(N) on inputs above 2^13.

### Fraction unit (`log2_frac`, `log2_lut`)

This is the part that takes most of the reasoning.

**Mitchell error.** The plain approximation `log2(1+x) ≈ x` leaves the error
`E_L(x) = log2(1+x) − x`. E_L is 0 at both ends of [0,1) and peaks near 0.086 around
x ≈ 0.44.

**Quasi-symmetry.** E_L is nearly symmetric about x = 0.5. Its mean with its mirror,
`(E_L(x) + E_L(1−x))/2`, is exactly symmetric. So a fit is designed only for [0, 0.5] and
reused on the other half through x → 1−x. In hardware, "1−x" is the one's complement of
x, selected by the MSB of x: `xc = x[12] ? ~x : x`.

**Two segments, no multiplier.** On the half range, the fit D(x) has two lines. The
breakpoint at 0.25 is chosen so that one bit decides between them:

| interval of xc | segment | hardware |
|---|---|---|
| [0, 0.25)   | 0.25·xc + 0.004    | `(xc >> 2) + 33`  |
| [0.25, 0.5] | 0.0625·xc + 0.0518 | `(xc >> 4) + 424` |

The slopes are powers of two, so each line is a shift plus a constant. The constants are
the offsets rounded to 13 bits (33/8192 and 424/8192). A MUX selected by `xc[11]`, the
1/4 bit of the complemented value, picks the segment. Over the whole of [0,1) this gives
four segments (slopes +1/4, +1/16, −1/16, −1/4), but only two are ever computed.

**Correction table.** What remains, `g(x) = log2(1+x) − x − D(x)`, is below about 0.011.
A 128-entry table addressed by the top 7 bits of x stores it with 5-bit signed entries,
in units of 2^-10. Entry j is fixed by the following rule:

    C[j] = round( (max g + min g) / 2 / 2^-10 )

where max and min are taken over the first, middle and last codes of cell j. g is concave
inside a cell, so these three codes bound it. The entries span −10..+10.

The table is not a data file. `log2_pkg::lut_entry` computes it at elaboration time
using integer arithmetic only. It evaluates log2(1+x) to 24 fraction bits by repeated
squaring of the mantissa. The ROM synthesises from the resulting constant array.

**Sum.** F = x + D(x) + (C << 3), one three-input addition. The sum can exceed 1 − 2^-13
by one LSB near x = 1 (7 of the 8192 codes), so it saturates. It is also clamped at 0,
though the default table never makes it negative.

## Accuracy (measured by the testbenches)

| quantity | max abs error | mean abs error |
|---|---|---|
| log2(1+x), all 8192 codes of x | 1.15e-3 | 2.7e-4 |
| log2(N), N = 1..65535 (includes truncation of x) | 1.28e-3 | 2.7e-4 |

This is about 9.8 correct fraction bits. The original design of this architecture reports
8.0e-4 max and 2.3e-4 mean for log2(1+x) with the same 640-bit table. The gap comes from
the table's scale and entry rule, which had to be chosen here; see below. At 2^-10
resolution, the variation of g inside one 64-code cell (up to 1.5e-3) plus rounding sets
the floor of about 1.15e-3.

## Where this RTL departs from, or adds to, the original design

The block structure follows the original design. This includes the LODE4 truth table, the
split LODE of four LODE4s with an OR4, a 2-bit encoder, two MUX4s and a 4-bit adder, the
INV plus modified barrel shifter, the x / shifted-x MUX / 7-bit-address LUT / three-input
adder fraction unit, the slopes and offsets, and W = 16, l = 13. The following are this
design's own choices:

* **Complement and MUX select.** The original fraction-unit drawing shows a MUX on "1 MSB"
  and no complement stage. Its prose describes a complement controlled by the MSB that
  mirrors the half-range fit. That mirroring is what is built here. The MUX select is the
  1/4 bit after complementing (x[12] XOR x[11]), which is the only select consistent with
  two segments per half.
* **Offsets.** The drawing has no offset input, and offsets of up to 0.0518 do not fit a
  5-bit table entry. Each offset is therefore added as a constant on its MUX leg.
* **Table contents and scale.** No entries were published. The rule above and the
  2^-10 unit are this design's. The unit is the finest one at which the residual fits in
  5 signed bits.
* **Saturation, truncation and zero input** are handled as described above. None of them
  is specified by the original.
* **Barrel shifter internals.** The shifter is a logarithmic shifter of K stages. The
  original does not specify it.
* **64-bit LODE primitive.** It is the split 16-bit LODE. The original says only "16-bit
  LODE".
* **No pipeline registers.** The original reports a single combinational delay.

Not built:

* The anti-logarithm converter, which the original mentions only as a possible reuse of
  the method.
* The conventional and direct-LUT comparison circuits.
* The rest of an HDR encoder: luminance calculator, buffer and tone mapper.
* The pads of the test chip.

The offline two-step search that chose the slopes and offsets is not hardware; its results
are the constants in `log2_pkg`.

## Files

| file | contents |
|---|---|
| `rtl/log2_pkg.sv` | shared constants (widths, slopes, offsets) and the elaboration-time table functions |
| `rtl/lode4.sv` | 4-bit merged LODE |
| `rtl/lode_merged.sv` | direct merged LODE of any width (8-bit primitive for W = 32) |
| `rtl/lode_split.sv` | split LODE, W = 16 / 32 / 64 |
| `rtl/lode_inv.sv` | INV block, W−1−n |
| `rtl/mod_barrel_shifter.sv` | modified barrel shifter, fraction extraction |
| `rtl/log2_lut.sv` | 128 × 5 correction ROM |
| `rtl/log2_frac.sv` | log2(1+x) fraction unit |
| `rtl/log2_gen.sv` | top: the complete generator |
| `tb/tb_log2_ref_pkg.sv` | floating-point reference model shared by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench is self-checking. Each ends by printing `TB_RESULT checks=N failures=M`,
and has a cycle-count watchdog. For example, the end-to-end test (all 65536 inputs at the
default parameters, about 2 s):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/log2_pkg.sv tb/tb_log2_ref_pkg.sv tb/tb_log2_gen.sv \
    --top-module tb_log2_gen -Mdir obj_log2_gen
./obj_log2_gen/Vtb_log2_gen
```

To run another test, replace `tb_log2_gen` with `tb_lode4`, `tb_lode_merged`,
`tb_lode_split`, `tb_lode_inv`, `tb_mod_barrel_shifter`, `tb_log2_lut` or `tb_log2_frac`.

What the tests establish:

* **`tb_lode_split`** covers W = 16 exhaustively. At W = 32 and 64 it covers every
  leading-one position with random lower bits.
* **`tb_log2_lut`** checks each table entry against the same rule evaluated in floating
  point.
* **`tb_log2_frac`** and **`tb_log2_gen`** check the outputs bit for bit against the
  floating-point model, and check the error against the true logarithm.
  * `tb_log2_frac` uses a bound of 1.2e-3.
  * `tb_log2_gen` uses a bound of 1.35e-3.
* **`tb_log2_gen`** also counts each mechanism and fails if one is never exercised. The
  mechanisms are zero input, each LODE quarter, each of the four segments (two through
  the complement), truncation and saturation.

To change the table's resolution or size, set `AW`, `DW` and `LUT_SH` on `log2_frac`. The
entries are recomputed automatically. Keep the largest entry, `|C| ≤ 2^(DW-1)`, in
range: `tb_log2_lut` reports entries outside it.
