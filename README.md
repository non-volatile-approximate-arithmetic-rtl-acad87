# Majority-gate compressors for approximate multiply-accumulate

Spintronic threshold devices make good majority gates: a domain-wall strip
switches when the sum of the currents injected into it crosses a threshold,
so a gate with 3, 5, 7 or 9 inputs costs little more than one with 3. This
RTL captures the logic of a family of compressors built from such gates, after
Jiang, Angizi, Fan, Han and Liu, "Non-Volatile Approximate Arithmetic Circuits
using Scalable Hybrid Spin-CMOS Majority Gates", and uses them in 16x16 signed
multipliers and 32-bit accumulators for a DCT multiply-accumulate unit.

The central idea is that a compressor only counts ones. If its truth table is
rearranged so that every output depends only on N_in, the number of input
ones, each output is a set of N_in values, and majority gates with some inputs
tied to constants or fed back from other gates detect such sets directly. An
accurate 4-2 compressor then needs three gates, and two approximate ones need
two. The approximations are chosen so that only the rarest input patterns give
a wrong count.

The physical gates are analog and non-volatile. Most of this RTL models them
as combinational logic, which gives the exact logic function of every circuit
for simulation, error studies, or as a reference for another majority-based
implementation. One cell, `mg_ec_nv`, also models the clocking: each gate
holds its result as state and the gates of a compressor form a pipeline.

## The majority gate

`mg_majority #(M)` has 2M+1 inputs (M = 1..4). In the device each input branch
injects +30 uA for a 1 and -30 uA for a 0; the strip flips when the sum reaches
the 30 uA threshold in either direction. The module keeps that picture: it sums
+1/-1 per input and tests the sign, which is the same as "more than M ones".

Tying inputs to constants shifts the threshold. For n live inputs and a gate
with 2m+1 inputs:

| gate | fires for N_in in |
|---|---|
| M(x1..xn, 0, ..., 0) | {m+1, ..., n} |
| M(x1..xn, 1, ..., 1) | {n-m, ..., n} |
| inverted versions | the complements |

With m = n-1 these are n-input AND and OR gates. Feeding k copies of another
gate's output G instead of constants adds k to the count exactly when G is
true, so a single gate can fire on a set with a gap in it. That folding is what
keeps the compressors small.

## The compressors

All outputs below are functions of N_in only. "x" is the data inputs, a
trailing constant list fills the unused gate inputs.

### Full adder (`mg_fa`)

| output | N_in set | gate |
|---|---|---|
| cout | {2,3} | M3(a, b, cin) |
| sum | {1,3} | M5(a, b, cin, ~cout, ~cout) |

For N_in < 2 the two ~cout inputs add 2 to the count, so the 5-input gate
fires at N_in = 1; for N_in >= 2 they add nothing and it fires at N_in = 3.

### 4-2 compressors (`mg_ec`, `mg_ac1`, `mg_ac2`)

A 4-2 compressor adds five equal-weight bits x0..x3, cin into
`sum + 2*(carry + cout)`. Because carry and cout have the same weight, their
values can be swapped case by case; swapping them so that cout = 1 exactly when
three or more inputs are 1 makes all three outputs functions of N_in:

| output | MG-EC (accurate) | MG-AC1 | MG-AC2 (4 inputs, no cin/cout) |
|---|---|---|---|
| cout | {3,4,5}: M5(x, cin) | same | none |
| carry | {2,4,5}: M7(x, cin, ~cout, ~cout) | same | {2,3,4}: M5(x, 1) |
| sum | {1,3,5}: M9(x, cin, ~cout x2, ~carry x2) | ~carry = {0,1,3} | {1,3,4}: M7(x, 1, ~carry, ~carry) |
| gates on critical path | 3 gates, 2 inverters | 2 gates, 2 inverters | 2 gates, 1 inverter |
| wrong patterns | none | 00000 gives 1, 11111 gives 4 | 1111 gives 3 |

A consequence worth knowing: cout depends on cin, so in a row of compressors
the cout-to-cin link ripples from column to column. The classic two-full-adder
compressor avoids that; this one trades it for fewer gates.

MG-AC2 with one input tied to 0 is an exact full adder.

Error figures, when each input is 0 with probability P0 (weighted over all
input patterns; the testbenches recompute and check them):

| | P0 = 0.5: ER / bias / MED | P0 = 0.75: ER / bias / MED |
|---|---|---|
| MG-AC1 | 6.25 % / 0 / 6.25 % | 23.83 % / +23.63 % / 23.83 % |
| MG-AC2 | 6.25 % / -6.25 % / 6.25 % | 0.39 % / -0.39 % / 0.39 % |

Partial-product bits are mostly 0 (P0 about 0.75), which favours MG-AC2 in
multipliers; evenly distributed data (P0 = 0.5) favours MG-AC1, whose +1 and
-1 errors cancel on average, in accumulators.

### 6-input compressors (`mg_c6_d1`, `mg_c6_d2`, `mg_c6_d3`)

Six inputs go to a sum (weight 1) and two or three carries (weight 2 each).
All three designs are wrong only for all zeros (+1) and all ones (-1): ER 3.13 %
at P0 = 0.5, 17.82 % at P0 = 0.75.

| design | outputs (N_in sets) | gates | critical path |
|---|---|---|---|
| d1, small | C0' {2,4}, C1 {3..6}, C2 {5,6}, sum' = ~C0' | 4 | 3 gates, 2 inverters |
| d2, fast | same outputs | 5 | 2 gates, 2 inverters |
| d3, two carries | C0' {2..6}, C1 {4,5,6}, sum' {0,1,3,5,6} | 5 | 2 gates, 1 inverter |

Gate lists: d1 uses C1 = M7(x,1), C2 = M9(x,0,0,0), D = M9(x,1,~C1,~C1) =
{2,4,5,6} and C0' = M3(D, ~C2, 0). d2 uses four first-stage gates {2..6},
{3..6}, {4..6}, {5,6} and C0' = M5({2..6}, ~{3..6}, {4..6}, ~{5,6}, 0). d3 is
d2 with the output inverter pushed through the last gate:
sum' = M5(~C0', {3..6}, ~C1, {5,6}, 1).

The source gives the output sets and gate counts of these three designs but
not their netlists; the gate lists above are this implementation's own
derivation and meet the stated gate counts and critical paths. Two points in
the source's description do not add up, and the RTL follows the arithmetic:
C2 of designs 1 and 2 is {5,6} (one passage says {4,5}), and C1 of design 3,
the set {4,5,6}, needs a 7-input gate with a constant 0 (one passage says 1).

## Clocked, non-volatile gates and phase pipelining

A spintronic gate works in two phases. In the compute phase its input currents
move the domain wall; in the sense phase the wall's position, which persists
without supply, is read out and drives the next gate. Every gate is therefore
also a storage element, and a chain of gates pipelines itself if neighbouring
gates take turns computing.

`mg_nv_gate` is such a gate: the domain-wall state is a flip-flop loaded with
the majority on an edge where `compute` is high and held otherwise. It has no
reset, on purpose.

`mg_ec_nv` builds MG-EC from three of them. A phase bit toggles each edge while
`en` is high. The cout gate (stage 1) and the sum gate (stage 3) compute on
phase 0, the carry gate (stage 2) on phase 1. At the phase-0 edge where the sum
gate computes set i, the cout gate is overwritten with set i+1, but the sum gate
still samples cout of set i, so no register sits between the gates.

| event | edge |
|---|---|
| set i taken (in_valid && in_ready, phase 0) | E |
| carry gate computes set i | E+1 |
| sum gate computes set i; sum, carry, cout and out_valid appear | E+2 |
| next set can be taken | E+2 |

So the cell has a latency of two edges and takes one set per two edges. The
operands of a set, and its cout and carry for the aligned output, travel in
ordinary registers beside the gates, because later stages need the operands of
their own set rather than the newest ones. Dropping `en` gates the compute
phases: nothing changes, whatever the inputs do, as when a normally-off circuit
is powered down between uses.

## Compressor trees

`mg_cmp_tree` reduces 4, 8 or 16 rows of W bits to two rows with levels of
`mg_cmp_row`. A row takes four vectors and returns a sum vector and a carry
vector shifted up one column. Columns below a parameter (`NAPPROX`) use the
approximate compressor of the chosen kind; the others use MG-EC.

Compressors are only placed where bits exist. Every row carries a live column
range outside which it is structurally zero. A column gets a compressor when
two or more live bits meet there, counting a live cin; a column with one live
bit passes it straight through. This matters for MG-AC1, which would otherwise
turn every empty position into a +1 error. The ranges of the rows between
levels are computed at elaboration by constant functions in `mg_pkg`, and an
assertion in `mg_cmp_row` fires in simulation if a column without a compressor
ever sees two ones.

### Multiplier (`mg_approx_mult`)

16x16 signed, modified Baugh-Wooley partial products: row i holds a[j]&b[i] at
column i+j, the bits pairing exactly one sign bit are inverted, and the two
correction ones (columns 16 and 31) sit in free positions of rows 0 and 15. The
16 rows go through three tree levels (16, 8, 4, 2 rows) and a carry-propagate
adder. `LSPP` columns (default 15) use `KIND` (default MG-AC2); the rest use
MG-EC. With `LSPP = 0` the product is exact.

With MG-AC2 every error is negative. On random operands the default multiplier
is wrong in about 20 % of products, and the mean error is 1.9e-6 of the
largest product. With MG-AC1 in the same 15 columns nearly every product is
off and the mean error is about 20 times larger.

### Accumulator (`mg_approx_acc`)

Eight 32-bit addends (the eight products of one element of an 8x8 matrix
product) go through two tree levels and an adder, with MG-AC1 in the `LSI`
least significant columns (default 18). It wraps modulo 2^32. On random
addends the mean error of MG-AC1 is about 300 (out of 2^32), against about
-72000 for MG-AC2 in the same columns.

Sweeps over the number of approximate columns (`tb_mg_mult_sweep`,
`tb_mg_acc_sweep`, 5000 random operand sets, fixed seed):

| LSPP | MG-AC1 ER | MG-AC1 NMED | MG-AC2 ER | MG-AC2 NMED |
|---|---|---|---|---|
| 12 | 99.98 % | 4.2e-6 | 9.8 % | 1.1e-7 |
| 13 | 99.98 % | 8.2e-6 | 11.8 % | 2.4e-7 |
| 14 | 100 % | 2.0e-5 | 15.5 % | 6.9e-7 |
| 15 | 100 % | 4.1e-5 | 20.0 % | 1.9e-6 |
| 16 | 100 % | 6.7e-5 | 26.3 % | 5.3e-6 |

| LSI | MG-AC1 mean error | MG-AC1 MED | MG-AC2 mean error | MG-AC2 MED |
|---|---|---|---|---|
| 16 | 296 | 7193 | -17429 | 17429 |
| 17 | 428 | 14841 | -36854 | 36854 |
| 18 | -18 | 29398 | -71877 | 71877 |
| 19 | 1135 | 58232 | -145906 | 145906 |
| 20 | 5434 | 116870 | -284633 | 284633 |

The same configurations were run through an 8x8 DCT and inverse DCT of a
generated 16x16 grey image (`tb_mg_dct_quality`). Each entry is the PSNR in dB
of the reconstructed image; 99 means it was reconstructed exactly. The exact
datapath gives 99.

| LSPP | MG-AC1 mult | MG-AC2 mult | LSI | MG-AC1 acc | MG-AC2 acc |
|---|---|---|---|---|---|
| 12 | 61.4 | 99 | 16 | 99 | 65.2 |
| 13 | 54.4 | 99 | 17 | 67.4 | 57.2 |
| 14 | 46.3 | 67.4 | 18 | 58.2 | 51.5 |
| 15 | 39.9 | 66.2 | 19 | 52.3 | 46.2 |
| 16 | 36.3 | 56.1 | 20 | 46.4 | 40.4 |

Absolute values depend on the image and the fixed-point scaling; the ordering
does not.

MG-AC2 gives the smaller error in the multiplier. MG-AC1 gives the smaller
bias in the accumulator, because its +1 and -1 errors mostly cancel over the
sum.

## The multiply-accumulate unit (`mg_dot8`, top)

`y = sum over k of a[k]*b[k]` for eight pairs of signed 16-bit operands: eight
`mg_approx_mult` (MG-AC2, LSPP = 15) feed one `mg_approx_acc` (MG-AC1,
LSI = 18). An 8x8 matrix product is 64 such dot products; a two-dimensional
8x8 DCT is two matrix products.

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock |
| rst_n | in | 1 | synchronous reset, active low; clears y and out_valid |
| in_valid | in | 1 | a and b hold an operand set |
| a, b | in | 8 x 16 | signed operands, element k at [k] |
| out_valid | out | 1 | y was updated by the last edge |
| y | out | 32 | approximate dot product; held while no operands arrive |
| c6_x | in | 6 | inputs of the three 6-input compressors |
| c6_d1_sum, c6_d1_c, c6_d2_sum, c6_d2_c, c6_d3_sum, c6_d3_c | out | 1, 3, 1, 3, 1, 2 | their outputs |
| fa_x | in | 3 | full adder inputs {cin, b, a} |
| fa_sum, fa_cout | out | 1, 1 | full adder outputs |
| nv_en, nv_in_valid, nv_x, nv_cin | in | 1, 1, 4, 1 | pipelined non-volatile MG-EC: compute enable, operands |
| nv_in_ready, nv_out_valid, nv_sum, nv_carry, nv_cout | out | 1 each | its handshake and outputs |

Timing: one operand set per cycle, result one cycle later. The datapath
between the operand ports and the output register is combinational. The 6-input
compressors, the full adder and the pipelined `mg_ec_nv` are not on the
dot-product path; they are brought out so that every cell of the family is in
one netlist. `mg_ec_nv` shares clk and rst_n.

Error bound: each product is low by less than 2^19 and the accumulator is off
by less than 2^22, so y is within 2^23 of the exact sum. On a fixed-point 8x8
DCT of a smooth image block with operands scaled to fill 16 bits, the output
error power is about 57 dB below the signal.

## How far to trust it, and where it departs from the source

- Every compressor is checked exhaustively against its N_in sets and its
  arithmetic value, and the published error figures of MG-AC1 and MG-AC2 are
  reproduced exactly.
- The multiplier and accumulator trees are a regular arrangement of 4-2
  compressor rows. The published error tables were measured on hand-built
  Dadda trees from an earlier work, which this RTL does not reproduce, so
  error rates differ in detail. On random operands MG-AC2 in 15 columns gives
  about 20 % wrong products, where about 26 % is reported.
- Partial-product generation (Baugh-Wooley), the final adders, the cout-to-cin
  wiring of compressor rows, the accumulator as an eight-input adder, and the
  output register with its valid handshake are choices made here.
- The clocked cell `mg_ec_nv` models the phases as one clock with a phase
  bit, one compute per gate per two edges. The source quotes device timing
  (1 ns compute, 2 ns sense, one result per ns when pipelined) that a clock
  cycle here does not represent. The dot-product path uses the combinational
  compressors, not the clocked ones.
- Not modelled: the sense phase as a separate signal, the current mirror that
  shares one input transistor network among the gates of a compressor, and all
  device-level behaviour (power, delay, variation).

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mg_pkg.sv tb/tb_mg_dot8.sv \
          --top-module tb_mg_dot8 -o sim && ./obj_dir/sim
```

Swap in any testbench from the table. The tree-based ones take about a minute
to build, because the live ranges are worked out at elaboration. The sweeps
(`tb_mg_mult_sweep`, `tb_mg_acc_sweep`, `tb_mg_dct_quality`) build 10 to 22
trees and take one to two minutes.

| testbench | block | what it checks |
|---|---|---|
| tb_mg_majority | mg_majority | all inputs of 3-, 5-, 7-, 9-input gates, AND/OR use |
| tb_mg_fa | mg_fa | all 8 input patterns |
| tb_mg_ec, tb_mg_ac1, tb_mg_ac2 | 4-2 compressors | all patterns, output sets, ER/bias/MED |
| tb_mg_c6 | 6-input compressors | all 64 patterns, output sets, ER |
| tb_mg_approx_mult | mg_approx_mult | exact at LSPP=0, error sign and bound, accuracy ordering |
| tb_mg_approx_acc | mg_approx_acc | exact at LSI=0, error bound, bias ordering |
| tb_mg_mult_sweep | mg_approx_mult | LSPP 12..16 with MG-AC1 and MG-AC2: ER and NMED printed, NMED grows with LSPP, MG-AC2 below MG-AC1 |
| tb_mg_acc_sweep | mg_approx_acc | LSI 16..20 with MG-AC1 and MG-AC2: mean error and MED printed, MED grows with LSI, MG-AC1 bias below MG-AC2 |
| tb_mg_dct_quality | mg_approx_mult, mg_approx_acc | PSNR of a DCT/inverse-DCT round trip for all 20 approximate configurations and the exact one, with the same orderings |
| tb_mg_ec_nv | mg_ec_nv, mg_nv_gate | results two edges after intake, one set per two edges, gated hold |
| tb_mg_dot8 | mg_dot8 | streaming with idle cycles, latency, hold, 2-D DCT, side cells |

## Changing it

- `LSPP` and `KIND` of `mg_approx_mult`, `LSI` and `KIND` of `mg_approx_acc`:
  any number of columns from 0 (exact) to the full width, and any of
  `CMP_EC`, `CMP_AC1`, `CMP_AC2` from `mg_pkg`.
- `mg_approx_mult` takes W = 4, 8 or 16, since its tree needs 4, 8 or 16 rows;
  `mg_approx_acc` takes N = 4, 8 or 16 addends of any width.
- `mg_dot8` passes K, W, LSPP and LSI down. K must be 4, 8 or 16.
- To use a compressor elsewhere, instantiate it directly. Its header comment
  lists the output sets and gates.
