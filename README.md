# 6-bit absolute-value threshold detector

A small combinational circuit that answers one question: is the magnitude of
a signed 6-bit sample larger than a 5-bit threshold? Blocks like this show up
in encoders and decoders, where a sample's size (not its sign) picks a code
or a path. The design takes the sample `a` in two's complement and an
unsigned threshold `b`. It raises `y` when `|a| > b`.

The circuit is a CMOS gate netlist, and it was designed for low energy. Every
gate is an inverter or a NAND/NOR gate with two or three inputs. The RTL keeps
that form: each `assign` in `rtl/` is one such gate. Read the RTL as a
structural description of the gate network as well as its logic function.

```
 a[5:0] ──► abs_converter ──mag[4:0]──► mag_comparator5 ──► y
                                             ▲
 b[4:0] ─────────────────────────────────────┘
```

| file | role |
|---|---|
| `rtl/abs_det_pkg.sv` | widths (`A_W = 6`, `B_W = 5`) and the types `sample_t`, `mag_t` |
| `rtl/abs_converter.sv` | two's-complement sample to 5-bit magnitude |
| `rtl/mag_comparator5.sv` | 5-bit `a > b` comparator |
| `rtl/abs_value_detector.sv` | top level: the two blocks in series |

The design has no clock, reset or state. The output follows the inputs after
the gate delays.

## The magnitude converter

Negating a two's-complement number flips bit *i* exactly when some bit below
*i* is 1. For a negative sample (`A5 = 1`), bit *i* of the magnitude is
therefore `A_i XOR (A_{i-1} + … + A_0)`. For a positive sample, it is just
`A_i`. Minimising each bit over all 64 inputs gives sum-of-products
equations (`'` is inversion):

```
|A4| = A5 A4' + A5' A4 + A5 A3' A2' A1' A0'
|A3| = A5' A3 + A3 A2' A1' A0' + A5 A3' A2 + A5 A3' A0 + A5 A3' A1
|A2| = A5' A2 + A2 A1' A0' + A5 A4' A3' A2' + A5 A2' A0 + A5 A2' A1
|A1| = A1 A0' + A5' A1 + A5 A1' A0
|A0| = A0
```

Some product terms have four or five literals, and some sums have five terms.
The netlist keeps every gate to three inputs or fewer:

* The zeros of the low bits are detected once by NOR gates and then shared:
  `z210 = NOR3(A2,A1,A0)`, `z10 = NOR2(A1,A0)`, `z432 = NOR3(A4,A3,A2)`.
  For example, `A5 A3' A2' A1' A0'` becomes `NAND3(A5, A3', z210)`.
* A five-term sum is a NAND3 over three inverted products and a NAND2 over
  the other two. A NOR2 and an inverter then join the two halves.

### The −32 input

A 6-bit two's-complement sample runs from −32 to 31, but a 5-bit magnitude
stops at 31. For −31…31 the converter gives `|a|` exactly, which was checked
over all inputs. For −32 the equations above give `10100` (20). The term
`A5 A4' A3' A2'` in `|A2|` only matters for this input. The RTL implements
the equations as they stand, so `y = (20 > b)` when `a = −32`. If your
application can see −32, saturate or flag it in front of the block.

## The magnitude comparator

The comparator works from the top bit down:

```
gt  = A4 B4' + X4 A3 B3' + X4 X3 A2 B2' + X4 X3 X2 A1 B1' + X4 X3 X2 X1 A0 B0'
X_i = A_i B_i + A_i' B_i'          (bit i equal)
```

All five bit positions are compared in parallel. `X_i` is the NOR of the two
"differ" products `A_i B_i'` and `A_i' B_i`. These products are themselves
NOR gates of one true and one inverted input. A difference at bit *i* clears
`X_i`, and a cleared `X_i` blocks every term below it. The highest differing
bit therefore decides. `X_0` is never needed.

The direct form needs AND gates of up to six literals and a five-input OR.
The netlist splits them:

```
e43_n = NAND2(X4, X3)                 prefix shared by the two longest terms
t3    = NOR2(e43_n, NAND2(X2, A1B1'))
t4    = NOR2(e43_n, NAND3(X2, X1, A0B0'))
r1    = NAND3(~t0, ~t1, ~t2)          = t0 + t1 + t2
gt    = NAND2(~r1, NOR2(t3, t4))      = r1 + t3 + t4
```

The final OR is therefore a NAND of inverted partial sums (De Morgan).

### Equal inputs give 0

The output is strictly "greater than": `|a| = b` gives `y = 0`. The
comparator equation has no equality term. A plain-language statement of the
block could suggest that equality should give 1, but this design follows the
gate equation. If you need `|a| >= b`, compare against `b - 1` (for `b > 0`)
or add an all-equal term `X4 X3 X2 X1 X0` to the final OR.

## Timing and the critical path

The longest path in this netlist has 12 gates. It starts at an input
inverter of `a` and runs through a five-term sum of the converter (inverter,
NAND2, NAND3, NOR2, inverter). It continues into the comparator (inverter,
NOR2 for `A3 B3'`, NOR2 for `X3`, NAND2 `e43_n`, NOR2 `t3`, NOR2, final
NAND2). The reference gate-level design has a 13-stage critical path, so
this split of the wide gates is one stage shorter. The two netlists are not
identical gate for gate.

The reference design was tuned for energy with logical-effort sizing and
supply scaling. That work chooses transistor widths per stage and a supply
voltage:

* 1 V with minimum-delay sizing;
* resized for a delay of 1.5 × the minimum;
* 0.775 V with scaling only;
* 0.835 V with both.

None of this changes the logic, and none of it can be expressed in RTL.
Apply it, if you need it, when you map the netlist to cells. The RTL's
gate-per-`assign` structure helps there: a synthesis tool given a NAND/NOR/INV
library can map it almost one to one, although it may restructure it unless
told to keep the hierarchy and nets.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench ends with
one line, `TB_RESULT checks=N failures=M`. A watchdog stops a run that hangs
and counts a failure.

* `tb_abs_converter`: all 64 samples. The expected value is `|a|` computed
  arithmetically, or 20 for −32.
* `tb_mag_comparator5`: all 1024 operand pairs against integer `a > b`. It
  also checks that every deciding bit position, and equality, occurred.
* `tb_abs_value_detector`: all 2048 `(a, b)` pairs through the top level.
  It counts these cases and fails if any of them never occurred:
  * a negative sample above the threshold;
  * a positive sample above the threshold;
  * `|a| = b`;
  * a decision at the top bit;
  * a decision at the bottom bit;
  * the −32 input.

Each output is checked one time unit after its inputs change, because the
design is combinational with zero-cycle latency.

To run a testbench with Verilator 5 from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wall -Irtl \
  rtl/abs_det_pkg.sv rtl/abs_converter.sv rtl/mag_comparator5.sv \
  rtl/abs_value_detector.sv tb/tb_abs_value_detector.sv \
  --top-module tb_abs_value_detector -o sim
./obj_dir/sim
```

Replace the testbench file and `--top-module` to run the others.

## Changing the design

The widths in `abs_det_pkg` are not free parameters. The gate equations are
written for exactly a 6-bit sample and a 5-bit threshold. A different width
needs new equations for every magnitude bit and a longer comparator chain.
For that case a behavioural version (`mag = a[5] ? -a : a` and `y = mag > b`)
gives the same function for −31…31 and leaves the gate structure to the
synthesis tool. The exhaustive testbenches adapt easily to either version.
