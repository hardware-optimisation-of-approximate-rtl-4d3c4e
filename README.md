# Approximate 8 x 8 multiplier with approximate 5:2 compressors

A multiplier spends most of its area, delay and power on adding up partial
products. This design trades accuracy for cheaper hardware: in the less
significant half of the product, groups of five partial-product bits are
squeezed into two bits by an *approximate 5:2 compressor*. An exact adder
still handles the rest. The compressor has no XOR gates and no carry chain
between neighbouring compressors, so it is cheap and each one is only a few
gate levels deep. The price is a small, data-dependent error in the product.

The multiplier takes unsigned 8-bit `a` and `b` and returns a 16-bit
approximate product `out`. It is purely combinational: no clock, no reset,
and `out` is valid one propagation delay after the inputs change.

## The approximate 5:2 compressor

A 5:2 compressor receives five bits X0..X4 of equal weight. It returns
`Sum` (weight 1) and `Carry` (weight 2). The true count of ones runs from 0
to 5 and cannot fit in two bits, so the cell approximates it.

**Carry.** The inputs are split into group A = {X0, X1, X2} and group
B = {X3, X4}:

    Carry = Cf(X0,X1,X2) + Ch(X3,X4) + Ch(X0+X1+X2, X3+X4)      ('+' is OR)

* `Cf` is the carry of a full adder, the majority of three
  (`modified_full_adder`).
* `Ch` is the carry of a half adder, an AND (`modified_half_adder`).
* The first term fires on two ones inside A. The second fires on two ones
  inside B. The third fires on one one in each group.
* So `Carry` is 1 exactly when two or more of the five inputs are 1
  (`approx_carry52`).

**Sum.** An exact sum would be the parity of all five bits, which needs a
tree of XORs. The XORs are replaced here:

    Sum = ((X0 XNOR X1) NOR (X2 XNOR X3)) OR X4
        = X4 OR ((X0 != X1) AND (X2 != X3))                      (approx_sum52)

**Resulting value.** The table gives `2*Carry + Sum` for each true count.
This is the key to the whole design's error behaviour:

| ones in X0..X4 | compressor value | note |
|---|---|---|
| 0 | 0 | exact |
| 1 | 1 if the 1 is on X4, otherwise 0 | a lone 1 on X0..X3 is lost |
| 2 | 2 or 3 | 3 when X4 is set, or when each pair (X0,X1) and (X2,X3) holds one 1 |
| 3 | 2 or 3 | 3 when X4 is set |
| 4 | 2 or 3 | 3 when X4 is set |
| 5 | 3 | always 2 low |

The lost lone 1 is the largest effect. Multiplying small or sparse operands
leaves many columns with a single 1, and that 1 often disappears.

## How the multiplier places its compressors

Partial product (i, j) is `a[j] AND b[i]`, with weight 2^(i+j). It sits in
column k = i + j. An 8 x 8 multiplier has columns 0..14 with heights
1, 2, 3, 4, 5, 6, 7, 8, 7, 6, 5, 4, 3, 2, 1.

* Inside a column the bits are numbered t = 0, 1, 2, ... by rising `b` index.
* In every column below `APPROX_COLS` (default 8, the lower half of the
  product), each full group of five bits (t = 0..4, then 5..9, ...) drives
  X0..X4 of one compressor, in that order.
* The compressor's `Sum` stays in column k and its `Carry` goes to column
  k + 1.
* At the default size this gives exactly one compressor in each of columns
  4, 5, 6 and 7. In column 4 the whole column is compressed. In columns
  5..7 the bits with t >= 5 bypass the compressor.
* Everything else is added exactly, modulo 2^16. That covers the compressor
  outputs, the bypassed bits and all of columns 8..14.

The upper half is kept exact so that the errors stay in the low-weight
columns. With compressors in every column of height five or more
(`APPROX_COLS = 16`), the error grows about eight-fold (see below).

The package `approx_mult_pkg` computes, at elaboration time, each column's
first row, height and number of compressor groups. The multiplier's
`generate` loops use these values, so `WIDTH` and `APPROX_COLS` can be
changed freely. A 16-bit build has up to three compressors per column.

## Accuracy

Measured over all 65,536 operand pairs at the default size (printed by
`tb_multiplier`):

| placement | error rate | mean error distance | normalised (÷ 255²) |
|---|---|---|---|
| lower half, `APPROX_COLS = 8` (default) | 90.3 % | 102.7 | 0.0016 |
| every column, `APPROX_COLS = 16` | 96.4 % | 834 | 0.0128 |
| none, `APPROX_COLS = 0` | 0 % | 0 | 0 |

The error is not symmetric. At the default size 38,192 products come out
low and 20,984 high; only 6,360 are exact. Products of small operands can be
far off in relative terms. For example 20 x 12 gives 0, because each of its
four partial products is alone in a compressed column and not on X4. Large
products are relatively accurate.

## Where this design departs from, or goes beyond, its source

The compressor cell (carry equation, grouping, XOR-free sum structure) and
the interface (`a[7:0]`, `b[7:0]`, `out[15:0]`, combinational) follow the
published design. The following are this design's own choices:

* **Placement of the compressors.** The source names the approximate 5:2
  compressor but does not say which partial products feed which
  compressor. The lower-half, five-at-a-time, rising-`b` placement is
  chosen here.
* **The published example products are not reproduced.** The source's
  waveform shows, for (a, b) = (10,50), (25,20), (20,12), (10,12), (10,15)
  and (12,10), the approximate products 500, 500, 224, 104, 110 and 120.
  This design gives 484, 404, 0, 8, 70 and 8. For 80 x 10 it gives 896.
  All of the published errors lie in columns 3..7, which is why the lower
  half was chosen for approximation. But no placement of this compressor
  that was tried matched those numbers. Treat the accuracy figures above as
  properties of this placement only.
* **Gate types of the sum.** The source's drawing has a pair gate on
  (X0,X1), a pair gate on (X2,X3), a gate combining them and a final gate
  with X4. The gate types XNOR, XNOR, NOR, OR are a reading of that drawing,
  restricted to the gate types the source compares (OR, NOR, XNOR, XOR).
* **Modified half adder = AND.** The cell is used only for its carry, and
  the carry of a half adder is the AND of its inputs.
* **Operand width.** The source calls the design a "16-bit" multiplier but
  shows 8-bit inputs and a 16-bit output. The default follows the 8-bit
  inputs. `WIDTH = 16` is supported and tested.
* **Unsigned operands, exact final adder.** Neither is specified by the
  source. The final accumulation is a plain multi-operand `+`; its
  implementation is left to synthesis.

The source reports 62–69 LUTs and a 10.073 ns combinational delay on Xilinx
FPGAs. Those figures belong to its own implementation and were not
reproduced here.

## Files

RTL (`rtl/`), from leaf to top:

| file | contents |
|---|---|
| `approx_mult_pkg.sv` | default width; functions giving column heights and compressor groups |
| `modified_half_adder.sv` | Ch(a,b) = a AND b |
| `modified_full_adder.sv` | Cf = majority of three |
| `approx_carry52.sv` | Carry of the 5:2 compressor, built from the two cells above |
| `approx_sum52.sv` | XOR-free approximate Sum |
| `approx_compressor52.sv` | Sum and Carry together |
| `multiplier.sv` | top: partial products, compressor placement, exact accumulation |

Parameters of `multiplier`: `WIDTH` (operand width, default 8) and
`APPROX_COLS` (columns 0..APPROX_COLS-1 use compressors, default `WIDTH`).

Testbenches (`tb/`) check themselves and print
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_modified_half_adder`, `tb_modified_full_adder` | all input patterns |
| `tb_approx_carry52` | all 32 patterns against "two or more ones"; each carry term fires alone at least once |
| `tb_approx_sum52` | all 32 patterns against the sum rule |
| `tb_approx_compressor52` | all 32 patterns, plus the value table above |
| `tb_multiplier` | default size, no parameter overrides: all 65,536 pairs against a reference model; zero operands; error statistics; the published example operands |
| `tb_multiplier_modes` | `APPROX_COLS = 0` must equal `a*b` exactly; `APPROX_COLS = 16` against the model |
| `tb_multiplier_w16` | 16 x 16 build, 50,000 random pairs plus corner cases against the model |

The reference model (`tb/tb_approx_model_pkg.sv`) works column by column
from the behaviour of the compressor (a count of ones plus the sum rule).
It does not reuse the gate-level RTL, but it does use the same placement.

## Simulating

With Verilator 5 (the package files must come first; `-y` finds the rest by
module name):

    verilator --binary --timing --assert -y rtl -y tb \
        rtl/approx_mult_pkg.sv tb/tb_approx_model_pkg.sv tb/tb_multiplier.sv \
        --top-module tb_multiplier
    ./obj_dir/Vtb_multiplier

Replace `tb_multiplier` with any testbench name above. Each one finishes in
well under a second.

To change the placement, edit `col_groups` / `pp_compressed` in
`approx_mult_pkg.sv` and the input wiring of `u_comp` in `multiplier.sv`.
Then update `approx_product` in the reference model to match.
