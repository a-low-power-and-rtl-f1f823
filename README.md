# Approximate 8x8 multiplier built from approximate 4:2 compressors

Most of a multiplier's area, delay and power sits in the tree that reduces
partial products down to two rows. This design saves logic in that tree by
using two *approximate* 4:2 compressors. The first kind is built from
"almost full adders", whose carry is simplified. The second kind is built
from two three-input majority gates. Many applications tolerate small
arithmetic errors: image and video processing, multimedia, inference. For
them the multiplier gives up some accuracy for a shorter, smaller reduction
tree. A run-time `trunc` input can also drop the low-order partial products
entirely, so accuracy and switching activity can be traded per operation.

The design is purely combinational: there is no clock, no reset and no
handshake. `P` follows `A`, `B` and `trunc` after the logic delay.

```
 A[7:0] B[7:0] trunc[4:0]
    |      |      |
 +--v------v------v--+
 |   pp_generator    |  8 partial-product rows, 16 bits each,
 +-------------------+  columns below `trunc` cleared
   rows 0-3    rows 4-7
 +----v----+ +----v----+
 | AFA 4:2 | | AFA 4:2 |  level 1: compressor42_row, KIND = CMP_AFA
 +---------+ +---------+
   s0  c0      s1  c1
 +----v----------v----+
 |    majority 4:2    |   level 2: compressor42_row, KIND = CMP_MAJ
 +--------------------+
        s2   c2
 +------v-----v-------+
 |    final_adder     |   16-bit ripple-carry adder
 +--------------------+
           |
        P[15:0]
```

Only the lowest `APPROX_COLS` product columns (default 8) use approximate
compressors. The columns above them use exact compressors in both levels.

## The almost full adder

An exact full adder computes `sum = a^b^c` and `carry = maj(a,b,c)`. The
almost full adder (`almost_full_adder`) keeps the exact sum but reduces the
carry to a single AND gate:

| a b cin | exact sum, carry | almost full adder sum, carry |
|---------|------------------|------------------------------|
| 0 0 0   | 0 0              | 0 0                          |
| 0 0 1   | 1 0              | 1 0                          |
| 0 1 0   | 1 0              | 1 0                          |
| 0 1 1   | 0 1              | 0 1                          |
| 1 0 0   | 1 0              | 1 0                          |
| 1 0 1   | 0 1              | 0 **0**                      |
| 1 1 0   | 0 1              | 0 **0**                      |
| 1 1 1   | 1 1              | 1 1                          |

`carry = b & cin`. The adder is wrong in two of the eight rows. In both it
under-counts by 2, and it never over-counts. Which input is `a` therefore
matters.

## The two 4:2 compressors

A 4:2 compressor takes four bits of one column plus a carry `cin` from the
column below. It returns a `sum` (weight 1), plus a `carry` and a `cout`
(both weight 2). Exactly, `x1+x2+x3+x4+cin = sum + 2*(carry+cout)`, and
`cout` must not depend on `cin`. That keeps a row of compressors from
rippling.

* `exact_compressor42` uses two full adders. The first adds `x1,x2,x3` into
  `s` and `cout`. The second adds `s,x4,cin` into `sum` and `carry`.
* `afa_compressor42` has the same structure with two almost full adders. The
  pins are mapped `a=x1, b=x2, cin=x3` and `a=s, b=x4, cin=cin`. Its `sum`
  is still the exact parity of the five inputs. Its carries become
  `cout = x2&x3` and `carry = x4&cin`. It is exact on 16 of the 32 input
  patterns, and where it errs it always under-counts.
* `majority_compressor42` replaces both adders with majority gates:

  ```
  carry = x4
  cout  = x3
  s     = ~maj(x3, x4, ~cin)
  sum   = maj(x1, s, x2)
  ```

  Two of its three outputs are plain wires, so its delay is two gate levels
  at most. It is exact on 18 of the 32 input patterns. It over-counts on 7 and
  under-counts on 7. An all-zero input gives an all-zero output.

## Reduction tree and its accuracy

`compressor42_row` places one compressor on each of the 16 product columns.
Column `k` takes bit `k` of four rows and the `cout` of column `k-1`. Its
`sum` goes to bit `k` of the sum row and its `carry` to bit `k+1` of the
carry row. The top column's `carry` and `cout` are dropped, because the
product has 16 bits. Bits that a row does not have are zero.

The multiplier uses almost-full-adder compressors in the first level and
majority compressors in the second level. Only columns below `APPROX_COLS`
are approximate. The tree groups the partial-product rows as 0-3 and 4-7.
This is a plain row-wise 4:2 tree, not a minimal Dadda dot diagram, so
bit-exact results depend on this grouping.

The table below gives the accuracy over all 65,536 operand pairs, at
`APPROX_COLS = 8`. The mean error is negative: the design under-estimates on
average.

| trunc | mean abs. error | error rate | worst abs. error |
|-------|-----------------|------------|------------------|
| 0     | 203.2           | 82.5 %     | 996              |
| 2     | 204.0           | 85.8 %     | 997              |
| 4     | 209.2           | 91.7 %     | 1057             |
| 6     | 231.1           | 96.0 %     | 1057             |
| 8     | 448.2           | 98.0 %     | 1793             |

`APPROX_COLS` sets the accuracy far more strongly, with `trunc = 0`:

* `APPROX_COLS = 0` is exact.
* `APPROX_COLS = 4` gives a mean absolute error of 4.25 and an error rate
  of 27.7 %.
* `APPROX_COLS = 16` approximates every column. It is unusable: 255 x 255
  gives 1277. This is why the default keeps the upper half exact.

Sample products at the defaults:

| A x B     | exact | P     |
|-----------|-------|-------|
| 255 x 255 | 65025 | 64765 |
| 8 x 3     | 24    | 24    |
| 15 x 15   | 225   | 125   |
| 15 x 14   | 210   | 114   |
| 12 x 15   | 180   | 100   |
| 12 x 12   | 144   | 80    |

## Run-time truncation

`trunc` (0 to 16) clears every partial-product bit whose column
`i + j < trunc`. Setting `trunc = 16` forces `P = 0`. Truncation acts on the
partial products before the tree, so it adds on top of the compressors'
error.

## Where this departs from, or goes beyond, the published scheme

The published scheme fixes these parts:

* the almost-full-adder equations;
* the majority compressor's gates;
* the full-adder-based compressor structure;
* almost-full-adder compressors in the early reduction stage and majority
  compressors in the later one;
* 8-bit operands and a 16-bit product;
* run-time truncation of partial products.

This implementation chose the rest:

* **Pin mapping of the almost-full-adder compressor.** It is not given.
  The mapping above was chosen.
* **Which columns are approximate.** This is not specified.
  `APPROX_COLS = 8` was chosen because approximating all columns ruins the
  high-order bits.
* **The tree.** Rows are grouped 0-3 and 4-7, and every column gets a
  compressor. The published results come from a tree whose exact layout is
  not given. The approximate products here therefore differ from the
  published ones.
* **The final adder** is a ripple-carry adder of exact full adders.
* **Truncation** is selected as a column count on a port.
* **Operands** are unsigned.

## Parameters

| module              | parameter     | default   | meaning                                               |
|---------------------|---------------|-----------|-------------------------------------------------------|
| `approx_multiplier` | `N`           | 8         | operand width; the tree is wired for 8 only          |
| `approx_multiplier` | `APPROX_COLS` | 8         | number of low product columns with approximate compressors |
| `compressor42_row`  | `PW`          | 16        | row width                                             |
| `compressor42_row`  | `KIND`        | `CMP_AFA` | approximate compressor kind                           |
| `compressor42_row`  | `APPROX_COLS` | 8         | as above                                              |
| `pp_generator`      | `N`, `PW`     | 8, 16     | operand and row width                                 |
| `final_adder`       | `PW`          | 16        | adder width                                           |

The width constants `MULT_N` and `MULT_PW`, the compressor-kind enum
`cmp_kind_t` and the `maj3` function live in `approx_mult_pkg`.

## Files

* `rtl/`: one module or package per file. The hierarchy is
  `approx_multiplier` → `pp_generator`, `compressor42_row` (x3),
  `final_adder`. Below those:
  * `compressor42_row` → `afa_compressor42`, `majority_compressor42`,
    `exact_compressor42`;
  * the compressors → `almost_full_adder`, `full_adder`.
* `tb/`: one self-checking testbench per module, plus two more:
  * `tb_ref_pkg` is a reference model of the compressors and of the whole
    multiplier. It is written with integer counting rather than gates.
  * `tb_approx_multiplier_exact` runs the multiplier with
    `APPROX_COLS = 0`. It checks `P == A*B` on every operand pair, and the
    exact sum of the kept partial products under truncation.

  Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
  through a watchdog if it hangs.
* `tb_approx_multiplier` is the end-to-end test at default parameters. It
  applies all 65,536 operand pairs and 20,000 random truncated cases, and
  compares each result with the reference model. It prints the error
  statistics and the sample table above. It also fails if any of these never
  occurs: an exact result, an inexact result, a truncation that changes the
  product, or a full truncation to zero.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/approx_mult_pkg.sv tb/tb_ref_pkg.sv rtl/*.sv tb/tb_approx_multiplier.sv \
  --top-module tb_approx_multiplier -Mdir obj_tb
./obj_tb/Vtb_approx_multiplier
```

For another testbench, swap in its file and top-module name. The packages
must come first on the command line. The end-to-end test runs in well under
a second.

To change the accuracy, override `APPROX_COLS` on `approx_multiplier`, or
drive `trunc` at run time. To try another compressor in a level, change
`KIND` on that level's `compressor42_row`.
