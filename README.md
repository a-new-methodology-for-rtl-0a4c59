# Approximate multipliers built on transformed partial products

These are unsigned array multipliers that trade a small, bounded loss of accuracy for less area
and power. Most of a multiplier's cost is in the tree that reduces the partial products, so the
approximation is placed there. It is not applied to the raw partial products. Each pair of
mirrored partial products is first rewritten as a *propagate* bit and a *generate* bit. The
generate bits of a column are then merged cheaply by OR gates. The remaining bits go through
approximate half adders, full adders and 4-2 compressors.

There are two variants:

* **Multiplier A** uses approximate units in every column. It is the smallest and has the
  largest error.
* **Multiplier B** uses approximate units only in the `n-1` least significant columns and exact
  units above them. It is larger than A and far more accurate.

The RTL has both variants at 16 bits, the main configuration, and at 8 bits, the size used to
explain the method. All four are purely combinational.

## The approximate units

Each unit drops an XOR gate and replaces it with an OR gate. None of them is off by more than one
unit of its column weight.

| unit | equations | wrong cases (got / exact) |
|---|---|---|
| half adder (`approx_half_adder`) | `sum = y1 \| y2`, `carry = y1 & y2` | 11 → 3 / 2 |
| full adder (`approx_full_adder`) | `W1 = y1 \| y2`, `sum = W1 ^ y3`, `carry = W1 & y3` | 110 → 1 / 2, 111 → 2 / 3 |
| 4-2 compressor (`approx_compressor_4_2`) | `W1 = y1&y2`, `W2 = y3&y4`, `sum = (y1^y2) \| (y3^y4) \| W1&W2`, `carry = W1 \| W2` | 0101, 0110, 1001, 1010 → 1 / 2; 1111 → 3 / 4 |

The compressor has no carry-in and no carry-out. When all four inputs are 1 it outputs `11`
instead of `100`. When all inputs are 0 it outputs 0. That matters because the tree's high-order
columns see many zero inputs, and an all-zero input that gave a nonzero output there would cost a
lot.

The full adder and the compressor are **not symmetric** in their inputs:

* In the full adder, `y1` and `y2` form the OR-ed pair.
* In the compressor, `(y1,y2)` and `(y3,y4)` are the pairs.

So the order in which a column's bits reach a unit changes the result. See "Bit order" below.

The half adder can over-estimate. The other approximate units can only under-estimate. As a
result, the product of Multiplier A can be slightly above the exact product as well as below it.

## Propagate and generate: the step that saves the most

Take operands `b` and `c` of `n` bits. Partial product `a[i][m] = b[i] & c[m]` has weight `i+m`.
For every pair `a[i][m]`, `a[m][i]` with `i > m`, `pp_transform` computes:

    p[i][m] = a[i][m] | a[m][i]
    g[i][m] = a[i][m] & a[m][i]

Since `x + y = (x|y) + (x&y)`, this step is still exact, and both new bits keep weight `i+m`.
The diagonal bits `a[i][i]` have no partner and are left alone.

The transformation covers the columns of weight 3 to `2n-5`. That is 3..11 for `n = 8` and 3..27
for `n = 16`. The few columns at either end are left as plain partial products.

A generate bit is 1 only when both bits of its pair are 1, so generate bits are rare. For
operands with random bits, `P(g=1) = 1/16`. The design therefore merges all `k` generate bits of a
column with `ceil(k/4)` OR gates of at most four inputs each, instead of adding them. An OR gate
loses information whenever two or more of its inputs are 1. This OR merge is the main source of
error, and it is kept in the exact columns of Multiplier B too. The gate sizes are balanced, so
5 inputs split as 3+2, 6 as 3+3 and 7 as 4+3.

## The reduction trees

### Bit order

Every level lists the bits of a column from top to bottom, and each unit takes the next bits from
the top. Within a column the order is:

1. sums of the units of that column
2. bits that pass through unchanged
3. the OR-ed generate bits (level 1 only)
4. carries coming from the column below, older carries before newer ones

The next level's column follows the same order. This is what decides which bit reaches the
asymmetric inputs of a unit.

In a multiplier file, every unit is one line. The wire names give the level, the weight and the
unit: `s2_w10_u0` is the sum of unit 0 in the weight-10 column of level 2.

### 8-bit (`approx_mult8_a`, `approx_mult8_b`)

**Stage 1** turns the transformed matrix into three rows:

* weight 4: a half adder on `p[4][0], p[3][1]`, with `a[2][2]` passing
* weight 5: a full adder
* weights 6–8: 4-2 compressors (the diagonal bit is the fourth input at weights 6 and 8)
* weights 9 and 10: full adders
* weights 11 and 12: half adders
* weights 3–11: nine OR gates

**Stage 2** uses a half adder at weight 2 and full adders at weights 3–13, which leaves two rows.
There is one exception to the bit order: at weight 12 the stage-2 full adder takes its inputs as
`S12, C11, a[6][6]`.

### 16-bit (`approx_mult16_a`, `approx_mult16_b`)

Four levels take the column height from 16 to 6, then 4, then 2. Level 1 follows the same rule as
the 8-bit design:

* The propagate bits of a column, highest index first, are followed by the diagonal bit and taken
  four at a time into compressors.
* A remainder of three bits goes to a full adder and a remainder of two to a half adder. A single
  left-over bit passes.
* Weight 3 has no unit.
* At weight 4 the half adder takes only the two propagate bits, and `a[2][2]` passes.
* At weight 28 a half adder takes `a[15][13], a[13][15]`, and `a[14][14]` passes.

| weight | bits in | units | pass | g bits | OR gates (inputs) |
|---|---|---|---|---|---|
| 0–2 | 1, 2, 3 | – | all | 0 | – |
| 3 | 2 | – | 2 | 2 | 2 |
| 4 | 3 | HA | 1 | 2 | 2 |
| 5 | 3 | FA | 0 | 3 | 3 |
| 6, 7 | 4 | C42 | 0 | 3, 4 | 3; 4 |
| 8, 9 | 5 | C42 | 1 | 4, 5 | 4; 3+2 |
| 10, 11 | 6 | C42 + HA | 0 | 5, 6 | 3+2; 3+3 |
| 12, 13 | 7 | C42 + FA | 0 | 6, 7 | 3+3; 4+3 |
| 14–16 | 8 | C42 + C42 | 0 | 7, 8, 7 | 4+3; 4+4; 4+3 |
| 17, 18 | 7 | C42 + FA | 0 | 7, 6 | 4+3; 3+3 |
| 19, 20 | 6 | C42 + HA | 0 | 6, 5 | 3+3; 3+2 |
| 21, 22 | 5 | C42 | 1 | 5, 4 | 3+2; 4 |
| 23, 24 | 4 | C42 | 0 | 4, 3 | 4; 3 |
| 25, 26 | 3 | FA | 0 | 3, 2 | 3; 2 |
| 27 | 2 | HA | 0 | 2 | 2 |
| 28 | 3 | HA | 1 | 0 | – |
| 29, 30 | 2, 1 | – | all | 0 | – |

**Level 2 → 3** uses:

* a half adder at weight 9
* a full adder at weight 10
* compressors at weights 11–21
* a half adder at weight 22

**Level 3 → 4** uses:

* full adders at weights 2–7
* compressors at weights 8–23
* full adders at weights 24–29

In every variant an exact `ripple_carry_adder` adds the last two rows. The adder is `2n` bits
wide and its carry-out is not used.

## Multiplier B: exact columns and their carry chains

Multiplier B has exactly the same bit layout as A. From weight `n-1` upward (weight 15 for 16
bits, 7 for 8 bits), every unit is exact:

* `exact_half_adder`
* `exact_full_adder`
* `exact_compressor_4_2`, which adds five bits: `x1..x4` plus `cin`

The compressor's `cout` does not depend on its `cin`. Within one level, the compressor in position
`j` of a column sends its `cout` to the `cin` of unit `j` in the next column up. The first
compressor of the exact region gets `cin = 0`.

A unit that receives a `cin` counts it as one more input:

| data bits + `cin` | unit used | `cout` |
|---|---|---|
| 3 + 1 | exact compressor with `x4 = 0` | yes, chain continues |
| 2 + 1 | exact full adder | no, chain ends |
| 1 + 1 | exact half adder | no, chain ends |

So the chains never add a bit to any column, and the row counts of A still hold. In the 16-bit
level-3 chain, the last stage is the half adder on `a[15][15]`. Its carry is the only bit in the
weight-31 column.

## Accuracy and cost

The testbenches measure the mean relative error over 2000 random operand pairs:

| multiplier | mean relative error |
|---|---|
| 16-bit A | ≈ 9.3 % |
| 16-bit B | ≈ 0.09 % |
| 8-bit A | ≈ 8.2 % |
| 8-bit B | ≈ 0.9 % |

Some properties hold for every input. They follow from the structure and are checked by the
testbenches:

* The result is exact when either operand is zero or a power of two. In that case each column
  holds at most one 1.
* The result does not depend on the operand order.

As an example, 7 × 7 gives 45 with both 16-bit variants and 53 with both 8-bit ones.

The published synthesis results compare the 16-bit designs with an exact Dadda tree multiplier.
This RTL does not reproduce those numbers:

| technology | Multiplier A area | Multiplier A power | Multiplier B area | Multiplier B power |
|---|---|---|---|---|
| 180 nm | ≈ 62 % of exact | ≈ 38 % of exact | ≈ 71 % of exact | ≈ 69 % of exact |
| 45 nm | ≈ 82 % of exact | ≈ 54 % of exact | ≈ 85 % of exact | ≈ 80 % of exact |

## Where this RTL makes its own choices

* **16-bit level 1.** Level 1 of the 16-bit trees applies the rule of the 8-bit design described
  above; the rows it leaves are, column for column, the published level-2 rows. Levels 2–4 follow
  the published dot diagrams.
* **OR gate sizes.** How a column's generate bits are split over its OR gates is not specified.
  The gates are balanced.
* **Bit order.** The bit order within a column, and therefore which bit reaches which asymmetric
  input, follows the published diagrams where they show it and the rule above elsewhere.
* **Level-1 chains of Multiplier B.** These chains, and the 8-bit Multiplier B as a whole, are
  this design's reading of the one-sentence description "exact units in the upper columns". The
  rule is taken from the drawn level-2 and level-3 chains.
* **Stage 1 of the 8-bit design.** It uses three approximate full adders, at weights 5, 9 and 10.
  A count of a single full adder also appears for that stage, but it does not fit the drawn
  structure.
* **Published 7 × 7 examples.** Waveforms published for 7 × 7 show 35 for A and 31 for B. This
  RTL gives 45 for both and does not use those two values as checks. The other published examples
  (3 × 2 = 6 and 8 × 8 = 64) are reproduced.
* **Internal structures.** The exact units use standard structures; their insides are not
  specified. The exact compressor is two full adders.

## Files

| file | contents |
|---|---|
| `rtl/approx_mult_top.sv` | top: the 16-bit A and B on shared operands, and the 8-bit A and B |
| `rtl/approx_mult16_a.sv`, `rtl/approx_mult16_b.sv` | 16-bit multipliers, one line per unit |
| `rtl/approx_mult8_a.sv`, `rtl/approx_mult8_b.sv` | 8-bit multipliers |
| `rtl/pp_transform.sv` | AND array and p/g transformation, parameter `N` (default 16) |
| `rtl/approx_*.sv` | approximate half adder, full adder and 4-2 compressor |
| `rtl/exact_*.sv` | exact half adder, full adder and 4-2 compressor with cin/cout |
| `rtl/ripple_carry_adder.sv` | final adder, parameter `WIDTH` (default 32) |
| `tb/tb_<module>.sv` | one self-checking testbench per module; `tb_exact_units` covers the three exact units |

The multiplier testbenches check these things:

* reference vectors, whose expected products come from an independent bit-level model of the
  dot diagrams described above
* the power-of-two and operand-order properties
* a bound on the mean relative error

`tb_approx_mult_top` drives all four multipliers together. It also counts how often each
mechanism is exercised, and fails if any of them never is:

* a generate bit is set
* generate bits are lost in an OR merge
* each approximate unit hits an erring input case
* a carry travels along Multiplier B's exact chain
* Multiplier A over-estimates the product, and under-estimates it

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -y rtl tb/tb_approx_mult_top.sv \
              --top-module tb_approx_mult_top
    ./obj_dir/Vtb_approx_mult_top

Every testbench ends by printing `TB_RESULT checks=N failures=M`. To run another one, replace the
file and module names. Each run takes well under a second.

## Changing the design

* **To try another unit,** edit the unit's file. For example, you can give the compressor a
  different error profile. Both variants pick up the change.
* **To move the boundary between approximate and exact columns,** change the module of each unit
  line in the affected columns in `approx_mult16_b.sv`, and wire the `cout`/`cin` chain as
  described above.
* **To use a different reduction plan,** keep the bit-order convention so that the asymmetric
  inputs stay well defined.
