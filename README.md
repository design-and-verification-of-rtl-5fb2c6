# 4x4 Wallace tree multiplier

A combinational multiplier for two 4-bit unsigned numbers, giving an 8-bit
product. Instead of adding the four shifted copies of the multiplicand one
after another, a Wallace tree adds *columns of bits*. Each column that holds
three bits goes into a full adder and each column that holds two goes into a
half adder. These adders pass no carry between them: each just turns its
column into a sum bit and a carry bit for the next column up. Two such
carry-save stages shrink the four partial-product rows to two. A short
ripple-carry adder then adds those two rows. The carry ripples through only
four cells instead of the whole width, across three levels of additions.

```
 a[3:0] ─┐                                   
 b[3:0] ─┴─► partial products ─► stage 1 ─► stage 2 ─► stage 3 ─► out[7:0]
             16 AND gates        2 HA+2 FA  1 HA+3 FA  1 HA+3 FA (ripple)
```

In total: 16 AND gates, 5 half adders and 7 full adders. There is no clock.

## The dot diagram

`Pij = b[i] & a[j]` is the partial product of multiplier bit `i` and
multiplicand bit `j`. Its weight is 2^(i+j), so it sits in column `i+j`.
Bit names below are the ones used in the RTL comments. `S0k`/`C0k` come from
stage 1, `S1k`/`C1k` from stage 2, and `S2k`/`Cout` from stage 3.

```
column:           7    6    5    4    3    2    1    0
row 0                            P03  P02  P01  P00
row 1                       P13  P12  P11  P10
row 2                  P23  P22  P21  P20
row 3             P33  P32  P31  P30
---------------------------------------------------------- stage 1 (rows 0-2)
sums                   P23  S04  S03  S02  S01  P00
carries                C04  C03  C02  C01
row 3             P33  P32  P31  P30
---------------------------------------------------------- stage 2
sums              P33  S14  S13  S12  S11  S01  P00
carries           C14  C13  C12  C11
---------------------------------------------------------- stage 3 (ripple)
product     Cout  S24  S23  S22  S21  S11  S01  P00
```

A column with a single bit passes to the next stage unchanged. So `P00`,
`S01` and `S11` are final product bits as soon as they are formed, and `P23`
and `P33` each skip one stage.

## Adders of each stage

| stage | column | cell | inputs | outputs |
|---|---|---|---|---|
| 1 | 1 | HA | P10, P01 | S01, C01 |
| 1 | 2 | FA | P20, P11, P02 | S02, C02 |
| 1 | 3 | FA | P21, P12, P03 | S03, C03 |
| 1 | 4 | HA | P22, P13 | S04, C04 |
| 2 | 2 | HA | S02, C01 | S11, C11 |
| 2 | 3 | FA | S03, C02, P30 | S12, C12 |
| 2 | 4 | FA | S04, C03, P31 | S13, C13 |
| 2 | 5 | FA | P23, C04, P32 | S14, C14 |
| 3 | 3 | HA | S12, C11 | S21, C21 |
| 3 | 4 | FA | S13, C12, C21 | S22, C22 |
| 3 | 5 | FA | S14, C13, C22 | S23, C23 |
| 3 | 6 | FA | P33, C14, C23 | S24, Cout |

The output is `out = {Cout, S24, S23, S22, S21, S11, S01, P00}`.

Only stage 3 chains carries, through C21, C22 and C23. The slowest path runs
through one cell of stage 1, one of stage 2, and then all four cells of
stage 3.

## The cells

* **Half adder** (`half_adder`): `sum = a ^ b`, `cout = a & b`.
* **Full adder** (`full_adder`): two half adders and an OR gate. The first
  half adder adds `a` and `b`. The second adds that sum and `cin`. `cout` is
  the OR of the two carries, which can never both be 1.

Every adder in the tree is one of these two cells, so the netlist is
structural right down to the gates.

## Files

| file | contents |
|---|---|
| `rtl/wallace_pkg.sv` | shared types: `operand_t` (4 bits), `product_t` (8 bits), `pp_t` (4x4 partial products, `pp[i][j] = b[i] & a[j]`), `csa_row_t` (sums `s[4:1]` and carries `c[4:1]` of one stage) |
| `rtl/half_adder.sv`, `rtl/full_adder.sv` | the two adder cells |
| `rtl/wallace_pp_gen.sv` | the 16 AND gates |
| `rtl/wallace_stage1.sv` | stage 1. Inputs are rows 0 to 2 without the pass-through bits P00 and P23. |
| `rtl/wallace_stage2.sv` | stage 2. Inputs are the stage-1 sums S04..S02, carries C04..C01, P23 and P32..P30. |
| `rtl/wallace_stage3.sv` | stage 3, the 4-cell ripple adder. `x = {P33,S14,S13,S12}` and `y = {C14..C11}` give `hi = {Cout,S24..S21}`. |
| `rtl/wallace_tree_4x4.sv` | top: `a[3:0]`, `b[3:0]` in, `out[7:0]` out |

The stage modules take only the bits they add. The pass-through bits are
wired around them in the top module. For `csa_row_t`, the column of `s[k]`
and `c[k]` depends on the stage: stage 1 puts `s[k]` in column `k`, stage 2 in
column `k+1`. In both stages `c[k]` is one column to the left of `s[k]`. Each
stage module's header comment says which columns it covers.

## Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `a` | in | 4 | multiplicand, unsigned |
| `b` | in | 4 | multiplier, unsigned |
| `out` | out | 8 | `a * b` |

The multiplier is purely combinational: it has no clock, reset, handshake or
latency in cycles. `out` is valid one gate-path delay after the inputs
change. To use it in a clocked design, register the inputs or the output
around it.

## Design choices

These points are not fixed by the reference design this RTL follows. They
are choices made here:

* **Unsigned operands.** Every worked example in the reference is an unsigned
  product, for example 14 × 13 = 182 and 10 × 14 = 140. No sign handling is
  described.
* **No registers.** The reference shows only adder cells and AND gates.
* **Row index = multiplier bit.** `Pij` means `b[i] & a[j]`. Swapping the
  roles of `a` and `b` would give the same product, because each bit's
  column is `i+j` either way.
* **Fixed size.** The design is written for 4x4 only. The adder placement is
  spelled out column by column, as in the reference, so the RTL has no width
  parameter. A wider Wallace tree needs a new reduction schedule, not just a
  new parameter value.

## Verification

Each testbench in `tb/` checks itself and ends with one line,
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_half_adder`, `tb_full_adder` | full truth tables, written out as constants |
| `tb_wallace_pp_gen` | all 256 operand pairs: each of the 16 bits, and that the weighted bits add up to `a*b` |
| `tb_wallace_stage1`, `tb_wallace_stage2` | every input combination (2^10 and 2^11): for each adder, `sum + 2*carry` equals the number of ones in its column, and the stage keeps the weighted value of its inputs |
| `tb_wallace_stage3` | all 256 row pairs: `hi == x + y`. It also requires a carry that ripples through the whole chain. |
| `tb_wallace_tree_4x4` | eight directed products (182, 50, 45, 18, 30, 91, 36, 140), then all 256 pairs. It counts the carry out of each of the 12 adders and a carry through all of stage 3, and fails if any of them never happens. |
| `tb_wallace_random_cov` | class-based random test with an interface (`tb/wallace_if.sv`). Random pairs are driven until three coverage groups are complete: 16 values of `a`, 16 of `b`, and all 256 pairs. Every product is checked. |

Since the input space has only 256 pairs, the exhaustive top-level test
proves the multiplier correct. The unit tests localise a fault to a stage or
a cell.

Run a testbench with Verilator 5 from the project root:

```
verilator --binary --timing --assert --top-module tb_wallace_tree_4x4 \
    rtl/*.sv tb/tb_wallace_tree_4x4.sv
./obj_dir/Vtb_wallace_tree_4x4
```

For `tb_wallace_random_cov`, also add `tb/wallace_if.sv`. Each testbench
finishes in well under a second.
