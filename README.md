# 32-bit signed multiplier: radix-4 Booth recoding with a Wallace tree

This multiplier takes the product of two 32-bit two's-complement numbers in
one combinational pass. It combines two classic ideas:

* **Radix-4 (modified) Booth recoding** of the multiplier. Two multiplier
  bits are retired per partial product instead of one, so 32 AND-array rows
  become 16 rows.
* **A Wallace tree** of full adders. It adds those rows in parallel, three
  rows into two per level, until two rows are left. One ordinary adder then
  produces the 64-bit product.

Every adder in the design, in the tree and in the final adder, is an
instance of one full-adder cell, `add`.

```
I_mul_2 ──► booth_encoder ──sel[15:0]──┐
                                       ▼
I_mul_1 ──────────────────────► booth_pp_gen ──17 rows × 64 bits (S_data_n)
                                                       │
                                                       ▼
                                     wallace_tree (6 levels of csa_row)
                                          │ S_data_s     │ S_data_c
                                          ▼              ▼
                                        ripple_adder (64 × add)
                                                │
                                                ▼
                                         O_dataout[63:0]
```

## Interface and timing

| port        | dir | width | meaning                        |
|-------------|-----|-------|--------------------------------|
| `I_mul_1`   | in  | 32    | signed multiplicand A          |
| `I_mul_2`   | in  | 32    | signed multiplier B (recoded)  |
| `O_dataout` | out | 64    | signed product A × B           |

The top module is `booth_wallace_mul`, with parameter `WIDTH` (default 32).
`WIDTH` must be even, and the product has `2*WIDTH` bits. There is no clock,
register or reset. The product is valid one combinational delay after the
operands change, so a surrounding design can take one product per clock
cycle. Pipeline registers, if you need them, go around the module or between
the tree levels. None are included.

## Booth recoding (`booth_encoder`, `booth_pkg`)

The multiplier is read in 16 overlapping three-bit groups,
`g_i = {b[2i+1], b[2i], b[2i-1]}`, with `b[-1] = 0`. Each group stands for
the digit `d_i = -2·b[2i+1] + b[2i] + b[2i-1]`, a value in {-2, ..., +2}.
The weighted sum `Σ d_i·4^i` equals the signed value of `b`. The top
group reads the sign bit with weight -2, so no 17th group is needed for a
signed multiplier.

| group       | digit | selection (`neg two one`) |
|-------------|-------|---------------------------|
| 000, 111    | 0     | 000                       |
| 001, 010    | +1    | 001                       |
| 011         | +2    | 010                       |
| 100         | -2    | 110                       |
| 101, 110    | -1    | 101                       |

The decode function `booth_decode` and the `booth_sel_t` struct live in the
package `booth_pkg`. Group 111 (a run of ones) is "minus zero". It sets no
`neg`, so it adds no correction bit.

## Partial products and the correction row (`booth_pp_gen`)

This is the part that is easiest to get wrong. Row `i` must hold
`d_i · A · 4^i` modulo 2^64. The generator builds it in three steps:

1. It forms A and 2A as 33-bit signed values. 2A is A shifted left by one
   bit. Both are exact, including 2 × (−2^31).
2. For a negative digit it takes the **one's complement** of that value
   (`~A` or `~(A<<1)`). It does not add the +1 here.
3. It sign-extends the 33-bit value to 64 bits and shifts it left by `2i`.

The +1 terms that each negation still owes are collected into one **extra
row**, the 17th. Bit `2i` of that row is `neg_i`. The sum of all 17 rows,
modulo 2^64, is then exactly A × B. This keeps the +1 off the critical path:
the Wallace tree absorbs it like any other addend bit.

Full sign extension is the simple choice, not the cheap one. Many tree cells
add copies of the same sign bits, and synthesis removes only part of that.
A sign-extension-prevention scheme (the "1, ~s" constant trick) would
shrink the tree, but it is not used here.

## Wallace tree (`wallace_tree`, `csa_row`)

`csa_row` is a word of 64 full adders. It turns three rows x, y, z into a
sum row (`x^y^z`) and a carry row (the majority bits, shifted left by one).
`sum + carry = x + y + z` holds modulo 2^64.

`wallace_tree` is generic in `N_ROWS` and `WIDTH`. At each level it takes
the rows three at a time, in index order. Any one or two rows left over pass
to the next level unchanged. A level with `n` rows leaves
`2·⌊n/3⌋ + n mod 3` rows. For this multiplier the row count goes
17 → 12 → 8 → 6 → 4 → 3 → 2, which is six full-adder delays. Constant
functions in the module compute the row count and the number of levels, so
other widths elaborate without edits.

## Final adder (`ripple_adder`)

The last two rows are added by a 64-bit ripple-carry chain of `add` cells.
The top module keeps the adder's carry out as bit 64 of a 65-bit internal
sum but does not use it. The product is the low 64 bits. A ripple adder is
the simplest possible choice and is the slowest stage here, 64 carry delays
against 6 levels in the tree. To cut the delay, replace `ripple_adder` with
a carry-lookahead or parallel-prefix adder that has the same ports.

## What follows the source design and what is this design's own choice

These parts follow the source design:

* the port names and widths;
* the single full-adder cell `add` (a, b, cin → sum, cout);
* Booth groups taken at bit positions 1, 3, ..., 31;
* subtraction for groups 100/101/110, using the inverted A or the inverted
  A shifted left by one;
* 3:2 reduction in the tree;
* an ordinary adder at the end.

These are this design's own choices:

* the complete decode table;
* the `one/two/neg` encoding;
* full sign extension;
* the separate correction row;
* the row grouping in the tree;
* the ripple-carry final adder;
* the `WIDTH` parameter;
* a purely combinational multiplier (no clock or reset).

Not included: the textbook *sequential* radix-2 Booth multiplier
(accumulator, shift register, bit counter) and a plain AND-array Wallace
multiplier. They are the two separate methods this combined design
replaces.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares the
module against values the testbench computes arithmetically:

| testbench              | what it checks |
|------------------------|----------------|
| `tb_add`               | all 8 input combinations |
| `tb_booth_encoder`     | every group's selection against `d_i`; `Σ d_i·4^i` equals `b`; every digit kind occurs |
| `tb_booth_pp_gen`      | each row plus its correction bit equals `d_i·A·4^i`; the row sum equals A×B |
| `tb_csa_row`           | `sum+carry = x+y+z`, sum is the parity, carry LSB is 0 |
| `tb_wallace_tree`      | 17 random or patterned rows: the two outputs sum to the total |
| `tb_ripple_adder`      | 65-bit result with both carry-in values |
| `tb_booth_wallace_mul` | the whole multiplier at its default width, described below |

`tb_booth_wallace_mul` applies a new operand pair at each clock edge and
checks the product half a period later against a 64-bit `*`. The sequence
has three parts:

* six operand pairs from a recorded trace;
* corner cases, such as (−2^31)², (−2^31)·(−1) and zero operands;
* 20,000 random pairs.

It also checks that the random part takes exactly one clock per product. It
counts every Booth digit kind and every combination of operand signs, and it
fails if any of them never occurs. Each testbench prints
`TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/booth_pkg.sv \
          tb/tb_booth_wallace_mul.sv --top-module tb_booth_wallace_mul -o sim
./obj_dir/sim
```

Use the same command for the unit testbenches: replace the testbench file
and `--top-module`. The package file must come first. For a lint check, use
`verilator --lint-only -Wall -Irtl rtl/booth_pkg.sv rtl/booth_wallace_mul.sv`.
The lint reports two unused bits: the top full adder's carry in `csa_row`
and the final carry out. Both weigh 2^64 and fall outside the product. The
whole multiplier synthesises to about 4,400 simple gates.

## Changing it

* **Width:** set `WIDTH` on `booth_wallace_mul`, which must be even. The
  tree depth follows automatically. The testbenches are written for 32
  bits.
* **Faster final adder:** replace `ripple_adder` with another adder that has
  the same ports.
* **Pipelining:** register `S_data_n`, or the `cur` rows of a tree level, in
  the top module.
