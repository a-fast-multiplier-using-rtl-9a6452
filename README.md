# Modified radix-4 Booth multiplier with a redundant binary adder tree

A 16 × 16 → 32-bit unsigned multiplier, fully combinational. Speed comes
from two ideas:

1. **Modified radix-4 Booth recoding.** The multiplier `y` is padded with
   two zeros above and one below, so the top Booth group is `{0, 0, y15}`.
   That gives 9 partial products, not 8. In exchange the operands are
   handled as unsigned, and no partial product needs sign extension to the
   full 32 bits. A few constant bits, ending at bit 19, do the same job.
2. **Redundant binary (RB) addition.** The 9 partial products are paired
   into RB numbers. Each digit of an RB number is −1, 0 or +1. The RB
   numbers are summed by a tree of RB adders (RBAs). An RBA has no carry
   chain: each digit looks only one position down, so its delay does not
   depend on the word length. There is one carry-propagate operation in the
   whole design. It is the final RB-to-binary conversion.

```
 x[15:0] ─┐
 y[15:0] ─┴─► mr4_pp_array ──9 rows──► rbpp_gen ×5 ─┐
                (9 × booth_encoder                   ├─► rb_tree ─► rb2nb ─► p[31:0]
                 + pp_generator)       constant −5 ──┘   (5 × rba)
```

`p = x * y`, exact, valid one propagation delay after the inputs change.
There is no clock, reset or handshake.

## Files

| file | module | role |
|---|---|---|
| `rtl/mr4_pkg.sv` | package | `booth_sel_t` (M, 2M, s), `rb_digit_t` (pos, neg) |
| `rtl/booth_encoder.sv` | `booth_encoder` | 3-bit group → M / 2M / s |
| `rtl/pp_generator.sv` | `pp_generator` | one partial product row |
| `rtl/mr4_pp_array.sv` | `mr4_pp_array` | grouping, 9 rows, short sign extension |
| `rtl/rbpp_gen.sv` | `rbpp_gen` | two binary rows → one RB partial product |
| `rtl/rba_cell.sv` | `rba_cell` | one RB adder digit |
| `rtl/rba.sv` | `rba` | W-digit RB adder |
| `rtl/rb_tree.sv` | `rb_tree` | tree of RB adders |
| `rtl/rb2nb.sv` | `rb2nb` | RB → binary conversion |
| `rtl/mr4_rba_multiplier.sv` | `mr4_rba_multiplier` | top |

Every module has a self-checking testbench `tb/<module>_tb.sv`.
`tb/mr4_rba_multiplier_n8_tb.sv` also tests the top at N = 8 with all
65536 operand pairs.

## Partial products

Group *j* (j = 0 … 8) is `{y(2j+1), y(2j), y(2j−1)}` of the padded
multiplier. Its Booth digit is d = −2·y(2j+1) + y(2j) + y(2j−1) ∈ {−2 … +2}.
The encoder outputs `one` (|d| = 1), `two` (|d| = 2) and `neg` (the group's
top bit). The generator selects `x` or `x<<1` (17 bits) and inverts it when
`neg` is set. It does not add the +1 that completes the two's complement
itself. The array places that bit at position 2j of row j+1, a position
that row leaves empty. Group 111 is a "negative zero": an all-ones row plus
that +1, which is 0.

Each row is really an 18-bit signed number. Extending every row's sign to
bit 31 would cost many adder cells. Instead the rows get these constant
bits:

* row 0: `{~s, s, s}` at bits 19..17
* row j ≥ 1: `{1, ~s}` at bits 18+2j and 17+2j, dropped above bit 31

Together these bits equal the sum of all the sign extensions, modulo 2³².
Row 8 comes from group `{0,0,y15}`. It is never negative, and when y15 = 1
it is simply `x << 16`.

## Redundant binary partial products

Two binary rows A and B are turned into an RB number by inverting B:
digit *i* = a(i) − ~b(i). Because ~B = 2³² − 1 − B, the value is
A + B + 1 (mod 2³²). A digit pair (1, 1) is written as (0, 0), so
`pos = a & b` and `neg = ~a & ~b`. That is one gate level and no addition.

The rows are paired as (0,1), (2,3), (4,5), (6,7) and (8, zero). This gives
five RB partial products, each 1 too large. A sixth constant RB operand
with the value −5 corrects this. It has negative digits at bits 0 and 2.
Six operands make a clean three-level tree:
3 RBAs → 1 RBA + pass-through → 1 RBA.

## The RB adder digit

This is the subtle part. The two input digits sum to t ∈ {−2 … 2}. That sum
is split as t = 2c + w into an intermediate carry c (sent up) and an
intermediate sum w. For t = ±1 there are two valid splits. The cell picks
one by looking at `h_in`, which says whether both digits one position lower
are non-negative:

| t | lower pair both ≥ 0 | c | w |
|---|---|---|---|
| +2 | any | +1 | 0 |
| +1 | yes | +1 | −1 |
| +1 | no | 0 | +1 |
| 0 | any | 0 | 0 |
| −1 | yes | 0 | −1 |
| −1 | no | −1 | +1 |
| −2 | any | −1 | 0 |

If the lower pair is non-negative, its carry is 0 or +1. The rule then
keeps w at −1 or 0. If the lower pair has a negative digit, its carry is
0 or −1, and w is kept at 0 or +1. So the final digit s = w + c_in always
stays in {−1, 0, +1}, and no carry travels more than one position. The
carry out of digit 31 is dropped, so each sum is exact modulo 2³². Digit 0
treats the missing lower pair as non-negative, with carry 0.

Digits are stored as `(pos, neg)` bit pairs with value pos − neg. This
matches the X+/X−, c+/c−, s+/s− signal pairs of a transistor-level cell.

## Final conversion

`rb2nb` computes `POS − NEG`. POS is the word of positive bits and NEG the
word of negative bits. This is an ordinary 32-bit subtraction, left to the
synthesis tool.

## Where this RTL makes its own choices

* **Encoder and generator logic.** The Booth recoding follows the standard
  table. `neg` is taken from the group's top bit. The gate-level encoder
  and RBA circuits are not reproduced; both are written from their truth
  tables.
* **The computation rule for t = +1.** With a non-negative lower pair, the
  rule here uses carry +1 and sum −1. This is the only split that gives
  t = 1 with w = −1, and it mirrors the t = −1 row.
* **Where the +1 of a negative row goes**, the exact bit pattern of the
  short sign extension, and the meaning of the sixth RB operand (the −5
  correction). All three are proven by the testbenches.
* **The RB → binary converter** is added. The published block diagram
  shows the product leaving the last RBA directly, but an RB result needs
  one conversion step.
* **No registers.** The design is a combinational datapath. Pipelining it
  would be the user's choice.
* **Parameterisation.** The operand width `N` (even, default 16) is a
  parameter. The array, pairing, correction constant and tree all follow
  from it. N = 8 is tested exhaustively.

Not included: the radix-2 and conventional radix-4 multipliers used only
as points of comparison, and the 180 nm transistor-level implementation
with its power, delay and energy figures.

## Verification

Every testbench compares against values it computes itself. Each ends with
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

* `booth_encoder_tb`: all 8 groups.
* `pp_generator_tb`: every digit, including negative zero, × 2000
  multiplicands.
* `mr4_pp_array_tb`: rows sum to x·y. Also checks the sign-extension
  shape: row 0 stops at bit 19, and rows have nothing below bit 2j−2.
* `rbpp_gen_tb`: the per-digit mapping, no (1,1) digits, and value A+B+1.
* `rba_cell_tb`: every digit pair in every reachable lower context, against
  the table above.
* `rba_tb`, `rb_tree_tb` (K = 6, 5, 1), `rb2nb_tb`: random RB operands,
  values checked modulo 2³².
* `mr4_rba_multiplier_tb`, at the default size:
  * the worked examples 771 × 29 = 22 359 and 771 × 45 085 = 34 760 535
  * corner values, all walking-one pairs, and 200 000 random pairs
  * a count of every mechanism, failing if one never happened: each Booth
    digit, negative zero, both row-0 sign shapes, the ninth row, both
    branches of the RBA carry rule, and negative digits in the final RB sum
* `mr4_rba_multiplier_n8_tb`: all 65 536 products at N = 8.

Run a testbench with plain Verilator, for example:

```
verilator --binary --timing -Wno-fatal --top-module mr4_rba_multiplier_tb \
    -y rtl -y tb +libext+.sv -Irtl rtl/mr4_pkg.sv tb/mr4_rba_multiplier_tb.sv -o sim
./obj_dir/sim
```

The full-size end-to-end test takes about a second of simulation.

## Size

After generic synthesis, the top has about 3600 word-level cells and no
flip-flops. Most of them are in the five 32-digit RB adders, each about 940
cells of small per-digit logic.
