# Array, Wallace and Dadda multipliers in SystemVerilog

An unsigned multiplier has to add N shifted copies of the multiplicand, one
for each bit of the multiplier. How those N*N partial-product bits are
added decides how fast and how large the circuit is. This design holds three
classic ways of doing it, each at 4 and 8 bits, built only from AND gates, half
adders and full adders:

* **Array multiplier**: a regular grid of adders. Each row adds one more
  partial product. Simple to lay out, but the delay grows linearly with N.
* **Wallace tree**: the partial products are treated as columns of bits. The
  columns are cut down in parallel, three bits to two at a time, until two rows
  remain. The number of layers grows only logarithmically with N.
* **Dadda tree**: the same idea, but each layer removes only as many bits as
  it must to reach the next height in the series 2, 3, 4, 6, 9, 13, ... This
  uses fewer counters in the early layers and pushes more work to the last
  layers.

Every multiplier works in three steps:

1. Form the partial products with AND gates.
2. Reduce them to two rows.
3. Add the two rows with a carry-propagate adder.

Everything is combinational. There are no clocks, registers or handshakes. A
product is valid once the inputs have propagated through the gates.

## Counters and notation

A full adder is a *[3,2] counter*: it takes three bits of the same weight and
gives a sum bit of that weight and a carry bit of the next weight. A half adder
is a *[2,2] counter*. Both are built from XOR, AND and OR gates
(`half_adder.sv`, `full_adder.sv`).

`aibj` means `a[i] & b[j]`, a partial product of weight i+j. Here `a` is the
multiplicand and `b` the multiplier. `pp_gen` forms all of them and presents
them as `pp[j][i] = a[i] & b[j]`. Row j is the multiplicand gated by `b[j]`.
*Column* c is the set of bits of weight c. For N = 8 the column heights are
1, 2, ..., 8, ..., 2, 1.

## The array multiplier (`array_mult`)

The array is a carry-save grid of N-1 rows, each N-1 cells wide:

* **Row 1** is made of half adders that add partial-product rows 0 and 1.
* **Rows 2 to N-1** are made of full adders. Cell i of row r adds three bits:
  * `a[i]&b[r]`;
  * the sum from cell i+1 of the row above (the leftmost cell takes the top
    partial product `a[N-1]&b[r-1]` instead);
  * the carry from cell i of the row above.

Carries fall straight down and sums fall down and one place to the right, so
nothing ripples inside a row. The rightmost sum of row r is product bit r.

The **last row** is a ripple-carry adder: one half adder, then N-2 full
adders. It merges the leftover sums and carries into product bits N to 2N-1.
The longest path runs down all the rows and then along the whole last row.
That path grows linearly with N, which is the array's weakness.

The module is parameterised by N. The top instantiates N=4 and N=8. The
4-bit version has 3 half adders and 6 full adders in the array, and 1 half
adder and 2 full adders in the final row. In the first row, a full adder
with one input tied to 0 would do the same job as a half adder. Half adders
are used there at both sizes because they are smaller and faster.

## The 4-bit trees, wired counter by counter

The 4-bit Wallace and Dadda multipliers are written out by hand. Each
counter is a named instance, so the structure can be read directly. Both use
two layers of counters. Sums are called s1..s6 and carries c1..c6, and the
weight of each is given in parentheses.

**`wallace_mult4`**

| layer | counter | inputs | outputs |
|---|---|---|---|
| 1 | HA | a2b1, a3b0 | s1 (3), c1 (4) |
| 1 | HA | a2b2, a3b1 | s2 (4), c2 (5) |
| 2 | HA | a1b1, a2b0 | s3 (2), c3 (3) |
| 2 | FA | a0b3, a1b2, s1 | s4 (3), c4 (4) |
| 2 | FA | a1b3, s2, c1 | s5 (4), c5 (5) |
| 2 | FA | a2b3, c2, a3b2 | s6 (5), c6 (6) |

The two rows left for the final adder are `c6 c5 c4 c3 a0b2 a0b1 a0b0` and
`a3b3 s6 s5 s4 s3 a1b0`.

**`dadda_mult4`**

| layer | counter | inputs | outputs |
|---|---|---|---|
| 1 | FA | a1b2, a2b1, a3b0 | s1 (3), c1 (4) |
| 1 | FA | a1b3, a2b2, a3b1 | s2 (4), c2 (5) |
| 2 | HA | a1b1, a2b0 | s3 (2), c3 (3) |
| 2 | HA | a0b3, s1 | s4 (3), c4 (4) |
| 2 | HA | s2, c1 | s5 (4), c5 (5) |
| 2 | FA | a2b3, a3b2, c2 | s6 (5), c6 (6) |

The two rows left for the final adder are `a3b3 s6 s5 s4 a0b2 a0b1 a0b0` and
`c6 c5 c4 c3 s3 a1b0`.

In both modules, bit 0 of the product is `a0b0`. A 6-bit ripple-carry adder
gives product bits 1 to 7.

These two placements were taken from the reference diagrams as drawn. They
are not the textbook assignments. The 4-bit "Wallace" layout above is in
fact what the textbook Dadda rule would produce, and the 4-bit "Dadda" layout
uses two full adders where the textbook Dadda rule would use two half
adders. Both are correct multipliers. They differ only in counter count and
depth.

## The generic trees (`reduction_tree`, `mult_pkg`)

At 8 bits there are too many counters to wire by hand. Three modules do it
instead:

* `wallace_mult` and `dadda_mult` each chain `pp_gen`, then `reduction_tree`,
  then `rca`. The only difference between them is the `SCHEME` parameter they
  pass to the tree.
* `reduction_tree` builds the counters with generate loops.
* `mult_pkg` decides how many counters go where, while the design is
  elaborated. This is the hardest part of the design to follow.

**The plan.** `mult_pkg::make_plan(N, scheme)` simulates the reduction on
column heights alone. For every stage s and column c, it records three
numbers: the height at the stage input, the number of full adders and the
number of half adders. The result is packed into one constant (`plan_t`) that
`reduction_tree` keeps as a localparam. Each generate block reads its own
three numbers with `plan_get`. The plan costs nothing in hardware.

* **Wallace rule.** The rows of a stage are taken in groups of three: rows
  0-2, 3-5, and so on. Within a group:
  * a column with three bits gets a full adder;
  * a column with two bits gets a half adder;
  * a single bit passes through.

  Each group leaves one sum row and one carry row, shifted one column left.
  Rows that do not fill a group pass to the next stage unchanged. To apply
  this rule, the plan tracks each row's column span. For N = 8 the rows go
  8, 6, 4, 3, 2. Stage 1 uses 12 full adders and 4 half adders, and rows 6
  and 7 pass untouched.
* **Dadda rule.** Let d be the largest number in 2, 3, 4, 6, 9, 13, ... that
  is below the current maximum height. The stage visits the columns from
  least to most significant. In each one it counts the column's own bits plus
  the carries arriving from the column below in the same stage. Then it adds
  counters until that count is at most d:
  * if the count is d+1, it uses a half adder;
  * otherwise it uses a full adder.

  For N = 8 the rows go 8, 6, 4, 3, 2. Stage 1 uses 3 full adders and 3 half
  adders. Stage 3 uses 9 full adders and 1 half adder.

**The wiring.** Each column of each stage is a packed vector, filled from bit
0 upward. Every bit above the column's height is 0. Names:

* `g_load[c].v` is column c of the partial products.
* `g_stage[s].g_col[c].ob` is column c after stage s.
* `g_stage[s].g_col[c].cys` holds the carries that leave column c in stage s.

Counters take their inputs from the bottom of the column: first the full
adders, three bits each, then the half adders, two bits each. The rest of
the column passes through. The next stage's column holds, in order: the
full-adder sums, the half-adder sums, the passed bits, and then the carries
from the column below.

Any such assignment gives the right product, because a counter only needs
bits of equal weight. The assignment affects the delay of individual paths,
not the result.

A generate-time `$error` fires in two cases:

* the plan asks for more counter inputs than a column holds;
* the heights do not add up from one stage to the next.

A carry out of the top column would have weight 2N. It is dropped, because
the product always fits in 2N bits. The plan table covers operands of up to
16 bits: 32 columns and 8 stages, set by `MAX_COLS` and `MAX_STAGES` in
`mult_pkg`.

## Final addition (`rca`)

The two rows left by a tree, or the last row of the array, are added by a
ripple-carry adder. It has a half adder at bit 0 and full adders above it.
The carry-propagate adder could be any fast adder. Ripple carry is this
design's choice, kept so that the three architectures differ only in how
they reduce the partial products. To try a faster adder, replace `rca` in
`wallace_mult`, `dadda_mult`, `wallace_mult4` and `dadda_mult4`.

## Top level (`multipliers_top`)

The top instantiates all six multipliers. The 4-bit ones share the operands
`a4` and `b4`, and the 8-bit ones share `a8` and `b8`. Each multiplier has its
own product output: `p_array4`, `p_wallace4`, `p_dadda4`, `p_array8`,
`p_wallace8` and `p_dadda8`. The parameter `N_WIDE` (default 8) sets the width
of the larger three. The top exists to compare the architectures side by
side, and adds no logic of its own.

## Size

After generic synthesis, each 8-bit multiplier maps to a few hundred one-bit
gates (AND, OR, XOR).

* The array uses 56 adder cells: 7 half adders and 42 full adders in the
  array, plus 1 half adder and 6 full adders in the final row.
* The trees put their counters in four parallel layers and then need a
  16-bit final adder.

The counts depend on the synthesis flow used.

## How far it has been checked

Every module has a self-checking testbench in `tb/`. Each one compares the
module against arithmetic done in the testbench and prints
`TB_RESULT checks=<n> failures=<n>`:

* **Adders.** The half adder and full adder are tested exhaustively. `rca`
  is tested exhaustively at 4 bits, and at 16 bits with random operands plus
  a carry that ripples through all bits.
* **`pp_gen`.** Every bit is checked, and so is the weighted sum of all bits.
* **Multipliers.** `array_mult`, `wallace_mult` and `dadda_mult` are tested
  exhaustively at N = 4 and N = 8, and with 20 000 random operand pairs at
  N = 16. `wallace_mult4` and `dadda_mult4` are tested exhaustively.
* **`reduction_tree`.** Both schemes are tested exhaustively at N = 8: the
  two output rows must add up to a*b. The testbench also checks the counter
  plan against the row sequence and counter counts given above.
* **`multipliers_top_tb`.** This testbench runs the top at its default size.
  It applies all 65 536 8-bit operand pairs, and the 4-bit multipliers see
  all 256 of their pairs along the way. The three architectures of each width
  must agree with each other and with a*b. The testbench also applies the
  example 1011 x 1001 = 1100011. It counts zero operands, all-ones operands
  and products with the top bit set, and fails if any of these never occurs.

No timing or area figures were measured. The structures above show where
each architecture's delay comes from. Real delay and area numbers require a
synthesis and place-and-route flow for a specific target.

## Where this design departs from its reference description, and open points

* **Array first row.** The reference 4-bit array diagram draws the first row
  as full adders with one input tied to 0. The 8-bit diagram uses half
  adders. Half adders are used at both sizes. The function is the same.
* **8-bit tree placement.** The exact counter placement of the reference
  8-bit Wallace and Dadda diagrams is only partly legible. The rules above
  reproduce every detail that can be read: the row sequences, the Dadda
  counter counts per stage, and the first-stage grouping of the Wallace tree.
  Which individual bits meet in a counter may still differ from the
  original.
* **Partial-product naming.** Cells are named by `aibj` rather than by the
  sequential numbers (w1, w2, ...) of the reference diagrams.
* **Signedness.** All operands are unsigned. Signed (two's-complement)
  multiplication would need a Baugh-Wooley or Booth front end, which is not
  part of this design.
* **Final adder.** The final adder is a ripple-carry adder (see above).

## Simulating and changing it

Any testbench runs with plain Verilator; the library path lets Verilator find
the modules by file name. For example, for the end-to-end test:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/mult_pkg.sv tb/multipliers_top_tb.sv --top-module multipliers_top_tb
./obj_dir/Vmultipliers_top_tb
```

Replace `multipliers_top_tb` with any other testbench name, such as
`dadda_mult_tb` or `reduction_tree_tb`.

* **Other widths.** To get another size, set `N` on `array_mult`,
  `wallace_mult` or `dadda_mult` (up to 16 bits for the trees), or set
  `N_WIDE` on the top.
* **New reduction rule.** To add a rule, add a value to `reduce_scheme_e` and
  a branch to `make_plan`. The plan only has to give per-column counter
  counts, and the wiring follows from them.
