# 4x4 Wallace tree multiplier with a BEC carry select final adder

A Wallace tree multiplier is fast because it does not add partial products
row by row. Half and full adders, used as counters, squeeze the
partial-product matrix down to two rows in a few levels. The one slow part
left is the carry-propagate adder that adds those two rows. A carry select
adder (CSLA) speeds that adder up. It splits the rows into groups and
computes each upper group twice, once for carry in 0 and once for carry in
1. The carry from the group below then only picks one of the two results.
The cost is a second adder per group.

This design replaces that second adder with a **binary to excess-1
converter (BEC)**. The sum for carry in 1 is the sum for carry in 0 plus
one. Adding one to a number needs only an XOR per bit and a chain of AND
gates. So the group keeps one ripple carry adder (RCA), derives the carry-in-1
result from it, and multiplexes. The aim is fewer gates and lower power for
about the same speed as the plain CSLA version.

The multiplier is combinational and unsigned. It takes two 4-bit operands
and returns the 8-bit product.

## Data path

```
 a[3:0] b[3:0]
    |     |
 partial_product_gen      16 AND terms, pp[i][j] = a[j] & b[i], weight i+j
    |
 wallace_reduction        stage 1: rows 0..2 -> HA, FA, FA, HA
    |                     stage 2: HA at weight 2, FA at weights 3, 4, 5
    |--- p[2:0] (final)
    |--- row_x, row_y     two 4-bit rows, weights 3..6
    |
 final_adder
    group 1  rca (2 bit, carry in 0)            -> p[4:3], carry c_low
    group 2  csla_bec (2 bit)                   -> p[6:5], p[7]
               rca (2 bit, carry in 0) -> {co0, s0}
               bec (3 bit)             -> {co0, s0} + 1
               mux, select = c_low
```

### Wallace tree

The column heights of a 4x4 matrix are 1, 2, 3, 4, 3, 2, 1 for weights
0 to 6.

**Stage 1** takes partial-product rows 0, 1 and 2:

| weight | counter |
|---|---|
| 1 | half adder on pp[0][1], pp[1][0] |
| 2 | full adder on pp[0][2], pp[1][1], pp[2][0] |
| 3 | full adder on pp[0][3], pp[1][2], pp[2][1] |
| 4 | half adder on pp[1][3], pp[2][2] |

Row 3 and pp[2][3] wait for stage 2.

**Stage 2** reduces every column of height 2 or 3:

| weight | counter |
|---|---|
| 2 | half adder |
| 3, 4, 5 | full adder |

After stage 2, weights 0, 1 and 2 each hold one bit, and those bits are
final product bits. Weights 3 to 6 hold two bits each. Those bits form the
rows `row_x` and `row_y`: bit k of a row has weight 3 + k.

The tree uses 3 half adders and 5 full adders. It is written out cell by
cell for the 4-bit size. The cell placement is this design's own, made by
the usual Wallace rule of reducing each column as far as possible at each
stage.

### Final adder and the BEC carry select group

The 4-bit rows are split in two groups:

* **Group 1** covers bits 0..1 (weights 3..4). It is a 2-bit RCA with
  carry in 0. Its carry out, `c_low`, is the select signal.
* **Group 2** covers bits 2..3 (weights 5..6) and is a `csla_bec` of width
  2. Its RCA computes the 3-bit result `{co0, s0}` for carry in 0, while
  group 1 is still working. The 3-bit BEC turns that result into
  `{co0, s0} + 1`, the carry-in-1 result. `c_low` then selects one of the
  two. The selected carry out is product bit 7.

The BEC computes `x[0] = ~b[0]` and `x[i] = b[i] ^ (b[0] & ... & b[i-1])`.
It is one bit wider than its group, because it also increments the carry
out. For a 2-bit group it is therefore 3 bits wide.

The 2-bit RCA and 3-bit BEC of group 2 follow the source design. The 2-bit
width of group 1 is this design's choice: it is what remains of the
4-bit rows.

Timing: a change on `a` or `b` passes through the AND level and two counter
levels. Then it ripples through group 1, and the group 2 multiplexer adds
one level. Group 2's RCA and BEC run in parallel with group 1.

## Modules

| file | module | role |
|---|---|---|
| `rtl/wallace_pkg.sv` | package | operand width 4, product width 8, final-adder split (weight 3, groups 2 + 2), types |
| `rtl/half_adder.sv` | `half_adder` | s = a^b, c = a&b |
| `rtl/full_adder.sv` | `full_adder` | s = a^b^ci, co = majority |
| `rtl/partial_product_gen.sv` | `partial_product_gen #(N=4)` | AND array |
| `rtl/wallace_reduction.sv` | `wallace_reduction` | two-stage 4x4 tree |
| `rtl/rca.sv` | `rca #(WIDTH=2)` | ripple carry adder of `full_adder`s |
| `rtl/bec.sv` | `bec #(WIDTH=3)` | x = b + 1 without an adder |
| `rtl/csla_bec.sv` | `csla_bec #(WIDTH=2)` | RCA + BEC + 2:1 mux |
| `rtl/final_adder.sv` | `final_adder #(LOW_W=2, HIGH_W=2)` | group 1 RCA, group 2 `csla_bec` |
| `rtl/wallace_bec_mult.sv` | `wallace_bec_mult` | top: `a[3:0]`, `b[3:0]` in, `p[7:0]` out |

The top has no clock, no reset and no parameters. `rca`, `bec`,
`csla_bec`, `final_adder` and `partial_product_gen` are parameterized and
work at other widths. The testbenches check `rca`, `bec` and `csla_bec` at
larger widths too. `wallace_reduction` and the top are fixed at 4 bits.
A wider multiplier needs a new tree.

## Where it departs from, or goes beyond, its source

* The source design compares three multipliers: a plain Wallace tree, a
  Wallace tree with an ordinary CSLA, and the BEC version. Only the BEC
  version is implemented here. The other two are baselines.
* The source gives the block structure: a Wallace tree, and a final adder
  whose upper group is a CSLA with a BEC. It also gives the 2-bit RCA and
  the 3-bit BEC. It does not give the exact tree wiring, the group-1 width,
  signedness or timing. These choices are this design's: a classic Wallace
  layout, 2-bit group 1, unsigned operands, and no registers.
* The source reports FPGA results on a Spartan-3E: about 8.7 ns delay and
  81 mW, with fewer logic resources for the BEC version than for the RCA-based
  CSLA. These numbers are not reproduced here. They depend on the vendor
  tools and on the device.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The inputs are small, so every testbench
is exhaustive:

* `tb_half_adder`, `tb_full_adder`: all input combinations.
* `tb_partial_product_gen`: all 256 operand pairs. It checks every AND
  term, and checks that the weighted sum equals `a*b`.
* `tb_wallace_reduction`: all 256 pairs. It checks that
  `p_low + 8*(row_x + row_y) == a*b`, and that `p_low` already holds the
  low product bits.
* `tb_rca`, `tb_csla_bec`: all operands and carries, at width 2 and width 4.
* `tb_bec`: all inputs, at width 3 and width 5.
* `tb_final_adder`: all 256 row pairs. It counts how often the carry
  select picks the BEC result and how often it picks the RCA result. It
  fails if either choice never happens.
* `tb_wallace_bec_mult` is the end-to-end test at the default size. It
  runs all 256 operand pairs and then 256 random pairs. A bit-level model
  of the tree inside the testbench predicts the rows that reach the final
  adder. From those rows the testbench counts BEC selections (64 of 512),
  RCA selections and final carry outs, and checks that each one happens.

Run one with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl rtl/wallace_pkg.sv \
    tb/tb_wallace_bec_mult.sv --top-module tb_wallace_bec_mult -o sim
./obj_dir/sim
```

`-Irtl` lets Verilator find each module from its file name. Replace the
testbench name to run another one. Each run takes well under a second.
