# 8x8 Wallace multiplier with 5:2 compressors and multiplexer-based adders

An unsigned 8x8 multiplier that is built almost entirely from multiplexers.
It follows the three classic Wallace-tree steps:

1. **Partial products.** 64 AND gates give eight weighted rows.
2. **Reduction.** Instead of many layers of full and half adders, two layers
   of **5:2 compressors** bring each column from eight bits down to two.
3. **Final addition.** A 16-bit **carry-select adder** adds the two rows. Its
   ripple adders use full adders that are just two **8:1 multiplexers** with
   constant data inputs.

The aim is fewer adder cells in the reduction and a short carry path in the
final adder. That means less area and delay than a Wallace tree of ordinary
full adders. The multiplier is purely combinational: no clock, no registers.
`result` settles one propagation delay after `x` or `y` changes.

```
 x[7:0] y[7:0]
    |     |
 partial_product_gen     8 rows x 16 bits  (row j = x & y[j], shifted up j)
    |
 pp_reduction
   layer 1: compressor_row on rows 0..4         -> sum1, carry1
   layer 2: compressor_row on sum1, carry1, rows 5..7 -> sum, carry
    |
 carry_select_adder      4 blocks of 4 bits, cin = 0
    |
 result[15:0]
```

## Interface

| port     | dir | width | meaning |
|----------|-----|-------|---------|
| `x`      | in  | 8     | multiplicand, unsigned |
| `y`      | in  | 8     | multiplier, unsigned |
| `result` | out | 16    | `x * y` |

There are 32 I/O bits in all. For example, `x = 234, y = 142` gives
`result = 33228`.

## The multiplexer full adder (`mux_full_adder`, `mux8to1`)

A full adder has three inputs, so its two outputs are two 8-entry truth
tables. The cell wires `{a, b, cin}` to the selects `{S2, S1, S0}` of two 8:1
multiplexers. The truth-table columns go on the data inputs as constants:

| select `{a,b,cin}` | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|--------------------|---|---|---|---|---|---|---|---|
| sum multiplexer    | 0 | 1 | 1 | 0 | 1 | 0 | 0 | 1 |
| carry multiplexer  | 0 | 0 | 0 | 1 | 0 | 1 | 1 | 1 |

`mux8to1` is a three-level tree of `mux2` cells, and `s[2]` is the most
significant select bit. A synthesis tool folds the constants away; the RTL
keeps the multiplexer structure visible.

## The 5:2 compressor and the reduction (the core of the design)

### One compressor

`compressor_5_2` takes one column's five bits `x1..x5`, plus two carries
`cin1, cin2` from the column below. It returns:

- `sum`, with the weight of this column;
- `carry`, `cout1` and `cout2`, each with the weight of the next column.

The identity it keeps is

```
x1 + x2 + x3 + x4 + x5 + cin1 + cin2 = sum + 2*(carry + cout1 + cout2)
```

What matters is that **`cout1` and `cout2` depend only on `x1..x5`, never on
`cin1`/`cin2`**. In a row of compressors, each column's couts feed the next
column's cins, but nothing ripples further. The whole row has the delay of a
single compressor, whatever its width.

Inside are three full-adder stages in a chain:

```
stage 1  (x1, x2, x3)      p1 = x1^x2     s1  = x3 ? ~p1 : p1    cout1 = p1 ? x3 : x1
stage 2  (s1, x4, x5)      p2 = x4^x5     s2  = s1 ? ~p2 : p2    cout2 = p2 ? s1 : x4
stage 3  (s2, cin1, cin2)  p3 = cin1^cin2 sum = s2 ? ~p3 : p3    carry = p3 ? s2 : cin1
```

Each stage uses two kinds of cell:

- One `xor_xnor` cell makes `p` and `~p`.
- Two `mux2` cells do the rest. The first forms the 3-input XOR by picking `p`
  or `~p`.
- The second forms the carry: if the two XORed bits differ, the carry is the
  third bit; if they are equal, it is either one of them.

The cins enter only in the last stage, which gives the property above.

### Two layers of compressor rows

`compressor_row` is 16 compressors side by side, one per product column.
Column 0 gets `cin1 = cin2 = 0`. The row returns its carry outputs already
shifted up by one column. So for each layer, `sum + carry = sum of the five
input rows (mod 2^16)`.

`pp_reduction` stacks two layers:

| layer | inputs (5 rows)                        | outputs |
|-------|----------------------------------------|---------|
| 1     | pp[0], pp[1], pp[2], pp[3], pp[4]      | sum1, carry1 |
| 2     | sum1, carry1, pp[5], pp[6], pp[7]      | sum, carry |

The column height goes 8 → 5 → 2. An adder-only Wallace tree for 8x8 needs
four layers of full and half adders (heights 8 → 6 → 4 → 3 → 2).

The couts of column 15 (weight 2^16) are dropped. This is exact: two 8-bit
operands give a product below 2^16, so the true sum modulo 2^16 is the
product. Compressors in columns that hold only zeros (the top of each row)
stay in the RTL for regularity; synthesis removes them.

## The carry-select final adder (`carry_select_adder`, `csa_block`, `ripple_carry_adder`)

Each 4-bit `csa_block` holds two 4-bit ripple adders of multiplexer full
adders. One assumes a carry-in of 0, the other a carry-in of 1. Five `mux2`
cells (four sum bits and the carry-out) pick one result when the real
carry-in arrives. `carry_select_adder` chains four such blocks.

- **Carry path:** the carry from block to block crosses one multiplexer per
  block instead of four full adders.
- **Lowest block:** it is a carry-select block too, with `cin = 0`, so all
  blocks are alike.
- **Carry-out:** the adder's final carry-out is always 0 in the multiplier
  and is left unconnected.

With this reduction, the two rows never carry out of the low four columns.
Over all 65,536 operand pairs, block 1 always takes its carry-in = 0 result.
Blocks 2 and 3 use both results.

## Parameters

The multiplier itself has no parameters. The shared sizes live in `mult_pkg`:

| name        | value | meaning |
|-------------|-------|---------|
| `OP_W`      | 8     | operand width |
| `PROD_W`    | 16    | product width, `2*OP_W` |
| `CSA_BLOCK` | 4     | carry-select block size |

The sub-blocks are parameterised:

- `ripple_carry_adder`: `W`
- `csa_block`: `W`
- `carry_select_adder`: `N`, `BLOCK`
- `compressor_row`: `N`
- `partial_product_gen`: `W`

The two-layer grouping in `pp_reduction` is written for eight rows. A wider
multiplier needs more layers there; the other blocks scale as they are.

## How far it can be trusted

Every block has a self-checking testbench. Its expected values are computed
independently, not taken from the block:

| block | what the testbench checks |
|-------|---------------------------|
| `mux8to1` | all selects × all 256 data words |
| `mux_full_adder` | the 8-row truth table |
| `ripple_carry_adder` | exhaustive at 4 bits; random at 9 bits |
| `csa_block` | exhaustive |
| `carry_select_adder` | corner cases with full carry chains, plus 20,000 random vectors |
| `compressor_5_2` | all 128 input combinations, including that the couts do not depend on the cins |
| `partial_product_gen` | every row, for all 65,536 operand pairs |
| `pp_reduction` | the row sum, for all 65,536 operand pairs |
| `multiplier` | all 65,536 products, plus the 234 × 142 vector |

`multiplier_tb` also counts how often each datapath mechanism fired:

- carry-select results taken with carry-in 0 and with carry-in 1;
- cout1 and cout2 passing between columns, in both compressor layers.

It fails if any of these never happens.

The design has been linted with Verilator (`-Wall`) and elaborated with
Yosys. The only lint warnings are for the column-15 carries that are dropped
on purpose, and one unused package constant in some blocks.

Area and timing have **not** been measured on the FPGA family the design was
sized for (Spartan-3E, where about 140 4-input LUTs are expected). A generic
Yosys/ABC mapping to 4-input LUTs gives 167 LUTs. That is a different tool, so
the numbers are not directly comparable. No delay figure has been checked.

## Design choices and departures

- **Compressor internals:** the wiring of the 5:2 compressor is this design's
  own. The reference circuit works from a MUX-based compressor with CGEN,
  XOR-XNOR and MUX cells, but its diagram shows seven primary inputs, which
  does not fit a 5:2 compressor. This design keeps the five-input interface
  (`x1..x5`, `cin1`, `cin2` → `sum`, `carry`, `cout1`, `cout2`). It builds the
  compressor from XOR-XNOR and MUX cells only; a separate carry-generate cell
  is not used, because a MUX forms each carry.
- **Reduction order:** the grouping of rows into two compressor layers is a
  choice of this design.
- **Where each cell is used:** the 8:1-multiplexer full adder is used in the
  final adder. The compressors are used in the reduction.
- **Number format:** operands are unsigned; there is no signed mode.
- **Timing:** there is no clock and no pipelining.
- **Not built:** the reference baselines (a Wallace tree of ordinary full
  adders, and one with full adders made of 4:1 multiplexers). They serve only
  for comparison.

## Simulating

Any testbench runs with plain Verilator 5. For example, the full multiplier:

```
verilator --binary --timing --assert -Irtl rtl/mult_pkg.sv tb/multiplier_tb.sv \
          --top-module multiplier_tb
./obj_dir/Vmultiplier_tb
```

It prints the mechanism counts and then
`TB_RESULT checks=<n> failures=<m>`. Replace `multiplier` with any block
name to run that block's testbench (`tb/<block>_tb.sv`). `-Irtl` lets
Verilator find the sub-modules by file name. Each testbench has a watchdog
that reports a failure if the run does not finish. All of them finish in well
under a second.

## Files

- `rtl/mult_pkg.sv`: sizes and the row type
- `rtl/multiplier.sv`: top level
- Partial products: `rtl/partial_product_gen.sv`
- Reduction: `rtl/pp_reduction.sv`, `rtl/compressor_row.sv`,
  `rtl/compressor_5_2.sv`, `rtl/xor_xnor.sv`
- Final adder: `rtl/carry_select_adder.sv`, `rtl/csa_block.sv`,
  `rtl/ripple_carry_adder.sv`, `rtl/mux_full_adder.sv`, `rtl/mux8to1.sv`
- `rtl/mux2.sv`: the 2:1 multiplexer cell used throughout
- `tb/<block>_tb.sv`: one testbench per block
