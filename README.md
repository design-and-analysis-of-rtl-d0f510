# 8x8 multiplier with higher-order counter compressors

This is an unsigned 8-bit × 8-bit multiplier. Its 64 partial products are
reduced to the 16-bit product in just **two stages** of column counters, and no
carry-propagate adder follows them. The key element is the *counter
compressor*. A 4:3, 5:3, 6:3 or 7:3 compressor counts the ones among its 4 to 7
input bits and gives that count as a plain 3-bit binary number. This differs
from the conventional 4:2 or 5:2 compressor, whose outputs are still in
redundant form and need a further adder. Each column of the partial-product
array gets the largest counter it needs, so each column makes as few output bits
as possible. For example, the seven bits of one column go into a single 7:3
compressor (3 output bits) rather than a 4:3 compressor plus a full adder
(5 output bits).

The circuit is purely combinational: `p = a * b`, with no clock, reset or
pipeline registers.

## The counters

Every counter outputs `y = number of ones at its inputs`. `y[0]` (weight 1) is
called y1, `y[1]` is y2 and `y[2]` is y3. Each compressor has two small counters
and a carry-lookahead adder (CLA) that adds their counts:

| module           | inputs | first counter       | second counter     | CLA width |
|------------------|--------|---------------------|--------------------|-----------|
| `full_adder`     | 3      | (it is the 3:2 counter itself) |         | –         |
| `compressor_4_3` | 4      | half adder (i4, i3) | half adder (i2, i1) | 2        |
| `compressor_5_3` | 5      | half adder (i5, i4) | full adder (i3..i1) | 2        |
| `compressor_6_3` | 6      | full adder (i6..i4) | full adder (i3..i1) | 2        |
| `compressor_7_3` | 7      | 4:3 compressor (i7..i4) | full adder (i3..i1) | 3    |

Input `iN` is bit `i[N-1]` of the port vector. `cla_adder` is a generic
lookahead adder. Each carry is one flat sum of generate/propagate products, so
no carry waits on the carry below it. In the 7:3 compressor the CLA's carry-out
can never be 1, because the count is at most 7. That pin is left open on
purpose.

## The column plan

Column `c` holds the partial products `a[i] & b[j]` with `i + j = c`, which is
the vertical-and-crosswise (Urdhva-Tiryagbhyam) grouping of Vedic
multiplication. Columns are numbered 0..15 by bit weight here. The published
dot diagram numbers them 1..16.

**Stage 1** (`reduction_stage1`) puts one counter on every column. The counter
of column `c` sends its y2 to column `c+1` and its y3 to column `c+2` *within
the same stage*, and y1 stays in column `c`. The number of bits per column is
therefore the number of partial products plus up to two incoming carries:

| column        | 0    | 1  | 2   | 3   | 4   | 5   | 6   | 7   | 8   | 9   | 10  | 11  | 12  | 13  | 14 | 15   |
|---------------|------|----|-----|-----|-----|-----|-----|-----|-----|-----|-----|-----|-----|-----|----|------|
| partial prods | 1    | 2  | 3   | 4   | 5   | 6   | 7   | 8   | 7   | 6   | 5   | 4   | 3   | 2   | 1  | 0    |
| bits in total | 1    | 2  | 4   | 5   | 7   | 8   | 9   | 10  | 9   | 8   | 7   | 6   | 5   | 4   | 3  | 2    |
| counter       | wire | HA | 4:3 | 5:3 | 7:3 | 7:3 | 7:3 | 7:3 | 7:3 | 7:3 | 7:3 | 6:3 | 5:3 | 4:3 | FA | none |
| passed on     | 0    | 0  | 0   | 0   | 0   | 1   | 2   | 3   | 2   | 1   | 0   | 0   | 0   | 0   | 0  | 2    |

Columns 0 to 4 end with one bit each, and these are product bits `p[4:0]`.
Columns 5 to 9 hold more bits than a 7:3 compressor takes. Their compressor takes
the partial products first. The surplus bits go to stage 2 unchanged, in the
`stage1_left_t` struct. These are the carries that arrive last, plus the eighth
partial product of column 7. Column 15 receives only two carries and passes them
on.

**Stage 2** (`reduction_stage2`) sees, in each column 5..15, the stage-1 y1
bit, the bits passed on, and the carries of its own counters in the two columns
below. One more counter per column reduces these to the single product bit:

| column   | 5  | 6   | 7   | 8   | 9   | 10 | 11 | 12 | 13 | 14 | 15 |
|----------|----|-----|-----|-----|-----|----|----|----|----|----|----|
| bits     | 2  | 4   | 5   | 5   | 4   | 3  | 3  | 2  | 2  | 2  | 3  |
| counter  | HA | 4:3 | 5:3 | 5:3 | 4:3 | FA | FA | HA | HA | HA | FA |

The full adder of column 15 also produces a carry of weight 2^16. The product of
two 8-bit numbers fits in 16 bits, so that carry is always 0. It is not an
output, and an immediate assertion in `reduction_stage2` checks it. So if the
stage is fed values that no 8x8 product could produce, the simulation stops
with an assertion error.

In all, the design uses 13 counters in stage 1 (one wire column, one HA, seven
7:3, one 6:3, two 5:3, two 4:3, one FA) and 11 in stage 2.

### Timing character

"Two stages" describes how the bits are organised, not the logic depth. Inside
each stage, the y2/y3 carries move from column to column. The longest chains
are these:

- in stage 1, columns 2 → 3 → 4 → 5, and columns 7 → 9 → 10 → … → 14;
- in stage 2, columns 5 → 6 → … → 15.

The compressors of stage-1 columns 6, 7 and 8 take only partial products, so
they start at once. The late carries that reach those columns are the bits
passed on to stage 2.

## Departures from the published design

- **Stage-1 surplus in the middle columns.** The published dot diagram agrees
  with the counts above in columns 0–6 and 10–15 of stage 1. It agrees in
  columns 5, 6 and 9–15 of stage 2. The exception is the surplus under columns
  7–9. The diagram shows 0, 3 and 2 surplus bits under the columns this design
  calls 7, 8 and 9, and draws a full adder on the 3. Counting partial products
  and carries gives 3, 2 and 1 surplus bits. This design follows the count, and
  it puts no full adder on surplus bits in stage 1.
- **Stage-2 columns 7 and 8** therefore hold 5 bits each and use 5:3
  compressors. The diagram shows 3 and 4 bits there.
- **Which bits a full column passes on** is not specified. Here the
  compressor takes partial products first, then the carry from two columns
  below, then the carry from the column below.
- **Gate level.** The half adder, full adder and CLA are written in their usual
  forms (XOR/AND, XOR/majority, flat lookahead). The published design names
  these units but does not give their gates.
- **Operands are unsigned.** Signed multiplication is not addressed.
- The published design was evaluated in a 180 nm full-custom flow for gate
  count, area and power. This RTL says nothing about those figures.

## Files

All files are in `rtl/`, one module or package per file:

```
hoc_mult_pkg        WIDTH = 8, PWIDTH = 16, pp_array_t, stage1_left_t
hoc_vedic_mult8     top: a[7:0], b[7:0] -> p[15:0]
├── pp_gen          64 AND gates, pp[i][j] = a[i] & b[j]
├── reduction_stage1
│   └── half_adder, full_adder, compressor_{4,5,6,7}_3
└── reduction_stage2
    └── half_adder, full_adder, compressor_{4,5}_3
compressor_7_3 ─ compressor_4_3, full_adder, cla_adder #(3)
compressor_{4,5,6}_3 ─ half/full adders, cla_adder #(2)
```

The operand width is a package constant, not a parameter. The column plan above
exists only for 8x8. A different width needs a new plan for both stages.
`pp_gen` and `cla_adder` are parameterised and reusable on their own.

## Simulation

Each module has a self-checking testbench in `tb/`, called `tb_<module>.sv`. It
prints `TB_RESULT checks=N failures=M` and stops. Each testbench also has a
watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_hoc_vedic_mult8 \
    -y rtl -y tb rtl/hoc_mult_pkg.sv tb/tb_hoc_vedic_mult8.sv
./obj_dir/Vtb_hoc_vedic_mult8
```

For another testbench, replace `tb_hoc_vedic_mult8` with its name. Always list
the package first. The testbenches check the following:

- `tb_hoc_vedic_mult8`: all 65536 operand pairs, each compared with `a * b`.
  It also counts how often certain mechanisms occur, and fails if one never
  does:
  - a column-7 7:3 compressor with all seven inputs high;
  - surplus bits passed from stage 1 to stage 2;
  - a one arriving in carry-only column 15;
  - a stage-2 5:3 compressor counting 5.
- `tb_reduction_stage1`: all operand pairs. Product bits 0..4 must be right,
  and the weighted sum of everything the stage hands on must equal `a * b`.
- `tb_reduction_stage2`: 50,000 random input patterns whose value fits in 16
  bits. The output must equal that value.
- `tb_compressor_*`, `tb_full_adder`, `tb_half_adder`: exhaustive comparison
  with the count of ones.
- `tb_cla_adder`: exhaustive at widths 2, 3 and 5.
- `tb_pp_gen`: exhaustive.

The full run of all testbenches takes well under a minute. All pass. Lint
(`verilator --lint-only -Wall`) reports two warnings:

- the intentionally open carry-out pin in `compressor_7_3`;
- the package constant `PWIDTH`, which goes unused in modules that do not need
  it.
