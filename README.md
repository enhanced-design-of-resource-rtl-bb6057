# Truncated / approximate / exact multipliers: 8x8 and 16x16

These are unsigned multipliers for error-tolerant work such as image and
signal processing. They give up some accuracy in the low part of the product
to save logic and delay. The 8x8 multiplier splits its product columns into
three regions:

* **truncated** (columns 0..5): these bits are not computed at all;
* **approximate** (columns 6..8): cheap OR-based compressors;
* **exact** (columns 9..15): exact compressors.

Simple OR gates pass "error compensation" bits from each cheaper region into
the next one up. Each column is reduced to its product bit in a single stage
of column compressors (4:2 up to 8:2). There is no tree of reduction stages
and no final carry-propagate adder. The 16x16 multiplier is built from four
of these 8x8 multipliers plus one row of 4:2 compressors.

All RTL is combinational: there is no clock, no reset and no handshake. The
delay is a single pass through the logic.

```
rtl/amul_pkg.sv        shared enum (C23_MODE setting of the 16x16 multiplier)
rtl/full_adder.sv      exact / approximate full adder
rtl/half_adder.sv      exact / approximate half adder
rtl/comp42.sv .. comp82.sv   exact / approximate 4:2, 5:2, 6:2, 7:2, 8:2 compressors
rtl/approx_mul8.sv     8x8 approximate multiplier
rtl/approx_mul16.sv    16x16 approximate multiplier (top)
tb/                    self-checking testbenches and a reference-model package
```

## The cells

Every cell has a parameter `APPROX` (`bit`, default 0). With 0 the cell is
exact. With 1 it is the approximate version.

| cell | exact | approximate |
|---|---|---|
| `full_adder` | a+b+cin = sum + 2·cout | sum = a\|b\|cin, cout = cin |
| `half_adder` | a+b = sum + 2·cout | sum = a\|b, cout = a&b |

The approximate full adder has no XOR and no majority gate. Its carry output
is just a wire from its carry input. The carry of the approximate half adder
is this design's own choice. The half adder is used only in its exact form
(column 31 of the 16x16 multiplier).

### Compressors

A `comp42` is two full adders:

* the first takes `x[0..2]` and produces a partial sum and the horizontal
  `cout`;
* the second adds the partial sum, `x[3]` and `cin`, and produces `sum` and
  `carry`.

The larger compressors are built from smaller ones in series:

* 5:2 = 4:2, then a full adder;
* 6:2 = 4:2, then 4:2;
* 7:2 = 5:2, then 4:2;
* 8:2 = 6:2, then 4:2.

In each case the later block takes the earlier block's sum plus the next
inputs.

An N:2 compressor (N ≥ 5) has these ports:

* `x[N-1:0]`: the bits of one column;
* `cin[N-4:0]`: carry-ins, the adder inputs left over;
* `sum`: the column's sum bit;
* `carry[N-3:0]`: every internal carry, each of twice the weight of `sum`.

Nothing is dropped, so the exact compressors satisfy:

    popcount(x) + popcount(cin) = sum + 2 * popcount(carry)

When `APPROX = 1`, every compressor reduces to two rules:

* `sum` is the OR of all its inputs;
* each carry forwards whichever input sits on the carry-in pin of its adder.

For an approximate 8:2 with its carry-ins at zero, only three carries can be
1: `carry[1] = x[2]`, `carry[3] = x[5]` and `carry[5] = x[7]`.

The original description gives the approximate 6:2 one more full adder than
the exact one, and elsewhere says that no extra full adder is needed. Both
6:2 versions here use two 4:2 blocks.

## The 8x8 multiplier (`approx_mul8`)

Partial product `a[i]&b[j]` sits in column i+j, row j.

| columns | bits per column | treatment | output |
|---|---|---|---|
| 0..4 | 1..5 | not formed | y[4:0] from constant |
| 5 | 6 | formed only for compensation: rows 0..2 ORed → extra bit in column 6; rows 3..5 ORed → extra bit in column 8 | y[5] from constant |
| 6 | 7 + 1 comp. | approximate 8:2, carry-ins 0 | y[6] |
| 7 | 8 | approximate 8:2 | y[7] |
| 8 | 7 + 1 comp. | approximate 8:2 | y[8] |
| — | | OR of all carries of the three 8:2 → one bit into column 9 | |
| 9..15 | | exact region, see below | y[15:9] |

The constant is `y[5:0] = 6'b000110`. No carries move between columns 6, 7
and 8: their only path upward is the single ORed bit. Bits enter each 8:2 in
row order, with the compensation bit last. That order is this design's
choice, and it decides which partial products become the approximate
carries.

### The exact region

This is the part that departs most from the original description. That
description passes one carry bit from each column to the next, and names a
7:2, 6:2, 5:2, 4:2, full adder and half adder for columns 9 to 14. But
column 9 alone can hold 7 ones, and a sum bit plus one carry can count only
to 3. So that scheme cannot be exact, although the region is meant to be
exact.

Here every carry a compressor produces moves up to the next column.
Compressors from column 11 on are sized to the bits they actually receive:

| column | partial products | carries in | compressor | carries out |
|---|---|---|---|---|
| 9 | 6 + comp. bit | 0 | 7:2 (carry-ins 0) | 4 live (`carry[3]` is constant 0) |
| 10 | 5 | 4 | 6:2 (9 inputs) | 4 |
| 11 | 4 | 4 | 6:2 (one input 0) | 4 |
| 12 | 3 | 4 | 5:2 | 3 |
| 13 | 2 | 3 | 4:2 | 2 |
| 14 | 1 | 2 | full adder | carry = y[15] |

As a result, `y[15:9]` is exactly the sum of the column 9..14 partial
products plus the compensation bit, shifted down by nine. That value always
fits in seven bits, even for a = b = 255.

## The 16x16 multiplier (`approx_mul16`, top)

Split the operands as a = {ah, al} and b = {bh, bl}. The four 8x8 products
are:

* p0 = al·bl, at weight 1;
* p1 = ah·bl and p2 = al·bh, at weight 2^8;
* p3 = ah·bh, at weight 2^16.

The columns are combined as follows:

| columns | inputs | cell |
|---|---|---|
| 0..7 | p0[7:0] | wires |
| 8 | p0[8], p1[0], p2[0] | approximate full adder |
| 9..15 | p0, p1, p2 bits + carry and cout of the column below | approximate 4:2 |
| 16..23 | p1, p2, p3 bits + carry and cout of the column below | exact 4:2 |
| 24..29 | p3[13:8] | wires |
| 30..31 | p3[15:14] + the two carries that leave column 23 | exact full adder + exact half adder |

The 4:2 row chains horizontally: the `carry` of column c-1 enters as `x[3]`
and its `cout` enters as `cin`. Both carries survive, so columns 16..23 are
exact given their inputs.

### Where the column-23 carries go: `C23_MODE`

The carries that leave column 23 weigh 2^24. As described, they skip
columns 24..29 and are added at column 30. That is `C23_MODE = C23_TO_COL30`,
the default. It adds those carries at 64 times their real weight, and it is
by far the largest source of error. Two other settings are provided for
comparison:

* `C23_DROP` discards the carries;
* `C23_TO_COL24` adds them at their real weight with an 8-bit incrementer.

Measured over 200,000 uniform random operand pairs (`tb_approx_mul16_modes`):

| C23_MODE | MED | NMED | MRED |
|---|---|---|---|
| C23_TO_COL30 (default) | 8.4e8 | 0.195 | 1.77 |
| C23_DROP | 2.6e7 | 6.0e-3 | 0.168 |
| C23_TO_COL24 | 2.2e7 | 5.2e-3 | 0.172 |

NMED is MED / (2^16−1)^2. MRED is taken over the non-zero exact products.

If you want a usable 16x16 multiplier rather than a faithful copy of the
described structure, set `C23_MODE = C23_TO_COL24`.

## Accuracy, and how far to trust it

What the tests establish:

* The 8x8 testbench checks all 65,536 operand pairs against an independent
  reference model.
* The 16x16 testbench checks 500,000 random pairs plus corner cases.
* The compressor testbenches check every input pattern.
* Together they show the RTL does exactly what is written above.

Measured error of the 8x8 multiplier over all pairs: MED 337, NMED 5.2e-3,
MRED 0.166, maximum error distance 2619. The published figures for this
architecture are much better: NMED 10.3e-4 and MRED 2.3e-4 for the 8x8, and
NMED 19.47e-4 and MRED 5.12e-4 for the 16x16. The gap comes from the
approximate full adder (sum = OR, cout = cin), which is implemented exactly
as its equations are printed. In columns 6..8 that adder makes each product
bit the OR of its column. An approximate cell with a different carry
equation would change these numbers. It would only need edits to
`full_adder.sv` (`g_approx`) and the expected carries in the cell
testbenches.

Nothing here reproduces the published area, power or delay numbers, which
came from a 45 nm cell library. The image-processing evaluation (edge
detection, PSNR, MSSIM) was not built: its operator and data are not
specified.

## Design choices not fixed by the original description

* Input order inside every compressor, and the wiring between the
  sub-blocks of the larger compressors.
* The carry of the approximate half adder (a & b).
* The exact region of the 8x8 multiplier: all carries pass upward, and the
  compressors are sized to fit (see above).
* Column 5 rows are counted from b[0]: row j is a[5-j]&b[j].
* In the 16x16 multiplier, columns 16..23 use exact 4:2 compressors. One
  sentence of the description calls the column-23 compressor approximate.
* Columns 30/31 use an exact full adder plus an exact half adder. The carry
  out of column 31 is dropped.
* Operands are unsigned. The logic is purely combinational.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example:

```
verilator --binary --timing -Irtl -Itb rtl/amul_pkg.sv tb/amul_ref_pkg.sv \
    tb/tb_approx_mul16.sv -y rtl -y tb --top-module tb_approx_mul16
./obj_dir/Vtb_approx_mul16
```

The testbenches are:

* `tb_approx_mul16`: default configuration, 500,000 vectors. It counts how
  often the column-23 carries reach column 30 (with one and with two
  carries), how often column 31 wraps, and how often each 8x8 compensation
  bit fires. It fails if any of these never happens.
* `tb_approx_mul16_modes`: compares the three `C23_MODE` settings.
* `tb_approx_mul8`: exhaustive, with error metrics.
* `tb_full_adder`, `tb_half_adder`, `tb_comp42` … `tb_comp82`: exhaustive
  cell tests. Each one checks both `APPROX` settings.

`tb/amul_ref_pkg.sv` holds the reference models. They work from the region
rules (integer sums for the exact parts, ORs and forwarded bits for the
approximate parts), not from the cell netlist.

Every run takes well under a second.
