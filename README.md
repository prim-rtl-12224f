# PRIM8: approximate 8-bit multipliers with carry disregard and OR-based summation

PRIM8 is a family of thirteen approximate unsigned 8x8-bit multipliers. They
trade a small, controlled arithmetic error for fewer gates and shorter paths.
Each one splits the product into two 8x4 array multipliers that run in
parallel. In the less significant of the two, the lowest columns stop
propagating carries. Those columns OR their partial products together instead
of adding them.

The two approximations push the error in opposite directions:

- Dropping a carry makes the result too small.
- OR-ing an even, non-zero number of ones gives 1 where an exact sum bit would give 0, which makes the result too large.

So the errors partly cancel, and no separate correction circuit is needed. The
repository also contains a 3x3 Gaussian image filter built from these
multipliers, which was the application used to evaluate them.

Everything is written in synthesizable SystemVerilog (IEEE 1800-2017). Every
module has a self-checking testbench.

## The 8x8 multiplier: two 8x4 groups and a 12-bit adder

```
 a[7:0] ──┬──────────────► G_X  (Group A: a * b[3:0], approximate) ──► pa[11:0]
          │                                                           │
          └──────────────► G_1  (Group B: a * b[7:4], exact)       ──► pb[11:0]
                                                                      │
   p[3:0]   = pa[3:0]                                                 │
   p[15:4]  = 12-bit ripple-carry adder( {0000, pa[11:4]}, pb )  ◄────┘
```

`prim8` (`rtl/prim8.sv`) forms the product from the two nibbles of `b`:

- **Group A** multiplies `a` by `b[3:0]`. It holds the least significant part of the product, so its errors matter least. It is the only group that is approximated.
- **Group B** multiplies `a` by `b[7:4]`. It is always exact.
- **The adder** `prim_rca` adds Group A's upper eight bits to Group B's twelve bits. In the second class of PRIM8 this adder is approximated too (see below).

The adder's carry out is always 0 for 8-bit operands. The approximate results
never exceed the exact product, so the adder's carry out is left unused.

## Inside an 8x4 array G_x (`prim_mul8x4`)

This is the heart of the design, and the part that needs the most care.

### Rows, cells and columns

The 8x4 array has four rows, one for each bit of `b`:

- **Row 0** is eight AND gates, `a[i] & b[0]`.
- **Rows 1 to 3** are each a chain of eight cells. Cell `(i, j)` forms `a[i] & b[j]` and adds it to two inputs:
  - the sum arriving from row `j-1` at the same weight. The row's last cell takes row `j-1`'s carry out instead.
  - the carry from its right-hand neighbour in the same row.

Columns are numbered from 1. Column `c` holds the partial products of weight
`c-1`. Columns 4 to 8 hold four partial products each. Columns 1, 2, 3, 9, 10
and 11 hold 1, 2, 3, 3, 2 and 1.

### The carry-disregard region

The parameter `X` (1..10) names the last column whose carries are dropped.

- **Columns 1..X**: each column becomes one OR-based unit, with no carry in or out. The unit's output is the OR of the column's partial products. The column's top partial product comes from a plain AND gate; the unit forms the others itself:

  | partial products in column | unit | gates |
  |---|---|---|
  | 1 | AND gate only | 1 AND |
  | 2 | `pi1_1` | 1 AND, 1 OR |
  | 3 | `pi1_2` | 2 AND, 2 OR |
  | 4 | `pi1_3`, the approximate 4:1 compressor | 3 AND, 3 OR |

- **Column X+1**: the first exact column receives no carries from the right. Its row-1 and row-2 cells merge into one `pi3`. A `pi3` is a full adder summing the row-0, row-1 and row-2 partial products, so it has one carry. That carry goes to the row-2 cell of column X+2. The row-3 cell of column X+1 has only a sum input, so it is a `pi2` (AND gate and half adder).
- **Column X+2**: its row-1 cell now has no carry input either, so it is also a `pi2`. Where a cell has neither a sum nor a carry input, it is a bare AND gate.
- **Everywhere else**: cells are exact `pi0` cells (AND gate and full adder).

The function `prim_pkg::cell_kinds()` works out this placement for any `X`.
`prim_mul8x4` then generates the cells from it.

### What the configurations contain

Unit counts for each configuration:

| config | X | pi1_1 | pi1_2 | pi1_3 | pi3 | pi2 | pi0 | lone AND cells in rows 1-3 |
|---|---|---|---|---|---|---|---|---|
| G_1 (exact) | 1 | 0 | 0 | 0 | 0 | 3 | 21 | 0 |
| G_4 | 4 | 1 | 1 | 1 | 1 | 2 | 14 | 0 |
| G_5 | 5 | 1 | 1 | 2 | 1 | 2 | 11 | 0 |
| G_6 | 6 | 1 | 1 | 3 | 1 | 2 | 8 | 0 |
| G_7 | 7 | 1 | 1 | 4 | 1 | 1 | 5 | 1 |
| G_8 | 8 | 1 | 1 | 5 | 1 | 1 | 3 | 0 |
| G_9 | 9 | 1 | 2 | 5 | 0 | 1 | 1 | 1 |
| G_a | 10 | 2 | 2 | 5 | 0 | 0 | 0 | 1 |

Notes on the counts:

- In G_7, the last row-1 cell is left with a single partial product and becomes an AND gate.
- G_a consists of OR units only. Its bit 11 is constant 0, because no carry is left anywhere.
- X = 2 and X = 3 are also accepted. The thirteen PRIM8 configurations do not use them.

### The resulting function

The function of G_x is simple to state, even though the cell placement is not:

- **Bits below weight X**: bit `w` is the OR of the column's partial products.
- **Everything above**: the exact sum of the remaining partial products, with all of their carries.

The testbenches check the circuit against this definition (`tb/prim_ref_pkg.sv`).

## The 12-bit adder and the two classes (`prim_rca`)

`prim_rca #(W, OR_BITS)` is a ripple-carry adder. Its lowest `OR_BITS` bits
compute `x | y` and produce no carry. The bits above form an exact chain of
full adders whose carry in is 0.

- **Class 1, `PRIM8_x1R12`**: `OR_BITS = 0`, so the 12-bit adder is exact.
- **Class 2, `PRIM8_x1R(16-x)`** (for x = 5..10): `OR_BITS = x-4`. Adder bit 0 has product weight 4, which is Group A's column 5. So the OR-ed adder bits cover exactly the weights that Group A already approximates. That leaves a (16-x)-bit exact adder.

In the name `PRIM8_x1R...`:

- `x` is Group A's configuration.
- `1` is Group B's configuration (the exact G_1).
- `R..` is the width of the exact part of the adder.

`prim8` is configured by `X` and `APPROX_ADDER`:

| name | X | APPROX_ADDER | MED | MRED | PC (%) | NoEB |
|---|---|---|---|---|---|---|
| exact | 1 | 0 | 0 | 0 | 100 | 16.00 |
| PRIM8_41R12 | 4 | 0 | 3.34 | 0.00102 | 68.36 | 13.03 |
| PRIM8_51R12 | 5 | 0 | 8.41 | 0.00222 | 59.57 | 11.91 |
| PRIM8_61R12 | 6 | 0 | 18.53 | 0.00415 | 53.32 | 10.86 |
| PRIM8_71R12 | 7 | 0 | 38.78 | 0.00713 | 48.68 | 9.84 |
| PRIM8_81R12 | 8 | 0 | 79.28 | 0.01147 | 44.90 | 8.83 |
| PRIM8_91R12 | 9 | 0 | 123.28 | 0.01519 | 43.41 | 8.12 |
| PRIM8_a1R12 | 10 | 0 | 155.28 | 0.01726 | 42.99 | 7.67 |
| PRIM8_51R11 | 5 | 1 | 11.14 | 0.00283 | 53.61 | 11.64 |
| PRIM8_61R10 | 6 | 1 | 29.47 | 0.00625 | 41.14 | 10.43 |
| PRIM8_71R9 | 7 | 1 | 68.86 | 0.01199 | 31.50 | 9.30 |
| PRIM8_81R8 | 8 | 1 | 150.38 | 0.02092 | 24.32 | 8.23 |
| PRIM8_91R7 | 9 | 1 | 263.75 | 0.03090 | 21.14 | 7.40 |
| PRIM8_a1R6 | 10 | 1 | 400.75 | 0.04044 | 19.76 | 6.74 |

The statistics were measured on this RTL over all 65,536 operand pairs.
`tb_prim8` checks each one against the published figures.

- **MED**: mean absolute error.
- **MRED**: mean of the error divided by the exact product, with zero products counted as 0.
- **PC**: share of exact products.
- **NoEB**: `16 - log2(1 + RMS error)`.

The defaults of `prim8`, `prim_mul8x4` and the filter select PRIM8_a1R6 (X = 10), the cheapest member of the family.

## Gaussian filter (`gauss_filter`)

The filter smooths an 8-bit grayscale image with the 3x3 kernel

```
        |  97 121  97 |
 1/1023 | 121 151 121 |        (the coefficients sum to 1023)
        |  97 121  97 |
```

**Interface**

- `win` is a row-major 3x3 window of pixels; `win[4]` is the centre.
- When `in_valid` is high on a clock edge, the filter takes that window.
- `pix_out` and `out_valid` follow on the next clock edge.
- A new window can be accepted every cycle.
- `rst_n` is active low and synchronous. It clears `out_valid`.

**Computation**

- Nine `prim8` instances multiply each pixel (operand `a`) by its coefficient (operand `b`).
- The nine products are summed into a 20-bit accumulator.
- The sum is divided by 1023, rounding to nearest. The divider computes `((sum + 511) * 262401) >> 28`. This equals `round(sum / 1023)` for every possible sum (at most 255 * 1023).

**Not included**

The filter holds no image. Line buffering and the handling of the image border
are left to whatever supplies the windows. The testbench repeats edge pixels at
the border.

## Top level (`prim_top`)

`prim_top` brings out both parts side by side.

**The multiplier family**

- One operand pair `a` and `b` (8 bits each) goes to all thirteen PRIM8 configurations.
- The output `p[n]` (16 bits each) is in table order:
  - `p[0..6]` = PRIM8_41R12 .. PRIM8_a1R12
  - `p[7..12]` = PRIM8_51R11 .. PRIM8_a1R6

  The configuration of each index comes from `prim_pkg::cfg(n)`.
- This part is purely combinational.

**The Gaussian filter**

- Ports: `clk`, `rst_n`, `in_valid`, `win`, `out_valid`, `pix_out`.
- The filter's multiplier is set by `FILTER_X` and `FILTER_APPROX_ADDER`. The default is PRIM8_a1R6.

## Faithfulness: what is the original design and what is this implementation's choice

The following follow the original design and have been checked:

- The partial product units.
- The split into two 8x4 groups with a 12-bit ripple-carry adder.
- The column-by-column carry disregard with OR-based summation.
- The two adder classes.
- The names of the thirteen configurations.
- The filter kernel.

The thirteen configurations reproduce the published MED, MRED, PC and NoEB to
the precision they were printed with.

These are this implementation's own choices:

- **The exact position of every cell in the 8x4 arrays.** The original gives which units each column uses and how many, and those counts match the table above. It does not pin down every cell, so the positions are reconstructed. In particular, in G_8 and G_9 the arrangement after the disregard region may differ in detail from the original. The arithmetic function does not depend on this, but area and delay may.
- **How `pi1_k` units are fed.** Each `pi1_k` takes the top partial product of its column as an input. This is how three AND gates can sum four partial products.
- **Where a `pi0` has a carry input but no incoming sum**, its sum input is tied to 0.
- **The filter's microarchitecture**: the window interface, one-cycle latency, round-to-nearest division, saturation and reset behaviour.
- **The default configuration**, PRIM8_a1R6.

The following are not part of this RTL:

- Area, power and delay figures. These come from a standard-cell synthesis flow.
- Image-quality measures (SSIM). The filter testbench reports maximum error and PSNR against the exact filter.

## Files

| file | content |
|---|---|
| `rtl/prim_pkg.sv` | cell-kind enum and `cell_kinds()` placement, the configuration table `cfg()`, the kernel `gk()` |
| `rtl/full_adder.sv`, `rtl/half_adder.sv` | one-bit adders |
| `rtl/pi0.sv` | exact cell: AND gate and full adder |
| `rtl/pi1_1.sv`, `rtl/pi1_2.sv`, `rtl/pi1_3.sv` | OR-based carry-disregard units; `pi1_3` is the 4:1 compressor |
| `rtl/pi2.sv` | AND gate and half adder, no carry input |
| `rtl/pi3.sv` | two AND gates and a full adder summing three partial products |
| `rtl/prim_mul8x4.sv` | 8x4 array G_X |
| `rtl/prim_rca.sv` | ripple-carry adder with an optional OR-ed low part |
| `rtl/prim8.sv` | 8x8 PRIM8 multiplier |
| `rtl/gauss_filter.sv` | 3x3 Gaussian filter |
| `rtl/prim_top.sv` | top level |
| `tb/prim_ref_pkg.sv` | reference model written from the definition, not from the circuit |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. To build and
run one with Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/prim_pkg.sv tb/prim_ref_pkg.sv \
          tb/tb_prim8.sv --top-module tb_prim8
./obj_dir/Vtb_prim8
```

Replace `tb_prim8` with any other testbench. Each finishes in well under a
second.

What each testbench checks:

| testbench | checks |
|---|---|
| `tb_pi0` .. `tb_pi3` | each unit, exhaustively over its inputs |
| `tb_prim_mul8x4` | all ten G_x against the reference, over all 4,096 input pairs; that G_1 is exact and every other G_x does approximate |
| `tb_prim_rca` | the adder for `OR_BITS` = 0..6 |
| `tb_prim8` | the exact multiplier and all thirteen configurations over all 65,536 pairs, bit for bit; then the error statistics against the published values |
| `tb_gauss_filter` | a generated 32x32 noisy image through fourteen filters (exact and the thirteen configurations): each pixel, the one-cycle latency, idle cycles and reset; reports maximum error and PSNR against the exact filter |
| `tb_prim_top` | the top at its default parameters: random and corner operands on all thirteen outputs, then 3,000 filter cycles with idle cycles and resets |

`tb_prim_top` also counts how often each mechanism changed a result: the carry
disregard, the OR-ed adder bits, and exact products. It fails if any of them
never occurs.

To change the design:

- **Another multiplier**: set `X` and `APPROX_ADDER` on `prim8`, or `FILTER_X` and `FILTER_APPROX_ADDER` on `prim_top`. X = 1 with `APPROX_ADDER` = 0 is the exact multiplier.
- **Another array arrangement**: edit `cell_kinds()`. Then rerun `tb_prim_mul8x4`, which compares every configuration with the reference model.
