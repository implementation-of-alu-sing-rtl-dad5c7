# 32-bit ALU with a Vedic-Wallace multiplier

This is a 32-bit combinational arithmetic logic unit. Its main feature is the
multiplier. A 32x32 product is split into four 16x16 products. Each 16x16
product is computed in the Vedic "vertically and crosswise" style (Urdhva
Tiryakbhyam): all bit products are formed at once and sorted into result
columns. A Wallace tree of full adders then compresses them, and a Brent-Kung
parallel-prefix adder gives the final sum. Addition and subtraction use a
chain of the same one-bit full-adder cell. In the original design that cell is
a low-power 9-transistor GDI circuit.

There is no clock and there are no registers. The output follows the inputs
after the combinational delay.

## Block structure

```
a[31:0] ──┬──────────────► arithmetic_unit ──── arith_y[64:0] ──┐
b[31:0] ──┤   s[1:0] ────►  ├ ripple-carry add/sub (full_adder x32)
          │                 └ vedic_32x32                        ├─► final_mux ─► y[64:0]
          └──────────────► logical_unit ─────── logic_y[31:0] ──┘      ▲
              s[4:2] ────►                                            s[6]
```

| module            | role |
|-------------------|------|
| `alu`             | top: instantiates the three units below |
| `arithmetic_unit` | add, subtract, multiply |
| `logical_unit`    | eight bitwise operations |
| `final_mux`       | chooses the arithmetic or the logic result |
| `vedic_32x32`     | 32x32 multiplier built from four 16x16 blocks |
| `vedic_16x16`     | 16x16 multiplier: bit products, then Wallace tree, then Brent-Kung adder |
| `wallace_tree`    | reduces N rows to 2 rows with full-adder carry-save rows |
| `csa_row`         | one row of full adders (3:2 compressor) |
| `brent_kung_adder`| W-bit parallel-prefix adder |
| `full_adder`      | one-bit full adder cell |
| `alu_pkg`         | widths and operation encodings |

## The select word

`s` is 7 bits wide. The bit fields come from the ALU's block diagram. The codes
inside each field are this design's own choice.

| `s[6]` | `s[4:2]` | `s[1:0]` | `y` |
|:------:|:--------:|:--------:|-----|
| 0 | x | 00 | `{32'b0, carry, a + b}` |
| 0 | x | 01 | `{32'b0, borrow, a - b}`, where borrow = (a < b) unsigned |
| 0 | x | 10 | `a * b`, unsigned, 65 bits |
| 0 | x | 11 | 0 (unused code) |
| 1 | 000 / 001 / 010 / 011 | x | AND / OR / NAND / NOR, zero-extended |
| 1 | 100 / 101 / 110 / 111 | x | XOR / XNOR / NOT a / NOT b, zero-extended |

`s[5]` has no function. The block diagram uses `s[6]` for the multiplexer and
does not use bit 5.

## How the multiplier works

### 16x16: vertical and crosswise products, Wallace tree, Brent-Kung adder

Urdhva Tiryakbhyam says that result column k is the sum of all bit products
`a[i] & b[j]` with `i + j = k`. For small numbers, "vertically" is the
`i = j` pair and "crosswise" are the other pairs. `vedic_16x16` forms all 256
bit products in parallel. It places them in sixteen 32-bit rows: row j holds
`a & b[j]`, shifted to column j. Each column of this array holds exactly the
Urdhva terms of that column.

`wallace_tree` adds the rows without carry propagation:

- At each level the rows are taken in groups of three.
- Each group passes through a `csa_row`, which is one full adder per bit. It
  turns three rows into a sum row and a carry row, with `x + y + z = s + 2c`.
- The carry row is shifted left by one place.
- Leftover rows go to the next level unchanged.

Sixteen rows shrink over six levels: 16, 11, 8, 6, 4, 3, 2. At no level does a
carry travel along a row.

All levels are held in one flat array of rows. Constant functions compute how
many rows each level has and where it starts in the array, so a single
generate loop builds the whole tree for any `ROWS` and `W`. Each carry row
loses its top bit when shifted. This is exact only when the total of all rows
fits in `W` bits, which a product always does.

The two remaining rows go to a 32-bit Brent-Kung adder. That adder forms
generate and propagate pairs for each bit. It combines them in an up-sweep of
log2(W) levels, which produces prefixes at positions 2^k−1. A down-sweep of
log2(W)−1 levels then fills in the remaining positions. This takes about 2W
prefix cells at depth 2·log2(W)−1. That is fewer cells than a Kogge-Stone
adder, at slightly more depth.

The output `c` is 33 bits wide (`c[32:0]`), the port width of the 16x16
block's symbol. `c[32]` is the carry out of the final adder. It is always 0,
because a 16x16 product fits in 32 bits.

### 32x32: four 16x16 blocks

Split the operands into halves: `a = aH·2^16 + aL` and `b = bH·2^16 + bL`.
Then

```
a·b = aH·bH·2^32 + (aH·bL + aL·bH)·2^16 + aL·bL
```

This is the same vertical and crosswise pattern, one level up. `vedic_32x32`
computes the four half products in parallel. It then makes three 64-bit rows:

1. `{aH·bH, aL·bL}`, the two vertical products side by side, with no overlap.
2. `aH·bL << 16`.
3. `aL·bH << 16`.

One carry-save level (`wallace_tree` with 3 rows) and a 64-bit Brent-Kung
adder finish the product. The result `c[64:0]` is 65 bits wide to match the
product bus of the reference design. `c[64]` is the final carry out and is
always 0.

The multiplier path runs through: bit product, six carry-save levels, 32-bit Brent-Kung
adder, one carry-save level, 64-bit Brent-Kung adder.

## The full-adder cell

The whole design uses a single `full_adder` cell: in the add/subtract chain,
in every carry-save row, and so in every multiplier. The reference design
builds this cell as a 9-transistor gate-diffusion-input (GDI) circuit to save
power and area. GDI cells behave like multiplexers. The RTL therefore writes
the cell in multiplexer form:

```
h = a ^ b;   sum = h ^ cin;   cout = h ? cin : a
```

The transistor circuit is not modelled. Its logic is that of any full adder,
and power or area at transistor level cannot be expressed in RTL.

## Addition and subtraction

`arithmetic_unit` chains 32 `full_adder` cells into a ripple-carry adder. For
subtraction, `b` is inverted and the carry-in is 1. Bit 32 of the result is
the carry out for addition and the borrow (the inverted carry out) for
subtraction.

The multiplier is always active. The op code only selects which result
appears. Gating the multiplier inputs when it is not selected would save
power, but that is not done here.

## Choices that are not fixed by the reference design

- **Which operations.** There are three arithmetic and eight logic operations.
  The choice of add, subtract and multiply, the eight bitwise functions, and
  all their codes are this design's own.
- **The `s` field.** `s[5]` is unused. `s[6]` = 1 selects the logic result.
- **Widths.** The 32-bit operand width is taken from the multiplier size. The
  result is 65 bits so that the whole product bus reaches the output. Results
  of add, subtract and logic are zero-extended.
- **Number format.** All operations are unsigned. The subtraction result is
  correct in two's complement, but no signed multiply is provided.
- **Adder choice.** The add/subtract adder is a ripple chain of the full-adder
  cell. The Brent-Kung adder is used only inside the multiplier.
- **Tree shape.** The Wallace tree is the classic row-wise version, with
  groups of three rows and leftovers passed down. The reference design names
  the structure but does not give its exact shape.
- **Multiplier sizes.** `vedic_16x16` and `vedic_32x32` have fixed sizes, as
  their names say. `wallace_tree` and `brent_kung_adder` are parameterised.
  `brent_kung_adder` needs a power-of-two `W`.
- **Unused bits.** The lint warnings about unused bits are intended:
  - `s[5]`;
  - bit 32 of each 16x16 product inside `vedic_32x32`, which is always 0;
  - the dropped top bit of each carry row.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_full_adder` | all 8 input combinations |
| `tb_brent_kung_adder` | 32-bit random and carry-chain corner cases, plus an exhaustive 8-bit instance |
| `tb_wallace_tree` | the row total is preserved for 16x32, 3x64 and 5x16 configurations |
| `tb_vedic_16x16`, `tb_vedic_32x32` | corner and random operands against `a*b`, including 20 × 10 = 200 |
| `tb_arithmetic_unit`, `tb_logical_unit`, `tb_final_mux` | every op code |
| `tb_alu` | end-to-end at default sizes (see below) |

`tb_alu` runs random and corner operands with every select code, including
20 × 10 = 200. It also counts how often each mechanism occurred:

- each of the eleven operations;
- the unused code;
- a carry out of the addition;
- a borrow out of the subtraction;
- a product wider than 32 bits;
- each setting of the multiplexer.

A mechanism that never occurred counts as a failure.

All these testbenches pass. Timing, power and area were not evaluated; the
RTL only fixes the logic structure.

To simulate with Verilator (5.x), from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/alu_pkg.sv tb/tb_alu.sv --top-module tb_alu
./obj_dir/Vtb_alu
```

Replace `tb_alu` with any other testbench name to run that one. `alu_pkg.sv`
must come first, because several modules import it. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/alu_pkg.sv rtl/<module>.sv --top-module <module>`.
