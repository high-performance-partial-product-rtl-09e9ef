# PPBD BCD multiplier

A combinational multiplier for decimal (BCD) numbers. The default size takes two 4-digit
operands and returns their 8-digit product. Each input digit is a 4-bit binary number from 0
to 9.

Decimal multipliers usually have to handle carries of 10 inside the partial products. This one
avoids most of that. It works in binary wherever a small binary number is cheap and goes back
to decimal only at two points:

1. **Digit products.** Each pair of digits is multiplied by an ordinary 4x4 binary multiplier.
   The result, at most 81, is converted at once into two BCD digits, H (tens) and L (units).
2. **Column sums.** The H and L digits that share a decimal weight are added in binary.
   The sum, at most 63 for 4-digit operands, is converted into two BCD digits.

Both conversions use the same converter, the *partial product binary-to-decimal* (PPBD)
converter. It is built from small *fast binary-to-decimal* (FBD) cells. A single decimal
addition of two rows then gives the product.

## The algorithm on an example

Take 5126 x 4832. Multiplier digit 2 times the multiplicand digits 5, 1, 2, 6 gives 10, 02, 04,
12. The units form the L row `0 2 4 2`. The tens form the H row `1 0 0 1`, which sits one decimal
place higher. The other multiplier digits give four more row pairs, each moved one place further
left:

```
                 0 2 4 2      L  (2 x 5126)
               1 0 0 1        H
               5 3 6 8        L  (3 x 5126)
             1 0 0 1          H
             0 8 6 8          L  (8 x 5126)
           4 0 1 4            H
           0 4 8 4            L  (4 x 5126)
         2 0 0 2              H
column:  7 6 5 4 3 2 1 0
sum:     2 4 5 25 17 17 13 2
```

Each column sum is turned into two decimal digits. The units form the **sum row** `24557732`.
The tens, moved one place up, form the **carry row** `00211100`. One BCD addition gives
`24557732 + 00211100 = 24768832`, which is 5126 x 4832.

For N-digit operands, column c holds the L digits of the pairs with i+j = c and the H digits of
the pairs with i+j = c-1. That is at most 2N-1 digits, so a column sum is at most 9(2N-1). For
N = 4 this is 63, which fits in 6 bits and in two decimal digits. The top column holds a single
H digit, and the H digit of 9 x 9 is 8, so the top column never produces a tens digit. The
carry row's lowest digit is always 0. The final addition cannot carry out of 2N digits, because
the product of two N-digit numbers has at most 2N digits.

## The FBD cell and the PPBD converter

This part is the least obvious.

An **FBD cell** (`fbd_cell`) takes a BCD digit `bj` and a 2-bit value `bi` and computes
`4*bj + bi`. Because the value is just the 6-bit concatenation `{bj, bi}`, the cell only has to
split a number from 0 to 39 into a units digit `d` and a tens value `c` from 0 to 3. It does this
with three comparisons, against 10, 20 and 30.

A **PPBD converter** (`ppbd_converter #(WB, ND)`) turns a WB-bit binary number into ND BCD
digits. It reads the binary input two bits at a time, most significant pair first, and keeps a
decimal accumulator that is updated as `acc = 4*acc + pair`. One row of ND FBD cells does one
update:

```
 pair --> [FBD digit 0] --c--> [FBD digit 1] --c--> ... --> (overflow)
              ^ acc[0]              ^ acc[1]
```

The cell of digit 0 takes the new bit pair as its `bi`. Every other cell takes the 2-bit tens
output of the cell below it. Each carry is at most 3, so it fits the cell's `bi` input exactly,
and no wider carry or correction logic is needed. After ceil(WB/2) rows the accumulator holds the
input in decimal. The intermediate values never exceed the final one, so a converter with enough
digits for its input never overflows inside. The `overflow` output flags inputs of 10^ND or
more. The design uses it only in simulation assertions.

Where the converter is used:

| use | WB | ND | rows | largest input |
|---|---|---|---|---|
| BCD digit multiplier (`bdm`) | 7 | 2 | 4 | 81 |
| column sum, N = 4 (`pp_reduction`) | 6 | 2 | 3 | 63 |

## Blocks

| module | role |
|---|---|
| `ppbd_multiplier` | top: generation -> reduction -> final decimal addition |
| `pp_generation` | N x N array of `bdm`: `h[j][i]`, `l[j][i]` = tens and units of `x[i]*y[j]` |
| `bdm` | BCD digit multiplier: `bin_mult4x4` followed by `ppbd_converter` (7 bits -> 2 digits) |
| `bin_mult4x4` | 4x4 array multiplier: four AND rows, shifted and summed |
| `ppbd_converter` | binary -> BCD, rows of FBD cells |
| `fbd_cell` | `4*bj + bi` -> units digit and 2-bit tens |
| `pp_reduction` | groups the digits by column, sums each column with `csa_column`, converts each sum with `ppbd_converter`, and outputs the sum and carry rows |
| `csa_column` | adds K operands: a chain of 3:2 carry-save stages, then one carry-propagate add |
| `bcd_adder` | ND-digit ripple-carry decimal adder with +6 correction |
| `ppbd_pkg` | `bcd_digit_t` and the column-width helpers `col_max(N)` and `col_width(N)` |

## Interface and timing

```
module ppbd_multiplier #(parameter int N = 4) (
  input  logic [4*N-1:0] x,   // BCD multiplicand, digit 0 in bits 3:0
  input  logic [4*N-1:0] y,   // BCD multiplier
  output logic [8*N-1:0] p);  // BCD product
```

There is no clock, register or reset. `p` follows `x` and `y` after the combinational delay.
That delay runs through one BDM (a binary multiply and 4 FBD rows), one column adder, 3 FBD rows
and a 2N-digit decimal ripple adder. To pipeline the design, the natural cut points are the H/L
digit array between `pp_generation` and `pp_reduction`, and the two rows between `pp_reduction`
and `bcd_adder`.

N can be set from 1 to 6. Above 6, a column sum could reach 100, and `pp_reduction` stops
elaboration with a fatal assertion. After synthesis at N = 4 (yosys coarse cells), the top is
about 4,600 word-level cells. `pp_generation`, with its 16 BDMs, takes about 3,300 of them.

Digits above 9 on the inputs are outside the design's range. Simulation assertions in `bdm` and
`fbd_cell` report them. The hardware then returns a meaningless product.

## What follows the original architecture and what is chosen here

These parts follow the published architecture:
- the three stages;
- a BDM made of a 4x4 binary multiplier and a PPBD converter with outputs H and L;
- a PPBD converter built from FBD cells, with the FBD function `4*bj + bi`;
- column reduction with carry-save and carry-propagate adders, followed by a PPBD converter;
- a decimal adder for the final product;
- the operand size: 4 digits, 16-bit `x` and `y`, 32-bit `p`;
- the 5126 x 4832 example, including its intermediate sum and carry rows.

These are this design's own choices, because the architecture does not specify them:
- the FBD cell's outputs (a digit and a 2-bit carry) and its compare-and-subtract inside;
- the converter's arrangement of one row per bit pair;
- a linear carry-save chain per column instead of a tree, with 2N operand slots per column and
  the unused slots tied to zero;
- a ripple-carry BCD adder with +6 correction;
- a fully combinational datapath with no pipeline registers;
- the N <= 6 limit;
- the `overflow`, `cin` and `cout` ports of the helper blocks.

The binary rows of `bin_mult4x4` and the final carry-propagate add of `csa_column` are written
with `+`, and synthesis chooses the adder structure.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares the outputs with values
computed in the testbench from plain integer arithmetic:

- `tb_fbd_cell`: all 40 legal inputs.
- `tb_ppbd_converter`: exhaustive at 7 bits / 2 digits (including overflow), 6 bits / 2 digits
  and 10 bits / 3 digits.
- `tb_bin_mult4x4`: all 256 operand pairs. `tb_bdm`: all 100 digit pairs.
- `tb_csa_column`: random operands for K = 7 and K = 8, with all-maximum operands first.
- `tb_pp_generation`, `tb_pp_reduction`: the worked example (exact sum and carry rows),
  all-nines input and thousands of random digit matrices.
- `tb_bcd_adder`: the example's final addition, a carry rippling through all 8 digits, and
  random operands with random carry-in.
- `tb_ppbd_multiplier`: the top at its default size with no parameters overridden. It runs the
  worked example, the corner cases (0, 1, 9999 x 9999, 9999 times powers of ten minus one) and
  20,000 random pairs. It also counts how often each mechanism occurs, and fails if any count
  is zero. The mechanisms are:
  - a two-digit digit product;
  - a column sum of 10 or more;
  - a column sum of 40 or more (1779 x 1778 reaches 50);
  - a decimal correction in the final adder;
  - a carry that ripples through a 9.
- `tb_ppbd_multiplier_sizes`: N = 1 and N = 2 exhaustively (all 10,000 pairs for N = 2), and
  N = 6 on random pairs plus 999999 x 999999.

All testbenches pass, and each one fails when a single deliberate fault is placed in its module.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv rtl/ppbd_pkg.sv \
          tb/tb_ppbd_multiplier.sv --top-module tb_ppbd_multiplier
./obj_dir/Vtb_ppbd_multiplier
```

Every testbench ends with a line `TB_RESULT checks=<n> failures=<m>`. To build a different
testbench, replace the testbench name in both places. For lint only, use
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/ppbd_pkg.sv rtl/ppbd_multiplier.sv`.
