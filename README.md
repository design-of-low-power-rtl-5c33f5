# Fixed-width radix-4 Booth multiplier with a two-block partial-product array

Many DSP and media datapaths multiply two N-bit numbers but can only keep N
bits of the 2N-bit result. Computing the full product and then dropping the
lower half wastes most of the lower half of the adder array. This multiplier
never builds that lower half. It adds only the partial-product columns that
reach the upper N output bits, estimates the carry that the discarded columns
would have produced from a single column of them, and returns

    p ≈ (x * y) / 2^N        (x, y, p: N-bit two's complement)

with an error of at most 0.75 / 1.0 / 1.25 output LSBs for N = 8 / 12 / 16 and
a mean error of about +0.03 LSB.

The second idea is about delay. In a plain array multiplier every partial-
product row waits for the carries of the row above, so the last row depends on
all N/2 rows. Here the kept rows are split into two groups, **Block 1** and
**Block 2**, that are summed in parallel by their own small arrays, and a final
adder row merges the two block sums. A carry crosses about half as many array
rows as in a single array.

The design is purely combinational: no clock, no registers, no latency.

## Arithmetic

### Booth digits

The multiplier y is recoded into N/2 radix-4 digits, one per overlapping
triplet (y[2i+1], y[2i], y[2i-1]) with y[-1] = 0:

    z_i = y[2i-1] + y[2i] - 2*y[2i+1]      in {-2, -1, 0, +1, +2}
    x * y = sum_i z_i * x * 4^i

Each digit becomes a three-bit control word `Ctrl[2:0] = {neg, one, two}`:

| y[2i+1] y[2i] y[2i-1] | digit | neg | one | two |
|---|---|---|---|---|
| 000 | 0  | 0 | 0 | 0 |
| 001 | +1 | 0 | 1 | 0 |
| 010 | +1 | 0 | 1 | 0 |
| 011 | +2 | 0 | 0 | 1 |
| 100 | -2 | 1 | 0 | 1 |
| 101 | -1 | 1 | 1 | 0 |
| 110 | -1 | 1 | 1 | 0 |
| 111 | 0  | 1 | 0 | 0 |

The last line is a "negative zero": the row is all ones and the neg bit added
below it brings it back to zero. `booth_encoder` computes
`neg = y[2i+1]`, `one = y[2i] ^ y[2i-1]`, and `two` through a 2:1 selection by
y[2i+1] between `y[2i] & y[2i-1]` and `~(y[2i] | y[2i-1])`.

### Partial-product rows

Row i is `z_i * x` in N+1 bits (2x needs one bit more than x). Bit j comes from
a selector cell (`pp_select`):

    q[i][j] = ((x[j] & one) | (x[j-1] & two)) ^ neg,   x[-1] = 0, x[N] = x[N-1]

This is the one's complement of the selected multiple when the digit is
negative. The missing +1 is the row's neg bit, placed at the row's lowest
column, 2i.

Sign extension uses the usual constant scheme. The top bit of every row (its
sign) is inverted, and the constant `-sum_i 2^(N+2i) mod 2^2N` is added. In
bits, that constant is a one at columns N and N+1 for row 0 and a one at column
N+2i+1 for each later row. For N = 8 these are the columns 8, 9, 11, 13 and 15.

### Column map (N = 8)

Row i bit j has weight 2^(2i+j). Columns 0..6 are dropped (LP), column 7 and
above are kept (MP):

```
column     15 14 13 12 11 10  9  8  7 |  6 |  5  4  3  2  1  0
row 0                          1 ~s  q7| q6 | q5 q4 q3 q2 q1 q0   (+1 at 8)
row 1                    1 ~s q7 q6 q5| q4 | q3 q2 q1 q0          n0 at 0
row 2              1 ~s q7 q6 q5 q4 q3| q2 | q1 q0                n1 at 2
row 3        1 ~s q7 q6 q5 q4 q3 q2 q1| q0 |                      n2 at 4
                                      | n3 |
           |<------ MP: kept ------->|LPmaj|<---- LPminor ------->|
Block 1 = rows 0-1 of MP     Block 2 = rows 2-3 of MP
output p = columns 15..8; column 7 is summed only for its carry
```

(`~s` is the inverted sign bit q[N] of the row, `1` the sign-extension
constants, `n_i` the neg bits.)

## Truncation and the LPmajor correction

This is the part that decides the accuracy, and the part where the RTL makes
its own choice.

The kept columns run from N-1 to 2N-1 (W = N+1 columns). The output is
columns N..2N-1. Column N-1 is added as well, but only its carry is used, so it
acts as a rounding position.

Everything below column N-1 is dropped. The carry that the dropped part would
have sent into column N-1 is estimated from its top column, N-2, called
**LPmajor**. That column holds one bit of every row (bit N-2-2i of row i) and
the neg bit of the last row: N/2+1 bits. The lower columns are called
**LPminor** and are not looked at at all.

`lpmajor_comp` counts the ones in LPmajor (sigma) and adds

    comp = floor((sigma + N/4 + 1) / 2)

at column N-1. The terms:

* sigma/2 is the carry the LPmajor column produces by itself.
* The constant N/4+1 stands for two things. It covers the average carry coming
  up from LPminor, which grows with the number of LPminor columns. It also
  covers the rounding one at column N-1 that a rounded (post-truncated) product
  would add.

The constant was picked so that the mean error stays near zero at every size.
Measured error of `p` against the exact x*y/2^N, in output LSBs:

| N  | operand pairs        | mean   | max abs |
|----|----------------------|--------|---------|
| 8  | all 65536            | +0.028 | 0.75    |
| 12 | all 16 777 216       | +0.031 | 1.00    |
| 16 | 200 000 random       | +0.032 | 1.25    |

For comparison, at N = 8 a correction of 0 (plain truncation of the array)
gives a mean error of -1.19 LSB. A rounded exact product would give a maximum
of 0.5 LSB.

The correction is a small word (3 bits at N = 12). It is fed into Block 2 as
one more operand, aligned to column N-1.

## Blocks and adders

* **Block 1** adds rows 0 .. R1-1 (R1 = floor(N/4)) over the kept columns,
  together with their sign-extension constants.
* **Block 2** adds the remaining rows, their constants and the correction word.

Each block is a `csa_block_adder`. The first three operands go into a row of
full adders. Every further operand goes into its own full-adder row, together
with the sums and the one-bit-shifted carries of the row above. A ripple-carry
row (`ripple_adder`) then resolves the last sums and carries. Both blocks
produce a W-bit sum mod 2^W, which is exact because all constants already
account for the sign bits mod 2^2N.

A final `ripple_adder` adds the two block sums. Its bit 0 (column N-1) is
dropped and bits 1..N are `p`.

For N = 12 (6 rows), Block 1 has 3 rows plus its constants, which is 4 operands
(2 carry-save rows). Block 2 has 3 rows, its constants and the correction, which
is 5 operands (3 carry-save rows).

### Adder cells

The full and half adders are written in AND/OR/NOT form:

| cell | logic | gates | gate levels |
|---|---|---|---|
| `half_adder` | sum = a&~b \| ~a&b, cout = a&b | 6 | 3 |
| `full_adder` | t = a&~b \| ~a&b; sum = t&~cin \| ~t&cin; cout = a&b \| t&cin | 13 | 6 |

Many array positions have a constant 0 or 1 input, mostly from the constants
and from row ends. They are written as full adders, and synthesis reduces them
to half adders or wires. The one position that is empty by construction is
bit 0 of the shifted carries in every carry-save row after the first. It uses a
`half_adder` cell.

After generic synthesis to 2-input AND/OR/XOR gates, the longest path through
the whole multiplier is 30, 37 and 48 gates for N = 8, 12 and 16.

## Modules

| file | role |
|---|---|
| `rtl/fwb_pkg.sv` | `booth_ctrl_t` struct {neg, one, two}; width helpers |
| `rtl/booth_encoder.sv` | one Booth digit → control word |
| `rtl/pp_select.sv` | one partial-product bit |
| `rtl/booth_pp_row.sv` | N+1 selector cells: one row with its sign inverted, plus the neg bit |
| `rtl/half_adder.sv`, `rtl/full_adder.sv` | AND/OR/NOT adder cells |
| `rtl/ripple_adder.sv` | W-bit ripple-carry adder |
| `rtl/csa_block_adder.sv` | carry-save array plus ripple row; used for Block 1 and Block 2 |
| `rtl/lpmajor_comp.sv` | LPmajor count → carry correction |
| `rtl/fw_booth_mult.sv` | top: encoders, rows, column cut, correction, two blocks, final adder |

### Top-level interface

```
module fw_booth_mult #(parameter int unsigned N = 12) (
  input  logic [N-1:0] x,   // multiplicand, two's complement
  input  logic [N-1:0] y,   // multiplier, two's complement
  output logic [N-1:0] p    // ≈ (x*y) >> N, two's complement
);
```

`N` must be even and at least 4. It has been simulated at 8, 12 and 16. The
default, 12, is the size for which area, power and delay figures of this
architecture have been published. The architecture drawings use 8.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

* Leaf cells and the encoder are checked exhaustively. The encoder is checked
  against the table above.
* `booth_pp_row` is checked for every control word against `digit * x`.
* The adders and `lpmajor_comp` are checked against integer arithmetic.
* The multiplier testbenches (`tb_fw_booth_mult` at N = 12,
  `tb_fw_booth_mult_n8`, `tb_fw_booth_mult_n16`) share `tb/fwb_checker.sv`
  and the reference model `tb/fwb_ref_pkg.sv`.
  * The model rebuilds the array arithmetically: rows as |z|*x, inverted for
    negative digits. It then predicts `p` bit for bit, so any wiring or
    constant error shows up as a mismatch.
  * The checker also bounds the error against the exact product, per vector
    and on average.
  * It counts how often each Booth digit (including the negative zero), each
    correction value, negative products and the most negative operand
    occurred. A mechanism that never occurred counts as a failure.
* `tb_fw_booth_mult` runs all 2^24 operand pairs at the default size in about
  15 s. The N = 8 run is exhaustive too.

To run a testbench with Verilator:

```
verilator --binary --timing -Irtl -Itb rtl/fwb_pkg.sv tb/fwb_ref_pkg.sv \
    tb/tb_fw_booth_mult.sv --top-module tb_fw_booth_mult -y rtl -y tb +libext+.sv
./obj_dir/Vtb_fw_booth_mult
```

For a leaf testbench, leave out `tb/fwb_ref_pkg.sv` and name its own file and
top module.

## Where this RTL departs from, or goes beyond, the published design

* **Correction rule.** The published design routes the LPmajor bits into the
  kept array, but does not state the rule that turns them into a carry. The
  `floor((sigma + N/4 + 1)/2)` rule and its constant are this design's own.
  Their accuracy is measured above. Expect this design's error figures, not
  those of the original.
* **Cell-level layout.** The published drawings place specific half and full
  adders, and specific constant ones, in specific places: for example, the
  last constant one sits in the final adder row. This RTL keeps the same
  partition but writes each block as a regular array. It places the correction
  and all of Block 2's constants inside Block 2. The sum is identical. Gate
  counts and delays in gate units will differ from a hand-placed netlist. The
  published comparison is 7 FA + 4 HA on the longest path for N = 8, against
  11 FA + 1 HA for a single array, and it has not been reproduced.
* **Block split for other sizes.** The split is only drawn for N = 8 (two rows
  each). For other sizes Block 1 takes floor(N/4) rows and Block 2 the rest.
* **Sign bit.** The inverted leftmost bit of each row is taken to be the
  row's sign, bit N of the (N+1)-bit multiple. Only this reading makes the
  array exact.
* **No registers.** Add input or output registers around `fw_booth_mult` if
  a clocked interface is needed.
