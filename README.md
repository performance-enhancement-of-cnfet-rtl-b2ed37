# Approximate 8x8 Dadda multiplier with a two-gate 4:2 compressor

Image and signal processing tolerate small arithmetic errors, and the
partial-product reduction tree is where a multiplier spends most of its
area and power. This design cuts that tree down hard. It forms only 25
of the 64 partial products. It drops the four least significant columns.
In the middle columns it uses an *approximate 4:2 compressor* that is just an
OR and an AND: `carry = x1 & (x3 | x4)`, with the sum bit fixed at 1. The
most significant columns stay exact. The result is the top 12 bits of an
approximate 16-bit product.

The circuit was conceived for carbon-nanotube FETs in a two-transistor
"modified gate diffusion input" (MGDI) logic style. The RTL keeps the
gate-level structure of that implementation. Each logic cell is its own
module, `mgdi_and2`, `mgdi_or2`, `mgdi_xor2` and `mgdi_mux2`. The transistors
themselves, and the power and delay they give, are not modelled.

The whole multiplier is combinational: no clock, no reset, no handshake.

## The cells

| Module | Function | Built from |
|---|---|---|
| `approx_compressor_4_2` | `carry = x1 & (x3 \| x4)`, `sum = 1`. No `x2` input and no carry in or out. | one OR, one AND |
| `exact_compressor_4_2` | `x1+x2+x3+x4+cin = sum + 2*(carry+cout)`. `cout` = majority(x1,x2,x3), so it never depends on `cin`. | two `full_adder` |
| `full_adder` | `sum = a^b^cin`. The carry comes from a MUX that `a^b` selects: `cin` when a and b differ, otherwise `a`. | two XOR, one MUX |
| `half_adder` | `sum = a^b`, `cout = a&b` | XOR, AND |
| `fa_const1` | full adder with its third input at 1: `{cout,sum} = a+b+1`, i.e. `sum = ~(a^b)`, `cout = a\|b` | XOR + inverter, OR |
| `rca4` | N-bit ripple-carry adder (N = 4) | N `full_adder` |

Since `x2` is never read, the multiplier does not form the partial product
that would feed it. This is where most of the saved AND gates come from.

## The partial-product map

Partial product (column k, row r) is `a[k-r] & b[r]` and has weight 2^k. The
multiplier splits its columns into three sections:

* **truncated**, columns 0-3: nothing is formed, and there are no output bits;
* **approximate**, columns 4-10: 15 of the 44 partial products are formed;
* **accurate**, columns 11-14: all 10 are formed and reduced exactly.

The map below shows columns 14 (left) to 4 (right). Columns 0-3 are not
drawn.

```
 column   14 13 12 11 10  9  8  7  6  5  4
 row 0                          A  .  .  .
 row 1                       A  x  .  .  .
 row 2                    .  x  A  .  .  c
 row 3                 A  .  A  A  .  .  c
 row 4              H  x  .  A  .  .  o  c
 row 5           E  H  A  .  .  .  .  .
 row 6        E  E  E  A  .  .  .  o
 row 7     E  E  E  E  o  .  .  .

 A  formed; input of a stage-1 approximate compressor (x1, x3, x4 from top)
 x  the x2 slot of that compressor: not formed
 c  formed; input of the stage-2 approximate compressor in column 4
 H  formed; input of the stage-1 half adder
 E  formed; reduced by the exact compressors / full adder of stage 2
 o  formed; goes straight to the final adder
 .  not formed
```

`approx_mul_pkg` holds this list (`PP_COL`, `PP_ROW`). Its function `pp_idx(col,row)`
finds a partial product in the list at elaboration time. The top module
instantiates one `mgdi_and2` per entry.

## Reduction: three stages

**Stage 1.** Approximate compressors on column 7 (rows 0,2,3), column 8
(rows 1,3,4) and column 10 (rows 3,5,6). A half adder on column 11 (rows 4,5).

**Stage 2.** An approximate compressor on column 4 (rows 2,3,4). Two exact
compressors, on column 11 and column 12. The column-11 `cout` feeds the
column-12 `cin`, and the column-11 `cin` is 0. A full adder on column 13 adds
the two partial products of that column and the `cout` of the column-12
compressor.

**Stage 3.** One ripple-carry chain from column 5 up to column 15. It adds
these bits:

| Column | Bits entering stage 3 | Cell |
|---|---|---|
| 4 | sum of the column-4 compressor (always 1) | none: it is `p[0]` |
| 5 | pp(5,4), carry of the column-4 compressor, constant 1 | `fa_const1` |
| 6 | pp(6,6), constant 1, carry from column 5 | `fa_const1` |
| 7 | sum of the column-7 compressor (1), constant 1, carry | `full_adder` with two inputs at 1 |
| 8 | carry of column-7 compressor, sum of column-8 compressor (1), carry | `full_adder` with one input at 1 |
| 9 | carry of column-8 compressor, constant 1, carry | `fa_const1` |
| 10 | pp(10,7), sum of column-10 compressor (1), carry | `full_adder` with one input at 1 |
| 11-14 | two rows from stage 2 (bit 0 of the second row is 0) | `rca4` |
| 15 | carry out of `rca4` | `p[11]` |

The constant-1 bits partly make up for what the missing partial products
and the approximate compressors leave out. Column 7 holds two 1s, so its
carry is always 1. That carry makes the carries out of columns 8, 9 and 10
1 as well. Output bits 8, 9 and 10 are therefore simply the column-7 compressor's
carry, the column-8 compressor's carry and pp(10,7), and the accurate adder
always gets a carry in. The netlist keeps these adders as cells. Synthesis
folds them away. The critical path runs through one approximate compressor,
one exact compressor and the ripple chain.

## What it computes

With `ACk` the carry of the approximate compressor in column k, and `pp(k,r)`
as above:

```
value = 2160
      + 32*(pp(5,4) + AC4) + 64*pp(6,6) + 256*AC7 + 512*AC8
      + 1024*pp(10,7) + 2048*AC10
      + sum over k = 11..14, r = k-7..7 of pp(k,r) * 2^k
p     = value >> 4          (value never exceeds 16 bits)
```

2160 is the sum of all constant-1 bits (16 + 32 + 64 + 2*128 + 256 + 512 + 1024).
This accuracy results from running all 65,536 operand pairs and comparing
`p*16` with `a*b`:

* mean error distance: 1098.4;
* mean relative error: 0.9996. Small products are far off, because the
  constant part alone is 2160.
* 65,479 of the pairs give an inexact result.
* Example: a = 00011000, b = 00011101 (24 * 29 = 696) gives p = 000010000111,
  which stands for 2160.

`p[0]` is always 1.

## Where this RTL departs from, or fills in, the original design

* **Final-stage wiring.** The published dot diagram draws some stage-2 bits
  of columns 5-10 as moving one column left into stage 3. That would double
  their weight, so here every bit stays in its own column. It follows that
  column 5 is a full adder with one input at 1, where the diagram shows a
  half adder with one input at 1. Column 11 also adds only one bit to the
  carry.
* **Published simulation example.** The published example for a = 00011000,
  b = 00011101 shows 000010001000. This RTL gives 000010000111, one less in
  the lowest output bit. With these operands every formed partial product is
  0, so the output is the constant part alone. The difference comes down to
  how many constant 1s sit in the low columns.
* **Approximate compressor logic.** The carry is `x1 & (x3 | x4)`, following
  the two-level gate schematic. A prose description calls it a majority gate.
  A three-input majority of x1, x3, x4 would differ only for x1 = 0, x3 = x4 = 1.
  To switch, edit `approx_compressor_4_2`.
* **Operand orientation.** Which operand indexes the rows of the dot diagram
  is not given. Here row r is `b[r]`.
* **Carry into the column-11 compressor.** It is 0. Nothing else feeds it.
* **Not modelled.** Transistor-level details: CNFET devices, the MGDI cells'
  supply and body connections, transistor counts, power and delay.

## Files

* `rtl/approx_mul_pkg.sv`: sizes (`WIDTH` = 8, `TRUNC_COLS` = 4, `OUT_W` = 12) and the
  partial-product list.
* `rtl/approx_dadda_mul8.sv`: the multiplier (top). Ports: `a[7:0]`,
  `b[7:0]`, `p[11:0]`.
* `rtl/approx_compressor_4_2.sv`, `rtl/exact_compressor_4_2.sv`,
  `rtl/full_adder.sv`, `rtl/half_adder.sv`, `rtl/fa_const1.sv`,
  `rtl/rca4.sv`: arithmetic cells.
* `rtl/mgdi_and2.sv`, `rtl/mgdi_or2.sv`, `rtl/mgdi_xor2.sv`,
  `rtl/mgdi_mux2.sv`: logic cells.
* `tb/tb_<module>.sv`: one self-checking testbench per module. Each applies
  every input combination, computes the expected value with integer
  arithmetic, and ends by printing `TB_RESULT checks=N failures=M`.

The top-level testbench checks all 65,536 operand pairs against the formula
above. It also counts a few events and fails if one never occurs: a carry
from each approximate compressor, a carry from the column-11 to the column-12
compressor, a carry out of column 5, a set product bit 15, and an inexact
result. It prints the accuracy figures quoted above.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Irtl rtl/approx_mul_pkg.sv \
    tb/tb_approx_dadda_mul8.sv --top tb_approx_dadda_mul8
./obj_dir/Vtb_approx_dadda_mul8
```

For a cell, e.g. the exact compressor:

```
verilator --binary --timing -Irtl tb/tb_exact_compressor_4_2.sv --top tb_exact_compressor_4_2
./obj_dir/Vtb_exact_compressor_4_2
```

The exhaustive top-level run takes well under a second.

To move a partial product, edit `PP_COL`/`PP_ROW` in the package and the
instance that uses it in `approx_dadda_mul8`. Then update the reference
formula in `tb_approx_dadda_mul8`.
