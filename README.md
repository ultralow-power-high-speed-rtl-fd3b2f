# 4-2 compressor and an 8x8 compressor-tree multiplier

The slow part of a multiplier is reducing the partial products, not forming
them. A 4-2 compressor takes four bits of one column plus a carry-in from the
column to its right and turns them into one bit that stays in the column and
two bits that go one column to the left. Its carry-out does not depend on its
carry-in. That means a whole row of compressors can pass couts into cins
without a ripple, and each compressor halves the height of its column.

This RTL has two parts:

* a 4-2 compressor built from only two cell types: an XOR-XNOR cell, which
  gives both polarities of a two-input XOR, and a 2:1 multiplexer;
* an unsigned 8x8 multiplier that uses 18 of these compressors to reduce its
  64 partial products to two rows. A ripple adder then turns the two rows into
  the 16-bit product.

Everything is combinational. There is no clock, no reset and no register.

The compressor cells were conceived as sub-threshold transistor circuits. The
XOR-XNOR cell restores full swing with a feedback transistor pair, and the
multiplexer is a six-transistor pass cell. RTL cannot show supply voltage,
power, delay or transistor count. The files here give the exact logic function
of every cell and the exact structure of every compressor and of the
multiplier. Nothing analog is modelled.

## The compressor

Inputs `x1..x4` and `cin` all have the same weight. `sum` has that weight too.
`carry` and `cout` have twice that weight:

    x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout)

    sum   = x1 ^ x2 ^ x3 ^ x4 ^ cin
    carry = (x1^x2^x3^x4) ? cin : x4
    cout  = (x1^x2)       ? x3  : x1

The compressor uses six cells (`rtl/compressor_4_2.sv`):

| cell | select | data | output |
|---|---|---|---|
| XOR-XNOR | - | x1, x2 | x1^x2 (its complement is unused) |
| XOR-XNOR | - | x3, x4 | x3^x4 and its complement |
| MUX (cout) | x1^x2 | x1 / x3 | cout |
| differential MUX | x1^x2 | x3^x4, its complement | x1^x2^x3^x4 and its complement |
| MUX (sum) | cin | four-input XOR / XNOR | sum |
| MUX (carry) | four-input XOR | x4 / cin | carry |

The order of arrival is chosen on purpose. `cin` is the *select* of the sum
multiplexer. In a tree, `cin` comes from the neighbour's `cout`, which is only
one XOR and one MUX deep. So the select has settled before the four-input XOR,
the slowest signal, reaches the data inputs. The differential multiplexer is
written as two `mux2` instances with their data inputs crossed. That split is
a choice of this RTL.

`full_adder` (the 3-2 compressor) is built from the same two cells:
`s = a^b^ci`, `co = (a^b) ? ci : a`. `half_adder` is an XOR-XNOR cell plus an
AND gate. Both constructions are choices of this RTL.

## The multiplier

Columns are numbered C1 (weight 1) to C16 (weight 2^15). Column Ck starts with
min(k, 16-k) partial products `x[i] & y[j]`, where i+j = k-1. The tallest
column, C8, holds 8. The reduction runs in stages. Each stage brings the
height down to the next lower power of two: 8 -> 4 -> 2.

### Stage 1, height 8 -> 4 (`reduce_stage1`)

| column | bits coming in | counters | bits left |
|---|---|---|---|
| C1-C4 | 1-4 | none | 1-4 |
| C5 | 5 | half adder | 4 |
| C6 | 6 + HA carry | 4-2 (cin = 0) | 4 |
| C7 | 7 + 1 carry, C6 cout | 4-2 (cin = C6 cout) + half adder | 4 |
| C8 | 8 + 2 carries, C7 cout | 4-2 (cin = C7 cout) + 4-2 (cin = 0) | 4 |
| C9 | 7 + 2 carries, 2 couts | two 4-2, cins = C8 couts, one x4 = 0 | 4 |
| C10 | 6 + 2 carries, 2 couts | 4-2 (cin = first C9 cout) + full adder taking the second cout | 4 |
| C11 | 5 + 2 carries, C10 cout | 4-2 (cin = C10 cout) | 4 |
| C12 | 4 + carry + C11 cout | full adder | 4 |
| C13-C15 | 3 + FA carry, 2, 1 | none | 4, 2, 1 |

### Stage 2, height 4 -> 2 (`reduce_stage2`)

| column | counters |
|---|---|
| C1, C2 | none |
| C3 | half adder |
| C4 | 4-2, cin = 0; the C3 carry stays in C4 |
| C5-C13 | one 4-2 each, cin = cout of the column to the right; that column's `carry` stays as the second bit |
| C14 | full adder on its 2 bits and C13's `carry`; C13's `cout` stays |
| C15 | its bit plus the C14 full-adder carry |

### Final addition (`cpa_ripple`)

The two rows have one bit in C1, two bits in C2..C15 and none in C16. So the
carry propagate adder is a half adder at C2 and a chain of 13 full adders at
C3..C15. The last carry becomes `p[15]`.

Totals: 18 compressors (8 + 10), 16 full adders (2 + 1 + 13) and 4 half adders
(2 + 1 + 1).

The plan fixes the number and kind of counters in each column. These choices
belong to this RTL:

* which partial product feeds which counter input (lowest index first);
* the places where a `cin` is tied to 0;
* the ripple form of the final adder.

Any assignment that keeps the column heights gives the same product. The
testbenches check the product and the intermediate rows for every input.

Rows travel between stages as `mult8_pkg::row_t` arrays: bit w of each row has
weight 2^w. `mult8_pkg::STAGE2_HEIGHT` lists how many rows each column uses
after stage 1. Unused positions are 0.

## Files

| file | contents |
|---|---|
| `rtl/mult8_pkg.sv` | operand width `N = 8`, `row_t`, column heights after stage 1 |
| `rtl/xor_xnor.sv`, `rtl/mux2.sv` | the two cells |
| `rtl/compressor_4_2.sv` | the 4-2 compressor |
| `rtl/half_adder.sv`, `rtl/full_adder.sv` | the 2- and 3-input counters |
| `rtl/pp_gen.sv` | 64 AND gates forming `pp[i][j] = x[i] & y[j]` |
| `rtl/reduce_stage1.sv`, `rtl/reduce_stage2.sv` | the two reduction stages |
| `rtl/cpa_ripple.sv` | the final ripple adder |
| `rtl/mult8x8.sv` | top: `x[7:0]`, `y[7:0]` in, `p[15:0] = x*y` out |

The tree is wired by hand for 8-bit operands. Changing `N` in the package does
not give a different multiplier size.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one ends
by printing `TB_RESULT checks=N failures=M`. The cells, counters and the
compressor are tested on all input combinations. The compressor test also
checks that `cout` is the same for both values of `cin`. `tb_reduce_stage1`
and `tb_mult8x8` run all 65536 operand pairs. `tb_mult8x8` also checks the
row sums after each stage. It counts how often these events occur and fails if
one never does: a compressor with all five inputs at 1, a 1 on a cout -> cin
link, half-adder and full-adder carries, and a carry into `p[15]`.

For example, with Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/mult8_pkg.sv tb/tb_mult8x8.sv \
        --top-module tb_mult8x8 -o sim
    ./obj_dir/sim

Each testbench runs in seconds.

## Limits

* Unsigned operands only. There is no signed or Booth mode.
* No timing, power or voltage behaviour. The sub-threshold operating points
  the cells were conceived for (0.3 V to 0.9 V) cannot be expressed in RTL.
* The multiplier is purely combinational. Add registers around `mult8x8` if it
  is to be pipelined.
