# 4x4 Vedic multiplier (Urdhva Tiryakbhyam)

A combinational 4-bit × 4-bit unsigned multiplier. It is organised by the
"vertically and crosswise" rule (Urdhva Tiryakbhyam) of Vedic arithmetic
rather than as a row-by-row array multiplier. The product is built column by
column. Column *k* of the result collects every one-bit product `A_i·B_j`
with `i + j = k`. All columns are reduced at the same time, each by its own
small adder. A short row of full adders then passes the column carries
upward to the top bit.

```
 step 1   S0 = A0B0
 step 2   A1B0 + A0B1
 step 3   A2B0 + A0B2 + A1B1
 step 4   A3B0 + A0B3 + A2B1 + A1B2
 step 5   A3B1 + A1B3 + A2B2
 step 6   A3B2 + A2B3
 step 7   A3B3                       product = S7 S6 S5 S4 S3 S2 S1 S0
```

Each step is the weighted sum of one column. The product is
`Σ step_k · 2^(k-1)`.

## The adder network

| column (weight) | partial products | reduction | passes on |
|---|---|---|---|
| 0 | A0B0 | wire | S0 |
| 1 | A0B1, A1B0 | half adder | S1, carry C0 to column 2 |
| 2 | A0B2, A2B0, A1B1 | full adder, then half adder with C0 | S2, two carries to column 3 |
| 3 | A3B0, A0B3, A1B2, A2B1 | "4-bit adder" (a four-input bit counter) | sum, C2 to column 4, C1 to column 5 |
| 4 | A3B1, A1B3, A2B2 | full adder | sum, carry C3 to column 5 |
| 5 | A3B2, A2B3, C3 | full adder | sum, carry to column 6 |
| 6 | A3B3 | — | — |

The final row contains four full adders, for columns 3, 4, 5 and 6. Each
one adds three things:

- the column's own sum;
- whatever the lower columns passed up;
- the carry of the full adder to its right.

The last of these adders produces S6 as its sum and S7 as its carry. In all
there are 2 half adders, 7 full adders and the four-input counter, which is
itself 3 cells: 12 one-bit adder cells. Every column is reduced in parallel.
The only rippling path is the three-stage carry row from column 3 to
column 6.

### The weight-4 carry of column 3

Column 3 is the only column with four products. Their count runs from 0 to
4, so the column-3 adder has three outputs: a sum bit, C2 (weight 2^4) and
C1 (weight 2^5). C1 is set only when all four products are 1. Among 4-bit
operands that happens only for 15 × 15. This is the one corner case of the
network. If C1 is left out of the column-5 adder, every product is still
right except 15 × 15, which comes out as 193 instead of 225. In this RTL,
C1 is wired into the S5 adder.

## Where this RTL follows the source design and where it chooses

Taken from the source design:

- the operand width (4 bits);
- the column grouping;
- the placement and type of every half and full adder;
- the use of a dedicated four-input adder for column 3;
- the signal names S0–S7 and C0–C3.

This RTL's own choices:

- **Unsigned operands.** The method is given for plain binary numbers, and
  signed operation is not considered.
- **No clock and no reset.** The multiplier is purely combinational.
- **Insides of the "4-bit adder".** It is built as a full adder on three
  products, a half adder adding the fourth, and a half adder merging the two
  carries.
- **Standard cells.** The half and full adders are the textbook cells.
- **One AND gate per partial product.**
- **C1 wired to the S5 adder.** The block diagram labels the S5 adder's
  extra input "C1=0". Here that input is connected to the column-3 carry C1,
  because tying it to 0 breaks 15 × 15. The transistor-level schematic of
  the design also labels that adder's input C1.

Not modelled:

- **Transistor-level results.** The reference results were measured on a
  CMOS transistor schematic: about 0.40 ns propagation delay, 1.62 mW
  average power and 0.648 pJ power-delay product. Those figures belong to
  that circuit and process, not to this RTL. The delay of a synthesized
  version depends on your library.
- **The array multiplier.** The source compares the design against a
  conventional 4 × 4 array multiplier. That multiplier is only a reference
  point and is not included.

## Files

| file | contents |
|---|---|
| `rtl/vedic_pkg.sv` | `N = 4`, the operand/product types and the 4×4 partial-product matrix type `pp_t` (`pp[i][j] = A_i & B_j`) |
| `rtl/partial_products.sv` | the 16 AND terms |
| `rtl/half_adder.sv`, `rtl/full_adder.sv` | one-bit adder cells |
| `rtl/four_bit_adder.sv` | four-input bit counter: outputs `s`, `c2`, `c1` |
| `rtl/vedic_mul4.sv` | top level: `input [3:0] a, b`, `output [7:0] s` |
| `tb/tb_*.sv` | one self-checking testbench per module |

The width is fixed at 4. The adder network is specific to that size.
A wider multiplier would need a new network, for example one built up
hierarchically from 4 × 4 blocks.

## Verification

Every testbench is exhaustive and self-checking. Each one ends by printing
`TB_RESULT checks=<n> failures=<m>`, and each has a watchdog.

- **`tb_vedic_mul4`** runs all 256 operand pairs. For each pair it checks:
  - the product against `a*b`;
  - that the seven column steps, computed from the operand bits, rebuild
    `a*b`;
  - the column-3 adder's count against step 4.

  It also counts how often each carry path fires: C0, the second column-2
  carry, C1, the row carries into S5 and S6, and S7. It fails if any of them
  never fires. C1 fires exactly once, for 15 × 15.
- **`tb_partial_products`** checks all 16 terms for all 256 operand pairs.
- **The cell testbenches** cover the full truth table of each adder cell.

Run a testbench with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/vedic_pkg.sv tb/tb_vedic_mul4.sv --top-module tb_vedic_mul4
./obj_dir/Vtb_vedic_mul4
```

Each testbench was also run against a deliberately broken copy of its
module, and each one reported failures. For the top, the broken copy tied C1
to 0; for `partial_products`, it used OR instead of AND.
