# 8x8 Vedic multiplier (Urdhva Tiryakbhyam)

This is a combinational unsigned 8-bit by 8-bit multiplier. It is built from the
"vertically and crosswise" rule of Vedic arithmetic (Urdhva Tiryakbhyam). The
rule is used twice:

- **On bits**, inside a 4x4 multiplier. Each product column is summed all at
  once, and carries jump ahead instead of rippling.
- **On nibbles**, at the top level. Four 4x4 products are combined by three
  8-bit adders.

All partial products are formed in parallel. The only serial path is a short
chain of adders. There is no clock, no register and no handshake. The product
is ready one settling time after the operands change.

```
a[7:0], b[7:0]
   |
   +-- vedic_mul4  AL*BL -> M1 ------------------------------+---> p[3:0]  = M1[3:0]
   +-- vedic_mul4  AL*BH -> M2 --+                           |
   +-- vedic_mul4  AH*BL -> M3 --+-> cla8  M5 = M3+M2, c5     |
   |                                   |                     |
   |                       rca8 "Adder 2"  M6 = M5 + M1[7:4], c6 --> p[7:4]  = M6[3:0]
   |                                   |
   +-- vedic_mul4  AH*BH -> M4 --> rca8 "Adder 3"  M7 = M4 + {c5|c6, M6[7:4]} --> p[15:8] = M7
```

## The 4x4 multiplier: columns with forwarded carries (`rtl/vedic_mul4.sv`)

This block takes the most explaining, so it comes first.

Sixteen AND gates form the products `a[i] & b[j]`. Column `k` collects every
product with `i + j = k`. Column 0 has one product and column 3 has four. In the
sutra's words, the pairs are taken "vertically" (`a[k]` with `b[0]`, then
`a[0]` with `b[k]`) and "crosswise" (the pairs in between).

Each column counts its products plus the carries it receives. The count never
goes above 5, so it fits in 3 bits:

| count bit | where it goes            |
|-----------|--------------------------|
| bit 0     | product bit `p[k]`       |
| bit 1     | column `k+1`             |
| bit 2     | column `k+2`, skipping `k+1` |

So a column takes carries from the two columns below it:

```
c0 = a0b0
c1 = a1b0 + a0b1
c2 = a2b0 + a1b1 + a0b2          + c1.bit1
c3 = a3b0 + a2b1 + a1b2 + a0b3   + c2.bit1
c4 = a3b1 + a2b2 + a1b3          + c3.bit1 + c2.bit2
c5 = a3b2 + a2b3                 + c4.bit1 + c3.bit2
c6 = a3b3                        + c5.bit1 + c4.bit2
p7 = c6.bit1 | c5.bit2
```

The bit-2 carry is what makes this a carry-skip scheme. Column `k+2` gets that
part of column `k`'s carry directly, without waiting for column `k+1`. Columns
1 to 6 each need one small multi-operand adder, six adders in all. Column 0
needs none.

Two facts about `p7`, both checked over all 256 inputs:

- The bit-2 carry out of column 5 really does occur, for 4 of the 256 operand
  pairs. It must therefore go into `p7`.
- It is never set together with column 6's carry, because the product fits in
  8 bits. That is why `p7` is an OR, not an adder.

The equations are written directly as sized sums. Synthesis chooses the gates
for each column count.

## Combining the nibble products (`rtl/vedic_mul8.sv`)

Write `A = 16*AH + AL` and `B = 16*BH + BL`. Then:

```
A*B = 256*M4 + 16*(M2 + M3) + M1
      M1 = AL*BL, M2 = AL*BH, M3 = AH*BL, M4 = AH*BH
```

The three adders work as follows:

1. **`cla8`**, a carry lookahead adder, adds the two crosswise products:
   `M5 = M3 + M2`. They are the two largest terms of equal weight, and this adder
   decides the critical path.
2. **Adder 2** (`rca8`) adds the upper nibble of `M1` to `M5`. The low nibble of
   its sum gives `p[7:4]`. The low nibble of `M1` is `p[3:0]` as it stands.
3. **Adder 3** (`rca8`) adds to `M4` the upper nibble of `M6` plus the middle
   carries. Its sum is `p[15:8]`.

The two middle adders can each produce a carry out, `c5` and `c6`. Both weigh
`2^12`, which is bit 4 of Adder 3's second operand. They can never both be 1:

- If `M2 + M3` overflows, it is at most 450.
- Its low byte is then at most 194.
- Adding a nibble (at most 15) cannot overflow again.

A single OR therefore feeds them into bit 4. Adder 3 itself never overflows.
Immediate assertions in `vedic_mul8` state both facts.

## The adders (`rtl/cla8.sv`, `rtl/rca8.sv`)

`cla8` uses generate `g = a&b` and propagate `p = a^b`. Every carry is the
fully expanded lookahead sum of products over all lower bit positions, in one
flat level. No carry depends on the carry one place below.

`rca8` is a plain chain of full adders.

Both take a `WIDTH` parameter (default 8) and have a carry in. The top ties the
carry in to 0.

## What is taken from the published architecture and what is not

Taken from the published architecture:

- the four nibble multipliers and their operand pairings;
- the names `M1`..`M7`;
- a carry lookahead adder for the crosswise sum;
- two further 8-bit adders;
- the output split `P[3:0]`, `P[7:4]`, `P[15:8]`;
- the 4x4 structure: an AND array feeding per-column adders, with carries
  forwarded up to two columns.

This design's own choices:

- **Middle carries.** How `c5` and `c6` reach Adder 3 is this design's own
  completion. Dropping either one gives wrong products.
- **Column carry terms.** The exact carry terms of each column in the 4x4 block
  are derived here. They include every carry needed for an exact product.
- **Adder internals.** The carry lookahead adder is organised as one flat
  lookahead level. Adders 2 and 3 are ripple carry adders. The architecture
  only calls them 8-bit adders, though its synthesized schematic names them as
  ripple carry adders.
- **Interface.** Operands are unsigned. The multiplier is purely combinational.

Not represented:

- **Low-power gate style.** The architecture aims at a low-power gate style
  (efficient charge-recovery adiabatic logic). That is a transistor-level
  technique with no RTL equivalent. The RTL here gives the logic function only.
- **Published FPGA figures.** The reported logic levels, delays and LUT counts
  are for a Xilinx FPGA flow. They are not reproduced or claimed here.

## How far it has been verified

Every block was simulated exhaustively:

| testbench        | what it covers |
|------------------|----------------|
| `tb_vedic_mul4`  | all 256 operand pairs |
| `tb_cla8`        | all 131072 addend and carry-in combinations |
| `tb_rca8`        | all 131072 addend and carry-in combinations |
| `tb_vedic_mul8`  | all 65536 operand pairs, plus a directed corner set |

Each testbench compares its block against an integer reference. Each one also
counts how often the design's special carry paths are used, and fails if any is
never exercised:

- two-column carry forwarding in the 4x4 blocks;
- the lookahead adder's carry out (3006 pairs);
- Adder 2's carry out (524 pairs);
- products with bit 15 set.

Every testbench was also run against a deliberately broken copy of its block,
and each one caught the fault.

## Simulating

Each testbench is self-contained. It prints one line,
`TB_RESULT checks=N failures=M`, and then finishes. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb tb/tb_vedic_mul8.sv --top-module tb_vedic_mul8
./obj_dir/Vtb_vedic_mul8
```

Replace `vedic_mul8` with `vedic_mul4`, `cla8` or `rca8` to test a single
block. Every run takes well under a second.

## Changing it

- **Wider operands.** To build a 16x16 multiplier, apply the same nibble
  decomposition one level up: four `vedic_mul8` instances, a 16-bit lookahead
  adder and two 16-bit adders. The adders already take `WIDTH`. The carry-merge
  argument has to be checked again for the new widths.
- **Pipelining.** To add a register stage, the natural cut is between the four
  nibble products and the adder tree.
