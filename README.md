# A partitionable 64-bit Booth multiplier

Multimedia instruction sets work on several short integers packed into one
wide word. This multiplier lets one 64x64 signed multiplier array serve
those instructions. The same array does one of these:

* one 64x64 multiply,
* two independent 32x32 multiplies, or four 16x16 multiplies (**PMUL**),
* a sum of products computed in the same pass (**PMADD**): `a0*b0 + a1*b1`
  on 32-bit sub-words, two such sums on 16-bit sub-words, or the sum of four
  16-bit products (an inner product, or one output of a 4-tap FIR filter).

An unpartitioned 64-bit multiplier already has enough multiplexors and adders
to build two 32-bit or four 16-bit multipliers. The work is in splitting it
without making every cell complicated, and without letting one sub-product
corrupt its neighbour on the way to the result. The design does this with
three ideas:

1. **Programmable multiplexor cells with masking.** Each Booth multiplexor can
   also act as a masked 0, a sign cell or a "P" cell. Which one it is depends
   on the mode only. Masking the cells outside the chosen sub-blocks makes a
   sub-product pass unchanged through the rest of the array.
2. **Sign and constant bits moved to the edge.** Each row carries one inverted
   sign bit. All the constant 1s that sign extension would need are collected
   into one extra row, which depends only on the mode.
3. **Boundary bits taken out of the carry-save array.** In the PMUL modes, the
   two highest bits of every result field are left out of the carry-save
   array and added back in the final adder. No carry can then cross from one
   field into the next inside the array. The carry-save array is therefore
   free to group rows in any way. It uses an array of arrays with unequal
   sizes (7-7-8-11), which would otherwise be impossible.

The RTL is synthesizable SystemVerilog in `rtl/`. Each block has a
self-checking testbench in `tb/`.

## Operation and result layout

The operands are `in_a` (the multiplicand) and `in_b` (the multiplier).
Both are 64 bits wide. Sub-word `k` is bits `[k*W +: W]`, with W = 64, 32 or
16. All numbers are two's complement. The 128-bit result `out_p` holds these
fields:

| `in_mode`        | operation                              | result field(s) in `out_p`                  |
|------------------|----------------------------------------|---------------------------------------------|
| `MODE_MUL64`     | a * b                                  | `[127:0]`                                   |
| `MODE_PMUL32`    | a_k * b_k, k = 0, 1                    | `[64k +: 64]`                               |
| `MODE_PMUL16`    | a_k * b_k, k = 0..3                    | `[32k +: 32]`                               |
| `MODE_PMADD32`   | a0*b0 + a1*b1                          | `[32 +: 65]`                                |
| `MODE_PMADD16`   | a0*b0 + a1*b1 ; a2*b2 + a3*b3          | `[16 +: 33]` ; `[80 +: 33]`                 |
| `MODE_PMADD16X4` | a0*b0 + a1*b1 + a2*b2 + a3*b3          | `[48 +: 34]`                                |

PMADD sums are exact: they neither saturate nor truncate. Bits outside the
listed fields have no meaning in the PMADD modes. The position of each sum
follows from where the products meet in the array (see below). A system that
wants sums at bit 0 adds a shifter after the multiplier.

Interface timing is the same in every mode. Operands presented with `in_valid`
in cycle t produce `out_valid`, `out_mode` and `out_p` in cycle t+3. A new
operation, in any mode, can start every cycle.

```
 in_a,in_b,in_mode ─► [operand reg] ─► Booth encode ─► multiplexor array ─► 4 sub-arrays ─► 3 rows of (4,2) ─► [sum/carry reg] ─► segmented CPA ─► [result reg]
                                                     └► constant row, collided-P row ─┘
```

The mode field has 3 bits. Its two unused codes behave as `MODE_MUL64`, and
an assertion in `pmul_top` reports them if they are issued.

`rst_n` is a synchronous active-low reset. It clears the valid bits and all
registers.

## How the array is partitioned

The 64 multiplier bits are radix-4 Booth encoded into 32 digits in
{-2,-1,0,1,2}, one per row. Row j has weight 4^j. In a mode with P parts
of W bits, part q owns rows `q*W/2 .. (q+1)*W/2-1`. The encoder forces the
bit below each part to 0 (`booth_encoder`), so each part encodes its own
signed sub-word.

Think of the multiplier as a P x P grid of sub-blocks: row-part q crossed
with multiplicand sub-word s. The product of that sub-block has weight
2^((q+s)W).

* **PMUL** uses the diagonal, s = q. Product k then lands at weight 2^(2kW),
  which is exactly result field k. All other sub-blocks are masked to 0.
* **PMADD** uses the anti-diagonal inside each group of G parts. For example,
  s = 3-q for the four-product sum. Every product of a group then has the
  same weight, and the carry-save array adds them for free. The multiplier
  sub-words are steered so that the part meeting a_k encodes b_k. The sum
  lands at weight (q+s)W: 48 for the four-product sum, 32 for the 32-bit
  pair, and 16 and 80 for the two 16-bit pairs.

All of this is wiring selected by the mode. The functions in `pm_pkg`
(`num_parts`, `group_size`, `seg_of_part`, `result_base`, `result_bits`)
describe it. Every module evaluates them at elaboration time, once for each
mode.

### The multiplexor cell

`booth_mux_cell` has the usual Booth inputs (`one`, `two`, `neg`, and the
multiplicand bits `m` and `m_x2`). It adds four controls:

| type      | row_sel | msb | lsb | output                                      |
|-----------|---------|-----|-----|---------------------------------------------|
| regular   | 1       | 0   | –   | selected multiple of M, inverted if neg     |
| S-bar     | 1       | 1   | –   | same, inverted once more (fed the sign bit)  |
| L         | 1       | 0   | –   | regular with `m_x2` = 0 (lowest bit of a sub-word) |
| P         | 0       | –   | 1   | `inv_1` = neg of the row above              |
| mask      | 0       | –   | 0   | 0                                           |

`pp_generator` holds 32 rows of 67 cells at columns -2..64. Row j is shifted
by 2j, so cells of equal weight line up two columns apart. In each mode, the
cells of row j's own sub-word are regular, with an L cell at the bottom. The
cell one column above them is S-bar. The cell two columns below the sub-word
of the row above is a P cell. All other cells are masked.

## Signs without sign extension

A row produces W bits `mux` plus `neg` for the two's-complement +1. Its true
value, d*A, needs W+1 bits with sign s. Instead of sign-extending s, each row
places S-bar = 1-s at column W. This adds exactly 2^W to the row, whatever
the digit. A part of W/2 rows therefore carries a known surplus:

    X = 2^W * (1 + 4 + ... + 4^(W/2-1)) = 2^W * (2^W - 1) / 3

The constant row (`const_vector_gen`) cancels it. For each result field of R
bits at weight B, summing G products, the row adds

    K = ((2^R - G*X) mod 2^R) << B

The constant depends only on the mode. Its bit pattern is `1010…1011`
followed by zeros. For example, a 16-bit PMUL field gets `0xAAAB << 16`.
The same row also holds the P bit of the last Booth row, which has no row
below it. The arrays therefore add 33 rows: 32 Booth rows and the constant
row.

### P bits that collide (PMADD)

A row's P bit normally goes into the next row, two columns below that row's
own cells. At a part boundary in PMADD, the next part meets a *lower*
sub-word, so that position falls inside its active cells. The colliding bits
are:

* three bits in the four-product sum,
* two bits in the paired 16-bit mode,
* one bit in the 32-bit PMADD.

`p_overlap_csa` takes these bits out and turns them into one extra row. In the
four-product case all three have weight 62, so a (3,2) counter adds them.
This row joins array 3, which is one adder level shorter than the critical
path, so it adds no delay.

## Keeping PMUL fields apart

This is the part that needs the most care.

Within one PMUL field of 2W bits, all the bits add up to
`a_k*b_k + X + K = a_k*b_k + 2^(2W)`. Whenever the product is not negative,
that sum reaches 2^(2W), and a carry would run into the next product.

Two bits are moved out of the field, into the final adder:

* the constant's top bit, which is always 1, at column 2W-1;
* the S-bar of the field's last Booth row, at column 2W-2.

Each of these is the only bit from the array in its column. The bits left in
the field then add up to

    a_k*b_k + 2^(2W-2) + s * 2^(2W-2),   s = 1 - S-bar in {0,1}

This total lies in `[2^(W-1), 3*2^(2W-2)]` for every pair of W-bit operands,
which is below 2^(2W). A carry out of the top column of a field would need
the bits still in that field to be worth at least 2^(2W). That never happens,
so no (3,2) counter and no (4,2) combiner ever sends a carry across a field
boundary. This holds however the rows are grouped. As a result, the carry-save
array needs no mode-dependent gating, and its sub-arrays can have unequal
sizes.

`seg_cpa` adds the sum and carry vectors in 16-bit slices. The carry between
two slices is cut at PMUL field boundaries. The two moved bits are then added
into the two top columns of each field, modulo the field width (`10` or `11`
in binary). The PMADD and 64-bit modes use the full carry chain.

The same treatment is applied in 64-bit mode. There it is harmless, because
the field is the whole product.

The PMADD fields need no such trick. A group's constant is taken modulo
R = 2W + log2(G), so the group's total stays below 2^(R+1). That is far below
the next group, which starts 64 bits higher.

## Adder organisation

The 33 rows are added by an array of arrays:

| array | rows                          | CSA levels |
|-------|-------------------------------|------------|
| 1     | 0–6                           | 5          |
| 2     | 7–13                          | 5          |
| 3     | 14–21 + collided-P row        | 7          |
| 4     | 22–31 + constant row          | 9          |

Each array is a linear chain of (3,2) rows (`csa_array`, built from
`csa_3_2`). The arrays are joined by three rows of (4,2) combiners
(`comb_4_2`), in the order ((1+2)+3)+4. Each (4,2) join costs two full-adder
delays. Every path through the array therefore has at most 11 full-adder
levels, and the arrays finishing later enter later. The array sizes are
parameters of `pmul_top` (`A1`..`A4`), and an assertion checks that they add
up to N/2+1.

## Modules

| file | role |
|------|------|
| `pm_pkg.sv` | mode enum `pm_mode_e`, Booth select struct, partition functions |
| `pmul_top.sv` | top: registers, datapath wiring, pipeline |
| `booth_encoder.sv` | 32 radix-4 encoders with sub-word boundaries and PMADD steering |
| `booth_mux_cell.sv` | programmable multiplexor cell |
| `pp_generator.sv` | 32 x 67 cells and their per-mode programming |
| `const_vector_gen.sv` | constant row + last P bit; constant bits for the final adder |
| `p_overlap_csa.sv` | collided P bits of PMADD into one row |
| `csa_3_2.sv`, `csa_array.sv` | carry-save rows and sub-arrays |
| `comb_4_2.sv` | (4,2) combiner row |
| `seg_cpa.sv` | segmented final adder with boundary correction |

Every module has the parameter `N` (default 64) or a width `W` (default 128).
Other values of N are possible if N is a multiple of 8 and the array sizes are
changed to match, but only N = 64 has been simulated.

## Simulating

Each testbench is a module without ports, `tb/tb_<block>.sv`. It prints
`TB_RESULT checks=<n> failures=<m>` and stops itself; it also has a
watchdog. The package must be read first. For example:

```
verilator --binary --timing --assert -Wno-fatal rtl/pm_pkg.sv \
    $(ls rtl/*.sv | grep -v pm_pkg) tb/tb_pmul_top.sv --top-module tb_pmul_top
./obj_dir/Vtb_pmul_top
```

`tb_pmul_top` runs the full-size design (N = 64, default parameters). It
sends 6000 operations in random order of mode, mostly back to back, through
the pipeline. Operands are random, mixed with the corner sub-words 0, -1, the
most negative value and the most positive value. Each result field is
compared with the simulator's own signed arithmetic, and the latency is
checked to be exactly 3 cycles. The testbench also counts how often each
mechanism happened, and fails if any never did:

* every mode, and mode switches between back-to-back operations,
* the collided-P row being non-zero,
* dropped S-bar bits,
* field carries that the segmented adder discarded.

It runs in well under a second.

`tb_workloads` runs the multimedia workloads the design is meant for, on the
full-size design, with one operation issued every clock:

* 256 operations of 16-bit PMUL (four products per clock),
* 256 operations of 32-bit PMUL (two products per clock),
* 256 outputs of a 4-tap FIR filter with 16-bit samples, using
  `MODE_PMADD16X4` with the coefficients in `in_a` and the last four samples
  in `in_b`.

It checks every value, and it checks that each stream of 256 operations
finishes exactly 255 + 3 cycles after it starts.

The unit testbenches check each block against an independent model:

* the mux cell against its type table, exhaustively,
* the Booth digits against the sub-word value,
* every partial product row against `2^(2j+sW) * (d*A - neg + 2^W)`,
* the constant rows against hand-computed values,
* the adders against plain arithmetic.

## How far to trust it, and what differs from the original design

* **Verified:** all six modes give bit-exact results in simulation at full
  size, including the worst-case operands. Every unit testbench was also run
  against a deliberately broken copy of its block, and each one detected the
  fault. No equivalence proof has been done.
* **Circuit style:** the original multiplier is a custom dual-rail domino
  layout in a 0.35 µm process, with a reported 4.9 ns array delay and
  6.5 mm² of area. This RTL is plain static logic. Those timing and area
  figures do not carry over, and nothing here checks them.
* **Bit placement is this design's own construction.** The original places
  the constant and sign bits by equivalence rules that are not reproduced
  here. The following are rebuilt from the published principles and proven
  correct above:
  * the S-bar-plus-constant form,
  * the exact columns of the P cells,
  * which two bits leave each field.

  As one visible consequence, the pair added back at the top of each field is
  `10`/`11`, where the original describes `01`/`10`.
* **The following are choices of this design:**
  * the mode encoding,
  * the PMADD operand pairing (a_k with b_k) and the positions of the sums,
  * the three-register pipeline,
  * the reset,
  * the assignment of rows to sub-arrays,
  * the 16-bit slices of the final adder.
* **Not built:**
  * the second, PMUL-only architecture (configuration II, with a simpler
    masked cell and the sign bits routed to the left side of the array),
  * the PMUL-only variant of this architecture,
  * the tree-of-arrays alternative.

  The multiplier here covers all the operations of each of them.
* Only signed operands are supported. Unsigned multiplication would need one
  more Booth row.
