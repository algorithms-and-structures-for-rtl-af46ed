# Expandable radix-4 Booth multiplier from 8x8 blocks

This is a multiplier-accumulator, `p = a * b + c`, built by tiling one
basic block: an 8x8 radix-4 Modified Booth multiplier whose partial products
are added in a carry-save array. The blocks are not joined by adding their
8x8 products afterwards, which would need extra adders and a long chain of
carry-propagate additions. Instead, every block's carry-save array continues
the arrays of its neighbours, so the whole tile behaves as one large
carry-save array. One carry-propagate adder at the end resolves it. The
default build is a 16x16 unit made of four blocks. Operands can be two's
complement or unsigned, each chosen on its own, so mixed signed x unsigned
products work too.

The structure follows the expandable Booth-array block described by
Haynes, Ferrari and Cheung in "Algorithms and Structures for Reconfigurable
Multiplication Units". The bit-level wiring between blocks is this design's
own. The source argues for 8x8 as the grain of a multiplier that can be
embedded many times in a reconfigurable fabric, and for radix-4 Booth with an
array (linear) reduction as the fastest expandable choice.

Everything is combinational: there are no clocks, registers or resets.

## Arithmetic of one block

**Recoding.** The multiplier slice is read two bits at a time, with one bit
of overlap: digit `i` is `-2*b[2i+1] + b[2i] + b[2i-1]`, a value in
{-2, -1, 0, 1, 2}. An 8-bit slice gives four digits, so four partial
products instead of eight. Bit `b[-1]` of a slice is the top bit of the
slice below it (0 for the lowest slice). With that rule, slices recoded one
by one give exactly the digits of the whole multiplier. An unsigned
multiplier needs one more digit, equal to its top bit, at weight 2^8 above
the slice. Only the top multiplier slice in unsigned mode produces it. In
every other case that fifth row is zero. Each digit travels as three select
lines, `{neg, two, one}` (`mbx_pkg::booth_sel_t`). The bit pattern 111
gives `neg = 1` with zero magnitude. The inverted row and its +1 then sum to
zero, so this case needs no special logic.

**Partial products.** A row selects 0, A or 2A and inverts it for a negative
digit. The +1 that completes the two's complement is not added by the row.
It is a separate "hot one" bit, placed in the carry word at the row's
lowest column, where a carry-save row always has a free slot. A row is split
across the multiplicand slices. Each lower slice gives 8 bits. The top slice
gives 10 bits (m + 2), because ±2A of an 8-bit slice needs two more bits,
and for a signed multiplicand the slice is sign-extended.
For 2A, a block needs the top bit of the next lower multiplicand slice
(`a_below`).

**Signs without sign extension.** A row's sign bit would normally be copied
into every column above it. Instead, the sign bits of rows 1-3 are inverted
and one constant, `-(2^11 + 2^13 + 2^15)` for the stand-alone block, is
added once. Row 0's own sign and that constant are folded together and
placed in the free columns above row 0. So the correction costs no
extra adder row. For a negative row 0 the constant's bits land in columns 9,
10, 12 and 14. The fifth (unsigned) row is last, so it is simply
sign-extended into its free columns.

**Reduction.** Each of the five rows is one carry-save adder row of full
adders (`csa_row` of `full_adder` cells): it adds the row's bits to the
running sum and carry words. Five rows per block means five full-adder
delays.

## How blocks tile

Block (i, j) multiplies multiplicand slice i by multiplier slice j. Its
least significant bit sits at product column `8*(i+j)`. For 16x16:

```
                 columns 31 ........ 16 15 ........ 8 7 ......... 0
 group j=0 (b[7:0])       [ block (1,0) ....... ][ block (0,0) ]   5 adder rows
 group j=1 (b[15:8])  [ block (1,1) ........ ][ block (0,1) ]      5 adder rows
                                                   carry-propagate adder
```

**Inside a group** (one multiplier slice) the blocks work side by side on the
same five adder rows. In row r a block adds into its own columns, starting
at `8*(i+j) + 2r`. Each row starts two columns higher than the one before,
so after every row except the last the block's two lowest columns leave it.
Three bits move right each time: two sum bits and the carry out of the
lowest column (`r_s`, `r_c`). The neighbour on the right needs them as the
two highest columns of its next row (`l_s`, `l_c`). A block's own top carry
always falls into its own next row, so nothing moves left. In the lowest
block the outgoing columns are finished, together with the hot ones, and go
to the final adder.

**Between groups**, a block's last row ends exactly eight columns above
where it started, which is where the block of the next multiplier slice at
the same multiplicand position starts. That block therefore takes the sum
bits directly as its first-row inputs. The carry bits shift up one column.
The carry out of an inner block's top column goes to the block on its left
in the next group.

**Widths.** Inner blocks add into 8 columns per row (40 full adders per
block). The block holding the top multiplicand slice adds into every column
up to the top of the product. That gives the inverted sign bits, the
correction constant and the upper carries a column to land in. It also means
no intermediate result ever needs sign extension.

**Decoders and position bits.** In each group only the block holding the top
multiplicand slice runs its recoder (`dec_en = 1`). The other blocks switch
their recoders off and take its select lines through `sel_in`. Each block has
three position inputs (`blk_pos_t`):

- `a_lsb`: the lowest multiplicand slice. Only this block adds hot ones.
- `a_msb`: the top multiplicand slice. This block adds sign bits and the correction constant.
- `b_msb`: the top multiplier slice. This block may add the unsigned extra row.

These are ordinary inputs, so the same logic serves every position. Only the
physical width `W` is a parameter.

**Delay.** The carry-save depth is `Q * 5` adder rows. For 16x16 that is
10 rows, whatever the number of multiplicand slices. The final
`(P+Q)*8`-bit carry-propagate adder comes after them.

## Multiply-accumulate

The first adder row has a whole input word free. The accumulate operand `c`
(full product width) enters there as the sum word of the first group. So
`p = a*b + c` costs no hardware beyond the input wiring and no extra delay.
It gives full-precision accumulation in every signedness mode. The result is
taken modulo 2^(product width). An accumulator loop (feeding `p` back into
`c` through a register) is left to the user.

## Interface of the top, `mb_multiplier`

| port | dir | width | meaning |
|---|---|---|---|
| `a` | in | `P*N` | multiplicand |
| `b` | in | `Q*N` | multiplier |
| `a_signed` | in | 1 | `a` is two's complement (else unsigned) |
| `b_signed` | in | 1 | `b` is two's complement (else unsigned) |
| `c` | in | `(P+Q)*N` | accumulate operand |
| `p` | out | `(P+Q)*N` | `a*b + c` modulo 2^((P+Q)*N) |

Parameters: `N = 8` (block size), `P = 2` and `Q = 2` (multiplicand and
multiplier slices). Other sizes work as set, for example `P = Q = 1` for a
plain 8x8 unit or `P = Q = 4` for 32x32. `N` must be even. The tests use
only `N = 8`.

## Files

| file | contents |
|---|---|
| `rtl/mbx_pkg.sv` | select-line and position types, recoding function |
| `rtl/full_adder.sv` | (3,2) counter |
| `rtl/csa_row.sv` | one carry-save adder row |
| `rtl/booth_decoder.sv` | recoder for one multiplier slice, with enable and extra digit |
| `rtl/booth_ppgen.sv` | one partial-product row for one multiplicand slice |
| `rtl/mb_block.sv` | the expandable 8x8 block |
| `rtl/cpa.sv` | final carry-propagate adder |
| `rtl/mb_multiplier.sv` | the tiled multiplier-accumulator (top) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_mb_multiplier_sizes` |

## Simulating

Each testbench compares against arithmetic it does itself and prints
`TB_RESULT checks=<n> failures=<m>`. Example with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_mb_multiplier \
  rtl/mbx_pkg.sv rtl/full_adder.sv rtl/csa_row.sv rtl/booth_decoder.sv \
  rtl/booth_ppgen.sv rtl/mb_block.sv rtl/cpa.sv rtl/mb_multiplier.sv \
  tb/tb_mb_multiplier.sv
./obj_dir/Vtb_mb_multiplier
```

What the testbenches cover:

- **`tb_mb_multiplier`** runs the default 16x16 unit: corner operands, then
  40,000 random vectors in all four signedness modes, with and without
  accumulation. It also counts how often each mechanism occurred:

  - each signedness mode;
  - accumulation;
  - a negative digit;
  - the `111` digit;
  - the unsigned extra digit.

  A mechanism that never occurred counts as a failure.
- **`tb_mb_multiplier_sizes`** runs 8x8, 16x8, 8x16, 24x16, 16x24, 24x24 and
  32x32 units.
- **`tb_mb_block`** checks three placements of the block:

  - stand-alone, exhaustively over all operand pairs in all modes;
  - as an inner block fed by external select lines: no bit of value may be
    lost;
  - as a top block.
- **`tb_booth_decoder`** and **`tb_booth_ppgen`** are exhaustive.

The units are combinational, so the tests check values, not cycle counts.

## Where this design departs from its source, and what to trust

- **Inter-block wiring** (the right-going columns, the top block reaching
  the top of the product, the hot-one slot) is this design's own. It has
  been checked for correctness at every size listed above.
- **Adder count.** The source counts 48 full adders per 8x8 Booth array
  block. Here an inner block has 40, and a block holding the top multiplicand
  slice more, because it spans to the top of the product: 60 for a
  stand-alone 8x8, 100 and 60 for the two top blocks of the 16x16. In the
  top block, constant-input full adders can be simplified by synthesis.
- **Row count.** Five adder rows per block matches the source's count of
  reduction stages for the Booth array block.
- **Accumulate width.** The source describes an n-bit `c` on the free inputs
  of the top row, with the upper half of a signed accumulation fed into the
  otherwise unused last row. This design takes a full-width `c` on the first
  row instead. The result is the same full-precision sum, and the last row
  stays reserved for the unsigned extra digit.
- **No bypassed rows.** In groups below the top multiplier slice, the fifth
  (unsigned) row carries zeros but still passes through its adder row. That
  costs one full-adder delay per group. Bypassing it would need a different
  hand-over format between groups.
- **Final adder.** It is a plain behavioural adder; its type is left to
  synthesis.
- **Not included:** sub-word (several independent small products at once)
  operation, pipelining registers, and the alternatives the source compares
  against (Baugh-Wooley blocks with tree reduction, additive multiplier
  modules).
