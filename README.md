# Array-of-arrays mantissa multiplier (53 x 53 bits)

A double-precision floating-point multiplier spends most of its time adding
partial products. There are two classic ways to do that addition:

- A **full carry-save array** adds one partial product per stage. Every wire
  goes only to the neighbouring cell, so the layout is regular and the cells
  can be fast. The price is a long chain of adders: about 25 CSA stages for
  27 partial products.
- A **Wallace or 4-2 tree** needs only about 7 stages. Its wiring is dense and
  irregular, and those wires load the cells and slow them down.

This design sits between the two. The 27 Booth partial products are split into
**four groups of adjacent rows**. Each group is added by its own small
carry-save array. A fifth small array then merges the four results: a chain of
4-2 compressors running along the datapath. Each array's result crosses only
the next array, so the wiring stays almost as sparse as in a full array. The
longest carry-save path is 11 CSAs instead of 25.

The RTL is the logic of this organisation, cell group by cell group. It
produces a 106-bit product in carry-save form, then adds it and rounds it to a
53-bit mantissa (round to nearest, ties to even).

## Data flow

```
 a, b (53 b) ─► input latch ─┬─► sub-array 1 (rows  0..3,  2 CSAs) ─┐
                             ├─► sub-array 2 (rows  4..7,  2 CSAs) ─┤ compressor 1
                             ├─► sub-array 3 (rows  8..15, 6 CSAs) ─┤ compressor 2
                             └─► sub-array 4 (rows 16..26, 9 CSAs) ─┘ compressor 3
                                         low bits of all arrays ──► compressor 4 (top)
            ─► output latch (106-bit sum + 106-bit carry) ─► final add + rounding ─► mant, ovf
```

Each sub-array passes the sign bit of its last row to the first row of the
next sub-array (see below).

## Booth rows and the sign bits

The multiplier `b` is recoded in radix-4 Booth form: digit i is
`-2*b[2i+1] + b[2i] + b[2i-1]`, with `b[-1] = 0`. It lies in -2..+2. An
unsigned 53-bit operand needs 27 digits. The top digit sees a zero above bit 52,
so it is never negative (the top module asserts this).

- `booth_encoder` turns each 3-bit window into the controls `one`, `two` and
  `neg`.
- `booth_mux` forms 0, A or 2A as 54 bits. When `neg` is set it inverts them,
  so a negative row arrives in ones' complement. The missing +1 is the row's
  **sign bit** `s`.

Each row is laid into the 106-bit product like this (bit positions are
absolute):

| row | contents |
|-----|----------|
| 0   | `pp[53:0]` at bit 0, then `s, s, ~s` at bits 54, 55, 56 |
| i>0 | `s(i-1)` at bit 2i-2, `pp[53:0]` at 2i, `~s` at 2i+54, `1` at 2i+55 |

The leading `~s`/`1` bits are a sign extension added in advance. Without them
every negative row would need ones all the way up to bit 105. A row's sign bit
is not added in its own row. It goes into the next row, in the free position
two bits below that row's partial product. The last row of sub-array j
therefore sends its sign to the first row of sub-array j+1 (`sign_out` to
`sign_in`). Anything above bit 105 is dropped. The rows sum to exactly
`a*b` modulo 2^106, and the product of two 53-bit numbers fits in 106 bits.

## Sub-arrays (`aoa_subarray`)

A sub-array holds P consecutive rows, starting at row FIRST. Its first CSA
adds three rows, and each later CSA adds one more row to the running sum and
carry, so it has P-2 CSAs. The default partition is **4, 4, 8, 11 rows (2, 2,
6, 9 CSAs)**. Why the later arrays are larger:

- Sub-array 1's result has to cross sub-array 2 on long wires, and its
  compressor's output crosses sub-array 3, and so on.
- Making the later arrays deeper means both inputs of each compressor arrive
  at about the same time, with the wire delay counted as roughly one CSA.
- With these sizes the critical path lies entirely in sub-array 4 plus
  compressor 3.

The partition **5, 5, 7, 10 (3, 3, 5, 8 CSAs)** gives the fewest CSAs when
wire delay is ignored. It is available through the top's P1..P4 parameters
and is tested too.

A sub-array works in a local bit frame. The frame starts at
`BASE = 2*FIRST-2`, the position of the incoming sign bit (0 for the first
sub-array). It ends one place above the leading 1 of the sub-array's last row.
For the default partition the frames are bits 0..61, 6..69, 14..85 and
30..105, so the arrays are 62, 64, 72 and 76 bits wide.

In silicon, every stage passes its upper bits on, shifted down by two places,
and two finished result bits leave the array at each stage. In the RTL each
stage is written at the sub-array's full width. The finished bits are simply
the low bits of the vectors, which later stages leave unchanged. Synthesis
removes the cells whose inputs are constant zero.

**Why nothing is lost at the top of the frame:**

- Each new row reaches two places above the partial sum before it.
- So the two top cells of a stage see only that row's `{~s, 1}` bits, and
  they never produce a carry.
- Therefore `sum + carry` of a sub-array equals the exact sum of its rows, as
  an integer.

The combining array depends on this exactness.

## Combining array (`aoa_combiner`): the hardest part

The four carry-save pairs have to become one. Whether an array's bits are
still "in the datapath" depends on where they sit. Let the boundaries be the
start bits of sub-arrays 2, 3 and 4, plus the top of the last row: **6, 14,
30 and 52** for the default partition.

| bits      | adder                           | inputs                               |
|-----------|---------------------------------|--------------------------------------|
| 0..5      | none (already final)            | sub-array 1                          |
| 6..13     | compressor 4 (on top)           | sub-arrays 1 and 2                   |
| 14..29    | compressor 4                    | compressor 1 output, sub-array 3     |
| 30..51    | compressor 4                    | compressor 2 output, sub-array 4     |
| 14..70    | compressor 1                    | sub-arrays 1 and 2                   |
| 30..86    | compressor 2                    | compressor 1 output, sub-array 3     |
| 52..105   | compressor 3                    | compressor 2 output, sub-array 4     |

Every compressor (`compressor42`) is two CSA rows. Bits below a boundary do
not change once the next sub-array starts, so cutting the pairs into these
ranges loses nothing.

Compressors 1 and 2 are 57 bits wide. Each ends two places above the last
row of the sub-array it serves, at bits 71 and 87. That is enough:

- The running sum of sub-arrays 1..j stays below 2^71 (j = 2) and below
  2^87 (j = 3).
- This holds because each sub-array delivers its exact value (see above).
- So no carry can leave the top of either compressor.

The same compressors would not be safe for arbitrary carry-save inputs. They
are safe for the ones the sub-arrays produce. Compressor 3 covers the 54 most
significant bits, 52..105.

Two carries cross one seam: compressor 4 produces them at bit 52. One is the
carry of its first CSA row out of the top cell (`cout`), the other is the
carry of its top cell. They enter compressor 3:

- `cout` goes into compressor 3's carry-in.
- The top-cell carry goes into the lowest slot of compressor 3's carry
  vector, which is always empty.

So the two halves join with no carry-propagate step. The output latch holds
106 sum bits and 106 carry bits.

## Final addition and rounding (`round_unit`)

For normalised inputs (hidden bit set) the product lies in [2^104, 2^106).
Bit 105 is the overflow bit.

- **Overflow bit 0:** the mantissa is bits 104..52, the round bit is bit 51,
  and the sticky bit is the OR of bits 50..0.
- **Overflow bit 1:** everything moves up one place.

The adder works in two steps:

1. The 51 lowest bits are added first. This gives a carry into the upper part
   and the sticky bit of those bits.
2. The upper 55 bits are added with that carry.

The mantissa is incremented when `round & (sticky | lsb)`. If that increment
carries out of an all-ones mantissa, the result becomes 1.000…0 and `ovf` is
set. `ovf` is the exponent increment the exponent path has to apply.

Operands without the hidden bit are multiplied correctly: `cs_sum + cs_carry`
is exact. But the rounding positions are fixed, so they do not normalise such
a product.

## Interface and timing (`aoa_multiplier`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset clears all latches and valid flags |
| `in_valid`, `a`, `b` | in | 1, 53, 53 | operation request with mantissas (hidden bit included) |
| `cs_valid`, `cs_sum`, `cs_carry` | out | 1, 106, 106 | output latch: `cs_sum + cs_carry = a*b` (mod 2^106) |
| `res_valid`, `mant`, `ovf` | out | 1, 53, 1 | rounded mantissa and overflow bit |

The design is fully pipelined and accepts one operation per clock. If
`in_valid` is high in cycle 0:

- The operands are in the input latch in cycle 1. The whole Booth and
  carry-save network then settles within that one cycle: this is the
  latch-to-latch path.
- The carry-save product is valid in cycle 2.
- The rounded result is valid in cycle 3.

Parameters: `N` (53, the mantissa width) and `P1..P4` (4, 4, 8, 11). P1..P4
must add up to 27 (`(N+2)/2`) and each must be at least 3, which is checked
at elaboration. `N` is meant to stay 53. The row format was verified for that
width only.

## Where this RTL stops

- The circuit-level side of the design is not represented: dual-rail domino
  cells, the 80-lambda bit pitch, wire loading and the resulting delays of
  about 10 ns in 1 µm CMOS. Timing balance between the sub-arrays shows up
  only as the partition parameters.
- The latches are modelled as edge-triggered registers with a load enable.
  The pipeline, the valid flags, the reset and the register after rounding
  are choices of this implementation.
- A row's sign bit is added by the next row's CSA stage. It sits two places
  below that row's partial product, and the stage's two lowest cells take it
  in. No separate stage is needed for it.
- The final adder and rounding are written behaviourally: two `+` operators
  and an increment, not a dedicated rounding-adder structure. A synthesis
  tool picks the adder architecture.
- Compressor 4 feeding its top carries into compressor 3 is this design's
  solution for the seam at bit 52.

## Files

| file | contents |
|------|----------|
| `rtl/aoa_pkg.sv` | mantissa width, Booth control struct, number of partial products |
| `rtl/booth_encoder.sv` | radix-4 Booth encoder |
| `rtl/booth_mux.sv` | Booth multiplexer row (0 / A / 2A, ones' complement, sign) |
| `rtl/csa_row.sv` | carry-save adder row |
| `rtl/compressor42.sv` | 4-2 compressor from two CSA rows, with carry-in/out |
| `rtl/aoa_subarray.sv` | Booth carry-save sub-array |
| `rtl/aoa_combiner.sv` | compressors 1-4 and the bit-range bookkeeping |
| `rtl/mul_latch.sv` | input/output latch |
| `rtl/round_unit.sv` | final addition and round to nearest even |
| `rtl/aoa_multiplier.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_aoa_multiplier_aoa1.sv` | top level with the 5, 5, 7, 10 partition |

## Verification

Each testbench compares its module with values it computes by plain integer
arithmetic, and ends with a line `TB_RESULT checks=<n> failures=<n>`.

- The sub-array test uses the closed form of each row's value
  (`d*A*4^i` plus the sign-bit and sign-extension terms), not the row layout.
- The top-level test streams 4000 products back to back with random idle
  cycles, at the default configuration. It checks the carry-save sum and the
  rounded result against `a*b` and checks the 2- and 3-cycle latencies.
- It also fails if some mechanism was never exercised. The mechanisms are:
  - a sign bit handed between each pair of adjacent sub-arrays;
  - products with and without the overflow bit;
  - round-up, an exact tie rounded to even, and the rounding carry into the
    next binade;
  - idle cycles;
  - operands without the hidden bit.

To simulate with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/aoa_pkg.sv tb/tb_aoa_multiplier.sv --top-module tb_aoa_multiplier -o sim
./obj_dir/sim
```

Replace `tb_aoa_multiplier` with any other testbench name to run that one.
The simulator has only two states, so everything that is read is reset or
driven.
