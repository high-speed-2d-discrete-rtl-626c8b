# 8x8 2-D DCT/IDCT processor with distributed arithmetic

This is a streaming processor that computes the forward or inverse 8x8
two-dimensional discrete cosine transform, the transform at the core of
JPEG and MPEG. It uses no multipliers. Every product of a sample with a
cosine constant is formed by distributed arithmetic (DA): small ROM tables
are addressed by one bit of several operands at a time, and the words read
out are added up with shifts. The 2-D transform is split into a row pass and
a column pass with a transpose memory between them. The memory has two banks,
so the row pass of one block overlaps the column pass of the block before it.

```
             +-------------+   +---------+   +-------------------+   +-------------+   +---------+
 in_data --->| 1-D DCT/IDCT|-->| limiter |-->| transpose memory  |-->| 1-D DCT/IDCT|-->| limiter |---> out_data
 mode    --->|  (row pass) |   | 16 bit  |   | 2 x 64 x 16 bit   |   | (col. pass) |   | 16 bit  |
             +-------------+   +---------+   | row-major write,  |   +-------------+   +---------+
                                             | column-major read |
                                             +-------------------+
```

Both 1-D units are the same module (`dct_1d_unit`). Each one handles both
directions, and the direction can change from one block to the next.

## The transform and its factorisation

The 1-D transform is the orthonormal 8-point DCT-II,

    X(k) = 1/2 C(k) sum_{m=0..7} x(m) cos((2m+1) k pi / 16),   C(0) = 1/sqrt(2), C(k>0) = 1,

and its inverse is the transpose. Two passes give the 2-D transform with
the usual factor 1/4 C(u) C(v). Chen's factorisation halves the work. The
even outputs depend only on the sums s(i) = x(i) + x(7-i). The odd outputs
depend only on the differences d(i) = x(i) - x(7-i). Each half is a 4x4
matrix over seven constants:

```
 [X0]   [A  A  A  A] [s0]        [X1]   [D  E  F  G] [d0]
 [X2] = [B  C -C -B] [s1]        [X3] = [E -G -D -F] [d1]
 [X4]   [A -A -A  A] [s2]        [X5]   [F -D  G  E] [d2]
 [X6]   [C -B  B -C] [s3]        [X7]   [G -F  E -D] [d3]

 A = cos(pi/4)/2   B = cos(pi/8)/2   C = sin(pi/8)/2
 D = cos(pi/16)/2  E = cos(3pi/16)/2 F = sin(3pi/16)/2  G = sin(pi/16)/2
```

The inverse uses the transposed even matrix. The odd matrix is symmetric,
so it is the same in both directions. The inverse first computes an even
part e(m) from X0, X2, X4, X6 and an odd part o(m) from X1, X3, X5, X7. An
output butterfly then gives x(m) = e(m) + o(m) and x(7-m) = e(m) - o(m).
So a direction change only moves the butterfly from the input side
(forward) to the output side (inverse) and swaps the even ROM tables.

The constants are held as 16-bit two's complement words with 14 fraction
bits (`dct_pkg`: A = 5793, B = 7568, C = 3135, D = 8035, E = 6811,
F = 4551, G = 1598).

## Inside a 1-D unit: distributed arithmetic

Each of the eight outputs is a dot product of four operands with four
constants, y = c0 v0 + c1 v1 + c2 v2 + c3 v3. Write each 17-bit
two's-complement operand as bits b(k,n). Then

    y = - sum_k c_k b(k,16) 2^16  +  sum_{n=0..15} ( sum_k c_k b(k,n) ) 2^n .

The bracket can take only 16 values, one for each pattern of the four bits
b(0,n)..b(3,n). A 16-word ROM (`da_rom`) holds them all. The product then
needs one table lookup per bit position and one shift-add (`da_accumulator`).
The sign bit carries negative weight. It is handled by subtracting its ROM
word instead of adding it, so the table is not doubled for it.

The unit works on one 8-sample vector at a time, in four steps:

1. **Input register.** Samples arrive one per handshake into an 8-word
   register. The direction is taken from the vector's first sample.
2. **Pre-processing** (`dct_preproc`). This step forms eight 17-bit operands
   in parallel. In the forward direction they are the butterfly sums and
   differences. In the inverse direction they are just the inputs regrouped
   into even and odd indices. The operands are loaded into
   parallel-in/serial-out shift registers.
3. **DA engine.** This step takes 17 cycles and reads the operands MSB
   first. In each cycle, ROMs 0..3 are addressed by the current bits of
   operands 0..3, and ROMs 4..7 by the bits of operands 4..7. Each
   accumulator does `acc = -rom` on the sign-bit cycle and
   `acc = 2*acc + rom` afterwards. After the 17th bit, every accumulator
   holds its dot product exactly, scaled by 2^14. All eight outputs run in
   parallel, one ROM and one accumulator each. Each ROM has 32 words: 16 per
   direction, selected by the mode bit.
4. **Post-processing** (`dct_postproc`). In the inverse direction this step
   applies the output butterfly. It then rounds every result half-up to an
   integer (add 2^13, shift right 14) and puts the eight words into an output
   register. They leave one per handshake, in index order 0..7. A separate
   `dct_limiter` after the unit saturates them to 16 bits.

The input register fills while the engine works on the previous vector. The
output register drains while the engine works on the next one. If the output
register still holds undelivered words when the engine finishes, the engine
keeps its results and waits. The `stall` output flags this.

Widths: the samples are 16 bits and the operands 17. The ROM words are 16
bits; the largest is 4A = 23172. The accumulators are 32 bits, which holds
every result exactly: |y| < 1.42 * 2^16 * 2^14 < 2^31. The rounded results
are 20 bits wide before the limiter.

## The accumulator adder

The shift-accumulator sits on the critical path, so its 32-bit adder
(`csel_adder32`) is a ripple/carry-select hybrid. The word is cut into
groups of 4, 4, 5, 6, 7 and 6 bits, from the LSB. The lowest group is a
ripple-carry adder. Each higher group computes its sum twice with two
ripple-carry adders, once for carry-in 0 and once for carry-in 1. A
multiplexer picks the right one when the carry from below arrives. The
group widths grow towards the top, so each group's ripple finishes about
when its select carry arrives. The carry path is then the 4-bit ripple plus
five multiplexers (4 + 5 = 9 stages), instead of a 32-bit ripple.
Subtraction (the sign-bit cycle) is done as a + ~b + 1 using the carry-in.

## Transpose memory and row/column pipelining

The row pass writes its results in the order it produces them, which is
row-major: row r, column c goes to address 8r + c. The column pass must read
column by column. Read number t = 8c + r therefore uses address 8r + c: the
6-bit read counter with its two 3-bit halves swapped (`transpose_addr_gen`).

There are two 64x16 banks (`transpose_ram`, synchronous write and
asynchronous read). The banks are used in ping-pong:

- The writer fills one bank and marks it full. It then moves to the other
  bank, as soon as that bank is empty.
- The reader empties a full bank and marks it empty. It then moves to the
  other bank.

The row pass of block n+1 therefore runs while the column pass reads block n.
If both banks are full, the row pass is held off and stalls in turn. Each
bank carries the direction flag of its block, so a DCT block and an IDCT
block can follow each other directly.

## Interface and timing (`dct2d_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `mode` | in | 1 | 0 = forward DCT, 1 = inverse; sampled with the first sample of each block |
| `in_valid`, `in_ready`, `in_data` | in/out/in | 1/1/16 | input samples, signed, row-major within a block (x[r][c] is sample 8r+c) |
| `out_valid`, `out_ready`, `out_data` | out/in/out | 1/1/16 | results, signed, **column-major** within a block (word 8v+u is Z[u][v]) |
| `out_mode` | out | 1 | direction of the block being output |
| `events` | out | 5 | per-cycle flags: [0] row-pass stall, [1] column-pass stall, [2] row limiter saturating, [3] column limiter saturating, [4] both transpose banks full |

Both streams use valid/ready: a word moves on a clock edge where both are
high. The results are in column-major order because that is the order the
column pass produces them. A consumer that needs row-major order must
reorder them.

Timing, with a continuous input and an always-ready output:

- A 1-D unit accepts one vector every 18 cycles (17 bit cycles plus one
  load cycle).
- A result vector is presented 19 cycles after the edge that accepted the
  vector's last sample.
- The sustained rate is one 8x8 block per 144 cycles. The row and column
  passes run at the same rate and overlap fully.
- The first result of the first block appears about 188 cycles after its
  first sample.

## Precision

Both passes round to integers and saturate to 16 bits. The testbenches
compare the results against a real-valued model of the same two passes
(rounded and saturated in the same places). For pixel-range inputs the
difference is at most 1. An inverse transform of rounded forward
coefficients returns the original pixels within 2. Very large inputs lose a
few more LSBs to the 14-bit constants; the testbench tolerance for them is
24.

## Choices made in this design

These points are not fixed by the scheme described above. They are this
design's choices:

- Sample width is 16 bits in and out. The transpose memory holds rounded
  16-bit row results, so there are no extra fraction bits between the passes.
- Bit-serial DA, MSB first, with one accumulator per output coefficient.
  Eight accumulators work in parallel. A single shared accumulator would be
  smaller but eight times slower.
- Serial one-word-per-cycle interfaces with valid/ready handshakes, and the
  per-block direction flag.
- Two ping-pong transpose banks. The limiter saturates. Results are rounded
  half-up.
- Coefficient precision: 14 fraction bits.
- The timing figures above are this RTL's. No target clock rate is implied;
  the RTL is technology-independent.

## Files

`rtl/` holds one module or package per file:

| file | contents |
|---|---|
| `dct_pkg.sv` | widths, constants A..G, direction type, ROM-word function |
| `dct2d_top.sv` | top level: the 2-D processor |
| `dct_1d_unit.sv` | one 1-D DCT/IDCT unit (input register, DA engine, output register) |
| `dct_preproc.sv` | input butterfly / regrouping |
| `da_rom.sv` | one DA table (32 words, computed from the constants at elaboration) |
| `da_accumulator.sv` | shift-accumulator |
| `csel_adder32.sv`, `ripple_adder.sv` | the 4-4-5-6-7-6 carry-select adder and its ripple groups |
| `dct_postproc.sv` | output butterfly and rounding |
| `dct_limiter.sv` | 16-bit saturation |
| `transpose_ram.sv` | 64x16 memory bank |
| `transpose_addr_gen.sv` | row/column address generator and ping-pong bank control |

`tb/` holds a self-checking testbench `tb_<module>.sv` for every module except
the `ripple_adder` helper, which the adder's testbench covers. It also holds
`dct_ref_pkg.sv`, a real-valued reference (DCT/IDCT from the cosine
definition, rounding and saturation). Every testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_dct2d_top` streams 40 blocks, mixing directions, random pixels,
  inverse round trips and saturating blocks. It runs with the output first
  unthrottled, then throttled. It checks every result, the 144-cycle block
  period, and that each mechanism happens: both stalls, both saturations,
  both banks full, input back-pressure and a direction change.
- `tb_image_codec` is a compression workload. It generates a 512x512 8-bit
  image with shading, edges, texture and noise. It runs the image through
  the processor in forward mode (with the JPEG level shift of 128), then
  quantises the coefficients with the JPEG luminance table. The dequantised
  coefficients go back through in inverse mode. The result is compared with
  the same chain in real arithmetic. The hardware chain gives MSE 16.71
  (35.90 dB), against 16.64 (35.92 dB) for real arithmetic. About 0.6% of
  the quantised coefficients round differently. Every block of both passes
  takes exactly 144 cycles. The run is 1.18 million cycles and takes a few
  seconds.
- `tb_dct_1d_unit` checks the 1-D results, the 18-cycle period, the
  19-cycle latency and engine stalls.
- The leaf testbenches check the adder against `+`, including carries across
  every group boundary. They check the ROM words against the cosine
  definition, the accumulator against multiplication, the butterflies and
  rounding against formulas, the limiter over its whole input range, and the
  memory and the transpose order.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dct_pkg.sv tb/dct_ref_pkg.sv tb/tb_dct2d_top.sv --top-module tb_dct2d_top
./obj_dir/Vtb_dct2d_top
```

Replace `tb_dct2d_top` with any other testbench name to run that one.
Leaf testbenches that do not use the reference package can leave out
`tb/dct_ref_pkg.sv`. The design has no parameters to set at the top. The
transform size is fixed at 8 by the factorisation. The widths and
coefficient precision live in `dct_pkg`. If you change `COEF_FRAC`, the
constants A..G must be recomputed as round(2^COEF_FRAC * value).
