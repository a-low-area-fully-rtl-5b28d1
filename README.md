# Low-area pipelined baseline JPEG encoder

This is a baseline JPEG encoder core. It takes 8-bit pixels one per clock, block by block, and
produces the entropy-coded JPEG bit stream as 32-bit words. It is built to use little logic.
A single eight-point 1-D DCT unit computes one coefficient per cycle and does both passes of
the 2-D DCT: first the rows, then the columns. A shift-register transpose buffer connects the
two passes. Quantization happens while the block is read out in zigzag order, so there is no
separate reordering stage. Every stage hands data on through the same small FIFO-style
interface, and the whole chain can be stalled from its output without losing data.

Sustained rate: one 8x8 block every **144 clock cycles**, i.e. 64 samples per 144 cycles. At
112 MHz this is about 49.7 Msamples/s. That rate covers 720x480 at 144 frames/s in grey scale
and 72 frames/s in 4:2:2 colour. It also covers 1280x720 at 54 and 27 frames/s.

```
 pixels ──► level shift ──► 2-D DCT ──► quantizer (zigzag) ──► run-length ──► Huffman ──► assembler ──► 32-bit words
   8 bit        -128        12 bit,        11 bit, zigzag        16 bit        36 bit       packs bits
                            column-major                      {dc,run,val}  {code,len,
                                                                              cat,Z+}
```

## The hand-shake used everywhere

Every block boundary uses one pair of FIFO-like ports:

* **Input:** `writeData`, `writeEn`, `full`. A word is taken at the clock edge when `writeEn=1`
  and `full=0`.
* **Output:** `readData`, `readEn`, `empty`. `readData` is valid whenever `empty=0`. It is
  consumed at the edge when `readEn=1`.

Stages are joined by `writeEn = !upstream.empty` and `readEn = !downstream.full`. Most stages
end in `out_buffer`, a two-register buffer with an {EMPTY, ALMOST_FULL, FULL} state machine.
`reg0` drives `readData`. `reg1` holds one word that arrives while the reader is stalled. A
stage can therefore write every cycle without looking at the reader's `readEn` in the same
cycle.

## The 2-D DCT schedule (`dct_2d`)

This is the least obvious part of the design.

```
          12            96                 96         96          12
 pixels ──► ping_buffer ──► Mux ──► pong_buffer ──► dct_1d ──┬──► transpose_buffer ──┐ 96
                              ▲  MuxSel                      │                        │
                              └──────────────────────────────┼────────────────────────┘
                                                             └──► out_buffer ──► 12-bit coefficients
```

* **`ping_buffer`** collects the eight samples of a row in a 96-bit shift register. New words
  enter at the top and the register shifts right, so the first sample, x0, ends up in bits
  11:0. The row then waits in the FULL state until the pong buffer takes it. Filling takes
  eight cycles and the hand-over takes one.
* **`pong_buffer`** holds the operand of the 1-D DCT for eight cycles. It also sends the index
  k = 0..7 of the coefficient being computed. Its four states run the passes:
  * ONED_EMPTY: load a row.
  * ONED_FULL: eight coefficients of that row.
  * After eight rows, TWOD_EMPTY: load a column from the transpose buffer. The mux select is
    now 1.
  * TWOD_FULL: eight coefficients of that column.
  * After eight columns it goes back to rows.

  Each row or column takes 1 + 8 cycles, so a pass takes 72 cycles and a block 144. During the
  column pass the ping buffer already collects the next block's first row.
* **`dct_1d`** works out, for index k:
  * the four sums x_j + x_(7-j) (k even) or differences x_j − x_(7-j) (k odd);
  * four products with 10-bit weights taken from an 8 × 40-bit table addressed by k.

  The four 22-bit products go into an 88-bit pipeline register. Each is then rounded to 12
  bits, and a two-level adder tree gives the coefficient. Row-pass results go to the transpose
  buffer, which never refuses a word. Column-pass results go to the output buffer. While that
  buffer is full, the 1-D DCT holds its register and raises `full` towards the pong buffer.
  This is how a stall at the output reaches back to the pixel input.
* **`transpose_buffer`** is a 63-word shift register, not a RAM. Row-pass coefficients enter
  at word 62 and shift down. After 63 of them, the taps {reg56, reg48, …, reg0} hold
  coefficient 0 of rows 7..0, which is the first column. The 64th coefficient shifts in in the
  same cycle in which the pong buffer takes that column. Each later column read shifts once
  more, and the same taps then show columns 1..7. The 64th word never needs its own register,
  which is why the buffer is 63 words long. This only works if the 64th write and the read of
  column 0 happen together. The pong buffer schedule guarantees it, and an assertion in the
  module checks it.

The coefficients leave in column-major order: column u (horizontal frequency), rows v = 0..7.
The first coefficient of a block is readable 76 cycles after the pong buffer starts loading
the block's first row. The testbench measures this figure, and the 144-cycle period, exactly.

### Fixed-point arithmetic

* The weights are 0.5·cos(nπ/16) × 1024, rounded: a..g = 502, 473, 426, 362, 284, 196, 100.
  With 0.5·cos scaling the transform is the orthonormal DCT. The 2-D DC term is sum/8, so the
  level-shifted 8-bit input stays within 12 bits (the DC term ranges from −1024 to 1016).
* Product rounding (`jpeg_pkg::round_prod`) keeps bits 21..10 and adds bit 9. The exception is
  when the kept value is already +2047, where it does not add.
* The Add/Sub outputs are 12 bits. The second pass therefore relies on the 1-D coefficients
  staying below ±1024, which holds for 8-bit pixels.

## Quantization in zigzag order (`zigzag_quantizer`)

A 64-entry RAM is written in arrival (column-major) order. The last write switches the state
machine to reading. A 6-bit counter then steps through the zigzag positions k:

* the *zigzag table* turns k into the RAM address (the transposed natural index);
* the *quantization table* gives Q*(k) = round(2048 / Q) for that position.

The coefficient times Q* (a 24-bit product) goes into a register that only advances when the
output buffer has room. The product is then divided by 2048 with the same rounding rule as
above and saturated to 11 bits. Multiplying by Q* replaces the division by Q. The tables are
the example luminance and chrominance tables of the JPEG standard. The `chrom` input selects
between them. Writing takes 64 cycles and reading another 64. During reading the input is
refused, which is well inside the 144-cycle block period.

## Entropy coding (`entropy_coder`)

* **`rlc`** has three states: DC, AC and INSERT_ZRL. The DC coefficient is sent as
  {1, 0000, value}. Zeros increment a 4-bit run counter. Every sixteenth zero in a row
  increments a pending-ZRL counter instead. A non-zero value is sent as {0, run, value} at
  once if no ZRL is pending. Otherwise it is held while the ZRL symbols {0, 1111, 0} are sent,
  one per cycle, and is sent after them. A zero in the last position produces EOB {0, 0000, 0}
  and discards any pending run.
* **`huffman_coder`** is a four-stage pipeline:
  1. Receive the word. The DC difference comes from `dc_diff_coder`, which has one subtractor
     and one predictor register each for Y, Cb and Cr. The component comes from
     `block_marker`.
  2. Category: the number of significant bits of the value.
  3. Look up the Huffman code and apply the Z+ correction:
     * DC table: indexed by category, with entries of an 11-bit code and a 4-bit length.
     * AC table: indexed by {run, category}, with entries of a 16-bit code and a 4-bit length
       minus one. Storing the length minus one lets 16 fit in 4 bits.
     * Z+ is the value, minus one if it is negative. Its low bits are then the JPEG amplitude
       bits.
  4. Add one to the AC length, then write {code16, len5, cat4, Z+11} (36 bits) to the output
     buffer.

  The tables are the typical tables of the JPEG standard. They are built at elaboration from
  the standard's BITS/HUFFVAL lists, using the canonical code assignment
  (`jpeg_pkg::build_ac_table`, `build_dc_table`). The pipeline stalls as a whole when its
  output buffer is full.
* **`assembler`** works in three stages:
  1. The low `cat` bits of Z+ are kept. The code is shifted left by `cat` and the two are ORed
     into the 27-bit register A, with length A = len + cat.
  2. The 63-bit register B is shifted left by length A and ORed with A.
  3. Whenever B holds 32 or more bits, its oldest 32 bits, B >> (lenB − 32), go out as a word.

  A is merged only while B holds fewer than 32 bits, or in a cycle in which a word leaves. This
  keeps B at 58 bits or fewer. Bits are sent MSB first, as JPEG requires.

## Colour

`color = 0` codes every block as luminance. `color = 1` expects 4:2:2 minimum coded units,
in the block order Y (left 8x8), Y (right 8x8), Cb, Cr. Two `block_marker` counters follow
this order:

* one at the quantizer, which selects the quantization table;
* one in the Huffman coder, which selects the Huffman tables and the DC predictor.

Change `color` only while the core is idle, i.e. after reset.

## Limits and departures

* **Output format:** the output is the entropy-coded segment only. There are no markers or
  headers, and no 0x00 is stuffed after 0xFF bytes. Bits that do not fill a last 32-bit word
  stay inside the assembler, because there is no end-of-image padding. A system wrapper must
  add these.
* **Choices not fixed by the architecture:**
  * the level shift (−128) at the input;
  * the 4:2:2 block order;
  * the weight scale of 1024;
  * rounding 2048/Q to the nearest integer;
  * saturating the quantized value to 11 bits;
  * the field order of the 36-bit Huffman word.
* **11-bit DC difference:** the difference is kept to 11 bits, as the architecture specifies.
  With the standard quantization tables (DC step 16 or 17) the difference is far inside that
  range. With a DC step below 2, large jumps could wrap.
* **Fixed tables:** the quantization and Huffman tables are constants. To change them, edit
  `jpeg_pkg`.
* **Output buffer flags:** the buffer reports not-empty in its ALMOST_FULL state, because it
  holds a valid word there.
* **Assembler merge rule:** register A is merged into B only while B holds fewer than 32 bits,
  or in a cycle in which a word leaves. A merge while a finished word is held back by the output
  could otherwise overflow the 63-bit register B.
* **Quantizer input during read-out:** the quantizer does not accept a new block while it reads
  one out. This costs nothing at the DCT's block rate.

## Size

A generic (technology-independent) yosys synthesis of `jpeg_encoder` gives 809 flip-flop bits.
It also gives about 14,200 bits held in arrays. Most of those bits are the Huffman tables, the
quantizer RAM and tables, and the transpose shift register. The architecture was first built on
Spartan-class FPGAs, where it was reported at about 810 flip-flops, five multipliers and
1,400 to 2,500 LUTs. This RTL also has five multipliers: four in the 1-D DCT and one in the
quantizer. Its timing has not been checked on any FPGA.

## Files

| file | contents |
|---|---|
| `rtl/jpeg_pkg.sv` | widths, word structs, rounding functions, table generators (DCT weights, zigzag, Q*, Huffman) |
| `rtl/jpeg_encoder.sv` | top level |
| `rtl/dct_2d.sv`, `ping_buffer.sv`, `pong_buffer.sv`, `dct_1d.sv`, `transpose_buffer.sv` | 2-D DCT |
| `rtl/out_buffer.sv` | two-register stage buffer (parameter `W`) |
| `rtl/zigzag_quantizer.sv`, `block_marker.sv` | quantizer and component counter |
| `rtl/entropy_coder.sv`, `rlc.sv`, `huffman_coder.sv`, `dc_diff_coder.sv`, `assembler.sv` | entropy coder |
| `tb/jpeg_ref_pkg.sv` | integer reference models of every stage |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_frame_workloads.sv` | whole SDTV and HD frames, grey and 4:2:2 |

## Verification

Each testbench drives its module with random and corner-case data, including random input gaps
and output stalls. It compares every output with `jpeg_ref_pkg` and ends by printing
`TB_RESULT checks=N failures=M`.

The reference models are written from the JPEG definitions, not from the RTL structure:

* DCT weights are computed with `$cos` from the DCT-II basis;
* the zigzag order is the standard's listed table;
* run-length coding follows the standard's algorithm;
* Huffman codes are reassigned from BITS/HUFFVAL.

Several results are checked as well as the data:

* known codes from the standard's tables, such as EOB, ZRL and the longest DC codes;
* the 144-cycle block period and the 76-cycle first-coefficient latency of the DCT;
* the four-cycle latency of the Huffman coder;
* in `tb_jpeg_encoder`, that every mechanism occurs at least once: input back-pressure, output
  stall, pass switching, quantizer refusal, a full DCT output buffer, ZRL, EOB and chrominance
  blocks.

`tb_frame_workloads` encodes complete 720x480 and 1280x720 frames in both modes. It checks
every output word, and checks that each frame takes 144 cycles per block (about 14 s of
simulation in total).

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_jpeg_encoder \
  -y rtl -y tb +libext+.sv rtl/jpeg_pkg.sv tb/jpeg_ref_pkg.sv tb/tb_jpeg_encoder.sv
./obj_dir/Vtb_jpeg_encoder
```

Replace `tb_jpeg_encoder` with any other testbench name.
