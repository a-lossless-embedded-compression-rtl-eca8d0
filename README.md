# Lossless embedded compression codec for an H.264/AVC HDTV decoder

An H.264 decoder spends most of its external memory bandwidth on reference
pictures. The de-blocking filter writes every reconstructed picture to the
frame memory, and motion compensation reads small windows of it back many
times. This codec sits inside the memory controller, on that path. It
compresses each 4x4 block of a picture losslessly before the block is
written. When a block is read back, the codec fetches only the words that
hold the compressed block.

Motion compensation must still be able to find any block without parsing
the picture. So every block is coded on its own, into a *segment* of at most
129 bits. Each segment is stored in a fixed slot of five 32-bit words. A
block's address therefore never depends on how well other blocks compressed.
The saving is in bus words transferred, not in memory size. A smooth block
typically needs 2 of its 5 words, and the decoder stops reading after the
last word it needs.

The coding itself is cheap:

- DPCM (each pixel minus the one before it) along a zig-zag path through the
  block.
- Golomb-Rice coding of the differences, with one parameter `k` per block.
- Three candidate paths are tried in parallel. The H.264 intra 4x4
  prediction mode of the block chooses the third candidate.

The RTL holds the HDTV rate at 120 MHz: 1920x1088, 4:2:0, 30 frames/s. The
encoder takes 420 cycles per macroblock and the decoder 480, against a
budget of about 490.

## How one 4x4 block is coded

### Scan paths

A scan is an order in which the 16 pixels are visited. Pixels are numbered
in raster order: 0..3 is the top row and 15 is the bottom-right pixel.

| scan | order (raster index)                      | shape                              |
|------|-------------------------------------------|------------------------------------|
| 0    | 0 4 8 12 13 9 5 1 2 6 10 14 15 11 7 3     | vertical snake                     |
| 1    | 0 1 2 3 7 6 5 4 8 9 10 11 15 14 13 12     | horizontal snake                   |
| 3    | 0 1 4 8 5 2 3 6 9 12 13 10 7 11 14 15     | zig-zag from the top-left corner   |
| 4    | 3 2 7 11 6 1 0 5 10 15 14 9 4 8 13 12     | zig-zag from the top-right corner  |

Scans 0 and 1 are always tried. The third candidate depends on the block's
intra 4x4 mode:

- Modes 1, 2, 3, 7 and 8 try scan 3.
- Modes 0, 4, 5 and 6 try scan 4.
- Codes 9..15 are not used by H.264. They are treated like DC (mode 2), so
  they try scan 3.

The intra mode has already predicted the direction in which the block is
smooth. That is why three candidates are enough. The 2-bit `scan_mode` field
codes the scans 0, 1, 3 and 4 as 00, 01, 10 and 11.

### Differences, mapping and k

Along a scan, the first pixel is kept as it is. The 15 differences
`d = p[j] - p[j-1]` (range -255..255) are mapped to non-negative values:

- `2d` for `d >= 0`.
- `-2d - 1` for `d < 0`.

In bits: `d[8] ? {~d[7:0],1} : {d[7:0],0}`.

`A` is the sum of the 15 magnitudes `|d|`. The parameter `k` is the smallest
value from 0 to 6 with `16 * 2^k >= A`. For `A > 512`, k is 6.

### Golomb-Rice codes

A mapped value `v` is sent as:

- `v >> k` zeros,
- a one,
- then the low `k` bits of `v`.

That is `1 + k + (v >> k)` bits. Because of the way k is chosen, the
quotient never exceeds 32. The longest code is therefore 36 bits.

### Segment format

All three candidates are coded in parallel, and the shortest one is kept. A
tie goes to scan 0, then scan 1.

Compressed segment (tag = 1):

```
| 1 | scan_mode:2 | k:3 | first_pixel:8 | 15 Golomb-Rice codes ... |
```

It is used when `13 + (total code length) < 128`. The segment, including
its tag bit, is then at most 128 bits.

Raw segment (tag = 0), used for every other block:

```
| 0 | 16 pixels x 8 bits in raster order |        = 129 bits
```

Bits are sent MSB first. Every segment is padded with zeros to a whole
number of 32-bit words, so it takes 1 to 5 words.

Worked example, block with intra mode 1 (so scan 3 is also tried):

```
48 51 48 48
48 48 49 49
45 45 46 46
41 42 44 42
```

The shortest candidate is scan 1, with k = 1. The segment is 59 bits
(2 words), and its first word is `a4c0472b`. The testbenches check this bit
for bit.

## Encoder (`ec_encoder`)

The encoder is a four-stage pipeline with a 16-cycle beat. Each stage works
on a different block:

1. **`ec_catch`** takes a block as 4 rows, one 32-bit word per cycle. It has
   two buffers, so the next block can arrive while the DPCM stage still
   reads the previous one.
2. **`ec_dpcm`** walks the three scans at once, one pixel per cycle for 16
   cycles. Each cycle it forms the difference to the previous pixel, maps
   it, and adds `|d|` to `A`. At the end it produces a bundle: the 3 x 15
   mapped values, three `k` values, three first pixels and the raw block.
3. **`ec_clp`** (code length predictor) adds up the Golomb-Rice lengths of
   the three candidates, one value per cycle. In the 16th cycle it picks the
   shortest candidate and decides between compressed and raw.
4. **`ec_gr_pack`** emits one code per cycle: the header, then 15 codes or
   15 raw pixels. A shifter appends each code to a 128-bit MSB-aligned
   accumulator. Whenever 32 bits are ready, they leave as one bus word. The
   segment's last word is marked with `out_last` and its word count
   `out_words`.

Timing:

- The last word of the first block leaves 52 cycles after its first row
  arrived: 4 cycles of catch plus 3 x 16.
- After that, one block finishes every 16 cycles, so a 24-block macroblock
  takes 420 cycles.
- When several words of a long segment are still queued, a segment's last
  word can come out up to two cycles late. This never builds up: the
  throughput stays at one block per 16 cycles.

## Decoder (`ec_decoder`)

- **`ec_bit_fifo`** holds up to 64 bits. It accepts a 32-bit word whenever
  32 bits are free. Each cycle it shifts out as many bits as the last symbol
  used. At the end of a segment it is flushed, because whatever remains is
  padding or belongs to an unused part of the slot.
- **`ec_gr_dec`** decodes one symbol per cycle from the top of that window:
  - Symbol 0 is the header. The tag bit decides whether the header is 14 or
    9 bits long.
  - Symbols 1..15 are Golomb-Rice codes or 8-bit raw pixels. For a code, a
    leading-zero count over 40 bits gives the quotient, and the next `k`
    bits give the remainder.
  - After symbol 15 it raises `seg_done`.
- **`ec_inv_scan`** undoes the mapping and adds each difference to a running
  sum. It writes the pixel into the position given by the scan. After the
  16th symbol it sends the block as four rows, on four consecutive cycles.

A block takes 16 symbol cycles plus 4 output cycles, which is 20 cycles, or
480 per macroblock. This holds as long as the memory delivers words at
least as fast as the decoder uses them.

## Frame memory organisation and addressing (`ec_addr_unit`)

### Slots

Each block has a slot of `SLOT_WORDS` = 5 words. A block address is
`{MB number[14:0], block[4:0]}`, where the MB number is `mb_y * MB_W + mb_x`:

- Blocks 0..15 are luma, in H.264 order: the four 8x8 quadrants in raster
  order, and 4x4 raster order inside each quadrant. So
  `blk = {by[1], bx[1], by[0], bx[0]}`.
- Blocks 16..19 are Cb and 20..23 are Cr, each in raster order.

The slot's word address is `(MB * 24 + block) * 5`. A 1920x1088 picture
takes 979,200 words, which fits the 20-bit word address. Only one picture
fits; more reference pictures need a wider address.

### Translation buffer

When block 0 of a macroblock is written, the macroblock's base address is
stored in a translation buffer. The buffer has one 20-bit entry per
macroblock: 120 x 68 = 8160 entries, about 160 kbit.

### Motion compensation reads

Motion compensation names a block by its virtual address:

- MB_x and MB_y (7 bits each),
- the block number (5 bits),
- an integer motion vector (signed, 10 bits per component),
- `sub_pel`, set when the vector has a fractional part.

The address unit finds the reference window:

- With an integer vector, the window is the 4x4 block shifted by the vector.
  It overlaps up to 2x2 stored blocks.
- With `sub_pel`, the 6-tap interpolation filter also needs 2 pixels to the
  left and above, and 3 to the right and below. The window grows to 9x9
  (x-2 .. x+6) and overlaps up to 3x3 blocks.

The overlapped blocks come out one at a time, row by row. Each one gets its
physical address, from the translation buffer plus the block's offset, and
its block coordinates in the plane. Parts of a window outside the picture
are clamped to the edge blocks. The client then uses the block coordinates
to cut out its pixels, including any edge extension it applies.

## Memory controller (`ec_mem_ctrl`, the top)

Clients see a write port and a read port.

**Writes.** A write transfer is `wr_len` 32-bit beats at `wr_addr`:

- With `wr_image` set and compression enabled, the transfer is one block
  given as four rows, and `wr_addr` is its block address. The rows go
  through the encoder, and the segment is written to the block's slot.
  Up to 8 block addresses wait in a queue while their segments are being
  coded.
- Other writes are passed through at `wr_addr + i`. They wait for cycles in
  which the encoder has nothing to write.

**Reads.**

- An image read (`rd_image`) is a virtual address as above. For each
  overlapped block, the controller reads slot words into the decoder until
  the decoder reports the end of the segment. At most one word beyond the
  segment is fetched (one read is outstanding at a time), and that word is
  dropped. The decoded rows return on `rdata`, with `rdata_bx`/`rdata_by`,
  and `rdata_last` marks the last row of the request.
- A direct image read (`rd_image` and `rd_direct`) fetches the one block
  whose block address is `rd_addr`, in the same format the writer used.
  Its four rows come back the same way. This is how a display feeder or
  any other client reads a stored picture block by block.
- Other reads return `rd_len` words from `rd_addr`.

**Setup and status.**

- `setup` is a 32-bit register. Bit 0 enables compression and is 1 after
  reset.
- While compression is off, image transfers are moved unchanged, like any
  other data.
- `mem_switch` shows when the codec engine is in the data path.

**Bus side.** Word writes carry `bus_wlast`/`bus_wlen` on the last word.
Word reads may take any number of cycles to return `bus_rvalid`.

`MB_W`, `MB_H` and `SLOT_WORDS` are parameters. Set `MB_W`/`MB_H` to the
picture size in macroblocks. That sizes the translation buffer and puts the
clamping edges in the right place.

## Where this design departs from the published description

- **k rule.** The general formulas accumulate the mapped values to choose
  `k`. The hardware description and the worked example accumulate the
  magnitudes `|d|`. This design uses the magnitudes: with the mapped values,
  the example block would get k = 2, not the published k = 1.
- **Raw segment size.** A raw segment is the tag plus 16 pixels, which is
  129 bits. One drawing counts it as 128 bits. That extra bit is why a slot
  has 5 words rather than 4.
- **Scan 4** is drawn as the mirror image of scan 3, so it starts at the
  top-right pixel. The text says every scan starts at the top-left. This
  design follows the drawing.
- **First pixel.** The published scheme can predict the first pixel of a
  block from a neighbouring pixel. That prediction is not built here. Every
  segment stores its first pixel in 8 bits, as the worked example does, so
  each block can be decoded without its neighbours.
- **Widths.**
  - The packer accumulator is 128 bits, where 64 are drawn, so that a 36-bit
    code can always be appended.
  - The decoder's bit buffer is 64 bits, fed 32 bits at a time, where 16-bit
    registers are illustrated.
  - The quotient count is 6 bits wide.
- **Not given by the source, so chosen here:**
  - the slot size, padding and address formats;
  - the block number and sub-pel flag in the motion compensation address,
    whose published form names only the macroblock position and the vector;
  - the direct read of one block by its block address;
  - the block numbering (taken from H.264);
  - the translation buffer layout;
  - edge clamping;
  - the setup register contents;
  - all handshakes and the bus protocol.
- **Encoder timing.** The encoder meets the published 52-cycle first-block
  latency and the 420 cycles per macroblock. A segment's last word can come
  up to 2 cycles late, as described above.

## Throughput for other picture formats

All formats assume 30 frames/s. The published clock frequencies are about
490 cycles per macroblock times macroblocks per second, so this design,
which needs at most 480, meets every one of them:

| format     | MBs/frame | decoder cycles/s | published clock |
|------------|-----------|------------------|-----------------|
| 1920x1088  | 8160      | 117.5 M          | 120 MHz         |
| 1024x768   | 3072      | 44.2 M           | 45 MHz          |
| 640x480    | 1200      | 17.3 M           | 20 MHz          |
| 352x288    | 396       | 5.7 M            | 6 MHz           |
| 176x144    | 99        | 1.4 M            | 1.5 MHz         |

The encoder needs 420/480 of the decoder's figure.

These figures are for the codec cores. Through the memory controller, a
block requested on its own, after the previous block's last row, costs 24
cycles: 20 for decoding and 4 between requests. Reading a whole 1920x1088
picture that way takes 576 cycles per macroblock, which would need about
141 MHz.
Writes keep the encoder's pace: a whole picture is written at 384 cycles
per macroblock, or 26 ms at 120 MHz.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. Expected values come
from `tb/ec_ref_pkg.sv`, a plain-integer model of the segment format that
shares no code with the RTL.

| testbench          | what it checks |
|--------------------|----------------|
| `tb_ec_pkg`        | scan tables, mode choice, mapping and unmapping for every difference, k for every sum, code lengths |
| `tb_ec_catch`      | blocks and intra modes through the double buffer under random reader delays; writer held back when both buffers are full; one row per cycle with a fast reader |
| `tb_ec_dpcm`       | all 45 mapped values, 3 k values and 3 first pixels per block; holds under back-pressure; 16 cycles per block |
| `tb_ec_clp`        | compressed/raw decision, chosen scan, k, length, values; tie rule; 16 cycles per block |
| `tb_ec_gr_pack`    | every output word against the model, worked example, word counts, timing |
| `tb_ec_encoder`    | whole encoder: words, worked example bits, 52-cycle latency, 420 cycles per 24 blocks |
| `tb_ec_bit_fifo`   | window and fill level against a bit-queue model with random pushes, consumes and flushes |
| `tb_ec_gr_dec`     | every decoded symbol and length, segments in slots with random garbage after them |
| `tb_ec_inv_scan`   | rebuilt rows for all scans and raw blocks, row timing |
| `tb_ec_decoder`    | whole decoder on slotted segments: rows, 20 cycles per block, 480 per 24 blocks |
| `tb_ec_addr_unit`  | direct mapping for every MB, block lists and addresses of 400 random windows at the full 1920x1088 size, all picture edges |
| `tb_ec_mem_ctrl`   | end to end at the default (HDTV) parameters, see below |
| `tb_ec_hdtv_frame` | workload: a whole generated 1920x1088 picture written and every block read back, with cycle counts |

The end-to-end testbench:

1. Writes 3x3 macroblocks of a synthetic picture (luma and both chroma
   planes) into a behavioural frame memory with random read latency. One
   macroblock is noise, so that some segments are raw.
2. Issues about 70 motion compensation reads, with 2x2 and 3x3 windows, on
   chroma and luma, some clamped at the picture edge. It checks every
   returned row against the picture.
3. Reads all 24 blocks of the noisy macroblock and a few others by their
   block address, and checks them.
4. Checks that no segment is read more than one word past its stored length.
5. Passes other data through in both directions.
6. Switches compression off, moves an image block unchanged, and switches
   compression back on.

It counts each of these mechanisms, plus stalled image writes, and fails if
any of them never happened. In a typical run, 216 segments take 485 words
instead of 864.

Running a test with plain Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal \
    rtl/ec_pkg.sv rtl/ec_catch.sv rtl/ec_dpcm.sv rtl/ec_clp.sv rtl/ec_gr_pack.sv \
    rtl/ec_encoder.sv rtl/ec_bit_fifo.sv rtl/ec_gr_dec.sv rtl/ec_inv_scan.sv \
    rtl/ec_decoder.sv rtl/ec_addr_unit.sv rtl/ec_mem_ctrl.sv \
    tb/ec_ref_pkg.sv tb/tb_ec_mem_ctrl.sv --top-module tb_ec_mem_ctrl -o tb
./obj_dir/tb
```

Swap in another `tb/tb_*.sv` and its `--top-module` to run a unit test.

Not verified:

- Real video sequences. No compression ratios on natural video were
  measured, only on the synthetic pictures above. The whole generated
  HDTV picture takes 400,547 words instead of 783,360.
- Gate counts and power, which this RTL does not target.

## Files

- `rtl/ec_pkg.sv`: shared types, scan tables and coding functions.
- Encoder: `rtl/ec_catch.sv`, `rtl/ec_dpcm.sv`, `rtl/ec_clp.sv`,
  `rtl/ec_gr_pack.sv`, `rtl/ec_encoder.sv`.
- Decoder: `rtl/ec_bit_fifo.sv`, `rtl/ec_gr_dec.sv`, `rtl/ec_inv_scan.sv`,
  `rtl/ec_decoder.sv`.
- Memory side: `rtl/ec_addr_unit.sv`, and the top `rtl/ec_mem_ctrl.sv`.
- `tb/`: the testbenches above, plus the reference model `tb/ec_ref_pkg.sv`.
