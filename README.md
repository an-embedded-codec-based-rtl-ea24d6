# Reduced-pattern embedded codec for video frame memory

A video decoder spends much of its power moving reference frames to and from
external memory. This design halves that traffic. Every 4x2 block of 8-bit
pixels (64 bits) is coded into exactly one 32-bit word before it is written,
and decoded again when motion compensation reads it back. The ratio is
always two, so the word address of any block follows from its position alone.
Motion compensation can therefore still fetch any block directly.

The coding is lossy and has no iteration. A block is coded or decoded in a
single combinational pass, followed by one register. At the default two
lanes, one 4x4 block (a 64-bit segment) moves per clock, so a 16x16
macroblock takes 16 cycles in each direction.

## The coding of one 4x2 block

Think of the block as bit planes: plane 7 holds the most significant bit of
each of the eight pixels, plane 0 the least. Each row of four pixels is a
*section*. One plane of a section is a 4-bit *layer*, where bit `c` belongs
to column `c`.

1. **Start plane (MBPTC).** Three 8-input OR gates test planes 7, 6 and 5.
   `SP` (2 bits) counts the leading all-zero planes among them, from 0 to 3.
   Four layers are kept, planes `7-SP` down to `4-SP`. Dark or flat-dark
   blocks thus keep finer detail.
2. **Reduced patterns comparison (RPCC), per section.** Layers 1 and 2 (the
   two most significant kept planes) are compared with eight fixed 4-bit
   patterns. This is "threshold level 2". The patterns are the layers with at
   most one 0/1 transition:
   `0000 0001 0011 0111 1111 1110 1100 1000`, indices 0 to 7.
   - **Left strategy**, used when both layers are patterns: all four layers
     are sent as 3-bit pattern indices. Layers 3 and 4 use their nearest
     pattern (Hamming distance, lowest index on a tie). Layers 1 and 2 are
     exact.
   - **Right strategy**, used otherwise: layers 1 and 2 are sent raw
     (4 + 4 bits). For each pixel, layers 3 and 4 form a 2-bit value. That
     value is averaged over the column pairs (0,1) and (2,3), as
     `(a+b+1)/2`.
3. **Average coding, per 2x2 part.** The two planes below the four layers
   (`3-SP` and `2-SP`) form a 2-bit residue per pixel. The residue is
   averaged over part A (columns 0-1 of both rows) and over part B
   (columns 2-3), rounded to nearest as `(sum+2)/4`. Planes below that are
   dropped.

Packet layout, `ec_pkg::packet_t`, MSB first:

| bits    | field      | meaning                                         |
|---------|------------|-------------------------------------------------|
| 31:30   | `sp`       | start plane code                                |
| 29      | `strat_r0` | row 0 strategy (0 left, 1 right)                |
| 28      | `strat_r1` | row 1 strategy                                  |
| 27:16   | `sec_r0`   | row 0: `{pi1,pi2,pi3,pi4}` or `{L1,L2,avgA,avgB}` |
| 15:4    | `sec_r1`   | row 1, same                                     |
| 3:2     | `avg_a`    | part A residue average                          |
| 1:0     | `avg_b`    | part B residue average                          |

Decoding reverses the steps. Each pixel is rebuilt as an aligned byte:
layers 1-4 at bits 7..4, the part average at bits 3..2, and zeros at bits
1..0. The byte is then shifted right by `SP`.

**Error bound.** Layers 1 and 2 are always exact, and planes above the start
plane are zero both before and after coding. So the error of a pixel is
always below `2^(6-SP)`: under 64 for bright blocks and under 8 for blocks
below 32. The end-to-end testbench checks this bound on every pixel.

## Hardware

| module            | role                                                                 | timing |
|-------------------|----------------------------------------------------------------------|--------|
| `ec_pkg`          | pixel, layer, block and packet types; the pattern table              | - |
| `mbptc_enc`       | start-plane OR gates, layer and residue extraction                   | comb. |
| `pattern_cmp`     | one layer against all eight patterns in parallel: hit flag and index | comb. |
| `rpcc_enc`        | strategy choice and 12-bit payload of one section (4 `pattern_cmp`)  | comb. |
| `avg_enc`         | rounded 2-bit mean of four residues                                  | comb. |
| `ec_compressor`   | `LANES` x (1 `mbptc_enc`, 2 `rpcc_enc`, 2 `avg_enc`), packing, register | 1 cycle |
| `ec_rearrange`    | unpacks one packet into a 4x2 block                                  | comb. |
| `ec_decompressor` | `LANES` x `ec_rearrange` and an output register                      | 1 cycle |
| `ec_addr_conv`    | block position to word address in the compressed frame               | comb. |
| `ec_codec`        | top: write path, read path and their address converters              | see below |

Synthesis of the top gives roughly 930 word-level cells and 258 flip-flops.
Most of the flip-flops are the two 64-bit pipeline registers per direction
and the registered write addresses.

### Top-level interface (`ec_codec`)

Parameters: `LANES = 2`, `FRAME_W = 1920`, `FRAME_H = 1088`, `ADDR_W = 32`.

- **Write path.** Drive `df_valid`, `df_blk[LANES]` and the pixel position
  `df_x`/`df_y` of a 4x4 block's top-left corner. Lane 0 carries rows 0-1
  and lane 1 rows 2-3. One cycle later, `wr_valid`, `wr_addr[LANES]` and
  `wr_data[LANES]` hold the two coded words and their addresses.
- **Read path.** `mc_x`/`mc_y` give `rd_addr[LANES]` in the same cycle. These
  are the 4x2 blocks at rows `mc_y` and `mc_y+2`. `mc_y` may be any even row,
  so reads that are not aligned to 4 rows work. Return the memory words on
  `rd_data` with `rd_data_valid`. One cycle later, `mc_valid`/`mc_blk` hold
  the pixels.
- **Reset.** `rst_n` is active low and asynchronous. It clears the valid
  flags and the pipeline registers.
- **No back-pressure.** A block presented with valid is always taken.

**Memory layout.** The frame is stored as 4x4 tiles in raster order. Each
tile takes two consecutive words: its upper and lower 4x2 block.

    addr = frame_base + 2*((y/4)*(FRAME_W/4) + x/4) + (y/2)%2

A 1920x1088 frame therefore takes 261,120 words (32-bit word addressing). A
smaller frame, such as CIF or the 720p layer of a two-layer stream, fits
within the 1920 stride at its own `frame_base`.

### Throughput against the target formats

At 16 cycles per macroblock, the luma traffic at 30 frames/s needs:

| format                | cycles needed per second | clock used for it |
|-----------------------|--------------------------|-------------------|
| CIF                   | 0.19 M                   | 5 MHz             |
| 1080p                 | 3.9 M                    | 100 MHz           |
| 1080p + 720p (2 layers) | 5.6 M                  | 150 MHz           |

Chroma in 4:2:0 adds half as much again. The codec is therefore far from
being the bottleneck. The motion-compensation fetch pattern and the bus set
the real load.

## Where this design makes its own choices

These parts follow the original algorithm: start plane from three OR gates, pattern
comparison of layers 1-2 deciding the strategy, and a 2-bit average per 2x2
part on the next two planes. So are the 32-bit packet, one block per cycle
and 16 cycles per macroblock. The following details are this design's own:

- **The eight patterns.** Monotone step patterns were chosen. They fit edges
  and flat areas, where pattern misses fall mostly on the end pixels of a
  row.
- **Payloads and bit order.** This includes the right strategy's raw layers
  1-2 plus pair averages of layers 3-4.
- **Rounding rules.** Nearest-pattern search, and zero fill of the dropped
  low planes.
- **Lanes.** Two 4x2 lanes give 16 cycles per 16x16 macroblock, which
  contains 32 such blocks. With one lane it would take 32 cycles.
- **One start plane per 4x2 block.** There is not one per 2x2 part. The
  32-bit budget has room for only one.
- **Memory tiling, port timing and reset.**
- **Fixed threshold.** The threshold is fixed at level 2. Other levels (0-4)
  trade exact layers against pattern-coded ones. Only level 2 is defined
  precisely enough to build, so there is no threshold input.

The decoder core, the system bus and the external SDRAM are not part of this
RTL. The top's ports are where they connect.

## Integrating it

- **Write-side input.** A deblocking filter that produces four pixels per
  cycle needs a small row buffer in front of the write port. The buffer
  collects one 4x4 block every four cycles. The compressor is then busy one
  cycle in four.
- **Bus width.** With a 32-bit bus, the two words of a 64-bit segment go out
  as two beats. Likewise, a read needs only the lanes it uses: a 4x2 block
  costs one word.
- **Read latency.** Reads through the codec add the decompressor's register
  stage, one cycle, to the memory latency seen by motion compensation.
- **Quality tuning.** To try other patterns, edit `ec_pkg::pattern()` and
  the reference model's `PATS` table together. Any eight patterns work with
  the same packet layout.

## Verification

Each module has a self-checking testbench in `tb/`. They compare against
`tb/ec_ref_pkg.sv`, a separate pixel-by-pixel software model of the coding
rules. Each testbench prints `TB_RESULT checks=N failures=M`.

- `tb_pattern_cmp`, `tb_avg_enc` and `tb_rpcc_enc` are exhaustive (16, 256
  and 65,536 inputs).
- `tb_mbptc_enc` and `tb_ec_rearrange` use random and structured blocks and
  random packets. Every start plane and both strategies are seen.
- `tb_ec_compressor` and `tb_ec_decompressor` stream 20 macroblocks. They
  check one-cycle latency and 16 cycles per macroblock.
- `tb_ec_addr_conv` walks every block of a 1080p frame.
- `tb_ec_codec` runs the top at its default parameters. It uses a
  behavioural word memory with one-cycle reads. It writes 12 macroblocks,
  including all four frame corners, and reads them back aligned and offset
  by two rows. It checks words, addresses, pixels, the error bound and cycle
  counts, and that every start plane, both strategies and both read
  alignments occurred.

- `tb_ec_frames` runs whole synthetic frames through the top: CIF, 1080p and
  720p. It checks every stored word and every decoded pixel. It also checks
  the cycle count per frame against the clock of each format at 30 frames/s:
  CIF at 5 MHz, 1080p at 100 MHz, and 1080p + 720p at 150 MHz. Write plus
  read takes 12,672, 261,120 and 376,320 cycles, against budgets of
  166,666, 3,333,333 and 5,000,000. It prints the PSNR of each frame, about
  37 dB on this synthetic content. That figure says little about real video.
- `tb_ec_mc_access` fetches a 4x4 reference block through the read path for
  all nine motion-vector cases. Each coordinate is aligned, off the 4-grid,
  or sub-pixel (which needs 9 pixels). It checks the number of 32-bit
  accesses per case. With the codec these are 2, 2 or 3, 5, 4, 4 or 6, 10,
  6, 6 or 9, and 15. Uncompressed they are 4, 4, 9, 8, 8, 18, 12, 12 and 27.
  Weighted by typical case frequencies, that is 7.05-7.11 accesses per block
  instead of 13.16, about 46% fewer reads. Writes are always 50% fewer.

To run one with plain Verilator:

    verilator --binary --timing -Irtl -Itb rtl/ec_pkg.sv tb/ec_ref_pkg.sv \
        rtl/*.sv tb/tb_ec_codec.sv --top-module tb_ec_codec -o sim
    ./obj_dir/sim

**Not verified.** The picture quality of these choices on real video (PSNR)
has not been measured. Neither has the gate count. Only functional
behaviour and cycle counts are checked.
