# Bit-plane congestion watermark embedder

This is a streaming hardware embedder for invisible watermarks in 8-bit grey-scale images. It
works in the spatial domain and adapts to the image content. The image is cut into
non-overlapping 3x3 blocks. Each block carries one watermark bit. The embedder writes that
bit more strongly in busy ("congested") blocks, where the eye does not notice, and more weakly
in flat ("smooth") blocks, where it would.

How busy a block is comes from a single bit-plane: the most significant bit (MSB) of its nine
pixels. If about as many of those MSBs are 1 as are 0, the block is congested. If nearly all
agree, it is smooth. The test needs only a 9-input ones counter and three gates. That keeps
the hardware small, and a whole image row can be handled per clock.

The RTL is SystemVerilog (IEEE 1800-2017), written for synthesis. It lints cleanly with
Verilator and elaborates with slang.

## The embedding rule

Bit-planes are numbered 1 (LSB) to 8 (MSB).

| MSB ones in the block (S) | class | watermark bit goes into | enhanced mode also writes |
|---|---|---|---|
| 0, 1, 2, 3, 7, 8, 9 | T1, smooth | plane 3 of all nine pixels | inverted bit into plane 2 |
| 4, 5, 6 | T2, congested | plane 5 of all nine pixels | inverted bit into plane 4 |

A bit in plane 3 changes a pixel by at most 4 grey levels. A bit in plane 5 changes it by at
most 16, so it survives compression better. The rule is symmetric: a block with few ones and
a block with few zeros are equally smooth.

**Enhanced mode** (`ENHANCED = 1`) adds one more write. The inverse of the watermark bit goes
into the plane just below the main one. This pulls the pixel error towards zero. Take plane 3
with a watermark bit of 1, and look at the two affected bits (plane 3, plane 2) of a pixel:

| original | plain result | error | enhanced result | error |
|---|---|---|---|---|
| 00 | 10 | +4 | 10 | +4 |
| 01 | 11 | +4 | 10 | +2 |
| 10 | 10 | 0 | 10 | 0 |
| 11 | 11 | 0 | 10 | -2 |

The total change is the same, but the squared error drops from 32 to 24. Over every pixel value, both classes and both bit values, the summed
squared error is 69,632 in plain mode and 52,224 in enhanced mode (see
`tb_embedding_logic`).

The default is plain adaptive mode (`ENHANCED = 0`). That mode is the two-multiplexer circuit
the hardware is built around. Enhanced mode is a compile-time option. It adds one more
multiplexer per affected plane.

## Datapath pieces

- **`compressor_9to4`**: a 9-to-4 compressor, built from five full adders and two half adders
  in three levels. Level 1 has three full adders, one per triple of inputs. Level 2 has one
  full adder over the three weight-1 sums and one over the three weight-2 carries. Level 3
  has two half adders that resolve the weight-2 and weight-4 pairs. The output is the exact
  count, 0 to 9.
- **`t2_comparator`**: with the count written as `{bit4, bit3, bit2, bit1}`, the congested set
  {4, 5, 6} is exactly `!bit4 & bit3 & !(bit2 & bit1)`. This takes three gates. Counts 10 to
  15 cannot occur.
- **`congestion_analyzer`**: the compressor followed by the comparator. It outputs a
  `blk_type_e` (`BLK_T1` or `BLK_T2`).
- **`embedding_logic`**: one instance per pixel. A 2-to-1 multiplexer on plane 3 takes the
  watermark bit when the block is T1. A second one on plane 5 takes it when the block is T2;
  its select is the inverse of the first one's. In enhanced mode, the inverted bit goes into
  plane 2 or 4.

## The line pipeline and its timing

This is the part to understand before changing anything.

**One whole image line enters per clock.** A line is `IMG_N` pixels, which is 4096 bits at the
default size. Pixel `j` sits in bits `[8j+7:8j]`. `wm_pipeline` holds the three newest lines
in `row1` (newest), `row2` and `row3` (oldest). A new line shifts in every clock.

**Block rows.** Every third clock, lines 3k, 3k+1 and 3k+2 sit in `row3`, `row2` and `row1`.
This happens when the line in `row3` carries the `blk_start` tag. At that point, every 3-pixel
column of the three rows forms a complete 3x3 block. There are `IMG_N/3` congestion analyzers,
one per block column. They all classify their blocks in parallel. `3 * IMG_N` embedding-logic
instances then rewrite all pixels of the three lines.

On that same edge, the three embedded lines move on in place of the raw ones:

- embedded `row3` goes to the output register;
- embedded `row2` goes to `row3`;
- embedded `row1` goes to `row2`.

On the next two edges there is no block row, so the registers just shift. The embedded lines
3k+1 and 3k+2 therefore leave on the two clocks that follow. The output stays one line per
clock, in order, without a separate output buffer.

**Leftovers.** 512 is not a multiple of 3. The last `IMG_N mod 3` lines (510 and 511) never
form a block row. The pixels right of the last whole block column (columns 510 and 511) have
no analyzer. Both pass through unchanged.

**Watermark bits.** One clock before a block row is embedded, its first line is in `row2`. At
that point the pipeline raises `wm_req`. The controller answers with a read of the next
watermark RAM word. That word holds one bit per block column, and the synchronous read
delivers it just in time.

**Six stages and N+6 clocks.** Take the clock edge that samples `start` as edge 0. A line
travels as follows:

| edge | stage |
|---|---|
| L | controller presents read address L to the input RAM |
| L+1 | input RAM read data (line L) |
| L+2 | `row1` |
| L+3 | `row2` |
| L+4 | `row3`; block row classified and embedded while here |
| L+5 | output register |
| L+6 | written into the output RAM |

The last line, N-1, is written on edge N+5. `done` rises on that same edge. A run therefore
spans N+6 clock edges, counted from edge 0: 518 for a 512x512 image. The pipeline never
stalls. A new run may start as soon as `busy` falls.

## Memories and host interface (`wm_top`)

`wm_top` has three on-chip RAMs. Each is an `sdp_ram`: one write port, one read port and a
one-clock synchronous read.

| RAM | words x width (default) | content |
|---|---|---|
| input image | 512 x 4096 | line y of the image |
| watermark | 170 x 170 | word k, bit j = watermark bit of block (row k, column j) |
| output image | 512 x 4096 | line y of the watermarked image |

The host side works in three steps:

1. Write the image through `img_wr_*` and the watermark through `wm_wr_*`, one word per clock.
2. Pulse `start`. A `start` while `busy` is high is ignored.
3. Wait for the one-clock `done` pulse. Then read lines through `out_rd_en`/`out_rd_addr`; the
   data appears on `out_rd_data` one clock later.

`rst_n` is a synchronous, active-low reset. It clears the control state only. The RAMs and the
line registers are not reset.

| parameter | default | meaning |
|---|---|---|
| `IMG_N` | 512 | image is `IMG_N` x `IMG_N` pixels |
| `ENHANCED` | 0 | 1 also writes the inverted bit into plane 2/4 |

One run at the default size fits a 512x512 image, the usual size of standard test images
such as Lena, Baboon, Barbara, Boat and Peppers. A 256x256 image (such as Cameraman) needs
`IMG_N = 256` to be processed natively.

## What is this design's own

The following are choices made here, not part of the scheme the design is based on:

- the image size of 512;
- the host ports and the start/busy/done handshake;
- the reset behaviour;
- how the RAM words are laid out (one line per word; one block row of watermark bits per word);
- the order of pixels within a word;
- copying the leftover lines and columns through unchanged;
- the compressor's exact pairing of adder signals (any pairing by weight gives the same sum);
- writing the embedded lines back into the line shift register instead of a separate
  three-line output bank.

The classification sets, the bit-planes, the three-gate comparator, the 5 FA + 2 HA
compressor, the one-line-per-clock six-stage pipeline and the N+6 run time are those of the
scheme.

**Not included:**

- watermark extraction;
- JPEG attack evaluation;
- the quality metrics (PSNR, SSIM, correlation).

These belong to the software evaluation of the scheme, and no extraction method is specified
for it.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference model in
`tb/wm_ref_pkg.sv` is written from the rules above, not from the RTL structure.

| testbench | what it covers |
|---|---|
| `tb_compressor_9to4`, `tb_congestion_analyzer` | all 512 MSB patterns |
| `tb_t2_comparator` | every count from 0 to 9 |
| `tb_embedding_logic` | every pixel, class and bit in both modes, plus the squared-error comparison |
| `tb_sdp_ram` | read latency, hold, read-before-write on collisions |
| `tb_wm_controller` (with `ctrl_run`) | address and tag sequences, the N+6 run time, ignored starts, back-to-back runs, for N = 8 and 9 |
| `tb_wm_pipeline` | random 8x8 images in both modes, three-clock latency, leftover lines and columns |
| `tb_wm_top` (with `wm_top_run`) | end to end at 8x8 (plain), 9x9 (enhanced), 512x512 (enhanced) and 256x256 (plain); fails if smooth blocks, congested blocks, either bit value, changed pixels or leftover pixels never occur |
| `tb_wm_top_full` | one complete 512x512 run with every parameter at its default |

Random data is used throughout. No natural images are included.

To run one testbench with plain Verilator from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/wm_pkg.sv tb/wm_ref_pkg.sv \
    tb/tb_wm_top.sv --top-module tb_wm_top -Mdir obj_tb_wm_top
./obj_tb_wm_top/Vtb_wm_top
```

The other modules are found through `-Irtl -Itb` by file name. Substitute another testbench
name to run it. The full-size testbenches take about half a minute to a minute to build and well under a
second to simulate.

## Files

- `rtl/wm_pkg.sv`: pixel type, plane indices, block-type enum.
- `rtl/full_adder.sv`, `rtl/half_adder.sv`, `rtl/compressor_9to4.sv`, `rtl/t2_comparator.sv`,
  `rtl/congestion_analyzer.sv`: block classification.
- `rtl/embedding_logic.sv`: per-pixel embedding.
- `rtl/wm_pipeline.sv`: line registers, analyzers and embedders for a whole line.
- `rtl/wm_controller.sv`: run sequencing and RAM addressing.
- `rtl/sdp_ram.sv`: the RAM model.
- `rtl/wm_top.sv`: top level.
- `tb/`: the testbenches and reference model listed above.
