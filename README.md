# Image splitting of a video stream, with bicubic re-enlargement

This RTL takes a live camera picture, cuts each frame into four
non-overlapping quarters and shows every quarter enlarged back to full frame
size. A 256 x 256 working frame becomes four 128 x 128 blocks. Each block is
interpolated to 256 x 256 again with bicubic interpolation. The result is four
output video streams, one per quarter, each looking like a 2x zoom into one
corner of the picture.

The structure follows the hardware model of the paper *FPGA Based Image
Splitting of Video Streaming Data for High Speed Data Transmission*:

1. resize
2. RGB to YCbCr
3. serial conversion of each colour component into its own memory
4. splitting into separate block memories
5. bicubic interpolation of each block
6. YCbCr back to RGB

While splitting, the design also takes the row and column means of each
block's luma, the feature set that image retrieval builds on split images.

The paper also shows a small gray-image variant, where a counter reads four
ROMs that already hold the four blocks. It is included as well, next to the
colour path.

The paper names these steps and their sizes but gives little of their
insides. Stream formats, fixed-point arithmetic, the interpolation kernel
and the frame sequencing are this design's own choices. They are listed
under "Where this design goes beyond the source" below.

## Data path

```
 camera RGB stream (640x480, valid/sof)
        |
   video_resize         nearest-neighbour resampling to 256x256 (line memory)
        |
   rgb2ycbcr            BT.601, 2 clocks
        |
   frame_store x3       Y, Cb, Cr frame memories (65536 x 8 each)
        |                 raster write counter = serial conversion
   image_splitter       one pass over the frame, 1 pixel/clock
        |
   dp_ram x12           block memories: 4 blocks x 3 components (16384 x 8)
        |
   bicubic_upscale2x x4 one per block, Y/Cb/Cr together, 16 clocks/pixel
        |
   ycbcr2rgb x4         2 clocks, saturating
        |
 four RGB output streams (256x256 each, in lock-step)

   block_mean_features  row/column means of each block's luma, taken from
                        the splitter's writes
   split_sequencer      starts split and interpolation, drops frames
   gray_rom_splitter    counter + four ROMs, independent of the above
```

Block numbering is the same everywhere:

| block | position |
|-------|----------|
| 0 | top-left |
| 1 | top-right |
| 2 | bottom-left |
| 3 | bottom-right |

Component numbering in packed arrays is 0 = Y, 1 = Cb, 2 = Cr.

## Bicubic enlargement (`bicubic_upscale2x`)

This is the part that needs the most explanation.

**Kernel.** The design uses Keys' cubic convolution kernel with a = -0.5,
the usual "bicubic" of image tools:

    W(x) = 1.5|x|^3 - 2.5|x|^2 + 1              for |x| <= 1
    W(x) = -0.5|x|^3 + 2.5|x|^2 - 4|x| + 2      for 1 < |x| < 2

**Alignment.** Pixel centres are aligned. Output pixel `o` sits at source
position `u = (o + 0.5)/2 - 0.5`. For an exact 2x enlargement this gives only
two phases:

| output pixel | source position | taps on source pixels | weights (x 1/128) |
|---|---|---|---|
| 2i (even) | i - 1/4 | i-2, i-1, i, i+1 | -3, 29, 111, -9 |
| 2i+1 (odd) | i + 1/4 | i-1, i, i+1, i+2 | -9, 111, 29, -3 |

These weights are exact: W(1/4) = 111/128, W(3/4) = 29/128,
W(5/4) = -9/128 and W(7/4) = -3/128. Each set sums to 128. The 2D weight of
a tap is `wy * wx`, in units of 1/16384. The hardware therefore computes the
exact bicubic value with integer arithmetic. Only the final rounding loses
precision.

**Result.** The output is computed as follows:

- `sum(wy*wx*P) + 8192` is shifted right by 14 bits, which rounds half up.
- The result is then saturated to 0..255. The negative lobes overshoot at
  hard edges, and without the clamp the value would wrap.
- Source coordinates outside the block are clamped to the block edge
  (border replication).
- Each block is enlarged on its own. It does not see pixels of the
  neighbouring block.

**Architecture.**

- There is one multiply-accumulate per component, and each tap takes one
  clock.
- A counter `{oy, ox, ky, kx}` walks the 16 taps of each output pixel.
- Stage 0 computes the clamped source address and the tap weight.
- Stage 1 registers the address into the block memory.
- Stage 2 gets the memory word, multiplies and accumulates. On the
  sixteenth tap it rounds, saturates and outputs the pixel.

The stages overlap from one pixel to the next, so the output rate is exactly
one pixel every 16 clocks. The first pixel appears 19 clocks after `start`. A
128 x 128 block gives its 65536 output pixels in 16 x 65536 + 3 clocks.

The four interpolators start together and run in lock-step, so the four
output streams are aligned pixel for pixel.

If you need a faster output rate, the place to change is the tap loop. For
example, four block-memory banks (by column modulo 4) would deliver a whole
row of taps per clock. The rest of the pipeline would stay the same.

## Frame sequencing (`split_sequencer`)

A camera cannot be stalled, and the design holds only one frame in the frame
memories and one set of blocks in the block memories. A frame goes through
three steps:

- **capture:** the converted frame is written into the three frame
  memories.
- **split:** one pass copies the frame memories into the twelve block
  memories. This takes 65536 + 1 clocks.
- **interpolate:** the four interpolators read the block memories and
  stream out the result. This takes 16 x 65536 + 3 clocks.

Once a frame is split, the frame memories are free. The next frame is
therefore captured while the previous one is still being interpolated. A
split waits until the previous interpolation has finished.

A frame whose start of frame arrives while the frame memories still hold an
unsplit frame is dropped whole, and `dropped_frames` counts it. A frame is
never partly overwritten; an assertion in `split_sequencer` guards this.

At one camera pixel per clock, frames arriving back to back are handled as
follows:

- frame 1 is shown
- frame 2 is dropped (it arrives during the split)
- frame 3 is captured during the interpolation of frame 1
- frame 4 is dropped (frame 3 is still waiting)

The end-to-end testbench runs exactly this sequence.

**Rate.** In steady state a frame is delivered every 65537 + 1048579 clocks
plus a few clocks of hand-over. The end-to-end test measures 1,114,119
clocks. This assumes the 307200-clock capture of a 640 x 480
frame fits inside the interpolation, which it does. The paper's 30 frames
per second therefore needs a clock of at least about 33.4 MHz, with the
camera pixels arriving as valid-qualified samples in that clock domain. At
a lower clock the design drops frames; it does not corrupt them.

## The other blocks

**`video_resize`** brings the camera frame to 256 x 256 by nearest-neighbour
resampling. Output pixel (ox, oy) is source pixel
(floor(ox*SRC_W/DST_W), floor(oy*SRC_H/DST_H)). It can shrink or enlarge,
independently in each direction.

- Incoming rows go into a two-row line memory, one bank per row parity.
- When a source row is complete, each output row that maps onto it is read
  out of its bank while the next row fills the other bank. A source row can
  map onto no output row (skipped when shrinking), one, or several (when
  enlarging).
- Within a row, the source column is stepped with a quotient-plus-remainder
  DDA, so there is no divider.
- Output comes one source row behind the input, in bursts of one pixel per
  clock.

**Rate rule.** The output rows of one source row must be produced before the
next source row is complete, which takes up to ceil(DST_H/SRC_H)*DST_W
clocks. For 640 x 480 to 256 x 256 this holds even with one camera pixel per
clock. Enlarging needs idle clocks in the camera stream. If the rule is
broken, `overflow` pulses and an assertion warns.

**`rgb2ycbcr` / `ycbcr2rgb`** use ITU-R BT.601 studio range with 8-bit
coefficients (x 1/256):

    Y  = 16  + ((66R + 129G + 25B + 128) >> 8)
    Cb = 128 + ((-38R - 74G + 112B + 128) >> 8)
    Cr = 128 + ((112R - 94G - 18B + 128) >> 8)

    R = sat((298C + 409E + 128) >> 8)
    G = sat((298C - 100D - 208E + 128) >> 8)
    B = sat((298C + 516D + 128) >> 8)

Here C = Y-16, D = Cb-128, E = Cr-128, and `>>` is an arithmetic shift.
Both conversions take two register stages. The reverse conversion saturates,
because interpolated values can leave the nominal ranges.

**`frame_store`** is the serial conversion of one component.

- A capture starts on a start-of-frame pixel while `capture_en` is high.
- It writes W*H consecutive valid pixels to addresses 0 .. W*H-1 in raster
  order.
- It pulses `frame_done` with the last one.
- An early start of frame restarts the capture.

**`image_splitter`** reads the frame memories once in raster order and writes
pixel (x, y):

- into block `(y/128)*2 + x/128`
- at address `(y%128)*128 + x%128`

Block and offset are kept in separate counters. The split grid
(`SPLIT_X_P` x `SPLIT_Y_P`) is a parameter.

**`block_mean_features`** computes the feature set that image retrieval
builds from split images: the mean of every row and of every column of each
block.

- It watches the splitter's block-memory writes of the luma.
- It keeps one running row sum, because a block row arrives as consecutive
  pixels.
- It keeps one accumulator per block column.
- Each mean, floor(sum / 128), goes into a result memory when its last
  pixel arrives.
- `feat_ready` rises two clocks after the last split write. The means are
  then read through `feat_rd_*` with one clock of latency.
- The next split clears them.

**`dp_ram`** is the memory used everywhere:

- one write port and one registered read port
- read-before-write
- no reset, like a block RAM

**`gray_rom_splitter`** is the compact variant.

- A 14-bit counter reads four 16384 x 8 ROMs in step, one per block of a
  256 x 256 gray picture.
- The four outputs are the four blocks, in raster order.
- ROM words appear one clock after their address, tagged with `pix_valid`
  and `pix_addr`.
- The ROMs are filled, at elaboration, with a computed test picture: the ramp (x + 2y)/3, a
  254-valued square over x, y in [32, 85), and a 10-valued bar over rows
  [160, 176).

## Top-level interface (`image_split_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock, synchronous active-high reset |
| `cam_valid`, `cam_sof`, `cam_pix` | in | 1, 1, 24 | camera raster stream, no back-pressure, `rgb_t` {r,g,b} |
| `out_valid`, `out_sof`, `out_pix` | out | 4, 4, 4x24 | one RGB stream per block |
| `resize_overflow` | out | 1 | resize rate rule broken (see `video_resize`) |
| `frame_held`, `blocks_busy` | out | 1 | sequencer status |
| `dropped_frames`, `frames_out` | out | 16 | frame counters |
| `feat_ready` | out | 1 | row/column means of the last split are complete |
| `feat_rd_blk`, `feat_rd_col`, `feat_rd_idx`, `feat_rd_data` | in, in, in, out | 2, 1, 7, 8 | read a mean: block, 0 = row / 1 = column, index, value one clock later |
| `gray_en` | in | 1 | run the gray ROM counter |
| `gray_addr`, `gray_valid`, `gray_pix_addr`, `gray_pix` | out | 14, 1, 14, 4x8 | gray block streams |

**Parameters.**

- `CAM_W`/`CAM_H` (640/480) set the camera size.
- `W`/`H` (256/256) set the working frame.
- The split grid and pixel width come from `split_pkg`.

The end-to-end test runs at these defaults in a few seconds of simulation
time, so no reduced configuration is needed for it.

## Resources

| memory | contents | total |
|---|---|---|
| frame memories | 3 x 65536 x 8 bits | 1.57 Mbit |
| block memories | 12 x 16384 x 8 bits | 1.57 Mbit |
| gray ROMs | 4 x 16384 x 8 bits | 0.52 Mbit |
| resize line memory | 2 x 640 x 24 bits | 0.03 Mbit |

That is more block RAM than the Virtex-II Pro XC2VP30 named in the paper
provides (136 x 18 Kbit = 2.45 Mbit). The very small utilisation the paper
reports comes from a hardware co-simulation setup in which the images stay
outside the FPGA. To fit the colour path on such a device, you need one of
these:

- a smaller working frame
- external memory
- dropping the separate frame memories and splitting directly while
  capturing

The logic itself is small: 12 multipliers for the interpolators, plus the
colour matrices.

## Where this design goes beyond the source

The paper gives the steps, the 256 x 256 / 128 x 128 sizes, bicubic
interpolation, per-component and per-block memories, and the counter-plus-ROM
gray circuit. These are this design's own choices:

- **Camera:** the 640 x 480 camera size, and the valid/sof stream format
  without back-pressure.
- **Resize:** nearest-neighbour resampling, and the line memory with its
  rate rule.
- **Colour conversion:** the BT.601 fixed-point coefficients.
- **Interpolation:** the Keys kernel with a = -0.5, centre alignment,
  border replication, rounding and saturation, and the serial 16-clock
  MAC.
- **Interpolator layout:** one interpolator per block handling Y, Cb and Cr
  together. The paper's eight interpolation subsystems do not map one to
  one onto four blocks times three components.
- **Sequencing:** frame sequencing, overlap and dropping.
- **Split grid:** `image_splitter` accepts any split grid, but the top is
  fixed at 2 x 2. The interpolator enlarges by exactly two, so only that
  grid brings each block back to the full frame size.
- **Gray ROMs:** the gray ROM contents and the 256 x 256 gray image size.
- **Means:** row and column means are taken of the luma only, with floor
  division. The retrieval transform applied to them afterwards is not
  specified, so it is not built.

The network side of video streaming (packetisation, transport) is described
in the paper only as background. It is not part of this RTL.

## Simulation

Every module has a self-checking testbench in `tb/`. Each one compares with
reference values computed from the defining formulas, not from the RTL
structure. `tb/tb_ref_pkg.sv` holds:

- the BT.601 reference
- a real-arithmetic bicubic reference built straight from the kernel
  formula

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_image_split_top` | Full default sizes. Four camera frames, two of them dropped. Every pixel of the eight output images, the 16-clock spacing, the lock-step, the counters, all row/column means of both splits, and the gray streams. Counts each mechanism (drop, capture/interpolation overlap, border replication, interpolation clamp, RGB clamp) and fails if one never occurs. About 2.5 M clocks, a few seconds. |
| `tb_bicubic_upscale2x` | 7 x 5 to 14 x 10, random and checkerboard data, exact timing, saturation in both directions |
| `tb_image_splitter` | 2 x 2 and 3 x 2 splits, each address written once, duration W*H+1 |
| `tb_video_resize` | 640 x 480 to 256 x 256, an odd shrink, two enlargements (one mixed with a shrink), pass-through, and the overflow flag |
| `tb_block_mean_features` | all means of a 2 x 2 split of a 10 x 6 frame, ready timing, clear |
| `tb_frame_store`, `tb_dp_ram`, `tb_split_sequencer`, `tb_rgb2ycbcr`, `tb_ycbcr2rgb`, `tb_gray_rom_splitter` | block-level behaviour and timing |

Example with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/split_pkg.sv tb/tb_ref_pkg.sv tb/tb_image_split_top.sv \
    --top-module tb_image_split_top
./obj_dir/Vtb_image_split_top
```

For other testbenches, replace the testbench file and top module. Include
`tb/tb_ref_pkg.sv` when the testbench imports it. Verilator finds the RTL
modules through `-Irtl`.

## Files

- `rtl/split_pkg.sv`: sizes, pixel types, kernel taps, saturation
- `rtl/image_split_top.sv`: top level
- `rtl/video_resize.sv`, `rtl/rgb2ycbcr.sv`, `rtl/frame_store.sv`,
  `rtl/image_splitter.sv`, `rtl/dp_ram.sv`, `rtl/bicubic_upscale2x.sv`,
  `rtl/ycbcr2rgb.sv`, `rtl/split_sequencer.sv`, `rtl/block_mean_features.sv`,
  `rtl/gray_rom_splitter.sv`: the blocks, one module per file
- `tb/`: one testbench per module, plus `tb_ref_pkg.sv` (reference models)
  and `resize_harness.sv` (drives and checks one resize configuration)
