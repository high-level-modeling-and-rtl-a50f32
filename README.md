# Streaming 3x3 edge detection without multipliers

This is a pixel-stream accelerator for grey-level images that produces binary
edge maps with the Sobel and Prewitt operators, plus a general 3x3 filter
whose coefficient window is programmable. It rests on two ideas:

* **The image moves, the window stays put.** The pixels are not addressed in a
  frame memory. The raster-order stream is pushed through three rows of
  shift registers, each one image line long. The nine registers at the ends of
  the rows always hold the 3x3 neighbourhood of one pixel, and each clock moves
  it to the next pixel. The filter reads nine fixed registers and needs no
  address logic.
* **Masks with entries in {-2, -1, 0, 1, 2} need no multipliers.** Every product
  is a pass, a negation or a one-bit left shift. The whole filter is adders,
  subtractors and absolute values.

The architecture follows the Xilinx System Generator edge-detection models in
"High Level Modeling and Hardware Implementation of Image Processing
Algorithms Using XSG". Those models use a 3x3 window held in three rows of
line-long shift registers. The Sobel model sums three differences per
direction, adds |Gx| and |Gy|, compares the sum with the constant 95 and scales
the result by 255. A general filter forms the sum of pixel times coefficient
and saturates it to 0-255. The handshake, the pipeline depths, the bit widths,
the reset and the exact line-delay length are choices of this RTL; they are
listed under "Where this RTL makes its own choices".

## Data flow

```
                         +-------------------+    +------------------+
pix_in/pix_valid ------->|  pixel_window     |--->| gradient_core    |--> edge_binarize --> sobel_pix
   (raster order,        |  3 rows x IMG_W   |    |  (Sobel)         |    (>95 ? 255 : 0)
    one pixel/cycle)     |  shift registers  |    +------------------+
                         |                   |    +------------------+
                         |  win[3][3],       |--->| gradient_core    |--> edge_binarize --> prewitt_pix
                         |  win_valid        |    |  (Prewitt)       |
                         |                   |    +------------------+
                         |                   |    +------------------+
                         |                   |--->| conv_window_     |--> conv_pix
                         +-------------------+    | filter + clamp   |
                                                  +------------------+
                                   coef[3][3], norm_shift --^
```

`xsg_edge_top` wires one window to all three filters. Each output has its own
valid strobe.

## The sliding window (`pixel_window`, `line_buffer`)

This is the part that takes the most care to read correctly.

Each of the K rows (K = 3, or 5 for a 5x5 window) is IMG_W samples long. It
consists of a line delay of IMG_W-K samples (`line_buffer`) followed by K
window registers. The rows are chained: the input feeds the line delay of the
first row, and the last window register of a row feeds the line delay of the
next. All K*IMG_W stages advance together on every clock with `pix_valid`
high, and nothing moves when it is low.

After the k-th accepted pixel s[k], the window in image orientation is:

```
win[i][j] = s[ k - (K-1-i)*IMG_W - (IMG_W-K) - (K-1-j) ]
            i = 0 upper row ... K-1 lower row
            j = 0 left column ... K-1 right column
```

Because a line delay sits in front of the first row as well, the newest pixel
in the window (`win[K-1][K-1]`) is IMG_W-K samples old. This costs one line of
latency but keeps every row identical. The window contains only real pixels
from accepted sample K*IMG_W-1 onward. A counter holds `win_valid` low until
then, so the first K*IMG_W-1 pixels after reset produce no output. From then
on, every accepted pixel produces exactly one window and so one output pixel.

There is no special treatment of image borders. At the start of a line the
window's left columns still hold the end of the previous line, as in any plain
shift-register window. The edge pixels of each line are therefore
meaningless, and the host should discard them. Frames follow each other
without a gap in the same way.

`line_buffer` has two implementations with identical behaviour, selected by
`LINE_RAM` on the top (`USE_RAM` on the buffer itself):

* The default is a circular buffer of IMG_W-K-1 words plus an output
  register. It maps onto block RAM. Its memories are not reset; the fill
  counter makes that harmless.
* `LINE_RAM = 0` uses a plain chain of IMG_W-K flip-flops, all reset.

## Sobel and Prewitt edge maps (`gradient_core`, `edge_binarize`)

For a window w (row i, column j):

```
Gx = (w[0][2]-w[0][0]) + c*(w[1][2]-w[1][0]) + (w[2][2]-w[2][0])
Gy = (w[2][0]-w[0][0]) + c*(w[2][1]-w[0][1]) + (w[2][2]-w[0][2])
mag = |Gx| + |Gy|          c = 2 (Sobel, a left shift) or 1 (Prewitt)
edge pixel = 255 if mag > THRESHOLD (95) else 0
```

The adder tree has five register stages: differences, first partial sum,
second partial sum, absolute values, final sum. The third difference is
delayed by one register so that it meets the partial sum of the same window.
The threshold stage adds two more registers: compare, then scale by 255.
Intermediate values are 12-bit signed. The largest magnitude is 2040 (Sobel)
or 1530 (Prewitt), so nothing overflows. The sign conventions of Gx and Gy do
not matter, because only magnitudes are used.

## General coefficient filter (`conv_window_filter`, `pixel_clamp`)

```
conv_pix = clamp_0_255( floor( sum_ij coef[i][j] * win[i][j] / 2**norm_shift ) )
```

`coef` is a 3x3 array of 3-bit signed values. Only -2..2 are meaningful; the
codes -4 and 3 act as 0. `norm_shift` (0..7) gives power-of-two division.
Typical settings:

| mask                           | coef rows               | norm_shift |
|--------------------------------|-------------------------|-----------:|
| horizontal Sobel component     | -1 0 1 / -2 0 2 / -1 0 1 | 0 |
| smoothing                      | 1 1 1 / 1 2 1 / 1 1 1    | 3 |
| sharpening / high-pass         | 0 -1 0 / -1 2 -1 / 0 -1 0 | 1 |

`coef` and `norm_shift` are sampled on the clock edge after the one that
accepts the pixel completing the window. Change them only while the stream is
paused, and hold them for two clocks after the last pixel of the old setting.
Results outside 0..255 saturate.

`conv_window_filter` and `pixel_window` also work with K = 5. The top uses K = 3.

## Interface and timing of `xsg_edge_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| pix_valid, pix_in | in | 1, 8 | input pixel stream, raster order, any number of idle cycles allowed |
| coef | in | 3x3x3 signed | general filter coefficients |
| norm_shift | in | 3 | general filter divisor 2**norm_shift |
| sobel_pix, sobel_valid | out | 8, 1 | Sobel edge map (0/255) |
| prewitt_pix, prewitt_valid | out | 8, 1 | Prewitt edge map (0/255) |
| conv_pix, conv_valid | out | 8, 1 | general filter output |

Throughput is one pixel per clock. Latency is counted from the clock edge that
accepts the pixel completing a window to the clock edge on which the result
is sampled: 8 cycles for Sobel and Prewitt, 4 for the general filter. The
output stream carries one pixel per input pixel, after the first 3*IMG_W-1
pixels.

Parameters: `IMG_W` (line length, default 320), `THRESHOLD` (default 95) and
`LINE_RAM` (default 1: block-RAM line delays; 0: registers).
The line length is fixed when the design is built. A 128x128 image needs an
instance with `IMG_W = 128`. Image height does not matter to the hardware.

Synthesised at the defaults, the line buffers take 3 x 316 x 8 = 7584 memory
bits. The rest is about 510 flip-flops and about 50 adders and comparators.
For comparison, the reference System Generator builds of a single filter
(Sobel or Prewitt alone) used 249 to 355 slice registers, 227 to 275 LUTs and
2 block RAMs. This top carries three filters on one window.

## Where this RTL makes its own choices

* **Handshake and reset.** The reference models describe a free-running
  stream, one pixel per clock. Here `pix_valid` can pause the stream, each
  output has a valid strobe, and an asynchronous active-low reset is added.
* **Line delay length.** Each row is IMG_W-3 delay stages plus 3 window
  registers, so a row is exactly one line. The Simulink model built for
  320-pixel images used a 318-sample line buffer with a different register
  arrangement.
* **Factor 2 in Sobel.** It is applied as a shift on the centre difference.
* **Comparison direction.** Edges are `mag > 95`, which gives white edges on a
  black background.
* **Prewitt threshold.** Prewitt uses the same threshold as Sobel.
* **Pipeline balancing.** Every arithmetic stage is registered. The operands of
  each adder are balanced so that they come from the same window.
* **Shared window.** One window feeds all three filters. In the reference,
  Sobel and Prewitt were separate builds.
* **Division and saturation.** The general filter's division is limited to
  powers of two, and its "adjustment to 0-255" is saturation.

## Not included

* Host-side image handling: transposing the image matrix, flattening it to a
  stream and rebuilding the matrix afterwards. That runs in software. The
  testbenches produce and consume raster streams directly.
* The hardware-in-the-loop link between the host simulation and the FPGA
  board. This is vendor infrastructure.

## Files

| file | contents |
|------|----------|
| `rtl/xsg_edge_pkg.sv` | pixel and coefficient types, filter-kind enum, shift-add product function |
| `rtl/line_buffer.sv` | line delay, in block RAM or registers |
| `rtl/pixel_window.sv` | KxK sliding window from K chained rows |
| `rtl/gradient_core.sv` | Sobel / Prewitt gradient magnitude |
| `rtl/edge_binarize.sv` | threshold and 0/255 output |
| `rtl/conv_window_filter.sv` | general coefficient-window filter |
| `rtl/pixel_clamp.sv` | saturation to 0..255 |
| `rtl/xsg_edge_top.sv` | top level |
| `tb/edge_ref_pkg.sv` | integer reference model and synthetic test image |
| `tb/edge_stream_checker.sv` | scoreboard for the top level |
| `tb/tb_*.sv` | one self-checking testbench per module, plus end-to-end runs |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. It has a
watchdog. Example with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/xsg_edge_pkg.sv tb/edge_ref_pkg.sv tb/tb_xsg_edge_full.sv \
  --top-module tb_xsg_edge_full -o sim
./obj_dir/sim
```

| testbench | what it runs |
|-----------|--------------|
| `tb_line_buffer` | delays 5 and 317, RAM and register versions, random enable |
| `tb_pixel_window` | 3x3 on 8-pixel lines (both line-delay versions) and 5x5 on 9-pixel lines, random gaps, every window element and the valid strobe |
| `tb_gradient_core` | random, flat and extreme windows; Sobel and Prewitt values and 5-cycle latency |
| `tb_edge_binarize` | magnitudes 94/95/96, extremes, random; 2-cycle latency |
| `tb_pixel_clamp` | every 12-bit signed input |
| `tb_conv_window_filter` | K = 3 and K = 5, random masks and divisors; 3-cycle latency |
| `tb_xsg_edge_top` | 16-pixel lines, three frames with three masks, random stalls. It counts stalls, window filling, edge and non-edge decisions of both operators, saturation at 0 and 255, and division, and fails if any never occurs |
| `tb_xsg_edge_full` | default build (320-pixel lines), one full 320 x 256 frame, every output checked (seconds) |
| `tb_xsg_edge_workloads` | a 320 x 250 frame at the default build and a 128 x 128 frame on an `IMG_W = 128`, `LINE_RAM = 0` build, run in parallel |

All image testbenches use a synthetic image: a grey ramp, a bright disk, a dark
rectangle, a thin white line and light noise. They compare every output pixel
with an integer model of the operators in `tb/edge_ref_pkg.sv`.
