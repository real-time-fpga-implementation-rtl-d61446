# Streaming Harris corner detector with grey, edge, median and sharpening filters

This is a video pipeline for an FPGA that processes one pixel per clock. It
finds Harris corners in a live camera stream as the pixels arrive, with no
frame buffer. The Harris detector shares its front end with three simpler
filters: a Sobel edge map, a 3x3 median filter and a 3x3 sharpening filter.
Board switches choose which filters are active, and several can be on at
once. The pipeline is sized for a 1280x1024 camera at 60 frames/s on a
108 MHz pixel clock, the SXGA rate. It was built as the programmable-logic part
of a Zynq-7000 camera system. That system's camera interface, colour
reconstruction, frame-buffer DMA and HDMI output are vendor IP and are not
included here.

The IP is `harris_vision_axis`. It has AXI4-Stream video ports and an
AXI4-Lite register port for the processor, and wraps the pipeline core
`harris_vision_top`:

```
 s_axis --> axis_to_pixel --> harris_vision_top (below) --> pixel_to_axis --> m_axis
 s_axil --> filter_regs --> edge_thr, harris_thr;  led, overrun --> STATUS

            +------------------- ip_gray_edge -------------------+
 in_rgb --> | gray_converter -> sobel_gradient -+-> sobel_edge --+--> y (5 clk)
            |                                   +-> harris_corner -+--> corner (11 clk)
            +----------------------------------------------------+
 y ------> ip_median_sharpen (median_filter -> sharpen_filter) ---> y' (9 clk)
 corner --> line_delay (1 line, 1 pixel) ------------------------> corner' (12 clk)
 in_rgb --> line_delay (3 lines, 3 pixels) -> cycle delay -------> rgb' (12 clk)
 sw -----> filter_control -> per-stage enables, led
 output register: red if (corner overlay on and corner'), else grey y' if any
                  intensity filter is on, else colour rgb'    (13 clk)
```

## The pixel stream

Every block uses the same bus. Each clock carries an 8- or 24-bit pixel and a
5-bit control word, `pix_ctrl_t` = {hStart, hEnd, vStart, vEnd, valid}. This
is the "streaming pixel" convention of common model-based vision tools, and
it maps directly onto AXI4-Stream video. `valid` may drop at any point: in
horizontal and vertical blanking, and also inside a line. Blocks move their
line memories and windows only on valid cycles. Their pipeline registers run
on every clock and carry the control word along, so a block's output has
exactly the frame structure of its input, delayed by a fixed number of
clocks. There is no back-pressure: a pixel source must be able to accept one
pixel per clock, as a camera can.

Frame position comes from the control word alone. `hStart` resets the column
counter and `hStart & vStart` resets the row counter. The only size the
hardware needs is `LINE_LEN`, the depth of a line memory. A frame may have
any number of lines, and a line any length up to `LINE_LEN`; a simulation
assertion flags a longer line.

### Windows, image shift and borders

Each 3x3 filter gets its neighbourhood from `window_gen`. Two line memories
(`line_mem`) hold the previous two lines. On every valid pixel the column at
the current x position is read and moved one line up, then shifted into a 3x3
register window. The window that comes out with the pixel at stream position
(r, c) therefore covers rows r-2..r and columns c-2..c. Its centre is the
image pixel (r-1, c-1).

The blocks do not buffer extra lines to put that result back at (r-1, c-1).
The result stays at stream position (r, c). So **every 3x3 stage shifts the
image down by one line and right by one pixel**. The output frame has the
same size and timing as the input frame. Its first line and first column hold
border results, and the input's last line and last column are never the
centre of a window. This avoids flushing lines through the vertical blanking.
The cost is that paths through different numbers of 3x3 stages must be
realigned. Taps above the first line or left of the first column read as
zero (zero padding). The masking uses the row and column counters, so
anything left in a line memory from the previous frame or line can never
leak into the output. The line memories therefore need no reset.

| stage | module | latency (clk) | image shift |
|---|---|---|---|
| RGB to grey | `gray_converter` | 2 | 0 |
| gradients | `sobel_gradient` | 2 | 1 |
| edge map / grey bypass | `sobel_edge` | 1 | 0 |
| Harris response | `harris_corner` | 7 | 1 |
| median / bypass | `median_filter` | 2 | 1 |
| sharpen / bypass | `sharpen_filter` | 2 | 1 |
| whole pipeline | `harris_vision_top` | 13 | 3 |

All latencies are constants in `pixel_stream_pkg`. The top level derives its
alignment delays from them.

## Harris corner detector

Corners are points where the intensity changes strongly in two directions.
For each pixel the detector forms the structure tensor, a weighted sum over a
window of the gradient products:

```
M = sum w(u,v) * | Ix^2   IxIy |      w = [1 2 1; 2 4 2; 1 2 1] / 16
                 | IxIy   Iy^2 |
R = det(M) - k * trace(M)^2,  k = 41/1024 (about 0.04);  corner = R > harris_thr
```

If both eigenvalues of M are large the point is a corner and R is large and
positive. On an edge one eigenvalue dominates and R is negative. In a flat
region R is near zero.

Fixed-point path, at the defaults:

1. `sobel_gradient` produces Ix and Iy with the 3x3 Sobel kernels, signed
   11 bits (|g| <= 1020). The same gradients drive the edge filter.
2. Each gradient is shifted right by `GRAD_SHIFT` = 3 (arithmetic shift, so
   it rounds down) to signed 8 bits. The three products are formed in 16
   bits. This shift is the only place where precision is dropped on purpose.
   It keeps the products and everything after them small.
3. A second `window_gen` (48 bits wide) gives the 3x3 window of products. The
   binomial weights are shifts and adds, and the sums are divided by 16 with
   an arithmetic shift, giving A = sum w Ix^2, B = sum w Iy^2 and
   C = sum w IxIy in 17 bits.
4. The next three stages are A*B, C*C and A+B; then det = AB - C^2 and
   trace^2; then R = det - (trace^2 * K_NUM) >>> K_SHIFT. Every intermediate
   value is wide enough to be exact, and R fits the 36-bit signed `resp`
   output with room to spare.
5. A last register compares R with the signed threshold `harris_thr`.

The window adds one more line and pixel of shift, so `corner` at stream
position (r, c) refers to the grey image pixel (r-2, c-2). The detector has
no non-maximum suppression. A strong corner therefore marks a small cluster
of pixels, not a single one.

`GRAD_SHIFT`, `K_NUM` and `K_SHIFT` are parameters of `harris_corner`. The
widths in the module follow from them. `RESP_W` (36) in the package is sized
for the defaults only.

## The other filters

* **Grey**: Y = (77 R + 150 G + 29 B + 128) >> 8. These are the ITU-R BT.601
  luma weights (0.299, 0.587, 0.114) scaled to sum to 256, with rounding.
  The output is full range, 0..255.
* **Sobel edge**: |Ix| + |Iy| > `edge_thr` gives 255, otherwise 0.
* **Median**: a rank filter. Each of the nine pixels counts how many others
  are smaller, with ties broken by position, and the pixel of rank 4 is
  output. This is 72 comparators and one register stage.
* **Sharpen**: 5c - (n + s + e + w), clamped to 0..255.

When a filter is switched off it outputs its window centre pixel. A bypassed
filter keeps the same latency and image shift, so changing the selection
never changes the stream timing.

## AXI4-Stream packaging

The IP connects to AXI4-Stream video on both sides: 24-bit RGB in `TDATA`,
`TUSER` on the first pixel of a frame, and `TLAST` on the last pixel of each
line. `axis_to_pixel` rebuilds the control word. `hStart` marks a `TUSER` beat and
the first beat after each `TLAST`, `vStart` is `TUSER`, `hEnd` is
`TLAST`, and `vEnd` is the `TLAST` of line `FRAME_LINES-1`. Cycles without a
beat become idle pixels. `pixel_to_axis` does the reverse and sends the
corner flag with each beat as the side-band bit `m_axis_corner`.

The pipeline has no way to stall, so `s_axis_tready` is always 1 and the
video source sets the pace. This suits a camera, or a frame-buffer reader
that delivers one pixel per clock. The sink must likewise accept every beat.
If it refuses one, the beat is lost and the sticky `overrun` output goes
high. A stalling sink would need a FIFO sized for its longest stall; no such
FIFO is included. Each bridge adds one clock, so the IP's latency is 15
clocks.

## Processor registers

The two thresholds are set by software through `filter_regs`, a small
AXI4-Lite slave with four 32-bit registers:

| address | name | bits | reset |
|---|---|---|---|
| 0x0 | EDGE_THR | [10:0] Sobel magnitude threshold | 300 |
| 0x4 | HARRIS_THR_LO | [31:0] of the signed 36-bit Harris threshold | 1000000 |
| 0x8 | HARRIS_THR_HI | [3:0] = threshold bits 35:32 | 0 |
| 0xC | STATUS (read only) | [7:0] active filters (as `led`), [8] `overrun` | - |

A write is taken when the address and data are both valid, and `WSTRB`
selects the bytes. The OKAY response follows one clock later. A read answers
one clock after its address. Only one transaction of each kind is open at a
time, and a response is held until the master takes it (a simulation
assertion checks this). New thresholds take effect at once, so software
should write them between frames; the 36-bit threshold is split over two
registers and is briefly half-updated. The switches stay board inputs, as
in the original system.

## Filter selection and alignment in the pipeline core

`filter_control` passes the eight switches through a two-flop synchroniser.
It takes a new selection only on the first valid pixel of a frame:

| switch | function |
|---|---|
| sw[0] | grey output |
| sw[1] | Sobel edge map in the intensity path |
| sw[2] | paint detected corners red |
| sw[3] | median filter |
| sw[4] | sharpening filter |
| sw[7:5] | unused |

`led[4:0]` shows the active selection. The top level delays the selection
separately for each stage, by that stage's distance from the input. So every
stage switches on exactly the same frame boundary, and no frame is ever
processed with mixed settings, even without vertical blanking.

The top then realigns three paths that have been through different numbers
of 3x3 windows:

* The intensity path goes through three windows.
* The corner flag goes through two, so it gets one more line and pixel in a
  1-bit `line_delay`.
* The colour input goes through none, so it gets three lines and three
  pixels in a 24-bit `line_delay`.

Cycle delays (`pipe_delay`) then equalise the latencies. A simulation
assertion checks that the corner path and the intensity path carry
identical control words. At the output, `out_rgb` at stream position (r, c)
shows the image pixel (r-3, c-3). It is red if the corner overlay is on and
that pixel is a corner. Otherwise it is grey if any of grey, edge, median or
sharpen is on, and the original colour if none is. `out_corner` is the raw,
aligned corner flag, whatever the switches say.

The filter order is fixed: grey, then edge, then median, then sharpen. The
Harris detector always works on the grey image, never on the filtered one.

## Parameters and capacity

| parameter | default | where |
|---|---|---|
| `LINE_LEN` | 1280 | all windowed blocks and the top: line-memory depth = longest line |
| `GRAD_SHIFT` | 3 | `harris_corner` |
| `K_NUM` / `K_SHIFT` | 41 / 10 | `harris_corner`, k of about 0.04 |
| `edge_thr`, `harris_thr` | registers | run-time thresholds: ports on the core, `filter_regs` in the IP |

At the defaults the pipeline has 2+2+2+2 (windows) + 1 + 3 (line delays)
= 12 line memories, all 1280 deep. Six are 8 bits wide, two 48 bits
(Harris products), one 1 bit and three 24 bits.

`FRAME_LINES` (1024) on `harris_vision_axis` and `axis_to_pixel` is used
only to place `vEnd`.

* 1280x1024 at 60 fps fits. It is 78.6 Mpixel/s active, or 108 Mclock/s
  with standard SXGA blanking (1688x1066 total), and the pipeline takes one
  pixel per clock at 108 MHz.
* 1920x1080 lines need `LINE_LEN = 1920`, and 60 fps at that size needs a
  148.5 MHz clock.
* The sensor's full 210 fps (275 Mpixel/s) is beyond one pixel per clock
  at 108 MHz.

## Where this RTL makes its own choices

The original system was generated from a model-based tool flow. It specifies
the structure (grey conversion, Harris/Sobel edge detection and the grey
converter in one IP block, median and sharpening in a second), the Harris
criterion built on the matrix M, BT.601 grey weights, switch-selectable
filters with several active at once and status LEDs, the streaming pixel
interface, and the 1280x1024 / 60 fps / 108 MHz operating point. The
following are choices of this implementation:

* Sobel kernels for Ix and Iy, shared by the edge filter and the Harris
  detector.
* The 3x3 binomial window w(u, v), k = 41/1024, and the gradient pre-shift.
* A binary Sobel edge map using |Ix| + |Iy|.
* The 3x3 window size of the median filter, and the sharpening kernel.
* The convention that each 3x3 stage shifts the image by one line and one
  pixel, with zero padding at the borders.
* The switch-bit assignment, frame-boundary switching and the output
  composition (grey versus colour, red corner overlay).
* Synchronous active-high reset. Line memories are not reset.
* The register map of `filter_regs`, its reset values and its
  one-transaction-at-a-time timing.
* AXI4-Stream without back-pressure: an always-ready input and an overrun
  flag on the output.
* No non-maximum suppression.

Not included: the camera sensor interface, colour-filter-array
interpolation, RGB to YCbCr conversion, chroma resampling, on-screen display,
frame-buffer DMA, HDMI output and the processor system. The pipeline expects
RGB pixels after colour reconstruction and returns RGB pixels.

## Files

`rtl/`: `pixel_stream_pkg` (types, sizes, latencies), `line_mem`,
`window_gen`, `line_delay`, `pipe_delay`, the filter blocks listed above,
`ip_gray_edge`, `ip_median_sharpen`, the pipeline core `harris_vision_top`,
the bridges `axis_to_pixel` and `pixel_to_axis`, the register block
`filter_regs`, and the IP top `harris_vision_axis`.

`tb/`: one self-checking testbench per block (`tb_<module>`). They share
`tb_video_pkg`, which holds frame-level reference models written
independently of the RTL, and the helpers `tb_stream_src` (frames with
blanking and random idle cycles) and `tb_stream_pos` (recovers the frame,
row and column of an output pixel and checks its control flags). Every
testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog.

* `tb_harris_vision_top` runs seven 48x32 frames through every switch
  setting. It counts each mechanism and fails if one never happened: grey,
  edge pixels, painted corners, median changes, sharpen saturation, colour
  pass-through, idle cycles inside lines, and selection changes.
* `tb_harris_vision_axis` runs the same test through the AXI4-Stream ports,
  after reading the reset values of the registers and writing other
  thresholds over AXI4-Lite. At the end it reads STATUS back.
* `tb_filter_regs` sends random AXI4-Lite traffic: AW and W apart, held-off
  responses and random byte strobes, against a register model.
* `tb_harris_vision_axis_full` and `tb_harris_vision_top_full` run the IP
  and the core at their default parameters, each on three full 1280x1024
  frames. Each checks all 3.9 million output pixels and takes about half a
  minute.

To simulate, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_harris_vision_axis rtl/pixel_stream_pkg.sv tb/tb_video_pkg.sv \
  tb/tb_harris_vision_axis.sv
./obj_dir/Vtb_harris_vision_axis
```

Block testbenches override `LINE_LEN` with small frames. To change the frame
width, set `LINE_LEN` on the top. If the latency of a block is changed, its
constant in `pixel_stream_pkg` must change with it.
