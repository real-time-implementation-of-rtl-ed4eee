# Contextual image filtering for 4K video, several pixels per clock

A 3840x2160 @ 60 fps video stream has a pixel rate of 594 MHz (4400 x 2250 pixels
per frame including blanking). FPGA logic cannot run a one-pixel-per-clock
pipeline at that rate. The stream is therefore carried as **4 pixels per clock
(ppc) at 148.5 MHz**, or 2 ppc at 297 MHz. Every pipeline stage must then accept
and produce 2 or 4 pixels on every clock.

This is easy for point operations: copy the operation once per pixel. It is harder
for *contextual* operations, where every output pixel depends on a 3x3
neighbourhood. This RTL implements a context generator for multi-pixel streams
and the filters built on it:

* box filter (3x3 mean)
* Gaussian filter
* Sobel edge magnitude
* median filter
* Canny edge detector
* binary erosion, binary dilation and binary median

The RTL also includes the point operations the filters need: RGB-to-grey and
binarization. Everything sits in one processing top, meant to go between an HDMI
receiver and an HDMI transmitter. A run-time selector picks which result goes out.

All RTL is synthesizable SystemVerilog (IEEE 1800-2017). Each module has a
self-checking testbench. A full 3840x2160 frame at the default parameters is
simulated and checked pixel by pixel.

## The stream format

Every module uses the same stream convention:

* One **element** per clock. An element holds `PPC` horizontally consecutive
  pixels. Pixel 0 is the leftmost and sits in the low bits.
* A **sideband** travels with each element: `de` (data enable), `hs` and `vs`,
  all active high (`vid_pkg::sb_t`). The stream includes blanking. The modules do
  not interpret the sideband. They only keep it aligned with the pixels it belongs
  to.
* There is no handshake and no back-pressure. Every stage accepts one element on
  every clock, including during blanking.
* Colour pixels are RGB888 (`vid_pkg::rgb_t`), grey pixels are 8 bits and binary
  pixels are 1 bit.

Because blanking flows through the delay lines, a line delay must span the
**total** line length: `HSIZE = H_TOTAL / PPC` elements, which is 4400/4 = 1100
at the default. The last image lines then leave the filters during vertical
blanking, with no extra logic.

## Context generation with several pixels per clock (`context_gen`)

This is the core of the design. With one pixel per clock, a 3x3 context is a
delay line: three registers per row, joined by line-length delays. `context_gen`
keeps that structure, but each storage cell holds a whole element. For 2 ppc:

```
 input ──► [e33] ─► [e32] ─► [e31] ─► delay HSIZE-3 ─┐
        ┌─────────────────────────────────────────────┘
        └► [e23] ─► [e22] ─► [e21] ─► delay HSIZE-3 ─┐
        ┌─────────────────────────────────────────────┘
        └► [e13] ─► [e12] ─► [e11]

 pixels held, as they lie in the image (p0/p1 = pixel 0/1 of an element):

        e11.p0 e11.p1 | e12.p0 e12.p1 | e13.p0 e13.p1     (oldest line)
        e21.p0 e21.p1 | e22.p0 e22.p1 | e23.p0 e23.p1
        e31.p0 e31.p1 | e32.p0 e32.p1 | e33.p0 e33.p1     (newest line)

 window of output e22.p0: columns e11.p1, e12.p0, e12.p1
 window of output e22.p1: columns e12.p0, e12.p1, e13.p0
```

The element registers hold 18 pixels. The two windows of the centre element
`e22` use 12 of them. With 4 ppc the registers hold 36 pixels, and the four
windows use 18. Every clock, `context_gen` presents `PPC` complete windows
(`win[k][r][c]`), one per pixel of the centre element. `PPC` copies of the
operation then run in parallel, and the output again carries `PPC` pixels per
clock.

The general rules, for odd window size `K` and `R = (K-1)/2`:

* Each row holds `NE = 2*ceil(R/PPC) + 1` elements (3 for any 3x3 case).
* Each row is joined to the next by a delay of `HSIZE - NE` clocks.
* The window of centre pixel `k` takes flat row positions
  `(NE-1)/2*PPC + k - R ... + R`.
* The centre element reaches the window `R*HSIZE + (NE-1)/2 + 1` clocks after it
  entered. For 3x3 this is `HSIZE + 2` clocks.
* The sideband is stored in the same registers and RAMs as the pixels, so
  `sb_out` is exactly the sideband of the centre element.

`line_delay` is the delay element: a circular buffer of `DELAY-1` words with one
wrapping address and a registered read-before-write. It maps onto one block RAM
per row. Its output is forced to zero until the RAM has been written once after
reset.

**Borders.** No border handling is done. A window at the left or right edge of
the image includes blanking samples. A window in the first or last line includes
the neighbouring blanking line, or zeros right after reset. Outputs at the
1-pixel image border are therefore filter responses to blanking data. If that
matters, mask them downstream using `de`.

## Operations

Each 3x3 operation is a small combinational module with input `win[r][c]`
(`r=0` is the top row, `c=0` the left column) and one output pixel.
`ctx_filter` wraps one `context_gen`, `PPC` copies of the operation chosen by
the `OP` parameter, and an output register. Latency is `HSIZE + 3` clocks.

| module       | operation                                                                  |
|--------------|----------------------------------------------------------------------------|
| `box_op`     | floor(sum/9); the division is computed as `(sum*7282) >> 16`, exact for all sums |
| `gauss_op`   | kernel [1 2 1; 2 4 2; 1 2 1]/16, rounded                                   |
| `sobel_op`   | \|Gx\| + \|Gy\|, saturated to 255                                          |
| `median_op`  | 19-comparator network: sort columns, then med3(max of mins, med of meds, min of maxes) |
| `erode_op`   | AND of the 9 bits                                                          |
| `dilate_op`  | OR of the 9 bits                                                           |
| `bmedian_op` | 1 if five or more of the 9 bits are set                                    |

Point operations are replicated `PPC` times and registered once:

* `rgb2gray`: Y = (77R + 150G + 29B + 128) >> 8, which is BT.601 weights.
* `binarize`: the output bit is `y > thr`.

## Canny pipeline (`canny_edge`)

Canny needs more than one neighbourhood, so it is four chained `ctx_filter`s,
each with its own context generator:

1. **Gaussian** smoothing (`gauss_op`).
2. **Gradient** (`canny_grad_op`): Sobel Gx and Gy, an 11-bit magnitude
   |Gx|+|Gy|, and a 2-bit direction sector:
   * sector 0: |Gy| <= 0.414|Gx|
   * sector 2: |Gy| >= 2.414|Gx|
   * sector 1: Gx and Gy have the same sign
   * sector 3: otherwise

   In hardware the two constants are 106/256 and 618/256.
3. **Non-maximum suppression and double threshold** (`canny_nms_op`). A pixel
   survives only if its magnitude is at least that of both neighbours along its
   sector. A survivor is classed *strong* if it reaches `th_hi`, *weak* if it
   reaches `th_lo`, and *none* otherwise.
4. **Hysteresis** (`canny_hyst_op`). Strong pixels are edges. A weak pixel is an
   edge only if one of its eight neighbours is strong.

Step 4 is a single-pass, 3x3 version of hysteresis. Weak edges are not followed
over longer distances, because that would need frame storage and the pipeline
has none. The latency is `4*(HSIZE+3)` clocks.

## The processing top (`video_proc_top`)

```
in_pix/in_sb ─► reg ─┬──────────────────────────────────────────► PASS
                     └► rgb2gray ─┬──────────────────────────────► GRAY
                                  ├► ctx_filter box / gauss / sobel / median
                                  ├► canny_edge
                                  └► binarize ─┬─────────────────► BINARY
                                               └► ctx_filter erode / dilate / bmedian
                          all results ─► mode mux ─► reg ─► out_pix/out_sb
```

All paths run at once. Each path carries its own copy of the sideband, so the
output syncs are correct whichever `mode` (`vid_pkg::mode_e`) is selected. Grey
and binary results are sent as R=G=B, with binary 1 sent as 255. A mode change
takes effect on the next clock. A change in mid-frame therefore mixes two paths
in that frame.

| mode                          | latency in clocks (input to output) |
|-------------------------------|-------------------------------------|
| PASS                          | 2                                   |
| GRAY                          | 3                                   |
| BINARY                        | 4                                   |
| BOX, GAUSS, SOBEL, MEDIAN     | HSIZE + 6 (1106 at default)         |
| ERODE, DILATE, BMEDIAN        | HSIZE + 7                           |
| CANNY                         | 4*(HSIZE+3) + 3                     |

Top parameters:

* `PPC` (default 4).
* `H_TOTAL`: pixels per line including blanking (default 4400, from the CTA-861
  3840x2160@60 timing).

The line RAMs are sized from these two parameters. The frame height does not
matter. Run-time inputs:

* `bin_thr`: binarization threshold.
* `canny_lo`, `canny_hi`: Canny thresholds on the 11-bit magnitude.

At the defaults, synthesis keeps 11 context generators. Each has two line RAMs
of 1097 words; the word is 35 bits for an 8-bit 4-ppc stream (four pixels plus
the sideband). Together the line buffers hold about 650 kbit. RGB-to-grey plus
Sobel alone needs two RAMs of 1097 x 35 bits, about two 36-kbit block RAMs.

## What is not here

* **HDMI path.** The video PHY controller and the HDMI 1.4/2.0 receiver and
  transmitter subsystems are vendor IP and are not part of this RTL. The top
  exposes the native-video signals they would drive and receive. An AXI4-Stream
  variant of the interface is not provided.
* **Other point operations.** Gamma correction, LUT coding and other colour
  conversions would be replicated per pixel exactly like `rgb2gray`; none is
  included.
* **Active-only line buffers.** The line RAMs also store the blanking part of
  each line (1100 rather than 960 elements at 4 ppc). A variant that writes only
  while `de` is high would save about 13 % of the RAM, but it would need extra
  logic to flush the last lines of a frame.
* **Timing closure.** Timing at 148.5 MHz (4 ppc) or 297 MHz (2 ppc) has not
  been analysed. The operations are single-cycle combinational blocks between
  registers; a deeper pipeline may be needed in the median and Canny-gradient
  stages at 297 MHz.
* **This design's own choices.** Many details of the operations are not fixed by
  the scheme itself. They are this design's own choices: the Gaussian kernel,
  the Sobel magnitude, the grey weights, the binarization rule, the
  structuring element, all of the Canny details, border behaviour, reset and the
  mode selector. The context generation structure (element registers, delay
  lines of `HSIZE` minus the row length, per-pixel windows) and the replication
  of point operations are the established scheme for multi-pixel video.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
Each also has a watchdog that counts a failure if the test hangs.

| testbench                | what it checks |
|--------------------------|----------------|
| `line_delay_tb`          | exact delay and zero fill, for two delay lengths |
| `context_gen_tb`         | every window pixel and the sideband, for 2 ppc 3x3, 4 ppc 3x3, 1 ppc 3x3 and 2 ppc 7x7 |
| `rgb2gray_tb`, `binarize_tb` | each pixel against integer references; one-cycle latency |
| `box_op_tb` ... `bmedian_op_tb` | corner-case and random windows against independent references (sort, count) |
| `ctx_filter_tb`          | all ten operations at 4 and 2 ppc on random streams, at latency HSIZE+3 |
| `canny_edge_tb`          | the four-stage chain on a synthetic scene; requires strong edges, weak edges kept and dropped, and suppression |
| `video_proc_top_tb`      | reduced raster (48x16); all eleven modes plus a mid-frame switch, every pixel and sync |
| `video_proc_top_full_tb` | one full 3840x2160 frame at the default parameters in Sobel mode, every element of the frame including blanking; rate and active-pixel count |
| `video_proc_top_2ppc_tb` | the same full frame with the top built for 2 ppc |

The testbenches compute their expected images with `tb/img_ref_pkg.sv`. Its
window rule treats the stream as one flat sequence of pixels: window pixel
`[r][c]` of pixel `i` is pixel `i + (r-1)*H_TOTAL + (c-1)`, and pixels before
reset count as zero. This is exactly what the hardware computes, borders
included.

To run a testbench with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/vid_pkg.sv tb/img_ref_pkg.sv tb/video_proc_top_tb.sv --top-module video_proc_top_tb
./obj_dir/Vvideo_proc_top_tb
```

To run another test, replace the testbench file and module name. The full-frame
test takes a few seconds and needs about 20 MB of memory.
