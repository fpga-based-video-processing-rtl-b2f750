# Line-based edge and corner extraction on an FPGA

This design is the bottom layer of a video-processing architecture for small,
low-power ("ubiquitous") devices: the high-bandwidth, low-level image
operations run in FPGA logic, and anything higher (combining cues, reasoning
about a scene) is left to software. Three low-level feature extractors are
provided:

* a **Sobel edge detector** (3x3 window),
* a **SUSAN edge detector** (37-pixel circular window inside 7x7),
* a **SUSAN corner detector** (same window, different decision rule).

All three share one structure. The image arrives as a stream of 8-bit grey
pixels, line by line. Only a few lines are ever stored on chip: just enough
to form a window around the pixel being processed. The detector turns each
window into one output pixel, and the result image leaves in the same
raster order as it came in, one output pixel per input pixel.

Around the detectors sits a small test harness: a PC sends an image over
the cable that also configures the FPGA and reads the result image back over
the same cable. The board's pushbutton switches the cable from
configuration use to data use.

```
 cable pins ──► host_link ──pixels──► detector_component (Sobel)         ─┐
 (tck,tms,tdi)   │  ▲                 detector_component (SUSAN edge)    ─┤ algo_sel
 pushbutton ─────┘  └──results FIFO◄─ detector_component (SUSAN corner)  ─┘
                                          │
                          line_window (K-1 line_rams + KxK window)
                                          ▼
                            sobel_core / susan_edge_core / susan_corner_core
                                          (susan_usan inside the SUSAN cores)
```

## The data buffer: turning a pixel stream into windows

`line_window` is the piece to understand first; everything else is simple
arithmetic on its output.

For a KxK window (K = 3 for Sobel, K = 7 for SUSAN) the buffer keeps the
previous K-1 lines in `line_ram`s, a chain of memories that each hold one
line. When a pixel arrives at column x:

1. every line memory is read at column x. This gives a column of K pixels:
   the arriving one and the K-1 pixels above it;
2. in the same cycle each memory is written with the pixel one line below.
   The memory read is asynchronous, so the old value is still read. The
   column thus moves one memory further down the chain;
3. the K-pixel column is shifted into a KxK register window. Row 0 is the
   oldest line and row K-1 the arriving one; column K-1 is the newest.

The centre of the window therefore trails the input by R = (K-1)/2 lines and
R pixels. For a frame W pixels wide that is a lag of `R*W + R` pixels.
Two consequences shape the rest of the design:

* **Flush.** When the last pixel of a frame has arrived, the last R lines
  have no window yet. The buffer then feeds itself `R*W + R` zero pixels
  and holds `in_ready` low while it does. After that the counters restart
  for the next frame. Without this, the end of a frame would only come
  out when the next frame pushed it out.
* **Tags.** Each push produces a tag (`tag_t` in `videoware_pkg`) for the
  window centre:
  * `valid` is 0 for the first `R*W + R` pushes of a frame, which produce no
    centre;
  * `border` is set when the window reaches outside the image. Across the
    left and right edges the window wraps into the neighbouring line, and
    at the top it holds lines of the previous frame. So these pixels are
    not computed: the component outputs 0 for them;
  * `last` marks the final pixel of the frame.

The line memories are not reset. Whatever they hold reaches only border
windows, whose output is forced to 0.

## The detectors

**Sobel (`sobel_core`).** The two kernels

```
Gx = -1 0 1     Gy =  1  2  1
     -2 0 2           0  0  0
     -1 0 1          -1 -2 -1
```

are applied in one pass over the 3x3 window. The output is |Gx| + |Gy|,
clipped to 255. This is the cheap approximation of the gradient magnitude
(instead of a square root of squares). Latency: 2 enabled cycles.

**SUSAN count (`susan_usan`).** Over the circular mask, it counts how many
pixels differ from the centre pixel by more than the brightness threshold
`BT`. The mask is the 7x7 square minus three cells at each corner, with rows
of 3, 5, 7, 7, 7, 5, 3 cells: 37 cells, 36 around the centre. The more
pixels differ, the stronger the edge or corner. Stage 1 registers the 36
compare bits and stage 2 the count (0..36).

**SUSAN edge (`susan_edge_core`).** A second threshold applies to the count:
the response is `count - G_EDGE` when the count exceeds `G_EDGE` (default 9),
otherwise 0. The response is multiplied by 8 and clipped to 255 so that it
can be viewed as an image. Latency: 3 enabled cycles.

**SUSAN corner (`susan_corner_core`).** It uses the same count with a
stricter rule. The output is 255 when more than `G_CORNER` (default 18) of
the 36 pixels differ, i.e. when fewer than half the mask resembles the
centre. Otherwise it is 0. There is no centroid test and no non-maximum
suppression. Strong edges therefore also produce corner marks, and a corner
is usually marked by a small cluster of pixels.

The defaults BT = 20, G_EDGE = 9 and G_CORNER = 18 are the usual SUSAN
values, which set the geometric limits at 3/4 and 1/2 of the 37-cell mask.
All three are parameters.

## One component: flow control and timing

`detector_component` joins a `line_window` to one core. `ALGO` selects the
core, and K and the core depth follow from it. The interfaces are
valid/ready streams (`in_*`, `out_*`), plus `out_last` on the final pixel
of a frame and the run-time frame size `cfg_width`/`cfg_height`.

Flow control is a **global stall**. The whole pipeline (window, core
stages, tag pipeline, output register) moves on `adv = !out_valid ||
out_ready`. A pixel is accepted when the pipeline moves and the buffer is
not flushing. Between accepted pixels, bubbles (tags with `valid = 0`) run
through the core.

Timing with a steady input and an always-ready output:

* one pixel per clock;
* the result for input pixel (x, y) appears `R*W + R + LAT + 1` cycles after
  that pixel is accepted (LAT = 2 for Sobel, 3 for SUSAN);
* each frame adds a gap of `R*W + R` cycles while the buffer flushes. The
  last result of a frame is taken `W*H + R*W + R + LAT + 1` clock edges
  after the first pixel is accepted, and the testbench checks this exact
  figure.

Change `cfg_width`/`cfg_height` only between frames. Widths up to
`MAX_WIDTH` (default 640) are supported. The window needs at least
K pixels and K lines.

## The cable link (`host_link`)

The cable has three pins from the PC (`pc_tck`, `pc_tms`, `pc_tdi`) and one
back (`pc_tdo`). All are asynchronous to `clk` and pass through two-flop
synchronisers. The system clock must run several times faster than
`pc_tck`; the testbenches use 6 to 8 clocks per `pc_tck` period.

* Each press of `btn` toggles **data mode** (output `data_mode`). Outside
  data mode the pins are ignored, so the cable can configure the device.
  Leaving data mode abandons any transaction in progress.
* In data mode every **transaction is nine rising edges** of `pc_tck`:

| edge | write (`pc_tms` = 1 at edge 0)                    | read (`pc_tms` = 0 at edge 0)                  |
|------|---------------------------------------------------|------------------------------------------------|
| 0    | `pc_tdo` := 1 if the pixel holding register is free | `pc_tdo` := 1 if a result is returned            |
| 1-8  | `pc_tdi` sampled, bit 7 first                     | `pc_tdo` := result bit 7 first (0 if none)     |

  The PC changes `pc_tms`/`pc_tdi` while `pc_tck` is low. It reads `pc_tdo`
  before the next rising edge.
* A written pixel waits in a one-entry holding register until the
  component accepts it. Writing while that register is still full drops the
  pixel and sets the sticky `overrun` flag.
* Results enter a FIFO of `FIFO_DEPTH` entries (default 16). When it is
  full, the component's pipeline stalls. When the buffer flushes at the end
  of a frame, results arrive much faster than the PC reads them, so the FIFO
  fills and the pipeline stalls.

The intended PC loop: for each pixel, write it, then read until the status
bit says "none"; after the last pixel, read until all W*H results are in.
The link is slow by design: about 18 `pc_tck` periods per pixel.

## Top level (`videoware_top`)

`videoware_top` holds the link and all three components. `algo_sel`
chooses which one gets the pixels and returns results: 0 Sobel, 1 SUSAN
edge, 2 SUSAN corner; 3 acts as 2. `frame_done` pulses when the last result
of a frame enters the FIFO. The outputs `led_data_mode` and `led_overrun`
are meant for board LEDs. Change `algo_sel` only between frames, after all
results have been read.

| parameter         | default | meaning                                        |
|-------------------|---------|------------------------------------------------|
| `MAX_WIDTH`       | 640     | longest line held by the line memories          |
| `BT`              | 20      | SUSAN brightness threshold                      |
| `G_EDGE`          | 9       | SUSAN edge: minimum differing pixels, exclusive |
| `G_CORNER`        | 18      | SUSAN corner: minimum differing pixels, exclusive |
| `LINK_FIFO_DEPTH` | 16      | result FIFO depth                               |

With the defaults the line memories total 14 lines x 640 x 8 bit
(71,680 bits): 2 lines for Sobel and 6 for each SUSAN component.

## Where this departs from, or goes beyond, the original description

The description this RTL follows gives:

* the line-based architecture: data buffer, then detector, output in input
  order;
* the number of stored lines;
* the two Sobel kernels, and the fact that their responses are added;
* the circular 37-cell SUSAN mask;
* the two-threshold SUSAN scheme, with the corner detector differing only
  in its local rule;
* a PC test harness that uses the configuration cable for data and switches
  it with the pushbutton.

Everything else is this design's own choice:

* **Adding the kernel responses** is implemented as adding their
  magnitudes. A sum of the signed responses would cancel on diagonal
  edges.
* **Stored lines.** Sobel keeps 2 lines in memory, plus the one arriving.
  The original describes the Sobel unit as storing three lines; here that
  is read as the three lines the window spans.
* **Thresholds.** BT, G_EDGE and G_CORNER are the customary SUSAN values.
  No values were given.
* **Corner rule.** The simplest form of the corner rule: count above half
  the mask. There is no centroid or contiguity test, which fits the many
  false corners along edges reported for the original.
* **Output scaling and border.** The edge response is scaled by 8. Corners
  are output as 255/0. Border pixels are output as 0.
* **Flush, tags and handshakes**, and the whole cable bit protocol, FIFO
  and overrun flag.
* **All three detectors at once.** The original built one detector per
  FPGA configuration. Here all three sit behind `algo_sel`.
* **Line memories** read asynchronously (LUT-RAM style). A block-RAM
  version would need one more pipeline stage in the buffer.

Not provided: anything above the feature layer (specific cues such as
motion or parallax, multi-cue interpretation), other feature extractors
(colour blobs, texture), the soft CPU, and the PC software.

## Simulating

Every file holds one module or package, named after the file, so verilator
can find what a testbench uses with `-y`; only the two packages are listed.
For example, the end-to-end test at a small frame size:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/videoware_pkg.sv tb/vw_ref_pkg.sv tb/tb_videoware_top.sv \
  --top-module tb_videoware_top
./obj_dir/Vtb_videoware_top
```

Each testbench ends with `TB_RESULT checks=N failures=M`. They are:

* `tb_line_ram`: read-before-write behaviour.
* `tb_line_window`: every window cell and tag of two 11x9 frames, with random
  stalls. It also checks that the flush holds the input off.
* `tb_sobel_core`, `tb_susan_usan`, `tb_susan_edge_core`,
  `tb_susan_corner_core`: random windows with random enables, against the
  reference model, with the latency checked.
* `tb_detector_component`: all three detectors on a 24x18 test image
  (rectangle plus wedge on a noisy background). The first frame runs at
  full rate, and its cycle count is checked exactly. The second runs with
  random input gaps and output back-pressure.
* `tb_host_link`: mode switching, writes, reads, empty reads, full FIFO
  and overrun.
* `tb_videoware_top`: the whole design through the cable pins at 16x12,
  with all three detectors. It counts each mechanism (mode switch, detector
  switch, flush, FIFO full, empty read, border pixels, frame done) and fails
  if one never occurs.
* `tb_videoware_full`: the same at 640x480, a full frame per detector, with
  default parameters. It runs in about 1.5 minutes.

The reference models in `tb/vw_ref_pkg.sv` are written directly from the
definitions above and work on whole images. They do not reuse any RTL.

## How far to trust it

Every block is checked against an independent model. The tests cover
random data, stalls, and frame-to-frame operation. The design has not been
run on hardware, and no timing or resource figures for a real device are
claimed. The cable protocol has been checked only against the behavioural
PC model in `tb/pc_cable_bfm.sv`.

Concurrent assertions in `detector_component` and `host_link` check the
stream handshakes during every simulation: a result or pixel on offer stays
unchanged until it is taken, and no input is accepted while the pipeline is
stalled. Run verilator with `--assert` to enable them.

The original hardware held one detector at a time on a small device of
about 3,000 slices. As a rough guide from its reports, a Sobel unit needed
about a fifth of the logic of a SUSAN unit. This RTL was not mapped to that
device, so its sizes cannot be compared directly. With the defaults it stores
14 lines, and its asynchronously read line memories would use LUT RAM, not
block RAM.
