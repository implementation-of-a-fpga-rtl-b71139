# Streaming Canny edge detector for Avalon-ST video

This is a pipelined Canny edge detector for an FPGA video path. A greyscale frame enters as one
Avalon-ST packet, one pixel per clock. A binary edge map of the same size leaves the same way. It
was written after a published FPGA + ARM system: the ARM side keeps the images, library video cores
read a frame and convert it to grey, four custom cores find the edges, and more library cores mix
the result over a background and drive a VGA monitor. This repository holds the four edge cores and
the subsystem that chains them. The library cores around them (frame reader, colour-space converter,
mixer, test-pattern and logo generators, clocked video output, PLLs, SDRAM, processor) are not
included.

```
 grey 8b      +----------+   8b   +---------+  grad_t  +-----------+  11b  +------------+  8b
 ------------>| gaussian |------->|  sobel  |--------->| non-max   |------>| hysteresis |------>
 din_*        |  5x5     |        |  3x3    |  34 bit  | suppress. |       |  3x3       | dout_*
              +----------+        +---------+          +-----------+       +------------+ 255 / 0
```

At the default size (640 x 480) one frame takes 310 412 clocks from the first pixel in to the last
pixel out: 307 200 pixels, plus 3 212 clocks to fill the chain. At the 180 MHz processing clock of
the original system that is 1.725 ms. The original reports 1.7 ms for the same frame size and clock.

## The stream and what a frame looks like

Every core has the same two stream ports, `din_*` and `dout_*`, plus `clock` and `reset`:

| signal              | meaning                                                   |
|---------------------|-----------------------------------------------------------|
| `*_data`            | one pixel (the width depends on the stage, see below)      |
| `*_valid`, `*_ready`| Avalon-ST handshake, ready latency 0: a beat moves when both are high |
| `*_startofpacket`   | high on the first pixel of a frame                         |
| `*_endofpacket`     | high on the last pixel of a frame                          |

A packet is one frame in raster order, `IMG_W * IMG_H` pixels. There is no packet-type header beat
and no control packet: the frame size is a parameter, fixed when the design is built. On the input
side the packet flags are only checked by assertions against the pixel count. On the output side
they are generated from the pixel count. `reset` is synchronous and active high. It clears counters
and valid flags, not the line buffers.

Backpressure works all the way through. Each core holds its output in a register and stalls while
`dout_ready` is low. The chain of `ready` signals is combinational from the last core to the first.
If a long ready path matters for timing, put a skid buffer between two cores; the protocol allows it.

## Neighbourhoods on a stream: `stream_window`

Every stage works on a square neighbourhood around each pixel: 5 x 5 for the Gaussian, 3 x 3 for
the others. The helper `stream_window` builds these neighbourhoods from the stream:

* `K-1` line buffers, each `IMG_W` words deep and addressed by column, hold the previous rows. Each
  accepted pixel is written at the current column, and the column of `K` vertically adjacent pixels
  is shifted into a `K x K` register window.
* The window for pixel *p* is complete once pixel *p* + (K/2)·IMG_W + K/2 has arrived. From then
  on, every accepted pixel completes one window, which is offered downstream with its row and column.
* **End-of-frame flush.** After the last pixel of a frame no more input would arrive to complete
  the last K/2 rows. The block then feeds itself (K/2)·IMG_W + K/2 dummy beats, one per clock, and
  keeps `din_ready` low while it does. The next frame is accepted right after. The bubble per frame
  is 2·IMG_W + 2 clocks for the 5 x 5 stage and IMG_W + 1 for each 3 x 3 stage.
* **Border.** A neighbour that falls outside the frame takes the value of the nearest pixel inside
  it (edge replication). The window registers still hold wrapped or stale pixels there; a small
  row/column select network in front of the taps replaces them. So no stale pixel, whether from the
  previous frame, from after reset or from a flush beat, can reach a result. The frame keeps its
  size, and no false edge appears at its border.

Latency of one core: its first output is valid two clocks after input pixel number
(K/2)·IMG_W + K/2 (counting from 0) has been accepted. For the chain this adds up to
5·IMG_W + 13 clocks between the first pixel in and the first pixel out.

## The four stages

### Gaussian smoothing (`gaussian_filter`)

A 5 x 5 convolution with integer weights. The source gives two kernels. The one used by default is
σ = 1.4 (`KERNEL = 0`):

```
2  4  5  4 2
4  9 12  9 4
5 12 15 12 5      normalised by >> 7
4  9 12  9 4
2  4  5  4 2
```

The source's point is that the divider becomes a shift. It rounds its stated normaliser of 115 up
to 128, a 7-bit shift. These weights actually add up to 159, so the shift by 7 gives the stage a gain
of 159/128 ≈ 1.24. Bright areas therefore exceed 255; this design saturates them to 255. The gain
does not matter much for edge detection. It scales all gradients by the same factor, so the
hysteresis thresholds below are set on that scale. `KERNEL = 1` selects the σ = 1.0 kernel
(1 4 7 4 1 / 4 16 26 16 4 / 7 26 41 26 7 / …), normalised by 273 in the source and by `>> 8` here.
The weights are constants, so synthesis turns the 25 products into shifts and adds.

### Gradient (`sobel_operator`)

Two 3 x 3 Sobel sums, then:

* magnitude `|Gx| + |Gy|` instead of the square root of the sum of squares. This needs one adder
  and no multiplier or root;
* direction as one of eight 45° sectors, found from the two signs and one comparison
  `|Gx| >= |Gy|`. No arctangent is computed. Sector *s* covers 45·s to 45·(s+1) degrees,
  anticlockwise from +Gx; the names are in `canny_pkg::sector_e`.

The kernels are used as the source prints them, reading each matrix with its first index along x:

```
Gx = (left column  - right column)  weights 1 2 1
Gy = (row below    - row above)     weights 1 2 1
```

With y pointing up, as in the sector diagram, this (Gx, Gy) is the intensity gradient turned by
180°. It lies on the same line through the pixel, and non-maximum suppression only uses that line,
so the result is unaffected. Ties (|Gx| = |Gy|, or a zero component) go to the sector that
`sector_e` lists first.

The output word `canny_pkg::grad_t` (34 bits) carries the magnitude (11 bits), |Gx| and |Gy|
(10 bits each) and the sector (3 bits). The next stage needs all of them.

### Non-maximum suppression (`non_maximum_suppression`)

This is the subtle stage. A pixel survives only if its magnitude is a local maximum along its
gradient direction. The line through the pixel in that direction leaves the pixel's cell between
two neighbours: one axial (E, N, W or S) and one diagonal. The magnitude at the exit point is
interpolated linearly between them. With D = max(|Gx|,|Gy|) and d = min(|Gx|,|Gy|):

| sectors (degrees)     | side A          | side B          |
|-----------------------|-----------------|-----------------|
| 0-45, 180-225         | E and NE        | W and SW        |
| 45-90, 225-270        | N and NE        | S and SW        |
| 90-135, 270-315       | N and NW        | S and SE        |
| 135-180, 315-360      | W and NW        | E and SE        |

`interp = ((D - d) * axial + d * diagonal) / D`. The division is avoided by comparing `G * D`
against the numerators. That takes five 11 x 10-bit products per pixel.

The rule is to keep the pixel if it is greater than both interpolated values, and to output 0
otherwise. This design uses **`>` on side A and `>=` on side B**. With `>` on both sides, an edge
lying exactly between two pixel columns gives two equal central magnitudes. Both would then be
suppressed, and the edge would vanish. The asymmetric rule keeps exactly one of them. Pixels with
zero gradient are always suppressed.

### Hysteresis (`hysteresis`)

Each suppressed magnitude x is classed:

* strong: x > `T_HIGH`;
* weak: `T_LOW` < x ≤ `T_HIGH`;
* none: anything else.

Strong pixels are edges. In the algorithm, edges grow from strong pixels into touching weak pixels
(8-neighbourhood) until nothing more can join. Completing that growth needs the whole frame and
repeated passes. This core makes one pass at stream rate and approximates it. A weak pixel becomes
an edge if

* any of its 8 neighbours is strong, or
* one of the neighbours already decided in raster order (up-left, up, up-right, left) became an edge.

A one-bit line of past decisions holds the second condition, next to the 2-bit class line buffers.
Weak chains that run forward in raster order from a strong pixel (right, down-left, down,
down-right) are followed to their end. A weak chain that meets its strong pixel only later in
raster order is joined only at the pixels next to that strong pixel. The rest of it is lost. So on
some images the edge map has fewer weak-edge pixels than a full multi-pass hysteresis would give.
Output pixels are 255 (edge) or 0.

A complete growth would need the classified frame in memory: 2 bits x 640 x 480 = 614 400 bits.
That is more than the 381 000 block-memory bits the original system reports using in total. So the
original, too, can only have used a windowed growth of this kind.

The source gives no threshold values. The defaults, `T_LOW = 80` and `T_HIGH = 160`, are on the
|Gx| + |Gy| scale of this pipeline, which goes up to 2040. Both are parameters of the top.

## Parameters

| parameter        | default | where                         | meaning |
|------------------|---------|-------------------------------|---------|
| `IMG_W`, `IMG_H` | 640, 480 | all cores, top               | frame size; line buffers are `IMG_W` deep |
| `KERNEL`         | 0       | `gaussian_filter`, top        | 0: σ = 1.4, `>>7`; 1: σ = 1.0, `>>8` |
| `T_LOW`, `T_HIGH`| 80, 160 | `hysteresis`, top             | weak / strong thresholds |

Shared types and widths are in `rtl/canny_pkg.sv`: an 8-bit pixel, 10-bit |G| components, an
11-bit magnitude, `grad_t`, and the sector and class enums.

Memory at the default size is about 78 kbit of line buffers:

* 4 x 640 x 8 bits for the Gaussian stage;
* 2 x 640 x 8 bits for Sobel;
* 2 x 640 x 34 bits for non-maximum suppression;
* 2 x 640 x 2 + 640 x 1 bits for hysteresis.

The line buffers are read asynchronously, in the same clock as they are written. On an FPGA with
synchronous-read block RAM they map to distributed memory, or need one extra prefetch stage.

## Where this departs from the system it follows

* Only the four edge cores and their chain are here. The source builds the rest of the video path
  from vendor library cores, and none of those is reproduced.
* The frame size is fixed by parameters. The vendor video protocol's control packets and
  packet-type beat are not handled. Put this subsystem after a core that strips them, or add that.
* The frame border, the saturation in the Gaussian stage, the `>=` on one side of the
  suppression, the one-pass hysteresis, the threshold values and the 0/255 output coding are this
  design's own choices. The source does not specify them. Its σ = 1.4 normaliser (115, shifted as
  128) is kept as stated, although the printed weights add up to 159.
* The source clocks the cores at 180 MHz. Nothing here was checked against that clock: the
  Gaussian sum, the suppression products and the ready chain are single combinational stages.

## Verification

Each core has a self-checking testbench in `tb/` on a small frame (10 to 13 pixels wide). The
expected results come from frame-level models in `tb/canny_ref_pkg.sv`, which share no code with
the RTL:

* direct convolutions with clamped indices;
* a Sobel sector check that computes the angle with `$atan2`;
* a suppression model that chooses neighbours from the signs of Gx and Gy, not from the sector code;
* a raster-order hysteresis.

`tb_stream_window` tests the window helper on its own. It sends pixels that carry their own frame,
row and column numbers. Every tap of every 5 x 5 and 3 x 3 window must then name exactly the
clamped neighbour it should hold.

Each testbench sends a first frame with no gaps and checks its exact clock count. Further frames
follow with random input gaps and random output stalls. The packet flags are checked on every
pixel.

`tb_canny_edge_detection` runs the whole chain at the default 640 x 480 size. Its scene has a
saturating white patch, a high-contrast rectangle, an overlapping low-contrast disc, a diagonal bar
and a smooth ramp, over noise. It checks all 307 200 output pixels of two frames and the frame clock
count. It also requires every mechanism to occur at least once: input gaps, output stalls,
end-of-frame flushing, Gaussian saturation, suppression, strong edges, weak pixels joined directly
and along a chain, and weak pixels dropped. It runs in a few seconds.

To run a test with Verilator 5 (from the directory that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb rtl/canny_pkg.sv tb/canny_ref_pkg.sv \
  rtl/stream_window.sv rtl/gaussian_filter.sv rtl/sobel_operator.sv \
  rtl/non_maximum_suppression.sv rtl/hysteresis.sv rtl/canny_edge_detection.sv \
  tb/tb_canny_edge_detection.sv --top-module tb_canny_edge_detection -o sim
./obj_dir/sim
```

Replace the testbench file and `--top-module` with `tb_gaussian_filter`, `tb_sobel_operator`,
`tb_non_maximum_suppression` or `tb_hysteresis` to test a single core. Each testbench prints one
`TB_RESULT checks=N failures=M` line. Uninitialised state is randomised under Verilator's
`+verilator+rand+reset+2`, and the designs are expected to pass with it.

## Files

| file | content |
|------|---------|
| `rtl/canny_pkg.sv` | shared widths, `grad_t`, sector and class enums |
| `rtl/stream_window.sv` | line buffers, K x K window, flush, border replication |
| `rtl/gaussian_filter.sv` | 5 x 5 smoothing core |
| `rtl/sobel_operator.sv` | gradient, magnitude and sector core |
| `rtl/non_maximum_suppression.sv` | interpolating suppression core |
| `rtl/hysteresis.sv` | one-pass double-threshold core |
| `rtl/canny_edge_detection.sv` | the four cores chained (top) |
| `tb/canny_ref_pkg.sv` | frame-level reference models |
| `tb/tb_*.sv` | one self-checking testbench per core and for `stream_window`, plus the end-to-end test |
