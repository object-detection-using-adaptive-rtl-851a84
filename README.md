# Streaming Sobel / threshold / posterize filter core for 1080p video

Edge detection is the usual first step of object detection in a video
pipeline, and at 1920 x 1080 it is too costly for an embedded processor to do
in software. This core does it in programmable logic, in the video stream
itself. A frame goes in once and comes out once, and nothing is stored apart
from two video lines. Each incoming pixel passes through three filters at the
same time:

* **Sobel-Feldman**: the gradient magnitude of the pixel's 3 x 3 neighbourhood
  (edge strength).
* **Threshold**: a binary decision, with the pixel set to a chosen value or 0.
* **Posterize**: fewer grey levels, by keeping only the top N bits.

A mode register picks which result is sent out. One extra mode thresholds the
Sobel magnitude, which gives a black-and-white edge map. The mode can change
from one frame to the next.

The core is meant for a Zynq-7000 style system. There the processor sets it
up over AXI4-Lite, a video DMA feeds it frames from a DDR3 frame buffer as
AXI4-Stream video, and the result goes back to memory or to an HDMI output.
Those surrounding parts are standard vendor blocks and are not included. The
core's AXI ports are where they connect. Since the core needs only a stream, it works the same
whether it sits directly in the live video path (direct streaming) or
between two frame buffers in memory (frame-buffer streaming).

## Data path

```
 s_axis (16-bit YUV 4:2:2)                                      m_axis (16-bit YUV 4:2:2)
   ──► axivideo2mat ──grey──► filter_chain ─────────grey──► mat2axivideo ──►
        (SOF sync,             ├ line_buffer (2 lines)          (tuser/tlast,
         size latch,           ├ 3x3 window                      chroma 0x80,
         tlast check)          ├ sobel_op ┐                      register slice)
                               ├ threshold_op (x2) ├─ mode mux
                               └ posterize_op ┘
                         axil_regs ── configuration / status ──┘
```

**Video format.** One pixel per beat in 16-bit 4:2:2 YUV. Bits `[7:0]` hold
the luma Y. Bits `[15:8]` hold the chroma, Cb and Cr on alternate pixels.
`tuser` marks the first pixel of a frame and `tlast` the last pixel of each
line (the usual AXI4-Stream video conventions). The filters work on luma only:
the receiver drops chroma, and the transmitter sends the neutral value 0x80,
so the output is a grey image in the same format.

**axivideo2mat** waits for a beat with `tuser`. Any beat before it is taken
and thrown away, so a source joined in the middle of a frame is picked up
cleanly at the next frame. At the start-of-frame beat it latches WIDTH and
HEIGHT from the registers (clamped to 1..MAX). It then forwards exactly
width x height luma values. The pixel count, not `tlast`, decides where lines
end. A `tlast` at the wrong column, or missing at the last column, is counted
in the EOLERR register but changes nothing else. While CTRL.enable is 0 no new
frame is started and the input is held off with `tready` low. A frame already
started is finished.

**mat2axivideo** builds the output sideband from its own pixel counters. It
latches the size with the first pixel of each frame, and an assertion checks
that count against the chain's start-of-frame flag. One register stage gives
one beat per clock. `irq_frame` pulses once the last beat of a frame has been
taken.

## The scan: how a 3x3 window is streamed

This is the part that needs the most care. A 3x3 filter at pixel (x, y) needs
row y+1, so its result can only be computed one line and one pixel after
pixel (x, y) arrives. The last row and the last column have no row or column
after them, which raises the question of when their results come out.

`filter_chain` solves this with a scan of **(W+1) x (H+1) positions** per
frame:

* At a real position (x < W, y < H) it takes one input pixel.
* At the extra column x = W and the extra row y = H it takes nothing and
  feeds zeros. These positions only finish the windows of the last column and
  row, so the frame never waits for the next frame's data.
* At every position, the column {pixel two rows up, pixel one row up, new
  pixel} is shifted into the 3x3 window. The two older pixels come from
  `line_buffer`, which also stores the new pixel for the following rows. The
  window is then centred on pixel (x-1, y-1).
* For x >= 1 and y >= 1, the chain writes one output pixel: the result for the
  window centre.

The output is therefore the same W x H raster as the input, in the same
order, delayed by one line and one pixel. Threshold and posterize take the
window centre rather than the raw input, so all three filters' results belong
to the same pixel and the mode multiplexer can pick any of them.

**Timing.**

* A position advances in one clock when it has its input (or needs none) and
  the output register is free (or it writes no output).
* A frame therefore takes W*H + W + H + 1 clocks at full rate. For 1920 x 1080
  that is 2,076,601 clocks: 20.8 ms, or 48.2 frames/s at 100 MHz.
* Frames can follow back to back with no gap beyond the extra row and column.
  A new frame starts as soon as its start-of-frame pixel is present and the
  output register can take a pixel.
* Stalls in either direction simply hold the scan.

**Reading the line buffers one clock ahead.** The line buffers are block-RAM
style memories with a registered read: data read in one clock are available
in the next. So in every clock the chain reads the column of the position it
will visit next, which is the next column if the current position advances
and the same column again if it stalls. The data for the current position are
therefore always waiting in the read registers. The write in a given clock
goes to the current column and the read to another one, so a read never hits
a column being written. The line buffer shifts a column by writing the new
pixel into the one-row-up line and the registered one-row-up pixel into the
two-rows-up line. An assertion checks that each write goes to the column read
in the clock before.

**Borders.** In the Sobel modes, the outer rows and columns have no full
neighbourhood, so their result is 0. The extra column and row feed zeros only
to close the scan. They never reach an output, because border results are
forced to 0.

**Per-frame settings.** The chain latches the frame size and the filter
settings (mode, threshold, maximum value, posterize bits) when it takes a
frame's first pixel. The processor can therefore write the next frame's
settings while the current frame is still in flight. A register write in the
middle of a frame only takes effect at the next frame.

## Filters

With the window `w[0..8]` in row-major order (w[4] is the centre):

* Sobel: `Gx = (w2 + 2 w5 + w8) - (w0 + 2 w3 + w6)` and
  `Gy = (w6 + 2 w7 + w8) - (w0 + 2 w1 + w2)`. The result is
  `min(|Gx| + |Gy|, 255)`; |Gx| + |Gy| is the usual hardware stand-in for
  sqrt(Gx² + Gy²).
* Threshold: `p > THRESH ? MAXVAL : 0`.
* Posterize: `p & (0xFF << (8 - N))`, with N = POSTBITS clamped to 1..8. This
  keeps 2^N levels.
* Modes: 0 bypass (centre pixel), 1 Sobel, 2 threshold, 3 posterize,
  4 threshold of the Sobel magnitude (binary edges). Values 5..7 behave as
  bypass.

## Registers (AXI4-Lite, 32-bit, byte offsets)

| Offset | Name     | Bits   | Reset | Meaning |
|-------:|----------|--------|------:|---------|
| 0x00   | CTRL     | [0]    | 0     | enable: start new frames |
| 0x04   | WIDTH    | [10:0] | 1920  | pixels per line (clamped to 1..MAX_WIDTH) |
| 0x08   | HEIGHT   | [10:0] | 1080  | lines per frame (clamped to 1..MAX_HEIGHT) |
| 0x0C   | MODE     | [2:0]  | 1     | filter mode, see above |
| 0x10   | THRESH   | [7:0]  | 128   | threshold |
| 0x14   | MAXVAL   | [7:0]  | 255   | value written above the threshold |
| 0x18   | POSTBITS | [3:0]  | 2     | posterize bits kept |
| 0x1C   | FRAMES   | [31:0] | 0     | read only: frames sent |
| 0x20   | EOLERR   | [31:0] | 0     | end-of-line errors on the input; any write clears it |

* A write completes once both its address and its data have arrived, in
  either order, and byte strobes are honoured.
* Unmapped or misaligned addresses answer SLVERR, and reads from them return
  0.
* Only one transaction per direction is outstanding at a time.

## Parameters and sizes

`video_filter_top`, `axivideo2mat`, `filter_chain` and `mat2axivideo` take
`MAX_WIDTH` (default 1920) and `MAX_HEIGHT` (default 1080). Frames of any
size up to those limits can be set at run time.

* The only storage is the two line buffers: 2 x MAX_WIDTH x 8 bits, which is
  30,720 bits at the default.
* Width and height counters are 11 bits wide, so the limits can be raised to
  2047 without other changes.
* The whole design uses a single clock (`aclk`) and a synchronous active-low
  reset (`aresetn`). Reset clears all control state but not the line buffers,
  which are always written before they are read within a frame.

## Where this RTL departs from the original design, or fills gaps

The original core was produced with high-level synthesis from a video library
(stream-to-image conversion, a chain of library filters, image-to-stream
conversion). This is hand-written RTL with the same structure and interfaces.
The following are choices made here, not taken from the original:

* Only luma is filtered; output chroma is 0x80.
* The Sobel magnitude is |Gx| + |Gy| saturated to 255, and the image border is
  0.
* Threshold uses the strict rule `p > THRESH`. Posterize keeps the top bits.
* The binary-edge mode (threshold of the Sobel magnitude) was added to give
  the black-and-white edge image such a filter chain is normally used for.
* The register map, the reset values and the enable behaviour were chosen
  here. So were start-of-frame resynchronisation and end-of-line error
  counting.
* The line buffers are simple dual-port memories with a registered read, so
  they map to block RAM as in the original design. The scheme that reads one
  position ahead is this design's own.
* The original was timed at 100 MHz. The single-cycle path here runs from the
  line-buffer read register through the Sobel adder tree to the output
  register, and no timing closure has been done for it.
* The surrounding system (ARM processor, DDR3 and its controller, video DMA,
  video timing controller, test pattern generator, HDMI output, AXI
  interconnect, camera) is not part of this RTL.

## Files

| File | Contents |
|------|----------|
| `rtl/video_filter_pkg.sv` | pixel and size types, mode enum, filter settings struct, register offsets |
| `rtl/video_filter_top.sv` | top level: registers, receiver, filter chain, transmitter |
| `rtl/axil_regs.sv` | AXI4-Lite register file |
| `rtl/axivideo2mat.sv` | AXI4-Stream video to grey pixel stream |
| `rtl/filter_chain.sv` | (W+1) x (H+1) scan, 3x3 window, concurrent filters, mode multiplexer |
| `rtl/line_buffer.sv` | two-line store, registered read (block-RAM style) |
| `rtl/sobel_op.sv`, `rtl/threshold_op.sv`, `rtl/posterize_op.sv` | the filters (combinational) |
| `rtl/mat2axivideo.sv` | grey pixel stream to AXI4-Stream video |
| `tb/tb_video_ref_pkg.sv` | test image as a function of position, and the reference filters |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_video_filter_top` (end to end, small build) and `tb_video_filter_full` (default 1920 x 1080 build) |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each one has a watchdog. With Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/video_filter_pkg.sv tb/tb_video_ref_pkg.sv tb/tb_video_filter_full.sv \
  --top-module tb_video_filter_full -Mdir obj_full
./obj_full/Vtb_video_filter_full
```

Replace the last file and the top module name to run any other testbench.
The testbenches generate their images from a hash of position and frame
number, so no data files are needed.

What the testbenches check:

* **Per module.** Every filter is checked against an integer reference: all
  pixel values for threshold and posterize, and hand-picked plus 2000 random
  windows for Sobel. The line buffer is checked across rows with idle cycles.
  The receiver is checked for start-of-frame resynchronisation, end-of-line
  errors, enable hold-off and a size change in the middle of a frame. The
  transmitter is checked for sideband, frame-done and full-rate throughput.
  The register file is checked for reset values, masks, strobes, SLVERR and
  counters.
* **filter_chain.** Twelve frames from 1 x 4 up to 16 x 12 in every mode,
  with random input gaps and output stalls. A full-rate pair of frames checks
  the (W+1)(H+1) frame period.
* **tb_video_filter_top.** The whole core built for 40 x 24, as an end-to-end
  run through the AXI interfaces. The run includes every mode, stray beats
  before a frame, a wrong `tlast`, a register write in the middle of a frame,
  a size above the build limit, a frame held back by the enable bit, and a
  back-to-back full-rate pair. The test counts each of these and fails if one
  never happened.
* **tb_video_filter_full.** The default build with no parameter overrides.
  Four 1920 x 1080 frames back to back (Sobel, threshold, posterize, binary
  edges) with the mode rewritten while each frame is in flight. Every pixel is
  checked, and the frame period must be exactly 2,076,601 clocks. It runs in a
  few seconds.
