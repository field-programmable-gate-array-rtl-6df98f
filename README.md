# Streaming Sobel edge detector for 512 x 512 grey images

This RTL finds the edges of an 8-bit grey image and writes a binary edge
map: 255 where there is an edge, 0 everywhere else. It handles one pixel per
clock and keeps only three image lines on chip for the filter itself. The
source and result frames sit in two on-chip frame RAMs.

The design follows the FPGA edge detector described in *Field programmable
gate array implementation of edge detection system based on an improved
sobel edge detector* (a Virtex-7 VC707 implementation, 512 x 512 images,
50 MHz). That description sets out these parts:

- the 3 x 3 Sobel masks;
- a "3-line cache" made of three cascaded line FIFOs;
- the 512 x 512 frame size;
- the two-valued (0/255) output;
- the image SRAMs.

It leaves the rest open. The rest is this design's own, and each such choice
is listed in [Where this design departs from, or adds to, the original](#where-this-design-departs-from-or-adds-to-the-original).

## Data flow

```
 host load port ─► frame_ram (source) ─► frame_controller ─► edge_pipeline ─────────────────────────► frame_ram (result) ─► host read port
                                         (raster read,       ┌───────────────────────────────────┐
                                          flush, done)       │ line_buffer   3 x line_fifo       │
                                                             │ window_3x3    3x3 shift registers │
                                                             │ sobel_operator |Gx|+|Gy|          │
                                                             │ edge_threshold 0 / 255            │
                                                             └───────────────────────────────────┘
```

| Module | Role |
|---|---|
| `edge_pkg` | Pixel, window, gradient and magnitude types. It also holds `frame_feed_len()`. |
| `line_fifo` | One image line of storage: a circular buffer that pops its oldest pixel on the push that overwrites it. |
| `line_buffer` | Three cascaded `line_fifo`s. Together they give three vertically aligned pixels. |
| `window_3x3` | Turns the aligned column stream into a 3 x 3 window. |
| `sobel_operator` | Computes Gx, Gy and B = \|Gx\| + \|Gy\|. |
| `edge_threshold` | Outputs 255 when B ≥ `THRESH` and the pixel is not on the image frame, otherwise 0. |
| `edge_pipeline` | Chains the four modules above. It also tracks positions, handles borders and generates output addresses. |
| `frame_ram` | Simple dual-port RAM with a registered read. One instance holds the source image and one holds the result. |
| `frame_controller` | Streams the source RAM into the pipeline. Then it appends the flush pixels and signals `done`. |
| `edge_detect_top` | The complete system. |

## The three-line cache and where each window comes from

This is the part of the design that needs the most care.

Pixels arrive in raster order. FIFO1 takes every pixel. Once FIFO1 holds a
whole line (`IMG_W` pixels), every further push also pops its oldest pixel,
and that pixel is pushed into FIFO2. FIFO2 feeds FIFO3 in the same way. Each
FIFO is read on the same push that writes it, and its output is
combinational. So from the first pixel of the fourth line on, input pixel `n`
meets the following pixels at the same time:

| Output | FIFO | Pixel | Position in window |
|---|---|---|---|
| `line3` | FIFO1 | `n - W` | bottom |
| `line2` | FIFO2 | `n - 2W` | middle |
| `line1` | FIFO3 | `n - 3W` | top |

These are the same column of the three preceding lines. `lines_valid` reports
that all three FIFOs are full.

The incoming pixel itself is not part of the window. Each push shifts this
column into the right-hand side of `window_3x3`. So the push of pixel `n`
completes the window centred on pixel

    m = n - (2*W + 1)

This holds at every column, including the wrap from the end of one line to
the start of the next. It has two results:

* **Flush.** The last output pixel is `m = W*H - 1`, so the feeder must push
  `W*H + 2*W + 1` pixels per frame (`edge_pkg::frame_feed_len`). The last
  `2*W + 1` of them are flush pixels. Their value never reaches an output,
  and the controller sends zeros. For 512 x 512 the flush adds 1,025 clocks to
  262,144.
* **Border.** Near the first and last columns the window spans a line wrap,
  and in the first and last rows it lacks a line. These frame pixels (row 0,
  row H-1, column 0 and column W-1) are always output as 0. Every interior
  window uses only pixels that have really been pushed. The assertion
  `a_interior_aligned` in `edge_pipeline` checks this: an interior centre
  implies `lines_valid`. The FIFO storage is therefore never reset.

`edge_pipeline` does not compute `m` with a subtraction. It keeps the input
row and column and derives the centre from them:

* `(r-2, c-1)` for `c > 0`;
* `(r-3, W-1)` for `c = 0`.

Outputs come out exactly once each, in raster order. A counter gives the
output address (`out_addr`), and `out_last` marks the final pixel.

## Sobel arithmetic and the edge decision

Window index `[row][col]` has `[0][0]` at the top left, which is the oldest
line and the oldest column.

    Gx = (p00 + 2 p10 + p20) - (p02 + 2 p12 + p22)      mask [+1 0 -1; +2 0 -2; +1 0 -1]
    Gy = (p00 + 2 p01 + p02) - (p20 + 2 p21 + p22)      mask [+1 +2 +1; 0 0 0; -1 -2 -1]
    B  = |Gx| + |Gy|

The value ranges and register widths are:

| Value | Range | Width |
|---|---|---|
| Gx, Gy | -1020 … +1020 | 11-bit signed |
| B | 0 … 2040 | 12-bit |

`edge_threshold` turns B into 255 when `B >= THRESH` and into 0 otherwise.
The default `THRESH` is 128.

## Timing

| Quantity | Value |
|---|---|
| Throughput | One pixel per clock. `in_valid` of `edge_pipeline` may have gaps, and there is no back-pressure. |
| Pipeline latency | Three register stages: window, Sobel, threshold. A pixel's result is on `out_valid` two clocks after the clock edge that accepts the push completing its window. |
| Frame time | `done` pulses `W*H + 2*W + 5` clocks after the edge that accepts `start`: 263,174 clocks for 512 x 512. |
| Frame time at 50 MHz | About 5.26 ms, not counting the load and read-back of the image. |
| Frame RAM read latency | One clock. |

Throughput is where this design falls short of the original. The original
reports 0.721 ms per 512 x 512 frame at 50 MHz. That would mean about
7.3 pixels per clock, and the original does not say how it processes more
than one pixel per clock. This design does not attempt it.

## Using `edge_detect_top`

| Port | Direction | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | Clock and asynchronous active-low reset. The reset clears control state, not memories. |
| `load_we`, `load_addr`, `load_pix` | in | Write one source pixel per clock at address `row*IMG_W + col`. |
| `start` | in | Start a frame. It is ignored while `busy`. |
| `busy`, `done` | out | `busy` is high while a frame runs. `done` is a one-clock pulse when the result frame is complete. |
| `res_addr` → `res_pix` | in → out | Read a result pixel (0 or 255). It appears one clock after the address. |

Do not load a new image while a frame is running. The result RAM keeps the
last frame until the next run overwrites it.

Parameters: `IMG_W` (512), `IMG_H` (512) and `THRESH` (128). `IMG_W` must be
at least 2.

## Where this design departs from, or adds to, the original

* **Combining the gradients.** The original says to add the two convolution
  results (B = A*Gx + A*Gy). It also gives the gradient magnitude as
  sqrt(Gx² + Gy²). This design uses |Gx| + |Gy|. It is a sum, and unlike the
  signed sum it does not cancel edges where Gx and Gy have opposite signs.
* **"Improved" Sobel.** The original does not say what its improvement to the
  Sobel operator is. Only the standard masks are built.
* **Binary output and threshold.** The original's result histogram has only
  the values 0 and 255, so the output is binary. The threshold value is not
  given. 128 is this design's choice.
* **Line cache.** The three cascaded FIFOs and the alignment from the fourth
  line on are the original's. The flush, the border rule, the `clear` input
  and the position counters are this design's.
* **Image memories.** The original counts SRAM read/write time in its frame
  time but does not describe the SRAM or how images reach the board. Both
  frames are held in on-chip dual-port RAM (about 4.2 Mbit in total at
  512 x 512). They are reached through plain load and read ports. The board's
  own interfaces are not part of this RTL: DDR3, PCIe, Ethernet, UART and the
  MicroBlaze soft processor.
* **Control.** The start/busy/done handshake and the three-state controller
  (idle, feed, drain) are this design's. So are the reset style and all
  pipeline depths.
* **Throughput.** Covered under [Timing](#timing).

## Simulating

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if the design hangs.
`tb/sobel_ref_pkg.sv` holds the reference model and a synthetic test image.
The image has flat blocks of four grey levels, a bright disc and up to 7 levels of
noise, so it contains both edge and flat areas.

| Testbench | What it checks |
|---|---|
| `tb_line_fifo`, `tb_line_buffer`, `tb_window_3x3`, `tb_sobel_operator`, `tb_edge_threshold`, `tb_frame_ram`, `tb_frame_controller` | Unit tests. |
| `tb_edge_pipeline` | A 9 x 7 stream, with and without idle cycles. It checks every pixel, address and `out_last`, and the latency. |
| `tb_edge_detect_top` | Two 16 x 12 frames end to end. It checks every result pixel, the start-to-done time and that `start` is ignored while busy. It also counts that borders, edges, flat pixels, flush pixels and ignored starts all occurred. |
| `tb_edge_detect_top_full` | One full 512 x 512 frame at the default parameters. It runs in about a second. |

To build and run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/edge_pkg.sv tb/sobel_ref_pkg.sv tb/tb_edge_detect_top_full.sv \
    --top-module tb_edge_detect_top_full -o sim
./obj_dir/sim
```

To run another testbench, substitute its name. Verilator finds the other
modules through `-Irtl`.

To change the image size or threshold, override the parameters of
`edge_detect_top`, or of `edge_pipeline` if you drive the stream yourself.
Address widths follow from `IMG_W * IMG_H`. To use a different image source,
drive `edge_pipeline` directly. Push the frame in raster order followed by
`frame_feed_len(W, H) - W*H` pixels of any value, and pulse `clear` before
each frame.
