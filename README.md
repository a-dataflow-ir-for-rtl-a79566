# RIPL skeleton actors: streaming image pipelines with minimal on-chip memory

On an FPGA, memory is not a fixed hierarchy. It is whatever the circuit
builds, and block RAM runs out fast. A single 512×512 8-bit frame takes
2.1 Mb, and a Zynq Z-7020 has 4.4 Mb in all. This library makes image
processing pipelines that keep only as much of the image as each step needs.

It follows the hardware model of the RIPL image-processing language. A RIPL
program is a composition of *skeletons*: `map`, `imap`, `filter2D`,
`convolve`, `zipWith`, `zipWithScalar`, `zipWithVector`, `unzip`,
`foldScalar`, `foldVector`, `scan` and `transpose`. Each skeleton becomes an
**actor**: a small circuit that consumes and produces pixel tokens. The actors
are joined by **FIFO dataflow wires**. Images are never stored as arrays
between steps. They flow as row-major pixel streams, and every actor in a
pipeline works at the same time on a different part of the stream.

The memory each actor needs follows from how it accesses the stream:

| actor | module | storage (pixels or values) | 512×512 |
|---|---|---|---|
| map (A in, B out) | `ripl_map` | A | 1–3 |
| imap (window [.-NEG]..[.+POS]) | `ripl_imap` | NEG+POS+1 (+1 waiting in the input wire) | 3–5 |
| zipWith | `ripl_zipwith` | 2·A | 2 |
| zipWithScalar | `ripl_zipwith_scalar` | scalar (+1 incoming pixel) | 2 |
| zipWithVector | `ripl_zipwith_vector` | B-vector (+1 incoming pixel) | 257 |
| unzip | `ripl_unzip` | A | 2 |
| filter2D / convolve 3×3 (default) | `ripl_window2d`, `ripl_convolve` | 2·M+3 | 1027 |
| foldScalar / scan | `ripl_fold_scalar`, `ripl_scan` | accumulator (+1 incoming) | 2 |
| foldVector | `ripl_fold_vector` | A-vector (+1 incoming) | 256 |
| transpose | `ripl_transpose` | M·N | 262144 |
| dataflow wire | `ripl_fifo` | DEPTH; 1 by default, M·N when an image is shared with a reduction | 1 or 262144 |

Only `transpose` and a shared image feeding a reduction need a whole frame.
Everything else is independent of the image size, or grows only with its
width.

Synthesis confirms these figures. At 512×512, yosys infers 8,224 bits of
memory for the Sobel program: the 1027-pixel line buffer plus a one-pixel
wire. It infers about 2.1 Mb for each of the threshold, histogram and
transpose programs. With 8-bit-wide block RAMs of 32 Kb, that is one block
for Sobel and 64 blocks for each of the others.

## Files

All RTL is in `rtl/`, one module or package per file:

- `ripl_pkg.sv`: pixel type, default image size, edge clamping.
- `ripl_fifo.sv`, `ripl_dup.sv`: dataflow wire and stream duplicator.
- One file per skeleton actor, as in the table above.
- `ripl_bench_brighten.sv`, `ripl_bench_sobel.sv`, `ripl_edge_blur.sv`,
  `ripl_bench_threshold.sv`, `ripl_bench_histnorm.sv`: complete programs.
- `ripl_top.sv`: all programs side by side.

Each file opens with a comment that gives its function, interface and timing.
`tb/` holds one self-checking testbench per module.

## Token wires and handshake

Every stream is a `valid`/`ready` bus. A token moves on the rising clock edge
when both are high. A producer that raises `valid` holds its data until the
token is taken, and `ripl_fifo` asserts this rule. The reset `rst` is
synchronous and active high.

The actors are combinational wherever they can be. Several of them make
`in_ready` depend on `out_ready` in the same cycle: `ripl_fifo`, `ripl_imap`,
`ripl_window2d`, `ripl_scan` and the zipWith variants. That lets a depth-1
wire and a sliding window each pass one token per cycle. It also means a long
pipeline has a long combinational ready path. If timing closure needs it, add
a register slice.

`ripl_dup` is how a stream gets shared. It takes a token only when both
consumers can take it in the same cycle. The two copies therefore stay in
lock step, and any slack between the consumers must come from FIFOs after it.

## How the user function is attached

A skeleton fixes the *access pattern*, and the program supplies the
*function*. To keep one module per skeleton, the function is not inside the
actor. Each actor shows its current argument on `fn_*` outputs:

- `fn_arg` for the vector or window;
- `fn_pix`, `fn_acc`, `fn_scalar`, `fn_vec` for the reductions and zips.

It takes the result back on `fn_res`, and the parent computes `fn_res` as
plain combinational logic. For example, brighten is one line around a
`ripl_map`:

```systemverilog
assign res[0] = (arg[0] + 50 > 255) ? 255 : arg[0] + 50;
```

There is no loop through the actor, because the argument comes from its
registers and never from its result.

## The 2·M+3 line buffer (filter2D, convolve)

This is the subtlest part of the design. The window is 3×3 by default and set
by the `KX` (width) and `KY` (height) parameters, both odd; the description
below is for 3×3, and the general rule follows it. A 3×3 window centred on pixel
(x, y) needs pixel (x+1, y+1) before it can be computed. Counting back from
that pixel, the oldest one needed is (x−1, y−1), which is 2·M+2 pixels
earlier. The buffer therefore holds exactly 2·M+3 pixels: two rows plus three.

`ripl_window2d` keeps them in a circular array of 2·M+3 entries, written in
stream order.

**Tap addressing.** The nine taps are read by address arithmetic. A pixel
with linear index `L` sits `n_rx − L` slots behind the write pointer, and
that distance is always between 1 and 2·M+3. The address is therefore the
write slot minus that distance, wrapped once. No modulo by an arbitrary
constant is needed; the only product is a row offset of −1, 0 or +1 times the
constant M, which synthesis reduces to a select.

**Flow control.** The buffer is full in steady state. The new pixel overwrites
the slot of the current output's oldest tap, which that output reads in the
same cycle. A write is therefore allowed in the cycle the output is taken, and
one pixel enters and one result leaves every cycle. The testbench checks that
the buffer never holds more than 2·M+3 live pixels.

**Start of a frame.** The first result, for the top-left pixel, leaves
M+2 cycles after the first pixel enters. At that point one row and two pixels
are in.

**End of a frame.** After the last pixel of a frame, the last M+2 results
drain before the next frame enters. An unstalled frame therefore occupies
M·N+M+2 cycles. At 512×512 that is 0.2 % above one pixel per cycle.

**Borders.** Neighbours outside the image repeat the nearest edge pixel. For a
3×3 window this is the same as mirroring about the image edge with the edge
pixel repeated, i.e. OpenCV's `BORDER_REFLECT`.

The window is presented as `p1..p9` in row-major order: `fn_arg[0]` is the
top-left pixel and `fn_arg[4]` is the centre.

**Other window sizes.** For a KX×KY window with RX = (KX−1)/2 and
RY = (KY−1)/2, the buffer holds (KY−1)·M+KX pixels. The first result leaves
after RY·M+RX+1 pixels. `fn_arg` has KX·KY entries in row-major order, with
the centre at index RY·KX+RX. `ripl_convolve` takes the same two parameters
and a kernel `K` of KX·KY weights. Taps outside the image still repeat the
edge pixel. For windows wider than 3 this clamps rather than mirrors.

## The imap circular buffer

`imap` computes each output from the pixel at the same position and its
neighbours along the row. For the 3-tap blur `([.-1]+[.]+[.+1])/3`,
consecutive windows overlap by two pixels.

`ripl_imap` writes pixels into a circular buffer of NEG+POS+1 slots. It keeps
a *midpoint* slot that advances by one per output, and reads taps at fixed
offsets around it. Output x is offered once pixel x+POS has arrived, or the
last pixel of the row. Positions past either end of the row repeat the edge
pixel. A row of M pixels gives M results and occupies M+POS+1 cycles.

## Sharing an image with a reduction: frame-deep wires

In the threshold program the same image goes two ways:

- into `foldScalar`, which finds the maximum;
- into `zipWithScalar`, which needs that maximum before it can process the
  first pixel.

`ripl_dup` sends each pixel to both branches in lock step. The maximum
exists only after the last pixel of the frame has gone by, so every pixel
sent to the threshold branch must wait somewhere until then. That wire is a
`ripl_fifo` of depth M·N: 262144 × 8 bit, 64 36-kb BRAMs. With anything
shallower, the FIFO fills, the duplicator stalls and the reduction never
completes: the program deadlocks.

Histogram normalisation has the same shape. The image is duplicated into:

- `foldVector`, which builds a 256-bin histogram;
- a frame FIFO into `zipWithVector`.

Between them, a `scan` turns the 256 bins into a cumulative histogram as they
stream out. Each pixel `p` becomes `cum[p]·255/(M·N)`.

In both programs the first output pixel of a frame appears only after the
whole frame has been read in. The end-to-end testbench checks this, and checks
that the frame FIFOs really fill to M·N.

## Programs and the top level

`ripl_top` (parameters `M`, `N`, default 512×512) instantiates every program
with its own stream ports. Each `*_in_*` and `*_out_*` triple is a
valid/ready bus.

| prefix | program | actors | output |
|---|---|---|---|
| `bri` | brighten: `min 255 (p+50)` | wire → map | 8 bit |
| `sob` | Sobel `\|Gx\|+\|Gy\|` | wire → filter2D | 11 bit (max 2040) |
| `eb` | Sobel, then `([.-2]+[.-1]+[.]+[.+1]+[.+2])/3` | wire → filter2D → wire → imap | 12 bit |
| `thr` | `p > max−50 ? 255 : 0` | dup → {wire → foldScalar → wire, frame FIFO} → zipWithScalar | 8 bit |
| `hn` | histogram normalisation | dup → {wire → foldVector → wire → scan → wire, frame FIFO} → zipWithVector | 8 bit |
| `tr` | transpose, column-major out | wire → transpose | 8 bit |
| `shp` | 3×3 sharpen `{0,-1,0,-1,5,-1,0,-1,0}` | convolve | signed 12 bit |
| `avg` | `(p1+p2)/2` of two images | zipWith | 8 bit |
| `uz` | even and odd pixels as two images | unzip | 8 bit each |

Notes on the programs:

- **Output widths are not clipped.** They are the upper bound of each
  expression over 8-bit inputs, as a compiler that infers bit widths would
  size them. The Sobel magnitude is 11 bits, for example.
- **The blur divides by 3 although it sums 5 taps.** This follows the program
  as it is written, so the result can exceed the input range. Change the
  constant in `ripl_edge_blur.sv` for a true mean.
- **The threshold offset is the `OFFSET` parameter.** The default is 50.
  Set it to 100 for the stricter variant, max−100.
- **Frame stores and FPGA size.** The top holds three frame stores: the
  threshold FIFO, the histogram FIFO and the transpose buffer. That is 6.3 Mb,
  which is more than one Z-7020 has. The programs are meant to be built one at
  a time, where each needs at most one frame store of 2.1 Mb.

## Design choices

The following are this implementation's own decisions, beyond the skeleton
model:

- Handshake, reset, the combinational ready paths and the user-function ports
  described above.
- **Edge handling.** Edge pixels are repeated in both `imap` and the 3×3
  window.
- **Per-frame reset.** Frame-level actors restart for every frame:
  - zipWithScalar and zipWithVector take a new scalar or vector per frame;
  - the folds reset to their initial value after each frame;
  - scan restarts after `LEN` tokens.
- **Overlap within actors.** `ripl_map`, `ripl_zipwith` and `ripl_unzip`
  gather a whole vector before they emit, so a vector costs A+B cycles.
  `ripl_transpose` has one buffer and accepts the next frame only after
  draining the current one. Double buffering would double its memory.
- **Unzip.** `ripl_unzip` uses non-overlapping vectors. Per vector it emits
  the first function's result, then the second's.
- **foldVector storage.** `ripl_fold_vector` keeps its vector in registers,
  so the user function can update any element in one cycle. A 256-bin
  histogram can be written as a RAM read-modify-write instead.
- **Histogram formula.** Normalisation uses `cum[p]·255/(M·N)`. It does not
  subtract the lowest occupied bin, as some equalisation formulas do.
- **Window size.** Every program uses 3×3 windows. Other odd sizes are
  tested with 5×3 and 3×5 convolutions.
- **Endpoints.** The image source and sink (camera, DMA, video interface) are
  not part of the design. Their streams are ports of `ripl_top`.

## Verification

Every module has a testbench in `tb/` named `tb_<module>.sv`. Each one:

- drives random data, with random input gaps and random output backpressure;
- compares every output with a reference model written in the testbench;
- checks the cycle counts stated above;
- prints `TB_RESULT checks=N failures=M`.

The timing checks cover the first line-buffer result at M+2 cycles, a frame at
M·N+M+1 cycles from first pixel in to last result out, an imap row at M+POS,
the foldScalar result at M·N and the first transpose output at M·N.

`tb_ripl_convolve_5x3` and `tb_ripl_convolve_3x5` run non-square windows
with asymmetric kernels. They also check the start point and buffer bound of
the general rule.

The end-to-end tests run every program at once:

- `tb_ripl_top` uses 16×12 images, two frames.
- `tb_ripl_top_full` uses the default 512×512, two frames, about 12 s.

Both count how often each mechanism happened and fail if one never did. The
mechanisms are saturation, duplicator stalls, a full frame FIFO, transpose
refusing input while draining, filter2D and imap moving tokens in the same
cycle, fold results and the line-buffer start.

To run one with Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -y rtl rtl/ripl_pkg.sv \
    tb/tb_ripl_top.sv --top-module tb_ripl_top -Mdir obj_top
./obj_top/Vtb_ripl_top
```

To lint a module on its own:

```sh
verilator --lint-only -Wall -Irtl -y rtl rtl/ripl_pkg.sv rtl/ripl_top.sv
```

## Changing it

- **Image size.** Set `M` and `N` on `ripl_top` or on any program. Line
  buffers, frame FIFOs, counters and count widths all follow.
- **A new program.** Instantiate the actors, join them with `ripl_fifo`
  (depth 1 unless a reduction shares the image), and write the user functions
  as `always_comb` logic on the `fn_*` ports. `ripl_bench_threshold.sv` is
  the pattern for a shared image.
- **Other windows.** `imap` windows are set by `NEG` and `POS`. 2D windows
  are set by `KX` and `KY` on `ripl_window2d` or `ripl_convolve`. The buffer
  grows to (KY−1)·M+KX pixels.
