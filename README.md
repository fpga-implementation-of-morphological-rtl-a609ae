# Morphological decomposition filter for image contrast enhancement

Images with a wide dynamic range look flat to a human viewer: small objects
carry little contrast next to the large bright or dark areas. A way to fix
this is to split the image into *detail images* by object size, scale each
one with its own gain, and add them back up. This RTL does the splitting
step in hardware, in real time, for 8-bit gray-level images streamed in
raster order.

For each of five levels k = 1..5 the image f is filtered with a
morphological **closing followed by an opening** (CO). Both use a flat
square structuring element (SE) of side 3, 5, 9, 17 or 33 pixels. Each SE
is the one below it dilated with itself. CO_k(f) keeps the objects larger
than SE k and flattens the smaller bright and dark ones. What level k removes
beyond level k-1 is its detail image:

    d_k = CO_{k-1}(f) - CO_k(f),        CO_0(f) = f
    f   = d_1 + d_2 + d_3 + d_4 + d_5 + CO_5(f)

CO_5(f) is the *no-detail image*: the large-scale background. A contrast
stage can then compute f' = sum(g_k * d_k) + CO_5(f). This design stops
before that stage. It hands every pixel's results to an optional
soft-processor port, where such a gain law can run as software.

## Gray-level erosion and dilation

With a flat SE, dilation is the maximum over the window and erosion is the
minimum. Closing is a dilation followed by an erosion, and opening is an
erosion followed by a dilation. So CO_k is four window min/max passes:

    CO_k(f) = D_k( E_k( E_k( D_k(f) ) ) )

Windows reaching past the image edge treat the missing places as neutral:
the top of the range (255) for a minimum and the bottom (0) for a maximum.
The margin then never wins a comparison, and the edges need no special data
path.

## The min/max engine (`se_minmax_engine`)

The core of the design is one engine. It computes erosion **and** dilation
for **all five SE sizes at once**, in one pass over the image. Three ideas
keep it small.

**Separable windows.** A square min (or max) is a vertical min over each
column of the window, followed by a horizontal min over those column
results. Each pixel step then touches one new column instead of a whole
33x33 window. The results of the previous columns are reused from a queue.

**A comparator pyramid on the column.** The new column is 33 pixels tall,
centred on the output row. Level 0 compares the centre 3 pixels. Each higher
level compares only the pixels its span adds: 2, 4, 8 and then 16 (half
above, half below). It merges them with an accumulator that holds the
previous level's result. The five vertical spans 3/5/9/17/33 therefore share
all their comparisons (`column_pyramid`).

**Time-multiplexed levels.** One pixel step takes 15 clock cycles, three
phases of five cycles with one SE level per cycle:

| phase | cycles | what happens (level l in cycle l) |
|-------|--------|-----------------------------------|
| column | 5 | pyramid level l: vertical min and max of span 2^(l+1)+1 |
| line   | 5 | horizontal min and max of level l over its 2^(l+1)+1 column results (the new one plus the queue) |
| shift  | 5 | level l's queue takes the new column result; in cycle 0 the finished result goes to the output buffer; in cycle 4 the next pixel is loaded |

So one set of comparators serves all five levels. The engine's throughput is
one pixel per 15 cycles.

**Alignment of the levels.** Every level's window is centred on the same
pixel, which lies 16 rows and 16 columns behind the newest pixel. The
horizontal queue of each level therefore keeps 32 previous column results,
even for the 3x3 level. The centre pixel itself travels in a queue of its
own, so the engine also outputs the input pixel at the result's position.

**Scan and margins.** The engine walks an extended raster of
(W+16) x (H+16) positions. The extra 16 columns and 16 lines flush the
windows past the right and bottom edges, and need no input. A pixel is
taken only at positions inside the image. A result is given only where the
window centre lies inside the image. Which places of a window hold real
pixels follows from the scan position alone, so no memory needs clearing at
reset or between frames. Frames follow each other with no gap.

**Storage.** The 32 lines above the new pixel come from `window_bank`. It
holds the 33-pixel column registers and a line store built from the image
FIFO (`image_fifo`), W+16 words deep. Each word packs the 32 older pixels of
one scan column. On each load the word for the current column comes out, is
joined with the new pixel to form the 33-pixel column, and goes back in
shifted by one row. At 256x256 this is 272 x 256 bits per engine.

**Handshake.** `in_valid/in_ready` and `out_valid/out_ready` are
valid/ready streams in raster order. The output is a one-entry buffer, so
`out_valid` is a register. `in_ready` depends only on the engine's own
state: it never looks at `in_valid` or `out_ready`. This is what lets
engines be chained and forked without combinational loops. The controller
(`step_ctrl`) stalls in two places. In the first shift cycle it waits while
a result is due and the output buffer is still full. In the last shift cycle
it waits while a pixel is needed and none is offered.

## The decomposition (`morph_decomp_top`)

```
            +--------------------+  D_1(f) -> co_filter(level 1) -> CO_1 -+
in_pix ---->| se_minmax_engine   |  D_2(f) -> co_filter(level 2) -> CO_2 -+
            |  (all 5 SE sizes)  |   ...                                  +--> d_1..d_5,
            +--------------------+  D_5(f) -> co_filter(level 5) -> CO_5 -+    CO_5(f), f
                     | centre pixel f                                     |
                     +------> alignment FIFO -----------------------------+
                                                                          |
                                              window_dma_port <-----------+--> soft processor
```

* The first engine produces the first dilation D_k(f) of all five levels at
  once, and shares its pyramid across them.
* After that, each level works on its own image, so each level has its own
  `co_filter`. That is three more engines: erosion (which completes the
  closing), then erosion and dilation (the opening). These are full
  five-level engines of which only level k is used. All 16 engines of the
  design therefore have the same 15-cycle step and the same latency, and
  the five chains stay in step. A smaller engine for the low levels would
  need less comparator time, but its output would arrive earlier and need
  more buffering.
* The original pixel leaves the first engine and waits in an alignment FIFO
  (`image_fifo`, 3*(16*(W+16)+16)+16 words, 13,120 at 256 wide) until the
  five CO results for the same pixel arrive. An assertion checks that this
  FIFO never fills.
* The join subtracts neighbouring levels into d_1..d_5, which are signed
  9-bit values.

**Timing at 256x256.** The first engine scans 272 x 272 steps of 15 cycles:
1,109,760 cycles per frame for back-to-back frames. A single frame, from its
first input to its last output, takes 1,306,356 cycles; the extra is the
latency of the three further engines, each about 16 lines. For 50 frames/s
the clock must be at least 55.5 MHz (65.3 MHz for isolated frames).

**Memory.** There are 16 line stores of 272 x 256 bits plus the alignment
FIFO, about 1.29 Mbit, all written as plain arrays (block RAM candidates).

## Soft-processor port (`window_dma_port`)

An 8-bit soft processor of the PicoBlaze kind can process each pixel's
details. The processor itself is not part of this RTL: its port signals are
top-level ports (`pb_*`). Ordinary processor I/O is address based. This port
instead presents each pixel's results as a **record read through a single
port address**, with a pointer that advances on every read. A per-pixel
program is then only reads, arithmetic and one write.

* Record bytes, read in order at `DATA_PORT` (0x00): L_0 = f, then
  L_1..L_5 = CO_1(f)..CO_5(f). All are 8-bit gray levels. Detail d_k is the
  subtraction L_{k-1} - L_k.
* A read at `STATUS_PORT` (0x01) returns `{record loaded, result pending,
  3'b0, pointer}`.
* A write at `DATA_PORT` returns the processed pixel. It appears on
  `enh_valid/enh_pix` and frees the record for the next pixel.
* `pb_interrupt` rises when a record is loaded, and `pb_interrupt_ack`
  clears it.
* The port protocol is PicoBlaze's: `port_id` is valid with one-cycle
  read/write strobes, and input data is sampled at the end of the strobe
  cycle.

With `dma_en` high, every result waits until the processor has taken its
record. A processor needs about 20 cycles per pixel for a short program,
which slows the stream below the 15-cycle step. Processor speed therefore
bounds the frame rate in this mode. With `dma_en` low the port is bypassed.

## Where this design makes its own choices

The filter structure follows the published method: five flat square SEs
3..33, closing-opening per level, neutral-valued margins, a separable
vertical/horizontal split, a comparator pyramid with accumulator, column,
line and shift phases, a 15-cycle step, and an image FIFO with empty and
full flags. The following are this design's own choices:

* **CO order.** A closing is followed by an opening, and every level filters
  the original image. The published description calls the pair both
  "closing-opening" and "opening-closing"; the closing-first reading is
  used. To change it, swap `.mn`/`.mx` in `co_filter` and the `.mx` taken
  from the first engine in `morph_decomp_top`.
* **Detail definition.** d_k is the difference of consecutive levels, so the
  details and CO_5 add up to f exactly.
* **Five cycles per phase.** The 15-cycle step is split as three phases of
  five cycles, one level per cycle.
* **Later CO operators.** The operators after the first one use full
  five-level engines; only one level of each is used (see above).
* **FIFO.** There is one clock and an active-low synchronous reset. Storage
  is a circular buffer, not a shift register. Push and pop in the same cycle
  are allowed when the FIFO is full, which is the delay-line use.
* **Interfaces.** The valid/ready streams, the margin scan, the centring of
  all levels on one pixel, and the processor port's record layout, port
  numbers and interrupt are all this design's own.
* **Not built.** The per-level gain law and the re-assembly of the enhanced
  image. The array of several processors on the window is also not built;
  there is one port.

## Files

| file | content |
|------|---------|
| `rtl/morph_pkg.sv` | pixel type, min/max struct, phase enum, SE size helpers |
| `rtl/image_fifo.sv` | FIFO with empty/full flags (line store, alignment) |
| `rtl/window_bank.sv` | 33-pixel column registers + line store |
| `rtl/column_pyramid.sv` | column phase: comparator pyramid with accumulator |
| `rtl/line_minmax.sv` | line and shift phases: horizontal queues per level |
| `rtl/step_ctrl.sv` | phase sequencer, scan counters, handshakes |
| `rtl/se_minmax_engine.sv` | the five-level erosion/dilation engine |
| `rtl/co_filter.sv` | remaining three operators of one level's CO |
| `rtl/window_dma_port.sv` | soft-processor record port |
| `rtl/morph_decomp_top.sv` | the decomposition |
| `tb/tb_*.sv` | self-checking testbenches, one per module |
| `tb/pb_model.sv` | behavioural processor model (port side, fixed program) |

Parameters: `IMG_W`, `IMG_H` (default 256 x 256) on the top and the engine.
The number of levels is `DECOMP_LEVELS = 5` in the package. Pixel width is
`PIX_W = 8`.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
Each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/morph_pkg.sv \
          tb/tb_morph_decomp_top.sv --top-module tb_morph_decomp_top -o sim
./obj_dir/sim
```

(`-Irtl -Itb` lets Verilator find each module by its file name.)

* `tb_morph_decomp_full`: one 256x256 frame, all defaults, processor port
  bypassed. Every pixel is compared with an independent whole-image model
  (separable min/max, closing then opening, per level). The reconstruction
  identity and the frame time are checked. It takes about 15 s to run, plus
  a few minutes of C++ build.
* `tb_morph_decomp_top`: a 24x20 image, two frames back to back. The second
  frame has random input gaps and output back-pressure, and goes through the
  processor port to `pb_model`. The test counts that every mechanism occurs:
  starvation, back-pressure, margin windows, frame wrap, processor on and
  off, detail at every level.
* `tb_se_minmax_engine`: all five levels against direct window min/max. It
  also checks the 15-cycle spacing of results, and correctness under
  stalls on a ramp image.
* `tb_step_ctrl`, `tb_window_bank`, `tb_column_pyramid`, `tb_line_minmax`,
  `tb_image_fifo`, `tb_window_dma_port`: block tests against reference
  models.

All testbenches pass. They use random data from `$urandom`, so a different
seed exercises different values.
