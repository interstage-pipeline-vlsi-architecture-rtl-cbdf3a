# Three-stage pipelined 2-D discrete wavelet transform

This is synthesizable SystemVerilog for a pipeline that computes the
multi-level 2-D discrete wavelet transform (DWT) of square images. At
every level the LL data of the previous level goes through four 2-D
L x M filters: LL, HL, LH and HH. The outputs are decimated by two in
both directions. The work is spread over three pipeline stages:

* stage 1 computes level 1 from the raw image;
* stage 2 computes level 2 from the LL1 subband;
* stage 3 computes every remaining level, 3 to J, one after the other.

Each level has a quarter of the work of the level before it. Levels 3..J
together have less than half the work of level 2. So the stages get
8 : 2 : 1 identical filter units, and each stage spends about n²/8 clock
cycles on a frame. With a two-bank buffer in every stage, the three stages
work at once on three successive images.

## The arithmetic

For an n x n input S at some level, the four subbands are

    Y_P(m,c) = Σ_{k<L} Σ_{i<M} H_P(k,i) · S((2m−k) mod n, (2c−i) mod n),
    P ∈ {LL, HL, LH, HH},  0 ≤ m,c < n/2

The `mod n` is periodic extension at the borders. LL becomes the input of
the next level.

The filters are applied directly in 2-D; they are not split into row and
column passes. Any L x M coefficient matrix works, separable or not. The
only requirement is the decimation by two, which lets each sum be split
into four independent channels:

    Y_P(m,c) = Σ_{ro,co ∈ {0,1}} Σ_{k'<L/2} Σ_{i'<M/2}
               H_P(2k'+ro, 2i'+co) · S(2m−2k'−ro, 2c−2i'−co)

Channel (ro, co) only touches rows of parity ro and columns of parity co.
It uses only its own L/2 x M/2 coefficient sub-matrix. The four channels
are ee, eo, oe and oo. This split shapes the hardware: the data scanning
unit sorts each window into four sub-windows, and a filter unit is four
small (L/2 x M/2)-tap filters plus an adder.

### Coefficients and number format (`dwt_pkg`)

* L = M = 4.
* The coefficients are the 4-tap Daubechies pair, taken as an outer
  product: H_XY(k,i) = f_X(k)·f_Y(i).
  * f_L = {31, 54, 14, −8}, which is 64 · db2 rounded.
  * f_H(k) = (−1)^k · f_L(3−k).
  * The first subband letter is the filter along rows (index k). The second
    is the filter along columns (index i).
* Pixels are 8-bit unsigned. All other samples are 16-bit signed.
* A sum is rounded, shifted right by 13 bits and saturated to 16 bits. The
  shift is 12 bits for the 64 · 64 integer scale, plus one more bit so that
  the LL gain stays near 1 from level to level.

To use another filter, change `lo_tap`/`hi_tap` or `coef` in `dwt_pkg`.
Any function of (subband, k, i) will do. L and M are the package constants
`FL` and `FM`.

## Blocks

| module | role |
|---|---|
| `dwt_pipeline` | top: pixel loader and the three stages, wired in a chain |
| `dwt_stage` | one stage: buffer, DSU, `NUM_PU` filter units, controller; the last stage also has a scratch buffer |
| `frame_buffer` | `BANKS` x N x N words, `WR` write ports, `RD` asynchronous read ports |
| `dsu` | data scanning unit: window address generation with wrap-around, sorting into the ee/eo/oe/oo sub-windows |
| `filter_unit` | four-channel filter: one sample of one subband per cycle |
| `pixel_loader` | raster pixel stream into the free bank of the stage-1 buffer |
| `dwt_pkg` | widths, subband enum, window and coefficient types, filter table, rounding |

## How a stage schedules its work

A stage sees its job as a list of items (position, subband). The list is in
raster order of output position, with the four subbands of a position next
to each other. It issues `NUM_PU` items per cycle:

* **8 units (stage 1):** two horizontally adjacent positions per cycle,
  with all four subbands of each. The DSU fetches two 4 x 4 windows (32
  read ports).
* **2 units (stage 2):** one position every two cycles: LL and HL, then LH
  and HH.
* **1 unit (stage 3):** one position every four cycles.

Cycles per frame for an n x n image:

| stage | run cycles | note |
|---|---|---|
| 1 | n²/8 | |
| 2 | n²/32 · 4 / 2 = n²/8 | |
| 3 | Σ_{j≥3} (n/2^j)² · 4 < n²/12 | |

Each stage also has about 5 cycles of control overhead per frame. Stage 3
has another 5 per extra level.

The path of one issued position:

    issue register → buffer read + DSU (registered sub-windows)
                   → filter unit: channel sums (reg) → total, round, saturate (reg)

A result leaves the stage four cycles after it is issued. It comes out on
`out_valid[u]` / `out_coef[u]`, one per unit, with level, subband, row,
column and value. An LL result is written on the same clock edge into the
next stage's buffer. In stage 3 it goes into the scratch buffer instead.

After the last issue of a level, the controller waits three cycles. Only
then does it start the next level or finish the frame. The next level in
stage 3 reads the LL data that has just been written.

## How the stages are kept in step

Every stage owns a two-bank input buffer and a `full` bit per bank. The
side that writes into a stage (the loader or the previous stage) works like
this:

1. It may start a frame only while the bank at the write pointer is not
   full (`in_ready`).
2. It writes the whole frame into that bank.
3. It pulses `in_frame_done`. The bank becomes full and the write pointer
   moves to the other bank.

A stage starts a frame when both of these hold:

* its read bank is full;
* it passes LL data on, and the next stage has a free bank (`nx_ready`).

If it has a frame but the successor has no free bank, it waits. This wait
is the `stall` output. The stage does not trust `nx_ready` in the cycle of
its own `nx_frame_done` pulse, because the successor marks that bank full
only at the end of that cycle.

When a frame is finished, the stage frees its read bank and signals the
next stage. Because of the double buffering, up to three frames can be in
flight: one being loaded into stage 1 and one in each of the three stages.

`cfg_lg_n` (image side 2^cfg_lg_n) and `cfg_levels` are plain inputs. They
must not change while frames are in flight. A stage that
`cfg_levels` does not reach never gets a frame.

## Top-level interface (`dwt_pipeline`)

| parameter | default | meaning |
|---|---|---|
| `IMG_N` | 256 | largest image side; the stage buffers are IMG_N, IMG_N/2 and IMG_N/4 square |
| `PU1`, `PU2`, `PU3` | 8, 2, 1 | filter units per stage |
| `IN_PIX` | 8 | pixels per input beat |

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `cfg_lg_n` [3:0] | in | log2 of the image side, 2..log2 `IMG_N`; the side must be a multiple of `IN_PIX` |
| `cfg_levels` [3:0] | in | number of levels J, 1..`cfg_lg_n` |
| `in_valid`, `in_ready`, `in_pix[IN_PIX]` | in/out/in | raster-order pixels, `IN_PIX` adjacent pixels of one row per beat |
| `s1_valid[PU1]`, `s1_coef[PU1]` | out | level-1 coefficients (`coef_out_t`: level, subband, row, col, data) |
| `s2_valid[PU2]`, `s2_coef[PU2]` | out | level-2 coefficients |
| `s3_valid[PU3]`, `s3_coef[PU3]` | out | coefficients of levels 3..J, including the final LL |
| `busy[2:0]`, `stall[2:0]`, `level_switch` | out | status per stage; stage 3 changes level |

The coefficient outputs have no back-pressure: the consumer must take one
per unit per cycle. The final-level LL comes out like any other subband.

## Performance

All figures are from simulation.

* **256 x 256 image, 8 levels, default parameters:** stage 1 takes a new
  frame every 8,197 cycles. Three back-to-back frames take 47,559 cycles
  from the first pixel to the last coefficient, including filling the
  pipeline.
* **16 x 16 image, 3 levels:** 134 cycles from the first pixel to the last
  coefficient. At 100 MHz that is 1.34 µs. A published VHDL
  implementation of the same architecture reports 16.4 µs for this job.

No timing closure has been done; the frequency is only a reference point.
Stage 1's DSU reads 32 words from a 2 x 256 x 256 register array every
cycle. In silicon, that array would be a banked SRAM arrangement.

## Where this design is its own

The three-stage mapping, the 8 : 2 : 1 unit ratio, the four-channel filter
and the data scanning unit follow the architecture this RTL implements.
The following points are choices made here:

* L = M = 4 and the db2 coefficients, with their integer scaling, widths,
  rounding and saturation.
* The first letter of a subband name applies to rows.
* Full-frame, two-bank buffers and the bank handshake between stages. The
  periodic extension needs the last rows of a frame before its first output
  row can be computed, so each stage keeps a whole frame.
* The item schedule inside a stage, and the drain wait between levels.
* The scratch buffer through which stage 3 loops over levels.
* The input format: 8 pixels per beat with valid/ready. The run-time image
  size and level count.
* The window convention S(2m−k, 2c−i). Writing the channels as
  S_ee(m+k, c+i) gives the same transform with the coefficient order
  reversed.

## Simulation

Every testbench checks itself and ends with a
`TB_RESULT checks=N failures=M` line. Example with plain Verilator, run
from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal \
      rtl/dwt_pkg.sv rtl/frame_buffer.sv rtl/dsu.sv rtl/filter_unit.sv \
      rtl/pixel_loader.sv rtl/dwt_stage.sv rtl/dwt_pipeline.sv \
      tb/pipeline_checker.sv tb/tb_dwt_pipeline.sv \
      --top-module tb_dwt_pipeline -Mdir obj
    ./obj/Vtb_dwt_pipeline

| testbench | what it covers |
|---|---|
| `tb_frame_buffer` | random multi-port writes and reads against a model |
| `tb_dsu` | every sub-window element, level sizes n = 2..16, wrap-around |
| `tb_filter_unit` | random windows, all subbands, saturation, two-cycle latency |
| `tb_pixel_loader` | addressing, handshake, frame-done timing |
| `tb_dwt_stage` | last stage looping over levels 3–5; first stage stalled by its successor, LL hand-over |
| `tb_dwt_pipeline` | end to end with IMG_N = 16 (see below) |
| `tb_dwt_small_image` | default parameters with 16 x 16 images chosen at run time, 3 levels, three frames within 1,639 cycles |
| `tb_dwt_pipeline_full` | default parameters: three 256 x 256 frames through all 8 levels, every coefficient checked; about one minute |

`tb_dwt_pipeline` runs three configurations side by side:

* four 16 x 16 frames through 4 levels;
* one 16 x 16 frame through 3 levels, against a 1,639-cycle budget;
* 8 x 8 frames with stage 2 cut to one unit, so that stage 1 must stall.

It also counts how often each mechanism occurs: input back-pressure, stage
stall, stage-3 level switch, and all three stages busy at once. A mechanism
that never happens counts as a failure.

`pipeline_checker` (in `tb/`) drives the stimulus and holds the
scoreboard. Its reference model evaluates the level equations directly,
with its own copy of the filter taps. It can be reused for other sizes.
