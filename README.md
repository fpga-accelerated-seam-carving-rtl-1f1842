# Seam carving for video on an FPGA

Seam carving narrows an image by taking out *seams*: connected paths of one
pixel per row, from the top of the frame to the bottom, that pass through the
least important pixels. This removes the unimportant content and leaves the
important content as it was. If each video frame is carved on its own, the
seams jump from frame to frame and the result jitters. This accelerator
therefore computes **one** energy map for the whole clip and finds seams that
are removed from every frame at the same place. Two measures make it fast:

* The per-pixel work is done in hardware. Half a frame is processed at a
  time, and each of its 120 rows has its own lane.
* Up to five seams are taken from one energy map (NSAR, "number of seams per
  algorithmic run"). The usual method takes one seam and then recomputes the
  map. A larger NSAR is faster and gives lower quality. The intended settings
  are 1 (high quality), 3 (medium) and 5 (low quality).

The hardware does not modify the video. It reports the column of every seam in
every row. A host processor (the ARM core of a Cyclone V SoC) reads those
columns and deletes the pixels in software. The host also prepares the video
before the run: it converts it to grey scale and lays it out in SDRAM.

The RTL follows a published student design proposal for a DE10-Standard board
(Cyclone V SoC, D8M camera). The original gives the three-stage algorithm, the
state machines, the adder pipeline and the memory plan. Details it leaves
open are this design's own choices, and each is stated in the header comment of
the module concerned. The main ones are collected under
[Departures and choices](#departures-and-choices).

## The algorithm in three stages

Default size: frames of 240 rows × 320 columns, 8-bit grey, 150 frames (5 s at
30 fps).

1. **Energy (stage 1).** For every pixel and every frame, two energies are
   computed:
   * the spatial energy, which is the Sobel gradient `(|Gx| + |Gy|) >> 3`;
   * the temporal energy, which is `|p(t) − p(t−1)|`.

   Each pixel keeps the largest value of each energy over all frames. After the
   last frame, the final energy is `E = (w·S + (8−w)·T) >> 3`, with the weight
   `w` in 0…8 as an input.
2. **Accumulation (stage 2).** This is dynamic programming from top to bottom:
   `A[r][c] = E[r][c] + min(A[r−1][c−1], A[r−1][c], A[r−1][c+1])`. The column of
   that minimum is stored in the *paths matrix* at `(r, c)`.
3. **Pick and travel (stage 3).** The NSAR smallest values of the last row `A`
   are the end points of the seams. Each seam is then followed upward through
   the paths matrix, like a linked list, and one entry per row goes into a
   queue.

`seam_top_fsm` steps through Stage 1 → Stage 2 → Stage 3 → Finish on each
stage's `done` pulse. In Finish the host reads the queue.

## Data layout and the row representation

The 3×3 Sobel window needs the row above and the row below each pixel. The
host stores every row as a *row representation*: the row above, the row itself
and the row below, each `FRAME_W` bytes long, one after the other. The row above
row 0 and the row below the last row are copies of the edge row. So the video
array is:

```
byte address = video_base + ((frame * FRAME_H + row) * 3 + sub) * FRAME_W + column
               sub: 0 = row above, 1 = the row, 2 = row below
```

Byte k of each 64-bit SDRAM beat is column `8·word + k`. The 120 rows of a half
frame are one contiguous block of 115,200 bytes. The two AXI ports read the
first 60 rows and the second 60 rows of that block.

## Stage 1 in detail (`stage1_unit`)

This is the largest part, and the part where most of the parallelism is.

**Lanes.** Lane `l` owns row `l` in the first half of each frame and row
`120 + l` in the second half. Each lane has the following parts:

* **`row_buffer`:** two banks holding the lane's row representation, written
  by the loader 8 bytes at a time. A read returns the 3-byte column block
  (above, middle, below) for one column.
* **`sobel_pipe`:** the adder pipeline. Each column block is consumed as soon
  as it is read. Its share of the three outputs it touches is added into three
  registers per axis (R4 ← X1, R5 ← R4 + X2, R6 ← R5 + X3, where X1 = a+2b+c,
  X2 = 0 and X3 = −X1). Y uses the same pipeline with Y1 = Y3 = c−a and
  Y2 = 2(c−a). When columns j−1, j and j+1 have entered, R6 holds column j.
  This gives Gx with the sign reversed, and the norm removes the sign.
* **`energy_lane`:** the norm, followed by a read-compare-write of the lane's
  per-pixel state: the largest spatial energy, the previous pixel and the
  largest temporal difference. Results pass through a small write-back queue
  (`sync_fifo`). In frame 0 there is no previous pixel, so the temporal
  energy starts at 0.

The column sequence fed to the lanes is `0, 0, 1, …, W−1, W−1`. The edge column
is repeated, so a row of W pixels takes W+2 cycles. Reading the memory adds one
cycle, and a pixel's state is written three cycles after its window is
complete.

**Two FSMs, double buffering.** A *load FSM* and a *processing FSM* share the
two row-buffer banks. Each bank has a "full" flag:

* The load FSM starts both `axi_half_frame_loader`s on the next half frame as
  soon as the bank it targets is empty. It sets the bank's flag when both
  loaders are done.
* The processing FSM waits for the flag, streams the bank through all lanes,
  waits for the write-back queues to drain, then clears the flag.

Half frame `h` goes to bank `h mod 2`. So while half frame `h` is processed,
`h+1` is being loaded.

**Final state.** After the last half frame, the processing FSM reads every
pixel's state, one per cycle, row by row. It writes the weighted sum into the
frame-sized energy map (`sdp_ram`, 76,800 bytes).

**Where the time goes.** One half frame is 14,400 beats of 8 bytes, which is
7,200 beats per port. Processing it takes about 330 cycles. So loading
dominates: stage 1 is bound by SDRAM bandwidth, and the lanes are idle most of
the time. The original expected the reverse (computation slower than loading);
with one lane per row it is not. The default run (300 half frames) therefore takes about
300 × 7,200 = 2.2 M cycles at one beat per cycle per port, plus 76,800 cycles
for the Final state.

## Stage 2 (`stage2_accum`)

The state machine has three states: Idle, Load and Acc. The accumulation row
is a bank of 320 16-bit registers. The most a seam can cost is
240 × 255 = 61,200, so 16 bits are enough.

* **Load** copies energy row 0 into the registers, one cell per cycle, while
  `counter` counts the cells.
* **Acc** streams rows 1…239, one cell per cycle. The update is done in place:
  the new `A[c]` overwrites the old one. The old `A[c−1]` that the next cell
  still needs is kept in one extra register.

Two rules decide the minimum:

* **Edges:** the leftmost and rightmost cells have only two cells above them.
* **Ties:** the cell straight above wins, then the left one.

Each chosen column goes into `path_mem`. This is five identical copies of a
76,800 × 9-bit memory. They are written together, and each copy has its own
read port for stage 3.

Timing: `done` comes `W + 3 + W·(H−1)` cycles after the start. That is 76,803
cycles at the default size.

## Stage 3 (`stage3_trace`, `min_k_picker`)

The state machine has three states: Idle, Pick and Travel.

**Pick** streams the last accumulation row through `min_k_picker`. This is a
chain of five comparator slots that keeps the five smallest values in sorted
order, with the smaller column first on a tie.

**Travel** follows all NSAR seams at once, one per path copy. Each row takes
three cycles: push, read and take. Each row pushes one 53-bit entry
`{row, col[4..0]}` into the seam queue (`sync_fifo`, 240 entries), starting at
the bottom row. Seam slots at or above NSAR read 511. NSAR is clamped to
1…5.

Two seams may share pixels. They are reported as found, and the host decides
what to do with the overlap.

## Interfaces of `seam_carver_top`

| Port | Meaning |
|---|---|
| `clk`, `rst_n` | Clock; asynchronous active-low reset. A run starts when reset is released and ends in Finish, where it stays until the next reset. |
| `video_base[31:0]` | Byte address of frame 0 of the video array in SDRAM (8-byte aligned). |
| `energy_weight[3:0]` | Spatial weight `w` (values above 8 count as 8). |
| `nsar[2:0]` | Seams per run, 1…5. Sampled when stage 3 starts. |
| `sd_ar_*`, `sd_r_*` `[PORTS]` | AXI4 read masters towards the HPS SDRAM. Only the read channels; INCR bursts of `BURST_LEN` 8-byte beats, one burst outstanding per port. Types `axi_ar_t`, `axi_r_t` in `seam_pkg`. |
| `h_ar_*`, `h_r_*` | AXI read slave for the host (64-bit data, 12-bit address). |
| `stage`, `finish` | Current stage (1, 2, 3; 4 = Finish). |
| `overlap_cycles` | Cycles in which loading and processing ran together (observability of the double buffering). |

Host register map (`hps_readout`), 64-bit reads only:

| Offset | Name | Content |
|---|---|---|
| 0x00 | STATUS | `[15:0]` entries in the seam queue, `[18:16]` NSAR used, `[24]` finish, `[27:25]` stage |
| 0x08 | SEAM | Reading removes one queue entry: `[63]` valid, `[52:45]` row, `[9k+8:9k]` column of seam k. Reads 0 when the queue is empty. |
| other | – | SLVERR |

The host waits for `finish`, then reads SEAM 240 times. The rows arrive from
the bottom row (239) up to row 0.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `FRAME_H` | 240 | Rows per frame |
| `FRAME_W` | 320 | Columns per frame (multiple of 8) |
| `LANES` | 120 | Rows processed in parallel. Must be `FRAME_H` or `FRAME_H/2`. |
| `FRAMES` | 150 | Frames in the video |
| `PORTS` | 2 | AXI read ports. Must divide `LANES`. |
| `BURST_LEN` | 8 | Beats per AXI burst. The beats of a port's block must be whole bursts. |

`NSAR_MAX` = 5 and the data widths are in `seam_pkg`.

## Departures and choices

The original design is followed in its structure:

* three stages under a top FSM;
* a load FSM and a processing FSM with double buffering;
* row representations in SDRAM, half a frame per pass, one lane per row;
* the X1/X2/X3 and Y1/Y2/Y3 partial-sum pipeline;
* running maxima of spatial and temporal energy, and a tunable weighted sum;
* register-row accumulation with a frame-sized paths matrix;
* five path copies, a pick by comparators, and a linked-list travel;
* a queue that the host reads over 64-bit AXI.

Where it is silent or inconsistent, this design chose as follows:

* **Frame size.** The original quotes both "360×240" and a 240-row by
  320-column frame. The 240 × 320 reading is used, because its equations and
  memory plan use it.
* **Sobel X3.** The original's X3 term is taken as `−(a + 2b + c)`, which is
  the mirror of X1, so that the result is a true Sobel derivative.
* **Norm.** The norm is the L1 norm `|Gx|+|Gy|`, scaled by 1/8 to one byte. All
  energy maps are one byte per pixel, as in the original memory plan. The
  original asks only for "the norm".
* **Weight.** The weighted sum uses a 0…8 weight, out of 8.
* **Edges.** Stage 1 repeats the edge column, and the edge rows come from the
  host's layout. In stage 2, a neighbour outside the frame takes no part in
  the minimum. The original's "edges give an accumulation value of 0" is not
  taken literally, because it would send every edge seam out of the frame.
* **Stage 2 Load count.** The original's Load state counts to 240. Here it
  counts the cells of one row, `FRAME_W` = 320.
* **Paths matrix width.** Each cell holds the full 9-bit column. The original
  memory plan suggests 8 bits per cell.
* **Memory plan.** Memories are not shared between stages, and per-pixel state
  is one 3-byte word per lane entry. The original instead reuses blocks stage
  by stage to fit 557 M10K blocks. This RTL holds about 1.17 MB of on-chip
  memory bits in total. Whether it fits the DE10-Standard has not been checked
  by synthesis for that device.
* **Chosen because unspecified.** These are not given in the original:
  * the bank-flag handshake between the FSMs;
  * the AXI subset and burst length;
  * the queue entry and register formats;
  * the tie rules;
  * reset (asynchronous, control state only; memories are not cleared).
* **Left to the host.** Seam insertion (widening) and the removal of
  overlapping seams are left to host software, as in the original.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=N failures=M` line and has a cycle watchdog. The reference
results come from `tb/seam_ref_pkg.sv`, a plain software model of the whole
algorithm, and `tb/axi_sdram_model.sv` stands in for the SDRAM. The model
computes every byte of a synthetic test video from its address, and it stalls
ARREADY and RVALID at random.

| Testbench | What it checks |
|---|---|
| `tb_sobel_pipe` | Gx/Gy of every column against a direct 3×3 Sobel, with gaps in `in_valid` |
| `tb_energy_lane` | Running spatial and temporal maxima and the previous pixel over 5 frames |
| `tb_row_buffer` | Both banks, with a non-power-of-two number of words, and a write to one bank while the other is read |
| `tb_axi_half_frame_loader` | Every byte of three blocks, burst count, done pulse, AXI stalls |
| `tb_stage1_unit` | Every energy-map write of an 8×16, 3-frame video; each address written once; load/process overlap |
| `tb_stage2_accum` | Every paths-matrix write and the last accumulation row, with many ties; cycle count |
| `tb_min_k_picker`, `tb_stage3_trace` | The K smallest with the tie rule; seams traced for NSAR 1…5 and the out-of-range values 0 and 7; stalls on a full queue |
| `tb_sync_fifo`, `tb_sdp_ram`, `tb_path_mem`, `tb_hps_readout`, `tb_seam_top_fsm` | The building blocks and the host port |
| `tb_seam_carver_top` | End to end at 8×24, 4 lanes, 3 frames, for NSAR 1, 3 and 5, read through the host port. It counts the stage changes, load/process overlap, AXI stalls, unused-seam markers and empty-queue reads, and fails if any of them never happens. |
| `tb_seam_carver_full` | Three complete runs at the default size (150 frames of 240×320, 120 lanes), one per quality setting: NSAR 5 with weight 4, NSAR 3 with weight 8, NSAR 1 with weight 0. Every seam entry is checked against the reference. It takes about 2.4 M cycles per run, a few minutes of simulation in all. |

Running a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_seam_carver_top \
  -Irtl -Itb rtl/seam_pkg.sv tb/seam_ref_pkg.sv tb/tb_seam_carver_top.sv -o sim
./obj_dir/sim
```

Other modules are found by file name (`-Irtl -Itb`). The simulator has two
states, so the testbenches reset or write everything they read.

What is not verified:

* timing closure and the resource use on the real device;
* the real HPS SDRAM and HPS-to-FPGA bridge;
* the quality of the resized video.

## Files

* `rtl/seam_pkg.sv`: widths, pixel and state structs, stage enum, AXI channel
  structs, queue entry.
* `rtl/seam_carver_top.sv`: top level.
* `rtl/seam_top_fsm.sv`: stage sequencing.
* `rtl/stage1_unit.sv`: stage 1, with `axi_half_frame_loader.sv`,
  `row_buffer.sv`, `energy_lane.sv` and `sobel_pipe.sv`.
* `rtl/stage2_accum.sv`: stage 2.
* `rtl/path_mem.sv` and `rtl/sdp_ram.sv`: the memories.
* `rtl/stage3_trace.sv` with `rtl/min_k_picker.sv`: stage 3.
* `rtl/sync_fifo.sv`: the queues.
* `rtl/hps_readout.sv`: the host read port.
* `tb/`: the testbenches, the reference model and the SDRAM model.
