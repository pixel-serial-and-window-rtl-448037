# Stereo matching processor with a variable window size

This is synthesizable SystemVerilog for a stereo-vision matcher. For every pixel of a
left (reference) image it finds the matching pixel on the same line of a right
(candidate) image. It compares square windows by their sum of absolute differences
(SAD). The window size is not fixed: each pixel starts with a 3 x 3 window, and the
window grows by 2 until the match is clearly unique or 25 x 25 is passed.

The hardware idea is **pixel-serial, window-parallel** computation:

- Each processing element (PE) computes one absolute difference and one addition per
  clock, whatever the window size. All PEs are busy all the time.
- There is one PE per candidate window on the line: 512 PEs for a 512-pixel line.
  All SADs of a line are computed at once.
- The reference pixel of each step is broadcast to all PEs on one bus.
- Each PE reads only its own small memory, which holds its own image column(s).

The default configuration is a 512 x 512 image with 8-bit pixels, 512 PEs and windows
from 3 to 25.

## The matching rule

For a reference pixel (UL, VL) and a window size W (odd, h = (W-1)/2), the SAD of the
candidate centred on column c of the same line is

    F_W(c) = sum over i, j in [-h, h] of | L(UL+i, VL+j) - R(c+i, VL+j) |

It is computed for every column c whose window lies wholly inside the image
(h <= c <= IMG_W-1-h). On this SAD curve:

- A **local minimum** is a point that is not larger than its left neighbour and
  smaller than its right neighbour. A flat valley therefore counts once, at its right
  end. The curve's end points only compare with the neighbour they have.
- **Q1** is the smallest local minimum; on a tie, the one furthest left.
- **Q2** is the second smallest local minimum.
- The reliability is **R = F(Q2) - F(Q1)**. With only one local minimum, R is taken as
  infinite.
- If R > R_th, Q1 is the answer (`res_found_o = 1`).
- Otherwise W grows by 2. If W+2 would exceed W_MAX, the pixel has no corresponding
  pixel (`res_found_o = 0`; `res_ur_o` then holds the last Q1).

Pixels outside the image read as 0, in both images.

One consequence of the flat-valley rule: a perfectly uniform area gives one wide,
flat valley, which counts as a single minimum. Such a pixel is therefore reported as
reliably matched, at the right end of the valley. Ambiguity is detected only when
there are separate valleys of similar depth, as with repeating texture.

## How a window is computed: the partial-sum chain

This is the least obvious part of the design.

- PE p owns the candidate columns p*(M/n) .. p*(M/n)+M/n-1, where M = IMG_W and
  n = N_PE. With the defaults, M/n = 1: one column per PE.
- It keeps one partial SAD register ("slot") per owned column. Slot numbers run across
  the whole array: s = p*(M/n) + k.
- The window is scanned column by column: offset i from -h to +h; inside a column,
  row j from -h to +h.
- In each step, the controller broadcasts the reference pixel L(UL+i, VL+j). Every PE
  takes the absolute difference with its own pixel R(s, VL+j) and adds it into slot s.

Slot s always works on candidate column s. That column belongs to the window centred
on c = s - i, so the window a slot serves changes with i. The partial sums must follow
their windows. Between two window columns, one **shift step** moves every slot's value
one position to the right, across PE boundaries. Slot 0 takes zero.

After the last column (i = +h):

- slot s holds the complete SAD of the window centred on column s - h;
- slots s < 2h hold incomplete sums and are ignored;
- windows near the right edge have been shifted out, and they would be incomplete
  anyway.

So each PE only ever reads its own memory module, and the SAD of any window size takes
W*W*(M/n) accumulate steps plus W-1 shift steps and one closing step.

## Blocks

| Module | Role |
|---|---|
| `stereo_processor` | Top level: wires the blocks below; image-memory ports in, results out |
| `control_unit` | Raster order of reference pixels, window-size iteration, step sequencing, both buffer loaders |
| `reference_buffer` | BL: 25 x 25 pixels of the left image around the reference pixel, read one pixel per step |
| `candidate_buffer` | 26 rows x 512 columns of the right image, as N_PE modules (`cand_bank`), one per PE |
| `sad_unit` | N_PE PEs in lock step, with the broadcast bus and the partial-sum chain |
| `pe` | AD circuit, AD register, adder, bypass multiplexer, M/n slot registers, neighbour link |
| `min_value_unit` | Local minima, Q1, Q2, R and the threshold test, as a pipelined comparator tree |
| `stereo_pkg` | Pixel type, step (op) encoding, SAD width function |

The SAD width is 8 + clog2(W_MAX^2) = 18 bits. That holds 625 x 255.

## Buffers and their loading

**Candidate buffer.** It holds W_MAX + 1 = 26 image rows of the right image, used as a
ring (row slot = image row mod 26):

- Matching line VL needs rows VL-12 .. VL+12. The 26th slot receives row VL+13 while
  line VL is being matched.
- So after the first 13 rows, each line costs only one new row of 512 pixels. This is
  5% of the right image on chip.
- Module p holds its M/n columns for all 26 rows. It is connected to PE p only.

**Reference buffer.** It holds 25 columns x 25 rows of the left image, also used as a
ring over columns:

- At the start of a line, all 25 columns are loaded (625 cycles).
- After each pixel, only the one new column on the right is loaded (25 cycles). It
  overwrites the column that left the window.

**Image memories.** They are outside the chip. Each one has a read port: `*_req_o`
with an (x, y) address, and the pixel returned on the next clock edge. The two loaders
in `control_unit` use the two ports independently.

## Timing

Per window size W, with M/n slots per PE:

- issue: W*W*(M/n) accumulate steps, W-1 shift steps, 1 closing step;
- then 1 cycle through the PE and 3 + clog2(M) cycles through the minimum-value unit;
- the decision is taken in the cycle the result arrives.

Per reference pixel, from one result to the next on the same line:

    (W_MAX + 2) + sum over tried W of (W*W*(M/n) + W + 5 + clog2(M)) cycles

With the defaults, a pixel settled with W = 3 takes 27 + 26 = 53 cycles. A pixel that
runs up to W = 25 takes about 3,300 cycles. A line additionally costs about 630 cycles
of reference-buffer preload.

Not overlapped in this design:

- the reference-column load and the SAD computation;
- the minimum-value latency and the next window.

Because of this, a 512 x 512 depth map in which every pixel settles at W = 3 takes
about 14.2 M cycles: 71 ms at 200 MHz.

## Interfaces of `stereo_processor`

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | Clock; asynchronous active-low reset |
| `start_i` | in | Pulse: compute one depth map (IMG_H lines) |
| `r_th_i[17:0]` | in | Reliability threshold R_th, held while busy |
| `busy_o`, `done_o` | out | Busy; one-cycle pulse after the last pixel |
| `lm_req_o`, `lm_x_o`, `lm_y_o`, `lm_data_i` | | Left image memory read port |
| `rm_req_o`, `rm_x_o`, `rm_y_o`, `rm_data_i` | | Right image memory read port |
| `res_valid_o` | out | One pulse per reference pixel, in raster order |
| `res_ul_o`, `res_vl_o` | out | Reference pixel |
| `res_ur_o` | out | Column of the corresponding pixel on line `res_vl_o` |
| `res_w_o` | out | Window size at which the search stopped |
| `res_found_o` | out | 1: reliable match; 0: no corresponding pixel |

There is no back-pressure on the results. Depth (triangulation from UL - UR) is left to
the host.

Parameters: `IMG_W` (= M, candidate windows per line), `IMG_H`, `N_PE` (must divide
`IMG_W`), `W_MIN`, `W_MAX` (odd).

## Where this design departs from, or adds to, its source

The algorithm, the PE structure, the column-to-module allocation, the buffer sizes
(25 x 25 and 26 x 512 bytes) and the one-row-per-line refill come from the published
architecture. The following are this implementation's own readings or choices:

- **Column offset.** The SAD pairs L(UL+i) with R(c+i): windows are compared in the same
  orientation. A mirrored pairing R(c-i) appears in one formula of the source, but it
  contradicts its drawings.
- **Reliability.** R is computed as F(Q2) - F(Q1), a non-negative gap. The flat-valley,
  border and single-minimum rules above are this design's.
- **Step order.** The window is scanned column by column, with one shift step between
  columns. The source's PE drawing shows neighbour links in both directions; only one
  direction is used.
- **Partial sums move between PEs.** The source's text says that intermediate results
  never pass from one PE to another. Its PE and SAD-unit drawings, however, link the
  partial-sum registers of neighbouring PEs. With one image column per PE, a window
  spans several memory modules, so something must move between PEs. This design
  follows the drawings and moves partial sums, so each PE still reads only its own
  module.
- **Minimum-value unit.** All M SADs are sampled in parallel. The unit is built as a
  comparator tree with one register per level; its insides are not given by the source.
- **Image border.** The border handling (zero padding, only whole candidate windows) is
  this design's.
- **Protocols.** The memory interfaces, the result port and the reset are this design's.
- **Throughput.** The source states 60 ms per 512 x 512 depth map at 200 MHz, which is
  about 46 cycles per pixel. This implementation needs at least 53 cycles per pixel,
  because it does not overlap buffer loading and the minimum-value latency with the SAD
  computation (see Timing).
- **Not built.** The external image memories and the host processor are outside the chip.
  `tb/image_memory_model.sv` is a behavioural memory for simulation only. Physical
  aspects (0.5 um CMOS layout, 200 MHz, 5 V) are not represented.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog.

| Testbench | What it checks |
|---|---|
| `tb_pe` | Random accumulate/shift/snap stream against a slot model, every cycle |
| `tb_sad_unit` | Full window schedules (W = 3, 5, 7; 4 PEs x 3 slots) against directly computed SADs; snap timing |
| `tb_min_value_unit` | Random, tied, single- and multi-valley curves against a model of Q1/Q2/R; latency 3 + clog2(M) |
| `tb_candidate_buffer`, `tb_reference_buffer` | Write/read-back, module routing, zero reads, row/column replacement |
| `tb_control_unit` | Every buffer read against the loaded image, op stream and first flags, W*W*(M/n)+W cycles per window, window growth, results; memories and minimum-value unit modelled |
| `tb_stereo_processor` | Whole depth map, 48 x 14 image, 12 PEs x 4 slots, W 3..11 (see below) |
| `tb_stereo_full` | Whole 512 x 512 depth map at the default parameters (see below) |

The two end-to-end tests share `tb/stereo_tb_body.svh`:

- The right image is the left image shifted by 4 pixels.
- The images mix random texture, flat gray with sparse dots (forces window growth) and
  a texture that repeats every W_MAX+1 columns (two equally good matches for every
  window: forces "no corresponding pixel").
- Every pixel (or every 997th, at full size) is compared with a behavioural model of the
  whole algorithm.
- The spacing of results is checked against the cycle formula above.
- The test fails if any of these did not happen at least once: a match at W_MIN, window
  growth, no match, a chain shift, a background row refill, or a read of a row outside
  the image.

The full-size run takes 17.4 M cycles (87 ms at 200 MHz, because of the slow test
patches) and about four minutes in Verilator.

To run one test with Verilator:

    verilator --binary --timing -Irtl -Itb rtl/stereo_pkg.sv tb/tb_stereo_processor.sv \
        --top-module tb_stereo_processor -o sim && ./obj_dir/sim
