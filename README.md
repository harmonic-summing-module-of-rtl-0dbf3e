# Harmonic summing with reordered work groups

This is synthesizable SystemVerilog for the harmonic-summing stage of a pulsar
search pipeline. It is built in the organisation known as MULTIPLEHP-R-(16, 4)
with candidate detection. The design turns the irregular memory reads of
harmonic summing into one sequential stream, so a single FPGA kernel can run at
one work item per clock cycle.

## The problem

A Fourier-domain acceleration search produces a *filter-output plane* (FOP) of
single-precision powers:

- one row per acceleration template: 85 rows, split into two independent halves
  of 42 rows;
- one column per frequency channel: 2^21 columns.

A pulsar with harmonics shows up at column *j*, and also at 2*j*, 3*j* and so
on. Harmonic summing adds those contributions back together. The k-th
*stretch plane* reads the FOP at a shrunk position:

    SP_k(i, j) = FOP(floor(i/k), floor(j/k))
    HP_1 = SP_1,   HP_k = HP_{k-1} + SP_k      k = 2 .. 8

Every point of every harmonic plane HP_k is compared with a threshold that
depends on the plane and on the row. A point above its threshold is a
*candidate*. Each plane keeps its last 200 candidates.

For one half plane that means:

- 8 × 42 × 2^21 ≈ 705 M sums and compares;
- reads scattered over the plane at eight different strides.

Those scattered reads, not the arithmetic, are what limits a direct
implementation.

## The main idea: compute all planes per column block, from a pre-arranged stream

Two things make the reads regular.

1. **All eight planes at once, column block by column block.** Output columns
   are cut into *work groups* of 16 columns. A work group needs only a small,
   fixed set of FOP points:
   - all of its own 16 columns, for k = 1;
   - about 16/k distinct columns for k ≥ 2.

   Those points are copied into on-chip memory once. All 8 sums of every
   point of the group are then formed from there, so no harmonic plane is ever
   written anywhere.
2. **The host reorders the FOP** so that the points one work group needs lie at
   consecutive addresses. This reordered plane is called the RFOP. Loading a
   work group then becomes a burst of 1344 words. The module receives this as
   a plain stream of 8 words per cycle (`s_valid/s_ready/s_data`). The
   reordering itself is host software and is not part of this RTL.

Inside a work group, a *work item* is 4 adjacent output points of one row. One
work item is issued per clock cycle, so a group takes 42 · 16 / 4 = 168
cycles. Loading the next group takes the same 168 cycles. The two overlap
through a double buffer, so the pipeline runs at one work item per cycle.

```
 s_* stream ─► rfop_preloader ─► wg_buffer (2 halves) ─► hp_calc ─► channel_fifo ─► candidate_detector ─► cand_*
 (8 words/cc)    fills a half      bank k per harmonic    4 pts ×      depth 1        threshold_array,
                                                         8 sums/cc                   8 rings of 200
```

## The reordered work-group layout

This part needs the most care. The stream, the buffer, the address generator
and the testbench reference model all depend on it. The layout is defined once,
by constant functions in `rtl/hs_pkg.sv`.

For the work group whose first column is `jb = 16·w`, the words are stored as
*block 1, block 2, …, block 8*, followed by padding. Block k holds the FOP
points that SP_k needs for this group:

| k | rows_k = floor(41/k)+1 | cols_k | block size | offset |
|---|---|---|---|---|
| 1 | 42 | 16 | 672 | 0 |
| 2 | 21 | 8 | 168 | 672 |
| 3 | 14 | 6 | 84 | 840 |
| 4 | 11 | 4 | 44 | 924 |
| 5 | 9 | 4 | 36 | 968 |
| 6 | 7 | 4 | 28 | 1004 |
| 7 | 6 | 4 | 24 | 1032 |
| 8 | 6 | 2 | 12 | 1056 |
| pad | | | 276 | 1068 … 1343 |

How the layout is defined:

- **Rows of block k.** Block k covers FOP rows 0 … floor(41/k).
- **Columns of block k.** Block k starts at FOP column `floor(jb/k)` and covers
  `cols_k` columns.
- **Choice of `cols_k`.** `cols_k` is the largest number of distinct
  `floor(j/k)` values that 16 consecutive columns can hit, taken over every
  possible `jb mod k`. For k = 3, for example, a group starting at
  `jb ≡ 2 (mod 3)` touches 6 stretched columns.
- **Constant group size.** Using the maximum makes every group exactly the same
  size. A group that needs fewer columns simply carries a few unused points.
- **Order within a block.** Row-major.

A group needs 1068 words. They are sent as 168 beats of 8 words (1344 words),
which explains the two constants:

- **8 words per cycle.** The stream must deliver a group in the 168 cycles it
  takes to compute one, so it needs at least ceil(1068/168) = 7 words per
  cycle. The power of two, 8, keeps the address arithmetic cheap.
- **Padding.** The 276 padding words are dropped on write.

Columns past the end of the plane can occur in the last group for large k.
They are never read, and the test stream fills them with a dummy value.

## Double buffering and hand-over (`rfop_preloader`, `wg_buffer`)

`wg_buffer` holds two halves, each with room for one work group. Each half is
split into 8 banks, bank k holding block k, and each bank has four read ports,
one per point of a work item. The read data is registered.

Within a bank, words are spread over 8 lane memories: word *w* sits in lane
`w mod 8`. The 8 words of a beat therefore go to 8 different memories, each
with a single write port. A read fetches the addressed row from every lane
memory, and a registered lane number selects the word.

The hand-over between the two sides uses one flag per half:

- **Preloader.** `rfop_preloader` writes beats into the half it is filling.
  After beat 167 it sets `full[half]` and moves to the other half. It holds the
  stream (`s_ready` low) while that half is still full.
- **Compute.** `hp_calc` starts a group only when `full` of the half it reads
  is set. It pulses `rel` with the last work item of the group, which clears
  the flag.
- **Starving.** While compute waits for data it raises `starve`. With a stream
  that keeps up this never happens after the first group.

## Address generation (`stretch_index`)

For output point (row i, column jb + c) with c = 0 … 15, the address of
SP_k inside block k is

    addr_k = floor(i/k) · cols_k + floor((jb mod k + c) / k)

This works because `floor((jb + c)/k) − floor(jb/k) = floor((jb mod k + c)/k)`.

Only small divisions appear:

- a 6-bit row divided by a constant;
- a 4-bit value divided by a constant.

`jb mod k` is not computed by division. `hp_calc` keeps one residue per k and
advances it by `16 mod k` at each new work group. A work item instantiates
`stretch_index` four times, once per point, and each instance gives 8 addresses.

## Summation (`hp_sum_pipe`, `fp32_add`)

The 8 stretch values of a point pass through a chain of 7 single-precision
adders, one register stage per adder. After the chain the vector holds
HP_1 … HP_8, and the latency is 7 cycles. A common enable stalls every stage at
once. `hp_calc` uses four chains, one per point of the work item. A side-band
tag carries the row, the first column and the last-beat flag alongside the
data.

The adder (`fp32_add`) is combinational IEEE-754 single precision:

- rounding: round to nearest, ties to even;
- subnormal inputs and results: flushed to zero;
- overflow: gives infinity;
- NaN: produces the quiet NaN 0x7FC00000.

For the finite, positive powers of a FOP this equals IEEE addition. The
testbench reference checks that, using double precision and explicit rounding.

## Pipeline of `hp_calc`

| Stage | What happens |
|---|---|
| issue | address generation |
| read | registered local-memory read |
| 7 adder stages | summation |
| output | beat to the channel |

From issue to `out_valid` takes 8 cycles. Each beat carries 4 points × 8 sums
plus the tag. If the channel refuses a beat (`out_valid && !out_ready`), the
whole pipeline holds, issue included. Pipeline fill is the only bubble, so the
last beat of a pass leaves about `(N_WG + 1)·168 + 8` cycles after `start`.

## Channel and candidate detection (`channel_fifo`, `threshold_array`, `candidate_detector`)

**Channel.** Calculation and detection are joined by a FIFO of depth 1. It
accepts a new beat in the same cycle its head leaves, so depth 1 still carries
one beat per cycle.

**Detection.**

- The detector looks up the 8 thresholds of the beat's row in
  `threshold_array`. The array holds 8 planes × 42 rows and is loaded through
  `ta_*` before a pass.
- It tests all 32 sums in parallel. A hit is a strict greater-than comparison
  of IEEE values: NaN never hits, and +0 equals −0.

**Candidate rings.**

- Every plane has a ring of 200 records of the form
  `{plane, row, column, value}`.
- Hits are written in arrival order: beat order first, then column order within
  a beat. After 200 candidates the oldest are overwritten.
- Up to four candidates of one plane can arrive in a cycle. For that reason each
  ring is stored as 4 interleaved memories (slot mod 4), and consecutive slots
  always land in different memories.
- `total[k-1]` counts all hits of HP_k, saturating at 2^32−1.

**Read-out.** After the beat flagged last, the rings are sent on
`cand_valid/cand_ready/cand`, plane 1 first, oldest entry first. Then `done`
rises.

## Using the top (`hs_multiplehp_r`)

Parameters:

| Parameter | Default | Meaning |
|---|---|---|
| `N_CHAN` | 2^21 | columns of the half plane, a multiple of 16 |
| `N_CAND` | 200 | candidates kept per plane |
| `CH_DEPTH` | 1 | channel depth |

Rows (42), planes (8), work-group width (16), points per work item (4) and
words per cycle (8) are constants in `hs_pkg`.

One pass works like this:

1. Load the 336 thresholds: `ta_we`, `ta_hp` = k−1, `ta_row`, `ta_data`.
2. Pulse `start` while `busy` is low.
3. Stream the RFOP of the half plane: N_CHAN/16 groups of 168 beats, each beat
   8 words in layout order. A beat moves when `s_valid && s_ready`.
4. Take the candidate lists from `cand_*`. `total` gives the counts. `done`
   goes high when the lists are out, and `busy` then falls.

Each pass starts with cleared rings and totals.

The full-size simulation takes 22,020,271 cycles from `start` to the last
beat, which is 131072 groups × 168 cycles plus pipeline fill. At 263 MHz, the
clock the original design reached for this configuration on an Arria 10, that
is 83.7 ms per half plane.

## Simulation

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs. Build one with plain Verilator, for example:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/hs_pkg.sv tb/tb_fp_pkg.sv tb/tb_hs_ref_pkg.sv \
        tb/tb_hs_multiplehp_r.sv --top-module tb_hs_multiplehp_r
    ./obj_dir/Vtb_hs_multiplehp_r

| Testbench | What it checks |
|---|---|
| `tb_fp32_add` | Directed special cases, and 30 000 random sums against a double-precision reference rounded to single. |
| `tb_hp_sum_pipe` | HP_1..8 against the reference, the 7-cycle latency, and random stalls. |
| `tb_stretch_index` | Every row and column offset of 60 work groups, including groups near column 2^21. The addressed word of the layout must be exactly FOP(floor(i/k), floor(j/k)). |
| `tb_wg_buffer` | Random writes and reads, both halves, reads during writes, and hold. |
| `tb_rfop_preloader` | Each write, the full flags, stream hold-off, and full rate. |
| `tb_hp_calc` | `hp_calc` with the buffer: every beat against reference sums, release of halves, 168 cycles per group, starving, and backpressure. |
| `tb_channel_fifo` | Order and rate at depths 1 and 4. |
| `tb_threshold_array` | Load and read. |
| `tb_candidate_detector` | Totals and the exact last-N lists, with overwrite, several hits per beat, values equal to the threshold, and read-out backpressure. |
| `tb_hs_multiplehp_r` | End to end at 160 columns and 24 candidates, over three passes. See below. |
| `tb_hs_full` | The top at its default parameters, a whole half plane. See below. |

**`tb_hs_multiplehp_r`** compares the lists and totals with a software model
and checks the cycle count. It also counts how often each mechanism occurs:

- load/compute overlap;
- starving;
- padding;
- ring overwrite;
- read-out backpressure;
- channel pass-through;
- restart.

A mechanism that never happens counts as a failure.

**`tb_hs_full`** runs the top at its default parameters over a whole half plane
of 42 × 2^21. It checks:

- all 22 M beats against the reference sums;
- all 8 lists of 200 and the totals (about 2 M candidates per plane);
- the cycle count.

It takes about 2–3 minutes.

The synthetic FOP is a hash of (row, column) mapped to [1, 2). The test
thresholds sit near the mean of HP_k on every third row and well above it
elsewhere.

## Departures and choices to be aware of

These follow the original design:

- the MULTIPLEHP-R organisation;
- 16 columns per work group, 4 points per work item, 8 loaded words per cycle;
- overlapped loading through a reordered, streamed plane;
- a channel of depth 1 between calculation and detection;
- keeping the last 200 candidates of each plane;
- the sizes 42 × 2^21, 8 planes, 200 candidates.

These are this implementation's own choices:

- **Layout.** The exact RFOP layout: block order, row-major blocks, maximum
  column count per block, and padding at the end. The original only requires
  each group's points to be consecutive and of constant size.
- **Row indexing.** Rows are indexed 0 … 41 within the half plane, and the
  stretch rule is applied to these local indices. How the centre row is shared
  between the two halves is left to whoever builds the stream.
- **Kernel shape.** The OpenCL kernel pair, an NDRange calculation kernel and a
  single-work-item detection kernel, becomes two hardware stages joined by a
  FIFO. The global-memory loads become a ready/valid stream. Local memory
  becomes the banked, double-buffered `wg_buffer`.
- **Work items.** A work item is 4 adjacent columns of one row. The original
  fixes only the sizes.
- **Candidate handling.** Strict greater-than against the threshold; the
  candidate record format; read-out order.
- **Adder details.** Flush-to-zero and NaN handling in the adder.
- **Configuration.** The configuration is fixed by package constants. Other
  work-group widths (64), points per work item (1, 2, 8) and load widths
  (7, 13, 16) that the original explored are not simulated.

Not part of this RTL:

- the reordering of the FOP (host software);
- the DDR memory and its controller;
- the PCIe link and the host program;
- the alternative organisations the original only compares against: one plane
  at a time (SINGLEHP), and the naïve, H and N variants of MULTIPLEHP.

The cycle figures above assume a stream that delivers a beat every cycle. A
real memory system with lower throughput shows up as `starve` cycles.

## Throughput against the time budget

A whole FOP is two half planes, 44.0 M cycles. A search step has a budget of
88 ms. One module would need about 500 MHz to meet it; two modules, one per
half, would need about 250 MHz. The original design met the budget by spreading
the work over three FPGA cards.
