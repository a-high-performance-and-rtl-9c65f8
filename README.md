# Multi-standard motion compensation with a 2-D reference cache

This is the motion-compensation (MC) datapath of an HD video decoder. It
serves H.264/AVC, AVS and MPEG-1/2 from one pipeline. The decoder hands it
one basic block at a time: a 4x4 or 4x8 block of the luma plane or of one
4:2:0 chroma plane (Cb or Cr) with a motion vector (MV),
a reference-picture slot and a weight-table index. The datapath returns the
predicted pixels, one 4-pixel row per clock. Two things make it fast and
cheap:

* **A small direct-mapped 2-D cache.** Reference pixels are kept in 8x1-pixel
  units called AUs. Most neighbouring blocks reuse the same reference area,
  so most of it comes from the cache. In the end-to-end test, external
  traffic is 63 % lower than fetching every 4x4 block's window directly.
* **A block-level pipeline that hides memory latency.** A block whose data
  is still on its way from DRAM waits in a queue. Later blocks are already
  being looked up and requested behind it.

Luma and chroma are both built. Luma of H.264 and AVS goes through the
6-tap/4-tap luma interpolator; MPEG-1/2 luma and the chroma of all three
standards go through the bilinear interpolator.

```
 requests ─► cache_2d ───────────────────────────────────────────► pel_shifter ─► luma_interpolator ──┐
            (task_generator → judge_unit → access_queue → output_unit)  (9 bytes/row)  bilinear (MPEG, chroma) ┴► weighted_predictor ─► pred
                          │            ▲                      ▲
                     tag RAMs x2   external memory        data RAMs x2
```

## 1. Cache organisation

| item | value |
|---|---|
| AU (access unit) | 8 horizontally adjacent pixels of one row of one plane, 64 bits |
| cache size | per prediction direction: a luma part of 32x32 pixels (4 AUs x 32 rows) and a chroma part of the same size shared by Cb and Cr (16x32 pixels each); 4 KB of data in total |
| mapping | direct, in two dimensions: line = {luma/chroma, direction, y[4:0], ci}, ci = AU column[1:0] for luma and {Cb/Cr, AU column[0]} for chroma |
| tag | {valid, picture slot (4 b), AU column[7:1], y[10:5], last user task (5 b)}, 23 bits |
| tag RAMs | two, by row parity (even y / odd y), 256 x 23, combinational read, cleared at reset |
| data RAMs | two, by AU-column parity (even / odd column), 256 x 64, one-cycle read |

Splitting the tag RAMs by row lets two vertically adjacent AUs be judged in
one cycle. Splitting the data RAMs by column lets two horizontally adjacent
AUs be read in one cycle. Any reference row a 4-wide block needs is at most
9 pixels wide, and so it always lies in two neighbouring AUs.

`IDX_X` and `IDX_Y` (on `mc_top`, `cache_2d`, `judge_unit`, `access_queue`
and `output_unit`) set the number of index bits in x and y. Every RAM and tag
width follows from them.

## 2. The block pipeline inside `cache_2d`

A *task* is one basic block in one direction. Tasks go through six stages:
CALC, JUDGE, REQUEST, NOPs (waiting for DRAM), RECEIVE and OUT. Several
tasks are in flight at once.

### CALC: `task_generator`

From the block position, the MV (quarter pel) and the standard, this stage
computes:

* the first delivered row `ys`;
* the number of delivered rows `nrows`;
* the x of the first byte of every delivered row, `xs = X-2`;
* the clamped window of AU columns `cf0..cf1` and rows `rlo..rhi` to fetch.

The fetch windows are:

| standard | horizontal window | vertical window | rows delivered |
|---|---|---|---|
| H.264, fraction ≠ 0 | X-2 .. X+6 | Y-2 .. Y+h+2 | h+5 |
| AVS, odd fraction | X-2 .. X+6 | Y-2 .. Y+h+2 | h+5 |
| AVS, half (2) | X-1 .. X+5 | Y-1 .. Y+h+1 | h+5 (outer rows not fetched) |
| MPEG-1/2 luma (half) and chroma (any fraction ≠ 0) | X .. X+4 | Y .. Y+h | h+1 |
| integer | X .. X+3 | Y .. Y+h-1 | h |

For chroma, X and Y are in chroma-plane pixels (block position plus the MV
divided by 8), the plane is half the luma size in each direction, and the
fraction for the bilinear filter is the MV's low 3 bits. MPEG-1/2 luma uses
the half-pel bit only (dx, dy ∈ {0, 4}).

Every row is delivered starting at pixel X-2, whatever the standard. The
interpolator therefore always finds integer pixel 0 at byte 2. The window
decides only which AUs are fetched and checked.

Row numbers outside the picture are clamped when the rows are read, which
repeats the top or bottom edge row. The pel shifter pads the left and right
edges.

### JUDGE: `judge_unit`

The judge walks the window one AU column at a time, two rows per cycle. It
reads both tag RAMs, compares the tags and writes the new tag back at once,
including its own task number as the "last user". Each pair result goes to
the access queue as a hit/miss flag for the top AU and for the bottom AU. A
new task is accepted in the cycle the previous one ends, so there are no
bubbles. A 4x8 H.264 block with a fractional MV takes 2 columns x 7 pairs =
14 cycles.

**Conflicts.** Replacing a line flushes an AU. If a task still waiting in
the pipeline needs that AU, the data would be lost. A miss on a valid line
therefore stalls the judge while the line's last user has not left OUT.
"Has not left" means

    (last - done) mod 32  <  (current - done) mod 32

where `done` is the output unit's count of finished tasks. Tasks are
numbered modulo 32, and at most about 17 are ever in flight (8 in the task
queue plus those being output). A number older than 32 tasks can alias. That
can only produce an unnecessary stall, which clears as `done` advances; it
can never let a needed line go.

The judge also stalls in two other cases:

* the access queue has fewer than two free entries;
* the task queue is full.

### REQUEST / RECEIVE: `access_queue`

Missed AUs that are vertically next to each other in one column of one task
are merged into an **AU-Block**: column, first row and length. A hit or the
end of the column closes the block. Two blocks can close in one cycle.

Blocks enter an 8-entry circular queue that has three pointers:

* *free*: where the next closed block is written;
* *request*: the next block to send to the memory controller (valid/ready);
* *receive*: the block whose data is arriving.

Data come back in request order, one AU per beat. Each AU is written
straight into the data RAM for its column parity. An entry stays in the queue
until its last AU has arrived. Every entry carries the task ID {task number,
luma/chroma, direction} and is shown to the output unit.

### NOPs / OUT: `output_unit`

Judged tasks wait in an 8-entry task queue. The head task starts only when
no queued AU-Block carries its ID, which means all of its data is in the data
RAMs. It then reads one row per cycle: AU `a0 = clamp(xs>>3)` and
`a1 = min(a0+1, last column)`, one from each data RAM. One cycle later it
sends the 16 bytes on, with the shift control:

* `off = xs - 8*a0`;
* `lim` = the last byte inside the picture.

When the last row has been read, `done` counts up and the next ready task
starts in the following cycle.

## 3. Pel shifter

`pel_shifter` turns the 16 input bytes into the 9 bytes starting at pixel
X-2. It works in three steps:

1. Bytes beyond `lim` are overwritten with byte `lim`, which pads the right
   edge.
2. For `off ≥ 0`, a logarithmic byte right shifter (stages of 8/4/2/1 bytes)
   shifts by `off` and fills with the top byte.
3. For `off < 0` (the row starts left of the picture), the same right shifter
   is used between two byte-order reversals. That makes it a left shift that
   fills with byte 0, which pads the left edge.

It has one register stage.

## 4. Luma interpolator (H.264 and AVS)

`luma_interpolator` takes one 9-pixel row per cycle and produces one 4-pixel
row of the fractional position (fx, fy).

* **CRB** (`crb`), a 6x9 register bank with rows A (oldest) to F (newest).
  In H.264 mode rows shift F→E→D→C→B→A. In AVS mode, E moves straight to B
  and rows C and D hold zero. That way the same six-row taps implement the
  4-tap AVS filter.
* **Half-pel filters**:
  * `cfir` ×6, horizontal: H.264 (1,-5,20,20,-5,1) or AVS (-1,5,5,-1) from one
    adder tree.
  * `fir6` ×9, vertical, one per CRB column: H.264 6-tap; in AVS, rows C/D are
    zero and the sum is negated.
  * Centre sample `j`: `cfir` in H.264 mode, or `fir4` (-1,5,5,-1) in AVS mode,
    applied to the unrounded vertical sums.
* **Sync/select.** Registers keep the half samples of the previous one or two
  rows, so that every quarter position finds its neighbours in one cycle.
* **Quarter-pel filters**:
  * `fir2` ((a+b+1)>>1) for H.264.
  * `qfir` (1,7,7,1), (+8)>>4, for AVS. It is applied to the four nearest
    samples at half-pel spacing along the line of the quarter position. The
    AVS diagonal positions average `j` with the nearest integer pixel.
* **Output mux** by (fx, fy).

Which CRB row the horizontal filters read depends on the mode: row D for
H.264, row B for AVS, and row F when fy = 0. With these choices, output row y
leaves when input row y+3 is in F.

**Timing.** With fy ≠ 0 a task needs h+5 input rows; with fy = 0 it needs h.
A 4x8 H.264 block therefore costs 13 cycles at worst and 8 at best, one row
per cycle back to back. The latency is two register stages.

`bilinear_interpolator` covers MPEG-1/2 luma and the chroma of all three
standards. It implements

    S = ((8-dx)(8-dy)A + dx(8-dy)B + (8-dx)dy C + dx dy D + 32) >> 6

with 3-bit dx and dy. For chroma, dx and dy are the 1/8-pel MV fractions. MPEG half pel is dx, dy ∈ {0, 4}, which gives
(a+b+1)>>1 and (a+b+c+d+2)>>2. Its latency is also two stages, so in
`mc_top` the two interpolator outputs are simply merged.

## 5. Weighted predictor

`weighted_predictor` evaluates, for all three standards,

    P = Clip1(((AS(P0·w0) + AS(P1·w1) + 2^(n-1)) >> n) + o)
    AS(X) = Clip1(((X + 16) >> 5) + Ao)   (AVS)     AS(X) = X   (H.264, MPEG)

The **Weight Table** has 32 entries of {w0, w1, o, n, Ao}, each signed 9-bit
except n (4 bits). An entry is selected by the request's `wt_idx` and written
through the `wt_*` port. MPEG-1/2 uses w0 = w1 = 1, with n = 0 for a single
direction and n = 1 for bi-prediction.

The datapath has two stages:

1. Multiply, then AS.
2. For the forward rows of a bi-predicted block, store the four products in
   the **BDPB** (8 rows x 4 x 18 bits) and output nothing. Otherwise add the
   stored row, round, shift, add the offset and clip.

A bi-predicted block must therefore be sent as its forward task immediately
followed by its backward task. The output rows of a bi block appear with the
backward task.

## 6. Interfaces of `mc_top`

| port | dir | meaning |
|---|---|---|
| `pic_w_au`, `pic_h` | in | picture width in AUs (≤ 256) and height in rows (≤ 2048) |
| `wt_we`, `wt_waddr`, `wt_wdata` | in | weight-table write (`wt_entry_t`) |
| `req_valid`, `req_ready`, `req` | in/out/in | one basic block (`mc_req_t`: standard, luma/chroma, Cb/Cr, 4x4/4x8, direction, bi flag, picture slot, weight index, block x/y in pixels of its plane, MV x/y in quarter luma pel or 1/8 chroma pel) |
| `mreq_valid`, `mreq_ready`, `mreq` | out/in/out | AU-Block read request (`au_block_t`: picture slot, AU column, first row, length in AUs) |
| `mresp_valid`, `mresp_data` | in | read data, one AU (8 pixels, leftmost in the low byte) per beat, in request order |
| `pred_valid`, `pred_pix[4]`, `pred_info`, `pred_ridx` | out | one predicted row of 4 pixels, with the block's side info and row number |
| `stat_*` | out | per-cycle conflict stall, AU hit, AU miss, OUT waiting for memory |

Types and widths are defined in `mc_pkg`. Requests use valid/ready. There is
no back-pressure on `pred_*`: the consumer must take one row per cycle. The
external memory controller, with its DRAM scheduling, is outside this
design. `tb/ext_mem_model.sv` is a behavioural stand-in for it: in-order, a
latency of 12–16 cycles, and random refusals of requests.

## 7. Where this RTL departs from the original architecture description

* **Chroma cache layout.** The original sizes the cache for luma and chroma
  together (4 KB). How the chroma lines are placed is this design's own
  choice: each direction has a chroma part
  as large as the luma part. Cb and Cr share it: the plane selects the upper
  AU-column index bit, so the tag keeps one more AU-column bit than for luma.
* **AVS fetch window.** At AVS quarter positions this design fetches a 9x13
  window for a 4x8 block, one column and one row more than the 8x12 the
  original states. This supplies the half samples either side of a quarter
  sample to the (1,7,7,1) filter.
* **Horizontal filter row.** The original description feeds the horizontal
  filters from CRB row B. Here H.264 uses row D and fy = 0 uses row F, so
  that a row's horizontal and vertical half samples are ready in the same
  cycle. AVS uses row B.
* **Conflict detection.** The original states only the rule: stall until the
  tasks involved have finished OUT. Storing the last user's task number in
  each tag is this design's own way of detecting it.
* **Pipeline depth.** The interpolators and the weighted predictor have two
  register stages each, not one.
* **Queue depths and memory interface.** The 8-entry AU-Block queue, the
  8-entry task queue and the in-order, one-AU-per-beat memory interface are
  this design's choices.
* **Judge rate.** The judge needs 14 cycles for a fractional H.264 4x8 block,
  while the interpolator needs 13. When the cache hits, the judge is the
  slowest stage by one cycle per such block.

## 8. Verification

Every module has a self-checking testbench in `tb/`. Each compares against
a model written independently in the testbench. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/mc_ref_pkg.sv` holds
the reference models:

* a synthetic reference picture with edge clamping;
* H.264 and AVS luma interpolation at all 16 positions;
* the bilinear formula of section 4;
* the weighted-prediction formula of section 5.

`tb_mc_top` runs the whole design at its default parameters on a 1920x1088
picture with 120 macroblocks, each with its two 8x8 chroma blocks (sent as
4x8 chroma tasks, MVs in 1/8 chroma pel). These mix H.264, AVS and MPEG-1/2, random MVs
around ±6 pixels plus far and edge-crossing MVs, bi-prediction and a forced
conflict. It checks every predicted pixel, and fails if any of these never
happened: hits, misses, conflict stalls, waiting for memory, edge padding,
bi-prediction, chroma, or any of the three standards. A typical run:

```
AUs fetched 11604 in 2467 requests; no-cache 4x4 baseline 31389 AUs; Rc = 63%
output rows 11616 in 24832 cycles
hits 8988 misses 7067 conflict-stall cycles 7955 wait cycles 5181 bi 288 padded 344 H264 588 AVS 576 MPEG 576
chroma blocks 864
TB_RESULT checks=58124 failures=0
```

That is about 207 cycles per macroblock (luma and chroma), against a budget of 327 cycles per
macroblock for 1920x1088 at 30 frames/s and 80 MHz (the same budget as 60
frames/s at 160 MHz; no timing analysis is part of this RTL). The high
conflict-stall count comes from the random picture slot chosen for each
macroblock in this test. Real streams reuse the same reference picture much
more.

The unit testbenches also check timing:

* `tb_luma_interpolator`: the 13/8-cycle cost and the latency.
* `tb_judge_unit`: one pair per cycle with no bubble between tasks.
* `tb_output_unit`: rows of consecutive tasks leave back to back.
* `tb_weighted_predictor`, `tb_bilinear_interpolator`, `tb_pel_shifter`:
  their latency.

### Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/mc_pkg.sv tb/mc_ref_pkg.sv tb/tb_mc_top.sv --top-module tb_mc_top -Mdir obj
./obj/Vtb_mc_top
```

Replace `tb_mc_top` with any other `tb_*` to run a unit test. The testbenches
use `$urandom`, so `+verilator+seed+N` changes the stimulus.

## 9. Files

| file | content |
|---|---|
| `rtl/mc_pkg.sv` | shared types (request, task, AU-Block, weight entry), constants, `clip1` |
| `rtl/mc_top.sv` | top: cache, pel shifter, interpolators, weighted predictor |
| `rtl/cache_2d.sv` | 2-D cache: the four pipeline units and the four RAMs |
| `rtl/task_generator.sv`, `judge_unit.sv`, `access_queue.sv`, `output_unit.sv` | CALC, JUDGE, REQUEST/RECEIVE, OUT |
| `rtl/tag_ram.sv`, `data_ram.sv` | cache memories |
| `rtl/pel_shifter.sv` | row alignment and edge padding |
| `rtl/luma_interpolator.sv`, `crb.sv`, `cfir.sv`, `fir6.sv`, `fir4.sv`, `qfir.sv`, `fir2.sv` | H.264/AVS interpolator and its filters |
| `rtl/bilinear_interpolator.sv` | bilinear filter: MPEG-1/2 luma and all chroma |
| `rtl/weighted_predictor.sv` | weighted prediction with weight table and BDPB |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/mc_ref_pkg.sv`, `tb/ext_mem_model.sv` | reference models and external-memory model |
