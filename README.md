# Dual-standard motion compensation with a scheduled SDRAM frame memory

Motion compensation dominates the run time of an H.264 or MPEG-2 decoder. This is
not because of the filter arithmetic. It is because every predicted block has to
read a window of reference pixels from external SDRAM. An H.264 4x4 luma block
with a fractional vector needs a 9x9 window: 81 pixels for 16 outputs. This RTL
implements a motion compensation engine that attacks the problem in three places:

1. **Fewer pixels fetched.** An *extended 2x2 raster scan* reuses interpolation
   columns between neighbouring blocks. It keeps the decoding order of the
   residual decoder, so no reordering buffer is needed.
2. **One interpolator for both standards.** The H.264 luma 6-tap filter, the
   H.264 chroma 1/8-sample filter and the MPEG-2 half-sample filter share one
   4-pixel-parallel datapath with a single 6x9 register array.
3. **A fuller SDRAM bus.** A row-major data arrangement spreads a window over
   the four banks. An in-order scheduler then hides PRECHARGE/ACTIVE of later
   accesses behind the data transfers of earlier ones.

Two SDRAM chips form a ping-pong frame memory. One holds the reference frame
and is read. The other receives the frame being reconstructed. They swap roles
at every frame boundary.

The design follows the architecture of the thesis *A Flexible Motion
Compensation Memory Organization for Dual-standard Video Decoder* (H.264
Baseline and MPEG-2 Simple Profile). The section "Where this RTL departs from
the thesis" lists what was chosen here where the thesis is silent.

## Block overview

```
          MVDs / mb_type                 motion_code, f_code
               |                                |
          mv_gen_h264                     mv_gen_mpeg2
   (line MV store, neighbour LUT,        (PMV update, range
    median / directional MVP)              folding, chroma MV)
               \______ 16 vectors or 1 vector ___/
                               |
                            mc_ctrl ---- frame_addr_map
          request FSM -> addr queue ->  sdram_access_ctrl (read)  --\
          receive FSM <- read buffer <-      4 x sdram_bank_ctrl     |
               |                                                     frame_mem_arbiter -- chip 0
          interpolator (6x9 shift array + 6x9 content buffer)        (ping-pong)        -- chip 1
               |                                                     |
          pred_* --> residual_adder --> recon_*                      |
          wr_* (reconstructed / deblocked words) -> frame_addr_map -> sdram_access_ctrl (write)
```

| file | role |
|---|---|
| `rtl/mc_pkg.sv` | types and constants: 10-bit MV components, SDRAM geometry (4 banks x 2048 rows x 256 columns x 32 bits), command codes, timing in cycles |
| `rtl/mv_gen_h264.sv` | H.264 motion vector prediction and reconstruction for all P partitions |
| `rtl/mv_gen_mpeg2.sv` | MPEG-2 frame motion vector decoding |
| `rtl/mc_ctrl.sv` | block sequencing, extended 2x2 raster scan, content-swap decision, read requests, column assembly |
| `rtl/interpolator.sv` | reconfigurable separable interpolator (4 pixels per cycle) |
| `rtl/frame_addr_map.sv` | pixel coordinates to bank/row/column |
| `rtl/sdram_access_ctrl.sv` | one SDRAM channel: init, address queue, scheduler, read data buffer |
| `rtl/sdram_bank_ctrl.sv` | open row and timing counters of one bank |
| `rtl/frame_mem_arbiter.sv` | ping-pong routing of the two channels onto the two chips, frame swap |
| `rtl/residual_adder.sv` | prediction + residual with clipping, 4 pixels per cycle |
| `rtl/sync_fifo.sv` | show-ahead FIFO used for queues and buffers |
| `rtl/mc_top.sv` | the engine: MV generators, controller, adder, two channels, arbiter |

## Storage format: one SDRAM word = one column of four pixels

A 32-bit SDRAM word holds four *vertically* adjacent pixels of one column. The
top pixel is in bits 7:0. A picture component is therefore a sequence of
4-row strips. `frame_addr_map` places them row-major:

* Luma strip `wy` goes to bank `wy mod 4`. Its words occupy the linear address
  `(wy div 4) * pic_w + x` inside that bank.
* Chroma uses banks 0/1 for Cb and 2/3 for Cr, again alternating by strip. It
  is placed after the luma area of the bank, at
  `pic_h_mb * pic_w + (wy div 2) * pic_w/2 + x`.
* Row = linear address bits 18:8, column = bits 7:0.

With this layout, any 9-row window column (three words) touches three
different banks. A window row moving to the right stays in the same SDRAM row
for many words. Row changes happen only at strip-group boundaries, and the
scheduler can hide them because the next access usually targets another bank.
Vertical word packing also suits the interpolator, which consumes one window
column per cycle.

## The extended 2x2 raster scan (the hard part)

H.264 decodes the sixteen 4x4 luma blocks of a macroblock in z-order:

```
 0  1  4  5
 2  3  6  7
 8  9 12 13
10 11 14 15
```

The 9x9 windows of horizontally adjacent blocks overlap in 5 columns. Suppose
block *n+1* lies directly to the right of block *n* with the same vector. Its
window starts exactly 4 columns further right, so the last 5 columns already in
the interpolator's shift array are its first 5 columns. It only needs to fetch
the remaining 4.

In plain z-order this happens only inside each 2x2 group (0→1, 2→3, …). The
right neighbour of block 1 is block 4, which is decoded after blocks 2 and 3.
The **content buffer** solves this. It is a second 6x9 register array that can
be exchanged with the shift array in a single cycle (a *content-swap*).
`mc_ctrl` performs a swap after blocks 1, 3, 5, 9, 11 and 13 when the vector
test holds:

| after block | swap when |
|---|---|
| 1 | MV1 = MV4 |
| 3 | MV1 = MV4 or MV3 = MV6 |
| 5 | MV3 = MV6 |
| 9, 11, 13 | the same pattern one 8-row half lower (9/12, 11/14) |

Example with one vector for the whole macroblock:

* After block 1 the columns of block 1 are parked in the content buffer.
* Blocks 2 and 3 run in the shift array.
* After block 3 the swap brings block 1's columns back for block 4, and parks
  block 3's columns for block 6.
* The whole macroblock then needs 4 full windows and 12 reused ones:
  `4 x 81 + 12 x 36 = 756` luma pixels instead of `16 x 81 = 1296` without
  reuse, or `936` with plain 2x2 reuse.

The request side of `mc_ctrl` decides reuse by itself. It keeps a copy of the
*tags* (window origin x, y) of what the shift array and the content buffer
hold, and updates them exactly as the receive side will. A block's descriptor
(mode, fractions, reuse, swap, row offset, number of columns) then travels
through a small FIFO to the receive side, so requests can run ahead of the
interpolator. Reuse is only ever applied to H.264 luma blocks with a
fractional vector. Copy blocks (integer vector), chroma and MPEG-2 always
fetch their full window.

## Reconfigurable interpolator

The interpolator takes one 9-pixel window column per cycle into a 6-column
shift array. From the last six columns it computes in parallel:

* horizontal 6-tap half samples for the 9 rows;
* vertical 6-tap results for the 4 output rows (integer column, half column,
  and the centre "j" sample from the unrounded horizontal results);
* the quarter-sample averages selected by the fractions.

A 4x4 luma block therefore produces one output column per cycle after the
6th input column. That is 9 columns in and about 10 cycles per block, matching
the "(6+3) cycles" of the 4-parallel separable organisation.

The same registers serve the other modes:

* **H.264 chroma:** a 3x3 window column gives a 2x2 block with the 1/8-sample
  bilinear formula `((8-x)(8-y)A + x(8-y)B + (8-x)yC + xyD + 32) >> 6`.
* **MPEG-2:** an 8x8 block uses the same 9x9 window. Only four bilinear units
  exist, so each 8-pixel column leaves in two beats (upper and lower half,
  `out_half`).
* **Integer vectors:** the block is copied from 4 columns without filtering.

The content buffer, the swap and the reuse start (entering a block with 5
valid columns) are all inside the interpolator.

## SDRAM channel and scheduler

Each channel (`sdram_access_ctrl`) works as follows:

1. After reset it runs the power-up sequence: precharge all, wait tRP, load
   the mode register with CAS latency 2 and burst length 1.
2. It then accepts one word address per cycle into a 4-entry in-order queue.
3. Four `sdram_bank_ctrl` instances track the open row and the tRCD, tRP,
   tRAS and tWR counters of each bank.

Each cycle the scheduler issues at most one command, by priority:

1. READ/WRITE of the queue head, if its bank has the right row open and tRCD
   has passed.
2. PRECHARGE or ACTIVE for the oldest queued entry that needs one, provided no
   older queued entry still uses that bank. This is what lets row misses of
   later accesses overlap with the data of earlier ones.
3. Precharge-all when a frame swap has asked the channel to close.

Column accesses never leave queue order, so the read data needs no
reordering. A READ is issued only while the read data buffer has room for all
data in flight. There is therefore no overflow and no need to stall the SDRAM.

Setting `SCHED=0` gives the unscheduled reference controller: only the head is
prepared, and each READ waits until the previous data has arrived.

With random addresses in four banks, the channel's testbench measures:

* 200 reads take 414 cycles scheduled and 883 unscheduled;
* two reads that both miss their rows in different banks complete in 13
  cycles.

## Frame swap

`swap_req` (between frames, no macroblock in flight) starts the swap:

1. The arbiter raises `close_all`.
2. Both channels drain their queues and precharge all banks, then report
   `closed`.
3. The arbiter waits tRP and exchanges the chips. `ref_sel` flips and
   `swap_ack` pulses.

The frame just written becomes the reference.

## Motion vector generators

**H.264** (`mv_gen_h264`) has the following storage:

* a line store holding the bottom four vectors of every macroblock of the row
  above (`MAX_MB_W = 120` entries, enough for 1920 pixels);
* left, up, up-left and up-right neighbour registers;
* a 16-entry vector buffer for the current macroblock.

Operation:

* The MVDs are written into the buffer first.
* `mb_start` then walks the 16 blocks in z-order. Tables indexed by partition
  shape and position give the codes of neighbours A, B and C (or D).
* Median or directional (16x8, 8x16) prediction is added to the MVD.
* Finished vectors are copied to every 4x4 block they cover.
* `mb_end` writes the macroblock's bottom row and right column back to the
  line store and neighbour registers in two cycles.
* A macroblock needs at most 20 cycles.

**MPEG-2** (`mv_gen_mpeg2`) reconstructs frame vectors from `f_code`,
`motion_code` and `motion_residual` with the standard range folding, and
derives the 4:2:0 chroma vector.

## Top level: `mc_top`

For an H.264 macroblock:

1. Write the MVDs (`mvd_we`, `mvd_idx` = z-order index of the partition's
   first 4x4 block).
2. Set `mb_type` / `sub_type` and pulse `mb_start`.

For MPEG-2, present the vector side information with `m2_valid` first, then
pulse `mb_start` with `std_mpeg2 = 1`.

Outputs:

* Prediction beats (`pred_*`: 4 pixels of one column, with component, block
  and column) arrive in decoding order.
* The residual for a beat must be presented on `resid` in the same cycle as
  `pred_valid`. The reconstructed beat follows one cycle later on `recon_*`.
* Reconstructed or deblocked words go back to memory through `wr_*` (component,
  column, strip, 32-bit word). The write channel queues them independently of
  the read traffic.
* The `ev_*` outputs pulse on content-swap, reuse, command overlap, row miss
  and read CAS, for performance counting.

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. The reference models in `tb/tb_ref_pkg.sv`
compute H.264 and MPEG-2 samples directly from the standard's 2-D equations.
`tb/sdram_model.sv` is a behavioural SDRAM that flags every tRCD, tRP, tRAS
or tWR violation.

```sh
# one block, e.g. the interpolator
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/mc_pkg.sv tb/tb_ref_pkg.sv rtl/interpolator.sv tb/tb_interpolator.sv \
  --top-module tb_interpolator -Mdir obj_interp -o sim
./obj_interp/sim

# the whole engine end to end (all parameters at their defaults)
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/mc_pkg.sv tb/tb_ref_pkg.sv rtl/*.sv tb/sdram_model.sv tb/tb_mc_top.sv \
  --top-module tb_mc_top -Mdir obj_top -o sim
./obj_top/sim
```

`tb_mc_top` runs `mc_top` with its default parameters. The picture size is an
input, so a 128x48 picture keeps the run under a second. The test does this:

1. Preloads frame 0 into chip 0.
2. Decodes frame 1 as H.264 P macroblocks and writes it into chip 1.
3. Swaps the chips.
4. Decodes frame 2 as MPEG-2 predicted from frame 1 and swaps again.

It checks the following:

* every vector and every predicted and reconstructed pixel;
* both written frames word by word;
* that no SDRAM timing rule was broken;
* that content-swaps, reuses, command overlaps, row misses, frame swaps and
  MPEG-2 macroblocks all occurred.

Measured on that run, with a 100 MHz single clock:

* 555 cycles per H.264 P macroblock (one quarter-sample vector per
  macroblock). A 720p30 stream needs 108,000 macroblocks per second, which is
  59.9 MHz worth of cycles. The read bus carries data in 76% of the cycles.
* 293 cycles per MPEG-2 macroblock. 1080p30 needs 71.7 MHz.

## Where this RTL departs from the thesis, and its limits

* **Burst length 1 only.** The thesis compares BL 1, 2, 4 and full page and
  prefers BL 1 or full page. Full page with BURST TERMINATE is not built.
* **No refresh.** There is no auto-refresh timer. A product needs one, given
  priority in the scheduler.
* **Timing values.** tRCD = tRP = 2, tRAS = 5 and tWR = 2 cycles are assumed
  typical values for a 100 MHz part.
* **Single clock.** The engine and the SDRAM share one clock. The thesis runs
  the decoder slower (56 MHz for 720p H.264) than its 100 MHz SDRAM. That
  gives a lower figure than the 59.9 MHz-equivalent measured here. The
  remaining gap comes from the interpolator working on one block at a time.
  Its drain of about 4 cycles per block is only partly hidden, by assembling
  the next block's first column meanwhile.
* **No edge extension.** Vectors must keep the reference window inside the
  stored picture.
* **P_SKIP** uses the standard's rule: a zero vector when neighbour A or B
  is unavailable or has a zero vector, otherwise the 16x16 median.
* **MPEG-2:** frame prediction with one forward vector (Simple Profile) only.
* **Fixed window fetch.** Every window column is fetched as a fixed 3 words
  (luma, MPEG-2) or 2 words (chroma, copy), even when fewer would do for a
  given vertical alignment.
* **Outside blocks.** The de-blocking filter and the residual decoder are
  outside this RTL. Their data enter through `resid` and `wr_*`.
* **Sizes of unspecified buffers.** Queue depth 4, read buffer 16 and
  descriptor FIFO 4 are this design's choice.

Lint reports no circuit warnings; what remains are unused bits, unused
parameters and deliberately unconnected optional outputs.
