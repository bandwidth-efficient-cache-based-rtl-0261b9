# Cache-based motion-compensation fetch engine for H.264 decoding

Motion compensation in an H.264 decoder reads far more reference pixels than
it produces: the 6-tap luma filter needs an (X+5) x (Y+5) window of integer
pixels for every X x Y block, and neighbouring blocks ask for windows that
overlap. On top of the raw data volume, every time the SDRAM has to switch
rows it loses a precharge + activate latency (about 10 cycles at 166 MHz).

This RTL implements a motion-compensation engine that attacks both costs:

* **A 2-D cache between the SDRAM and the interpolator** (16 banks x 6 ways,
  1.5 kB of data). Pixels of a window that an earlier window already loaded
  - in the same macroblock or in the previous one - come from the cache.
  Tags are kept *relative* to the current macroblock, so they stay small
  (6-bit X and Y tags, +-512 pixel range) and are shifted, not rewritten,
  when decoding moves on.
* **An SDRAM controller that is friendly to row switching.** Reference
  frames are stored in tiles whose four quadrants sit in the four SDRAM
  banks, with a *vertical* word order inside each row; the controller reads
  all lines of one row before moving to the next (access reordering) and
  precharges/activates the next row in another bank while it is still
  reading the current one (command out-of-order).
* **A luma interpolator** that turns each fetched window into the
  predicted block.

The architecture follows the published paper "Bandwidth-Efficient
Cache-Based Motion Compensation Architecture with DRAM-Friendly Data Access
Control". Where that description stops, choices were made here; they are
listed in [Departures and own choices](#departures-and-own-choices).

## Data flow of one reference window

```
 window request            +-----------------+   line fills   +-----------+  RD/ACT/PRE
 (refidx, x0, y0, w, h,  ->| data_fetch_ctrl |--------------->| dram_ctrl |-----------> SDRAM
  fx, fy)                  +-----------------+                +-----------+<----------- dq
        lookup/lock/alloc |  ^ hit, way       line read            | word fills
                          v  |                    |                v
                     +------------+          +--------------+  +----------+
                     | cache_tags |          | sram_ag_ctrl |->| sram_set |
                     | 16 x bank  |          +--------------+  | 4 SRAMs  |
                     +------------+                 | lines    +----------+
                                                    v
                                             +--------------+
                                             | interpolator |--> predicted pixels
                                             +--------------+
```

A window is handled in four phases, strictly one after the other:

1. **Lookup** (one cache line per cycle). The window is covered by cache
   lines of 8 pixels x 2 rows, visited column by column, top to bottom.
   A hit *locks* the line. A miss allocates a line (tags written, locked)
   and hands a two-word fill request to the SDRAM controller.
2. **Fill.** The SDRAM controller reads all queued fills, in its own order,
   and writes each returned 64-bit word into the SRAMs.
3. **Read-out** (one line per cycle). Every line is looked up again - it
   must hit, because locked lines cannot be replaced - read from the SRAMs,
   unlocked and passed to the interpolator (and to the `out_*` ports).
4. **Interpolation** (one pixel per cycle). The next window is accepted
   when the interpolator has emitted the last pixel.

## The cache

### Where a line lives

Pixel positions are 10-bit signed values relative to the top-left corner
of the macroblock being decoded:

```
 x:  [9:4] X-tag   [3] bank X offset   [2:0] pixel in word
 y:  [9:4] Y-tag   [3:1] bank Y offset [0]   word in line (row parity)
```

A 16x16 block of the reference frame holds exactly 16 lines, two across
and eight down, and each of those 16 positions has its own bank:
`bank = 2*y[3:1] + x[3]`. So a line can only be in one bank, and the tag
compared inside the bank is {RefIdx, X-tag, Y-tag}. A cache word is one
8-pixel row segment (64 bits, the SDRAM bus width); two vertically adjacent
words form a line and share one set of tags, which halves tag storage.

Each bank has 6 lines (6-way). The tags of a line are

| field  | bits | meaning |
|--------|------|---------|
| Lock   | 1    | line is waiting to be read by the interpolator; not replaceable |
| RefIdx | 4    | reference picture (LIST_0/LIST_1, up to 5 each); `1111` = empty |
| X-tag  | 6    | 16x16-block column relative to the macroblock |
| Y-tag  | 6    | 16x16-block row relative to the macroblock |

The data of a line sits at address `bank*6 + way` of four single-port
SRAMs of 96 x 32 bits: SRAM 0/1 hold the even-row word, SRAM 2/3 the
odd-row word. A fill writes two SRAMs; a read-out reads all four and
yields the whole 128-bit line (odd row in bits 127:64).

### Relative tags and macroblock steps

Because tags are relative, they change when decoding moves on
(`mb_valid` with `mb_x`, `mb_y`):

* **next macroblock in the same row** (`mb_x != 0`): the new origin is 16
  pixels further right, so every X-tag is decremented. A line whose X-tag
  would wrap from -32 to +31 is emptied instead.
* **first macroblock of a row or frame** (`mb_x == 0`): every line is reset
  to Lock 0, RefIdx 1111, X-tag 0, Y-tag 0 - the cache starts empty.

This is what lets a window of the next macroblock hit lines loaded for the
previous one (inter-macroblock reuse) without any absolute addresses in the
tags.

### Lock and replacement

Replacement is FIFO per bank: a pointer marks the oldest line. The victim is
the oldest line whose Lock bit is clear - if the line at the pointer is
locked, the next unlocked one in FIFO order is taken - and the pointer
moves past the victim. Lock is set when a line is allocated *and* when it
is hit, and cleared when it is read out. A window of at most 21 x 21
pixels touches at most 4 lines of any bank, so with 6 ways a victim always
exists and a window can never evict a line it still needs.

## The SDRAM side

### Address mapping (`dram_addr_map`)

The SDRAM has 4 banks, 4096 rows, 256 columns of 64 bits. A row of one bank
holds a 64 x 32 pixel quadrant; four quadrants, one per bank, make a
128 x 64 tile that uses the same row number in all banks:

```
 tile t:  +--------+--------+      tiles in raster order:
          | bank 0 | bank 1 |      row = refidx*255 + tile_y*15 + tile_x
          +--------+--------+      (1920x1080: 15 x 17 tiles)
          | bank 2 | bank 3 |
          +--------+--------+
```

Any two neighbouring quadrants - also across tile borders - are in
different banks. Inside a quadrant the column address runs *down* first:
`col = (x/8 mod 8)*32 + (y mod 32)`. Motion-compensation windows are
usually taller than a word is wide, so a column of words of a window is a
run of consecutive column addresses, i.e. one long burst. Positions outside
the frame are clamped to the border.

### Controller (`dram_ctrl`)

Fills of one window are buffered (up to 48 lines). The command bus carries
one command per cycle: NOP, PRE, ACT or RD (one word per RD). Rows stay
open after use, one per bank.

* **Access reordering.** The controller serves one page (bank + row) until
  every buffered line in it is read, then moves to the page of the oldest
  waiting line. A window lying across a row boundary opens each row once,
  even though the column-by-column line order alternates between rows.
* **Command out-of-order.** While the current page is read, the page that
  will follow (the oldest waiting line outside the current page) is
  prepared: if it is in another bank, its PRE and ACT are slipped into
  the command stream between reads, so their latency overlaps the reads.
  Requests for the current page's own bank cannot be prepared early.
* Timing honoured: `TRP` cycles PRE->ACT, `TRCD` cycles ACT->RD; read data
  is taken `CL` cycles after the RD. Counters give ACT, RD and burst
  totals (a burst = RDs to consecutive columns of one row).

## Interpolator

For an X x Y block with quarter-pixel fraction (fx, fy) the window is
(X+5) x (Y+5) integer pixels. The interpolator stores the incoming lines in
a 32 x 22 pixel buffer, then computes one pixel per cycle in raster order
from the 6x6 neighbourhood of its integer position: horizontal and
vertical half samples with the (1, -5, 20, 20, -5, 1) filter (round, >> 5,
clip), the centre sample from the unrounded horizontal sums (round, >> 10,
clip), and quarter samples as the rounded-up mean of the two nearest
samples - the H.264 luma process. Pixel 0 of a 64-bit word is bits 7:0.

## Top-level interface (`mc_top`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `mb_valid`/`mb_ready`, `mb_x`, `mb_y` | in/out | start of a macroblock (7-bit macroblock coordinates) |
| `blk_valid`/`blk_ready` | in/out | window request handshake |
| `blk_refidx` | in | reference index, 0..14 |
| `blk_x0`, `blk_y0` | in | window top-left, signed pixels relative to the macroblock |
| `blk_w`, `blk_h` | in | window size X+5, Y+5 (6..21) |
| `blk_fx`, `blk_fy` | in | quarter-pixel fraction of the motion vector |
| `dram_cmd`, `dram_bank`, `dram_row`, `dram_col` | out | SDRAM command bus |
| `dram_dq` | in | 64-bit read data, `CL` cycles after RD |
| `out_valid`, `out_line`, `out_x`, `out_y`, `out_last` | out | cache lines of the window as sent to the interpolator |
| `pix_valid`, `pix`, `pix_x`, `pix_y`, `pix_last` | out | predicted pixels |
| `hit_count`, `miss_count`, `act_count`, `rd_count`, `burst_count` | out | statistics |

Handshakes are valid/ready; a request is taken on a cycle where both are
high. `blk_ready` is low while a window is in progress.

Timing of a window of L lines with M misses: L lookup cycles, the SDRAM
time for 2M reads (2 cycles per line in an open row, plus 10 cycles for each
row that could not be opened early), L read-out cycles, X*Y interpolation
cycles, and a few cycles of hand-over.

## Parameters

| parameter | default | where |
|-----------|---------|-------|
| `WAYS`, `NUM_BANKS` | 6, 16 | `mc_pkg` (cache geometry) |
| `FRAME_W`, `FRAME_H` | 1920, 1080 | `mc_top`, `data_fetch_ctrl`, `dram_addr_map` |
| `QUAD_W`, `QUAD_H` | 64, 32 | `dram_addr_map`: one SDRAM row |
| `MAX_REQ` | 48 | `dram_ctrl`: fills per window |
| `TRP`, `TRCD`, `CL` | 5, 5, 3 | `dram_ctrl` |
| `WIN_W`, `WIN_H` | 32, 22 | `interpolator` buffer |

The 6-way, 16-bank, 1.5 kB cache, the 64-bit bus, the 10-cycle
precharge+activate latency and the 1920x1080 frame are the values of the
original architecture; the rest are choices made here.

## Departures and own choices

The published description gives the cache organisation, tag layout and
update rule, the Lock/FIFO policy, the bank-tile mapping, vertical
addressing, and the two SDRAM scheduling ideas. The following are choices
of this implementation:

* The sequential lookup / fill / read-out / interpolate flow, the
  valid/ready handshakes and the per-window request format.
* Lock is also set on a hit (so that a line hit early in a window survives
  allocations later in it); the victim search skips locked lines rather
  than waiting.
* Lines whose relative X-tag would wrap are dropped; `mb_x == 0` is taken
  as the start of a row or frame.
* SRAM word split and line address; fills have priority over reads.
* Quadrant size 64 x 32 (one 256-column SDRAM row), frame row layout
  `refidx*255 + tile`, clamping at the frame border (horizontal clamping
  is at word granularity, so pixels left/right of the frame are not
  replicated pixel by pixel).
* TRP = TRCD = 5 (10 cycles together), CL = 3, open-page policy; refresh,
  tRAS/tRC and writes are not modelled - the engine only reads.
* With one open row per bank, a raster-order walk would not necessarily
  re-open rows; the reordering matters here mainly for pages in the same
  bank and for knowing which single page to prepare early.
* The interpolator follows the H.264 luma equations, one pixel per cycle;
  chroma is not handled.
* Motion-vector generation is not part of the RTL: a window request is
  its output.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|-----------|----------------|
| `tb_replacement_ctrl` | victim choice vs. a reference FIFO with locked ways |
| `tb_cache_tag_bank` | hits, victims, lock/unlock, X-tag shift with wrap, reset |
| `tb_cache_tags` | bank routing, hit/miss vs. a reference cache model |
| `tb_sram_set`, `tb_sram_ag_ctrl` | SRAM contents, line assembly, fill priority |
| `tb_dram_addr_map` | mapping vs. an independent reference, hand-worked cases |
| `tb_dram_ctrl` | data of every fill, SDRAM timing, one ACT per page, one read run per page, hidden PRE/ACT, open-row rate |
| `tb_data_fetch_ctrl` | fill addresses, hit/miss per window, line order/content, back-pressure |
| `tb_interpolator` | all 16 fractions, 5 block sizes, all alignments, clipping, 1 pixel/cycle |
| `tb_mc_top` | whole engine at default parameters over two macroblock rows, plus a macroblock of 4x4 partitions |
| `tb_mc_workload` | whole engine built for CIF (352x288): P and bi-predicted B macroblocks along the top and bottom rows, windows past the frame border |

`tb_mc_top` runs the full design with its defaults against a behavioural
SDRAM model (`tb/sdram_model.sv`, which also flags timing violations) and
reference models in `tb/tb_mc_pkg.sv`. It checks every line and every
predicted pixel, the hit/miss count of each window against a software
cache, and requires each mechanism to occur: intra- and inter-macroblock
hits, tag reset, eviction, skipping a locked line, windows spanning several
SDRAM rows, a PRE/ACT hidden between reads, and bursts of 4+ words. In a
typical run the average burst is about 7.5 words.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/mc_pkg.sv tb/tb_mc_pkg.sv tb/tb_mc_top.sv --top-module tb_mc_top
./obj_dir/Vtb_mc_top
```

Replace `tb_mc_top` by any other testbench name. Each runs in seconds.

## Throughput and limits

One line per cycle for lookup and read-out, one pixel per cycle for
interpolation, and no overlap between windows. Measured in the end-to-end
testbench (cycles per macroblock, including SDRAM time):

| partitions of the macroblock | cycles |
|------------------------------|--------|
| one 16x16                    | ~410   |
| two 16x8 or two 8x16         | 430-470 |
| four 8x8                     | ~500   |
| sixteen 4x4                  | ~810   |

A bi-predicted partition costs two windows: on CIF pictures with two of
three B macroblocks bi-predicted, `tb_mc_workload` measures about 770-810
cycles per macroblock, against about 450 for P macroblocks. At 166 MHz, 1080p at 30
frames/s leaves 678 cycles per macroblock: P pictures with 8x8 or larger
partitions keep up, but all-4x4 macroblocks and bi-predicted B pictures
do not. 720p at 30 frames/s (1537 cycles) and CIF keep up. Overlapping
the interpolation of one window with the fetch of the next would be the
first change to make for more throughput.

The SDRAM layout holds up to 15 reference frames of the configured size.
Border clamping uses `FRAME_W`/`FRAME_H`, so they must be set to the
frame size being decoded (the defaults are 1920x1080).
