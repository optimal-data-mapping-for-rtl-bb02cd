# Reference-pixel fetch for H.264 motion compensation on SDR SDRAM

Motion compensation in a video decoder reads, for every inter-predicted block,
a small rectangle of a reference frame from external SDRAM: 4 to 16 pixels a
side, plus 5 pixels in a direction where the motion vector has a fractional
part (the 6-tap interpolation margin). That gives widths and heights of 4, 8,
9, 13, 16 and 21. The burst itself is cheap. What costs cycles is opening
SDRAM rows, and a frame stored line by line needs a new row for almost every
line of such a rectangle.

This controller cuts that cost in two ways:

1. **Data mapping.** Every 2048-pixel SDRAM row holds a 64 x 32 pixel tile
   ("window") of a frame. Neighbouring windows are placed in different banks.
   Most rectangles then fall inside one row. The others touch two or four
   rows, and because those rows are in different banks, they can all be open
   at once.
2. **Operation scheduling.** All rows a request needs are opened at its
   start, and the pixels are read with one column READ per cycle, switching
   banks where a line crosses a window border. Rows stay open after the
   request. Consecutive blocks read overlapping areas, so the next request
   usually finds its rows already open. Rows are closed only when a needed
   bank holds a different row, and then all banks are closed with one
   PRECHARGE-ALL command.

The RTL is synthesizable SystemVerilog. It has no memories apart from small
register arrays.

## Pixels to SDRAM: the 64 x 32 window

The frame is tiled into windows `wx = x >> 6`, `wy = y >> 5`. Inside a
window, the column address is the pixel's raster position. Since both window
sides are powers of two, the translation (`mc_addr_map`) is pure bit
selection:

| field  | bits | value                              |
|--------|------|------------------------------------|
| column | 11   | `{y[4:0], x[5:0]}`                 |
| bank   | 2    | `{wy[0], wx[0]}` (2 x 2 checkerboard) |
| row    | 13   | `{ref_idx[3:0], y[10:6], x[10:7]}` = `{ref, wy>>1, wx>>1}` |

The checkerboard guarantees that the windows left/right, above/below and
diagonal to any window are in three other banks. So the (at most) four rows
one request needs are always in four different banks.

Each reference frame occupies a 2048 x 2048 pixel grid of windows, which is
512 rows of each bank. The target part is a 512 Mbit x8 SDRAM: 4 banks x 8192
rows x 2048 columns of 8 bits, so one row holds exactly 2048 pixels. It
therefore holds 16 reference frames of up to 2048 x 2048 pixels. QCIF, CIF,
720 x 480 SD and 1280 x 720 HD frames use 15, 54, 180 and 460 of each frame's
2048 rows. The grid wastes capacity for small frames, but keeps the address
arithmetic free of multipliers.

A 64 x 32 window is not the square that a simple row-miss model would
suggest. For a 2048-pixel row that model gives about 46 x 44. The 64 x 32
window is chosen because its sides are powers of two, and because video
moves more horizontally than vertically.

## Request classes

`mc_req_classifier` looks at where the rectangle sits inside its window:

* it crosses a vertical window border when `x[5:0] + w > 64`;
* it crosses a horizontal window border when `y[4:0] + h > 32`.

| class  | borders crossed        | rows (banks) needed          |
|--------|------------------------|------------------------------|
| case 1 | none                   | 1                            |
| case 2 | one (either direction) | 2: TL + TR, or TL + BL       |
| case 3 | both                   | 4: TL, TR, BL, BR            |

Here TL, TR, BL and BR are the windows of the four corner pixels. The
classifier translates each corner pixel to get the bank and row of that
window. A request must be at most 64 wide and 32 high so that it touches no
more than 2 x 2 windows. The 5-bit width and height fields, which allow up to
31, enforce that.

## Command schedule and its cycle counts

`mc_cmd_scheduler` has a single SDRAM command slot per cycle. Each cycle it
issues the first of these that is allowed:

1. PRECHARGE-ALL, if the request needs it;
2. ACTIVATE for the next window still to be opened (order TL, TR, BL, BR),
   once tRRD has passed since the last ACTIVATE and tRP since the last
   precharge;
3. READ of the next pixel in raster order, once its bank has been open for
   tRCD;
4. otherwise NOP.

With tRCD = tRRD = CL = 2, a request whose banks all start closed occupies
the bus for the following number of cycles. The count runs from its first
command to its last data word, and L is its number of pixels.

```
cycle     0    1    2    3    4    5    6    7  ...
case 1   ACT  --   RD   RD   RD   RD   RD   RD ...  last RD at L+1, data ends at L+3   -> L+4
case 2   ACT  --   ACT  RD   RD   RD   RD   RD ...  last RD at L+2, data ends at L+4   -> L+5
case 3   ACT  --   ACT  RD   ACT  RD   ACT  RD ...  last RD at L+4, data ends at L+6   -> L+7
```

In case 2, the second ACTIVATE must wait tRRD, and it takes the slot where the
first READ would have gone. In case 3, the third and fourth ACTIVATEs each
take a slot in the middle of the reads, which costs two more cycles. Reads
never wait for a bank. By the time the raster walk first reaches a pixel of
TR, BL or BR, that window has been open for at least tRCD.

Other starting states:

* all needed rows already open: L+2 (reads start at once);
* rows reused, plus idle banks opened: L+3 for one extra ACTIVATE;
* a row conflict: the PRECHARGE-ALL and tRP add 2 cycles to the
  closed-bank count.

Read data is registered at the pins. The pixel stream (`pix_valid`,
`pix_data`, `pix_last`) comes out CL + 2 cycles after the READ decision.

### Back-to-back requests

With `INTER_REQ_OPT = 1` (the default), the next request is accepted in the
cycle of the current request's last READ. If its rows are open, its first
READ follows in the next slot, and the pixel stream has no gap between
requests.

With `INTER_REQ_OPT = 0`, a PRECHARGE-ALL follows the last READ of every
request. The next request is accepted in that cycle, and its first ACTIVATE
waits out tRP. The precharge then hides under the data tail, and the request
period is exactly L+4, L+5 or L+7.

## Keeping rows open (`mc_open_row_table`)

The table holds an open flag and a row number per bank. ACTIVATE sets them,
and PRECHARGE-ALL clears every flag. For the four windows of the request at
the input, it answers combinationally with *hit* (that row is open) or
*conflict* (another row is open in that bank). On acceptance the scheduler
decides what to do:

* no conflict: ACTIVATE only the needed windows that are not hits;
* any conflict: PRECHARGE-ALL, then ACTIVATE every needed window.

Closing banks one at a time would save a row opening only in the rare case
where one window conflicts and another hits. Precharging all banks costs one
command and needs no per-bank bookkeeping.

## Interfaces

`mc_sdram_ctrl` is the top module. All signals are synchronous to `clk`.
`rst_n` is an active-low synchronous reset, and after reset all banks count
as closed.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `req_valid` / `req_ready` | in / out | 1 / 1 | valid/ready handshake; hold `req` while `req_valid && !req_ready` |
| `req` | in | `mc_req_t` | `{ref_idx[3:0], x[10:0], y[10:0], w[4:0], h[4:0]}`; the top-left pixel and size of the area, w and h 1..31 |
| `pix_valid`, `pix_data[7:0]`, `pix_last` | out | | pixels of each request in raster order; `pix_last` marks the last one |
| `sd_cs_n`, `sd_ras_n`, `sd_cas_n`, `sd_we_n`, `sd_ba[1:0]`, `sd_a[12:0]` | out | | SDRAM command pins, driven from flip-flops |
| `sd_dq[7:0]` | in | | SDRAM read data |
| `busy` | out | 1 | a request or read data is in flight |
| `acc_valid`, `acc_case` | out | 1, 2 | a request was accepted, and its class (1, 2, 3) |
| `bank_open[3:0]` | out | 4 | banks holding an open row |

READ puts the column on A0–A9 and A11, with A10 = 0 (no auto-precharge).
PRECHARGE uses A10 = 1 (all banks). Commands are encoded as
`{cs_n, ras_n, cas_n, we_n}`: NOP `0111`, ACTIVATE `0011`, READ `0101`,
PRECHARGE `0010`.

## Files

| file | content |
|------|---------|
| `rtl/mc_pkg.sv` | geometry constants, `mc_req_t`, request-class and command enums |
| `rtl/mc_addr_map.sv` | pixel → bank/row/column |
| `rtl/mc_req_classifier.sv` | request class and the bank/row of each needed window |
| `rtl/mc_open_row_table.sv` | open row per bank, hit/conflict queries |
| `rtl/mc_cmd_scheduler.sv` | command sequencing, timing counters, read-data alignment |
| `rtl/mc_sdram_ctrl.sv` | top: classifier + table + scheduler |
| `tb/mc_tb_pkg.sv` | reference address arithmetic, SDRAM data pattern, workload generator |
| `tb/sdram_model.sv` | behavioural read-only SDRAM with timing checks |
| `tb/tb_*.sv` | self-checking testbenches |

## Parameters

The geometry is held in `mc_pkg` as constants: `WIN_W_LOG2 = 6`,
`WIN_H_LOG2 = 5`, `X_BITS = Y_BITS = 11`, `BANK_BITS = 2`, `ROW_BITS = 13`,
`PIX_BITS = 8` and `LEN_BITS = 5`. The reference-index width is derived from
them (4 bits). The top and the scheduler take these module parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `TRCD` | 2 | ACTIVATE to READ, cycles |
| `TRRD` | 2 | ACTIVATE to ACTIVATE in another bank |
| `TRP`  | 2 | PRECHARGE to ACTIVATE |
| `CL`   | 2 | CAS latency |
| `INTER_REQ_OPT` | 1 | 1: keep rows open between requests; 0: close after each |

The timing counters are 4 bits wide, so each timing value must be 1..15.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M`, and each has a
watchdog. They check pixel data against an SDRAM model whose content is a
hash of {bank, row, column}. The expected address of each pixel is computed
with plain division and remainder by 64 and 32, independently of the RTL's
bit slicing.

* `tb_mc_addr_map`: random and border pixels against the arithmetic
  reference. It also checks that the four windows around any corner use four
  banks.
* `tb_mc_req_classifier`: H.264-sized and random requests, including exact
  border cases, checked for class and per-window bank/row.
* `tb_mc_open_row_table`: random ACTIVATE / PRECHARGE-ALL / query sequences
  against a model.
* `tb_mc_cmd_scheduler`: directed requests. Each one's bus occupancy is
  checked: L+4, L+5 and L+7 from closed banks; L+2 on a hit; L+3 when one
  bank is added; +2 after a conflict. Back-to-back hits must produce a
  gap-free stream.
* `tb_mc_sdram_ctrl` runs the top at default parameters. It fetches one
  generated inter frame each of QCIF, CIF, 720 x 480 and 1280 x 720. The
  generator (`mc_tb_pkg::gen_frame`) splits macroblocks into 16x16 down to
  4x4 partitions, draws random quarter-pel vectors (40 % zero), and mostly
  uses reference 0. The test requires every mechanism to occur: all three
  classes, hit-only requests, requests that only open idle banks, requests
  that start with a precharge-all, and requests accepted while the previous
  one is still streaming. On these synthetic streams it measures about 1.016
  bus cycles per pixel.
* `tb_mc_sdram_ctrl_close` runs with `INTER_REQ_OPT = 0` on a QCIF frame. It
  checks that every request period is exactly L+4, L+5 or L+7. Here the same
  kind of stream costs about 1.044 cycles per pixel, against 1.018 with rows
  kept open.
* `tb_mc_inter_request_gain` feeds one generated CIF frame to two
  controllers side by side, one with each `INTER_REQ_OPT` setting. It
  requires the open-row controller to use fewer cycles and fewer ACTIVATEs.
  In one run, keeping rows open cut ACTIVATEs from 2071 to 917 and
  precharges from 1634 to 504. Only 44 % of requests had to open any row,
  and bus cycles fell from 1.042 to 1.015 per pixel. The motion in these
  streams is random and uncorrelated between blocks. Real video has
  smoother motion fields, so it should reuse open rows more often.

The SDRAM model reports any READ to a closed bank, any ACTIVATE to an open
bank, and any tRCD, tRRD or tRP breach. Every testbench requires zero such
reports.

To run one, for example the top-level test, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/mc_pkg.sv tb/mc_tb_pkg.sv tb/tb_mc_sdram_ctrl.sv \
    --top-module tb_mc_sdram_ctrl -o sim
./obj_dir/sim
```

It finishes in a few seconds.

## Where this design makes its own choices

These points are not fixed by the scheme this controller implements. They
were chosen here, and they are the first things to revisit for a different
part or system:

* **Bank arrangement**: the 2 x 2 checkerboard. Any arrangement that gives
  the four windows around a corner distinct banks works equally.
* **SDRAM organisation and timing**: one 8-bit pixel per column, 4 banks,
  8192 rows. tRCD = tRRD = CL = 2 are the values that give the L+4 / L+5 /
  L+7 schedule above. tRP = 2. tRAS and tRC are not tracked. Rows are
  assumed to stay open long enough: even with `INTER_REQ_OPT = 0` a row is
  open for at least L+2 cycles, which is 18 cycles for the smallest (4 x 4)
  request.
* **Read order**: raster order of the rectangle, one single-word READ per
  pixel. A wider data bus, or burst reads, would change the cycle counts.
* **Frame layout**: `{ref, wy>>1, wx>>1}` on a fixed 2048 x 2048 grid.
* **Request port**: a plain valid/ready handshake, not a specific on-chip
  bus.
* **Scope**: the controller only reads. Writing decoded frames in the same
  mapping, refresh scheduling, and clamping reference areas that lie
  outside the frame are left to the surrounding memory system and the
  requester.
* The bandwidth figures quoted for this scheme (about 47 MB/s for 720 x 480
  and 136 MB/s for 1280 x 720) depend on real video statistics. They are not
  reproduced here, because the testbenches use synthetic motion. At
  1 byte per cycle and about 1.02 cycles per pixel, 136 MB/s needs a clock
  of at least about 140 MHz.
