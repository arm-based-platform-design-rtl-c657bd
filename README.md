# Bus-interleaved H.264 deblocking filter and companion accelerators on AHB

The H.264/MPEG-4 AVC in-loop deblocking filter smooths the block edges that
a transform codec leaves behind. It is one of the most expensive parts of a
baseline decoder that runs in software on a small ARM core. The data it
touches is tiny, but it is read and written many times: every 4x4 edge of a
macroblock, luma and chroma, in two directions. This design moves the
filter into an AHB slave that the CPU feeds word by word.

The key idea is **bus interleaving**. The accelerator has no macroblock
buffer in front of it. Each 32-bit word the CPU writes is filtered in the
next clock cycle, and a filtered word can be read back while later words
are still arriving. The bus transfer is therefore the filter's only real
cost. Three further ideas keep that cost low:

- **Adaptive transfer.** The CPU moves only the 4x4 blocks that the
  macroblock actually needs filtered.
- **Early bS.** The boundary strength (bS) of every edge is computed in
  hardware, one macroblock ahead of filtering.
- **Direct reconstruction path.** The inverse transform accelerator can pass
  its reconstructed pixels straight into the filter, so they never go back
  through the CPU.

The same bus carries two more accelerators:

- an inverse-quantisation/inverse-transform (IQ-IDCT) unit with
  reconstruction;
- a motion-compensation (MC) interpolator with a 1500-pixel local memory.

The CPU stays the only bus master. It does the entropy decoding and
decides what each accelerator gets, and in what order.

Everything is in SystemVerilog. `rtl/` holds synthesizable RTL: one module
or package per file, with no vendor primitives. `tb/` holds a
self-checking testbench per module and an end-to-end test of the top.

## Block map

```
             AHB-Lite (CPU is the only master; testbenches use an AHB master model)
  HADDR/HTRANS/HWRITE/HWDATA ──┬───────────────┬────────────────┬──────────────┐
                               │               │                │              │
                       ahb_decoder     dbf_accel 0x0000   iqidct_accel 0x1000  mc_accel 0x2000
                       (HSEL, read     ┌ dbf_bs_unit      idct4_1d x2,         sp_sram 375x32,
                        mux, default   │  └ bs_calc x2    transpose_array x2,  6-tap + bilinear
                        ERROR slave)   ├ dbf_core         sync_fifo x3         luma engine,
                                       │  ├ edge_filter                        bilinear chroma
                                       │  ├ pixel_array (Reg1)                 engine, sync_fifo
                                       │  ├ transpose_array (Reg2)
                                       │  └ sp_sram 96x32
                                       └ sync_fifo x2 (DIN, DOUT)
                                             ▲
                   rec_valid/rec_data/rec_ready (direct reconstruction path)
                                             └──────────── iqidct_accel
```

`avc_accel_top` is the whole logic of the platform. It has a three-slave
`ahb_decoder`, the three accelerators, and the IQ-IDCT → deblocking
stream. It also brings out three status signals: `dbf_mb_done`,
`dbf_mode` and `dbf_filt_event`. The CPU, the on-chip SRAM, the external
memory controller and the bus arbiter are not part of the RTL. The only
master is the testbench's AHB model.

| Window | Slave | Offsets |
|---|---|---|
| `0x0000-0x0FFF` | deblocking | `DIN 0x000` (W), `DOUT 0x004` (R), `CTRL/STATUS 0x008`, side info `0x080+4i` (i = 0..25) |
| `0x1000-0x1FFF` | IQ-IDCT | `COEF 0x000` (W), `PRED 0x004` (W), `CTRL/STATUS 0x008`, `RES 0x00C` (R) |
| `0x2000-0x2FFF` | MC | `CMD 0x000`, `OUT 0x004` (R), `STATUS 0x008`, memory `0x400+4i` (i = 0..374) |
| anything else | default slave | two-cycle ERROR response |

Each register's bit fields are listed in the header comment of its module.
Flow control works through wait states. A write to a full input FIFO, or a
read of an empty output FIFO, holds HREADYOUT low until the access can
complete. The CPU never needs to poll in the middle of a macroblock.

All pixel words carry four 8-bit pixels of one row (or one column) of a
4x4 block. Pixel 0, the leftmost or topmost, sits in bits 7:0.

## The deblocking filter

### Filtering modes and adaptive transfer

A macroblock has three groups of edges:

- its left boundary, shared with the left macroblock;
- its top boundary, shared with the macroblock above;
- its own inner edges.

Once the bS of all 32 luma edge segments is known, each group either needs
filtering (some bS is non-zero) or does not. That gives eight modes:

| mode | filters | words each way |
|---|---|---|
| 1 | left, top, inner | 160 |
| 2 | top, inner | 128 |
| 3 | left, inner | 128 |
| 4 | inner | 96 |
| 5 | left, top | 116 |
| 6 | top | 64 |
| 7 | left | 64 |
| skip | nothing | 0 |

A full transfer, mode 1, is:

- 16 current luma blocks;
- 4 left and 4 top neighbour blocks;
- 4 + 4 current chroma blocks (Cb and Cr);
- 2 left and 2 top neighbour blocks per chroma component.

That is 40 blocks, or 160 words. The other modes drop what they do not need:

- no left neighbours unless the left edge is filtered;
- no top neighbours unless the top edge is filtered;
- when the inner edges are not filtered, only the current blocks that touch
  a filtered boundary.

In skip mode the CPU transfers nothing at all. On typical video, skip and
the cheap modes are common. On a still sequence, more than 80 % of
macroblocks skip.

The CPU reads the mode from `STATUS[6:4]` after the bS calculation and then
writes exactly the blocks of that mode, in the order below. Every word
written comes back filtered, including neighbour blocks, whose edge pixels
change. Words out always equal words in.

### Pass order and block order

A macroblock is filtered in four passes, one block stream each:

1. **Luma, horizontal filtering.** The filter runs along rows, across the
   vertical edges. Input is from the bus; output goes to the local SRAM.
2. **Luma, vertical filtering.** The filter runs along columns, across the
   horizontal edges. Input is from the SRAM; output goes to the bus.
3. **Chroma, horizontal.** Cb, then Cr.
4. **Chroma, vertical.** Cb, then Cr.

Filtering vertical edges before horizontal ones is what the standard
requires. The second pass must see the results of the first.

Inside a pass, the filter sees one block after another. The word arriving
for block b, row i, is the q side of the edge. The p side is row i of the
previous block. The block order is chosen so that consecutive blocks are
neighbours in the filtering direction. Notation:

- U = top neighbour's bottom luma blocks;
- L = left neighbour's right blocks;
- B = current luma blocks, raster 0..15;
- T and C = chroma neighbour and current blocks.

| pass | order in which blocks enter (or leave) |
|---|---|
| luma H (CPU writes) | U0 U1 U2 U3, then for each block row r: L_r, B_4r .. B_4r+3 |
| luma V (CPU reads) | for each column c: U_c, B_c, B_c+4, B_c+8, B_c+12; then L0..L3 |
| chroma H, per component | T0 T1 L0 C0 C1 L1 C2 C3 |
| chroma V, per component | T0 C0 C2, T1 C1 C3, then L0 L1 |

Only current blocks are ever the q side of a filtered edge. Each current
block has one predecessor in the pass direction:

- in a horizontal pass, the block to its left, which is L for the first
  column;
- in a vertical pass, the block above it, which is U or T for the first row.

The edge is filtered only when that predecessor is the block that entered
just before. Neighbour blocks (U, L, T) always start a new chain. So does a
current block whose predecessor was left out by the mode; the edge in front
of it passes through unfiltered. The top blocks enter the horizontal pass
only so that they are stored and come out of the vertical pass in the right
place. Their own vertical edges belong to the macroblock above and are
already filtered.

### One filter, two 4x4 arrays: Reg1 and Reg2

The datapath (`dbf_core`) has one combinational 8-pixel filter
(`edge_filter`) and two small register arrays around it.

- **Reg1 (`pixel_array`)** holds the previous block of the chain. When row
  i of block b arrives, the filter's p side is Reg1 row i and its q side is
  the new word. The filtered q side goes back into Reg1, because it is
  still intermediate: the next edge of the chain filters it again. The
  filtered p side is final for this pass.
- **Reg2 (`transpose_array`)** takes the final p-side rows and turns them
  into columns, so the next pass can work in the other direction.

### Reg2 transposition without stalls

A plain transpose buffer would have to fill with four rows before the
first column can leave. That is a four-cycle bubble per block. Reg2 avoids
it by changing its own orientation every block:

- Block k is written **row-wise**. Word i goes into row i.
- Block k+1 is written **column-wise**. Each cycle, column i of block k is
  read out, and word i of block k+1 is written into the slots just freed:
  column i.
- Block k+2 is written row-wise again. It reads out row i of block k+1,
  which, seen from block k+1, is a column.

Each push is therefore also a pop of the previous block's transposed word,
in the same cycle and on the same slots. The orientation flips after every
fourth push. The pop always yields column i of the block written before.
Reg2 costs sixteen 8-bit registers and adds no latency beyond one block.

The same module, with 16-bit elements, is the transposing buffer of the
IQ-IDCT unit.

### The local SRAM

`sp_sram` is a 96x32 single-port RAM with registered read. 96 words hold:

- the 64 words of the current luma blocks;
- the 16 words of the left neighbours;
- the 16 words of the top neighbours.

The chroma passes reuse the same space. Because the RAM is single-ported,
a pass either writes to it (horizontal) or reads from it (vertical), never
both. The columns that Reg2 releases in a horizontal pass are written at
addresses chosen so that the vertical pass can read them back in its own
block order.

The vertical pass reads one word per cycle from the RAM into the filter.
In this pass, the words Reg2 releases are rows again, and they go to the
output FIFO.

### Timing

A pass of n blocks takes 4n cycles plus a 10-cycle pipeline flush. A
macroblock that moves W words in each direction finishes 2W + 41 cycles
after `start`, provided the bus keeps up. In practice the limit is the
bus: a word enters or leaves each cycle. Skip mode takes 1 cycle.

| mode | 1 | 2 | 3 | 4 | 5 | 6 | 7 | skip |
|---|---|---|---|---|---|---|---|---|
| cycles, this RTL | 361 | 297 | 297 | 233 | 273 | 169 | 169 | 1 |
| reference budget incl. 50 cycles of bS | 374 | 310 | 310 | 246 | 286 | 182 | 182 | 50 |

The bS unit needs 16 cycles. It works on the next macroblock while the
current one is filtered, because `dbf_core` takes a copy of the bS values at
`start`. Its time is therefore hidden.

Here is the arithmetic for two mode mixes. The first, a moving sequence,
is 29/8/8/3/11/11/9 % in modes 1-7 and 21 % skip. It averages 223 cycles
per macroblock (`tb_dbf_workload` measures 223.2). At 100 MHz that is about 125 frames per second of
1280x720. The second, a still sequence with 83 % skip, averages 43 cycles.

### Boundary strength

`bs_calc` gives one edge segment's bS from the two blocks' side
information. It follows the standard's rule for P slices:

| condition | bS |
|---|---|
| either block intra, on a macroblock edge | 4 |
| either block intra, inside the macroblock | 3 |
| either block has coefficients | 2 |
| different reference picture, or a motion-vector component differs by ≥ 4 quarter pels | 1 |
| otherwise | 0 |

An edge to a block that does not exist (picture border) gets 0.

`dbf_bs_unit` holds 26 side-information words that the CPU writes:

- the luma and chroma QPs of the current, left and top macroblocks;
- one `blk_info_t` per current block, and per left and top neighbour block.

It runs two `bs_calc` instances, one vertical and one horizontal segment
per cycle. It also classifies the mode. Chroma edges use the bS of the
co-located luma edge.

### The edge filter

`edge_filter` is the standard's filter, written out as logic:

- the filter-on test `bS != 0 && |p0-q0| < α && |p1-p0| < β && |q1-q0| < β`,
  with α and β indexed by the averaged QP;
- the normal filter with tC clipping for bS 1..3;
- the strong filter for bS 4;
- the chroma variant, which changes only p0 and q0.

The α, β and tC0 tables are the standard's. The slice filter offsets are
zero.

## CPU call order for one macroblock

The order matters. The bus is the only flow control, and the FIFOs are
shallow: 4 words in, 8 out.

1. Wait for `STATUS.bS_done` (bit 2) of the calculation started last time.
   Read the mode from `STATUS[6:4]`.
2. Write `CTRL` with start: `0x1`, or `0x5` when the current blocks come from
   the IQ-IDCT stream.
3. Write the next macroblock's 26 side-information words and `CTRL.calc`
   (`0x2`). This overlaps with the filtering below.
4. Write the luma words of the mode (DIN), then read the same number of
   filtered luma words (DOUT).
5. Write the chroma words, then read the filtered chroma words.
6. `STATUS.mb_done` (bit 3) is now set.

Step 4 must finish its reads before step 5 writes. The vertical luma pass
cannot start before the last luma word has arrived, and its outputs fill the
8-word output FIFO. If the CPU went on writing chroma without reading, the
4-word input FIFO would fill and both sides would wait forever. The wait
states on DOUT make reads safe to issue at any time. A read simply stalls
until its word exists.

## Direct reconstruction path

Without it, reconstructed pixels make a round trip for every current
block:

1. IQ-IDCT computes them.
2. The CPU reads them from `RES`.
3. The CPU writes them to the deblocking filter's `DIN`.

With it, the IQ-IDCT output port (`rec_valid/rec_data/rec_ready`) feeds the
filter's current-block input. The CPU then writes only the neighbour blocks
to `DIN`. A per-row route bit, set by `CTRL` bit 8 on the IQ-IDCT side,
chooses between the stream and the read-back FIFO.

There is no macroblock buffer in between, so the CPU has to produce the
current blocks in exactly the order in which the filter consumes them:

- Luma: B0..B3, B4..B7, … in raster order. The filter reads U0..U3, then
  L0 from DIN, then B0..B3 from the stream, then L1 from DIN, and so on.
- Chroma, per component: C0, C1, C2, C3, with the T and L blocks on DIN.

The CPU interleaves these bus writes. For example: it writes L0 to the
deblocking DIN, then the prediction rows and coefficient rows of B0..B3 to
the IQ-IDCT, then L1. Once the IQ-IDCT has a row ready, the filter takes it
in the same cycle. The two units then work in lockstep.

If the CPU writes a block out of order, the filter waits on the stream
while the IQ-IDCT waits on the filter, and both stall. The testbenches keep
to the order above. In the top, `rec_valid` does not depend on `rec_ready`,
so the handshake has no combinational loop.

The IQ-IDCT pipeline drains on its own: rows in flight keep moving when no
new coefficients come in. The last block of a macroblock therefore reaches
the filter without any dummy writes.

## IQ-IDCT accelerator

Coefficient rows come in one per cycle. Each row holds four 8-bit levels
and is tagged with the QP and route in force when it was written. Each row
goes through:

1. dequantisation with a flat matrix (`level × v(QP%6, pos) << QP/6`);
2. the first 1-D inverse transform (`idct4_1d`);
3. a 16-bit `transpose_array`, which gives out the previous block as columns
   while the next block goes in;
4. the second 1-D transform;
5. a second `transpose_array`, back to rows;
6. `(x + 32) >> 6`, plus the prediction row written to `PRED`, clipped to
   0..255.

The unit sustains one row per cycle. A macroblock of 24 blocks takes
96 cycles plus the pipeline fill. The measured time is 106 cycles from the
first coefficient write to the last reconstructed row.

The levels are limited to 8 bits. The testbench keeps coefficients within
the 16-bit range that a conforming stream guarantees. The DC Hadamard
stages of intra-16x16 and chroma are left to the CPU.

## Motion-compensation accelerator

For each 4x4 block, the CPU does three things:

1. Load the reference window into the 375-word (1500-pixel) memory:
   - a 9x9 luma patch, as 9 rows × 3 words, with the block's integer
     position at row 2, column 2;
   - a 3x3 patch each for Cb and Cr.
2. Write `CMD` with:
   - the window's base word;
   - the luma quarter-pel fraction (fx, fy);
   - the chroma eighth-pel fraction (dx, dy).
3. Read 16 luma pixels, then 4 Cb and 4 Cr pixels, from `OUT`. They come
   four pixels per word.

The luma engine computes the half-pel samples with shift-and-add 6-tap
filters, the centre sample from the horizontal intermediates, and the
quarter-pel samples by averaging. The chroma engine computes the
standard's bilinear eighth-pel weights.

One 4x4 iteration takes 52 cycles:

- 33 cycles to read the window into registers;
- 16 luma cycles and 2 chroma cycles;
- the handover.

A macroblock of 16 blocks takes 832 cycles.

Several windows can sit in the memory at once: up to 11 windows of 33
words. The CPU picks one with the base address, so blocks that share a
reference area need only one load. A `CMD` written while the engine is busy
waits in wait states until it is free.

## Verification

Each testbench compares against a model written independently of the RTL,
in `tb/dbf_ref_pkg.sv`, `tb/mc_ref_pkg.sv`, or inside the testbench. The
models follow the standard's text: the filter in raster order, bS from the
side information, and matrix-form IDCT.

| testbench | what it shows |
|---|---|
| `tb_edge_filter` | 180 000 random and corner edges against the reference filter |
| `tb_bs_calc` | every rule and threshold of the bS decision |
| `tb_dbf_bs_unit` | all 32 bS values, the mode, the 16-cycle latency, results held while the next macroblock is written |
| `tb_pixel_array`, `tb_transpose_array`, `tb_sp_sram` | storage behaviour; the transpose array with 8- and 16-bit elements |
| `tb_dbf_core` | all 8 modes, random gaps and back-pressure, with and without the stream input; the exact 2W + 41 latency; word counts per mode |
| `tb_dbf_workload` | two measured mode mixes (a moving and a still sequence, ~100 macroblocks each): average cycles per macroblock against the per-mode figures and the reference averages |
| `tb_dbf_accel` | the CPU call order over AHB for 40 macroblocks of still, moving and intra content, including skip |
| `tb_iqidct_accel` | QP 0..40, both routes, back-pressure, and the per-macroblock cycle count |
| `tb_mc_accel` | all 16 luma fractions and random chroma fractions, busy overlap, 52 cycles per 4x4 |
| `tb_ahb_decoder` | selection, wait-state routing and the ERROR response |
| `tb_avc_accel_top` | end to end at default parameters over one QCIF frame (99 macroblocks): every mode, the direct path and the read-back path, 16 MC iterations per macroblock, an unmapped access; counts each mechanism and fails if one never occurs. The frame takes 3213 bus cycles per macroblock, about half the budget of 1485 macroblocks/s at 10 MHz, without the CPU's software time |

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog. To run one with plain Verilator:

```
verilator --binary --timing --assert -y rtl -y tb \
  rtl/dbf_pkg.sv tb/dbf_ref_pkg.sv tb/mc_ref_pkg.sv tb/tb_avc_accel_top.sv \
  --top-module tb_avc_accel_top -o sim && obj_dir/sim
```

Replace the testbench name for any other test. The packages must come
first on the command line.

## Departures and limits

- **Clock.** There is one clock for bus and accelerators. A platform that
  clocks the accelerators slower than the bus (for example 10 MHz against
  33 MHz) needs a bridge; none is modelled.
- **AHB subset.** Word accesses only. HSIZE, HBURST and HPROT are ignored.
  Bursts are handled as back-to-back single beats. The accelerators always
  answer OKAY; only the decoder's default slave gives ERROR.
- **What the reference material fixes, and what this design chose.** The
  pass order, the block order inside a pass, the register maps, the FIFO
  depths and the 10-cycle flush are this design's own. So are the SRAM
  address layout, the side-information format and the MC window layout.
  The reference fixes the dataflow (Reg1 intermediate, Reg2 alternation,
  SRAM between the passes), the eight modes and their word counts, the
  96x32 SRAM, the 1500-pixel MC memory, and the 4x4 MC iteration.
- **Prediction path.** Predictions reach the IQ-IDCT adder only through its
  `PRED` register. The CPU copies them there from the MC output (inter) or
  from its own intra prediction. There is no direct MC → IQ-IDCT wire.
- **bS rule.** The rule is the standard's, in which one intra block is
  enough for bS 3/4. Field and MBAFF cases are not covered (baseline
  progressive only).
- **Not covered:**
  - intra prediction;
  - the DC Hadamard transforms;
  - entropy decoding;
  - frame-memory management.

  These stay in software on the CPU, as in the platform this design was
  made for.
- **Latency margin.** The per-mode latencies above are slightly lower than
  the reference budget. The bS calculation is hidden behind filtering
  rather than added to it.

Asynchronous active-low resets are used throughout. Assertions on the bus
and stream handshakes name the same reset in their disable condition, and
lint reports it as used both ways. That warning is expected.
