# H.264 deblocking filter with a skewed two-module block buffer

This is a synthesizable SystemVerilog implementation of an H.264/AVC in-loop deblocking
filter that works one 16x16 macroblock (MB) at a time. The main idea is the on-chip block buffer.
It is built from eight byte-wide dual-port SRAMs of 80 entries each, and the samples are
laid out so that one cycle can deliver any filter line: four samples on each side of a block
edge, for both vertical and horizontal edges. A four-stage edge filter therefore takes a new
line every cycle and filters one 4x4 block edge in four cycles. The 48 block edges of an MB are
visited in an order where each result block feeds straight back into the filter as the next
input, so only one new block line has to be read per cycle. Blocks shared with the next MB
stay on chip.

The processor programs the filter over APB. The filter reads and writes the picture in
SDRAM through an AHB master.

```
            APB                                              AHB
 processor ─────► apb_regs ──► dbf_ctrl ◄──────────────► ahb_master ◄──► SDRAM
                   │  binfo      │  │  ▲
                   ▼             │  │  │ fed-back q block
               bs_analyzer ──Bs──┼─►edge_filter (4 stages)
                                 │  ▲      │
                                 ▼  │      ▼ write-back
                              mem_wrapper ── sram_module x2 ── sram_dp x4 each (80x8)
```

## The working set of one MB

For each MB the buffer holds 40 4x4 blocks:

| luma   | current MB blocks 1..16 (raster order), upper neighbours A..D, left neighbours E..H |
| ------ | --- |
| Cb     | current 17..20 (2x2), upper I, J, left K, L |
| Cr     | current 21..24, upper M, N, left O, P |

That is 40 x 16 = 640 bytes, exactly the 8 x 80 bytes of the SRAMs. In the RTL each block is
a *slot* (`dbf_pkg::slot_t`, 0..39). `luma_slot()` and `chroma_slot()` translate a block
position (row -1 = upper neighbour, column -1 = left neighbour) into a slot.

## The skewed buffer (`mem_wrapper`, `sram_module`, `sram_dp`)

This is the part that makes everything else possible, and the least obvious one.

**Two modules, checkerboard placement.** The slots are split over two SRAM modules so that
any two blocks that meet at an edge are in different modules. Module 1 holds
A, C, E, 2, 4, 5, 7, G, 10, 12, 13, 15, I, K, 18, 19, M, O, 22, 23 (in that address order) and
module 2 holds the rest. Each block owns four consecutive addresses, `base = 4 * index`. The
p side and the q side of a filter line are then always read from different modules in the
same cycle. `dbf_pkg::slot_place` holds the table.

**Four lanes, diagonal skew.** A module is four byte-wide SRAMs ("lanes"), each with its
own address. Inside a block, column `c` is stored at address `base + c`, and the sample of
row `r` in that column sits in lane `(r + c) mod 4`:

```
             lane 0   lane 1   lane 2   lane 3
 base+0      (0,0)    (1,0)    (2,0)    (3,0)       (row, col)
 base+1      (3,1)    (0,1)    (1,1)    (2,1)
 base+2      (2,2)    (3,2)    (0,2)    (1,2)
 base+3      (1,3)    (2,3)    (3,3)    (0,3)
```

* A block **column**, as needed for a horizontal edge, or as one 32-bit SDRAM word, lies at
  one address across all four lanes.
* A block **row**, as needed for a vertical edge, lies at four different addresses, one per
  lane. Each lane gets address `base + ((lane - row) mod 4)`.

Either way the four samples are in four different lanes and come out in one cycle. After
the read, the wrapper rotates the lanes back by the line number (`rd_k`), so `fr_q` is
q0..q3 and `fr_p` is p0..p3, both counted from the edge outwards. Writes go through the
same mapping in reverse. `tb_mem_wrapper` loads the sample numbers 1..80 into blocks
A, B, E, 1 and 2 and checks every lane and address against the expected pattern. For
example, lane 0 of module 1 holds 1, 8, 11, 14 at addresses 0..3.

**Port use.** Port A of every SRAM only reads: filter lines, or block columns for the store
to SDRAM. Port B only writes: filtered lines, or block columns loaded from SDRAM. Two
assertions check that the filter and the external path never want the same port in the
same cycle.

**Write-through.** In one place the filtering order reads a line in the very cycle in
which the last line of an earlier filtering is written back to the same address. The
second chroma row (L|19, 19|20) is followed by the first horizontal chroma edges. Line 0 of
17|19 reads column 0 of block 19 while row 3 of block 19, from L|19 line 3, is being written.
A plain dual-port SRAM would return the old byte. The wrapper therefore registers, per lane,
"port B wrote the address port A read" together with the written byte, and returns that byte
instead. This forwarding is this design's own addition.

## Filtering order and the feedback path (`dbf_ctrl`, `dbf_pkg::edge_desc`)

The 48 filterings of an MB run in this order (p|q):

| # | edges |
| --- | --- |
| 0-15  | luma vertical edges, row by row: E\|1, 1\|2, 2\|3, 3\|4, then F\|5 ... H\|13 ... 15\|16 |
| 16-31 | luma horizontal edges, column by column: A\|1, 1\|5, 5\|9, 9\|13, then B\|2 ... 12\|16 |
| 32-35 | Cb vertical: K\|17, 17\|18, L\|19, 19\|20 |
| 36-39 | Cb horizontal: I\|17, 17\|19, J\|18, 18\|20 |
| 40-47 | Cr, same as Cb with M, N, O, P and 21..24 |

This is the same result as the standard order: all vertical edges of a plane before its
horizontal ones, left to right and top to bottom. Within a row or column of edges, the q
block of one filtering is the p block of the next (*a chain*). A filtering is four lines
issued in four consecutive cycles, and the filter latency is exactly four cycles. So line
`k` of the q block leaves the filter in the same cycle in which line `k` of the next
filtering enters it. The controller mux (`f_p`) then takes p from the filter output and
reverses q0..q3 into p0..p3, instead of reading p from SRAM. Per cycle the controller:

* reads one q line, or a p and a q line at the start of a chain;
* writes back the finished p line, and also the q line at the end of a chain.

Pipeline timing for a line issued in cycle I:

| cycle | what happens |
| --- | --- |
| I   | SRAM addresses (`fr_*`) |
| I+1 | SRAM data, filter stage-1 input, Bs query to the analyser, QP/indexA/B computed (`l0`) |
| I+3 | Bs arrives, used by filter stage 3 |
| I+5 | filter output; p written back (`fw_*`), q fed back to the line issued in I+4 |

Edges that must not be filtered (picture or slice borders, selected by `filter_left` and
`filter_top`) still go through the pipeline with Bs forced to 0. The timing never changes.
An assertion (`a_feedback_source`) checks that every fed-back line comes from the same line
of the previous filtering of the chain. The filtering phase takes exactly 48 x 4 = 192
cycles. The end-to-end test checks this.

## The edge filter (`edge_filter`) and Bs (`bs_analyzer`)

`edge_filter` implements the H.264 luma and chroma edge filters for one line of 4+4 samples,
one line per cycle, in four register stages:

1. alpha, beta and tC0 table lookups from indexA/indexB; absolute differences |p0-q0|,
   |p1-p0|, |q1-q0|, |p2-p0|, |q2-q0|.
2. threshold compares; the bS=4 strong and weak candidate values.
3. Bs arrives here: selects bS<4 or bS=4, computes tc and the clipped delta values.
4. final Clip1 and the output registers.

The Bs that arrives in stage 3 belongs to the line that entered two cycles earlier. That is
exactly the analyser's two-cycle latency, so Bs costs no extra cycle. Chroma lines change
only p0 and q0, with tc = tC0 + 1.

`bs_analyzer` derives Bs in two registered steps from the per-block information that the
processor writes: intra flags of the current, left and upper MB, and per 4x4 luma block a
non-zero-coefficient flag, a reference id and a motion vector. The rules are the
frame-coding ones: 4 for intra at an MB edge, 3 for intra, 2 for coefficients, 1 for a
different reference or a motion difference of at least 4 quarter samples, else 0. A chroma
line uses the Bs of the luma line at the same position. The controller maps chroma line `k`
of chroma block row `pos` to luma block row `2*pos + k/2`.

## Keeping the right column on chip

When the next MB is the right neighbour (`keep_right`), the right-column blocks 4, 8, 12, 16
(luma) and 18, 20, 22, 24 (chroma) are not stored. After the store phase the controller copies
them (a 33-cycle read/write copy) into the slots of E, F, G, H, K, L, O, P. The next MB is then
started with `reuse_left`, so its left neighbours are not loaded. The relocated blocks still
have to reach SDRAM eventually: an MB with `reuse_left` stores its left neighbours after
filtering its left edge.

## SDRAM layout and the AHB side (`ahb_master`)

A 32-bit word carries one column of four vertically adjacent samples: byte r = row r. Each
plane is stored as 4-row *strips*. A strip is a run of words, one per sample column, and
`YSTRIDE` / `CSTRIDE` is the byte distance from one strip to the next. With this layout,
one AHB INCR burst loads or stores a whole row of blocks, including its left neighbour. The
burst word goes directly into, or comes directly from, one block column of the buffer.

Per MB there are up to 11 bursts in each direction:

* luma: the upper strip plus four strips of 16 (+4) words;
* Cb: the upper strip plus two strips of 8 (+4) words;
* Cr: the same as Cb.

The upper strips are moved only when `filter_top` is set. The left neighbour columns are
loaded only when `filter_left` is set and `reuse_left` is not. Left columns are stored when
either is set. With `keep_right`, the right block column is left out of the store.

`ahb_master` is a single AHB-Lite master. Address phases are NONSEQ then SEQ, HSIZE=word,
HBURST=INCR. The address and data phases are pipelined, and HREADY wait states are honoured.
There is no support for ERROR responses or for arbitration.

## Register map (`apb_regs`, APB3, no wait states)

| offset | name | bits |
| --- | --- | --- |
| 0x00 | CTRL | W: bit0 start, bit1 end (abort the current MB) |
| 0x04 | STATUS | bit0 busy, bit1 done (sticky, write 1 to clear, also cleared by start); `irq` = done |
| 0x08 | MBCFG | bit0 filter_left, bit1 filter_top, bit2 reuse_left, bit3 keep_right, bit4 intra_cur, bit5 intra_left, bit6 intra_top |
| 0x0C | QPY | [5:0] current, [13:8] left, [21:16] upper MB luma QP |
| 0x10 / 0x14 | QPCB / QPCR | same layout, chroma QPs already mapped through the chroma QP table |
| 0x18 | OFFSET | [4:0] FilterOffsetA, [12:8] FilterOffsetB (two's complement) |
| 0x1C / 0x20 / 0x24 | YADDR / CBADDR / CRADDR | byte address of the MB's first strip word (column 0 of the MB, row 0) |
| 0x28 / 0x2C | YSTRIDE / CSTRIDE | bytes between strips |
| 0x30 | CYCLES | clock cycles taken by the last MB |
| 0x40 + 4i | BINFO[i] | i = 0..15 current blocks (raster), 16..19 A..D, 20..23 E..H: [0] nz, [5:1] ref, [18:6] mvx, [31:19] mvy |

An unmapped address gives PSLVERR. The processor works out edge enables, QPs and
addresses. For each MB, in raster order, it does the following:

1. Write the registers.
2. Write CTRL.start.
3. Wait for done.

Inside a row of MBs, set `keep_right` on every MB but the last, and `reuse_left` on every MB
but the first.

## Speed

| | cycles per MB |
| --- | --- |
| filtering phase (48 x 4) | 192 |
| measured, 3x2-MB test picture, 4-cycle SDRAM row activation, 5 % random extra wait states | 489 - 614 |
| target of the original architecture, phases overlapped, with block reuse | 357 |
| same, without block reuse | 408 |

The difference comes from the controller. It runs load, filter, store and relocation one
after the other. The original architecture overlaps them block by block. It starts
filtering as soon as E and 1 are on chip, and stores blocks while later edges are still
being filtered, which needs careful stalls wherever a filtering would overwrite a block that
is not yet stored. The buffer, the filter pipeline and the filtering order here would
support such a schedule. Only the sequencing in `dbf_ctrl` would change.

## Departures and own choices

* **Phases are not overlapped** (see Speed). This is the main functional gap.
* **Write-through forwarding** in the buffer (see above). It is needed because filtering
  goes back to back without bubbles.
* The register map, the APB/AHB protocol details, the SDRAM strip layout and the BINFO
  format are this design's own. The original only says that the processor sends start/end
  commands and Bs information over APB, and that the data moves in 32-bit words of four
  samples.
* "End" is taken to mean abort.
* Bs follows the frame-coding rules with one reference list. There is no field/MBAFF
  mixed-edge handling and no 8x8-transform edge skipping. The processor disables edges at
  picture and slice borders.
* One clock for the whole design.
* `sram_dp` is written as an inferred memory array. For an ASIC, replace it with an 80x8
  dual-port macro. It has synchronous read, and port B wins a same-address write collision;
  this never happens because port A never writes.

## Files

`rtl/`

* `dbf_pkg.sv`: types, block slots and placement, the filtering sequence, alpha/beta/tC0 tables
* `edge_filter.sv`, `bs_analyzer.sv`: datapath
* `sram_dp.sv`, `sram_module.sv`, `mem_wrapper.sv`: buffer
* `apb_regs.sv`, `ahb_master.sv`: bus interfaces
* `dbf_ctrl.sv`: sequencer
* `dbf_top.sv`: top level, no parameters

`tb/`: one self-checking testbench per block, and the following helpers:

* `dbf_ref_pkg.sv`: an independent reference filter and Bs model
* `ahb_sdram_model.sv`: behavioural AHB SDRAM with row-activation waits

`tb_dbf_top` is the end-to-end test. It acts as the processor for a 3x2-MB picture with
random content, QPs, intra MBs and motion. It compares the whole picture in SDRAM with a
reference deblocking in the standard order. It also requires that every mechanism occurred
at least once:

* feedback of the shared block;
* left reuse and relocation;
* write-through;
* an MB aborted by the end command during its load and then restarted;
* all Bs values 0..4;
* disabled edges;
* chroma lines;
* SDRAM wait states.

Every testbench prints `TB_RESULT checks=N failures=M`. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dbf_pkg.sv tb/dbf_ref_pkg.sv tb/tb_dbf_top.sv --top-module tb_dbf_top -o sim
./obj_dir/sim
```

Replace `tb_dbf_top` with `tb_edge_filter`, `tb_bs_analyzer`, `tb_sram_dp`,
`tb_sram_module`, `tb_mem_wrapper`, `tb_apb_regs` or `tb_ahb_master` for the unit tests.
The testbenches read no files, and all state the design reads is reset, so the tests also
pass with random initial values (`+verilator+rand+reset+2`).

Remaining lint warnings are limited to the following:

* unused package constants, function arguments and struct fields, seen from modules
  that only use part of it;
* the reset net also appearing in the `disable iff` of assertions.
