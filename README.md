# Progressive, adaptive acquisition of image macro blocks

Reading a whole image block from external memory costs memory time and
energy, and much of an image is smooth enough that most of its pixels can be
predicted from a few neighbours. This design replaces the plain address
counter of an image memory interface with a block that reads pixels
*progressively*: first a coarse grid, then more pixels only where the content
varies. The pixels it does not read are filled in by bilinear interpolation,
and the reconstructed block is left in a local buffer for the client that
needs it. A single threshold trades image quality against the number of
memory reads.

The RTL follows the structure of the hardware described in the paper "Image
Progressive Acquisition for Hardware Systems": a refine unit, an address
translator, interpolation units, five queues and a small state machine, plus
a mapper that turns each pixel request into a DRAM page and column. It works
on 17 x 17 macro blocks of 8-bit grey pixels. The paper describes the
units and how they interact, but not their internals, widths or handshakes.
Those are this design's own, and are listed in
[Departures and own choices](#departures-and-own-choices).

## The refinement procedure

A macro block is 17 x 17 pixels, so a square of side 16 with its four corners
spans it exactly. The design describes every square sub-block by its
**anchor** (upper-left pixel) and its **level** *L*. A level-*L* block has
side *s* = 2^*L*: level 4 is the whole macro block, level 1 is a 3 x 3 patch.
The four vertices of every block in play have already been read.

1. **Seed.** Read the pixels on the initial grid (step 16 by default, so the
   four corners) and make one level-4 block.
2. **Score.** For each block of the current level compute the priority score

       score = s * s * (max(vertex values) - min(vertex values))

   This is the block's area times the spread of its corner values. A large,
   uneven block scores high. A small or flat one scores low.
3. **Split or keep.** A block whose score is *higher than* the threshold is
   refined. The five pixels that split it into four (the four edge midpoints
   and the centre) are read, and its four children join the next level's
   list. All other blocks are done: they will be interpolated from their four
   corners.
4. **Next level.** When every block of the level has been handled and all
   requested pixels have arrived, move one level down and repeat from step 2
   with the children. Sampling ends when a level produces no children. That
   happens at the latest after level 1, whose children would contain no
   unread pixel.

Unlike a "best block first" scheme, this refines *every* block of the current
level that exceeds the threshold before moving on. The memory therefore sees
a batch of requests per level, not one scattered request at a time. The
result equals what best-first refinement gives when it is stopped at the same
threshold.

Examples from the end-to-end test: a flat block costs 4 reads, a smooth ramp
about 81, and pure noise all 289. On a synthetic 527 x 527 image
(`tb_ipa_image`) the design reads 2.8 %, 6.1 % and 17.5 % of the pixels at
thresholds 1800, 600 and 150, for a PSNR of 28.9, 30.2 and 37.3 dB.

## Block structure

```
                 start, thr                         pixel requests
                     |                        +--> FIFO_E --> addr_map --> req_*
              +--------------+                |
              | state_machine|--switch_sig--+ |        pixels returned
              +--------------+              | |   resp_valid/pos/data
                                            v |              |
 FIFO q0 <==> +-------------+  FIFO_A   +-------------+      v
              | connection  |---------->| refine_unit |  +--------------+
 FIFO q1 <==> | interchange |<--+       +-------------+  | local_buffer |
              +-------------+   |  score>thr |   | else  |   (canvas)   |<-- cl_pos
                         FIFO_B |            v   v       |              |--> cl_data
                                |       FIFO_C  FIFO_D   +--------------+
                                |         |       |  \         ^   ^
                      children  |         v       v   v        |   |
                                +-- addr_translator  interp_unit x2 (writes)
```

* **refine_unit** takes a block from FIFO_A and reads its four vertices from
  the canvas. It computes the score and pushes the block into FIFO_C (refine)
  or FIFO_D (interpolate). Two cycles per block.
* **addr_translator** takes a block from FIFO_C. It pushes the five split
  positions into FIFO_E and the four children into FIFO_B. Children of side 1
  are not queued. Six cycles per block. It also lays down the seed grid. It
  keeps one "requested" bit per pixel: a midpoint on an edge shared by two
  refined neighbours is read only once.
* **FIFO_A / FIFO_B** are two physical queues, q0 and q1. The **connection
  interchange** routes one to the refine unit (as FIFO_A, read) and the other
  to the translator (as FIFO_B, write). At the end of each level the state
  machine toggles `switch_sig`, and the children just produced become the
  next level's work list without being copied.
* **interp_unit** (two by default) takes a block from FIFO_D, loads its four
  corners, and writes every pixel of the block with the bilinear value,
  rounded to nearest. It writes one pixel per cycle: (s+1)^2 + 2 cycles per
  block. The units share FIFO_D. Unit *k* may take a block only while all
  units before it are busy, so two units never pop at once. They run while
  sampling is still going on.
* **local_buffer** is the 17 x 17 canvas, with a combinational read port for
  the refine unit's vertices, four per interpolation unit and one for the
  client.
* **addr_map** sits on FIFO_E's output and gives each request its DRAM page
  and column. With linear mapping a page is one image row; with block
  mapping (the default) a page is one macro block, and the column is the
  offset y * 17 + x inside it.
* **state_machine** sequences clear, seed, levels, the FIFO swap, the end of
  sampling and the end of interpolation. It counts reads in flight.

## Why the canvas keeps a tag per pixel

The hardest part of the design to reason about is a pixel on the border
between blocks. Take a level-3 block that was kept (interpolated from its
corners 8 pixels apart). Its neighbour was refined, so the midpoint of their
common edge was read, and the neighbour's children interpolate that edge from
corners 4 pixels apart. Both blocks want to write the same edge pixels, with
different values. Which one wins would depend on which interpolation unit got
there last.

The canvas therefore stores, for every pixel, a 3-bit tag:

| tag | meaning |
|-----|---------|
| 0 | read from memory. Never overwritten by interpolation. |
| 1..4 | written by interpolation of a block of that level |
| 7 | empty since the last clear |

An interpolated write is stored only if its block's level is not coarser
than the tag. A sample always wins, even if it arrives after the pixel was
interpolated. In the same cycle, a sample beats every interpolated write;
among interpolated writes the finer level wins, then the lower port. Two
blocks of the *same* level agree on their common edge, because bilinear
interpolation along an edge depends only on the edge's two end points. So the
final canvas is a function of the image and the threshold only, whatever the
order of memory returns and interpolation. That is what lets the tests
compare it bit for bit with a reference model.

## Interface and timing (ipa_top)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | one-cycle pulse: acquire one macro block (taken when `busy` is low) |
| `thr` | in | 16 | score threshold; captured at the start of every level |
| `busy` | out | 1 | from `start` until `done` |
| `sampling_done` | out | 1 | no more memory reads will be issued; cleared by the next `start` |
| `done` | out | 1 | one-cycle pulse: the canvas is complete |
| `mb_x`, `mb_y` | in | 8, 8 | column and row of the macro block in the image, in macro blocks; captured with `start` |
| `req_valid`, `req_ready`, `req_pos` | out/in/out | 1/1/10 | valid-ready stream of pixel positions `{x, y}` (5 bits each, 0..16, x = column) |
| `req_page`, `req_col` | out | 16, 16 | DRAM page and column of the request (see `MAPPING`) |
| `resp_valid`, `resp_pos`, `resp_data` | in | 1/10/8 | a returned pixel, with its position; any order, any latency |
| `cl_pos` → `cl_data`, `cl_sampled` | in → out | 10 → 8, 1 | combinational client read of the canvas; `cl_sampled` marks pixels read from memory |
| `n_sampled` | out | 9 | pixels read in this acquisition |
| `n_iter`, `lvl` | out | 4, 3 | levels processed, current level |

Each request carries both its position inside the macro block and its DRAM
page and column. The surrounding memory interface splits the page into bank
and row bits, issues the commands, and sends each pixel back with its
position. It must answer every request exactly once; an
assertion in the state machine flags a return that was never requested.
Because `thr` is re-read at each level, a controller may raise it during an
acquisition, for example when memory bandwidth runs short.

A level ends only when FIFO_A is empty, the refine unit and translator are
idle, FIFO_C and FIFO_E are empty and every read has returned. The next level
therefore scores only pixels that are already in the canvas. Interpolation
overlaps with all of this. `done` waits for FIFO_D to drain and both units to
go idle.

On the synthetic 527 x 527 image (961 macro blocks) at one pixel per cycle
and 4 cycles read latency. "Memory busy" and "to completion" are summed over
all macro blocks; a full read takes 277 729 cycles. Page switches count how
often consecutive requests fall in different DRAM pages: with block mapping
a full read opens 961 pages, with linear mapping 16 337 (17 rows per macro
block).

| thr | pixels read | PSNR | memory busy | to completion | pages, block mapping | pages, linear mapping |
|-----|-------------|------|-------------|---------------|----------------------|-----------------------|
| 1800 | 2.8 % | 28.9 dB | 34 430 | 283 170 | 961 | 4 251 |
| 1300 | 4.1 % | 29.2 dB | 50 533 | 225 754 | 961 | 6 500 |
| 900 | 4.9 % | 29.4 dB | 61 130 | 215 801 | 961 | 7 860 |
| 600 | 6.1 % | 30.2 dB | 76 165 | 223 622 | 961 | 9 799 |
| 400 | 7.3 % | 31.7 dB | 86 572 | 230 956 | 961 | 11 931 |
| 300 | 7.7 % | 32.4 dB | 92 644 | 236 101 | 961 | 12 838 |
| 200 | 12.8 % | 34.6 dB | 101 955 | 241 822 | 961 | 20 901 |
| 150 | 17.5 % | 37.3 dB | 126 895 | 271 106 | 961 | 29 221 |

Memory is freed after a fraction of the time a full read would take. The total
time is dominated by interpolation, which writes one pixel per cycle per unit.
A block kept at level 4 occupies one unit for 291 cycles, which is why the
highest threshold is not the fastest overall. More interpolation units
(`NUM_INTERP`) shorten this. Block mapping suits the block: it reads each
macro block from one page, whatever the threshold. With linear mapping the
jumps between rows cost page switches, and below a threshold of about 200 the
block switches pages more often than a plain row-by-row read would.

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `MAX_LVL` | 4 | `ipa_pkg` | largest level; macro block side 2^MAX_LVL + 1 = 17 |
| `PW` | 8 | `ipa_pkg` | pixel width |
| `NUM_INTERP` | 2 | `ipa_top` | interpolation units |
| `INIT_LVL` | 4 | `ipa_top` | level of the seed grid (4: the four corners; 3: a 3 x 3 grid) |
| `AB_DEPTH` | 64 | `ipa_top` | depth of each of the two block-list queues; 64 is the most blocks one level can produce |
| `C_DEPTH`, `D_DEPTH`, `E_DEPTH` | 16 | `ipa_top` | other queue depths; any depth works, since all queues apply back-pressure |
| `MAPPING` | 1 | `ipa_top` | image storage: 0 linear (page = image row), 1 block (page = macro block) |
| `MB_PER_ROW` | 31 | `ipa_top` | macro blocks per image row (527 / 17), used by block mapping |

Changing `MAX_LVL` changes the macro block size and every derived width in
the package.

## Files

| file | content |
|------|---------|
| `rtl/ipa_pkg.sv` | constants, `pos_t`, `block_t`, helpers |
| `rtl/ipa_top.sv` | top: all units wired as above |
| `rtl/refine_unit.sv`, `rtl/addr_translator.sv`, `rtl/interp_unit.sv` | datapath units |
| `rtl/sync_fifo.sv`, `rtl/conn_interchange.sv` | queues and the A/B swap |
| `rtl/state_machine.sv`, `rtl/local_buffer.sv` | control and canvas |
| `rtl/addr_map.sv` | pixel position to DRAM page and column |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_ipa_image.sv` | whole 527 x 527 image at eight thresholds, 1800 to 150 |
| `tb/tb_ipa_config.sv` | end-to-end test with a level-3 seed grid, three interpolation units and linear mapping |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends by itself.
Each one has a cycle watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ipa_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/ipa_pkg.sv tb/tb_ipa_top.sv
./obj_dir/Vtb_ipa_top
```

Replace `tb_ipa_top` with any other testbench name. All of them run in
seconds at the default parameters.

* `tb_ipa_top` is the end-to-end test. It acquires five kinds of generated
  block (disk on gradient, noise, ramp, flat, mixed quadrants) at thresholds
  0, 150, 300, 600 and 1800 and at random ones, against a memory model with
  random stalls, random latency and out-of-order returns. It also runs a
  slow-memory phase that fills FIFO_E. A last phase raises the threshold at
  every level. A reference model reruns the refinement
  with plain queues and rebuilds the expected canvas. Every pixel, every
  sampled flag, the read count (no pixel read twice), the number of levels,
  the DRAM page and column of every request, and a cycle budget are checked. It fails if any mechanism never occurred:
  refinement, interpolation, FIFO swap, duplicate read suppressed, FIFO_E
  full, second interpolation unit used, out-of-order return, threshold
  raised between levels.
* `tb_ipa_config` repeats the end-to-end test with `INIT_LVL = 3` and
  `NUM_INTERP = 3`, with linear mapping of a 20 macro block wide image. It
  also fails if the third unit is never used.
* `tb_ipa_image` produces the table above and checks every pixel of the eight
  reconstructions against the reference model. Its memory holds the image
  block mapped and fetches each pixel by the request's page and column.
* The unit testbenches check each module against its own model, including
  the cycle counts stated above (2 cycles per refine decision, 6 per
  translated block, (s+1)^2 + 2 per interpolated block).

## Departures and own choices

These follow the paper:

* the split into refine unit, address translator, interpolation units, state
  machine, connection interchange and queues FIFO_A to FIFO_E;
* the score (area times corner range), the strict "higher than threshold"
  test, and refining every qualifying block of a level before halving the
  step;
* the FIFO_A/FIFO_B swap between levels;
* bilinear filling, two interpolation units, and the chaining of one unit's
  busy to the next unit's enable;
* 17 x 17 macro blocks of 8-bit pixels and a threshold range up to 1800;
* linear mapping (one image row per page) and block mapping (one macro block
  per page).

These are this design's own:

* all widths, queue depths and handshakes, and the show-ahead queues;
* the request/return interface, with the position returned alongside the
  data;
* seeding at level 4 (only the four corners);
* the split-pixel order, and the suppression of duplicate reads on shared
  edges;
* the end-of-level condition, which waits for all reads to return;
* re-reading the threshold at every level;
* the page numbering (row-major macro blocks) and the in-page order
  (row-major pixels) of both mappings;
* the tagged canvas and its finest-block-wins rule;
* rounding to nearest in interpolation;
* interpolation running during sampling rather than after it;
* the cycle timing of every unit.

The paper's queue storage totals 2160 bits. The defaults here total 2240 bits
(two 64 x 13, two 16 x 13, one 16 x 10), because the paper gives no split
between the queues.

Outside the block, and not part of this RTL: the external memory, the
command generator that turns pages and columns into memory commands, and the client
(for instance an image encoder) that reads the canvas. The testbenches model
the memory and play the client. The benchmark photographs used to evaluate
the original design are not included; the image test generates a synthetic
image of the same size instead.
