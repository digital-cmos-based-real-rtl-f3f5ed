# Cell-network picture segmentation in digital CMOS

This is synthesizable SystemVerilog for a picture-segmentation chip that splits a colour or
gray-scale picture into regions of similar pixels fast enough for video. It puts one small
processor, an *active cell*, on every pixel, and grows all pixels of a region in parallel. The
method is a digital, simplified form of an oscillator network with local excitation and global
inhibition. Only one thing changes between colour and gray-scale pictures: how the weight
between two neighbouring pixels is computed.

The architecture follows a published design from Hiroshima University (Morimoto, Harada, Koide,
Mattausch, 2003). That publication gives the block structure, the algorithm and the cell
datapath. It does not give the encodings, the handshakes or the control sequencing; those are
choices made for this RTL, and they are listed in [Own choices](#own-choices-and-where-they-matter).
The default size is 10 x 10 pixels, the size of the published test chip's cell network.

## The algorithm

1. **Connection weights.** Each pixel has 8 neighbours. For each neighbouring pair `i, k` and
   each colour channel, the weight is `W = 255 / (1 + |I_i - I_k|)`. A colour weight is the
   minimum of the R, G and B weights, so two pixels are strongly connected only if they agree
   in every channel. A gray-scale weight uses the luminance alone.
2. **Leader cells.** A pixel is a *leader* when the sum of its 8 weights is larger than the
   threshold `phi_p`. Leaders lie inside uniform areas, and each one can seed a region.
3. **Segmentation.** The steps below repeat for one segment at a time:
   * *self-excitation*: one free leader becomes excited (`x = 1`);
   * *excitation*: a free pixel becomes excited when `sum_k W_ik * x_k > phi_z`, summed over
     its excited neighbours. All pixels do this in parallel, once per clock cycle, until a cycle
     adds no pixel;
   * *inhibition*: the finished segment is switched off (`x = 0`), and its pixels store the
     segment number and drop out of later rounds.

   Segmentation ends when no free leader is left. Pixels that no segment reached get segment
   number 0.

## Data flow through the chip (`seg_chip`)

```
 pixel columns --> weight_calc_circuit --> leader_calc_circuit --> cell_network --> restore_circuit --> result columns
 (RGB, ROWS rows)   stage 1: weights       stage 2: leaders,        stage 3:           stage 4: column
                                            column-wise loading      seg_controller     read-out
                                                                     drives it
```

* **Stage 1, `weight_calc_circuit`.** This stage needs two neighbouring columns at a time. Each
  row slice keeps the previous column's pixel in registers. It has six channel weight units
  (`weight_unit`, two pixel pairs x R/G/B) and two 3-input minimum circuits (`min_select`). A
  phase bit steers the pixel-pair selection:
  * phase 0 gives the horizontal weight `h` (row j, columns i-1 and i) and the vertical weight
    `v` (rows j and j+1 of column i);
  * phase 1 gives the two diagonals, `d1 = (j,i-1)-(j+1,i)` and `d2 = (j+1,i-1)-(j,i)`.

  One column is therefore accepted every 2 cycles. Weights to pixels outside the picture are 0.
* **Stage 2, `leader_calc_circuit`.** The weights to a pixel's right-hand neighbours arrive
  with the next column. This stage therefore keeps one weight record and decides the leader
  flags of column i-1 when column i arrives, with all rows summed in parallel. It also turns
  each record into a *load word* for one column of weight registers in the network. After the
  last column it adds one word for the right border.
* **Stage 3, `cell_network` + `seg_controller`.** This stage holds the array of cells and
  weight registers described below. The controller broadcasts one command per cycle.
* **Stage 4, `restore_circuit`.** This stage reads the stored segment numbers one column per
  cycle, all rows at once, and emits them on `out_valid / out_col / out_label`.

The frames are not overlapped. After the last column of a frame has been accepted, `in_ready`
stays low until the frame's results have been sent out (`frame_done`).

## Weight-register blocks: how weights are shared

This is the least obvious part of the design. Weights are not stored in the cells. They sit in
*weight-register blocks* (`wrb`), one at every corner point of the pixel grid. This gives
(ROWS+1) x (COLS+1) blocks, and the blocks on the outer ring hold zeros. Block (a,b) lies
between cells (a-1,b-1), (a-1,b), (a,b-1) and (a,b), and holds four 3-bit registers:

```
   cell(a-1,b-1) ---r2(H)--- cell(a-1,b)        r0: main diagonal  (a-1,b-1)-(a,b)
        |     \             /    |              r1: anti-diagonal  (a-1,b)-(a,b-1)
      r2(V)    r0         r1   r3(V)            H block (a+b even): r2 top edge, r3 bottom edge
        |     /             \    |              V block (a+b odd):  r2 left edge, r3 right edge
   cell(a,b-1)  ---r3(H)---  cell(a,b)
```

Horizontal (H) and vertical (V) blocks alternate like a checkerboard. As a result, every
horizontal edge is stored in exactly one of the two blocks that touch it, and so is every
vertical edge. Every cell gets exactly two weights from each of its four surrounding blocks:
one diagonal and one orthogonal, which makes 8 in all. A block's *output selection* gates each
weight with the state `x` of the cell at the other end. A cell therefore receives `W_ik * x_k`
and only has to add.

The segment number is 6 bits wide. It is written into registers 3 and 0 of the cell's
upper-left block. Those two registers hold weights of that same cell (its diagonal to the upper
left and one orthogonal edge). The cell's `x` stays 0 once it is labelled, so these weights are
never needed again, and no weight between two unlabelled cells is overwritten.

## The active cell

`active_cell` is the weight-parallel ("high-speed") version of the cell. Its datapath:

* eight decoders (`weight_decoder`, 3-bit code -> 8-bit value `2**code`, 0 for code 0);
* an adder tree of 8-, 9- and 10-bit adders that gives an 11-bit sum `S_i` (at most 1024);
* a 12-bit subtractor that computes `phi_z - S_i`. Its sign bit means "excite".

It has four flag registers:

| flag | meaning |
|------|---------|
| `x`  | excited; sent to the surrounding blocks |
| `p`  | leader |
| `l`  | member of the segment being grown |
| `n`  | already segmented |

Commands (`seg_pkg::cell_cmd_e`), each completed at the next clock edge:

| command        | effect |
|----------------|--------|
| `CMD_SELF_EXC` | the first free leader on the priority chain (`pre` low, `p & ~n`) sets `x`, `l` |
| `CMD_EXCITE`   | a cell that is free and not excited, with the sign bit set, sets `x`, `l` and raises `z_i` |
| `CMD_INHIBIT`  | `x` cleared everywhere |
| `CMD_LABEL`    | cells with `l` write the segment number into their block, set `n`, clear `l`, `p` |

### Weight-serial cell (`SERIAL = 1`)

`active_cell_serial` is the high-density alternative. It trades speed for area by using one
decoder, one adder and an accumulator register instead of eight decoders and an adder tree. An
excitation step takes 9 cycles, counted by the controller on `step_phase`:

* phase 0 loads `-phi_z` into the accumulator;
* phases 1..8 each add one neighbour's decoded weight;
* in phase 8 the sign of the final sum decides the excitation.

The flags and the other commands behave exactly as in the parallel cell. Set the `SERIAL`
parameter on `seg_chip` to select the cell.

### Chain and global inhibitor

The priority chain runs through the cells in column-major order. Its end, `any_leader`, tells
the controller whether a free leader is left. The OR of all `z_i` is the global inhibitor `z`,
which tells the controller whether the last excitation step added a pixel.

## Timing

* Input: one column every 2 cycles (continuous `in_valid`).
* Segmentation: a segment whose growth took k steps costs `k + 4` cycles:
  * 1 self-excitation;
  * k excitation steps, plus one more that finds no new pixel;
  * 1 inhibition;
  * 1 labelling.

  One more cycle at the end finds that no leader is left.
  With the weight-serial cell a segment costs `9 (k + 1) + 3` cycles instead.
* Read-out: COLS cycles.
* Latency from the clock edge that accepts the last column to the edge that raises
  `frame_done`: `5 + (segmentation time) + COLS` cycles. In the test frames at 10 x 10 this is
  between 16 and about 300 cycles with the parallel cell. A 10 x 10 two-colour checkerboard is
  the slowest kind of picture, because segments can only grow diagonally. It takes 42 cycles
  with the parallel cell and 202 with the serial cell (2 segments, 18 growth steps).

## Interface of `seg_chip`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `gray_mode` | in | 1 | 1: gray-scale (luminance on the R channel); 0: colour |
| `phi_p`, `phi_z` | in | 11 | leader and excitation thresholds (sums of decoded weights, 0..1024) |
| `in_valid`, `in_ready` | in/out | 1 | column handshake. A column must be held until `in_ready`. |
| `in_col[ROWS]` | in | 24 each | RGB pixels of one column, top row first (`seg_pkg::rgb_t`) |
| `out_valid`, `out_col` | out | 1, clog2(COLS+1) | result column and its index |
| `out_label[ROWS]` | out | 6 each | segment numbers 1..63, 0 = no segment |
| `frame_done` | out | 1 | pulse with the last result column |
| `overflow` | out | 1 | a free leader was left when all 63 numbers were used |
| `busy` | out | 1 | a frame is in progress; no input accepted |

The parameters are `ROWS` and `COLS` (default 10 and 10) and `SERIAL` (default 0, the
weight-parallel cell).

## Own choices, and where they matter

The points below are not fixed by the published description; each is a choice made for this
RTL:

* **Weight code.** The weight is kept as a 3-bit code `floor(log2(W))`, with `W < 2` giving 0.
  The decoder returns `2**code`. So a weight is rounded down to a power of two, and pixel
  differences above 127 count as no connection at all. The unit needs no divider: code `c` is
  reached when `(1 + |a-b|) << c <= 255`.
* **Gray-scale mode** is a `gray_mode` input that uses the first channel only. Any other way of
  feeding luminance would work as well.
* **Segment numbers** are 6 bits wide, so at most 63 segments fit in a frame. More would need
  wider storage than the two registers used.
* **Leader order** is column-major. Which leader seeds a region changes the segment numbers but
  not the regions, except where regions compete for the same pixels.
* **Load and read ports, the controller state machine, the frame-level blocking and the reset**
  are all this design's.
* **Four flag registers.** The published text speaks of three 1-bit registers per cell, while
  its cell drawings show four. Four are used here.
* **Weight-serial phases.** The order of the 9 phases of the weight-serial cell is this
  design's. So is its 12-bit accumulator, which prevents overflow when an 11-bit threshold
  meets an 11-bit sum.
* **Off-chip memories.** The input frame memory and the result memory are off-chip and are not
  part of the RTL. The streaming ports stand in their place.

## Files

* `rtl/seg_pkg.sv`: widths, pixel struct, cell command enum.
* `rtl/weight_unit.sv`, `rtl/min_select.sv`, `rtl/weight_calc_circuit.sv`: stage 1.
* `rtl/weight_decoder.sv`, `rtl/leader_calc_circuit.sv`: stage 2.
* `rtl/wrb.sv`, `rtl/active_cell.sv`, `rtl/active_cell_serial.sv`, `rtl/cell_network.sv`,
  `rtl/seg_controller.sv`: stage 3.
* `rtl/restore_circuit.sv`: stage 4.
* `rtl/seg_chip.sv`: top level.
* `tb/seg_ref_pkg.sv`: an independent reference model of the whole algorithm. It uses division
  and logarithm loops for the weights and grows segments in a plain loop over a pixel array.
  It also generates the test pictures (random pixels, noisy coloured rectangles, noisy
  gradients).
* `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`. `tb_seg_chip_serial.sv` and `tb_seg_controller_serial.sv`
  repeat the top-level and controller tests with `SERIAL = 1`.

## Simulating

Each testbench compiles with the package files and the RTL. For example, the end-to-end test:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal -Irtl -Itb \
  rtl/seg_pkg.sv tb/seg_ref_pkg.sv rtl/*.sv tb/tb_seg_chip.sv --top-module tb_seg_chip
./obj_dir/Vtb_seg_chip
```

`tb_seg_chip` runs the chip at its default size. `tb_seg_chip_serial` runs the same test with
`SERIAL = 1`. It sends 24 frames:
* colour and gray-scale pictures;
* random gaps in the input, and the next frame offered while the chip is still busy;
* a frame without leaders, and frames that run out of segment numbers.

It compares every pixel's segment number with the reference model and checks the latency
formula above. It also counts each mechanism and fails if one never occurred. `tb_cell_network`
drives the network's commands directly and checks which cell self-excites, the number of growth
steps and the final numbers. The other testbenches check their unit exhaustively or with random
stimulus.

To change the picture size, set `ROWS` and `COLS` on `seg_chip`. The testbenches set them to
10 through local parameters. The reference model handles up to 16 x 16 (`MAXR`, `MAXC` in
`seg_ref_pkg`).

## Limits

* 10 x 10 is the default. Video-size pictures (300 x 300 up to 800 x 600) need tens of
  thousands of cells. The parameters scale: a 100 x 100 instance lints in about 3.5 minutes.
  No size above 10 x 10 has been simulated.
  Busy pictures would also need more than 63 segment numbers.
* The thresholds `phi_p` and `phi_z` have no recommended values. Useful ranges in the tests
  were roughly 60..400 for `phi_p` and 4..130 for `phi_z`.
