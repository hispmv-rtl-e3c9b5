# HiSpMV in SystemVerilog: an FPGA-style SpMV engine for imbalanced matrices

This is a streaming accelerator for sparse-matrix dense-vector multiplication,

    y = alpha * A * x + beta * y        (FP32)

following the HiSpMV architecture. The matrix is held in a wide memory with
many channels (HBM on an FPGA card). Each channel streams the matrix's
non-zeros as 64-bit coordinate elements (row, column, value) to a group of
processing elements (PEs). The rows are dealt out cyclically to the PEs, and
each PE owns an on-chip buffer of partial sums for its rows.

That basic scheme has three weak points, and the design adds one mechanism for
each:

| problem | mechanism | where |
|---|---|---|
| A few very long rows leave one PE with most of the work while the others idle (imbalance). | **Hybrid row distribution.** Beats of a dense row are marked *intra-row*. All PEs of a group work on that row at once, and an adder tree sums their products and routes the sum to the row's owner. Ordinary beats are *inter-row*: each PE keeps its own rows. | `reduce_route` |
| A floating-point add takes several cycles. A PE cannot add a product to a sum that is still inside the adder, so back-to-back products of one row would stall the PE. | **Local forwarding** in the y buffer, plus a **pre-accumulation stage** that folds products of the same row arriving back to back. Together they keep one product per cycle. | `y_accumulator`, `pre_accumulator` |
| With the matrix streaming fast, loading the x vector into the on-chip buffers becomes the bottleneck. | **Hybrid x buffer.** Two banks either hold the same tile, so two PEs read in parallel (*sequential* mode), or one bank loads the next tile while the other is read (*ping-pong* mode). The mode is chosen per run. | `hybrid_buffer`, `spmv_controller` |

The default configuration has 16 matrix channels of 8 PEs each (128 PEs). It
has one x channel that feeds the groups through a register chain, and two y
lanes.

## Block structure

```
                 x channel                                  y_in (M lanes)
                     |                                           |
 spmv_controller ----+--> x chain stage --> x chain stage --> ... |
   (phases, mode,        |                   |                    |
    tile gating)      pe_group 0          pe_group 1   ...  pe_group NG-1
                         ^                   ^                    |
 matrix channel 0 -------+   channel 1 ------+            y read-out mux
                                                                  |
                                                          y_update (alpha, beta)
                                                                  |
                                                            y_out (M lanes)

 pe_group (P lanes):
   beat --> pe x P --------------> reduce_route --> pre_accumulator x P --> y_accumulator x P
             |   ^                 (inter: forward,                          (y buffer, forwarding,
             v   |                  intra: tree + route)                      hazard -> stall)
         hybrid_buffer x P/2 (one per PE pair, written from the x chain stage)
```

| file | role |
|---|---|
| `rtl/hispmv_pkg.sv` | COO element type, performance-counter struct, FP32 add/multiply functions |
| `rtl/fp_add.sv`, `rtl/fp_mul.sv` | pipelined FP32 adder (4 cycles) and multiplier (3 cycles) with side tags |
| `rtl/fp_add_tree.sv` | pipelined adder tree |
| `rtl/pe.sv` | element register, x lookup, multiply |
| `rtl/hybrid_buffer.sv` | two-bank x tile buffer for a PE pair |
| `rtl/reduce_route.sv` | inter-row forwarding / intra-row reduce and route |
| `rtl/pre_accumulator.sv` | folds runs of one row at one product per cycle |
| `rtl/y_accumulator.sv` | per-PE y buffer with read-add-write, forwarding, hazard detection, clear |
| `rtl/pe_group.sv` | the P PEs of one channel, group-wide stall, one x chain stage |
| `rtl/y_update.sv` | alpha*acc + beta*y_in, M rows per cycle |
| `rtl/spmv_controller.sv` | run phases, buffer-mode choice, x loading and tile gating |
| `rtl/hispmv_top.sv` | top level |

## Feeding the matrix: the channel beat

Each matrix channel delivers one beat per cycle (`a_valid`/`a_ready`). A beat
holds P elements, one per lane, so 8 × 64 = 512 bits by default. Each element
is a `coo_t`:

| field | bits | meaning |
|---|---|---|
| `row` | 16 | address of the row in the owning PE's y buffer: `global_row / (NG*P)` |
| `col` | 16 | column inside the current x tile: `global_col - tile * tile_len` |
| `val` | 32 | FP32 value |

Side-band signals travel with each beat:

- `a_lane_valid`: one valid bit per lane;
- `a_intra`: the beat belongs to one dense row;
- `a_owner`: the lane whose PE owns that dense row;
- `a_last`: the final beat of the current x tile.

The beat layout and these side-band fields are this implementation's choice.
The published design fixes only the 64-bit (row, column, value) element.

The encoder (host software) must follow these rules:

- Row `r` belongs to PE `r mod (NG*P)`, which is group `(r mod NG*P) / P`,
  lane `r mod P`.
- In an inter-row beat, lane `l` of group `g` may only carry rows of PE
  `g*P + l`.
- All elements of an intra-row beat belong to one row. The beat goes to the
  group that owns the row, with `a_owner` set to the owning lane. The lanes may
  carry any P of that row's elements.
- The matrix is cut into column tiles of `tile_len` columns. Each channel sends
  the beats of tile 0, then tile 1, and so on. Every tile ends with a beat that
  has `a_last` set; it may be an empty beat with no valid lane.
- No further ordering is needed. Repeats of a row at any distance are handled
  in hardware (see below).

## Hybrid row distribution (`reduce_route`)

Products leave the PEs' multipliers with their row tags and enter
`reduce_route`:

- **Inter-row beat:** each lane's product goes straight to the same lane's
  accumulator.
- **Intra-row beat:** the valid products of all P lanes go into a
  log2(P)-level adder tree. The single sum comes out on lane `a_owner`, and the
  other lanes are empty for that beat.

The forwarding path is a delay line with the same latency as the tree,
3 × 4 = 12 cycles. So a group can switch modes from one beat to the next, and
an inter-row result and an intra-row result never meet at one output. Without
the intra-row mode, a row with 10,000 non-zeros would keep one PE busy for
10,000 cycles. With it, the group finishes that row in 10,000/8 cycles.

## Accumulating at one product per cycle

This is the subtle part of the design. The FP adder has a latency of
`LAT_ADD = 4` cycles. A product for row r cannot be added to r's partial sum
while an earlier addition to r is still inside the adder. Two units handle
this in series, one per lane.

### 1. `pre_accumulator`: runs of one row

A *run* is a sequence of valid products for the same row in consecutive
cycles. Runs are common: every intra-row beat sends its sum to the same owner
lane, so a dense row produces one sum per cycle for one row. Runs also come
from inter-row streams sorted by row.

The pre-accumulator spreads a run over `LAT_ADD` interleaved partial sums
inside one pipelined adder:

- The first `LAT_ADD` products of a run enter the adder with 0 as the second
  operand.
- Product k (k ≥ LAT_ADD) enters together with the result of product
  k − LAT_ADD, which leaves the adder in exactly that cycle.
- Results that no later product picks up are *terminal*. A run has at most
  `LAT_ADD` of them, and they leave the adder in consecutive cycles. A
  `LAT_ADD-1`-entry window keeps the recent ones, tagged with a run number.
- When the run's last product comes out, the window entries of the same run
  and that last result go into a small adder tree (2 levels for 4 inputs).
- One `(row, partial sum)` per run leaves the unit.

Throughput is one product per cycle, whatever the run length. The latency from
the last product of a run to its sum is fixed, about 3 × `LAT_ADD` enabled
cycles (register, feedback adder, 2-level tree). A bubble ends a run.
The row then simply gets two partial sums, which is still correct.

### 2. `y_accumulator`: the y buffer with forwarding

Each run's sum is added into the PE's y buffer as a read-add-write:

- The buffer is read combinationally, the adder takes 4 cycles, and the sum is
  written back as it leaves the adder.
- **Forwarding:** if the incoming row equals the row whose sum leaves the adder
  in this cycle, that sum is used instead of the stale buffer word. A row may
  therefore come back exactly `LAT_ADD` cycles later with no penalty. No cycles
  are lost to buffer read or write latency.
- **Hazard:** if the row is still in the adder (issued 1 to `LAT_ADD-1` cycles
  ago), the unit raises `hazard`. The whole PE group then freezes for a cycle
  (`en` low): its PEs, tree, pre-accumulators and the channel's `a_ready`. The
  y accumulators' own adders keep running, so the hazard clears.

The published design handles dependency distances above 1 and below the adder
latency with ordering done by the host. Here they cost stall cycles instead,
so the hardware is correct for any element order. An encoder that spaces
repeats of a row at least 4 slots apart never stalls.

## The hybrid x buffer (`hybrid_buffer`, `spmv_controller`)

x is processed in tiles of up to `XDEPTH` = 4096 words. Each pair of PEs shares
one buffer with two banks. Each bank has one write port and one read port.

- **Sequential mode:** the tile is written into both banks at once. PE 0 of the
  pair reads bank 0 and PE 1 reads bank 1, so both get their x value every
  cycle. Loading and computing alternate. Time per tile: `t_S = t_L + t_C`.
- **Ping-pong mode:** tile t+1 is written into one bank while both PEs read
  tile t from the other. They share that bank's read port. When both ask in the
  same cycle, port 0 is served first (its word is kept in a hold register) and
  the group stalls one cycle. Compute time becomes `t_C <= t'_C <= 2 t_C`, and
  time per tile is `t_P = max(t_L, t'_C)`.

Ping-pong mode pays off when `t_L + t_C > max(t_L, t'_C)`. Even in the worst
case `t'_C = 2 t_C` it is no slower when `t_L > t_C`. The controller applies
exactly this rule at `start`:

- `t_L` is `tile_len` (one x word loaded per cycle);
- `t_C` is the `est_compute` input, an estimate of cycles per tile supplied
  with the run;
- if `tile_len > est_compute`, the run uses ping-pong mode, otherwise
  sequential mode.

The chosen mode is shown on `pingpong`.

The controller's tile bookkeeping:

- `loaded`: tiles whose last word has passed all NG chain stages, counted
  NG+1 cycles after the word.
- Per group, `taken`: tiles whose last beat was accepted.
- Per group, `read`: tiles whose last beat has also read its x values.
- A group may take beats of tile t once `loaded > t`.
- Tile t may start loading once every group has read tile t−1 (sequential) or
  tile t−2, the previous user of the same bank (ping-pong).
- In ping-pong mode a group reads bank `read mod 2`.

## A run, cycle by cycle

1. Pulse `start` with `num_tiles`, `tile_len`, `num_rows`, `est_compute`,
   `alpha` and `beta`. The perf counters clear.
2. **Init y:** all y buffers clear in parallel, one word per cycle (`YDEPTH`
   cycles).
3. **Load x / compute:** x words are taken from the x channel
   (`x_valid`/`x_ready`), one per cycle. Tiles are gated to the groups as
   described above.
4. **Drain:** the controller waits until no product is in flight anywhere.
5. **Store y:** in each cycle with `y_in_valid`, it reads rows
   `st_row .. st_row+M-1` from their owning PEs, takes M old y values and
   starts `alpha*acc + beta*y_in`. Seven cycles later, `y_out_valid` shows them
   with `y_out_row` = first row index. `num_rows` must be a multiple of M, and
   M must divide NG*P.
6. `done` rises and stays high until the next `start`.

`perf` reports the following for the run:

- total cycles;
- group stall cycles and y-buffer hazard cycles;
- x-port conflicts;
- intra-row beats;
- forwarded accumulations;
- products folded by the pre-accumulators.

## Parameters

| parameter | default | from the published design? |
|---|---|---|
| `NG` (matrix channels / PE groups) | 16 | yes (16 channels, 128 PEs) |
| `P` (PEs per group) | 8 | yes (8 PEs per channel) |
| `M` (y lanes) | 2 | no, a choice (the design is scalable in M) |
| `XDEPTH` (x tile words) | 4096 | no, a choice |
| `YDEPTH` (y words per PE) | 4096 | no, a choice |
| `LAT_ADD`, `LAT_MUL` | 4, 3 | no, a choice; the published design only says FP accumulation takes several cycles |
| `RW` (row-index width at the top) | 24 | no, a choice |
| `ADDER_CHAIN` | 1 | yes: the generator builds with or without the adder chains (pre-accumulators); 0 removes them |
| `HYBRID_BUF` | 1 | yes: the generator builds with or without the hybrid buffer; 0 always runs in sequential mode |

At the defaults the engine holds up to 128 × 4096 = 524,288 rows, with any
number of columns in 4096-column tiles (up to 65,535 tiles). The published
design's larger variants are a change of `NG`:

- 20 channels (160 PEs) without adder chains: `NG = 20, ADDER_CHAIN = 0`.
  Without the pre-accumulators, back-to-back products of one row stall the
  group instead of being folded.
- 56 channels (448 PEs): `NG = 56`.

## Number format

FP32 with round-to-nearest-even. Subnormal inputs and results are flushed to
zero; overflow gives infinity; NaN and infinity inputs pass through but are
not otherwise treated specially. Sums are formed in a different order from a
sequential loop: interleaved partial sums, adder trees, tile by tile. Results
can therefore differ from a CPU reference in the last bits, as on any parallel
SpMV engine.

## Where this RTL departs from, or goes beyond, the published design

- The beat side-band (lane valids, intra, owner, last) and the 16/16/32 split
  of the 64-bit element are choices made here.
- The pre-accumulator's internals (interleaved partial sums plus a final tree)
  are this implementation's way of folding back-to-back products at one per
  cycle. The published design describes it as an adder chain whose details are
  not given.
- Hazards not removed by forwarding and pre-accumulation stall the PE group.
  The published design relies on the encoder's element ordering.
- The hybrid buffer is a plain two-bank memory. The published design builds it
  from a buffer-channel library that is not reproduced here.
- Reduce-and-route uses a balanced adder tree and a forwarding path padded to
  the same latency.
- The buffering mode is chosen once per run from an estimate supplied with it.
- x is loaded one word per cycle; a wide x channel would shorten `t_L`.
- Memories are arrays read combinationally, so a synthesis tool may map them to
  registers or distributed RAM rather than block RAM. An FPGA port would
  register the read and add one pipeline stage to the PE and to the y-buffer
  loop.
- HBM, the host, the matrix encoder and the design generator are not part of
  the RTL. The channels are plain valid/ready ports.

## Verification

Every unit has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. Expected values are
computed independently in the testbench. FP references use double-precision
arithmetic rounded once to single precision, which is exact for one add or
multiply (`tb/tb_fp_pkg.sv`). End-to-end tests use small-integer data, so
every FP sum is exact in any order.

| testbench | what it checks |
|---|---|
| `tb_fp_add`, `tb_fp_mul` | 3000 random and corner-case operations each, latency, tags, freeze |
| `tb_pe` | products, row tags, latency 1+LAT_MUL under random freezes |
| `tb_hybrid_buffer` | both modes, load-while-read in ping-pong mode, exactly one stall per port conflict |
| `tb_reduce_route` | random mixed inter/intra beats with freezes; exact outputs, routing and latency |
| `tb_pre_accumulator` | random runs of 1–14 with bubbles and freezes; one correct sum per run, constant latency |
| `tb_y_accumulator` | random accumulation; forwarding at distance LAT_ADD without a stall; a 3-cycle wait at distance 1; clear |
| `tb_pe_group` | a full group in both buffer modes; every y word compared; every mechanism seen |
| `tb_spmv_controller` | mode choice, bank selection, no early tile use, no bank overwrite, overlap only in ping-pong mode, store order |
| `tb_hispmv_top` | whole engine (4 groups × 8 PEs), imbalanced matrix with dense rows, both modes; all rows exact; ping-pong faster here |
| `tb_hispmv_balanced` | whole engine (4 groups × 8 PEs) on a balanced matrix, 6 nonzeros per row and tile, no dense rows; all rows exact; intra-row mode never used; every beat fills all 8 lanes |
| `tb_hispmv_base` | the same matrix as `tb_hispmv_top` with `ADDER_CHAIN = 0, HYBRID_BUF = 0`: still exact, no folds, never ping-pong; 1634 cycles against 1278 with the adder chains |
| `tb_hispmv_full` | the same at the default sizes (128 PEs, 4096-word tiles and buffers), 2048 rows × 8192 columns |

To run a testbench with Verilator (5.x):

```
verilator --binary -j 0 --top tb_hispmv_top -y rtl rtl/hispmv_pkg.sv tb/tb_fp_pkg.sv tb/tb_hispmv_top.sv
./obj_dir/Vtb_hispmv_top
```

Replace the testbench name for the others. `-y rtl` lets Verilator find the
modules by file name. The full-size test builds in about half a minute and
runs in about a second.

## Known limits

- Row addresses are 16 bits per PE, columns 16 bits per tile, and tile counts
  16 bits.
- `y_out` has no back-pressure.
- A dense row's intra-row beats must go to the group that owns the row. Rows
  are not split across groups.
