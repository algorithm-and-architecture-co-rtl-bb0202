# Low-power H.264 baseline encoder core: pre-skip, four step search and a flexible MB pipeline

Motion estimation (ME) dominates the power of an H.264 encoder. It does most of the
arithmetic, and it reads most of the memory: external frame memory, on-chip
search-window SRAM and local registers. This design cuts that power with four
measures that are meant to work together:

* **Pre-skip.** Before any search, the two vectors a skipped macroblock (MB) may use
  are costed: (0,0) and the motion vector predictor (MVP). If the cheaper one is
  below a threshold, the MB skips integer and fractional ME altogether.
* **A hardware-friendly fast search.** A parallel variable-block-size four step search
  (FSS) visits a few dozen candidates instead of the full search range. It still
  delivers the SADs of all 41 H.264 partitions for every candidate it visits.
* **Data reuse at every memory level.** Inter-MB reuse keeps the search window in a
  circular SRAM, so each new MB loads only 16 new columns. Inter-candidate reuse keeps
  the reference block in a shifting register array, so moving one pel costs one
  16-pel access. Intra-candidate reuse builds every larger block's SAD from the 4x4
  SADs.
* **A flexible MB pipeline with module-level clock gating.** Stage controls hold each
  MB's data and hand tasks to the processing engines (PEs). Any engine can therefore
  serve any stage. Each engine's clock runs only while it has a task.

The RTL covers the motion-estimation side of the encoder in full:

* the stage controls;
* the pre-skip decision;
* the integer ME (IME) engine, with its ladder-shaped search-window SRAM;
* the clock gates.

The other engines are reached through task ports: fractional ME, mode decision,
intra prediction, chroma MC, reconstruction, deblocking and entropy coding. The same
applies to the loader that fetches pels from external memory. These engines are
outside this RTL.

```
                +-----------------+   +-----------------+   +-----------------+
  MB in ------> | stage 1 control |-->| stage 2 control |-->| stage 3 control |--> MB out
                |  (pipelined     |   |  (pipelined     |   |  (pipelined     |
                |   registers)    |   |   registers)    |   |   registers)    |
                +--------+--------+   +--------+--------+   +--------+--------+
                         |  task / data / done  |                     |
     +-------+-------+---+---+-------+-------+--+----+-------+-------+
     |       |       |       |       |       |       |       |       |
   [LD]    [IME]   [PS]    [FME]   [MD]    [IP]   [CMC]   [REC]   [DB]  [EC]
           built   built   -------------- outside this RTL ---------------
   each engine behind its own clock gate (LD and PS are not gated)
```

## Modes

| | high quality (`low_power=0`) | low power (`low_power=1`) |
|---|---|---|
| reference frames searched | 2 | 1 |
| pre-skip check | off | on |
| search-window SRAM | level-C: two 80x48 windows | level-D: one 160x48 window |
| intended clock (CIF, 30 frames/s) | 27 MHz, 2272 cycles per MB | 13.5 MHz, 1136 cycles per MB |

## The flexible MB pipeline (`mb_stage_ctrl`)

In a conventional MB pipeline, each stage owns its engine and its registers. An
engine can then only see data of its own stage. Pre-skip breaks that rule: the MVP
may be fractional, so the FME engine must cost it in the *first* stage, ahead of IME.
This design separates stage controls from engines instead. Each of the three stage
controls keeps one MB's pipelined registers (`mb_desc_t` in `me_pkg`). It works
through a fixed task list:

| stage | tasks, in order |
|---|---|
| 1 | `LOAD`; `IME_ZERO`, `SKIP_MVP`, `PS` (low-power mode only); `IME_RF0`; `IME_RF1` (high-quality mode only). The IME tasks are left out for a pre-skipped MB. |
| 2 | `FME` (left out for a pre-skipped MB), `MD`, `IP`, `CMC`, `REC` |
| 3 | `DB`, `EC` |

`SKIP_MVP` goes to the IME engine when the MVP is an integer vector. It goes to the
FME engine when the MVP is fractional. The FME engine therefore serves stage 1 and
stage 2, and two stages can want it at the same time. When that happens, the later
stage (the older MB) is served first and the other stage waits.

Protocol towards an engine `p`:

* `pe_start[p]` pulses for one cycle.
* `pe_task[p]` holds the task until the task ends.
* `pe_desc[p]` shows the pipelined registers of the stage that owns the task.
* The engine answers with a one-cycle `pe_done[p]`, no earlier than the cycle after
  the start, with its results on the result inputs.
* The stage control copies the results into its registers.

Simulation assertions check the first rules of this protocol:
* a task is only given to an idle engine;
* no two stages win the same engine in one cycle;
* the IME engine never gets a command while it is busy.

All MBs move on together once every stage has finished its list. At that point a new
MB is accepted (`mb_valid && mb_ready`), and the oldest MB leaves on
`out_valid`/`out_desc`.

### Clock gating

`pe_en[p]` rises in the cycle a task is handed to engine `p`. It falls in the cycle
after the controller sees `done`. `clock_gate` samples the enable on the falling edge
and ANDs it with the clock. This timing has two consequences:

* The first gated edge is the one that sees `start`.
* The last gated edge is the one after `done`, which lets the engine drop its `done`
  pulse before its clock stops.

An engine must therefore raise `done` for exactly one of its own clock edges. The IME
engine's gate is also enabled while the loader runs, because the search-window SRAM
and the current-MB buffer sit inside the IME engine. `test_en` forces all gates on.

## Pre-skip (`pre_skip_check`)

The inputs are the two costs (16x16 SADs) and the MVP. The MB is skipped when
`min(cost_zero, cost_mvp) < threshold`. The skip vector is the cheaper candidate, or
the MVP on a tie. The result comes one cycle after `start`. The threshold is an input
of the top (`skip_threshold`); no default value is built in.

## The IME engine (`ime_engine`)

```
 sw_sram --16 pels/cycle--> ref_pel_array (16x16) --+
 (ladder, row or column)                            +--> sad_4x4_trees --> vbs_tree --> decision_unit
 cur_pel_buffer (16x16) ----------------------------+    256 |a-b|, 16     41 SADs     best SAD/MV/RF
                                                          4x4 SADs                    per partition
 fss_ctrl: plans the moves and evaluations, reads the 16x16 SAD back
```

### Ladder-shaped search-window SRAM (`sw_sram`)

The hardest part to follow. A four step search moves its candidate left and right as
well as up and down. Moving up or down needs a new *row* of 16 reference pels, and
moving left or right needs a new *column*. Suppose each bank held whole columns, with
pel (col,row) in bank `col mod 16`. A row would then spread over 16 banks and could
be read in one cycle, but a column would sit entirely in one bank.

The ladder arrangement rotates each row one pel further right than the row above it:

```
bank(col,row) = (col + row) mod NBANK          NBANK = 16
```

Any 16 horizontally adjacent pels now lie in 16 different banks. So do any 16
vertically adjacent pels. For a read, the bank that holds element `k` of the segment
is `(x + y + k) mod 16`, and the output is rotated back into logical order. For a
write (a row segment starting at a multiple of 16), element `k` goes to bank
`(k + y) mod 16`.

Word addresses (G = SW_W/16 = 5 column groups per row):

* level-C, `level_d=0`: `rf*SW_H*G + row*G + col/16`, with `col` = absolute column mod 80.
* level-D, `level_d=1`: `row*2G + col/16`, with `col` = absolute column mod 160. The
  memory holds a single reference frame.

Window rows are relative to the MB: window row = absolute row - 16*mb_y + 16. The
window columns are circular, so the next MB in a row needs only the 16 columns at
absolute `16*mb_x+32 ... 16*mb_x+47` to be written. Reads take one cycle. Column
segments must fit inside the 48 rows (`y + 16 <= 48`); row segments may wrap around
the circular column range.

### Reference array and SAD trees

`ref_pel_array` holds the candidate block. One shift brings a new line in at one edge:

| direction | new line enters at | candidate moves |
|---|---|---|
| `SH_DOWN` | bottom | down one pel |
| `SH_UP` | top | up one pel |
| `SH_LEFT` | left | left one pel |
| `SH_RIGHT` | right | right one pel |

In every case the other 240 pels are reused. `sad_4x4_trees` forms 256 absolute
differences and adds each 4x4 block as rows first, then the row sums.
`vbs_tree` builds the larger partitions from those sums:

* 8x4 and 4x8 from pairs of 4x4;
* 8x8 from pairs of 8x4;
* 16x8 and 8x16 from pairs of 8x8;
* 16x16 from the two 16x8.

Partition numbering (used for `part_*` and `mb_desc_t.part_*`):

| index | size (w x h) | index formula |
|---|---|---|
| 0-15 | 4x4 | 4*row + col |
| 16-23 | 8x4 | 16 + 2*row + col |
| 24-31 | 4x8 | 24 + 4*row + col |
| 32-35 | 8x8 | 32 + 2*row + col |
| 36-37 | 16x8 | 36 + row |
| 38-39 | 8x16 | 38 + col |
| 40 | 16x16 | 40 |

`decision_unit` keeps, per partition, the smallest SAD seen so far with its vector and
reference frame. On a tie, the earlier candidate stays. A search in reference frame 1
with `acc=1` continues from the frame-0 results, giving the best over both frames.

### Four step search (`fss_ctrl`)

1. **Initialization.** The 3x3 pattern with step 2 is evaluated around the start
   vector: the integer part (floor) of the quarter-pel MVP, clamped to the search
   range. The centre is evaluated first.
2. **Searching.** If the smallest 16x16 SAD is not at the centre, the pattern is
   re-centred there. Only the points that were not in the previous pattern are
   evaluated.
3. **Refinement.** Once the centre wins, its 8 neighbours at step 1 are evaluated.

The centre moves only to a strictly smaller SAD, so the search always ends; there is
no fixed step limit. Candidates outside H[-32,31] x V[-16,15] are not evaluated.
Between candidates, the controller moves the array one pel at a time, horizontally
first. Each step is one SRAM row or column read. If the array is invalid, or the
target is 16 or more steps away, it reloads the array with 16 row reads instead. The
array becomes invalid after a window write, a change of reference frame or a change
of MB.

Timing, for an operation issued in cycle t:

* The SRAM is read in t+1.
* The array shifts at the end of t+2.
* An evaluation issued in t' takes the SADs in t'+1. The 16x16 SAD returns in t'+2,
  and the controller waits for it before planning the next candidate.

A one-pel move followed by an evaluation therefore costs about six cycles. A typical
search of one reference frame takes 150-250 cycles; the longest seen in testing was
235 cycles, including reloads.

### Commands

| `single` | `acc` | `rf` | effect |
|---|---|---|---|
| 1 | - | 0 | SAD of `start_mv` only (pre-skip candidates) |
| 0 | 0 | 0 | clear the SAD buffer and search frame 0 |
| 0 | 1 | 1 | search frame 1, keeping the frame-0 results |

`done` pulses at the end. `best_mv`, `best_rf` and `best_sad` then hold the result,
and `part_*` hold all 41 partitions.

## Top-level interface (`h264_encoder_top`)

* **MB input.** `mb_valid/mb_ready`, `mb_x`, `mb_y` (5 bits each) and `mb_mvp`
  (quarter pel).
* **Loader.** On `ld_start`, with `ld_desc` naming the MB, the loader writes:
  * the 16 rows of the current MB on `cur_wr_*`;
  * the search-window rows on `sw_wr_*`: 16-pel segments at a window column that is a
    multiple of 16, in both reference frames in high-quality mode, with pels outside
    the picture replaced by edge pels.

  It then pulses `ld_done`.
* **FME.** `fme_task` is `T_SKIP_MVP` (cost `fme_mv_in`, the fractional MVP) or
  `T_FME` (refine around `fme_mv_in`, the integer result). The engine answers with
  `fme_done`, `fme_cost` and `fme_mv_out`, and runs on `fme_gclk`.
* **MD, IP, CMC, REC, DB, EC** (index 0-5 in that order). Each has `ext_start[i]`,
  `ext_done[i]` and `ext_gclk[i]`. `ext_desc[i]` carries the MB's pipelined
  registers, including the IME results of all 41 partitions for mode decision.
* **Output.** `out_valid/out_desc`: the MB leaving stage 3 with everything the stages
  stored.

## Performance against the target workload

The target workload is CIF (352x288, 396 MBs) at 30 frames/s. It must fit in 2272
cycles per MB at 27 MHz in high-quality mode, and 1136 cycles per MB at 13.5 MHz in
low-power mode. In `tb_cif_frame`, a whole CIF frame took:

* 547 cycles per MB in high-quality mode;
* 316 cycles per MB in low-power mode, with 29% of the MBs pre-skipped.

The testbench's engine models set these totals, but stage 1 (load and IME) was the
bottleneck there. The search-window SRAM holds 7680 bytes.

## Where this design departs from, or goes beyond, its source description

* **Search range** H[-32,31] x V[-16,15] and the 80x48 window per frame. This range
  comes from the comparison encoder; no range was given for this design.
* **16 SRAM banks**, so that an access yields the 16 pels the array needs. The
  arrangement itself was shown with 8 banks.
* **Level-D configuration.** The single frame gets the whole memory as a 160x48
  circular window. A true level-D strip for CIF would be 416x48 pels, which does not
  fit in the same memory, so low-power mode loads a window of the same size as
  level-C does.
* **Task-to-stage assignment, arbitration, handshake and lock-step advance** are this
  design's choices. Only three stage controls and the set of engines were specified.
* **Pre-skip cost and rule.** The cost is the 16x16 SAD, and the rule is "minimum
  below threshold". The MVP candidate is costed by IME in reference frame 0.
* **FSS details.** There is no step limit, the centre is evaluated first, and the
  start vector is the floor of the MVP.
* **Not built:** FME, mode decision, intra prediction, chroma MC, reconstruction,
  deblocking, entropy coding, the loader and external memory. Their algorithms were
  not specified; they are ports of the top.
* **Clock gate.** A negative-edge enable flop and an AND gate, behaviourally the same
  as a latch-based gate. Replace it with the library's integrated clock-gating cell in
  a real flow.

## Files

`rtl/`:

* `me_pkg.sv`: types, partition order, PE and task enumerations, `mb_desc_t`.
* `h264_encoder_top.sv`, `mb_stage_ctrl.sv`, `pre_skip_check.sv`, `clock_gate.sv`.
* `ime_engine.sv`, `fss_ctrl.sv`, `sw_sram.sv`, `ref_pel_array.sv`, `cur_pel_buffer.sv`,
  `sad_4x4_trees.sv`, `vbs_tree.sv`, `decision_unit.sv`.

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus:

* `tb_cif_frame.sv`: a full CIF frame in both modes.
* `fss_model_pkg.sv`: an independent reference model of the search and the partition
  SADs.

Each testbench prints `TB_RESULT checks=N failures=M`. The end-to-end benches also
count every mechanism (skips, FME shared between stages, waits, moves, refinements,
reloads, shifts, window reuse, both SRAM configurations, gated cycles) and fail if one
never happens.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
    rtl/me_pkg.sv tb/fss_model_pkg.sv tb/tb_h264_encoder_top.sv --top-module tb_h264_encoder_top
./obj_dir/Vtb_h264_encoder_top
```

Replace the testbench name to run another one. Testbenches of leaf modules that do
not use the search model do not need `tb/fss_model_pkg.sv`. Every module has
parameter defaults at the sizes listed above. `NBANK`, `SW_W` and `SW_H` can be
changed together, as long as `SW_W` is a multiple of `NBANK` and `SW_H >= 16 + the
vertical search span`. The search range parameters must fit inside the window.
