# Integer-pel motion estimation engine for HEVC

This is an engine that finds integer-pixel motion vectors for one 64x64 coding unit (CU64) of
an HEVC encoder.

**What it computes.** For every prediction unit (PU) inside the CU64 that the encoder may choose,
it returns:

- the motion vector whose reference block matches best, by sum of absolute differences (SAD);
- that SAD.

From those results it also picks the cheapest way to partition the CU64.

**How it keeps the work small.** An exhaustive search would be far too expensive, so each PU
gets three cheap stages:

1. **AMVP choice.** The encoder supplies two motion-vector predictor candidates (AMVP). The engine
   keeps whichever one matches better.
2. **PEPZS refinement.** A predictive diamond search (PEPZS) refines that winner. Each step
   checks only three points, in the direction the previous step found most promising.
3. **Early stop.** The search stops early once it stops improving.

**Where the reference pixels come from.** They come from two small set-associative caches, the
*search buffers*. The buffers fetch 8-pixel words from off-chip memory only on a miss.

The architecture was designed for 3840x2160 video at 60 frames/s on a 270 MHz clock. That budget
is 2222 cycles per CU64. This RTL implements the complete search flow, the datapath and the
buffers of that architecture. It does **not** implement the interlaced schedule that overlaps PU
shapes to meet the budget: jobs run one after another, and a CU64 takes about 66,000 cycles. See
[Departures and limits](#departures-and-limits).

## The search flow over one CU64

The CU64 is visited as sixteen 16x16 blocks (CU16) in Z order. Three processes run on it.

**Process 1, once per CU16.** Five PUs are searched:

- the 16x16 PU;
- the two 16x8 PUs;
- the two 8x16 PUs.

Each PU gets AMVP, then up to 5 PEPZS steps. That reaches ±16 pixels from the AMVP winner.

The engine then evaluates the CU16's share of the two AMVP candidates of two larger PUs: the 64x64
PU and the 32x32 PU that contains this CU16. That is four 16x16 SADs, added into running totals.
A 64x64 or 32x32 SAD is never computed in one piece. It is always a sum of 16x16 SADs.

**Process 2, once per 8x8 block (CU8) of the same CU16.**

- The 8x8 PU gets AMVP and up to `STEPS_8` = 4 PEPZS steps (±8).
- The two 8x4 and two 4x8 PUs get AMVP and only the first PEPZS step.

**Process 3, after all sixteen CU16s.**

- The 64x64 PU and the four 32x32 PUs choose their AMVP winner from the accumulated sums.
- Each then gets the first PEPZS step. Its eight points are again evaluated as sums of 16x16
  SADs over the CU16s they cover.
- Non-square PUs larger than 16x16 (64x32, 32x16, …) are not searched at all.

Each CU64 produces 405 PU results:

| Process | Count | PUs |
|---|---|---|
| 1 | 16 × 5 = 80 | 16x16, 16x8, 8x16 |
| 2 | 64 × 5 = 320 | 8x8, 8x4, 4x8 |
| 3 | 5 | one 64x64, four 32x32 |

The results come out on `res_*` in that order.

## PEPZS: the predictive diamond search

The search always refines a centre, which starts as the AMVP winner. Its SAD is already known
from the AMVP stage, so the centre is never evaluated again.

| Step | Points | Distance |
|---|---|---|
| 1 | all 8 neighbours (E, NE, N, NW, W, SW, S, SE) | 1 |
| s ≥ 2 | 3: the predicted direction and its two 45° neighbours | 2^(s-1): 2, 4, 8, 16 |

**How the predicted direction is chosen.** It is the direction of the lowest-SAD point of the
previous step, whether or not that point beat the best so far. All points of every step sit
around the same centre; the centre does not move.

**Diamond shape.** From step `DIAMOND_FROM`+1 = 5 on, diagonal points are placed at half the
distance. This turns the outer square into a diamond.

**Best point.** The best point overall is the lowest SAD seen. On a tie, the earlier point wins.

**Early termination.** A step *improves* if any of its points lowered the best SAD. After
`ET_STEPS` = 3 steps in a row without improvement, the search stops. Most searches stop this way
at step 3, which is what saves most of the work.

**Candidate clamping.** AMVP candidates are clamped to ±96 in both directions. This keeps every
search point inside the 512x512 window that the search buffers can address.

## SAD datapath

- `pe4x4` is one combinational 16-pixel SAD.
- `pe16x16` holds sixteen of them. It returns the 16 SADs of the 4x4 blocks of a 16x16 area,
  not their total.
- `sad_merge` adds the 4x4 SADs that fall inside the requested PU rectangle. This gives the SAD of
  a 16x16, 16x8, 8x16, 8x8, 8x4 or 4x8 PU from the same hardware.

`pepzs_module` executes one *SAD job* (PU shape + motion vector) at a time:

1. It reads the needed reference rows from the selected search buffer, `ROWS` = 4 rows of 16
   pixels per cycle (64 pixels/cycle).
2. It fills a 16x16 reference register with them.
3. One cycle later it produces the SAD, in a second stage.

There are two reference registers and two `pe16x16`, used alternately. One register fills while
the other's PE computes, so back-to-back jobs overlap. Without misses, a result arrives
`h/ROWS + 1` cycles after the job is accepted, where `h` is the PU height. The current 16x16 block
is loaded once per CU16, 16 cycles, from the `cur_rd_*` port.

`pepzs_decision` tracks, for the running PU:

- the best motion vector and SAD;
- the direction of each step's best point;
- the no-improvement counter.

`pepzs_pattern` turns (centre, step, predicted direction, point number) into a motion vector.

## Search buffers (set-associative caches)

Each `search_buffer` is an 8-way set-associative cache of reference pixels.

| Item | Value |
|---|---|
| Word | 8 horizontally adjacent pixels (64 bits) |
| Sets | 64 |
| Ways | 8 |
| Capacity | 4 KB per buffer, 8 KB for the two |

**Addressing.** Coordinates are 9 bits, relative to a window origin placed 128 pixels above and to
the left of the CU64.

- index = y mod 64
- tag = (y / 64, x / 8)
- Valid bits and tags are registers in `addr_ctrl`.
- The data is eight 64-set register files in `cache_data`, one per way.

**Reads.** A read asks for 4 rows × 16 pixels at any x. Unaligned x touches up to 3 words per row,
so 12 lookups are done in parallel.

- **All hit:** the data is returned in the same cycle.
- **Otherwise:** the buffer fetches the missing words from off-chip memory one at a time. It
  holds `rd_ready` low until all are present.

**Replacement.** The first invalid way in the set is used; if there is none, a per-set
round-robin pointer chooses.

**Flushing.** Both buffers are emptied at the start of every CU64.

**Which buffer serves what.** This is the split the architecture uses to raise hit rates:

- The **AMVP buffer** serves the AMVP candidates and PEPZS steps 1–3. Those points lie close
  together.
- The **PEPZS buffer** serves steps 4 and 5, whose points lie far from the centre
  (`PEPZS_BUF_FROM` = 4).

**Off-chip memory port.** `mem_req_valid/ready` with a frame x (a multiple of 8) and y. One request
is outstanding at a time; `mem_rsp_valid` returns the word.

## Partition decision

`partition_decision` stores the SAD of every PU result and compares costs bottom-up. The cost of a
choice is the sum of its PU SADs plus `PU_COST` = 16 per PU.

| Level | Candidates compared |
|---|---|
| CU8 | 8x8, 8x4 pair, 4x8 pair |
| CU16 | 16x16, 16x8 pair, 8x16 pair, four best CU8s |
| CU32 | 32x32, four best CU16s |
| CU64 | 64x64, four best CU32s |

It outputs:

- whether the CU64 is split;
- per CU32, whether it is split;
- per CU16, its mode;
- per CU8, its mode;
- the total cost.

The cost rule is this design's own. A real encoder would add a rate term for the motion vector
and the partition.

## Top level: `ime_top`

`ime_top` holds the controller. It is a state machine that issues SAD jobs for the flow above and
feeds results to `pepzs_decision` and `partition_decision`. It also holds the pixel/job
datapath and the two search buffers.

**Ports.** All are synchronous to `clk`; the reset `rst_n` is asynchronous and active-low.

| Port | Direction | Meaning |
|---|---|---|
| `start`, `cu_x`, `cu_y` | in | start a CU64 at frame position (`cu_x`, `cu_y`) |
| `busy`, `done` | out | `busy` while working; `done` pulses at the end |
| `cur_rd_row` (0–63), `cur_rd_col` (0–3) | out | which current pixels are needed |
| `cur_rd_data` | in | 16 current pixels, combinationally in the same cycle |
| `amvp_req_pu` | out | the PU whose candidates are needed |
| `amvp_cand[0:1]` | in | the two AMVP candidates, combinationally |
| `mem_*` | both | off-chip reference memory, described above |
| `res_valid`, `res_pu`, `res_mv`, `res_sad` | out | one pulse per PU result |
| `part_*` | out | the partition decision, valid one cycle before `done` |
| `stat_*` | out | per-CU64 counters: cycles, SAD jobs, early terminations, buffer reads and off-chip words per buffer |

**Shared types.** `ime_pkg` holds them. `mv_t` is a signed 9-bit x/y pair. `pu_id_t` holds the
shape, the block number and the partition half. The block number is the CU16 number (0–15) for
PUs of 16x8 and up, and the CU8 number (0–63) for smaller PUs. `pu_geom` gives the offset and
size of every PU.

**Parameters.** The defaults are the architecture's values:

| Parameter | Default | Meaning |
|---|---|---|
| `ROWS` | 4 | rows per buffer read: 64 pixels/cycle |
| `WAYS` | 8 | ways per search buffer |
| `SETS` | 64 | sets per search buffer |
| `STEPS_16` | 5 | PEPZS steps for 16x8 and larger PUs |
| `STEPS_8` | 4 | PEPZS steps for 8x8 PUs |
| `ET_STEPS` | 3 | steps without improvement before early termination |
| `DIAMOND_FROM` | 4 | diagonals are halved from the step after this one |
| `PEPZS_BUF_FROM` | 4 | first step served by the PEPZS buffer |
| `PU_COST` | 16 | partition cost added per PU (this design's own choice) |

## Departures and limits

- **Schedule.** The architecture interlaces the three processes on the two PE_16x16 units, with
  different PU shapes computed at once. That gives 2056 cycles per CU64 against the 2222-cycle
  budget.
  - Here the controller runs one SAD job at a time. The two PEs only overlap loading with
    computing.
  - Misses stall the search.
  - In simulation, with a 4-cycle off-chip memory, a CU64 takes about 66,000 cycles.
    That run fetches about 5,700 words off chip, one at a time, so a large part of the time
    is off-chip waiting. Most of the rest is the 4-cycle row load of each job.
  - At 270 MHz this supports roughly 2 frames/s of 3840x2160 instead of 60.
- **8x8 search range.** The source design gives two figures for the 8x8 range: ±4 in one
  place, ±8 (and five steps) in others. This design uses ±8, that is 4 steps
  (`STEPS_8`).
- **AMVP candidates** come from outside. Building the candidate list from neighbouring
  motion vectors is the encoder's job.
- **Partition cost** is SAD + a constant per PU (see above).
- **Buffer reuse across CU64s** is not kept. The buffers are flushed per CU64, the simpler of
  the options the architecture considers.
- **Synthesis.** The design synthesizes as plain registers; it was not mapped to a cell library.
  The cache data and tags are register arrays. The 12 parallel tag lookups per buffer are the
  largest logic block after the PEs.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

**Unit testbenches.** These compare against reference computations written independently in the
testbench:

- SADs of random blocks;
- point patterns against a table of directions;
- decision sequences with early termination and ties;
- cache hits, misses, evictions and flushes against expected tag states;
- row reads and miss counts;
- job latency;
- partition costs and modes against a cost computation in the testbench.

**End-to-end testbench.** `tb_ime_top` runs two CU64s back to back at the default parameters. It
reads a synthetic picture pair from `tb/tb_img_pkg.sv`: a smooth textured reference, and a
current picture equal to the reference moved by (7, -5) plus noise. `tb/ext_mem_model.sv`
stands in for off-chip memory.

A reference model of the whole flow, written in the testbench, predicts each of the following,
and the testbench compares them:

- all 810 PU results (order, PU, motion vector, SAD);
- the number of SAD jobs;
- the number of early terminations;
- the partition cost;
- the engine's cycle counter, against the cycles the testbench measures.

It also fails unless each mechanism occurs at least once:

- early termination;
- a search running all 5 steps;
- a halved diagonal;
- the second AMVP candidate winning;
- candidate clamping;
- off-chip fetches and reuse in both buffers;
- both split and unsplit CU16 decisions.

The AMVP candidates are made by a hash of the PU number. One candidate lies near the true motion;
the other is elsewhere or out of range.

**Simulating with Verilator** (5.x), from the project root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ime_pkg.sv tb/tb_img_pkg.sv tb/tb_ime_top.sv --top-module tb_ime_top -o sim
./obj_dir/sim
```

Replace `tb_ime_top` by any other `tb_*` module to run a unit test. The top-level build takes
about 1.5 minutes; the run takes under a second.

## Files

| File | Contents |
|---|---|
| `rtl/ime_pkg.sv` | shared types, constants, PU geometry, candidate clamp |
| `rtl/pe4x4.sv`, `rtl/pe16x16.sv`, `rtl/sad_merge.sv` | SAD datapath |
| `rtl/pepzs_pattern.sv`, `rtl/pepzs_decision.sv` | search point generation and best-point tracking |
| `rtl/addr_ctrl.sv`, `rtl/cache_data.sv`, `rtl/search_buffer.sv` | search buffer |
| `rtl/pepzs_module.sv` | job execution: reference loading, two PEs, SAD result |
| `rtl/partition_decision.sv` | CU64 partition choice |
| `rtl/ime_top.sv` | controller and top level |
| `tb/tb_*.sv` | testbenches |
| `tb/tb_img_pkg.sv` | test pictures |
| `tb/ext_mem_model.sv` | off-chip memory model |
