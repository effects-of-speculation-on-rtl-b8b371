# Dual issue queue for load-hit speculation

An out-of-order core that speculates on load hits lets the instructions that
depend on a load issue as if the load hits in the L1 data cache. Whether it
really hit is known only several cycles later, after the load has crossed the
issue-to-execute pipeline and the hit/miss signal has travelled back. Until
then every dependant that issued in this *speculative window* must stay in the
scheduler so that it can issue again (be *replayed*) if the load missed. With a
deep issue-to-execute pipeline, these post-issue instructions take up a large
part of a single issue queue, and the queue exposes less parallelism.

This design splits the scheduler in two:

* the **main issue queue (MIQ)**, 48 entries, which receives dispatched
  instructions and from which almost all instructions issue;
* the **replay issue queue (RIQ)**, 32 entries, same structure, which holds
  instructions that have already issued and are kept only in case a load they
  depend on misses.

Both queues keep updating their ready state every cycle, but only one of them
bids for the eight issue slots in a cycle. The RIQ has priority, and it only
ever has ready instructions after a missed load's data has come back. The MIQ
stays small, which keeps the single-cycle wakeup/select loop short.

## Block diagram

```
 rename ──► isq_dispatch ──► MIQ (isq_queue, 48) ──moves──► RIQ (isq_queue, 32)
                              │ bid/grant ▲                 │ bid/grant ▲
                    isq_class_arbiter     │       isq_class_arbiter     │
                              │      isq_xq_wake ◄─latch─┐  │      isq_xq_wake
                              │       (mux)   └─latch─►  │  │       (mux)
                              ▼                          ▼  ▼
                        isq_src_mux (replay_req, + first pipeline latch)
                              │  rf_issue ──► register file (outside)
                        isq_delay_line (ISSUE_EXEC_LAT-1)
                              │  fu_issue ──► functional units (outside)
 data cache hit/miss ──► isq_delay_line (FEEDBACK_DELAY) ──► both queues
 writeback, miss fill ────────────────────────────────────► both queues
```

`isq_bid_ctrl` decides each cycle which queue bids and drives `replay_req`.

## How an instruction moves through the queues

1. **Dispatch.** A group of up to 8 renamed instructions enters free MIQ
   entries when `disp_ready` (8 free entries). For each source that names an
   in-flight producer, `isq_dispatch` looks the producer up in both queues:
   a producer that has already broadcast its tag makes the source ready
   (with the producer's remaining latency); one that has not makes it wait.
   A producer that is in neither queue has finished, so the source is ready.
2. **Wakeup and select.** When an instruction is granted, its tag and latency
   are broadcast; each waiting source that matches starts a countdown, so the
   consumer bids exactly when the producer's result will be available at
   execute. A load broadcasts its L1 hit latency (3) before its hit is known:
   that is the speculation.
3. **Move.** An MIQ entry that issued in an earlier cycle (so its tag has
   already been broadcast) moves to a free RIQ entry, up to 8 per cycle. If
   the RIQ is full it stays in the MIQ and is handled there.
4. **Verification.** Each load outcome reaches the queues `FEEDBACK_DELAY`
   cycles after the cache produced it. A hit simply clears the load's
   speculation bit. A miss makes every issued instruction that depends on the
   load, directly or through other instructions, in either queue, un-issue;
   its waiting sources go back to waiting. The load waits for its fill.
5. **Replay.** The fill (`fill_in`) broadcasts the load's tag again. The
   replayed instructions wake up, mostly in the RIQ, the RIQ raises
   `replay_req`, takes the issue slots, and its tags reach the MIQ a cycle
   later.
6. **Release.** An entry is freed when the writeback of its current issue has
   arrived and it depends on no unverified load. The tag goes out on
   `miq_rel_*` / `riq_rel_*`.

## Finding the dependants of a missed load

The hardest part is step 4: finding, in one cycle, everything a missed load
has infected, including instructions that depend on it only through other
instructions. This design names each speculative load by its load/store-queue
slot (64 slots) and carries, with every value, a 64-bit mask of the
unverified loads it depends on:

* a granted instruction broadcasts, with its tag, the OR of its sources'
  masks, plus its own bit if it is a load;
* a source that wakes up takes the producer's mask;
* a hit clears that bit in every mask, in both queues and in the
  cross-queue latches;
* a miss un-issues every issued entry whose sources have that bit, and puts
  those sources back to waiting.

Because masks are transitive, one cycle finds the whole dependence tree.

Each replayed entry also gets a new 3-bit **epoch**. Issued instructions carry
their epoch to the functional units, and writebacks, verifications and fills
carry it back. Results of a squashed issue that are still in flight no longer
match and are ignored. A verification or fill is used only if some queue holds
the load's current issue (`ver_ok`, `fill_match`). An entry stays in the
queue after its writeback until its mask is empty. So an instruction that
finishes before its load is verified, which is common when the feedback delay
is 9 cycles, can still be replayed.

## Crossing between the queues

The two queues are taken to be physically apart. The tags granted in one
queue reach the other one clock later, through a latch in `isq_xq_wake`. In
front of each queue's ready-status update, a 2:1 multiplexer chooses between
the queue's own grants of this cycle and the other queue's latched grants.
The select is a register: "the other queue issued last cycle". While the
latched tags are selected, that queue's own grants would have nowhere to go,
so it does not bid in that cycle (`*_xq_pending`). In practice this costs one
issue cycle each time issue switches from one queue to the other. Latched
tags whose producer a miss squashes in that cycle are dropped, and hit bits
are cleared from them, so a delayed tag is never staler than an undelayed
one.

`isq_src_mux` merges the issuing queue's instructions onto the path to the
register file. It shares a cycle with the first pipeline register. So
`rf_issue` is one edge after grant, and `fu_issue` is `ISSUE_EXEC_LAT` edges
after grant.

## Files

| file | content |
|---|---|
| `rtl/isq_pkg.sv` | widths and the entry, uop, wakeup, issue, verify and writeback structs |
| `rtl/dual_issue_queue.sv` | top: the whole scheduler |
| `rtl/isq_queue.sv` | one issue queue (used as both MIQ and RIQ) |
| `rtl/isq_class_arbiter.sv` | issue select: 8 grants, lowest index first, capped per functional-unit class |
| `rtl/isq_arbiter.sv` | multi-grant arbiter for moves, releases and slot allocation |
| `rtl/isq_xq_wake.sv` | cross-queue delay latch and result-tag multiplexer |
| `rtl/isq_bid_ctrl.sv` | which queue bids, `replay_req` |
| `rtl/isq_src_mux.sv` | source-tag multiplexer with pipeline register |
| `rtl/isq_delay_line.sv` | issue-to-execute and feedback delays |
| `rtl/isq_dispatch.sv` | builds MIQ entries, producer lookup |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_isq_config_sweep` |
| `tb/isq_core_model.sv` | model of the rest of a core around one scheduler, for the sweep |

## Parameters of the top

| parameter | default | meaning |
|---|---|---|
| `MIQ_DEPTH` | 48 | main queue entries |
| `RIQ_DEPTH` | 32 | replay queue entries |
| `ISSUE_W` | 8 | issue width |
| `DISP_W` | 8 | dispatch group size |
| `VER_W` | 4 | load outcomes per cycle (4 load/store units) |
| `WB_W`, `REL_W`, `MOVE_W` | 8 | writebacks, releases, moves per cycle |
| `ISSUE_EXEC_LAT` | 9 | grant to `fu_issue`, in cycles (at least 1) |
| `FEEDBACK_DELAY` | 9 | cache hit/miss to queues, in cycles |

The sizes in `isq_pkg` are package constants: 256 reorder-buffer entries,
whose index is the tag; 64 load/store-queue slots, which is the mask width;
latencies up to 31.

Other studied configurations are reached by parameters: MIQ/RIQ sizes of
32/32, 48/24, 48/48 and 64/64, and issue-to-execute and feedback delays of
1 to 9. A unified queue with no RIQ (`RIQ_DEPTH = 0`) is not supported.

## Interface and timing

All inputs take effect at the next rising edge. The reset (`rst_n`) is
asynchronous and active low, and clears every queue and pipeline stage.

* `disp_valid` / `disp_uop`: a group is taken at an edge where `disp_ready`
  is high; otherwise hold it. `src_has[s] = 0` means the value is
  architectural, with no in-flight producer.
* `fu_issue[l]`: `{tag, epoch, op, fu, lat, is_load, lsq, src_tag}` of an issue.
  The functional units must return the same `tag` and `epoch`.
* `wb_in`: writeback of a non-load, or of a load that hit.
* `dc_verify`: one lane per load outcome, `{tag, epoch, lsq, hit}`, at the
  cycle the cache knows it.
* `fill_in`: `{tag, epoch}` when a missed load's data arrives. It counts as
  that load's writeback. Do not send `wb_in` for a load that missed.
* `*_rel_valid` / `*_rel_tag`: the entry leaves the queue at this edge.
* Status: `replay_req`, `miq_issuing`, `*_xq_pending`, `move_count`, and the
  occupancy `miq_occ`, `miq_post` (post-issue entries still in the MIQ),
  `riq_occ`, `riq_post`.

## What was decided here rather than taken from the scheme

The scheme fixes the structure: two queues of the same design, moves of
issued instructions into the RIQ, RIQ priority, one queue issuing per cycle,
delayed cross-queue tags through multiplexers with registered selects, the
source-tag multiplexer merged with a pipeline latch, entries freed only at
writeback, and replay of the direct and indirect dependants of a missed
load. The following are this design's own choices:

* the load-dependence masks and epochs used to find and squash replayed
  instructions;
* one cycle of cross-queue delay, and the rule that a queue receiving
  delayed tags does not bid in that cycle. This can lose one issue cycle
  when issue switches between the queues, although the scheme is described
  as adding no pipeline bubbles;
* lowest-index-first grant (not oldest-first), with fully pipelined units;
* all-or-nothing dispatch of 8;
* dispatch-time producer lookup;
* up to 8 moves, releases and writebacks per cycle;
* a fill wakes dependants with latency 1;
* `FEEDBACK_DELAY = 9`. The studied range is 1 to 9, and the value used for
  the headline results is not stated.

Issue respects the unit counts of the studied machine: per cycle at most 8
integer ALU, 2 integer multiply/divide, 4 load/store, 8 FP add and 2 FP
multiply/divide/sqrt operations (`FU_UNITS` in `isq_pkg`). All units are
taken as fully pipelined; a non-pipelined divider would need a busy timer in
the select. Outside this RTL: the rename unit, register file, functional
units, caches, reorder buffer and load/store queue. Their signals are the
top's ports.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_dual_issue_queue` runs the top at its default size. It models rename,
  functional units, cache and memory: 30 % loads, 15 % L1 misses with a
  12-cycle fill, and latencies of 1 to 24. It runs 4000 random instructions
  and checks at every release that the released issue executed on correct
  operands and was the instruction's last issue. It also counts each
  mechanism and fails if one never occurs: speculative issue, hits, misses,
  RIQ replay, moves, delayed tags in both directions, a full MIQ, a full RIQ,
  re-issues, and a functional-unit class issuing at its limit. Every cycle it
  checks that no class issues more operations than it has units. A typical run takes about 4100 cycles (IPC about 1 on this
  dependence-heavy random program). The MIQ holds about 43 entries on
  average, of which about 2.5 are post-issue, and the RIQ about 23. About
  5800 issues are needed for the 4000 instructions, and 75 % of them come
  from the MIQ. The program is deliberately hard: 15 % of its loads miss,
  and its dependence chains are short and dense, so replays are far more
  frequent than in typical code.
* `tb_isq_queue` has directed cases with exact cycle counts: back-to-back
  wakeup, 3-cycle latency, a load miss with a direct and an indirect
  dependant replayed after the fill with a new epoch, a stale writeback
  ignored, release held until a hit is verified, and moves.
* `tb_isq_config_sweep` runs the same synthetic 2000-instruction program
  (helper `tb/isq_core_model.sv`, a hash-driven model of the rest of a core)
  on the MIQ/RIQ sizes 32/32, 48/24, 48/32, 48/48 and 64/64 and prints the
  IPC of each relative to 48/32. On this program 32/32 is 1 % and 48/24 4 %
  slower, and 48/48 and 64/64 1 % faster: nearly all the gain of a larger
  RIQ is gone beyond 32 entries. It checks correctness of every release and
  the queue bounds; it takes a few minutes to build (five copies of the top).
* The other testbenches compare each small block with an independent model
  over random inputs.

Simulate with Verilator, for example:

```
verilator --binary --timing --assert -y rtl -y tb rtl/isq_pkg.sv \
    tb/tb_dual_issue_queue.sv --top-module tb_dual_issue_queue -Mdir obj -o sim
./obj/sim
```

The package is named first; `-y` finds the modules. The full top takes about
a minute to build.
