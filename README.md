# WF-Segment: a wakeup-free instruction scheduler with a segmented issue queue

A conventional out-of-order issue queue wakes instructions up. Every cycle,
each finishing instruction broadcasts its destination tag to every queue
entry, and each entry compares the tag against its sources. The delay and
power of this broadcast grow quickly with queue size and issue width.

This design removes the broadcast. At rename, each instruction gets a
**prediction** of how many cycles remain until its operands are ready, taken
from a table of per-register ready times. Its queue entry then counts that
number down by itself. Nobody needs to tell it that an operand has arrived.

A prediction can be wrong: a load misses, an issue port is busy, or a load
waits for a store. So before an instruction may compete for an issue port, it
checks its operands against a bit vector of truly ready registers. If the
check fails, the instruction is sent back up the queue with a new estimate.

The queue is split into **segments** by remaining latency. Only the bottom
segment, holding instructions predicted ready now, drives the selection
logic. Selection therefore looks at 8 entries instead of 32.

The RTL is the scheduler of a 4-wide core: rename, latency prediction, the
segmented queue, selection, issue ports and ready bits. The decoder, the
reorder buffer, the function units and the memory system are outside it and
appear as ports.

## The life of an instruction

1. **Rename and pre-schedule** (`rename_prescheduler`)
   - Up to 4 decoded instructions per cycle get physical registers from
     `free_list`.
   - The issue latency is the largest predicted ready latency of the sources,
     read from `timing_table`.
   - Sources written earlier in the same group are bypassed: their latency is
     the producer's issue latency plus its operation latency.
   - The destination's predicted ready latency is the issue latency plus the
     operation latency. It is written to the timing table, and the
     destination's ready bit in `ready_bit_reg` is cleared.
   - Loads take their operation latency from `load_hitmiss_pred`, a bimodal
     table of 2048 two-bit counters. A predicted hit gives 2 cycles (L1) and
     a predicted miss gives 8 (L2).
   - Loads also consult `ldst_dep_pred`, described below. If the load is
     predicted to depend on a store that has not issued yet, its issue
     latency is raised to at least that store's.
   - The renamed group waits in a 4-entry dispatch buffer. Its latencies keep
     counting down while it waits.
2. **Dispatch** (`seg_issue_queue`, `seg_router`)
   - Each instruction goes to the segment whose range holds its latency.
     The segments are 0, 1–2, 3–4 and more than 4 cycles, 8 entries each.
   - If that segment is full, the instruction goes to the next higher one
     with room.
   - The group is placed in program order. When one instruction finds no
     room, it and everything after it wait.
3. **Sinking** (`sink_arbiter`)
   - Every entry above the bottom segment has a latency counter that drops
     by one per cycle.
   - When the counter falls into the range of the segment below, the
     instruction asks to move down one segment.
   - A free entry k below can take the entry k−1, k or k+1 above it. Entries
     in the left half prefer the left neighbour first; entries in the right
     half prefer the right neighbour first. This spreads instructions toward
     both ends.
4. **Pre-check** (bottom segment)
   - On arrival in the bottom segment, an instruction reads the ready bits of
     its sources.
   - If all are set, it requests an issue port in the same cycle and keeps
     requesting until granted.
   - If not, it **switches back**: it moves to a segment chosen by a new
     latency, which is the current timing-table latency of its sources but
     at least `SB_MIN_LAT`.
5. **Select and issue** (`select_logic`, `issue_ports`)
   - At most 4 of the 8 bottom entries are granted, lowest index first.
   - An issued instruction leaves the queue. It never replays, because it
     passed the pre-check.
   - For fixed-latency operations, the issue port sets the destination's
     ready bit one cycle before the result exists. That is at once for
     1-cycle operations, and through a shift line for longer ones. A
     consumer that passes its pre-check in the next cycle then meets the
     value on the bypass.
   - Loads do not set their own ready bit. The memory system does, through
     `mem_wake_*`, one cycle before the data can be used.

### Who gets a free entry

A freed entry is offered to three kinds of movers in a fixed order:
1. switch-backs first;
2. then sinking instructions;
3. then dispatch.

Each mover uses the state at the start of the cycle. An entry emptied in a
cycle is refilled in the next one.

## Latency convention used everywhere

A stored latency always means "cycles from the cycle in which you can see
this value until the predicted ready cycle":
- Every counter, in the timing table, the dispatch buffer and the queue,
  drops by one at each clock edge and saturates at zero.
- Writing a value v therefore stores v−1.

This one rule keeps rename, the buffer, the queue and the ready bits aligned.
For example, a 1-cycle ALU producer and its consumer can issue in back-to-back
cycles.

## Load/store dependence prediction

`ldst_dep_pred` has three parts:
- a 2048-entry table of 2-bit counters indexed by the load PC ("does this
  load usually depend on a store?");
- a 2048-entry table holding the PC of that store;
- `nist`, a 16-entry CAM of stores that have been renamed but not issued.
  Each entry holds the store's PC, tag and predicted issue latency.

A load is predicted dependent only when three things hold:
- its counter says "dependent";
- it has a valid store PC;
- that store PC is currently in the NIST.

The load's issue latency is then at least the store's predicted issue
latency, as held in the NIST.
Stores enter the NIST at rename and leave it when they issue. The tables are
trained by the memory system through `dep_upd_*`.

## Keeping the queue moving

Latency prediction and switch-back alone can livelock:
- The queue can fill with instructions that wait on one producer and keep
  failing their pre-check.
- Their switch-backs have first claim on free entries, so they take every
  entry the producer would need in order to sink.

The end-to-end test ran into this. The design has three remedies of its own:

- **Fixed switch-back floor.** `SB_MIN_LAT` defaults to 5, so a failed
  instruction goes to the top segment. It then sinks back over several
  cycles instead of bouncing between the two lowest segments every cycle.
  The queue test checks this timing exactly. With a floor of 1 (pure
  recomputation) the end-to-end test deadlocks.
- **Starvation priority.** A sink request that was refused in one cycle is
  served, in the next cycle, before requests that were not refused. Each
  level runs two passes of the same sink arbiter.
- **Oldest-instruction escape.** The reorder buffer gives the tag of its
  oldest instruction (`rob_head_*`). All of that instruction's operands are
  ready.
  - If it sits above the bottom segment and did not sink this cycle, it moves
    straight into a free bottom entry.
  - If there is none, it swaps places with a failed instruction that found
    no room above.

  This guarantees progress. `ev_o.escape` counts each use.

## Top-level interface (`wf_segment_top`)

| port | direction | meaning |
|---|---|---|
| `dec_i[4]`, `dec_ready_o` | in / out | decoded group (architectural registers, op class, PC, reorder-buffer tag); taken in a cycle with `dec_ready_o` high |
| `ren_fire_o`, `ren_o[4]` | out | renaming done this cycle: physical registers, previous mapping of the destination, predicted latencies |
| `free_en_i[4]`, `free_reg_i[4]` | in | registers freed at commit (the previous mappings) |
| `fu_v_o[4]`, `fu_inst_o[4]` | out | instructions issued this cycle, one per issue port |
| `mem_wake_en_i[2]`, `mem_wake_reg_i[2]` | in | a load's destination becomes ready; assert it one cycle before the data is usable |
| `rob_head_v_i`, `rob_head_tag_i` | in | oldest instruction in flight |
| `lhp_upd_*` | in | hit/miss outcome of a load, trains the hit/miss predictor |
| `dep_upd_*` | in | whether a load depended on a store, and that store's PC |
| `occ_o[4]`, `ev_o` | out | per-segment occupancy; per-cycle counts of issues, pre-check failures, switch-backs, sinks, dispatches, overflows, stalls, port conflicts and escapes |

The issue queue output is combinational within the cycle. Everything else is
registered.

## Sizes and parameters

The shared sizes are in `rtl/wf_pkg.sv`:

| parameter | default | origin |
|---|---|---|
| `FETCH_W`, `ISSUE_W` | 4, 4 | the 4-wide core that is evaluated |
| `NUM_SEGS`, `SEG_SIZE` | 4, 8 | four segments of twice the issue width, 32 entries |
| `SEG_HI` | 0, 2, 4 | segment latency ranges 0 / 1–2 / 3–4 / >4 |
| `ROB_SIZE` | 128 | reorder buffer size, gives the 7-bit tag |
| `L1_LAT`, `L2_LAT` | 2, 8 | load latencies for a predicted hit / miss |
| predictor tables | 2048 | hit/miss counters, dependence counters, store PCs |
| NIST | 16 | not-issued store table |
| `NUM_LREGS`, `NUM_PREGS` | 64, 192 | own choice |
| `LAT_W` | 6 | own choice, saturating counters |

Operation latencies are fixed per class and are this design's own choice:
IALU 1, IMUL 3, IDIV 20, FALU 2, FMUL 4, FDIV 12. Changing `ISSUE_W`
rescales the segments with it. The issue widths of 6 and 8 are not the
default.

## Files

`rtl/` has one module per file. Each file starts with a description of its
function, timing, and which parts are design choices.

- `wf_pkg.sv`: sizes, instruction structs, latency helpers.
- `rename_prescheduler.sv`: rename and issue-latency prediction.
- `free_list.sv`: physical register free list.
- `timing_table.sv`: predicted ready latency per physical register.
- `ready_bit_reg.sv`: register ready bits.
- `load_hitmiss_pred.sv`: load hit/miss predictor.
- `ldst_dep_pred.sv`: load/store dependence predictor.
- `nist.sv`: the not-issued store table.
- `seg_issue_queue.sv`: the segmented queue.
- `seg_router.sv`: dispatch and switch-back placement.
- `sink_arbiter.sv`: sink grants.
- `select_logic.sv`: the issue select.
- `issue_ports.sv`: issue ports and the ready-bit shift line.
- `wf_segment_top.sv`: the whole scheduler.

`tb/` has one self-checking testbench per module, `tb_<module>.sv`.

`tb_wf_segment_top` runs the scheduler at its default sizes. Its testbench
models the parts outside the scheduler:
- a reorder buffer that commits in order and frees previous mappings;
- two memory ports that wake loaded registers, with real hits and misses;
- predictor training.

It runs 6000 instructions from a random program with dependences, loads and
stores. It checks four things:
- every renaming against a reference map;
- that every instruction issues exactly once;
- that at issue, every source value already exists;
- that everything commits.

It also fails unless each mechanism happened at least once: sinking,
pre-check failure, switch-back, dispatch overflow, dispatch stall, port
conflict, escape, same-group dependence, predicted miss and predicted store
dependence. A typical run takes about 6800 cycles (IPC ≈ 0.9 on this
deliberately hard mix).

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends; it passes when
M is 0. With verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/wf_pkg.sv tb/tb_wf_segment_top.sv \
          --top-module tb_wf_segment_top -Mdir obj_top -o sim
./obj_top/sim
```

Any other block works the same way: replace `wf_segment_top` with the module
name. The testbenches use `$urandom` only. They drive inputs just after the
rising edge and sample at the falling edge.

## Departures and limits

- **Switch-back latency.** The described scheduler recomputes the latency of
  a failed instruction from the timing table, and allows a fixed value
  instead. This design takes the larger of the two, with a fixed floor of 5.
- **Extra forward-progress rules.** Starvation priority and the
  oldest-instruction escape are this design's own additions, as explained
  above.
- **Unspecified details are this design's choices:**
  - filling dispatch from the left end of a segment and switch-backs from
    the right end;
  - positional selection;
  - keeping a failed instruction in the bottom segment when there is no
    room above;
  - the exact rule for bypassing same-group dependences;
  - predictor index bits (PC[12:2]) and reset values.
- **Not included:** the earlier wakeup-free designs this one is compared
  with. These are the countdown/replay-queue scheduler, the variant that
  replays failed issues, and the pre-check variant with random selection
  over the whole queue. Also not included: a conventional broadcast
  scheduler, the reorder buffer, function units, caches, branch prediction
  and recovery from mispredicted branches.
- **Lint.** verilator reports only unused-signal warnings, each explained in
  the file concerned. The concurrent assertions, which are sampled on the
  clock and disabled during the asynchronous reset, also give one
  SYNCASYNCNET note. Synthesis of the whole scheduler is slow, because the
  2048-entry predictor tables are reset register arrays.
