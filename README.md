# Value-based memory ordering: a load queue without address search

An out-of-order core normally keeps its in-flight loads in a load queue with a
content-addressable address array. Every store address, and on many machines
every load and every external invalidation, searches that array for loads that
ran too early. The search grows slower and hungrier for energy with every entry
and every port, while what it checks for (a load that got the wrong value)
hardly ever happens.

This RTL implements the alternative: **check loads by value, not by address**.
Loads still execute early ("premature" loads) exactly as before, including
store-to-load forwarding from the store queue. But they go into a plain FIFO
that nothing ever searches. Just before commit, a load may read the L1 data
cache a second time (its **replay**). If the replayed value equals the premature
value, the load was right, whatever happened meanwhile. If not, the load and
everything after it are squashed and re-executed. Filters cut the replays down
to the few loads that could actually be wrong.

The RTL is the back end of the core: the load FIFO, the replay / compare /
commit stages, the filters, a simple dependence predictor and the sharing of the
back-end cache port. The core, the store queue and the caches stay outside and
connect through the ports of `vbr_top`.

## The life of a load

```
 dispatch        premature issue / completion      ROB head, in order
    |                     |                               |
    v                     v                               v
 +------------------- load_fifo --------------------+   +----+   +----+   +----+
 | tail -> [ PC | addr | value | nus reord norep ]  |-->| R  |-->| C  |-->| M  |--> commit
 |          ...          (no CAM, no search)        |rp +----+   +----+   +----+
 | head -> oldest load                              |     | replay  ^ data   | store write
 +--------------------------------------------------+     v  read   |        v
                                                     cache_port_arbiter (stores first)
                                                             |   ^
                                                             v   |
                                                        L1 data cache port
```

1. **Dispatch** (`alloc_*`): the load gets the next FIFO entry; its age is the
   entry index plus one wrap bit.
2. **Premature issue** (`issue_*`): the core reports whether the load bypassed
   an older store whose address was still unknown (the *no-unresolved-store*
   mark, `nus`) and whether an older store is incomplete. `issue_marker` adds
   whether any older load in the FIFO is incomplete. Together these give the
   *reordered* mark.
3. **Premature completion** (`exec_*`): address and value go into the entry.
4. **R (replay stage)**: when the reorder buffer presents the load
   (`ret_*`), the stage takes the FIFO entry at the replay pointer.
   `replay_decision` says whether it replays. A replaying load reuses the
   stored address and reads the cache through the shared port.
5. **C (compare stage)**: the replayed value is compared with the stored one.
   A mismatch raises `squash_valid` with the load's age and PC.
6. **M (commit stage)**: loads leave the FIFO; stores write the cache here.

Every instruction, not only loads, passes R, C and M, so the stream stays in
program order. A filtered load passes R and C without touching the cache.

## Why a replay that matches is enough

Three rules make a replay a complete check of both the thread's own
store-to-load dependences and the memory consistency model:

* **All older stores are in the cache before a load replays.** Stores write the
  cache in M, so R holds a replaying load while a store sits in C or M
  (`events.store_wait`). The replay therefore sees every older store of its
  own thread, and no forwarding path to replays is needed. As a side effect, a
  replay and a store never want the port in the same cycle. The arbiter still
  gives stores priority, and an assertion checks that they never meet.
* **Replays happen in program order.** At most one replay read is outstanding.
  A slow replay (a miss) holds C, and the next replay waits for its data
  (`events.replay_miss_wait`). So other processors' writes are seen in their
  order. With a one-cycle cache hit, back-to-back replays run at one per cycle.
* **A load that caused a squash is not replayed again.** Without this rule, a
  heavily contended word could squash the same load forever. The core restarts
  at `squash_pc`, which is the squashing load itself, so the first load
  dispatched after a squash is that load. `vbr_top` gives it the `no_replay`
  bit. It re-executes after every older instruction has executed, so it
  cannot have bypassed an older store. A remote write that lands between its
  re-execution and its commit only orders the load before that write.

A squash empties R and C, rewinds the FIFO to the squashing load, and, if that
load had bypassed an unresolved store, sets its bit in the dependence predictor.

## Replay filters

Replaying every load costs one cache access and one word compare per load, and
it fills the single back-end port. `mode` (`vbr_pkg::filter_mode_e`) selects one
of four configurations, and it may be changed at run time:

| mode | a load replays when |
|---|---|
| `FM_REPLAY_ALL` | always |
| `FM_NO_REORDER` | it issued while an older load or store was incomplete |
| `FM_NO_RECENT_MISS` | it bypassed an unresolved store address, **or** the no-recent-miss flag is set |
| `FM_NO_RECENT_SNOOP` | it bypassed an unresolved store address, **or** the no-recent-snoop flag is set (the main configuration) |

In every mode, a load with the `no_replay` bit does not replay.

The two "recent" filters rest on one argument. A consistency violation needs a
cycle in the graph of ordering constraints between processors. If no block has
entered the local caches from another processor (`fill_event`) while a load was
in the window, no constraint can point *into* that load. If no external write
has been seen (`snoop_event`), none can point *out of* it. Each filter
(`recent_event_filter`) is one flag and one age register:

* An event sets the flag and records the age of the youngest load in the
  window: one being dispatched in that cycle, else the newest FIFO entry.
* While the flag is set, and in the cycle of the event itself, every load in R
  is forced to replay.
* When the load with the recorded age leaves R, the flag clears. A newer event
  moves the age on, so the flag then stays set longer.
* If no load is waiting ahead of R or held in R, the event sets nothing.

The no-unresolved-store mark covers the thread's own dependences, and the recent
filters cover consistency. Neither alone is enough, so they are combined with
OR. The no-reorder filter covers both and is used alone.

## Dependence predictor

Value-based replay cannot name the store a wrong load depended on, so a
store-set predictor cannot be trained. `dep_predictor` is a 4096-entry table of
one bit per entry, indexed by PC bits [13:2]. A squash of a load marked `nus`
sets the bit of its PC. The scheduler looks up a load's PC (`dp_lookup_pc`) and,
one cycle later, `dp_lookup_wait` tells it to hold the load until all older
store addresses are known. Bits are cleared only by reset.

## Modules

| file | role |
|---|---|
| `rtl/vbr_pkg.sv` | widths (64-bit address, data, PC), `lq_entry_t`, `filter_mode_e`, `inst_kind_e`, `vbr_events_t` |
| `rtl/vbr_top.sv` | top level: wires the blocks, the rule-3 marking, the squash / flush rewind |
| `rtl/load_fifo.sv` | the search-free load queue: head, replay and tail pointers, rewind |
| `rtl/issue_marker.sv` | reordered mark at issue, from the FIFO's done bits |
| `rtl/replay_pipeline.sv` | R, C and M stages, rule enforcement, squash, commit |
| `rtl/replay_decision.sv` | replay yes/no from the mode, marks and filter flags |
| `rtl/recent_event_filter.sv` | flag and age register; instantiated for misses and for snoops |
| `rtl/dep_predictor.sv` | PC-indexed one-bit wait table |
| `rtl/cache_port_arbiter.sv` | back-end L1D port shared by commit stores and replays, stores first |

## Connecting it to a core

All ports are synchronous to `clk`. `rst_n` is an active-low asynchronous reset.

| group | ports | what the core must do |
|---|---|---|
| dispatch | `alloc_valid`, `alloc_pc`, `alloc_ready`, `alloc_age` | present loads in program order. A load is taken when `alloc_valid && alloc_ready`, and `alloc_age` names it from then on. |
| issue | `issue_valid`, `issue_age`, `issue_nus`, `issue_older_st_incomplete` | report each premature issue with the store-queue marks |
| completion | `exec_valid`, `exec_age`, `exec_addr`, `exec_data` | report the premature address and value |
| predictor | `dp_lookup_pc`, `dp_lookup_wait` | look up a load one cycle before deciding to issue it |
| recovery | `flush_valid`, `flush_age` | drop loads from `flush_age` on (for example after a branch misprediction). Never drop loads already handed to the back end. |
| events | `fill_event`, `snoop_event` | one-cycle pulses from the cache hierarchy. `fill_event` marks a block arriving from another processor. `snoop_event` marks an external write or invalidation reaching the core. With an inclusive hierarchy that filters invalidations, a cast-out from the private caches must also pulse `snoop_event`, or a later invalidation of that block could go unseen. |
| retirement | `ret_valid`, `ret_kind`, `ret_st_addr`, `ret_st_data`, `ret_ready` | present completed instructions in program order. A load is accepted only once its entry has completed. |
| cache | `dc_req_*`, `dc_resp_*` | one request per cycle, valid/ready. Reads return exactly one response, in order, one cycle or more later. |
| squash | `squash_valid`, `squash_age`, `squash_pc` | on a pulse, discard everything from the squashing load on and restart fetch at `squash_pc`. The first load dispatched next must be that load. |
| commit | `commit_valid`, `commit_kind`, `commit_data`, `commit_age` | one pulse per committed instruction; `commit_data` is the load's value |
| observation | `events`, `leave_age`, `miss_flag`, `snoop_flag`, `lq_count` | per-cycle event pulses, filter flags and FIFO occupancy, for counters |

Timing: a load that needs no replay spends one cycle in each of R, C and M. A
replaying load asks for the port in R. With a one-cycle cache it compares in C
on the next cycle, so loads can replay back to back, one per cycle. A squash is
raised in the cycle the mismatching data reaches C. The FIFO refuses allocation
in a rewind cycle.

Parameters of `vbr_top`: `LQ_DEPTH` = 128 (a power of two) and
`DP_ENTRIES` = 4096. The 128 entries are the machine's load/store queue size;
the replay design keeps loads in this FIFO instead.

## How far it can be trusted

Each block has a self-checking testbench in `tb/`:

* `tb_issue_marker`: random FIFO states against a walk from head to load.
* `tb_load_fifo`: random dispatch, issue, completion, reads, commits and
  rewinds against a reference queue.
* `tb_dep_predictor`: random training and lookups against a reference table.
* `tb_recent_event_filter`: random events and departures against the
  flag/age rule.
* `tb_replay_decision`: all 128 input combinations.
* `tb_cache_port_arbiter`: random requests, checking store priority.
* `tb_replay_pipeline`: directed cases. These cover one replay per cycle,
  filtered loads with no cache access, a replay waiting for an older store and
  then squashing, a squash without predictor training, a slow replay holding
  the next one, a rule-3 load, and a busy port stalling commit.
* `tb_vbr_top`: end to end at full size. The testbench models a core that
  issues loads out of order and sometimes gives them stale values (bypassing
  unresolved stores). It also models a memory with random stalls and slow
  accesses, and a second processor that writes random words and raises the
  snoop event. It runs the four modes in turn on 1500-instruction programs.
  Each committed load must equal the value that program order and memory give
  when it leaves R. A rule-3 load must equal its premature value. Commits must
  be in program order. Each mechanism must occur at least once: replays,
  back-to-back replays, filtered loads, RAW replays, store waits, slow
  replays, squashes of both kinds, rule-3 skips, both flags, predictor holds,
  a full FIFO, core flushes and a busy port.
* `tb_vbr_scenarios`: directed end-to-end cases at full size, with exact
  counts of replays, squashes and rule-3 skips. The cases are:
  * the two-processor case, under the snoop filter and under the no-reorder
    filter. Here a load runs ahead of an older load that misses, and another
    processor writes both words in between.
  * a fill with no write, which is ignored by the snoop filter and replayed by
    the miss filter. Loads dispatched after the flag clears are not replayed.
  * a load that bypassed an unresolved store, which waits, squashes and trains
    the predictor.
  * contention that continues after a squash, which still makes progress.
  * replay spacing: one replay per cycle with a one-cycle cache, and one per
    access time with a slower one.
  * the three-cycle latency from retirement to commit.

Run one with plain Verilator from the project root, for example:

```
verilator --binary --timing --assert -y rtl rtl/vbr_pkg.sv tb/tb_vbr_top.sv --top-module tb_vbr_top
./obj_dir/Vtb_vbr_top
```

Each testbench ends with a line `TB_RESULT checks=N failures=M`.

What is **not** verified: the design has not been run inside a real core or on
real programs, so its performance claims (replay rates, IPC) are not
reproduced here. The multiprocessor case is only exercised through one
modelled external writer.

## Departures and own choices

* The squash includes the load that mismatched. That load is re-executed and,
  by rule 3, not replayed. The scheme as usually described squashes the
  instructions after the load. Squashing the load as well makes rule 3 the
  only path that commits it; a variant could commit the replayed value and
  squash only the younger instructions.
* The predictor is trained only by squashes of loads that bypassed an unresolved
  store. Other mismatches are consistency events, which the predictor cannot
  prevent. No periodic clearing of the predictor is built.
* The recent-event filters treat a load being dispatched in the event cycle,
  and a load held in R, as part of the window. This is conservative.
* The flag clears when the recorded load leaves R, whether or not it replayed
  (a rule-3 load leaves without replaying).
* A replay that misses in the cache is handled by keeping only one replay read
  outstanding. Every later replay waits for its data, so replays can never
  reorder. This is simpler than letting later loads go on and then forcing them
  to replay once the miss resolves, which is needed only when several replays
  can issue in one cycle. Loads filtered from replay do not wait.
* The flag is keyed to the age of the youngest load already in the FIFO. Loads
  that are fetched but not yet dispatched have not issued, so they cannot have
  read a stale value before the event.
* The premature side is the core's job: the store-queue search, forwarding,
  holding a load that the predictor marks until all older store addresses are
  known, and the four load ports of the out-of-order window. This RTL only
  takes the marks and values it produces.
* Widths (64-bit words, addresses and PCs), the valid/ready handshakes, the
  age encoding and the branch-recovery port are this implementation's own.
* The arbiter gives stores priority even though rule 1 keeps replays and stores
  apart. An assertion in `replay_pipeline` checks that they never collide.

## Sizes of the evaluated machine

The design was evaluated with a 256-entry reorder buffer and one back-end
load/store port, on SPEC CPU2000 integer programs, three SPEC FP2000 programs,
commercial workloads, and 16-processor SPLASH-2, SPECweb99, SPECjbb2000 and
TPC-H runs. About 30% of dynamic instructions are loads, so a full 256-entry
window holds about 77 loads on average, well inside the 128-entry FIFO. A window
that is unusually load-heavy fills the FIFO, and dispatch then stalls on
`alloc_ready`. This back end does not store program data, so no other size
limits which workloads it can run.
