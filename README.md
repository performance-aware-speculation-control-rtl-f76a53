# Performance-aware fetch gating with wrong-path usefulness prediction

Fetch gating saves energy in an out-of-order core by stopping instruction
fetch when the core is probably fetching down a mispredicted (wrong) path.
Gating assumes that wrong-path work is wasted. It is not always wasted.
Wrong-path loads often touch lines that the correct path needs soon
afterwards: a hammock that reads the same data on both sides, or code after
the reconvergence point. In a memory-bound program those loads act as
prefetches, and gating them away costs both time and energy.

This RTL implements a speculation controller that gates fetch only when two
predictions agree:

1. **Branch-count fetch gating** predicts "on the wrong path" when the
   number of unresolved branches in flight is larger than a threshold T.
   T is re-chosen every 100 000 cycles from the branch prediction accuracy
   measured over the last interval.
2. **A wrong-path usefulness predictor (WPUP)** predicts that this wrong
   path would *not* prefetch anything useful.

Two WPUPs are provided, and an input selects which one decides:

* **Branch-PC WPUP**: a small tag-only cache of branch PCs whose wrong path
  was seen to be useful. It is looked up with the PC of the most recently
  fetched branch.
* **Phase WPUP**: a 5-bit counter of useful wrong-path events per
  interval. If the last interval had more than 5, gating is switched off for
  the whole of the current interval.

Both predictors learn from the L2 miss status holding registers (MSHRs),
which is the least obvious part of the design and is described first.

## Learning usefulness in the MSHRs

The scheme needs to know when a wrong-path miss was later used by the
correct path, and which branch led to it. The MSHRs can tell while a miss is
outstanding, which is most of the time for a DRAM access. So branch
information is attached to every memory instruction on its way to the MSHRs:

| where | added field | written when |
|---|---|---|
| fetch engine | `LBPC`, 16 bits: low PC bits of the latest fetched branch | a branch is fetched |
| each front-end latch (11) | `BPC`, 16 bits, carried with the packet | packet fetched: gets LBPC *before* its own branches |
| each LSQ entry (32) | `BPC` and the branch ID (`BID`, 10 bits) | load/store allocated |
| each L2 MSHR (32) | `BPC`, `BID`, wrong-path bit `WP` | L2 miss allocated |

So an MSHR entry knows the youngest branch fetched before the load that
caused it. Two events then act on the entries:

* **A branch resolves mispredicted.** Its BID is broadcast, and every entry
  whose BID is the same as or younger than it gets `WP` set: that load was
  fetched after the mispredicted branch. The comparison is modulo 1024
  (`bid_older_or_equal` in `spec_ctrl_pkg`), which is exact while fewer
  than 512 branches are in flight.
* **A later request merges into an entry with `WP` set.** That request is
  almost always a correct-path one. The wrong-path miss has therefore
  prefetched something useful, and the MSHR emits `useful_valid` with the
  entry's BPC one cycle later. Every such hit is one event. The BPC is
  inserted into the WPUP cache, and the event increments the phase counter.

A wrong-path miss that is already filled before its branch resolves is not
seen. That is the price of tracking usefulness in 32 MSHRs rather than in
every L2 line.

## Branch-count fetch gating

`branch_count_reg` (BCR, 8 bits) adds the branches fetched each cycle
(up to 2) and subtracts those resolved. It also subtracts the unresolved
branches squashed by a misprediction recovery (`squash_cnt`); without that
input the count would drift up after every misprediction. The count
saturates at 0 and 255.

`bpred_accuracy_monitor` counts resolved and correctly predicted branches in
two 18-bit counters. In the last cycle of every interval it picks T for the
next interval:

| accuracy | >= 99 % | 97-99 | 95-97 | 93-95 | 90-93 | 85-90 | < 85 |
|---|---|---|---|---|---|---|---|
| T (default, 11-stage core) | 18 | 16 | 13 | 12 | 11 | 7 | 3 |
| T (`THRESH` override for a 30-stage, 512-entry-window core) | 60 | 50 | 40 | 30 | 20 | 15 | 13 |

A bin's lower bound belongs to it, so exactly 99 % gives 18 and exactly 95 %
gives 13. The comparison is exact integer arithmetic,
`correct*100 >= total*bound`. After reset T is 18. An interval with no
resolved branch keeps the previous T. Gating is predicted whenever
`BCR > T` (strictly larger).

## Putting it together

`speculation_control` forms

```
gate_fetch = (BCR > T) && !(wpup_sel == WPUP_PC ? wpup_cache_hit(LBPC) : phase_useful)
```

The WPUP cache is only looked up (`pc_lookup`) when `BCR > T` and the PC
predictor is selected, to save lookup energy. Both predictors are trained at
all times, so switching `wpup_sel` takes effect at once.

The WPUP cache has 32 entries in 8 sets of 4 ways. Each entry holds a 13-bit
tag, a valid bit and 2 LRU bits. The set index is BPC bits [4:2]; bits [1:0]
of a word-aligned PC carry no information. Training a BPC that is already
present makes it most recent. Otherwise it fills an invalid way, or else
replaces the least recent way. Lookups never change the LRU state: being
looked up often does not make a branch useful.

## Block map

| file | what it is |
|---|---|
| `rtl/spec_ctrl_pkg.sv` | widths (BPC 16, BID 10), `wpup_sel_e`, the BID age function |
| `rtl/wpup_spec_ctrl_top.sv` | top: all of the below wired to the host core's signals |
| `rtl/lbpc_reg.sv` | LBPC register and packet tag |
| `rtl/bpc_pipe.sv` | BPC field of the 11 front-end latches (stall, flush) |
| `rtl/lsq_branch_tags.sv` | BPC/BID of the 32 LSQ entries |
| `rtl/l2_mshr_wp.sv` | 32 L2 MSHRs with BPC/BID/WP, merge/allocate/full, useful events |
| `rtl/speculation_control.sv` | gating decision; holds the four blocks below |
| `rtl/interval_timer.sv` | 100 000-cycle interval pulse, shared |
| `rtl/fetch_gate_bc.sv` | BCR + accuracy monitor + `BCR > T` |
| `rtl/branch_count_reg.sv`, `rtl/bpred_accuracy_monitor.sv` | the two halves of it |
| `rtl/wpup_cache.sv` | branch-PC WPUP |
| `rtl/phase_wpup.sv` | phase WPUP (WPUC counter) |

The top does not contain the fetch engine, branch predictor, branch
resolution, LSQ address logic or the L2 cache. They belong to the host core,
and their signals are the top's ports. Each cycle the core presents at most
one fetch packet (up to two branch PCs), the branch resolutions of that
cycle, at most one LSQ allocation and one L2 request (the L2 has one port),
and at most one MSHR fill.

## Timing

* All state is in flops with asynchronous active-low reset, except the
  data arrays (LSQ tags, MSHR addresses, WPUP tags), which are written
  without reset and read only where a valid bit is set.
* `gate_fetch` is combinational from registered state and from LBPC, so a
  fetch or resolution affects the gate in the next cycle.
* A misprediction (`mispred_valid`) reloads LBPC with the mispredicted
  branch's BPC, flushes the front-end BPC latches and ignores a fetch in the
  same cycle.
* An L2 request gets its merge/allocate/full answer in the same cycle
  (`l2_req_full` means retry). `useful_valid` follows one cycle after the
  merge, and T and the phase prediction change one cycle after
  `interval_end`.

## Choices made in this RTL

These points are not fixed by the scheme itself and were decided here:

* Squashed branches leave the BCR through `squash_cnt`, and the BCR
  saturates.
* Up to 2 branches resolve per cycle (`RES_W`). At that rate the 18-bit
  accuracy counters cannot overflow in an interval.
* On recovery, LBPC takes the mispredicted branch's BPC.
* The BPC is kept per fetch packet, not per instruction. A load that comes
  after a branch in the same packet carries the BPC of the branch before the
  packet, not of that branch.
* The MSHR sets WP when the mispredicted branch is older than the entry's
  branch **or is the same branch**. A stricter "older than" reading would
  miss loads that directly follow the mispredicted branch.
* The base MSHR behaviour (line match, lowest free entry, retry when full,
  free on fill) is a plain implementation. Requests without a branch, such
  as prefetches, are not modelled.
* The WPUP cache index bits, training of a present PC, and the LRU encoding.
* The phase counter saturates at 31. The phase prediction is "not useful"
  after reset.
* The predictor is chosen at run time (`wpup_sel`) rather than at build
  time.

Periodically flushing the WPUP cache, and using WPUP with other gating
schemes (for example confidence-based ones), are not built.

## Parameters

Defaults are the 11-stage baseline core: `FETCH_W=2`, `FE_STAGES=11`,
`LSQ_ENTRIES=32`, `MSHR_ENTRIES=32`, `INTERVAL=100000`, `BCR_W=8`,
`ACC_W=18`, `THRESH='{18,16,13,12,11,7,3}`, `WPUP_ENTRIES=32`,
`WPUP_WAYS=4`, `WPUC_W=5`, `PHASE_THRESHOLD=5`. The predictor works with a
phase threshold from 5 to 20 and with WPUP caches of 8 to 128 entries.

For the aggressive 30-stage core, set `FE_STAGES=30`, `LSQ_ENTRIES=128` and
the second threshold row. In that core the 512-entry window can hold more
than 255 branches; the BCR then saturates, which is still above every
threshold.

Storage at the defaults: the phase scheme adds 45 bytes (MSHR BID+WP
fields and the 5-bit counter). The PC scheme adds 260 bytes (LBPC, 11 BPC
latches, 32 LSQ BPCs, 32 MSHR BPC/BID/WP, 32 cache entries). The gating
itself adds 44 bits.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference values are
computed independently in the testbench: reference queues, floating-point
accuracy bins, and a recency list per cache set.

`tb/tb_wpup_spec_ctrl_top.sv` runs the top at its default parameters for
six 100 000-cycle intervals (about 3 million checks, a few seconds). The
testbench acts as the core:

* It runs a loop with a hammock branch, the hammock's data load, two filler
  branches and an independent load.
* It resolves branches in order 25-45 cycles after fetch, with recovery and
  squash.
* It models a 300-cycle memory and obeys `gate_fetch`.

Intervals alternate between wrong paths that reread the hammock line
(useful) and wrong paths that do not (useless), and between the two
predictors. The testbench checks:

* BCR and T against its own bookkeeping;
* the BPC tag of every packet reaching the LSQ;
* the outcome of every L2 request;
* that every useful event, with its BPC, is one it expects.

It also requires each of these to happen at least once: gating, override by
each predictor, recovery with squash, front-end stall, MSHR full, WP
marking, useful event, WPUP eviction, two-branch packet and threshold
change.

`tb/tb_wpup_top_aggressive.sv` runs the same program against the
aggressive configuration: 30 front-end stages, a 128-entry LSQ, the second
threshold row, a 400-cycle memory and later branch resolution.
`tb/tb_wpup_top_memlat.sv` keeps the default design but uses a 700-cycle
memory (its `MEM_LAT` localparam; 200 and 500 pass as well). Its independent
load walks through memory 8 iterations per line, because a new miss every
iteration would keep all 32 MSHRs full at that latency. All three testbenches
also check that every wrong-path miss still outstanding is marked at a
misprediction. They count the correct-path misses marked only because the
10-bit branch ID wrapped around. In these runs there were none.

The parameter
ranges are covered at unit level. `tb_wpup_cache` checks caches of 8, 16, 32,
64 and 128 entries against a recency model each. `tb_phase_wpup` checks the
phase thresholds 5 and 20.

Simulating one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/spec_ctrl_pkg.sv tb/tb_wpup_spec_ctrl_top.sv --top-module tb_wpup_spec_ctrl_top
./obj_dir/Vtb_wpup_spec_ctrl_top
```

The same command with another `tb/tb_*.sv` file and top module runs a unit
testbench.

Not verified: the design has only been simulated in two-state Verilator and
elaborated in Yosys. No timing or area has been measured on a real
technology, and it has not been run inside a real core.
