# Call Graph Prefetching (CGP) — instruction prefetcher RTL

Large layered programs such as database engines miss often in the
instruction cache. Their control flow jumps from function to function, and
each function runs only a few dozen instructions. The order of those calls
repeats well, though. Once `Create_rec` has been entered, `Find_page`,
`Lock_page`, `Update_page` and `Unlock_page` nearly always follow, in that
order.

Call graph prefetching uses this. For every function F, a small cache
remembers the functions F called during its last invocation, in order. While
F runs, the prefetcher fetches the first lines of the callee it expects
next, before the call happens. Inside a function, plain next-N-line
prefetching covers straight-line code. This repository contains
synthesizable SystemVerilog for the whole prefetcher and for the L1
instruction cache it fills:

| module | role |
|---|---|
| `cgp_ras` | return address stack that also remembers each caller's start address |
| `cghc_ctrl` | Call Graph History Cache (CGHC) engine: two-level history, prefetch and update accesses |
| `cghc_store` | one direct-mapped CGHC level (used twice) |
| `cgp_pf_gen` | turns one predicted callee into N line prefetches (CGP_N) |
| `nl_prefetcher` | next-N-line prefetching inside the running function |
| `icache` | 32KB 2-way L1 I-cache with 32-byte lines that receives all prefetches |
| `l2_req_queue` | one in-order FIFO to L2 for demand misses and prefetches; merges duplicates |
| `cgp_top` | all of the above, wired together |
| `cgp_pkg` | shared types (`cghc_entry_t`, `cgp_event_t`, `cgp_stat_t`, ...) |

The branch predictor, the processor core, the L2 cache and main memory are
not part of this RTL. They connect through `cgp_top`'s ports. The
testbenches contain a behavioural L2 model (`tb/l2_model.sv`).

## The call graph history

A CGHC entry belongs to one function F and holds:

* **tag**: F's start address (all 32 bits);
* **index**: a value from 1 to 8, the call slot that is next to be filled
  and predicted;
* **data**: eight slots, each a callee start address with a valid bit. Eight
  32-bit addresses make one 32-byte line.

An entry also carries a `full` flag, set when slot 8 has been written (see
*Saturation* below).

### Four accesses per call and return

Each call and each return makes two CGHC accesses, in two different
cycles. The storage therefore needs only one port.

| event | 1st access: prefetch | 2nd access: update |
|---|---|---|
| call, P calls F | look up **F**; on a hit, prefetch **slot 1** of F | look up **P**; write F into the slot at P's index; index + 1 |
| return, F returns to P | look up **P**; on a hit, prefetch the slot at **P's index** | look up **F**; reset F's index to 1 |

Together these steps replay last time's call sequence. When P calls its
k-th callee, P's index moves to k+1. When that callee returns, the
prefetch access on P fetches slot k+1, the callee that followed last time.
Calling F prefetches F's own first callee.

A lookup can miss in both levels. It then issues no prefetch and creates an
entry with index 1 and no valid slots. One case differs: an update miss for
a call (P calls F) creates P's entry with F already in slot 1. That entry's
index becomes 2, exactly as a normal update would leave it.

**Worked example.** `Op` calls `Create_rec` twice. The first time the page
must be read from disk, so `Find_page` also calls `Getpage`. On the second
pass the prefetcher issues, in order: `Find_page` (on entering `Create_rec`),
`Getpage` (on entering `Find_page`; that prediction is wrong this time),
`Lock_page` (on returning from `Find_page`), `Update_page` and then
`Unlock_page`. `tb_cghc_ctrl` checks this exact sequence.

### Where return needs help

A return instruction's target lies somewhere inside P, but the CGHC is
indexed by P's start address. `cgp_ras` therefore keeps a register with the
start address of the function that is running. On a call it pushes that
address next to the return address. On a return it pops both, so it knows
which function is being returned to. Each call or return leaves `cgp_ras`
as a `cgp_event_t`:

| event | `pf_key` | `upd_key` |
|---|---|---|
| call | F | P |
| return | P | F |

An unknown key is flagged invalid and its access is skipped. This happens
before the first call, or when the stack underflows. A push onto a full
stack overwrites the oldest entry.

### Two levels

The first level has 64 entries (2KB of data lines) and answers in the same
cycle. The second level has 1024 entries (32KB) and answers `L2_LAT` = 16
cycles later, the L2 cache latency. On a first-level miss:

* **second-level hit**: the entry moves up into the first level;
* **second-level miss**: a new entry is created in the first level;
* **either way**: the first-level entry it displaces is written back to the
  second level.

Both levels are direct mapped. The set index is taken from address bits
`[2 +: log2(ENTRIES)]`.

A moved entry's old copy stays in the second level. Nothing can read it
before the entry leaves the first level, and leaving writes the newer copy
to the same place. A second-level hit on a prefetch access still issues the
prefetch, 16 cycles late.

### Timing

Event timing with an idle engine and a first-level hit, counted from the
prediction in cycle p:

| cycle | what happens |
|---|---|
| p | the branch predictor predicts the call or return; `cgp_ras` registers the event |
| p+1 | prefetch access (tag match) in `cghc_ctrl` |
| p+2 | `pf_valid`/`pf_addr` out: the prefetch is issued |
| p+3 | update access: read-modify-write of the first level; `cgp_pf_gen` requests the first line |
| p+4 … | one more line per cycle, while the L2 queue accepts them |

Each second-level access adds 16 cycles. The engine handles one event at a
time. Events that arrive while it is busy wait in a 4-entry FIFO. When the
FIFO is full they are dropped and counted as `stat.ev_drop`. This only
costs a prediction, never correctness.

### Saturation

A function with more than eight calls keeps its first eight. After slot 8
has been written, `full` is set and the index stays at 8. Further calls are
not recorded. A return to that function issues no prefetch until the
function itself returns, which clears `full` and resets the index.

## Getting lines into the cache

* **CGP_N** (`cgp_pf_gen`): a predicted callee start address becomes N = 4
  consecutive line requests, starting with the line that holds the start
  address. A newer prediction replaces an unfinished burst.
* **NL_N** (`nl_prefetcher`): each demand access to a new line L requests
  lines L+1 … L+4.

Both prefetchers first probe the I-cache tags and drop lines already
present (`stat.pf_cached`). A fixed-priority arbiter then feeds
`l2_req_queue`: demand miss first, then CGHC, then NL.

Once queued, requests go to L2 strictly in order, with no priority for
demand misses. The queue keeps each entry until its line returns, so it
knows every line in flight. A request for such a line is merged instead of
sent again (`in_dup`). This covers two cases:

* an NL prefetch of a line the CGHC already requested is squashed
  (`stat.pf_squash`);
* a demand miss on a prefetched line still in flight becomes a **delayed
  hit**.

The I-cache blocks on a miss and returns whole 32-byte lines. Each line
carries a "prefetched, not yet used" bit, which sorts every prefetch into
one of three outcomes:

* **prefetch hit**: the first use finds the line present;
* **delayed hit**: the line was still in flight when it was needed;
* **useless prefetch**: the line was replaced before any use.

The three outcomes, together with every other mechanism, leave `cgp_top`
as one-cycle pulses in the `stat` struct, so external counters can measure
the prefetcher.

## `cgp_top` interface

| port | dir | width | meaning |
|---|---|---|---|
| `call_valid`, `call_target`, `call_ret_addr` | in | 1, 32, 32 | predicted call: callee start address and return address |
| `ret_valid` | in | 1 | predicted return; never in the same cycle as a call |
| `ret_pred_valid`, `ret_pred_addr` | out | 1, 32 | return address popped from the stack, same cycle |
| `fetch_valid`, `fetch_addr`, `fetch_ready` | in, in, out | 1, 32, 1 | demand fetch, taken when ready |
| `resp_valid`, `resp_addr`, `resp_data` | out | 1, 32, 256 | the 32-byte line: next cycle on a hit, later after a miss |
| `l2_req_valid`, `l2_req_line`, `l2_req_ready` | out, out, in | 1, 27, 1 | line request to L2 (valid/ready) |
| `l2_resp_valid`, `l2_resp_data` | in | 1, 256 | one response per request, in request order |
| `stat` | out | 14 | event pulses, see `cgp_pkg::cgp_stat_t` |

A cold demand miss with an idle queue returns its line 4 cycles after the
L2 latency:

| cycles | step |
|---|---|
| 1 | miss detected |
| 1 | request queued |
| 16 | L2 |
| 1 | line written into the cache |
| 1 | response |

All state resets asynchronously with `rst_n` low. The memories, meaning the
cache data and tags and the CGHC entries, are not reset; their valid bits
are.

## Parameters

| parameter (`cgp_top`) | default | origin |
|---|---|---|
| `CGP_N` | 4 | published CGP_4 configuration (CGP_2 was also evaluated) |
| `NL_N` | 4 | published NL_4 configuration |
| `L1_ENTRIES` | 64 | 2KB first-level CGHC ÷ 32-byte entries |
| `L2_ENTRIES` | 1024 | 32KB second-level CGHC ÷ 32-byte entries |
| `CGHC_L2_LAT` | 16 | L2 hit latency of the evaluated processor |
| `CACHE_BYTES` | 32768 | 32KB L1 I-cache, 2-way, 32-byte lines (ways and line size fixed) |
| `RAS_DEPTH` | 16 | own choice |
| `EVQ_DEPTH` | 4 | own choice |
| `QDEPTH` | 8 | own choice |

## What follows the published scheme, and what is this design's own

These follow the published description:

* the CGHC entry contents;
* the four accesses and their rules;
* the caller start address on the return stack;
* the 2KB + 32KB two-level CGHC and its move/write-back policy;
* N-line prefetching of callees, with NL prefetching inside functions;
* prefetching straight into the L1 I-cache;
* one FIFO to L2 without demand priority;
* squashing of prefetches already in flight;
* the cycle schedule: access one cycle after prediction, prefetch the next
  cycle, update the cycle after.

These are choices of this implementation:

* 32-bit addresses, and the set index taken from the bits above the 4-byte
  alignment;
* "2KB/32KB" read as the size of the data lines;
* a direct-mapped second level;
* the `full` flag. The rule "the index saturates at 8" and the rule "only the
  first 8 callees are kept" cannot both hold without one;
* index 2 after a call-update miss;
* prefetching on a second-level hit;
* the event FIFO, and dropping events when it is full;
* the return stack depth and its overflow/underflow behaviour;
* the arbiter order;
* the queue depth and the merge mechanism;
* the L2 handshake;
* the I-cache's LRU replacement, blocking misses and probe ports;
* filtering CGHC prefetches against the cache as well as NL prefetches.

The prefetcher's benefit has not been measured against real programs.
Speed-up figures for database or SPEC workloads need full-system simulation
of billions of instructions, which is beyond an RTL testbench.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_cghc_store` | reads after writes; full-address tag compare; replacement; reset |
| `tb_cghc_ctrl` | the Create_rec example; a caller with 10 callees (only the first 8 are prefetched); 3000 random calls and returns against a reference model of the two-level CGHC (every prefetch address and latency); event FIFO overflow |
| `tb_cgp_ras` | return addresses, caller addresses and events against a stack model, including overflow and underflow |
| `tb_cgp_pf_gen`, `tb_nl_prefetcher` | burst contents and order; cache filtering; back-pressure; restart; 1-cycle start latency |
| `tb_l2_req_queue` | FIFO order under a stalling L2; duplicate merging; full back-pressure; fill data |
| `tb_icache` | hits and misses, LRU, timing, probes and the three prefetch outcomes against a 2-way LRU model |
| `tb_cgp_top` | end to end at default sizes (see below) |

`tb_cgp_top` runs a synthetic layered program of 700 functions, about 100KB
of code. The testbench acts as core and branch predictor and runs 60
queries, which take about 206k cycles. The core model spends two cycles
on each fetched line. It checks:

* every fetched line's data;
* every predicted return address;
* that every CGHC prefetch names a real function start;
* the cold-miss latency.

It also requires every mechanism to occur at least once: I-cache hit and
miss, first-level CGHC hit, second-level hit and allocation, CGHC and NL
requests, squash, cache-filtered prefetch, prefetch hit, delayed hit,
useless prefetch and dropped event.

Finally it measures how often the CGHC was early. A call counts as
foreseen when a CGHC prefetch for its target was issued in the 40 cycles
before it. In the default run 3541 of 7504 calls (47%) are foreseen. The
check requires at least a third. The rest are lost to cold history, to the
8% of calls the program skips at random, and to events the engine drops
while it waits on a second-level CGHC access.

To run a testbench with Verilator 5, for example the end-to-end one:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/cgp_pkg.sv tb/tb_pkg.sv tb/l2_model.sv rtl/*.sv tb/tb_cgp_top.sv \
    --top-module tb_cgp_top -o tb && ./obj_dir/tb
```

The unit testbenches need only `rtl/cgp_pkg.sv`, `tb/tb_pkg.sv` (and
`tb/l2_model.sv` for `tb_l2_req_queue`), the module and its submodules,
and the testbench. The testbenches shrink the CGHC and the cache through
parameters to force conflicts. `tb_cgp_top` uses every default.
