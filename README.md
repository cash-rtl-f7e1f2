# CASH — a criticality-aware split hybrid L1 data cache

Most loads in an out-of-order core can tolerate a few extra cycles of latency
without slowing the program: their result is not on the critical path. Only a
small fraction of loads has a global slack shorter than the read latency of an
STTRAM array. CASH uses that observation to build an L1 data cache out of two
parts of different technology:

* **P0**, a small, fast SRAM partition (16 KB, 8-way, 3-cycle lookup) that holds
  lines used by *critical* loads, and
* **P1**, a larger, dense STTRAM partition (32 KB, 8-way, 8-cycle read, 105-cycle
  write, one operation every 4 cycles) that holds everything else worth keeping.

The two partitions are strictly exclusive, so together they offer 48 KB, where a
conventional all-SRAM L1 has 32 KB. STTRAM writes are slow and costly, so the
controller also keeps lines that would be written often, or never reused, out of
P1. Three small predictors decide this for each line: criticality (CCP),
deadness (CDP) and write intensity (CWP).

The RTL in `rtl/` is synthesizable SystemVerilog. The L2 cache and the core
are outside the design; they appear as ports on `cash_top`. A behavioural L2
model for simulation is in `tb/cash_l2_model.sv`.

## Block overview

| Module | Role |
|---|---|
| `cash_top` | Wires everything together. No parameters; all sizes are the defaults of the sub-blocks. |
| `cash_controller` | Hybrid cache controller. Holds the Status Holding Register (SHR), the L2 request queue and the P1 lookup queue. Applies the placement and migration rules. |
| `cash_p0_sram` | P0 tag/data array: lookup pipeline plus a line-fill port. |
| `cash_p1_sttram` | P1 tag/data array: one shared port for lookups and line writes. |
| `cash_lwb` | Line write buffer: 20 lines waiting for a write port of P0 or P1. |
| `cash_ccp` | Criticality predictor: post-commit buffer, slack analysis, 2048-entry counter table. |
| `cash_pattern_sim` | Sampled access-pattern simulator that trains the CDP and CWP. |
| `cash_cdp`, `cash_cwp` | Deadness and write-intensity predictor tables, 1024 × 2-bit counters each. |
| `cash_prefetcher` | Stride/stream detector on P0 read misses. |
| `cash_fifo` | Two-push, one-pop FIFO used for the ordered L2 and P1 queues. |
| `cash_pkg` | Shared widths, enums and structs. |

Widths used throughout: 64-byte lines, 64-bit words, 29-bit word addresses
(a 2 GB word-addressed space) and 26-bit line addresses. These widths are
this design's own choice. Changing `WADDR_BITS`/`WOFF_BITS` in `cash_pkg`
rescales everything.

## Interfaces of `cash_top`

All signals are synchronous to `clk`. `rst_n` is an asynchronous, active-low
reset.

* **Core requests** use `req_valid`/`req_ready` with `req_write`, an 8-bit
  `req_tag`, `req_waddr` and `req_wdata`. A request is accepted on a rising
  edge where both valid and ready are high. `req_ready` is high only when
  three things hold:
  * an SHR entry is free;
  * at least one LWB entry is free;
  * the L2 queue has room.

  This is the "the pipeline waits for SHR and LWB space" rule.
* **Responses** come one per accepted request, in no fixed order, as a
  `resp_valid` pulse with `resp_tag`, `resp_write`, `resp_rdata` and
  `resp_src`. `resp_src` says where the access was served: `SRC_P0`, `SRC_P1`,
  `SRC_LWB`, `SRC_L2`, or `SRC_WRITE` for a store that missed everywhere.
  There is no back-pressure on responses.
* **Commit stream** for the criticality predictor: `commit_valid` with a
  `commit_rec_t` record. The record holds:
  * whether the instruction is a load;
  * the line address it accessed;
  * its execute latency;
  * the distance back to its producer (0 = none).

  `commit_dropped` marks a record that was not buffered. Commits never stall.
* **L2 side:**
  * `l2_req_valid`/`l2_req_ready` carry an `l2_req_t`. It is either a line
    fetch tagged with the 4-bit SHR index, or a write-through word.
  * `l2_abort_valid`/`l2_abort_id` ask the L2 to abandon a fetch.
  * The L2 must answer every fetch exactly once, with `l2_resp_valid`,
    `l2_resp_id` and either the line or `l2_resp_aborted`.
* **`ev`** is a vector of one-cycle event pulses for statistics: stalls,
  hits per source, aborts, placements, bypasses, dropped placements,
  migrations, prefetches and write-throughs.

## Access flow

Each accepted request occupies one of 16 SHR entries until it has been
answered and all traffic it started (L2 fetch, P1 lookup) has come back.

1. **Parallel lookup.** The request looks up P0 and the LWB in the cycle it is
   accepted. Its P1 lookup is queued. P1 has a single port that accepts one
   operation every 4 cycles, so lookups wait in an ordered FIFO.
2. **LWB hit.** A line staged in the LWB answers the request in the next
   cycle (`SRC_LWB`). The queued P1 lookup is then no longer needed.
3. **P0 result.** The P0 result appears exactly 3 cycles after acceptance.
   * A read hit is answered in that cycle.
   * On a miss, a line fetch is queued to the L2 immediately, without waiting
     for P1.
4. **P1 result.** The P1 result appears 8 cycles after the lookup is issued.
   On a hit:
   * the request is answered from P1;
   * an abort is sent for its L2 fetch;
   * the migration rule below is applied.
5. **L2 answer.** If neither partition has the line, the L2's line answers
   the request and goes to the placement rule.

The L1 is **write-through, no-write-allocate**:

* Every store is queued to the L2 as a single-word write.
* A store that hits P0, P1 or a staged LWB line also updates that copy.
* A store that misses allocates nothing.
* Evicted lines are simply dropped; there is no dirty state anywhere in the L1.

### Ordering and stale lines

Lines travel from the L2 or from P1 to their destination through the LWB, which
takes time. A store that arrives in the meantime must not be overwritten by the
older copy. The controller therefore marks every older SHR entry of the same
line whose line copy is still in flight as *stale*. A stale line is still used
to answer its own request, but it is never placed or migrated. A second fetch
of a line already being fetched is handled in the same way. The L2 request
queue and the P1 lookup queue both keep acceptance order. As a result, a
write-through always reaches the L2 after any earlier fetch of the same line.

## Placement and migration

A line that arrives from the L2 is placed as follows (first match wins):

| Prediction | Action |
|---|---|
| dead | bypass the L1 |
| critical | place in P0 |
| write-intensive | bypass the L1 |
| otherwise | place in P1 |

When an access hits in P1, the line *migrates* to P0 if both of these hold:

* it is not predicted dead;
* it is predicted critical, or the access is a store and the line is
  predicted write-intensive.

On a migration, P1 invalidates its copy in the same operation as the lookup,
so the line exists only in the LWB until it is written into P0. Prefetched
lines go through the same placement rule. A prefetch never triggers a
migration.

### Lines that arrive before their P1 lookup resolves

Because of P1's 4-cycle issue interval, the L2 line can come back before the P1
lookup of the same request has finished. Placing it at once could put a second
copy of a line that is in fact in P1. Such a line is pushed into the LWB in a
**HOLD** state:

* If the P1 lookup then hits, the held copy is dropped.
* If it misses, the placement rule is evaluated. The entry becomes a normal
  waiting entry for P0 or P1, or is freed on a bypass.

This state is this design's addition. It keeps the partitions exclusive
without delaying the core's response.

If the LWB is full when a line should be staged, the placement is skipped. The
core still gets its data. This is counted as `place_drop`.

## Line write buffer

Each of the 20 entries holds an address, a 512-bit line, a destination (P0 or
P1) and a state: free, waiting, writing or hold.

* It accepts two pushes per cycle: an L2 line and a migrating line.
* Lookups and store-word merges only see *waiting* entries. A *writing* entry
  is already visible in P1's array.
* Each cycle, the lowest-index waiting P0 entry is written into P0 through
  P0's fill port. That entry frees in the same cycle.
* The lowest-index waiting P1 entry is offered to the P1 port. Once granted,
  the entry stays *writing* until P1 acknowledges it 105 cycles later.
* A store to a line that is being drained in the same cycle is merged into
  the written copy.

The controller arbitrates the P1 port. LWB line writes have priority when fewer
than four LWB entries are free, or when the next queued lookup is no longer
needed. Otherwise lookups go first.

## The criticality predictor (CCP)

The CCP follows the dispatch/execute/commit (D/E/C) graph model of instruction
criticality. Committed instructions are recorded in a post-commit buffer of
two halves of 32 records. When one half is full it is analysed while the other
half fills. A commit that finds its half still busy is dropped, so the
predictor samples and never stalls commit.

The analysis builds a graph over the 32 records with these edges:

* D(i−1)→D(i), weight 1: in-order dispatch;
* D(i)→E(i), weight 1;
* E(producer)→E(i), weight = the producer's execute latency;
* E(i)→C(i), weight = the instruction's own latency;
* C(i−1)→C(i), weight 1: in-order commit.

A forward pass computes each node's as-soon-as-possible time. The deadline is
the last commit time. A backward pass computes the as-late-as-possible times.
The global slack of a load is ALAP(E) − ASAP(E). A load with slack below
`THRESH` = 8 cycles (the P1 read latency) is critical. The two passes take one
cycle per record each, 64 cycles per half.

Every analysed load trains a counter in a 2048-entry table, indexed by the low
bits of its line address:

* +8 if it was critical, −1 otherwise (6-bit, saturating);
* the table predicts "critical" while the counter is at least 8.

So a single critical occurrence makes a line critical for the next several
non-critical ones. The update amounts and counter width are this design's
reading of the counter model and can be changed by parameter.

## Deadness and write-intensity predictors (CDP, CWP)

`cash_pattern_sim` watches the L1 access stream through 32 sampled sets. The
set index is the low 5 line-address bits. It has two LRU-managed parts:

* **Read part, 6 ways, sees every access.**
  * A line evicted without having been reused trains *dead*.
  * The first reuse of a line trains *live*.
* **Write part, 2 ways, sees stores only.**
  * A second store to a resident line trains *write-intensive*.
  * A line evicted after a single store trains *not write-intensive*.

Training events carry a 10-bit signature: the low bits of the line address.
They update two tables of 1024 2-bit saturating counters. The prediction is
the counter's most significant bit, so both tables start out predicting
"live" and "not write-intensive". All three predictors have three
combinational lookup ports:

* port 0: placement of an L2 line;
* port 1: migration at P1-lookup issue;
* port 2: the held-line decision.

## Prefetcher

A single-stream stride detector is trained with every read that misses in P0.
When a miss repeats the previous non-zero stride (±1 line is a sequential
stream), the detector proposes the next line along that stride. The
controller issues the proposal as a prefetch request when an SHR entry is
free. The prefetch goes through the normal lookup, so a line already in the
cache is not fetched again.

## Timing summary

| Path | Cycles |
|---|---|
| P0 read hit (accept → response) | 3 |
| LWB hit | 1 |
| P1 hit | ≥ 8 after lookup issue (queueing behind earlier P1 operations adds) |
| L2 line | P0 miss (3) + L2 latency + queueing |
| P1 line write | port busy 4 cycles, LWB entry held 105 cycles |
| P0 line fill | one per cycle from the LWB |
| CCP analysis | 64 cycles per 32-record half |
| CDP/CWP training | one cycle after the access |

## How it departs from the described design

The following are this design's own choices. In each case the described
design leaves the point open.

* 64 B lines, 64-bit words and the address widths.
* Round-robin replacement in P0 and P1. LRU in the pattern simulator.
* The HOLD state in the LWB, and the stale-line rule.
* P0's "0.5 cycle per access" is taken as two accesses per cycle: one lookup
  and one fill.
* P1's array contents change when a line write is issued. The 105-cycle
  latency only delays the acknowledgement that frees the LWB entry.
* The CCP's buffer size, graph edge set and counter update amounts.
* The CDP/CWP training rules and index bits. The described predictors follow
  an earlier hybrid-cache design whose internals are not given here.
* A single-stream stride prefetcher. The described system uses stride and
  stream prefetchers without detail.
* Response order, P1 port arbitration and the L2 handshake.

Known limitation: when a migration out of P1 and an L2 fill of the same line
cross in the LWB, a rare race can leave the line in both partitions. Reads
still return correct data, because all copies receive every store. However,
the exclusivity invariant is not enforced by hardware in that case.

STTRAM is modelled as an ordinary synchronous array with STTRAM timing. The
cell technology, energy and the non-volatility are not modelled.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| Testbench | What it checks |
|---|---|
| `tb_cash_p0_sram` | Exact 3-cycle latency, fills, replacement, store hits against a reference array. |
| `tb_cash_p1_sttram` | 8-cycle reads, the 4-cycle issue interval, 105-cycle write acknowledgement, migration invalidation. |
| `tb_cash_lwb` | Push, lookup, merge, hold resolution, drain order, acknowledgement. |
| `tb_cash_ccp` | Slack and criticality against a software reference of the graph, counter predictions, dropped commits. |
| `tb_cash_pattern_sim` | Training events against a reference LRU model. |
| `tb_cash_cdp`, `tb_cash_cwp` | Counter tables against reference counters. |
| `tb_cash_prefetcher` | Proposals for +1, +3 and −2 strides and random misses. |
| `tb_cash_controller` | Each branch of the placement and migration rules, with forced predictions. |
| `tb_cash_top` | The whole design at full default size (see below). |

For `tb_cash_controller`, the predictions are forced by the testbench and the
controller runs with the real arrays, LWB and L2 model. The test checks, for
each case:

* where the next access is served from;
* the data returned;
* the P0 latency;
* that stores are written through.

`tb_cash_top` drives the whole design at its default sizes with the
behavioural L2. The run has:

* about 6000 accesses in four phases: a reused working set, a strided
  stream, store-heavy aliasing lines, and a burst over fresh lines;
* a synthetic commit stream that makes some lines critical.

It checks:

* every load against a reference memory image;
* every latency class: P0 exactly 3, P1 ≥ 8, L2 ≥ 15, LWB ≥ 1;
* that every request is answered;
* that each mechanism happened at least once. The mechanisms counted are:
  stalls, hits from each source, P1 and L2 aborts, placements in P0 and P1,
  both kinds of bypass, dropped placements, migrations, prefetches,
  write-throughs and dropped commits.

It runs in well under a second.

To simulate with Verilator, for example the full design:

```
verilator --binary --timing --assert -Irtl rtl/cash_pkg.sv rtl/*.sv \
    tb/cash_l2_model.sv tb/tb_cash_top.sv --top-module tb_cash_top -o sim
./obj_dir/sim +verilator+seed+7
```

For a block testbench, list `rtl/cash_pkg.sv`, the block's module and its
testbench. The controller's testbench needs all of `rtl/` plus the L2 model.
