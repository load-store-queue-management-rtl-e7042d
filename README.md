# Split load-store queue with Bloom-filter state filtering

An out-of-order core lets loads run ahead of older stores. To stay correct, a
conventional load-store queue makes every load search the store queue (SQ) for
data to forward, and every store search the load queue (LQ) for younger loads
that already read stale memory. Both searches are wide associative address
compares with priority encoding, done for every memory instruction, although
only a small share of loads ever meet an in-flight store.

This design cuts that cost by splitting the load queue in two:

* an **Associative Load Queue (ALQ)**, a small conventional LQ, for loads that
  are predicted to depend on an in-flight store;
* a **Banked Non-associative Load Queue (BNLQ)**, a plain FIFO like a reorder
  buffer, for the other loads. These loads never search the SQ, and stores never
  search the BNLQ.

The BNLQ still has to catch the rare load that did read ahead of a store. It does
this cheaply with an **Exclusive Bloom Filter (EBF)**: a table of small counters
that records which hash buckets hold issued, uncommitted BNLQ loads. A committing
store looks up its own bucket. A zero means no BNLQ load can have read its
address early. A nonzero count means one may have, and a **background search**
of the BNLQ decides whether a load really did (a true hit) or only shares the
hash (a false hit). A **PC-indexed dependence predictor** steers loads between
the two queues. It learns from the squashes and is reset every 100,000 cycles.

The default build is the main configuration. Two alternatives are available by
parameter: squashing on every EBF hit (with a "dependence predictor update"
mode to train the predictor), and a profile-based predictor that takes a tag
from each load instead of learning.

The RTL is SystemVerilog (IEEE 1800-2017). All of it is synthesizable, and it
passes `verilator --lint-only -Wall` with warnings only.

## The life of a load

1. **Dispatch** (`lsq_steer`, `lsq_dep_pred`). The predictor is read with the
   load's PC.
   * A load predicted *dependent* goes to the ALQ. If the ALQ is full, dispatch
     stalls. Such a load is never put in the BNLQ, because it would very likely
     cause a costly squash.
   * A load predicted *independent* goes to the BNLQ. If the BNLQ is full, the
     load is *upgraded* to the ALQ instead of stalling. It stalls only if the ALQ
     is full too.
   * Stores go to the SQ.

   The dispatch port returns which queue took the instruction and its index. The
   core passes both back when the instruction executes.
2. **Execution.**
   * An ALQ load searches the SQ (`lsq_sq`). The youngest older store with the
     same address and a known address supplies the data. Otherwise the data
     cache word supplied by the core is used.
   * A BNLQ load takes the cache word without searching anything. It increments
     the EBF counter at `addr % 4001`, and the BNLQ records that the load was
     *counted*.
   * A store that gets its address searches the ALQ (`lsq_alq`). If an executed
     younger load has the same address, the unit squashes from the oldest such
     load on.
3. **Commit** (in program order, driven by the core).
   * A committing load leaves the ALQ or the BNLQ, whichever holds the older
     head. A counted BNLQ load decrements its EBF counter.
   * A committing store writes the cache through `mem_wr_*` and looks up the
     EBF. A nonzero counter starts the background search.

## The Exclusive Bloom Filter (`lsq_ebf`)

* It has 4001 four-bit counters. The size is prime, so that `addr % 4001` spreads
  word addresses better than a 4096-entry table would.
* Each cycle it takes one increment (a BNLQ load issues), two decrements (a BNLQ
  load commits, and one step of the flush walk) and one lookup (a store
  commits). Changes to the same counter in one cycle are added together.
* **Overflow.** When a counter is at 15, the increment is refused and the load
  gets `ld_accept = 0`, so the core retries it later. The exception is a load
  that is already the oldest memory instruction in flight: no older store is
  left to conflict with it. That load issues without touching the filter and is
  marked *not counted*, so its commit does not decrement.
* **Flush walk.** Squashed loads must give back their counts, or leftover counts
  would slowly clog the filter. On a flush, every BNLQ entry from the squash
  point on is marked dead at once (`lsq_bnlq`). The dead entries are then
  removed from the tail, one per cycle, and each counted one decrements its
  counter. While the walk runs, the BNLQ accepts no new loads. Independent
  loads are upgraded to the ALQ as if the BNLQ were full.
* **Reset.** The table is written as a memory, so it has no reset of its own.
  After reset, a sweep clears one counter per cycle, which takes 4001 cycles.
  Meanwhile lookups read zero and every increment is refused. As a result only
  the oldest memory instruction can issue from the BNLQ during the sweep.

## False hits and the background BNLQ search (`lsq_bnlq_search`)

This is the subtle part of the design. An EBF hit only means that some issued
BNLQ load has the same hash as the store. The simple answer is to squash
everything after the store at once. This design instead confirms the hit first,
in the background, while the core keeps running:

1. **Start.** The search is started by the committing store that hits in the
   EBF. It records the store's address and takes a snapshot of which BNLQ
   entries are live and issued. Only those loads can have read memory before
   the store wrote it. Any load that issues later reads the new value and needs
   no check.
2. **Sweep.** The BNLQ is split into 4 banks by index (entry *i* is in bank
   *i* mod 4). Consecutive entries are therefore in different banks, and the
   search reads 4 consecutive entries per cycle, one per bank, starting at the
   BNLQ head. Each entry read has its pending bit cleared. An entry flushed in
   the meantime drops out of the check.
3. **Result.**
   * At the first match in program order, the search raises `found` with that
     load's sequence number and PC. The unit squashes from that load on and
     trains the predictor entry of that PC to *dependent*.
   * If every pending entry is cleared without a match, the hit was false.
     Nothing is squashed, and the loads that caused it stay in the BNLQ.
   * A 48-entry BNLQ is searched in at most 12 cycles.
4. **Rules while it runs.**
   * A BNLQ load whose pending bit is still set cannot commit (`head_blocked`).
     Otherwise a load could retire with stale data before it was checked.
   * Only one search runs at a time. A second committing store that hits in the
     EBF is held at commit until the search ends.

   Neither rule costs much in practice, because an EBF hit is rare.

Delaying the squash until the match is found costs nothing extra: the loads
between the store and the offending load are correct and simply retire.

## The dependence predictor (`lsq_dep_pred`)

* The predictor is a table of 1024 one-bit entries, indexed by PC bits [11:2].
  Every entry starts as *independent*.
* An entry is set to *dependent* in two cases: a background search finds a true
  match for a load of that PC, or a store finds an ordering violation in the
  ALQ.
* Every 100,000 cycles the whole table is reset to *independent*. Without the
  reset, a load that met a store only once would stay in the ALQ forever. The
  cost is that truly dependent loads must be learned again, at one squash each.
* `REFRESH = 0` selects the other policy: no refresh, so an entry stays
  *dependent* until reset.

## Alternatives selected by parameter

**Squash on every hit (`OPTION_B = 0`, `lsq_dpu`).** Here the background
search is never started. A committing store that finds a nonzero EBF counter
squashes every instruction after itself at once, whether the hit is true or
false. The squash does not say which load caused the hit, so the predictor
learns afterwards in **DPU mode** (dependence predictor update):

* At the hit, `lsq_dpu` saves the store's EBF index and the counter's value.
* While the mode is on, each BNLQ load that commits has its own EBF index
  compared with the saved one. On a match, the load's PC is trained to
  *dependent*, and the number of expected matches goes down by one.
* The mode ends when that number reaches zero. It also ends after
  `DPU_TIMEOUT` cycles (1024 by default), because the path re-executed after
  the squash need not bring the same loads back.
* A new hit while the mode is on restarts it with the new index and count.

This variant is simpler, but every false hit costs a full squash. Loads that
only share a hash bucket with a store are also moved to the ALQ.

**Profile-based predictor (`PROFILE_PRED = 1`).** Each load arrives at
dispatch with a tag, `disp_dep_hint`, which says whether it is dependent. The
tag would be set offline: a profiling run counts how often each static load
meets an in-flight store's EBF bucket, and loads above a threshold are marked
in the binary. The unit only reads the tag. The PC-indexed table is still
present but is not consulted. The profiling and the threshold search are
software and are not part of this unit.

## Program order and squashes

* Order comes from a sequence number that the core assigns at dispatch (10
  bits, wrapping). Two numbers are compared by the sign of their difference, so
  fewer than 512 instructions may be in flight. Widen `SEQ_W` in `lsq_pkg` for a
  larger core.
* The unit squashes in two cases: an ALQ ordering violation, or a true match
  found by the search. With `OPTION_B = 0`, an EBF hit also squashes, starting
  at the instruction right after the committing store. It reports the squash on `squash_valid`/`squash_seq` and
  applies it inside in the same cycle. The core's own flushes (for example
  branch mispredictions) come in on `flush_valid`/`flush_seq`. When both happen
  in one cycle, the older point wins. A flush removes everything from the given
  sequence number on, the load at that point included.
* Dispatch is refused in a flush cycle.
* Two same-cycle races are closed explicitly:
  * An ALQ load that executes in the same cycle as an older store to its
    address is squashed, because the store was not yet visible to the
    forwarding search.
  * A BNLQ load that issues to the very address being written by a committing
    store in the same cycle is refused and retried, because neither the EBF nor
    the search snapshot could see it yet.

## Interface of `lsq_top`

All handshakes are combinational within the cycle, and state changes at the
rising clock edge. `rst_n` is an asynchronous, active-low reset.

| Group | Signals | Meaning |
|---|---|---|
| Dispatch | `disp_valid`, `disp_is_store`, `disp_seq`, `disp_pc`, `disp_dep_hint` → `disp_ready`, `disp_queue`, `disp_idx` | One memory instruction per cycle, in program order. `disp_queue` is `Q_ALQ`, `Q_BNLQ` or `Q_SQ`. `disp_dep_hint` is the load's profile tag; it is ignored unless `PROFILE_PRED = 1`. |
| Load execute | `ld_valid`, `ld_queue`, `ld_idx`, `ld_addr`, `ld_mem_data` → `ld_accept`, `ld_data` | `ld_mem_data` is the cache word for `ld_addr` this cycle. `ld_data` is the value the load gets. When `ld_accept` is low, retry. |
| Store execute | `st_valid`, `st_idx`, `st_addr`, `st_data` | The store's address and data become known. |
| Commit | `cm_valid`, `cm_is_store` → `cm_ready`, `cm_ld_data` | The core's oldest instruction, if it is a memory instruction. `cm_ready` low holds it. |
| Cache write | `mem_wr_valid`, `mem_wr_addr`, `mem_wr_data` | The committed store's write. |
| Squash | `flush_valid`, `flush_seq` in; `squash_valid`, `squash_seq` out | Described above. |
| Statistics | `events` (`lsq_events_t`) | One-cycle pulses: forward, ALQ violation, upgrade, ALQ-full stall, EBF reject/bypass/hit, search true/false, search stall, commit block, flush-walk step, refresh, training, and for option A the hit squash and the DPU training. |

Addresses are 32-bit word addresses and data is 64 bits. Every access is one
whole aligned word.

## Parameters

| Parameter | Default | Origin |
|---|---|---|
| `BNLQ_DEPTH` | 48 | main configuration of the design |
| `ALQ_DEPTH` | 32 | main configuration of the design |
| `SQ_DEPTH` | 48 | design |
| `EBF_SIZE`, `EBF_CW` | 4001, 4 | design (prime size, 4-bit counters) |
| `REFRESH` | 100,000 cycles | design. 0 means never refresh. |
| `BNLQ_BANKS` | 4 | own choice. It must divide `BNLQ_DEPTH` and be a power of two. |
| `PRED_ENTRIES` | 1024 | own choice |
| `OPTION_B` | 1 | design. 1 gives the background search; 0 gives squash on every hit with DPU mode. |
| `DPU_TIMEOUT` | 1024 cycles | own choice. It is used only when `OPTION_B = 0`. |
| `PROFILE_PRED` | 0 | design. 0 gives the dynamic predictor; 1 uses `disp_dep_hint`. |
| `ADDR_W`, `DATA_W`, `PC_W`, `SEQ_W` (in `lsq_pkg`) | 32, 64, 32, 10 | own choice |

The design was also studied with BNLQ/ALQ splits of 32/48, 40/40 and 56/24, and
with an 80-entry BNLQ next to a 32-entry ALQ. Each of these is only a matter of
setting the parameters, and `tb_lsq_configs` runs all four. It also runs the main
sizes with each of the two alternatives.

## Files

| File | Contents |
|---|---|
| `rtl/lsq_pkg.sv` | Sizes, types, the `seq_older` age compare, the event struct |
| `rtl/lsq_top.sv` | Top: wiring, load execution, commit selection, squash arbitration |
| `rtl/lsq_steer.sv` | Dispatch steering |
| `rtl/lsq_dep_pred.sv` | Dependence predictor with refresh |
| `rtl/lsq_sq.sv` | Store queue with the forwarding search |
| `rtl/lsq_alq.sv` | Associative load queue with the store check |
| `rtl/lsq_bnlq.sv` | Banked FIFO load queue with the flush walk |
| `rtl/lsq_bnlq_search.sv` | Background false-hit search |
| `rtl/lsq_ebf.sv` | Exclusive Bloom Filter |
| `rtl/lsq_dpu.sv` | DPU-mode controller for the squash-on-every-hit variant |
| `tb/tb_*.sv` | One self-checking testbench per module, plus `tb_lsq_configs` |
| `tb/lsq_harness.sv` | Parameterized model core used by `tb_lsq_configs` |

## Verification

Each testbench compares the block against a reference model written
independently in the testbench. It prints `TB_RESULT checks=N failures=M` and
has a watchdog.

* **Unit testbenches.**
  * The queue testbenches use 8- or 16-entry instances, so that the queues fill
    and wrap often.
  * The predictor testbench uses a 200-cycle refresh period.
  * The EBF testbench runs at its full 4001-entry size.
  * The DPU testbench shortens the time-out to 40 cycles. It checks that the
    mode ends both by reaching the count and by the time-out, and that a new
    hit restarts it.
* **`tb_lsq_top`.** This is the end-to-end test, with every parameter at its
  default.
  * A small model core runs a 60,000-instruction generated program for 110,000
    cycles and then drains. It dispatches in order, executes in random order,
    commits in order and re-fetches after every squash, and it also injects
    random flushes of its own.
  * Every committed load must equal the memory contents at its point in program
    order, and every committed store must write its own address and data.
  * At the end, the memory must equal a sequential replay of the committed
    program.
  * The address mix includes addresses *a* and *a*+4001, which share an EBF
    counter, so false hits occur. It also includes bursts of loads to one
    address, which saturate a counter.
  * The test counts every mechanism of the default build listed under `events`
    and fails if any of them never happens. The two option-A pulses are
    covered by `tb_lsq_configs`.
  * It finishes in under a second of simulation time.
* **`tb_lsq_configs`.** This runs the same model core (`tb/lsq_harness.sv`)
  against six instances side by side, under the same correctness checks. Each
  runs 30,000 cycles with a 10,000-cycle refresh.
  * Four instances use the other sizes: BNLQ/ALQ of 32/48, 40/40, 56/24 and
    80/32.
  * One uses the main sizes with `OPTION_B = 0`. It fails unless hits squash
    and DPU mode trains the predictor.
  * One uses the main sizes with `PROFILE_PRED = 1`. The model core tags half
    of its load PCs, and the test checks that every tagged load goes to the ALQ
    and every untagged load to the BNLQ, unless it was upgraded.

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_lsq_top rtl/lsq_pkg.sv tb/tb_lsq_top.sv -o sim
obj_dir/sim
```

## Limits and departures

* The profile-based predictor is built only as far as the hardware goes: the
  unit reads a tag delivered with each load. The profiling run and the
  per-application threshold search that would produce the tags are not
  included. The test drives made-up tags.
* Word-granular matching: loads and stores of different sizes or partial
  overlaps are not handled.
* Each operation has one port per cycle. A wide-issue core would need more
  dispatch, execute and commit ports.
* The flush walk removes one entry per cycle and blocks BNLQ allocation while it
  runs. The search snapshot, the same-cycle race rules, the reset sweep of the
  EBF, the bank count, the predictor size, and the DPU mode's 1024-cycle
  time-out and restart rule are this design's own choices.
* The design's motivation is energy: 35-50 % less load-store-queue energy at
  about 1 % slowdown. Nothing here measures energy or performance. The RTL
  shows the function, not the savings.
