# Clock gating on transaction abort for a lazy hardware transactional memory

In a lazy-conflict HTM (Scalable TCC style), a transaction that commits
invalidates every other transaction that read one of its lines. Those
transactions abort and restart at once. If the committer is still busy with
the same conflicting transaction, the restarted transaction is likely to
conflict again. Each retry burns dynamic power and adds more traffic.

This design stops the clock of an aborted processor instead. The directory
that sends the invalidation also tells the victim to stop its clock. The
directory then keeps it gated for a gating period W_t that grows with how
often the processor was aborted. When the period expires, the directory checks
whether the transaction that caused the abort is still committing:

* if it is, the gating is renewed;
* otherwise the directory sends "on", and the victim wakes up and aborts its
  own transaction.

The processor's main PLL keeps running throughout. Only the core clock is
gated.

The RTL is a cycle-level, synthesizable SystemVerilog model of the
directory-side gating logic, the processor-side gating logic, the clock gate
itself and the Scalable-TCC directory and TID vendor it sits in. The cores,
their transactional L1 caches, the interconnect and the PLL are outside. Their
signals are ports of the top, and the testbenches model them.

## System view

```
          tid_req ──► token_vendor ──► TID grant
                                                          per processor p
 dreq[d] ──► directory d (x NDIR) ───── stop[d][p] ──┐   ┌───────────────┐
             ├ dir_lines        ───── on[d][p]   ──┼──►│ core_gate     │─ fetch_stop, self_abort
             ├ gating_table     ◄──── TxInfo reply ──┤   │  clk_en ──►   │
             ├ marked_or_scan   ───── TxInfoReq  ────┘   │ clk_gate (ICG)│─ core_clk[p]
             └ ungate_ctrl                               └───────────────┘
```

* Each directory sends Stop Clock and "on" to every processor over dedicated
  point-to-point wires. TxInfoReq and its reply use the same kind of wires.
* A processor ORs the strobes of all directories.
  * Stop Clock from any directory gates it.
  * "on" from any directory wakes it.
* `clk` is the always-running PLL output. The directories share it. The
  per-core clocks `core_clk[p]` are made from it by a latch-based clock gate.

## The directory (`dir_lines`)

Each directory keeps one entry per cached line:

* the line address;
* a full-bit-vector sharer list;
* a Marked field: the processor that announced it will commit the line;
* an Owned field: the last committer.

Commits are serialized by TID. A processor obtains a TID from `token_vendor`
and marks every line of its write set in each directory it will write to. Only
the oldest committer present in a directory (lowest TID) may commit there.
Everyone else gets NACK and retries.

A committed line sends an invalidation to all other sharers. That invalidation
is the abort. It is also the event the gating table reacts to.

Request ops, one per cycle per directory port:

| op          | effect |
|-------------|--------|
| `OP_LOAD`   | Requester becomes a sharer. A line entry is allocated on first use. |
| `OP_MARK`   | Requester marks the line and is recorded as a committer with its TID. A MARK is never refused. The older of two markers keeps the field. |
| `OP_COMMIT` | NACK unless the requester is the oldest committer here and the line exists. Otherwise: owner ← requester, the other sharers are invalidated and cleared. |
| `OP_DONE`   | Requester finished committing. Its marks and record are dropped. This resets its abort counter in this directory's gating table. |
| `OP_ABORT`  | Requester aborted. Its marks and record are dropped. |

* Answers (`ACK`/`NACK`/`FULL`) and the invalidation strobe come one cycle
  after the request.
* `FULL` means that no line entry is free. Entries are never freed: the caches
  do not report evictions in this model. `NLINES` therefore bounds the
  distinct lines a directory can see between resets.

## The gating table (`gating_table`, `wt_calc`)

One entry per processor, in every directory:

| field           | width  | meaning |
|-----------------|--------|---------|
| aborter proc id | PID_W  | processor whose commit invalidated this one here |
| aborter tx id   | 64     | start PC of the aborter's transaction, fetched by TxInfoReq |
| abort counter   | 8, saturating | aborts since this processor last committed |
| renew counter   | 8, saturating | renewals since the last abort |
| gate timer      | W0_W+10 | cycles left in the gating period |
| OFF             | 1      | this directory has gated the processor |

On an invalidation the victim's entry is loaded and OFF is set:

* aborter and tx id (still pending);
* abort count + 1, renew count ← 0;
* timer ← W_t.

The same cycle the directory raises Stop Clock to the victim. A victim that is
already OFF in this directory is not logged again.

The gating period is

    W_t = W_0 · (2^⌈log2 Na⌉ + 2^⌈log2 Nr⌉)

where Na is the abort count and Nr the renew count. A term whose count is 0
contributes 0, so the first abort gives W_0 cycles.

* W_0 is a run-time register. It resets to 8 and is written through
  `cfg_w0_we`/`cfg_w0`.
* `wt_calc` gets ⌈log2 n⌉ from the bit length of n−1. No divider or
  logarithm is needed.

The OFF bit is cleared in two ways:

* by the directory's own "on";
* by any load or store that arrives from the processor. Usually the processor
  was woken by another directory, and from then on this directory holds no
  claim on it.

In the second case the directory also sends the processor "on". A running
core ignores it. But the request may have been issued just before the core
was stopped and still been in the network. Clearing OFF alone would then leave
the core gated with no directory left to wake it. Waking it costs only a
shorter gating period.

## Deciding when to ungate (`ungate_ctrl`, `marked_or_scan`)

`ungate_ctrl` is a small FSM that serves one processor at a time.

1. **Tx id fetch.** After an abort, the entry knows *who* aborted the
   processor but not *which* transaction did it. The controller sends a
   TxInfoReq to the aborter and stores the reply in every pending entry that
   names that aborter. A null reply marks the tx id invalid.
2. **Expiry check.** When a gated processor's timer reaches 0, the controller
   starts `marked_or_scan`: a wide OR of the one-hot Marked ids of all line
   entries. This gives the set of processors still committing in this
   directory.
   * The OR takes `LPC` lines per cycle, so a check costs ⌈NLINES/LPC⌉ cycles.
     That is 32 cycles at the defaults.
   * If the aborter is absent, the controller sends "on".
   * Otherwise it sends a TxInfoReq and compares the reply with the stored tx
     id:
     * same transaction → renew: the renew count goes up and the timer reloads
       W_t;
     * null reply or a different transaction → "on".
3. If the processor's OFF bit drops at any cycle while a check runs, the
   check is dropped. The processor was woken elsewhere, and it may have been
   gated again since. A new gating period starts its own timer.

Fetches go before checks. Among processors, the lowest id goes first.

## The processor side (`core_gate`, `clk_gate`)

`core_gate` runs on the ungated PLL clock. Its states:

* `RUN`
* `DRAIN`: a Stop Clock arrived. Fetch is stopped, and the clock waits for the
  in-flight instruction to finish (`inflight_done`).
* `GATED`: `clk_en` is low.

An "on" in `DRAIN` or `GATED` re-enables the clock and pulses `self_abort`. The
core must then drop the transaction it was running when frozen. The
transaction id the core reports is the PC of the instruction that began the
running transaction.

The reply to a TxInfoReq, one cycle later, is **null** in three cases:

* the core is stopping;
* the core is gated;
* the core is outside a transaction.

A gated aborter has therefore already lost its transaction.

`clk_gate` is the usual latch-based ICG. The enable is captured by a latch that
is transparent while `clk` is low, and ANDed with `clk`. So `core_clk` never
glitches, whenever `clk_en` changes.

## Top-level interface (`htm_gating_top`)

Parameters, with their defaults:

| parameter  | default | meaning |
|------------|---------|---------|
| `NPROC`    | 16      | processors (largest system evaluated) |
| `NDIR`     | 16      | directories, one per node |
| `NLINES`   | 1024    | line entries per directory |
| `LPC`      | 32      | lines folded per cycle by the wide OR |
| `W0_W`     | 8       | width of the W_0 register |
| `W0_RESET` | 8       | W_0 after reset |

Ports:

* `dreq_*` / `drsp_*`: one request/answer port per directory. This is where
  the interconnect connects.
* `tid_req`, `tid_grant_*`: the TID vendor, one grant per cycle, round robin.
  TIDs start at 1.
* `inflight_done`, `tx_begin`, `tx_pc`, `tx_end`: status from each core.
* `core_clk`, `fetch_stop`, `self_abort`, `proc_gated`, `abort_inval`:
  control to each core. `abort_inval` is the OR of the invalidations aimed at
  that core.
* `dir_*` status outputs: per directory and processor, the OFF bits, renew/on/
  stop strobes, TxInfoReq traffic, invalidations, the serving committer, scan
  activity and the table's counters and timers. They are for observation and
  for measuring the energy model's gated cycles.

Everything is synchronous to `clk` with an active-low synchronous reset
`rst_n`. A request reaches a directory's answer in one cycle. An invalidation
reaches Stop Clock at the processor in one more cycle.

## Where this model departs from or adds to the original design

* **One clock for the directories.** The directories use the PLL clock.
  Directory-local clocking and power are not modelled.
* **The directory is simplified.**
  * The committer record is per processor (valid + TID). The oldest one is
    chosen combinationally.
  * There is no probe/skip protocol.
  * `OP_DONE`/`OP_ABORT` are explicit messages.
  * Entries are never evicted.
* **Chosen sizes.** The directory size, wide-OR width, timer width and W_0
  width are own choices. The gating table fields, the 8-bit saturating abort
  counter, the 64-bit tx id and W_0 = 8 follow the original description.
* **"on" for a request from an OFF processor.** This is added for liveness,
  see the gating table section.
* **An already-gated processor is not logged again.** A second invalidation of
  a processor that is already OFF in the same directory does not touch its
  entry.
* **Not included:**
  * the cores;
  * the TCC L1 caches, with their store-address FIFO and commit logic;
  * the interconnect;
  * the PLL;
  * main memory;
  * the power/energy model.

  Only their interfaces are present.

## Simulating

All files use the package `htm_pkg`, so compile it first. Example with plain
Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/htm_pkg.sv \
        tb/tb_htm_full.sv --top-module tb_htm_full -Mdir obj_full -o sim
    ./obj_full/sim

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. Each
has a watchdog.

| testbench              | what it checks |
|------------------------|----------------|
| `tb_wt_calc`           | W_t against an independent formula, all counter pairs |
| `tb_gating_table`      | abort/renew/on/access/commit updates, timer reload and countdown |
| `tb_marked_or_scan`    | OR result and the ⌈NLINES/LPC⌉-cycle latency, random patterns |
| `tb_ungate_ctrl`       | fetch, absent → on, same tx → renew, null/mismatch → on, dropped check |
| `tb_dir_lines`         | sharers, marks, TID ordering, NACK, invalidation vector, FULL |
| `tb_directory`         | one directory end to end: abort → stop → TxInfoReq → renew → on, and wake from elsewhere |
| `tb_token_vendor`      | unique increasing TIDs, round-robin fairness |
| `tb_core_gate`         | drain, gate, wake with self-abort, null replies |
| `tb_clk_gate`          | glitch-free gated clock and the latch's timing |
| `tb_htm_gating_top`    | reduced system: 4 processors, 2 directories, 16 lines |
| `tb_htm_full`          | the top at its default parameters: 16 processors, 16 directories, 1024 lines |
| `tb_w0_sweep`          | W_0 = 4, 16, 32 at 4, 8 and 16 processors (nine systems side by side, 4 directories of 64 lines); checks that gated cycles grow with W_0 |

### The end-to-end testbenches

The end-to-end testbenches (`htm_tb_harness`) model the cores, caches and
interconnect. Each processor runs random transactions over a shared pool of
lines:

1. it takes a TID;
2. it loads its read set;
3. it marks and commits its write set in the owning directories;
4. it sends DONE.

On an invalidation it aborts and retries. When it is gated, it freezes.

The harness counts each mechanism and fails if one never occurs:

* Stop Clock;
* renewals;
* "on" because the aborter was absent;
* "on" after a tx id compare;
* null TxInfo replies;
* wake-ups from another directory;
* self aborts;
* commit NACK spins.

It also checks these invariants:

* every transaction commits;
* no processor is left gated;
* every core clock runs only while its core is not gated;
* each self abort matches a wake-up;
* no "on" comes sooner than W_0 cycles after Stop Clock.

`tb_htm_full` and `tb_htm_gating_top` each run one such system.
`tb_w0_sweep` runs nine such systems through `htm_sweep_point`, with the
harness told not to end the simulation itself. It then also checks that gated
cycles grow with W_0.

The full-size run builds in under a minute and simulates in about a second.
