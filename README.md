# Late-inserting scheduler with an L2 miss predictor

An out-of-order core with a large window (here 2048 instructions) can keep
working past a load that misses in the L2 cache, but the instructions that
depend on that load sit in the issue queue for hundreds of cycles. They take
entries other instructions could use. Many of them also issue speculatively
and must be pulled back and issued again (replayed) when the miss is
discovered. Each replay costs issue-queue activity and energy.

This design avoids most of that work by predicting, before rename, which loads
will miss in L2. The load itself still enters the issue queue. Its dependants,
and their dependants, are never inserted into the queue. They wait in an
Instruction Buffer (IB) that holds every in-flight instruction. When the miss
data returns, a scanner walks the IB from the load onwards and inserts the
instructions that have become independent. Loads that miss without having
been predicted are caught by a conventional Recovery Buffer. Their dependants
are taken out of the scheduler and go the same way through the IB.

```
 fetch ──► L2 miss predictor ──► Rename ──► Filter ──► mux ──► issue queues ──► mux ──► register read / execute
                 ▲                             │         ▲      (int + FP)        ▲                 │
                 │ train at commit             ▼         │                        │                 │
                 │                    Instruction Buffer │                 Recovery Buffer ◄────────┘
                 │                             │         │       (replay on L2 hit, take back on L2 miss)
                 │                          Scanner ─────┘
                 │                             ▲
                 └──── history correction     L2 miss resolved
```

## Contents

| file | what it is |
|---|---|
| `rtl/l2p_pkg.sv` | shared widths, the instruction record `uop_t`, the prediction record `pred_t`, the Recovery Buffer event kinds |
| `rtl/l2_miss_predictor.sv` | perceptron L2 hit/miss predictor with a filter table and a corrected global history |
| `rtl/filter_stage.sv` | decides, per renamed instruction, whether it enters the issue queue or only waits in the IB |
| `rtl/preg_bitvec.sv` | one bit per physical register: used as the L2-dependence vector and as the register-ready scoreboard |
| `rtl/instruction_buffer.sv` | circular buffer of every in-flight instruction, with a waiting bit per entry |
| `rtl/ib_scanner.sv` | walks the IB after a resolution and inserts the instructions that are now free |
| `rtl/issue_queue.sv` | wakeup/select issue queue (one integer and one floating-point instance) |
| `rtl/recovery_buffer.sv` | keeps issued instructions in issue order until load outcomes are known; replays or takes back |
| `rtl/late_insert_core.sv` | the top: all of the above wired together |
| `tb/tb_*.sv` | one self-checking testbench per module, the end-to-end test, and the end-to-end test at full size |

## The L2 miss predictor

The predictor is a perceptron. Each of the 256 table entries is indexed by
load PC bits [9:2] and holds 12 signed 7-bit weights: one bias weight and one
weight per bit of an 11-bit global history register (GHR). The GHR records the
predicted outcome (miss = +1, hit = −1) of recent loads. The output is

    y = w0 + Σ_i w_i · h_i        predict "miss" when y ≥ 0

A 2048-bit filter table, also indexed by the PC, sits in front of it. A bit
is set the first time a load at that PC misses in L2. A load whose filter bit
is clear is predicted to hit, and it does not train the perceptron. About a
third of dynamic loads come from static loads that never miss, so the filter
keeps them from disturbing the weights. With it, a short history is enough.
The storage is 256 × 12 × 7 + 2048 bits = 2944 bytes.

The history is handled in three ways:

* **Speculative update.** Up to four lookups per cycle (one per fetch slot)
  each shift their prediction into the GHR. Later lanes of the same cycle see
  the bits of earlier lanes. The answer comes one cycle after the lookup.
* **Checkpoint and restore.** `ckpt_ghr`/`ckpt_seq` give the current history
  so a branch can save it. `restore_*` puts it back after a branch
  misprediction, and any lookup answer in that cycle is dropped.
* **Correction.** Every prediction carries the GHR it used and an 8-bit
  sequence number. When a load's real outcome differs from its prediction
  (`corr_*`), the bit it inserted is found at position
  `seq_now − seq_load − 1` and flipped, if it has not yet shifted out.
  Without this, one wrong prediction would distort the next eleven.

Training happens at commit, one load per cycle (`tr_*`). A committed L2 miss
sets its filter bit. The weights of a filtered-in load are trained when the
sign of y was wrong or |y| ≤ θ, with saturating counters. θ = 35 is the
customary perceptron threshold for an 11-bit history, ⌊1.93·11 + 14⌋.

## Filter, L2-dependence vector and Instruction Buffer

Rename attaches the prediction to each load. The Filter looks at the whole
renamed group of four in one cycle:

* A **predicted-miss load** goes to the issue queue. Its destination register
  is marked in the L2-dependence vector.
* An instruction with a **source marked in the vector**, or one written by an
  older held instruction or predicted-miss load of the same group, is
  **held**. It is written to the IB with its waiting bit set, and its own
  destination is marked. The in-group bypass is needed because the vector
  is only written at the clock edge.
* Everything else goes to the issue queue. It is also written to the IB,
  which holds every in-flight instruction (2048 entries, the size of the
  reorder buffer).

A group is accepted whole. Rename stalls (`rn_ready` low) when the IB lacks
room for four entries, when either issue queue lacks room for four entries, or
while the scanner is busy. Only one path inserts into the queues at a time,
and the scanner has priority.

The IB is a circular buffer. It allocates four entries per cycle at the tail,
frees up to eight per cycle at the head at commit (`cm_count`), and squashes
everything younger than a given id (`sq_*`). It keeps one waiting bit per
entry and has a four-entry read window for the scanner.

## The scanner

When an L2 miss is resolved (`rs_*`, with the load's IB id), the destination
bit of the load is cleared in the dependence vector. The scanner then starts at
the load's IB entry and reads four consecutive entries per cycle. An entry
whose waiting bit is set and whose sources are no longer marked is inserted
into the issue queue. Its waiting bit and its destination bit are cleared.
An entry that still depends on another outstanding miss stays. The decisions
inside one group of four see the clears made by older entries of the same
group.

* **Going back.** If another miss resolves while a scan is running, and that
  load is older than the scan position, the scanner jumps back to it. A
  younger resolution needs no action, because the running scan will reach it.
* **End.** The scan stops after the youngest IB entry.
* **Full queue.** If an issue queue cannot take the instructions, the scanner
  stays on the same entry and retries.
* **Commit.** If commit overtakes the scan position, the scan continues from
  the new head.

A predicted-miss load that is itself waiting keeps its waiting bit when it is
inserted, because its own miss is still to come.

## Issue queues and the Recovery Buffer

There are two queues, integer and floating-point, of 20 entries each (30 and
40 are the other sizes of interest). They share four issue slots per cycle:
the integer queue takes first and the floating-point queue gets the rest.
Inside a queue, select is by position (lowest index first), not by age. Up
to four wakeup tags per cycle (`wk_*`) set source-ready bits. This includes
entries inserted in the same cycle. The initial ready bits of an inserted
instruction come from a separate register-ready scoreboard, which rename
clears and wakeups set.

Load latency is speculated: consumers are woken as if the load hits in L1.
Every issued group therefore also enters the **Recovery Buffer**, a
13-stage shift register that records issue-order timing: 2 stages to the
functional units + 2-cycle L1 + 9-cycle L2. The memory side reports each
load's outcome on `rb_ev_*`:

* **L1 hit / L1 miss**: nothing to do. The instructions leave when they reach
  the end of the buffer.
* **L2 hit**: the load's dependants still in the buffer are found by matching
  destination tags forward from the load (the transitive closure). They are
  issued again, one recorded group per cycle, with their original spacing.
  The issue queues are stopped meanwhile (`replaying`). One more empty cycle
  follows, so that a consumer woken by a wrong result cannot issue before
  the replayed producer's new result exists. A second L2 hit can be taken
  while a replay runs; its replay follows right after.
* **L2 miss that was not predicted**, and the other take-back reasons (unknown
  store address, unavailable store data, no free miss register): the load and
  its dependants are removed from the buffer. They are reported one per cycle,
  and each one's destination is marked in the L2-dependence vector. The
  dependants get their IB waiting bit set. After an L2 miss the load itself
  does not: its access is still in progress, and its resolution starts the
  scan. For the other reasons the load must execute again, so it waits in
  the IB too. The scanner puts them back when the resolution comes, like
  the dependants of a predicted miss.

Only one take-back event is handled at a time. `rb_ev_ready` is low while one
is pending.

## Top-level interface and timing (`late_insert_core`)

| ports | meaning |
|---|---|
| `pl_*` → `pr_*` | predictor lookup from fetch, answered next cycle |
| `ckpt_*`, `restore_*` | history checkpoint/restore for branches |
| `corr_*` | history correction when a load's outcome is known |
| `tr_*` | training with a committed load |
| `rn_valid`, `rn_uop`, `rn_ready`, `rn_ib_id` | renamed group in, IB ids out; taken when `rn_ready` is high |
| `iss_valid`, `iss`, `issue_block` | issued instructions (from the queues or a replay); `issue_block` lets the environment stop issue |
| `wk_valid`, `wk_tag` | result wakeups |
| `rs_*` | L2 miss resolved: IB id and destination of the load |
| `rb_ev_*`, `replaying` | load outcome to the Recovery Buffer; replay in progress |
| `cm_count`, `sq_*` | commit count, squash |
| `scan_busy`, `ib_count`, `iq_int_occ`, `iq_fp_occ` | status |

Register read, the functional units, the caches and miss registers, rename,
the reorder buffer and branch handling are not part of this RTL. Their
effects come in through these ports.

Default parameters: `W = 4`, `ISSUE_W = 4`, `CW = 8`, `IB_DEPTH = 2048`,
`IQ_SIZE = 20`, `NPREGS = 2112`, `WK = 4`, `PRED_ENTRIES = 256`,
`PRED_FILTER = 2048`, `RB_LEN = 13`.

## Sizes and choices that are this design's own

The overall structure, the predictor configuration (256 entries, 11-bit
history, 7-bit weights, 2 Kbit filter), the widths (4 fetch/rename/issue,
8 commit), the 2048-entry window and IB, and the queue sizes are those of the
scheme this design implements. The following were chosen here:

* 2112 physical registers (2048 in flight + 64 architectural).
* The perceptron threshold θ = 35, the PC bits used for indexing, and
  "miss" for y = 0.
* The sequence-number method of locating the history bit to correct.
* One training port and one correction port.
* Whole-group acceptance at the Filter.
* Positional select in the queues, and integer-first sharing of the issue
  slots.
* The Recovery Buffer length of 13, derived from the latencies above.
* Tag-matching dependence closure in the Recovery Buffer.
* The extra empty cycle after a replay.
* At most one waiting replay, and one take-back event at a time.
* The scanner's retry on a full queue, and its skip forward when commit
  passes it.
* All handshakes and port encodings.

Known limits:

* The empty cycle after a replay covers one-cycle producers. A replayed
  multi-cycle operation (multiply, FP divide) can still be followed too
  early by an already-woken consumer. The next L2-hit event would not cover
  that consumer, because the closure only looks at the buffer.
* The extension of the history with execution-path bits is not built. It is
  an alternative, not the chosen predictor.

## Simulation

Each testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`. Each has a watchdog. Build with
Verilator 5 (`--binary --timing`), the package first:

```
verilator --binary --timing --assert -Irtl rtl/l2p_pkg.sv \
    $(ls rtl/*.sv | grep -v l2p_pkg) tb/tb_late_insert_core.sv \
    --top-module tb_late_insert_core -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_preg_bitvec` | random multi-port writes against a model, port priority |
| `tb_l2_miss_predictor` | predictions, GHR chaining, correction, checkpoint/restore, training and filter against a bit-exact reference model |
| `tb_instruction_buffer` | random allocate/commit/squash/read/set/clear against a model |
| `tb_ib_scanner` | directed: scan start, dependent chains, stall on a full queue, go-back, end of scan |
| `tb_filter_stage` | random groups against a model of the hold rule and bypass |
| `tb_issue_queue` | random insert/wakeup/issue/squash against a model |
| `tb_recovery_buffer` | directed: replay contents and timing, take-back order and waiting marks, event for a load already gone |
| `tb_late_insert_core` | end to end, reduced (64-entry IB, 8-entry queues, 256 registers, 80-cycle miss) |
| `tb_late_insert_core_full` | the same end-to-end test with every parameter at its default and a 400-cycle miss |

The end-to-end tests model the rest of the core around the scheduler: a
16-instruction loop with three loads (always miss, miss every other time,
always hit) and floating-point work, renaming with a free list, 1-cycle ALUs,
3-cycle L1 hits, an L1-miss/L2-hit case, and in-order commit with training.
They check that:

* an instruction issues a second time only in a replay, and only if its
  earlier execution read an operand that was not yet produced;
* every instruction commits having executed with its operands;
* all buffers drain at the end.

They also count every mechanism and fail if one never happened: predicted
miss, hold in the IB, scanner insertion, scanner go-back, rename stalled by
the scanner, issue queue full, IB full (reduced size only), history
correction, filter training, history restore, L2 miss taken back, and replay
after an L2 hit. The full-size run commits 4000 instructions in about 5100
cycles, with 310 replayed instructions.
