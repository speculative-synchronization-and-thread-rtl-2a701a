# Speculative thread control for Inthreads

Inthreads is a very lightweight threading model: a fixed set of threads (here
8) runs inside one SMT hardware context and shares its registers. Threads are
started, halted and killed by single instructions (`inth.start`, `inth.halt`,
`inth.kill`), and they synchronise through binary semaphores held in condition
registers (`cond.set`, `cond.wait`, `cond.clr`). Because threads are so small,
the latency of these instructions matters. If they had to wait until every
older branch had resolved, a parallel loop would run slower than its speculative
serial version.

This RTL lets thread-related instructions run **speculatively**. For example, a
`cond.set` behind an unresolved branch may wake up a waiting thread. The catch
is recovery. When that branch mispredicts, the woken thread has consumed a
wrong-path value and must be squashed from that point on. Any thread that it
talked to in turn must be squashed as well. The design tracks these cross-thread
dependencies with **timestamp vectors**, and it computes the whole squash for
all threads in the same cycle as the misprediction, with no step-by-step
propagation.

The RTL covers the thread-control part of the processor: the Instruction Wait
pipeline stage with its per-thread Wait Buffers, the Thread Control Unit (TCU)
and the Condition Speculation Table (CST). Fetch, Decode, Rename and the
execution core are a conventional SMT core and are not included. Their
connections are ports of the top module `inthreads_top`.

## Timestamps and timestamp vectors

This is the core idea. Everything else is bookkeeping around it.

* Each instruction carries a **timestamp** `ts`. Timestamps are per thread and
  increase in program order. Whoever feeds this logic (the decoder) assigns
  them.
* A **communication** is a pair of instructions in different threads, a
  producer and a consumer. If the producer is squashed, the consumer must be
  squashed too. Inthreads has four kinds:
  * `cond.set` → the `cond.wait` that it satisfies;
  * `inth.start` → the whole started thread;
  * `inth.kill` → the killed thread;
  * an ordinary write → a read of the same variable. Programs must be
    data-race-free, so this kind is always covered by a synchronisation and
    needs no hardware of its own.
* The **timestamp vector** `tsv_i` has one entry per thread. Entry `t` is the
  newest instruction of thread `t` that `i` depends on, directly or through a
  chain of communications. `i`'s own entry is `ts_i`. Value 0 means "nothing".
* **S_E(t)** is the timestamp of the oldest unresolved branch of thread `t`.
  The CST provides it.
* A consumer `c` is **speculative** if some thread `t` has `S_E(t) < tsv_c(t)`.
  **C_E(t)** is the oldest speculative consumer of thread `t`. Every
  instruction of thread `t` at or after `min(S_E(t), C_E(t))` is speculative
  and must not retire. The top module outputs this bound as `spec_bound`.
* When branch `b` mispredicts, every instruction `i` with `tsv_i(tid_b) > ts_b`
  must go. Within one thread, instructions that take no part in a
  communication have the same vector as the consumer before them. So the squash
  bound of thread `t` is simply **C_E^SQ(b,t)**: the oldest consumer of `t`
  whose vector has `tsv(tid_b) > ts_b`. Thread `tid_b` itself is also cut at
  `ts_b + 1`. The result is the squash vector `sq`: squash every instruction of
  thread `t` with `ts >= sq[t]`.

Only consumers need to be scanned. They are the `cond.wait` instructions held
in the TCU, plus one entry per started thread. A started thread enters the
scan with timestamp 0 and the vector of its `inth.start`, so a wrong-path start
removes the whole thread.

Worked example with three threads. Thread 0 has unresolved branches at 5 and 7,
and thread 1 has one at 3, so S_E = [5, 3, –]. The consumers are:

| consumer | thread | ts | vector  |
|----------|--------|----|---------|
| j2       | 1      | 2  | [–,2,1] |
| j4       | 1      | 4  | [3,4,1] |
| k6       | 2      | 6  | [3,5,6] |
| i8       | 0      | 8  | [8,7,1] |

From these, C_E = [8, 4, 6]. A misprediction of thread 1's branch at 3 gives
`sq = [8, 4, 6]`. `tb_ce_unit`, `tb_cesq_unit` and `tb_tcu` check this case.

## Pipeline organisation

```
Decode ──► Instruction Wait ──────────────────────► Rename ──► execution core
  │          │ WB[0..7] (suspended threads)   ▲                 │ resolved
  │          │ delayed ─► Fetch               │ avail           │ branches
  │          └─ thread control insns ─► TCU ──┘ started/killed ─► Fetch
  │                                      ▲ S_E                  │
  └─ decoded branches ─► CST ────────────┘◄─────────────────────┘
```

* **Instruction Wait** (`instruction_wait`, `wait_buffer`) sits between Decode
  and Rename.
  * A `cond.wait` whose condition is not shown on the Available Conditions line
    (`avail`) is parked in its thread's Wait Buffer. Every later instruction of
    that thread is parked behind it, and the thread is reported as `delayed` so
    that Fetch stops fetching it. Other threads keep flowing.
  * When the condition appears, the buffer is released in program order.
  * One instruction leaves per cycle. Buffer heads come before new instructions
    from Decode, lowest thread number first.
  * Thread-control instructions leave only when the TCU can take them. They go
    both to Rename and to the TCU.
* **CST** (`cst`) holds up to 16 unresolved branches and computes S_E.
* **TCU** (`tcu`) contains these parts:
  * `tcu_in_fifo`: the incoming queue (4 entries).
  * `tcu_dispatch`: Dispatch. It computes vectors and routes instructions.
  * `ciq`: the Condition Instruction Queue (16 entries).
  * `ccr`: the Committed Conditions Register.
  * `tmq`: the Thread Management Queue (8 entries).
  * `ce_unit` and `cesq_unit`: the two consumer scans.

## Inside the TCU

**Dispatch** takes one instruction per cycle from the incoming queue. It keeps
one running vector per thread: the vector of that thread's latest consumer.

* A producer (`cond.set`, `inth.*`) gets the running vector with its own entry
  set to its timestamp.
* A `cond.wait` also merges in the vector of the `cond.set` that made its
  condition available. Dispatch records that vector per condition when the CIQ
  issues the set. The running vector then grows to the merged value.
* When an `inth.start` issues, it sets the target thread's running vector.
* On a misprediction, the running vector of every thread that loses
  instructions is rebuilt. The rebuild is the element-wise maximum over its
  surviving CIQ waits and its start vector. Dependencies on instructions that
  have already left the queues are non-speculative and can be dropped safely.

**CIQ and conditions.**

* Instructions on the same condition issue in arrival order, one per cycle.
* `cond.wait` and `cond.clr` never act as producers, so they issue without
  regard to speculation. A `cond.wait` also needs its condition to be set.
* `cond.set` issues when non-speculative, or at once when `spec_sync` is 1.
* An issued instruction stays in the queue until it is non-speculative and no
  older instruction on its condition is left. It then retires into the CCR.
* The visible condition state is the CCR with all issued entries applied in
  order. Removing a squashed `cond.set` therefore automatically undoes its
  effect.
* `avail` shows a condition only when that state is set **and** no instruction
  on it is still waiting anywhere in the TCU, and never in a misprediction
  cycle (the state may still contain a `cond.set` being squashed in that same
  cycle, and a `cond.wait` released on it would have no producer). This is what guarantees that only
  one of several waiters is released for one `cond.set`. Once a `cond.wait` is
  released, `avail` drops from the next cycle on, and only one instruction
  leaves Instruction Wait per cycle.

**TMQ and threads.**

* Instructions issue in order.
* `inth.start` needs an inactive target. It issues speculatively only when
  `spec_start` is 1.
* `inth.halt` and `inth.kill` issue only when non-speculative. A kill is a
  communication whose effect cannot be undone, so it is never speculated.
* The TMQ keeps the active-thread mask and each started thread's start vector.
  A misprediction that hits a start vector deactivates the thread.
* Thread 0, the main thread, is always active.
* A kill removes the killed thread's instructions from the Wait Buffers, the
  incoming queue, the CST and the unissued queue entries, and it is reported on
  `killed`.

**Timing.** An instruction accepted by the TCU at cycle *n* has its vector
computed in cycle *n+1* and can issue in cycle *n+2*: the two-cycle TCU. The
squash vector, `killed`, `halted` and `started_*` are combinational in the
cycle of the event. Everything they clean up is gone at the next clock edge.

## Top-level interface (`inthreads_top`)

| port | dir | meaning |
|------|-----|---------|
| `dec_valid/dec_insn/dec_ready` | in | decoded instruction (`insn_t`: tid, op, ts, cond, target, addr) |
| `br_dec_valid/tid/ts`, `br_dec_ready` | in | decoded branch into the CST (ready low when 16 are unresolved) |
| `br_res_valid/tid/ts/mispred` | in | resolved branch; `mispred` triggers the squash |
| `ren_valid/ren_insn/ren_ready` | out | instruction to Rename |
| `delayed` | out | threads parked in a Wait Buffer (Fetch should stop them) |
| `started_valid/tid/addr`, `killed`, `halted`, `active` | out | thread management results |
| `sq` | out | squash vector, valid in the misprediction cycle (`'1` = none) |
| `spec_bound` | out | per thread `min(S_E, C_E)`: oldest instruction that may not retire |
| `spec_sync`, `spec_start` | in | enable speculative `cond.set` / `inth.start` |
| `avail`, `ccr_q`, `ciq_issue_*`, `tmq_issue_*` | out | condition state and issued instructions (observation) |

The types and sizes are in `rtl/inth_pkg.sv`. Timestamps are 16 bits. Value 0
means "no dependency" or "whole thread", and all-ones means "none". Real
timestamps must therefore stay within 1 … 65534. Wrap-around is not handled:
the timestamp source must restart before that.

## Parameters

| parameter | default | origin |
|-----------|---------|--------|
| `NTHREADS` | 8 | Inthreads configuration |
| `CIQ_DEPTH` | 16 | limit on active synchronisation instructions (a larger TCU gives no measured gain) |
| `CST_DEPTH` | 16 | limit on unresolved branches |
| `TMQ_DEPTH` | 8 | own choice |
| `FIFO_DEPTH` | 4 | own choice |
| `WB_DEPTH` | 8 | own choice |
| `NCOND` | 16 | own choice |
| `TS_W` | 16 | own choice |

## What is this design's own choice

The original description gives the structure, the timestamp-vector equations,
the two-cycle TCU and the semantics of the instructions. The following are
filled in here:

* The Available Conditions rule (condition set and nothing pending on it).
* One instruction per cycle through Instruction Wait, with fixed priority.
* In-order issue within a condition and within the TMQ, one issue per cycle per
  queue.
* `inth.halt` is treated like `inth.kill`: it issues only when non-speculative.
* A kill removes only the *unissued* CIQ entries of its target.
* A start waits until its target thread is inactive.
* The queue depths and the reset value of the CCR (all conditions clear).
* CCR timing. The description calls the CCR "committed" but also has issuing
  instructions update it. Here, issued instructions change the visible state at
  once, and the CCR proper is written only when they retire.
* Not built:
  * A switch for speculative value transfer through variables. It has no
    hardware of its own in this scheme.
  * A variable TCU latency (it is evaluated at larger latencies).
  * More than one branch resolution per cycle.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M`. `tb_inthreads_top` runs the full design at its
default sizes through a small parallel-loop program. It checks that each
mechanism happened at least once:

* thread suspension and release;
* a speculative `cond.set` and a speculative `inth.start`;
* a squash reaching another thread;
* a wrong-path start removing a whole thread;
* kill and halt;
* a correctly resolved branch.

Two workload testbenches run a program on two copies of the full design, one
with `spec_sync`/`spec_start` on and one with them off. The front end and the
branch unit are modelled in `tb/mb_driver.sv`: it fetches one instruction per
cycle from a non-suspended thread, resolves branches a few cycles later with a
20 % misprediction rate, and refetches squashed instructions with the same
outcome history. Its random choices come from a fixed-seed xorshift generator,
so every run is identical.

* `tb_microbenchmark`: the main thread starts three workers per outer
  iteration, does some work of its own and waits for their completion
  conditions. Each worker runs a branchy sequence, then sets its condition and
  halts.
* `tb_mutex_loop`: the same structure, but the workers guard an update inside
  the sequence with `cond.wait`/`cond.set` on a shared lock condition.

Both check that the program finishes in both modes with the conditions in the
expected final state and nothing left speculative, and print the cycle counts.
With 20 outer iterations and 16-instruction sequences, speculation saves
3 % (1627 against 1675 cycles) and 7 % (1922 against 2067 cycles) in this
simple model. The numbers say nothing
about a real core; they show that the squash paths hold up under load.

Timestamps of a thread must keep growing across a halt and a new start. The
start vector of a re-started thread, and vectors of other threads that still
refer to the old run, would otherwise compare wrongly against the new run's
branches.

Example (any testbench, Verilator 5; `-y rtl` lets Verilator find the modules):

```
verilator --binary --timing --assert -Wno-fatal -y rtl --top-module tb_inthreads_top \
    rtl/inth_pkg.sv tb/tb_inthreads_top.sv
./obj_dir/Vtb_inthreads_top
```

Verilator's two-state simulation is enough: every register is reset.
