# nHSE dynamic dual priority scheduler

An nMPRA processor (n Multiple Pipeline Register Architecture) runs several
hardware tasks on one MIPS-like five-stage pipeline. Each task has its own
copy of the pipeline registers, and all tasks share the ROM, the RAM and the
ALU. Switching tasks therefore needs no software context save. It is enough
to stall one task's program counter and hand the shared resources to
another. The hardware that decides *which* task gets the pipeline, and
*when*, is the nHSE (n Hardware Scheduler Engine).

This RTL is the dynamic half of that scheduler. It combines two policies:

* **Shortest expected run first.** This is the earliest-deadline-first
  flavour of the algorithm. Every task keeps a cheap running average of how
  many machine cycles its activations take. Among freshly activated tasks,
  the one with the smallest average runs first. It is the task most likely
  to finish before the next event arrives.
* **Round robin for tasks that run too long.** A global timer (TRB) watches
  the running task. A task that runs past the timer period is demoted to a
  long-task queue. That queue is served round robin, and only when nothing
  better is waiting, so such a task can no longer hold the pipeline, but it
  is never starved either.

A task switch always takes five machine cycles, from the cycle a task
becomes the best choice to its first executing cycle.

Everything runs on one clock. One clock period is one machine cycle.

## Block structure

```
nhse_dyn_sched                       top: the scheduler as seen by the pipeline
 ├─ task_run_avg  x NTASKS           mrCntRun / mrCntAvgRun of one task
 ├─ rr_timer                         Round Robin timer (TRB)
 ├─ dual_priority_sched              task classes + choice of the next task
 └─ task_switch_ctrl                 stall / wait / restart sequencer
nmpra_pkg                            shared constants and enums
```

The data flows in a loop:

1. `task_switch_ctrl` says which task executes (`run`).
2. `task_run_avg` counts that task's cycles.
3. `rr_timer` times it.
4. `dual_priority_sched` combines the averages, the timer expiry and the
   activation events into a choice.
5. `task_switch_ctrl` carries out the choice.

## Task classes: the heart of the algorithm

Every task is in exactly one class at a time (`nmpra_pkg::task_class_e`):

| class | meaning | order inside the class | served when |
|---|---|---|---|
| `CLS_EMTQ` | activated, not yet interrupted (execution medium time queue) | smallest `mrCntAvgRun` first | always first ("Running State") |
| `CLS_ITQ`  | was switched out unfinished (interrupted task queue) | fixed priority, task 0 highest | EMTQ empty ("Idle State") |
| `CLS_LTQ`  | overran the TRB (long task queue) | round robin | EMTQ and ITQ empty |
| `CLS_IDLE` | waiting for its next event | - | never |

How a task moves between classes. All moves happen at the clock edge that
sees the event.

```
            ready_i[k]                  preempted while running
   IDLE ───────────────► EMTQ ───────────────────────────────► ITQ
    ▲                     │  TRB expired while running            │ TRB expired
    │                     └──────────────────────► LTQ ◄──────────┘ while running
    │        done (task k executing and ends)       │
    └──────────────────── any class ◄───────────────┘
```

Details that matter when you read `dual_priority_sched.sv`:

* **Running State and Idle State.** `rs_o` is high exactly when the EMTQ
  holds a task. ITQ and LTQ tasks are only considered when `rs_o` is low.
* **Ties.** On equal averages, the task that currently owns the pipeline
  keeps it. Otherwise the lower task number wins. This stops two equal
  tasks from preempting each other back and forth.
* **Preemption.** A new EMTQ task preempts a running EMTQ task only if its
  average is strictly smaller. The victim moves to the ITQ. A running ITQ or
  LTQ task is preempted by any EMTQ arrival and keeps its class.
* **Round robin.**
  * When an LTQ task is (re)started, the round-robin pointer is set to it.
  * When the TRB expires, the pointer moves to the next task number. The
    next LTQ task at or after the pointer then gets the pipeline for one
    timer period.
  * A task promoted into the LTQ is placed behind the LTQ tasks that follow
    it in number order.
* **Activations of a queued task** are ignored. A task is one activation at
  a time.
* **No starvation.** Every activated task is in some queue until it ends,
  and the LTQ is served whenever the higher classes are empty. The
  end-to-end testbench checks that every activation completes after the
  load stops.

## Measuring execution time: `task_run_avg`

Each task has two 32-bit registers:

* **`mrCntRun`** counts the cycles in which the task actually executes.
  A preemption pauses it, so it sums the whole activation.
* **`mrCntAvgRun`** is the average. At the end of an activation it is
  updated as

```
mrCntAvgRun <= (mrCntRun + mrCntAvgRun) >> 1;   mrCntRun <= 0
```

That is an exponentially weighted average with weight 1/2. Each task needs
one register, one adder and a one-bit shift: no divider. Starting from 0, a
task that runs 500, 700, 450, 900, 1000, 1200 and 300 cycles ends with the
averages 250, 475, 462, 681, 840, 1020 and 660.

The last value, 660, is about 8 % below the arithmetic mean of the same runs
(about 721). That is the price of the shift average: it follows recent
behaviour and forgets old runs.

Some details:

* The adder is one bit wider than the register, so the carry survives the
  shift.
* The counter saturates at all ones instead of wrapping.
* The cycle in which `done` is raised counts as an executing cycle.

## The Round Robin timer: `rr_timer`

The timer counts executing cycles and restarts whenever a task is started.
It pulses `expire_o` when the count reaches `trb_period_i`, then starts a
new period.

Software should program the period to the recurrence of the slowest task
or less. A period of 0 switches the timer off. With the timer off, no task
is ever demoted and the scheduler is pure shortest-average-first plus
fixed-priority resume.

An expiry that lands while a switch is already under way is ignored. The
task it refers to has already been switched out.

## The switch sequence: `task_switch_ctrl`

Stopping the program counter and changing `SelectTask` cannot happen in the
same cycle. The old task's instructions are still in the shared ROM, ALU
and RAM path. The sequencer therefore stalls every task for three cycles
before it hands over:

| clock edge | what happens |
|---|---|
| E   | event sampled: the task enters the EMTQ; the scheduler's choice is valid in the following cycle |
| E+1 | sequencer leaves `SW_RUN`; all `processXstall` lines high; the old task is marked preempted (EMTQ→ITQ) |
| E+2, E+3 | still stalled (3 stall cycles in total) |
| E+4 | `SW_RESTART`: `SelectTask` = new task, its `processXresetstall` and `processXstartagain` pulse for one cycle, TRB restarted |
| E+5 | new task executes (`run_o`), all others stalled |

So the new task's code starts five machine cycles after it became active.
At a 15 ns machine cycle that is 75 ns.

The sequencer reads the scheduler's choice again in the last stall cycle. A
better task that arrives during the stall is started directly. A switch
starting from an idle pipeline goes through the same five cycles, so the
switch time is constant.

When the running task ends (`done_i`) and nothing else is queued, the
pipeline is left idle: `task_valid_o` is low and every task is stalled.

Two assertions in `task_switch_ctrl` guard the pipeline rules: at most one
task executes, and the executing task is never stalled.

## Interface of `nhse_dyn_sched`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | machine-cycle clock, synchronous active-low reset (all tasks idle, averages 0) |
| `ready_i` | in | NTASKS | one-cycle activation event per task (output of the event logic: interrupts, timers, deadlines, mutexes, sync events) |
| `done_i` | in | NTASKS | task has finished this activation; only the executing task's bit is used |
| `trb_period_i` | in | CNT_W | Round Robin timer period in machine cycles, 0 = off |
| `select_task_o` | out | 3 | `SelectTask[2..0]`, the task owning the shared resources |
| `task_valid_o` | out | 1 | `select_task_o` names a live task |
| `run_o` | out | NTASKS | task executes in this cycle |
| `stall_o` | out | NTASKS | `processXstall` |
| `resetstall_o` | out | NTASKS | `processXresetstall` (one-cycle pulse) |
| `startagain_o` | out | NTASKS | `processXstartagain` (one-cycle pulse) |
| `process_ready_o` | out | NTASKS | `processXready`: task activated and not yet ended |
| `rs_o` | out | 1 | scheduler in Running State (EMTQ not empty) |
| `class_o` | out | NTASKS × 2 | class of each task |
| `cnt_run_o`, `cnt_avg_o` | out | NTASKS × CNT_W | `mrCntRun` and `mrCntAvgRun` of each task |
| `trb_expire_o` | out | 1 | TRB expiry pulse |

Parameters and their defaults:

| parameter | default | meaning |
|---|---|---|
| `NTASKS` | 5 | number of hardware tasks; at most 8 with the 3-bit task index |
| `CNT_W` | 32 | width of the per-task counters |
| `SWITCH_WAIT` | 3 | stall cycles of a switch |

The synthesised default is about 370 word-level cells and 374 flip-flops.

## What is not in this RTL

These parts surround the scheduler in a complete nMPRA microcontroller and
are left out:

* **The pipeline.** This covers the per-task pipeline registers and the
  shared ROM, RAM and ALU. It connects through `select_task_o`, `stall_o`,
  `resetstall_o`, `startagain_o` and `done_i`.
* **The nHSE event logic.** This covers interrupts, watchdog, timer,
  deadline timers, mutexes and synchronisation events. It connects through
  `ready_i`.
* **The slow peripheral bus with its bus controller.**
* **The global nHSE registers.** The TRB period would come from them.
* **The static (fixed priority) scheduler.**
* **The three-phase quadrature clocking of the original core.** Here it is
  folded into a single clock.

## How far to trust it: choices made in this RTL

The class structure, the class order and the policy of each class follow
the published algorithm. So do the TRB promotion, the averaging formula,
the 32-bit registers, the three-cycle stall and the five-cycle switch. The
following points are this design's own choices:

* **Deadlines.** "Earliest deadline first" is realised as "smallest average
  execution time first". No deadline value enters the scheduler.
* **Running State and Idle State** are read as "EMTQ not empty" and "EMTQ
  empty".
* **ITQ priority** is the task number, with task 0 highest. No
  programmable priorities.
* **Round-robin pointer handling**, tie breaking, and ignoring activations
  of already-queued tasks.
* **The interface handshakes.** Activations are one-cycle pulses, and the
  end of an activation is a `done` level that is honoured only while the
  task executes. `processXresetstall` and `processXstartagain` pulse
  together; their separate roles inside the pipeline are left to it.
* **The clock.** A single clock is used instead of three quadrature clocks.
  The switch is a constant 5 cycles, the lower end of the 5-8 cycle range
  that is sometimes quoted for this scheduler.
* **Registers.** The counter saturates, and the averaging adder is one bit
  wider than the register.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

* **`tb_task_run_avg`** replays the seven-activation example above, with
  random pauses inside each activation. It then checks 200 random
  activations against `(cnt + avg) >> 1` and checks saturation on a 4-bit
  instance.
* **`tb_rr_timer`** compares count and expiry, cycle by cycle, with a
  reference model. The stimulus is random run/restart patterns and random
  periods, including 0. It also checks the exact expiry latency.
* **`tb_task_switch_ctrl`** covers:
  * the exact switch sequence: 3 stalled cycles, then a one-hot restart,
    then execution;
  * preempt versus end of task, the idle pipeline, and a choice that
    changes during the stall;
  * per-cycle rules under random choices.
* **`tb_dual_priority_sched`** runs a directed walk through every class
  transition and the round robin. It then checks 5000 random cycles against
  a reference model of classes and choice.
* **`tb_nhse_dyn_sched`** is the end-to-end test at the default parameters.
  The testbench plays the pipeline and the event sources for five tasks:
  three short tasks and two long ones that overrun a 150-cycle TRB. It
  first runs directed scenes: the seven-activation averaging example
  through the whole scheduler, and two long tasks that must take turns in
  the LTQ. It then runs about 200,000 cycles of random load, then a drain,
  and checks:
  * the 5-cycle switch from idle and for a preemption;
  * every average after every activation;
  * that every restart picks the right task for the classes the scheduler
    saw;
  * the per-cycle pipeline rules;
  * that no activation is lost or starved.

  It also counts switches, preemptions, ITQ dispatches, TRB promotions,
  round-robin hand-overs, Running and Idle State and idle-pipeline cycles,
  and fails if any count is zero.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/nmpra_pkg.sv \
  rtl/task_run_avg.sv rtl/rr_timer.sv rtl/dual_priority_sched.sv \
  rtl/task_switch_ctrl.sv rtl/nhse_dyn_sched.sv tb/tb_nhse_dyn_sched.sv \
  --top-module tb_nhse_dyn_sched
./obj_dir/Vtb_nhse_dyn_sched
```

`-Wno-fatal` keeps the testbenches' width-extension warnings (their
check task compares everything as 64-bit values) from stopping the build.
For a unit testbench, list `rtl/nmpra_pkg.sv`, the module and its
testbench. Every run finishes in well under a second.

## Changing it

* **More tasks.** Raise `NTASKS`, up to 8. Beyond 8, widen
  `nmpra_pkg::TASK_W`. The EMTQ choice is a linear compare chain over the
  tasks, so its depth grows with `NTASKS`.
* **A different switch wait.** Set `SWITCH_WAIT`. The switch then takes
  `SWITCH_WAIT + 2` cycles.
* **Programmable ITQ priorities.** Replace the index scan in
  `dual_priority_sched` with a compare on a priority input, as is done for
  the EMTQ average.
