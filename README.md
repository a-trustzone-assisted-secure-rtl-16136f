# Hardware services for a co-designed real-time kernel

A small real-time kernel spends much of its time on list work. It keeps ready
tasks sorted by priority, keeps delayed tasks sorted by wake-up time, finds
expired software timers, queues tasks behind semaphores, and at every system
tick decides whether the running task must change. In software each of these
steps takes a time that depends on how long the lists are. This RTL moves that
bookkeeping into programmable logic next to the processor. The kernel sends
one-cycle commands ("create task 7 at priority 12", "delay task 3 until tick
0x90", "take semaphore 2"). The hardware keeps every list and reports which
task should run. It interrupts the processor only when the running task really
has to change.

The target is a FreeRTOS-style kernel running as the secure guest of a
TrustZone hypervisor on a Zynq-class device. The processor side, the bus
bridge and the kernel software are not part of this RTL. The services appear
here as plain ports, ready to be put behind a register interface.

## The five services

| Module | Role |
|---|---|
| `systick` | System tick: a down counter with a load register in generate mode. It emits a one-cycle `tick` every `load_in` cycles and sets the `tick_int` flag. A 32-bit counter of ticks (`tick_value`) is the common time base. |
| `task_manager` | Task states and every task list. It tells the scheduler the highest ready priority, the first task at that priority, and the task after the running one. |
| `hw_scheduler` | Picks the running task and raises the context-switch interrupt `tick_out`. |
| `sw_timers` | Software timers. When one expires it asks the task manager to make the timer handler task ready and presents the callback address. |
| `hw_semaphore` | Counting semaphores (binary semaphores and mutexes are the max-count-1 case). Each has a priority-ordered queue of blocked tasks. It suspends and resumes tasks through the task manager. |
| `rtos_hw_top` | Wires the five together. |

Helpers: `priority_selector` (highest set bit of the 64-bit ready array),
`sorted_list` (the time-ordered linked list used for delays and timers),
`cmd_ring` (the circular command buffer), and `rtos_pkg` (types, command
encodings and the task-state rule table).

```
                 tick ─────────────────────────────┐
  systick ───────┤                                  v
                 tick_value ─┬──> task_manager ──> hw_scheduler ──> tick_out, taskIDrun_out,
                             │     ^  ^    ^ highpriority,            addrTCBrun_out
                             │     │  │    │ highpriorityTask,           │
                             │     │  │    │ nexttaskID, addrTCBrun      │
                             │     │  │    └──────── taskIDrun ──────────┘
                             └─> sw_timers ─ resume handler task
                                    hw_semaphore ─ suspend / resume task
```

## Task manager: three lists

Everything is indexed by an 8-bit task ID (256 tasks) and a 6-bit priority
(64 levels, where 63 is the most urgent).

* **Task List**, one entry per task ID. It holds the TCB address, the
  priority, and `prev`/`next` pointers. The pointers join all ready tasks of
  one priority into a circular doubly linked ring.
* **Priority List**, one entry per priority. It holds the first task, the
  last task and the number of ready tasks. A created or resumed task is
  linked in after the last one, so tasks of equal priority take turns in the
  order they became ready. A 64-bit array holds one bit per priority. A bit
  is set while that priority has ready tasks, and `priority_selector` turns
  the array into `highpriority_out`.
* **Delay List**, a single linked list of delayed tasks sorted by wake-up
  tick. `valueDelay_in` is the absolute tick value at which the task becomes
  ready.

### One delay list across counter wrap

A classic kernel keeps two delay lists, one for wake-ups before the 32-bit
tick counter wraps and one for after. Here entries are ordered by
`(wake_tick − current_tick) mod 2^32`, so a wake-up that lies beyond the wrap
simply sorts behind all the others. Example: at tick 0x6A, delays until 0x7F,
0x90, 0x0A (after the wrap) and 0x3F (after the wrap) are kept in that order.
Insertion walks the list from the head, one entry per clock cycle, and stops
at the first entry that expires later. Equal wake-up ticks therefore stay in
arrival order. Removing any entry takes one cycle, and a removal is accepted
only while no insertion is walking. When the head's wake-up tick equals
`tick_in`, the task is unlinked and appended to its ready ring. Wake-ups go
before buffered commands.

### Commands, sources and state rules

Commands come from three sources, which may all strobe in the same cycle:

* the application: `createTask_in`, `deleteTask_in`, `suspendTask_in`,
  `resumeTask_in`, `delayTask_in`, `abortDelay_in`;
* the timer service: a resume request;
* the semaphore service: a suspend or resume request.

All of them go into a 16-entry circular buffer in that order, and are executed
one at a time. If several application strobes arrive in one cycle, only one is
taken: create, then delete, suspend, resume, delay, abort.

When a command leaves the buffer it is checked against the task's state:

| State | Accepted |
|---|---|
| free (never created or deleted) | create |
| ready | delete, suspend, delay |
| suspended | resume |
| delayed | abort delay |

A refused command pulses `reject_out`. A command pushed into a full buffer is
dropped and pulses `overflow_out`. Checking at the head of the buffer, rather
than on arrival, means each check sees the effect of the commands queued
ahead of it.

## Scheduler: when to interrupt

`hw_scheduler` has three states:

* **IDLE** waits.
* **TICK** is entered on a `tick`. If the highest ready priority is still
  the one the running task was chosen at, it moves to the next task of that
  ring (`nexttaskID`), which is round robin. Otherwise it takes the first task
  of the new highest priority.
* **PRIORITY** is entered when the first task of the highest priority
  changes, for example through a create, resume, wake-up, suspend or delay.
  It takes that task. If a tick and such a change arrive in the same cycle,
  the tick goes first.

`tick_out` is the processor's context-switch interrupt. It is raised only when
the switch is needed:

* In TICK it is raised when the chosen task differs from the running one. A
  task alone at the top priority is never interrupted by ticks, which gives
  tickless behaviour for free.
* In PRIORITY it is raised only when the new top priority is above the running
  task's priority, that is, a preemption. When the running task blocks
  itself, the kernel is already yielding in software. The scheduler then only
  updates `taskIDrun_out` and `addrTCBrun_out`, with no interrupt.

Example: task D (priority 0x10) runs for two ticks with no interrupt. D
delays itself, so B takes over without an interrupt. Every following tick
alternates B and A with an interrupt. When D wakes, it preempts with an
interrupt.

## Software timers

`sw_timers` keeps, per timer ID (256 timers), the period, the callback
address, an auto-reload flag and the handler task ID. The handler task ID is
sampled from `timerTaskID_in` on create. Active timers sit in a
`sorted_list` ordered by expiry tick, with the same wrap rule as the Delay
List.

* `startTimer_in` arms a timer at `tick + period`.
* `changePeriod_in` stores a new period and re-arms the timer with it.
* `stopTimer_in` disarms the timer.
* `deleteTimer_in` disarms it and forgets it.

Commands for a timer that was never created are ignored. When the head
expires, `resumetimer_out` pulses with `timertaskID_out`. The timer's ID,
callback address and expiry tick stay on `timerID_out`, `addrTimer_out` and
`expireTime_out` until the next expiry. An auto-reload timer is re-armed at
`expiry + period`, so its period does not drift.

## Semaphores

`hw_semaphore` keeps, per semaphore (256), a maximum count, a present count
and a waiting list. `take_in` (with the caller's task ID and priority)
succeeds if the count is non-zero: it decrements the count and pulses
`takesuccess_out`. Otherwise the task is linked into the waiting list and
`suspendSempr_out` asks the task manager to suspend it.

The waiting list is sorted by priority, highest first, with equal priorities
in arrival order. A task can wait on only one semaphore, so one entry per task
is enough. `release_in` with waiters resumes the highest-priority waiter
(`resumeSempr_out`) and hands the count straight to it. Without waiters it
increments the count, never above the maximum.

## Timing

All blocks use one clock (`aclk`) and an active-low asynchronous reset
(`aresetn`). Command inputs are one-cycle strobes sampled on the rising edge.

| Event | Cycles |
|---|---|
| Task manager: create, delete, suspend, resume, abort, wake-up | 2 (one into the buffer, one to execute) |
| Task manager: delay | 2, plus 1 per Delay List entry passed |
| Scheduler | 2 edges after its trigger |
| Create strobe sampled → interrupt, at any priority (measured) | 3 |
| Suspend → new running task | 3 |
| Tick pulse → interrupt | 2 |
| Timer expiry reported after `tick_value` reaches it | 1 |
| Semaphore result pulse after the sampling edge | 1, plus 1 per equal-or-higher-priority waiter passed while a blocking take is sorted |

The `busy_out` outputs stay high while any command or list walk is pending.
The worst case is 256 delayed tasks or 256 timers: a walk of up to 256
cycles, which is far below one tick period at a 100 MHz logic clock and a
1 kHz tick.

## Departures and limitations

* **Processor interface.** The services are meant to sit behind AXI4-Lite
  registers. The register map is not defined here: every command and result
  is a plain port of `rtos_hw_top`. The semaphore service's task ID and
  priority inputs are named `sem_taskID_in` and `sem_priority_in` at the top.
* **Preemptive scheduling only.** A cooperative mode, where the kernel
  switches only on an explicit yield, has no hardware support. The scheduler
  has no mode input.
* **`addrTCBrun_out` is 32 bits**, as wide as `addrTCB_in`. It is a TCB
  address.
* **Running task that is not first in its ring.** The scheduler reacts to a
  change of the highest ready priority or of the first task at that level. If
  a task that is not first in its ring blocks while others of its priority
  stay ready, neither changes. The running-task output then keeps the blocked
  task's ID until the next tick. That tick moves to the first task of the top
  priority, because the task manager reports that task as the successor of a
  task that is no longer ready. The kernel must yield in software in that
  case, as it already does when a task blocks.
* **Simultaneous timer expiries.** Every expiry pulses `resumetimer_out`, but
  the callback address, timer ID and expiry outputs keep only the last one.
* **Semaphore release with waiters** passes the count to the woken task
  instead of incrementing it.
* **System tick.** Only the generate mode of the tick timer is built. Load and
  enable are plain inputs. The tick counter uses a clock enable instead of
  being clocked by the tick pulse.

## Parameters

| Parameter | Default | Where |
|---|---|---|
| `NUM_TASKS` | 256 | task manager, semaphores, top |
| `NUM_TIMERS` | 256 | timers, top |
| `NUM_SEMS` | 256 | semaphores, top |
| `RING_DEPTH` | 16 | task manager |
| `RING_DEPTH` | 8 | timers, semaphores |
| Priority levels | 64 | fixed by `prio_t` in `rtos_pkg` |
| ID width | 8 bits | fixed by `task_id_t` in `rtos_pkg` |
| Tick width | 32 bits | fixed by `tick_t` in `rtos_pkg` |

The lists are register arrays. At the defaults the whole top is about 72k
flip-flops before any mapping to distributed RAM.

## Simulating

Every test bench is self-checking. It prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. Build any of them with
Verilator 5 from the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl \
          rtl/rtos_pkg.sv tb/tb_rtos_hw_top.sv --top-module tb_rtos_hw_top -o sim
./obj_dir/sim
```

Replace `tb_rtos_hw_top` with any other test bench name. Modules are found in
`rtl/` by name; only the package has to be given first.

| Test bench | What it covers |
|---|---|
| `tb_rtos_hw_top` | Whole design at full size. Creation, refused commands, ticks with no interrupt, round robin, a Delay List wake-up with preemption, an auto-reloading timer resuming its handler task, semaphore block and release while the application resumes another task in the same cycle, and a command-buffer overflow. It counts each of these mechanisms and fails if one never happens. |
| `tb_thread_metric` | Benchmark-style loops: a five-thread preemption chain, semaphore take/release, and an interrupt handler resuming a high-priority thread. Every step is checked, and every iteration must take the same number of cycles. |
| `tb_ctx_switch` | Context-switch latency from the idle task to tasks of priority 0, 7, 15, …, 63. The latency must be the same at every priority. |
| `tb_task_manager` | Against a queue-based reference model: the list example, every state rule, the wrap-around delay example, equal delays, three sources in one cycle, and 600 random commands. |
| `tb_hw_scheduler` | The D/B/A tick scenario above, with exact interrupt timing. |
| `tb_sw_timers` | The wrap-around timer example; start, stop, change, delete, reload; random ticking against a model. |
| `tb_hw_semaphore` | Counting, clipping, priority wake order, uncreated semaphores, random commands against a model. |
| `tb_systick`, `tb_priority_selector`, `tb_cmd_ring` | Tick period and flags; highest-bit encoding; buffer order, wrap and overflow. |
