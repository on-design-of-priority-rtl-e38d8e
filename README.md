# Load-adaptive interrupt limiter

An interrupt that arrives while a microcontroller is busy with more
important work still costs it a context save, an ISR and a context
restore. If interrupts come in fast enough, a real-time system can spend
all its time in ISRs, and hard tasks miss their deadlines because of
low-priority events. This is interrupt overload.

This design is a piece of logic (meant for an FPGA) that sits in front of
the MCU's interrupt pins and decides, one interrupt at a time, whether the
MCU should see it now. It bases the decision on what the MCU's software is
doing. The software reports that over a few monitoring lines: is an ISR
running, which task priority is running, is there slack. An interrupt that
may not go through now is not lost. It is held, with its data and the time
it was caught, until the MCU can take it.

## What the MCU software must drive

| Line | Driven by the MCU's software | Used here for |
|---|---|---|
| `MON_INT` | high from ISR prologue to ISR epilogue | no forward while an ISR runs; ISR entry releases a level-type output; ISR exit re-checks level sources |
| `MON_TICK` | pulse in the OS timer-tick ISR | OS tick count and tick period (`tick_cnt`, `tick_per`) for jitter observation |
| `MON_CTX` | high during a task context switch | no forward during a switch (MON_PRI is not yet settled) |
| `MON_PRI` | priority of the task being switched in (idle task = 0) | priority condition |
| `MON_SLACK` | high when the task being switched in is below the hard-priority level | slack condition |

Priorities of tasks and interrupts share one number space, so the two can be
compared directly. **A larger number is more urgent, and 0 is the idle
task's level.** The "greater than" test only requires that the numbers be
ordered this way. An RTOS whose numbers run the other way (uC/OS-II, for
example) must invert its priority before driving `MON_PRI` and writing
`cfg_pri`.

**Start handshake.** After reset the limiter forwards nothing. Interrupts
that arrive in this time are caught and kept. Monitoring starts when all
four single-bit lines are seen high in the same clock. The MCU gives this
pulse once its kernel is initialised. Requests caught before the start are
forwarded after it.

All monitoring inputs pass a two-flop synchroniser. Decisions therefore see
the MCU's state two clocks late. Together with the ISR prologue this lets a
few INTs (about one every three clocks) out between a forward and the MCU
raising `MON_INT`.

## The forwarding decision

Every clock, the condition evaluation unit looks at the most urgent
interrupt that is waiting. Ties go to the lowest source number. It forwards
that interrupt if any one of these holds, checked in this order:

1. **Priority**: the interrupt's priority is strictly above `MON_PRI`.
2. **Underload**: fewer than `WIN_MAX` interrupts have been forwarded in the
   last `WIN_CYC` clocks (the floating window, below).
3. **Slack**: `MON_SLACK` is high.

If none holds, the interrupt stalls (`stall` is high). Nothing is forwarded
while `MON_INT` or `MON_CTX` is high, before the start handshake, or while
the forward unit is busy. `fwd_cond` shows which condition released each
grant, one-hot as {slack, underload, priority}.

Only the most urgent waiting interrupt is considered. A stalled
low-priority interrupt therefore never blocks a more urgent one: the more
urgent one is simply evaluated first. A stalled interrupt also blocks
nothing behind it. Anything less urgent would fail the priority test too,
and the window and slack tests do not depend on which interrupt is
selected.

### The floating window (`load_det`)

The window counts forwarded interrupts over the last `WIN_CYC` clocks. It
moves forward every clock; it does not reset at fixed frame boundaries. It
is built from `WIN_MAX` age counters used as a ring. Each forward restarts
the counter under the write pointer and moves the pointer on. Counters
count up and stop at `WIN_CYC`. The counter under the write pointer always
belongs to the oldest of the last `WIN_MAX` forwards. So "another forward
is allowed" is the same as "that counter has reached `WIN_CYC`". The cost
is `WIN_MAX` counters and no timestamp arithmetic. Interrupts forwarded
under the priority or slack condition also count in the window.

## Path of one interrupt, and its latency

```
int_in ─► idu (2 clk) ─► ceu (1 clk) ─► ifu (2 clk) ─► int_out
              │ writes                 ▲ pops
              └────────► sbu ──────────┘
```

| Clock edge | What happens |
|---|---|
| 1 | `idu` samples the line |
| 2 | `idu` counts the request (`rdy`); `sbu` stores its data and timestamp |
| 3 | `ceu` has chosen and granted; `ifu` registers the grant; `sbu` returns the entry |
| 4 | `ifu` takes the entry |
| 5 | the pin and `fwd_valid`/`fwd_idx`/`fwd_data`/`fwd_ts` are driven |

So an interrupt that meets a condition appears on the MCU pin **5 clocks**
after its line rose: 2 for detection, 1 for evaluation, 2 for forwarding.
This does not depend on the number of sources or priority levels. Only the
clock rate does: the combinational maximum-priority selection grows with
both. The buffer is on-chip and read in one clock, and that read overlaps
the evaluation clock, so holding data with the interrupt adds no delay. A
slower, external buffer memory would add its read time to the path; none
is included. When several interrupts are already waiting, grants can follow
every 3 clocks. In practice the MCU's `MON_INT` limits the rate.

## Catching requests: edge and level sources

Each source has a run-time priority and sensitivity, written through the
setup port (`cfg_we`, `cfg_idx`, `cfg_pri`, `cfg_sens`). After reset every
source is edge-sensitive with priority 0.

* **Edge** (`SENS_EDGE`): each rising edge is one request. Requests queue:
  up to `DEPTH` requests per source are counted (`pend`) and stored in the
  buffer with their data and capture time. A further edge is dropped and
  flagged on `ovf` for one clock. On the MCU side the forward is a
  one-clock pulse.
* **Level** (`SENS_LEVEL`): the rising edge is caught, and the source is
  caught again at each ISR exit while its line is still high and nothing of
  it is waiting. On the MCU side the pin stays high until `MON_INT` shows
  the MCU has entered an ISR. Until then the forward unit takes no other
  grant.

The same sensitivity setting governs both sides.

`int_data` is sampled along with the line, so it must be valid when the
line rises. `fwd_ts` is a free-running clock count taken when the request
was caught.

## Modules

| Module | Role |
|---|---|
| `int_limiter` | top: wires the units, timestamp counter |
| `mon_if` | synchronises the monitoring lines; start handshake, ISR entry/exit strobes, OS tick count and period |
| `idu` | one per source: priority and sensitivity registers, request detection and counting |
| `ceu` | condition evaluation: uses `max_pri_sel` and `load_det`; priority compare, slack test and forwarding gate |
| `max_pri_sel` | combinational tree picking the most urgent ready source |
| `load_det` | floating window of forwards |
| `sbu` | stall buffer: one FIFO bank per source, parallel writes, one registered read |
| `ifu` | forward pipeline and MCU pin waveforms |
| `lim_pkg` | `sens_e` (edge/level) and `mon_t` (the four monitoring bits) |

Top-level parameters:

| Parameter | Default | Meaning |
|---|---|---|
| `N_INT` | 64 | interrupt sources |
| `NUM_PRI` | 64 | joint priority levels (`MON_PRI` and `cfg_pri` are `$clog2(NUM_PRI)` bits) |
| `DEPTH` | 8 | requests held per source |
| `DATA_W` | 8 | data bits stored with each request |
| `TS_W` | 32 | timestamp bits |
| `WIN_MAX` | 4 | forwards allowed per window |
| `WIN_CYC` | 100000 | window length in clocks |

The defaults of `N_INT` and `NUM_PRI` are one of the nine configurations
the design was sized for (4, 64 or 256 sources × 4, 64 or 256 levels). The
window and buffer sizes are this implementation's defaults: choose them
from the MCU's ISR cost and its tolerable interrupt load. The buffer is
`N_INT × DEPTH × (DATA_W + TS_W)` bits: 20,480 bits by default.

## Simulating

Each unit has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_int_limiter rtl/lim_pkg.sv tb/tb_int_limiter.sv
./obj_dir/Vtb_int_limiter
```

| Testbench | Covers |
|---|---|
| `tb_mon_if`, `tb_idu`, `tb_max_pri_sel`, `tb_load_det`, `tb_ceu`, `tb_sbu`, `tb_ifu` | each unit against an independent reference model or a fixed expected sequence, including the 2-clock detection and 3-edge forward timing |
| `tb_int_limiter` | end to end at 4 sources and 8 levels, with a small MCU model. Covers: hold before start; 5-clock latency; window release and window stall; priority overtake; slack release; buffer overflow and in-order release with data; blocking during an ISR and during a context switch; level re-trigger. Each mechanism is counted and must occur. |
| `tb_int_limiter_full` | default parameters: 64 sources fire at once and leave in priority order; the last one stalls on the full window until slack releases it |
| `tb_table1` | the same scenario for all nine source/level configurations (4/64/256 × 4/64/256) |

## Where this design makes its own choices

The unit structure is fixed by the architecture: detection units, one
condition unit with maximum select, priority compare, slack and load
detection, a shared stall buffer and one forward unit. So are the three
conditions and their order, the start handshake, the rule against forwards
during ISRs, and the 2 + 1 + 2 clock split. The following are this
implementation's choices:

* the window is counted in clocks over forwarded interrupts, with the
  sizes above;
* no forward while `MON_CTX` is high;
* the pin waveforms (one-clock pulse; level held until ISR entry) and
  level re-catch at ISR exit;
* one shared edge/level setting per source for both detection and output;
* the buffer is organised as one FIFO bank per source; overflowing
  requests are dropped and flagged;
* every caught request is written to the buffer, not only those that
  stall (a request that goes straight through costs no extra clock);
* the detection of one interrupt overlaps the forwarding of the previous
  one, so already-waiting interrupts can leave every 3 clocks; the
  original throughput estimate, one interrupt per full 5-clock path
  (f/5), treats the path as unshared and is therefore a lower figure than
  this pipeline's peak;
* each source has its own interrupt pin towards the MCU, and the source
  number is also given on `fwd_idx`;
* the priority numbering (larger is more urgent, 0 = idle);
* the synchronisers, reset values, and the timestamp as a plain clock
  count;
* the tick period as the jitter measure.

Not included: an external memory controller for a larger stall buffer, and
anything on the MCU side (the software that drives the monitoring lines).
Maximum clock frequency and FPGA resource use have not been evaluated.
