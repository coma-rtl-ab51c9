# COMA: hardware that runs the RTOS bookkeeping while the soft processor sleeps

A soft processor running a real-time OS such as MicroC/OS-II spends most of its
life in the idle task, yet it cannot simply be switched off: the OS must still
count clock ticks, expire task delays and react to interrupts. COMA
(cooperative management) moves exactly that bookkeeping into a few small,
always-clocked hardware blocks that share the OS's own data structures with
the processor through a dual-port block RAM. When only the idle task is ready,
the hardware gates the clocks of the processor, its memory controllers, its
bus and its peripherals. It then keeps ticking the OS on its own and wakes the
processor, with only the clock domains that the next task needs, when a task's
delay runs out or an interrupt arrives.

This repository holds synthesizable SystemVerilog for the COMA units of an
example FPGA system: a MicroBlaze-class processor with LMB block-RAM memory,
an OPB bus, a GPIO input and a UART output, clocked at 50 MHz. The processor,
the LMB and OPB controllers and the two peripherals are vendor parts and are
not included. The top level brings their connections out as ports.

## Blocks

| File | Block |
|---|---|
| `rtl/coma_pkg.sv` | shared types, activation-state table, OS memory map |
| `rtl/coma_top.sv` | the subsystem, wired together |
| `rtl/coma_clock_mgmt.sv` | clock management unit: DCM, clock multiplexer, five clock gates |
| `rtl/coma_dcm.sv` | behavioural model of the vendor DCM (CLK0 and CLKDV) |
| `rtl/coma_bufgmux.sv` | glitch-free clock multiplexer |
| `rtl/coma_bufgce.sv` | clock gate |
| `rtl/coma_wakeup_unit.sv` | selective component wake-up unit: holds the activation state |
| `rtl/coma_atim.sv` | auxiliary task and interrupt management (ATIM) unit, grouping the three below |
| `rtl/coma_tick_timer.sv` | OS tick timer with routing to the processor or the ATIM |
| `rtl/coma_task_mgr.sv` | ready-list monitor and task-delay walker |
| `rtl/coma_irq_mgr.sv` | interrupt management unit with an OPB slave port |
| `rtl/coma_fsl.sv` | one-word FSL link from the processor to the wake-up unit |
| `rtl/coma_dpbram.sv` | dual-port BRAM: the data memory, shared by the processor (port A) and the ATIM (port B), and the instruction memory |

## Activation states and priority aliasing

The device is split into five clock domains: processor (with its FSLs),
memory controllers (the processor ports of the instruction and data BRAMs),
OPB bus, GPIO and UART. An *activation state* says which of them run. Four
states exist, selected by two bits:

| State | Running domains | Clock |
|---|---|---|
| 00 | processor, memory controllers | CLK0 (50 MHz) |
| 01 | processor, memory controllers, OPB, GPIO | CLK0 |
| 10 | processor, memory controllers, OPB, UART | CLKDV (50/16 = 3.125 MHz) |
| 11 | everything | CLK0 |

Separately, the device is either *awake* (the state's domains run) or
*asleep* (all five are gated and only the COMA units run).

The two state bits are carried in the task priority itself. MicroC/OS-II keeps
priorities in a byte but uses only six bits (0 to 63). COMA uses the top two:

```
bit   7 6 | 5 4 3 | 2 1 0
      Z Z |  Y Y Y| X X X
  state --'  row    column of the ready table
```

A task that should run with only processor and memory gets a priority of the
form `00pppppp`; the data-output task, which drives the UART slowly, gets
`10pppppp`. Before it starts a task, the OS sends that task's priority byte to
the wake-up unit over the FSL, and the device switches to the state in bits
[7:6]. The same bits choose the state when the ATIM wakes the device because
the task's delay has expired. The union of two states is their bitwise OR (01
| 10 = 11), which the wake-up unit uses when an interrupt needs domains that
the current state lacks.

## One sleep and wake cycle

This is the part that needs the most care. The processor and the ATIM both
work on the same OS variables, and the hand-over goes as follows.

1. **Going to sleep.** While the processor is awake, the task manager reads
   `OSRdyGrp` and `OSRdyTbl[7]` through BRAM port B every `POLL_PERIOD` (64)
   cycles. If both equal `0x80`, only the idle task (priority 63) is ready. If
   in addition no tick interrupt and no external interrupt is waiting for the
   processor, the task manager pulses `sleep_req`. The wake-up unit clears
   `awake` on the next edge, and the clock gates close within one more cycle of
   the main clock.
2. **Ticks while asleep.** Every `TICK_PERIOD` cycles the tick timer fires.
   With the processor asleep the tick goes to the task manager. It follows
   `OSTCBList` through the `OSTCBNext` pointers until a null pointer. For each
   task control block it decrements a non-zero `OSTCBDly`. When the delay
   reaches zero it sets bit `Y` of `OSRdyGrp` and bit `X` of `OSRdyTbl[Y]`,
   which is exactly what the OS tick handler would do. At the end of the walk
   it increments the 8-bit tick counter in memory. A walk over N blocks, of
   which R become ready, takes `5 + 4N + 6R` cycles.
3. **Wake-up by a task.** If the walk made any task ready, the task manager
   pulses `wake_req` with the state bits of the highest-priority such task.
   The wake-up unit sets `awake` and the state, and the needed domains get
   their clock again. The processor continues where it stopped, finds the task
   in the ready list and runs it.
4. **Wake-up by an interrupt.** A rising edge on `ext_irq[i]` sets a pending
   bit. If the processor, the OPB or the source's own peripheral is gated, the
   interrupt manager requests a wake-up in `IRQ_STATE[i]` (01 for the GPIO).
   Once the processor and OPB run, it raises `cpu_irq`. The ISR reads the
   source's address over the OPB and acknowledges the interrupt by an OPB
   write when it is done. If everything needed is already running, no wake-up
   is requested.
5. **Ticks while awake** go to the processor as `tick_irq`, and the OS handles
   them itself. The ATIM never walks the list while the processor runs.

Ordering rules that keep the two masters apart:

* The ATIM writes the OS variables only while the processor is asleep.
* A wake-up request from the interrupt manager is held back while a walk is in
  progress, so the processor never resumes in the middle of a walk.
* The device does not go to sleep while an interrupt or a tick waits for the
  processor. The OS must therefore acknowledge an interrupt at the *end* of
  its handler, after the ready list has been updated.
* Clocks are gated wherever the processor happens to be. This is safe because
  it is known to be in the idle task with no handler running.

## OS data in the shared BRAM

The OS must place its variables at fixed word addresses in the data BRAM.
Each variable takes one 32-bit word with its value in the low bits. The
addresses are defined in `coma_pkg`:

| Word address | Variable |
|---|---|
| 16 | `OSRdyGrp` (8 bits) |
| 17 to 24 | `OSRdyTbl[0..7]` (8 bits each) |
| 25 | `OSTCBList`, word address of the first task control block (0 = none) |
| 26 | 8-bit OS tick counter |
| p + 0 | `OSTCBNext` of the block at p |
| p + 1 | `OSTCBPrev` |
| p + 2 | `OSTCBDly` (16 bits) |
| p + 3 | `OSTCBPrio` (8 bits, with the state bits) |

The stock MicroC/OS-II data layout (byte variables, larger TCBs) differs. A
port has to either lay out its structures this way or change the constants in
`coma_pkg`.

## Clock tree

`coma_clock_mgmt` follows the usual FPGA structure. A DCM gives CLK0 and
CLKDV (CLK0 divided by `CLKDV_DIVIDE` = 16). A glitch-free multiplexer selects
one of them as the main clock (CLKDV in state 10), and five clock gates feed
the domains. The ATIM and the wake-up unit run from ungated CLK0.

* **Gate** (`coma_bufgce`): the enable is sampled on the falling clock edge,
  so a gate opens or closes cleanly within one main-clock cycle. When CLKDV
  is selected, that is up to 16 input cycles.
* **Multiplexer** (`coma_bufgmux`): each side has a select flop on its own
  falling edge. A side turns on only after the other side is off, and the
  output stays low in between.
* **DCM model** (`coma_dcm`): on the FPGA the vendor primitive takes its
  place. The model puts the CLKDV edges half an input period after the CLK0
  edges. This keeps paths between the two domains free of simulation races.
* **Domain crossings.** Every signal that crosses between the always-on clock
  and a gated clock is either a level that stays stable for several cycles
  (the interrupt lines, the pending mask) or is passed as a toggle through a
  two-flop synchroniser: the FSL handshake, the tick acknowledge and the
  interrupt acknowledge. The design therefore works whether the processor
  runs from CLK0 or CLKDV.

## Processor-side interfaces

* **FSL** (`fsl_m_data`, `fsl_m_write`, `fsl_m_full`, on `clk_cpu`): write
  the 8-bit priority of the task about to run, in the low byte, when
  `fsl_m_full` is low. The word reaches the wake-up unit two always-on clock
  edges later. The new state applies one edge after that.
* **Tick interrupt** (`tick_irq`, level): pulse `tick_ack` for one `clk_cpu`
  cycle when the tick handler is done.
* **External interrupt** (`cpu_irq`, level) and the interrupt manager's OPB
  slave (on `clk_opb`). Transfers are single-beat and acknowledged one cycle
  after `opb_select`. `sl_dbus` is zero when no transfer is being
  acknowledged.

  | Offset from `OPB_BASE` (0x41200000) | Access | Meaning |
  |---|---|---|
  | 0x0 | read | address `SRC_ADDR[i]` of the lowest-numbered pending source, 0 if none |
  | 0x4 | read | pending bit mask |
  | 0x8 | write | a 1 in bit i clears source i |

* **Data LMB** (`lmb_*`, on `clk_mem`): BRAM port A with byte write enables
  and one cycle of read latency.
* **Instruction LMB** (`ilmb_*`, on `clk_mem`): the instruction BRAM, same
  timing. Its write enables load the program; its second port is unused.

## Parameters (of `coma_top`)

| Parameter | Default | Meaning |
|---|---|---|
| `AW` | 11 | BRAM address width (2048 x 32 bits) |
| `CLKDV_DIVIDE` | 16 | CLKDV divider |
| `TICK_PERIOD` | 500000 | cycles per OS tick (100 Hz at 50 MHz) |
| `POLL_PERIOD` | 64 | cycles between ready-list checks |
| `N_IRQ` | 2 | external interrupt lines (0: GPIO, 1: UART) |
| `IRQ_STATE` | {10, 01} | activation state needed by each source |
| `SRC_ADDR` | {0x40600000, 0x40000000} | OPB address reported for each source |
| `OPB_BASE` | 0x41200000 | OPB base of the interrupt manager |

The divide-by-16, the four states and the two peripherals are those of the
example system. The published power figure for the slow state was taken at
6.25 MHz, which is a divide-by-8 of 50 MHz and does not agree with the
divide-by-16 stated for the same system; the default follows the
divide-by-16, and `CLKDV_DIVIDE = 8` gives 6.25 MHz. The memory size, tick period, poll period, OPB addresses and
the interrupt register map are choices of this implementation.

## Choices beyond the original scheme, and limits

* The single clock gate for "hardware peripherals" is split into a GPIO gate
  and a UART gate, since states 01 and 10 run different peripherals.
* The FSL link is one word deep and asynchronous. This is because the
  processor's clock may be switched to CLKDV.
* The following are all choices of this design: the choice of wake state when
  several tasks expire in one tick (the highest-priority task), the OR-merge
  of states on an interrupt while awake, the check of the source's own
  peripheral domain, and the walk guard of 64 blocks.
* The OS must store its variables as listed above. The task manager does not
  look at MicroC/OS-II's suspend flags (`OSTCBStat`), so a suspended task with
  a running delay is marked ready when the delay expires.
* After a wake-up by the ATIM, the processor resumes inside the idle task. The
  OS idle loop must therefore look at the ready list (or reschedule) to notice
  the task.
* Only one CLKDV frequency is available per build. Running the slow state at
  12.5 or 25 MHz needs a different `CLKDV_DIVIDE`.

## Simulation

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example, for the whole subsystem:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    rtl/coma_pkg.sv tb/tb_coma_top.sv --top-module tb_coma_top -o sim
./obj_dir/sim
```

`tb_coma_top` runs the subsystem at its default parameters, about 40 ms of
device time and a few seconds of simulation. It uses a behavioural model of
the processor and OS (`tb/coma_cpu_model.sv`) running the example
application:

* a GPIO data-input ISR;
* an FFT task, priority 0x05, state 00, with its computation replaced by a
  delay;
* a data-output task, priority 0x8A, state 10, re-delayed by two ticks each
  run. It sends two bytes 0.05 ms apart and spins in between, as the serial
  port sets the pace;
* the idle task.

The testbench checks and counts each mechanism:

* sleep on idle;
* ATIM tick walks;
* a wake-up by a tick into state 10, with the processor clock period
  measured at 16 input periods;
* wake-ups by interrupt into state 01;
* an interrupt served with the wake-up skipped;
* FSL state changes;
* a tick served by the processor.

It also checks that gated clocks are silent, that code loaded into the
instruction BRAM is fetched back, and that the tick counter in memory equals
the number of ticks. Finally it checks that the device goes asleep → 01 → 00 →
asleep for a data word (ISR, then FFT) and asleep → 10 → asleep for the
data-output task.

Two workload testbenches run four copies of the subsystem side by side
(`tb/coma_rate_lane.sv`), with a 0.4 ms tick to keep them short:

* `tb_coma_rates` feeds data and sends results every 2, 4, 8 and 16 ticks.
  It measures the time asleep and in each state, and it weighs those times by
  the per-state power of the example system: 0.212 W in 00, 0.464 W in 01,
  0.026 W in 10 and 0.494 W in 11, with no dynamic power while asleep. It
  reports the energy saved against running in state 11 throughout. This
  ranges from 97.0% at the highest rate to 99.6% at the lowest, and the test
  checks that the saving grows as the rate falls. These figures
  exclude the ATIM's own power and the wake-up overheads of a real board, so
  they are upper bounds. The measured savings in the original system were
  73% to 90%.
* `tb_coma_freq` builds the subsystem with `CLKDV_DIVIDE` = 2, 4, 8 and 16,
  giving 25, 12.5, 6.25 and 3.125 MHz. It checks the slow clock period, that
  the data-output task takes the same time at each frequency, and that its
  processor cycles halve with each step. That is where the energy of a
  peripheral-bound task is saved. The unit testbenches check their blocks
against reference models:

* `tb_coma_task_mgr` runs random task lists against a software model of the
  OS tick;
* `tb_coma_wakeup_unit` checks the state table;
* `tb_coma_clock_mgmt` counts clock edges per domain;
* `tb_coma_bufgmux` checks for short or merged clock pulses;
* `tb_coma_fsl` covers three clock ratios.
