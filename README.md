# A four-task RTOS kernel in hardware

A software real-time kernel runs on the same processor as the tasks it
schedules. On a small processor that overhead can be larger than the work
itself: updating four timers, checking time-outs, comparing priorities and
saving one context and restoring another costs tens of cycles per user
instruction. This design moves the kernel next to the processor as logic
that runs in parallel. The timers count on their own. Trigger counters
record pending work. Every task has its own register bank and its own pages
of code and data memory. The running task is chosen again at every
instruction fetch. A higher-priority task therefore takes over after the
instruction in flight, and the switch costs nothing beyond the fetch cycle
every instruction already has.

Only the primitive actions are in hardware. These are "end this
iteration", "trigger these tasks", "suspend these tasks" and "set that
task's program counter". Each is a single instruction. Richer services
such as mutexes and waiting on another task are built from them by a few
ordinary instructions in the tasks themselves. This is the *hybrid* part:
comparisons of lock variables are cheap in software, while suspending and
resuming are cheap in hardware.

The processor is deliberately tiny: 4-bit data, 16 instructions of 8 bits
per task, and 16 data words per task. It is there to show the kernel
working, not to be a useful CPU.

## Block structure

```
            intr[3:0]        cfg_* (periods)
               |                  |
               v                  v
   +-----------------------+   +--------------------+
   | trigger_controller    |<--| task_timer x4      |   timeout[i]
   | trigger counter/task  |   | count + shadow reg |
   +-----------------------+   +--------------------+
      ^ trig_mask  ^ end_task        | pending[3:0]
      |            |                 v
   +-----------------------+   +------------------------+   +------------------------+
   | syscall_interface     |-->| selective_task_blocker |-->| bank_switching_logic   |
   | END/SUSP/TRIG/SETPC   |   | suspend mask register  |   | highest ready task     |
   +-----------------------+   +------------------------+   +------------------------+
            ^ sc_*                                                  | sel_task
            |                                                       v
   +--------------------------------------------------------------------------------+
   | control_logic_unit: fetch / decode / execute / RAM wait, per-task bank select |
   +--------------------------------------------------------------------------------+
        |                |                   |                      |
   program_rom      data_ram (ram_if)   register_bank (A, B,     alu
   {task, pc}       {task, addr} +      pc, Z for each task)
                    shared words
```

All blocks run from one clock with no gating. Reset (`rst`) is synchronous
and active high. It clears the timers, the counters, the suspend mask, the
register banks and the data RAM. It does not clear the program ROM.

| Module | Role |
|---|---|
| `hw_rtos_top` | Everything wired together; the only top. |
| `control_logic_unit` | Instruction sequencer and decoder; takes the selected task at each fetch. |
| `alu` | Add, subtract, increment, decrement, pass, compare; zero flag. |
| `register_bank` | A, B, program counter and zero flag for each task. |
| `program_rom` | 4 pages x 16 words x 8 bits, addressed `{task, pc}`, synchronous read, load port. |
| `data_ram` | 12 private words per task plus 4 words shared by all, request/ack bus. |
| `ram_if` | The RAM request/ack bundle, with an assertion that a request is a read or a write, never both. |
| `task_timer` | One per task: down counter with a period (shadow) register. |
| `trigger_controller` | One trigger counter per task; interrupt edge detection. |
| `syscall_interface` | Turns system-call instructions into kernel strobes; holds the self-clearing trigger mask register. |
| `selective_task_blocker` | The suspend mask register. |
| `bank_switching_logic` | Fixed-priority choice of the task to run. |
| `rtos_pkg` | Widths, opcode and system-call encodings, the `asm()` helper. |

## How a task gets the processor

This is the part that needs the most care when changing the design.

**Trigger counters.** Each task has a 4-bit counter of activations still
to run. It counts up on any of three events:

- the task's timer running out;
- a rising edge on the task's interrupt line `intr[i]`;
- the task's bit in a trigger-mask system call.

Several of these in the same cycle count as one. A task's END system call
counts it down. An up and a down in the same cycle cancel. The counter
stops at 15 and at 0. `sig[i]` shows the count-up pulses.

**Ready and running.** Task *i* is ready when its counter is nonzero and
its suspend bit is 0. There is no separate "running" state. The switching
logic combinationally picks the lowest-numbered ready task: task 0 has the
highest priority, task 3 the lowest. When no task is ready the processor
waits in fetch, and `cpu_busy` is 0.

**Instruction timing.** Every instruction takes three cycles. The five
instructions that touch the RAM take four.

```
cycle:    FETCH          DECODE                 EXEC                      (MEM)
          take sel_task  latch ROM word,        ALU / jump / port /       wait for ramack,
          ROM <= {t,pc}  pc <= pc+1             system call; RAM request  write A/B/outport
```

`runtaskid` changes at the end of the fetch cycle. A task that became
ready during an instruction of a lower-priority task therefore runs from
the next fetch on. In the end-to-end test an interrupt takes over within
3 cycles of its edge; 6 is the bound the test enforces. The preempted task
loses nothing, because its A, B, flag and program counter stay in its own
bank, and it continues where it stopped once it is again the highest
ready task.

**End of an iteration.** END decrements the caller's counter and resets
its program counter to 0 in the same cycle. The next fetch already sees
the new count, so a task whose counter has reached 0 does not run again,
and the next activation starts at word 0. A periodic task whose period is
shorter than its run time accumulates activations, up to 15.

**When system calls take effect.** SUSP and END act in their execute
cycle, so the very next fetch sees the new suspend mask and count. TRIG
goes through the one-cycle trigger mask register. The triggered counters
therefore count up at the end of the following fetch cycle, one cycle too
late for that fetch. The triggering task executes one more instruction
before a higher-priority task it triggered takes over. With the common
`TRIG` followed by `END`, the END completes first. An interrupt is
counted at the end of the cycle in which its line rises, and is seen by
the next fetch after that.

## Instruction set

Instruction word: `{opcode[7:4], value[3:0]}`. The value is an immediate,
a RAM word address, a jump target or a task mask.

| Opcode | Mnemonic | Action | Cycles |
|---|---|---|---|
| 0 | MISC *n* | 0 NOP, 1 A+=1, 2 A-=1, 3 A=A-B, 4 out=A, 5 A=in, 6 B=A, 7 A=B, 8 **END** | 3 |
| 1 | LDBI *imm* | B = imm | 3 |
| 2 | LDAI *imm* | A = imm | 3 |
| 3 | **SETPC** *t* | program counter of task *t* = A | 3 |
| 4 | STA *addr* | RAM[addr] = A | 4 |
| 5 | LDA *addr* | A = RAM[addr] | 4 |
| 6 | LDB *addr* | B = RAM[addr] | 4 |
| 7 | STB *addr* | RAM[addr] = B | 4 |
| 8 | ADD | A = A + B | 3 |
| 9 | CMPI *imm* | Z = (A == imm) | 3 |
| 10 | JMP *addr* | pc = addr | 3 |
| 11 | JZ *addr* | if Z: pc = addr | 3 |
| 12 | JNZ *addr* | if !Z: pc = addr | 3 |
| 13 | **SUSP** *mask* | suspend mask register = mask | 3 |
| 14 | **TRIG** *mask* | trigger every task whose mask bit is 1 | 3 |
| 15 | OUTM *addr* | out = RAM[addr] | 4 |

Writes to A, whether by loads, INA, MOVBA or arithmetic, update Z. Jumps
stay within the task's own 16-word page.

**Masks carry task 0 in the MSB**: `SUSP 4'b0111` blocks tasks 1, 2 and 3;
`TRIG 4'b0001` triggers task 3. SUSP replaces the whole register. The
register keeps its value until the next SUSP. To resume tasks, write a
mask with their bits cleared. Any task may suspend any task, itself
included. A task that suspends itself stops after that instruction. Its
program counter and pending count are kept, and it continues once another
task clears its bit.

The numbers of opcodes 0, 2, 4, 6, 8, 10 and 15 reproduce the published
instruction trace of the basic processor. That trace is: no-op; load A
with 5; store A to word 3; output word 3; jump to 11; load B from word 3;
load A with 6; add, giving A = 11. The test of the top runs that program.

## Memory map

- **ROM**: task *t*'s program is at ROM words `16*t .. 16*t+15`. The
  running task drives the upper two address lines. Load it through
  `prog_we/prog_addr/prog_data` with `prog_addr = {task, pc}`; use
  `rtos_pkg::asm(op, value)` to build words.
- **RAM**: for task *t*, addresses 0..11 are its own words. Addresses
  12..15 are one set of four words that every task sees. Mutex variables,
  flags and messages between tasks belong there. `SHARED_WORDS` sets how
  many of the top addresses are shared.

## Building synchronisation from the primitives

The design has no semaphore or mutex hardware; the tasks build these from
the primitives.

- **Mutex.** Read the lock word (shared RAM). If it is free, write "locked"
  and SUSP every other task that uses the same lock. Run the critical
  section, write "free", then SUSP with those bits cleared. Competing
  tasks cannot run at all while the lock is held, so a high-priority task
  never waits behind a preempted low-priority holder.
- **Lock found taken.** Set a flag word saying where to continue, then
  suspend yourself; the holder clears your suspend bit when it releases the
  lock, and TRIGs you if you ended instead. On the next start, test the flag
  and jump to the retry point.
- **Resume point instead of a flag.** Load A with the word address and
  SETPC the waiting task before triggering it. END later returns it to
  word 0.
- **Wait on a task.** The waiting task writes its number into a shared
  word, TRIGs the task it waits for, and ENDs. When that task finishes its
  work, it reads the word and TRIGs the waiter.

## Top-level interface (`hw_rtos_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `intr` | in | 4 | `intr[i]` triggers task *i* on its rising edge (synchronous to `clk`) |
| `cfg_we`, `cfg_task`, `cfg_period` | in | 1, 2, 8 | write a task's period in cycles (0 = not periodic); restarts its timer |
| `prog_we`, `prog_addr`, `prog_data` | in | 1, 6, 8 | program ROM load |
| `inport` / `outport` | in / out | 4 | input and output port shared by the tasks |
| `runtaskid`, `cpu_busy` | out | 2, 1 | task owning the processor; 0 when idle |
| `sig`, `trig_count` | out | 4, 4x4 | trigger pulses and trigger counters, bit/element *i* = task *i* |
| `ready` | out | 4 | bit *i*: task *i* has a pending trigger and is not suspended |
| `timer_count` | out | 4x8 | current count of each task's timer |
| `suspend_mask` | out | 4 | suspend mask register, MSB = task 0 |
| `instr_done`, `pcvalue`, `opcode`, `opvalue` | out | 1, 4, 4, 4 | instruction completion and trace |
| `areg`, `breg` | out | 4x4 | every task's A and B |

Parameters: `TIMER_W` (8), `TCNT_W` (4) and `SHARED_WORDS` (4). The
four-task count, the 4-bit data path and the 4-bit program counter are
fixed in `rtos_pkg`. Masks travel in the 4-bit instruction operand, so
changing the task count means changing the instruction format.

## What follows the original design and what is chosen here

These parts follow the original description:

- four tasks with fixed priority, task 0 highest;
- per-task timer with a shadow register that holds the period, and reload
  on time-out;
- per-task trigger counters incremented by timers, interrupts and
  trigger-mask calls, and decremented by the end-of-task call;
- suspend and trigger masks issued as system calls, with task 0 in the
  MSB; the suspend mask is retained, the trigger mask self-clears;
- banked accumulator registers, with the task id driving the upper ROM
  and RAM address lines;
- 3 to 4 cycles per instruction;
- the 4-bit data path;
- the signal names of its timing diagrams;
- the instruction classes of the basic processor;
- the use of suspend and trigger calls to build mutexes and wait-on-task.

These are choices made here, where the description gives no detail:

- the complete opcode encoding beyond the traced example, and the zero
  flag with CMPI/JZ/JNZ;
- the four-state sequencer;
- the one-cycle RAM acknowledge;
- the shared RAM words. Per-task RAM pages alone leave nowhere for a
  mutex variable that several tasks must read;
- one interrupt line per task, counted on rising edges;
- the timer counting every clock;
- timer width, counter width and saturation;
- the load ports for periods and program;
- END returning the program counter to 0;
- SETPC taking the new value from A;
- the input port;
- synchronous reset.

Not included:

- any further shared unit (floating point, DSP, UART, hardware queues).
  The original description names these only as possibilities.
- the software scheduler that served as the comparison baseline.

The original reports clock rates on a Spartan-3 FPGA: 88 MHz for the bare
processor, falling to 66 MHz with the full kernel. This RTL has not been
timed on any device.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_alu` | all operations on all operand pairs against integer arithmetic |
| `tb_task_timer` | pulse count and spacing for several periods, period 0, re-programming |
| `tb_trigger_controller` | 3000 random cycles against a counter model (edges, mask bit order, cancel, saturation) |
| `tb_syscall_interface` | strobes for every call kind; one-cycle trigger mask |
| `tb_selective_task_blocker` | retention and bit order of the suspend mask |
| `tb_bank_switching_logic` | all 256 pending/blocked combinations |
| `tb_register_bank` | random writes, clears and pc loads against a model |
| `tb_program_rom` | random image read back through `{task, pc}` |
| `tb_data_ram` | private/shared mapping, one-cycle ramack |
| `tb_control_logic_unit` | the traced example (instruction sequence, 3/4-cycle timing, A=11, B=5), every other instruction, preemption by another bank, system-call strobes, idling |
| `tb_hw_rtos_top` | the full design at default parameters (see below) |
| `tb_hybrid_sync` | the mutex and wait-on-task recipes above, written as task programs |

`tb_hw_rtos_top` runs six scenarios:

1. the traced example, which must take 33 cycles;
2. two periodic tasks, preempted by two interrupt-driven ones;
3. triggering in a chain 0 → 1 → 2 → 3;
4. task 0 blocking the three others;
5. a mutex in shared RAM held across an interrupt from a higher-priority
   user;
6. a resume point set with SETPC.

Throughout, it checks three things:

- every instruction starts on the highest-priority ready task;
- an interrupting higher-priority task takes over within 6 cycles;
- for every task, triggers = completed iterations + remaining count.

It also counts each mechanism and fails if any never happened: timer,
interrupt and mask triggers, preemption, suspension, a ready task held
back, resume, SETPC, RAM and shared-RAM access, and idle.

Running one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rtos_pkg.sv \
    tb/tb_hw_rtos_top.sv --top-module tb_hw_rtos_top
./obj_dir/Vtb_hw_rtos_top
```

Replace the testbench name to run another. The simulator finds the other
files through `-Irtl`, because each module lives in a file of its own name.
Every file in `rtl/` also passes `verilator --lint-only -Wall` and Yosys
with the slang front end. The only lint warnings left are for package
constants that a given module does not use.
