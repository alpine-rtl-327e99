# ALPiNe — a Petri-net decision processor in SystemVerilog

ALPiNe is a processor for reactive control tasks: a controller that watches sensor signals
and sets actuator signals. Its program is a Petri net of the finite-state subclass, not a list of
instructions. The hardware has two layers:

* the **Petri Net Decision Unit (PNDU)** decides *when* and *which* transition of the net fires.
  It is driven by events: a change on the FLAGS input pins is what makes it look at the program
  again;
* the **Computing Engine (CE)**, a small RISC core, does the *number crunching*: the subroutine
  attached to a transition that fires.

Each layer has its own memory and buses, so the decision unit can keep queuing events while the
CE runs. The design follows the published ALPiNe architecture: its block diagram, its
transition coding format and its execution-cycle flowchart. Everything the published
description leaves open was filled in here: word widths, memory sizes, guard coding, instruction
set, handshake timing and reset. Those choices are listed in
[Choices made in this implementation](#choices-made-in-this-implementation).

## The program: a list of transitions

Places do not appear in the program. A net is coded as a list of transitions. Each transition
occupies consecutive 32-bit words of the PNDU memory:

| offset | field | content |
|---|---|---|
| 0 | Precondition Word | `{mask[15:0], value[15:0]}` over the State Word |
| 1 | Address of Subroutine | bit 31 = has subroutine, bits 9:0 = CE address |
| 2 | Postcondition Word | `{mask[7:0], value[7:0]}` over the semaphores (bits 31:16 unused) |
| 3 | NNT | number of next transitions, 0..8 (larger values are clamped to 8) |
| 4.. | NTA1..NTAn | PNDU addresses of the next transitions |

**State Word.** 16 bits: `{FLAGS[7:0], SEMAPHORES[7:0]}`. FLAGS is the oldest flag vector not yet
consumed (see [Events](#events-flags-the-fifo-and-the-new-event-detector)). SEMAPHORES is the
control's own state and output register; it drives the `s_o` pins. Outputs such as "close the
crossing" are simply semaphore bits.

**Guard.** A transition is enabled when the Boolean AND of some State Word bits holds, each bit
taken as it is or inverted. The Precondition Word stores this as a care mask and the required
values:

    fires  <=>  ((state_word ^ value) & mask) == 0

A guard such as `[not r, l, a]` sets the mask bits of r, l and a, and sets the value bits of l and
a. The guard `[true]` is an all-zero mask. Guards that are not an AND of bits (for example
`r <> l`) cannot be coded. Such a net must first be rewritten with more transitions, one per AND
term.

**Postcondition.** It sets or clears chosen semaphore bits and leaves the rest alone:

    sem <= (sem & ~mask) | (value & mask)

**Next list.** The net is restricted to one input place and one output place per transition (the
FSM subclass). So after a transition fires, the only candidates are the transitions on its Next
Transition List.

`alpine_pkg.sv` has builder functions (`pre_w`, `post_w`, `sub_w`) for these words.

### Example: the level-crossing controller

Sensors `r` and `l` lie right and left of a level crossing. Output `z` must close the crossing from
the moment a train reaches the first sensor until it has cleared the second. Trains, long or
short, come from either side. With flags `r`=bit 1 and `l`=bit 0, and semaphores `a..d`=bits 0..3
and `z`=bit 4, the program is (`tb/tb_alpine_top.sv` loads exactly this):

| addr | transition | guard | postcondition | next |
|---|---|---|---|---|
| 0 | T0 | true | a=1 b=0 z=0 | T1, T2 |
| 6 | T1 | r, !l, a | a=0 b=1 z=1 | T3 |
| 11 | T2 | !r, l, a | a=0 c=1 z=1 | T4 |
| 16 | T3 | !r, l, b | b=0 d=1 z=1 | T5 |
| 21 | T4 | r, !l, c | c=0 d=1 z=1 | T5 |
| 26 | T5 | !r, !l, d | a=1 d=0 z=0 | T1, T2 |

A long train from the right produces (r,l) = 10, 11, 01, 00. T1 fires on 10. T3 does not hold on
11, so the unit waits. T3 fires on 01, and T5 fires on 00. The semaphores do not have to carry
the state at all. `tb/tb_pndu.sv` runs a variant whose guards test only r and l, and the next
lists alone keep track of where the train is.

## The execution cycle (pndu_control)

This is the heart of the design and the part that is easiest to get wrong. The control unit keeps
a Transition Pointer (TP) and the *active* Next Transition List. The active list belongs to the
transition that fired last, not to the transition currently being tested.

```
S_INIT     TP := START_ADDR; active list := {START_ADDR}
S_LOAD     read the transition at TP word by word into the Transition Register File;
           at the last word, load its Precondition into the comparator
S_TEST     guard holds?  yes -> S_FIRE   no -> S_NEXT
S_FIRE     load its Postcondition Word, make its next list the active list,
           pulse ce_start if it has a subroutine (-> S_CE, wait for ce_finished)
S_APPLY    SEMAPHORES := Postcondition applied
S_UPDATE   TP := active[0]   (an empty list -> S_HALT)
S_NEXT     another entry left?  TP := active[i+1] -> S_LOAD;  otherwise -> S_SUSPEND
S_SUSPEND  wait until the FIFO holds a new flag vector; pop it into FLAGS
S_RESUME   TP := active[0] -> S_LOAD
```

Points to keep in mind:

* **Events are consumed one at a time, only when nothing can fire.** FLAGS changes only in
  `S_SUSPEND`. After a transition fires, its successors are tested against the *same* flags
  first. For the crossing this is what makes a quick 10 → 11 → 01 sequence behave like a slow one.
  Each queued vector is offered to the whole active list before the next one is taken.
* **The first transition is not special.** After reset the active list is `{START_ADDR}`. If the
  first transition's guard is false, the unit suspends and retries it on every new event.
* **Halt.** A transition with NNT = 0 ends the program: after it fires, `halted_o` stays high until
  reset.
* **Subroutine.** While the CE runs, the decision unit waits in `S_CE`, but the flag FIFO keeps
  queuing events. The CE may rewrite the Postcondition Word before `S_APPLY` uses it.

### Timing

All of it is counted in clock cycles of the single clock:

| action | cycles |
|---|---|
| load a transition with n next addresses | 4 + n + 1 (one word per cycle, one cycle of read latency) |
| test | 1 |
| fire without a subroutine (fire, apply, update) | 3 |
| resume after a new event (suspend exit, resume) | 2 |
| flag change on the pins to queued in the FIFO | SYNC_STAGES + 2 (= 4) |
| CE instruction | 3 (fetch, decode, execute); 4 for LW |

So T0 of the example fires 9 cycles after reset is released: init 1, load 7, test 1. In the
crossing controller, a sensor edge moves `z` 15 cycles later when the first transition on the
list fires: 4 to queue the event, 2 to leave suspension, 6 to load, 1 to test, 2 to fire and apply.
Each transition that is tested and rejected first adds its load, its test and one step along the
list: 8 cycles for a one-entry transition. The testbenches check these counts.

## Events: FLAGS, the FIFO and the new event detector

`new_event_detector` passes the asynchronous `f_i` pins through a two-flop synchronizer. It
compares the result with the last vector it reported, and on a difference it pushes the new
vector into `flag_fifo`. The last stage of the FIFO is the FLAGS register, the flag half of the
State Word. A non-empty queue is the "new event" that wakes a suspended control unit. The queue
holds 8 vectors. A vector that arrives when the queue is full is dropped, and `fifo_overflow_o`
stays high until reset, because a lost sensor edge is a serious fault for a controller of this
kind. A change that reverts before it has passed the synchronizer is never seen.

## The Computing Engine

`computing_engine` is a multi-cycle RISC core. It has 16 registers of 32 bits (r0 reads as 0) and
shares the CE memory (1024 × 32 bits, one synchronous port) between code and data. On `ce_start`
it jumps to the transition's subroutine address and runs until `FIN`. `FIN` raises `ce_finished`
for one cycle.

Instruction word: `[31:26] opcode | [25:22] rd | [21:18] rs | [17:14] rt | [15:0] imm`
(`rt` and `imm` overlap; an instruction uses one or the other).

| group | instructions |
|---|---|
| arithmetic / logic | `ADD SUB AND OR XOR` (rd = rs op rt), `ADDI` (rd = rs + sext imm), `LUI` (rd = imm << 16) |
| shifts | `SLL SRL` (rd = rs shifted by imm[4:0]) |
| bit manipulation | `BSET BCLR BTGL` (set/clear/toggle bit imm[4:0] of rs), `BTST` (rd = that bit) |
| memory | `LW` rd = mem[rs + sext imm], `SW` mem[rs + sext imm] = rd |
| control | `BEQ/BNE` compare rd with rs, target pc+1+sext imm; `JMP` pc = imm; `NOP` |
| decision-unit interface | `RDPRE` rd = Precondition Word, `RDSA` rd = subroutine address, `RDPOST` rd = Postcondition Word, `WRPOST` Postcondition Word = rs[15:0], `FIN` |

`alpine_pkg::ce_r()` and `alpine_pkg::ce_i()` assemble R-type and I-type instructions. The
instruction set is this implementation's own. The original description only asks for a
small RISC core with fetch, decode and execute stages, bit-manipulation instructions and the
PNDU interface.

## Top-level interface (alpine_top)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `f_i` | in | 8 | FLAGS pins (asynchronous) |
| `s_o` | out | 8 | SEMAPHORES pins |
| `pndu_prog_we_i/addr_i/data_i` | in | 1/8/32 | write port of the PNDU memory |
| `ce_prog_we_i/addr_i/data_i` | in | 1/10/32 | write port of the CE memory |
| `fired_o`, `fired_addr_o` | out | 1/8 | a transition fires (address valid with it) |
| `suspended_o` | out | 1 | waiting for a new event |
| `halted_o` | out | 1 | a transition with an empty next list fired |
| `new_event_o` | out | 1 | a flag change was detected |
| `fifo_overflow_o` | out | 1 | sticky: a flag vector was dropped |
| `ce_busy_o` | out | 1 | the CE is running a subroutine |

Parameters: `FIFO_DEPTH` (8), `SYNC_STAGES` (2), `START_ADDR` (0). The widths are constants in
`alpine_pkg`: `FLAG_W`, `SEM_W`, `PADDR_W`, `CADDR_W`, `MAX_NT`. To use it, hold `rst_n` low,
write both memories, then release `rst_n`.

## Module hierarchy

```
alpine_top
├── pndu_memory          program memory, 256 × 32, synchronous read
├── pndu                 decision unit
│   ├── new_event_detector
│   ├── flag_fifo        queue + FLAGS register
│   ├── state_comparator State Word, Precondition Word, masked compare
│   ├── transition_regfile  candidate transition + active next list
│   ├── postcondition_unit  Postcondition Word + SEMAPHORES
│   └── pndu_control     execution cycle
├── computing_engine
└── ce_memory            CE code/data memory, 1024 × 32
```

## Simulation

Every testbench in `tb/` checks its own results and ends with a line
`TB_RESULT checks=N failures=M`. To run one with Verilator 5 from the directory that holds
`rtl/` and `tb/`:

```sh
verilator --binary --timing --assert --top-module tb_alpine_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/alpine_pkg.sv tb/tb_alpine_top.sv -o sim
./obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_alpine_top` | full processor at default size. Runs the crossing program with all four train sequences (two with events spaced out, two back to back so the FIFO fills), then a second program in which a CE subroutine rewrites the Postcondition via load/store, a long subroutine during which 12 flag events overflow the FIFO, and a halt. Counts every mechanism (fire, list walk, suspend, resume, queued events, CE run, Postcondition write, overflow, halt) and fails if any never happens. Checks the 9-cycle start-up latency. |
| `tb_railroad_env` | full processor at default size; the flags-only crossing net driven by a timed environment (sensor changes at times 20, 40, 70, 90, ten cycles per time unit) for all four trains; `z` compared with the ideal waveform every cycle, and the exact sensor-to-`z` latencies (15/23 cycles rising, 16 falling) checked |
| `tb_pndu` | decision unit with a CE model; the flags-only crossing net, the exact order of firings, the CE's view of the Subroutine Address and Precondition |
| `tb_pndu_control` | the exact order of tested and fired transitions for a five-transition program across four events; handshake counts; load time 4+n+1 |
| `tb_computing_engine` | all opcodes against an instruction-set model in the testbench: final memory, every Postcondition write, cycles from Start to Finished |
| `tb_flag_fifo`, `tb_new_event_detector`, `tb_state_comparator`, `tb_transition_regfile`, `tb_postcondition_unit`, `tb_pndu_memory`, `tb_ce_memory` | random stimulus against a reference model for each block |

The simulator has two states, so every register that is read is reset. The memories are not reset,
and testbenches write before they read.

## Choices made in this implementation

The published description gives the block diagram, the transition format (field order), the
execution-cycle flowchart and the CE's role and interface. It gives no widths, sizes, encodings
or timing. This implementation fills them in as follows:

* **Widths and sizes:** 8 flags, 8 semaphores, a 256-word PNDU memory, a 1024-word CE memory, at
  most 8 next transitions, an 8-entry FIFO. The crossing example needs 2 flags, 5 semaphores,
  32 program words and lists of 2.
* **Guard coding:** The source says the comparator checks "equivalence" between the Precondition
  Word and the State Word, and that the guard is an AND of variables. The mask/value coding is
  how that is realised here, since guards ignore the bits they do not mention.
* **Postcondition coding:** mask/value as well, so bits not named keep their value.
* **One word per field,** and a valid bit in the subroutine word for transitions with no
  subroutine.
* **When flags are consumed:** only when the active list is exhausted, one vector per suspension.
  The source does not say this explicitly. It is the reading that makes the crossing example work
  with closely spaced events.
* **Initial list `{START_ADDR}`, halt on NNT = 0, FIFO overflow drops and flags:** not covered by
  the source.
* **Synchronizer** on the flag pins, and reporting of a vector only when it differs from the last
  one reported.
* **Start / Finished** are one-cycle pulses. The CE is multi-cycle rather than pipelined. Its
  instruction set is new.
* **One clock** for both engines, as in the first version of the original design. The planned
  self-timed PNDU is not modelled.
* **Program loading** through write ports that were added for this purpose.
* The `s` pins are drawn as bidirectional in the original block diagram, but nothing describes
  them as inputs. They are outputs here.

Not built: interrupts and the timer (future work in the source), guards more complex than an AND,
and nets outside the FSM subclass.
