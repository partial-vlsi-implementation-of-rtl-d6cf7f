# ARC processor slice: hard-wired T-state control over a one-path datapath

The ARC (Architecture for Reusable Components) is a 32-bit, word-addressed
stack processor aimed at running reusable, abstract-data-type software. This
RTL builds the core of a first hard-wired implementation: the datapath, the
two-level control unit, the memory system and the instructions whose
execution steps are fully known: NOP, WAIT, END, ADD, SUB, DTS (duplicate
top of stack), BRANCH, BRTRUE and BRFALSE. PUSH, PUSHL and PUSHI also run
their full state sequences, including the busy-bit wait. Only some of
their states move data, because the transfers of the others are unknown.

The main idea is a control unit built from small counters rather than
microcode. Every instruction is a fixed sequence of named *T-states*. Each
T-state is one register transfer through the datapath. A main state machine
fetches the instruction. A per-instruction counter-and-decoder unit then
produces the remaining T-states.

## The datapath: one path for all data

All data takes the same route:

```
register --S1--> ALU (A) --> ALU output buffer --D--> register(s)
register --S2--> ALU (B)                          \--> memory write data
```

| bus | drivers |
|-----|---------|
| S1 | TopLDS, TopPAS, MDR, MAR, C_reg, PC, FDR, FR, C_flag, memory read data |
| S2 | Label, TEMP, Offset, IR operand (sign-extended IR[31:6]), memory read data |
| D  | the ALU output buffer only |

Every register can load from D. The ALU adds, or subtracts S2 from S1. A bus
that nothing drives reads zero, so a plain move `X <- Y` is `Y + 0`. MAR is
the memory address bus. D carries the memory write data.

The registers and their bus membership follow the original netlist. The
register cell is a load-enable flip-flop register with an active-low clear.
The original drives the buses through tri-state buffers; here each bus is an
AND-OR multiplexer. An assertion in `arc_bus` flags two drivers at once.

The ALU is a 32-slice ripple-carry adder. With `sub = 1` the control inverts
B and is also the carry into bit 0, so it computes `a - b`. `ovflo` is the
carry out of bit 31. For subtraction that is the "no borrow" bit, not a
signed overflow. Z (NOR of the result) and N (bit 31) are also produced.

The C_flag register takes {N, Z} of each ADD/SUB result: bit 1 is N and
bit 0 is Z. Its bit 0 is the condition bit CR that the conditional branches
test. The busy bit (MDR bit 31) is brought out. No instruction built here
uses it.

## T-states and the four phases

A T-state lasts four clock cycles (`arc_phase_gen`). These stand for the
four-phase clock that each T-state line is ANDed with:

| phase | action |
|-------|--------|
| 0 | source registers drive S1/S2; the ALU settles |
| 1 | ALU output buffer loads; C_flag captures flags (T17/T18); IR loads (T2) |
| 2 | ALU output buffer drives D |
| 3 | destination registers load, or memory is written (T25); the state machines step |

Source enables stay on for all four phases. `arc_tstate_decode` turns the
active T-state and the phase into the control struct `dp_ctrl_t`. The
transfers it knows are:

| T-state | transfer | used by |
|---------|----------|---------|
| T1  | MAR <- PC | fetch |
| T2  | IR <- M[MAR]; PC <- PC + Offset | fetch |
| T26 | MAR <- TopLDS | ADD, SUB, DTS |
| T27 | MDR <- M[MAR] | ADD, SUB, DTS |
| T16 | MAR <- MAR + imm | ADD, SUB |
| T17 / T18 | MDR <- MDR + M[MAR] / MDR - M[MAR] | ADD / SUB |
| T10 | MAR, TopLDS <- TopLDS + imm | ADD, SUB, DTS |
| T25 | M[MAR] <- MDR | ADD, SUB, DTS |
| T14 | PC <- PC + imm | BRANCH, BRTRUE, BRFALSE |

`imm` is the instruction's operand field, IR[31:6], sign-extended.

## Control: Cu1 and Cu2

**Cu1** (`arc_main_ctrl`) is a two-flip-flop machine. Its next state is
chosen by two 4-input multiplexers, as in the original state table:

| state {G1,G2} | next state |
|---------------|-----------|
| T0 (00) | T1 if S (start), else T0 |
| T1 (01) | T2 |
| T2 (10) | T3 if X; else T1 if Y (IR bit 5); else T0 |
| T3 (11) | T1 if FIN, else T3 |

T1 and T2 fetch the instruction. X says that the instruction has execution
states. In the original, X is a gate on IR bits 0-4. Here X comes from the
opcode decoder in Cu2 (see "Departures").

**Cu2** (`arc_control2`) decodes the opcode. While Cu1 is in T3 it starts
that instruction's control unit. Each unit is an `arc_tstate_counter`: a
counter held clear while its start line `ins` is low, feeding a one-hot
decoder. It steps once per T-state. Its last output raises FIN.

| unit | T-states after T2 |
|------|-------------------|
| ADD/SUB (`arc_addsub_ctrl`) | T26 T27 T16 T17/T18 T10 T25 |
| DTS | T26 T27 T10 T25 |
| BRANCH | T14 |
| PUSH (`arc_push_ctrl`) | T10 T11 T25 T12 T13 T25 |
| PUSHL | T15 T27* T10 T19 T13 T25 |
| PUSHI | T26 T27 T29 T30 T27* T10 T25 T23 T13 T25 |

BRTRUE and BRFALSE share the BRANCH unit. `arc_branch_sel` XORs CR with an
instruction bit (0 = BRTRUE, 1 = BRFALSE). BRTRUE branches when CR = 1 and
BRFALSE when CR = 0. An untaken branch has X = 0, so it never enters T3.

### The busy-bit wait

The T27 marked * is a memory read that repeats while the busy bit is set.
The busy bit is bit 31 of the word being read. The unit samples it from
the destination bus at the step edge that ends the T27, which is the same
edge that loads the word into MDR. If the bit is 1, the counter holds and
the read runs again in the next T-state. The memory word can only change
from outside, through the external port or another agent on the bus.
Each repeat adds one T-state. PUSHI's first T27 never repeats.

### States without transfers

T11, T12, T13, T15, T19, T23, T29 and T30 drive no datapath line. The top
brings them out on the `ts_open` port (type `tstates_open_t`), so logic
outside the slice can see them. Adding their transfers only needs new
cases in `arc_tstate_decode` and new fields in `tstates_t`.

## Instruction set as built

An instruction word is `{operand[25:0], opcode[5:0]}`.

| opcode | name | T-states | clocks | effect |
|--------|------|----------|--------|--------|
| 0x00 | END | 2 | 8 | halt to T0 |
| 0x01 | WAIT | 2 | 8 | halt to T0 (same as END here) |
| 0x20 | NOP | 2 | 8 | continue |
| 0x22 | ADD | 8 | 32 | L[top+imm] <- L[top] + L[top+imm]; top <- top+imm |
| 0x23 | SUB | 8 | 32 | L[top+imm] <- L[top] - L[top+imm]; top <- top+imm |
| 0x24 | DTS | 6 | 24 | L[top+imm] <- L[top]; top <- top+imm |
| 0x25 | BRANCH | 3 | 12 | PC <- PC + imm |
| 0x26 | BRTRUE | 3 / 2 | 12 / 8 | branch if CR = 1 |
| 0x27 | BRFALSE | 3 / 2 | 12 / 8 | branch if CR = 0 |
| 0x28 | PUSH | 8 | 32 | top <- top+imm; M[top] <- MDR (twice) |
| 0x29 | PUSHL | 8 + r | 32 + 4r | MDR <- M[MAR] until not busy; top <- top+imm; M[top] <- MDR |
| 0x2A | PUSHI | 12 + r | 48 + 4r | MDR <- L[top] (repeated until not busy); top <- top+imm; M[top] <- MDR |

`top` is TopLDS. With imm = -1, ADD and SUB pop two entries and push the
result. With imm = +1, DTS pushes a copy of the top entry. PC already points
past the branch when T14 adds imm. Other opcodes act as NOP.

r is the number of busy repeats. The PUSH rows show only what the built
states do. In PUSHL, MAR still holds the fetch address when T27 reads,
because T15 is not built. The T-state counts agree with the original's
instruction timing table.

## Memory

`arc_memory` holds four word-addressed banks on one address bus, one data
bus and one read/write line. Address bits 31:30 select the bank:

| bits 31:30 | memory | default size |
|-----------|--------|--------------|
| 00 | InsM, instruction memory | 4K words |
| 01 | LDS, local data stack | 4K words |
| 10 | IM, indexed memory | 64K words |
| 11 | FM, facility memory | 64K words |

Reads are asynchronous and writes happen on the clock edge. The contents are
not reset.

The external port (`ext_*`) lets a host load programs and read results.
While `ext_en` is high it owns the buses. Use it only while the processor
is in T0.

At reset the PC is 0, the start of InsM. TopLDS resets to 0x4000_0000, the
first LDS word. Offset resets to 1, which is the PC step. All other
registers reset to zero.

## Using the top level

`arc_top` ports:

| port | meaning |
|------|---------|
| `clk`, `rst_n` | clock; active-low asynchronous reset |
| `start` | S: leaves T0 at the end of a T-state |
| `ext_en`, `ext_we`, `ext_addr`, `ext_wdata`, `ext_rdata` | host access to memory |
| `t_state` | one-hot T0..T3 of Cu1 |
| `phase` | phase within the T-state |
| `ir` | instruction register |
| `regs` | the twelve registers, in `arc_pkg` order |
| `ovflo`, `busy`, `cr` | carry out, busy bit, condition bit |
| `ts_open` | PUSH-group states that have no built transfer |

A run looks like this:

1. Reset.
2. Write the program to InsM and the data to LDS through the external port.
3. Raise `start` until `t_state[0]` drops.
4. Wait for `t_state[0]` to rise again. That happens at WAIT or END.
5. Raise `start` again to continue from the next instruction.

## Simulating

Each testbench in `tb/` checks itself and prints
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/arc_pkg.sv tb/tb_arc_top.sv \
          --top-module tb_arc_top -Mdir obj_top
obj_top/Vtb_arc_top
```

Replace the name to run another testbench. `tb_arc_top` runs the whole
design at its default sizes in well under a second.

It loads a 20-instruction program and runs it in three parts, separated
by halts. The program uses:

- every implemented instruction;
- both outcomes of each conditional branch;
- a carry out and a zero result;
- a halt followed by a restart.

In the third part, PUSHI waits on a busy stack word. The testbench clears
that word through the external port while the processor loops in T27. It
then checks that the read repeated and that the instruction went on.

It checks the resulting stack contents, the PC and TopLDS. It also checks
the T-state and clock count of every instruction, and counts how often each
mechanism happened.

The unit testbenches cover:

| testbench | block | method |
|-----------|-------|--------|
| `tb_arc_alu` | ALU | random and corner operands against 33-bit arithmetic |
| `tb_arc_datapath` | datapath | random four-phase transfers against a register model |
| `tb_arc_main_ctrl` | Cu1 | random inputs against the state table; every transition must occur |
| `tb_arc_control2` | Cu2 | T-state sequence of each instruction, with and without busy repeats |
| `tb_arc_push_ctrl` | PUSH units | random busy bits against a model that walks the state lists |
| `tb_arc_addsub_ctrl` | ADD/SUB unit | its state sequence |
| `tb_arc_tstate_decode` | T-state decoder | each T-state in each phase |
| `tb_arc_reg32`, `tb_arc_bus` | register, bus | random operation against a reference |
| `tb_arc_tstate_counter`, `tb_arc_phase_gen` | counter, phase timing | random operation against a reference |
| `tb_arc_memory`, `tb_arc_mem_bank` | memory | random writes read back |
| `tb_arc_branch_sel` | branch select | the full truth table |

## Files

| file | contents |
|------|----------|
| `rtl/arc_pkg.sv` | register indices, opcodes, `tstates_t`, `tstates_open_t`, `dp_ctrl_t` |
| `rtl/arc_top.sv` | top level |
| `rtl/arc_datapath.sv`, `arc_reg32.sv`, `arc_bus.sv` | datapath, register, bus |
| `rtl/arc_alu.sv`, `arc_add_slice.sv` | ALU and its 1-bit slice |
| `rtl/arc_phase_gen.sv` | four-phase timing |
| `rtl/arc_main_ctrl.sv` | Cu1 |
| `rtl/arc_control2.sv`, `arc_addsub_ctrl.sv` | Cu2 and the ADD/SUB unit |
| `rtl/arc_push_ctrl.sv` | PUSH, PUSHL and PUSHI units |
| `rtl/arc_tstate_counter.sv`, `arc_branch_sel.sv` | counter/decoder unit; branch select |
| `rtl/arc_tstate_decode.sv` | T-state to control lines |
| `rtl/arc_memory.sv`, `arc_mem_bank.sv` | memory system; one memory bank |

## Departures from the original design

- **Timing.** The original is an asynchronous, delay-tuned gate netlist. It
  lets data settle through unit-delay buses and a 98-100 unit ripple adder.
  This RTL is synchronous, with four clock cycles per T-state and no
  modelled delays.
- **Tri-state buses.** They become multiplexers.
- **Counters.** The JK flip-flop counters become binary counters.
- **Memory.** Arrays replace register-cell memories.
- **X.** Cu1's X input comes from the opcode decoder, not from IR bits 0-4.
  This lets untaken conditional branches finish in two T-states, as the
  original's timing table requires.
- **Fetch.** The PC step happens in T2 as PC + Offset (Offset = 1, word
  addressing). The original places the increment in T1 in one place and
  uses "+4" in another.
- **Second source bus.** Memory read data can also drive S2, because T17/T18
  need MDR and M[MAR] as the two ALU operands at once.
- **ALU control.** `sub = 1` means subtract. This follows the ALU diagram
  and adder netlist. One passage of prose states the opposite.
- **Choices of this design.** The following are not given by the original:
  - the opcode values;
  - the bank-select bits and bank order;
  - sign extension of the operand;
  - the C_flag capture of {N, Z};
  - the reset values of TopLDS and Offset;
  - the T14 transfer (PC <- PC + imm);
  - the external port protocol.

## Not built

- **Transfers of eight PUSH-group states.** T11, T12, T13, T15, T19, T23,
  T29 and T30 are sequenced but move no data (see "States without
  transfers").
- **Other instruction control units:** POP variants, PUSHFD, PUSHI_O,
  ACCESS, CLRN/CLRZ, MAX/MIN_ALLOWED, READ/WRITE and others. Only their
  T-state counts are known. The CLRN/CLRZ selection between T33 and T34
  would have nothing to drive.
- **Network Control Unit.** The CALL and RETURN instructions need the
  Network Control Unit for remote procedure calls between processors. It
  was only proposed.
- **Other memories.** The Parameter Address Stack and the Facility Data
  Memory are not built; only the TopPAS pointer register exists.

Because no built instruction loads TopPAS, C_reg, FDR, FR, Label or TEMP,
these registers keep their reset values. Synthesis therefore sees them as
constants.
