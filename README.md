# OSIAC 662: a microprogrammed 16-bit processor on a single bus

OSIAC 662 is a small teaching processor. It has 16-bit words, four general
registers and an instruction set close to the PDP-11 and 68000: two-operand
and one-operand instructions, seven addressing modes, conditional branches,
a decrement-and-branch loop instruction, and a subroutine call and return.
The datapath is deliberately poor. There is one bus and one adder. There are
no logic gates for AND or OR, no shifter, and no incrementers on the
registers. Everything an instruction does is therefore a sequence of
one-cycle register transfers, chosen by a micro-program. This RTL gives the
datapath, with the machine's own control lines, and a complete micro-program
that runs the whole instruction set on it.

## Programmer's model

| Register | Alias | Use |
|---|---|---|
| R0 | AC | accumulator |
| R1 | X  | index register |
| R2 | SP | stack pointer; the stack grows down and SP points at the top item |
| R3 | PC | program counter |

Memory is addressed by word. There are four flags:

- **C** is the carry of an addition. For subtraction it is the borrow, that is, the inverse of the adder's carry.
- **V** is two's-complement overflow.
- **Z** is set when the result is zero.
- **N** is set when the result is negative.

Instruction words (bit 15 on the left):

```
double operand   OP2[15:12] SAD[11:8] DAD[7:4] S[3:2] D[1:0]
single operand   0000 OP1[11:8]  DAD[7:4] QQ[3:2] D[1:0]
branch           0000 0000 10 I S/C C V Z N      + offset word
RTS              0000 0000 1100 0000
DBRA             0000 1010 DAD[7:4] xx D[1:0]    + (extension) + offset word
HALT             0000 0000 0000 0000
```

| OP2 | | flags | OP1 | | flags |
|---|---|---|---|---|---|
| 1 ADD  | dst + src -> dst | NZVC | 1 ADDQ | dst + QQ -> dst | NZVC |
| 2 AND  | src & dst -> dst | NZ, V=C=0 | 2 CLR | 0 -> dst | N=0 Z=1 V=C=0 |
| 3 EXG  | swap src and dst | none | 3 JMP | EA(dst) -> PC | none |
| 4 MOVE | src -> dst | NZ, V=C=0 | 4 JSR | push updated PC, EA(dst) -> PC | none |
| 5 OR   | src \| dst -> dst | NZ, V=C=0 | 5 NEG | 0 - dst -> dst | NZVC |
| 6 SUB  | dst - src -> dst | NZVC | 6 NOT | ~dst -> dst | NZ, V=C=0 |
| | | | 7 SUBQ | dst - QQ -> dst | NZVC |
| | | | 8 TST | flags from dst, no write | NZ, V=C=0 |
| | | | 10 DBRA | dst - 1 -> dst, branch unless -1 | none |

Addressing modes: 0 `Rk`, 1 `(Rk)`, 2 `(Rk)+`, 3 `-(Rk)`, 4 `n(Rk)`,
5 absolute `n`, 6 immediate `#n`. Modes 4 to 6 take an extension word after
the instruction word; `n(PC)` is mode 4 with R3. A branch is taken when
`I xor (IR3.(S/C xnor C) + IR2.(S/C xnor V) + IR1.(S/C xnor Z) + IR0.(S/C xnor N))`
is true. S/C = 1 tests the chosen flags for set, and 0 tests them for clear.
I inverts the test. The target is the address after the offset word plus the
offset.

## The datapath and its control lines

```
            +------------------------- 16-bit bus -----------------------------+
            |        |        |        |          |           |               |
   R0..R3 (RAC/WAC) MAR     MDR       IR       T1..T5          Q               |
   read & write     (IMAR)  (IMDR,    (IIR)    (ITn, OTn)     (IQ, OQ)         |
                      |      OMDR,                 |            ^              |
                      v      READ)                 | T1         | OADDER       |
                    memory <-> MDR                 v            |              |
                                        A = OA ? T1 : 0 --> [ adder ] <-- B    |
                                                            + P1       |       |
                                      bus --> IB gate --> COMP inverter +------+
```

In a cycle one register drives the bus and any number of registers load from
it. Every load happens at the rising clock edge. The adder works in the same
cycle: `Q <- (OA ? T1 : 0) + ((IB ? bus : 0) xor COMP) + P1`. It also
produces `cout` and `vout`. The two bus tests, `busz` and `busn`, together
with `cout`, `vout`, the IR, the flags and `ibrch`, are the conditions the
micro-program can branch on. The flags change only through their own lines:

- NEWC loads `cout` into C, and SETC/CLRC set or clear it.
- NEWV loads `vout` into V.
- NEWZ loads `busz` into Z, and NEWN loads `busn` into N.

So a result has to pass over the bus to set N and Z. The registers R0..R3 sit
in a small memory with one read port and one write port. RAC and WAC choose
how the register is named:

| RAC/WAC | register |
|---|---|
| 0 | no access |
| 1 | the number on RN/WN |
| 2 | the source field IR[3:2] |
| 3 | the destination field IR[1:0] |

With only an adder, familiar operations become short tricks:

| operation | how |
|---|---|
| increment R | `Q <- 0 + R + 1` (IB, P1) |
| negate R | `Q <- 0 + ~R + 1` (IB, COMP, P1) |
| decrement R | negate, then `Q <- 0 + ~Q`: ~(-R) = R - 1 |
| constant 0 | `Q <- 0 + 0` |
| constant -1 | `0 + ~0` (COMP without IB) |
| shift left x | T1 = x, then `Q <- T1 + x` |

## The micro-program

`osiac_control` is a micro-sequencer. Each named micro-state is one cycle. It
asserts a set of control lines and picks its successor from the condition
inputs. The parts of the micro-program are described below.

**Fetch, 4 cycles.** `PC -> MAR` and `Q <- PC+1`. Then `READ` and `Q -> PC`,
so the PC moves on as soon as the word is read. Then `MDR -> IR`. The last
cycle decodes.

**Operand routine.** One routine handles all seven modes. A sequencer bit,
`opsel`, says which operand it is working on:

| | mode field | register field | value goes to | address goes to |
|---|---|---|---|---|
| source | IR[11:8] | IR[3:2] (RAC = 2) | T2 | T3 |
| destination | IR[7:4] | IR[1:0] (RAC = 3) | T1 | T4 |

The source is always evaluated first, so its extension word comes first in
the instruction. The destination value lands in T1, which is where the adder's
A input needs it. MOVE, CLR, JMP and JSR only need the destination address,
so they skip its read. Extension words are fetched through `PC -> MAR`,
`PC+1 -> PC` and `READ`, in the same way as the instruction word.

**Execute and write back.** The result is left in Q. The write-back then does
one of three things:

- A register destination loads Q with WAC = 3.
- A memory destination gets `Q -> MDR`, then `T4 -> MAR`, then `WRITE`.
- An immediate destination is not written.

N and Z are latched while Q is on the bus. Several instructions set flags in
ways worth noting:

- **V cleared.** MOVE, NOT, CLR, TST and the logic instructions form their
  result as `0 + value`, which cannot overflow. They latch that `vout` to
  clear V and assert CLRC in the same cycle.
- **Borrow.** SUB, SUBQ and NEG compute `dst + ~src + 1` and latch `vout`.
  The borrow is the inverse of `cout`, and no line loads an inverted carry. So
  the next micro-state is chosen by `cout`: one branch asserts SETC, the other
  CLRC.
- **ADDQ and SUBQ.** The QQ field cannot reach the bus, so the micro-program
  builds it in Q. It starts from 0 and adds one twice if IR3 is set and once
  if IR2 is set. Then it moves the result to T2 and reuses the ADD or SUB
  micro-state.
- **AND and OR.** These have no gates, so they run as a 16-step loop:
  1. T2 holds the source, T3 the destination, and T5 the result. T5 starts at
     1, which is a sentinel bit.
  2. Each step doubles T5, using T1 as the A operand.
  3. It puts T2 and then T3 on the bus and looks at `busn`. For AND, both
     top bits must be 1. For OR, either may be. If the test passes, it adds
     one to the doubled T5.
  4. It doubles T2 and T3 so that the next bit pair reaches bit 15.
  5. On the 16th doubling the sentinel carries out of T5. That `cout` sends
     the sequencer into a copy of the bit test that leaves the loop instead
     of shifting again.

  A register-to-register AND takes about 170 to 200 cycles.
- **DBRA.** It decrements the destination, writes it back without touching
  the flags, and forms `~result` in Q. Then `busz` tells whether the result
  was -1. If it was not, DBRA takes the same path as a taken branch. If it
  was, the PC steps over the offset word.
- **JSR.** It decrements SP, uses the new SP as the address, writes the
  updated PC (already past all extension words) there through MDR, and then
  loads the target address from T4 into the PC.
- **RTS.** It reads the word at SP into the PC and increments SP.
- **EXG.** It copies the source value into Q over the bus (IQ) and writes it
  to the destination. Then it copies the old destination value from T1 into
  Q and writes it to the source. It leaves the flags alone.
- **HALT.** The controller enters a state that asserts the HALT line and
  never leaves it. Only reset restarts the machine.

Some typical cycle counts are: register-to-register ADD 13, taken branch 10,
branch not taken 7, RTS 7 and HALT 4 (after which the machine stays halted).

## Interface and timing of the top, `osiac662`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst` | in | clock; synchronous active-high reset |
| `mem_addr[15:0]` | out | word address (MAR) |
| `mem_wdata[15:0]` | out | write data (MDR) |
| `mem_rdata[15:0]` | in | read data, must be valid in the cycle `mem_read` is high |
| `mem_read`, `mem_write` | out | the READ and WRITE lines |
| `halted` | out | high after HALT (or an undefined code) until reset |
| `dbg_regs[4]`, `dbg_cc` | out | R0..R3 and {C,V,Z,N}, for observation |

Memory is outside the processor. A read latches `mem_rdata` into MDR at the
clock edge that ends the READ cycle, and a write stores at that edge. Memory
with combinational reads, or a synchronous RAM that presents the word within
the cycle, fits this interface. Reset clears every register, so execution
starts at address 0.

## Choices made here where the machine description is silent

- **Bus sources and sinks.** Which registers have O and I lines is a choice
  of this design. MAR and IR never drive the bus. T1..T5, Q and MDR can drive
  it and be loaded from it. Q can be loaded from the bus (IQ) as well as from
  the adder (OADDER).
- **Micro-program.** The micro-program is original to this design. It keeps
  to the machine's rules:
  - The PC is updated as soon as a word is read.
  - The source is evaluated before the destination.
  - A program can run from ROM.
  - There are no unneeded writes: TST and jumps never write back, and an
    immediate destination is never written.
  - Only T1..T5 and Q are used as scratch.
- **Undefined codes halt.** OP2 values 7 to 15, OP1 values 9 and 11 to 15,
  other OP1 = 0 codes and addressing modes 7 to 15 all halt the machine. For
  a source mode of 7 or more, this happens before any side effect of the
  instruction.
- **Jump targets.** `JMP Rk` jumps to the address held in Rk. `JMP #n` jumps
  to the address of the word n.
- **QQ** is the literal 0 to 3.
- **Mode restrictions.** The table of modes each instruction allows is not
  enforced. Every operand accepts modes 0 to 6.
- **Micro-sequencer state.** The sequencer keeps one bit of its own, `opsel`,
  so that one operand routine serves both operands. It also has two copies of
  the four loop-exit micro-states of AND/OR.

## Files

| file | contents |
|---|---|
| `rtl/osiac_pkg.sv` | control-word and condition structs, opcodes, mode numbers |
| `rtl/osiac_regfile.sv` | R0..R3 with RAC/RN and WAC/WN selection |
| `rtl/osiac_adder.sv` | OA/IB/COMP/P1 adder with cout and vout |
| `rtl/osiac_ccr.sv` | C, V, Z, N and the ibrch branch condition |
| `rtl/osiac_datapath.sv` | bus, MAR, MDR, IR, T1..T5, Q and the parts above |
| `rtl/osiac_control.sv` | the micro-programmed controller |
| `rtl/osiac662.sv` | top: controller plus datapath |
| `tb/osiac_mem_model.sv` | 64K-word behavioural memory for the test benches |
| `tb/tb_osiac_*.sv`, `tb/tb_osiac662.sv` | self-checking test benches |

## Simulating

Every test bench prints `TB_RESULT checks=N failures=M` and stops by itself.
For example, the whole processor:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/osiac_pkg.sv tb/tb_osiac662.sv --top-module tb_osiac662 -o sim
./obj_dir/sim
```

Verilator finds the other modules by name in `rtl/` and `tb/`. For a unit,
name its test bench instead (`tb_osiac_regfile`, `tb_osiac_adder`,
`tb_osiac_ccr`, `tb_osiac_datapath`, `tb_osiac_control`). The whole-processor
test takes a few seconds.

## How far it has been checked

- **`tb_osiac662`** runs the processor as built; it has no parameters. It
  has two parts:
  1. A 27-statement program checked against hand-worked results. The
     program sums an array in a DBRA loop, calls a subroutine (NOT, ADDQ,
     RTS), and runs AND, OR, a push, SUB with borrow, a taken BCS and an
     untaken BEQ, EXG, NEG of 0x8000 (overflow), an indexed read off SP,
     TST, SUBQ, JMP and HALT.
  2. 400 random programs run in lock-step with an instruction-level
     reference model in the test bench. Registers and flags are compared
     after every instruction, and all 64K words of memory at the end.

  It also counts every opcode, every source and destination mode, branches
  taken and not taken, both DBRA outcomes, RTS, borrow, overflow and halt.
  The test fails if any of them never occurred.
- **`tb_osiac_datapath`** drives random legal control words and compares
  every register and condition input with a shadow model, cycle by cycle.
- **`tb_osiac_control`** checks the controller's control words and cycle
  counts for fetch, HALT, ADD, SUB borrow, branches, RTS, JSR, DBRA, EXG and
  the AND loop.
- **Register file, adder and flags** have exhaustive-corner and random tests.

The reference model and the hand results come from the instruction-set
definition. Where that definition is ambiguous, the model follows the
choices listed above, so the tests cannot catch a wrong choice there.
