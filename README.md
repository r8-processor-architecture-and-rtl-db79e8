# R8: a multi-cycle 16-bit load-store processor

The R8 is a small teaching processor from the GAPH group at PUCRS. It has 16
general-purpose registers of 16 bits, a 16-bit word-addressed memory, fixed
16-bit instructions and four status flags (n, z, c, v). There is no pipeline.
Every instruction takes 2 to 4 clock cycles, and a 13-state control FSM steps
each one through a small datapath, one microinstruction per cycle.

This repository is a SystemVerilog implementation of the R8 instruction set
and of the organization the R8 specification proposes: its datapath,
register bank, control FSM and multiplexer control equations. Where the
specification is silent or contradicts itself, this design makes its own
choice; those choices are listed under "Choices this design makes".

## Instruction set

| IR[15:12] | IR[11:8] | IR[7:4] | IR[3:0] | instruction | effect | flags | cycles |
|---|---|---|---|---|---|---|---|
| 0 | Rt | Rs1 | Rs2 | ADD | Rt ← Rs1 + Rs2 | n z c v | 4 |
| 1 | Rt | Rs1 | Rs2 | SUB | Rt ← Rs1 − Rs2 | n z c v | 4 |
| 2,3,4 | Rt | Rs1 | Rs2 | AND, OR, XOR | Rt ← Rs1 op Rs2 | n z | 4 |
| 5 | Rt | k8 | | ADDI | Rt ← Rt + (00h & k8) | n z c v | 4 |
| 6 | Rt | k8 | | SUBI | Rt ← Rt − (00h & k8) | n z c v | 4 |
| 7 | Rt | k8 | | LDL | Rt ← Rt[15:8] & k8 | | 4 |
| 8 | Rt | k8 | | LDH | Rt ← k8 & Rt[7:0] | | 4 |
| 9 | Rt | Rs1 | Rs2 | LD | Rt ← MEM(Rs1 + Rs2) | | 4 |
| A | Rt | Rs1 | Rs2 | ST | MEM(Rs1 + Rs2) ← Rt | | 4 |
| B | Rt | Rs1 | 0–4 | SL0, SL1, SR0, SR1, NOT | shift left/right by one, filling 0 or 1; invert | n z | 4 |
| B | 0 | 0 | 5 | NOP | | | 3 |
| B | 0 | 0 | 6 | HALT | stop until reset | | 2+ |
| B | 0 | Rs1 | 7 | LDSP | SP ← Rs1 | | 4 |
| B | 0 | 0 | 8 | RTS | SP ← SP + 1; PC ← MEM(SP) | | 4 |
| B | Rt | 0 | 9 | POP | SP ← SP + 1; Rt ← MEM(SP) | | 4 |
| B | Rt | 0 | A | PUSH | MEM(SP) ← Rt; SP ← SP − 1 | | 4 |
| C | 0 | Rs1 | 0–4 | JMPR, JMPNR, JMPZR, JMPCR, JMPVR | if cond: PC ← PC + Rs1 | | 3/4 |
| C | 0 | Rs1 | 5–9 | JMP, JMPN, JMPZ, JMPC, JMPV | if cond: PC ← Rs1 | | 3/4 |
| C | 0 | Rs1 | A | JSRR | MEM(SP) ← PC; SP ← SP − 1; PC ← PC + Rs1 | | 4 |
| C | 0 | Rs1 | B | JSR | MEM(SP) ← PC; SP ← SP − 1; PC ← Rs1 | | 4 |
| D | disp10 in IR[9:0] | | | JMPD | PC ← PC + sext(disp10) | | 4 |
| E | cond in IR[11:10], disp10 in IR[9:0] | | | JMPND, JMPZD, JMPCD, JMPVD | if flag: PC ← PC + sext(disp10) | | 3/4 |
| F | disp12 in IR[11:0] | | | JSRD | MEM(SP) ← PC; SP ← SP − 1; PC ← PC + sext(disp12) | | 4 |

The conditions are: always (the unconditional forms), then n, z, c and v, in
that order. A jump whose condition is false finishes after 3 cycles. PC has
already been incremented when an instruction executes, so relative jumps and
the stacked return address use the address of the next instruction. The stack
grows downward, and SP points to the first free word.

To load a 16-bit constant you need two instructions, LDH and LDL. To reach a
memory word you then add a third, LD or ST with a base register and an offset
register.

## How one instruction runs

Every register in the datapath is written on the **falling** edge of the
clock. The control FSM changes state on the **rising** edge. After each rising
edge the control unit decodes its new state and the IR, and drives a fresh
microinstruction. The datapath carries that microinstruction out on the next
falling edge. So half a clock period is left for the control signals, the
memory read and the ALU to settle.

| cycle | state | what happens on the falling edge |
|---|---|---|
| 1 | S_FETCH | IR ← MEM(PC), PC ← PC + 1 |
| 2 | S_RREG | RA ← register IR[7:4], RB ← register IR[3:0], or register IR[11:8] for ADDI/SUBI/LDL/LDH/PUSH |
| 3 | S_ALU | RALU ← ALU(opA, opB); flags stored if the instruction sets them |
| 4 | one of the nine execute states | result written back, memory accessed, PC or SP updated |

The IR is loaded on the falling edge that ends S_FETCH. The FSM therefore
already sees the new instruction at the next rising edge. That is how HALT
goes straight from S_FETCH to S_HALT, where it stays until reset. For every
other instruction the FSM goes on to S_RREG.

The state after S_ALU depends on the instruction and, for jumps, on the
stored flags:

| state | instructions | register writes | memory |
|---|---|---|---|
| S_WBK | ADD…NOT, ADDI, SUBI, LDL, LDH | Rt ← RALU | |
| S_LD | LD | Rt ← MEM(RALU) | read |
| S_ST | ST | | MEM(RALU) ← Rt |
| S_JMP | jumps whose condition holds | PC ← RALU | |
| S_SBRT | JSRR, JSR, JSRD | PC ← RALU, SP ← SP − 1 | MEM(SP) ← PC |
| S_PUSH | PUSH | SP ← SP − 1 | MEM(SP) ← Rt |
| S_RTS | RTS | PC ← MEM(RALU), SP ← RALU | read |
| S_POP | POP | Rt ← MEM(RALU), SP ← RALU | read |
| S_LDSP | LDSP | SP ← RALU | |
| (S_FETCH) | NOP, jumps whose condition fails | | |

Three details are easy to miss:

* **RTS and POP compute SP + 1 in the ALU.** In S_ALU the ALU takes SP as its
  second operand and adds 1. In the fourth cycle RALU (= SP + 1) both
  addresses the memory and is written into SP.
* **Calls store the PC on the same edge that changes it.** In S_SBRT the
  address is SP and the write data is PC, which at that point holds the
  return address. On the falling edge the memory takes that PC while PC
  becomes RALU and SP is decremented.
* **ST and PUSH read the target register in the fourth cycle.** The S2 port of
  the register bank is switched to IR[11:8] (`ms2 = 1`). Its output, not RB,
  drives the memory write data. For ST, RB held Rs2 for the address
  calculation.

## The microinstruction

`r8_pkg::uins_t` carries the 18 control signals of the specification:

* **write enables:** `wpc`, `wsp`, `wir`, `wab` (RA and RB together), `walu`
  (RALU), `wreg` (register bank), `wnz` (flags n and z), `wcv` (flags c and v);
* **memory:** `ce`, and `rw` (1 = read);
* **multiplexer selects:**
  * `mpc`: PC ← 00 memory, 01 RALU, 10 PC + 1
  * `msp`: SP ← 0 RALU, 1 SP − 1
  * `mad`: address ← 00 RALU, 01 PC, 10 SP
  * `mreg`: register bank ← 0 RALU, 1 memory
  * `ms2`: S2 address ← 0 IR[3:0], 1 IR[11:8]
  * `ma`: opA ← 0 RA, 1 IR
  * `mb`: opB ← 00 RB, 01 SP, 10 PC
* **`alu`:** the ALU operation, `r8_pkg::alu_op_e`.

Write enables and memory accesses depend on the state alone. `mpc` and `mad`
also depend on the state alone. `msp`, `mreg`, `ma`, `mb` and `alu` depend on
the instruction alone. `ms2` depends on both: it is 1 for ADDI/SUBI/LDL/LDH
and PUSH, and in S_ST.

The decoder (`r8_decoder`) reduces the 40 mnemonics to 28 classes. The five
register-relative jumps, the five absolute jumps and the five short jumps each
become one class, and a separate condition output goes with them.

## Datapath

`r8_datapath` holds PC, SP, IR, RA, RB, RALU, the flags, the register bank and
the ALU.

* **Register bank (`r8_regbank`).** It has one write port at IR[11:8] and two
  combinational read ports. S1 reads IR[7:4]. S2 reads IR[3:0] or IR[11:8],
  chosen by a multiplexer inside the bank.
* **ALU (`r8_alu`).** It is one 16-bit adder plus logic, byte-merge and shift
  functions.
  * ADDI and SUBI add or subtract the zero-extended constant IR[7:0] to or
    from RB. RB holds Rt because `ms2 = 1`.
  * LDL and LDH merge IR[7:0] into RB.
  * Short jumps add sign-extended IR[9:0] to PC. JSRD adds sign-extended
    IR[11:0].
  * Flags: `n` is result bit 15 and `z` is set when the result is zero. `c`
    is the adder's carry out, and `v` is two's-complement overflow.
* **Memory write data.** The register bank's S2 port drives it for ST and
  PUSH, and PC drives it for the three calls.

## Memory interface

`r8_processor` exposes `address`, `data_in`, `data_out`, `ce` and `rw`. The
memory is outside the processor and is not part of this RTL. It must behave
as follows:

* **Read.** It reads combinationally: `data_in = MEM(address)` must be valid
  before the falling edge of every cycle with `ce = 1` and `rw = 1`.
* **Write.** It writes `data_out` on the falling edge of a cycle with
  `ce = 1` and `rw = 0`.

The R8 specification describes a single bidirectional data bus. A top level
that needs one can drive `data_out` onto it through a tristate buffer enabled
when `ce & ~rw`. The testbench memory `tb/r8_mem_model.sv` has 65536 words,
the full 16-bit address space, and a load port for placing programs while the
processor is in reset.

## Choices this design makes

Each of the following is either not specified or specified inconsistently:

* **Reset.** It is asynchronous and active high, and it clears every register
  including SP. After reset the processor fetches from address 0000h.
* **JSR decrements SP.** The instruction table says so for JSR. The
  specification's `msp` equation, however, lists only JSRR, JSRD and PUSH.
  This design includes JSR.
* **Which instructions set flags.** This follows the instruction table:
  * n and z are set by ADD, SUB, AND, OR, XOR, ADDI, SUBI, the shifts and
    NOT;
  * c and v are set by ADD, SUB, ADDI and SUBI only;
  * LD, LDL and LDH leave the flags alone, although one sentence of the
    specification says loads set flags.
* **Carry on subtraction.** A subtraction X − Y computes X + ¬Y + 1, and c is
  the carry out of that sum. So c = 1 means no borrow.
* **Conditional short jumps** take their condition from IR[11:10]: 0 = n,
  1 = z, 2 = c, 3 = v. The displacement is IR[9:0].
* **Unused encodings decode as NOP.** These are opcode B with IR[3:0] above
  Ah, and opcode C with IR[3:0] above Bh.
* **Memory write data multiplexer.** The specification labels its select
  "instruction is ST". Here it selects the register for ST and PUSH and the
  PC otherwise, because PUSH must also store a register.
* **Flag write enables.** The specification's list of write enables names a
  `wFlag` signal. Its figures use `wreg` for the register bank and
  `wnz`/`wcv` for the flags. This design has `wreg`, `wnz` and `wcv` and no
  `wFlag`.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` at the end.

* **`tb_r8_regbank`** applies random writes and reads on both ports in both
  `ms2` modes. It checks reset clearing and that a write lands on the falling
  edge.
* **`tb_r8_alu`** runs corner and random operands for every operation. Result
  and flags are compared with integer arithmetic.
* **`tb_r8_decoder`** tries all 65536 instruction words. It compares each
  against the mnemonic derived from the instruction table.
* **`tb_r8_control`** runs each of the 40 instructions from reset, with the
  testbench standing in for the datapath. It checks the cycle count, the
  execute state, and the enables and multiplexer selects in every state.
  Conditional jumps are run with their flag at 0 and at 1.
* **`tb_r8_datapath`** stands in for the control unit and applies random
  sequences of microinstructions. It reads the results back through the
  address and data ports.
* **`tb_r8_processor`** tests the whole processor with the 64K-word memory
  model. An instruction-level reference model runs in lockstep with it.
  * After every instruction it compares PC, SP, all registers and the flags.
    It also checks the instruction's cycle count against the table above.
    After every program it compares the whole memory.
  * It runs three kinds of program:
    * The R8 specification's instruction test program. This is 70
      instructions and 277 cycles, CPI 3.96, ending in HALT. The testbench
      also checks the register values the program's comments give, for
      example R2 = BAA3h after the shift-left sequence and R4 = CBAAh after
      the shift-right sequence.
    * The specification's stack example: LDSP with 0300h, JSR to 0100h, RTS.
    * Eight random-filled memories.
  * It fails if any of the 13 FSM states is never visited, or if conditional
    jumps are not seen both taken and not taken.

To simulate with Verilator, for example the whole processor:

```
verilator --binary --timing --assert -Irtl -Itb rtl/r8_pkg.sv tb/tb_r8_processor.sv \
          --top-module tb_r8_processor -o sim
./obj_dir/sim
```

The other testbenches build the same way. The processor testbench reads the
internal state of the design through hierarchical names: `dut.u_ctrl.state`,
`dut.u_dp.pc`, `dut.u_dp.sp`, `dut.u_dp.flags` and
`dut.u_dp.u_regs.regs`. Renaming those signals means updating the testbench.

The processor has no size parameters; all tests run it as it is. The
specification also shows a bubble-sort program in its assembler's window, but
only its first instructions are visible there, so it is not among the tests.

## Files

| file | content |
|---|---|
| `rtl/r8_pkg.sv` | opcodes, instruction classes, ALU operations, FSM states, microinstruction type |
| `rtl/r8_processor.sv` | top level: datapath plus control unit |
| `rtl/r8_datapath.sv` | registers, multiplexers, memory address and write data |
| `rtl/r8_regbank.sv` | 16 × 16 register bank |
| `rtl/r8_alu.sv` | ALU and flag generation |
| `rtl/r8_control.sv` | control FSM and microinstruction generation |
| `rtl/r8_decoder.sv` | instruction decoder |
| `tb/r8_mem_model.sv` | behavioural external memory |
| `tb/tb_*.sv` | testbenches |
