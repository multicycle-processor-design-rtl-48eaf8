# Multicycle processor for a MIPS subset

A single-cycle processor must fit the slowest instruction (a load: instruction
memory, register read, ALU, data memory, register write) into one clock period,
and it needs a separate memory and a separate adder for every use in that
path. This design cuts that long combinational path into short steps. Each step
ends in a register, so the clock period only has to cover one step. Each
instruction takes as many clock cycles as it has steps. Hardware can be reused
across cycles, which gives:

- **one memory** for both instructions and data;
- **one ALU**, which also computes PC + 4 and the branch target;
- **extra registers** between the steps: IR (instruction register),
  MDR (memory data register), A and B (register-file outputs) and ALUOut.

A finite-state machine sequences the steps. It drives the write enables and
multiplexer selects of the datapath each cycle.

## Instruction set

| Instruction | Opcode IR[31:26] | Meaning | Cycles |
|---|---|---|---|
| `add rd, rs, rt` | 0, funct 0x20 | rd = rs + rt, traps on signed overflow | 4 |
| `sub rd, rs, rt` | 0, funct 0x22 | rd = rs − rt, traps on signed overflow | 4 |
| `lw rt, imm(rs)` | 35 | rt = Mem[rs + SE(imm)] | 5 |
| `sw rt, imm(rs)` | 43 | Mem[rs + SE(imm)] = rt | 4 |
| `beq rs, rt, imm` | 4 | if rs == rt: PC = PC + 4 + SE(imm)·4 | 3 |

The fields follow the MIPS format: rs = IR[25:21], rt = IR[20:16],
rd = IR[15:11], imm = IR[15:0], funct = IR[5:0]. Register `$0` always reads 0.
There are no jumps, immediates or logic operations, so:

- a constant has to be loaded from memory;
- `beq $0,$0,off` acts as an unconditional branch;
- `beq $0,$0,-1` is a one-instruction halt loop.

The opcodes 0/4/35/43 are from the source design. The function codes 0x20 and
0x22 and the register-0 rule are MIPS conventions chosen here.

## Datapath

| Register | Written | Holds |
|---|---|---|
| PC | when PC_WE | address of the next instruction |
| IR | when IR_WE (IFetch only) | the current instruction |
| MDR | every cycle | memory output, used by Load 3 |
| A, B | every cycle | Reg[rs], Reg[rt] |
| ALUOut | every cycle | ALU output of the previous cycle |

MDR, A, B and ALUOut load every cycle. This is safe because the FSM always
uses each of them in the cycle right after the one that produced the value.
For example, ALUOut holds the branch target from Decode while Branch
overwrites it with A − B.

| Mux | Chooses | Inputs |
|---|---|---|
| MemIn | memory address | PC, ALUOut |
| Dst | register written | Rt, Rd |
| RegIn | register write data | MDR, ALUOut |
| ALUSrcA | ALU input a | PC, A |
| ALUSrcB | ALU input b | B, 4, SE(imm), SE(imm)<<2 |
| PCSrc | next PC | ALU, ALUOut, exception handler address |

The memory write data is always B. The memory read is combinational: the
word at the address is captured by IR or MDR at the end of the same cycle.

## Control FSM

| State | Register transfers | Non-zero control |
|---|---|---|
| IFetch | IR = Mem[PC]; PC = PC + 4 | PC_WE, IR_WE, MemIn=PC, A=PC, B=4, +, PCSrc=ALU |
| Decode | A = Reg[rs]; B = Reg[rt]; ALUOut = PC + SE(imm)<<2 | A=PC, B=SE<<2, + |
| Branch | if (A − B == 0) PC = ALUOut | PC_WE = Zero, A=A, B=B, −, PCSrc=ALUOut |
| RType1 | ALUOut = A op B | A=A, B=B, op from funct |
| RType2 | Reg[rd] = ALUOut | Reg_WE, Dst=Rd, RegIn=ALUOut |
| Store1 / Load1 | ALUOut = A + SE(imm) | A=A, B=SE, + |
| Store2 | Mem[ALUOut] = B | Mem_WE, MemIn=ALUOut |
| Load2 | MDR = Mem[ALUOut] | MemIn=ALUOut |
| Load3 | Reg[rt] = MDR | Reg_WE, Dst=Rt, RegIn=MDR |
| Exc | EPC = PC; Cause = code; PC = handler | PC_WE, PCSrc=handler |

Decode branches on the opcode. Branch, RType2, Store2 and Load3 return to
IFetch. Decode computes the branch target for every instruction because the
ALU is free in that cycle. Branch then needs only the compare.

The outputs depend only on the state (Moore), with one exception: in Branch,
PC_WE is the ALU's Zero flag from the same cycle.

### Cost per instruction

beq takes 3 cycles; add, sub and sw take 4; lw takes 5. For a mix of 50 % ALU,
20 % load, 10 % store and 20 % branch:

CPI = 0.5·4 + 0.2·5 + 0.1·4 + 0.2·3 = **4.0**

The end-to-end testbench runs a loop with exactly this mix and measures 40
cycles per 10 instructions.

## Exceptions

Three events trap. Each saves the PC into EPC, writes a code into Cause and
jumps to a fixed handler:

| Cause | Code | Detected | Handler |
|---|---|---|---|
| undefined instruction | 0 | in Decode: opcode not 0/4/35/43, or R-type funct not add/sub | `C000_0000` |
| arithmetic overflow | 1 | in RType1: signed overflow of add/sub | `C000_0020` |
| I/O request (`irq`) | 2 | in the last cycle of any instruction | `C000_0040` |

The handler addresses are from the source design. The detection points, the
extra Exc state and the codes are choices made here. The codes give
handler = C000_0000 + 0x20·code.

Things to know before writing handler code:

- **EPC = PC, literally.** The PC register was already advanced in IFetch.
  For an undefined instruction or an overflow, EPC is therefore the address
  of the trapping instruction **plus 4**. For an interrupt it is the address
  of the next instruction to run. Nothing of the trapping instruction is
  written: an overflowing add skips RType2.
- **No way back.** The design has no return-from-exception instruction and no
  instruction to read EPC or Cause. These are visible only on the top's
  `dbg_epc`/`dbg_cause` ports. A handler in this ISA can only continue
  forward, for example into a halt loop.
- **Interrupt handshake.** `irq` is level sensitive and has no mask. The
  device holds it until it sees `irq_ack`, which is high during the Exc cycle.
  It must then drop `irq`, or the next instruction boundary traps again.
  Latency is at most the rest of the current instruction plus the Exc cycle.
- **Address aliasing.** The memory decodes only address bits [11:2] at the
  default size. `C000_0000`, `C000_0020` and `C000_0040` therefore land on
  words 0, 8 and 16. Put handler code there. Programs start at the reset PC
  0x400.

Only these three causes are built. There are no "divide by zero" or "hardware
failure" traps, because this design has no divider and no failure detection.

## Memory and host port

`mc_memory` has 1024 words (4 KiB) by default. It supports whole words only;
writes must be aligned (an assertion checks this). The array is not reset.

`mc_cpu_top` adds a host port that is not part of the processor design. While
`rst_n` is low, `host_en` gives the memory port to `host_addr`/`host_we`/
`host_wdata`, and `host_rdata` shows the addressed word. This is how programs
are loaded and results read. An assertion flags `host_en` while the core runs.

## Files

| File | Contents |
|---|---|
| `rtl/mc_pkg.sv` | opcodes, states, mux encodings, control-word struct `ctrl_t` |
| `rtl/mc_cpu_top.sv` | top: control + datapath + memory + host port |
| `rtl/mc_control.sv` | control FSM |
| `rtl/mc_datapath.sv` | registers, muxes, register file, ALU, exception registers |
| `rtl/mc_memory.sv` | shared memory |
| `rtl/mc_regfile.sv` | 32 × 32 register file |
| `rtl/mc_alu.sv` | add/sub with Zero and overflow |
| `rtl/mc_signext.sv` | sign extension and <<2 |
| `rtl/mc_reg.sv` | enabled register used for PC, IR, MDR, A, B, ALUOut |
| `rtl/mc_exc_regs.sv` | EPC, Cause, handler address |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_mc_cpu_random.sv` | random programs against an instruction-level model |

Parameters: `mc_cpu_top #(WORDS = 1024, RESET_PC = 32'h400)`;
`mc_regfile #(NREGS = 32)`; `mc_exc_regs #(BASE = 32'hC000_0000, STRIDE = 32'h20)`.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. It
also has a watchdog that counts a failure if the run hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/mc_pkg.sv tb/tb_mc_cpu_top.sv \
          --top-module tb_mc_cpu_top -Mdir obj_top
./obj_top/Vtb_mc_cpu_top
```

Replace `cpu_top` with `control`, `datapath`, `alu`, and so on for the unit tests.

`tb_mc_cpu_top` runs at the default parameters. It includes a small assembler
(`lw`, `sw`, `add`, `sub`, `beq` functions) and runs four programs:

1. **Instruction mix.** The 16-iteration loop computes c[i] = a[i] − b[i] and
   Σa. It checks the results, the exact total cycle count and 40 cycles per
   iteration.
2. **Overflow.** 0x7FFFFFFF + 1 traps. The testbench checks EPC, Cause, that
   the destination was not written and that the next instruction did not run.
3. **Undefined instruction.** Two cases: an `and` function code and an `addi`
   opcode.
4. **Interrupt.** `irq` is raised in the middle of a counting loop. The
   testbench checks the handshake, the latency and that EPC points into the
   loop.

It also counts every mechanism: each instruction kind, taken and not-taken
branches, a dropped write to `$0`, each exception cause and the irq
acknowledge. A mechanism that never occurs counts as a failure. The whole run
takes well under a second.

`tb_mc_cpu_random` generates 100 random programs of 120 instructions each.
They mix lw/sw, add/sub, forward beq and a rare undefined opcode. Some data
values are near 2³¹, so some programs overflow. The testbench runs each program
on an instruction-level model of its own and compares:

- the exact cycle count;
- all registers;
- the data memory;
- EPC and Cause after a trap.

## How far to trust it

- The state sequence, the control word of each state, the mux inputs, the
  opcodes and the handler addresses are taken from the source design and are
  tested directly.
- These are choices made here:
  - word width, register count and `$0` rule;
  - function codes;
  - memory size, aliasing and reset PC;
  - reset behaviour;
  - everything about exception timing and the interrupt handshake;
  - the host port.
- The design has been simulated only. It has not been timed or run on an
  FPGA.
