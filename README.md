# MIPS-lite single-cycle CPU, with its building blocks and a three-ones FSM

This is a 32-bit processor for a small subset of the MIPS instruction set. Each
instruction runs from start to finish in one clock cycle. In that cycle it is
fetched, decoded, its registers are read, the ALU does its work, memory is
accessed and a register is written. The clock must therefore be as slow as the
slowest instruction, which is the load. In exchange the control is simple.
There is no pipeline, no hazard, no stall and no multi-cycle state machine.
Every signal between two clock edges is a combinational function of the PC,
the register file and the two memories.

Every part of the CPU is built from a small set of blocks: a one-bit full adder,
an N-bit ripple adder/subtractor made of those cells, a 2-input mux, a register
of D flip-flops with write enable, a register file and an idealized memory. Next to the CPU,
and sharing nothing with it but clock and reset, is a small example FSM. It
detects three consecutive 1s on a serial input.

## Instructions

| instruction        | format | effect                                   | opcode / funct |
|--------------------|--------|------------------------------------------|----------------|
| `addu rd,rs,rt`    | R      | R[rd] = R[rs] + R[rt]                    | 0x00 / 0x21    |
| `add rd,rs,rt`     | R      | as addu (overflow is not trapped)        | 0x00 / 0x20    |
| `subu rd,rs,rt`    | R      | R[rd] = R[rs] - R[rt]                    | 0x00 / 0x23    |
| `and rd,rs,rt`     | R      | R[rd] = R[rs] & R[rt]                    | 0x00 / 0x24    |
| `or rd,rs,rt`      | R      | R[rd] = R[rs] \| R[rt]                   | 0x00 / 0x25    |
| `slt rd,rs,rt`     | R      | R[rd] = (R[rs] < R[rt]) signed           | 0x00 / 0x2a    |
| `ori rt,rs,imm16`  | I      | R[rt] = R[rs] \| ZeroExt(imm16)          | 0x0d           |
| `slti rt,rs,imm16` | I      | R[rt] = (R[rs] < SignExt(imm16)) signed  | 0x0a           |
| `lw rt,imm16(rs)`  | I      | R[rt] = Mem[R[rs] + SignExt(imm16)]      | 0x23           |
| `sw rt,imm16(rs)`  | I      | Mem[R[rs] + SignExt(imm16)] = R[rt]      | 0x2b           |
| `beq rs,rt,imm16`  | I      | if R[rs] == R[rt]: PC = PC+4+SignExt(imm16)*4 | 0x04      |

R-type: `op[31:26] rs[25:21] rt[20:16] rd[15:11] shamt[10:6] funct[5:0]`.
I-type: `op[31:26] rs[25:21] rt[20:16] imm16[15:0]`. The opcode and funct
values are the standard MIPS ones. Any other instruction writes neither a
register nor memory, and the PC moves on by 4. The `illegal` output is 1 during
that cycle.

The core set is addu, subu, ori, lw, sw and beq. Three instructions are added
because the ALU already provides them: `and`, `slt` and `slti`. `add` is
included because the worked examples use it.

Not implemented:

- a multi-cycle or pipelined version (one stage per clock, registers between
  stages), which is only the alternative this single-cycle design is contrasted
  with;
- jumps (`j`, `jal`), because no format or datapath is defined for them here;
- shifts, multiply and divide;
- exceptions of any kind.

## The datapath

```
           +------------------- ifetch ----------------------+
           |  PC --> instruction memory --> instr             |
           |   ^                                              |
           |   +-- mux(PC+4, PC+4+SignExt(imm16)<<2) <-- Branch & Zero
           +--------------------------------------------------+
 instr[25:21] rs --> Ra   regfile   busA ------------------> ALU A
 instr[20:16] rt --> Rb             busB --+--> mux(ALUSrc) -> ALU B
 rt / rd --mux(RegDst)--> Rw               |          ^
                       busW <--+           |   extender(imm16, ExtOp)
                               |           +--> data memory Data In
                 mux(MemtoReg) <-- ALU result --> data memory Address
                               <-- data memory Data Out
```

The control is a purely combinational decoder (`control.sv`). It drives eight
control points from `op` and `funct`:

| instr       | RegDst | RegWr | ExtOp | ALUSrc | ALUctr | MemWr | MemtoReg | Branch |
|-------------|--------|-------|-------|--------|--------|-------|----------|--------|
| R-type      | rd     | 1     | -     | busB   | funct  | 0     | ALU      | 0      |
| ori         | rt     | 1     | zero  | imm    | OR     | 0     | ALU      | 0      |
| slti        | rt     | 1     | sign  | imm    | SLT    | 0     | ALU      | 0      |
| lw          | rt     | 1     | sign  | imm    | ADD    | 0     | memory   | 0      |
| sw          | -      | 0     | sign  | imm    | ADD    | 1     | -        | 0      |
| beq         | -      | 0     | sign  | busB   | SUB    | 0     | -        | 1      |

`beq` has no comparator of its own. The ALU subtracts the two registers, and
its `zero` flag, which is 1 when the result is all zeros, is the equality
test. The fetch unit takes the branch when `Branch & zero`. The offset counts
words: it is sign-extended and shifted left by two bits before it is added to
PC+4.

### Timing

- The state elements are the PC, the register file and the data memory. All of
  them change only at the rising clock edge.
- Memory and register-file reads are combinational. Each takes one access time
  after its address is stable, with no clock involved.
- The register file and the data memory are written at the edge that ends the
  instruction. A register read in the same cycle as its
  write therefore returns the old value, as a single-cycle machine requires.
- The critical path is the load instruction. It runs through:
  - the PC's clock-to-Q delay;
  - the instruction memory;
  - the register file;
  - a 32-bit add in the ALU;
  - the data memory;
  - the setup time of the register file.

  The adders are ripple-carry, so in a real implementation the 32-bit add is a
  large share of that path. The RTL has no delays, so this is not modelled.

## The arithmetic: full adder, adder/subtractor, ALU

`full_adder` computes `s = a ^ b ^ cin` and `cout = majority(a, b, cin)`.

`addsub` chains N of these cells, carry to carry. Each `b` bit passes through an
XOR with `sub`, which acts as a conditional inverter. `sub` is also the carry
into bit 0, so `sub = 1` gives `a + ~b + 1 = a - b`. Signed overflow is
`c[N] ^ c[N-1]`, the carry out of the top bit XOR the carry into it. The
reasoning behind it:

- A carry into the top bit with no carry out means two positive operands gave
  a negative result.
- A carry out with no carry into the top bit means two negative operands gave
  a non-negative result.

`alu` uses one `addsub` for ADD, SUB and SLT. It also has bitwise OR and AND.

- **SLT** is a signed comparison. It takes the sign of the true difference,
  `diff[31] ^ overflow`, so it stays correct when `a - b` overflows. For
  example, `0x80000000 < 1` gives 1.
- **overflow** is brought out to the CPU's `alu_ovf` port for observation. No
  instruction acts on it.

The PC adders (+4 and the branch target) are also `addsub` instances.

## The three-ones FSM

`three_ones_fsm` is a 2-bit state register plus a combinational block. The
block maps (present state, input) to (next state, output). It has three
states:

- **S0**: no 1 seen yet;
- **S1**: one 1 seen;
- **S2**: two 1s in a row seen.

A 1 moves the machine S0 → S1 → S2. A 0 returns it to S0. In S2 a 1 raises
`detect` for that cycle, and the machine returns to S0 and counts afresh. A
run of six 1s therefore gives two detections, on the third and the sixth.
`detect` is a Mealy output: it depends on `din` in the same cycle.

## Where the design makes its own choices

The following are not fixed by the description the design was built from:

- **Opcode/funct numbers and the ALUctr encoding.** The opcode and funct
  numbers are standard MIPS. ALUctr is 3 bits: ADD=0, SUB=1, OR=2, AND=3,
  SLT=4.
- **Control-signal names.** RegDst, ExtOp, ALUSrc, MemWr, MemtoReg and Branch
  are this design's names; RegWr and ALUctr are the names the original datapath uses.
- **Memory sizes.** Each memory is `2**IMEM_AW` or `2**DMEM_AW` words, 1024 by
  default. Addresses are byte addresses. The low two bits are ignored, and so
  are the bits above the array, so each memory repeats through the address
  space. Unaligned accesses are not trapped.
- **Register 0.** It always reads zero and ignores writes.
- **Reset.** A synchronous, active-high `rst` sets the PC to 0, clears all 32
  registers and puts the FSM in S0. Memory contents survive reset and start at
  zero.
- **Program loading.** `load_we/load_addr/load_data` write the instruction
  memory. While `load_we` is 1 the memory is addressed by `load_addr` instead of
  the PC. Load programs while `rst` is held.
- **Observation ports.** These show what the current instruction will commit
  at the next edge:
  - `wb_en/wb_reg/wb_data`: the register write;
  - `st_en/st_addr/st_data`: the store;
  - `br_taken`: whether the branch is taken;
  - `illegal`: an unimplemented instruction.
- **One extender.** A single extender with an ExtOp select serves both zero
  extension and sign extension.
- **The FSM's state diagram.** The exact diagram is a reconstruction: Mealy
  output, and a restart after each detection.

## Files

| file | content |
|------|---------|
| `rtl/mips_pkg.sv` | opcodes, funct codes, ALU op enum, instruction and control structs |
| `rtl/full_adder.sv` | one-bit full adder |
| `rtl/addsub.sv` | N-bit ripple adder/subtractor with overflow |
| `rtl/alu.sv` | ADD/SUB/OR/AND/SLT ALU with zero and overflow |
| `rtl/mux2.sv` | 2-input mux |
| `rtl/d_flip_flop.sv` | one-bit D flip-flop |
| `rtl/en_register.sv` | register with write enable, N flip-flops (the PC) |
| `rtl/regfile.sv` | 32 x 32 register file, 2 read ports, 1 write port |
| `rtl/ideal_memory.sv` | combinational-read, clocked-write word memory |
| `rtl/extender.sv` | zero/sign extension of imm16 |
| `rtl/ifetch.sv` | PC, next address logic, instruction memory |
| `rtl/control.sv` | main decoder |
| `rtl/mips_lite_cpu.sv` | the single-cycle CPU |
| `rtl/three_ones_fsm.sv` | three-consecutive-ones detector |
| `rtl/single_cycle_top.sv` | CPU and FSM side by side (top) |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_walkthroughs.sv` | the four single-instruction examples (add, sw, lw, slti) on the top |
| `tb/mips_tb_util.svh` | instruction encoders and an instruction-level reference interpreter |

## Verification

Every testbench checks its unit against values it computes on its own, and
ends by printing `TB_RESULT checks=N failures=M`. Each has a watchdog. The
tests for each level:

- **Arithmetic.** The adder cells are tested exhaustively. The adder/subtractor
  and the ALU are tested on overflow corner cases and thousands of random
  operands.
- **Storage.** Registers, register file and memory are tested cycle by cycle
  against array models.
- **Fetch unit.** It is run with random branch decisions, including backward
  branches.
- **CPU and top.** Three kinds of program are run:
  - a hand-checked program made of the worked examples;
  - a program that overflows on purpose;
  - random programs that fill the instruction memory, with the PC wrapping
    around.

  Every cycle, the write-back, store, branch, PC and `illegal` outputs are
  compared with the reference interpreter in `tb/mips_tb_util.svh`. The checks
  also require one instruction per cycle: the PC moves at every edge.
- **Top-level coverage.** The top testbench counts each mechanism and fails if
  any count is zero: every instruction, ZeroExt/SignExt, taken, not-taken and
  backward branches, writes to r0, overflow, unimplemented instructions, PC
  wrap-around and FSM detections.

`tb_single_cycle_top` runs the top at its default sizes. It finishes in a few
seconds.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/mips_pkg.sv tb/tb_single_cycle_top.sv --top-module tb_single_cycle_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any other. All RTL is synthesizable. The
memories are plain arrays with an `initial` clear, which an FPGA flow maps to
RAM with initial contents. The instruction memory has one address port, shared
between fetch and loading.
