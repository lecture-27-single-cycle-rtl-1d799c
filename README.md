# A single-cycle MIPS-subset processor

This is a processor that finishes every instruction in exactly one clock
cycle. The PC addresses an instruction memory. The fetched word is decoded
into a handful of control signals, and those signals steer one shared
datapath. The datapath has a register file, an immediate extender, an ALU,
a data memory and three multiplexers. The register file, the data memory and
the PC are all written at the same clock edge, which ends the instruction.
No pipeline registers, no stalls and no forwarding are needed: the cost is a
clock period as long as the slowest instruction (lw, which goes through
instruction memory, register file, ALU and data memory before writing back).

The design is split the classic way into a **controller** (`main_control`),
which is pure combinational decode, and a **datapath** (`datapath`) whose
control points are all inputs. The top module `single_cycle_cpu` connects
the two.

## Instruction set

Seven instructions of the MIPS-I instruction set, in their standard encodings:

| instr | format | op      | funct   | effect                                                   |
|-------|--------|---------|---------|----------------------------------------------------------|
| add   | R      | 000000  | 100000  | R[rd] = R[rs] + R[rt]                                    |
| sub   | R      | 000000  | 100010  | R[rd] = R[rs] - R[rt]                                    |
| ori   | I      | 001101  | –       | R[rt] = R[rs] OR zero_ext(imm16)                         |
| lw    | I      | 100011  | –       | R[rt] = MEM[R[rs] + sign_ext(imm16)]                     |
| sw    | I      | 101011  | –       | MEM[R[rs] + sign_ext(imm16)] = R[rt]                     |
| beq   | I      | 000100  | –       | if R[rs] == R[rt]: PC = PC + 4 + sign_ext(imm16)·4       |
| j     | J      | 000010  | –       | PC = {PC[31:28], target26, 00}                           |

Fields: op = [31:26], rs = [25:21], rt = [20:16], rd = [15:11],
shamt = [10:6], funct = [5:0], imm16 = [15:0], target26 = [25:0].
Every instruction not listed, including R-type with another funct, turns off
every control signal. It writes nothing and simply advances the PC by 4.
add and sub wrap around; there is no overflow trap.

## Control: from opcode to control points

The controller recognises each of the seven instructions with a full
compare of op (and funct for R-type). It then builds every control signal as
an OR of the instructions that need it:

| signal    | meaning of 0 / 1                              | equation          |
|-----------|-----------------------------------------------|-------------------|
| RegDst    | write rt / write rd                           | add + sub         |
| ALUSrc    | ALU operand B is busB / the extended imm16    | ori + lw + sw     |
| MemtoReg  | write back the ALU output / the memory output | lw                |
| RegWr     | write the register file                       | add + sub + ori + lw |
| MemWr     | write the data memory                         | sw                |
| nPC_sel   | "+4" / "br" (branch if Zero)                  | beq               |
| Jump      | take the jump target                          | j                 |
| ExtOp     | zero-extend / sign-extend imm16               | lw + sw           |
| ALUctr[0] |                                               | sub + beq         |
| ALUctr[1] |                                               | ori               |

ALUctr is 2 bits wide: 00 ADD, 01 SUB, 10 OR (11 is unused and yields 0).
The usual hand-made control table has don't-care entries (for example
RegDst for sw, or ExtOp for add). Because of the OR form, every don't-care
comes out as 0. beq uses SUB so that the ALU's Zero output tells whether the
two registers are equal. The control signals travel as one packed struct,
`cpu_pkg::ctrl_t`. Two immediate assertions in `main_control` check that at
most one instruction is recognised and that RegWr and MemWr are never both
set.

## Next-PC logic: the part that needs care

The fetch unit (`instr_fetch_unit`) holds the PC and the instruction memory,
and it chooses the next PC with two adders and two 2-to-1 muxes:

```
          PC+4 ──────────────────┐
                                 ├─ mux A (sel = nPC_sel AND Zero) ─┐
 PC+4 + sign_ext(imm16)·4 ───────┘                                  ├─ mux B (sel = Jump) ─> PC
                              {PC[31:28], target26, 00} ────────────┘
```

* The branch decision is `nPC_sel AND Zero`. nPC_sel says "this is a
  branch" and Zero says "the registers were equal". They are combined in the
  fetch unit, not in the controller, so the controller stays a function of
  the opcode alone.
* Jump is a separate, later mux. It overrides whatever mux A chose, so for
  j the values of nPC_sel and Zero do not matter (the controller sends
  nPC_sel = 0).
* The branch offset is counted in words from the *following* instruction
  (PC + 4). The jump keeps the top four bits of the PC of the jump itself.
  This differs from MIPS-I, which takes them from PC + 4. The two agree
  unless the jump sits in the last word of a 256 MB region.
* The PC's two low bits are always loaded with 00. They read as constant
  zero, and synthesis removes them.

## Timing and interfaces

One clock domain and a synchronous, active-high `rst`. Everything between
clock edges is combinational:
PC → instruction memory → controller and register-file reads → extender/mux
→ ALU → data memory → MemtoReg mux → busW and next PC. At the rising edge
the PC, the destination register (if RegWr) and the addressed memory word
(if MemWr) are written together. A register or memory word read in the same
cycle it is written returns its old value. Register 0 reads as zero and
ignores writes.

Ports of `single_cycle_cpu`:

| port | dir | width | use |
|------|-----|-------|-----|
| `clk`, `rst` | in | 1 | clock; reset sets the PC and all registers to 0 (memories are not cleared) |
| `imem_we`, `imem_waddr`, `imem_wdata` | in | 1, 32, 32 | program loading: one word per clock at a byte address, normally while `rst` is held |
| `pc`, `instr` | out | 32, 32 | current PC and instruction |
| `reg_we`, `reg_waddr`, `reg_wdata` | out | 1, 5, 32 | the register write that happens at the end of this cycle (RegWr, Rw, busW) |
| `mem_we`, `mem_addr`, `mem_wdata` | out | 1, 32, 32 | the data-memory access of this cycle (MemWr, ALU output used as the address, busB as the write data) |

Parameters: `IMEM_WORDS` and `DMEM_WORDS`, both 256 by default. Both
memories are word-addressed with byte addresses. They use only the address
bits just above the 2-bit byte offset, so addresses wrap at the memory size
and the two low bits are ignored (no alignment check, no byte or halfword
access). Reads from both memories are combinational, which an FPGA block
RAM cannot do. To map the design onto one, the memories would need a clock
edge of their own, which would break the single-cycle timing.

## Departures and choices

These points are choices made in this RTL rather than part of the classic
single-cycle design it follows:

* The reset, the program-load port and the memory depths (256 words each).
* Register 0 is hard-wired to zero, as the MIPS instruction set requires.
* Undefined opcodes and funct codes act as no-ops.
* ALUctr is 2 bits wide (ADD/SUB/OR only). Some versions of this control
  table show a 3-bit ALUctr; nothing here needs the third bit.
* The jump takes PC[31:28] of the jump instruction itself (see above).
* The observation outputs of the top exist so that a testbench can follow
  the architectural writes. They are not part of the processor proper.

The computer-level picture also has Input and Output devices next to the
processor and memory. They are not specified, and nothing here models them.

## Files

`rtl/`:

| file | contents |
|------|----------|
| `cpu_pkg.sv` | opcodes, funct codes, `alu_ctr_t`, the control-word struct `ctrl_t` |
| `single_cycle_cpu.sv` | top: controller + datapath |
| `main_control.sv` | opcode/funct decoder |
| `datapath.sv` | register file, extender, ALU, data memory, RegDst/ALUSrc/MemtoReg muxes, fetch unit |
| `instr_fetch_unit.sv` | PC, instruction memory, next-PC adders and muxes |
| `inst_memory.sv`, `data_memory.sv` | the two memories |
| `regfile.sv` | 32 × 32-bit register file, 2 read ports, 1 write port |
| `alu.sv` | ADD/SUB/OR and Zero |
| `extender.sv` | zero/sign extension of imm16 |
| `mux2.sv` | 2-to-1 mux of any width |

`tb/`: one self-checking testbench per module (`tb_<module>.sv`) and
`tb_isa_pkg.sv`. That package holds an instruction-level reference model,
a small assembler (`enc_r`, `enc_i`, `enc_j`) and a random-program
generator.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself via a
watchdog if it hangs.

* Leaf blocks are checked against values computed in the testbench:
  * the controller over all 4096 op/funct combinations;
  * the ALU and the extender on corner and random operands;
  * the memories and the register file against shadow arrays, including
    the old-value-before-the-edge behaviour and register 0;
  * the fetch unit under random nPC_sel/Zero/Jump, counting sequential
    steps, taken and untaken branches and jumps.
* `tb_datapath` drives the datapath with control words derived from the
  instruction semantics, not from the RTL controller. It runs random
  programs and compares every cycle with the reference model.
* `tb_single_cycle_cpu` runs the whole processor at its default sizes. It
  compares every cycle with the reference model: PC, instruction, register
  write and memory write. The first program is a complete computation. It
  clears data memory with a loop, fills a 10-word array with 1, 2, 4, …,
  512, sums it with an lw/add/sub/beq/j loop, stores the sum (1023) and
  halts on a jump to itself. Eight random programs follow. The test fails
  if any of these never occurs: an instruction type, a taken or untaken
  branch, a backward branch, a negative load/store offset, or a write aimed
  at register 0. A typical run executes about 22,000 instructions.

Running a testbench with plain Verilator, from the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_single_cycle_cpu rtl/cpu_pkg.sv tb/tb_isa_pkg.sv tb/tb_single_cycle_cpu.sv
./obj_dir/Vtb_single_cycle_cpu
```

Leaf testbenches that do not use `tb_isa_pkg` need only `rtl/cpu_pkg.sv`
and their own file on the command line. To write a program, build words
with the `enc_*` helpers of `tb_isa_pkg` and load them through the
`imem_*` port while `rst` is high, as `tb_single_cycle_cpu` does.
