# Single-cycle MIPS-subset processor

This is a processor that runs every instruction in exactly one clock cycle.
It implements seven MIPS instructions: `add`, `sub`, `ori`, `lw`, `sw`, `beq` and `j`.
Within a cycle the instruction is fetched, decoded, read from the registers, computed, and taken to memory.
The edge that ends the cycle then writes the PC, the register file and the data memory together.
No state is kept between instructions except those three.
The clock period must therefore cover the slowest instruction, `lw`: fetch, register read, ALU, memory read, register write.

The design is split into the parts a textbook single-cycle CPU has:

```
            +--------------------+      Instruction<31:0>
   PC ----->| inst_memory        |-----+----------------------------+
   ^        +--------------------+     | op, func                   | rs rt rd imm16
   |                                   v                            v
+--+--------------+  nPC_sel,Jump +------------+  control points +-----------------------------+
| inst_fetch_unit |<--------------| controller |---------------->| datapath                    |
|  PC, +4 adder,  |               +------------+                 |  RegDst mux, register_file, |
|  branch adder,  |<------------------------ Equal --------------|  extender, ALUSrc mux, alu, |
|  branch & jump  |  imm16, target (from Instruction)            |  data_memory, MemtoReg mux  |
|  muxes          |                                              +-----------------------------+
+-----------------+
```

`single_cycle_cpu` wires these together.
The types they share are in `cpu_pkg`: opcodes, function codes, the ALU and extender encodings, and the `ctrl_t` control word.

## Instruction formats and meaning

| format | bits 31:26 | 25:21 | 20:16 | 15:11 | 10:6 | 5:0 |
|---|---|---|---|---|---|---|
| R (`add`, `sub`) | op = 000000 | rs | rt | rd | shamt (ignored) | funct |
| I (`ori`, `lw`, `sw`, `beq`) | op | rs | rt | immediate 15:0 | | |
| J (`j`) | op | target 25:0 | | | | |

| instruction | opcode / funct | effect |
|---|---|---|
| `add rd,rs,rt` | 000000 / 100000 | R[rd] = R[rs] + R[rt] |
| `sub rd,rs,rt` | 000000 / 100010 | R[rd] = R[rs] − R[rt] |
| `ori rt,rs,imm` | 001101 | R[rt] = R[rs] OR zero-extended imm |
| `lw rt,imm(rs)` | 100011 | R[rt] = Mem[R[rs] + sign-extended imm] |
| `sw rt,imm(rs)` | 101011 | Mem[R[rs] + sign-extended imm] = R[rt] |
| `beq rs,rt,imm` | 000100 | if R[rs] == R[rt]: PC = PC + 4 + sign-extended imm × 4, else PC = PC + 4 |
| `j target` | 000010 | PC = {PC[31:28], target, 00} |

Every other instruction falls outside this subset.
This includes any opcode not listed and any R-type function code other than add and sub.
Such an instruction writes nothing and just advances the PC by 4.
This is a choice of this design: the subset has no exceptions.
Arithmetic wraps: overflow is not detected.

## Control: two-level decode

`controller` is two-level logic.
An AND plane turns the opcode, and for R-type the function code, into one line per instruction.
An OR plane then forms each control point from the instructions that need it:

| control point | meaning | equation |
|---|---|---|
| RegDst | write register: 0 = rt, 1 = rd | add + sub |
| ALUSrc | ALU operand B: 0 = busB, 1 = extended immediate | ori + lw + sw |
| MemtoReg | write-back value: 0 = ALU, 1 = memory | lw |
| RegWrite | write the register file | add + sub + ori + lw |
| MemWrite | write the data memory | sw |
| nPC_sel | this is a branch | beq |
| Jump | this is a jump | j |
| ExtOp | 0 = zero-extend, 1 = sign-extend | lw + sw |
| ALUctr[0] | | sub + beq |
| ALUctr[1] | | ori |

ALUctr is two bits: 00 ADD, 01 SUB, 10 OR.
For `j`, several of these are don't-cares.
The equations as written give nPC_sel = 0 and ALUctr = ADD, so that is what a jump produces.
Jump writes nothing, so the ALU result is ignored.

## Next-PC logic: the part to read carefully

`inst_fetch_unit` holds the PC.
It stores only bits 31:2; bits 1:0 are always 00.
Two adders work in parallel every cycle:

* PC + 4.
* (PC + 4) + SignExt(imm16) × 4. The "PC Ext" stage shifts the sign-extended offset left by two, so the offset counts instructions, not bytes. It is relative to the *following* instruction.

The first mux chooses the branch target only when nPC_sel AND Equal are both 1.
This is the branch-taken condition; otherwise it passes PC + 4.
A second mux after it chooses the jump target when Jump is 1.
The jump target is {PC[31:28], target, 00}: the top four bits of the current PC, the 26-bit field, then 00.
A jump therefore stays inside the current 256 MB region.

Equal comes from the datapath: `alu` compares its two inputs directly.
For `beq`, ALUSrc = 0, so those inputs are R[rs] and R[rt].
Because the decision and the target are both known before the clock edge, a branch or jump costs no extra cycle.
No delay slot is modelled: the instruction after a taken branch is not executed.

## Datapath

* The RegDst mux picks rd or rt as the write register Rw.
* `register_file` has 32 × 32-bit registers. It reads Ra = rs and Rb = rt combinationally onto busA and busB. When RegWrite is 1, it writes busW to Rw on the rising edge. Register 0 always reads zero and ignores writes. A read of a register that is being written in the same cycle returns the old value. The new value is seen by the next instruction.
* `extender` widens imm16 by zero or sign extension (ExtOp).
* The ALUSrc mux feeds the ALU either busB or the extended immediate.
* `alu` does ADD, SUB or OR, and drives Equal.
* `data_memory` is addressed by the ALU result, a byte address. Bits 1:0 are ignored, and addresses beyond the array wrap around. The memory reads combinationally. It writes busB on the rising edge when MemWrite is 1. Only whole words are accessed.
* The MemtoReg mux chooses what goes onto busW: the ALU result or the memory word.

## Top-level interface and timing (`single_cycle_cpu`)

| port | dir | width | use |
|---|---|---|---|
| clk | in | 1 | every state change happens on its rising edge |
| rst | in | 1 | synchronous, active high: PC ← 0, all registers ← 0 (the memories are not cleared) |
| prog_we, prog_addr, prog_data | in | 1, log2(IMEM_WORDS), 32 | load port of the instruction memory, word-indexed; use it while rst is held |
| pc, instruction | out | 32, 32 | the instruction being executed this cycle |
| reg_we, reg_waddr, reg_wdata | out | 1, 5, 32 | the register write the coming edge will perform (reg_we can be 1 with reg_waddr 0, which is discarded) |
| mem_we, mem_addr, mem_wdata | out | 1, 32, 32 | the memory write the coming edge will perform |

| parameter | default | meaning |
|---|---|---|
| IMEM_WORDS | 1024 | instruction memory size in 32-bit words (power of two) |
| DMEM_WORDS | 1024 | data memory size in 32-bit words (power of two) |

To run a program, hold `rst` high and write the program through the load port, one word per clock.
Then drop `rst`.
The first instruction runs from address 0.
Each following clock retires one instruction.
The data memory is not initialised.
Clear it first with a short loop if the program depends on it.

## How far this follows the textbook design, and where it departs

The following come straight from the textbook design:

* the blocks and their connections;
* the control equations;
* the instruction encodings;
* the 32-bit buses and the 32-entry register file;
* the branch and jump target arithmetic;
* the use of one clock edge for every storage element.

The textbook design leaves these points open, and this design fixes them as follows:

* Reset: synchronous, PC = 0, registers cleared.
* Memory sizes: 1024 words each.
* The instruction-memory load port.
* Register 0 is hardwired to zero.
* Undefined instructions act as no-ops.
* A read during a register write returns the old value.
* Jump control outputs: nPC_sel = 0 and ALUctr = ADD.
* The observation outputs on the top.

Where the source material contradicts itself, this design follows the reading that is consistent with the datapath:

* `sw` stores R[rt], not R[rs].
* `ori` uses an OR, not an add.
* The branch offset is added to PC + 4, not to PC.
* ALUctr is 2 bits wide, not 3.

The textbook also shows Input and Output units next to processor and memory, but only as boxes.
Nothing about them is defined, so they are not built.
Timing (the per-step delays and the clock period) is outside what RTL can express.
For reference: with 200 ps for fetch, ALU and memory access and 100 ps for a register read or write, `lw` needs 800 ps.
That is the clock period a single-cycle design of this kind must have.

The two low PC bits are constant zero, so synthesis reports `pc[1:0]` as constant outputs.

## Verification

Every module has a self-checking testbench in `tb/`.
Each ends by printing `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_extender` | all 65,536 immediates in both modes |
| `tb_alu` | corner and random operands for ADD/SUB/OR against 64-bit arithmetic; Equal |
| `tb_register_file` | random writes and dual reads against a model; register 0; write enable; reset |
| `tb_data_memory`, `tb_inst_memory` | fill and read back; word addressing; write enable |
| `tb_controller` | the control truth table for all seven instructions (don't-cares unchecked); every undefined op/funct pair |
| `tb_inst_fetch_unit` | 10,000 random cycles of PC+4 / taken / untaken branch / jump against integer arithmetic |
| `tb_datapath` | the testbench acts as controller; 6,000 random operations against a register and memory model |
| `tb_single_cycle_cpu` | the whole CPU at default sizes, in lock-step with an instruction-set model (below) |

`tb_single_cycle_cpu` compares three things every cycle with its instruction-set model:

* the PC;
* the register write;
* the memory write.

Comparing every cycle also proves that one instruction completes per clock.
It first runs the array-swap sequence below and checks that the two words were exchanged:

```
lw $t0,0($2); lw $t1,4($2); sw $t1,0($2); sw $t0,4($2)
```

Then it runs 16 random programs.
Each one starts with a loop that clears the data memory using `sw`, `add`, `beq` and `j`.
After that comes random code.
At the end, the testbench counts each mechanism and fails if any of them never happened:

* each instruction;
* taken and untaken branches;
* jumps;
* discarded writes to register 0;
* undefined instructions.

Random branches only go forward, so no program gets stuck in a loop.

To run a testbench with Verilator 5, list the package first:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_single_cycle_cpu \
    rtl/cpu_pkg.sv rtl/*.sv tb/tb_single_cycle_cpu.sv
./obj_dir/Vtb_single_cycle_cpu
```

Any other testbench runs the same way: change the top module and the testbench file.
Lint with `verilator --lint-only -Wall rtl/cpu_pkg.sv rtl/*.sv --top-module single_cycle_cpu`.
The remaining warnings are about unused bits: address bits outside the memories, and control fields that pass through the datapath to the fetch unit.

## Files

| file | content |
|---|---|
| `rtl/cpu_pkg.sv` | shared constants, enums, `ctrl_t`, instruction-field functions |
| `rtl/single_cycle_cpu.sv` | top level |
| `rtl/inst_fetch_unit.sv` | PC and next-PC logic |
| `rtl/inst_memory.sv` | instruction memory with load port |
| `rtl/controller.sv` | main control |
| `rtl/datapath.sv` | register file, extender, ALU, data memory and muxes |
| `rtl/register_file.sv`, `rtl/alu.sv`, `rtl/extender.sv`, `rtl/data_memory.sv` | datapath units |
| `tb/tb_*.sv` | one self-checking testbench per module |
