# A single-cycle processor for a seven-instruction MIPS subset

This is a 32-bit processor that executes every instruction in exactly one
clock cycle. It runs seven MIPS instructions: `add`, `sub`, `ori`, `lw`, `sw`,
`beq` and `j`. In each cycle the processor does the whole job for one
instruction. It fetches the word at the PC, decodes it, reads two registers,
computes in the ALU, optionally reads or writes data memory, writes the result
back and chooses the next PC. All of that is one combinational path between
two clock edges.

The main design question in such a processor is **control**: which settings of
the datapath's multiplexers, write enables and ALU operation make each
instruction happen? The answer here is a fixed table with one column per
instruction. It is built as a two-level logic block: one product term per
instruction, then one OR per control signal.

## The datapath

```
            +--------------------+  Instruction<31:0>
  nPC_sel ->| instruction fetch  |---+--> op<31:26>, funct<5:0> --> main control
  Jump    ->|  (PC, adders,      |   +--> rs<25:21> -> Ra
  Zero    ->|   inst memory)     |   +--> rt<20:16> -> Rb, and RegDst mux input 0
            +--------------------+   +--> rd<15:11> -> RegDst mux input 1
                                     +--> imm16<15:0> -> extender (ExtOp)

  RegDst mux -> Rw     register file: busA = R[Ra], busB = R[Rb]; R[Rw] <= busW if RegWr
  ALUSrc mux:  0 busB, 1 extended immediate   -> ALU B input;  busA -> ALU A input
  ALU (ALUctr: add/sub/or) -> result -> data memory Adr, MemtoReg mux input 0;  Zero -> fetch unit
  data memory: Data In = busB, written if MemWr; read data -> MemtoReg mux input 1
  MemtoReg mux -> busW
```

Instruction formats (bit 31 on the left):

| format | 31..26 | 25..21 | 20..16 | 15..11 | 10..6 | 5..0 | used by |
|---|---|---|---|---|---|---|---|
| R | op | rs | rt | rd | shamt | funct | add, sub |
| I | op | rs | rt | immediate (16) ||| ori, lw, sw, beq |
| J | op | target address (26) ||||| j |

What each instruction does:

| instr | register transfer | next PC |
|---|---|---|
| add | R[rd] <- R[rs] + R[rt] | PC + 4 |
| sub | R[rd] <- R[rs] - R[rt] | PC + 4 |
| ori | R[rt] <- R[rs] OR ZeroExt(imm16) | PC + 4 |
| lw  | R[rt] <- MEM[R[rs] + SignExt(imm16)] | PC + 4 |
| sw  | MEM[R[rs] + SignExt(imm16)] <- R[rt] | PC + 4 |
| beq | (none) | PC + 4 + SignExt(imm16)*4 if R[rs] == R[rt], else PC + 4 |
| j   | (none) | {PC[31:28], target, 00} |

## Control

### The control table

x marks a don't-care in the specification. This RTL drives every x as 0.

| | add | sub | ori | lw | sw | beq | j |
|---|---|---|---|---|---|---|---|
| op | 000000 | 000000 | 001101 | 100011 | 101011 | 000100 | 000010 |
| funct | 100000 | 100010 | - | - | - | - | - |
| RegDst (1 = rd) | 1 | 1 | 0 | 0 | x | x | x |
| ALUSrc (1 = immediate) | 0 | 0 | 1 | 1 | 1 | 0 | x |
| MemtoReg (1 = memory) | 0 | 0 | 0 | 1 | x | x | x |
| RegWrite | 1 | 1 | 1 | 1 | 0 | 0 | 0 |
| MemWrite | 0 | 0 | 0 | 0 | 1 | 0 | 0 |
| nPC_sel (1 = branch) | 0 | 0 | 0 | 0 | 0 | 1 | 0 |
| Jump | 0 | 0 | 0 | 0 | 0 | 0 | 1 |
| ExtOp (1 = sign) | x | x | 0 | 1 | 1 | x | x |
| ALUctr | add 00 | sub 01 | or 10 | add 00 | add 00 | sub 01 | x |

### Two-level implementation

`main_control` is two blocks in series.

* **`and_logic`** compares op, and funct for R-type, against each encoding.
  It raises at most one of seven lines: add, sub, ori, lw, sw, beq, jump.
  An opcode or funct that is not in the table raises no line.
* **`or_logic`** forms each control signal as an OR of those lines:

  ```
  RegDst   = add + sub          ALUSrc    = ori + lw + sw
  MemtoReg = lw                 RegWrite  = add + sub + ori + lw
  MemWrite = sw                 nPC_sel   = beq
  Jump     = jump               ExtOp     = lw + sw
  ALUctr[0] = sub + beq         ALUctr[1] = ori
  ```

Because the x entries become 0, an unknown instruction sets every control
signal to 0. It then behaves as a no-op: no register or memory write, and the
PC advances by 4. In simulation, an immediate assertion in `main_control`
checks that the AND plane never raises two lines.

### nPC_sel and Zero

nPC_sel means "this is a branch", not "take the branch". The fetch unit
combines it with the ALU's Zero flag:

| nPC_sel | Zero | next-PC mux |
|---|---|---|
| 0 | any | 0 (PC + 4) |
| 1 | 0 | 0 (PC + 4) |
| 1 | 1 | 1 (branch target) |

So the mux select is nPC_sel AND Zero. For `beq` the ALU subtracts, so Zero is
1 exactly when R[rs] == R[rt]. Zero is computed for every instruction and can
be 1 during other instructions, including `j`. This does no harm because
nPC_sel is 0 for them. Jump is checked before the branch choice, so a jump
takes its target whatever nPC_sel and Zero are.

## Instruction fetch unit (`ifetch`)

The PC register holds only bits 31..2; bits 1..0 are always 00. Next-PC logic:

* a first adder computes PC + 4;
* a second adder adds PC + 4 and SignExt(imm16) shifted left by 2, which gives
  the branch target;
* a mux picks PC + 4 or the branch target;
* when Jump is 1, the next PC is {PC[31:28], Instruction[25:0], 00}.
  PC[31:28] here are the top bits of the jump instruction's own address.

The instruction memory (`inst_mem`) sits inside the fetch unit and is read
combinationally at the PC.

## Timing, reset and loading a program

* Everything that stores state updates on the **rising** clock edge: the PC,
  the register file and the data memory. Reads from the register file and
  from both memories are combinational. A value written in one cycle is seen
  by the next instruction.
* The minimum clock period is the full fetch, decode, read, ALU, memory and
  write-back path. The design has no pipelining, stalls or forwarding: CPI is
  1 by construction.
* `rst` is synchronous and active high. It loads the PC with `RESET_PC`
  (default 0) and clears all 32 registers. The memories are not cleared.
* To load a program, hold `rst` high and write words through
  `imem_we` / `imem_waddr` (a byte address) / `imem_wdata`, one per clock.
  Then release `rst`.

## Top-level interface (`single_cycle_cpu`)

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock |
| rst | in | 1 | synchronous reset |
| imem_we, imem_waddr, imem_wdata | in | 1, 32, 32 | program-load port |
| pc, instr | out | 32, 32 | PC and instruction of the current cycle |
| reg_we, reg_waddr, reg_wdata | out | 1, 5, 32 | RegWrite, Rw and busW of the current cycle |
| mem_we, mem_addr, mem_wdata | out | 1, 32, 32 | MemWrite, Adr and Data In of the current cycle |

The outputs are internal datapath nets brought out for observation. They add
no logic.

Parameters: `DATA_W` (32, fixed by the instruction set; other values are
rejected at elaboration), `IMEM_WORDS` (1024), `DMEM_WORDS` (1024),
`RESET_PC` (0).

## Modules

| file | role |
|---|---|
| `rtl/cpu_pkg.sv` | opcode/funct constants, `alu_ctr_e`, `instr_onehot_t`, `ctrl_t` |
| `rtl/single_cycle_cpu.sv` | top: wires the blocks below |
| `rtl/main_control.sv` | controller = `and_logic` + `or_logic` |
| `rtl/and_logic.sv`, `rtl/or_logic.sv` | the two planes of the controller |
| `rtl/ifetch.sv` | PC, next-PC adders and mux, jump path |
| `rtl/inst_mem.sv` | instruction memory with load port |
| `rtl/regfile.sv` | 32 x 32-bit register file, 2 read + 1 write port |
| `rtl/extender.sv` | zero/sign extension of imm16 |
| `rtl/alu.sv` | add / sub / or with Zero flag |
| `rtl/mux2.sv` | 2-input mux used for RegDst, ALUSrc and MemtoReg |
| `rtl/data_mem.sv` | data memory |

## Choices made in this RTL

The specification leaves the following points open. They are this design's
choices:

* **Register 0** reads as 0 and ignores writes, as in MIPS.
* **Memory sizes**: 1024 words each. Addresses are byte addresses. Bits 1..0
  and the bits above the memory size are ignored, so an unaligned access
  rounds down and a large address wraps. There are no alignment or bus-error
  exceptions.
* **Overflow**: add and sub wrap modulo 2^32 and never trap.
* **ALUctr = 11** is unused and gives a result of 0.
* **ALUctr width**: one heading in the specification names a 3-bit ALUctr.
  The controller equations define a 2-bit code, and this design uses the
  2-bit code.
* **Conflicting statements in the specification** were settled this way:
  * `sw` stores R[rt], not R[rs]; this matches the datapath wiring.
  * `ori` ORs its operands and does not add them.
  * The branch target is PC + 4 + offset*4, not PC + offset*4.
* **Reset**, the **program-load port** and the **observation outputs** are
  this design's additions.
* The drawings disagree on the clock edge. This design uses the rising edge.

The inputs `adr`/`addr`/`waddr` of the memories lint with unused-bit warnings.
Those bits are ignored on purpose, as described above.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog:

* `tb_and_logic`: all 4096 op/funct combinations.
* `tb_or_logic`, `tb_main_control`: the control table for every instruction,
  plus random unsupported encodings.
* `tb_alu`, `tb_extender`, `tb_mux2`: edge and random operands.
* `tb_regfile`, `tb_data_mem`, `tb_inst_mem`: random traffic against
  reference arrays, including the register-0 and addressing rules.
* `tb_ifetch`: random nPC_sel/Zero/Jump over random instruction words. It
  checks each next-PC case and counts that each one occurred.
* `tb_single_cycle_cpu`: the end-to-end test, run with the default parameters.
  An instruction-set reference model written in the testbench runs in lockstep
  with the processor. Every cycle it compares the PC, the instruction, the
  register write and the memory write. First, a directed program stores 1..10
  in a loop, sums the values back (55), and round-trips the sum through a
  negative offset. Second, six random programs fill the instruction memory and
  run 1500 cycles each. The test counts executed add, sub, ori, lw, sw, taken
  and untaken beq, j, negative immediates sign- and zero-extended, writes to
  register 0 and unsupported opcodes. It fails if any of these never occurred.
  Because the model retires one instruction per checked cycle, the test also
  confirms the one-cycle-per-instruction rate.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl --top-module tb_single_cycle_cpu \
    rtl/cpu_pkg.sv tb/tb_single_cycle_cpu.sv
./obj_dir/Vtb_single_cycle_cpu
```

Use the same command with any other `tb_*` module. Each file in `rtl/`
contains one module or package, named like the file, so `-y rtl` finds them.

## Limits

* Only the seven instructions above are implemented. There are no shifts,
  `slt`, `bne`, `jal`/`jr`, byte or halfword loads, exceptions or interrupts.
* No I/O devices are modelled. The processor sees only its two memories.
