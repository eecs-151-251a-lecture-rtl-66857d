# Three RV32I processors: single-cycle, 3-stage and 5-stage pipelines

This is one RISC-V RV32I integer datapath built three ways, so they can be compared:

- **`rv32i_single_cycle`** finishes every instruction between two clock edges. Its CPI is 1, and its clock period is the whole fetch-to-write-back path.
- **`rv32i_pipe3`** splits that path into three stages: I (fetch), X (execute) and M (memory). Each stage gets one of the three slowest blocks: instruction memory, ALU and data memory. Data hazards are handled in hardware with a bypass and a load-use stall, and branches are predicted not taken.
- **`rv32i_pipe5`** is the textbook five-stage cut: Fetch, Decode, Execute, Memory and Writeback. It has no hazard hardware, so software must keep dependent instructions apart.

`rv32i_top` places the three side by side. They share a clock and reset and nothing else.

All three are assembled from the same leaf blocks: the ALU, branch comparator, immediate generator, register file, memories and controller. The control signals and their encodings are common to all three.

## The datapath and its control signals

The datapath is built around a few multiplexers whose selects come from the controller (`rv_control`):

| signal  | values (encoding in `rv_pkg`)             | role |
|---------|-------------------------------------------|------|
| PCSel   | `PC_PLUS4`, `PC_ALU`                      | next pc: pc+4, or the ALU result for a taken branch or a jump |
| ImmSel  | `IMM_I`, `IMM_S`, `IMM_B`, `IMM_J`, `IMM_U` | immediate format built by `imm_gen` |
| RegWEn  | 0/1                                       | register file write enable |
| BrUn    | 0 signed, 1 unsigned                      | comparison mode of `branch_comp` |
| ASel    | `A_REG` (Reg[rs1]), `A_PC`                | ALU operand A |
| BSel    | `B_REG` (Reg[rs2]), `B_IMM`               | ALU operand B |
| ALUSel  | add, sub, sll, slt, sltu, xor, srl, sra, or, and, pass-B | ALU operation |
| MemRW   | `MEM_READ`, `MEM_WRITE`                   | data memory write enable |
| WBSel   | `WB_MEM`, `WB_ALU`, `WB_PC4`              | write-back value |

Branch and jump targets are not computed by a separate adder. The ALU adds the pc (ASel = pc) to the immediate (BSel = imm). The branch comparator works on the two register values at the same time and produces `BrEq` and `BrLT`. The controller turns these into the branch decision:

| branch | taken when |
|--------|------------|
| beq    | BrEq |
| bne    | !BrEq |
| blt, bltu | BrLT |
| bge, bgeu | !BrLT |

BrUn selects unsigned comparison for bltu and bgeu. The decision is the `branch_taken` function in `rv_pkg`.

- **jal** uses ImmSel J, ASel = pc and WBSel = pc+4.
- **jalr** uses ImmSel I, ASel = Reg[rs1] and WBSel = pc+4.
- **lui** uses the U immediate with the ALU passing B.
- **auipc** adds the U immediate to the pc.
- **Jump targets:** bit 0 of every jump target is cleared, as RV32I requires.

The controller is a single `case` on the opcode, with defaults that make an instruction harmless: no register write, memory read, next pc = pc+4. An opcode outside RV32I's computational, load, store, branch and jump groups has no effect. This includes fence, ecall, ebreak and CSR instructions, which are not implemented. Such an opcode also clears the `legal` flag in the control word.

The controller also marks loads, branches and jumps (`is_load`, `is_branch`, `is_jump`), which the pipelines use.

### Memories

- **`imem`** is a word-addressed array with a combinational read.
  - It has a write port (`load_we`, `load_addr`, `load_data`) so that a program can be placed before reset is released.
  - The processor itself never writes it.
- **`dmem`** is byte-addressed and handles lb, lh, lw, lbu, lhu, sb, sh and sw.
  - Inside it, the store data is shifted onto the right byte lanes with byte enables, and the loaded data is shifted back and sign- or zero-extended.
  - Writes happen on the clock edge.
  - The read is combinational (`SYNC_READ = 0`) or registered on the same clock edge (`SYNC_READ = 1`).
  - Accesses are assumed naturally aligned. Misaligned ones are not detected: `addr[1:0]` still picks the byte lanes.
- **Sizes:** both memories default to 1024 words. The address is taken modulo the memory size.

### Register file

`regfile` has 32 registers of 32 bits:

- Two combinational read ports (AddrA/DataA, AddrB/DataB).
- One write port (AddrD/DataD, RegWEn), written on the rising clock edge.
- x0 always reads 0.
- It does no internal bypassing: each pipeline decides how a just-written value reaches a reader.
- Reset clears every register.

## Single-cycle processor

The pc register addresses `imem`, and everything after it is combinational up to three state elements, all of which take the instruction's effect on the next rising edge:

- the register file write;
- the data memory write;
- the pc.

Timing: one instruction per cycle. The clock period must cover pc clock-to-q, instruction memory, register read (or immediate generation and a mux), the ALU, data memory, the write-back mux and register setup.

## 3-stage pipeline: I, X, M

| stage | what happens |
|-------|--------------|
| I | pc addresses `imem`. The instruction and its pc are captured into the I/X register. |
| X | Decode, register file read, immediate, branch compare and ALU. A taken branch or jump redirects the pc at the end of X. The address and store data go to `dmem`, which is clocked (read or write) on the edge that starts M. |
| M | The registered load data is available. The write-back mux drives the register file, which is written at the end of M. |

Decoding and reading registers in X, rather than in I, is a choice of this design. With it, only one forwarding path is needed.

### Data hazards: the M→X bypass

An instruction in X may need a register that the instruction in M is about to write. `pipe3_hazard` compares the X instruction's rs1 and rs2 with M's rd. The comparison counts only when:

- M writes a register;
- rd is not x0;
- the X instruction really reads that operand.

The operand check depends on the opcode: for example, an I-type instruction does not read rs2.

On a match, the operand is replaced by M's write-back value. The bypassed value feeds the ALU, the branch comparator and the store data.

Example:

```
add x5, x3, x4      I  X  M
add x7, x6, x5         I  X  M      x5 comes from M through the bypass
```

### Load-use stall

A load's data is available only in M, after the data memory has been clocked. When the instruction in I reads the rd of a load that is in X:

- the I stage and the pc hold for one cycle;
- a bubble enters X.

The dependent instruction then reaches X after the load has left M and written the register file. It reads the loaded value from the register file, so load data never travels through the bypass.

An instruction that does not use the loaded register is not delayed.

```
lw  x5, 8(x4)       I  X  M
add x7, x6, x5         I  I  X  M   held in I for one cycle (a bubble goes to X)
```

### Control hazards: predict not taken

Fetch always continues at pc+4. The branch decision and target are known at the end of X.

- **Taken branch or jump:** the instruction fetched behind it, now in I, is killed: it becomes a bubble on its way into X. The cost is one cycle.
- **Branch not taken:** nothing is lost.

jal and jalr are always taken. There are no delay slots.

```
beq x1, x1, L1      I  X  M
add x5, x3, x4         I  -  -      killed
L1: sub ...               I  X  M
```

### Cycle cost

CPI = 1 + (taken branches and jumps) / N + (load-use pairs) / N, where N is the number of instructions.

On the random test programs, which mix arithmetic, loads, stores, branches and jumps, the measured CPI is about 1.12–1.15.

## 5-stage pipeline: F, D, E, M, W

This is the single-cycle datapath with a register between each pair of stages. Each register is a packed struct, `fd`, `de`, `em` and `mw`, which carries everything the later stages need. In particular, the destination register index (`write_reg`) travels with its instruction down to W. The write then happens at the same time as its value, and into the register of the instruction that produced it, not into that of whatever instruction is being decoded at that moment.

- **F** fetches.
- **D** decodes and reads the registers.
- **E** compares and runs the ALU.
- **M** reads or writes data memory (combinational read; the write happens on the edge that ends M).
- **W** writes the register file.

**Register write-through:** the register file read in D sees a W write made in the same cycle. A value is therefore usable by the third instruction after its producer.

**Branches and jumps** resolve in M. A taken branch or jump loads its target into the pc and squashes the three younger instructions in F, D and E. This costs three cycles, and there are no delay slots.

**No hazard detection or bypass.** Two instructions closer than three apart that depend on each other read a stale value. Programs for this pipeline must space such pairs, for example with no-ops. The testbenches do this by placing two no-ops after every instruction.

## Top level

`rv32i_top` instantiates the three processors (`u_sc`, `u_p3`, `u_p5`). Each has its own ports:

- `*_load_we`, `*_load_addr` and `*_load_data` write that processor's instruction memory.
- `*_retire` reports each finished instruction.

All three share `clk` and `rst`.

The parameters are `IMEM_WORDS` (1024), `DMEM_WORDS` (1024) and `RESET_PC` (0).

### The retire record

`retire_t` (in `rv_pkg`) is `{valid, pc, inst, rd_we, rd, rd_data}`. It is driven combinationally from the last stage: the single-cycle datapath itself, M of the 3-stage pipeline, or W of the 5-stage pipeline. It is valid in the cycle whose rising edge commits the instruction. Bubbles, and instructions that were killed or squashed, never appear in it.

### Reset

Reset is synchronous and active-high. It:

- sets the pc to `RESET_PC`;
- empties the pipeline registers;
- clears the register file.

Data memory is not cleared. Keep reset high while loading a program.

## Files

| file | contents |
|------|----------|
| `rtl/rv_pkg.sv` | widths, opcodes, control enums, `ctrl_t`, `retire_t`, `branch_taken` and the operand-use functions |
| `rtl/alu.sv`, `rtl/branch_comp.sv`, `rtl/imm_gen.sv` | combinational datapath blocks |
| `rtl/regfile.sv`, `rtl/imem.sv`, `rtl/dmem.sv` | state |
| `rtl/rv_control.sv` | opcode/funct decoder producing `ctrl_t` |
| `rtl/rv32i_single_cycle.sv`, `rtl/rv32i_pipe3.sv`, `rtl/rv32i_pipe5.sv` | the three processors |
| `rtl/pipe3_hazard.sv` | bypass selects, load-use stall and kill of the 3-stage pipeline |
| `rtl/rv32i_top.sv` | the three side by side |
| `tb/rv_tb_pkg.sv` | instruction encoders, an independent instruction-set reference model and a random program generator |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_pipe3_sequences` |

## Verification

Every testbench is self-checking. Each ends by printing `TB_RESULT checks=N failures=M`, and each has a watchdog.

- **Leaf blocks** are checked against values computed in the testbench, over directed corner cases and random inputs.
- **Processor testbenches** run a directed hazard program and many random programs. The random programs contain arithmetic, loads and stores of every width, all six branch kinds, jal and jalr.
  - Each retired instruction is compared with the reference model in `rv_tb_pkg`: pc, encoding, destination and value.
  - The number of cycles between retirements is checked against each processor's timing rules.
  - The final register file and data memory are compared with the model.
- **`tb_rv32i_top`** runs all three processors at their default sizes. It counts every mechanism and fails if any never happened: bypass, load-use stall, load without stall, kill, branch not taken, jal, jalr, load, store, and the 5-stage squash.
- **`tb_rv32i_pipe5`** also runs one program without spacing. It checks that readers one and two instructions behind a producer get the old value and the third gets the new one: this is the behaviour software must plan around.
- **`tb_rv_control`** compares the whole control word for thousands of random instructions with an expectation built from the RV32I opcode tables.
- **`tb_pipe3_sequences`** runs the four textbook 3-stage cases: dependent adds, load then use, branch not taken and branch taken. For each it checks the exact retire spacing and the final values.

To simulate one testbench with Verilator:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/rv_pkg.sv tb/rv_tb_pkg.sv tb/tb_rv32i_top.sv --top-module tb_rv32i_top
./obj_dir/Vtb_rv32i_top
```

Replace `tb_rv32i_top` with any other `tb_*` module. Leaf-block testbenches other than the processor ones do not need `rv_tb_pkg.sv`, but it does no harm. Verilator is a two-state simulator, and everything that is read is reset or initialised.

## Where this design departs from, or goes beyond, its source

The design follows the classic lecture presentation of the RV32I single-cycle datapath and its pipelining. Choices made here:

- **jalr immediate:** jalr uses the I-type immediate, as its encoding requires. One datapath drawing of the source labels it with the B immediate select; the text (no doubling of the offset) was followed.
- **Bit 0 of jump targets** is cleared (RV32I rule; not discussed in the source).
- **U-type and the full RV32I set:** lui, auipc, the load and store widths, and the funct3/funct7 encodings come from the RV32I specification. The source draws only the R, I, S, B and J formats. Fence, ecall, ebreak and CSRs are not implemented.
- **Sizes and reset:** memory sizes (1024 words), the reset pc (0), synchronous reset and the program load ports are this design's choices.
- **3-stage pipeline:**
  - Decode and register read are placed in X. The source leaves this open.
  - The bypass also feeds the branch comparator and the store data.
  - jal and jalr are handled like taken branches.
- **5-stage pipeline:**
  - The source draws it for a MIPS-like datapath: a separate branch adder, a Zero flag and a RegDst mux. Here the same five stages are built around this RV32I datapath, and the redirect is taken from M as in that drawing.
  - The source says hazards must be dealt with but gives no mechanism for this pipeline. None is built: squashing the three younger instructions on a redirect and the same-cycle register write-through are this design's own choices, and other hazards are left to software.
- **Not modelled:** the critical-path expressions for the clock period of each organisation. There is no timing model here, and the source gives no delay values.
