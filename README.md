# Five-stage pipelined MIPS processor with forwarding, stalls and early branches

A single-cycle processor has to fit a whole instruction into one clock period:
fetch, register read, ALU, data-memory access and register write. The
slowest instruction (`lw`) sets the clock. This design cuts the same datapath
into five stages separated by registers. That lets the clock run at the speed
of the slowest *stage*, and up to five instructions are in flight at once.
Once the pipeline is full, one instruction completes every cycle. For example,
with a 300 ns memory stage against a 1020 ns single-cycle path, throughput
rises about 3.4x.

Overlapping instructions causes hazards: an instruction can need a result that
is still inside the pipeline, or a branch can change the PC after later
instructions have already been fetched. Most of the logic beyond the plain
datapath deals with these cases, and most of this document explains it.

Supported instructions: `add`, `sub`, `and`, `or`, `slt`, `addi`, `lw`, `sw`,
`beq` (32-bit MIPS encodings).

## The five stages

| Stage | Work done | Pipeline register written at the end |
|---|---|---|
| IF  | Instruction memory read at PC. PC+4 is formed. | IF/ID: instruction, PC+4 |
| ID  | Decode. Register file read. Immediate sign-extended. Branch target PC+4+(imm<<2) formed. **beq operands compared and the branch decided.** | ID/EX: control word, two operands, rs/rt/rd, immediate |
| EX  | ALU. The destination is picked: rd for R-type, rt otherwise. | EX/MEM: control, ALU result, store data, destination |
| MEM | Data memory read (`lw`) or write (`sw`). | MEM/WB: control, load data, ALU result, destination |
| WB  | Load data or ALU result written to the register file. | — |

Control signals are decoded once, in ID. They travel down the pipeline with
their instruction in the same registers as the data. Their names follow the
usual textbook datapath: `RegWrite`, `MemToReg`, `MemWrite`, `ALUControl`,
`ALUSrc`, `RegDst` and `Branch`.

**Register file timing.** The register file is written by WB and read by ID
in the same cycle. A write is passed straight through to a read of the same
register in that cycle. So an instruction three positions behind a producer
already reads the new value, and no forwarding path is needed for that
distance. The textbook gets this effect by writing in the first half of the
cycle and reading in the second. Here it is a single rising-edge write plus a
combinational bypass.

## Hazard handling

All decisions are made by the combinational `hazard_unit`. It compares
register numbers across the stages.

### Forwarding into EX

Each ALU operand has a 3-input multiplexer, `forward_ae` and `forward_be`:

| Select | Source | Used when |
|---|---|---|
| `00` | value read in ID | no match |
| `10` | `ALUOutM`: ALU result of the instruction in MEM | source = MEM destination, MEM writes a register, source ≠ $0 |
| `01` | `ResultW`: value being written back | source = WB destination, WB writes a register, source ≠ $0, no MEM match |

MEM has priority over WB because it holds the younger instruction. The
forwarded `rt` value is also the data that `sw` stores.

Example: `add $s0,…` followed by `and $t0,$s0,$s1`, `or $t1,$s4,$s0`,
`sub $t2,$s0,$s5`. Here `and` takes `$s0` from MEM, `or` takes it from WB, and
`sub` reads it from the register file. No cycle is lost.

### Load-use stall

A loaded value exists only at the end of MEM. If it were forwarded from MEM,
it would have to reach the EX of the next instruction in the same cycle, which
is not possible. So when the instruction in EX is a load and its destination
(`rt`) is a source of the instruction in ID:

* `stall_f` holds PC and `stall_d` holds IF/ID, so the dependent instruction
  waits in ID for one cycle;
* `flush_e` clears ID/EX. The cleared control word has every write enable low,
  so it acts as a bubble.

On the next cycle the load is in WB, and its value is forwarded to EX.

### Branches decided in ID, with flush

`beq` compares its two operands with a dedicated equality comparator in ID.
The target is computed there too. When the branch is taken (`PCSrcD`):

* the PC loads the target instead of PC+4;
* IF/ID is cleared. This discards the single instruction fetched after the
  branch. An all-zero instruction decodes as a no-operation.

A taken branch therefore costs one cycle, and an untaken branch costs none.
Resolving the branch in MEM would discard three instructions.

Deciding earlier creates new data hazards, because the comparator needs its
operands one stage earlier than the ALU does:

* If an operand is the ALU result of the instruction now in MEM, it is
  forwarded into the comparator (`forward_ad` / `forward_bd`).
* If an operand is still being computed in EX, or is being loaded in MEM, ID
  stalls (`branch_stall`). The stall works in the same way as the load-use
  stall.
* An operand in WB arrives through the register-file bypass.

Cost: an ALU result used by the very next `beq` costs 1 stall cycle. A loaded
value used by the very next `beq` costs 2.

While IF/ID is stalled, a flush request does not clear it: `clr` acts only
when `en` is high. A branch waiting for its operands therefore stays in ID.
Its early, possibly wrong, comparison is ignored because the PC is also held.

`mips_cpu` carries concurrent assertions of these rules. A stall keeps PC
and IF/ID unchanged and puts a bubble into EX. A taken branch leaves an
all-zero IF/ID and the target in PC.

### Cycle accounting (checked by the testbenches)

Cycle 1 is the first cycle after reset, when PC=0 is fetched.

| Situation | Result |
|---|---|
| Instruction *i* (0-based) with no hazards before it | writes back at the end of cycle *i*+5. *n* instructions take 5+*n*−1 cycles |
| `lw` followed by a user (through rs or rt) | +1 cycle |
| taken `beq` | +1 cycle (one flushed fetch) |
| untaken `beq` | +0 |
| `beq` right after the ALU instruction producing its operand | +1 stall |
| `beq` right after the `lw` producing its operand | +2 stalls |

## Modules

| File | Module | Role |
|---|---|---|
| `rtl/mips_pkg.sv` | package | instruction fields, opcode/funct/ALU codes, forwarding select, stage structs |
| `rtl/mips_system.sv` | `mips_system` (top) | core plus instruction and data memories |
| `rtl/mips_cpu.sv` | `mips_cpu` | the five-stage datapath, PC, pipeline registers and multiplexers |
| `rtl/control_unit.sv` | `control_unit` | opcode/funct → control word |
| `rtl/hazard_unit.sv` | `hazard_unit` | forwarding selects, stalls, flush |
| `rtl/alu.sv` | `alu` | and, or, add, sub, slt; Zero |
| `rtl/regfile.sv` | `regfile` | 32×32, 2 read / 1 write, write-through |
| `rtl/pipe_reg.sv` | `pipe_reg` | generic stage register (type parameter) with enable (stall) and clear (flush) |
| `rtl/instr_mem.sv` | `instr_mem` | word-organised ROM-style memory, combinational read |
| `rtl/data_mem.sv` | `data_mem` | word-organised RAM, combinational read, clocked write |

Top-level ports of `mips_system`: `clk`, `rst` (synchronous, active high),
and for observation `pc`, `mem_write`, `data_addr`, `write_data`.

Parameters: `IMEM_WORDS` = 64 and `DMEM_WORDS` = 64 set the memory sizes.
`IMEM_INIT` optionally names a hex file for the instruction memory. Memories
are addressed by byte address. The two low bits are ignored, and the word
index wraps at the memory size.

### Encodings

* Opcodes and function codes are standard MIPS32: R-type 0x00,
  `beq` 0x04, `addi` 0x08, `lw` 0x23, `sw` 0x2B. Functions: `add` 0x20,
  `sub` 0x22, `and` 0x24, `or` 0x25, `slt` 0x2A.
* `ALUControl`: and 000, or 001, add 010, sub 110, slt 111.
* Unknown opcodes and function codes execute as no-operations.

## Simulation

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. Run from the directory that holds `rtl/`
and `tb/`:

```sh
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/mips_pkg.sv tb/mips_tb_pkg.sv tb/tb_mips_system.sv --top-module tb_mips_system
./obj_dir/Vtb_mips_system
```

Replace `tb_mips_system` with any other testbench:

| Testbench | What it does |
|---|---|
| `tb_mips_system` | Whole system at default sizes. Checks throughput (40 instructions in 44 cycles) and the branch example. Runs 40 random programs of all nine instructions and compares every register and memory word with a non-pipelined reference model (`mips_tb_pkg::mips_iss`). Counts how often each mechanism acted: EX forwarding from MEM and from WB, ID forwarding, load-use stall, branch stall, taken-branch flush. A mechanism that never acted is a failure. |
| `tb_mips_cpu` | Core with testbench memories. Runs the textbook sequences: forwarding, load-use (through rs and rt), and branch taken / not taken / with operand hazards. Checks results and exact write-back cycles. |
| `tb_control_unit`, `tb_hazard_unit`, `tb_alu`, `tb_regfile`, `tb_pipe_reg`, `tb_instr_mem`, `tb_data_mem` | Unit tests. Each compares against values computed independently in the testbench. |

Programs are built in SystemVerilog with the encoder functions of
`tb/mips_tb_pkg.sv` (`i_add`, `i_lw`, `i_beq`, …). `i_halt()` is
`beq $0,$0,-1`. The testbenches write the program into `u_imem.mem` before
releasing reset. `tb_instr_mem` also reads the 8-word file `tb/imem_init.hex`,
which holds 0xA5A50000 + 17·i at word i.

## How far to trust it, and where it is this design's own

Taken from the source material:

* the instruction set;
* the instruction field layout;
* the five stages and what each does;
* the datapath connections and signal names;
* forwarding from MEM/WB to EX, qualified by `RegWrite`;
* stalls made by holding the stage registers and clearing the next one;
* the register file written and read in the same cycle;
* branches decided in ID by an equality comparator, with the wrong-path
  instruction flushed.

Completed here, and consistent with the classic textbook design the material
follows:

* the exact load-use and branch-stall conditions;
* forwarding into the ID comparator;
* MEM-over-WB forwarding priority;
* clear-only-when-enabled in the stage registers;
* numeric encodings;
* reset behaviour;
* the register-file bypass in place of a split-cycle write;
* memory sizes and the way programs are loaded.

Known limits:

* There are no jumps. The J format exists in the encoding, but no jump
  instruction is implemented.
* There are no byte or half-word accesses, exceptions or interrupts.
* The ALU Zero flag is unused, because `beq` does not go through the ALU.
* The hazard unit also stalls when `rt` of an `addi`/`lw` in ID matches a load
  destination in EX, although `rt` is a destination there. This costs an
  occasional needless cycle but never gives a wrong result.
* The comparison of clock periods (single-cycle against pipelined) is about
  gate delays. RTL simulation does not model it.
* The deeper "superpipelined" organisation (IF IS RF EX DF DS TC WB) is shown
  in the source only as a stage-naming sketch. It is not implemented.
