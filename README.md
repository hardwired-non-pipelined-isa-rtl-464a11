# Hardwired, non-pipelined MIPS-subset processors

One instruction set, two implementations. Both execute a 32-bit MIPS-style
integer subset with **hardwired control**: there is no microcode, and the
control signals come from combinational logic that sees the opcode and the
ALU's `zero?` flag. Neither machine is pipelined. They differ in how they
reach memory:

| machine | memories | cycles per instruction | what sets the clock period |
|---|---|---|---|
| `harvard_cpu` | separate instruction and data memories | 1 | instruction fetch + register read + ALU + data access + write-back, all in one cycle |
| `princeton_cpu` | one memory for both | 2 (fetch, execute) | register read + ALU + memory + write-back (the fetch has its own cycle) |

When memory access dominates the cycle, the Princeton clock runs about twice
as fast as the Harvard clock. Its CPI is also twice as high, so the two
deliver about the same performance. `mips_top` puts both machines side by
side so they can run the same program and be compared.

## Instruction set

All instructions are 32 bits wide and use three formats:

```
R-type  | 0      | rs  | rt  | rd  | 0   | func |   31:26 25:21 20:16 15:11 10:6 5:0
I-type  | opcode | rs  | rt  | immediate/offset  |   31:26 25:21 20:16 15:0
J-type  | opcode | target                        |   31:26 25:0
```

| class | instructions | opcode (hex) | operation |
|---|---|---|---|
| ALU | ADD ADDU SUB SUBU AND OR XOR NOR SLT SLTU | 00, func 20-27, 2A, 2B | rd ← rs func rt |
| ALUi | ADDI ADDIU SLTI SLTIU | 08-0B | rt ← rs op sext(imm) |
| ALUiu | ANDI ORI XORI | 0C-0E | rt ← rs op zext(imm) |
| LUI | LUI | 0F | rt ← imm << 16 |
| LW / SW | LW, SW | 23, 2B | rt ↔ mem[rs + sext(disp)] |
| branch | BEQZ, BNEZ | 04, 05 | if rs ==/!= 0: PC ← PC+4 + sext(offset)·4 |
| jump | J, JAL | 02, 03 | PC ← {PC+4[31:28], target, 00}; JAL: R31 ← PC+4 |
| jump register | JR, JALR | 12, 13 | PC ← rs; JALR: R31 ← PC+4 |

R0 always reads as 0, and writes to it are dropped. Control transfers take
effect at once: there is no delay slot. `ADD`/`ADDU` and `SUB`/`SUBU` behave
the same, because overflow traps are not implemented. An opcode outside the
table does nothing except advance the PC. The numeric opcode and function
values follow the usual MIPS/DLX assignments; BEQZ, BNEZ, JR and JALR get
DLX-style primary opcodes. The encoders `enc_r`, `enc_i` and `enc_j` in
`mips_pkg` build instruction words.

Memory is addressed in bytes, but only whole words are transferred. The low
two address bits are ignored, and there are no byte or half-word loads.

## The single-cycle Harvard datapath

In one clock cycle (`harvard_cpu.sv`):

1. The PC addresses the instruction memory, and the instruction word appears
   combinationally.
2. `rs` (inst[25:21]) and `rt` (inst[20:16]) read the register file.
   `imm_ext` extends inst[15:0], and `alu_control` picks the ALU operation.
3. The **BSrc** mux feeds the ALU either `rt`'s value or the immediate.
4. The ALU result addresses the data memory. The store data is `rt`'s value.
5. The **WBSrc** mux picks what is written back: the ALU result, the loaded
   word, or PC+4 (the link value of JAL/JALR). The **RegDst** mux picks the
   destination: `rt`, `rd` or R31.
6. `next_pc` forms PC+4, the branch target, the absolute jump target and the
   register target. The **PCSrc** mux chooses among them.

At the next rising edge, the PC, the register file and the data memory are
all updated together. Reads of the register file and of both memories are
combinational. Writes happen at the edge (the "magic" memory model), so a
whole instruction fits between two edges.

## Hardwired control

`hardwired_control` is a purely combinational decode of `opcode` and
`zero?`. Its output is the `ctrl_t` struct:

| opcode | ExtSel | BSrc | OpSel | MemW | RegW | WBSrc | RegDst | PCSrc |
|---|---|---|---|---|---|---|---|---|
| ALU | – | Reg | Func | no | yes | ALU | rd | pc+4 |
| ALUi | sExt16 | Imm | Op | no | yes | ALU | rt | pc+4 |
| ALUiu | uExt16 | Imm | Op | no | yes | ALU | rt | pc+4 |
| LUI | High16 | Imm | Op | no | yes | ALU | rt | pc+4 |
| LW | sExt16 | Imm | + | no | yes | Mem | rt | pc+4 |
| SW | sExt16 | Imm | + | yes | no | – | – | pc+4 |
| BEQZ, zero?=1 | sExt16 | – | 0? | no | no | – | – | br |
| BEQZ, zero?=0 | sExt16 | – | 0? | no | no | – | – | pc+4 |
| BNEZ | as BEQZ, with the condition inverted | | | | | | | |
| J | – | – | – | no | no | – | – | jabs |
| JAL | – | – | – | no | yes | PC | R31 | jabs |
| JR | – | – | – | no | no | – | – | rind |
| JALR | – | – | – | no | yes | PC | R31 | rind |

A dash is a don't-care, and the RTL drives it with a fixed value.

The ALU operation comes from a second, small selector (`alu_control`).
OpSel chooses among four sources:

- **Func** decodes inst[5:0].
- **Op** decodes the opcode.
- **+** forces an add, for load and store addresses.
- **0?** forces the zero test.

Under 0?, the ALU passes operand A through. Its `z` output (result == 0) then
tells whether the branch register is zero. That flag is the only feedback
from the datapath into the controller.

For a conditional branch, the instruction's meaning is what this design
follows: BEQZ branches when the register **is** zero, so `zero?=1` selects
`br`.

## The Princeton machine: one memory, two phases

A single memory port cannot deliver an instruction and a load or store
operand in the same cycle. This is a structural hazard. `princeton_cpu`
resolves it by splitting every instruction into two cycles and adding an
instruction register (IR) and a memory-address mux (AddrSrc). The
single-cycle controller is reused unchanged. The new `princeton_ctrl` adds a
one-bit phase flipflop that toggles every cycle, plus a little logic:

| phase | AddrSrc | IRen | PCen | Wen |
|---|---|---|---|---|
| fetch (S=0) | PC | on | off | off |
| execute (S=1) | ALU | off | on | on |

- **Fetch:** the PC addresses memory, and the word read is captured in the
  IR. Nothing else changes, because MemWrite and RegWrite are ANDed with
  Wen.
- **Execute:** the IR drives the same datapath as in the Harvard machine.
  The ALU result addresses memory for LW/SW, and at the closing edge the PC,
  the register file and (for SW) the memory are written.

Every instruction takes two cycles, including those that do not touch data
memory. After reset the machine is in the fetch phase. The two machines run
the same program with the same architectural results, and the Princeton one
takes exactly twice the cycles.

## Files

| file | contents |
|---|---|
| `rtl/mips_pkg.sv` | widths, opcode/func enums, control-signal enums, the `ctrl_t` struct, instruction encoders |
| `rtl/mips_top.sv` | both processors side by side (the top) |
| `rtl/harvard_cpu.sv`, `rtl/princeton_cpu.sv` | the two processors |
| `rtl/hardwired_control.sv`, `rtl/alu_control.sv`, `rtl/princeton_ctrl.sv` | control |
| `rtl/alu.sv`, `rtl/imm_ext.sv`, `rtl/next_pc.sv` | datapath units |
| `rtl/regfile.sv`, `rtl/magic_ram.sv`, `rtl/register.sv` | state elements |
| `rtl/mux.sv`, `rtl/demux.sv`, `rtl/decoder.sv` | generic combinational elements |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/mips_ref_pkg.sv` | instruction-level reference model and program generator used by the processor testbenches |

The register file is built from the generic elements:

- A demultiplexer, made from the decoder, routes the write enable to one of
  31 `register` instances.
- Two 32-way multiplexers form the read ports.

## Interfaces and timing

Both processors use one clock, a synchronous active-high `rst`, and the same
ports:

- **`load_we`, `load_addr`, `load_data`** write one word of the instruction
  memory (Harvard) or of the shared memory (Princeton). `load_addr` is a word
  index. Use this port while `rst` is held to put a program in place. In the
  Princeton machine it overrides the processor's own access.
- **`pc`, `instr`** give the current instruction address and word. For the
  Princeton machine, `instr` is the IR.
- **`rf_we`, `rf_ws`, `rf_wd`** show the register write made at the end of
  the current cycle.
- **`dm_we`, `dm_addr`, `dm_wdata`** show the memory write made at the end
  of the current cycle. `dm_addr` is a byte address.
- **`retire`** is 1 in each cycle whose closing edge completes an
  instruction. In the Harvard machine that is every cycle out of reset. In
  the Princeton machine it is every execute cycle; `execute` shows the phase.

Reset sets the PC to `RESET_PC` (0) and clears the registers. The Princeton
machine also clears its IR and starts in fetch. Memory contents are not
reset.

Default sizes are 1024-word instruction and data memories (Harvard) and a
2048-word shared memory (Princeton), set by the `IMEM_WORDS`, `DMEM_WORDS`
and `MEM_WORDS` parameters. Addresses beyond a memory's size wrap onto its
low index bits.

## Where this RTL makes its own choices

The following are choices of this implementation, not fixed by the
architecture it implements:

- opcode and function-code values
- which immediate instructions zero-extend
- LUI as the user of the High16 extension
- BNEZ, which is the mirror of BEQZ
- the operation list of the ALU
- memory sizes and word organisation (no byte or half-word access)
- the program-load port
- reset behaviour
- the trace outputs

The register file's read side is built from multiplexers rather than from
shared tri-state read lines. The absolute-jump target takes its top four
bits from PC+4.

Not implemented:

- the floating-point registers and FP status register of the full
  architecture
- other special registers
- exceptions
- byte and half-word memory access
- a Princeton controller with CPI below 2

## Verification

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. Each has a cycle watchdog.

**Leaf blocks.** The leaf testbenches compare against values computed in the
testbench:

- ALU results and the zero flag on random and corner operands
- every row of the control table, with `zero?` at 0 and 1
- extension modes
- branch and jump targets
- register-file and memory read-before-write timing
- the Princeton phase sequence and write gating

**Processors.** The processor testbenches run generated programs against
`mips_ref_pkg::mips_ref`, an independent instruction-level model. Each
program begins with a directed part:

- clear the data area
- seed the registers
- a counted loop with a backward BNEZ
- taken and not-taken branches
- J, JAL, JR and JALR
- LUI
- a write to R0

It continues with random instructions and forward branches and jumps. The PC
and every register and memory write of each completed instruction are
compared. The cycle count is also checked: CPI 1 for Harvard, CPI 2 for
Princeton.

**Top.** `tb_mips_top` runs at the default sizes. It loads the same four
programs into both machines and checks both against their reference models.
It requires the Princeton machine to take exactly twice as many cycles, and
counts how often each mechanism occurred. A mechanism that never occurred is
a failure. The mechanisms are:

- each instruction class
- branches taken and not taken
- writes to R0
- fetch and execute phases
- memory accesses in the execute phase

The RTL has no delays, so the clock-period comparison between the two
machines is outside what simulation shows. Only CPI is checked.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
  rtl/mips_pkg.sv tb/mips_ref_pkg.sv tb/tb_mips_top.sv --top-module tb_mips_top
./obj_dir/Vtb_mips_top
```

Substitute any `tb/tb_<module>.sv` and its module name to test one block.
Only the processor and top testbenches need `tb/mips_ref_pkg.sv`.

## Changing it

- To add an instruction:
  1. Give it an opcode (or func) in `mips_pkg`.
  2. Add a row in `hardwired_control`.
  3. If it needs a new ALU operation, add it in `alu_control` and `alu`.
  4. Add its semantics to `mips_ref::step` so the processor testbenches
     check it.
- The Princeton machine inherits every such change, since it reuses the same
  controller.
- Memory sizes are plain parameters. Keep them powers of two.
