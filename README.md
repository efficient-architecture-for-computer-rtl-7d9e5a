# uP16: a 16-bit pipelined RISC core with separate program and data memories

uP16 is a small processor for embedded and system-on-chip use. It keeps the
instruction set short, so every instruction can pass through the same five
pipeline stages and one instruction can start every clock. Instructions and
data sit in two separate memories (a Harvard organisation), so fetching the
next instruction never competes with a load or store.

Key numbers:

| item | value |
|---|---|
| data path, registers, PC | 16 bits |
| instruction word | 18 bits |
| general-purpose registers | 8 (R0 reads as 0) |
| program memory | 1024 words of 18 bits |
| data memory | 1024 words of 16 bits, word access only |
| pipeline | IF, ID, EX, MEM, WB; one instruction per clock |
| interrupts | none |

The RTL is SystemVerilog (IEEE 1800-2017), synthesizable, with a
self-checking testbench for every module.

## Instruction set

An instruction has four fields:

```
 17    14 13   11 10    8 7                0
+--------+-------+-------+------------------+
| opcode |  rd   |  rs   | function / immed8 |
+--------+-------+-------+------------------+
```

Opcode 0 holds the register-register operations, chosen by the 8-bit
function field. Every other opcode uses the field as a signed 8-bit
immediate or displacement (`sext` below).

| opcode | function | mnemonic | effect |
|---|---|---|---|
| 0 | 0 | `nop` | nothing (instruction word 0) |
| 0 | 1 | `add rd, rs` | R[rd] = R[rd] + R[rs] (sets overflow) |
| 0 | 2 | `sub rd, rs` | R[rd] = R[rd] - R[rs] (sets overflow) |
| 0 | 3 | `addu rd, rs` | R[rd] = R[rd] + R[rs] (sets carry) |
| 0 | 4 | `subu rd, rs` | R[rd] = R[rd] - R[rs] (sets borrow) |
| 0 | 5 | `mov rd, rs` | R[rd] = R[rs] |
| 0 | 6 | `and rd, rs` | R[rd] = R[rd] & R[rs] |
| 0 | 7 | `or rd, rs` | R[rd] = R[rd] \| R[rs] |
| 0 | 8 | `nand rd, rs` | R[rd] = ~(R[rd] & R[rs]) |
| 0 | 9 | `nor rd, rs` | R[rd] = ~(R[rd] \| R[rs]) |
| 0 | 10 | `xor rd, rs` | R[rd] = R[rd] ^ R[rs] |
| 0 | 11 | `not rd, rs` | R[rd] = ~R[rs] |
| 1 | - | `jlr rd, rs` | R[rd] = PC+1; PC = R[rs] (`jr rs` is `jlr r0, rs`) |
| 2 | - | `lw rd, rs, imm` | R[rd] = mem[R[rs] + sext(imm)] |
| 3 | - | `sw rd, rs, imm` | mem[R[rd] + sext(imm)] = R[rs] |
| 4 | - | `lwi rd, imm` | R[rd] = sext(imm) |
| 5 | - | `addi rd, rs, imm` | R[rd] = R[rs] + sext(imm) |
| 6 | - | `beq rd, rs, imm` | if R[rd] == R[rs]: PC = PC + 1 + sext(imm) |
| 7 | - | `bne rd, rs, imm` | if R[rd] != R[rs]: PC = PC + 1 + sext(imm) |
| 8 | - | `blt rd, rs, imm` | if R[rd] < R[rs] (signed): PC = PC + 1 + sext(imm) |
| 9 | - | `bgt rd, rs, imm` | if R[rd] > R[rs] (signed): PC = PC + 1 + sext(imm) |

Opcodes 10 to 15 and functions 12 to 255 execute as `nop`. A write to R0 is
dropped. Note that `sw` takes its address from `rd` and its data from `rs`,
the reverse of `lw`. A branch to itself, `beq r0, r0, -1`, is a handy halt.

In `up16_pkg` the functions `enc_r` and `enc_i` build instruction words,
for example `enc_i(OP_LWI, 3'd1, 3'd0, 8'd1)` gives `18'h10801`.

## The pipeline

```
            IF/ID            ID/EX             EX/MEM            MEM/WB
 if_stage ---------> id_stage --------> ex_stage --------> mem_wb_stage --+
   ^  PC, program      decoder,           ALU,              data memory,  |
   |  memory           register file,     status word       write-back    |
   |                   branch decision                      select        |
   +---- target, select (same cycle) ----+                                 |
                       ^-------------- register write-back ---------------+
```

An instruction fetched at clock edge *k* moves as follows:

| edge | what is registered |
|---|---|
| k | IF/ID: the instruction (`IF_ID_Inst_out`) and its address (`IF_currPC`) |
| k+1 | ID/EX: operands R[rd] and R[rs], sign-extended immediate, control bits |
| k+2 | EX/MEM: ALU result (`alu_result`) and status word (`Status`). At the same edge the data memory stores, or latches a load address |
| k+3 | MEM/WB: the write-back value (load data, ALU result or PC+1) |
| k+4 | register file written |

After reset the first instruction (address 0) is fetched at the first
edge, and its result is in the register file at the fifth edge. From then on
one result is written every clock.

**Branches and jumps cost nothing.** The decode stage compares the two
registers and computes the target in the same cycle. The target goes
straight to the fetch multiplexer, so the next fetch is already at the
target. Nothing is fetched down the wrong path, so there is no delay slot
and nothing to flush. The price is a long combinational path: instruction
register, register read, compare, next-PC multiplexer, program memory
address.

**There are no interlocks and no forwarding.** The only help the hardware
gives is that the register file returns a value in the same cycle it is
written (write-through). This sets the one rule a program must follow:

> An instruction may read a register only if the instruction that writes
> it is at least three instructions earlier in execution order. Put `nop`s
> in between where needed.

This holds for every writer, `lw` included, and for every reader, branches
and `jr` included. A reader placed closer sees the old value; the
processor does not detect it. For example:

```
lwi r3, -1
nop
nop            ; two instructions in between: r3 is now visible
mov r5, r3
```

Memory needs no spacing. A `lw` right after a `sw` to the same word reads
the stored value, because the store happens at the edge that ends the
store's EX stage, one edge before the load's address is latched.

## Status word

`Status` is loaded at every clock from the ALU, so it always describes the
last instruction to leave EX. Branches, jumps and `nop` run the ALU with
result 0, so after them `Status` reads `8'h01` (zero).

| bit | name | set when |
|---|---|---|
| 0 | zero | result is 0 |
| 1 | positive | result is not 0 and bit 15 is 0 |
| 2 | negative | bit 15 of the result is 1 |
| 3 | carry | `addu` carries out, or `subu` borrows (unsigned a < b) |
| 4 | overflow | `add`, `sub`, `addi`, `lw` or `sw` overflows as a signed sum |
| 7:5 | - | always 0 |

No instruction reads the status word; it is an output for observation.

## Memories and loading a program

Both memories are plain arrays, so synthesis maps them to block RAM.
Addresses wrap: only the low 10 address bits are used.

* `instr_mem` has a registered read port, and that output register is the
  instruction register. Reset clears it to `nop`. A write port
  (`imem_load_we`, `imem_load_addr`, `imem_load_data` on the top) loads a
  program. Load while `Rst` is high, then release `Rst`.
* `data_mem` stores at the clock edge when enabled and written. When
  enabled for a load, it latches the word, which is then ready in the next
  (MEM) cycle. It has no reset.

While reset is held, `IF_currPC` reads `16'hFFFF` and the instruction is
`nop`. The first fetch after reset is from address 0.

## Modules

| file | role |
|---|---|
| `rtl/up16_pkg.sv` | widths, field layout, opcode and ALU-operation enums, control bundle, instruction builders |
| `rtl/up16_cpu.sv` | top: the four stage blocks wired together |
| `rtl/if_stage.sv` | PC, next-PC multiplexer, program memory (IF/ID register) |
| `rtl/instr_mem.sv` | program memory with registered read and load port |
| `rtl/id_stage.sv` | decoder, register file, sign extension, branch decision, ID/EX register |
| `rtl/control_unit.sv` | instruction decoder |
| `rtl/reg_file.sv` | 8 x 16 registers, 2 read ports, 1 write port, write-through |
| `rtl/ex_stage.sv` | operand selects, ALU, status register, EX/MEM register |
| `rtl/alu.sv` | ALU and status flags |
| `rtl/xor_block.sv` | 16 xor cells pairing bit i with bit i+16 of a 32-bit bus |
| `rtl/mem_wb_stage.sv` | data memory, write-back select, MEM/WB register |
| `rtl/data_mem.sv` | data memory |

The stage ports keep the published signal names, such as `EX_Sel_ALUSrc1`,
`Mem_Sel_ALU_PC1` and `WB_RFWrite_Enab`. Register file port 1 reads R[rd]
and port 2 reads R[rs]. `EX_Sel_ALUSrc1` makes the ALU's first operand R[rs]
instead of R[rd] (for `lw` and `addi`). `EX_Sel_ALUSrc2` makes the second
operand the immediate instead of R[rs] (for `lw`, `sw`, `lwi`, `addi`).
`Sel_ALU_PC1` writes back PC+1 instead of the ALU result (for `jlr`).

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/up16_pkg.sv tb/tb_up16_cpu.sv --top-module tb_up16_cpu
./obj_dir/Vtb_up16_cpu
```

* `tb_up16_cpu` runs the whole processor at its default sizes. It has an
  instruction-level reference model that knows nothing about pipeline
  stages. It runs one hand-written program and 24 random ones (300 to 760
  executed instructions each). The hand-written program has a loop, a call
  and a return, loads and stores, every branch taken and not taken, and a
  write to R0. The random programs are built to follow the spacing rule.
  After each program the testbench compares all registers and every stored
  word with the model. It also checks that the halt is fetched at exactly
  clock N for N executed instructions, and that the first result appears at
  the fifth edge. It fails if any of these never happens: a taken, untaken
  or backward branch, a jump, a load, a store, a same-cycle write-back read,
  a write to R0, or two write-backs in a row.
* `tb_fig3_program` runs the published example program (`lwi` x4, `nop`,
  `mov`, `add`, `beq`). It checks, clock by clock, the fetched words,
  `alu_result` (0001 0002 FFFF FFA3 0000 FFFF FFA4) and `Status`
  (02 02 04 04 01 04 04).
* `tb_<module>` tests each module on its own against a model in the
  testbench.

The testbenches read the register file and data memory by hierarchical
names (`dut.u_id.u_rf.regs`, `dut.u_mem.u_dmem.mem`). Keep those instance
names if you restructure.

## What follows the original description, and what does not

These parts come straight from the published design: the 16-bit data path,
the 18-bit four-field instruction format, the instruction list and its
effects, eight registers, word-only memory access, a PC that counts by one,
no interrupts, and the split into fetch, decode, execute and
memory/write-back blocks. The port names come from it too, including the
four top-level observation outputs, and so do the xor block's bit pairing
and the status values for zero, positive and negative results.

These are this design's own choices, made where the description is silent:

* **Opcode and function numbers.** R-type = 0, `lwi` = 4, `beq` = 6, and
  functions `nop` = 0, `add` = 1, `mov` = 5 match published instruction
  words. The other numbers follow the order of the instruction list. `jr`
  and `jlr` share opcode 1.
* **Memory size.** "2048 bytes" of each memory is read as 1024 words. For
  the 18-bit program memory the byte count does not divide evenly, so it
  is given the same word count as the data memory.
* **Carry and overflow flags (status bits 3 and 4).** These are what makes
  `addu`/`subu` differ from `add`/`sub`. The description gives both pairs
  the same effect.
* **Signed comparisons** for `blt` and `bgt`.
* **R0 always zero.** The description only says a jump with rd = R0 has no
  write-back.
* **Hazard handling.** The register file's write-through, no delay slot,
  and the spacing rule above.
* **Reset.** Synchronous and active high. It clears all registers and
  pipeline registers, sets `IF_currPC` to `16'hFFFF` (as in the published
  waveform) and starts fetching at address 0.
* **Program memory load port.** Added so that a program can be placed in
  memory.
* **J-format.** The instruction format lists a 14-bit jump-target format,
  but no instruction uses it, so it is not decoded.

The original was built for an FPGA and reached a 12.07 ns clock period.
This RTL has not been synthesised for timing. Its longest path is most
likely the same-cycle branch path into the program memory address.

## Changing it

* Memory depths are parameters of `up16_cpu` (`IMEM_DEPTH`, `DMEM_DEPTH`,
  default 1024 each). Addresses stay 16 bits wide and wrap at the depth.
* Widths, encodings and status-bit positions live in `up16_pkg`. The
  instruction field positions are fixed by the 18-bit format.
* To add forwarding or a stall, the register operands are chosen in
  `id_stage` (`rdata1`, `rdata2`) and in `ex_stage` (`opa`, `opb`). The
  write-back port into `id_stage` already carries the destination and
  enable needed to compare against.
