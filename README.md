# Control logic for two MIPS subset processors

This is SystemVerilog for two classic teaching implementations of a MIPS integer subset.
They are built the way the lecture notes for LSU EE 3755 (Computer Organization, fall 2003)
develop them:

* A **single-cycle processor** (`sc_cpu`). Every instruction finishes in one clock. The focus
  is its control logic: each multiplexer select, the ALU operation code and the next-address
  controller are derived from the opcode and function fields. They are built once with two
  6-to-64 decoders and OR gates (`sc_control`) and once as a 12-bit-address ROM (`ctrl_rom`).
* A **multi-cycle processor** (`mc_cpu`). It uses one memory and one ALU, and a ten-state
  Moore controller (`mc_control`) sequences each instruction through 3 to 5 clock steps.

The two machines share no hardware. `mips_lecture_top` places them side by side.

## The single-cycle machine

### Two address registers and the delay slot

The least obvious feature is that the datapath holds two addresses, not one:

| register | holds |
|---|---|
| `PC`  | address of the instruction executing this cycle (the instruction memory reads here) |
| `NPC` | address of the instruction that will execute next cycle |

On every rising clock edge `PC <= NPC`, and `NPC` takes one of four values picked by
`Mux_NPC_CNT`:

| `Mux_NPC_CNT` | new NPC | used by |
|---|---|---|
| 00 | `NPC + (sext(imm16) << 2)` | beq / bne whose condition holds |
| 01 | `{NPC[31:28], IR[25:0], 2'b00}` | j, jal |
| 10 | register `rs` | jr, jalr |
| 11 | `NPC + 4` | everything else, and branches not taken |

So a branch or jump changes only `NPC`, and the instruction right after it (the *delay slot*)
always runs. The link value saved by jal and jalr is therefore `NPC + 4 = PC + 8`. This skips
the delay slot, so a subroutine returns to the instruction after it. Branch offsets count from
the delay-slot address (`NPC`), as in MIPS. A program written for a machine without delay
slots must put a useful instruction or a `nop` (`or r0,r0,r0`) after each branch and jump.

Reset (synchronous, active high) sets `PC = 0` and `NPC = 4`, and clears the registers.

### Datapath multiplexers and their selects

The control points are numbered as in the derivation. 1 to 9 come from it; the last two are
additions of this design:

| # | signal | 0 selects | 1 selects | set by |
|---|---|---|---|---|
| 1 | `ALU_OP[2:0]` | 000 AND, 001 OR, 010 SLT, 011 ADD, 100 SUB | | see below |
| 2 | `Mux_ALU_CNT` | Drt | sign-extended immediate | andi ori slti addi lw lb sw sb |
| 3 | `Mux_DataMem` | ALU result | memory Dout | lw lb |
| 4 | `Mux_Rd_CNT` | output of mux 5 | register 31 | jal |
| 5 | `Mux_Line11` | IR[15:11] | IR[20:16] | andi ori slti addi lw lb |
| 6 | `Mux_Line_NPC_plus4` | output of mux 3 | NPC + 4 | jal jalr |
| 7 | `NPC_CNT_SIG[1:0]` | 00 branch, 01 j/jal, 10 jr/jalr, 11 regular | | |
| 8 | `Mux_Branch` | ALU zero (beq) | zero' (bne) | bne |
| 9 | `R/W` | read | write | sw sb |
| – | `reg_write` | | register file write enable | every instruction with a destination |
| – | `mem_byte` | word | byte access | lb sb |

ALU_OP per instruction: and/andi → AND; or/ori → OR; slt/slti → SLT; add/addi and all
loads and stores → ADD; sub/beq/bne → SUB. For j, jal, jr and jalr the value does not matter.

Opcodes (hex): R-type 00 (functions and 24, or 25, slt 2a, add 20, sub 22, jr 08, jalr 09),
j 02, jal 03, beq 04, bne 05, **andi 06**, addi 08, slti 0a, ori 0d, lb 20, lw 23, sb 28,
sw 2b. Note that andi uses 06 here, not the standard MIPS 0x0c. Every immediate is
sign-extended, andi's and ori's included, because the datapath has no zero-extension path.
There is no overflow trap.

### Control built from decoders (`sc_control`)

The opcode drives a 6-to-64 decoder with outputs `x0..x63`, and the function field drives
another with outputs `y0..y63`. Each control bit is then an OR of decoder lines:

```
ALU_OP[2] = x0·y34 + x4 + x5
ALU_OP[1] = x0·y42 + x10 + x0·y32 + x8 + x35 + x32 + x43 + x40
ALU_OP[0] = x0·y37 + x13 + x0·y32 + x8 + x35 + x32 + x43 + x40
Mux_Branch = x5          R/W = x43 + x40          Mux_Rd_CNT = x3
```

and likewise for the rest. An instruction outside the subset decodes as "regular" and writes
neither a register nor memory.

### Control built as a ROM (`ctrl_rom`)

The same outputs are read from a 4096-word ROM addressed by `{opcode, function}`. Its contents
are computed at elaboration from the per-instruction tables; no listing of them is stored.
Setting `sc_cpu`'s parameter `USE_ROM_CONTROL = 1` uses the ROM in place of the decoders. The
testbench checks that the two agree on all 4096 addresses.

### The NPC controller (`npc_control`)

This takes `NPC_CNT_SIG` and the output of mux 8 (1 = branch condition met). Its output
`Mux_NPC_CNT` follows the two minimised equations

```
Mux_NPC_CNT[0] = SIG[0] + MUX'·SIG[1]'
Mux_NPC_CNT[1] = SIG[1] + MUX'·SIG[0]'
```

so a branch whose condition fails (SIG = 00, MUX = 0) gives 11, the fall-through.

### Memories

The instruction memory `imem` and the data memory `dmem` have 1024 words each by default.
Both read without a clock. `dmem` writes on the clock edge when R/W = 1. For `lb` it returns
the addressed byte sign-extended, and for `sb` it writes one byte. Byte lanes are
little-endian. Programs go into `imem` through its load port (`load_we/addr/data`), normally
while reset is held. `dmem` has no reset and no load port.

## The multi-cycle machine

### Why it exists

A single-cycle clock must fit the slowest instruction. The lecture's example uses 2 ns
memories, 2 ns ALUs and a 1 ns register file. A load then needs 8 ns while a jump needs only
2 ns. Splitting each instruction into steps of similar length lets the clock follow the
longest step, and lets one memory and one ALU be reused in different steps. The registers
`IR`, `A`, `B`, `ALUOut` and `MDR` hold values from one step to the next.

### Steps and states

| state | work | next |
|---|---|---|
| 0 fetch | `IR = Mem[PC]; PC = PC + 4` | 1 |
| 1 decode | `A = rs; B = rt; ALUOut = PC + (sext(imm) << 2)` | 2 (lw, sw), 6 (R-type), 8 (beq), 9 (j) |
| 2 address | `ALUOut = A + sext(imm)` | 3 (lw), 5 (sw) |
| 3 | `MDR = Mem[ALUOut]` | 4 |
| 4 | `rt = MDR` | 0 |
| 5 | `Mem[ALUOut] = B` | 0 |
| 6 | `ALUOut = A op B` (op from the function field) | 7 |
| 7 | `rd = ALUOut` | 0 |
| 8 | `if (A == B) PC = ALUOut` | 0 |
| 9 | `PC = {PC[31:28], IR[25:0], 00}` | 0 |

lw takes 5 clocks, sw and R-type 4, beq and j 3. This machine has no delay slot: a taken beq
goes to `PC + 4 + offset·4`. Any other opcode returns from state 1 to state 0 and does
nothing. The instruction set is lw, sw, add, sub, and, or, slt, beq and j.

### Controller outputs

`mc_control` is a Moore machine, so its outputs (`mc_ctrl_t` in `mips_pkg`) depend only on the
state:

* `pc_write`, and `pc_write_cond`, which loads PC only when the ALU zero flag is set
* `iord`: the memory address is PC (0) or ALUOut (1)
* `mem_read`, `mem_write`, `ir_write`
* `reg_dst`: the destination is rt (0) or rd (1)
* `mem_to_reg`: the write data is ALUOut (0) or MDR (1)
* `reg_write`
* `alu_src_a`: PC or A
* `alu_src_b`: B, 4, the immediate, or the immediate shifted left by 2
* `alu_ctl`: add, subtract, or the operation given by the function field
* `pc_source`: the ALU result, ALUOut, or the jump address

The states and their register transfers follow the lecture. The signal names and the per-state
values were derived here from those transfers. `A`, `B`, `ALUOut` and `MDR` load every clock;
`PC` and `IR` load only when told to. The unified memory `mc_memory` (1024 words) returns 0
unless `mem_read` is set, and it has a load port that takes priority over processor writes.

## Where this design goes beyond, or departs from, the lecture

* **Added signals**: the register-file write enable `reg_write` and the byte/word flag
  `mem_byte`. The lecture's nine control signals do not include them, but a working datapath
  needs both.
* **Address increment**: byte addresses advancing by 4. The datapath drawing labels its
  incrementer "+1", but the text uses NPC + 4.
* **Branch target adder**: the drawing shows this adder's offset input but not its other
  input. It is taken to be NPC. The upper jump-address bits are also taken from NPC.
* **ALU_OP for loads and stores**: ADD (011). A ROM table in the lecture lists 101 for lw, lb,
  sw and sb, but 101 is no defined operation, and the main ALU_OP table says ADD.
* **sw opcode**: 0x2b (101011). The lecture's hex value and its decoder equation (x43) both
  say 0x2b.
* **Multi-cycle load destination**: rt (IR[20:16]). The lecture's step list says IR[15:11] for
  the load's write-back, but its single-cycle section and the lw encoding use rt.
* **Chosen here**: the memory sizes, the load ports, little-endian byte lanes, synchronous
  active-high reset and its values, and signed SLT. The ALU returns 0 for the undefined codes
  101 to 111 and detects no overflow.
* **Not included**: a microprogrammed controller, a PLA implementation of the state machine
  and floating-point hardware. The lecture only names or mentions these.

## Performance notes

The lecture's integer instruction mix is 24% loads, 12% stores, 44% ALU, 18% branches and
2% jumps. It needs a fixed 8 ns clock on the single-cycle machine. With a clock that varied
per instruction it would average 6.6 ns. Both processors run all of these instruction classes.
With this design's step counts, the same mix averages 4.04 clocks per instruction on the
multi-cycle machine. The lecture's second mix includes 14% floating-point instructions, which
neither machine can execute. The RTL models no delays: it is cycle-accurate, not timed.

## Files

| file | contents |
|---|---|
| `rtl/mips_pkg.sv` | opcodes, function codes, ALU and NPC encodings, control structs, multi-cycle states |
| `rtl/mips_lecture_top.sv` | both processors side by side (ports prefixed `sc_` and `mc_`) |
| `rtl/sc_cpu.sv` | single-cycle datapath |
| `rtl/sc_control.sv`, `rtl/decoder6to64.sv` | decoder-based control |
| `rtl/ctrl_rom.sv` | ROM-based control |
| `rtl/npc_control.sv` | next-address controller |
| `rtl/alu.sv`, `rtl/regfile.sv`, `rtl/imem.sv`, `rtl/dmem.sv` | datapath units |
| `rtl/mc_cpu.sv`, `rtl/mc_control.sv`, `rtl/mc_memory.sv` | multi-cycle processor |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/mips_asm_pkg.sv` | instruction encoders used by the testbenches |

Parameters: `IMEM_DEPTH`, `DMEM_DEPTH`, `MEM_DEPTH` (words, powers of two, default 1024) and
`USE_ROM_CONTROL` (default 0).

## Simulating

Every testbench prints one line `TB_RESULT checks=N failures=M` and finishes, and each has a
watchdog. With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/mips_pkg.sv tb/tb_mips_lecture_top.sv --top-module tb_mips_lecture_top
./obj_dir/Vtb_mips_lecture_top
```

What the testbenches check:

* `tb_sc_cpu` and `tb_mc_cpu` run directed programs, random programs and a program drawn from
  the instruction mix above. After every clock, or every finished instruction, they compare
  the PC, all registers and the memory with an instruction-set model inside the testbench.
  That includes the delay slot and the per-class clock counts.
* `tb_sc_control` and `tb_ctrl_rom` check all 4096 opcode/function combinations against the
  control tables.
* `tb_mips_lecture_top` runs both processors at the default sizes. The single-cycle program
  uses jal/jr and jalr subroutines, loops and byte copies; the multi-cycle program sums an
  array. It checks the results and the exact clock count to the end of each program, and
  counts each mechanism: taken and untaken branches, every jump kind, every memory access
  kind, and every controller state.

To run your own program, build it with the encoders in `mips_asm_pkg` (`enc_r`, `enc_i`,
`enc_j`). Write it through the load port while `rst` is high, then release reset. On the
single-cycle machine, remember the delay slot.
