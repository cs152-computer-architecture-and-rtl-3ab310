# A single-cycle MIPS-subset processor with two-level control

This is a processor that executes one instruction per clock (CPI = 1) for a
small subset of the MIPS instruction set: `add`, `sub`, `ori`, `lw`, `sw`,
`beq` and `j`. Its R-type ALU decoding also covers `and`, `or` and `slt`.
Nothing is pipelined and nothing is multi-cycle. In each clock period the
instruction is fetched, decoded, executed and written back. The register
file, the data memory and the PC all update together on the rising edge
that ends the cycle.

The interesting part is the control. It is built in two levels:

* A **main control** looks only at the 6-bit op field. It produces the
  datapath steering signals plus a 3-bit **ALUop**.
* A **local ALU control** combines ALUop with the low bits of the func
  field to produce the 3-bit **ALUctr** that the ALU obeys.

Because of this split, the main control never has to know about R-type
function codes. Both levels are plain two-level AND/OR logic, written as
the sum-of-products equations that come from their truth tables.

## Instruction formats

All instructions are 32 bits. The register specifiers always sit in the
same place, so the register file can be read before the instruction is
decoded.

| format | 31:26 | 25:21 | 20:16 | 15:11 | 10:6 | 5:0 | used by |
|--------|-------|-------|-------|-------|------|-----|---------|
| R | op | rs | rt | rd | shamt | funct | add, sub (and, or, slt) |
| I | op | rs | rt | imm16 (15:0) | | | ori, lw, sw, beq |
| J | op | target (25:0) | | | | | j |

| instruction | op | funct | register transfer |
|-------------|----|-------|-------------------|
| add rd,rs,rt | 00 0000 | 10 0000 | R[rd] = R[rs] + R[rt] |
| sub rd,rs,rt | 00 0000 | 10 0010 | R[rd] = R[rs] - R[rt] |
| and / or / slt | 00 0000 | 10 0100 / 10 0101 / 10 1010 | R[rd] = R[rs] op R[rt] (slt is signed, result 1 or 0) |
| ori rt,rs,imm | 00 1101 | | R[rt] = R[rs] \| ZeroExt(imm16) |
| lw rt,imm(rs) | 10 0011 | | R[rt] = M[R[rs] + SignExt(imm16)] |
| sw rt,imm(rs) | 10 1011 | | M[R[rs] + SignExt(imm16)] = R[rt] |
| beq rs,rt,imm | 00 0100 | | if R[rs] == R[rt]: PC = PC + 4 + SignExt(imm16)*4 |
| j target | 00 0010 | | PC = {(PC+4)[31:28], target, 00} |

Every instruction except a taken `beq` and `j` continues at PC + 4.

## The datapath in one cycle

```
          +-------- ifetch ---------+          +---------------- datapath -----------------+
  PC ---> | inst_mem -> Instruction |--rs,rt-->| register_file --busA--> ALU --+--> Adr    |
   ^      | +4 adder, branch adder, |--rd----->|  (RegDst mux: rd/rt)  ^       |  data_mem |
   |      | jump concat, next-PC mux|--imm16-->| extender --(ALUSrc)---+       |     |     |
   +------+------- nPC_sel, Jump ---+          |             busB ----> Data In      v     |
                      ^                        |  busW <--(MemtoReg mux)-- ALU out / mem out|
                      |                        +--------------------------------------------+
                control_unit <-- op, funct, Equal (= ALU Zero)
```

* **Register file.** 32 registers of 32 bits. Ra = rs drives busA and
  Rb = rt drives busB, both combinationally. The write register Rw is rd
  when RegDst = 1 and rt when RegDst = 0.
* **Extender.** Zero-extends imm16 when ExtOp = 0 (for `ori`) and
  sign-extends it when ExtOp = 1 (for `lw` and `sw`).
* **ALU input B.** busB when ALUSrc = 0, the extended immediate when
  ALUSrc = 1.
* **Data memory.** The ALU result is its address and busB is its write
  data. The read is combinational. The write happens at the clock edge when
  MemWr = 1.
* **Write-back (busW).** The ALU result when MemtoReg = 0, the memory
  output when MemtoReg = 1. It is written when RegWr = 1.
* **beq.** The ALU subtracts. Its Zero output is the **Equal** input of
  the control, and the control sets `nPC_sel = Branch & Equal`.

The longest path, and so the clock period, belongs to `lw`. It runs from
the PC's clock-to-Q through the instruction memory, the register read, the
ALU's address add and the data-memory read, to the register-file setup
time. Every other instruction wastes part of that period. That is the
basic cost of a single-cycle design.

## Main control (`main_control`)

The main control is organised as a PLA. Its AND plane decodes each of the
six op codes with one product term over all six op bits. Its OR plane
collects those terms into the control signals.

| signal | R-type | ori | lw | sw | beq | j | equation |
|--------|:-:|:-:|:-:|:-:|:-:|:-:|---|
| RegDst | 1 | 0 | 0 | x | x | x | R-type |
| ALUSrc | 0 | 1 | 1 | 1 | 0 | x | ori + lw + sw |
| MemtoReg | 0 | 0 | 1 | x | x | x | lw |
| RegWrite | 1 | 1 | 1 | 0 | 0 | 0 | R-type + ori + lw |
| MemWrite | 0 | 0 | 0 | 1 | 0 | 0 | sw |
| Branch | 0 | 0 | 0 | 0 | 1 | 0 | beq |
| Jump | 0 | 0 | 0 | 0 | 0 | 1 | jump |
| ExtOp | x | 0 | 1 | 1 | x | x | lw + sw |
| ALUop<2:0> | 100 | 010 | 000 | 000 | 001 | x | {R-type, ori, beq} |

Every "x" (don't care) comes out as 0 from these equations. An op code
outside the six also gives all zeros. Such an instruction writes nothing
and simply advances to PC + 4.

ALUop means "R-type: look at funct" (100), "Or" (010), "Add" (000) and
"Subtract" (001). Bit 2 marks the R-type case. Three bits leave room for
more I-type ALU operations such as `andi`; two bits would be enough for
this subset alone.

## Local ALU control (`alu_control`)

ALUctr codes: And 000, Or 001, Add 010, Subtract 110, Set-on-less-than 111.

| ALUop | func<3:0> | operation | ALUctr |
|-------|-----------|-----------|--------|
| 000 | x | Add | 010 |
| 0x1 | x | Subtract | 110 |
| 01x | x | Or | 001 |
| 1xx | 0000 | Add | 010 |
| 1xx | 0010 | Subtract | 110 |
| 1xx | 0100 | And | 000 |
| 1xx | 0101 | Or | 001 |
| 1xx | 1010 | Set on < | 111 |

Minimised with the unused rows as don't cares:

```
ALUctr<2> = !ALUop<2> & ALUop<0>  +  ALUop<2> & !f<2> & f<1> & !f<0>
ALUctr<1> = !ALUop<2> & !ALUop<1> +  ALUop<2> & !f<2> & !f<0>
ALUctr<0> = !ALUop<2> & ALUop<1>
          + ALUop<2> & !f<3> & f<2> & !f<1> & f<0>
          + ALUop<2> &  f<3> & !f<2> & f<1> & !f<0>
```

func<5:4> are not used: every R-type ALU function of interest has them
set to `10`. In ALUctr<2>, func<3> is a don't care because `sub` (0010)
and `slt` (1010) both need bit 2 set.

**Departure from the source.** The course material this design follows
prints the first terms of ALUctr<1> and ALUctr<0> with ALUop<0> in place of
ALUop<1>. Those terms disagree with its own truth table: `ori` would get
011 and `beq` 111. The equations above follow the truth table.

The source also lists an older ALU encoding (Add 000, Subtract 001, And
010, Or 110, Slt 111). That encoding is inconsistent with the truth table
and the equations, and it is not used.

## Next PC (`ifetch`)

The PC register stores a word address, so bits 1:0 of `pc` are always 00.
Three candidates are formed every cycle:

* `PC + 4`
* `PC + 4 + SignExt(imm16) * 4`, used when nPC_sel = 1. The branch adder
  has its own sign extension.
* `{(PC + 4)[31:28], target, 00}`, used when Jump = 1. Jump takes priority
  over nPC_sel, but the control never raises both.

## Choices made in this design

The source gives the instruction set, the datapath structure and the
control logic. It leaves the following open, and this design chooses:

* **Clock edge.** One clock, and all state updates on its rising edge.
* **Reset.** `rst_n` is active-low and synchronous. It sets PC to
  `RESET_PC` (default 0) and clears all 32 registers. Register-file and
  data-memory writes are blocked while reset is low. Memory contents are
  not reset.
* **Register 0.** It reads as 0 and ignores writes, as in MIPS.
* **Memories.** Instruction and data memories of `IMEM_WORDS` and
  `DMEM_WORDS` words (default 1024 each, i.e. 4 KiB). Reads are
  combinational. Accesses are word-only: address bits 1:0 are ignored and
  higher bits wrap modulo the memory size. The program is loaded through a
  write port of the instruction memory (`imem_we`, `imem_waddr`,
  `imem_wdata`) while reset is held.
* **Jump.** The jump target formula is the MIPS one. The source's full
  processor drawing with the jump path is not reproduced, so this path is
  the least directly sourced part of the design.
* **ALU details.** `slt` compares signed values. Add and subtract wrap, and
  there is no overflow trap. The three unused ALUctr codes produce 0.
* **Observation outputs.** The top exposes the current PC and instruction,
  and the register write (`rf_we`, `rf_waddr`, `rf_wdata`) and store
  (`dm_we`, `dm_addr`, `dm_wdata`) the instruction will commit at the next
  edge. These are existing datapath nets, brought out so the processor can
  be checked from outside.

Two lines of the control summary in the source are inconsistent with the
rest of the material:

* `ori` is written with "+". It is an OR.
* `sw` stores "R[rs]". It stores R[rt].

The design follows the datapath in both cases.

## Files

| file | contents |
|------|----------|
| `rtl/mips_pkg.sv` | op/func codes, ALUctr enum, ALUop codes, `main_ctrl_t` struct |
| `rtl/single_cycle_cpu.sv` | top: `ifetch` + `control_unit` + `datapath` |
| `rtl/ifetch.sv` | PC, next-PC logic, instantiates `inst_mem` |
| `rtl/inst_mem.sv` | instruction memory with load port |
| `rtl/control_unit.sv` | `main_control` + `alu_control`, nPC_sel |
| `rtl/main_control.sv` | PLA decode of op |
| `rtl/alu_control.sv` | ALUctr equations |
| `rtl/datapath.sv` | register file, extender, muxes, ALU, data memory |
| `rtl/register_file.sv`, `rtl/extender.sv`, `rtl/alu.sv`, `rtl/data_mem.sv` | datapath units |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and calls
`$finish`. Each also has a watchdog that fails the run if it hangs. For
example, the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_single_cycle_cpu rtl/mips_pkg.sv tb/tb_single_cycle_cpu.sv
./obj_dir/Vtb_single_cycle_cpu
```

Swap in another `tb_<module>` to test a single unit. The simulator is
two-state, so any state read before it is written must be reset or
initialised. The testbenches take care of this, for example by clearing
the data words a program reads.

`tb_single_cycle_cpu` runs the processor at its default sizes and checks
it against an instruction-level reference model in lockstep. Every cycle
the PC, the instruction, the register write and the store must match the
model. The program is built inside the testbench and has three parts:

* stores that clear the data area;
* a directed count-down loop (backward `j`, taken and not-taken `beq`),
  a store/load round trip, a negative load offset, `slt`, and a write to
  register 0;
* 700 random instructions with forward branches and jumps.

It counts each instruction kind, both branch outcomes, jumps and ignored
register-0 writes, and fails if any of them never happened. About 690
instructions retire in as many cycles.

The unit testbenches use the following checks:

* The extender and the ALU control are checked exhaustively.
* The main control is checked over all 64 op codes.
* The ALU is checked on corner and random operands for every ALUctr code.
* The register file, memories, fetch unit and datapath are checked
  against small array models.
