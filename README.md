# MIPS-lite single-cycle datapath

A processor that finishes every instruction in exactly one clock cycle. The program
counter, register file and data memory are all written at the same rising clock edge. In
between, the instruction is fetched and its operands are read. The ALU computes, memory is
read, and the result settles on the write bus, all through combinational logic. The clock
period must be longer than the slowest of these paths, which is the load-word path
(instruction memory, register file, ALU, data memory, write-back mux).

The datapath runs six instructions, a subset of MIPS:

| instruction        | register transfer (then PC ← PC + 4, unless a branch is taken) |
|--------------------|--------------------------------------------------------------|
| `addu rd, rs, rt`  | R[rd] ← R[rs] + R[rt]                                        |
| `subu rd, rs, rt`  | R[rd] ← R[rs] − R[rt]                                        |
| `ori rt, rs, imm16`| R[rt] ← R[rs] \| ZeroExt(imm16)                              |
| `lw rt, imm16(rs)` | R[rt] ← MEM[R[rs] + SignExt(imm16)]                          |
| `sw rt, imm16(rs)` | MEM[R[rs] + SignExt(imm16)] ← R[rt]                          |
| `beq rs, rt, imm16`| if R[rs] = R[rt]: PC ← PC + 4 + SignExt(imm16)·4            |

Instructions are 32 bits. R-type: `op[31:26] rs[25:21] rt[20:16] rd[15:11] shamt[10:6]
funct[5:0]`. I-type: `op rs rt imm16[15:0]`.

## What is and is not in the RTL

The RTL contains the **datapath** only. The **control unit** is not included. The control
unit decodes `op`/`funct` into the control points and combines `beq` with the Equal
condition. The datapath takes the control points in on one struct port and gives out the
instruction word and `equal`, so a controller can be attached outside it. The testbench
includes a controller written as plain behavioural code. It uses the standard MIPS opcodes
(R-type `op=0` with `funct` 0x21 `addu` and 0x23 `subu`; `ori` 0x0d, `lw` 0x23, `sw` 0x2b,
`beq` 0x04). That controller can serve as a reference for writing a real one.

## Datapath structure

```
            +------ nPC_sel                         RegDst  RegWr        ALUctr   MemWr  MemtoReg
            v                                          |      |            |        |       |
  +-----+  +---+  +----+  Adr +-------+  Rs,Rt,Rd   +-----+ +---------+  busA  +-----+  +------+  +---+
  |+4   |->|mux|->| PC |----->| inst  |------------>|1  0 |>|Rw  32x32|------->|     |->| data |->| 1 |
  |+br  |  +---+  +----+      |  mem  |  imm16      +-----+ |Ra  regs |  busB  | ALU |  | mem  |  |mux|--> busW
  +-----+                     +-------+    |                |Rb       |--+---->|     |  +------+  | 0 |
                                           v                +---------+  |  B   +-----+--------+->+---+
                                      [Extender]-------------------------+-[ALUSrc mux]  result
                                        ExtOp                                        equal --> control
```

| signal (`ctrl_t` field) | 0                         | 1                                 |
|-------------------------|---------------------------|-----------------------------------|
| `npc_sel`               | PC + 4                    | PC + 4 + SignExt(imm16)·4         |
| `reg_wr`                | no register write         | write busW into register Rw       |
| `reg_dst`               | Rw = rt                   | Rw = rd                           |
| `ext_op`                | zero-extend imm16         | sign-extend imm16                 |
| `alu_src`               | ALU B = busB              | ALU B = extended imm16            |
| `mem_wr`                | no memory write           | MEM[ALU result] ← busB            |
| `mem_to_reg`            | busW = ALU result         | busW = data-memory output         |
| `alu_ctr` (2 bits)      | `00` add, `01` subtract, `10` OR, `11` AND |                  |

These are the control-point settings for each instruction, as the testbench's controller
applies them. `x` means "don't care":

| instr | npc_sel      | reg_wr | reg_dst | ext_op | alu_src | alu_ctr | mem_wr | mem_to_reg |
|-------|--------------|--------|---------|--------|---------|---------|--------|------------|
| addu  | 0            | 1      | 1       | x      | 0       | add     | 0      | 0          |
| subu  | 0            | 1      | 1       | x      | 0       | sub     | 0      | 0          |
| ori   | 0            | 1      | 0       | 0      | 1       | or      | 0      | 0          |
| lw    | 0            | 1      | 0       | 1      | 1       | add     | 0      | 1          |
| sw    | 0            | 0      | x       | 1      | 1       | add     | 1      | x          |
| beq   | `equal`      | 0      | x       | x      | 0       | sub     | 0      | x          |

How `beq` works: the ALU subtracts busB from busA, and `equal` is 1 when the result is zero.
The branch target does not go through the ALU. The instruction fetch unit computes it with
its own adder, as (PC + 4) + (SignExt(imm16) << 2). The main ALU is therefore free for the
comparison.

## Timing of one cycle

1. The rising edge loads the new PC. The instruction memory then shows the new instruction
   after its access time.
2. The instruction fields reach the register file's read addresses and the external
   control. The control points settle.
3. busA and busB become valid after the register file's access time. The extender and the
   ALUSrc mux settle, then the ALU.
4. For `lw`, the data memory is read combinationally at the ALU result. The MemtoReg mux
   drives busW.
5. The next rising edge writes the register file (RegWr), the data memory (MemWr) and the
   PC, all at the same moment.

The write happens only at the edge, so an instruction can name the same register as source
and destination (`addu r1, r1, r2`). Every read in the cycle sees the old value.

## Modules

| file | what it is |
|------|------------|
| `rtl/mips_lite_pkg.sv` | package with `alu_ctr_e` (ALUctr encoding), `rtype_t` (instruction fields) and `ctrl_t` (control bundle) |
| `rtl/single_cycle_datapath.sv` | top: the whole datapath |
| `rtl/instruction_fetch_unit.sv` | PC register, the PC+4 adder, the branch-target adder and the nPC_sel mux |
| `rtl/register_file.sv` | 32 × 32-bit registers, two combinational read ports, one write port clocked on the edge. Register 0 reads as zero |
| `rtl/alu.sv` | one adder-subtractor and OR/AND gate arrays, selected by a 4-input `mux_tree`. `equal` = (result == 0) |
| `rtl/adder_subtractor.sv` | b XOR sub (a conditional inverter) into an adder whose carry-in is `sub` |
| `rtl/adder.sv` | N-bit ripple-carry adder with carry-in and carry-out |
| `rtl/full_adder.sv` | one-bit full adder |
| `rtl/mux2.sv` | 2-input mux of width W |
| `rtl/mux_tree.sv` | 2^S-input mux of N-bit words, built as a tree of `mux2` |
| `rtl/extender.sv` | 16 → 32-bit zero or sign extension (ExtOp) |
| `rtl/en_register.sv` | N-bit register with write enable and synchronous reset |
| `rtl/ideal_memory.sv` | word memory with combinational read and clocked write. Used as both instruction memory and data memory |

### Top-level ports (`single_cycle_datapath`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock. All state changes on its rising edge |
| `rst` | in | 1 | synchronous reset. Sets PC to 0 |
| `ctrl` | in | `ctrl_t` (9 bits) | control points, see the table above |
| `instruction` | out | 32 | instruction at the current PC, for the controller |
| `equal` | out | 1 | ALU result is zero |
| `pc` | out | 32 | current instruction address |
| `imem_we`, `imem_waddr`, `imem_wdata` | in | 1, 32, 32 | writes a word into the instruction memory, for loading a program. While `imem_we` is high, `imem_waddr` addresses the instruction memory instead of the PC |

Parameters: `IMEM_WORDS = 1024` and `DMEM_WORDS = 1024`, each a size in 32-bit words.
Memory addresses are byte addresses. The two low bits are ignored, and an address wraps
modulo the memory size.

## Design choices beyond the textbook datapath

These details are this design's own choices. Change them freely:

- **Clock edge.** All storage is written on the rising edge.
- **Reset.** Only the PC is reset, to 0. Registers and memories start undefined, and
  software (or the testbench) writes them before reading.
- **Register 0** is hard-wired to zero, as in MIPS. Set `ZERO_R0 = 0` on
  `register_file` to get 32 ordinary registers.
- **PC storage.** Instructions are word aligned, so only PC[31:2] is stored and PC[1:0] is
  always `00`.
- **Memory size.** 1024 words each. The idealized memory has no natural size.
- **ALUctr** is 2 bits. A fourth operation, AND, fills the spare mux input. Set-less-than
  is not provided.
- **Program loading.** The instruction memory gets a write port, used for loading
  programs.
- **Adder.** Ripple carry. It is the slowest possible adder: about 32 full-adder delays
  for each 32-bit add. A faster carry scheme can replace it behind the same ports.
- **Equal.** Some drawings of this datapath compute the `beq` condition with a separate
  comparator on busA and busB. Here the ALU's zero detect does it: `beq` sets ALUctr to
  subtract.
- **Write-back select name.** The write-back mux select is called MemtoReg. Some
  presentations call it W_Src.
- **Equal.** Some drawings of this datapath compute the `beq` condition with a separate
  comparator on busA and busB. Here the ALU's zero detect does it: `beq` sets ALUctr to
  subtract.
- **Write-back select name.** The write-back mux select is called MemtoReg. Some
  presentations call it W_Src.
- **No delays.** Memory and register-file "access time" are not modelled. Reads are
  zero-delay combinational logic.

## Verification

Each module has a self-checking testbench in `tb/<module>_tb.sv`. Each compares the module
against an independent reference, and each prints `TB_RESULT checks=N failures=M`.

`tb/single_cycle_datapath_tb.sv` runs the whole datapath at its default sizes. It generates
three programs of about 740 instructions each. Each program sets every register, runs a
counted loop closed by a backward `beq`, then runs a random mix of all six instructions,
including forward branches both taken and not taken. The program is loaded through the
load port while reset is held. The program then runs to a `beq r0, r0, -1` halt. An
instruction-level reference model runs alongside. The testbench checks the PC on every
cycle. It checks that the cycle count equals the instruction count (one instruction per
clock). At the end it checks every register and every data-memory word. It also counts each
mechanism and fails if any never occurred: every instruction, taken and untaken `beq`,
backward branches, destination = source, and writes to register 0.

Running a testbench with Verilator, from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl --top-module single_cycle_datapath_tb \
    rtl/mips_lite_pkg.sv tb/single_cycle_datapath_tb.sv -o sim
./obj_dir/sim +verilator+rand+reset+2
```

For a single block, swap in its testbench. `-y rtl` lets Verilator find each module in
`rtl/<module>.sv`. The package has to be listed first. Because of
`+verilator+rand+reset+2`, state that is not reset starts random, the way real hardware
powers up. The testbenches do not depend on it.
