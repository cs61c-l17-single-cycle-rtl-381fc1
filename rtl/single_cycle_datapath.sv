// single_cycle_datapath: MIPS-lite datapath that executes one instruction per clock.
//
// Supported register transfers (all also do PC <- PC + 4 unless a beq is taken):
//   addu rd,rs,rt     R[rd] <- R[rs] + R[rt]
//   subu rd,rs,rt     R[rd] <- R[rs] - R[rt]
//   ori  rt,rs,imm16  R[rt] <- R[rs] | ZeroExt(imm16)
//   lw   rt,rs,imm16  R[rt] <- MEM[R[rs] + SignExt(imm16)]
//   sw   rt,rs,imm16  MEM[R[rs] + SignExt(imm16)] <- R[rt]
//   beq  rs,rt,imm16  if R[rs] == R[rt]: PC <- PC + 4 + SignExt(imm16) x 4
//
// Structure: the instruction fetch unit holds the PC and addresses the instruction memory.
// Rs (bits 25:21) and Rt (20:16) address the register file read ports; the RegDst mux
// chooses Rt or Rd (15:11) as the write register. busA feeds ALU input A; the ALUSrc mux
// chooses busB or the extended imm16 for input B. The ALU result is the data-memory address
// and, through the MemtoReg mux, the alternative to the memory output on busW. busB is the
// data-memory write data. The ALU's Equal output is the branch condition.
//
// Control is not part of this module: the control points arrive on `ctrl` (one bundle,
// mips_lite_pkg::ctrl_t) and the decoded instruction and Equal go out so an external
// controller can derive them. nPC_sel must already include the branch condition
// (beq AND equal).
//
// Timing: all state (PC, registers, data memory) is written at the same rising clock edge.
// During the cycle the new PC reaches the instruction memory, the fields reach the register
// file and the controller, busA/busB and the ALU settle, and the register or memory write
// happens at the next edge; the clock period must cover this longest path. The imem_*
// port loads the instruction memory (a program-loading path this design adds).
//
// The block structure, mux polarities and control-point names are those of the classic
// MIPS single-cycle datapath. Rising-edge clocking, the PC-only reset, the 1024-word memory
// sizes, the ALUctr encoding and the load port are this design's choices. Instruction bits
// that the datapath does not use (op, shamt, funct) go out on `instruction` for control.
module single_cycle_datapath
  import mips_lite_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic            clk,
  input  logic            rst,
  input  ctrl_t           ctrl,
  output logic [XLEN-1:0] instruction,
  output logic            equal,
  output logic [XLEN-1:0] pc,
  input  logic            imem_we,
  input  logic [XLEN-1:0] imem_waddr,
  input  logic [XLEN-1:0] imem_wdata
);
  rtype_t            f;           // instruction fields
  logic [XLEN-1:0]   imem_addr;
  logic [REG_AW-1:0] rw;
  logic [XLEN-1:0]   busa, busb, busw;
  logic [XLEN-1:0]   ext_imm, alu_b, alu_result, dmem_dout;

  // ---- instruction fetch -------------------------------------------------------------
  instruction_fetch_unit u_ifu (
    .clk(clk), .rst(rst), .npc_sel(ctrl.npc_sel), .imm16(instruction[15:0]), .pc(pc)
  );

  // While loading, the load address drives the instruction memory.
  mux2 #(.W(XLEN)) u_imem_addr_mux (
    .sel(imem_we), .a(pc), .b(imem_waddr), .y(imem_addr)
  );

  ideal_memory #(.WORDS(IMEM_WORDS)) u_imem (
    .clk(clk), .we(imem_we), .addr(imem_addr), .din(imem_wdata), .dout(instruction)
  );

  assign f = rtype_t'(instruction);

  // ---- register read and write -------------------------------------------------------
  mux2 #(.W(REG_AW)) u_regdst_mux (
    .sel(ctrl.reg_dst), .a(f.rt), .b(f.rd), .y(rw)
  );

  register_file u_rf (
    .clk(clk), .we(ctrl.reg_wr), .ra(f.rs), .rb(f.rt), .rw(rw),
    .busw(busw), .busa(busa), .busb(busb)
  );

  // ---- execute -----------------------------------------------------------------------
  extender #(.IN_W(16), .OUT_W(XLEN)) u_ext (
    .imm(instruction[15:0]), .ext_op(ctrl.ext_op), .y(ext_imm)
  );

  mux2 #(.W(XLEN)) u_alusrc_mux (
    .sel(ctrl.alu_src), .a(busb), .b(ext_imm), .y(alu_b)
  );

  alu u_alu (
    .a(busa), .b(alu_b), .alu_ctr(ctrl.alu_ctr), .result(alu_result), .equal(equal)
  );

  // ---- data memory and write back ----------------------------------------------------
  ideal_memory #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk(clk), .we(ctrl.mem_wr), .addr(alu_result), .din(busb), .dout(dmem_dout)
  );

  mux2 #(.W(XLEN)) u_memtoreg_mux (
    .sel(ctrl.mem_to_reg), .a(alu_result), .b(dmem_dout), .y(busw)
  );
endmodule
