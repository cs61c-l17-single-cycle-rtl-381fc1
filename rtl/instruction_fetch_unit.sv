// instruction_fetch_unit: program counter and next-address logic.
//
// The PC is loaded at every rising clock edge. One adder forms PC + 4; a second adds the
// branch offset to PC + 4, the offset being "PC Ext"(imm16) = SignExt(imm16) x 4, i.e. the
// sign-extended word offset with two zero bits appended. npc_sel selects the next PC:
//   npc_sel = 0: PC <- PC + 4
//   npc_sel = 1: PC <- PC + 4 + SignExt(imm16) x 4   (taken beq)
// Instructions are word aligned, so the two low PC bits are always 00 and only bits 31:2
// are stored. npc_sel and imm16 are sampled at the edge that ends the instruction's cycle;
// pc changes just after that edge. rst (synchronous, this design's addition) sets PC to 0.
// The two dedicated adders (so the main ALU is not used for PC + 4) follow the classic
// single-cycle datapath; their carry outs are unused because the PC wraps.
module instruction_fetch_unit
  import mips_lite_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            npc_sel,
  input  logic [15:0]     imm16,
  output logic [XLEN-1:0] pc
);
  logic [XLEN-3:0] pc_hi;        // stored PC bits 31:2
  logic [XLEN-1:0] pc_plus4, br_offset, br_target, next_pc;
  logic            cout_seq, cout_br;  // carries out of the PC adders wrap, unused

  assign pc = {pc_hi, 2'b00};

  // PC Ext: sign extend and multiply by 4
  always_comb br_offset = {{(XLEN-18){imm16[15]}}, imm16, 2'b00};

  adder #(.N(XLEN)) u_add_seq (
    .a(pc), .b(XLEN'(4)), .cin(1'b0), .sum(pc_plus4), .cout(cout_seq)
  );

  adder #(.N(XLEN)) u_add_br (
    .a(pc_plus4), .b(br_offset), .cin(1'b0), .sum(br_target), .cout(cout_br)
  );

  mux2 #(.W(XLEN)) u_npc_mux (
    .sel(npc_sel), .a(pc_plus4), .b(br_target), .y(next_pc)
  );

  en_register #(.N(XLEN-2), .RESET_VALUE('0)) u_pc (
    .clk(clk), .rst(rst), .we(1'b1), .d(next_pc[XLEN-1:2]), .q(pc_hi)
  );
endmodule
