// mips_lite_pkg: types and constants shared by the MIPS-lite single-cycle datapath.
//
// The instruction formats (R-type: op rs rt rd shamt funct; I-type: op rs rt imm16) and
// their bit positions follow the MIPS formats. The ALUctr encoding and the grouping of the
// control points into one struct are choices of this design; the control points
// themselves (nPC_sel, RegWr, RegDst, ExtOp, ALUSrc, ALUctr, MemWr, MemtoReg) are the ones
// the single-cycle datapath exposes.
package mips_lite_pkg;

  localparam int unsigned XLEN   = 32;  // data path and instruction width
  localparam int unsigned REG_AW = 5;   // register specifier width (32 registers)

  // ALUctr encoding (own choice). AND is not needed by the MIPS-lite subset but costs one
  // mux input, so the fourth code selects it.
  typedef enum logic [1:0] {
    ALU_ADD = 2'b00,
    ALU_SUB = 2'b01,
    ALU_OR  = 2'b10,
    ALU_AND = 2'b11
  } alu_ctr_e;

  // Instruction fields, R-type view. The I-type immediate is {rd, shamt, funct}.
  typedef struct packed {
    logic [5:0] op;      // bits 31:26
    logic [4:0] rs;      // bits 25:21
    logic [4:0] rt;      // bits 20:16
    logic [4:0] rd;      // bits 15:11
    logic [4:0] shamt;   // bits 10:6
    logic [5:0] funct;   // bits 5:0
  } rtype_t;

  // Control points of the single-cycle datapath.
  typedef struct packed {
    logic     npc_sel;    // 0: PC+4, 1: PC+4+SignExt(imm16)*4
    logic     reg_wr;     // register file Write Enable
    logic     reg_dst;    // 0: write Rt, 1: write Rd
    logic     ext_op;     // 0: zero extend imm16, 1: sign extend
    logic     alu_src;    // 0: ALU B = busB, 1: ALU B = extended imm16
    alu_ctr_e alu_ctr;    // ALU operation
    logic     mem_wr;     // data memory Write Enable
    logic     mem_to_reg; // 0: busW = ALU result, 1: busW = data memory output
  } ctrl_t;

endpackage
