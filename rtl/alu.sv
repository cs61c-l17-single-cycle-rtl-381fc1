// alu: 32-bit ALU of the MIPS-lite datapath, with an Equal (zero) output.
//
// The ALU is a multiplexer in front of basic blocks: one adder-subtractor produces a + b or
// a - b, two gate arrays produce a | b and a & b, and a 4-input mux_tree selected by ALUctr
// picks the result. equal is 1 when the result is all zeros, so subtracting two operands
// gives the beq test a == b.
//
// alu_ctr (mips_lite_pkg::alu_ctr_e): ADD 00, SUB 01, OR 10, AND 11. The operation set add,
// subtract, OR and the zero test is what the MIPS-lite subset needs; AND fills the fourth
// mux input. The encoding is this design's own. Set-less-than, found in fuller MIPS ALUs,
// is not provided. Some drawings of this datapath use a separate equality comparator on
// busA/busB for beq; here the ALU's zero detect serves instead. The adder-subtractor's
// carry out is left unused: none of the operations needs it. Combinational, no clock.
module alu
  import mips_lite_pkg::*;
#(
  parameter int unsigned XLEN_P = XLEN
) (
  input  logic [XLEN_P-1:0] a,
  input  logic [XLEN_P-1:0] b,
  input  alu_ctr_e          alu_ctr,
  output logic [XLEN_P-1:0] result,
  output logic              equal
);
  logic [XLEN_P-1:0] addsub_y, or_y, and_y;
  logic              addsub_cout;  // carry out is not used by the MIPS-lite operations
  logic              do_sub;

  always_comb begin
    do_sub = (alu_ctr == ALU_SUB);
    or_y   = a | b;
    and_y  = a & b;
  end

  adder_subtractor #(.N(XLEN_P)) u_addsub (
    .a   (a),
    .b   (b),
    .sub (do_sub),
    .y   (addsub_y),
    .cout(addsub_cout)
  );

  mux_tree #(.S(2), .N(XLEN_P)) u_sel (
    .sel(alu_ctr),
    .d  ({and_y, or_y, addsub_y, addsub_y}),  // index 3..0 = AND, OR, SUB, ADD
    .y  (result)
  );

  always_comb equal = (result == '0);
endmodule
