// extender: widens the 16-bit immediate to 32 bits.
//
// ext_op = 0: zero extension (ori); ext_op = 1: sign extension (lw, sw, beq address
// arithmetic). One control bit selects which, as the ExtOp input of the datapath.
// The polarity (1 = sign) is this design's choice. Combinational.
module extender #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 32
) (
  input  logic [IN_W-1:0]  imm,
  input  logic             ext_op,
  output logic [OUT_W-1:0] y
);
  always_comb y = {{(OUT_W-IN_W){ext_op & imm[IN_W-1]}}, imm};
endmodule
