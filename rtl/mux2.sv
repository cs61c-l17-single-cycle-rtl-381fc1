// mux2: two-input multiplexer of W-bit words. y = a when sel = 0, y = b when sel = 1.
// The input width is independent of the single select bit. Combinational. It is the mux
// symbol used throughout the datapath; input 0 / input 1 match the 0 and 1 labels of the
// RegDst, ALUSrc and MemtoReg muxes.
module mux2 #(
  parameter int unsigned W = 32
) (
  input  logic         sel,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  always_comb y = sel ? b : a;
endmodule
