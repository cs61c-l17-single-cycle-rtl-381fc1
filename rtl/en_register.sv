// en_register: N-bit register with Write Enable.
//
// Like a bank of D flip-flops: at the rising clock edge, q takes d when we = 1 and keeps
// its value when we = 0. A synchronous reset (rst = 1 at the edge) loads RESET_VALUE; the
// reset is this design's addition so that the PC starts at a known address. q changes only
// at the clock edge, one clock-to-Q delay after it.
module en_register #(
  parameter int unsigned  N           = 32,
  parameter logic [N-1:0] RESET_VALUE = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         we,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst)     q <= RESET_VALUE;
    else if (we) q <= d;
  end
endmodule
