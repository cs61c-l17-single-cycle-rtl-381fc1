// ideal_memory: idealized word memory with one input bus and one output bus.
//
// addr is a byte address; the word it selects is addr[AW+1:2] (the two low bits are
// ignored, accesses are word aligned, and addresses wrap modulo WORDS words). Reading is
// combinational: dout shows the addressed word one access time after addr is valid. The
// clock matters only for writes: at the rising edge, when we = 1, din is written into the
// addressed word. The datapath uses one instance as instruction memory (written only to
// load a program) and one as data memory. WORDS is this design's choice; the idealized
// memory has no natural size. Contents are not reset. Address bits above the word index
// are unused by design (the memory is smaller than the 4 GiB address space).
module ideal_memory #(
  parameter int unsigned WORDS = 1024,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic        we,
  input  logic [31:0] addr,
  input  logic [31:0] din,
  output logic [31:0] dout
);
  logic [31:0] mem [WORDS];
  logic [AW-1:0] waddr;

  always_comb waddr = addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= din;
  end

  always_comb dout = mem[waddr];
endmodule
