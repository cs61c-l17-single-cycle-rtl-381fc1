// register_file: 32 registers of 32 bits with two read ports and one write port.
//
// Reads are combinational: ra selects the register driven on busa and rb the one on busb,
// valid one access time after the address. The clock matters only for writes: at the rising
// edge, when we = 1, busw is written into register rw. A register read in the same cycle it
// is written shows the old value until the edge, so an instruction may name the same
// register as source and destination.
//
// Register 0 reads as zero and ignores writes when ZERO_R0 = 1 (the MIPS convention; the
// default here). Registers have no reset; software writes them before use.
module register_file
  import mips_lite_pkg::*;
#(
  parameter int unsigned NREGS   = 32,
  parameter int unsigned XLEN_P  = XLEN,
  parameter bit          ZERO_R0 = 1'b1,
  localparam int unsigned AW     = $clog2(NREGS)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     ra,
  input  logic [AW-1:0]     rb,
  input  logic [AW-1:0]     rw,
  input  logic [XLEN_P-1:0] busw,
  output logic [XLEN_P-1:0] busa,
  output logic [XLEN_P-1:0] busb
);
  logic [XLEN_P-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (we && !(ZERO_R0 && rw == '0)) regs[rw] <= busw;
  end

  always_comb begin
    busa = (ZERO_R0 && ra == '0) ? '0 : regs[ra];
    busb = (ZERO_R0 && rb == '0) ? '0 : regs[rb];
  end
endmodule
