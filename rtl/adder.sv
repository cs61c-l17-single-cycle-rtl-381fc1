// adder: N-bit ripple-carry adder with CarryIn and CarryOut.
//
// The adder symbol of the datapath (inputs A, B, CarryIn; outputs Sum, CarryOut) built as a
// chain of N one-bit full adders, the carry of bit i feeding bit i+1. Combinational: the
// delay grows with N, one full-adder delay per bit. The ripple structure is the textbook
// construction; a faster carry scheme could replace it without changing the interface.
module adder #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N:0] carry;
  assign carry[0] = cin;
  assign cout     = carry[N];

  for (genvar i = 0; i < N; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (carry[i]),
      .sum (sum[i]),
      .cout(carry[i+1])
    );
  end
endmodule
