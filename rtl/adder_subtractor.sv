// adder_subtractor: N-bit adder-subtractor.
//
// y = a + b when sub = 0 and y = a - b when sub = 1. Every bit of b passes through an XOR
// with sub, which acts as a conditional inverter, and sub is also the adder's carry-in, so
// a - b is computed as a + ~b + 1 on one N-bit ripple adder. cout is the adder's carry out
// (for subtraction it is 1 when no borrow occurs). Combinational. This is the classic
// XOR-conditional-inverter construction.
module adder_subtractor #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         sub,
  output logic [N-1:0] y,
  output logic         cout
);
  logic [N-1:0] b_cond;  // b, inverted when subtracting

  always_comb b_cond = b ^ {N{sub}};

  adder #(.N(N)) u_add (
    .a   (a),
    .b   (b_cond),
    .cin (sub),
    .sum (y),
    .cout(cout)
  );
endmodule
