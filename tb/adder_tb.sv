// adder_tb: self-checking test of the N-bit ripple-carry adder.
// Drives corner cases (all ones plus carry-in, zero, alternating bits) and random operands,
// and compares sum and carry out with a 33-bit reference addition.
module adder_tb;
  localparam int unsigned N = 32;
  logic [N-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic check(input logic [N-1:0] ta, input logic [N-1:0] tb_, input logic tc);
    logic [N:0] exp;
    a = ta; b = tb_; cin = tc;
    #1;
    exp = {1'b0, ta} + {1'b0, tb_} + (N+1)'(tc);
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b got %b_%h exp %h", ta, tb_, tc, cout, sum, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, '0, 0);
    check('1, '0, 1);
    check('1, '1, 1);
    check(32'hAAAA_AAAA, 32'h5555_5555, 1);
    check(32'h8000_0000, 32'h8000_0000, 0);
    for (int i = 0; i < 2000; i++) check($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
