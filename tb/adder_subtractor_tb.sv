// adder_subtractor_tb: self-checking test of the adder-subtractor.
// For sub = 0 and sub = 1 compares y with a + b or a - b and cout with the carry of
// a + ~b + 1 (1 when a >= b unsigned), on corner and random operands.
module adder_subtractor_tb;
  localparam int unsigned N = 32;
  logic [N-1:0] a, b, y;
  logic         sub, cout;
  int checks = 0, failures = 0;

  adder_subtractor dut (.a(a), .b(b), .sub(sub), .y(y), .cout(cout));

  task automatic check(input logic [N-1:0] ta, input logic [N-1:0] tb_, input logic ts);
    logic [N-1:0] ey;
    logic         ec;
    a = ta; b = tb_; sub = ts;
    #1;
    if (ts) begin
      ey = ta - tb_;
      ec = (ta >= tb_);
    end else begin
      {ec, ey} = {1'b0, ta} + {1'b0, tb_};
    end
    checks++;
    if (y !== ey || cout !== ec) begin
      failures++;
      $display("FAIL a=%h b=%h sub=%b got %b_%h exp %b_%h", ta, tb_, ts, cout, y, ec, ey);
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
    check(5, 3, 1);
    check(3, 5, 1);
    check(0, 0, 1);
    check('1, 1, 0);
    check(32'h8000_0000, 1, 1);
    for (int i = 0; i < 2000; i++) check($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
