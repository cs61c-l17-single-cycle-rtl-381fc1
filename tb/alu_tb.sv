// alu_tb: self-checking test of the ALU: add, subtract, OR and AND on corner and random
// operands, and the Equal output (result == 0), including subtracting equal operands as
// the beq test does.
module alu_tb;
  import mips_lite_pkg::*;
  logic [31:0] a, b, result, exp;
  alu_ctr_e    ctr;
  logic        equal;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .alu_ctr(ctr), .result(result), .equal(equal));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input alu_ctr_e tc);
    a = ta; b = tb_; ctr = tc;
    #1;
    case (tc)
      ALU_ADD: exp = ta + tb_;
      ALU_SUB: exp = ta - tb_;
      ALU_OR:  exp = ta | tb_;
      default: exp = ta & tb_;
    endcase
    checks++;
    if (result !== exp || equal !== (exp == 0)) begin
      failures++;
      $display("FAIL %s a=%h b=%h got %h eq=%b exp %h", tc.name(), ta, tb_, result, equal, exp);
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
    check(32'd7, 32'd7, ALU_SUB);           // equal operands: Equal = 1
    check(32'd7, 32'd8, ALU_SUB);
    check(32'hFFFF_FFFF, 32'd1, ALU_ADD);   // wraps to zero
    check(32'h1234_0000, 32'h0000_5678, ALU_OR);
    check(32'hF0F0_F0F0, 32'h0F0F_0F0F, ALU_AND);
    // Equal must look at every result bit: results with only one bit set
    for (int k = 0; k < 32; k++) begin
      check(32'd1 << k, 32'd0, ALU_ADD);
      check(32'd1 << k, 32'd0, ALU_OR);
      check((32'd1 << k) + 32'd5, 32'd5, ALU_SUB);
    end
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] ra;
      ra = $urandom;
      check(ra, (i % 7 == 0) ? ra : $urandom, alu_ctr_e'(i % 4));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
