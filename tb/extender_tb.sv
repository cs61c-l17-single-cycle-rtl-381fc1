// extender_tb: self-checking test of zero and sign extension of a 16-bit immediate.
module extender_tb;
  logic [15:0] imm;
  logic        ext_op;
  logic [31:0] y, exp;
  int checks = 0, failures = 0;

  extender dut (.imm(imm), .ext_op(ext_op), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      imm    = (i < 4) ? 16'(32'h8000 >> i) : 16'($urandom);
      ext_op = 1'(i);
      #1;
      exp = ext_op ? 32'(signed'(imm)) : {16'h0000, imm};
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL imm=%h ext_op=%b y=%h exp %h", imm, ext_op, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
