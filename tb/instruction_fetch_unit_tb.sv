// instruction_fetch_unit_tb: self-checking test of the PC and next-address logic.
// After reset PC = 0; each clock PC becomes PC + 4, or PC + 4 + SignExt(imm16) x 4 when
// npc_sel = 1 (forward and backward offsets). The PC must advance exactly once per clock
// and its two low bits must stay 00.
module instruction_fetch_unit_tb;
  logic        clk = 0, rst, npc_sel;
  logic [15:0] imm16;
  logic [31:0] pc, model;
  int checks = 0, failures = 0, cycles = 0;

  instruction_fetch_unit dut (.clk(clk), .rst(rst), .npc_sel(npc_sel), .imm16(imm16), .pc(pc));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; npc_sel = 0; imm16 = 0;
    @(posedge clk); #1;
    rst = 0; model = 0;
    checks++;
    if (pc !== 0) begin failures++; $display("FAIL reset pc=%h", pc); end
    for (int i = 0; i < 3000; i++) begin
      npc_sel = ($urandom % 4) == 0;
      imm16   = (i % 3 == 0) ? 16'($signed(-($urandom % 40))) : 16'($urandom);
      @(posedge clk); #1;
      model = model + 4 + (npc_sel ? {{14{imm16[15]}}, imm16, 2'b00} : 32'd0);
      checks++;
      if (pc !== model || pc[1:0] !== 2'b00) begin
        failures++;
        $display("FAIL step %0d npc_sel=%b imm16=%h pc=%h exp %h", i, npc_sel, imm16, pc, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
