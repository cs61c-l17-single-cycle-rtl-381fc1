// en_register_tb: self-checking test of the register with Write Enable: reset value, load
// at the rising edge when we = 1, hold when we = 0, and no change between edges.
module en_register_tb;
  localparam int unsigned N = 32;
  logic         clk = 0, rst, we;
  logic [N-1:0] d, q, model;
  int checks = 0, failures = 0, cycles = 0;

  en_register #(.N(N), .RESET_VALUE(32'hBFC0_0000)) dut (.clk(clk), .rst(rst), .we(we), .d(d), .q(q));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; d = $urandom;
    @(posedge clk); #1;
    model = 32'hBFC0_0000;
    checks++;
    if (q !== model) begin failures++; $display("FAIL reset q=%h", q); end
    rst = 0;
    for (int i = 0; i < 1000; i++) begin
      we = 1'($urandom);
      d  = $urandom;
      #2;  // before the edge the output still holds the old value
      checks++;
      if (q !== model) begin failures++; $display("FAIL early change q=%h exp %h", q, model); end
      @(posedge clk); #1;
      if (we) model = d;
      checks++;
      if (q !== model) begin failures++; $display("FAIL we=%b q=%h exp %h", we, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
