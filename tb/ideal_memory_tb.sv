// ideal_memory_tb: self-checking test of the idealized memory against an array model:
// combinational read of the addressed word, write on the rising edge only when Write
// Enable is 1, byte address with the two low bits ignored.
module ideal_memory_tb;
  localparam int unsigned WORDS = 64;
  logic        clk = 0, we;
  logic [31:0] addr, din, dout;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0, cycles = 0;

  ideal_memory #(.WORDS(WORDS)) dut (.clk(clk), .we(we), .addr(addr), .din(din), .dout(dout));

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
    for (int w = 0; w < WORDS; w++) begin
      we = 1; addr = 32'(w * 4); din = $urandom;
      @(posedge clk); #1;
      model[w] = din;
    end
    for (int i = 0; i < 3000; i++) begin
      we = 1'($urandom); din = $urandom;
      addr = {24'h0, 6'($urandom), 2'($urandom)};
      #1;
      checks++;
      if (dout !== model[addr[7:2]]) begin
        failures++; $display("FAIL read addr=%h dout=%h exp %h", addr, dout, model[addr[7:2]]);
      end
      @(posedge clk); #1;
      if (we) model[addr[7:2]] = din;
      checks++;
      if (dout !== model[addr[7:2]]) begin
        failures++; $display("FAIL after edge addr=%h we=%b dout=%h exp %h", addr, we, dout, model[addr[7:2]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
