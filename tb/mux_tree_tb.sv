// mux_tree_tb: self-checking test of the hierarchical multiplexer, at the default 4 inputs
// and at 8 inputs of 5 bits (input width independent of the select width).
module mux_tree_tb;
  logic [1:0]        sel;
  logic [3:0][31:0]  d;
  logic [31:0]       y;
  logic [2:0]        sel8;
  logic [7:0][4:0]   d8;
  logic [4:0]        y8;
  int checks = 0, failures = 0;

  mux_tree #(.S(2), .N(32)) dut  (.sel(sel),  .d(d),  .y(y));
  mux_tree #(.S(3), .N(5))  dut8 (.sel(sel8), .d(d8), .y(y8));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      for (int k = 0; k < 4; k++) d[k] = $urandom;
      for (int k = 0; k < 8; k++) d8[k] = 5'($urandom);
      sel = 2'(i); sel8 = 3'(i / 3);
      #1;
      checks++;
      if (y !== d[sel]) begin
        failures++;
        $display("FAIL S=2 sel=%0d y=%h exp %h", sel, y, d[sel]);
      end
      checks++;
      if (y8 !== d8[sel8]) begin
        failures++;
        $display("FAIL S=3 sel=%0d y=%h exp %h", sel8, y8, d8[sel8]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
