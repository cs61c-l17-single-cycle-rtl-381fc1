// mux2_tb: self-checking test of the two-input multiplexer at the 32-bit width used for
// data and the 5-bit width used for register specifiers.
module mux2_tb;
  logic        sel;
  logic [31:0] a, b, y;
  logic [4:0]  a5, b5, y5;
  int checks = 0, failures = 0;

  mux2 #(.W(32)) dut   (.sel(sel), .a(a), .b(b), .y(y));
  mux2 #(.W(5))  dut5  (.sel(sel), .a(a5), .b(b5), .y(y5));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      a = $urandom; b = $urandom; a5 = 5'($urandom); b5 = 5'($urandom); sel = 1'(i);
      #1;
      checks++;
      if (y !== (sel ? b : a) || y5 !== (sel ? b5 : a5)) begin
        failures++;
        $display("FAIL sel=%b a=%h b=%h y=%h", sel, a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
