// register_file_tb: self-checking test of the 32 x 32 register file against an array
// model. Checks two simultaneous combinational reads, the write of a third register in the
// same cycle, that a write shows only after the clock edge (reading the register being
// written returns the old value), that Write Enable = 0 writes nothing, and that
// register 0 stays zero.
module register_file_tb;
  logic        clk = 0, we;
  logic [4:0]  ra, rb, rw;
  logic [31:0] busw, busa, busb;
  logic [31:0] model [32];
  int checks = 0, failures = 0, cycles = 0;

  register_file dut (.clk(clk), .we(we), .ra(ra), .rb(rb), .rw(rw), .busw(busw), .busa(busa), .busb(busb));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    checks++;
    if (busa !== model[ra] || busb !== model[rb]) begin
      failures++;
      $display("FAIL ra=%0d busa=%h exp %h rb=%0d busb=%h exp %h", ra, busa, model[ra], rb, busb, model[rb]);
    end
  endtask

  initial begin
    // fill every register (register 0 write is ignored)
    model[0] = '0;
    for (int r = 0; r < 32; r++) begin
      we = 1; rw = 5'(r); busw = $urandom; ra = 0; rb = 0;
      @(posedge clk); #1;
      if (r != 0) model[r] = busw;
    end
    for (int i = 0; i < 3000; i++) begin
      we = 1'($urandom); ra = 5'($urandom); rb = 5'($urandom); busw = $urandom;
      rw = (i % 5 == 0) ? ra : 5'($urandom);  // often write a register being read
      #1;
      check_reads();  // before the edge: old values
      @(posedge clk); #1;
      if (we && rw != 0) model[rw] = busw;
      check_reads();  // after the edge: new value visible
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
