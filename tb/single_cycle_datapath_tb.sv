// single_cycle_datapath_tb: end-to-end test of the MIPS-lite single-cycle datapath at its
// default sizes.
//
// The testbench plays two roles the datapath leaves outside:
//  * the control: it decodes the instruction the datapath presents (standard MIPS opcode
//    and funct values for addu, subu, ori, lw, sw, beq) into the control points and forms
//    nPC_sel = beq AND Equal;
//  * a reference: an instruction-level model with its own register and memory arrays runs
//    the same program and predicts the PC of every cycle and the final register and memory
//    contents.
// Each run generates a program (register initialisation, a counted loop closed by a backward
// beq, and a random body of all six instructions with forward beq), loads it through the
// instruction-memory load port while reset holds the PC at 0, and runs it to a halting
// beq r0,r0,-1. Checks: PC every cycle, one instruction per clock (the cycle count equals
// the dynamic instruction count), all 32 registers and all data memory at the end. The
// mechanisms exercised are counted and each must occur: every instruction, taken and
// untaken beq, a backward branch, a destination register equal to a source, and a write
// to register 0 that must be ignored.
module single_cycle_datapath_tb;
  import mips_lite_pkg::*;

  localparam int unsigned IMEM_WORDS = 1024;  // defaults of the datapath
  localparam int unsigned DMEM_WORDS = 1024;
  localparam int unsigned RUNS       = 3;

  localparam logic [5:0] OP_RTYPE = 6'h00, OP_ORI = 6'h0d, OP_LW = 6'h23,
                         OP_SW    = 6'h2b, OP_BEQ = 6'h04;
  localparam logic [5:0] FN_ADDU  = 6'h21, FN_SUBU = 6'h23;

  logic        clk = 0, rst;
  ctrl_t       ctrl;
  logic [31:0] instruction, pc;
  logic        equal;
  logic        imem_we;
  logic [31:0] imem_waddr, imem_wdata;
  logic        loading;

  single_cycle_datapath dut (
    .clk(clk), .rst(rst), .ctrl(ctrl), .instruction(instruction), .equal(equal), .pc(pc),
    .imem_we(imem_we), .imem_waddr(imem_waddr), .imem_wdata(imem_wdata)
  );

  always #5 clk = ~clk;

  // ---- control, decoded from the instruction -------------------------------------------
  always_comb begin
    ctrl = '0;
    if (!loading) begin
      unique case (instruction[31:26])
        OP_RTYPE: begin
          ctrl.reg_wr  = (instruction[5:0] == FN_ADDU) || (instruction[5:0] == FN_SUBU);
          ctrl.reg_dst = 1'b1;
          ctrl.alu_ctr = (instruction[5:0] == FN_SUBU) ? ALU_SUB : ALU_ADD;
        end
        OP_ORI: begin
          ctrl.reg_wr = 1'b1; ctrl.alu_src = 1'b1; ctrl.alu_ctr = ALU_OR;
        end
        OP_LW: begin
          ctrl.reg_wr = 1'b1; ctrl.ext_op = 1'b1; ctrl.alu_src = 1'b1;
          ctrl.alu_ctr = ALU_ADD; ctrl.mem_to_reg = 1'b1;
        end
        OP_SW: begin
          ctrl.mem_wr = 1'b1; ctrl.ext_op = 1'b1; ctrl.alu_src = 1'b1; ctrl.alu_ctr = ALU_ADD;
        end
        OP_BEQ: begin
          ctrl.alu_ctr = ALU_SUB; ctrl.npc_sel = equal;
        end
        default: ;
      endcase
    end
  end

  // ---- reference model -----------------------------------------------------------------
  logic [31:0] prog  [IMEM_WORDS];
  logic [31:0] m_reg [32];
  logic [31:0] m_mem [DMEM_WORDS];
  logic [31:0] m_pc;
  int          prog_len, halt_pc;

  int checks = 0, failures = 0, cycles = 0;
  int n_addu = 0, n_subu = 0, n_ori = 0, n_lw = 0, n_sw = 0;
  int n_beq_taken = 0, n_beq_not = 0, n_backward = 0, n_same_reg = 0, n_r0_write = 0;

  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] r_type(input logic [5:0] fn, input int rd, input int rs, input int rt);
    return {OP_RTYPE, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] i_type(input logic [5:0] op, input int rt, input int rs, input logic [15:0] imm);
    return {op, 5'(rs), 5'(rt), imm};
  endfunction

  task automatic emit(input logic [31:0] w);
    prog[prog_len] = w;
    prog_len++;
  endtask

  // Registers 1..28 are scratch; 29..31 belong to the loop.
  function automatic int rnd_reg();
    return int'($urandom % 29);  // includes register 0
  endfunction

  task automatic gen_program(input int body_len);
    prog_len = 0;
    for (int r = 1; r < 32; r++) emit(i_type(OP_ORI, r, 0, 16'($urandom)));
    // counted loop: r31 = count, r30 = 1; body: r31 -= r30; beq r31,r0,+1; beq r0,r0,-3
    emit(i_type(OP_ORI, 31, 0, 16'(5 + $urandom % 20)));
    emit(i_type(OP_ORI, 30, 0, 16'd1));
    emit(r_type(FN_SUBU, 31, 31, 30));
    emit(i_type(OP_BEQ, 0, 31, 16'd1));      // beq r31, r0, +1: leaves the loop
    emit(i_type(OP_BEQ, 0, 0, 16'hFFFD));    // beq r0, r0, -3: back to subu
    for (int i = 0; i < body_len; i++) begin
      int kind;
      kind = int'($urandom % 7);
      case (kind)
        0: emit(r_type(FN_ADDU, rnd_reg(), rnd_reg(), rnd_reg()));
        1: emit(r_type(FN_SUBU, rnd_reg(), rnd_reg(), rnd_reg()));
        2: emit(i_type(OP_ORI, rnd_reg(), rnd_reg(), 16'($urandom)));
        3: emit(i_type(OP_LW, rnd_reg(), rnd_reg(), 16'($urandom)));
        4: emit(i_type(OP_SW, rnd_reg(), rnd_reg(), 16'($urandom)));
        5: begin  // beq that is always taken (same register)
          int r;
          r = rnd_reg();
          emit(i_type(OP_BEQ, r, r, 16'(1 + $urandom % 3)));
        end
        default: emit(i_type(OP_BEQ, rnd_reg(), rnd_reg(), 16'(1 + $urandom % 3)));
      endcase
    end
    halt_pc = prog_len * 4;
    for (int i = 0; i < 4; i++) emit(i_type(OP_BEQ, 0, 0, 16'hFFFF));  // halt: beq r0,r0,-1
  endtask

  // Executes the instruction at m_pc in the model.
  task automatic model_step();
    logic [31:0] inst, a, b, addr, se, ze;
    int rs, rt, rd;
    inst = prog[m_pc[11:2]];
    rs = int'(inst[25:21]); rt = int'(inst[20:16]); rd = int'(inst[15:11]);
    a  = m_reg[rs]; b = m_reg[rt];
    se = {{16{inst[15]}}, inst[15:0]};
    ze = {16'h0, inst[15:0]};
    addr = a + se;
    m_pc = m_pc + 4;
    case (inst[31:26])
      OP_RTYPE: begin
        if (rd == 0) n_r0_write++;
        if (rd == rs || rd == rt) n_same_reg++;
        if (inst[5:0] == FN_ADDU) begin n_addu++; if (rd != 0) m_reg[rd] = a + b; end
        else                     begin n_subu++; if (rd != 0) m_reg[rd] = a - b; end
      end
      OP_ORI: begin
        n_ori++;
        if (rt == 0) n_r0_write++;
        if (rt == rs) n_same_reg++;
        if (rt != 0) m_reg[rt] = a | ze;
      end
      OP_LW: begin
        n_lw++;
        if (rt == 0) n_r0_write++;
        if (rt == rs) n_same_reg++;
        if (rt != 0) m_reg[rt] = m_mem[addr[11:2]];
      end
      OP_SW: begin
        n_sw++;
        m_mem[addr[11:2]] = b;
      end
      OP_BEQ: begin
        if (a == b) begin
          if (m_pc - 4 != 32'(halt_pc)) n_beq_taken++;
          if (inst[15]) n_backward++;
          m_pc = m_pc + {se[29:0], 2'b00};
        end else n_beq_not++;
      end
      default: ;
    endcase
  endtask

  initial begin
    for (int run = 0; run < RUNS; run++) begin
      int dyn, start_cycle;
      gen_program(700);
      // load the program while reset holds the PC at 0
      rst = 1; loading = 1; imem_we = 1;
      for (int i = 0; i < prog_len; i++) begin
        imem_waddr = 32'(i * 4); imem_wdata = prog[i];
        @(posedge clk); #1;
      end
      imem_we = 0; imem_waddr = '0; imem_wdata = '0;
      @(posedge clk); #1;
      rst = 0; loading = 0;
      // the model starts from the datapath's (unreset) data memory and PC 0
      for (int w = 0; w < DMEM_WORDS; w++) m_mem[w] = dut.u_dmem.mem[w];
      m_reg[0] = '0;
      for (int r = 1; r < 32; r++) m_reg[r] = dut.u_rf.regs[r];
      m_pc = 0;
      dyn = 0;
      start_cycle = cycles;
      checks++;
      if (pc !== 0) begin failures++; $display("FAIL run %0d: pc after reset %h", run, pc); end
      // one instruction per clock until the halt is reached
      while (m_pc != 32'(halt_pc) && dyn < 20000) begin
        model_step();
        dyn++;
        @(posedge clk); #1;
        checks++;
        if (pc !== m_pc) begin
          failures++;
          $display("FAIL run %0d instr %0d: pc=%h exp %h", run, dyn, pc, m_pc);
        end
      end
      checks++;
      if (m_pc != 32'(halt_pc)) begin failures++; $display("FAIL run %0d: model did not halt", run); end
      // the halt keeps the PC in place
      @(posedge clk); #1;
      checks++;
      if (pc !== 32'(halt_pc)) begin failures++; $display("FAIL run %0d: halt pc=%h", run, pc); end
      for (int r = 0; r < 32; r++) begin
        checks++;
        if ((r == 0 ? 32'd0 : dut.u_rf.regs[r]) !== m_reg[r]) begin
          failures++;
          $display("FAIL run %0d: R%0d=%h exp %h", run, r, dut.u_rf.regs[r], m_reg[r]);
        end
      end
      for (int w = 0; w < DMEM_WORDS; w++) begin
        checks++;
        if (dut.u_dmem.mem[w] !== m_mem[w]) begin
          failures++;
          $display("FAIL run %0d: MEM[%0d]=%h exp %h", run, w, dut.u_dmem.mem[w], m_mem[w]);
        end
      end
      // single cycle: the halt was reached after exactly one clock per instruction
      checks++;
      if (cycles - start_cycle != dyn + 1) begin
        failures++;
        $display("FAIL run %0d: %0d instructions took %0d cycles", run, dyn, cycles - start_cycle - 1);
      end
      $display("run %0d: %0d instructions in %0d clock cycles", run, dyn, cycles - start_cycle - 1);
    end

    $display("mechanisms: addu=%0d subu=%0d ori=%0d lw=%0d sw=%0d beq_taken=%0d beq_not_taken=%0d backward_branch=%0d dest_is_source=%0d r0_write=%0d",
             n_addu, n_subu, n_ori, n_lw, n_sw, n_beq_taken, n_beq_not, n_backward, n_same_reg, n_r0_write);
    checks++; if (n_addu == 0)      begin failures++; $display("FAIL: no addu"); end
    checks++; if (n_subu == 0)      begin failures++; $display("FAIL: no subu"); end
    checks++; if (n_ori == 0)       begin failures++; $display("FAIL: no ori"); end
    checks++; if (n_lw == 0)        begin failures++; $display("FAIL: no lw"); end
    checks++; if (n_sw == 0)        begin failures++; $display("FAIL: no sw"); end
    checks++; if (n_beq_taken == 0) begin failures++; $display("FAIL: no taken beq"); end
    checks++; if (n_beq_not == 0)   begin failures++; $display("FAIL: no untaken beq"); end
    checks++; if (n_backward == 0)  begin failures++; $display("FAIL: no backward branch"); end
    checks++; if (n_same_reg == 0)  begin failures++; $display("FAIL: no dest = source"); end
    checks++; if (n_r0_write == 0)  begin failures++; $display("FAIL: no write to R0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
