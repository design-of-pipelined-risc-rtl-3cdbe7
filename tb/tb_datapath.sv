// tb_datapath: self-checking test of the multi-cycle datapath.
//
// The testbench plays the controller with its own step table: each step is
// one clock cycle's control word.  A short program is placed in the memory
// array (LI, LI, ADD, ST, LD, SUB, ADDI, LD, JMP) and walked through fetch, decode,
// execute and write-back by hand; after each step the program counter,
// opcode, register A, carry and register/memory contents are compared with
// values worked out by hand.
module tb_datapath;
  import risc16_pkg::*;

  typedef struct packed {
    logic [2:0] alu_sel;
    logic [1:0] data_sel;
    logic [1:0] opb_sel;
    logic       addr_sel, ir_wrt, opa_sel, pc_sel, pc_wrt, re, rega_sel, reg_wrt, we;
  } ctrl_t;

  logic        clk = 1'b0;
  logic        rst;
  ctrl_t       c;
  logic [3:0]  irout;
  logic [15:0] outA, pc;

  assign pc = dut.pc;  // program counter, observed inside
  logic        carry;
  int          checks = 0, failures = 0, cycles = 0;

  datapath dut (
    .clk, .rst, .alu_sel(c.alu_sel), .data_sel(c.data_sel), .opb_sel(c.opb_sel),
    .addr_sel(c.addr_sel), .ir_wrt(c.ir_wrt), .opa_sel(c.opa_sel), .pc_sel(c.pc_sel),
    .pc_wrt(c.pc_wrt), .re(c.re), .rega_sel(c.rega_sel), .reg_wrt(c.reg_wrt), .we(c.we),
    .irout, .outA, .carry
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // apply one control word for one clock cycle
  task automatic step(input ctrl_t w);
    c = w;
    @(negedge clk);
    c = '0;
  endtask

  function automatic ctrl_t fetch();
    ctrl_t w = '0;
    w.re = 1; w.ir_wrt = 1; w.pc_wrt = 1; w.opb_sel = OPB_ONE; w.alu_sel = ALU_ADD;
    return w;
  endfunction

  function automatic ctrl_t decode(input logic rsel);
    ctrl_t w = '0;
    w.rega_sel = rsel; w.opb_sel = OPB_IMM8;
    return w;
  endfunction

  function automatic ctrl_t execute(input logic [2:0] alu, input logic [1:0] opb, input logic rsel);
    ctrl_t w = '0;
    w.opa_sel = 1; w.alu_sel = alu; w.opb_sel = opb; w.rega_sel = rsel;
    return w;
  endfunction

  function automatic ctrl_t wb(input logic [1:0] ds);
    ctrl_t w = '0;
    w.reg_wrt = 1; w.data_sel = ds;
    return w;
  endfunction

  ctrl_t w;

  initial begin
    c = '0;
    rst = 1'b1;
    // program: memory address = word index
    dut.u_mem.mem[0] = 16'hE17F;  // LI  r1, 0x7F
    dut.u_mem.mem[1] = 16'hE2F0;  // LI  r2, -16  (0xFFF0)
    dut.u_mem.mem[2] = 16'h0312;  // ADD r3, r1, r2   -> 0x006F, carry 1
    dut.u_mem.mem[3] = 16'hA30F;  // ST  r3, -1(r0)   -> M[0xFFFF] = M[255]
    dut.u_mem.mem[4] = 16'h940F;  // LD  r4, -1(r0)
    dut.u_mem.mem[5] = 16'h1512;  // SUB r5, r1, r2   -> 0x008F, borrow 1
    dut.u_mem.mem[6] = 16'h85E1;  // ADDI r5, -31     -> 0x0070, carry 1
    dut.u_mem.mem[7] = 16'h960E;  // LD  r6, -2(r0)   -> M[254]
    dut.u_mem.mem[8] = 16'hD0F6;  // JMP -10          -> pc = 9 - 10 = -1 = 0xFFFF
    for (int i = 9; i < 256; i++) dut.u_mem.mem[i] = 16'h0000;
    dut.u_mem.mem[254] = 16'h1234;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    check("pc after reset", pc, 16'h0);

    // LI r1, 0x7F
    step(fetch());        check("pc", pc, 16'd1); check("irout", 16'(irout), 16'hE);
    step(decode(1'b0));
    step('0);
    step(wb(DS_IMM8));    check("r1", dut.u_regfile.regs[1], 16'h007F);
    // LI r2, -16
    step(fetch());        check("pc", pc, 16'd2);
    step(decode(1'b0));
    step('0);
    step(wb(DS_IMM8));    check("r2", dut.u_regfile.regs[2], 16'hFFF0);
    // ADD r3, r1, r2
    step(fetch());        check("pc", pc, 16'd3); check("irout", 16'(irout), 16'h0);
    step(decode(1'b0));   check("A = r1", outA, 16'h007F);
    c = execute(ALU_ADD, OPB_REG, 1'b0);
    #1 check("carry of 0x7F + 0xFFF0", 16'(carry), 16'h1);
    @(negedge clk); c = '0;
    step(wb(DS_ALU));     check("r3", dut.u_regfile.regs[3], 16'h006F);
    // ST r3, -1(r0)
    step(fetch());        check("irout", 16'(irout), 16'hA);
    step(decode(1'b0));   check("A = r0", outA, 16'h0);
    step(execute(ALU_ADD, OPB_OFF4, 1'b1));  check("A = store data r3", outA, 16'h006F);
    w = '0; w.addr_sel = 1; w.we = 1; w.rega_sel = 1;
    step(w);              check("M[255]", dut.u_mem.mem[255], 16'h006F);
    // LD r4, -1(r0)
    step(fetch());        check("pc", pc, 16'd5);
    step(decode(1'b0));
    step(execute(ALU_ADD, OPB_OFF4, 1'b0));
    w = '0; w.addr_sel = 1; w.re = 1;
    step(w);
    check("r4 not yet written", dut.u_regfile.regs[4], 16'h0);
    step(wb(DS_MDR));     check("r4", dut.u_regfile.regs[4], 16'h006F);
    // SUB r5, r1, r2
    step(fetch());        check("irout", 16'(irout), 16'h1);
    step(decode(1'b0));
    c = execute(ALU_SUB, OPB_REG, 1'b0);
    #1 check("borrow of 0x7F - 0xFFF0", 16'(carry), 16'h1);
    @(negedge clk); c = '0;
    step(wb(DS_ALU));     check("r5", dut.u_regfile.regs[5], 16'h008F);
    // ADDI r5, -31: register A is rd, operand B the sign-extended imm8
    step(fetch());        check("irout", 16'(irout), 16'h8);
    step(decode(1'b1));   check("A = r5", outA, 16'h008F);
    c = execute(ALU_ADD, OPB_IMM8, 1'b1);
    #1 check("carry of 0x8F + 0xFFE1", 16'(carry), 16'h1);
    @(negedge clk); c = '0;
    step(wb(DS_ALU));     check("r5 after ADDI", dut.u_regfile.regs[5], 16'h0070);
    // LD r6, -2(r0): the address uses the sign-extended off4 field
    step(fetch());        check("pc", pc, 16'd8);
    step(decode(1'b0));
    step(execute(ALU_ADD, OPB_OFF4, 1'b0));
    w = '0; w.addr_sel = 1; w.re = 1;
    step(w);
    step(wb(DS_MDR));     check("r6 from M[254]", dut.u_regfile.regs[6], 16'h1234);
    // JMP -10: the target goes through the ALU-out register
    step(fetch());        check("pc", pc, 16'd9); check("irout", 16'(irout), 16'hD);
    step(decode(1'b1));
    w = '0; w.pc_sel = 1; w.pc_wrt = 1;
    step(w);              check("pc after jump", pc, 16'hFFFF);
    // fetch from 0xFFFF (word 255 holds the stored 0x006F, opcode 0), then from 0
    step(fetch());        check("irout at 0xFFFF", 16'(irout), 16'h0); check("pc wraps", pc, 16'd0);
    // fetch LI r1 again from 0, then write the constant zero to r1
    step(fetch());        check("refetch LI", 16'(irout), 16'hE); check("pc", pc, 16'd1);
    step(wb(DS_ZERO));    check("r1 cleared", dut.u_regfile.regs[1], 16'h0);
    // register A addressed by ir[11:8] (rega_sel = 1) and by ir[7:4]
    step(decode(1'b1));   check("A = r1 (rega_sel)", outA, 16'h0000);
    step(decode(1'b0));   check("A = r7 (ir[7:4])", outA, dut.u_regfile.regs[7]);
    // synchronous reset clears pc and registers
    rst = 1'b1; @(negedge clk); rst = 1'b0;
    check("pc reset", pc, 16'h0);
    check("r3 reset", dut.u_regfile.regs[3], 16'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
