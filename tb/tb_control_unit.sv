// tb_control_unit: self-checking test of the multi-cycle controller.
//
// The testbench plays the datapath: it feeds each opcode after the fetch
// state loads the instruction register, sets outA and carry, and watches
// the control outputs until the next fetch.  For every instruction it
// checks what must happen whatever the exact encoding inside the states:
// fetch values (memory read at PC, IR and PC written, ALU = PC + 1), the
// number of cycles (4, a load 5), one register write with the right data
// source for instructions that write a register and none otherwise, a
// memory write only for a store, a data read before the write-back of a
// load, the ALU code of ALU instructions, and whether a branch was taken
// (BZ on outA == 0, BC on the carry of the last ALU instruction, JMP
// always).  The state codes START = 100 and S0 = 000 are checked too, and
// that a branch drives opb_sel with 00 and 11 only.
module tb_control_unit;
  import risc16_pkg::*;

  logic        clk = 1'b0;
  logic        reset;
  logic [3:0]  opcode;
  logic [15:0] outA;
  logic        carry;
  logic        pc_sel, pc_wrt, addr_sel, ir_wrt, rega_sel, reg_wrt, opa_sel, re, we;
  logic [1:0]  data_sel, opb_sel;
  logic [2:0]  alu_sel;
  int          checks = 0, failures = 0, cycles = 0;
  logic        flag_model;  // carry of the last ALU/ADDI instruction

  control_unit dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (opcode %b, t=%0t)", what, opcode, $time);
    end
  endtask

  // At a negedge in the fetch state: run one instruction to the next fetch.
  task automatic run(input logic [3:0] op, input logic [15:0] a, input logic c);
    int       n = 1, taken = 0, regw = 0, wes = 0, reads = 0, read_at = -1, regw_at = -1;
    logic [1:0] ds = 2'b00;
    logic [2:0] alu_ex = 3'b000;
    logic [1:0] opb_ex = 2'b00;
    logic     opb_other = 1'b0;  // a code other than 00 and 11 seen on opb_sel
    logic     exp_taken, writes_reg;

    check("fetch: re, ir_wrt, pc_wrt", re && ir_wrt && pc_wrt && !pc_sel && !addr_sel && !we && !reg_wrt);
    check("fetch: ALU = PC + 1", !opa_sel && opb_sel == OPB_ONE && alu_sel == ALU_ADD);
    check("fetch state code", dut.pstate == 3'b000);
    @(posedge clk);
    #1 opcode = op; outA = a; carry = c;
    forever begin
      @(negedge clk);
      if (ir_wrt) break;
      n++;
      if (pc_wrt && pc_sel) taken++;
      if (pc_wrt && !pc_sel) check("PC written without a branch", 1'b0);
      if (reg_wrt) begin regw++; ds = data_sel; regw_at = n; end
      if (we) begin wes++; check("store addresses ALU-out", addr_sel); end
      if (re) begin reads++; read_at = n; check("data read addresses ALU-out", addr_sel); end
      if (!(opb_sel inside {2'b00, 2'b11})) opb_other = 1'b1;
      if (n == 3) begin alu_ex = alu_sel; opb_ex = opb_sel; check("execute uses A", opa_sel); end
      if (n > 12) begin check("instruction never ends", 1'b0); break; end
    end

    unique case (opcode_e'(op))
      OP_BZ:   exp_taken = (a == 16'h0);
      OP_BC:   exp_taken = flag_model;
      OP_JMP:  exp_taken = 1'b1;
      default: exp_taken = 1'b0;
    endcase
    writes_reg = !(op inside {OP_ST, OP_BZ, OP_BC, OP_JMP});

    check("cycle count", n == ((op == OP_LD) ? 5 : 4));
    check("branch decision", taken == int'(exp_taken));
    check("register writes", regw == int'(writes_reg));
    check("memory writes", wes == int'(op == OP_ST));
    check("data reads", reads == int'(op == OP_LD));
    if (op == OP_LD) check("load writes back after the read", regw_at > read_at);
    if (writes_reg) begin
      if (op[3] == 1'b0 || op == OP_ADDI) check("write-back source ALU-out", ds == DS_ALU);
      if (op == OP_LD)  check("write-back source MDR", ds == DS_MDR);
      if (op == OP_LI)  check("write-back source immediate", ds == DS_IMM8);
      if (op == OP_CLR) check("write-back source zero", ds == DS_ZERO);
    end
    if (op[3] == 1'b0) begin
      check("ALU code = opcode[2:0]", alu_ex == op[2:0]);
      check("ALU operand B = register", opb_ex == OPB_REG);
    end
    if (op == OP_LD || op == OP_ST) check("address = A + offset", alu_ex == ALU_ADD && opb_ex == OPB_OFF4);
    if (op == OP_ADDI) check("ADDI operand B = imm8", alu_ex == ALU_ADD && opb_ex == OPB_IMM8);
    if (op inside {OP_BZ, OP_BC, OP_JMP}) check("branch drives opb_sel with 00 and 11 only", !opb_other);
    if (op[3] == 1'b0 || op == OP_ADDI) flag_model = c;
  endtask

  initial begin
    reset = 1'b0; opcode = 4'h0; outA = 16'h1; carry = 1'b0; flag_model = 1'b0;
    repeat (2) @(negedge clk);
    check("reset state START = 100", dut.pstate == 3'b100);
    check("no writes in START", !pc_wrt && !ir_wrt && !reg_wrt && !we);
    reset = 1'b1;
    @(negedge clk);
    // every opcode, with register A zero and non-zero and carry 0/1
    for (int k = 0; k < 4; k++)
      for (int op = 0; op < 16; op++)
        run(4'(op), (k[0] ? 16'h0 : 16'h0042), k[1]);
    // carry flag: set by an ADD, kept by a non-ALU instruction, read by BC
    run(OP_ADD, 16'h1, 1'b1); run(OP_LI, 16'h1, 1'b0); run(OP_BC, 16'h1, 1'b0);
    run(OP_SUB, 16'h1, 1'b0); run(OP_BC, 16'h1, 1'b1);
    for (int i = 0; i < 500; i++) run(4'($urandom), ($urandom_range(1, 0) == 1) ? 16'h0 : 16'($urandom), 1'($urandom));
    // reset in the middle returns to START
    @(posedge clk); #1 reset = 1'b0;
    repeat (2) @(negedge clk);
    check("reset returns to START", dut.pstate == 3'b100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
