// tb_risc16_top: end-to-end test of the 16-bit processor, both forms, at
// the default sizes.
//
// Multi-cycle form:
// Programs are assembled into the memory array, the processor runs them
// from reset until it fetches the halt word (JMP -1, 0xD0FF), and then
// every register, the whole memory and the number of clock cycles are
// compared with an instruction-level reference model in this testbench
// (one instruction = 4 cycles, a load 5, plus one START cycle after reset).
// The first program is written by hand: a counting loop (BZ taken and not
// taken, JMP), a store and a load, carry set and clear with BC taken and not
// taken, ADDI, LI, CLR and every ALU operation.  Then random programs run:
// ALU, immediate, load/store and forward branches.  The testbench counts how
// often each opcode, each branch outcome, loads, stores and carry-out events
// happen in the hardware and fails if any never did.
// Pipelined form: the same hand-written program and further random
// programs run on the five-stage pipeline and are compared with the same
// reference model set for separate instruction and data memories; the
// pipeline must stall on register dependences, squash on taken branches
// and redirect on jumps at least once, and a run of independent instructions must
// complete one per clock.
module tb_risc16_top;
  import risc16_pkg::*;

  localparam int DEPTH = 256;
  localparam logic [15:0] HALT = 16'hD0FF;

  logic        clk = 1'b0;
  logic        reset;
  logic [3:0]  irout;
  logic [15:0] outA, pc;
  logic        carry;
  int          checks = 0, failures = 0, cycles = 0;

  logic        pl_reset, pl_stall, pl_flush, pl_jump;
  logic [15:0] pl_pc;

  assign pc = dut.u_datapath.pc;  // program counter, observed inside

  risc16_top dut (.clk, .reset, .irout, .outA, .carry,
                  .pl_clk(clk), .pl_reset, .pl_pc, .pl_stall, .pl_flush, .pl_jump);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 2000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model ----------------------------------------------------
  logic [15:0] prog [DEPTH];   // program image
  logic [15:0] rm   [DEPTH];   // model memory
  logic [15:0] rr   [16];      // model registers
  logic [15:0] rpc;
  logic        rflag;
  int          n_exec, n_load;

  function automatic logic [15:0] sx8(input logic [7:0] v);  return {{8{v[7]}}, v}; endfunction
  function automatic logic [15:0] sx4(input logic [3:0] v);  return {{12{v[3]}}, v}; endfunction

  logic [15:0] pm [DEPTH];     // model instruction memory
  bit          harvard = 1'b0; // separate instruction and data memories

  task automatic model_run();
    int guard = 0;
    for (int i = 0; i < DEPTH; i++) begin
      pm[i] = prog[i];
      rm[i] = harvard ? 16'h0 : prog[i];
    end
    for (int i = 0; i < 16; i++) rr[i] = '0;
    rpc = '0; rflag = 1'b0; n_exec = 0; n_load = 0;
    while ((harvard ? pm[rpc[7:0]] : rm[rpc[7:0]]) != HALT && guard < 100000) begin
      logic [15:0] ins, a, b, nxt;
      logic [16:0] w;
      logic [3:0]  rd, rs, rt;
      ins = harvard ? pm[rpc[7:0]] : rm[rpc[7:0]];
      rd = ins[11:8]; rs = ins[7:4]; rt = ins[3:0];
      a = rr[rs]; b = rr[rt];
      nxt = rpc + 16'd1;
      unique case (ins[15:12])
        4'h0: begin w = {1'b0, a} + {1'b0, b}; rr[rd] = w[15:0]; rflag = w[16]; end
        4'h1: begin rr[rd] = a - b; rflag = (b > a); end
        4'h2: begin rr[rd] = a & b; rflag = 1'b0; end
        4'h3: begin rr[rd] = a | b; rflag = 1'b0; end
        4'h4: begin rr[rd] = a ^ b; rflag = 1'b0; end
        4'h5: begin rr[rd] = ~a;    rflag = 1'b0; end
        4'h6: begin rflag = a[15]; rr[rd] = a << 1; end
        4'h7: begin rflag = a[0];  rr[rd] = a >> 1; end
        4'h8: begin w = {1'b0, rr[rd]} + {1'b0, sx8(ins[7:0])}; rr[rd] = w[15:0]; rflag = w[16]; end
        4'h9: begin rr[rd] = rm[8'(a + sx4(ins[3:0]))]; n_load++; end
        4'hA: rm[8'(a + sx4(ins[3:0]))] = rr[rd];
        4'hB: if (rr[rd] == 16'h0) nxt = rpc + 16'd1 + sx8(ins[7:0]);
        4'hC: if (rflag) nxt = rpc + 16'd1 + sx8(ins[7:0]);
        4'hD: nxt = rpc + 16'd1 + sx8(ins[7:0]);
        4'hE: rr[rd] = sx8(ins[7:0]);
        default: rr[rd] = '0;
      endcase
      rpc = nxt;
      n_exec++;
      guard++;
    end
  endtask

  // ---- assembler ------------------------------------------------------------
  int pc_asm;
  function automatic logic [15:0] enc(input logic [3:0] op, input logic [3:0] d, input logic [3:0] s, input logic [3:0] t);
    return {op, d, s, t};
  endfunction
  task automatic emit(input logic [15:0] w);
    prog[pc_asm] = w;
    pc_asm++;
  endtask
  task automatic clear_prog();
    for (int i = 0; i < DEPTH; i++) prog[i] = '0;
    pc_asm = 0;
  endtask

  // ---- event counters (observed in the hardware) ------------------------------
  int op_seen [16];
  int n_bz_taken, n_bz_not, n_bc_taken, n_bc_not, n_jmp, n_st, n_ld, n_carry;

  always @(negedge clk) begin
    if (reset) begin
      if (dut.u_control.pstate == S2) begin
        op_seen[irout]++;
        if (irout == OP_ADD && carry) n_carry++;
        if (irout == OP_BZ)  begin if (dut.pc_wrt) n_bz_taken++; else n_bz_not++; end
        if (irout == OP_BC)  begin if (dut.pc_wrt) n_bc_taken++; else n_bc_not++; end
        if (irout == OP_JMP && dut.pc_wrt) n_jmp++;
      end
      if (dut.we) n_st++;
      if (dut.u_control.pstate == S4) n_ld++;
    end
  end

  int pl_stalls, pl_flushes, pl_jumps;
  always @(negedge clk) begin
    if (pl_reset) begin
      if (pl_stall) pl_stalls++;
      if (pl_flush) pl_flushes++;
      if (pl_jump)  pl_jumps++;
    end
  end

  // ---- pipelined form: run prog, compare; returns cycles to the halt -------
  task automatic pipe_run_and_compare(input string name, output int used);
    int start;
    harvard = 1'b1;
    model_run();
    harvard = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      dut.u_pipe.imem.mem[i] = prog[i];
      dut.u_pipe.dmem.mem[i] = '0;
    end
    pl_reset = 1'b0;
    repeat (2) @(negedge clk);
    pl_reset = 1'b1;
    start = cycles;
    forever begin
      @(negedge clk);
      used = cycles - start;
      if (pl_jump && prog[dut.u_pipe.jump_target[7:0]] == HALT) break;
      if (used > 100000) break;
    end
    repeat (4) @(negedge clk);  // let older instructions finish
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (dut.u_pipe.u_regfile.regs[i] != rr[i]) begin
        failures++;
        $display("FAIL pipeline %s: r%0d = %h expected %h", name, i, dut.u_pipe.u_regfile.regs[i], rr[i]);
      end
    end
    for (int i = 0; i < DEPTH; i++) begin
      checks++;
      if (dut.u_pipe.dmem.mem[i] != rm[i]) begin
        failures++;
        $display("FAIL pipeline %s: D[%0d] = %h expected %h", name, i, dut.u_pipe.dmem.mem[i], rm[i]);
      end
    end
  endtask

  // ---- run the hardware on prog and compare ----------------------------------
  task automatic run_and_compare(input string name);
    int start, used;
    model_run();
    for (int i = 0; i < DEPTH; i++) dut.u_datapath.u_mem.mem[i] = prog[i];
    reset = 1'b0;
    repeat (2) @(negedge clk);
    reset = 1'b1;
    start = cycles;
    used = 0;
    // run until the processor is about to fetch the halt word
    forever begin
      @(negedge clk);
      used = cycles - start;
      if (dut.u_control.pstate == S0 && dut.u_datapath.u_mem.mem[pc[7:0]] == HALT) break;
      if (used > 4 * 100000) break;
    end
    checks++;
    if (used != 1 + 4 * n_exec + n_load) begin
      failures++;
      $display("FAIL %s: %0d cycles, expected %0d (%0d instructions, %0d loads)",
               name, used, 1 + 4 * n_exec + n_load, n_exec, n_load);
    end
    checks++;
    if (pc != rpc) begin failures++; $display("FAIL %s: pc %h expected %h", name, pc, rpc); end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (dut.u_datapath.u_regfile.regs[i] != rr[i]) begin
        failures++;
        $display("FAIL %s: r%0d = %h expected %h", name, i, dut.u_datapath.u_regfile.regs[i], rr[i]);
      end
    end
    for (int i = 0; i < DEPTH; i++) begin
      checks++;
      if (dut.u_datapath.u_mem.mem[i] != rm[i]) begin
        failures++;
        $display("FAIL %s: M[%0d] = %h expected %h", name, i, dut.u_datapath.u_mem.mem[i], rm[i]);
      end
    end
  endtask

  // hand-written program, results also worked out by hand
  task automatic directed();
    int pl_used;
    clear_prog();
    emit(enc(OP_LI,  1, 4'h0, 4'hA));   //  0 r1 = 10
    emit(enc(OP_CLR, 2, 0, 0));         //  1 r2 = 0
    emit(enc(OP_LI,  3, 0, 1));         //  2 r3 = 1
    emit(enc(OP_ADD, 2, 2, 1));         //  3 loop: r2 += r1
    emit(enc(OP_SUB, 1, 1, 3));         //  4 r1 -= 1
    emit(enc(OP_BZ,  1, 0, 1));         //  5 if r1 == 0 skip the jump
    emit(enc(OP_JMP, 0, 4'hF, 4'hC));   //  6 jump -4 -> 3
    emit(enc(OP_LI,  15, 4'h8, 4'h0));  //  7 r15 = 0xFF80
    emit(enc(OP_ST,  2, 15, 4'h1));     //  8 M[0x81] = r2 (55)
    emit(enc(OP_LD,  4, 15, 4'h1));     //  9 r4 = M[0x81]
    emit(enc(OP_LI,  5, 4'hF, 4'hF));   // 10 r5 = 0xFFFF
    emit(enc(OP_ADD, 6, 5, 3));         // 11 r6 = 0, carry 1
    emit(enc(OP_BC,  0, 0, 1));         // 12 taken: skip 13
    emit(enc(OP_LI,  7, 1, 1));         // 13 (skipped) r7 = 0x11
    emit(enc(OP_ADD, 6, 3, 3));         // 14 r6 = 2, carry 0
    emit(enc(OP_BC,  0, 0, 1));         // 15 not taken
    emit(enc(OP_LI,  8, 2, 2));         // 16 r8 = 0x22
    emit(enc(OP_ADDI, 8, 0, 5));        // 17 r8 = 0x27
    emit(enc(OP_AND, 9, 5, 8));         // 18 r9  = 0x0027
    emit(enc(OP_OR,  10, 4, 8));        // 19 r10 = 0x37 | 0x27 = 0x0037
    emit(enc(OP_XOR, 11, 4, 8));        // 20 r11 = 0x37 ^ 0x27 = 0x0010
    emit(enc(OP_NOT, 12, 8, 0));        // 21 r12 = 0xFFD8
    emit(enc(OP_SHL, 13, 8, 0));        // 22 r13 = 0x004E
    emit(enc(OP_SHR, 14, 8, 0));        // 23 r14 = 0x0013
    emit(enc(OP_BZ,  5, 0, 1));         // 24 not taken (r5 != 0)
    emit(HALT);                         // 25
    run_and_compare("directed");
    pipe_run_and_compare("directed", pl_used);
    checks++;
    if (dut.u_pipe.u_regfile.regs[2] != 16'd55 || dut.u_pipe.u_regfile.regs[4] != 16'd55 ||
        dut.u_pipe.dmem.mem[8'h81] != 16'd55 || dut.u_pipe.u_regfile.regs[12] != 16'hFFD8) begin
      failures++;
      $display("FAIL pipeline directed: hand-computed results differ");
    end
    // hand-computed results
    checks++;
    if (dut.u_datapath.u_regfile.regs[2] != 16'd55 || dut.u_datapath.u_regfile.regs[4] != 16'd55 ||
        dut.u_datapath.u_mem.mem[8'h81] != 16'd55 || dut.u_datapath.u_regfile.regs[7] != 16'h0 ||
        dut.u_datapath.u_regfile.regs[8] != 16'h0027 || dut.u_datapath.u_regfile.regs[10] != 16'h0037 ||
        dut.u_datapath.u_regfile.regs[11] != 16'h0010 || dut.u_datapath.u_regfile.regs[12] != 16'hFFD8 ||
        dut.u_datapath.u_regfile.regs[13] != 16'h004E || dut.u_datapath.u_regfile.regs[14] != 16'h0013) begin
      failures++;
      $display("FAIL directed: hand-computed results differ");
    end
  endtask

  // random program: r15 holds the data base 0x00C0, never written
  task automatic random_prog(input int len);
    int pl_used;
    clear_prog();
    emit(enc(OP_LI, 15, 4'h4, 4'h0));   // r15 = 0x0040
    emit(enc(OP_ADD, 15, 15, 15));      // r15 = 0x0080
    emit(enc(OP_ADDI, 15, 4'h4, 4'h0)); // r15 = 0x00C0
    for (int i = 0; i < len; i++) begin
      logic [3:0] op, d;
      op = 4'($urandom);
      d  = 4'($urandom_range(14, 0));
      unique case (op)
        OP_LD, OP_ST: emit(enc(op, d, 15, 4'($urandom)));
        OP_BZ, OP_BC, OP_JMP: emit(enc(op, d, 0, 4'($urandom_range(3, 0))));
        default: emit(enc(op, d, 4'($urandom), 4'($urandom)));
      endcase
    end
    for (int i = 0; i < 4; i++) emit(HALT);
    run_and_compare("random");
    pipe_run_and_compare("random", pl_used);
  endtask

  initial begin
    reset = 1'b0;
    pl_reset = 1'b0;
    pl_stalls = 0; pl_flushes = 0; pl_jumps = 0;
    for (int i = 0; i < 16; i++) op_seen[i] = 0;
    {n_bz_taken, n_bz_not, n_bc_taken, n_bc_not, n_jmp, n_st, n_ld, n_carry} = '0;
    directed();
    for (int p = 0; p < 40; p++) random_prog(100);

    // pipelined form: 30 independent instructions complete one per clock
    begin
      int used;
      clear_prog();
      for (int i = 0; i < 30; i++) emit(enc(OP_LI, 4'(i % 15), 4'(i), 4'h1));
      emit(HALT);
      pipe_run_and_compare("throughput", used);
      checks++;
      if (used != 30 + 1) begin
        failures++;
        $display("FAIL pipeline throughput: halt jump in ID after %0d cycles, expected 31", used);
      end
    end
    checks++;
    if (pl_stalls == 0 || pl_flushes == 0 || pl_jumps == 0) begin
      failures++;
      $display("FAIL pipeline never stalled, squashed or jumped");
    end
    $display("pipeline events: stall cycles %0d, branch squashes %0d, jumps %0d", pl_stalls, pl_flushes, pl_jumps);

    for (int i = 0; i < 16; i++) begin
      checks++;
      if (op_seen[i] == 0) begin failures++; $display("FAIL opcode %b never executed", 4'(i)); end
    end
    checks++;
    if (n_bz_taken == 0 || n_bz_not == 0 || n_bc_taken == 0 || n_bc_not == 0 ||
        n_jmp == 0 || n_st == 0 || n_ld == 0 || n_carry == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("events: BZ taken %0d / not %0d, BC taken %0d / not %0d, JMP %0d, stores %0d, loads %0d, ADD carry-outs %0d",
             n_bz_taken, n_bz_not, n_bc_taken, n_bc_not, n_jmp, n_st, n_ld, n_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
