// tb_pipe16_cpu: self-checking test of the five-stage pipelined processor.
//
// Timing: a run of independent instructions must flow one per clock (the
// halt jump reaches ID N + 1 cycles after reset for N instructions before
// it), a read of a register written by the previous instruction must wait
// 3 cycles, a jump must cost 1 cycle and a taken conditional branch 3.
// Function: a hand-written program and random programs (ALU, immediates,
// loads/stores, forward branches) run to the halt word (JMP -1, 0xD0FF);
// every register and the whole data memory are compared with an
// instruction-level reference model with separate instruction and data
// memories.  Stalls, squashes, jumps, loads, stores, each branch outcome
// and each opcode are counted in the hardware; one that never happens is a
// failure.
module tb_pipe16_cpu;
  import risc16_pkg::*;

  localparam int DEPTH = 256;
  localparam logic [15:0] HALT = 16'hD0FF;

  logic        clk = 1'b0;
  logic        reset;
  logic [15:0] pc;
  logic        stall, flush, jump;
  int          checks = 0, failures = 0, cycles = 0;

  pipe16_cpu dut (.clk, .reset, .pc, .stall, .flush, .jump);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 2000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model (separate instruction and data memories) -----------
  logic [15:0] prog [DEPTH];
  logic [15:0] dm   [DEPTH];
  logic [15:0] rr   [16];
  logic [15:0] rpc;
  logic        rflag;

  function automatic logic [15:0] sx8(input logic [7:0] v); return {{8{v[7]}}, v}; endfunction
  function automatic logic [15:0] sx4(input logic [3:0] v); return {{12{v[3]}}, v}; endfunction

  task automatic model_run();
    int guard = 0;
    for (int i = 0; i < DEPTH; i++) dm[i] = '0;
    for (int i = 0; i < 16; i++) rr[i] = '0;
    rpc = '0; rflag = 1'b0;
    while (prog[rpc[7:0]] != HALT && guard < 100000) begin
      logic [15:0] ins, a, b, nxt;
      logic [16:0] w;
      logic [3:0]  rd, rs, rt;
      ins = prog[rpc[7:0]];
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
        4'h9: rr[rd] = dm[8'(a + sx4(ins[3:0]))];
        4'hA: dm[8'(a + sx4(ins[3:0]))] = rr[rd];
        4'hB: if (rr[rd] == 16'h0) nxt = rpc + 16'd1 + sx8(ins[7:0]);
        4'hC: if (rflag) nxt = rpc + 16'd1 + sx8(ins[7:0]);
        4'hD: nxt = rpc + 16'd1 + sx8(ins[7:0]);
        4'hE: rr[rd] = sx8(ins[7:0]);
        default: rr[rd] = '0;
      endcase
      rpc = nxt;
      guard++;
    end
  endtask

  int pc_asm;
  function automatic logic [15:0] enc(input logic [3:0] op, input logic [3:0] d, input logic [3:0] s, input logic [3:0] t);
    return {op, d, s, t};
  endfunction
  task automatic emit(input logic [15:0] w); prog[pc_asm] = w; pc_asm++; endtask
  task automatic clear_prog();
    for (int i = 0; i < DEPTH; i++) prog[i] = HALT;
    pc_asm = 0;
  endtask

  // ---- event counters ---------------------------------------------------------
  int op_seen [16];
  int n_jump, n_stall, n_flush, n_ld, n_st, n_bz_t, n_bz_n, n_bc_t, n_bc_n;

  always @(negedge clk) begin
    if (reset) begin
      if (stall) n_stall++;
      if (flush) n_flush++;
      if (jump)  n_jump++;
      if (dut.ex_mem.valid) begin
        if (dut.ex_mem.ctrl.mem_read)  n_ld++;
        if (dut.ex_mem.ctrl.mem_write) n_st++;
        if (dut.ex_mem.ctrl.is_bz) begin if (dut.ex_mem.taken) n_bz_t++; else n_bz_n++; end
        if (dut.ex_mem.ctrl.is_bc) begin if (dut.ex_mem.taken) n_bc_t++; else n_bc_n++; end
      end
      if (dut.if_id.valid && !stall && !flush) op_seen[dut.if_id.instr[15:12]]++;
    end
  end

  // run prog from reset until the halt word is reached; returns cycles used
  task automatic run_hw(output int used);
    int start;
    for (int i = 0; i < DEPTH; i++) begin
      dut.imem.mem[i] = prog[i];
      dut.dmem.mem[i] = '0;
    end
    reset = 1'b0;
    repeat (2) @(negedge clk);
    reset = 1'b1;
    start = cycles;
    forever begin
      @(negedge clk);
      used = cycles - start;
      if (jump && prog[dut.jump_target[7:0]] == HALT) break;
      if (used > 100000) break;
    end
    repeat (4) @(negedge clk);  // let older instructions finish
  endtask

  task automatic run_and_compare(input string name);
    int used;
    model_run();
    run_hw(used);
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (dut.u_regfile.regs[i] != rr[i]) begin
        failures++;
        $display("FAIL %s: r%0d = %h expected %h", name, i, dut.u_regfile.regs[i], rr[i]);
      end
    end
    for (int i = 0; i < DEPTH; i++) begin
      checks++;
      if (dut.dmem.mem[i] != dm[i]) begin
        failures++;
        $display("FAIL %s: D[%0d] = %h expected %h", name, i, dut.dmem.mem[i], dm[i]);
      end
    end
  endtask

  task automatic expect_cycles(input string name, input int exp);
    int used;
    run_hw(used);
    checks++;
    if (used != exp) begin
      failures++;
      $display("FAIL %s: halt jump reached ID after %0d cycles, expected %0d", name, used, exp);
    end
  endtask

  task automatic random_prog(input int len);
    clear_prog();
    emit(enc(OP_LI, 15, 4'h4, 4'h0));   // r15 = 0x0040, data base, never written
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
    run_and_compare("random");
  endtask

  initial begin
    reset = 1'b0;
    for (int i = 0; i < 16; i++) op_seen[i] = 0;
    {n_jump, n_stall, n_flush, n_ld, n_st, n_bz_t, n_bz_n, n_bc_t, n_bc_n} = '0;

    // throughput: 20 independent instructions, one per clock
    clear_prog();
    for (int i = 0; i < 20; i++) emit(enc(OP_LI, 4'(i % 15), 4'(i), 4'h3));
    expect_cycles("independent", 20 + 1);
    // read-after-write: the ADD waits 3 cycles for r1
    clear_prog();
    emit(enc(OP_LI, 1, 0, 5));
    emit(enc(OP_ADD, 2, 1, 1));
    expect_cycles("dependent", 2 + 1 + 3);
    // jump over one instruction: 1 squashed slot
    clear_prog();
    emit(enc(OP_JMP, 0, 0, 1));
    emit(enc(OP_LI, 3, 0, 1));
    emit(enc(OP_LI, 4, 0, 2));
    expect_cycles("jump", 3 + 1);
    checks++;
    if (dut.u_regfile.regs[3] != 16'h0 || dut.u_regfile.regs[4] != 16'h2) begin
      failures++;
      $display("FAIL jump: squashed instruction wrote a register");
    end
    // taken conditional branch over one instruction: 3 squashed slots
    clear_prog();
    emit(enc(OP_BZ, 0, 0, 1));   // r0 == 0 after reset
    emit(enc(OP_LI, 3, 0, 1));
    emit(enc(OP_LI, 4, 0, 2));
    expect_cycles("branch", 3 + 3);
    checks++;
    if (dut.u_regfile.regs[3] != 16'h0 || dut.u_regfile.regs[4] != 16'h2) begin
      failures++;
      $display("FAIL branch: squashed instruction wrote a register");
    end

    // hand-written program: loop, store/load, carry branches, every opcode
    clear_prog();
    emit(enc(OP_LI,  1, 4'h0, 4'hA));   //  0 r1 = 10
    emit(enc(OP_CLR, 2, 0, 0));         //  1 r2 = 0
    emit(enc(OP_LI,  3, 0, 1));         //  2 r3 = 1
    emit(enc(OP_ADD, 2, 2, 1));         //  3 loop: r2 += r1
    emit(enc(OP_SUB, 1, 1, 3));         //  4 r1 -= 1
    emit(enc(OP_BZ,  1, 0, 1));         //  5 exit when r1 == 0
    emit(enc(OP_JMP, 0, 4'hF, 4'hC));   //  6 -> 3
    emit(enc(OP_LI,  15, 4'h1, 4'h0));  //  7 r15 = 0x10
    emit(enc(OP_ST,  2, 15, 4'h1));     //  8 D[0x11] = 55
    emit(enc(OP_LD,  4, 15, 4'h1));     //  9 r4 = 55
    emit(enc(OP_LI,  5, 4'hF, 4'hF));   // 10 r5 = 0xFFFF
    emit(enc(OP_ADD, 6, 5, 3));         // 11 carry 1
    emit(enc(OP_BC,  0, 0, 1));         // 12 taken
    emit(enc(OP_LI,  7, 1, 1));         // 13 skipped
    emit(enc(OP_ADD, 6, 3, 3));         // 14 carry 0
    emit(enc(OP_BC,  0, 0, 1));         // 15 not taken
    emit(enc(OP_ADDI, 8, 2, 2));        // 16 r8 = 0x22
    emit(enc(OP_AND, 9, 5, 8));         // 17
    emit(enc(OP_OR,  10, 4, 8));        // 18
    emit(enc(OP_XOR, 11, 4, 8));        // 19
    emit(enc(OP_NOT, 12, 8, 0));        // 20
    emit(enc(OP_SHL, 13, 8, 0));        // 21
    emit(enc(OP_SHR, 14, 8, 0));        // 22
    emit(enc(OP_BZ,  5, 0, 1));         // 23 not taken
    run_and_compare("directed");
    checks++;
    if (dut.u_regfile.regs[2] != 16'd55 || dut.u_regfile.regs[4] != 16'd55 ||
        dut.dmem.mem[8'h11] != 16'd55 || dut.u_regfile.regs[7] != 16'h0) begin
      failures++;
      $display("FAIL directed: hand-computed results differ");
    end

    for (int p = 0; p < 40; p++) random_prog(120);

    for (int i = 0; i < 16; i++) begin
      checks++;
      if (op_seen[i] == 0) begin failures++; $display("FAIL opcode %b never issued", 4'(i)); end
    end
    checks++;
    if (n_jump == 0 || n_stall == 0 || n_flush == 0 || n_ld == 0 || n_st == 0 || n_bz_t == 0 || n_bz_n == 0 ||
        n_bc_t == 0 || n_bc_n == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("events: jumps %0d, stall cycles %0d, squashes %0d, loads %0d, stores %0d, BZ taken %0d / not %0d, BC taken %0d / not %0d",
             n_jump, n_stall, n_flush, n_ld, n_st, n_bz_t, n_bz_n, n_bc_t, n_bc_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
