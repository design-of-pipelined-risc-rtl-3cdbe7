// pipe16_cpu: five-stage pipelined form of the 16-bit processor.
//
// Stages and latches follow the five-stage organisation of the design:
//   IF  : PC addresses the instruction memory; an adder forms PC + 1.
//   ID  : decoder, register bank read, sign extension of the 4- and 8-bit
//         immediates.
//   EX  : operand multiplexers and ALU; the ALU also forms conditional
//         branch targets (next PC + offset) while a zero test on register A
//         and the carry flag decide the branch.
// Unconditional jumps have a unit of their own, jump_unit, which redirects
// the fetch from ID.
//   MEM : data memory for loads and stores; a taken branch loads the PC
//         from the EX/MEM latch here.
//   WB  : load data or ALU result is written to the register bank.
// The IF/ID, ID/EX, EX/MEM and MEM/WB latches are structs from risc16_pkg.
// Instruction and data memories are separate.  The instruction set is the
// same as the multi-cycle processor's (risc16_pkg), except that a store
// cannot change the program.
//
// Hazards (this implementation's own choice; the design shows no hazard
// logic): an instruction in ID that reads a register still to be written
// by an instruction in EX, MEM or WB is held in ID (IF holds too) and a
// bubble enters EX.  A taken BZ or BC, found when it reaches MEM, squashes
// the three younger instructions in IF, ID and EX; a JMP squashes only the
// instruction in IF.  Without hazards one instruction completes per clock;
// a taken conditional branch costs 3 cycles, a jump 1, and a dependent
// instruction waits up to 3 cycles.
//
// Ports: clk; reset, synchronous and active low, clears the PC, the carry
// flag, the register bank and the latch valid bits; pc, stall, flush (a
// taken branch in MEM) and jump (a JMP redirecting from ID) are brought
// out for observation.  The
// instruction memory is loaded by the environment.
module pipe16_cpu
  import risc16_pkg::*;
#(
  parameter int IMEM_DEPTH = 256,
  parameter int DMEM_DEPTH = 256
) (
  input  logic            clk,
  input  logic            reset,
  output logic [XLEN-1:0] pc,
  output logic            stall,
  output logic            flush,
  output logic            jump
);
  localparam logic [XLEN-1:0] ZERO = '0;

  logic rst;
  assign rst = !reset;

  if_id_t  if_id;
  id_ex_t  id_ex;
  ex_mem_t ex_mem;
  mem_wb_t mem_wb;

  // ---- IF -----------------------------------------------------------------
  logic [XLEN-1:0] npc, instr;
  logic            npc_cout, npc_cp;

  adder_16 #(.WIDTH(XLEN)) pc_adder (
    .ain(pc), .bin(ZERO), .cin(1'b1), .sum(npc), .cout(npc_cout), .cp(npc_cp)
  );

  memory #(.WIDTH(XLEN), .DEPTH(IMEM_DEPTH)) imem (
    .clk, .re(1'b1), .we(1'b0), .addr(pc), .wdata(ZERO), .rdata(instr)
  );

  logic [XLEN-1:0] jump_target;
  logic            jump_seen;

  // an older taken branch in MEM overrides a jump in ID
  assign jump = jump_seen && !flush;

  always_ff @(posedge clk) begin
    if (rst)         pc <= '0;
    else if (flush)  pc <= ex_mem.alu;
    else if (jump)   pc <= jump_target;
    else if (!stall) pc <= npc;
  end

  always_ff @(posedge clk) begin
    if (rst || flush || jump) if_id.valid <= 1'b0;
    else if (!stall)          if_id <= '{valid: 1'b1, npc: npc, instr: instr};
  end

  // ---- ID -----------------------------------------------------------------
  pipe_ctrl_t      ctrl;
  logic [3:0]      raddr_a, raddr_b, rd;
  logic [XLEN-1:0] rdata_a, rdata_b, off4, imm8, wb_data;
  logic            wb_we, hz_a, hz_b;

  pipe_decoder u_dec (.opcode(if_id.instr[15:12]), .ctrl);

  jump_unit u_jump (
    .valid(if_id.valid), .instr(if_id.instr), .npc(if_id.npc), .jump(jump_seen), .target(jump_target)
  );

  assign rd      = if_id.instr[11:8];
  assign raddr_a = ctrl.a_is_rd ? rd : if_id.instr[7:4];
  assign raddr_b = ctrl.b_is_rd ? rd : if_id.instr[3:0];

  assign off4 = sext4(if_id.instr[3:0]);
  assign imm8 = sext8(if_id.instr[7:0]);

  regfile #(.WIDTH(XLEN), .NREGS(16)) u_regfile (
    .clk, .rst, .we(wb_we), .raddr_a, .raddr_b, .waddr(mem_wb.rd), .wdata(wb_data),
    .rdata_a, .rdata_b
  );

  // a register read in ID is pending if an older instruction still writes it
  function automatic logic pending(input logic [3:0] r);
    return (id_ex.valid  && id_ex.ctrl.reg_write  && id_ex.rd  == r) ||
           (ex_mem.valid && ex_mem.ctrl.reg_write && ex_mem.rd == r) ||
           (mem_wb.valid && mem_wb.reg_write      && mem_wb.rd == r);
  endfunction

  assign hz_a  = ctrl.use_a && pending(raddr_a);
  assign hz_b  = ctrl.use_b && pending(raddr_b);
  assign stall = if_id.valid && (hz_a || hz_b) && !flush;

  always_ff @(posedge clk) begin
    if (rst || flush || stall || !if_id.valid) begin
      id_ex.valid <= 1'b0;
    end else begin
      id_ex <= '{valid: 1'b1, ctrl: ctrl, npc: if_id.npc, a: rdata_a, b: rdata_b,
                 off4: off4, imm8: imm8, rd: rd};
    end
  end

  // ---- EX -----------------------------------------------------------------
  logic [XLEN-1:0] opa, opb, alu_y;
  logic            alu_c, flag, taken;

  always_comb begin
    unique case (id_ex.ctrl.opa)
      PA_NPC:  opa = id_ex.npc;
      PA_ZERO: opa = ZERO;
      default: opa = id_ex.a;
    endcase
  end

  mux_4by1 #(.WIDTH(XLEN)) opbmux (
    .d0(XLEN'(1)), .d1(id_ex.b), .d2(id_ex.off4), .d3(id_ex.imm8), .sel(id_ex.ctrl.opb), .out(opb)
  );

  alu16b #(.WIDTH(XLEN)) alu (
    .ALUCON(id_ex.ctrl.alu), .PORT1(opa), .PORT2(opb), .ALUOUT(alu_y), .carry(alu_c)
  );

  assign taken = (id_ex.ctrl.is_bz && id_ex.a == ZERO) || (id_ex.ctrl.is_bc && flag);

  always_ff @(posedge clk) begin
    if (rst) flag <= 1'b0;
    else if (id_ex.valid && id_ex.ctrl.set_flag && !flush) flag <= alu_c;
  end

  always_ff @(posedge clk) begin
    if (rst || flush || !id_ex.valid) begin
      ex_mem.valid <= 1'b0;
    end else begin
      ex_mem <= '{valid: 1'b1, ctrl: id_ex.ctrl, taken: taken, alu: alu_y, b: id_ex.b,
                  rd: id_ex.rd};
    end
  end

  // ---- MEM ----------------------------------------------------------------
  logic [XLEN-1:0] mdata;

  assign flush = ex_mem.valid && ex_mem.taken;

  memory #(.WIDTH(XLEN), .DEPTH(DMEM_DEPTH)) dmem (
    .clk, .re(ex_mem.valid && ex_mem.ctrl.mem_read), .we(ex_mem.valid && ex_mem.ctrl.mem_write),
    .addr(ex_mem.alu), .wdata(ex_mem.b), .rdata(mdata)
  );

  always_ff @(posedge clk) begin
    if (rst || !ex_mem.valid) begin
      mem_wb.valid <= 1'b0;
    end else begin
      mem_wb <= '{valid: 1'b1, reg_write: ex_mem.ctrl.reg_write, mem_read: ex_mem.ctrl.mem_read,
                  alu: ex_mem.alu, mdata: mdata, rd: ex_mem.rd};
    end
  end

  // ---- WB -----------------------------------------------------------------
  assign wb_we   = mem_wb.valid && mem_wb.reg_write;
  assign wb_data = mem_wb.mem_read ? mem_wb.mdata : mem_wb.alu;

  // a squashing branch and a stall are never both acted on
  assert property (@(posedge clk) disable iff (rst) !(stall && flush));
endmodule
