// datapath: the 16-bit processor's multi-cycle datapath.
//
// State elements: program counter (pc), instruction register (ir), memory
// data register (mdr), A and B operand registers (adata, bdata), ALU-out
// register (aluout), a 16-entry register bank and one memory shared by
// instructions and data.  Each rising edge, under the control_unit's
// signals:
//   pc     <= pc_sel ? aluout : ALU result          when pc_wrt
//   ir     <= memout                                 when ir_wrt
//   mdr    <= memout                                 when re
//   adata  <= R[rega_sel ? ir[11:8] : ir[7:4]]       every cycle
//   bdata  <= R[ir[3:0]]                             every cycle
//   aluout <= ALU result                             every cycle
//   R[ir[11:8]] <= data_sel-selected word            when reg_wrt
//   M[addr] <= adata                                 when we
// with memory address = addr_sel ? aluout : pc, ALU operand A =
// opa_sel ? adata : pc, operand B chosen by opb_sel from {1, bdata,
// sext(ir[3:0]), sext(ir[7:0])} and register write data chosen by data_sel
// from {aluout, mdr, sext(ir[7:0]), 0}.  irout (ir[15:12]), outA (adata) and
// the ALU carry go back to the control unit.
// The port list and the set of units (memory, mdr, pc, pc/register/operand
// multiplexers, ALU, register bank, A/B registers, instruction register,
// sign extension, constants zero and one) follow the design; the field
// layout, the multiplexer codings and the memory depth are this
// implementation's own.  rst is synchronous and active high; it clears
// every register except the memory contents.
module datapath
  import risc16_pkg::*;
#(
  parameter int MEM_DEPTH = 256
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [2:0]      alu_sel,
  input  logic [1:0]      data_sel,
  input  logic [1:0]      opb_sel,
  input  logic            addr_sel,
  input  logic            ir_wrt,
  input  logic            opa_sel,
  input  logic            pc_sel,
  input  logic            pc_wrt,
  input  logic            re,
  input  logic            rega_sel,
  input  logic            reg_wrt,
  input  logic            we,
  output logic [3:0]      irout,
  output logic [XLEN-1:0] outA,
  output logic            carry
);
  localparam logic [XLEN-1:0] ZERO = '0;
  localparam logic [XLEN-1:0] ONE  = XLEN'(1);

  logic [XLEN-1:0] pc, pc_next, ir, memout, mdr, addr;
  logic [XLEN-1:0] ra, rb, adata, bdata, opa, opb, alu_result, aluout;
  logic [XLEN-1:0] offsetdata, immdata, wdata;
  logic [3:0]      raddr_a;

  // ---- fetch side ---------------------------------------------------------
  mux2_to_1 #(.WIDTH(XLEN)) pcmux (.d0(alu_result), .d1(aluout), .sel(pc_sel), .out(pc_next));
  registers #(.WIDTH(XLEN)) programcounter (.clk, .rst, .en(pc_wrt), .d(pc_next), .q(pc));

  mux2_to_1 #(.WIDTH(XLEN)) addrmux (.d0(pc), .d1(aluout), .sel(addr_sel), .out(addr));
  memory #(.WIDTH(XLEN), .DEPTH(MEM_DEPTH)) u_mem (
    .clk, .re, .we, .addr, .wdata(adata), .rdata(memout)
  );

  registers #(.WIDTH(XLEN)) instr_reg       (.clk, .rst, .en(ir_wrt), .d(memout), .q(ir));
  registers #(.WIDTH(XLEN)) memory_data_reg (.clk, .rst, .en(re),     .d(memout), .q(mdr));

  // ---- decode / register read --------------------------------------------
  assign offsetdata = sext4(ir[3:0]);
  assign immdata    = sext8(ir[7:0]);

  mux2_to_1 #(.WIDTH(4)) regamux (.d0(ir[7:4]), .d1(ir[11:8]), .sel(rega_sel), .out(raddr_a));

  mux_4by1 #(.WIDTH(XLEN)) datamux (
    .d0(aluout), .d1(mdr), .d2(immdata), .d3(ZERO), .sel(data_sel), .out(wdata)
  );

  regfile #(.WIDTH(XLEN), .NREGS(16)) u_regfile (
    .clk, .rst, .we(reg_wrt), .raddr_a, .raddr_b(ir[3:0]), .waddr(ir[11:8]),
    .wdata, .rdata_a(ra), .rdata_b(rb)
  );

  registers #(.WIDTH(XLEN)) rega (.clk, .rst, .en(1'b1), .d(ra), .q(adata));
  registers #(.WIDTH(XLEN)) regb (.clk, .rst, .en(1'b1), .d(rb), .q(bdata));

  // ---- execute ------------------------------------------------------------
  mux2_to_1 #(.WIDTH(XLEN)) opamux (.d0(pc), .d1(adata), .sel(opa_sel), .out(opa));
  mux_4by1 #(.WIDTH(XLEN)) opbmux (
    .d0(ONE), .d1(bdata), .d2(offsetdata), .d3(immdata), .sel(opb_sel), .out(opb)
  );

  alu16b #(.WIDTH(XLEN)) alu (
    .ALUCON(alu_sel), .PORT1(opa), .PORT2(opb), .ALUOUT(alu_result), .carry
  );

  registers #(.WIDTH(XLEN)) alu_out (.clk, .rst, .en(1'b1), .d(alu_result), .q(aluout));

  assign irout = ir[15:12];
  assign outA  = adata;

  // A memory read and write in the same cycle never happen.
  assert property (@(posedge clk) disable iff (rst) !(re && we));
endmodule
