// risc16_top: the 16-bit RISC processor, in its two forms side by side.
//
// Multi-cycle form (ports without prefix): control_unit and datapath
// joined signal for signal.  The controller drives every select and write
// enable of the datapath and reads back the opcode (irout), the register A
// value (outA) and the ALU carry, which are also the top's outputs.  The
// processor runs the program held in the datapath's memory from address 0
// after reset, one instruction every 4 clock cycles (a load every 5).
// Ports: clk; reset, active low (the datapath receives its inverse as its
// active-high rst).
//
// Pipelined form (ports prefixed pl_): pipe16_cpu, the five-stage IF, ID,
// EX, MEM, WB organisation running the same instruction set with separate
// instruction and data memories, one instruction per clock when no hazard
// occurs.  It has its own clock and reset (active low) and brings out its
// PC, stall, squash and jump signals.
//
// The two forms share nothing; their memories are loaded by the
// environment (for simulation, directly into the memory arrays).
module risc16_top
  import risc16_pkg::*;
#(
  parameter int MEM_DEPTH  = 256,
  parameter int IMEM_DEPTH = 256,
  parameter int DMEM_DEPTH = 256
) (
  input  logic            clk,
  input  logic            reset,
  output logic [3:0]      irout,
  output logic [XLEN-1:0] outA,
  output logic            carry,
  input  logic            pl_clk,
  input  logic            pl_reset,
  output logic [XLEN-1:0] pl_pc,
  output logic            pl_stall,
  output logic            pl_flush,
  output logic            pl_jump
);
  logic       pc_sel, pc_wrt, addr_sel, ir_wrt, rega_sel, reg_wrt, opa_sel, re, we;
  logic [1:0] data_sel, opb_sel;
  logic [2:0] alu_sel;

  control_unit u_control (
    .clk, .reset, .opcode(irout), .outA, .carry,
    .pc_sel, .pc_wrt, .addr_sel, .ir_wrt, .rega_sel, .reg_wrt, .opa_sel, .re, .we,
    .data_sel, .opb_sel, .alu_sel
  );

  datapath #(.MEM_DEPTH(MEM_DEPTH)) u_datapath (
    .clk, .rst(!reset),
    .alu_sel, .data_sel, .opb_sel, .addr_sel, .ir_wrt, .opa_sel, .pc_sel, .pc_wrt,
    .re, .rega_sel, .reg_wrt, .we,
    .irout, .outA, .carry
  );

  pipe16_cpu #(.IMEM_DEPTH(IMEM_DEPTH), .DMEM_DEPTH(DMEM_DEPTH)) u_pipe (
    .clk(pl_clk), .reset(pl_reset), .pc(pl_pc), .stall(pl_stall), .flush(pl_flush), .jump(pl_jump)
  );
endmodule
