// risc16_pkg: types and constants shared by the 16-bit processor.
//
// Holds the ALU operation codes, the instruction opcodes, the control
// state encodings and the multiplexer select codes that control_unit and
// datapath agree on.  The ALU codes follow the 3-bit ALU opcode table of the
// design (000 add ... 111 shift right) and the state codes are the ones the
// controller uses (start = 100, s0..s3 = 000..011).  The instruction set
// (opcode values, field layout) and the select-code assignments are this
// implementation's own choice; the design only fixes a 4-bit opcode in
// bits 15:12 of a 16-bit instruction.
package risc16_pkg;

  localparam int XLEN = 16;  // data and instruction width

  // Sign extension of the 4-bit offset and 8-bit immediate fields (the
  // datapath's sign extender).
  function automatic logic [XLEN-1:0] sext4(input logic [3:0] v);
    return {{(XLEN-4){v[3]}}, v};
  endfunction

  function automatic logic [XLEN-1:0] sext8(input logic [7:0] v);
    return {{(XLEN-8){v[7]}}, v};
  endfunction

  // ALU operation (alucon / alu_sel)
  typedef enum logic [2:0] {
    ALU_ADD = 3'b000,
    ALU_SUB = 3'b001,
    ALU_AND = 3'b010,
    ALU_OR  = 3'b011,
    ALU_XOR = 3'b100,
    ALU_NOT = 3'b101,  // ~port1
    ALU_SHL = 3'b110,  // port1 << 1
    ALU_SHR = 3'b111   // port1 >> 1 (logical)
  } alu_op_e;

  // Instruction opcodes, instruction[15:12].
  // R-type     : op rd rs rt     rd = rs <op> rt        (op 0000..0111, ALU code = op[2:0])
  // ADDI       : op rd imm8      rd = rd + sext(imm8)
  // LD / ST    : op rd rs off4   rd = M[rs+sext(off4)] / M[rs+sext(off4)] = rd
  // BZ         : op rd off8      if rd == 0: pc = pc + 1 + sext(off8)
  // BC / JMP   : op -- off8      if carry flag / always: pc = pc + 1 + sext(off8)
  // LI / CLR   : op rd imm8      rd = sext(imm8) / rd = 0
  typedef enum logic [3:0] {
    OP_ADD  = 4'b0000,
    OP_SUB  = 4'b0001,
    OP_AND  = 4'b0010,
    OP_OR   = 4'b0011,
    OP_XOR  = 4'b0100,
    OP_NOT  = 4'b0101,
    OP_SHL  = 4'b0110,
    OP_SHR  = 4'b0111,
    OP_ADDI = 4'b1000,
    OP_LD   = 4'b1001,
    OP_ST   = 4'b1010,
    OP_BZ   = 4'b1011,
    OP_BC   = 4'b1100,
    OP_JMP  = 4'b1101,
    OP_LI   = 4'b1110,
    OP_CLR  = 4'b1111
  } opcode_e;

  // Controller states.  START and S0..S3 use the design's codes; S4 (load
  // write-back) is an extra state of this implementation.
  typedef enum logic [2:0] {
    S0    = 3'b000,  // fetch: IR <= M[PC], PC <= PC + 1
    S1    = 3'b001,  // decode: read registers, ALU-out <= PC + sext(imm8)
    S2    = 3'b010,  // execute / branch
    S3    = 3'b011,  // memory access / register write-back
    START = 3'b100,  // after reset
    S4    = 3'b101   // load write-back from the memory data register
  } state_e;

  // ALU operand B select (opb_sel)
  typedef enum logic [1:0] {
    OPB_ONE  = 2'b00,  // constant 1 (the controller's idle value)
    OPB_REG  = 2'b01,  // register B
    OPB_OFF4 = 2'b10,  // sext(instruction[3:0])
    OPB_IMM8 = 2'b11   // sext(instruction[7:0])
  } opb_sel_e;

  // Register write-data select (data_sel)
  typedef enum logic [1:0] {
    DS_ALU  = 2'b00,  // ALU-out register
    DS_MDR  = 2'b01,  // memory data register
    DS_IMM8 = 2'b10,  // sext(instruction[7:0])
    DS_ZERO = 2'b11   // constant 0
  } data_sel_e;

  // ---- five-stage pipeline (pipe16_cpu) ----------------------------------

  // ALU operand A select in the pipeline's execute stage
  typedef enum logic [1:0] {
    PA_REG  = 2'b00,  // register A
    PA_NPC  = 2'b01,  // next sequential PC (branch target base)
    PA_ZERO = 2'b10   // constant 0 (LI, CLR)
  } pipe_opa_e;

  // Decoded control of one instruction, carried down the pipeline.
  typedef struct packed {
    logic      a_is_rd;    // register port A reads rd instead of rs
    logic      b_is_rd;    // register port B reads rd instead of rt
    logic      use_a;      // port A value is needed (hazard check)
    logic      use_b;      // port B value is needed (hazard check)
    pipe_opa_e opa;        // ALU operand A
    opb_sel_e  opb;        // ALU operand B (OPB_ONE unused)
    alu_op_e   alu;        // ALU operation
    logic      set_flag;   // update the carry flag
    logic      reg_write;  // write rd in write-back
    logic      mem_read;   // load
    logic      mem_write;  // store
    logic      is_bz;
    logic      is_bc;
  } pipe_ctrl_t;

  typedef struct packed {
    logic            valid;
    logic [XLEN-1:0] npc;
    logic [XLEN-1:0] instr;
  } if_id_t;

  typedef struct packed {
    logic            valid;
    pipe_ctrl_t      ctrl;
    logic [XLEN-1:0] npc;
    logic [XLEN-1:0] a;
    logic [XLEN-1:0] b;
    logic [XLEN-1:0] off4;
    logic [XLEN-1:0] imm8;
    logic [3:0]      rd;
  } id_ex_t;

  typedef struct packed {
    logic            valid;
    pipe_ctrl_t      ctrl;
    logic            taken;    // branch condition met
    logic [XLEN-1:0] alu;      // ALU result: value, address or branch target
    logic [XLEN-1:0] b;        // store data
    logic [3:0]      rd;
  } ex_mem_t;

  typedef struct packed {
    logic            valid;
    logic            reg_write;
    logic            mem_read;
    logic [XLEN-1:0] alu;
    logic [XLEN-1:0] mdata;
    logic [3:0]      rd;
  } mem_wb_t;

endpackage
