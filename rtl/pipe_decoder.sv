// pipe_decoder: instruction decoder of the five-stage pipeline.
//
// Turns the 4-bit opcode in instr[15:12] into the pipe_ctrl_t control word
// that travels with the instruction through the ID/EX, EX/MEM and MEM/WB
// latches (a JMP, handled by jump_unit in ID, becomes a no-op): register
// port addressing, which operands are read (for the
// hazard check), ALU operand selects and operation, carry-flag update,
// register write, load/store and branch kind.  The decode of the opcode in
// the decode stage follows the design; the control word itself and the
// instruction set are this implementation's (see risc16_pkg).
// Purely combinational.
module pipe_decoder
  import risc16_pkg::*;
(
  input  logic [3:0] opcode,
  output pipe_ctrl_t ctrl
);
  opcode_e op;
  assign op = opcode_e'(opcode);

  always_comb begin
    ctrl = '0;
    ctrl.opa = PA_REG;
    ctrl.opb = OPB_REG;
    ctrl.alu = ALU_ADD;
    if (opcode[3] == 1'b0) begin  // ADD .. SHR: rd = rs <op> rt
      ctrl.use_a     = 1'b1;
      ctrl.use_b     = 1'b1;
      ctrl.alu       = alu_op_e'(opcode[2:0]);
      ctrl.set_flag  = 1'b1;
      ctrl.reg_write = 1'b1;
    end else begin
      unique case (op)
        OP_ADDI: begin
          ctrl.a_is_rd = 1'b1; ctrl.use_a = 1'b1; ctrl.opb = OPB_IMM8;
          ctrl.set_flag = 1'b1; ctrl.reg_write = 1'b1;
        end
        OP_LD: begin
          ctrl.use_a = 1'b1; ctrl.opb = OPB_OFF4;
          ctrl.mem_read = 1'b1; ctrl.reg_write = 1'b1;
        end
        OP_ST: begin
          ctrl.use_a = 1'b1; ctrl.b_is_rd = 1'b1; ctrl.use_b = 1'b1;
          ctrl.opb = OPB_OFF4; ctrl.mem_write = 1'b1;
        end
        OP_BZ: begin
          ctrl.a_is_rd = 1'b1; ctrl.use_a = 1'b1;
          ctrl.opa = PA_NPC; ctrl.opb = OPB_IMM8; ctrl.is_bz = 1'b1;
        end
        OP_BC: begin
          ctrl.opa = PA_NPC; ctrl.opb = OPB_IMM8; ctrl.is_bc = 1'b1;
        end
        OP_JMP: ;  // taken in ID by jump_unit; no work in later stages
        OP_LI: begin
          ctrl.opa = PA_ZERO; ctrl.opb = OPB_IMM8; ctrl.reg_write = 1'b1;
        end
        default: begin  // OP_CLR: rd = 0 & x
          ctrl.opa = PA_ZERO; ctrl.alu = ALU_AND; ctrl.reg_write = 1'b1;
        end
      endcase
    end
  end
endmodule
