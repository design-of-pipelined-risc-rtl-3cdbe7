// control_unit: multi-cycle controller of the 16-bit processor.
//
// A state machine steps every instruction through four states:
//   S0 fetch   : IR <= M[PC], PC <= PC + 1 (ALU adds PC and the constant 1)
//   S1 decode  : register operands into A and B; ALU-out <= PC + sext(imm8),
//                the branch target
//   S2 execute : ALU operation into ALU-out, load/store address
//                A + sext(off4), or a taken branch PC <= ALU-out; the carry
//                flag is updated by ALU instructions and ADDI
//   S3 memory / write-back : register write of the result, store of A, or
//                the memory read of a load into the memory data register
// and a load takes one extra state, S4, to write the memory data register
// to the register bank.  START is the state after reset and moves to S0.
// BZ branches when outA, the register A value from the datapath, is zero;
// BC branches when the carry flag is set.  An instruction takes 4 cycles
// (a load 5).
// The port list, the START/S0..S3 codes (100, 000, 001, 010, 011), the
// 4-bit opcode and the zero test of outA follow the design.  The instruction
// set, the S4 state, the carry flag register and the exact control values
// in each state are this implementation's.  opb_sel rests at 00 (the
// constant 1) and a branch drives it only with 00 and 11, the two values
// the original controller shows while running a BZ.  reset is synchronous
// and active low.
module control_unit
  import risc16_pkg::*;
(
  input  logic            clk,
  input  logic            reset,
  input  logic [3:0]      opcode,
  input  logic [XLEN-1:0] outA,
  input  logic            carry,
  output logic            pc_sel,
  output logic            pc_wrt,
  output logic            addr_sel,
  output logic            ir_wrt,
  output logic            rega_sel,
  output logic            reg_wrt,
  output logic            opa_sel,
  output logic            re,
  output logic            we,
  output logic [1:0]      data_sel,
  output logic [1:0]      opb_sel,
  output logic [2:0]      alu_sel
);
  state_e  pstate, nstate;
  opcode_e op;
  logic    zero, carry_flag, is_alu_op, take_branch;

  assign op        = opcode_e'(opcode);
  assign zero      = (outA == '0);
  assign is_alu_op = (opcode[3] == 1'b0);  // OP_ADD .. OP_SHR

  always_comb begin
    unique case (op)
      OP_BZ:   take_branch = zero;
      OP_BC:   take_branch = carry_flag;
      OP_JMP:  take_branch = 1'b1;
      default: take_branch = 1'b0;
    endcase
  end

  // ---- state register and carry flag --------------------------------------
  always_ff @(posedge clk) begin
    if (!reset) begin
      pstate     <= START;
      carry_flag <= 1'b0;
    end else begin
      pstate <= nstate;
      if (pstate == S2 && (is_alu_op || op == OP_ADDI)) carry_flag <= carry;
    end
  end

  always_comb begin
    unique case (pstate)
      START:   nstate = S0;
      S0:      nstate = S1;
      S1:      nstate = S2;
      S2:      nstate = S3;
      S3:      nstate = (op == OP_LD) ? S4 : S0;
      S4:      nstate = S0;
      default: nstate = START;
    endcase
  end

  // ---- outputs ------------------------------------------------------------
  always_comb begin
    pc_sel   = 1'b0;
    pc_wrt   = 1'b0;
    addr_sel = 1'b0;
    ir_wrt   = 1'b0;
    rega_sel = 1'b0;
    reg_wrt  = 1'b0;
    opa_sel  = 1'b0;
    re       = 1'b0;
    we       = 1'b0;
    data_sel = DS_ALU;
    opb_sel  = OPB_ONE;
    alu_sel  = ALU_ADD;

    unique case (pstate)
      S0: begin
        re      = 1'b1;
        ir_wrt  = 1'b1;
        opb_sel = OPB_ONE;
        pc_wrt  = 1'b1;
      end
      S1: begin
        rega_sel = (op == OP_ADDI || op == OP_BZ);
        opb_sel  = OPB_IMM8;
      end
      S2: begin
        opa_sel = 1'b1;
        if (is_alu_op) begin
          alu_sel = opcode[2:0];
          opb_sel = OPB_REG;
        end else begin
          unique case (op)
            OP_ADDI: begin
              rega_sel = 1'b1;
              opb_sel  = OPB_IMM8;
            end
            OP_LD:   opb_sel = OPB_OFF4;
            OP_ST: begin
              opb_sel  = OPB_OFF4;
              rega_sel = 1'b1;  // A <= store data R[rd] for S3
            end
            default: ;
          endcase
        end
        if (take_branch) begin
          pc_sel = 1'b1;
          pc_wrt = 1'b1;
        end
      end
      S3: begin
        rega_sel = (op == OP_ST);
        unique case (op)
          OP_LD: begin
            addr_sel = 1'b1;
            re       = 1'b1;
          end
          OP_ST: begin
            addr_sel = 1'b1;
            we       = 1'b1;
          end
          OP_LI: begin
            reg_wrt  = 1'b1;
            data_sel = DS_IMM8;
          end
          OP_CLR: begin
            reg_wrt  = 1'b1;
            data_sel = DS_ZERO;
          end
          OP_BZ, OP_BC, OP_JMP: ;
          default: reg_wrt = 1'b1;  // ALU instructions and ADDI: R[rd] <= ALU-out
        endcase
      end
      S4: begin
        reg_wrt  = 1'b1;
        data_sel = DS_MDR;
      end
      default: ;
    endcase
  end
endmodule
