// jump_unit: the pipeline's separate unit for unconditional jumps.
//
// Looks at the instruction in the decode stage.  When it is a valid JMP,
// jump is raised and target = next PC + sext(instr[7:0]) is formed by a
// dedicated adder_16, so the jump redirects the fetch one stage after it
// was fetched instead of travelling to MEM like the conditional branches.
// That a jump has a block of its own follows the design; where it sits and
// how it works are this implementation's.  Purely combinational.
module jump_unit
  import risc16_pkg::*;
(
  input  logic            valid,
  input  logic [XLEN-1:0] instr,
  input  logic [XLEN-1:0] npc,
  output logic            jump,
  output logic [XLEN-1:0] target
);
  logic cout, cp;

  adder_16 #(.WIDTH(XLEN)) u_add (
    .ain(npc), .bin(sext8(instr[7:0])), .cin(1'b0), .sum(target), .cout, .cp
  );

  assign jump = valid && (opcode_e'(instr[15:12]) == OP_JMP);
endmodule
