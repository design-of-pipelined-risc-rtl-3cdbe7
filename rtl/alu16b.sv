// alu16b: 16-bit arithmetic and logic unit.
//
// ALUCON selects the operation (codes from risc16_pkg::alu_op_e):
//   000 PORT1 + PORT2        carry = carry out
//   001 PORT1 - PORT2        carry = borrow (1 when PORT2 > PORT1, unsigned)
//   010 PORT1 & PORT2        carry = 0
//   011 PORT1 | PORT2        carry = 0
//   100 PORT1 ^ PORT2        carry = 0
//   101 ~PORT1               carry = 0
//   110 PORT1 << 1           carry = PORT1[15]
//   111 PORT1 >> 1 (logical) carry = PORT1[0]
// The operation table and port names are the design's.  The carry rules for
// subtraction and shifts, the shift distance of one bit, and reusing adder_16
// (subtraction as PORT1 + ~PORT2 + 1) and logic_unit inside the ALU are this
// implementation's choices.  Purely combinational.
module alu16b
  import risc16_pkg::*;
#(
  parameter int WIDTH = 16
) (
  input  logic [2:0]       ALUCON,
  input  logic [WIDTH-1:0] PORT1,
  input  logic [WIDTH-1:0] PORT2,
  output logic [WIDTH-1:0] ALUOUT,
  output logic             carry
);
  alu_op_e          op;
  logic             is_sub;
  logic [WIDTH-1:0] add_b, add_sum, logic_res;
  logic             add_cout, add_cp;
  logic [1:0]       logic_sel;

  assign op     = alu_op_e'(ALUCON);
  assign is_sub = (op == ALU_SUB);
  assign add_b  = is_sub ? ~PORT2 : PORT2;

  adder_16 #(.WIDTH(WIDTH)) u_adder (
    .ain(PORT1), .bin(add_b), .cin(is_sub), .sum(add_sum), .cout(add_cout), .cp(add_cp)
  );

  // logic_unit select: 00 AND, 01 OR, 10 XOR
  always_comb begin
    unique case (op)
      ALU_OR:  logic_sel = 2'b01;
      ALU_XOR: logic_sel = 2'b10;
      default: logic_sel = 2'b00;
    endcase
  end

  logic_unit #(.WIDTH(WIDTH)) u_logic (
    .ain(PORT1), .bin(PORT2), .sel(logic_sel), .res_out(logic_res)
  );

  always_comb begin
    carry = 1'b0;
    unique case (op)
      ALU_ADD: begin ALUOUT = add_sum; carry = add_cout;  end
      ALU_SUB: begin ALUOUT = add_sum; carry = ~add_cout; end
      ALU_AND,
      ALU_OR,
      ALU_XOR: ALUOUT = logic_res;
      ALU_NOT: ALUOUT = ~PORT1;
      ALU_SHL: begin ALUOUT = {PORT1[WIDTH-2:0], 1'b0}; carry = PORT1[WIDTH-1]; end
      ALU_SHR: begin ALUOUT = {1'b0, PORT1[WIDTH-1:1]}; carry = PORT1[0]; end
      default: ALUOUT = '0;
    endcase
  end
endmodule
