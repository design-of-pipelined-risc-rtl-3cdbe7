// halfadder: one-bit half adder, sum = a ^ b, carry = a & b.
// Building block of fulladder; purely combinational.
module halfadder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b;
  assign carry = a & b;
endmodule
