// fulladder: one-bit full adder made of two half adders and an OR gate,
// the structure of the 16-bit adder's bit cell.  sum = a ^ b ^ cin,
// cout = a&b | (a^b)&cin, which equals the majority a&b | b&cin | cin&a.
// Purely combinational.
module fulladder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic s1, c1, c2;

  halfadder ha1 (.a(a),  .b(b),   .sum(s1),  .carry(c1));
  halfadder ha2 (.a(s1), .b(cin), .sum(sum), .carry(c2));

  assign cout = c1 | c2;
endmodule
