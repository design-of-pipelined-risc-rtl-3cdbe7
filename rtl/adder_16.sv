// adder_16: ripple-carry adder of WIDTH full adders (default 16 bits).
//
// Bit i adds ain[i], bin[i] and the carry out of bit i-1 (cin for bit 0):
// sum[i] = ain[i] ^ bin[i] ^ c[i], c[i+1] = majority(ain[i], bin[i], c[i]).
// cout is the carry out of the top bit and cp is the parity of the sum, the
// XOR of all sum bits.  The full-adder-of-half-adders structure, the port
// names and the parity output are the design's; purely combinational, the
// delay is WIDTH full-adder stages.
module adder_16 #(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] ain,
  input  logic [WIDTH-1:0] bin,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic             cp
);
  logic [WIDTH:0] c;  // c[i] is the carry into bit i

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    fulladder fa (.a(ain[i]), .b(bin[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
  end

  assign cout = c[WIDTH];
  assign cp   = ^sum;
endmodule
