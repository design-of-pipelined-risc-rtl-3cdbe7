// logic_low_unit: the four bitwise results of the logic unit, computed in
// parallel: and_out = a & b, or_out = a | b, xor_out = a ^ b,
// xnor_out = ~(a ^ b).  Purely combinational.
module logic_low_unit #(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] ain,
  input  logic [WIDTH-1:0] bin,
  output logic [WIDTH-1:0] and_out,
  output logic [WIDTH-1:0] or_out,
  output logic [WIDTH-1:0] xor_out,
  output logic [WIDTH-1:0] xnor_out
);
  assign and_out  = ain & bin;
  assign or_out   = ain | bin;
  assign xor_out  = ain ^ bin;
  assign xnor_out = ~(ain ^ bin);
endmodule
