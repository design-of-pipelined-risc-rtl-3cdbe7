// mux2_to_1: WIDTH-bit two-input multiplexer, out = sel ? d1 : d0.
// Purely combinational.
module mux2_to_1 #(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic             sel,
  output logic [WIDTH-1:0] out
);
  assign out = sel ? d1 : d0;
endmodule
