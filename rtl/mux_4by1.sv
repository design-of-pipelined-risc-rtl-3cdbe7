// mux_4by1: WIDTH-bit four-input multiplexer, out = d[sel].
// Purely combinational.
module mux_4by1 #(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic [WIDTH-1:0] d2,
  input  logic [WIDTH-1:0] d3,
  input  logic [1:0]       sel,
  output logic [WIDTH-1:0] out
);
  always_comb begin
    unique case (sel)
      2'b00:   out = d0;
      2'b01:   out = d1;
      2'b10:   out = d2;
      default: out = d3;
    endcase
  end
endmodule
