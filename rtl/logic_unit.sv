// logic_unit: 16-bit logic unit.
//
// logic_low_unit forms AND, OR, XOR and XNOR of ain and bin side by side and
// a 4-to-1 multiplexer hands one of them to res_out:
//   sel = 00 AND, 01 OR, 10 XOR, 11 XNOR.
// This split into a gate bank and a multiplexer, the select coding and the
// port names are the design's.  Purely combinational.
module logic_unit #(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] ain,
  input  logic [WIDTH-1:0] bin,
  input  logic [1:0]       sel,
  output logic [WIDTH-1:0] res_out
);
  logic [WIDTH-1:0] and_out, or_out, xor_out, xnor_out;

  logic_low_unit #(.WIDTH(WIDTH)) u_low (
    .ain, .bin, .and_out, .or_out, .xor_out, .xnor_out
  );

  mux_4by1 #(.WIDTH(WIDTH)) u_mux (
    .d0(and_out), .d1(or_out), .d2(xor_out), .d3(xnor_out), .sel, .out(res_out)
  );
endmodule
