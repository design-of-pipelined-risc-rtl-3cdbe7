// registers: WIDTH-bit register with load enable and synchronous,
// active-high reset to 0.  q takes d on the rising edge when en is high.
// Used for the program counter, the instruction register, the memory data
// register and the A, B and ALU-out registers of the datapath.
module registers #(
  parameter int WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (en) q <= d;
  end
endmodule
