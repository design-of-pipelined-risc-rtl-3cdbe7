// memory: word-addressed RAM that holds both the program and the data.
//
// DEPTH words of WIDTH bits.  Reads are asynchronous: rdata shows the word
// at addr while re is high and 0 otherwise.  Writes happen on the rising
// clock edge when we is high; wdata is stored at addr.  Only the low
// $clog2(DEPTH) address bits are decoded, so the space wraps around.
// A single memory shared by instruction fetch and data access, selected by
// the datapath's address multiplexer, follows the design; the depth, the
// read timing and the read-gating are this implementation's choices.  The
// contents are not reset.
module memory #(
  parameter int WIDTH = 16,
  parameter int DEPTH = 256
) (
  input  logic             clk,
  input  logic             re,
  input  logic             we,
  input  logic [WIDTH-1:0] addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    a;

  assign a     = addr[AW-1:0];
  assign rdata = re ? mem[a] : '0;

  always_ff @(posedge clk) begin
    if (we) mem[a] <= wdata;
  end
endmodule
