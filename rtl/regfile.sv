// regfile: register bank of NREGS registers of WIDTH bits.
//
// Two asynchronous read ports (A and B) and one write port that writes
// wdata to waddr on the rising clock edge when we is high.  A synchronous,
// active-high rst clears every register.  A read of the register being
// written returns the old value until the edge.  The bank and its role as
// fast operand storage are the design's; the register count, the port
// arrangement and the reset are this implementation's choices.
module regfile #(
  parameter int WIDTH = 16,
  parameter int NREGS = 16,
  localparam int AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             we,
  input  logic [AW-1:0]    raddr_a,
  input  logic [AW-1:0]    raddr_b,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata_a,
  output logic [WIDTH-1:0] rdata_b
);
  logic [WIDTH-1:0] regs [NREGS];

  assign rdata_a = regs[raddr_a];
  assign rdata_b = regs[raddr_b];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end
endmodule
