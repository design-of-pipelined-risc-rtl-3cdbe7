// tb_regfile: self-checking test of the register bank.
// After reset every register must read 0; then random writes and reads on
// both ports are compared against a shadow array.  Also checks that a
// write with we low changes nothing and that a register being written
// reads its old value until the clock edge.
module tb_regfile;
  logic        clk = 1'b0;
  logic        rst, we;
  logic [3:0]  raddr_a, raddr_b, waddr;
  logic [15:0] wdata, rdata_a, rdata_b;
  logic [15:0] shadow [16];
  int          checks = 0, failures = 0, cycles = 0;

  regfile #(.WIDTH(16), .NREGS(16)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    rst = 1'b1; we = 1'b0; waddr = '0; wdata = '0; raddr_a = '0; raddr_b = '0;
    @(negedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 16; i++) begin
      shadow[i] = '0;
      raddr_a = 4'(i); raddr_b = 4'(15 - i);
      #1 check("reset A", rdata_a, 16'h0);
      check("reset B", rdata_b, 16'h0);
    end
    // we low: no write
    waddr = 4'd3; wdata = 16'hBEEF; we = 1'b0;
    @(negedge clk);
    raddr_a = 4'd3;
    #1 check("no write", rdata_a, 16'h0);
    // old value until the edge
    we = 1'b1;
    #1 check("before edge", rdata_a, 16'h0);
    @(negedge clk);
    shadow[3] = 16'hBEEF;
    check("after edge", rdata_a, 16'hBEEF);
    for (int i = 0; i < 2000; i++) begin
      we = 1'($urandom); waddr = 4'($urandom); wdata = 16'($urandom);
      raddr_a = 4'($urandom); raddr_b = 4'($urandom);
      #1 check("port A", rdata_a, shadow[raddr_a]);
      check("port B", rdata_b, shadow[raddr_b]);
      @(negedge clk);
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
