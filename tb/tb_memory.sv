// tb_memory: self-checking test of the program/data memory.
// Writes every word, then mixes random writes and reads and compares
// against a shadow array; checks that rdata is 0 with re low, that a write
// lands on the clock edge, and that addresses wrap at the depth.
module tb_memory;
  localparam int DEPTH = 256;
  logic        clk = 1'b0;
  logic        re, we;
  logic [15:0] addr, wdata, rdata;
  logic [15:0] shadow [DEPTH];
  int          checks = 0, failures = 0, cycles = 0;

  memory #(.WIDTH(16), .DEPTH(DEPTH)) dut (.clk, .re, .we, .addr, .wdata, .rdata);

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
      $display("FAIL %s addr=%h: got %h expected %h", what, addr, got, exp);
    end
  endtask

  initial begin
    re = 1'b0; we = 1'b0; addr = '0; wdata = '0;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      addr = 16'(i); wdata = 16'($urandom); we = 1'b1; shadow[i] = wdata;
      @(negedge clk);
    end
    we = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      addr = 16'(i); re = 1'b1;
      #1 check("read", rdata, shadow[i]);
      re = 1'b0;
      #1 check("read gated", rdata, 16'h0000);
      @(negedge clk);
    end
    // write becomes visible only after the edge
    addr = 16'd17; wdata = ~shadow[17]; we = 1'b1; re = 1'b1;
    #1 check("before edge", rdata, shadow[17]);
    @(negedge clk);
    shadow[17] = wdata; we = 1'b0;
    check("after edge", rdata, shadow[17]);
    // address wrap
    addr = 16'(DEPTH + 5);
    #1 check("wrap", rdata, shadow[5]);
    for (int i = 0; i < 2000; i++) begin
      addr = 16'($urandom);
      if ($urandom_range(1, 0) == 1) begin
        we = 1'b1; re = 1'b0; wdata = 16'($urandom);
        shadow[addr[7:0]] = wdata;
        @(negedge clk);
        we = 1'b0;
      end else begin
        we = 1'b0; re = 1'b1;
        #1 check("random read", rdata, shadow[addr[7:0]]);
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
