// tb_alu16b: self-checking test of the 16-bit ALU.
// Runs all eight operations on PORT1 = 1111111100000000,
// PORT2 = 0000000011111111 with results worked out by hand, then random
// operands for every operation against a behavioural reference of result
// and carry.  Also 1111111111111111 AND 0000000000000000 = 0.
module tb_alu16b;
  logic        clk = 1'b0;
  logic [2:0]  ALUCON;
  logic [15:0] PORT1, PORT2, ALUOUT;
  logic        carry;
  int          checks = 0, failures = 0, cycles = 0;

  alu16b dut (.ALUCON, .PORT1, .PORT2, .ALUOUT, .carry);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_alu(input logic [2:0] op, input logic [15:0] exp, input logic expc);
    ALUCON = op;
    @(posedge clk);
    checks++;
    if (ALUOUT !== exp || carry !== expc) begin
      failures++;
      $display("FAIL op=%b p1=%h p2=%h: got %h/%b expected %h/%b", op, PORT1, PORT2,
               ALUOUT, carry, exp, expc);
    end
  endtask

  initial begin
    PORT1 = 16'b1111111100000000;
    PORT2 = 16'b0000000011111111;
    expect_alu(3'b000, 16'b1111111111111111, 1'b0);
    expect_alu(3'b001, 16'b1111111000000001, 1'b0);
    expect_alu(3'b010, 16'b0000000000000000, 1'b0);
    expect_alu(3'b011, 16'b1111111111111111, 1'b0);
    expect_alu(3'b100, 16'b1111111111111111, 1'b0);
    expect_alu(3'b101, 16'b0000000011111111, 1'b0);
    expect_alu(3'b110, 16'b1111111000000000, 1'b1);
    expect_alu(3'b111, 16'b0111111110000000, 1'b0);
    // all ones AND all zeros
    PORT1 = 16'b1111111111111111;
    PORT2 = 16'b0000000000000000;
    expect_alu(3'b010, 16'b0000000000000000, 1'b0);
    for (int i = 0; i < 400; i++) begin
      logic [16:0] s;
      PORT1 = 16'($urandom);
      PORT2 = 16'($urandom);
      s = {1'b0, PORT1} + {1'b0, PORT2};
      expect_alu(3'b000, s[15:0], s[16]);
      expect_alu(3'b001, PORT1 - PORT2, PORT2 > PORT1);
      expect_alu(3'b010, PORT1 & PORT2, 1'b0);
      expect_alu(3'b011, PORT1 | PORT2, 1'b0);
      expect_alu(3'b100, PORT1 ^ PORT2, 1'b0);
      expect_alu(3'b101, ~PORT1, 1'b0);
      expect_alu(3'b110, PORT1 << 1, PORT1[15]);
      expect_alu(3'b111, PORT1 >> 1, PORT1[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
