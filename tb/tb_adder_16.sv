// tb_adder_16: self-checking test of the 16-bit ripple-carry adder.
// Checks the worked example A = 1010101010101010, B = 1111000011110000,
// cin = 0 (sum 1001101110011010, carry out 1, parity 1), corner cases and
// 2000 random operand sets against a behavioural A + B + cin and the XOR
// of the sum bits.
module tb_adder_16;
  logic        clk = 1'b0;
  logic [15:0] ain, bin, sum;
  logic        cin, cout, cp;
  int          checks = 0, failures = 0, cycles = 0;

  adder_16 dut (.ain, .bin, .cin, .sum, .cout, .cp);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] a, input logic [15:0] b, input logic c);
    logic [16:0] exp;
    ain = a; bin = b; cin = c;
    @(posedge clk);
    exp = {1'b0, a} + {1'b0, b} + 17'(c);
    checks++;
    if (sum !== exp[15:0] || cout !== exp[16] || cp !== ^exp[15:0]) begin
      failures++;
      $display("FAIL a=%h b=%h c=%b: sum=%h cout=%b cp=%b, expected %h %b %b",
               a, b, c, sum, cout, cp, exp[15:0], exp[16], ^exp[15:0]);
    end
  endtask

  initial begin
    // worked example, values computed by hand
    ain = 16'b1010101010101010; bin = 16'b1111000011110000; cin = 1'b0;
    @(posedge clk);
    checks++;
    if (sum !== 16'b1001101110011010 || cout !== 1'b1 || cp !== 1'b1) begin
      failures++;
      $display("FAIL worked example: sum=%b cout=%b cp=%b", sum, cout, cp);
    end
    check(16'h0000, 16'h0000, 1'b0);
    check(16'hFFFF, 16'h0000, 1'b1);
    check(16'hFFFF, 16'hFFFF, 1'b1);
    check(16'h8000, 16'h8000, 1'b0);
    check(16'h7FFF, 16'h0001, 1'b0);
    for (int i = 0; i < 2000; i++) check(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
