// tb_logic_unit: self-checking test of the 16-bit logic unit.
// Checks the example ain = 1010101010101010, bin = 1100110011001100 with
// the four results written out by hand (AND 1000100010001000, OR
// 1110111011101110, XOR 0110011001100110, XNOR 1001100110011001), then
// random operands for every select value against &, |, ^ and ~^.
module tb_logic_unit;
  logic        clk = 1'b0;
  logic [15:0] ain, bin, res_out;
  logic [1:0]  sel;
  int          checks = 0, failures = 0, cycles = 0;

  logic_unit dut (.ain, .bin, .sel, .res_out);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_res(input logic [1:0] s, input logic [15:0] exp);
    sel = s;
    @(posedge clk);
    checks++;
    if (res_out !== exp) begin
      failures++;
      $display("FAIL a=%b b=%b sel=%b: got %b expected %b", ain, bin, s, res_out, exp);
    end
  endtask

  initial begin
    ain = 16'b1010101010101010;
    bin = 16'b1100110011001100;
    expect_res(2'b00, 16'b1000100010001000);
    expect_res(2'b01, 16'b1110111011101110);
    expect_res(2'b10, 16'b0110011001100110);
    expect_res(2'b11, 16'b1001100110011001);
    for (int i = 0; i < 500; i++) begin
      ain = 16'($urandom);
      bin = 16'($urandom);
      expect_res(2'b00, ain & bin);
      expect_res(2'b01, ain | bin);
      expect_res(2'b10, ain ^ bin);
      expect_res(2'b11, ~(ain ^ bin));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
