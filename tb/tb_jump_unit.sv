// tb_jump_unit: self-checking test of the pipeline's jump unit.
// For hand-picked and random instructions, next-PC values and valid bits,
// jump must be high exactly for a valid JMP (opcode 1101) and target must
// equal next PC plus the sign-extended 8-bit offset, wrapping at 16 bits.
module tb_jump_unit;
  logic        clk = 1'b0;
  logic        valid, jump;
  logic [15:0] instr, npc, target;
  int          checks = 0, failures = 0, cycles = 0;

  jump_unit dut (.valid, .instr, .npc, .jump, .target);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic v, input logic [15:0] i, input logic [15:0] n);
    logic [15:0] exp_t;
    logic        exp_j;
    valid = v; instr = i; npc = n;
    @(posedge clk);
    exp_t = n + {{8{i[7]}}, i[7:0]};
    exp_j = v && (i[15:12] == 4'b1101);
    checks++;
    if (jump !== exp_j || (exp_j && target !== exp_t)) begin
      failures++;
      $display("FAIL valid=%b instr=%h npc=%h: jump=%b target=%h expected %b %h",
               v, i, n, jump, target, exp_j, exp_t);
    end
  endtask

  initial begin
    check(1'b1, 16'hD0FF, 16'h0008);  // JMP -1 from address 7: back to 7
    check(1'b1, 16'hD003, 16'h0001);  // forward 3 -> 4
    check(1'b1, 16'hD080, 16'h0010);  // -128 wraps to 0xFF90
    check(1'b0, 16'hD003, 16'h0001);  // not valid
    check(1'b1, 16'hB003, 16'h0001);  // BZ is not a jump
    for (int i = 0; i < 3000; i++) begin
      logic [15:0] w;
      w = 16'($urandom);
      if ($urandom_range(1, 0) == 1) w[15:12] = 4'b1101;
      check(1'($urandom_range(3, 0) != 0), w, 16'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
