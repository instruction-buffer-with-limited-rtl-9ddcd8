// tb_ifetch_pc -- test of the program counter: reset value, sequential
// increment with wrap-around, and taken jumps, each compared with an
// independently kept expected address.
module tb_ifetch_pc;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       rst, jump;
  logic [6:0] jump_target, pc, next_pc;
  int         exp_pc;

  ifetch_pc #(.ADDR_W(7), .RESET_PC(7'd3)) dut (.clk, .rst, .jump, .jump_target, .pc, .next_pc);

  int checks = 0, failures = 0;

  initial begin
    rst = 1'b1; jump = 1'b0; jump_target = '0;
    repeat (2) @(posedge clk); #1;
    rst = 1'b0;
    exp_pc = 3;
    for (int i = 0; i < 400; i++) begin
      jump = ($urandom_range(0, 3) == 0);
      jump_target = 7'($urandom_range(0, 127));
      #1;
      checks++;
      if (int'(pc) != exp_pc) begin failures++; $display("FAIL pc %0d expected %0d", pc, exp_pc); end
      checks++;
      if (int'(next_pc) != (jump ? int'(jump_target) : (exp_pc + 1) % 128)) begin
        failures++; $display("FAIL next_pc %0d", next_pc);
      end
      exp_pc = jump ? int'(jump_target) : (exp_pc + 1) % 128;
      @(posedge clk); #1;
    end
    rst = 1'b1; @(posedge clk); #1;
    checks++;
    if (pc != 7'd3) begin failures++; $display("FAIL reset value"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
