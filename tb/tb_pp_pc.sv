// tb_pp_pc - checks that the program counter loads next_pc on every edge and
// returns to 0 on reset and on restart.
module tb_pp_pc;
  logic clk = 0, rst_n = 0, restart = 0;
  logic [4:0] next_pc, pc, exp;
  int checks = 0, failures = 0;

  pp_pc dut (.clk, .rst_n, .restart, .next_pc, .pc);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    next_pc = 5'd9;
    #12;
    checks++;
    if (pc !== 5'd0) begin failures++; $display("FAIL: reset"); end
    rst_n = 1;
    exp = 0;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      next_pc = $urandom;
      restart = ($urandom_range(15) == 0);
      exp = restart ? 5'd0 : next_pc;
      @(posedge clk); #1;
      checks++;
      if (pc !== exp) begin failures++; $display("FAIL: pc %0d exp %0d", pc, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
