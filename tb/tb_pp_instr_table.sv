// tb_pp_instr_table - writes all M instructions, reads them back through the
// combinational read port, and rewrites entries while reading others.
module tb_pp_instr_table;
  logic clk = 0, we = 0;
  logic [4:0] waddr = '0, raddr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  pp_instr_table dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); we = 1; waddr = 5'(i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 32; i++) begin
      raddr = 5'(31 - i); #1;
      checks++;
      if (rdata !== model[31 - i]) begin failures++; $display("FAIL: read %0d", 31 - i); end
    end
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      we = $urandom_range(1); waddr = $urandom; wdata = $urandom; raddr = $urandom;
      #1;
      checks++;
      if (rdata !== model[raddr]) begin failures++; $display("FAIL: read %0d", raddr); end
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
