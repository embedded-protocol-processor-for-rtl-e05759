// tb_pp_pcb - fills the parameter code book entry by entry (line * N + slot),
// checks every line read, and repeats the EtherType example line (line 3:
// 0x0800, 0x0806, 0x8035, 0x0000). Also rewrites single entries at random.
module tb_pp_pcb;
  logic clk = 0, we = 0;
  logic [4:0] waddr = '0;
  logic [31:0] wdata = '0;
  logic [2:0] line = '0;
  logic [3:0][31:0] refs;
  logic [31:0] model [8][4];
  int checks = 0, failures = 0;

  pp_pcb dut (.clk, .we, .waddr, .wdata, .line, .refs);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int e, input logic [31:0] v);
    @(negedge clk); we = 1; waddr = 5'(e); wdata = v;
    @(negedge clk); we = 0;
    model[e / 4][e % 4] = v;
  endtask

  task automatic check_all();
    for (int l = 0; l < 8; l++) begin
      line = 3'(l); #1;
      for (int s = 0; s < 4; s++) begin
        checks++;
        if (refs[s] !== model[l][s]) begin failures++; $display("FAIL: line %0d slot %0d", l, s); end
      end
    end
  endtask

  initial begin
    for (int e = 0; e < 32; e++) wr(e, $urandom);
    wr(12, 32'h0800); wr(13, 32'h0806); wr(14, 32'h8035); wr(15, 32'h0000);
    check_all();
    line = 3; #1;
    checks++;
    if (refs !== {32'h0000, 32'h8035, 32'h0806, 32'h0800}) begin failures++; $display("FAIL: example line"); end
    for (int t = 0; t < 50; t++) wr($urandom_range(31), $urandom);
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
