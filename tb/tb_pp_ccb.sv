// tb_pp_ccb - checks the control code book: the worked example (line 3 holds
// 14, 23, 32, 0; match 0100 selects 23), priority of the lowest matching
// slot, unused (zero) slots ignored, and no hit when nothing qualifies,
// against a reference model over random tables and match vectors.
module tb_pp_ccb;
  logic clk = 0, we = 0;
  logic [4:0] waddr = '0, wdata = '0;
  logic [2:0] line = '0;
  logic [3:0] match = '0;
  logic hit;
  logic [1:0] hit_idx;
  logic [4:0] rel;
  logic [4:0] model [8][4];
  int checks = 0, failures = 0;

  pp_ccb dut (.clk, .we, .waddr, .wdata, .line, .match, .hit, .hit_idx, .rel);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int e, input logic [4:0] v);
    @(negedge clk); we = 1; waddr = 5'(e); wdata = v;
    @(negedge clk); we = 0;
    model[e / 4][e % 4] = v;
  endtask

  initial begin
    for (int e = 0; e < 32; e++) wr(e, ($urandom_range(3) == 0) ? 5'd0 : 5'($urandom));
    // 32 does not fit in log2(32) = 5 bits: as a relative jump it is 0 modulo 32.
    wr(12, 5'd14); wr(13, 5'd23); wr(14, 5'd9); wr(15, 5'd0);
    line = 3; match = 4'b0010; #1;
    checks++;
    if (!hit || rel !== 5'd23 || hit_idx !== 2'd1) begin failures++; $display("FAIL: example"); end
    match = 4'b1000; #1;
    checks++;
    if (hit) begin failures++; $display("FAIL: unused slot taken"); end
    for (int t = 0; t < 500; t++) begin
      bit eh; int ei; logic [4:0] er;
      line = $urandom; match = $urandom; #1;
      eh = 0; ei = 0; er = 0;
      for (int s = 3; s >= 0; s--)
        if (match[s] && model[line][s] != 0) begin eh = 1; ei = s; er = model[line][s]; end
      checks++;
      if (hit !== eh || (eh && (int'(hit_idx) != ei || rel !== er))) begin
        failures++;
        $display("FAIL: line %0d match %b -> %0d %0d %0d", line, match, hit, hit_idx, rel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
