// tb_pp_npcg - checks the next-PC adder: CCB jump on a hit, default jump
// otherwise, wrap-around modulo M and hold, exhaustively over PC and jump.
module tb_pp_npcg;
  logic [4:0] pc, rel, dflt, next_pc, exp;
  logic hit, hold;
  int checks = 0, failures = 0;

  pp_npcg dut (.pc, .hit, .rel, .dflt, .hold, .next_pc);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 32; p++)
      for (int r = 0; r < 32; r++)
        for (int m = 0; m < 3; m++) begin
          pc = 5'(p); rel = 5'(r); dflt = 5'($urandom); hit = (m == 1); hold = (m == 2);
          if (m == 0) begin dflt = 5'(r); rel = 5'($urandom); end
          #1;
          exp = hold ? 5'(p) : 5'((p + r) % 32);
          checks++;
          if (next_pc !== exp) begin
            failures++;
            $display("FAIL: pc %0d rel %0d dflt %0d hit %0d hold %0d -> %0d exp %0d", pc, rel, dflt, hit, hold, next_pc, exp);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
