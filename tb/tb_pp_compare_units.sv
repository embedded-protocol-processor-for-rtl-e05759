// tb_pp_compare_units - checks the N equality comparators against a
// reference computed in the testbench, with the EtherType example values
// (0x0800, 0x0806, 0x8035, 0x0000 compared with 0x0806 gives 0,1,0,0) and
// random fields and reference words, some forced equal.
module tb_pp_compare_units;
  logic [31:0] field;
  logic [3:0][31:0] refs;
  logic [3:0] match;
  int checks = 0, failures = 0;

  pp_compare_units dut (.field, .refs, .match);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] exp;
    refs = '{32'h0000, 32'h8035, 32'h0806, 32'h0800};
    field = 32'h0806;
    #1;
    checks++;
    if (match !== 4'b0010) begin failures++; $display("FAIL example: %b", match); end
    for (int t = 0; t < 500; t++) begin
      field = $urandom;
      for (int i = 0; i < 4; i++) refs[i] = ($urandom_range(2) == 0) ? field : ($urandom ^ (32'h1 << $urandom_range(31)));
      if (t % 7 == 0) refs[1] = field ^ 32'h8000_0000;
      #1;
      for (int i = 0; i < 4; i++) exp[i] = (refs[i] == field);
      checks++;
      if (match !== exp) begin failures++; $display("FAIL: field %h match %b exp %b", field, match, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
