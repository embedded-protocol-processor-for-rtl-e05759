// tb_pp_instr_decoder - encodes random field values with pp_encode and checks
// that the decoder returns each field unchanged.
module tb_pp_instr_decoder;
  import pp_pkg::*;
  logic [31:0] instr;
  logic [2:0] line;
  logic [4:0] dflt;
  logic src;
  logic [7:0] offset;
  pp_ctrl_t ctrl;
  logic [31:0] mask;
  int checks = 0, failures = 0;

  pp_instr_decoder dut (.instr, .line, .dflt, .src, .offset, .mask, .ctrl);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      logic [2:0] l; logic [4:0] d; logic s; logic [7:0] o; int w; logic [9:0] c;
      l = $urandom; d = $urandom; s = $urandom; o = $urandom; w = $urandom_range(32, 1); c = $urandom;
      if (t < 10) c = 10'(1 << t);
      instr = pp_encode(l, d, s, o, w, pp_ctrl_t'(c));
      #1;
      checks++;
      if (line !== l || dflt !== d || src !== s || offset !== o ||
          ctrl !== pp_ctrl_t'(c) || mask !== 32'((64'h1 << w) - 1)) begin
        failures++;
        $display("FAIL: instr %h", instr);
      end
    end
    // control bit positions against the documented layout
    instr = 32'h0040_0000;  #1; checks++; if (!ctrl.sync)       begin failures++; $display("FAIL: sync bit"); end
    instr = 32'h8000_0000;  #1; checks++; if (!ctrl.mm_discard) begin failures++; $display("FAIL: discard bit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
