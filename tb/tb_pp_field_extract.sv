// tb_pp_field_extract - checks field selection from the buffer window and
// from the status vector for random offsets and widths, against a bit-by-bit
// reference in the testbench.
module tb_pp_field_extract;
  localparam int L = 32, D = 8;
  logic [D*L-1:0] window;
  logic [L-1:0] status, field, exp;
  logic src;
  logic [7:0] offset;
  logic [4:0] width_m1;
  logic [L-1:0] mask;
  int checks = 0, failures = 0;

  pp_field_extract dut (.window, .status, .src, .offset, .mask, .field);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      for (int w = 0; w < D; w++) window[32*w +: 32] = $urandom;
      status = $urandom;
      src = $urandom_range(3) == 0;
      offset = $urandom;
      width_m1 = $urandom;
      if (t < 4) begin src = 0; offset = 8'(16 + 32 * t); width_m1 = 15; end
      mask = 32'hFFFF_FFFF >> (31 - int'(width_m1));
      #1;
      exp = '0;
      for (int b = 0; b <= int'(width_m1); b++) begin
        int pos;
        pos = int'(offset) + b;
        if (src) exp[b] = (pos < L) ? status[pos] : 1'b0;
        else     exp[b] = (pos < D * L) ? window[pos] : 1'b0;
      end
      checks++;
      if (field !== exp) begin
        failures++;
        $display("FAIL: src %0d off %0d w %0d field %h exp %h", src, offset, width_m1 + 1, field, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
