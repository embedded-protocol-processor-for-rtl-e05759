// tb_pp_csum_acc - accumulates random words, partial last words and fields
// and compares the 16-bit 1's complement sum with a reference; also checks a
// real IPv4 header (sum 0xFFFF, ok set) and that ok falls when it is broken.
module tb_pp_csum_acc;
  logic clk = 0, rst_n = 0, clear = 0, add_word = 0, add_field = 0, eof = 0;
  logic [31:0] word = '0, field = '0;
  logic [1:0] nbytes = '0;
  logic [15:0] sum;
  logic ok;
  int checks = 0, failures = 0;

  pp_csum_acc dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] add1c(input logic [15:0] a, input logic [15:0] b);
    logic [16:0] s;
    s = a + b;
    return s[15:0] + 16'(s[16]);
  endfunction

  initial begin
    logic [15:0] m;
    logic [31:0] hdr [5];
    repeat (2) @(negedge clk);
    rst_n = 1;
    // IPv4 header 4500 0073 0000 4000 4011 b861 c0a8 0001 c0a8 00c7
    hdr = '{32'h4500_0073, 32'h0000_4000, 32'h4011_b861, 32'hc0a8_0001, 32'hc0a8_00c7};
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); clear = (i == 0); add_word = 1; word = hdr[i];
    end
    @(negedge clk); clear = 0; add_word = 0; #1;
    checks++;
    if (sum !== 16'hFFFF || !ok) begin failures++; $display("FAIL: header sum %h", sum); end
    @(negedge clk); add_field = 1; field = 32'h0000_0001;
    @(negedge clk); add_field = 0; #1;
    checks++;
    if (ok) begin failures++; $display("FAIL: ok after corruption"); end
    for (int t = 0; t < 100; t++) begin
      int n;
      n = $urandom_range(20, 1);
      m = 16'h0;
      for (int i = 0; i < n; i++) begin
        logic [31:0] wm;
        @(negedge clk);
        clear = (i == 0); add_word = $urandom_range(3) != 0; add_field = $urandom_range(1);
        word = $urandom; field = $urandom; eof = (i == n - 1) && $urandom_range(1); nbytes = $urandom;
        if (clear) m = 16'h0;
        wm = word;
        if (eof && nbytes != 0) for (int b = 0; b < 4; b++) if (b >= int'(nbytes)) wm[31-8*b -: 8] = 8'h0;
        if (add_word)  begin m = add1c(m, wm[31:16]); m = add1c(m, wm[15:0]); end
        if (add_field) begin m = add1c(m, field[31:16]); m = add1c(m, field[15:0]); end
      end
      @(negedge clk); clear = 0; add_word = 0; add_field = 0; eof = 0; #1;
      checks++;
      // 0x0000 and 0xFFFF are the same value in 1's complement
      if (!(sum === m || (sum == 16'hFFFF && m == 16'h0) || (sum == 16'h0 && m == 16'hFFFF))) begin
        failures++; $display("FAIL: sum %h exp %h", sum, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
