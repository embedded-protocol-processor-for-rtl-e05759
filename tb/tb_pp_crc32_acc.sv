// tb_pp_crc32_acc - feeds random frames of random length (with the frame
// check sequence appended, correct or corrupted) one word per add and checks
// the CRC register against a bit-serial reference, the done flag after the
// end-of-frame word and the ok flag. The standard check value of "123456789"
// (0xCBF43926) is tested too. One word is absorbed per cycle.
module tb_pp_crc32_acc;
  logic clk = 0, rst_n = 0, clear = 0, add = 0, eof = 0;
  logic [31:0] data = '0, crc;
  logic [1:0] nbytes = '0;
  logic done, ok;
  int checks = 0, failures = 0;

  pp_crc32_acc dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_reg(input byte unsigned b[$]);
    logic [31:0] c = 32'hFFFF_FFFF;
    foreach (b[i])
      for (int k = 0; k < 8; k++) begin
        logic fb;
        fb = c[0] ^ b[i][k];
        c = (c >> 1) ^ (fb ? 32'hEDB8_8320 : 32'h0);
      end
    return c;
  endfunction

  task automatic feed(input byte unsigned f[$]);
    int nw;
    nw = (f.size() + 3) / 4;
    for (int w = 0; w < nw; w++) begin
      @(negedge clk);
      clear = (w == 0); add = 1; eof = (w == nw - 1);
      nbytes = eof ? 2'(f.size() % 4) : 2'd0;
      for (int b = 0; b < 4; b++) data[31-8*b -: 8] = (4*w + b < f.size()) ? f[4*w + b] : 8'($urandom);
    end
    @(negedge clk); add = 0; clear = 0; eof = 0;
  endtask

  initial begin
    byte unsigned f[$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    f = {"1","2","3","4","5","6","7","8","9"};
    feed(f);
    checks++;
    if (~crc !== 32'hCBF4_3926 || !done) begin failures++; $display("FAIL: check value %h", ~crc); end
    for (int t = 0; t < 200; t++) begin
      logic [31:0] c;
      bit bad;
      int n;
      f = {};
      n = $urandom_range(80, 1);
      for (int i = 0; i < n; i++) f.push_back(8'($urandom));
      c = ~ref_reg(f);
      bad = ($urandom_range(3) == 0);
      if (bad) c ^= 32'h1 << $urandom_range(31);
      for (int i = 0; i < 4; i++) f.push_back(c[8*i +: 8]);
      feed(f);
      checks++;
      if (crc !== ref_reg(f) || done !== 1'b1 || ok !== !bad) begin
        failures++;
        $display("FAIL: len %0d crc %h exp %h ok %0d bad %0d", f.size(), crc, ref_reg(f), ok, bad);
      end
    end
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    checks++;
    if (done || crc !== 32'hFFFF_FFFF) begin failures++; $display("FAIL: clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
