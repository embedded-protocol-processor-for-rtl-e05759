// tb_pp_dynamic_buffer - drives random word arrivals and random sync /
// non-sync instructions and compares the buffer against a queue model: the
// current word and its tags, the look-back window, the pending count, stall
// when a sync instruction finds no word, and the sticky overflow and its
// clear.
module tb_pp_dynamic_buffer;
  localparam int L = 32, D = 8;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0, in_eof = 0, sync = 0, consume = 0, ovf_clear = 0;
  logic [31:0] in_data = '0;
  logic [1:0] in_nbytes = '0;
  logic stall, cur_sof, cur_eof, overflow;
  logic [D*L-1:0] window;
  logic [1:0] cur_nbytes;
  logic [2:0] pending;
  int checks = 0, failures = 0, n_stall = 0, n_ovf = 0, n_deep = 0;

  pp_dynamic_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model: hist[0] = newest received word; npend = unconsumed count
  typedef struct { logic [31:0] d; logic s; logic e; logic [1:0] nb; } w_t;
  w_t hist [$];
  int npend = 0;
  bit ovf_m = 0;

  task automatic compare();
    int base;
    base = sync ? ((npend == 0) ? 0 : npend - 1) : npend;
    checks++;
    if (stall !== (sync && npend == 0)) begin failures++; $display("FAIL: stall"); end
    if (int'(pending) != npend || overflow !== ovf_m) begin
      failures++; $display("FAIL: pending %0d/%0d ovf %0d/%0d", pending, npend, overflow, ovf_m);
    end
    for (int j = 0; j < D; j++) begin
      logic [31:0] e;
      e = (base + j < D && base + j < hist.size()) ? hist[base + j].d : 32'h0;
      if (base + j >= D) e = 32'h0;
      checks++;
      if (window[32*j +: 32] !== e) begin failures++; $display("FAIL: window word %0d", j); end
    end
    if (base < hist.size()) begin
      checks++;
      if (cur_sof !== hist[base].s || cur_eof !== hist[base].e || cur_nbytes !== hist[base].nb) begin
        failures++; $display("FAIL: tags");
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(99) < ((t / 500) % 2 ? 75 : 40));
      in_data = $urandom; in_sof = $urandom; in_eof = $urandom; in_nbytes = $urandom;
      sync = $urandom_range(2) != 0;
      consume = sync;
      ovf_clear = ($urandom_range(30) == 0);
      #1;
      compare();
      if (sync && npend == 0) n_stall++;
      if (npend > 1) n_deep++;
      @(posedge clk);
      // update model
      begin
        int nxt;
        nxt = npend + int'(in_valid) - int'(consume && npend != 0);
        if (in_valid) hist.push_front('{in_data, in_sof, in_eof, in_eof ? in_nbytes : 2'd0});
        if (hist.size() > D) void'(hist.pop_back());
        if (nxt > D - 1) begin nxt = D - 1; ovf_m = 1; n_ovf++; end
        else if (ovf_clear) ovf_m = 0;
        npend = nxt;
      end
    end
    checks++;
    if (n_stall == 0 || n_ovf == 0 || n_deep == 0) begin failures++; $display("FAIL: coverage %0d %0d %0d", n_stall, n_ovf, n_deep); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
