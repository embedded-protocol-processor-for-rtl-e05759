// tb_pp_mm_acc - random sequences of open (with and without a hit), store,
// commit and discard against a model of the destination table: every memory
// write (address, data, byte enables), every frame event (commit/discard,
// destination, start address, byte length) and the advance of a
// destination's table entry after a commit.
module tb_pp_mm_acc;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0, open = 0, hit = 0, store = 0, commit = 0, discard = 0, eof = 0;
  logic [4:0] cfg_waddr = '0, sel = '0;
  logic [15:0] cfg_wdata = '0;
  logic [31:0] data = '0;
  logic [1:0] nbytes = '0;
  logic mem_we, evt_valid, evt_commit, active;
  logic [15:0] mem_addr, evt_addr;
  logic [31:0] mem_wdata;
  logic [3:0] mem_be;
  logic [4:0] evt_dest;
  logic [17:0] evt_len;
  int checks = 0, failures = 0, n_commit = 0, n_discard = 0;

  pp_mm_acc dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int tab [32];
  bit m_act = 0;
  int m_dest, m_start, m_addr, m_len;
  bit e_pend = 0, e_commit;
  int e_dest, e_addr, e_len;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int e = 0; e < 32; e++) begin
      @(negedge clk); cfg_we = 1; cfg_waddr = 5'(e); cfg_wdata = 16'(e * 256); tab[e] = e * 256;
    end
    @(negedge clk); cfg_we = 0;
    for (int t = 0; t < 3000; t++) begin
      int r, nb;
      @(negedge clk);
      r = $urandom_range(99);
      open = (r < 8); hit = $urandom_range(3) != 0; sel = $urandom;
      store = (r >= 8 && r < 80); commit = (r >= 80 && r < 88); discard = (r >= 88 && r < 92);
      data = $urandom; eof = $urandom_range(3) == 0; nbytes = $urandom;
      #1;
      nb = (eof && nbytes != 0) ? int'(nbytes) : 4;
      // memory write port (combinational)
      checks++;
      if (mem_we !== (store && m_act) ||
          (mem_we && (int'(mem_addr) != m_addr || mem_wdata !== data ||
                      mem_be !== 4'((4'hF << (4 - nb))) ))) begin
        failures++; $display("FAIL: write port t=%0d", t);
      end
      // event from the previous cycle
      checks++;
      if (evt_valid !== e_pend ||
          (e_pend && (evt_commit !== e_commit || int'(evt_dest) != e_dest ||
                      int'(evt_addr) != e_addr || int'(evt_len) != e_len))) begin
        failures++; $display("FAIL: event t=%0d", t);
      end
      checks++;
      if (active !== m_act) begin failures++; $display("FAIL: active"); end
      @(posedge clk);
      e_pend = 0;
      if (m_act && (commit || discard)) begin
        e_pend = 1; e_commit = commit; e_dest = m_dest; e_addr = m_start;
        e_len = m_len + (store ? nb : 0);
        if (commit) begin tab[m_dest] = (m_addr + int'(store)) % 65536; n_commit++; end
        else n_discard++;
        m_act = 0;
      end else if (open && hit) begin
        m_act = 1; m_dest = int'(sel); m_start = tab[sel]; m_addr = tab[sel]; m_len = 0;
      end else if (store && m_act) begin
        m_addr = (m_addr + 1) % 65536; m_len += nb;
      end
    end
    checks++;
    if (n_commit == 0 || n_discard == 0) begin failures++; $display("FAIL: coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
