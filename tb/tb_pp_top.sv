// tb_pp_top - end-to-end test of the protocol processor at its default sizes.
//
// Loads a 17-instruction receive program through the configuration bus and
// streams generated Ethernet frames into the input port. The program checks
// the Ethernet destination address, switches on the EtherType (IP, ARP,
// RARP, default), checks the IPv4 header checksum and destination address,
// switches on the IP protocol (UDP, TCP) and on the UDP destination port,
// stores the payload in the destination buffer of the matching port and
// commits it once the CRC-32 check passes, or drops the frame.
//
// The testbench computes CRC-32, IP checksums and the expected outcome of
// every frame on its own, keeps a byte model of host memory written through
// the memory port, and compares each frame event, its address, length and
// the stored bytes. It also checks that a switch executes in one cycle
// (the PC after the EtherType switch is the case target one cycle later) and
// counts the mechanisms: stalls, buffered words (lag), multi-way and default
// branches, look-back field extraction, CRC and checksum rejects, a table
// update during operation, a buffer overflow, and a burst of frames at full
// line rate (one word per cycle, minimum inter-frame gap) with a bound on the
// commit latency.
module tb_pp_top;
  import pp_pkg::*;

  localparam int unsigned AW = PP_MEM_AW;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic run = 1'b0, restart = 1'b0;
  logic in_valid = 1'b0, in_sof = 1'b0, in_eof = 1'b0;
  logic [31:0] in_data = '0;
  logic [1:0]  in_nbytes = '0;
  logic cfg_we = 1'b0;
  logic [CFG_AW-1:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0;
  logic ovf_clear = 1'b0;
  logic mem_we;
  logic [AW-1:0] mem_addr;
  logic [31:0] mem_wdata;
  logic [3:0] mem_be;
  logic evt_valid, evt_commit;
  logic [4:0] evt_dest;
  logic [AW-1:0] evt_addr;
  logic [AW+1:0] evt_len;
  logic [4:0] pc;
  logic stall, overflow, crc_ok, crc_done, csum_ok;
  logic [2:0] pending;
  logic [31:0] crc;
  logic [15:0] csum;

  pp_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- configuration ----------------
  task automatic cfg(input logic [1:0] tab, input int idx, input logic [31:0] val);
    @(negedge clk);
    cfg_we = 1'b1; cfg_addr = {tab, 10'(idx)}; cfg_wdata = val;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  localparam logic [9:0] C_SYNC = 10'h001, C_CRC_CLR = 10'h002, C_CRC_ADD = 10'h004,
                         C_CS_CLR = 10'h008, C_CS_W = 10'h010, C_CS_F = 10'h020,
                         C_MM_OPEN = 10'h040, C_MM_STORE = 10'h080, C_MM_COMMIT = 10'h100,
                         C_MM_DISC = 10'h200;

  localparam logic [47:0] MY_MAC = 48'h02_11_22_33_44_55;
  localparam logic [31:0] MY_IP  = 32'hC0A8_0107;
  localparam logic [15:0] PORT0 = 16'd5004, PORT1 = 16'd7000, PORT2 = 16'd9999;
  localparam int DISC_PC = 16;

  function automatic logic [31:0] ins(input int line, input int dflt, input bit src,
                                      input int off, input int width, input logic [9:0] c);
    return pp_encode(3'(line), 5'(dflt), src, 8'(off), width, pp_ctrl_t'(c));
  endfunction

  task automatic load_program();
    logic [31:0] prog [17];
    logic [31:0] pcb [8][4];
    int          ccb [8][4];
    prog[0]  = ins(0, 0,  1, ST_SOF, 1,  C_SYNC | C_CRC_CLR | C_CRC_ADD);
    prog[1]  = ins(1, 15, 0, 32, 32,     C_SYNC | C_CRC_ADD);
    prog[2]  = ins(2, 14, 0, 48, 16,     C_SYNC | C_CRC_ADD);
    prog[3]  = ins(3, 13, 0, 16, 16,     C_SYNC | C_CRC_ADD | C_CS_CLR | C_CS_W | C_MM_OPEN);
    for (int i = 4; i <= 7; i++)
      prog[i] = ins(7, 1, 1, ST_SOF, 1,  C_SYNC | C_CRC_ADD | C_CS_W);
    prog[8]  = ins(5, 1,  0, 16, 16,     C_SYNC | C_CRC_ADD | C_CS_F);
    prog[9]  = ins(5, 7,  0, 48, 32,     C_SYNC | C_CRC_ADD);
    prog[10] = ins(7, 6,  1, ST_CSUM_LSB, 16, 10'h0);
    prog[11] = ins(4, 5,  0, 128, 8,     C_MM_OPEN);
    prog[12] = ins(6, 4,  0, 16, 16,     C_MM_OPEN);
    prog[13] = ins(0, 0,  1, ST_EOF, 1,  C_SYNC | C_CRC_ADD | C_MM_STORE);
    prog[14] = ins(0, 2,  1, ST_CRC_OK, 1, 10'h0);
    prog[15] = ins(7, 17, 1, ST_SOF, 1,  C_MM_COMMIT);
    prog[16] = ins(7, 16, 1, ST_SOF, 1,  C_MM_DISC);
    pcb = '{default: '{default: 32'h0}};
    ccb = '{default: '{default: 0}};
    pcb[0][0] = 32'h1;            ccb[0][0] = 1;
    pcb[1][0] = MY_MAC[47:16];    ccb[1][0] = 1;
    pcb[2][0] = 32'(MY_MAC[15:0]); ccb[2][0] = 1;
    pcb[3] = '{32'h0800, 32'h0806, 32'h8035, 32'h0};  ccb[3] = '{1, 10, 10, 0};
    pcb[4] = '{32'd17, 32'd6, 32'h0, 32'h0};          ccb[4] = '{1, 2, 0, 0};
    pcb[5][0] = MY_IP;            ccb[5][0] = 1;
    pcb[6] = '{32'(PORT0), 32'(PORT1), 32'h0, 32'h0};  ccb[6] = '{1, 1, 0, 0};
    pcb[7][0] = 32'h0800;         ccb[7][0] = 1;
    for (int i = 0; i < 32; i++) cfg(CFG_IT, i, (i < 17) ? prog[i] : ins(7, 0, 1, 0, 1, 10'h0));
    for (int l = 0; l < 8; l++)
      for (int s = 0; s < 4; s++) begin
        cfg(CFG_PCB, l * 4 + s, pcb[l][s]);
        cfg(CFG_CCB, l * 4 + s, 32'(ccb[l][s]));
      end
  endtask

  // destination table model: entry -> next word address
  int dest_ptr [32];
  task automatic load_dest();
    for (int e = 0; e < 32; e++) begin
      dest_ptr[e] = 16'h0800;
      if (e == 24) dest_ptr[e] = 16'h0100;
      if (e == 25) dest_ptr[e] = 16'h0200;
      if (e == 26) dest_ptr[e] = 16'h0300;
      if (e == 13 || e == 14) dest_ptr[e] = 16'h0400;
      if (e == 17) dest_ptr[e] = 16'h0500;
      cfg(CFG_DEST, e, 32'(dest_ptr[e]));
    end
  endtask

  // ---------------- reference functions ----------------
  function automatic logic [31:0] crc32_bytes(input byte unsigned b[$]);
    logic [31:0] c = 32'hFFFF_FFFF;
    foreach (b[i]) begin
      c ^= {24'h0, b[i]};
      for (int k = 0; k < 8; k++) c = c[0] ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
    end
    return ~c;
  endfunction

  function automatic logic [15:0] ip_csum(input byte unsigned b[$], input int from, input int len);
    int unsigned s = 0;
    for (int i = 0; i < len; i += 2) s += {b[from+i], b[from+i+1]};
    while (s >> 16) s = (s & 16'hFFFF) + (s >> 16);
    return ~16'(s);
  endfunction

  typedef enum {EXP_COMMIT, EXP_DROP_EVT, EXP_DROP_SILENT} outcome_e;

  // ---------------- host memory model and event capture ----------------
  byte unsigned hostmem [int];
  always @(posedge clk) begin
    if (mem_we)
      for (int b = 0; b < 4; b++)
        if (mem_be[3-b]) hostmem[int'(mem_addr) * 4 + b] = mem_wdata[31-8*b -: 8];
  end

  typedef struct { bit commit; int dest; int addr; int len; } evt_t;
  evt_t evq[$];
  always @(posedge clk) begin
    if (evt_valid) evq.push_back('{evt_commit, int'(evt_dest), int'(evt_addr), int'(evt_len)});
  end

  // ---------------- mechanism counters and one-cycle switch check ----------------
  int n_stall = 0, n_lag = 0, n_case [3] = '{0, 0, 0}, n_default = 0, n_lookback = 0;
  int n_crc_rej = 0, n_csum_rej = 0, n_cfg_update = 0, n_overflow = 0, n_port_hit [3] = '{0, 0, 0};
  int exp_sw [$];
  logic [4:0] pc_q;
  logic       exec_q;
  logic [4:0] sel_q;
  always @(posedge clk) begin
    if (rst_n) begin
      if (exec_q && pc_q == 5'd3) begin
        int t;
        t = (exp_sw.size() > 0) ? exp_sw.pop_front() : -1;
        check(int'(pc) == t, $sformatf("EtherType switch: next PC %0d, expected %0d", pc, t));
        if (pc == 5'd4) n_case[0]++;
        else if (pc == 5'd13) n_case[1]++;
        else if (pc == DISC_PC) n_default++;
      end
      if (exec_q && pc_q == 5'd12 && pc == 5'd13) n_port_hit[sel_q % 4]++;
      if (exec_q && pc_q == 5'd9) n_lookback++;
      if (run && stall) n_stall++;
      if (pending > 3'd1) n_lag++;
    end
    pc_q   <= pc;
    exec_q <= run && !stall;
    sel_q  <= dut.u_core.sel;
  end

  // ---------------- frame generation ----------------
  task automatic build_frame(output byte unsigned f[$], input logic [47:0] da,
                             input logic [15:0] etype, input logic [7:0] proto,
                             input logic [31:0] dip, input logic [15:0] dport,
                             input int plen, input bit bad_ipcs);
    logic [15:0] cs;
    f = {};
    for (int i = 5; i >= 0; i--) f.push_back(da[8*i +: 8]);
    for (int i = 0; i < 6; i++) f.push_back(8'(8'h10 + i));          // source MAC
    f.push_back(etype[15:8]); f.push_back(etype[7:0]);
    if (etype == 16'h0800) begin
      logic [15:0] tot;
      tot = 16'(28 + plen);
      f.push_back(8'h45); f.push_back(8'h00); f.push_back(tot[15:8]); f.push_back(tot[7:0]);
      f.push_back(8'h12); f.push_back(8'h34); f.push_back(8'h40); f.push_back(8'h00);
      f.push_back(8'h40); f.push_back(proto); f.push_back(8'h00); f.push_back(8'h00);
      f.push_back(8'h0A); f.push_back(8'h00); f.push_back(8'h00); f.push_back(8'h01);
      for (int i = 3; i >= 0; i--) f.push_back(dip[8*i +: 8]);
      cs = ip_csum(f, 14, 20) ^ (bad_ipcs ? 16'h0100 : 16'h0);
      f[24] = cs[15:8]; f[25] = cs[7:0];
      f.push_back(8'h30); f.push_back(8'h39); f.push_back(dport[15:8]); f.push_back(dport[7:0]);
      f.push_back(8'(16'(8 + plen) >> 8)); f.push_back(8'(8 + plen));
      f.push_back(8'h00); f.push_back(8'h00);
      for (int i = 0; i < plen; i++) f.push_back(8'($urandom));
    end else begin
      for (int i = 0; i < plen + 28; i++) f.push_back(8'($urandom));
    end
  endtask

  task automatic append_fcs(ref byte unsigned f[$], input bit bad);
    logic [31:0] c;
    c = crc32_bytes(f) ^ (bad ? 32'h0000_0400 : 32'h0);
    for (int i = 0; i < 4; i++) f.push_back(c[8*i +: 8]);
  endtask

  // gap_prob: percent chance of an idle cycle before each word
  task automatic send(input byte unsigned f[$], input int gap_prob);
    int nw;
    nw = (f.size() + 3) / 4;
    for (int w = 0; w < nw; w++) begin
      while ($urandom_range(99) < gap_prob) begin
        @(negedge clk); in_valid = 1'b0;
      end
      @(negedge clk);
      in_valid = 1'b1;
      in_sof   = (w == 0);
      in_eof   = (w == nw - 1);
      in_nbytes = (w == nw - 1) ? 2'(f.size() % 4) : 2'd0;
      for (int b = 0; b < 4; b++)
        in_data[31-8*b -: 8] = (4*w + b < f.size()) ? f[4*w + b] : 8'h00;
    end
    @(negedge clk);
    in_valid = 1'b0; in_sof = 1'b0; in_eof = 1'b0;
  endtask

  task automatic idle(input int n);
    repeat (n) @(negedge clk);
  endtask

  // Send one frame, then check the event the model predicts.
  task automatic frame(input logic [47:0] da, input logic [15:0] etype, input logic [7:0] proto,
                       input logic [31:0] dip, input logic [15:0] dport, input int plen,
                       input bit bad_ipcs, input bit bad_fcs, input int gap_prob);
    byte unsigned f[$];
    outcome_e     exp;
    int           entry, skip, len, sw;
    build_frame(f, da, etype, proto, dip, dport, plen, bad_ipcs);
    append_fcs(f, bad_fcs);
    // reference decision, written independently of the program tables
    entry = -1; skip = 0;
    sw = -1;
    if (da != MY_MAC) exp = EXP_DROP_SILENT;
    else if (etype == 16'h0806 || etype == 16'h8035) begin
      sw = 13; entry = (etype == 16'h0806) ? 13 : 14; skip = 16;
      exp = bad_fcs ? EXP_DROP_EVT : EXP_COMMIT;
    end else if (etype != 16'h0800) begin
      sw = DISC_PC; exp = EXP_DROP_SILENT;
    end else begin
      sw = 4; skip = 40;
      if (bad_ipcs || dip != MY_IP) exp = EXP_DROP_EVT;
      else if (proto == 8'd6) begin entry = 17; exp = bad_fcs ? EXP_DROP_EVT : EXP_COMMIT; end
      else if (proto != 8'd17) exp = EXP_DROP_EVT;
      else if (dport == PORT0) entry = 24;
      else if (dport == PORT1) entry = 25;
      else if (dport == PORT2 && n_cfg_update > 0) entry = 26;
      if (etype == 16'h0800 && proto == 8'd17 && !bad_ipcs && dip == MY_IP)
        exp = (entry < 0) ? EXP_DROP_EVT : (bad_fcs ? EXP_DROP_EVT : EXP_COMMIT);
    end
    if (sw >= 0) exp_sw.push_back(sw);
    evq = {};
    send(f, gap_prob);
    idle(12);
    len = f.size() - skip;
    if (exp == EXP_DROP_SILENT) begin
      check(evq.size() == 0, "dropped frame produced an event");
    end else begin
      check(evq.size() == 1, $sformatf("expected one frame event, got %0d", evq.size()));
      if (evq.size() == 1) begin
        check(evq[0].commit == (exp == EXP_COMMIT), "commit/discard mismatch");
        if (exp == EXP_COMMIT) begin
          check(evq[0].dest == entry, $sformatf("dest %0d expected %0d", evq[0].dest, entry));
          check(evq[0].addr == dest_ptr[entry], $sformatf("addr %0h expected %0h", evq[0].addr, dest_ptr[entry]));
          check(evq[0].len == len, $sformatf("len %0d expected %0d", evq[0].len, len));
          for (int i = 0; i < len; i++)
            if (!hostmem.exists(dest_ptr[entry] * 4 + i) || hostmem[dest_ptr[entry] * 4 + i] != f[skip + i]) begin
              check(1'b0, $sformatf("stored byte %0d wrong", i));
              break;
            end
          checks++;
          dest_ptr[entry] += (len + 3) / 4;
        end else begin
          if (bad_fcs) n_crc_rej++;
          if (bad_ipcs) n_csum_rej++;
        end
      end
    end
  endtask

  // Line rate: frames back to back at one word per cycle, separated only by
  // the Ethernet inter-frame gap plus preamble (20 byte times = 5 words).
  // Every frame must be stored, the buffer must not overflow, and the commit
  // of the last frame must follow its last word within LAT_MAX cycles.
  localparam int LAT_MAX = 8;
  int n_linerate = 0;
  task automatic line_rate(input int nframes);
    byte unsigned fr [$][$];
    int ports [$];
    int t_last, t_evt;
    evq = {};
    for (int i = 0; i < nframes; i++) begin
      byte unsigned f[$];
      ports.push_back(i % 2);
      build_frame(f, MY_MAC, 16'h0800, 8'd17, MY_IP, (i % 2) ? PORT1 : PORT0, int'($urandom_range(200, 20)), 0);
      append_fcs(f, 0);
      fr.push_back(f);
    end
    for (int i = 0; i < nframes; i++) begin
      exp_sw.push_back(4);
      send(fr[i], 0);
      if (i != nframes - 1) idle(4);
    end
    t_last = $time;
    t_evt = -1;
    for (int c = 0; c < 40 && evq.size() < nframes; c++) @(negedge clk);
    t_evt = $time;
    check(evq.size() == nframes, $sformatf("line rate: %0d of %0d frames stored", evq.size(), nframes));
    check(!overflow, "line rate: buffer overflow");
    check((t_evt - t_last) / 10 <= LAT_MAX, $sformatf("line rate: commit %0d cycles after the last word", (t_evt - t_last) / 10));
    for (int i = 0; i < nframes && i < evq.size(); i++) begin
      int e;
      e = 24 + ports[i];
      check(evq[i].commit && evq[i].dest == e && evq[i].addr == dest_ptr[e] &&
            evq[i].len == fr[i].size() - 40, $sformatf("line rate: frame %0d event", i));
      for (int b = 0; b < fr[i].size() - 40; b++)
        if (hostmem[dest_ptr[e] * 4 + b] != fr[i][40 + b]) begin
          check(1'b0, $sformatf("line rate: frame %0d byte %0d", i, b));
          break;
        end
      dest_ptr[e] += (fr[i].size() - 40 + 3) / 4;
    end
    n_linerate++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_program();
    load_dest();
    @(negedge clk);
    run = 1'b1;
    idle(4);
    // UDP to both configured ports, with and without idle cycles in the stream
    frame(MY_MAC, 16'h0800, 8'd17, MY_IP, PORT0, 18, 0, 0, 0);
    frame(MY_MAC, 16'h0800, 8'd17, MY_IP, PORT1, 61, 0, 0, 30);
    frame(MY_MAC, 16'h0800, 8'd17, MY_IP, PORT0, 100, 0, 0, 0);
    // not for this terminal, unknown EtherType, wrong IP address, bad header checksum
    frame(48'h02_11_22_33_44_56, 16'h0800, 8'd17, MY_IP, PORT0, 20, 0, 0, 0);
    frame(MY_MAC, 16'h86DD, 8'd17, MY_IP, PORT0, 20, 0, 0, 10);
    frame(MY_MAC, 16'h0800, 8'd17, MY_IP ^ 32'h1, PORT0, 20, 0, 0, 0);
    frame(MY_MAC, 16'h0800, 8'd17, MY_IP, PORT0, 20, 1, 0, 0);
    // bad FCS, ARP, RARP, TCP, unknown port, other IP protocol
    frame(MY_MAC, 16'h0800, 8'd17, MY_IP, PORT1, 33, 0, 1, 0);
    frame(MY_MAC, 16'h0806, 8'd0, 32'h0, 16'h0, 0, 0, 0, 0);
    frame(MY_MAC, 16'h8035, 8'd0, 32'h0, 16'h0, 2, 0, 0, 20);
    frame(MY_MAC, 16'h0800, 8'd6, MY_IP, 16'd80, 45, 0, 0, 0);
    frame(MY_MAC, 16'h0800, 8'd17, MY_IP, PORT2, 24, 0, 0, 0);
    frame(MY_MAC, 16'h0800, 8'd1, MY_IP, PORT0, 24, 0, 0, 0);
    // a new UDP port is opened while the processor runs
    cfg(CFG_PCB, 6 * 4 + 2, 32'(PORT2));
    cfg(CFG_CCB, 6 * 4 + 2, 32'd1);
    cfg(CFG_DEST, 26, 32'(dest_ptr[26]));
    n_cfg_update++;
    frame(MY_MAC, 16'h0800, 8'd17, MY_IP, PORT2, 37, 0, 0, 0);
    // random mix
    for (int i = 0; i < 40; i++) begin
      int r;
      r = $urandom_range(9);
      frame((r == 0) ? 48'h02_00_00_00_00_01 : MY_MAC,
            (r == 1) ? 16'h0806 : 16'h0800,
            (r == 2) ? 8'd6 : 8'd17, MY_IP,
            (r < 5) ? PORT0 : ((r < 8) ? PORT1 : PORT2),
            int'($urandom_range(120)), (r == 3), (r == 4), int'($urandom_range(30)));
    end
    line_rate(20);
    // overflow: the core is stopped while words keep arriving
    run = 1'b0;
    begin
      byte unsigned f[$];
      build_frame(f, MY_MAC, 16'h0800, 8'd17, MY_IP, PORT0, 40, 0);
      append_fcs(f, 0);
      send(f, 0);
    end
    check(overflow == 1'b1, "overflow not flagged");
    if (overflow) n_overflow++;
    @(negedge clk); ovf_clear = 1'b1; restart = 1'b1;
    @(negedge clk); ovf_clear = 1'b0; restart = 1'b0;
    check(overflow == 1'b0 && pc == 5'd0, "overflow clear / restart");
    run = 1'b1;
    idle(20);
    frame(MY_MAC, 16'h0800, 8'd17, MY_IP, PORT1, 50, 0, 0, 0);

    $display("mechanisms: stall=%0d lag=%0d ip=%0d arp/rarp=%0d default=%0d lookback=%0d crc_rej=%0d csum_rej=%0d cfg_update=%0d overflow=%0d ports=%0d/%0d/%0d line_rate=%0d",
             n_stall, n_lag, n_case[0], n_case[1], n_default, n_lookback, n_crc_rej, n_csum_rej,
             n_cfg_update, n_overflow, n_port_hit[0], n_port_hit[1], n_port_hit[2], n_linerate);
    check(n_stall > 0, "no stall");
    check(n_lag > 0, "buffer never held several words");
    check(n_case[0] > 0 && n_case[1] > 0 && n_default > 0, "a switch case never taken");
    check(n_lookback > 0, "no look-back extraction");
    check(n_crc_rej > 0, "no CRC reject");
    check(n_csum_rej > 0, "no checksum reject");
    check(n_cfg_update > 0 && n_port_hit[2] > 0, "runtime table update not exercised");
    check(n_overflow > 0, "no overflow");
    check(n_linerate > 0, "line-rate burst not run");
    check(n_port_hit[0] > 0 && n_port_hit[1] > 0, "port cases not all taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
