// tb_pp_core - runs the switch example on the core alone. Word 0 of each
// frame carries start-of-frame; word 1 carries the EtherType in its upper 16
// bits. PCB line 3 holds 0x0800, 0x0806, 0x8035, 0x0000 and CCB line 3 the
// relative jumps 14, 23, 27, 0, so the switch at instruction 1 goes to 15,
// 24 or 28 and any other EtherType takes the default branch to 3, which tests
// the CRC flag from the status vector. The testbench checks that the PC holds
// while a sync instruction has no word (stall), that the whole switch takes
// exactly one cycle, the control bits issued at each target and the slot
// reported on sel, for random EtherTypes and random gaps in the stream.
module tb_pp_core;
  import pp_pkg::*;
  logic clk = 0, rst_n = 0, run = 0, restart = 0;
  logic in_valid = 0, in_sof = 0, in_eof = 0;
  logic [31:0] in_data = '0;
  logic [1:0] in_nbytes = '0;
  logic it_we = 0, pcb_we = 0, ccb_we = 0, ovf_clear = 0;
  logic [4:0] it_waddr = '0, pcb_waddr = '0, ccb_waddr = '0, ccb_wdata = '0;
  logic [31:0] it_wdata = '0, pcb_wdata = '0;
  logic [15:0] acc_csum = '0;
  logic acc_csum_ok = 0, acc_crc_ok = 0, acc_crc_done = 0, acc_mm_open = 0;
  pp_ctrl_t ctrl;
  logic [31:0] cur_word, field;
  logic cur_eof, hit, stall, overflow;
  logic [1:0] cur_nbytes;
  logic [4:0] sel, pc;
  logic [2:0] pending;
  int checks = 0, failures = 0, n_stall = 0, n_case [5] = '{0, 0, 0, 0, 0};

  pp_core dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [9:0] C_SYNC = 10'h001, C_CRC_CLR = 10'h002, C_CS_CLR = 10'h008,
                         C_CS_W = 10'h010, C_MM_COMMIT = 10'h100, C_MM_DISC = 10'h200;

  task automatic wr_it(input int a, input logic [31:0] v);
    @(negedge clk); it_we = 1; it_waddr = 5'(a); it_wdata = v; @(negedge clk); it_we = 0;
  endtask
  task automatic wr_tab(input int e, input logic [31:0] p, input int c);
    @(negedge clk); pcb_we = 1; ccb_we = 1; pcb_waddr = 5'(e); ccb_waddr = 5'(e);
    pcb_wdata = p; ccb_wdata = 5'(c);
    @(negedge clk); pcb_we = 0; ccb_we = 0;
  endtask
  function automatic logic [31:0] ins(int line, int dflt, bit src, int off, int w, logic [9:0] c);
    return pp_encode(3'(line), 5'(dflt), src, 8'(off), w, pp_ctrl_t'(c));
  endfunction

  int exp_target = -1;
  logic [4:0] pc_q;
  logic exec_q;
  always @(posedge clk) begin
    if (rst_n && exec_q && pc_q == 5'd1) begin
      checks++;
      if (int'(pc) != exp_target) begin
        failures++; $display("FAIL: switch went to %0d, expected %0d", pc, exp_target);
      end
      case (pc)
        5'd15: n_case[0]++;
        5'd24: n_case[1]++;
        5'd28: n_case[2]++;
        5'd3:  n_case[3]++;
        default: ;
      endcase
    end
    if (rst_n && run && !stall) begin
      // control bits issued by the instruction at each address
      logic [9:0] e;
      case (pc)
        5'd0, 5'd1: e = C_SYNC;
        5'd3:  e = 10'h0;
        5'd4:  e = C_CRC_CLR;
        5'd15: e = C_CS_CLR;
        5'd24: e = C_CS_W;
        5'd28: e = C_MM_COMMIT;
        default: e = C_MM_DISC;
      endcase
      checks++;
      if (ctrl !== pp_ctrl_t'(e)) begin failures++; $display("FAIL: ctrl at pc %0d", pc); end
      if (pc == 5'd1 && hit) begin
        checks++;
        if (sel[4:2] !== 3'd3) begin failures++; $display("FAIL: sel line"); end
      end
    end
    if (rst_n && run && stall) begin
      n_stall++;
      checks++;
      if (ctrl !== '0) begin failures++; $display("FAIL: ctrl during stall"); end
    end
    pc_q <= pc;
    exec_q <= run && !stall;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 32; a++) wr_it(a, ins(7, 0, 1, 0, 1, C_MM_DISC));
    wr_it(0, ins(0, 0, 1, ST_SOF, 1, C_SYNC));
    wr_it(1, ins(3, 2, 0, 16, 16, C_SYNC));
    wr_it(3, ins(0, 29, 1, ST_CRC_OK, 1, 10'h0));
    wr_it(4, ins(7, 28, 1, ST_SOF, 1, C_CRC_CLR));
    wr_it(15, ins(7, 17, 1, ST_SOF, 1, C_CS_CLR));
    wr_it(24, ins(7, 8, 1, ST_SOF, 1, C_CS_W));
    wr_it(28, ins(7, 4, 1, ST_SOF, 1, C_MM_COMMIT));
    for (int e = 0; e < 32; e++) wr_tab(e, 32'h0, 0);
    wr_tab(0, 32'h1, 1);
    wr_tab(12, 32'h0800, 14); wr_tab(13, 32'h0806, 23); wr_tab(14, 32'h8035, 27); wr_tab(15, 32'h0000, 0);
    // line 7: no compare can hit (1-bit field against 0x0800)
    wr_tab(28, 32'h0800, 1);
    @(negedge clk); run = 1;
    for (int t = 0; t < 200; t++) begin
      logic [15:0] et;
      int r;
      r = $urandom_range(4);
      et = (r == 0) ? 16'h0800 : (r == 1) ? 16'h0806 : (r == 2) ? 16'h8035 : (r == 3) ? 16'h0000 : 16'(16'h8600 + $urandom_range(255));
      exp_target = (r == 0) ? 15 : (r == 1) ? 24 : (r == 2) ? 28 : 3;
      acc_crc_ok = $urandom_range(1);
      repeat ($urandom_range(4)) @(negedge clk);
      @(negedge clk); in_valid = 1; in_sof = 1; in_data = $urandom;
      @(negedge clk); in_valid = 0; in_sof = 0;
      repeat ($urandom_range(3)) @(negedge clk);
      @(negedge clk); in_valid = 1; in_eof = 1; in_data = {et, 16'($urandom)};
      @(negedge clk); in_valid = 0; in_eof = 0;
      repeat (5) @(negedge clk);
      checks++;
      if (pc !== 5'd0) begin failures++; $display("FAIL: not back at 0"); end
    end
    checks++;
    if (n_stall == 0 || n_case[0] == 0 || n_case[1] == 0 || n_case[2] == 0 || n_case[3] == 0) begin
      failures++; $display("FAIL: coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
