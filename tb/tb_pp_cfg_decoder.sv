// tb_pp_cfg_decoder - checks the configuration address map: table select in
// bits [11:10], entry in [9:0], out-of-range entries and idle cycles produce
// no write enable.
module tb_pp_cfg_decoder;
  import pp_pkg::*;
  logic cfg_we;
  logic [11:0] cfg_addr;
  logic it_we, pcb_we, ccb_we, dest_we;
  logic [4:0] it_waddr, tab_waddr;
  int checks = 0, failures = 0;

  pp_cfg_decoder dut (.cfg_we, .cfg_addr, .it_we, .it_waddr, .pcb_we, .ccb_we, .dest_we, .tab_waddr);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      logic [3:0] exp;
      int idx;
      cfg_we = $urandom_range(4) != 0;
      cfg_addr = $urandom;
      if ($urandom_range(1)) cfg_addr[9:0] = 10'($urandom_range(40));
      #1;
      idx = int'(cfg_addr[9:0]);
      exp = '0;
      if (cfg_we && idx < 32) exp[cfg_addr[11:10]] = 1'b1;
      checks++;
      if ({dest_we, ccb_we, pcb_we, it_we} !== exp ||
          (exp != 0 && (int'(it_waddr) != idx || int'(tab_waddr) != idx))) begin
        failures++;
        $display("FAIL: we %0d addr %h -> %b", cfg_we, cfg_addr, {dest_we, ccb_we, pcb_we, it_we});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
