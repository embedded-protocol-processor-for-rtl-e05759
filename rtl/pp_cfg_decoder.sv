// pp_cfg_decoder - configuration interface of the protocol processor.
//
// The supporting microcontroller programs the processor through a simple
// write-only bus (it keeps its own copy of the configuration, so nothing is
// read back). cfg_addr[11:10] selects the table - instruction table, PCB, CCB
// or the destination table of the memory management accelerator - and
// cfg_addr[9:0] the entry. A write to an entry beyond the table is ignored.
// The decoder is combinational: each table takes the write at the next clock
// edge. Writes are allowed at any time, also while frames are processed. An
// assertion checks that at most one table is selected.
//
// That the microcontroller writes the tables at any time is the processor's;
// the bus and the address map are this design's.
module pp_cfg_decoder
  import pp_pkg::*;
#(
  parameter int unsigned M = PP_M,
  parameter int unsigned N = PP_N,
  parameter int unsigned K = PP_K,
  localparam int unsigned PC_W = $clog2(M),
  localparam int unsigned EW   = $clog2(K * N)
) (
  input  logic              cfg_we,
  input  logic [CFG_AW-1:0] cfg_addr,
  output logic              it_we,
  output logic [PC_W-1:0]   it_waddr,
  output logic              pcb_we,
  output logic              ccb_we,
  output logic              dest_we,
  output logic [EW-1:0]     tab_waddr
);

  logic [1:0] sel;
  logic [9:0] idx;

  assign sel       = cfg_addr[11:10];
  assign idx       = cfg_addr[9:0];
  assign it_waddr  = PC_W'(idx);
  assign tab_waddr = EW'(idx);

  // At most one table is written per bus cycle.
  always_comb begin
    a_one_table: assert (int'(it_we) + int'(pcb_we) + int'(ccb_we) + int'(dest_we) <= 1)
      else $error("pp_cfg_decoder: several tables selected");
  end

  always_comb begin
    it_we   = 1'b0;
    pcb_we  = 1'b0;
    ccb_we  = 1'b0;
    dest_we = 1'b0;
    if (cfg_we) begin
      unique case (sel)
        CFG_IT:   it_we   = (32'(idx) < M);
        CFG_PCB:  pcb_we  = (32'(idx) < K * N);
        CFG_CCB:  ccb_we  = (32'(idx) < K * N);
        CFG_DEST: dest_we = (32'(idx) < K * N);
      endcase
    end
  end

endmodule
