// pp_top - embedded protocol processor for packet reception.
//
// Sits in the network interface between the Ethernet PHY and the host memory
// and processes each received frame in-line, at network speed, as its words
// arrive: the core (pp_core) matches header fields and takes the decisions,
// while three accelerators work on the same words in the same cycles - the
// CRC-32 check of the frame, the Internet (1's complement) checksum for IP,
// UDP and TCP, and the memory management unit that writes the accepted
// payload straight into the destination buffer in host memory. The core
// starts and steers the accelerators with control bits in its instructions
// and branches on their flags. A supporting microcontroller programs the
// lookup tables and the destination table through the configuration bus,
// before operation or at any time during it, and receives one event per
// stored or dropped frame.
//
// Interfaces: the input port carries one word per cycle at most (in_valid)
// with start/end-of-frame tags and the valid byte count of the last word;
// the host memory port is a write-only word bus with byte enables; the
// configuration bus is write-only (see pp_cfg_decoder for the map). Frame
// events are single-cycle pulses.
module pp_top
  import pp_pkg::*;
#(
  parameter int unsigned L     = PP_L,
  parameter int unsigned N     = PP_N,
  parameter int unsigned K     = PP_K,
  parameter int unsigned M     = PP_M,
  parameter int unsigned P     = PP_P,
  parameter int unsigned DEPTH = PP_DB_DEPTH,
  parameter int unsigned AW    = PP_MEM_AW,
  localparam int unsigned PC_W = $clog2(M),
  localparam int unsigned EW   = $clog2(K * N),
  localparam int unsigned NB_W = $clog2(L / 8),
  localparam int unsigned BW   = L / 8,
  localparam int unsigned LW   = AW + $clog2(BW),
  localparam int unsigned CW   = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  input  logic              restart,
  // input port (from the Ethernet PHY/MAC framing)
  input  logic              in_valid,
  input  logic [L-1:0]      in_data,
  input  logic              in_sof,
  input  logic              in_eof,
  input  logic [NB_W-1:0]   in_nbytes,
  // configuration bus from the microcontroller
  input  logic              cfg_we,
  input  logic [CFG_AW-1:0] cfg_addr,
  input  logic [31:0]       cfg_wdata,
  input  logic              ovf_clear,
  // host memory write port
  output logic              mem_we,
  output logic [AW-1:0]     mem_addr,
  output logic [L-1:0]      mem_wdata,
  output logic [BW-1:0]     mem_be,
  // frame events to the microcontroller
  output logic              evt_valid,
  output logic              evt_commit,
  output logic [EW-1:0]     evt_dest,
  output logic [AW-1:0]     evt_addr,
  output logic [LW-1:0]     evt_len,
  // status
  output logic [PC_W-1:0]   pc,
  output logic              stall,
  output logic              overflow,
  output logic [CW-1:0]     pending,
  output logic [31:0]       crc,
  output logic              crc_ok,
  output logic              crc_done,
  output logic [15:0]       csum,
  output logic              csum_ok
);

  logic            it_we, pcb_we, ccb_we, dest_we;
  logic [PC_W-1:0] it_waddr;
  logic [EW-1:0]   tab_waddr;
  pp_ctrl_t        ctrl;
  logic [L-1:0]    cur_word, field;
  logic            cur_eof, hit, mm_open;
  logic [NB_W-1:0] cur_nbytes;
  logic [EW-1:0]   sel;

  if (P > 32 || L > 32 || AW > 32) begin : g_bad_cfg
    $error("pp_top: the configuration bus is 32 bits wide");
  end

  pp_cfg_decoder #(.M(M), .N(N), .K(K)) u_cfg (
    .cfg_we, .cfg_addr, .it_we, .it_waddr, .pcb_we, .ccb_we, .dest_we, .tab_waddr
  );

  pp_core #(.L(L), .N(N), .K(K), .M(M), .P(P), .DEPTH(DEPTH)) u_core (
    .clk, .rst_n, .run, .restart,
    .in_valid, .in_data, .in_sof, .in_eof, .in_nbytes,
    .it_we, .it_waddr, .it_wdata(cfg_wdata[P-1:0]),
    .pcb_we, .pcb_waddr(tab_waddr), .pcb_wdata(cfg_wdata[L-1:0]),
    .ccb_we, .ccb_waddr(tab_waddr), .ccb_wdata(cfg_wdata[PC_W-1:0]),
    .ovf_clear,
    .acc_csum(csum), .acc_csum_ok(csum_ok), .acc_crc_ok(crc_ok), .acc_crc_done(crc_done),
    .acc_mm_open(mm_open),
    .ctrl, .cur_word, .cur_eof, .cur_nbytes, .field, .hit, .sel,
    .pc, .stall, .overflow, .pending
  );

  pp_crc32_acc #(.L(L)) u_crc (
    .clk, .rst_n, .clear(ctrl.crc_clear), .add(ctrl.crc_add),
    .data(cur_word), .eof(cur_eof), .nbytes(cur_nbytes),
    .crc, .done(crc_done), .ok(crc_ok)
  );

  pp_csum_acc #(.L(L)) u_csum (
    .clk, .rst_n, .clear(ctrl.cs_clear), .add_word(ctrl.cs_add_word),
    .add_field(ctrl.cs_add_field), .word(cur_word), .eof(cur_eof), .nbytes(cur_nbytes),
    .field, .sum(csum), .ok(csum_ok)
  );

  pp_mm_acc #(.L(L), .N(N), .K(K), .AW(AW)) u_mm (
    .clk, .rst_n,
    .cfg_we(dest_we), .cfg_waddr(tab_waddr), .cfg_wdata(cfg_wdata[AW-1:0]),
    .open(ctrl.mm_open), .hit, .sel, .store(ctrl.mm_store), .commit(ctrl.mm_commit),
    .discard(ctrl.mm_discard), .data(cur_word), .eof(cur_eof), .nbytes(cur_nbytes),
    .mem_we, .mem_addr, .mem_wdata, .mem_be,
    .evt_valid, .evt_commit, .evt_dest, .evt_addr, .evt_len, .active(mm_open)
  );

endmodule
