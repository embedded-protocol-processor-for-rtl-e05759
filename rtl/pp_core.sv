// pp_core - protocol processor core.
//
// A data-stream processor without a register file or data memory: the packet
// arrives word by word in the dynamic buffer and the program lives in three
// lookup tables - the instruction table (IT), the parameter code book (PCB,
// reference values) and the control code book (CCB, relative jumps). The only
// register in the control loop is the program counter, so one instruction -
// a complete if-then-else or a switch with up to N cases plus a default -
// executes per clock cycle:
//
//   PC -> IT -> ID -> PCB line -> N compare units -> CCB -> NPCG -> PC
//
// The instruction chooses a field of the buffer window (or of the status
// vector of accelerator flags), a PCB/CCB line and a default jump. The field
// is compared with the N reference words of the line; the first matching slot
// with a non-zero jump gives the relative jump, otherwise the default jump is
// taken. A sync instruction consumes the next received word and waits (the PC
// holds) while none is there. The instruction's accelerator control bits are
// issued, gated by execution, on ctrl together with the current word, its
// tags and the extracted field, so the accelerators work on the same data in
// the same cycle as the core.
//
// run = 0 holds the PC (and issues no controls); the tables are written
// through the it_/pcb_/ccb_ write ports at any time.
module pp_core
  import pp_pkg::*;
#(
  parameter int unsigned L     = PP_L,
  parameter int unsigned N     = PP_N,
  parameter int unsigned K     = PP_K,
  parameter int unsigned M     = PP_M,
  parameter int unsigned P     = PP_P,
  parameter int unsigned DEPTH = PP_DB_DEPTH,
  localparam int unsigned PC_W   = $clog2(M),
  localparam int unsigned LINE_W = $clog2(K),
  localparam int unsigned EW     = $clog2(K * N),
  localparam int unsigned NB_W   = $clog2(L / 8),
  localparam int unsigned SW     = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CW     = $clog2(DEPTH),
  localparam int unsigned OFF_W  = $clog2(DEPTH * L)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  input  logic            restart,
  // input port
  input  logic            in_valid,
  input  logic [L-1:0]    in_data,
  input  logic            in_sof,
  input  logic            in_eof,
  input  logic [NB_W-1:0] in_nbytes,
  // table writes
  input  logic            it_we,
  input  logic [PC_W-1:0] it_waddr,
  input  logic [P-1:0]    it_wdata,
  input  logic            pcb_we,
  input  logic [EW-1:0]   pcb_waddr,
  input  logic [L-1:0]    pcb_wdata,
  input  logic            ccb_we,
  input  logic [EW-1:0]   ccb_waddr,
  input  logic [PC_W-1:0] ccb_wdata,
  input  logic            ovf_clear,
  // accelerator flags into the status vector
  input  logic [15:0]     acc_csum,
  input  logic            acc_csum_ok,
  input  logic            acc_crc_ok,
  input  logic            acc_crc_done,
  input  logic            acc_mm_open,
  // to the accelerators
  output pp_ctrl_t        ctrl,        // gated: only when the instruction executes
  output logic [L-1:0]    cur_word,
  output logic            cur_eof,
  output logic [NB_W-1:0] cur_nbytes,
  output logic [L-1:0]    field,
  output logic            hit,
  output logic [EW-1:0]   sel,         // line * N + matching slot
  // observation
  output logic [PC_W-1:0] pc,
  output logic            stall,
  output logic            overflow,
  output logic [CW-1:0]   pending
);

  logic [P-1:0]         instr;
  logic [LINE_W-1:0]    line;
  logic [PC_W-1:0]      dflt, rel, next_pc;
  logic                 src;
  logic [OFF_W-1:0]     offset;
  logic [L-1:0]         mask;
  pp_ctrl_t             ictrl;
  logic [DEPTH*L-1:0]   window;
  logic                 cur_sof;
  logic [L-1:0]         status;
  logic [N-1:0][L-1:0]  refs;
  logic [N-1:0]         match;
  logic [SW-1:0]        hit_idx;
  logic                 exec;

  pp_pc #(.M(M)) u_pc (
    .clk, .rst_n, .restart, .next_pc, .pc
  );

  pp_instr_table #(.M(M), .P(P)) u_it (
    .clk, .we(it_we), .waddr(it_waddr), .wdata(it_wdata), .raddr(pc), .rdata(instr)
  );

  pp_instr_decoder #(.L(L), .K(K), .M(M), .P(P), .DEPTH(DEPTH)) u_id (
    .instr, .line, .dflt, .src, .offset, .mask, .ctrl(ictrl)
  );

  pp_dynamic_buffer #(.L(L), .DEPTH(DEPTH)) u_buf (
    .clk, .rst_n, .in_valid, .in_data, .in_sof, .in_eof, .in_nbytes,
    .sync(ictrl.sync), .consume(run && ictrl.sync), .ovf_clear,
    .stall, .window, .cur_sof, .cur_eof, .cur_nbytes, .pending, .overflow
  );

  always_comb begin
    status                               = '0;
    status[ST_CSUM_LSB +: 16]            = acc_csum;
    status[ST_SOF]                       = cur_sof;
    status[ST_EOF]                       = cur_eof;
    status[ST_CRC_OK]                    = acc_crc_ok;
    status[ST_CRC_DONE]                  = acc_crc_done;
    status[ST_CSUM_OK]                   = acc_csum_ok;
    status[ST_OVF]                       = overflow;
    status[ST_MM_OPEN]                   = acc_mm_open;
  end

  pp_field_extract #(.L(L), .DEPTH(DEPTH)) u_fx (
    .window, .status, .src, .offset, .mask, .field
  );

  pp_pcb #(.L(L), .N(N), .K(K)) u_pcb (
    .clk, .we(pcb_we), .waddr(pcb_waddr), .wdata(pcb_wdata), .line, .refs
  );

  pp_compare_units #(.L(L), .N(N)) u_cu (
    .field, .refs, .match
  );

  pp_ccb #(.N(N), .K(K), .M(M)) u_ccb (
    .clk, .we(ccb_we), .waddr(ccb_waddr), .wdata(ccb_wdata), .line, .match,
    .hit, .hit_idx, .rel
  );

  assign exec = run && !stall;

  pp_npcg #(.M(M)) u_npcg (
    .pc, .hit, .rel, .dflt, .hold(!exec), .next_pc
  );

  assign ctrl       = exec ? ictrl : '0;
  assign cur_word   = window[L-1:0];
  assign sel        = EW'(line * N + hit_idx);

  if (L < 16 || L % 16 != 0) begin : g_bad_l
    $error("pp_core: word length L must be a multiple of 16");
  end

endmodule
