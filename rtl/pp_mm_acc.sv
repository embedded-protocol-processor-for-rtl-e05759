// pp_mm_acc - memory management accelerator (the receive DMA).
//
// Writes the payload of a frame straight into host memory at a location
// chosen by the field matching, so that the application finds it in place and
// the payload is buffered only once. The microcontroller fills a destination
// table of K*N word addresses, one per code-book slot (entry = line * N +
// slot), through the configuration interface. The core controls the
// accelerator per instruction:
//   open    - if a compare unit hit (hit = 1), open destination sel: the next
//             stored word goes to its table address. Re-opening replaces an
//             open destination. Without a hit nothing is opened.
//   store   - write the current word at the next address (mem_we, one cycle);
//             an end-of-frame word with nbytes != 0 writes only those bytes.
//   commit  - close the destination, report the frame (evt_commit = 1) with
//             its start address and byte length, and move the destination's
//             table entry past the stored words so the next frame follows it.
//   discard - close the destination and report the frame as dropped.
// store, commit and discard with nothing open are ignored. All outputs are
// registered except the memory write port, which follows store in the same
// cycle. A configuration write to an entry wins over a commit update of it.
// An assertion flags a program that commits and discards in the same cycle.
//
// Storing the payload based on the matching result is the processor's; the
// destination table, the controls and the event format are this design's.
module pp_mm_acc #(
  parameter int unsigned L    = pp_pkg::PP_L,
  parameter int unsigned N    = pp_pkg::PP_N,
  parameter int unsigned K    = pp_pkg::PP_K,
  parameter int unsigned AW   = pp_pkg::PP_MEM_AW,
  localparam int unsigned NB_W = $clog2(L / 8),
  localparam int unsigned EW   = $clog2(K * N),
  localparam int unsigned BW   = L / 8,
  localparam int unsigned LW   = AW + $clog2(BW)
) (
  input  logic            clk,
  input  logic            rst_n,
  // destination table writes from the configuration interface
  input  logic            cfg_we,
  input  logic [EW-1:0]   cfg_waddr,
  input  logic [AW-1:0]   cfg_wdata,
  // core controls
  input  logic            open,
  input  logic            hit,
  input  logic [EW-1:0]   sel,
  input  logic            store,
  input  logic            commit,
  input  logic            discard,
  input  logic [L-1:0]    data,
  input  logic            eof,
  input  logic [NB_W-1:0] nbytes,
  // host memory write port
  output logic            mem_we,
  output logic [AW-1:0]   mem_addr,
  output logic [L-1:0]    mem_wdata,
  output logic [BW-1:0]   mem_be,      // bit BW-1 = first byte (data[L-1:L-8])
  // frame event to the microcontroller
  output logic            evt_valid,
  output logic            evt_commit,
  output logic [EW-1:0]   evt_dest,
  output logic [AW-1:0]   evt_addr,
  output logic [LW-1:0]   evt_len,
  output logic            active
);

  logic [AW-1:0] table_q [K * N];
  logic [EW-1:0] dest_q;
  logic [AW-1:0] start_q, addr_q;
  logic [LW-1:0] len_q;
  logic [LW-1:0] nb_eff;

  assign nb_eff = (eof && nbytes != '0) ? LW'(nbytes) : LW'(BW);

  assign mem_we    = store && active;
  assign mem_addr  = addr_q;
  assign mem_wdata = data;
  always_comb begin
    for (int b = 0; b < BW; b++) mem_be[BW-1-b] = (LW'(b) < nb_eff);
  end

  // Program rule: an instruction either commits or discards a frame.
  a_commit_xor_discard: assert property (@(posedge clk) disable iff (!rst_n) !(commit && discard))
    else $error("pp_mm_acc: commit and discard in the same cycle");

  always_ff @(posedge clk) begin
    if (cfg_we)                 table_q[cfg_waddr] <= cfg_wdata;
    if (commit && active && !(cfg_we && cfg_waddr == dest_q))
      table_q[dest_q] <= addr_q + AW'(store);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active     <= 1'b0;
      dest_q     <= '0;
      start_q    <= '0;
      addr_q     <= '0;
      len_q      <= '0;
      evt_valid  <= 1'b0;
      evt_commit <= 1'b0;
      evt_dest   <= '0;
      evt_addr   <= '0;
      evt_len    <= '0;
    end else begin
      evt_valid <= 1'b0;
      if (active && (commit || discard)) begin
        evt_valid  <= 1'b1;
        evt_commit <= commit;
        evt_dest   <= dest_q;
        evt_addr   <= start_q;
        evt_len    <= len_q + (store ? nb_eff : '0);
        active     <= 1'b0;
      end else if (open && hit) begin
        active  <= 1'b1;
        dest_q  <= sel;
        start_q <= table_q[sel];
        addr_q  <= table_q[sel];
        len_q   <= '0;
      end else if (store && active) begin
        addr_q <= addr_q + AW'(1);
        len_q  <= len_q + nb_eff;
      end
    end
  end

endmodule
