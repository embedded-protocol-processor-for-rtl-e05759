// pp_dynamic_buffer - input buffer of the protocol processor.
//
// Received words enter from the input port at network speed, one per cycle at
// most, with start-of-frame, end-of-frame and valid-byte tags. The buffer is a
// shift register of DEPTH words: in steady state the core consumes each word in
// the cycle after it arrives and the buffer effectively holds one word, as the
// processor is meant to run; the older words stay readable so that an
// instruction can pick a field that started in an earlier word, and they absorb
// the lag when the program spends extra instructions on a word.
//
// A counter keeps the number of received but not yet consumed words. The word
// an instruction works on (the "current" word) is the oldest unconsumed word
// for a sync instruction, which consumes it, and the last consumed word for any
// other instruction. window[L-1:0] is the current word, window[2L-1:L] the word
// before it, and so on; words beyond the buffer read as zero.
//
// Timing: a word presented with in_valid is readable from the next cycle. A sync
// instruction with no unconsumed word raises stall (combinational). If a word
// arrives while DEPTH-1 words are unconsumed, overflow is set and stays set
// until ovf_clear; the oldest word is then lost. An assertion checks that the
// backlog stays within DEPTH-1.
//
// The depth, the tags and the overflow rule are this design's choices; only the
// normal one-word behaviour and the several-word option are the processor's.
module pp_dynamic_buffer #(
  parameter int unsigned L     = pp_pkg::PP_L,
  parameter int unsigned DEPTH = pp_pkg::PP_DB_DEPTH,
  localparam int unsigned NB_W = $clog2(L / 8),
  localparam int unsigned CW   = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  // input port
  input  logic               in_valid,
  input  logic [L-1:0]       in_data,
  input  logic               in_sof,
  input  logic               in_eof,
  input  logic [NB_W-1:0]    in_nbytes,   // valid bytes of an eof word, 0 = all
  // from the instruction
  input  logic               sync,        // current instruction consumes a word
  input  logic               consume,     // sync instruction executes this cycle
  input  logic               ovf_clear,
  // outputs
  output logic               stall,
  output logic [DEPTH*L-1:0] window,
  output logic               cur_sof,
  output logic               cur_eof,
  output logic [NB_W-1:0]    cur_nbytes,  // 0 unless cur_eof
  output logic [CW-1:0]      pending,
  output logic               overflow
);

  logic [DEPTH-1:0][L-1:0]    data_q;
  logic [DEPTH-1:0]           sof_q, eof_q;
  logic [DEPTH-1:0][NB_W-1:0] nb_q;
  logic [CW-1:0]              base;
  logic [CW:0]                pend_next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_q <= '0;
      sof_q  <= '0;
      eof_q  <= '0;
      nb_q   <= '0;
    end else if (in_valid) begin
      data_q <= {data_q[DEPTH-2:0], in_data};
      sof_q  <= {sof_q[DEPTH-2:0], in_sof};
      eof_q  <= {eof_q[DEPTH-2:0], in_eof};
      nb_q   <= {nb_q[DEPTH-2:0], (in_eof ? in_nbytes : NB_W'(0))};
    end
  end

  assign stall     = sync && (pending == '0);
  assign pend_next = {1'b0, pending} + (CW+1)'(in_valid) - (CW+1)'(consume && !stall);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending  <= '0;
      overflow <= 1'b0;
    end else begin
      if (pend_next > (CW+1)'(DEPTH - 1)) begin
        pending  <= CW'(DEPTH - 1);
        overflow <= 1'b1;
      end else begin
        pending  <= pend_next[CW-1:0];
        if (ovf_clear) overflow <= 1'b0;
      end
    end
  end

  // Index of the current word.
  always_comb begin
    if (sync) base = (pending == '0) ? '0 : pending - CW'(1);
    else      base = pending;
  end

  // The backlog never exceeds the words the buffer can keep besides the
  // current one.
  a_pending_bound: assert property (@(posedge clk) disable iff (!rst_n) pending <= CW'(DEPTH - 1))
    else $error("pp_dynamic_buffer: pending count out of range");

  assign window     = data_q >> (base * L);
  assign cur_sof    = sof_q[base];
  assign cur_eof    = eof_q[base];
  assign cur_nbytes = nb_q[base];

endmodule
