// pp_ccb - control code book (CCB).
//
// A lookup table of K lines of N relative jump addresses of log2(M) bits. The
// same line pointer that selects the PCB line selects the CCB line; the match
// vector from the compare units then selects one of its N jump addresses (an
// N-to-1 multiplexer). Combinational read; the microcontroller writes entries,
// entry = line * N + slot, at any time.
//
// This design's rules where several or no slots qualify: a slot whose jump
// address is zero is unused and its match is ignored; among the remaining
// matching slots the lowest index wins. hit = 0 means no slot qualified, and
// the next-PC logic then takes the instruction's default branch. hit_idx is
// the winning slot, which the memory management accelerator uses to choose a
// destination.
module pp_ccb #(
  parameter int unsigned N = pp_pkg::PP_N,
  parameter int unsigned K = pp_pkg::PP_K,
  parameter int unsigned M = pp_pkg::PP_M,
  localparam int unsigned LINE_W = $clog2(K),
  localparam int unsigned PC_W   = $clog2(M),
  localparam int unsigned EW     = $clog2(K * N),
  localparam int unsigned SW     = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              we,
  input  logic [EW-1:0]     waddr,
  input  logic [PC_W-1:0]   wdata,
  input  logic [LINE_W-1:0] line,
  input  logic [N-1:0]      match,
  output logic              hit,
  output logic [SW-1:0]     hit_idx,
  output logic [PC_W-1:0]   rel
);

  logic [N-1:0][PC_W-1:0] mem [K];
  logic [N-1:0][PC_W-1:0] row;

  always_ff @(posedge clk) begin
    if (we) mem[32'(waddr) / N][32'(waddr) % N] <= wdata;
  end

  assign row = mem[line];

  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    rel     = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (match[i] && row[i] != '0) begin
        hit     = 1'b1;
        hit_idx = SW'(i);
        rel     = row[i];
      end
    end
  end

endmodule
