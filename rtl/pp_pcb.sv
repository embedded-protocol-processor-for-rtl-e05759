// pp_pcb - parameter code book (PCB).
//
// A lookup table of K lines of N reference words of L bits. The line pointer
// from the instruction selects one line combinationally and all N words go to
// the compare units (a K-to-1 multiplexer of width N*L). The microcontroller
// writes single words, entry = line * N + slot, at any time, for instance to
// add a newly opened UDP port; a write takes effect at the next clock edge.
// The table is not reset: it is configured before the core runs.
module pp_pcb #(
  parameter int unsigned L = pp_pkg::PP_L,
  parameter int unsigned N = pp_pkg::PP_N,
  parameter int unsigned K = pp_pkg::PP_K,
  localparam int unsigned LINE_W = $clog2(K),
  localparam int unsigned EW     = $clog2(K * N)
) (
  input  logic                clk,
  input  logic                we,
  input  logic [EW-1:0]       waddr,
  input  logic [L-1:0]        wdata,
  input  logic [LINE_W-1:0]   line,
  output logic [N-1:0][L-1:0] refs
);

  logic [N-1:0][L-1:0] mem [K];

  always_ff @(posedge clk) begin
    if (we) mem[32'(waddr) / N][32'(waddr) % N] <= wdata;
  end

  assign refs = mem[line];

endmodule
