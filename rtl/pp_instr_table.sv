// pp_instr_table - instruction table (IT).
//
// A lookup table of M instructions of P bits. The program counter selects the
// instruction combinationally (the table is an M-to-1 multiplexer in the
// processor's one-cycle loop). The supporting microcontroller writes entries
// through the configuration interface, before operation or at any time during
// it; a write takes effect at the next clock edge. The table is not reset: it
// must be configured before the core runs.
module pp_instr_table #(
  parameter int unsigned M = pp_pkg::PP_M,
  parameter int unsigned P = pp_pkg::PP_P,
  localparam int unsigned AW = $clog2(M)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [P-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [P-1:0]  rdata
);

  logic [P-1:0] mem [M];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
