// pp_npcg - next program counter generation (NPCG).
//
// Adds the selected relative jump to the program counter, modulo M: the jump
// from the control code book when a compare unit hit, otherwise the
// instruction's default jump. A log2(M)-bit addition, the last stage of the
// one-cycle loop. While hold is high (core stopped or waiting for a word) the
// program counter is kept. Purely combinational.
//
// Relative jumps and the default branch are the processor's; wrap-around
// modulo M (so backward jumps are written as M - distance) is this design's.
module pp_npcg #(
  parameter int unsigned M = pp_pkg::PP_M,
  localparam int unsigned PC_W = $clog2(M)
) (
  input  logic [PC_W-1:0] pc,
  input  logic            hit,
  input  logic [PC_W-1:0] rel,
  input  logic [PC_W-1:0] dflt,
  input  logic            hold,
  output logic [PC_W-1:0] next_pc
);

  logic [PC_W-1:0] step;
  logic [PC_W:0]   sum;

  assign step = hit ? rel : dflt;
  assign sum  = {1'b0, pc} + {1'b0, step};

  always_comb begin
    if (hold)                      next_pc = pc;
    else if (sum >= (PC_W+1)'(M))  next_pc = PC_W'(sum - (PC_W+1)'(M));
    else                           next_pc = sum[PC_W-1:0];
  end

endmodule
