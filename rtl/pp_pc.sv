// pp_pc - program counter (PC).
//
// The only register in the processor's control loop. It loads the next
// program counter value on every clock edge. Reset and restart (a synchronous
// request from the microcontroller, for instance after reprogramming) both
// return it to instruction 0.
module pp_pc #(
  parameter int unsigned M = pp_pkg::PP_M,
  localparam int unsigned PC_W = $clog2(M)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            restart,
  input  logic [PC_W-1:0] next_pc,
  output logic [PC_W-1:0] pc
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       pc <= '0;
    else if (restart) pc <= '0;
    else              pc <= next_pc;
  end

endmodule
