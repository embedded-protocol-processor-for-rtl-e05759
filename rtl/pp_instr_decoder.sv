// pp_instr_decoder - instruction decoder (ID).
//
// Splits the instruction word into its fields and decodes the field width
// into the bit mask the field extraction unit applies. The PCB/CCB line
// pointer is stored directly in the instruction word, so the decoder adds no
// logic between the instruction table and the code books. Field order, LSB
// first: line, default relative jump, field source, field offset, field width
// minus one, control bits (pp_pkg::pp_ctrl_t). The mask has the low
// width_m1 + 1 bits set. Each field is as wide as its range needs; with the
// default sizes this fills the 32-bit instruction exactly. Bits above the
// control field, if P is larger, are ignored. Purely combinational.
//
// The line pointer in the instruction is the processor's; the other fields and
// their layout are this design's.
module pp_instr_decoder
  import pp_pkg::*;
#(
  parameter int unsigned L     = PP_L,
  parameter int unsigned K     = PP_K,
  parameter int unsigned M     = PP_M,
  parameter int unsigned P     = PP_P,
  parameter int unsigned DEPTH = PP_DB_DEPTH,
  localparam int unsigned LINE_W = $clog2(K),
  localparam int unsigned PC_W   = $clog2(M),
  localparam int unsigned OFF_W  = $clog2(DEPTH * L),
  localparam int unsigned WID_W  = $clog2(L)
) (
  input  logic [P-1:0]      instr,
  output logic [LINE_W-1:0] line,
  output logic [PC_W-1:0]   dflt,
  output logic              src,
  output logic [OFF_W-1:0]  offset,
  output logic [L-1:0]      mask,
  output pp_ctrl_t          ctrl
);

  localparam int unsigned DFLT_LSB = LINE_W;
  localparam int unsigned SRC_BIT  = DFLT_LSB + PC_W;
  localparam int unsigned OFF_LSB  = SRC_BIT + 1;
  localparam int unsigned WID_LSB  = OFF_LSB + OFF_W;
  localparam int unsigned CTRL_LSB = WID_LSB + WID_W;

  if (CTRL_LSB + PP_CTRL_W > P) begin : g_too_narrow
    $error("pp_instr_decoder: instruction width P too small for the fields");
  end

  assign line     = instr[LINE_W-1:0];
  assign dflt     = instr[DFLT_LSB +: PC_W];
  assign src      = instr[SRC_BIT];
  assign offset   = instr[OFF_LSB +: OFF_W];
  assign ctrl     = pp_ctrl_t'(instr[CTRL_LSB +: PP_CTRL_W]);

  logic [WID_W-1:0] width_m1;

  assign width_m1 = instr[WID_LSB +: WID_W];

  // Thermometer decode of the field width.
  always_comb begin
    for (int b = 0; b < L; b++) mask[b] = (b <= int'(width_m1));
  end

endmodule
