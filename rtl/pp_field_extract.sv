// pp_field_extract - field extraction unit.
//
// Selects one field from the dynamic buffer window (src = 0) or from the status
// vector (src = 1) and forwards it, right-aligned and zero-extended to L bits,
// to the compare units. The field starts offset bits above bit 0 of the source
// and its width is given by mask, the decoded width from the instruction
// decoder (low bits set). Purely combinational.
//
// Selecting a field from the buffer content is the processor's; the offset and
// width encoding and the status source are this design's choices.
module pp_field_extract #(
  parameter int unsigned L     = pp_pkg::PP_L,
  parameter int unsigned DEPTH = pp_pkg::PP_DB_DEPTH,
  localparam int unsigned OFF_W = $clog2(DEPTH * L)
) (
  input  logic [DEPTH*L-1:0] window,
  input  logic [L-1:0]       status,
  input  logic               src,
  input  logic [OFF_W-1:0]   offset,
  input  logic [L-1:0]       mask,
  output logic [L-1:0]       field
);

  logic [DEPTH*L-1:0] source;
  logic [L-1:0]       shifted;

  assign source  = src ? {{(DEPTH-1)*L{1'b0}}, status} : window;
  assign shifted = L'(source >> offset);
  assign field   = shifted & mask;

endmodule
