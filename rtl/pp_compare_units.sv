// pp_compare_units - the array of N compare units (CU).
//
// Each unit compares the extracted field with one reference word of the
// selected PCB line, over the full L bits, and reports a match. The N match
// bits drive the control code book. Purely combinational.
module pp_compare_units #(
  parameter int unsigned L = pp_pkg::PP_L,
  parameter int unsigned N = pp_pkg::PP_N
) (
  input  logic [L-1:0]        field,
  input  logic [N-1:0][L-1:0] refs,
  output logic [N-1:0]        match
);

  always_comb begin
    for (int i = 0; i < N; i++) match[i] = (field == refs[i]);
  end

endmodule
