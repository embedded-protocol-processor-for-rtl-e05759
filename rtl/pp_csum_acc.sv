// pp_csum_acc - Internet checksum accelerator (16-bit 1's complement sum).
//
// Accumulates the 1's complement sum used by IP, TCP and UDP. Per cycle the
// core can add the current word (add_word; on an end-of-frame word the bytes
// beyond nbytes count as zero) and/or the extracted field (add_field, e.g. a
// half word of a header that straddles words). Both are split into 16-bit
// halves, first half in the upper bits. clear zeroes the sum; clear together
// with an add starts a new sum with that value. sum is the folded 16-bit sum;
// ok is set when it is 0xFFFF, i.e. when a covered header or segment
// including its checksum field is correct. Both are visible in the core's
// status vector, so the core can test the flag or compare the sum itself.
//
// The 1's complement arithmetic is the processor's checksum; the add-field
// path and the split into word and field adds are this design's.
module pp_csum_acc #(
  parameter int unsigned L = pp_pkg::PP_L,
  localparam int unsigned NB_W = $clog2(L / 8),
  localparam int unsigned H    = L / 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            add_word,
  input  logic            add_field,
  input  logic [L-1:0]    word,
  input  logic            eof,
  input  logic [NB_W-1:0] nbytes,
  input  logic [L-1:0]    field,
  output logic [15:0]     sum,
  output logic            ok
);

  logic [L-1:0] word_m;
  logic [31:0]  acc;
  logic [15:0]  next;

  // Zero the bytes of an end-of-frame word that are not valid.
  always_comb begin
    word_m = word;
    if (eof && nbytes != '0) begin
      for (int b = 0; b < L / 8; b++)
        if (b >= int'(nbytes)) word_m[L-1-8*b -: 8] = 8'h00;
    end
  end

  always_comb begin
    acc = clear ? 32'h0 : {16'h0, sum};
    for (int h = 0; h < H; h++) begin
      if (add_word)  acc = acc + {16'h0, word_m[16*h +: 16]};
      if (add_field) acc = acc + {16'h0, field[16*h +: 16]};
    end
    acc  = {16'h0, acc[15:0]} + {16'h0, acc[31:16]};
    next = acc[15:0] + acc[31:16];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                sum <= 16'h0;
    else if (clear || add_word || add_field)   sum <= next;
  end

  assign ok = (sum == 16'hFFFF);

endmodule
