// pp_crc32_acc - CRC-32 accelerator (Ethernet frame check sequence).
//
// Works on the same words as the core, at the same time. When the core asks
// (add), the current word is folded into the CRC register in one cycle, first
// byte in bits [L-1:L-8]; on an end-of-frame word only the nbytes valid bytes
// are used. clear presets the register to all ones; clear and add together
// start a new frame with this word. After the word tagged eof, done is set;
// ok is set when the register then holds the CRC-32 residue 0xDEBB20E3, the
// value left after a frame followed by its correct frame check sequence. Both
// are flags the core tests through its status vector.
//
// Polynomial 0x04C11DB7 processed LSB first (reflected form 0xEDB88320), as
// Ethernet does. The byte-serial loop below unrolls into a parallel XOR
// network. Starting, flagging and the CRC-32 itself follow the processor's
// description; the one-word-per-cycle structure is this design's.
module pp_crc32_acc #(
  parameter int unsigned L = pp_pkg::PP_L,
  localparam int unsigned NB_W = $clog2(L / 8)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            add,
  input  logic [L-1:0]    data,
  input  logic            eof,
  input  logic [NB_W-1:0] nbytes,   // valid bytes when eof, 0 = all
  output logic [31:0]     crc,
  output logic            done,
  output logic            ok
);

  localparam logic [31:0] POLY_REFL = 32'hEDB8_8320;
  localparam logic [31:0] RESIDUE   = 32'hDEBB_20E3;

  logic [31:0] start, next;

  assign start = clear ? 32'hFFFF_FFFF : crc;

  always_comb begin
    next = start;
    for (int b = 0; b < L / 8; b++) begin
      if (!eof || nbytes == '0 || b < int'(nbytes)) begin
        next = next ^ {24'h0, data[L-1-8*b -: 8]};
        for (int i = 0; i < 8; i++) next = (next >> 1) ^ (next[0] ? POLY_REFL : 32'h0);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crc  <= 32'hFFFF_FFFF;
      done <= 1'b0;
    end else begin
      if (add) begin
        crc  <= next;
        done <= eof;
      end else if (clear) begin
        crc  <= 32'hFFFF_FFFF;
        done <= 1'b0;
      end
    end
  end

  assign ok = done && (crc == RESIDUE);

endmodule
