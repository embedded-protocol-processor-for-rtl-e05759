// pp_pkg - shared constants and types of the in-line protocol processor.
//
// The default sizes are the rounded configuration the processor is sized for:
// word length l = 32, n = 4 compare units, k = 8 code-book lines, m = 32
// instructions of p = 32 bits. The depth of the dynamic buffer, the
// instruction layout, the status vector and the configuration address map are
// this design's own choices.
//
// Instruction word (p = 32 with the default sizes), LSB first:
//   [2:0]   line      PCB/CCB line pointer (stored directly in the instruction)
//   [7:3]   dflt      relative jump of the default branch (no compare unit hit)
//   [8]     src       field source: 0 = dynamic buffer window, 1 = status vector
//   [16:9]  offset    bit offset of the field in the selected source
//   [21:17] width_m1  field width minus one (1..32 bits)
//   [31:22] ctrl      pp_ctrl_t: sync and the accelerator control signals
// With other sizes the same fields follow each other in the same order, each
// as wide as its range needs (see pp_instr_decoder).
package pp_pkg;

  // Default configuration.
  localparam int unsigned PP_L        = 32;  // word length l
  localparam int unsigned PP_N        = 4;   // compare units n
  localparam int unsigned PP_K        = 8;   // PCB/CCB lines k
  localparam int unsigned PP_M        = 32;  // instructions m
  localparam int unsigned PP_P        = 32;  // instruction bits p
  localparam int unsigned PP_DB_DEPTH = 8;   // dynamic buffer words
  localparam int unsigned PP_MEM_AW   = 16;  // host memory word-address width

  // Control part of the instruction: one bit per action, taken only in a cycle
  // in which the instruction executes (not stalled, core running).
  typedef struct packed {
    logic mm_discard;    // drop the frame being stored, close the destination
    logic mm_commit;     // frame complete: report it, close the destination
    logic mm_store;      // store the current word at the destination
    logic mm_open;       // open the destination chosen by line and matching slot
    logic cs_add_field;  // add the extracted field to the 1's complement sum
    logic cs_add_word;   // add the current word to the 1's complement sum
    logic cs_clear;      // clear the 1's complement sum (before any add)
    logic crc_add;       // feed the current word into the CRC-32
    logic crc_clear;     // preset the CRC-32 register (before any add)
    logic sync;          // consume the next received word; stall until one is there
  } pp_ctrl_t;

  localparam int unsigned PP_CTRL_W = $bits(pp_ctrl_t);

  // Status vector, the second source of the field extraction unit. It lets the
  // compare units test accelerator flags with the same one-cycle branch.
  localparam int unsigned ST_CSUM_LSB = 0;   // [15:0] current 1's complement sum
  localparam int unsigned ST_SOF      = 16;  // current word starts a frame
  localparam int unsigned ST_EOF      = 17;  // current word ends a frame
  localparam int unsigned ST_CRC_OK   = 18;  // CRC-32 residue correct after the last word
  localparam int unsigned ST_CRC_DONE = 19;  // CRC-32 has absorbed an end-of-frame word
  localparam int unsigned ST_CSUM_OK  = 20;  // 1's complement sum equals 0xFFFF
  localparam int unsigned ST_OVF      = 21;  // dynamic buffer overflow (sticky)
  localparam int unsigned ST_MM_OPEN  = 22;  // a memory destination is open

  // Configuration address map: [11:10] selects the table, [9:0] the entry.
  localparam int unsigned CFG_AW    = 12;
  localparam logic [1:0]  CFG_IT    = 2'd0;  // instruction table, entry = instruction address
  localparam logic [1:0]  CFG_PCB   = 2'd1;  // entry = line * N + slot
  localparam logic [1:0]  CFG_CCB   = 2'd2;  // entry = line * N + slot
  localparam logic [1:0]  CFG_DEST  = 2'd3;  // destination base table, entry = line * N + slot

  // Build an instruction word for the default sizes.
  function automatic logic [31:0] pp_encode(input logic [2:0] line, input logic [4:0] dflt,
                                            input logic src, input logic [7:0] offset,
                                            input int unsigned width, input pp_ctrl_t ctrl);
    logic [4:0] wm1;
    wm1 = 5'(width - 1);
    return {ctrl, wm1, offset, src, dflt, line};
  endfunction

endpackage
