// fav_pkg: types and constants shared by the FPGA-side verification design.
//
// The DUT is a 16-bit, single-cycle, register-only processor. An instruction
// is four 4-bit fields, {opcode, rd, rs1, src2}, from the most significant
// nibble down; src2 is a register index or a 4-bit signed immediate. The
// opcode table follows the published instruction set exactly. The host link
// carries 8-bit UART packets; an instruction travels as three packets (two
// data bytes and one padding byte) and a result as three packets
// ({4'h0, rd}, value[15:8], value[7:0]). The byte order and the position of
// the padding are this design's choice.
package fav_pkg;

  localparam int unsigned XLEN     = 16;  // register and instruction width
  localparam int unsigned NREGS    = 16;  // number of architectural registers
  localparam int unsigned RIDX_W   = 4;   // register index width
  localparam int unsigned PKT_BITS = 8;   // data bits per UART packet
  localparam int unsigned PKTS_PER_XFER = 3;  // packets per instruction / result

  typedef logic [XLEN-1:0]   word_t;
  typedef logic [RIDX_W-1:0] ridx_t;

  typedef enum logic [3:0] {
    OP_MOV  = 4'h0,
    OP_ADD  = 4'h1,
    OP_SUB  = 4'h2,
    OP_AND  = 4'h3,
    OP_OR   = 4'h4,
    OP_XOR  = 4'h5,
    OP_SLL  = 4'h6,
    OP_SRL  = 4'h7,
    OP_SRA  = 4'h8,
    OP_ADDI = 4'h9,
    OP_ANDI = 4'ha,
    OP_ORI  = 4'hb,
    OP_XORI = 4'hc,
    OP_SLLI = 4'hd,
    OP_SRLI = 4'he,
    OP_SRAI = 4'hf
  } opcode_t;

  // Instruction fields as laid out in the 16-bit word.
  typedef struct packed {
    opcode_t    opcode;
    ridx_t      rd;
    ridx_t      rs1;
    logic [3:0] src2;
  } instr_t;

  // What the FPGA reports back after each instruction.
  typedef struct packed {
    ridx_t rd;     // destination register that was written
    word_t value;  // value held by rd after the instruction
  } result_t;

  // Register-immediate opcodes are 0x9 .. 0xf.
  function automatic logic is_imm_op(opcode_t op);
    return op >= OP_ADDI;
  endfunction

  // Integer baud divider: clock cycles per UART bit, rounded to nearest.
  function automatic int unsigned clks_per_bit(longint unsigned clk_hz, longint unsigned baud);
    return int'((clk_hz + baud / 2) / baud);
  endfunction

endpackage
