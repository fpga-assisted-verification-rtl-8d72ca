// instr_decoder: splits a 16-bit instruction into its fields and control bits.
//
// Purely combinational. The word is {opcode, rd, rs1, src2}, four nibbles,
// most significant first. rd_we is raised for every valid instruction (all
// sixteen opcodes write a register); the register file itself discards writes
// to r0. is_src2_imm is set for opcodes 0x9..0xf, the register-immediate
// group, and selects the sign-extended src2 nibble instead of the register
// operand. The field names and the two control outputs follow the datapath
// diagram of the design; deriving rd_we from instr_valid is this design's
// choice.
module instr_decoder
  import fav_pkg::*;
(
  input  logic       [XLEN-1:0] instr,
  input  logic                  instr_valid,
  output opcode_t               opcode,
  output ridx_t                 rd,
  output ridx_t                 rs1,
  output logic       [3:0]      src2,
  output logic                  rd_we,
  output logic                  is_src2_imm
);

  instr_t fields;

  always_comb begin
    fields      = instr_t'(instr);
    opcode      = fields.opcode;
    rd          = fields.rd;
    rs1         = fields.rs1;
    src2        = fields.src2;
    rd_we       = instr_valid;
    is_src2_imm = is_imm_op(fields.opcode);
  end

endmodule
