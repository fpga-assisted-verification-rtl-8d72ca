// alu: 16-bit combinational ALU for the sixteen opcodes of the DUT.
//
// a is the rs1 operand; b is either the rs2 register value or the
// sign-extended 4-bit immediate (the caller selects). MOV copies a. Shift
// amounts are the low four bits of b, as for a 16-bit RISC-V style machine.
// SRA/SRAI shift in copies of bit 15. The opcode set follows the published
// instruction table; using b[3:0] as the shift amount is this design's
// choice, since the description does not say how large shifts are handled.
module alu
  import fav_pkg::*;
(
  input  opcode_t op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y
);

  logic [3:0] shamt;
  assign shamt = b[3:0];

  always_comb begin
    unique case (op)
      OP_MOV:            y = a;
      OP_ADD,  OP_ADDI:  y = a + b;
      OP_SUB:            y = a - b;
      OP_AND,  OP_ANDI:  y = a & b;
      OP_OR,   OP_ORI:   y = a | b;
      OP_XOR,  OP_XORI:  y = a ^ b;
      OP_SLL,  OP_SLLI:  y = a << shamt;
      OP_SRL,  OP_SRLI:  y = a >> shamt;
      OP_SRA,  OP_SRAI:  y = word_t'($signed(a) >>> shamt);
      default:           y = '0;
    endcase
  end

endmodule
