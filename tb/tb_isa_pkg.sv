// tb_isa_pkg: reference model of the 16-instruction ISA for the testbenches.
//
// Written independently of the RTL: shifts are built from multiplication
// and bias tricks rather than shift operators where practical, and the
// opcode is handled as a plain integer. ref_exec returns the value an
// instruction writes given the two register values it reads. ref_step runs
// one instruction on a register array, optionally with one of the eight
// deliberately faulty DUT behaviours (bug = 1..8, 0 = correct).
package tb_isa_pkg;

  typedef logic [15:0] w16_t;
  typedef w16_t regs_t [16];

  function automatic w16_t sext4(logic [3:0] n);
    return (n >= 8) ? w16_t'(int'(n) - 16) : w16_t'(n);
  endfunction

  function automatic w16_t pow2(int s);
    w16_t p = 16'd1;
    for (int i = 0; i < s; i++) p = p * 16'd2;
    return p;
  endfunction

  // value produced by opcode op with first operand a and second operand b
  function automatic w16_t alu_ref(int op, w16_t a, w16_t b);
    int s = int'(b) % 16;
    w16_t bias = 16'h8000;
    case (op)
      0:            return a;
      1, 9:         return w16_t'(int'(a) + int'(b));
      2:            return w16_t'(int'(a) - int'(b) + 65536);
      3, 10:        return a & b;
      4, 11:        return a | b;
      5, 12:        return a ^ b;
      6, 13:        return w16_t'(a * pow2(s));
      7, 14:        return w16_t'(int'(a) / int'(pow2(s)));
      default:      // 8, 15: arithmetic shift by bias: ((a ^ 0x8000) >> s) - (0x8000 >> s)
        return w16_t'(int'(a ^ bias) / int'(pow2(s)) - int'(bias) / int'(pow2(s)));
    endcase
  endfunction

  function automatic w16_t rd_reg(input regs_t r, int idx, int bug);
    return (idx == 0 && bug != 6) ? 16'h0 : r[idx];
  endfunction

  // Execute one instruction on r. first = this is the first instruction
  // since reset. Returns the destination index in rd_o.
  function automatic void ref_step(inout regs_t r, input w16_t ins, input int bug,
                                   input bit first, output int rd_o);
    int op  = int'(ins[15:12]);
    int rd  = int'(ins[11:8]);
    int rs1 = int'(ins[7:4]);
    int s2  = int'(ins[3:0]);
    bit imm = (op >= 9) && (bug != 2);
    int eop = op;
    int wr  = rd;
    w16_t a, b, y;
    if (bug == 2 && op >= 9) eop = op - 8;
    if (bug == 3 && eop == 8)  eop = 7;
    if (bug == 3 && eop == 15) eop = 14;
    a = rd_reg(r, rs1, bug);
    if (imm) b = (bug == 1) ? w16_t'(ins[3:0]) : sext4(ins[3:0]);
    else     b = rd_reg(r, s2, bug);
    y = alu_ref(eop, a, b);
    if (bug == 8 && rd == 8) wr = 9;
    if (bug == 8 && rd == 9) wr = 8;
    if (bug == 7 && wr == 10) y = y | 16'hc000;
    if (!(bug == 4 && first) && (wr != 0 || bug == 6)) r[wr] = y;
    rd_o = rd;
  endfunction

endpackage
