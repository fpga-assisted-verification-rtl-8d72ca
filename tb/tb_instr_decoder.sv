// tb_instr_decoder: exhaustive check of the instruction decoder.
//
// Applies all 65,536 instruction words, with instr_valid both high and low,
// and compares the four fields, rd_we and is_src2_imm with values derived
// arithmetically from the word (field = word / 16^k mod 16).
module tb_instr_decoder;
  import fav_pkg::*;

  logic [15:0] instr;
  logic        valid;
  opcode_t     opcode;
  ridx_t       rd, rs1;
  logic [3:0]  src2;
  logic        rd_we, is_imm;
  int checks = 0, failures = 0;

  instr_decoder dut_i (.instr(instr), .instr_valid(valid), .opcode(opcode), .rd(rd),
                       .rs1(rs1), .src2(src2), .rd_we(rd_we), .is_src2_imm(is_imm));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 65536; w++) begin
      instr = 16'(w);
      valid = w[0] ^ w[5];
      #1;
      checks++;
      if (int'(opcode) != (w / 4096) % 16 || int'(rd) != (w / 256) % 16 ||
          int'(rs1) != (w / 16) % 16 || int'(src2) != w % 16 ||
          rd_we != valid || is_imm != ((w / 4096) >= 9)) begin
        failures++;
        if (failures < 10) $display("FAIL instr=%h", instr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
