// tb_alu: checks every opcode of the ALU against the reference model.
//
// Drives directed corner values (0, 1, 0x7fff, 0x8000, 0xffff and every shift
// amount) and random operands for all sixteen opcodes; the result must
// equal the reference value computed in tb_isa_pkg.
module tb_alu;
  import fav_pkg::*;
  import tb_isa_pkg::*;

  opcode_t op;
  word_t a, b, y;
  int checks = 0, failures = 0;

  alu dut_i (.op(op), .a(a), .b(b), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(int o, w16_t aa, w16_t bb);
    w16_t e;
    op = opcode_t'(o); a = aa; b = bb;
    #1;
    e = alu_ref(o, aa, bb);
    checks++;
    if (y !== e) begin
      failures++;
      if (failures < 10) $display("FAIL op=%0h a=%h b=%h y=%h exp=%h", o, aa, bb, y, e);
    end
  endtask

  initial begin
    static w16_t corner [5] = '{16'h0000, 16'h0001, 16'h7fff, 16'h8000, 16'hffff};
    for (int o = 0; o < 16; o++) begin
      foreach (corner[i]) for (int s = 0; s < 16; s++) try(o, corner[i], w16_t'(s));
      foreach (corner[i]) foreach (corner[j]) try(o, corner[i], corner[j]);
      for (int k = 0; k < 500; k++) try(o, w16_t'($urandom), w16_t'($urandom));
    end
    // spot values worked out by hand
    try(9, 16'h0002, 16'h0005);                         // 9325: r3 = r2 + 5
    op = OP_SRA; a = 16'h8000; b = 16'd15; #1; checks++; if (y !== 16'hffff) failures++;
    op = OP_SUB; a = 16'h0000; b = 16'd1;  #1; checks++; if (y !== 16'hffff) failures++;
    op = OP_SLL; a = 16'h0003; b = 16'd14; #1; checks++; if (y !== 16'hc000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
