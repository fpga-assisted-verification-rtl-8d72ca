// tb_dut: the single-cycle processor and its eight faulty variants.
//
// Nine instances (BUG_ID 0..8) receive the same random instruction stream,
// with idle cycles mixed in. Each is compared cycle by cycle with the
// reference model run with the same fault: out_valid must follow
// instr_valid by exactly one cycle, and out_rd / out_value must give the
// destination register and the value it holds afterwards. Then, as a result
// checker would, the test finds for each faulty variant the first
// instruction at which its report differs from the correct processor and
// counts a failure if a fault never shows. RESET_BUG_CYCLES is lowered so
// that fault 5 fires within the run.
module tb_dut;
  import fav_pkg::*;
  import tb_isa_pkg::*;

  localparam int NB = 9;
  localparam int RB = 700;
  localparam int NCYC = 2000;

  logic        clk = 0, rst = 1, valid = 0;
  logic [15:0] instr = '0;
  logic        ov [NB];
  ridx_t       ord [NB];
  word_t       oval [NB];
  int checks = 0, failures = 0;

  for (genvar g = 0; g < NB; g++) begin : g_dut
    dut #(.BUG_ID(g), .RESET_BUG_CYCLES(RB)) u (
      .clk(clk), .rst(rst), .instr(instr), .instr_valid(valid),
      .out_valid(ov[g]), .out_rd(ord[g]), .out_value(oval[g]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  regs_t regs [NB];
  bit    first [NB];
  int    exp_rd [NB];
  w16_t  exp_val [NB];
  int    first_diff [NB];
  int    ninstr = 0;

  // directed opening: exercises sign extension, r0, r8/r9, r10 and SRA early
  w16_t directed [12] = '{16'h9105, 16'h920f, 16'h8210, 16'hf22f, 16'h0810, 16'h9908,
                          16'h0a20, 16'h1012, 16'h9001, 16'h2312, 16'h0910, 16'h9c0c};

  initial begin
    int cyc = 1;  // one edge passes between reset release and the first stimulus
    foreach (regs[b]) begin
      foreach (regs[b][i]) regs[b][i] = '0;
      first[b] = 1'b1;
      first_diff[b] = -1;
    end
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int k = 0; k < NCYC; k++) begin
      @(negedge clk);
      valid = ($urandom % 5) != 0;
      if (k < 2 * 12) begin
        valid = k[0];
        instr = directed[k / 2];
      end else begin
        instr = 16'($urandom);
      end
      @(posedge clk);
      // reference update for this edge
      for (int b = 0; b < NB; b++) begin
        if (valid) begin
          ref_step(regs[b], instr, b, first[b], exp_rd[b]);
          first[b] = 1'b0;
        end
        if (b == 5 && cyc == RB - 1) foreach (regs[b][i]) regs[b][i] = '0;
        exp_val[b] = rd_reg(regs[b], exp_rd[b], b);
      end
      cyc++;
      #1;
      for (int b = 0; b < NB; b++) begin
        checks++;
        if (ov[b] !== valid || (valid && (int'(ord[b]) != exp_rd[b] || oval[b] !== exp_val[b]))) begin
          failures++;
          if (failures < 20)
            $display("FAIL bug=%0d cyc=%0d instr=%h got v=%0b rd=%0d val=%h exp rd=%0d val=%h",
                     b, cyc, instr, ov[b], ord[b], oval[b], exp_rd[b], exp_val[b]);
        end
        if (valid && b > 0 && first_diff[b] < 0 && (ord[b] != ord[0] || oval[b] != oval[0]))
          first_diff[b] = ninstr;
      end
      if (valid) ninstr++;
    end
    for (int b = 1; b < NB; b++) begin
      checks++;
      if (first_diff[b] < 0) begin
        failures++;
        $display("FAIL fault %0d never showed", b);
      end else begin
        $display("fault %0d: first mismatch at instruction #%0d", b, first_diff[b]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
