// tb_bug_detection: the fault-injection experiment, run through the whole
// FPGA side at its default clock and baud rate.
//
// For each of the eight deliberately faulty DUT variants (BUG_ID 1..8) two
// short crafted programs are streamed over the serial link: one that
// exposes the fault and one that does not. The host-side checker must
// report, for the exposing program, a first mismatch at exactly the
// instruction where the reference model run with the same fault first
// differs from the correct reference model, and for the other program no
// mismatch at all. Fault 5 (registers cleared when the DUT's cycle counter
// reaches 10,000) depends on time: its expected instruction is the first
// one the DUT executes after cycle 10,000, worked out from the link timing
// (instruction k executes about (30 k + 29.5) bit times after the first
// start bit).
module tb_bug_detection;
  import tb_isa_pkg::*;

  localparam longint CLK_HZ = 50_000_000;
  localparam longint BAUD   = 576_000;
  localparam int     CPB    = int'((CLK_HZ + BAUD / 2) / BAUD);
  localparam int     NB     = 8;

  logic clk = 0, rst = 1;
  logic rxd_e [NB], txd_e [NB], rxd_n [NB], txd_n [NB];
  int checks = 0, failures = 0;

  for (genvar g = 0; g < NB; g++) begin : g_bug
    logic fe_e, ov_e, fe_n, ov_n;
    fpga_verif_top #(.BUG_ID(g + 1)) u_top_e (.clk(clk), .rst(rst), .uart_rxd(rxd_e[g]),
        .uart_txd(txd_e[g]), .rx_frame_error(fe_e), .instr_overrun(ov_e));
    host_model #(.CPB(CPB), .N(1)) u_host_e (.clk(clk), .rst(rst), .txd(rxd_e[g]), .rxd(txd_e[g]));
    fpga_verif_top #(.BUG_ID(g + 1)) u_top_n (.clk(clk), .rst(rst), .uart_rxd(rxd_n[g]),
        .uart_txd(txd_n[g]), .rx_frame_error(fe_n), .instr_overrun(ov_n));
    host_model #(.CPB(CPB), .N(1)) u_host_n (.clk(clk), .rst(rst), .txd(rxd_n[g]), .rxd(txd_n[g]));
  end

  always #10 clk = ~clk;

  initial begin
    repeat (40 * 30 * CPB) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // exposing (E) and non-exposing (N) programs per fault, as hex instruction words
  typedef logic [15:0] prog_t [$];
  function automatic prog_t prog_e(int b);
    case (b)
      1: return '{16'h3300, 16'h9103, 16'h920f, 16'h1312};          // negative immediate
      2: return '{16'h3300, 16'h1300, 16'h9105, 16'h0410};          // ADDI r1,r0,5
      3: return '{16'h9107, 16'h920f, 16'hf321, 16'h8412};          // SRAI of a negative value
      4: return '{16'h9105, 16'h3300, 16'h0210};                    // first instruction dropped
      5: return '{16'h9111, 16'h9111, 16'h9111, 16'h9111, 16'h9111, 16'h9111}; // r1 counts up
      6: return '{16'h9103, 16'h3300, 16'h9005, 16'h1201};          // write to r0
      7: return '{16'h9103, 16'h9a01, 16'h1ba1};                    // write to r10
      8: return '{16'h9103, 16'h9205, 16'h9807, 16'h1981};          // write to r8
      default: return '{16'h0000};
    endcase
  endfunction
  function automatic prog_t prog_n(int b);
    case (b)
      1: return '{16'h9103, 16'h9207, 16'h1312, 16'hb435};          // non-negative immediates
      2: return '{16'h9100, 16'h1211, 16'h5312, 16'h6412};          // ADDI r1,r0,0 matches ADD r1,r0,r0
      3: return '{16'h9107, 16'h8212, 16'hf321, 16'h7411};          // arithmetic shifts of positives
      4: return '{16'h9100, 16'h9105, 16'h0210};                    // first instruction writes 0 anyway
      5: return '{16'h9105, 16'h9105, 16'h9105, 16'h9105, 16'h9105, 16'h9105}; // constants only
      6: return '{16'h9103, 16'h1211, 16'h0310};                    // r0 never written
      7: return '{16'h9a0f, 16'h9103, 16'h1ba1};                    // r10 = 0xffff, bits stuck at 1 match
      8: return '{16'h9103, 16'h9205, 16'h1312};                    // r8, r9 untouched
      default: return '{16'h0000};
    endcase
  endfunction

  // first instruction index whose reported (rd, value) differs between the
  // faulty and the correct reference; clear_at = instruction before which
  // fault 5 clears the registers (-1 = never)
  function automatic int expected_first(prog_t p, int b, int clear_at);
    regs_t rg, rb;
    int rd0, rd1;
    foreach (rg[i]) begin rg[i] = '0; rb[i] = '0; end
    foreach (p[k]) begin
      if (k == clear_at) foreach (rb[i]) rb[i] = '0;
      ref_step(rg, p[k], 0, k == 0, rd0);
      ref_step(rb, p[k], b, k == 0, rd1);
      if (rd0 != rd1 || rd_reg(rg, rd0, 0) != rd_reg(rb, rd1, b)) return k;
    end
    return -1;
  endfunction

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  int clear_at;
  initial begin
    // program the host models before reset is released
    g_bug[0].u_host_e.prog = prog_e(1); g_bug[0].u_host_n.prog = prog_n(1);
    g_bug[1].u_host_e.prog = prog_e(2); g_bug[1].u_host_n.prog = prog_n(2);
    g_bug[2].u_host_e.prog = prog_e(3); g_bug[2].u_host_n.prog = prog_n(3);
    g_bug[3].u_host_e.prog = prog_e(4); g_bug[3].u_host_n.prog = prog_n(4);
    g_bug[4].u_host_e.prog = prog_e(5); g_bug[4].u_host_n.prog = prog_n(5);
    g_bug[5].u_host_e.prog = prog_e(6); g_bug[5].u_host_n.prog = prog_n(6);
    g_bug[6].u_host_e.prog = prog_e(7); g_bug[6].u_host_n.prog = prog_n(7);
    g_bug[7].u_host_e.prog = prog_e(8); g_bug[7].u_host_n.prog = prog_n(8);
    // fault 5: the counter starts at reset release; the host starts sending
    // 5 cycles later; instruction k executes ~ (30k + 29.5) * CPB + a few cycles after that
    clear_at = 0;
    while (5 + (30 * clear_at + 29) * CPB + CPB / 2 < 10000) clear_at++;
    repeat (4) @(posedge clk);
    rst = 0;
    wait (g_bug[0].u_host_e.done && g_bug[0].u_host_n.done && g_bug[1].u_host_e.done &&
          g_bug[1].u_host_n.done && g_bug[2].u_host_e.done && g_bug[2].u_host_n.done &&
          g_bug[3].u_host_e.done && g_bug[3].u_host_n.done && g_bug[4].u_host_e.done &&
          g_bug[4].u_host_n.done && g_bug[5].u_host_e.done && g_bug[5].u_host_n.done &&
          g_bug[6].u_host_e.done && g_bug[6].u_host_n.done && g_bug[7].u_host_e.done &&
          g_bug[7].u_host_n.done);
    begin
      int fe [NB], fn [NB], ne [NB];
      fe[0] = g_bug[0].u_host_e.first_fail; fn[0] = g_bug[0].u_host_n.n_mismatch;
      fe[1] = g_bug[1].u_host_e.first_fail; fn[1] = g_bug[1].u_host_n.n_mismatch;
      fe[2] = g_bug[2].u_host_e.first_fail; fn[2] = g_bug[2].u_host_n.n_mismatch;
      fe[3] = g_bug[3].u_host_e.first_fail; fn[3] = g_bug[3].u_host_n.n_mismatch;
      fe[4] = g_bug[4].u_host_e.first_fail; fn[4] = g_bug[4].u_host_n.n_mismatch;
      fe[5] = g_bug[5].u_host_e.first_fail; fn[5] = g_bug[5].u_host_n.n_mismatch;
      fe[6] = g_bug[6].u_host_e.first_fail; fn[6] = g_bug[6].u_host_n.n_mismatch;
      fe[7] = g_bug[7].u_host_e.first_fail; fn[7] = g_bug[7].u_host_n.n_mismatch;
      for (int b = 1; b <= NB; b++) begin
        ne[b-1] = expected_first(prog_e(b), b, (b == 5) ? clear_at : -1);
        $display("fault %0d: exposing test fails at #%0d (expected #%0d); other test %0d mismatches",
                 b, fe[b-1], ne[b-1], fn[b-1]);
        expect_true(ne[b-1] >= 0, $sformatf("fault %0d: crafted test does not expose it", b));
        expect_true(fe[b-1] == ne[b-1], $sformatf("fault %0d: wrong failure location", b));
        expect_true(fn[b-1] == 0, $sformatf("fault %0d: non-exposing test reported a failure", b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
