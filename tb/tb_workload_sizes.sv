// tb_workload_sizes: test programs of 1, 1,000 and 20,000 random
// instructions (the smallest, a middle and the largest supported size),
// each streamed through its own copy of the FPGA side at the default
// 50 MHz clock and 576,000 baud.
//
// Every result is checked against the reference model, and each run's
// length must match TO + COMP + N * BACK within one bit time, with TO and
// BACK 30 bit times each. The equivalent wall-clock time is printed: for
// 20,000 instructions (20,001 * 30 bits) / 576,000 bit/s = 1.04 s.
// A fourth run repeats the 20,000-instruction test with BAUD set to
// 4,000,000, the faster-cable option: the divider becomes 13 cycles per bit
// (3,846,154 baud) and the run about 0.156 s.
module tb_workload_sizes;
  localparam longint CLK_HZ = 50_000_000;
  localparam longint BAUD   = 576_000;
  localparam int     CPB    = int'((CLK_HZ + BAUD / 2) / BAUD);
  localparam int     NS     = 3;
  localparam int     SIZES [NS] = '{1, 1000, 20000};

  logic clk = 0, rst = 1;
  logic rxd [NS], txd [NS];
  int checks = 0, failures = 0;
  longint n_err = 0;

  for (genvar g = 0; g < NS; g++) begin : g_run
    logic fe, ov;
    fpga_verif_top u_top (.clk(clk), .rst(rst), .uart_rxd(rxd[g]), .uart_txd(txd[g]),
                          .rx_frame_error(fe), .instr_overrun(ov));
    host_model #(.CPB(CPB), .N(SIZES[g]), .SEED(32'h0bad_5eed + g)) u_host (
      .clk(clk), .rst(rst), .txd(rxd[g]), .rxd(txd[g]));
    always @(posedge clk) if (!rst && (fe || ov)) n_err++;
  end

  // faster link
  localparam longint BAUD_F = 4_000_000;
  localparam int     CPB_F  = int'((CLK_HZ + BAUD_F / 2) / BAUD_F);
  localparam int     N_F    = 20000;
  logic rxd_f, txd_f, fe_f, ov_f;
  fpga_verif_top #(.BAUD(BAUD_F)) u_top_f (.clk(clk), .rst(rst), .uart_rxd(rxd_f), .uart_txd(txd_f),
                                           .rx_frame_error(fe_f), .instr_overrun(ov_f));
  host_model #(.CPB(CPB_F), .N(N_F), .SEED(32'h0fa5_7000)) u_host_f (
    .clk(clk), .rst(rst), .txd(rxd_f), .rxd(txd_f));
  always @(posedge clk) if (!rst && (fe_f || ov_f)) n_err++;

  always #10 clk = ~clk;

  initial begin
    repeat ((SIZES[NS-1] + 3) * 30 * CPB + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic report(int n, int recv, int mism, longint t0, longint t1, int cpb, longint baud);
    longint total = t1 - t0;
    longint ideal = longint'(n + 1) * 30 * cpb;
    $display("N=%0d: %0d results, %0d mismatches, %0d cycles = %0.4f s at %0d Hz (TO+COMP+N*BACK = %0.4f s)",
             n, recv, mism, total, real'(total) / real'(CLK_HZ), CLK_HZ,
             real'(n + 1) * 30.0 / real'(baud));
    checks++; if (recv != n || mism != 0) begin failures++; $display("FAIL results N=%0d", n); end
    checks++; if (total < ideal - cpb || total > ideal + cpb) begin failures++; $display("FAIL timing N=%0d", n); end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst = 0;
    wait (g_run[0].u_host.done && g_run[1].u_host.done && g_run[2].u_host.done && u_host_f.done);
    report(SIZES[0], g_run[0].u_host.n_recv, g_run[0].u_host.n_mismatch,
           g_run[0].u_host.t_first_start, g_run[0].u_host.t_last_end, CPB, BAUD);
    report(SIZES[1], g_run[1].u_host.n_recv, g_run[1].u_host.n_mismatch,
           g_run[1].u_host.t_first_start, g_run[1].u_host.t_last_end, CPB, BAUD);
    report(SIZES[2], g_run[2].u_host.n_recv, g_run[2].u_host.n_mismatch,
           g_run[2].u_host.t_first_start, g_run[2].u_host.t_last_end, CPB, BAUD);
    report(N_F, u_host_f.n_recv, u_host_f.n_mismatch, u_host_f.t_first_start, u_host_f.t_last_end,
           CPB_F, BAUD_F);
    checks++; if (n_err != 0) begin failures++; $display("FAIL frame error or overrun"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
