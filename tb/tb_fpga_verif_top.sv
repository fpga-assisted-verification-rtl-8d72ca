// tb_fpga_verif_top: end-to-end run of the FPGA side at its default
// parameters (50 MHz clock, 576,000 baud).
//
// A host model streams N instructions over the serial line and checks every
// returned result against the reference model. Also checked: the run takes TO + COMP + N * BACK
// (each transfer 30 bit times) within one bit time, and these mechanisms
// are each seen at least once: receive and transmit overlapping (the
// pipeline), padding bytes with nonzero content being ignored, writes to r0,
// negative immediates and all sixteen opcodes. No frame error or overrun
// may occur.
module tb_fpga_verif_top;
  localparam longint CLK_HZ = 50_000_000;
  localparam longint BAUD   = 576_000;
  localparam int     CPB    = int'((CLK_HZ + BAUD / 2) / BAUD);
  localparam int     N      = 200;

  logic clk = 0, rst = 1;
  logic rxd_a, txd_a, fe_a, ov_a;
  int checks = 0, failures = 0;
  longint n_overlap = 0, n_err = 0;

  fpga_verif_top u_top (.clk(clk), .rst(rst), .uart_rxd(rxd_a), .uart_txd(txd_a),
                        .rx_frame_error(fe_a), .instr_overrun(ov_a));
  host_model #(.CPB(CPB), .N(N), .SEED(32'h1234_5678)) u_host (
    .clk(clk), .rst(rst), .txd(rxd_a), .rxd(txd_a));

  always #10 clk = ~clk;   // 50 MHz

  always @(posedge clk) begin
    if (!rst && u_top.u_rx.state != u_top.u_rx.S_IDLE && u_top.u_tx.active) n_overlap++;
    if (!rst && (fe_a || ov_a)) n_err++;
  end

  initial begin
    repeat ((N + 3) * 30 * CPB + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    longint total, ideal;
    repeat (4) @(posedge clk);
    rst = 0;
    wait (u_host.done);
    repeat (10) @(posedge clk);
    total = u_host.t_last_end - u_host.t_first_start;
    ideal = longint'(N + 1) * 30 * CPB;
    $display("results %0d, mismatches %0d, run %0d cycles, TO+COMP+N*BACK = %0d cycles",
             u_host.n_recv, u_host.n_mismatch, total, ideal);
    expect_true(u_host.n_recv == N, "result count");
    expect_true(u_host.n_mismatch == 0, $sformatf("correct DUT mismatched %0d times, first at #%0d",
                                                  u_host.n_mismatch, u_host.first_fail));
    expect_true(u_host.n_bad_pad == 0, "result padding bits not zero");
    expect_true(total >= ideal - CPB && total <= ideal + CPB, "run time is not TO + COMP + N*BACK");
    expect_true(n_err == 0, "frame error or overrun");
    // mechanisms
    $display("overlap cycles %0d, r0 writes %0d, negative immediates %0d, nonzero pads %0d, opcodes %b",
             n_overlap, u_host.n_r0, u_host.n_negimm, u_host.n_pad_nonzero, u_host.op_seen);
    expect_true(n_overlap > 0, "receive and transmit never overlapped");
    expect_true(u_host.n_r0 > 0, "no write to r0");
    expect_true(u_host.n_negimm > 0, "no negative immediate");
    expect_true(u_host.n_pad_nonzero > 0, "no nonzero padding");
    expect_true(u_host.op_seen == 16'hffff, "not all opcodes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
