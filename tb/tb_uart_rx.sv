// tb_uart_rx: UART receiver against a bit-banged serial line.
//
// Sends random bytes as start + 8 data bits (LSB first) + stop, each bit
// CPB clock cycles long, back to back and with random idle gaps. Checks the
// received byte, that data_valid arrives 9.5 bit times after the start edge
// (within the synchroniser's few cycles), that a packet with a low stop bit
// raises frame_error instead of data_valid, and that a short low glitch on
// an idle line produces nothing.
module tb_uart_rx;
  localparam int CPB = 16;

  logic clk = 0, rst = 1, rxd = 1;
  logic [7:0] data;
  logic dv, fe;
  int checks = 0, failures = 0;
  int n_dv = 0, n_fe = 0;
  longint t_start, t_dv;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut_i (.clk(clk), .rst(rst), .rxd(rxd),
                                       .data(data), .data_valid(dv), .frame_error(fe));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dv) begin n_dv++; t_dv = cyc; end
    if (fe) n_fe++;
  end

  task automatic send(logic [7:0] b, logic stop);
    logic [9:0] f = {stop, b, 1'b0};
    t_start = cyc;
    for (int i = 0; i < 10; i++) begin
      rxd = f[i];
      repeat (CPB) @(negedge clk);
    end
    rxd = 1'b1;
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (4) @(negedge clk);
    for (int k = 0; k < 300; k++) begin
      logic [7:0] b;
      logic bad;
      int dv0, fe0;
      b = 8'($urandom);
      bad = (k % 37) == 5;
      dv0 = n_dv;
      fe0 = n_fe;
      send(b, !bad);
      repeat (3) @(negedge clk);   // valid comes mid stop bit, already passed
      checks++;
      if (bad) begin
        if (n_fe != fe0 + 1 || n_dv != dv0) begin failures++; $display("FAIL no frame error k=%0d", k); end
      end else begin
        if (n_dv != dv0 + 1 || data !== b) begin
          failures++; $display("FAIL k=%0d got %h exp %h", k, data, b);
        end
        checks++;
        // latency: 9.5 bit times from the start edge, plus synchroniser
        if (t_dv - t_start < longint'(CPB * 19 / 2) || t_dv - t_start > longint'(CPB * 19 / 2 + 4)) begin
          failures++; $display("FAIL latency %0d", t_dv - t_start);
        end
      end
      // back-to-back: the rest of the stop bit has already elapsed; sometimes idle
      if ($urandom % 3 == 0) repeat ($urandom % (3 * CPB)) @(negedge clk);
      if (k % 50 == 7) begin
        // glitch shorter than half a bit
        int dv1, fe1;
        dv1 = n_dv;
        fe1 = n_fe;
        rxd = 0; repeat (CPB / 4) @(negedge clk); rxd = 1;
        repeat (2 * CPB) @(negedge clk);
        checks++;
        if (n_dv != dv1 || n_fe != fe1) begin failures++; $display("FAIL glitch accepted"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
