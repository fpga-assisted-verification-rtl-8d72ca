// tb_uart_tx: UART transmitter checked by an independent line sampler.
//
// Offers random bytes, mostly back to back, sometimes with idle gaps. A
// sampler process waits for each falling edge on the line, samples the
// middle of every bit and checks start = 0, the eight data bits (LSB first)
// and stop = 1. For back-to-back bytes the start edges must be exactly
// 10 * CPB cycles apart, and the line must idle high.
module tb_uart_tx;
  localparam int CPB = 12;
  localparam int N = 300;

  logic clk = 0, rst = 1, valid = 0, ready, txd;
  logic [7:0] data = '0;
  logic [7:0] sent [$];
  int checks = 0, failures = 0, nrecv = 0;
  longint cyc = 0, last_edge = -1;
  bit b2b [$];

  uart_tx #(.CLKS_PER_BIT(CPB)) dut_i (.clk(clk), .rst(rst), .data(data), .valid(valid),
                                       .ready(ready), .txd(txd));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (N * CPB * 20 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // producer
  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    checks++; if (txd !== 1'b1) failures++;
    for (int k = 0; k < N; k++) begin
      bit gap;
      gap = ($urandom % 6) == 0;
      if (gap) repeat (CPB * 12 + $urandom % CPB) @(negedge clk);
      data = 8'($urandom);
      valid = 1;
      @(posedge clk);
      while (!ready) @(posedge clk);
      sent.push_back(data);
      b2b.push_back(!gap && k > 0);
      @(negedge clk);
      valid = 0;
    end
  end

  // line sampler
  initial begin
    logic [7:0] got;
    @(negedge rst);
    while (nrecv < N) begin
      longint e;
      @(negedge txd);
      e = cyc;
      repeat (CPB / 2) @(posedge clk);
      checks++; if (txd !== 1'b0) begin failures++; $display("FAIL start"); end
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        got[i] = txd;
      end
      repeat (CPB) @(posedge clk);
      checks++; if (txd !== 1'b1) begin failures++; $display("FAIL stop"); end
      checks++;
      if (sent.size() == 0 || got !== sent[0]) begin
        failures++; $display("FAIL byte %0d got %h", nrecv, got);
      end
      if (sent.size() != 0) void'(sent.pop_front());
      if (b2b.size() != 0) begin
        if (b2b[0] && last_edge >= 0) begin
          checks++;
          if (e - last_edge != 10 * CPB) begin failures++; $display("FAIL spacing %0d", e - last_edge); end
        end
        void'(b2b.pop_front());
      end
      last_edge = e;
      nrecv++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
