// tb_instr_deframer: packet-to-instruction assembly.
//
// Feeds random instructions as three packets (high byte, low byte, random
// padding) with random spacing, and a consumer that takes them with random
// delay. Every instruction must appear once, in order, as {high, low}, with
// instr_valid held until taken. A final phase leaves one instruction
// untaken while the next arrives: overrun must pulse once and the newer
// instruction must win.
module tb_instr_deframer;
  logic clk = 0, rst = 1, pv = 0, ready = 0;
  logic [7:0] pd = '0;
  logic [15:0] instr;
  logic iv, ovr;
  logic [15:0] q [$];
  int checks = 0, failures = 0, n_ovr = 0, ntaken = 0;
  bit hold = 0;

  instr_deframer dut_i (.clk(clk), .rst(rst), .pkt_data(pd), .pkt_valid(pv),
                        .instr(instr), .instr_valid(iv), .instr_ready(ready), .overrun(ovr));

  always #5 clk = ~clk;
  always @(posedge clk) if (ovr) n_ovr++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(logic [7:0] b);
    @(negedge clk);
    pd = b; pv = 1;
    @(negedge clk);
    pv = 0;
    repeat (4 + $urandom % 6) @(negedge clk);
  endtask

  // consumer: random ready, checks order
  initial begin
    @(negedge rst);
    forever begin
      @(negedge clk);
      ready = !hold && ($urandom % 3) == 0;
      if (ready && iv) begin
        checks++;
        if (q.size() == 0 || instr !== q[0]) begin
          failures++; $display("FAIL got %h exp %h", instr, q.size() ? q[0] : 16'h0);
        end
        if (q.size()) void'(q.pop_front());
        ntaken++;
      end
    end
  end

  initial begin
    logic [15:0] w;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 400; k++) begin
      w = 16'($urandom);
      q.push_back(w);
      put(w[15:8]); put(w[7:0]); put(8'($urandom));
      repeat (20) @(negedge clk);  // room for the consumer
    end
    repeat (50) @(negedge clk);
    checks++;
    if (ntaken != 400 || n_ovr != 0) begin failures++; $display("FAIL taken %0d overruns %0d", ntaken, n_ovr); end
    // overrun: two instructions arrive while the consumer takes nothing
    hold = 1;
    put(8'h12); put(8'h34); put(8'h00);
    put(8'hab); put(8'hcd); put(8'hff);
    repeat (3) @(negedge clk);
    checks++;
    if (n_ovr != 1 || !iv || instr !== 16'habcd) begin
      failures++; $display("FAIL overrun=%0d valid=%0b instr=%h", n_ovr, iv, instr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
