// tb_result_framer: result-to-packet splitting.
//
// Offers random results whenever in_ready is high; a transmitter model
// accepts packets with random delay. Each result must produce exactly three
// packets, {4'h0, rd}, value[15:8], value[7:0], in that order, and in_ready
// must stay low until the third packet has been accepted.
module tb_result_framer;
  import fav_pkg::*;

  logic clk = 0, rst = 1, in_valid = 0, tx_valid, tx_ready = 0;
  result_t in_r = '0;
  logic in_ready;
  logic [7:0] tx_data;
  logic [7:0] exp_q [$];
  int checks = 0, failures = 0, npkts = 0, nres = 0;

  result_framer dut_i (.clk(clk), .rst(rst), .in_result(in_r), .in_valid(in_valid),
                       .in_ready(in_ready), .tx_data(tx_data), .tx_valid(tx_valid),
                       .tx_ready(tx_ready));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // transmitter model
  always @(posedge clk) begin
    if (!rst && tx_valid && tx_ready) begin
      checks++;
      if (exp_q.size() == 0 || tx_data !== exp_q[0]) begin
        failures++; $display("FAIL pkt %0d got %h", npkts, tx_data);
      end
      if (exp_q.size()) void'(exp_q.pop_front());
      npkts++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    while (nres < 500) begin
      @(negedge clk);
      tx_ready = ($urandom % 4) == 0;
      in_valid = 0;
      if (in_ready && ($urandom % 2)) begin
        in_valid = 1;
        in_r.rd = ridx_t'($urandom);
        in_r.value = word_t'($urandom);
        exp_q.push_back({4'h0, in_r.rd});
        exp_q.push_back(in_r.value[15:8]);
        exp_q.push_back(in_r.value[7:0]);
        nres++;
      end
      // in_ready must be low exactly while packets of a taken result are pending
      checks++;
      if (in_ready !== (exp_q.size() == 0 || (in_valid && exp_q.size() == 3))) begin
        failures++; $display("FAIL in_ready=%0b pending=%0d", in_ready, exp_q.size());
      end
    end
    @(negedge clk); in_valid = 0; tx_ready = 1;
    repeat (10) @(negedge clk);
    checks++;
    if (npkts != 3 * 500 || exp_q.size() != 0) begin failures++; $display("FAIL packets %0d", npkts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
