// tb_regfile: random writes and reads against an array model.
//
// Checks that reads are asynchronous (a value written at an edge is visible
// right after it on all three read ports), that r0 reads zero whatever is
// written to it, that a write with we low changes nothing, and that reset
// clears every register. A second instance with ZERO_R0 = 0 must keep
// what is written to r0.
module tb_regfile;
  import fav_pkg::*;

  logic  clk = 0, rst = 1, we = 0;
  ridx_t waddr = '0, ra1 = '0, ra2 = '0, ra3 = '0;
  word_t wdata = '0, rd1, rd2, rd3, rz1, rz2, rz3;
  logic [15:0] model [16];
  logic [15:0] model_z0;
  int checks = 0, failures = 0;

  regfile dut_i (.clk(clk), .rst(rst), .we(we), .waddr(waddr), .wdata(wdata),
                 .raddr1(ra1), .rdata1(rd1), .raddr2(ra2), .rdata2(rd2),
                 .raddr_dbg(ra3), .rdata_dbg(rd3));
  regfile #(.ZERO_R0(1'b0)) dut_z (.clk(clk), .rst(rst), .we(we), .waddr(waddr), .wdata(wdata),
                 .raddr1(ra1), .rdata1(rz1), .raddr2(ra2), .rdata2(rz2),
                 .raddr_dbg(ra3), .rdata_dbg(rz3));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] exp(ridx_t a);
    return (a == 0) ? 16'h0 : model[a];
  endfunction

  task automatic check_reads();
    checks++;
    if (rd1 !== exp(ra1) || rd2 !== exp(ra2) || rd3 !== exp(ra3)) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t ra=%0d/%0d/%0d got %h %h %h", $time, ra1, ra2, ra3, rd1, rd2, rd3);
    end
    if (ra1 == 0) begin
      checks++;
      if (rz1 !== model_z0) failures++;
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    model_z0 = '0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      we = ($urandom % 4) != 0;
      waddr = ridx_t'($urandom);
      wdata = word_t'($urandom);
      if (k == 1500) begin rst = 1; we = 0; end
      else rst = 0;
      @(posedge clk);
      #1;
      if (rst) begin
        foreach (model[i]) model[i] = '0;
        model_z0 = '0;
      end else if (we) begin
        model[waddr] = wdata;
        if (waddr == 0) model_z0 = wdata;
      end
      // same-cycle visibility of the value just written
      ra1 = waddr; ra2 = ridx_t'($urandom); ra3 = ridx_t'($urandom);
      #1 check_reads();
      ra1 = '0; #1 check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
