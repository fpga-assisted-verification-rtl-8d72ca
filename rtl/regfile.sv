// regfile: 16 x 16-bit register file, asynchronous read, synchronous write.
//
// Two read ports (rs1, rs2) feed the ALU in the same cycle; a third read port
// (dbg) lets the surrounding logic report a register's value after it has
// been written. A write happens on the rising clock edge when we is high.
// Register 0 always reads as zero and writes to it are discarded, unless
// ZERO_R0 is cleared (used only to model a deliberately faulty DUT).
// rst is synchronous and clears every register to zero. The organisation,
// asynchronous read and synchronous write follow the design description; the
// zero reset value and the third read port are this design's choices.
module regfile
  import fav_pkg::*;
#(
  parameter bit ZERO_R0 = 1'b1
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  we,
  input  ridx_t waddr,
  input  word_t wdata,
  input  ridx_t raddr1,
  output word_t rdata1,
  input  ridx_t raddr2,
  output word_t rdata2,
  input  ridx_t raddr_dbg,
  output word_t rdata_dbg
);

  word_t regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= '0;
    end else if (we && (waddr != '0 || !ZERO_R0)) begin
      regs[waddr] <= wdata;
    end
  end

  function automatic word_t rd_port(ridx_t a);
    return (ZERO_R0 && a == '0) ? '0 : regs[a];
  endfunction

  assign rdata1    = rd_port(raddr1);
  assign rdata2    = rd_port(raddr2);
  assign rdata_dbg = rd_port(raddr_dbg);

endmodule
