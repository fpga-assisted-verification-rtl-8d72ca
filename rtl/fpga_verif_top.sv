// fpga_verif_top: FPGA side of the hardware-assisted verification system.
//
// A host streams test instructions over a UART link; the FPGA executes each
// one on the design under test (a single-cycle 16-bit processor) and streams
// back which register it wrote and that register's new value, so the host can
// compare every instruction against a reference model and pinpoint the first
// divergence. Chain:
//   uart_rxd -> uart_rx -> instr_deframer -> dut -> result_framer -> uart_tx -> uart_txd
// Inbound and outbound transfers are both three 10-bit packets (30 bit
// times), and they overlap: while the result of instruction n is being sent,
// instruction n+1 is being received. An instruction is issued to the DUT only
// when the framer is free, so a result is never lost; if the previous result
// is still being sent the instruction waits in the deframer (a stall of a few
// cycles in steady state). With the host sending back to back, throughput is
// one instruction per 30 bit times and the first result starts about one
// cycle after the DUT executes, i.e. a run of N instructions takes about
// TO + COMP + N * BACK. CLK_HZ and BAUD give the UART divider; their defaults
// (50 MHz, 576,000 baud) and the pipelined three-packet protocol follow the
// design description, the issue rule and the status outputs are this
// design's own. BUG_ID selects one of the DUT's deliberately faulty variants
// (0 = correct).
module fpga_verif_top
  import fav_pkg::*;
#(
  parameter longint unsigned CLK_HZ = 50_000_000,
  parameter longint unsigned BAUD   = 576_000,
  parameter int unsigned     BUG_ID = 0
) (
  input  logic clk,
  input  logic rst,
  input  logic uart_rxd,
  output logic uart_txd,
  output logic rx_frame_error,
  output logic instr_overrun
);

  localparam int unsigned CPB = clks_per_bit(CLK_HZ, BAUD);

  logic [7:0]      rx_byte, tx_byte;
  logic            rx_byte_valid;
  logic [XLEN-1:0] instr;
  logic            instr_valid, issue;
  logic            res_valid, fr_ready, tx_valid, tx_ready;
  ridx_t           res_rd;
  word_t           res_value;

  uart_rx #(.CLKS_PER_BIT(CPB)) u_rx (
    .clk         (clk),
    .rst         (rst),
    .rxd         (uart_rxd),
    .data        (rx_byte),
    .data_valid  (rx_byte_valid),
    .frame_error (rx_frame_error)
  );

  instr_deframer u_deframe (
    .clk         (clk),
    .rst         (rst),
    .pkt_data    (rx_byte),
    .pkt_valid   (rx_byte_valid),
    .instr       (instr),
    .instr_valid (instr_valid),
    .instr_ready (issue),
    .overrun     (instr_overrun)
  );

  // Issue only when the framer can take the result the DUT produces next cycle.
  assign issue = instr_valid && fr_ready && !res_valid;

  dut #(.BUG_ID(BUG_ID)) u_dut (
    .clk         (clk),
    .rst         (rst),
    .instr       (instr),
    .instr_valid (issue),
    .out_valid   (res_valid),
    .out_rd      (res_rd),
    .out_value   (res_value)
  );

  result_framer u_frame (
    .clk       (clk),
    .rst       (rst),
    .in_result ('{rd: res_rd, value: res_value}),
    .in_valid  (res_valid),
    .in_ready  (fr_ready),
    .tx_data   (tx_byte),
    .tx_valid  (tx_valid),
    .tx_ready  (tx_ready)
  );

  uart_tx #(.CLKS_PER_BIT(CPB)) u_tx (
    .clk   (clk),
    .rst   (rst),
    .data  (tx_byte),
    .valid (tx_valid),
    .ready (tx_ready),
    .txd   (uart_txd)
  );

endmodule
