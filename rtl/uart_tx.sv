// uart_tx: UART transmitter for 8-bit packets with one start and one stop bit.
//
// When valid and ready are both high the byte is taken and sent as a low
// start bit, eight data bits least significant first and a high stop bit,
// each CLKS_PER_BIT clock cycles long; the line idles high. ready is high
// while idle and in the last cycle of a stop bit, so back-to-back packets
// leave no idle gap: one packet every 10 * CLKS_PER_BIT cycles. The packet format follows the design
// description; the bit order and the valid/ready handshake are this design's
// choices. The default divider is 50 MHz / 576,000 baud, rounded (87).
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 87
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       txd
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic          active;
  logic [CW-1:0] cnt;
  logic [3:0]    bit_idx;   // 0 = start, 1..8 = data, 9 = stop
  logic [9:0]    frame;

  always_ff @(posedge clk) begin
    if (rst) begin
      active  <= 1'b0;
      cnt     <= '0;
      bit_idx <= '0;
      frame   <= '1;
    end else if (!active) begin
      if (valid) begin
        active  <= 1'b1;
        frame   <= {1'b1, data, 1'b0};
        cnt     <= CW'(CLKS_PER_BIT - 1);
        bit_idx <= '0;
      end
    end else if (cnt != 0) begin
      cnt <= cnt - 1'b1;
    end else if (bit_idx == 4'd9) begin
      // end of the stop bit: chain the next packet or go idle
      if (valid) begin
        frame   <= {1'b1, data, 1'b0};
        cnt     <= CW'(CLKS_PER_BIT - 1);
        bit_idx <= '0;
      end else begin
        active <= 1'b0;
        frame  <= '1;
      end
    end else begin
      frame   <= {1'b1, frame[9:1]};
      bit_idx <= bit_idx + 1'b1;
      cnt     <= CW'(CLKS_PER_BIT - 1);
    end
  end

  assign txd   = frame[0];
  assign ready = !active || (cnt == 0 && bit_idx == 4'd9);

endmodule
