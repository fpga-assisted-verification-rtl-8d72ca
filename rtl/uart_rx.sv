// uart_rx: UART receiver for 8-bit packets with one start and one stop bit.
//
// A packet is a low start bit, eight data bits sent least significant first,
// and a high stop bit, ten bit times in all; packets may start at any time.
// The serial input passes a two-flop synchroniser. A falling edge starts a
// packet; the line is sampled in the middle of each bit, CLKS_PER_BIT clock
// cycles apart. A start bit that is high again at mid-bit is treated as a
// glitch. In the middle of the stop bit data_valid pulses for one cycle with
// the byte; frame_error pulses instead if the stop bit reads low.
// Latency: the byte is ready 9.5 bit times after the start edge (plus the
// two synchroniser cycles). The packet format follows the design description;
// the bit order, mid-bit sampling and the synchroniser are this design's
// choices. The default divider is 50 MHz / 576,000 baud, rounded (87).
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 87
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       data_valid,
  output logic       frame_error
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_t;

  state_t        state;
  logic [CW-1:0] cnt;
  logic [2:0]    bit_idx;
  logic [7:0]    shreg;
  logic          rxd_m, rxd_s;

  always_ff @(posedge clk) begin
    if (rst) begin
      rxd_m <= 1'b1;
      rxd_s <= 1'b1;
    end else begin
      rxd_m <= rxd;
      rxd_s <= rxd_m;
    end
  end

  always_ff @(posedge clk) begin
    data_valid  <= 1'b0;
    frame_error <= 1'b0;
    if (rst) begin
      state   <= S_IDLE;
      cnt     <= '0;
      bit_idx <= '0;
      shreg   <= '0;
      data    <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (!rxd_s) begin
          state <= S_START;
          cnt   <= CW'(CLKS_PER_BIT / 2 - 1);
        end
        S_START: if (cnt != 0) cnt <= cnt - 1'b1;
        else if (!rxd_s) begin
          state   <= S_DATA;
          cnt     <= CW'(CLKS_PER_BIT - 1);
          bit_idx <= '0;
        end else begin
          state <= S_IDLE;
        end
        S_DATA: if (cnt != 0) cnt <= cnt - 1'b1;
        else begin
          shreg   <= {rxd_s, shreg[7:1]};
          cnt     <= CW'(CLKS_PER_BIT - 1);
          if (bit_idx == 3'd7) state <= S_STOP;
          bit_idx <= bit_idx + 1'b1;
        end
        S_STOP: if (cnt != 0) cnt <= cnt - 1'b1;
        else begin
          state <= S_IDLE;
          if (rxd_s) begin
            data       <= shreg;
            data_valid <= 1'b1;
          end else begin
            frame_error <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
