// result_framer: turns one DUT result into three UART packets.
//
// A result is the 4-bit destination index and the 16-bit value it holds
// after the instruction, 20 bits, which do not fill whole packets; four
// zero bits of padding make 24 bits, sent as {4'h0, rd}, value[15:8],
// value[7:0]. in_ready is high while no result is being sent; a result
// taken with in_valid && in_ready is handed to the transmitter one packet at
// a time over a valid/ready handshake, and in_ready returns in the cycle
// after the last packet has been accepted by the transmitter. The 20-bit
// content, the 4 padding bits and the three packets follow the design
// description; the byte order and the place of the padding are this
// design's choices.
module result_framer
  import fav_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  result_t   in_result,
  input  logic      in_valid,
  output logic      in_ready,
  output logic [7:0] tx_data,
  output logic      tx_valid,
  input  logic      tx_ready
);

  logic [3*PKT_BITS-1:0] shreg;
  logic [1:0]            left;     // packets still to hand over

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg <= '0;
      left  <= '0;
    end else if (left == 0) begin
      if (in_valid) begin
        shreg <= {4'h0, in_result.rd, in_result.value};
        left  <= 2'(PKTS_PER_XFER);
      end
    end else if (tx_ready) begin
      shreg <= {shreg[2*PKT_BITS-1:0], 8'h00};
      left  <= left - 2'd1;
    end
  end

  assign in_ready = (left == 0);
  assign tx_valid = (left != 0);
  assign tx_data  = shreg[3*PKT_BITS-1 -: PKT_BITS];

  // A result may only be offered while the framer can take it.
  a_no_drop: assert property (@(posedge clk) disable iff (rst) in_valid |-> in_ready)
    else $error("result_framer: result offered while busy");

endmodule
