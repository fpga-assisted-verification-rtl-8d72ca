// instr_deframer: rebuilds 16-bit instructions from received UART packets.
//
// Every instruction arrives as three packets: the high byte, the low byte
// and one padding byte whose value is ignored. The padding makes the
// inbound transfer as long as the three-packet result going the other way,
// so both directions of the link advance in step. After the third packet
// the instruction is placed in a one-entry holding register and instr_valid
// is raised until the consumer takes it (instr_valid && instr_ready). The
// next instruction's packets keep arriving meanwhile; if one completes
// while the holding register is still full, overrun pulses and the new
// instruction replaces the old. Packet count, padding and the overlap of the
// two directions follow the design description; the byte order, the
// trailing position of the padding and the holding register are this
// design's choices. Packet alignment is set by reset only.
module instr_deframer
  import fav_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic [7:0]      pkt_data,
  input  logic            pkt_valid,
  output logic [XLEN-1:0] instr,
  output logic            instr_valid,
  input  logic            instr_ready,
  output logic            overrun
);

  logic [1:0] pkt_idx;     // which packet of the transfer comes next
  logic [7:0] hi_byte, lo_byte;
  logic       done;

  assign done = pkt_valid && (pkt_idx == 2'(PKTS_PER_XFER - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      pkt_idx <= '0;
      hi_byte <= '0;
      lo_byte <= '0;
    end else if (pkt_valid) begin
      unique case (pkt_idx)
        2'd0:    hi_byte <= pkt_data;
        2'd1:    lo_byte <= pkt_data;
        default: ;  // padding packet
      endcase
      pkt_idx <= done ? 2'd0 : pkt_idx + 2'd1;
    end
  end

  always_ff @(posedge clk) begin
    overrun <= 1'b0;
    if (rst) begin
      instr       <= '0;
      instr_valid <= 1'b0;
    end else begin
      if (instr_valid && instr_ready) instr_valid <= 1'b0;
      if (done) begin
        instr       <= {hi_byte, lo_byte};
        instr_valid <= 1'b1;
        overrun     <= instr_valid && !instr_ready;
      end
    end
  end

endmodule
