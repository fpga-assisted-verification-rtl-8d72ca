// dut: single-cycle 16-bit processor, the design under test of the system.
//
// In a cycle where instr_valid is high the instruction is decoded, rs1 and
// rs2 are read asynchronously from the register file, the second ALU operand
// is chosen between the rs2 value and the sign-extended 4-bit immediate
// (is_src2_imm), and the ALU result is written to rd on the closing clock
// edge. One instruction therefore completes per cycle. One cycle later
// out_valid pulses with out_rd = rd and out_value = the value rd now holds
// (read through the register file's third port, so r0 reports zero).
//
// BUG_ID = 0 is the correct processor. BUG_ID = 1..8 build one of the eight
// deliberately faulty variants used to test the result checker:
//   1 immediates are zero-extended instead of sign-extended
//   2 register-immediate instructions execute as their register-register form
//     (src2 taken as a register index; ADDI..SRAI map to ADD..SRA)
//   3 SRA and SRAI shift logically
//   4 the first instruction after reset has no effect
//   5 all registers clear when the cycle counter reaches RESET_BUG_CYCLES
//   6 writes to r0 are not discarded
//   7 writes to r10 have their upper 2 bits stuck at 1
//   8 writes aimed at r8 land in r9 and vice versa
// The datapath follows the published block diagram and the fault list
// follows the published table; how each fault is wired in (e.g. the
// opcode mapping of fault 2, stuck bits forced on write for fault 7) is this
// design's reading of one-line descriptions.
module dut
  import fav_pkg::*;
#(
  parameter int unsigned BUG_ID           = 0,
  parameter int unsigned RESET_BUG_CYCLES = 10000
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [XLEN-1:0] instr,
  input  logic            instr_valid,
  output logic            out_valid,
  output ridx_t           out_rd,
  output word_t           out_value
);

  opcode_t    opcode, alu_op;
  ridx_t      rd, rs1, rd_eff;
  logic [3:0] src2;
  logic       rd_we, is_src2_imm, imm_sel, we_eff;
  word_t      rs1_data, rs2_data, imm_ext, alu_src2, alu_y, wdata;
  logic       rf_rst;

  instr_decoder u_dec (
    .instr       (instr),
    .instr_valid (instr_valid),
    .opcode      (opcode),
    .rd          (rd),
    .rs1         (rs1),
    .src2        (src2),
    .rd_we       (rd_we),
    .is_src2_imm (is_src2_imm)
  );

  // ---- fault 4: the first instruction after reset is dropped -------------
  logic seen_first;
  always_ff @(posedge clk) begin
    if (rst)              seen_first <= 1'b0;
    else if (instr_valid) seen_first <= 1'b1;
  end

  // ---- fault 5: free-running cycle counter clears the registers ----------
  logic [31:0] cycle_cnt;
  logic        bug_clear;
  always_ff @(posedge clk) begin
    if (rst) cycle_cnt <= '0;
    else     cycle_cnt <= cycle_cnt + 32'd1;
  end
  assign bug_clear = (BUG_ID == 5) && (cycle_cnt == RESET_BUG_CYCLES - 1);
  assign rf_rst    = rst | bug_clear;

  always_comb begin
    // second-operand selection (the MUX of the datapath) and immediate extension
    imm_sel  = is_src2_imm && (BUG_ID != 2);
    imm_ext  = (BUG_ID == 1) ? word_t'(src2) : word_t'({{(XLEN-4){src2[3]}}, src2});
    alu_src2 = imm_sel ? imm_ext : rs2_data;

    alu_op = opcode;
    if (BUG_ID == 2 && is_src2_imm) alu_op = opcode_t'(opcode - 4'h8);
    if (BUG_ID == 3 && opcode == OP_SRA)  alu_op = OP_SRL;
    if (BUG_ID == 3 && opcode == OP_SRAI) alu_op = OP_SRLI;

    rd_eff = rd;
    if (BUG_ID == 8 && rd == ridx_t'(8)) rd_eff = ridx_t'(9);
    if (BUG_ID == 8 && rd == ridx_t'(9)) rd_eff = ridx_t'(8);

    wdata = alu_y;
    if (BUG_ID == 7 && rd_eff == ridx_t'(10)) wdata[XLEN-1 -: 2] = 2'b11;

    we_eff = rd_we && !(BUG_ID == 4 && !seen_first);
  end

  regfile #(
    .ZERO_R0 (BUG_ID != 6)
  ) u_rf (
    .clk       (clk),
    .rst       (rf_rst),
    .we        (we_eff),
    .waddr     (rd_eff),
    .wdata     (wdata),
    .raddr1    (rs1),
    .rdata1    (rs1_data),
    .raddr2    (src2),
    .rdata2    (rs2_data),
    .raddr_dbg (out_rd),
    .rdata_dbg (out_value)
  );

  alu u_alu (
    .op (alu_op),
    .a  (rs1_data),
    .b  (alu_src2),
    .y  (alu_y)
  );

  // report which register the instruction targeted, one cycle later
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_rd    <= '0;
    end else begin
      out_valid <= instr_valid;
      if (instr_valid) out_rd <= rd;
    end
  end

endmodule
