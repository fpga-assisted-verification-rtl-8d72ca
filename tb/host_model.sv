// host_model: the host end of the serial link, for the system testbenches.
//
// Sends the program in prog if the testbench fills it before reset is
// released; otherwise generates N instructions from a seeded xorshift generator (the same SEED
// gives the same stream, so several FPGAs can be fed identical tests), the
// first few chosen to write r0, use negative immediates and reach every
// opcode early. Each instruction is sent as three UART packets (high byte,
// low byte, a random padding byte) strictly back to back, CPB cycles per
// bit. An independent receiver samples the return line at mid-bit,
// rebuilds each three-packet result ({pad, rd}, value high, value low) and
// compares it with the reference model, recording the number of mismatches
// and the index of the first one, like the result checker of the flow.
// It also records the cycle of the first start bit sent and the cycle the
// last result's stop bit ends, for throughput checks. done rises when all
// results are in.
module host_model #(
  parameter int          CPB  = 87,
  parameter int          N    = 100,
  parameter int unsigned SEED = 1
) (
  input  logic clk,
  input  logic rst,
  output logic txd,
  input  logic rxd
);
  import tb_isa_pkg::*;

  logic [31:0] rng = SEED;
  function automatic logic [31:0] next_rng();
    rng ^= rng << 13;
    rng ^= rng >> 17;
    rng ^= rng << 5;
    return rng;
  endfunction

  logic [15:0] prog [$];   // optional fixed program
  int          n_send = N;
  logic [19:0] expq [$];
  regs_t       regs;
  bit          done = 0;
  int          n_recv = 0, n_mismatch = 0, first_fail = -1;
  int          n_r0 = 0, n_negimm = 0, n_pad_nonzero = 0, n_bad_pad = 0;
  logic [15:0] op_seen = '0;
  longint      cyc = 0, t_first_start = -1, t_last_end = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // directed opening: all 16 opcodes, r0 destination, negative immediates
  localparam logic [15:0] OPENING [18] = '{
    16'h910f, 16'h920e, 16'h0312, 16'h1412, 16'h2523, 16'h3612, 16'h4712, 16'h5812,
    16'h6971, 16'h7a12, 16'h8b32, 16'h9c1f, 16'hac2c, 16'hbd1d, 16'hce2b, 16'hdf21,
    16'he131, 16'hf2fe};

  task automatic send_byte(logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      txd = f[i];
      repeat (CPB) @(posedge clk);
    end
  endtask

  initial begin
    logic [15:0] ins;
    logic [7:0]  pad;
    int rd;
    txd = 1'b1;
    foreach (regs[i]) regs[i] = '0;
    @(negedge rst);
    if (prog.size() != 0) n_send = prog.size();
    repeat (5) @(posedge clk);
    for (int k = 0; k < n_send; k++) begin
      if (prog.size() != 0) ins = prog[k];
      else ins = (k < 18) ? OPENING[k] : 16'(next_rng());
      pad = 8'(next_rng());
      op_seen[ins[15:12]] = 1'b1;
      if (ins[11:8] == 4'h0) n_r0++;
      if (ins[15:12] >= 4'h9 && ins[3]) n_negimm++;
      if (pad != 0) n_pad_nonzero++;
      ref_step(regs, ins, 0, k == 0, rd);
      expq.push_back({4'(rd), rd_reg(regs, rd, 0)});
      if (k == 0) t_first_start = cyc;
      send_byte(ins[15:8]);
      send_byte(ins[7:0]);
      send_byte(pad);
    end
  end

  // receiver
  initial begin
    logic [7:0]  b [3];
    logic [19:0] got;
    @(negedge rst);
    #1;
    while (n_recv < n_send) begin
      for (int p = 0; p < 3; p++) begin
        @(negedge rxd);
        repeat (CPB / 2) @(posedge clk);
        for (int i = 0; i < 8; i++) begin
          repeat (CPB) @(posedge clk);
          b[p][i] = rxd;
        end
        repeat (CPB) @(posedge clk);   // middle of the stop bit
        if (p == 2) t_last_end = cyc + longint'(CPB - CPB / 2);
      end
      got = {b[0][3:0], b[1], b[2]};
      if (b[0][7:4] != 4'h0) n_bad_pad++;
      if (expq.size() == 0 || got !== expq[0]) begin
        n_mismatch++;
        if (first_fail < 0) first_fail = n_recv;
      end
      if (expq.size()) void'(expq.pop_front());
      n_recv++;
    end
    done = 1;
  end
endmodule
