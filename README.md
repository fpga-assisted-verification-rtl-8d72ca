# FPGA-side RTL for hardware-assisted processor verification

Simulating a processor in software is slow. This design runs the processor
under test on an FPGA instead. A host computer streams test instructions to
the FPGA over a plain UART link. The FPGA executes each instruction in one
clock cycle. After every instruction it sends back which register was written
and that register's new value. The host compares every result with a
reference model, so a test pinpoints the first instruction at which the
hardware goes wrong. It does not just report a final mismatch.

The interesting part is the serial link, not the processor. The processor
needs one 20 ns cycle per instruction, but moving an instruction and its
result over the wire takes about 104 µs at 576,000 baud. The link protocol
therefore sets the speed, and most of this document is about it.

This repository holds the synthesizable FPGA side and self-checking
testbenches. The host software is not part of it: the test generator, the
reference model, the result viewer and the serial driver. The testbenches
model the host themselves.

## Block diagram

```
 uart_rxd ─► uart_rx ─► instr_deframer ─► dut ─► result_framer ─► uart_tx ─► uart_txd
             (8N1)      3 packets → 16b   (single-   20b + 4b pad   (8N1)
                                           cycle)    → 3 packets
```

`fpga_verif_top` wires the chain. Everything runs on one clock, 50 MHz by
default. The UART divider comes from `CLK_HZ` and `BAUD`:
`round(CLK_HZ / BAUD)`, which is 87 cycles per bit at the defaults.

## The processor under test (`dut`)

The processor is a 16-bit, register-only machine with sixteen 16-bit
registers. r0 always reads as zero, and writes to it are discarded. There are
no loads, stores or branches.

An instruction is four nibbles, most significant first:

| bits 15:12 | 11:8 | 7:4 | 3:0 |
|---|---|---|---|
| opcode | rd | rs1 | src2 |

`src2` is either a register index or a 4-bit immediate. The immediate is
sign-extended to 16 bits.

| opcode | op | operation |
|---|---|---|
| 0 | MOV | rd = rs1 |
| 1–8 | ADD SUB AND OR XOR SLL SRL SRA | rd = rs1 op r[src2] |
| 9–f | ADDI ANDI ORI XORI SLLI SRLI SRAI | rd = rs1 op sext(src2) |

For example, `9325` is `r3 = r2 + 5`, and `920f` is `r2 = r0 - 1 = 0xffff`.
Shifts use the low four bits of the second operand.

Datapath (`dut.sv`):

- `instr_decoder` splits the word into its fields. It raises `rd_we` with
  `instr_valid` and raises `is_src2_imm` for opcodes 9–f.
- `regfile` has asynchronous reads and a synchronous write. Both operands are
  therefore ready in the same cycle.
- A multiplexer picks `rs2_data` or the sign-extended immediate.
- `alu` computes the result. The write to `rd` happens on the clock edge that
  ends the cycle in which `instr_valid` is high.

One cycle later `out_valid` pulses, with `out_rd` set to `rd` and `out_value`
set to what `rd` now holds. `out_value` is read through a third read port of
the register file, so a write to r0 reports 0.

### Fault variants

The checking flow is shown to work by running deliberately broken
processors. `BUG_ID` (default 0, the correct processor) builds one of eight
faulty variants. The fault logic is all constant-folded away when
`BUG_ID = 0`.

| BUG_ID | fault |
|---|---|
| 1 | immediates zero-extended |
| 2 | register-immediate instructions run as their register-register form; src2 is used as a register index, so ADDI becomes ADD and so on |
| 3 | SRA/SRAI shift logically |
| 4 | the first instruction after reset has no effect |
| 5 | all registers clear when the cycle counter reaches `RESET_BUG_CYCLES` (10,000) |
| 6 | writes to r0 are kept |
| 7 | writes to r10 get bits 15:14 forced to 1 |
| 8 | writes to r8 and r9 swapped |

The fault list itself comes from the design's test plan. How faults 2 and 7
are wired in is this design's own reading of their one-line descriptions.

## The link protocol — where the time goes

**Packets.** Each packet is the standard UART 8N1 format: a low start bit,
8 data bits sent LSB first, and a high stop bit. That makes 10 bits per
packet. Packets may start at any time. The receiver (`uart_rx`) works like
this:

- It synchronises the line through two flip-flops.
- It checks the start bit at mid-bit, so a short glitch is ignored.
- It samples every data bit at mid-bit.
- It delivers the byte in the middle of the stop bit, 9.5 bit times after the
  start edge. A low stop bit gives `frame_error` instead.

The transmitter (`uart_tx`) takes bytes on a valid/ready handshake. It chains
packets with no idle gap.

**Transfers.** A result is 4 bits of `rd` plus 16 bits of value, 20 bits in
all. That does not fill whole bytes. Four zero bits pad it to three packets:

```
result:      {4'h0, rd}   value[15:8]   value[7:0]
instruction: instr[15:8]  instr[7:0]    padding (ignored)
```

An instruction needs only two packets. It gets a third, padding packet so
that both directions take the same 30 bit times. With equal lengths the two
directions can run in lock-step as a pipeline.

**Pipelining.** The receive and transmit paths run independently.
`instr_deframer` collects the packets of instruction *n+1* while
`result_framer` and `uart_tx` send the result of instruction *n*:

```
instr 1:  TO   COMP BACK
instr 2:       TO   COMP BACK
instr 3:            TO   COMP BACK
```

COMP is one clock cycle. TO and BACK are 30 bit times each. A run of N
instructions therefore takes

    TO + COMP + N·BACK ≈ (N + 1) · 30 / BAUD seconds

At 576,000 baud that is 1.04 s for 20,000 instructions. The testbenches
check this within one bit time.

**Flow control.** An instruction is issued to the DUT only when the result
framer is free (`issue = instr_valid && fr_ready && !res_valid`). A result is
never dropped. In steady state the framer frees up about ten bit times before
the next instruction arrives, so this never costs throughput.

The deframer holds one finished instruction. If another one completes before
the first is taken, `instr_overrun` pulses and the newer instruction wins.
With a host that keeps to the baud rate this cannot happen.

Packet alignment is set by reset only: there is no resynchronisation. After a
lost byte, reset the FPGA side.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `fpga_verif_top` | `CLK_HZ` | 50,000,000 | clock frequency |
| | `BAUD` | 576,000 | line rate; limited by the serial cable in the original setup |
| | `BUG_ID` | 0 | fault variant of the DUT |
| `dut` | `BUG_ID`, `RESET_BUG_CYCLES` | 0, 10,000 | see above |
| `uart_rx`, `uart_tx` | `CLKS_PER_BIT` | 87 | divider |
| `regfile` | `ZERO_R0` | 1 | r0 hard-wired to zero |

The integer divider makes the line 0.2 % slow at the defaults (86.8 would be
exact). That is well inside UART tolerance. At much higher baud rates,
choose `CLK_HZ / BAUD` close to an integer. For example, 4,000,000 baud
from 50 MHz rounds to 13 cycles per bit, which is 3.85 Mbaud and 4 % off.
The design runs correctly there against a host with the same divider. It has
not been simulated against a host at exactly 4,000,000 baud.

Shared types live in `fav_pkg`: the opcode enum, the instruction and result
structs, and the divider function.

## Departures and choices not fixed by the original design

The following are this design's own choices:

- the byte order of both transfers
- the position of the padding
- LSB-first bit order
- mid-bit sampling and the two-flop synchroniser
- synchronous active-high reset, with registers cleared to zero
- the issue rule
- the one-entry instruction buffer
- the `instr_overrun` and `rx_frame_error` outputs
- the third register-file read port

A host that frames packets differently must be changed to match.

Not implemented: packing the results of several instructions into shared
packets to save the padding bits. This optimisation would shorten each
transfer a little, at the cost of merging and splitting logic on both ends.

The datapath sketch this design follows labels the operand buses as 4 bits
wide. They are 16 bits here, because the registers and the sign-extended
immediate are 16 bits.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
The `tb/` directory holds:

| testbench | what it shows |
|---|---|
| `tb_alu` | all opcodes on corner and random operands against an independent model (`tb_isa_pkg`) |
| `tb_instr_decoder` | all 65,536 words |
| `tb_regfile` | asynchronous read after write, r0, reset, `ZERO_R0 = 0` |
| `tb_dut` | nine instances (`BUG_ID` 0–8) checked cycle by cycle against the reference model run with the same fault; each fault must show |
| `tb_uart_rx` | random bytes, latency 9.5 bit times, frame error, glitch rejection |
| `tb_uart_tx` | independent line sampler; back-to-back packets exactly 10 bit times apart |
| `tb_instr_deframer`, `tb_result_framer` | packing, handshakes, overrun |
| `tb_fpga_verif_top` | end to end at the default parameters, 200 instructions |
| `tb_bug_detection` | 8 faults × an exposing and a harmless program, at the defaults |
| `tb_workload_sizes` | 1, 1,000 and 20,000 instructions at the defaults, plus 20,000 at `BAUD` = 4,000,000 |

`tb_fpga_verif_top` runs 200 instructions, with every result checked. It also
checks the run time, and that each of these happens at least once:

- overlapping receive and transmit
- nonzero padding bytes
- writes to r0
- negative immediates
- all 16 opcodes

In `tb_bug_detection`, the host model must report the first failure at
exactly the instruction the reference model predicts, and no failure for the
harmless program.

`tb_workload_sizes` takes about 45 s of simulation.

`host_model` is the host used by the system-level testbenches. It sends
instructions, receives results and keeps the reference register state.

Running one test with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
          rtl/fav_pkg.sv tb/tb_isa_pkg.sv tb/tb_fpga_verif_top.sv --top-module tb_fpga_verif_top
./obj_dir/Vtb_fpga_verif_top
```

Replace the last source file and the top name to run another testbench. All
of them use only `$urandom` or a seeded generator, so they need no
constraint solver.

All results above come from simulation; the RTL has not been run on an FPGA.
