// hecc_coproc: GF(2^83) microcode instruction set coprocessor for a
// genus-2 hyperelliptic curve cryptosystem, attached to an 8-bit
// microcontroller.
//
// The coprocessor performs the field arithmetic of the HECC divisor doubling
// and addition formulae; the microcontroller runs the divisor routines and the
// scalar multiplication in software and drives the coprocessor through four
// 8-bit ports: Instruction (P0), Data-in (P1), Data-out (P2) and Addr (P3).
// Inside, a top-level controller sequences a dual-multiplier/dual-adder
// datapath (two 84-cycle bit-serial multipliers, two one-cycle adders), a
// 128 x 32-bit local RAM holding 32 temporary field elements, and the 84-bit
// Input-word and Output-word registers through which every value enters and
// leaves the RAM:
//   Data-in  -> Input-word  -> RAM -> Output-word -> Data-out
//   datapath output (C1/C2) -> Input-word;  Output-word -> datapath input
// The four ports, the word and RAM sizes and the instruction set follow the
// design; the instr_valid/busy handshake pair is this design's addition, since
// a port write needs a strobe and a multiplication a completion flag.
//
// Timing: an instruction is accepted on the rising edge at which instr_valid
// is high and busy low; busy is high from the next cycle until the
// instruction has completed (1 cycle for a port or move instruction, 3 or 4
// for a RAM transfer, 86 for a single multiplication step such as Do-mult1 or
// Multi-Mult, 88 for the three-step microcode instructions).
// Input-word contents are only visible through the RAM, so in_word is unused
// here.
module hecc_coproc
  import hecc_pkg::*;
#(
  parameter int unsigned  W    = WORD_W,
  parameter int unsigned  M    = FIELD_M,
  parameter logic [M-1:0] POLY = FIELD_POLY
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] instr,        // P0
  input  logic       instr_valid,
  input  logic [7:0] addr,         // P3
  input  logic [7:0] data_in,      // P1
  output logic [7:0] data_out,     // P2
  output logic       busy
);
  dp_ctl_t           dp_ctl;
  logic              dp_out_sel, dp_busy;
  logic [W-1:0]      dp_out;
  logic              iw_ld_port, iw_ld_dp;
  logic [7:0]        iw_port_in;
  logic [1:0]        iw_lane_sel, ow_lane_sel;
  logic              ow_ld_lane, ow_ld_byte_sel;
  logic [3:0]        ow_byte_sel;
  logic              ram_rd, ram_wr;
  logic [RAM_AW-1:0] ram_addr;
  logic [RAM_W-1:0]  ram_wdata, ram_rdata;
  logic [W-1:0]      in_word, out_word;

  toplevel_controller #(.AW(RAM_AW)) u_ctrl (
    .clk, .rst_n,
    .instr, .instr_valid, .addr, .data_in, .busy,
    .dp_ctl, .dp_out_sel, .dp_busy,
    .iw_ld_port, .iw_port_in, .iw_ld_dp, .iw_lane_sel,
    .ow_ld_lane, .ow_lane_sel, .ow_ld_byte_sel, .ow_byte_sel,
    .ram_rd, .ram_wr, .ram_addr);

  coproc_datapath #(.W(W), .M(M), .POLY(POLY)) u_dp (
    .clk, .rst_n, .ctl(dp_ctl), .din(out_word), .out_sel(dp_out_sel),
    .dout(dp_out), .busy(dp_busy));

  input_word #(.W(W), .PW(PORT_W), .RW(RAM_W)) u_inword (
    .clk, .rst_n, .ld_port(iw_ld_port), .port_in(iw_port_in),
    .ld_dp(iw_ld_dp), .dp_in(dp_out), .lane_sel(iw_lane_sel),
    .lane_out(ram_wdata), .word(in_word));

  output_word #(.W(W), .PW(PORT_W), .RW(RAM_W)) u_outword (
    .clk, .rst_n, .ld_lane(ow_ld_lane), .lane_sel(ow_lane_sel), .ram_in(ram_rdata),
    .ld_byte_sel(ow_ld_byte_sel), .byte_sel(ow_byte_sel),
    .port_out(data_out), .word(out_word));

  local_storage #(.DW(RAM_W), .DEPTH(RAM_D)) u_ram (
    .clk, .rd(ram_rd), .wr(ram_wr), .addr(ram_addr), .wdata(ram_wdata),
    .rdata(ram_rdata));
endmodule
