// toplevel_controller: instruction decoder and sequencer of the coprocessor.
//
// The microcontroller presents an 8-bit instruction on the Instruction port and
// an 8-bit value on the Addr port together with instr_valid; the controller
// accepts them on a rising edge while busy is low (a valid/busy handshake, this
// design's choice) and executes the instruction:
//   * Load-data-in, Get-data-out, C1/C2-to-inword, NOP: one cycle.
//   * Load-to-RAM: three cycles, writing Input-word lanes 0..2 to RAM
//     addr..addr+2 (wr asserted).
//   * Read-from-RAM: four cycles, reading RAM addr..addr+2 (rd asserted) into
//     Output-word lanes 0..2 one cycle later each.
//   * Datapath instructions, single ones (Do-mult1, C1-to-B1, ...) and
//     microcode ones (Multi-Mult, Two-MultAdd, ...): a fixed sequence of one to
//     three datapath control words, taken from a case table. A control word that
//     starts a multiplier is followed by a wait until both multipliers are idle
//     (about 84 cycles), so an instruction is complete, C1/C2 written, when busy
//     falls.
// The microcode sequences follow the ones the instruction set defines (for
// instance Two-MultAdd = Do-mult1/Do-mult2, then C1-to-B1/D1-to-A1 with
// C2-to-B2/D2-to-A2, then Do-add1/Do-add2); the encoding, the handshake and
// the exact cycle counts are this design's. The RAM address is the low 7 bits
// of the Addr port; Get-data-out takes the byte index from Addr[3:0].
module toplevel_controller
  import hecc_pkg::*;
#(
  parameter int unsigned AW = 7
) (
  input  logic          clk,
  input  logic          rst_n,
  // microcontroller side
  input  logic [7:0]    instr,
  input  logic          instr_valid,
  input  logic [7:0]    addr,
  input  logic [7:0]    data_in,
  output logic          busy,
  // datapath
  output dp_ctl_t       dp_ctl,
  output logic          dp_out_sel,
  input  logic          dp_busy,
  // input-word
  output logic          iw_ld_port,
  output logic [7:0]    iw_port_in,
  output logic          iw_ld_dp,
  output logic [1:0]    iw_lane_sel,
  // output-word
  output logic          ow_ld_lane,
  output logic [1:0]    ow_lane_sel,
  output logic          ow_ld_byte_sel,
  output logic [3:0]    ow_byte_sel,
  // local storage
  output logic          ram_rd,
  output logic          ram_wr,
  output logic [AW-1:0] ram_addr
);
  typedef enum logic [2:0] {S_IDLE, S_EXEC, S_WRAM, S_RRAM, S_UCODE, S_UWAIT} state_e;

  typedef struct packed {
    dp_ctl_t ctl;
    logic    last;
  } ustep_t;

  state_e      state_q;
  opcode_e     op_q;
  logic [7:0]  addr_q;
  logic [7:0]  din_q;
  logic [1:0]  step_q;
  ustep_t      us;

  // Microcode table: control word number `step` of instruction `op`.
  function automatic ustep_t ucode(opcode_e op, logic [1:0] step);
    ustep_t u;
    u.ctl  = DP_IDLE;
    u.last = 1'b1;
    unique case (op)
      OP_OUTWORD_TO_A1: u.ctl.l1.a_sel = A_IN;
      OP_OUTWORD_TO_B1: u.ctl.l1.b_sel = B_IN;
      OP_OUTWORD_TO_D1: u.ctl.l1.d_ld  = 1'b1;
      OP_OUTWORD_TO_A2: u.ctl.l2.a_sel = A_IN;
      OP_OUTWORD_TO_B2: u.ctl.l2.b_sel = B_IN;
      OP_OUTWORD_TO_D2: u.ctl.l2.d_ld  = 1'b1;
      OP_DO_MULT1:      u.ctl.l1.c_op  = C_MUL;
      OP_DO_MULT2:      u.ctl.l2.c_op  = C_MUL;
      OP_DO_ADD1:       u.ctl.l1.c_op  = C_ADD;
      OP_DO_ADD2:       u.ctl.l2.c_op  = C_ADD;
      OP_C1_TO_B1:      u.ctl.l1.b_sel = B_C;
      OP_D1_TO_A1:      u.ctl.l1.a_sel = A_D;
      OP_C2_TO_B2:      u.ctl.l2.b_sel = B_C;
      OP_D2_TO_A2:      u.ctl.l2.a_sel = A_D;
      OP_C2_TO_A1:      u.ctl.l1.a_sel = A_CX;
      OP_C1_TO_A2:      u.ctl.l2.a_sel = A_CX;
      OP_C1_TO_A1:      u.ctl.l1.a_sel = A_C;
      OP_C2_TO_A2:      u.ctl.l2.a_sel = A_C;
      OP_MULTI_MULT: begin
        u.ctl.l1.c_op = C_MUL;
        u.ctl.l2.c_op = C_MUL;
      end
      OP_ADD_MULT: begin
        u.ctl.l1.c_op = C_ADD;
        u.ctl.l2.c_op = C_MUL;
      end
      OP_TWOADD_MULT: begin         // C1 = (A1+B1)*(A2+B2)
        u.last = (step == 2'd2);
        unique case (step)
          2'd0: begin u.ctl.l1.c_op = C_ADD; u.ctl.l2.c_op = C_ADD; end
          2'd1: begin u.ctl.l1.b_sel = B_C;  u.ctl.l1.a_sel = A_CX; end
          default: u.ctl.l1.c_op = C_MUL;
        endcase
      end
      OP_TWOMULT_ADD: begin         // C1 = A1*B1 + A2*B2
        u.last = (step == 2'd2);
        unique case (step)
          2'd0: begin u.ctl.l1.c_op = C_MUL; u.ctl.l2.c_op = C_MUL; end
          2'd1: begin u.ctl.l1.b_sel = B_C;  u.ctl.l1.a_sel = A_CX; end
          default: u.ctl.l1.c_op = C_ADD;
        endcase
      end
      OP_MULTIADD_MULT: begin       // C1 = A1*B1 + D1, C2 = A2*B2
        u.last = (step == 2'd2);
        unique case (step)
          2'd0: begin u.ctl.l1.c_op = C_MUL; u.ctl.l2.c_op = C_MUL; end
          2'd1: begin u.ctl.l1.b_sel = B_C;  u.ctl.l1.a_sel = A_D; end
          default: u.ctl.l1.c_op = C_ADD;
        endcase
      end
      OP_TWO_MULTADD: begin         // C1 = A1*B1 + D1, C2 = A2*B2 + D2
        u.last = (step == 2'd2);
        unique case (step)
          2'd0: begin u.ctl.l1.c_op = C_MUL; u.ctl.l2.c_op = C_MUL; end
          2'd1: begin
            u.ctl.l1.b_sel = B_C; u.ctl.l1.a_sel = A_D;
            u.ctl.l2.b_sel = B_C; u.ctl.l2.a_sel = A_D;
          end
          default: begin u.ctl.l1.c_op = C_ADD; u.ctl.l2.c_op = C_ADD; end
        endcase
      end
      default: ;
    endcase
    return u;
  endfunction

  function automatic logic is_dp_op(opcode_e op);
    return (op inside {[OP_OUTWORD_TO_A1 : OP_OUTWORD_TO_D2],
                       [OP_DO_MULT1 : OP_C2_TO_A2],
                       [OP_MULTI_MULT : OP_TWO_MULTADD]});
  endfunction

  function automatic logic has_mul(dp_ctl_t c);
    return (c.l1.c_op == C_MUL) || (c.l2.c_op == C_MUL);
  endfunction

  assign us   = ucode(op_q, step_q);
  assign busy = (state_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      op_q    <= OP_NOP;
      addr_q  <= '0;
      din_q   <= '0;
      step_q  <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (instr_valid) begin
          op_q   <= opcode_e'(instr);
          addr_q <= addr;
          din_q  <= data_in;
          step_q <= '0;
          if (instr == OP_LOAD_TO_RAM)             state_q <= S_WRAM;
          else if (instr == OP_READ_FROM_RAM)      state_q <= S_RRAM;
          else if (is_dp_op(opcode_e'(instr)))     state_q <= S_UCODE;
          else                                     state_q <= S_EXEC;
        end
        S_EXEC: state_q <= S_IDLE;
        S_WRAM: begin
          step_q <= step_q + 2'd1;
          if (step_q == 2'd2) state_q <= S_IDLE;
        end
        S_RRAM: begin
          step_q <= step_q + 2'd1;
          if (step_q == 2'd3) state_q <= S_IDLE;
        end
        S_UCODE: begin
          if (has_mul(us.ctl))  state_q <= S_UWAIT;
          else if (us.last)     state_q <= S_IDLE;
          else                  step_q  <= step_q + 2'd1;
        end
        S_UWAIT: if (!dp_busy) begin
          if (us.last) state_q <= S_IDLE;
          else begin
            step_q  <= step_q + 2'd1;
            state_q <= S_UCODE;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    dp_ctl         = DP_IDLE;
    dp_out_sel     = 1'b0;
    iw_ld_port     = 1'b0;
    iw_port_in     = din_q;
    iw_ld_dp       = 1'b0;
    iw_lane_sel    = step_q;
    ow_ld_lane     = 1'b0;
    ow_lane_sel    = step_q - 2'd1;
    ow_ld_byte_sel = 1'b0;
    ow_byte_sel    = addr_q[3:0];
    ram_rd         = 1'b0;
    ram_wr         = 1'b0;
    ram_addr       = addr_q[AW-1:0] + AW'(step_q);
    unique case (state_q)
      S_EXEC: unique case (op_q)
        OP_LOAD_DATA_IN: iw_ld_port     = 1'b1;
        OP_GET_DATA_OUT: ow_ld_byte_sel = 1'b1;
        OP_C1_TO_INWORD: iw_ld_dp       = 1'b1;
        OP_C2_TO_INWORD: begin iw_ld_dp = 1'b1; dp_out_sel = 1'b1; end
        default: ;
      endcase
      S_WRAM:  ram_wr = 1'b1;
      S_RRAM: begin
        ram_rd     = (step_q != 2'd3);
        ow_ld_lane = (step_q != 2'd0);
      end
      S_UCODE: dp_ctl = us.ctl;
      default: ;
    endcase
  end

  // The host may only present a new instruction while the controller is idle
  // or hold it until accepted; the controller never starts a step whose
  // multiplier is still running.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state_q == S_UCODE && has_mul(us.ctl)) |-> !dp_busy)
    else $error("toplevel_controller: multiplication issued while datapath busy");
endmodule
