// coproc_datapath: dual-multiplier / dual-adder GF(2^83) datapath.
//
// Two identical lanes. Lane i holds operand registers Ai, Bi, Di and a result
// register Ci, one bit-serial multiplier (Multi) and one bit-parallel adder
// (Addi); a multiplexer selects whether Ci is written by the multiplier or by
// the adder. Register sources, as in the datapath diagram:
//   Ai <- datapath input | Di | C of the other lane (cross connection) | own Ci
//   Bi <- datapath input | own Ci (feedback)
//   Di <- datapath input
// The datapath input is the 84-bit Output-word; the output multiplexer
// (out_sel = 0: C1, 1: C2) feeds the Input-word. The cross connections let
// (A1+B1)*(A2+B2) and A1*B1 + A2*B2 run without leaving the datapath.
// Which four sources the A multiplexers have beyond the datapath input, Di and
// the cross-lane C is this design's reading; the own-lane C input is its choice.
//
// Timing: register moves and additions take effect at the next rising edge.
// c_op = C_MUL starts the lane's multiplier with the current Ai, Bi; Ci is
// written W = 84 edges later. busy is high while either multiplier runs; the
// controller must not issue a lane operation that reads or writes that lane's
// C register or restarts its multiplier while busy (an assertion checks that
// no multiplication is started on a running multiplier).
module coproc_datapath
  import hecc_pkg::*;
#(
  parameter int unsigned W    = 84,
  parameter int unsigned M    = 83,
  parameter logic [M-1:0] POLY = M'(83'h95)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  dp_ctl_t      ctl,
  input  logic [W-1:0] din,
  input  logic         out_sel,
  output logic [W-1:0] dout,
  output logic         busy
);
  logic [W-1:0] a1_q, b1_q, d1_q, c1_q;
  logic [W-1:0] a2_q, b2_q, d2_q, c2_q;
  logic [W-1:0] p1, p2, s1, s2;
  logic         busy1, busy2, done1, done2;

  gf_mult_serial #(.W(W), .M(M), .POLY(POLY)) u_mult1 (
    .clk, .rst_n, .start(ctl.l1.c_op == C_MUL), .a(a1_q), .b(b1_q),
    .busy(busy1), .done(done1), .p(p1));
  gf_mult_serial #(.W(W), .M(M), .POLY(POLY)) u_mult2 (
    .clk, .rst_n, .start(ctl.l2.c_op == C_MUL), .a(a2_q), .b(b2_q),
    .busy(busy2), .done(done2), .p(p2));

  gf_adder #(.W(W)) u_add1 (.a(a1_q), .b(b1_q), .s(s1));
  gf_adder #(.W(W)) u_add2 (.a(a2_q), .b(b2_q), .s(s2));

  assign busy = busy1 | busy2;
  assign dout = out_sel ? c2_q : c1_q;

  function automatic logic [W-1:0] a_next(a_sel_e sel, logic [W-1:0] cur, logic [W-1:0] in,
                                          logic [W-1:0] d, logic [W-1:0] cx, logic [W-1:0] c);
    unique case (sel)
      A_IN:    return in;
      A_D:     return d;
      A_CX:    return cx;
      A_C:     return c;
      default: return cur;
    endcase
  endfunction

  function automatic logic [W-1:0] b_next(b_sel_e sel, logic [W-1:0] cur, logic [W-1:0] in,
                                          logic [W-1:0] c);
    unique case (sel)
      B_IN:    return in;
      B_C:     return c;
      default: return cur;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a1_q <= '0; b1_q <= '0; d1_q <= '0; c1_q <= '0;
      a2_q <= '0; b2_q <= '0; d2_q <= '0; c2_q <= '0;
    end else begin
      a1_q <= a_next(ctl.l1.a_sel, a1_q, din, d1_q, c2_q, c1_q);
      a2_q <= a_next(ctl.l2.a_sel, a2_q, din, d2_q, c1_q, c2_q);
      b1_q <= b_next(ctl.l1.b_sel, b1_q, din, c1_q);
      b2_q <= b_next(ctl.l2.b_sel, b2_q, din, c2_q);
      if (ctl.l1.d_ld) d1_q <= din;
      if (ctl.l2.d_ld) d2_q <= din;
      if (done1)                   c1_q <= p1;
      else if (ctl.l1.c_op == C_ADD) c1_q <= s1;
      if (done2)                   c2_q <= p2;
      else if (ctl.l2.c_op == C_ADD) c2_q <= s2;
    end
  end

  // A multiplication must not be started on a multiplier that is still running.
  assert property (@(posedge clk) disable iff (!rst_n) (ctl.l1.c_op == C_MUL) |-> !busy1)
    else $error("coproc_datapath: Mult1 started while busy");
  assert property (@(posedge clk) disable iff (!rst_n) (ctl.l2.c_op == C_MUL) |-> !busy2)
    else $error("coproc_datapath: Mult2 started while busy");
endmodule
