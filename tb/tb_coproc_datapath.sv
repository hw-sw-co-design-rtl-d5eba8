// tb_coproc_datapath: self-checking test of the dual-multiplier/dual-adder
// datapath. Operand registers are loaded through the datapath input; control
// words reproduce each microcode combination (two products, product plus D,
// sum of products through the cross connection, product of sums) and every
// register move, and C1/C2 are read through the output multiplexer and
// compared with the reference arithmetic.
module tb_coproc_datapath;
  import hecc_pkg::*;
  import gf_ref_pkg::*;
  logic    clk = 0, rst_n = 0, out_sel = 0, busy;
  dp_ctl_t ctl = DP_IDLE;
  elem_t   din = '0, dout;
  elem_t   a1, b1, d1, a2, b2, d2;
  int checks = 0, failures = 0;

  coproc_datapath dut (.clk, .rst_n, .ctl, .din, .out_sel, .dout, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // apply one control word for one cycle, then wait for the multipliers
  task automatic step(dp_ctl_t c, elem_t d = '0);
    @(negedge clk); ctl = c; din = d;
    @(negedge clk); ctl = DP_IDLE; din = rand_elem();
    while (busy) @(negedge clk);
  endtask

  task automatic load_all();
    dp_ctl_t c;
    a1 = rand_elem(); b1 = rand_elem(); d1 = rand_elem();
    a2 = rand_elem(); b2 = rand_elem(); d2 = rand_elem();
    c = DP_IDLE; c.l1.a_sel = A_IN; step(c, a1);
    c = DP_IDLE; c.l1.b_sel = B_IN; step(c, b1);
    c = DP_IDLE; c.l1.d_ld  = 1'b1; step(c, d1);
    c = DP_IDLE; c.l2.a_sel = A_IN; step(c, a2);
    c = DP_IDLE; c.l2.b_sel = B_IN; step(c, b2);
    c = DP_IDLE; c.l2.d_ld  = 1'b1; step(c, d2);
  endtask

  task automatic expect_c(int lane, elem_t e, string what);
    out_sel = (lane == 2);
    #1;
    checks++;
    if (dout !== e) begin
      failures++;
      $display("FAIL %s: C%0d = %h expected %h", what, lane, dout, e);
    end
  endtask

  initial begin
    dp_ctl_t c;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 6; n++) begin
      // Multi-Mult
      load_all();
      c = DP_IDLE; c.l1.c_op = C_MUL; c.l2.c_op = C_MUL; step(c);
      expect_c(1, gf_mul(a1, b1), "Multi-Mult");
      expect_c(2, gf_mul(a2, b2), "Multi-Mult");
      // Add-Mult
      c = DP_IDLE; c.l1.c_op = C_ADD; c.l2.c_op = C_MUL; step(c);
      expect_c(1, gf_add(a1, b1), "Add-Mult");
      expect_c(2, gf_mul(a2, b2), "Add-Mult");
      // Two-MultAdd: products, then B<-C, A<-D, then add
      load_all();
      c = DP_IDLE; c.l1.c_op = C_MUL; c.l2.c_op = C_MUL; step(c);
      c = DP_IDLE; c.l1.b_sel = B_C; c.l1.a_sel = A_D; c.l2.b_sel = B_C; c.l2.a_sel = A_D; step(c);
      c = DP_IDLE; c.l1.c_op = C_ADD; c.l2.c_op = C_ADD; step(c);
      expect_c(1, gf_add(gf_mul(a1, b1), d1), "Two-MultAdd");
      expect_c(2, gf_add(gf_mul(a2, b2), d2), "Two-MultAdd");
      // TwoMult-Add through the cross connection C2 -> A1
      load_all();
      c = DP_IDLE; c.l1.c_op = C_MUL; c.l2.c_op = C_MUL; step(c);
      c = DP_IDLE; c.l1.b_sel = B_C; c.l1.a_sel = A_CX; step(c);
      c = DP_IDLE; c.l1.c_op = C_ADD; step(c);
      expect_c(1, gf_add(gf_mul(a1, b1), gf_mul(a2, b2)), "TwoMult-Add");
      // TwoAdd-Mult
      load_all();
      c = DP_IDLE; c.l1.c_op = C_ADD; c.l2.c_op = C_ADD; step(c);
      c = DP_IDLE; c.l1.b_sel = B_C; c.l1.a_sel = A_CX; step(c);
      c = DP_IDLE; c.l1.c_op = C_MUL; step(c);
      expect_c(1, gf_mul(gf_add(a1, b1), gf_add(a2, b2)), "TwoAdd-Mult");
      // cross connection C1 -> A2 and own-lane C -> A: lane 2 computes C1 + B2,
      // then lane 1 computes C1 + B1 with A1 <- C1
      load_all();
      c = DP_IDLE; c.l1.c_op = C_ADD; step(c);                         // C1 = a1+b1
      c = DP_IDLE; c.l2.a_sel = A_CX; c.l1.a_sel = A_C; step(c);       // A2 = C1, A1 = C1
      c = DP_IDLE; c.l2.c_op = C_ADD; c.l1.c_op = C_ADD; step(c);
      expect_c(2, gf_add(gf_add(a1, b1), b2), "C1-to-A2");
      expect_c(1, gf_add(gf_add(a1, b1), b1), "C1-to-A1");
      // C2 -> A2 and C2 -> B2 feedback: C2 = (a2*b2)^2 through A2 <- C2, B2 <- C2
      load_all();
      c = DP_IDLE; c.l2.c_op = C_MUL; step(c);
      c = DP_IDLE; c.l2.a_sel = A_C; c.l2.b_sel = B_C; step(c);
      c = DP_IDLE; c.l2.c_op = C_MUL; step(c);
      expect_c(2, gf_sq(gf_mul(a2, b2)), "C2-to-A2/B2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
