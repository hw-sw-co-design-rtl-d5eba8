// tb_toplevel_controller: self-checking test of the instruction sequencer.
// A behavioural stand-in for the datapath holds dp_busy high for 84 cycles
// after every multiplication start. For every instruction the test records
// the control words and RAM/word-register strobes the controller emits and
// the number of busy cycles, and compares them with the instruction set's
// definitions: RAM transfers of three 32-bit words at addr..addr+2, the
// microcode sequences of the six combined instructions, and a wait for the
// multipliers after each multiplication.
module tb_toplevel_controller;
  import hecc_pkg::*;
  logic       clk = 0, rst_n = 0, instr_valid = 0, busy;
  logic [7:0] instr = '0, addr = '0, data_in = '0;
  dp_ctl_t    dp_ctl;
  logic       dp_out_sel, dp_busy;
  logic       iw_ld_port, iw_ld_dp, ow_ld_lane, ow_ld_byte_sel, ram_rd, ram_wr;
  logic [7:0] iw_port_in;
  logic [1:0] iw_lane_sel, ow_lane_sel;
  logic [3:0] ow_byte_sel;
  logic [6:0] ram_addr;
  int checks = 0, failures = 0;
  int mcnt1 = 0, mcnt2 = 0;

  toplevel_controller dut (.*);

  always #5 clk = ~clk;

  // datapath stand-in: each lane's multiplier is busy for 84 cycles
  assign dp_busy = (mcnt1 != 0) || (mcnt2 != 0);
  always @(posedge clk) begin
    if (mcnt1 != 0) mcnt1 <= mcnt1 - 1; else if (dp_ctl.l1.c_op == C_MUL) mcnt1 <= 84;
    if (mcnt2 != 0) mcnt2 <= mcnt2 - 1; else if (dp_ctl.l2.c_op == C_MUL) mcnt2 <= 84;
  end

  // recorder
  dp_ctl_t    seen_ctl[$];
  string      seen_ev[$];
  int         busy_cycles;
  always @(posedge clk) if (rst_n) begin
    if (busy) busy_cycles++;
    if (dp_ctl != DP_IDLE) seen_ctl.push_back(dp_ctl);
    if (ram_wr)         seen_ev.push_back($sformatf("W%0d/%0d", ram_addr, iw_lane_sel));
    if (ram_rd)         seen_ev.push_back($sformatf("R%0d", ram_addr));
    if (ow_ld_lane)     seen_ev.push_back($sformatf("L%0d", ow_lane_sel));
    if (iw_ld_port)     seen_ev.push_back($sformatf("P%h", iw_port_in));
    if (iw_ld_dp)       seen_ev.push_back($sformatf("D%0d", dp_out_sel));
    if (ow_ld_byte_sel) seen_ev.push_back($sformatf("B%0d", ow_byte_sel));
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(opcode_e op, logic [7:0] a = 8'h00, logic [7:0] d = 8'h00);
    @(negedge clk);
    while (busy) @(negedge clk);
    seen_ctl.delete(); seen_ev.delete(); busy_cycles = 0;
    instr = op; addr = a; data_in = d; instr_valid = 1;
    @(negedge clk);
    instr_valid = 0; instr = 8'hFF; addr = 8'hFF; data_in = 8'hFF;
    while (busy) @(negedge clk);
  endtask

  task automatic expect_ev(string what, string exp[$]);
    checks++;
    if (seen_ev != exp) begin
      failures++;
      $display("FAIL %s events %p expected %p", what, seen_ev, exp);
    end
  endtask

  function automatic lane_ctl_t L(a_sel_e a = A_HOLD, b_sel_e b = B_HOLD, logic d = 0,
                                  c_op_e c = C_HOLD);
    lane_ctl_t r;
    r.a_sel = a; r.b_sel = b; r.d_ld = d; r.c_op = c;
    return r;
  endfunction

  function automatic dp_ctl_t P(lane_ctl_t x, lane_ctl_t y);
    dp_ctl_t r;
    r.l1 = x; r.l2 = y;
    return r;
  endfunction

  task automatic expect_seq(opcode_e op, dp_ctl_t exp[$]);
    int nmul = 0;
    issue(op);
    foreach (exp[i]) nmul += ((exp[i].l1.c_op == C_MUL) || (exp[i].l2.c_op == C_MUL));
    checks++;
    if (seen_ctl != exp) begin
      failures++;
      $display("FAIL %s control words %p expected %p", op.name(), seen_ctl, exp);
    end
    checks++;
    if (busy_cycles != exp.size() + 85 * nmul) begin
      failures++;
      $display("FAIL %s busy %0d cycles expected %0d", op.name(), busy_cycles,
               exp.size() + 85 * nmul);
    end
    checks++;
    if (seen_ev.size() != 0) begin
      failures++;
      $display("FAIL %s stray strobes %p", op.name(), seen_ev);
    end
  endtask

  lane_ctl_t I;
  initial begin
    I = L();
    repeat (2) @(posedge clk);
    rst_n = 1;
    issue(OP_LOAD_TO_RAM, 8'h15);
    expect_ev("Load-to-RAM", '{"W21/0", "W22/1", "W23/2"});
    checks++; if (busy_cycles != 3) begin failures++; $display("FAIL Load-to-RAM %0d", busy_cycles); end
    issue(OP_READ_FROM_RAM, 8'h7C);
    expect_ev("Read-from-RAM", '{"R124", "R125", "L0", "R126", "L1", "L2"});
    checks++; if (busy_cycles != 4) begin failures++; $display("FAIL Read-from-RAM %0d", busy_cycles); end
    // every variable slot: address arithmetic and lane order of both transfers
    for (int k = 0; k < 32; k++) begin
      int b;
      b = 4 * k;
      issue(OP_LOAD_TO_RAM, 8'(b));
      expect_ev("Load-to-RAM slot", '{$sformatf("W%0d/0", b), $sformatf("W%0d/1", b + 1),
                                      $sformatf("W%0d/2", b + 2)});
      issue(OP_READ_FROM_RAM, 8'(b));
      expect_ev("Read-from-RAM slot", '{$sformatf("R%0d", b), $sformatf("R%0d", b + 1), "L0",
                                        $sformatf("R%0d", b + 2), "L1", "L2"});
    end
    issue(OP_LOAD_DATA_IN, 8'h00, 8'h3C);  expect_ev("Load-data-in", '{"P3c"});
    issue(OP_GET_DATA_OUT, 8'h07);         expect_ev("Get-data-out", '{"B7"});
    issue(OP_C1_TO_INWORD);                expect_ev("C1-to-inword", '{"D0"});
    issue(OP_C2_TO_INWORD);                expect_ev("C2-to-inword", '{"D1"});
    issue(OP_NOP);                         expect_ev("NOP", '{});
    expect_seq(OP_OUTWORD_TO_A1, '{P(L(A_IN), I)});
    expect_seq(OP_OUTWORD_TO_B1, '{P(L(.b(B_IN)), I)});
    expect_seq(OP_OUTWORD_TO_D1, '{P(L(.d(1)), I)});
    expect_seq(OP_OUTWORD_TO_A2, '{P(I, L(A_IN))});
    expect_seq(OP_OUTWORD_TO_B2, '{P(I, L(.b(B_IN)))});
    expect_seq(OP_OUTWORD_TO_D2, '{P(I, L(.d(1)))});
    expect_seq(OP_DO_MULT1, '{P(L(.c(C_MUL)), I)});
    expect_seq(OP_DO_MULT2, '{P(I, L(.c(C_MUL)))});
    expect_seq(OP_DO_ADD1,  '{P(L(.c(C_ADD)), I)});
    expect_seq(OP_DO_ADD2,  '{P(I, L(.c(C_ADD)))});
    expect_seq(OP_C1_TO_B1, '{P(L(.b(B_C)), I)});
    expect_seq(OP_D1_TO_A1, '{P(L(A_D), I)});
    expect_seq(OP_C2_TO_B2, '{P(I, L(.b(B_C)))});
    expect_seq(OP_D2_TO_A2, '{P(I, L(A_D))});
    expect_seq(OP_C2_TO_A1, '{P(L(A_CX), I)});
    expect_seq(OP_C1_TO_A2, '{P(I, L(A_CX))});
    expect_seq(OP_C1_TO_A1, '{P(L(A_C), I)});
    expect_seq(OP_C2_TO_A2, '{P(I, L(A_C))});
    expect_seq(OP_MULTI_MULT, '{P(L(.c(C_MUL)), L(.c(C_MUL)))});
    expect_seq(OP_ADD_MULT,   '{P(L(.c(C_ADD)), L(.c(C_MUL)))});
    expect_seq(OP_TWOADD_MULT, '{P(L(.c(C_ADD)), L(.c(C_ADD))),
                                 P(L(A_CX, B_C), I),
                                 P(L(.c(C_MUL)), I)});
    expect_seq(OP_TWOMULT_ADD, '{P(L(.c(C_MUL)), L(.c(C_MUL))),
                                 P(L(A_CX, B_C), I),
                                 P(L(.c(C_ADD)), I)});
    expect_seq(OP_MULTIADD_MULT, '{P(L(.c(C_MUL)), L(.c(C_MUL))),
                                   P(L(A_D, B_C), I),
                                   P(L(.c(C_ADD)), I)});
    expect_seq(OP_TWO_MULTADD, '{P(L(.c(C_MUL)), L(.c(C_MUL))),
                                 P(L(A_D, B_C), L(A_D, B_C)),
                                 P(L(.c(C_ADD)), L(.c(C_ADD)))});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
