// tb_hecc_coproc: end-to-end test of the coprocessor at its default size.
//
// The testbench plays the 8-bit microcontroller: it moves field elements in
// and out byte by byte over the Data-in/Data-out ports, and runs the genus-2
// divisor doubling (projective coordinates, curve y^2 + xy = x^5 + f3 x^3 +
// x^2 + f0) as a routine of coprocessor instructions, one microcode
// instruction per line of the parallelised schedule, with all intermediate
// values kept in the local RAM. The results U1', U0', V1', V0', Z' are read
// back over the ports and compared with the same formulae evaluated by the
// reference arithmetic. Further checks: port round trip of random words, the
// busy time of Multi-Mult (86 cycles) and Two-MultAdd (88 cycles), and
// coverage counts of every mechanism (each instruction, host stalls on busy,
// cross-lane moves, RAM reads and writes); a mechanism never exercised counts
// as a failure.
module tb_hecc_coproc;
  import hecc_pkg::*;
  import gf_ref_pkg::*;

  logic       clk = 0, rst_n = 0, instr_valid = 0, busy;
  logic [7:0] instr = '0, addr = '0, data_in = '0, data_out;
  int checks = 0, failures = 0;
  int stall_cycles = 0;
  int op_count[opcode_e];
  int cur_ow = -1;   // variable currently held in Output-word

  hecc_coproc dut (.clk, .rst_n, .instr, .instr_valid, .addr, .data_in, .data_out, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- host port primitives --------------------------------------------
  // Present an instruction; hold it while the coprocessor is busy (stall),
  // then release it after the accepting edge. Does not wait for completion.
  task automatic issue(opcode_e op, logic [7:0] a = 8'h00, logic [7:0] d = 8'h00);
    @(negedge clk);
    instr = op; addr = a; data_in = d; instr_valid = 1;
    while (busy) begin stall_cycles++; @(negedge clk); end
    @(posedge clk);
    @(negedge clk);
    instr_valid = 0;
    if (!op_count.exists(op)) op_count[op] = 0;
    op_count[op]++;
  endtask

  task automatic wait_idle();
    @(negedge clk);
    while (busy) @(negedge clk);
  endtask

  function automatic logic [7:0] vaddr(int v);
    return 8'(v * 4);
  endfunction

  // host -> RAM variable v
  task automatic put_var(int v, elem_t x);
    issue(OP_LOAD_DATA_IN, 8'h00, {4'h0, x[83:80]});
    for (int k = 9; k >= 0; k--) issue(OP_LOAD_DATA_IN, 8'h00, x[k*8 +: 8]);
    issue(OP_LOAD_TO_RAM, vaddr(v));
    if (cur_ow == v) cur_ow = -1;
  endtask

  // RAM variable v -> host
  task automatic get_var(int v, output elem_t x);
    issue(OP_READ_FROM_RAM, vaddr(v));
    cur_ow = v;
    x = '0;
    for (int k = 0; k < 11; k++) begin
      issue(OP_GET_DATA_OUT, 8'(k));
      wait_idle();
      if (k == 10) x[83:80] = data_out[3:0];
      else         x[k*8 +: 8] = data_out;
    end
  endtask

  // RAM variable v -> datapath register through Output-word
  task automatic to_reg(opcode_e mv, int v);
    if (v < 0) return;
    if (cur_ow != v) begin
      issue(OP_READ_FROM_RAM, vaddr(v));
      cur_ow = v;
    end
    issue(mv);
  endtask

  // C1 or C2 -> RAM variable v through Input-word
  task automatic from_c(int lane, int v);
    if (v < 0) return;
    issue(lane == 1 ? OP_C1_TO_INWORD : OP_C2_TO_INWORD);
    issue(OP_LOAD_TO_RAM, vaddr(v));
    if (cur_ow == v) cur_ow = -1;
  endtask

  // One line of a schedule: load operands, run the instruction, store results.
  task automatic uop(opcode_e op, int a1, int b1, int d1, int a2, int b2, int d2,
                     int c1dst, int c2dst);
    to_reg(OP_OUTWORD_TO_A1, a1);
    to_reg(OP_OUTWORD_TO_B1, b1);
    to_reg(OP_OUTWORD_TO_D1, d1);
    to_reg(OP_OUTWORD_TO_A2, a2);
    to_reg(OP_OUTWORD_TO_B2, b2);
    to_reg(OP_OUTWORD_TO_D2, d2);
    issue(op);
    from_c(1, c1dst);
    from_c(2, c2dst);
  endtask

  task automatic check(string what, elem_t got, elem_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s = %h expected %h", what, got, exp);
    end
  endtask

  // ---- variable map in the local RAM -----------------------------------
  localparam int U1 = 0, U0 = 1, V1 = 2, V0 = 3, Z = 4, F3 = 5, T0 = 6, T1 = 7,
                 R = 8, A = 9, K1 = 10, B = 11, K0 = 12, T2 = 13, S1 = 14, S0 = 15,
                 T3 = 16, L2 = 17, L0 = 18, L1 = 19, U0P = 20, U1P = 21, ZP = 22,
                 V0P = 23, V1P = 24, TMP = 25;

  // Divisor doubling as a coprocessor routine (one instruction per formula group)
  task automatic double_routine();
    // 1: t0 = Z^2, t1 = U1^2 ; a = Z + V1, r = U0*Z
    uop(OP_MULTI_MULT, Z, Z, -1, U1, U1, -1, T0, T1);
    uop(OP_ADD_MULT, Z, V1, -1, U0, Z, -1, A, R);
    // 2: k1 = f3*t0 + t1, b = V1*a + t0 ; k0 = U1*k1 + Z*b
    uop(OP_TWO_MULTADD, F3, T0, T1, V1, A, T0, K1, B);
    uop(OP_TWOMULT_ADD, U1, K1, -1, Z, B, -1, K0, -1);
    // 3: t2 = k0*U1, s1 = k0*Z ; s0 = k1*r + t2
    uop(OP_MULTI_MULT, K0, U1, -1, K0, Z, -1, T2, S1);
    uop(OP_MULTIADD_MULT, K1, R, T2, -1, -1, -1, S0, -1);
    // 4: t0 = t0*r, t1 = s1*k0 ; r = t0*s1, t3 = U0*k0 ; l2 = s1*t2, l0 = s0*t3
    uop(OP_MULTI_MULT, T0, R, -1, S1, K0, -1, T0, T1);
    uop(OP_MULTI_MULT, T0, S1, -1, U0, K0, -1, R, T3);
    uop(OP_MULTI_MULT, S1, T2, -1, S0, T3, -1, L2, L0);
    //    l1 = (t2 + t3)*(s0 + s1) ; l1 = l1 + l2 + l0
    uop(OP_TWOADD_MULT, T2, T3, -1, S0, S1, -1, L1, -1);
    to_reg(OP_OUTWORD_TO_A1, L1);
    to_reg(OP_OUTWORD_TO_B1, L2);
    issue(OP_DO_ADD1);
    issue(OP_C1_TO_B1);
    to_reg(OP_OUTWORD_TO_A1, L0);
    issue(OP_DO_ADD1);
    from_c(1, L1);
    // 5: U0' = s0^2 + r, U1' = t0^2
    uop(OP_MULTIADD_MULT, S0, S0, R, T0, T0, -1, U0P, U1P);
    // 6: a = s0*s1 + U1', s1 = s1^2
    uop(OP_MULTIADD_MULT, S0, S1, U1P, S1, S1, -1, A, S1);
    //    l2 = l2 + a ; b = U0' + l1
    to_reg(OP_OUTWORD_TO_A1, L2);
    to_reg(OP_OUTWORD_TO_B1, A);
    to_reg(OP_OUTWORD_TO_A2, U0P);
    to_reg(OP_OUTWORD_TO_B2, L1);
    issue(OP_DO_ADD1);
    issue(OP_DO_ADD2);
    from_c(1, L2);
    from_c(2, B);
    //    Z' = s1*r, t2 = r*t1
    uop(OP_MULTI_MULT, S1, R, -1, R, T1, -1, ZP, T2);
    //    t0 = U0'*l2 + l0*s1 ; t1 = U1'*l2 + s1*b
    uop(OP_TWOMULT_ADD, U0P, L2, -1, L0, S1, -1, T0, -1);
    uop(OP_TWOMULT_ADD, U1P, L2, -1, S1, B, -1, T1, -1);
    // 7: U1' = U1'*r, U0' = U0'*r
    uop(OP_MULTI_MULT, U1P, R, -1, U0P, R, -1, U1P, U0P);
    // 8: V0' = t0 + t2*V0, V1' = t1 + t2*V1 + Z'
    uop(OP_TWO_MULTADD, T2, V0, T0, T2, V1, T1, V0P, -1);
    issue(OP_C2_TO_B2);
    issue(OP_C1_TO_A2);          // exercise the cross connection C1 -> A2 ...
    issue(OP_C2_TO_A2);          // ... then take C2 into A2 as well
    to_reg(OP_OUTWORD_TO_B2, ZP);
    issue(OP_DO_ADD2);           // C2 = (t2*V1 + t1) + Z'
    from_c(2, V1P);
  endtask

  // Reference doubling, written straight from the formulae
  task automatic ref_double(elem_t u1, elem_t u0, elem_t v1, elem_t v0, elem_t z, elem_t f3,
                            output elem_t ou1, output elem_t ou0, output elem_t ov1,
                            output elem_t ov0, output elem_t oz);
    elem_t t0, t1, t2, t3, r, a, b, k0, k1, s0, s1, l0, l1, l2, up0, up1, zp;
    t0 = gf_sq(z);  t1 = gf_sq(u1);  r = gf_mul(u0, z);  a = gf_add(z, v1);
    k1 = gf_add(gf_mul(f3, t0), t1);
    b  = gf_add(gf_mul(v1, a), t0);
    k0 = gf_add(gf_mul(u1, k1), gf_mul(z, b));
    t2 = gf_mul(k0, u1);  s1 = gf_mul(k0, z);  s0 = gf_add(gf_mul(k1, r), t2);
    t0 = gf_mul(t0, r);  t1 = gf_mul(s1, k0);  r = gf_mul(t0, s1);  t3 = gf_mul(u0, k0);
    l2 = gf_mul(s1, t2);  l0 = gf_mul(s0, t3);
    l1 = gf_mul(gf_add(t2, t3), gf_add(s0, s1));  l1 = gf_add(gf_add(l1, l2), l0);
    up0 = gf_add(gf_sq(s0), r);  up1 = gf_sq(t0);
    a = gf_add(gf_mul(s0, s1), up1);  s1 = gf_sq(s1);
    l2 = gf_add(l2, a);  b = gf_add(up0, l1);
    zp = gf_mul(s1, r);  t2 = gf_mul(r, t1);
    t0 = gf_add(gf_mul(up0, l2), gf_mul(l0, s1));
    t1 = gf_add(gf_mul(up1, l2), gf_mul(s1, b));
    up1 = gf_mul(up1, r);  up0 = gf_mul(up0, r);
    ov0 = gf_add(t0, gf_mul(t2, v0));
    ov1 = gf_add(gf_add(t1, gf_mul(t2, v1)), zp);
    ou1 = up1;  ou0 = up0;  oz = zp;
  endtask

  task automatic busy_time(opcode_e op, int exp_cycles);
    int n = 0;
    wait_idle();
    issue(op);
    // issue() returns in the first busy cycle after the accepting edge
    n = 0;
    while (busy) begin @(negedge clk); n++; end
    checks++;
    if (n != exp_cycles) begin
      failures++;
      $display("FAIL %s busy for %0d cycles, expected %0d", op.name(), n, exp_cycles);
    end
  endtask

  initial begin
    elem_t in[6], got, e_u1, e_u0, e_v1, e_v0, e_z;
    elem_t x;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // port round trip through every variable slot
    for (int v = 0; v < 32; v++) begin
      x = rand_elem();
      put_var(v, x);
      get_var(v, got);
      check($sformatf("round trip var %0d", v), got, x);
    end

    // instruction latencies
    busy_time(OP_MULTI_MULT, 86);
    busy_time(OP_TWO_MULTADD, 88);

    // divisor doubling, several random divisors
    for (int n = 0; n < 2; n++) begin
      foreach (in[i]) in[i] = rand_elem();
      put_var(U1, in[0]); put_var(U0, in[1]); put_var(V1, in[2]);
      put_var(V0, in[3]); put_var(Z, in[4]);  put_var(F3, in[5]);
      double_routine();
      ref_double(in[0], in[1], in[2], in[3], in[4], in[5], e_u1, e_u0, e_v1, e_v0, e_z);
      get_var(U1P, got); check("U1'", got, e_u1);
      get_var(U0P, got); check("U0'", got, e_u0);
      get_var(V1P, got); check("V1'", got, e_v1);
      get_var(V0P, got); check("V0'", got, e_v0);
      get_var(ZP, got);  check("Z'", got, e_z);
    end

    // the remaining single instructions: C = A1*B1 via Do-mult1 etc.
    x = rand_elem(); got = rand_elem();
    put_var(TMP, x); put_var(TMP + 1, got);
    to_reg(OP_OUTWORD_TO_A1, TMP); to_reg(OP_OUTWORD_TO_B1, TMP + 1);
    to_reg(OP_OUTWORD_TO_D2, TMP);
    issue(OP_DO_MULT1);            // C1 = x*y
    from_c(1, TMP + 4);
    issue(OP_C1_TO_A1);            // A1 = x*y
    issue(OP_D2_TO_A2);            // A2 = x
    issue(OP_C2_TO_A1);            // A1 = C2 (previous value, overwritten next)
    issue(OP_C1_TO_A1);            // A1 = x*y
    to_reg(OP_OUTWORD_TO_B2, TMP + 1);
    issue(OP_DO_MULT2);            // C2 = x*y
    to_reg(OP_OUTWORD_TO_D1, TMP);
    issue(OP_D1_TO_A1);            // A1 = x
    issue(OP_DO_ADD1);             // C1 = x + y
    from_c(1, TMP + 2);
    from_c(2, TMP + 3);
    get_var(TMP + 2, e_u1); check("Do-add1", e_u1, gf_add(x, got));
    get_var(TMP + 3, e_u0); check("Do-mult2", e_u0, gf_mul(x, got));
    get_var(TMP + 4, e_u0); check("Do-mult1", e_u0, gf_mul(x, got));

    // every instruction of the set, stalls and cross moves must have happened
    for (opcode_e o = OP_LOAD_DATA_IN; ; o = o.next()) begin
      checks++;
      if (!op_count.exists(o)) begin
        failures++;
        $display("FAIL instruction %s never issued", o.name());
      end
      if (o == o.last()) break;
    end
    checks++;
    if (stall_cycles == 0) begin
      failures++;
      $display("FAIL the host never had to wait on busy");
    end
    $display("coverage: %0d host stall cycles, %0d RAM writes, %0d RAM reads, %0d microcode instructions",
             stall_cycles, op_count[OP_LOAD_TO_RAM], op_count[OP_READ_FROM_RAM],
             op_count[OP_MULTI_MULT] + op_count[OP_ADD_MULT] + op_count[OP_TWOADD_MULT] +
             op_count[OP_TWOMULT_ADD] + op_count[OP_MULTIADD_MULT] + op_count[OP_TWO_MULTADD]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
