// tb_hecc_scalar_mult: the coprocessor running a complete genus-2 HECC
// divisor scalar multiplication, with the testbench as the 8-bit host.
//
// The host software is modelled by tasks that issue coprocessor instructions
// over the ports, one microcode instruction per group of the parallelised
// formulae:
//   * divisor doubling in projective coordinates (17 multiplications),
//   * mixed addition, affine base divisor + projective accumulator (24),
//   * conversion back to affine: one Itoh-Tsujii inversion of Z (82 squarings
//     and 8 multiplications, 90 in all) and four multiplications.
// The scalar is recoded in non-adjacent form; a digit -1 adds the negated base
// divisor, which for y^2 + xy = ... (h(x) = x) is [u, v + x]: V1 + 1, a host-side
// change of one bit. All temporaries live in the 32-variable local RAM; a small
// allocator hands out variable slots, frees them when a value is dead, and
// fails the test if more than 32 would be needed at once.
//
// The same computation is carried out with the reference field arithmetic,
// written straight from the formulae, and the affine result is compared. The
// field elements are random, not a point on a real curve: the test shows that
// the coprocessor executes the schedules exactly, not that the formulae form a
// group law. In the addition formulae the adjusted coordinates written
// V~20, V~21 are taken to be V20, V21 of the projective input.
//
// Reported: coprocessor clock cycles and host instructions per doubling,
// addition, conversion, the I/O transfer of inputs and result (13 elements in,
// the 4 affine coordinates out) and the whole scalar multiplication, measured with
// a host that issues instructions back to back. SCALAR_BITS sets the scalar
// length (83 bits, the group size of the 83-bit curve).
module tb_hecc_scalar_mult;
  import hecc_pkg::*;
  import gf_ref_pkg::*;

  localparam int SCALAR_BITS = 83;

  logic       clk = 0, rst_n = 0, instr_valid = 0, busy;
  logic [7:0] instr = '0, addr = '0, data_in = '0, data_out;
  int checks = 0, failures = 0;
  int cur_ow = -1;
  longint cycle = 0, n_instr = 0;
  int n_mult1 = 0;

  hecc_coproc dut (.clk, .rst_n, .instr, .instr_valid, .addr, .data_in, .data_out, .busy);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- variable slots of the local RAM -----------------------------------
  int  slot_of[string];
  bit  used[32];
  int  live = 0, peak = 0;

  function automatic int v(string n);
    if (slot_of.exists(n)) return slot_of[n];
    for (int i = 0; i < 32; i++)
      if (!used[i]) begin
        used[i] = 1; slot_of[n] = i; live++;
        if (live > peak) peak = live;
        return i;
      end
    failures++;
    $display("FAIL no free variable slot for %s", n);
    return 31;
  endfunction

  function automatic void rel(string n);
    if (!slot_of.exists(n)) return;
    used[slot_of[n]] = 0;
    slot_of.delete(n);
    live--;
  endfunction

  // ---- host port primitives ----------------------------------------------
  task automatic issue(opcode_e op, logic [7:0] a = 8'h00, logic [7:0] d = 8'h00);
    @(negedge clk);
    instr = op; addr = a; data_in = d; instr_valid = 1;
    while (busy) @(negedge clk);
    @(posedge clk);
    @(negedge clk);
    instr_valid = 0;
    n_instr++;
    if (op == OP_DO_MULT1) n_mult1++;
  endtask

  task automatic wait_idle();
    @(negedge clk);
    while (busy) @(negedge clk);
  endtask

  task automatic put(int s, elem_t x);
    issue(OP_LOAD_DATA_IN, 8'h00, {4'h0, x[83:80]});
    for (int k = 9; k >= 0; k--) issue(OP_LOAD_DATA_IN, 8'h00, x[k*8 +: 8]);
    issue(OP_LOAD_TO_RAM, 8'(s * 4));
    if (cur_ow == s) cur_ow = -1;
  endtask

  task automatic get(int s, output elem_t x);
    issue(OP_READ_FROM_RAM, 8'(s * 4));
    cur_ow = s;
    x = '0;
    for (int k = 0; k < 11; k++) begin
      issue(OP_GET_DATA_OUT, 8'(k));
      wait_idle();
      if (k == 10) x[83:80] = data_out[3:0];
      else         x[k*8 +: 8] = data_out;
    end
  endtask

  task automatic to_reg(opcode_e mv, int s);
    if (s < 0) return;
    if (cur_ow != s) begin
      issue(OP_READ_FROM_RAM, 8'(s * 4));
      cur_ow = s;
    end
    issue(mv);
  endtask

  task automatic from_c(int lane, int s);
    if (s < 0) return;
    issue(lane == 1 ? OP_C1_TO_INWORD : OP_C2_TO_INWORD);
    issue(OP_LOAD_TO_RAM, 8'(s * 4));
    if (cur_ow == s) cur_ow = -1;
  endtask

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

  // ---- host programs: one table entry per coprocessor routine step -------
  typedef enum int {K_UOP, K_ADD, K_ADD3, K_REL} kind_e;
  typedef struct {
    kind_e   kind;
    opcode_e op;
    string   n[8];   // operand / destination variable names, "" = none
  } hstep_t;

  hstep_t prog_dbl[$], prog_add[$];
  string  pvx = "PV1";          // base divisor V1 used by the addition program

  function automatic void U(ref hstep_t p[$], input opcode_e op, input string a1, b1, d1,
                            a2, b2, d2, c1, c2);
    hstep_t s;
    s.kind = K_UOP; s.op = op;
    s.n = '{a1, b1, d1, a2, b2, d2, c1, c2};
    p.push_back(s);
  endfunction

  function automatic void A(ref hstep_t p[$], input string d, x, y, z = "");
    hstep_t s;
    s.kind = (z == "") ? K_ADD : K_ADD3; s.op = OP_DO_ADD1;
    s.n = '{d, x, y, z, "", "", "", ""};
    p.push_back(s);
  endfunction

  function automatic void R(ref hstep_t p[$], input string x, y = "", z = "", w = "");
    hstep_t s;
    s.kind = K_REL; s.op = OP_NOP;
    s.n = '{x, y, z, w, "", "", "", ""};
    p.push_back(s);
  endfunction

  function automatic int sl(string n);
    if (n == "") return -1;
    if (n == "PVX") return v(pvx);
    return v(n);
  endfunction

  task automatic run(ref hstep_t p[$]);
    foreach (p[i]) begin
      hstep_t s = p[i];
      unique case (s.kind)
        K_UOP: uop(s.op, sl(s.n[0]), sl(s.n[1]), sl(s.n[2]), sl(s.n[3]), sl(s.n[4]),
                   sl(s.n[5]), sl(s.n[6]), sl(s.n[7]));
        K_ADD: uop(OP_DO_ADD1, sl(s.n[1]), sl(s.n[2]), -1, -1, -1, -1, sl(s.n[0]), -1);
        K_ADD3: begin
          to_reg(OP_OUTWORD_TO_A1, sl(s.n[1]));
          to_reg(OP_OUTWORD_TO_B1, sl(s.n[2]));
          issue(OP_DO_ADD1);
          issue(OP_C1_TO_B1);
          to_reg(OP_OUTWORD_TO_A1, sl(s.n[3]));
          issue(OP_DO_ADD1);
          from_c(1, sl(s.n[0]));
        end
        default: for (int k = 0; k < 4; k++) if (s.n[k] != "") rel(s.n[k]);
      endcase
    end
  endtask

  // divisor doubling: acc = 2 acc (accumulator U1, U0, V1, V0, Z; curve f3)
  function automatic void build_dbl(ref hstep_t p[$]);
    U(p, OP_MULTI_MULT, "Z", "Z", "", "U1", "U1", "", "t0", "t1");
    U(p, OP_ADD_MULT, "Z", "V1", "", "U0", "Z", "", "a", "r");
    U(p, OP_TWO_MULTADD, "f3", "t0", "t1", "V1", "a", "t0", "k1", "b");
    R(p, "a");
    U(p, OP_TWOMULT_ADD, "U1", "k1", "", "Z", "b", "", "k0", "");
    R(p, "b");
    U(p, OP_MULTI_MULT, "k0", "U1", "", "k0", "Z", "", "t2", "s1");
    U(p, OP_MULTIADD_MULT, "k1", "r", "t2", "", "", "", "s0", "");
    R(p, "k1");
    U(p, OP_MULTI_MULT, "t0", "r", "", "s1", "k0", "", "t0", "t1");
    U(p, OP_MULTI_MULT, "t0", "s1", "", "U0", "k0", "", "r", "t3");
    R(p, "k0");
    U(p, OP_MULTI_MULT, "s1", "t2", "", "s0", "t3", "", "l2", "l0");
    U(p, OP_TWOADD_MULT, "t2", "t3", "", "s0", "s1", "", "l1", "");
    R(p, "t2", "t3");
    A(p, "l1", "l1", "l2", "l0");
    U(p, OP_MULTIADD_MULT, "s0", "s0", "r", "t0", "t0", "", "U0p", "U1p");
    R(p, "t0");
    U(p, OP_MULTIADD_MULT, "s0", "s1", "U1p", "s1", "s1", "", "a", "s1");
    R(p, "s0");
    A(p, "l2", "l2", "a");
    R(p, "a");
    A(p, "b", "U0p", "l1");
    R(p, "l1");
    U(p, OP_MULTI_MULT, "s1", "r", "", "r", "t1", "", "Z", "t2");
    U(p, OP_TWOMULT_ADD, "U0p", "l2", "", "l0", "s1", "", "t0", "");
    U(p, OP_TWOMULT_ADD, "U1p", "l2", "", "s1", "b", "", "t1", "");
    R(p, "l2", "l0", "b", "s1");
    U(p, OP_MULTI_MULT, "U1p", "r", "", "U0p", "r", "", "U1", "U0");
    R(p, "U1p", "U0p", "r");
    U(p, OP_TWO_MULTADD, "t2", "V0", "t0", "t2", "V1", "t1", "V0", "tmp");
    A(p, "V1", "tmp", "Z");
    R(p, "t0", "t1", "t2", "tmp");
  endfunction

  // mixed addition: acc = acc + [PU1, PU0, PVX, PV0] (PVX = PV1 or PNV1)
  function automatic void build_add(ref hstep_t p[$]);
    // step 1: resultant
    U(p, OP_TWO_MULTADD, "PU1", "Z", "U1", "PU0", "Z", "U0", "t1", "t2");
    U(p, OP_MULTIADD_MULT, "PU1", "t1", "t2", "t1", "t1", "", "t0", "a");
    U(p, OP_TWOMULT_ADD, "t0", "t2", "", "a", "PU0", "", "r", "");
    R(p, "a");
    // step 2: almost s
    U(p, OP_TWO_MULTADD, "PV0", "Z", "V0", "PVX", "Z", "V1", "t4", "t5");
    U(p, OP_TWOADD_MULT, "t0", "t1", "", "t4", "t5", "", "b", "");
    U(p, OP_MULTI_MULT, "t0", "t4", "", "t1", "t5", "", "w2", "w3");
    R(p, "t0", "t4", "t5");
    U(p, OP_ADD_MULT, "one", "PU1", "", "PU0", "w3", "", "x", "y");
    U(p, OP_ADD_MULT, "y", "w2", "", "w3", "x", "", "s0", "a");
    R(p, "x", "y", "w3");
    A(p, "b", "w2", "b");
    A(p, "s1", "a", "b");
    R(p, "w2", "a", "b");
    // step 3
    U(p, OP_MULTI_MULT, "Z", "r", "", "s1", "Z", "", "R", "s3");
    U(p, OP_MULTI_MULT, "R", "s3", "", "s0", "Z", "", "Rt", "s0");
    U(p, OP_MULTI_MULT, "s0", "s1", "", "s3", "s3", "", "S", "S3");
    U(p, OP_MULTI_MULT, "s3", "s1", "", "s0", "s3", "", "St", "Stt");
    R(p, "s3");
    U(p, OP_DO_MULT1, "Rt", "St", "", "", "", "", "Rtt", "");
    // step 4
    U(p, OP_MULTI_MULT, "St", "U1", "", "S", "U0", "", "l2", "l0");
    U(p, OP_TWOADD_MULT, "Stt", "S", "", "U1", "U0", "", "l1", "");
    R(p, "S");
    A(p, "l1", "l0", "l1", "l2");
    A(p, "l2", "l2", "Stt");
    R(p, "Stt");
    // step 5
    U(p, OP_MULTI_MULT, "t1", "r", "", "s1", "s1", "", "a", "b");
    U(p, OP_MULTI_MULT, "s1", "Z", "", "b", "t1", "", "c", "b");
    R(p, "r", "s1");
    U(p, OP_TWOADD_MULT, "a", "c", "", "R", "zero", "", "a", "");
    R(p, "c");
    U(p, OP_TWOADD_MULT, "b", "zero", "", "t1", "U1", "", "b", "");
    U(p, OP_TWOMULT_ADD, "t2", "St", "", "s0", "s0", "", "d", "");
    R(p, "t2", "s0");
    A(p, "U0p", "b", "d", "a");
    R(p, "a", "b", "d");
    U(p, OP_TWOMULT_ADD, "St", "t1", "", "R", "R", "", "U1p", "");
    R(p, "St", "t1", "R");
    U(p, OP_TWOADD_MULT, "U0p", "l1", "", "S3", "zero", "", "b", "");
    R(p, "l1");
    A(p, "l2", "l2", "U1p");
    U(p, OP_TWOMULT_ADD, "U0p", "l2", "", "S3", "l0", "", "t4", "");
    R(p, "l0");
    U(p, OP_MULTIADD_MULT, "U1p", "l2", "b", "Rt", "S3", "", "t5", "Z");
    R(p, "l2", "b", "S3");
    U(p, OP_MULTI_MULT, "Rt", "U1p", "", "Rt", "U0p", "", "U1", "U0");
    R(p, "Rt", "U1p", "U0p");
    // step 6
    U(p, OP_TWO_MULTADD, "Rtt", "V0", "t4", "Rtt", "V1", "Z", "V0", "tmp");
    A(p, "V1", "t5", "tmp");
    R(p, "Rtt", "t4", "t5", "tmp");
  endfunction

  // ---- reference: the formulae evaluated line by line ----------------------
  // r-lines: d = x*y + z*w, with "" meaning the term or summand is absent and
  // "=x" in the y position meaning x itself (no multiplication).
  typedef struct { string d, x, y, z, w; } rline_t;
  rline_t ref_dbl_f[$], ref_add_f[$];
  elem_t  rv[string];

  function automatic void F(ref rline_t p[$], input string d, x, y, z = "", w = "");
    rline_t l;
    l.d = d; l.x = x; l.y = y; l.z = z; l.w = w;
    p.push_back(l);
  endfunction

  function automatic elem_t term(string x, string y);
    if (x == "") return '0;
    if (y == "") return rv[x];
    return gf_mul(rv[x], rv[y]);
  endfunction

  function automatic void eval(ref rline_t p[$]);
    foreach (p[i]) rv[p[i].d] = term(p[i].x, p[i].y) ^ term(p[i].z, p[i].w);
  endfunction

  function automatic void build_ref();
    // doubling
    F(ref_dbl_f, "t0", "Z", "Z");        F(ref_dbl_f, "t1", "U1", "U1");
    F(ref_dbl_f, "r", "U0", "Z");        F(ref_dbl_f, "a", "Z", "", "V1", "");
    F(ref_dbl_f, "k1", "f3", "t0", "t1", "");
    F(ref_dbl_f, "b", "V1", "a", "t0", "");
    F(ref_dbl_f, "k0", "U1", "k1", "Z", "b");
    F(ref_dbl_f, "t2", "k0", "U1");      F(ref_dbl_f, "s1", "k0", "Z");
    F(ref_dbl_f, "s0", "k1", "r", "t2", "");
    F(ref_dbl_f, "t0", "t0", "r");       F(ref_dbl_f, "t1", "s1", "k0");
    F(ref_dbl_f, "r", "t0", "s1");       F(ref_dbl_f, "t3", "U0", "k0");
    F(ref_dbl_f, "l2", "s1", "t2");      F(ref_dbl_f, "l0", "s0", "t3");
    F(ref_dbl_f, "p", "t2", "", "t3", "");  F(ref_dbl_f, "q", "s0", "", "s1", "");
    F(ref_dbl_f, "l1", "p", "q");
    F(ref_dbl_f, "l1", "l1", "", "l2", "");  F(ref_dbl_f, "l1", "l1", "", "l0", "");
    F(ref_dbl_f, "U0p", "s0", "s0", "r", "");
    F(ref_dbl_f, "U1p", "t0", "t0");
    F(ref_dbl_f, "a", "s0", "s1", "U1p", "");
    F(ref_dbl_f, "s1", "s1", "s1");
    F(ref_dbl_f, "l2", "l2", "", "a", "");
    F(ref_dbl_f, "b", "U0p", "", "l1", "");
    F(ref_dbl_f, "Zp", "s1", "r");       F(ref_dbl_f, "t2", "r", "t1");
    F(ref_dbl_f, "t0", "U0p", "l2", "l0", "s1");
    F(ref_dbl_f, "t1", "U1p", "l2", "s1", "b");
    F(ref_dbl_f, "U1", "U1p", "r");      F(ref_dbl_f, "U0", "U0p", "r");
    F(ref_dbl_f, "V0", "t2", "V0", "t0", "");
    F(ref_dbl_f, "V1", "t2", "V1", "t1", "");
    F(ref_dbl_f, "V1", "V1", "", "Zp", "");
    F(ref_dbl_f, "Z", "Zp", "");
    // mixed addition, D1 = [PU1, PU0, PVX, PV0] affine, D2 = accumulator
    F(ref_add_f, "t1", "PU1", "Z", "U1", "");
    F(ref_add_f, "t2", "PU0", "Z", "U0", "");
    F(ref_add_f, "t0", "PU1", "t1", "t2", "");
    F(ref_add_f, "a", "t1", "t1");
    F(ref_add_f, "r", "t0", "t2", "a", "PU0");
    F(ref_add_f, "t4", "PV0", "Z", "V0", "");
    F(ref_add_f, "t5", "PVX", "Z", "V1", "");
    F(ref_add_f, "w2", "t0", "t4");
    F(ref_add_f, "b", "t0", "", "t1", "");
    F(ref_add_f, "w3", "t1", "t5");
    F(ref_add_f, "p", "t4", "", "t5", "");
    F(ref_add_f, "b", "b", "p");
    F(ref_add_f, "p", "one", "", "PU1", "");
    F(ref_add_f, "a", "w3", "p");
    F(ref_add_f, "b", "w2", "", "b", "");
    F(ref_add_f, "s1", "a", "", "b", "");
    F(ref_add_f, "s0", "w2", "", "PU0", "w3");
    F(ref_add_f, "R", "Z", "r");
    F(ref_add_f, "s3", "s1", "Z");
    F(ref_add_f, "Rt", "R", "s3");
    F(ref_add_f, "s0", "s0", "Z");
    F(ref_add_f, "S", "s0", "s1");
    F(ref_add_f, "S3", "s3", "s3");
    F(ref_add_f, "St", "s3", "s1");
    F(ref_add_f, "Stt", "s0", "s3");
    F(ref_add_f, "Rtt", "Rt", "St");
    F(ref_add_f, "l2", "St", "U1");
    F(ref_add_f, "l0", "S", "U0");
    F(ref_add_f, "p", "Stt", "", "S", "");
    F(ref_add_f, "q", "U1", "", "U0", "");
    F(ref_add_f, "l1", "p", "q");
    F(ref_add_f, "l1", "l0", "", "l1", "");
    F(ref_add_f, "l1", "l1", "", "l2", "");
    F(ref_add_f, "l2", "l2", "", "Stt", "");
    F(ref_add_f, "a", "t1", "r");
    F(ref_add_f, "b", "s1", "s1");
    F(ref_add_f, "c", "s1", "Z");
    F(ref_add_f, "b", "b", "t1");
    F(ref_add_f, "p", "a", "", "c", "");
    F(ref_add_f, "a", "R", "p");
    F(ref_add_f, "p", "t1", "", "U1", "");
    F(ref_add_f, "b", "b", "p");
    F(ref_add_f, "d", "t2", "St", "s0", "s0");
    F(ref_add_f, "U0p", "b", "", "d", "");
    F(ref_add_f, "U0p", "U0p", "", "a", "");
    F(ref_add_f, "U1p", "St", "t1", "R", "R");
    F(ref_add_f, "p", "U0p", "", "l1", "");
    F(ref_add_f, "b", "S3", "p");
    F(ref_add_f, "l2", "l2", "", "U1p", "");
    F(ref_add_f, "t4", "U0p", "l2", "S3", "l0");
    F(ref_add_f, "Zp", "Rt", "S3");
    F(ref_add_f, "t5", "U1p", "l2", "b", "");
    F(ref_add_f, "U1", "Rt", "U1p");
    F(ref_add_f, "U0", "Rt", "U0p");
    F(ref_add_f, "V0", "Rtt", "V0", "t4", "");
    F(ref_add_f, "V1", "Rtt", "V1", "Zp", "");
    F(ref_add_f, "V1", "t5", "", "V1", "");
    F(ref_add_f, "Z", "Zp", "");
  endfunction

  // ---- conversion to affine: Itoh-Tsujii inversion of Z, four products ----
  task automatic square_c1();
    issue(OP_C1_TO_A1);
    issue(OP_C1_TO_B1);
    issue(OP_DO_MULT1);
  endtask

  task automatic to_affine();
    int k = 1;
    int chain[8] = '{2, 4, 5, 10, 20, 40, 41, 82};
    int Z = v("Z"), ZI = v("zi"), BETA = v("beta");
    n_mult1 = 0;
    uop(OP_DO_ADD1, Z, v("zero"), -1, -1, -1, -1, -1, -1);      // C1 = Z = beta_1
    foreach (chain[i]) begin
      if (chain[i] == 2 * k) begin                            // beta_2k = beta_k^(2^k) * beta_k
        from_c(1, BETA);
        to_reg(OP_OUTWORD_TO_D1, BETA);
        repeat (k) square_c1();
      end else begin                                          // beta_k+1 = beta_k^2 * a
        to_reg(OP_OUTWORD_TO_D1, Z);
        square_c1();
      end
      issue(OP_C1_TO_B1);
      issue(OP_D1_TO_A1);
      issue(OP_DO_MULT1);
      k = chain[i];
    end
    square_c1();                                              // Z^(2^83 - 2) = 1/Z
    from_c(1, ZI);
    rel("beta");
    checks++;
    if (n_mult1 != 90) begin
      failures++;
      $display("FAIL inversion used %0d multiplications, expected 90", n_mult1);
    end
    uop(OP_MULTI_MULT, v("U1"), ZI, -1, v("U0"), ZI, -1, v("U1"), v("U0"));
    uop(OP_MULTI_MULT, v("V1"), ZI, -1, v("V0"), ZI, -1, v("V1"), v("V0"));
  endtask

  function automatic elem_t ref_inv(elem_t x);
    elem_t s = x, r = 84'h1;
    for (int i = 1; i < 83; i++) begin
      s = gf_sq(s);        // x^(2^i)
      r = gf_mul(r, s);
    end
    return r;              // x^(2 + 4 + ... + 2^82) = x^(2^83 - 2)
  endfunction

  task automatic check(string what, elem_t got, elem_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s = %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    elem_t pu1, pu0, pv1, pv0, f3, got, zinv;
    logic [SCALAR_BITS-1:0] kscal;
    int naf[$];
    longint c0, i0, c_dbl = 0, c_add = 0, c_conv = 0, i_dbl = 0, i_add = 0, i_conv = 0;
    longint c_start, i_start, c_end, i_end, c_io, i_io;
    int n_dbl = 0, n_add = 0;
    logic [SCALAR_BITS+1:0] kk;

    build_dbl(prog_dbl);
    build_add(prog_add);
    build_ref();
    repeat (3) @(posedge clk);
    rst_n = 1;

    pu1 = rand_elem(); pu0 = rand_elem(); pv1 = rand_elem(); pv0 = rand_elem(); f3 = rand_elem();
    kscal = '0;
    for (int i = 0; i < SCALAR_BITS; i += 32) kscal = (kscal << 32) | SCALAR_BITS'($urandom());
    kscal[SCALAR_BITS-1] = 1'b1;

    // NAF recoding, least significant digit first
    kk = (SCALAR_BITS+2)'(kscal);
    while (kk != 0) begin
      if (kk[0]) begin
        if (kk[1]) begin naf.push_back(-1); kk = kk + 1; end
        else       begin naf.push_back(1);  kk = kk - 1; end
      end else naf.push_back(0);
      kk = kk >> 1;
    end

    c_start = cycle; i_start = n_instr;
    put(v("PU1"), pu1); put(v("PU0"), pu0); put(v("PV1"), pv1); put(v("PV0"), pv0);
    put(v("PNV1"), pv1 ^ 84'h1);
    put(v("f3"), f3); put(v("one"), 84'h1); put(v("zero"), 84'h0);
    put(v("U1"), pu1); put(v("U0"), pu0); put(v("V1"), pv1); put(v("V0"), pv0);
    put(v("Z"), 84'h1);
    c_io = cycle - c_start; i_io = n_instr - i_start;
    rv["PU1"] = pu1; rv["PU0"] = pu0; rv["PV0"] = pv0; rv["f3"] = f3; rv["one"] = 84'h1;
    rv["U1"] = pu1; rv["U0"] = pu0; rv["V1"] = pv1; rv["V0"] = pv0; rv["Z"] = 84'h1;

    for (int i = naf.size() - 2; i >= 0; i--) begin
      c0 = cycle; i0 = n_instr;
      run(prog_dbl);
      c_dbl += cycle - c0; i_dbl += n_instr - i0; n_dbl++;
      eval(ref_dbl_f);
      if (naf[i] != 0) begin
        pvx = (naf[i] > 0) ? "PV1" : "PNV1";
        rv["PVX"] = (naf[i] > 0) ? pv1 : (pv1 ^ 84'h1);
        c0 = cycle; i0 = n_instr;
        run(prog_add);
        c_add += cycle - c0; i_add += n_instr - i0; n_add++;
        eval(ref_add_f);
      end
      if (i == naf.size() - 2) begin   // spot-check the projective accumulator once
        get(v("Z"), got); check("Z after first step", got, rv["Z"]);
        get(v("V1"), got); check("V1 after first step", got, rv["V1"]);
      end
    end
    get(v("Z"), got); check("projective Z", got, rv["Z"]);

    c0 = cycle; i0 = n_instr;
    to_affine();
    c_conv = cycle - c0; i_conv = n_instr - i0;
    zinv = ref_inv(rv["Z"]);
    checks++;
    if (rv["Z"] != 0 && gf_mul(zinv, rv["Z"]) != 84'h1) begin
      failures++;
      $display("FAIL reference inverse is wrong");
    end
    c0 = cycle; i0 = n_instr;         // read-out of the affine result is I/O
    get(v("U1"), got);  check("u1", got, gf_mul(rv["U1"], zinv));
    get(v("U0"), got);  check("u0", got, gf_mul(rv["U0"], zinv));
    get(v("V1"), got);  check("v1", got, gf_mul(rv["V1"], zinv));
    get(v("V0"), got);  check("v0", got, gf_mul(rv["V0"], zinv));
    c_io += cycle - c0; i_io += n_instr - i0;
    c_end = cycle; i_end = n_instr;
    get(v("zi"), got);  check("1/Z", got, zinv);

    checks++;
    if (peak > 32) begin
      failures++;
      $display("FAIL %0d variables live at once, the RAM holds 32", peak);
    end
    $display("scalar: %0d bits, %0d doublings, %0d additions; peak %0d of 32 variables live",
             SCALAR_BITS, n_dbl, n_add, peak);
    $display("per doubling:   %0d cycles, %0d instructions", c_dbl / n_dbl, i_dbl / n_dbl);
    $display("per addition:   %0d cycles, %0d instructions", c_add / n_add, i_add / n_add);
    $display("conversion:     %0d cycles, %0d instructions", c_conv, i_conv);
    $display("I/O transfer:   %0d cycles, %0d instructions (13 elements in, 4 out)", c_io, i_io);
    $display("scalar mult:    %0d cycles, %0d instructions (incl. I/O)", c_end - c_start,
             i_end - i_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
