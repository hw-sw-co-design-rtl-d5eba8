// hecc_pkg: types and constants shared by the GF(2^83) microcode coprocessor.
//
// Field elements are 83-bit polynomials over GF(2) in polynomial basis, carried
// in 84-bit words (the coprocessor word length); bit 83 of a reduced element is
// zero. The reduction polynomial F(x) = x^83 + x^7 + x^4 + x^2 + 1 is this
// design's choice (an irreducible pentanomial); the instruction encoding and the
// datapath control word are this design's own as well. The instruction names
// and the microcode sequences follow the coprocessor's published instruction set.
package hecc_pkg;

  localparam int unsigned FIELD_M  = 83;   // field degree m
  localparam int unsigned WORD_W   = 84;   // datapath / input-word / output-word width
  localparam int unsigned RAM_W    = 32;   // local storage word width
  localparam int unsigned RAM_D    = 128;  // local storage depth
  localparam int unsigned RAM_AW   = 7;    // local storage address width
  localparam int unsigned PORT_W   = 8;    // microcontroller port width

  // Low-order terms of F(x) (everything below x^83): x^7 + x^4 + x^2 + 1.
  localparam logic [FIELD_M-1:0] FIELD_POLY = FIELD_M'(83'h95);

  // 8-bit instruction codes presented on the Instruction port.
  typedef enum logic [7:0] {
    OP_NOP            = 8'h00,
    // data transfer (Table "single instructions")
    OP_LOAD_DATA_IN   = 8'h01,  // Input-word <- {Input-word, Data-in} (8-bit shift)
    OP_GET_DATA_OUT   = 8'h02,  // Data-out   <- byte addr[3:0] of Output-word
    OP_LOAD_TO_RAM    = 8'h03,  // RAM[addr..addr+2] <- Input-word
    OP_READ_FROM_RAM  = 8'h04,  // Output-word <- RAM[addr..addr+2]
    OP_C1_TO_INWORD   = 8'h05,
    OP_C2_TO_INWORD   = 8'h06,
    OP_OUTWORD_TO_A1  = 8'h08,
    OP_OUTWORD_TO_B1  = 8'h09,
    OP_OUTWORD_TO_D1  = 8'h0A,
    OP_OUTWORD_TO_A2  = 8'h0B,
    OP_OUTWORD_TO_B2  = 8'h0C,
    OP_OUTWORD_TO_D2  = 8'h0D,
    // single datapath operations
    OP_DO_MULT1       = 8'h10,  // C1 = A1 * B1
    OP_DO_MULT2       = 8'h11,  // C2 = A2 * B2
    OP_DO_ADD1        = 8'h12,  // C1 = A1 + B1
    OP_DO_ADD2        = 8'h13,  // C2 = A2 + B2
    OP_C1_TO_B1       = 8'h14,
    OP_D1_TO_A1       = 8'h15,
    OP_C2_TO_B2       = 8'h16,
    OP_D2_TO_A2       = 8'h17,
    OP_C2_TO_A1       = 8'h18,
    OP_C1_TO_A2       = 8'h19,
    OP_C1_TO_A1       = 8'h1A,
    OP_C2_TO_A2       = 8'h1B,
    // microcode instructions (combinations of the above)
    OP_MULTI_MULT     = 8'h20,  // C1 = A1*B1            ; C2 = A2*B2
    OP_ADD_MULT       = 8'h21,  // C1 = A1+B1            ; C2 = A2*B2
    OP_TWOADD_MULT    = 8'h22,  // C1 = (A1+B1)*(A2+B2)
    OP_TWOMULT_ADD    = 8'h23,  // C1 = (A1*B1)+(A2*B2)
    OP_MULTIADD_MULT  = 8'h24,  // C1 = A1*B1 + D1       ; C2 = A2*B2
    OP_TWO_MULTADD    = 8'h25   // C1 = A1*B1 + D1       ; C2 = A2*B2 + D2
  } opcode_e;

  // Source of an A register (four-input multiplexer in front of A1/A2).
  typedef enum logic [2:0] {
    A_HOLD  = 3'd0,
    A_IN    = 3'd1,   // datapath input (Output-word)
    A_D     = 3'd2,   // own lane's D register
    A_CX    = 3'd3,   // other lane's C register (cross connection)
    A_C     = 3'd4    // own lane's C register
  } a_sel_e;

  // Source of a B register (two-input multiplexer in front of B1/B2).
  typedef enum logic [1:0] {
    B_HOLD  = 2'd0,
    B_IN    = 2'd1,   // datapath input (Output-word)
    B_C     = 2'd2    // own lane's C register (feedback)
  } b_sel_e;

  // Operation that writes the lane's C register.
  typedef enum logic [1:0] {
    C_HOLD  = 2'd0,
    C_MUL   = 2'd1,   // start the bit-serial multiplier; C written when it finishes
    C_ADD   = 2'd2    // C <= A + B in one cycle
  } c_op_e;

  typedef struct packed {
    a_sel_e a_sel;
    b_sel_e b_sel;
    logic   d_ld;     // D <= datapath input
    c_op_e  c_op;
  } lane_ctl_t;

  typedef struct packed {
    lane_ctl_t l1;
    lane_ctl_t l2;
  } dp_ctl_t;

  localparam lane_ctl_t LANE_IDLE = '{a_sel: A_HOLD, b_sel: B_HOLD, d_ld: 1'b0, c_op: C_HOLD};
  localparam dp_ctl_t   DP_IDLE   = '{l1: LANE_IDLE, l2: LANE_IDLE};

endpackage
