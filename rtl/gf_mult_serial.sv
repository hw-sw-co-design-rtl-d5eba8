// gf_mult_serial: bit-serial GF(2^m) multiplier, most significant bit first.
//
// Computes p = a * b mod F(x) with one bit of b per clock cycle. Every cycle the
// accumulator is multiplied by x (shift left, reduced by F(x) when bit m falls
// out) and a is added when the current bit of b is one. The operands are W-bit
// words (W = 84, the coprocessor word) holding reduced m-bit elements (m = 83),
// so all W bits of b are scanned and a multiplication takes W = 84 cycles, as
// the design specifies; the serial structure and the interleaved reduction are
// this design's choice for the "bit-serial multiplier" it names.
//
// Timing: start is sampled on a rising edge while the unit is idle (busy = 0);
// the operands are captured there. The next W rising edges each process one bit.
// During the cycle before the W-th of those edges, done = 1 and p already holds
// the final product, so a register loaded "on done" has the product exactly W
// cycles after the start edge. A start while busy is ignored. Bit m..W-1 of a
// must be zero (reduced operands); p[W-1:m] is always zero.
module gf_mult_serial #(
  parameter int unsigned W    = 84,
  parameter int unsigned M    = 83,
  parameter logic [M-1:0] POLY = M'(83'h95)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] p
);
  localparam int unsigned CW = $clog2(W + 1);

  logic [M-1:0]  acc_q, acc_d;
  logic [M-1:0]  a_q;
  logic [W-1:0]  b_q;
  logic [CW-1:0] cnt_q;

  // One MSB-first step: acc*x mod F, plus a if the scanned bit of b is set.
  always_comb begin
    logic [M-1:0] sh;
    sh    = {acc_q[M-2:0], 1'b0} ^ (acc_q[M-1] ? POLY : '0);
    acc_d = sh ^ (b_q[W-1] ? a_q : '0);
  end

  assign busy = (cnt_q != '0);
  assign done = (cnt_q == CW'(1));
  assign p    = W'(acc_d);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q <= '0;
      a_q   <= '0;
      b_q   <= '0;
      cnt_q <= '0;
    end else if (!busy) begin
      if (start) begin
        acc_q <= '0;
        a_q   <= a[M-1:0];
        b_q   <= b;
        cnt_q <= CW'(W);
      end
    end else begin
      acc_q <= acc_d;
      b_q   <= {b_q[W-2:0], 1'b0};
      cnt_q <= cnt_q - CW'(1);
    end
  end
endmodule
