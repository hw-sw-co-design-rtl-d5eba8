// gf_adder: bit-parallel GF(2^m) adder.
//
// Addition in a binary field is the bitwise XOR of the two coefficient
// vectors, so the result is available in the same clock cycle (purely
// combinational). Width W defaults to the 84-bit coprocessor word. Used as Add1
// and Add2 of the dual-multiplier/dual-adder datapath.
module gf_adder #(
  parameter int unsigned W = 84
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);
  always_comb s = a ^ b;
endmodule
