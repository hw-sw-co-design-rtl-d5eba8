// input_word: the 84-bit Input-word register.
//
// Every value on its way into the local RAM passes through this register. It is
// loaded either from the microcontroller, 8 bits per Load-data-in (the word
// shifts left by 8 and the new byte enters at the bottom, so a word is sent
// most significant byte first in 11 transfers, the top 4 bits of the first byte
// falling off the 84-bit word), or in one cycle from the datapath output
// (C1-to-inword / C2-to-inword). A multiplexer presents one 32-bit lane to the
// RAM: lane 0 = bits 31:0, lane 1 = bits 63:32, lane 2 = bits 83:64 zero-extended.
// Loads take effect at the next rising edge; the datapath load wins if both
// are requested. The shift order and lane split are this design's choices.
module input_word #(
  parameter int unsigned W  = 84,
  parameter int unsigned PW = 8,
  parameter int unsigned RW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ld_port,   // shift in one byte from Data-in
  input  logic [PW-1:0] port_in,
  input  logic          ld_dp,     // load the whole word from the datapath
  input  logic [W-1:0]  dp_in,
  input  logic [1:0]    lane_sel,  // 32-bit lane presented to the RAM
  output logic [RW-1:0] lane_out,
  output logic [W-1:0]  word
);
  localparam int unsigned NL = (W + RW - 1) / RW;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       word <= '0;
    else if (ld_dp)   word <= dp_in;
    else if (ld_port) word <= {word[W-PW-1:0], port_in};
  end

  always_comb begin
    logic [NL*RW-1:0] ext;
    ext      = (NL*RW)'(word);
    lane_out = '0;
    for (int i = 0; i < NL; i++)
      if (lane_sel == 2'(i)) lane_out = ext[i*RW +: RW];
  end
endmodule
