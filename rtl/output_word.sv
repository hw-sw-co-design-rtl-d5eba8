// output_word: the 84-bit Output-word register.
//
// Every value read from the local RAM lands here, 32 bits per cycle into the
// lane selected by lane_sel (lane 0 = bits 31:0, lane 1 = bits 63:32, lane 2 =
// bits 83:64, the upper 12 RAM bits dropped). The whole word feeds the
// datapath input (Outword-to-A1 etc.). A byte multiplexer drives the 8-bit
// Data-out port: Get-data-out latches a byte index (0 = bits 7:0 ... 10 = bits
// 83:80, zero-extended) and Data-out shows that byte of the word from the next
// edge on, following the word if it changes. The byte-index form of the
// multiplexer select is this design's choice.
module output_word #(
  parameter int unsigned W  = 84,
  parameter int unsigned PW = 8,
  parameter int unsigned RW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ld_lane,
  input  logic [1:0]    lane_sel,
  input  logic [RW-1:0] ram_in,
  input  logic          ld_byte_sel,
  input  logic [3:0]    byte_sel,
  output logic [PW-1:0] port_out,
  output logic [W-1:0]  word
);
  localparam int unsigned NL = (W + RW - 1) / RW;
  localparam int unsigned NB = (W + PW - 1) / PW;

  logic [NL*RW-1:0] ext_q;
  logic [3:0]       sel_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ext_q <= '0;
      sel_q <= '0;
    end else begin
      if (ld_lane)
        for (int i = 0; i < NL; i++)
          if (lane_sel == 2'(i)) ext_q[i*RW +: RW] <= ram_in;
      if (ld_byte_sel) sel_q <= byte_sel;
    end
  end

  assign word = ext_q[W-1:0];

  always_comb begin
    logic [NB*PW-1:0] bytes;
    bytes    = (NB*PW)'(word);
    port_out = '0;
    for (int i = 0; i < NB; i++)
      if (sel_q == 4'(i)) port_out = bytes[i*PW +: PW];
  end
endmodule
