// local_storage: the coprocessor's local RAM, 128 words of 32 bits.
//
// Holds the temporary GF(2^83) variables of the divisor routines: a variable
// occupies a group of four consecutive words (32 variables), of which the
// first three carry its 84 bits. Single port: one read (rd) or one write (wr)
// per cycle at the 7-bit address. The read is synchronous: rdata shows the
// addressed word from the edge after rd is sampled and holds until the next
// read. Write has priority if both are asserted. Depth and width follow the
// design; the synchronous single-port form is this design's choice.
module local_storage #(
  parameter int unsigned DW    = 32,
  parameter int unsigned DEPTH = 128,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rd,
  input  logic          wr,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr)      mem[addr] <= wdata;
    else if (rd) rdata     <= mem[addr];
  end
endmodule
