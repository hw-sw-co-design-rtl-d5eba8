// tb_output_word: self-checking test of the 84-bit Output-word register.
// Loads random words lane by lane as the RAM delivers them, checks the word
// seen by the datapath, and reads every byte through the Data-out multiplexer.
module tb_output_word;
  logic        clk = 0, rst_n = 0, ld_lane = 0, ld_byte_sel = 0;
  logic [1:0]  lane_sel = '0;
  logic [31:0] ram_in = '0;
  logic [3:0]  byte_sel = '0;
  logic [7:0]  port_out, expb;
  logic [83:0] word;
  logic [95:0] lanes;
  int checks = 0, failures = 0;

  output_word dut (.clk, .rst_n, .ld_lane, .lane_sel, .ram_in, .ld_byte_sel,
                   .byte_sel, .port_out, .word);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 30; n++) begin
      lanes = {$urandom(), $urandom(), $urandom()};
      for (int l = 0; l < 3; l++) begin
        @(negedge clk); ld_lane = 1; lane_sel = 2'(l); ram_in = lanes[l*32 +: 32];
      end
      @(negedge clk); ld_lane = 0; ram_in = $urandom();
      checks++;
      if (word !== lanes[83:0]) begin
        failures++;
        $display("FAIL word %h expected %h", word, lanes[83:0]);
      end
      for (int k = 0; k < 11; k++) begin
        @(negedge clk); ld_byte_sel = 1; byte_sel = 4'(k);
        @(negedge clk); ld_byte_sel = 0; byte_sel = 4'($urandom());
        expb = (k == 10) ? {4'h0, lanes[83:80]} : lanes[k*8 +: 8];
        checks++;
        if (port_out !== expb) begin
          failures++;
          $display("FAIL byte %0d = %h expected %h", k, port_out, expb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
