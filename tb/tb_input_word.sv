// tb_input_word: self-checking test of the 84-bit Input-word register.
// Shifts random words in byte by byte (most significant byte first), loads
// others from the datapath side, and checks the word and the three 32-bit
// lanes offered to the RAM.
module tb_input_word;
  logic        clk = 0, rst_n = 0, ld_port = 0, ld_dp = 0;
  logic [7:0]  port_in = '0;
  logic [83:0] dp_in = '0, word, expw;
  logic [1:0]  lane_sel = '0;
  logic [31:0] lane_out, expl;
  int checks = 0, failures = 0;

  input_word dut (.clk, .rst_n, .ld_port, .port_in, .ld_dp, .dp_in, .lane_sel,
                  .lane_out, .word);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_lanes(logic [83:0] w);
    checks++;
    if (word !== w) begin
      failures++;
      $display("FAIL word %h expected %h", word, w);
    end
    for (int l = 0; l < 3; l++) begin
      lane_sel = 2'(l);
      #1;
      expl = (l == 0) ? w[31:0] : (l == 1) ? w[63:32] : {12'h0, w[83:64]};
      checks++;
      if (lane_out !== expl) begin
        failures++;
        $display("FAIL lane %0d = %h expected %h", l, lane_out, expl);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 30; n++) begin
      expw = {$urandom(), $urandom(), $urandom()};
      if (n[0]) begin
        for (int k = 10; k >= 0; k--) begin
          @(negedge clk);
          ld_port = 1;
          port_in = (k == 10) ? {4'h0, expw[83:80]} : expw[k*8 +: 8];
        end
        @(negedge clk); ld_port = 0;
      end else begin
        @(negedge clk); ld_dp = 1; dp_in = expw; ld_port = 1; port_in = 8'hA5;
        @(negedge clk); ld_dp = 0; ld_port = 0;
      end
      check_lanes(expw);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
