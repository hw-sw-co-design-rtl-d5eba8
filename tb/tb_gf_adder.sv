// tb_gf_adder: self-checking test of the bit-parallel GF(2^m) adder.
// Random and corner operands; the expected sum is formed bit by bit.
module tb_gf_adder;
  localparam int W = 84;
  logic [W-1:0] a, b, s, exp_s;
  int checks = 0, failures = 0;

  gf_adder dut (.a, .b, .s);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      a = {$urandom(), $urandom(), $urandom()} ;
      b = {$urandom(), $urandom(), $urandom()} ;
      if (n == 0) begin a = '0; b = '1; end
      if (n == 1) b = a;
      #1;
      for (int i = 0; i < W; i++) exp_s[i] = (a[i] != b[i]);
      checks++;
      if (s !== exp_s) begin
        failures++;
        $display("FAIL a=%h b=%h s=%h exp=%h", a, b, s, exp_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
