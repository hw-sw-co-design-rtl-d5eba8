// tb_gf_mult_serial: self-checking test of the bit-serial GF(2^83) multiplier.
// Known products (x * x^82 = x^83 reduced, 1 * a = a) and random products are
// compared with the reference model; the number of cycles from the start edge
// to the edge at which the product is captured must be 84. A start during a
// running multiplication must be ignored.
module tb_gf_mult_serial;
  import gf_ref_pkg::*;
  localparam int W = 84;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  elem_t a, b, p, got, expv;
  int checks = 0, failures = 0, cycles;

  gf_mult_serial dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .p);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(elem_t x, elem_t y, bit poke_start);
    @(negedge clk);
    a = x; b = y; start = 1;
    @(posedge clk);
    cycles = 0;
    @(negedge clk);
    start = poke_start;           // a start while busy must be ignored
    a = rand_elem(); b = rand_elem();
    while (!done) begin
      @(posedge clk); cycles++;
      @(negedge clk);
    end
    got = p;
    @(posedge clk); cycles++;
    start = 0;
    expv = gf_mul(x, y);
    checks++;
    if (got !== expv) begin
      failures++;
      $display("FAIL %h * %h = %h, expected %h", x, y, got, expv);
    end
    checks++;
    if (cycles != 84) begin
      failures++;
      $display("FAIL latency %0d cycles, expected 84", cycles);
    end
    @(negedge clk);
    checks++;
    if (busy) begin
      failures++;
      $display("FAIL still busy after the product");
    end
  endtask

  initial begin
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(84'h2, 84'h1 << 82, 0);
    checks++;
    if (got !== 84'h95) begin
      failures++;
      $display("FAIL x^83 reduced to %h", got);
    end
    run(84'h1, 84'h5_5555_5555_5555_5555_5555, 0);
    checks++;
    if (got !== 84'h5_5555_5555_5555_5555_5555) begin
      failures++;
      $display("FAIL 1*a = %h", got);
    end
    for (int n = 0; n < 40; n++) run(rand_elem(), rand_elem(), n[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
