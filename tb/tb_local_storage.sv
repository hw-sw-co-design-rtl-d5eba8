// tb_local_storage: self-checking test of the 128 x 32-bit local RAM.
// Fills every word with a random value kept in a scoreboard, reads all back
// in a shuffled order (one-cycle read latency), overwrites some and rereads,
// and checks that rdata holds between reads.
module tb_local_storage;
  logic        clk = 0, rd = 0, wr = 0;
  logic [6:0]  addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] model [128];
  int checks = 0, failures = 0;

  local_storage dut (.clk, .rd, .wr, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(int a, logic [31:0] d);
    @(negedge clk); wr = 1; rd = 0; addr = 7'(a); wdata = d;
    @(posedge clk); model[a] = d;
    @(negedge clk); wr = 0;
  endtask

  task automatic read_check(int a);
    @(negedge clk); rd = 1; addr = 7'(a);
    @(posedge clk);
    @(negedge clk); rd = 0; addr = 7'($urandom());
    checks++;
    if (rdata !== model[a]) begin
      failures++;
      $display("FAIL addr %0d read %h expected %h", a, rdata, model[a]);
    end
    @(negedge clk);
    checks++;
    if (rdata !== model[a]) begin
      failures++;
      $display("FAIL rdata did not hold for addr %0d", a);
    end
  endtask

  initial begin
    for (int i = 0; i < 128; i++) write(i, $urandom());
    for (int i = 0; i < 128; i++) read_check((i * 37 + 11) % 128);
    for (int i = 0; i < 20; i++) write($urandom_range(127), $urandom());
    for (int i = 0; i < 128; i++) read_check(i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
