// tb_lcg: checks the LCG against an independent 64-bit software model over
// many steps, including a reseed in the middle, holding when `next` is low and
// the one-clock update latency.
module tb_lcg;
  logic clk = 0, rst_n = 0, seed_load = 0, next = 0;
  logic [31:0] seed = 0, value;
  int checks = 0, failures = 0;
  longint unsigned model;

  lcg dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [31:0] exp, input string what);
    checks++;
    if (value !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, value, exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); seed = 32'd12345; seed_load = 1;
    @(negedge clk); seed_load = 0;
    model = 12345;
    chk(32'(model), "seed");
    for (int i = 0; i < 500; i++) begin
      next = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      if (next) model = (model * 1664525 + 1013904223) % (64'd1 << 32);
      chk(32'(model), "step");
    end
    next = 0;
    seed = $urandom; seed_load = 1; next = 1;
    @(negedge clk); seed_load = 0; next = 0;
    model = seed;
    chk(32'(model), "reseed over next");
    next = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      model = (model * 1664525 + 1013904223) % (64'd1 << 32);
      chk(32'(model), "run");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
