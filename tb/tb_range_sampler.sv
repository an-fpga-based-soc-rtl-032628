// tb_range_sampler: random bounds and fractions; the result must equal
// lo + r*(hi-lo) computed in floating point to within one LSB, must lie in
// [lo, hi] and must appear one clock after the request.
module tb_range_sampler;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [31:0] r = 0;
  logic signed [31:0] lo = 0, hi = 0, x;
  int checks = 0, failures = 0;

  range_sampler dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real exp;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      lo = $signed($urandom) >>> $urandom_range(1, 8);
      hi = lo + $signed($urandom_range(0, 32'h3fffffff) >> $urandom_range(0, 20));
      if (i % 7 == 0) begin lo = -32'sd5000; hi = 32'sd5000; end
      r  = (i == 0) ? 32'd0 : (i == 1) ? 32'hFFFF_FFFF : $urandom;
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      exp = real'(lo) + (real'(r) / 4294967296.0) * (real'(hi) - real'(lo));
      checks++;
      if (!out_valid || (real'(x) - exp) > 1.0 || (exp - real'(x)) > 1.0 || x < lo || (x > hi)) begin
        failures++;
        $display("FAIL lo=%0d hi=%0d r=%h x=%0d exp=%f v=%b", lo, hi, r, x, exp, out_valid);
      end
      checks++;
      @(negedge clk);
      if (out_valid) begin failures++; $display("FAIL valid held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
