// tb_cordic_atan2: feeds one random vector per clock (all four quadrants, the
// axes and large and medium magnitudes) and compares each angle with $atan2 in
// floating point; the result must arrive exactly STAGES+1 clocks later.
module tb_cordic_atan2;
  localparam int STAGES = 30;
  localparam real Q29 = 536870912.0;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [39:0] x = 0, y = 0;
  logic signed [31:0] angle;
  int checks = 0, failures = 0;
  real exp_q [$];
  int  tin_q [$];
  real tol_q [$];
  int  cyc = 0;

  cordic_atan2 #(.IN_W(40), .W(42), .STAGES(STAGES)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(posedge clk) if (rst_n && out_valid) begin
    real e, got, d, tol;
    int t0;
    e  = exp_q.pop_front();
    t0 = tin_q.pop_front();
    tol = tol_q.pop_front();
    got = real'(angle) / Q29;
    d = got - e;
    if (d > 3.14159) d = d - 6.283185307179586;
    if (d < -3.14159) d = d + 6.283185307179586;
    checks += 2;
    if (d > tol || d < -tol) begin
      failures++;
      $display("FAIL angle got %f exp %f", got, e);
    end
    if (cyc - t0 != STAGES + 1) begin
      failures++;
      $display("FAIL latency %0d", cyc - t0);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      case (i % 6)
        0: begin x = 40'(signed'($urandom)); y = 40'(signed'($urandom)); end
        1: begin x = 40'(signed'($urandom)) <<< 6; y = 40'(signed'($urandom)) <<< 6; end
        2: begin x = 40'(signed'($urandom)) >>> 8; y = 40'(signed'($urandom)) >>> 8; end
        3: begin x = -40'sd10000000; y = 40'($urandom_range(0,1)) * 40'sd1000; end
        4: begin x = 0; y = ($urandom_range(0,1) != 0) ? 40'sd7000000 : -40'sd7000000; end
        default: begin x = 40'sd123456789; y = 0; end
      endcase
      if (in_valid && (x != 0 || y != 0) && (x > 40'sd4000 || x < -40'sd4000 || y > 40'sd4000 || y < -40'sd4000)) begin
        exp_q.push_back($atan2(real'(y), real'(x)));
        tin_q.push_back(cyc);
        tol_q.push_back(2.0e-6 + 4.0 / $sqrt(real'(x) * real'(x) + real'(y) * real'(y)));
      end else in_valid = 0;
    end
    @(negedge clk); in_valid = 0;
    repeat (STAGES + 5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL missing results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
