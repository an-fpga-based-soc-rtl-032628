// tb_pheromone_unit: initial value 1.0, then random evaporation rates and
// deposits; each level must follow tau <- (1-rho)*tau + deposit computed in
// floating point (within 1 LSB of truncation), saturate at the top and return
// to 1.0 on init.
module tb_pheromone_unit;
  localparam int ND = 6;
  logic clk = 0, rst_n = 0, init = 0, update = 0;
  logic [15:0] rho = 0;
  logic [31:0] deposit = 0;
  logic [31:0] tau [ND];
  real model [ND];
  int checks = 0, failures = 0;

  pheromone_unit #(.NUM_DIMS(ND)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all(input string what);
    for (int d = 0; d < ND; d++) begin
      real got;
      got = real'(tau[d]) / 65536.0;
      checks++;
      if (got - model[d] > 2.0 / 65536.0 * (1.0 + model[d] / 1000.0) || model[d] - got > (2.0 + model[d] * 0.01) / 65536.0 * 8.0) begin
        failures++;
        $display("FAIL %s d=%0d got %f exp %f", what, d, got, model[d]);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); init = 1;
    @(negedge clk); init = 0;
    for (int d = 0; d < ND; d++) model[d] = 1.0;
    check_all("init");
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      rho = 16'($urandom);
      deposit = $urandom >> $urandom_range(8, 31);
      update = ($urandom_range(0, 3) != 0);
      if (i % 500 == 499) begin init = 1; update = 1; end
      @(negedge clk);
      if (init) for (int d = 0; d < ND; d++) model[d] = 1.0;
      else if (update)
        for (int d = 0; d < ND; d++) begin
          model[d] = (1.0 - real'(rho) / 65536.0) * model[d] + real'(deposit) / 65536.0;
          if (model[d] > 65535.99998) model[d] = 65535.99998;
        end
      init = 0; update = 0;
      check_all("update");
    end
    // saturation
    @(negedge clk); rho = 0; deposit = 32'hF000_0000; update = 1;
    @(negedge clk); @(negedge clk); update = 0;
    checks++;
    if (tau[0] !== 32'hFFFF_FFFF) begin failures++; $display("FAIL saturation %h", tau[0]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
