// tb_fitness_unit: random targets, own-ship tracks and noisy bearings; the
// cost of each candidate is recomputed in floating point from the same inputs
// (eq. (8) with the constant-velocity and constant-acceleration target models)
// and must agree within 0.1 % plus rounding. One instance searches four
// parameters (accelerations ignored), one six. The start-to-done latency must
// be K + LAT clocks.
module tb_fitness_unit;
  import aco_pkg::*;
  localparam int DEPTH = 2048;
  localparam int LAT   = 39;
  localparam real Q29 = 536870912.0;

  logic clk = 0, rst_n = 0, start = 0;
  theta_t theta;
  logic [11:0] num_samples = 0;
  logic [31:0] t_sample = 0, weight = 0;
  logic [10:0] raddr4, raddr6;
  logic [95:0] rdata4, rdata6;
  logic busy4, busy6, done4, done6;
  logic [31:0] fit4, fit6;
  logic [95:0] mem [DEPTH];
  int checks = 0, failures = 0;

  fitness_unit #(.DEPTH(DEPTH), .NUM_DIMS(4)) u4 (.clk, .rst_n, .start, .theta, .num_samples,
    .t_sample, .weight, .mem_raddr(raddr4), .mem_rdata(rdata4), .busy(busy4), .done(done4), .fitness(fit4));
  fitness_unit #(.DEPTH(DEPTH), .NUM_DIMS(6)) u6 (.clk, .rst_n, .start, .theta, .num_samples,
    .t_sample, .weight, .mem_raddr(raddr6), .mem_rdata(rdata6), .busy(busy6), .done(done6), .fitness(fit6));

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    rdata4 <= mem[raddr4];
    rdata6 <= mem[raddr6];
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real ref_cost(input int nd);
    real s, t, xt, yt, h, e, z, xo, yo;
    s = 0.0;
    for (int j = 0; j < int'(num_samples); j++) begin
      t  = real'(j + 1) * real'(t_sample) / 65536.0;
      xt = real'(theta[0]) / 256.0 + real'(theta[2]) / 65536.0 * t;
      yt = real'(theta[1]) / 256.0 + real'(theta[3]) / 65536.0 * t;
      if (nd == 6) begin
        xt += 0.5 * real'(theta[4]) / 65536.0 * t * t;
        yt += 0.5 * real'(theta[5]) / 65536.0 * t * t;
      end
      z  = real'($signed(mem[j][31:0])) / Q29;
      xo = real'($signed(mem[j][63:32])) / 256.0;
      yo = real'($signed(mem[j][95:64])) / 256.0;
      h  = $atan2(yt - yo, xt - xo);
      e  = z - h;
      if (e >= 3.141592653589793) e -= 6.283185307179586;
      if (e < -3.141592653589793) e += 6.283185307179586;
      s += e * e * real'(weight) / 65536.0;
    end
    return s;
  endfunction

  task automatic check(input int nd, input logic [31:0] got, input int lat);
    real exp, g;
    exp = ref_cost(nd);
    g = real'(got) / 65536.0;
    checks += 2;
    if (exp > 65535.0) begin
      if (got !== 32'hFFFF_FFFF) begin failures++; $display("FAIL nd=%0d no saturation %f", nd, g); end
    end else if (g - exp > 1e-3 * exp + 1e-3 || exp - g > 1e-3 * exp + real'(num_samples) * 4.0 / 65536.0 + 1e-3) begin
      failures++;
      $display("FAIL nd=%0d cost got %f exp %f", nd, g, exp);
    end
    if (lat != int'(num_samples) + LAT) begin failures++; $display("FAIL latency %0d K=%0d", lat, num_samples); end
  endtask

  initial begin
    real sigma, x0, y0, vx, vy, ax, ay, tt;
    int n, l4, l6;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 24; trial++) begin
      // scenario: target at tens of km, own-ship weaving near the origin
      x0 = 10000.0 + $urandom_range(0, 40000);
      y0 = 10000.0 + $urandom_range(0, 40000);
      vx = real'($urandom_range(0, 4000)) / 100.0 - 20.0;
      vy = real'($urandom_range(0, 4000)) / 100.0 - 20.0;
      ax = (trial % 2) ? real'($urandom_range(0, 200)) / 10000.0 - 0.01 : 0.0;
      ay = (trial % 2) ? real'($urandom_range(0, 200)) / 10000.0 - 0.01 : 0.0;
      sigma = 0.005 + real'($urandom_range(0, 30)) / 1000.0;
      num_samples = (trial == 0) ? 12'd1 : (trial == 1) ? 12'd2048 : 12'($urandom_range(2, 400));
      t_sample = 32'($urandom_range(1, 10)) << 16;
      weight = 32'($rtoi(65536.0 / (2.0 * sigma * sigma)));
      for (int j = 0; j < int'(num_samples); j++) begin
        real xo, yo, h;
        tt = real'(j + 1) * real'(t_sample) / 65536.0;
        xo = 4.0 * tt;
        yo = 3000.0 * $sin(tt / 300.0);
        h = $atan2(y0 + vy * tt + 0.5 * ay * tt * tt - yo, x0 + vx * tt + 0.5 * ax * tt * tt - xo);
        h += sigma * (real'($urandom_range(0, 2000)) / 1000.0 - 1.0);
        if (trial == 2) h += 3.14159;        // far-off bearings: large residuals, wrap
        if (h > 3.141592653589793) h -= 6.283185307179586;
        mem[j] = {32'($rtoi(yo * 256.0)), 32'($rtoi(xo * 256.0)), 32'($rtoi(h * Q29))};
      end
      // candidate: truth perturbed
      theta[0] = 32'($rtoi((x0 + real'($urandom_range(0, 2000)) - 1000.0) * 256.0));
      theta[1] = 32'($rtoi((y0 + real'($urandom_range(0, 2000)) - 1000.0) * 256.0));
      theta[2] = 32'($rtoi(vx * 65536.0));
      theta[3] = 32'($rtoi(vy * 65536.0));
      theta[4] = 32'($rtoi(ax * 65536.0));
      theta[5] = 32'($rtoi(ay * 65536.0));
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      n = 1; l4 = 0; l6 = 0;
      while ((l4 == 0 || l6 == 0) && n < 5000) begin
        if (done4) l4 = n;
        if (done6) l6 = n;
        @(negedge clk); n++;
      end
      check(4, fit4, l4);
      check(6, fit6, l6);
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
