// tb_aco_engine: runs the ant colony loop on small random scenarios and
// replays it in the testbench: candidates from an independent LCG and sampler
// model, costs in floating point. Checks the best solution and its iteration,
// its cost, the pheromone levels after the last update, the run time per ant
// and the special cases T = 0 (no iteration) and N = 0 (no ant). A second
// engine searches all six parameters (with accelerations) on the same data.
module tb_aco_engine;
  import aco_pkg::*;
  localparam int  DEPTH = 64;
  localparam real Q29   = 536870912.0;
  localparam real PI    = 3.141592653589793;

  logic clk = 0, rst_n = 0, start = 0;
  aco_cfg_t cfg;
  theta_t lo, hi, best_theta;
  logic [6:0] num_samples = 0;
  logic [5:0] mem_raddr, raddr6;
  logic [95:0] mem_rdata, rdata6;
  logic busy, done, busy6, done6;
  logic [31:0] best_fit, best_iter, fit6, iter6;
  theta_t best6;
  logic [31:0] tau [4];
  logic [31:0] tau6 [6];
  logic [95:0] mem [DEPTH];
  int checks = 0, failures = 0;

  aco_engine #(.DEPTH(DEPTH), .NUM_DIMS(4)) dut (.*);
  always #5 clk = ~clk;
  aco_engine #(.DEPTH(DEPTH), .NUM_DIMS(6)) dut6 (.clk, .rst_n, .start, .cfg, .lo, .hi, .num_samples,
    .mem_raddr(raddr6), .mem_rdata(rdata6), .busy(busy6), .done(done6), .best_theta(best6),
    .best_fit(fit6), .best_iter(iter6), .tau(tau6));
  always_ff @(posedge clk) begin
    mem_rdata <= mem[mem_raddr];
    rdata6    <= mem[raddr6];
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic real cost(input logic signed [31:0] th [6], input int nd);
    real s, t, h, e, ax, ay;
    s = 0.0;
    ax = (nd == 6) ? real'(th[4]) / 65536.0 : 0.0;
    ay = (nd == 6) ? real'(th[5]) / 65536.0 : 0.0;
    for (int j = 0; j < int'(num_samples); j++) begin
      t = real'(j + 1) * real'(cfg.t_sample) / 65536.0;
      h = $atan2(real'(th[1]) / 256.0 + real'(th[3]) / 65536.0 * t + 0.5 * ay * t * t - real'($signed(mem[j][95:64])) / 256.0,
                 real'(th[0]) / 256.0 + real'(th[2]) / 65536.0 * t + 0.5 * ax * t * t - real'($signed(mem[j][63:32])) / 256.0);
      e = real'($signed(mem[j][31:0])) / Q29 - h;
      if (e >= PI) e -= 2.0 * PI;
      if (e < -PI) e += 2.0 * PI;
      s += e * e * real'(cfg.weight) / 65536.0;
    end
    return s;
  endfunction

  task automatic check_engine(input int trial, input int nd, input int n, input theta_t bt,
                              input logic [31:0] bfit, input logic [31:0] bit_, input logic [31:0] tv [6]);
    logic [31:0] s;
    logic signed [31:0] cand [6], loc_c [6], best_c [6], got_c [6];
    real f, loc_f, best_f, dep, tau_m, g;
    int best_it;
    logic [31:0] best_fit, best_iter;
    best_fit = bfit; best_iter = bit_;
    cand = '{default: '0};
    // replay
    s = cfg.seed; best_f = 1.0e30; best_it = 0; tau_m = 1.0;
    for (int it = 0; it < int'(cfg.num_iters); it++) begin
      loc_f = 1.0e30; dep = 0.0;
      for (int a = 0; a < int'(cfg.num_ants); a++) begin
        for (int d = 0; d < nd; d++) begin
          longint unsigned span;
          span = longint'(hi[d]) - longint'(lo[d]);
          cand[d] = lo[d] + 32'((span * longint'(s)) >> 32);
          s = 32'(s * 32'd1664525 + 32'd1013904223);
        end
        f = cost(cand, nd);
        if (f < loc_f) begin loc_f = f; loc_c = cand; end
        dep += 1.0 / (1.0 + f);
      end
      if (loc_f < best_f) begin best_f = loc_f; best_c = loc_c; best_it = it + 1; end
      tau_m = (1.0 - real'(cfg.rho) / 65536.0) * tau_m + dep;
    end
    for (int d = 0; d < 6; d++) got_c[d] = (d < nd) ? bt[d] : 32'sd0;
    if (cfg.num_iters == 0 || cfg.num_ants == 0) begin
      chk(best_fit == 32'hFFFF_FFFF && best_iter == 0, $sformatf("trial %0d: no solution kept", trial));
    end else begin
      f = cost(got_c, nd);
      for (int d = nd; d < 6; d++) chk(bt[d] == 0, "unsearched dimension is zero");
      g = real'(best_fit) / 65536.0;
      chk(g - f < 1e-3 * f + 0.01 && f - g < 1e-3 * f + 0.01, $sformatf("trial %0d cost %f vs %f", trial, g, f));
      chk(f <= best_f * 1.001 + 0.001, $sformatf("trial %0d best %f vs model %f", trial, f, best_f));
      chk(int'(best_iter) == best_it || f <= best_f * 1.001, $sformatf("trial %0d iteration %0d vs %0d", trial, best_iter, best_it));
      chk(n >= int'(cfg.num_iters) * int'(cfg.num_ants) * (int'(num_samples) + 44) &&
          n <= int'(cfg.num_iters) * (int'(cfg.num_ants) * (int'(num_samples) + nd + 42) + 45),
          $sformatf("trial %0d run time %0d", trial, n));
    end
    for (int d = 0; d < nd; d++) begin
      g = real'(tv[d]) / 65536.0;
      chk(g - tau_m < 0.002 * tau_m + 0.001 && tau_m - g < 0.002 * tau_m + 0.001,
          $sformatf("trial %0d nd %0d tau[%0d] %f vs %f", trial, nd, d, g, tau_m));
    end
  endtask

  task automatic run_and_check(input int trial);
    int n, n6;
    logic [31:0] tv [6];
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    n = 1; n6 = 0;
    while (!done) begin @(negedge clk); n++; if (done6) n6 = n; end
    for (int d = 0; d < 6; d++) tv[d] = (d < 4) ? tau[d] : 32'd0;
    check_engine(trial, 4, n, best_theta, best_fit, best_iter, tv);
    while (!done6 && n6 == 0) begin @(negedge clk); n++; end
    if (n6 == 0) n6 = n;
    check_engine(trial, 6, n6, best6, fit6, iter6, tau6);
  endtask

  initial begin
    real x0, y0, vx, vy, t, xo, yo, h;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 12; trial++) begin
      x0 = 5000.0 + $urandom_range(0, 20000); y0 = 5000.0 + $urandom_range(0, 20000);
      vx = real'($urandom_range(0, 20)) - 10.0; vy = real'($urandom_range(0, 20)) - 10.0;
      num_samples = 7'($urandom_range(5, DEPTH));
      cfg.t_sample = 32'($urandom_range(1, 8)) << 16;
      cfg.weight   = 32'($rtoi(65536.0 / (2.0 * 0.02 * 0.02)));
      cfg.rho      = 16'($urandom);
      cfg.seed     = $urandom;
      cfg.num_ants  = (trial == 1) ? 0 : $urandom_range(1, 8);
      cfg.num_iters = (trial == 2) ? 0 : $urandom_range(1, 6);
      for (int j = 0; j < int'(num_samples); j++) begin
        t = real'(j + 1) * real'(cfg.t_sample) / 65536.0;
        xo = 5.0 * t; yo = 800.0 * $sin(t / 100.0);
        h = $atan2(y0 + vy * t - yo, x0 + vx * t - xo) + 0.02 * (real'($urandom_range(0, 200)) / 100.0 - 1.0);
        if (h >= PI) h -= 2.0 * PI;
        mem[j] = {32'($rtoi(yo * 256.0)), 32'($rtoi(xo * 256.0)), 32'($rtoi(h * Q29))};
      end
      lo = '{default: '0}; hi = '{default: '0};
      lo[0] = 32'($rtoi((x0 - 3000.0) * 256.0)); hi[0] = 32'($rtoi((x0 + 3000.0) * 256.0));
      lo[1] = 32'($rtoi((y0 - 3000.0) * 256.0)); hi[1] = 32'($rtoi((y0 + 3000.0) * 256.0));
      lo[2] = -32'sd12 * 65536; hi[2] = 32'sd12 * 65536;
      lo[3] = -32'sd12 * 65536; hi[3] = 32'sd12 * 65536;
      lo[4] = -32'sd655;        hi[4] = 32'sd655;          // +-0.01 m/s^2
      lo[5] = -32'sd655;        hi[5] = 32'sd655;
      run_and_check(trial);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
