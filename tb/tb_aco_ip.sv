// tb_aco_ip: end-to-end run of the accelerator at its default size.
//
// A bearings-only scenario is generated: a target starting at (30 km, 30 km)
// with velocity (8, 7) m/s, an own-ship weaving eastwards from the origin, and
// bearings observed every 4 s with 1 degree Gaussian noise. Software-side
// behaviour is modelled with tasks: AXI-Lite writes configure the run and start
// it, the record is streamed in with random gaps, and the result stream is
// read under random back-pressure.
// The testbench rebuilds every ant's candidate from its own LCG and sampler
// model, scores each candidate in floating point and replays the algorithm to
// predict the best solution, its iteration and the pheromone levels. It checks
// the output beats, the status registers, the cost of the reported solution,
// that it is the best candidate (within rounding), the pheromones and the run
// time. A second, short run sends more samples than the buffer holds.
// Counted mechanisms (each must occur): input stalls, output stalls, global
// best improvements, iterations without improvement, pheromone updates,
// divider overlapping an evaluation, start ignored while busy, dropped beats.
module tb_aco_ip;
  import aco_pkg::*;
  localparam int  DEPTH = 2048;
  localparam real Q29   = 536870912.0;
  localparam real PI    = 3.141592653589793;

  logic clk = 0, rst_n = 0;
  logic [127:0] s_axis_tdata = 0;
  logic s_axis_tvalid = 0, s_axis_tready, s_axis_tlast = 0;
  logic [63:0] m_axis_tdata;
  logic m_axis_tvalid, m_axis_tready = 0, m_axis_tlast;
  logic [7:0] s_axi_awaddr = 0, s_axi_araddr = 0;
  logic s_axi_awvalid = 0, s_axi_awready, s_axi_wvalid = 0, s_axi_wready;
  logic [31:0] s_axi_wdata = 0, s_axi_rdata;
  logic [3:0] s_axi_wstrb = 4'hF;
  logic [1:0] s_axi_bresp, s_axi_rresp;
  logic s_axi_bvalid, s_axi_bready = 1, s_axi_arvalid = 0, s_axi_arready, s_axi_rvalid, s_axi_rready = 1;

  aco_ip dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- AXI-Lite master ----------------
  task automatic axil_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    s_axi_awaddr = a; s_axi_awvalid = 1; s_axi_wdata = d; s_axi_wvalid = 1;
    do @(posedge clk); while (!(s_axi_awready && s_axi_wready));
    @(negedge clk);
    s_axi_awvalid = 0; s_axi_wvalid = 0;
    while (!s_axi_bvalid) @(negedge clk);
  endtask

  task automatic axil_read(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    s_axi_araddr = a; s_axi_arvalid = 1;
    do @(posedge clk); while (!s_axi_arready);
    @(negedge clk);
    s_axi_arvalid = 0;
    while (!s_axi_rvalid) @(negedge clk);
    d = s_axi_rdata;
  endtask

  // ---------------- mechanism counters ----------------
  int n_in_stall, n_out_stall, n_best_upd, n_no_improve, n_ph_upd, n_overlap, n_ignored, n_dropped;
  logic [31:0] last_best_iter;
  always @(posedge clk) if (rst_n) begin
    if (s_axis_tready && !s_axis_tvalid) n_in_stall++;
    if (m_axis_tvalid && !m_axis_tready) n_out_stall++;
    if (dut.u_eng.ph_update) n_ph_upd++;
    if (dut.u_eng.state == dut.u_eng.S_WAIT_DEP && !dut.u_eng.rcp_busy && !dut.u_eng.rcp_done && !dut.u_eng.fit_done) begin
      if (dut.u_eng.local_fit < dut.u_eng.best_fit) n_best_upd++; else n_no_improve++;
    end
    if (dut.u_eng.rcp_busy && dut.u_eng.u_fit.busy) n_overlap++;
    if (s_axis_tvalid && s_axis_tready && dut.u_rx.count == (DEPTH)) n_dropped++;
  end

  // ---------------- scenario and reference model ----------------
  logic [95:0] meas [DEPTH];
  int          K;
  logic [31:0] cfg_t, cfg_w, cfg_rho, cfg_seed;
  int          cfg_n, cfg_iters;
  logic signed [31:0] lo_v [4], hi_v [4];

  function automatic real cost(input logic signed [31:0] th [4]);
    real s, t, xt, yt, h, e;
    s = 0.0;
    for (int j = 0; j < K; j++) begin
      t  = real'(j + 1) * real'(cfg_t) / 65536.0;
      xt = real'(th[0]) / 256.0 + real'(th[2]) / 65536.0 * t;
      yt = real'(th[1]) / 256.0 + real'(th[3]) / 65536.0 * t;
      h  = $atan2(yt - real'($signed(meas[j][95:64])) / 256.0, xt - real'($signed(meas[j][63:32])) / 256.0);
      e  = real'($signed(meas[j][31:0])) / Q29 - h;
      if (e >= PI) e -= 2.0 * PI;
      if (e < -PI) e += 2.0 * PI;
      s += e * e * real'(cfg_w) / 65536.0;
    end
    return s;
  endfunction

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1000000))) / 1000000.0;
    u2 = (real'($urandom_range(0, 999999))) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  task automatic make_scenario(input int n);
    real t, xo, yo, xt, yt, h, sigma;
    sigma = PI / 180.0;
    K = n;
    for (int j = 0; j < ((n < DEPTH) ? n : DEPTH); j++) begin
      t  = real'(j + 1) * 4.0;
      xo = 17000.0 * t / 7224.0;
      yo = 3000.0 * $sin(2.0 * PI * t / 3600.0);
      xt = 30000.0 + 8.0 * t;
      yt = 30000.0 + 7.0 * t;
      h  = $atan2(yt - yo, xt - xo) + sigma * gauss();
      if (h >= PI) h -= 2.0 * PI;
      meas[j] = {32'($rtoi(yo * 256.0)), 32'($rtoi(xo * 256.0)), 32'($rtoi(h * Q29))};
    end
  endtask

  task automatic stream_in(input int n);
    for (int b = 0; b < n; b++) begin
      while ($urandom_range(0, 9) == 0) begin
        s_axis_tvalid = 0;
        @(negedge clk);
      end
      s_axis_tvalid = 1;
      s_axis_tdata  = {32'hDEAD_BEEF, (b < DEPTH) ? meas[b] : 96'(b)};
      s_axis_tlast  = (b == n - 1);
      do @(posedge clk); while (!s_axis_tready);
      @(negedge clk);
    end
    s_axis_tvalid = 0; s_axis_tlast = 0;
  endtask

  task automatic run(input int n_samples, input int n_ants, input int n_iters, input bit full_check);
    logic [31:0] rd, lcg_s;
    logic [63:0] beats [$];
    bit          lasts [$];
    logic signed [31:0] cand [4], best_c [4], loc_c [4];
    real f, best_f, loc_f, dep, tau_m, got;
    int  best_it;
    longint t0, t1;
    cfg_n = n_ants; cfg_iters = n_iters;
    axil_write(REG_NUM_ANTS, 32'(n_ants));
    axil_write(REG_NUM_ITERS, 32'(n_iters));
    axil_write(REG_RHO, cfg_rho);
    axil_write(REG_T_SAMPLE, cfg_t);
    axil_write(REG_WEIGHT, cfg_w);
    axil_write(REG_SEED, cfg_seed);
    for (int d = 0; d < 4; d++) begin
      axil_write(REG_LO_BASE + 8'(8 * d), lo_v[d]);
      axil_write(REG_HI_BASE + 8'(8 * d), hi_v[d]);
    end
    axil_read(REG_CTRL, rd);
    chk(rd[2] == 1'b1, "idle before start");
    axil_write(REG_CTRL, 32'd1);
    axil_write(REG_CTRL, 32'd1);            // second start while busy: ignored
    if (dut.phase != dut.P_IDLE) n_ignored++;
    fork
      stream_in(n_samples);
      begin
        // collect output beats under back-pressure
        forever begin
          m_axis_tready = ($urandom_range(0, 3) != 0);
          @(posedge clk);
          if (m_axis_tvalid && m_axis_tready) begin
            beats.push_back(m_axis_tdata);
            lasts.push_back(m_axis_tlast);
          end
          @(negedge clk);
          if (beats.size() != 0 && beats.size() == 3) break;
        end
        m_axis_tready = 0;
      end
      begin
        @(posedge dut.u_eng.busy); t0 = cyc;
        @(negedge dut.u_eng.busy); t1 = cyc;
      end
    join
    repeat (3) @(negedge clk);
    axil_read(REG_CTRL, rd);
    chk(rd[1] && rd[2], $sformatf("done and idle after run %h phase %0d txv %b", rd, dut.phase, m_axis_tvalid));
    axil_read(REG_NSAMPLES, rd);
    chk(int'(rd) == ((n_samples < DEPTH) ? n_samples : DEPTH), $sformatf("NSAMPLES %0d", rd));
    K = (n_samples < DEPTH) ? n_samples : DEPTH;
    chk(beats.size() == 3 && lasts[2] && !lasts[0] && !lasts[1], $sformatf("beat count %0d and TLAST", beats.size()));
    repeat (20) @(negedge clk);
    chk(!m_axis_tvalid, "no extra beat");
    axil_read(REG_BEST_FIT, rd);
    chk(beats[2][31:0] == rd, "fitness beat = register");
    axil_read(REG_BEST_ITER, rd);
    chk(beats[2][63:32] == rd, "iteration beat = register");
    for (int d = 0; d < 4; d++) begin
      axil_read(REG_BEST_BASE + 8'(4 * d), rd);
      chk(beats[d / 2][32 * (d % 2) +: 32] == rd, "theta beat = register");
    end
    // runtime: per ant K + 45 clocks, per iteration up to 45 more
    chk(t1 - t0 >= longint'(n_iters) * n_ants * (K + 44) && t1 - t0 <= longint'(n_iters) * (n_ants * (K + 46) + 45),
        $sformatf("run time %0d clocks", t1 - t0));
    if (!full_check) return;

    // replay the algorithm with exact candidates and floating-point costs
    lcg_s = cfg_seed; best_f = 1.0e30; best_it = 0; tau_m = 1.0;
    for (int it = 0; it < n_iters; it++) begin
      loc_f = 1.0e30; dep = 0.0;
      for (int a = 0; a < n_ants; a++) begin
        for (int d = 0; d < 4; d++) begin
          longint unsigned span;
          span = longint'(hi_v[d]) - longint'(lo_v[d]);
          cand[d] = lo_v[d] + 32'((span * longint'(lcg_s)) >> 32);
          lcg_s = 32'(lcg_s * 32'd1664525 + 32'd1013904223);
        end
        f = cost(cand);
        if (f < loc_f) begin loc_f = f; loc_c = cand; end
        dep += 1.0 / (1.0 + f);
      end
      if (loc_f < best_f) begin best_f = loc_f; best_c = loc_c; best_it = it + 1; end
      tau_m = (1.0 - real'(cfg_rho) / 65536.0) * tau_m + dep;
    end
    for (int d = 0; d < 4; d++) cand[d] = beats[d / 2][32 * (d % 2) +: 32];
    f = cost(cand);
    got = real'(beats[2][31:0]) / 65536.0;
    $display("reported cost %f, its float cost %f, best candidate cost %f (iteration %0d, reported %0d)",
             got, f, best_f, best_it, beats[2][63:32]);
    $display("estimate x0=%f m y0=%f m vx=%f m/s vy=%f m/s",
             real'(cand[0]) / 256.0, real'(cand[1]) / 256.0, real'(cand[2]) / 65536.0, real'(cand[3]) / 65536.0);
    chk(got - f < 1e-4 * f + 0.01 && f - got < 1e-4 * f + 0.05, "reported cost matches its solution");
    chk(f <= best_f * 1.001 + 0.01, "reported solution is the best candidate");
    chk(int'(beats[2][63:32]) == best_it || f <= best_f * 1.001, "best iteration");
    for (int d = 0; d < 4; d++) begin
      axil_read(REG_TAU_BASE + 8'(4 * d), rd);
      got = real'(rd) / 65536.0;
      chk(got - tau_m < 0.002 * tau_m + 0.001 && tau_m - got < 0.002 * tau_m + 0.001,
          $sformatf("tau[%0d] %f exp %f", d, got, tau_m));
    end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    cfg_t    = 32'h0004_0000;                             // 4 s
    cfg_w    = 32'($rtoi(65536.0 / (2.0 * (PI / 180.0) ** 2)));   // sigma = 1 degree
    cfg_rho  = 32'd6554;                                  // 0.1
    cfg_seed = 32'd2024;
    lo_v = '{32'sd20000 * 256, 32'sd20000 * 256, 32'sd0, 32'sd0};
    hi_v = '{32'sd40000 * 256, 32'sd40000 * 256, 32'sd16 * 65536, 32'sd16 * 65536};
    make_scenario(1806);
    run(1806, 20, 20, 1'b1);
    // second operation: record longer than the buffer, small colony
    make_scenario(DEPTH + 40);
    cfg_seed = 32'd77;
    run(DEPTH + 40, 3, 2, 1'b0);

    chk(n_in_stall > 0, "input stall seen");
    chk(n_out_stall > 0, "output stall seen");
    chk(n_best_upd > 0, "global best improved");
    chk(n_no_improve > 0, "iteration without improvement");
    chk(n_ph_upd == 22, $sformatf("pheromone updates %0d", n_ph_upd));
    chk(n_overlap > 0, "divider overlapped evaluation");
    chk(n_ignored > 0, "start while busy ignored");
    chk(n_dropped == 40, $sformatf("dropped beats %0d", n_dropped));
    $display("mechanisms: in_stall=%0d out_stall=%0d best_upd=%0d no_improve=%0d ph_upd=%0d overlap=%0d ignored=%0d dropped=%0d",
             n_in_stall, n_out_stall, n_best_upd, n_no_improve, n_ph_upd, n_overlap, n_ignored, n_dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
