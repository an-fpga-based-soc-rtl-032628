// tb_axil_regs: writes and reads back every configuration register, reads the
// status inputs through the map, and checks the start pulse (only while idle),
// the done flag (set by the core, cleared by start) and the response channels.
module tb_axil_regs;
  import aco_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] s_axi_awaddr = 0, s_axi_araddr = 0;
  logic s_axi_awvalid = 0, s_axi_awready, s_axi_wvalid = 0, s_axi_wready;
  logic [31:0] s_axi_wdata = 0, s_axi_rdata;
  logic [3:0] s_axi_wstrb = 4'hF;
  logic [1:0] s_axi_bresp, s_axi_rresp;
  logic s_axi_bvalid, s_axi_bready = 1, s_axi_arvalid = 0, s_axi_arready, s_axi_rvalid, s_axi_rready = 1;
  aco_cfg_t cfg;
  theta_t lo, hi, best_theta;
  logic ap_start, core_idle = 1, core_done = 0;
  logic [10:0] nsamples = 0;
  logic [31:0] best_fit = 0, best_iter = 0;
  logic [31:0] tau [4];
  int checks = 0, failures = 0, starts = 0;

  axil_regs #(.NUM_DIMS(4), .NSW(11)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (ap_start) starts++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    s_axi_awaddr = a; s_axi_awvalid = 1; s_axi_wdata = d; s_axi_wvalid = 1;
    do @(posedge clk); while (!(s_axi_awready && s_axi_wready));
    @(negedge clk);
    s_axi_awvalid = 0; s_axi_wvalid = 0;
    chk(s_axi_bvalid && s_axi_bresp == 2'b00, "write response");
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    s_axi_araddr = a; s_axi_arvalid = 1;
    do @(posedge clk); while (!s_axi_arready);
    @(negedge clk);
    s_axi_arvalid = 0;
    chk(s_axi_rvalid && s_axi_rresp == 2'b00, "read response");
    d = s_axi_rdata;
  endtask

  initial begin
    logic [31:0] v, r;
    logic [31:0] lov [6], hiv [6];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 20; rep++) begin
      v = $urandom; wr(REG_NUM_ANTS, v);  rd(REG_NUM_ANTS, r);  chk(r == v && cfg.num_ants == v, "num_ants");
      v = $urandom; wr(REG_NUM_ITERS, v); rd(REG_NUM_ITERS, r); chk(r == v && cfg.num_iters == v, "num_iters");
      v = $urandom; wr(REG_RHO, v);       rd(REG_RHO, r);       chk(r == {16'd0, v[15:0]} && cfg.rho == v[15:0], "rho");
      v = $urandom; wr(REG_T_SAMPLE, v);  rd(REG_T_SAMPLE, r);  chk(r == v && cfg.t_sample == v, "t_sample");
      v = $urandom; wr(REG_WEIGHT, v);    rd(REG_WEIGHT, r);    chk(r == v && cfg.weight == v, "weight");
      v = $urandom; wr(REG_SEED, v);      rd(REG_SEED, r);      chk(r == v && cfg.seed == v, "seed");
      for (int d = 0; d < 6; d++) begin
        lov[d] = $urandom; hiv[d] = $urandom;
        wr(REG_LO_BASE + 8'(8 * d), lov[d]);
        wr(REG_HI_BASE + 8'(8 * d), hiv[d]);
      end
      for (int d = 0; d < 6; d++) begin
        rd(REG_LO_BASE + 8'(8 * d), r); chk(r == lov[d] && lo[d] == lov[d], "lo");
        rd(REG_HI_BASE + 8'(8 * d), r); chk(r == hiv[d] && hi[d] == hiv[d], "hi");
      end
      nsamples = 11'($urandom); best_fit = $urandom; best_iter = $urandom;
      for (int d = 0; d < 6; d++) best_theta[d] = $urandom;
      for (int d = 0; d < 4; d++) tau[d] = $urandom;
      rd(REG_NSAMPLES, r);  chk(r == 32'(nsamples), "nsamples");
      rd(REG_BEST_FIT, r);  chk(r == best_fit, "best_fit");
      rd(REG_BEST_ITER, r); chk(r == best_iter, "best_iter");
      for (int d = 0; d < 6; d++) begin rd(REG_BEST_BASE + 8'(4 * d), r); chk(r == best_theta[d], "x_best"); end
      for (int d = 0; d < 4; d++) begin rd(REG_TAU_BASE + 8'(4 * d), r); chk(r == tau[d], "tau"); end
      rd(8'hFC, r); chk(r == 0, "unmapped reads 0");
      // control: start while idle pulses once, start while busy does not
      starts = 0; core_idle = 1;
      wr(REG_CTRL, 32'd1);
      @(negedge clk);
      chk(starts == 1, "start pulse");
      core_idle = 0;
      rd(REG_CTRL, r); chk(r[2:1] == 2'b00, "busy, not done");
      wr(REG_CTRL, 32'd1);
      @(negedge clk);
      chk(starts == 1, "start ignored while busy");
      @(negedge clk); core_done = 1; @(negedge clk); core_done = 0; core_idle = 1;
      rd(REG_CTRL, r); chk(r[2:1] == 2'b11, "done and idle");
      rd(REG_CTRL, r); chk(r[1], "done stays set");
      wr(REG_CTRL, 32'd0);
      rd(REG_CTRL, r); chk(r[1], "writing 0 does not start or clear");
      chk(starts == 1, "no start on 0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
