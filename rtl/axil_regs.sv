// axil_regs: AXI4-Lite control and status registers of the accelerator.
//
// Register map (byte offsets, 32-bit registers, see aco_pkg):
//   0x00 CTRL      [0] start (write 1 while idle), [1] done, [2] idle (read)
//   0x10 NUM_ANTS  0x14 NUM_ITERS  0x18 RHO (Q0.16 in [15:0])
//   0x1C T_SAMPLE (Q16.16 s)  0x20 WEIGHT = 1/(2 sigma^2) (Q16.16)  0x24 SEED
//   0x28 NSAMPLES, 0x2C BEST_FIT, 0x30 BEST_ITER          (read only)
//   0x40 + 8d LO_d, 0x44 + 8d HI_d                        (search bounds)
//   0x80 + 4d TAU_d, 0xA0 + 4d X_BEST_d                   (read only)
// `done` is set when the core finishes and cleared by the next start. Writes
// take address and data in the same handshake (AWREADY = WREADY, both high
// only when both valids are); one write and one read may be outstanding.
// Responses are always OKAY; unmapped reads return 0. WSTRB is ignored.
// The existence of an AXI-Lite control port follows the document; the map
// and the handshake details are this design's choices.
module axil_regs #(
  parameter int NUM_DIMS = 4,
  parameter int NSW      = 11
) (
  input  logic               clk,
  input  logic               rst_n,
  // AXI4-Lite slave
  input  logic [7:0]         s_axi_awaddr,
  input  logic               s_axi_awvalid,
  output logic               s_axi_awready,
  input  logic [31:0]        s_axi_wdata,
  input  logic [3:0]         s_axi_wstrb,
  input  logic               s_axi_wvalid,
  output logic               s_axi_wready,
  output logic [1:0]         s_axi_bresp,
  output logic               s_axi_bvalid,
  input  logic               s_axi_bready,
  input  logic [7:0]         s_axi_araddr,
  input  logic               s_axi_arvalid,
  output logic               s_axi_arready,
  output logic [31:0]        s_axi_rdata,
  output logic [1:0]         s_axi_rresp,
  output logic               s_axi_rvalid,
  input  logic               s_axi_rready,
  // to the core
  output aco_pkg::aco_cfg_t  cfg,
  output aco_pkg::theta_t    lo,
  output aco_pkg::theta_t    hi,
  output logic               ap_start,
  // from the core
  input  logic               core_idle,
  input  logic               core_done,
  input  logic [NSW-1:0]     nsamples,
  input  logic [31:0]        best_fit,
  input  logic [31:0]        best_iter,
  input  aco_pkg::theta_t    best_theta,
  input  logic [31:0]        tau [NUM_DIMS]
);
  import aco_pkg::*;

  logic done_flag;
  logic wr;

  assign wr            = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid;
  assign s_axi_awready = wr;
  assign s_axi_wready  = wr;
  assign s_axi_bresp   = 2'b00;
  assign s_axi_rresp   = 2'b00;
  assign s_axi_arready = !s_axi_rvalid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg          <= '0;
      lo           <= '{default: '0};
      hi           <= '{default: '0};
      ap_start     <= 1'b0;
      done_flag    <= 1'b0;
      s_axi_bvalid <= 1'b0;
    end else begin
      ap_start <= 1'b0;
      if (core_done) done_flag <= 1'b1;
      if (s_axi_bvalid && s_axi_bready) s_axi_bvalid <= 1'b0;
      if (wr) begin
        s_axi_bvalid <= 1'b1;
        unique case (s_axi_awaddr)
          REG_CTRL:      if (s_axi_wdata[0] && core_idle) begin
                           ap_start  <= 1'b1;
                           done_flag <= 1'b0;
                         end
          REG_NUM_ANTS:  cfg.num_ants  <= s_axi_wdata;
          REG_NUM_ITERS: cfg.num_iters <= s_axi_wdata;
          REG_RHO:       cfg.rho       <= s_axi_wdata[15:0];
          REG_T_SAMPLE:  cfg.t_sample  <= s_axi_wdata;
          REG_WEIGHT:    cfg.weight    <= s_axi_wdata;
          REG_SEED:      cfg.seed      <= s_axi_wdata;
          default: begin
            for (int d = 0; d < MAX_DIMS; d++) begin
              if (s_axi_awaddr == REG_LO_BASE + 8'(8*d)) lo[d] <= s_axi_wdata;
              if (s_axi_awaddr == REG_HI_BASE + 8'(8*d)) hi[d] <= s_axi_wdata;
            end
          end
        endcase
      end
    end
  end

  logic [31:0] rd_mux;
  always_comb begin
    rd_mux = '0;
    unique case (s_axi_araddr)
      REG_CTRL:      rd_mux = {29'd0, core_idle, done_flag, 1'b0};
      REG_NUM_ANTS:  rd_mux = cfg.num_ants;
      REG_NUM_ITERS: rd_mux = cfg.num_iters;
      REG_RHO:       rd_mux = {16'd0, cfg.rho};
      REG_T_SAMPLE:  rd_mux = cfg.t_sample;
      REG_WEIGHT:    rd_mux = cfg.weight;
      REG_SEED:      rd_mux = cfg.seed;
      REG_NSAMPLES:  rd_mux = 32'(nsamples);
      REG_BEST_FIT:  rd_mux = best_fit;
      REG_BEST_ITER: rd_mux = best_iter;
      default: begin
        for (int d = 0; d < MAX_DIMS; d++) begin
          if (s_axi_araddr == REG_LO_BASE + 8'(8*d))   rd_mux = lo[d];
          if (s_axi_araddr == REG_HI_BASE + 8'(8*d))   rd_mux = hi[d];
          if (s_axi_araddr == REG_BEST_BASE + 8'(4*d)) rd_mux = best_theta[d];
        end
        for (int d = 0; d < NUM_DIMS; d++)
          if (s_axi_araddr == REG_TAU_BASE + 8'(4*d)) rd_mux = tau[d];
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
    end else if (s_axi_arvalid && s_axi_arready) begin
      s_axi_rvalid <= 1'b1;
      s_axi_rdata  <= rd_mux;
    end else if (s_axi_rvalid && s_axi_rready) begin
      s_axi_rvalid <= 1'b0;
    end
  end
endmodule
