// aco_ip: ant colony optimisation accelerator for bearings-only target motion
// analysis, as an AXI-Streaming IP for a Zynq-7000 programmable logic fabric.
//
// Ports: a 128-bit AXI4-Stream slave receives the measurement record (one
// sample per beat, lower 96 bits used) from a DMA memory-to-stream channel; a
// 64-bit AXI4-Stream master returns the estimate to a DMA stream-to-memory
// channel; an AXI4-Lite slave holds control, configuration and status.
// Operation: software writes the configuration, then 1 to CTRL.start. The IP
// accepts one record (ended by TLAST), runs the ant colony loop of aco_engine
// on it, sends x_best and f(x_best) on the output stream, and then sets
// CTRL.done and CTRL.idle. One run takes the record length in clocks, about
// T*N*(K + NUM_DIMS + 43) clocks of search, and NUM_DIMS/2 + 1 output beats.
// The interface set and widths follow the document; the sequencing
// (load, run, send) is this design's choice.
module aco_ip #(
  parameter int DEPTH    = 2048,
  parameter int NUM_DIMS = 4,
  localparam int AW      = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // measurement stream in
  input  logic [127:0]  s_axis_tdata,
  input  logic          s_axis_tvalid,
  output logic          s_axis_tready,
  input  logic          s_axis_tlast,
  // result stream out
  output logic [63:0]   m_axis_tdata,
  output logic          m_axis_tvalid,
  input  logic          m_axis_tready,
  output logic          m_axis_tlast,
  // AXI4-Lite control
  input  logic [7:0]    s_axi_awaddr,
  input  logic          s_axi_awvalid,
  output logic          s_axi_awready,
  input  logic [31:0]   s_axi_wdata,
  input  logic [3:0]    s_axi_wstrb,
  input  logic          s_axi_wvalid,
  output logic          s_axi_wready,
  output logic [1:0]    s_axi_bresp,
  output logic          s_axi_bvalid,
  input  logic          s_axi_bready,
  input  logic [7:0]    s_axi_araddr,
  input  logic          s_axi_arvalid,
  output logic          s_axi_arready,
  output logic [31:0]   s_axi_rdata,
  output logic [1:0]    s_axi_rresp,
  output logic          s_axi_rvalid,
  input  logic          s_axi_rready
);
  import aco_pkg::*;

  typedef enum logic [1:0] {P_IDLE, P_LOAD, P_RUN, P_SEND} phase_t;
  phase_t phase;

  aco_cfg_t    cfg;
  theta_t      lo, hi, best_theta;
  logic        ap_start;
  logic [31:0] best_fit, best_iter;
  logic [31:0] tau [NUM_DIMS];

  logic          rx_done, eng_done, eng_busy, tx_done;
  logic [AW:0]   nsamples;
  logic          mem_we;
  logic [AW-1:0] mem_waddr, mem_raddr;
  logic [95:0]   mem_wdata, mem_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= P_IDLE;
    else begin
      unique case (phase)
        P_IDLE: if (ap_start) phase <= P_LOAD;
        P_LOAD: if (rx_done)  phase <= P_RUN;
        P_RUN:  if (eng_done) phase <= P_SEND;
        P_SEND: if (tx_done)  phase <= P_IDLE;
        default: phase <= P_IDLE;
      endcase
    end
  end

  axil_regs #(.NUM_DIMS(NUM_DIMS), .NSW(AW+1)) u_regs (
    .clk(clk), .rst_n(rst_n),
    .s_axi_awaddr(s_axi_awaddr), .s_axi_awvalid(s_axi_awvalid), .s_axi_awready(s_axi_awready),
    .s_axi_wdata(s_axi_wdata), .s_axi_wstrb(s_axi_wstrb), .s_axi_wvalid(s_axi_wvalid),
    .s_axi_wready(s_axi_wready), .s_axi_bresp(s_axi_bresp), .s_axi_bvalid(s_axi_bvalid),
    .s_axi_bready(s_axi_bready), .s_axi_araddr(s_axi_araddr), .s_axi_arvalid(s_axi_arvalid),
    .s_axi_arready(s_axi_arready), .s_axi_rdata(s_axi_rdata), .s_axi_rresp(s_axi_rresp),
    .s_axi_rvalid(s_axi_rvalid), .s_axi_rready(s_axi_rready),
    .cfg(cfg), .lo(lo), .hi(hi), .ap_start(ap_start),
    .core_idle(phase == P_IDLE), .core_done(tx_done), .nsamples(nsamples),
    .best_fit(best_fit), .best_iter(best_iter), .best_theta(best_theta), .tau(tau)
  );

  axis_meas_rx #(.DEPTH(DEPTH)) u_rx (
    .clk(clk), .rst_n(rst_n), .start(phase == P_IDLE && ap_start),
    .s_axis_tdata(s_axis_tdata), .s_axis_tvalid(s_axis_tvalid),
    .s_axis_tready(s_axis_tready), .s_axis_tlast(s_axis_tlast),
    .mem_we(mem_we), .mem_waddr(mem_waddr), .mem_wdata(mem_wdata),
    .done(rx_done), .count(nsamples)
  );

  meas_mem #(.DEPTH(DEPTH), .DW(96)) u_mem (
    .clk(clk), .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .raddr(mem_raddr), .rdata(mem_rdata)
  );

  aco_engine #(.DEPTH(DEPTH), .NUM_DIMS(NUM_DIMS)) u_eng (
    .clk(clk), .rst_n(rst_n), .start(phase == P_LOAD && rx_done), .cfg(cfg),
    .lo(lo), .hi(hi), .num_samples(nsamples), .mem_raddr(mem_raddr), .mem_rdata(mem_rdata),
    .busy(eng_busy), .done(eng_done), .best_theta(best_theta), .best_fit(best_fit),
    .best_iter(best_iter), .tau(tau)
  );

  axis_result_tx #(.NUM_DIMS(NUM_DIMS)) u_tx (
    .clk(clk), .rst_n(rst_n), .start(phase == P_RUN && eng_done),
    .best_theta(best_theta), .best_fit(best_fit), .best_iter(best_iter),
    .m_axis_tdata(m_axis_tdata), .m_axis_tvalid(m_axis_tvalid),
    .m_axis_tready(m_axis_tready), .m_axis_tlast(m_axis_tlast), .done(tx_done)
  );
endmodule
