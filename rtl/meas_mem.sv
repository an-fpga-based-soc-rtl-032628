// meas_mem: measurement buffer of the accelerator.
//
// A simple dual-port RAM of DEPTH words of DW bits: one write port filled by the
// input stream and one read port used by the fitness unit, both on one clock.
// A word holds one measurement {y_o(k), x_o(k), z(k)}, 32 bits each. The read
// is registered: `rdata` shows the word at `raddr` one clock later. Contents are
// not reset. The depth (largest k_max) is this design's choice.
module meas_mem #(
  parameter int DEPTH = 2048,
  parameter int DW    = 96,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
