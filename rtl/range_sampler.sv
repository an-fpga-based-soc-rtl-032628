// range_sampler: turns a random fraction into a candidate parameter value.
//
// x = lo + r * (hi - lo), with r an unsigned fraction in [0,1) (32 fractional
// bits) and lo/hi signed 32-bit bounds of one dimension of the search space.
// The product is 33 x 32 bits; its upper part is added to lo, so x lies in
// [lo, hi). One register stage: `out_valid`/`x` follow `in_valid` by one clock.
// Uniform sampling over [lo, hi) is this design's reading of "select x_{i,d}
// with probability tau_d^alpha" when a dimension has a single pheromone value.
module range_sampler (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic        [31:0] r,
  input  logic signed [31:0] lo,
  input  logic signed [31:0] hi,
  output logic               out_valid,
  output logic signed [31:0] x
);
  logic signed [32:0] span;
  logic signed [65:0] prod;
  logic signed [31:0] x_d;

  always_comb begin
    span = 33'(hi) - 33'(lo);
    prod = 66'(span) * $signed({34'd0, r});
    x_d  = lo + 32'(prod >>> 32);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      x         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) x <= x_d;
    end
  end
endmodule
