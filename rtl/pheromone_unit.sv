// pheromone_unit: pheromone levels tau_d of the ant colony.
//
// `init` sets every tau_d to 1.0. `update` applies, to every dimension in the
// same clock, the evaporation-and-deposit rule
//   tau_d <- (1 - rho) * tau_d + deposit
// where `deposit` is the colony's sum of 1/(1 + f(x_i)) for the iteration.
// tau and deposit are unsigned Q16.16, rho is Q0.16; the product is truncated
// and the sum saturates at the largest Q16.16 value. `init` wins over `update`.
// Timing: the new levels are visible one clock after the pulse.
// The rule and the initial value follow the document; formats, truncation and
// saturation are this design's choices.
module pheromone_unit #(
  parameter int NUM_DIMS = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        update,
  input  logic [15:0] rho,
  input  logic [31:0] deposit,
  output logic [31:0] tau [NUM_DIMS]
);
  import aco_pkg::*;

  logic [16:0] keep;   // 1 - rho, Q1.16
  assign keep = 17'h1_0000 - 17'(rho);

  for (genvar d = 0; d < NUM_DIMS; d++) begin : g_dim
    logic [48:0] evap;   // Q17.32
    logic [32:0] next;
    assign evap = 49'(tau[d]) * 49'(keep);
    assign next = 33'(evap >> 16) + 33'(deposit);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)      tau[d] <= ONE_Q16;
      else if (init)   tau[d] <= ONE_Q16;
      else if (update) tau[d] <= next[32] ? 32'hFFFF_FFFF : next[31:0];
    end
  end
endmodule
