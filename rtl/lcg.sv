// lcg: linear congruential pseudo-random generator.
//
// The state advances as x <- (A*x + C) mod 2^32 whenever `next` is high: one
// multiplication, one addition and a modulo that is simply the 32-bit wrap.
// The state itself is the output and is read as a fraction r in [0,1) with 32
// fractional bits. `seed_load` (priority over `next`) loads `seed`.
// Timing: the new value appears one clock after `next`.
// Using an LCG follows the document; the constants (Numerical Recipes) and the
// 2^32 modulus are this design's choice.
module lcg #(
  parameter logic [31:0] A = 32'd1664525,
  parameter logic [31:0] C = 32'd1013904223
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        seed_load,
  input  logic [31:0] seed,
  input  logic        next,
  output logic [31:0] value
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         value <= '0;
    else if (seed_load) value <= seed;
    else if (next)      value <= A * value + C;
  end
endmodule
