// cordic_atan2: fully pipelined two-argument arctangent, atan2(y, x).
//
// It gives the nominal bearing h(theta,k) = atan(y_t - y_o, x_t - x_o) of the
// measurement model. Stage 0 rotates vectors in the left half-plane by pi
// (x, y -> -x, -y) and presets the angle to +pi or -pi. Stages 1..STAGES are
// CORDIC vectoring micro-rotations that drive y to zero while accumulating
// +-atan(2^-i) from the table in aco_pkg. The angle is returned in Q3.29
// radians in (-pi, pi]; atan2(0, 0) is 0. Inputs are signed integers of
// IN_W bits (any fixed-point scale, the same for x and y); internally they are
// sign-extended to W bits to absorb the CORDIC gain of about 1.65.
// Timing: one operand pair per clock; the result appears STAGES+1 clocks after
// `in_valid`, with `out_valid`. Using CORDIC is this design's choice.
module cordic_atan2 #(
  parameter int IN_W   = 34,
  parameter int W      = 36,
  parameter int STAGES = 30
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] x,
  input  logic signed [IN_W-1:0] y,
  output logic                   out_valid,
  output logic signed [31:0]     angle
);
  import aco_pkg::*;

  logic signed [W-1:0] xs [STAGES+1];
  logic signed [W-1:0] ys [STAGES+1];
  logic signed [32:0]  zs [STAGES+1];
  logic                vs [STAGES+1];

  // Stage 0: quadrant pre-rotation into the right half-plane.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vs[0] <= 1'b0;
      xs[0] <= '0;
      ys[0] <= '0;
      zs[0] <= '0;
    end else begin
      vs[0] <= in_valid;
      if (x < 0) begin
        xs[0] <= -W'(x);
        ys[0] <= -W'(y);
        zs[0] <= (y >= 0) ? 33'(PI_Q29) : -33'(PI_Q29);
      end else begin
        xs[0] <= W'(x);
        ys[0] <= W'(y);
        zs[0] <= '0;
      end
    end
  end

  // Stages 1..STAGES: vectoring micro-rotations.
  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vs[i+1] <= 1'b0;
        xs[i+1] <= '0;
        ys[i+1] <= '0;
        zs[i+1] <= '0;
      end else begin
        vs[i+1] <= vs[i];
        if (ys[i] >= 0) begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + 33'(ATAN_TAB[i]);
        end else begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - 33'(ATAN_TAB[i]);
        end
      end
    end
  end

  // The accumulated angle always lies within +-(pi + 1.75) < 2^32 LSBs of Q3.29;
  // bring results just outside (-pi, pi] back by 2*pi.
  logic signed [32:0] z_out;
  always_comb begin
    z_out = zs[STAGES];
    if (z_out > 33'(PI_Q29))       z_out = z_out - TWO_PI_Q29;
    else if (z_out <= -33'(PI_Q29)) z_out = z_out + TWO_PI_Q29;
  end

  assign out_valid = vs[STAGES];
  assign angle     = 32'(z_out);
endmodule
