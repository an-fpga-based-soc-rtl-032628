// fitness_unit: maximum-likelihood cost of one candidate solution.
//
// For a candidate theta = [x_t0 y_t0 xdot_t0 ydot_t0 xddot_t yddot_t] it computes
//   f(theta) = sum_{k=1..K} (z(k) - h(theta,k))^2 / (2 sigma^2)
// with the target model x_t(k) = x_t0 + xdot_t0*t + xddot_t*t^2/2, t = k*T (same
// for y) and h = atan2(y_t - y_o(k), x_t - x_o(k)). Measurement word j of the
// buffer holds sample k = j+1 as {y_o, x_o, z}.
//
// The unit streams the K measurements through a pipeline, one per clock:
//   read -> products (velocity*t, acceleration*t) -> acceleration*t*t ->
//   dx, dy -> CORDIC atan2 -> wrapped residual e in [-pi, pi) -> e^2 ->
//   e^2 * weight -> saturating accumulator.
// `weight` is 1/(2 sigma^2) in Q16.16; the result is unsigned Q16.16 and
// saturates at all ones. With NUM_DIMS = 4 the acceleration terms are zero.
// Timing: `start` (with theta and the other inputs held stable until `done`)
// begins the stream; `done` pulses with `fitness` valid K + 39 clocks later with
// the default CORDIC. `busy` is high meanwhile; K must be at least 1.
// The cost function follows the document; pipeline, formats and the wrapping of
// the residual are this design's choices.
module fitness_unit #(
  parameter int DEPTH    = 2048,
  parameter int NUM_DIMS = 4,
  localparam int AW      = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  aco_pkg::theta_t     theta,
  input  logic [AW:0]         num_samples,
  input  logic [31:0]         t_sample,
  input  logic [31:0]         weight,
  output logic [AW-1:0]       mem_raddr,
  input  logic [95:0]         mem_rdata,
  output logic                busy,
  output logic                done,
  output logic [31:0]         fitness
);
  import aco_pkg::*;

  localparam int CORDIC_STAGES = 30;
  localparam int CORDIC_LAT    = CORDIC_STAGES + 1;

  // ---------------- read issue ----------------
  logic [AW:0]  rd_cnt;     // samples issued
  logic [AW:0]  acc_cnt;    // terms accumulated
  logic         issuing;
  logic [31:0]  t_now;      // time of the sample being issued, Q16.16

  assign mem_raddr = rd_cnt[AW-1:0];

  // stage 1: memory data valid
  logic         v1;
  logic [31:0]  t1;
  // stage 2: products
  logic                v2;
  logic signed [95:0]  z2;
  logic signed [64:0]  pvx2, pvy2, pax2, pay2;
  logic [31:0]         t2;
  // stage 3: acceleration * t
  logic                v3;
  logic signed [95:0]  z3;
  logic signed [64:0]  pvx3, pvy3;
  logic signed [96:0]  qax3, qay3;
  // stage 4: dx, dy
  logic                v4;
  logic signed [31:0]  zb4;
  logic signed [39:0]  dx4, dy4;
  // CORDIC output and aligned measured bearing
  logic                vc;
  logic signed [31:0]  h_c;
  logic signed [31:0]  zdly [CORDIC_LAT];
  // stage 5: residual
  logic                v5;
  logic signed [31:0]  e5;
  // stage 6: e^2
  logic                v6;
  logic [63:0]         e2_6;
  // stage 7: weighted term
  logic                v7;
  logic [31:0]         term7;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_cnt  <= '0;
      issuing <= 1'b0;
      t_now   <= '0;
      busy    <= 1'b0;
    end else begin
      if (start && !busy) begin
        busy    <= 1'b1;
        issuing <= 1'b1;
        rd_cnt  <= '0;
        t_now   <= t_sample;           // k = 1
      end else if (issuing) begin
        rd_cnt <= rd_cnt + 1'b1;
        t_now  <= t_now + t_sample;
        if (rd_cnt + 1'b1 == num_samples) issuing <= 1'b0;
      end
      if (done) busy <= 1'b0;
    end
  end

  // Pipeline registers (data path needs no reset, valid bits do)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0; v4 <= 1'b0; v5 <= 1'b0; v6 <= 1'b0; v7 <= 1'b0;
    end else begin
      v1 <= issuing;
      v2 <= v1;
      v3 <= v2;
      v4 <= v3;
      v5 <= vc;
      v6 <= v5;
      v7 <= v6;
    end
  end

  logic signed [32:0] t1s;
  assign t1s = $signed({1'b0, t1});

  always_ff @(posedge clk) begin
    t1 <= t_now;
    // stage 2
    z2   <= $signed(mem_rdata);
    t2   <= t1;
    pvx2 <= 65'(theta[2]) * 65'(t1s);
    pvy2 <= 65'(theta[3]) * 65'(t1s);
    if (NUM_DIMS > 4) begin
      pax2 <= 65'(theta[4]) * 65'(t1s);
      pay2 <= 65'(theta[5]) * 65'(t1s);
    end else begin
      pax2 <= '0;
      pay2 <= '0;
    end
    // stage 3: (a*t >> 16) * t, still scaled by 2^32
    z3   <= z2;
    pvx3 <= pvx2;
    pvy3 <= pvy2;
    qax3 <= 97'(pax2 >>> 16) * 97'($signed({1'b0, t2}));
    qay3 <= 97'(pay2 >>> 16) * 97'($signed({1'b0, t2}));
    // stage 4: position of target minus own-ship, Q24.8
    zb4 <= z3[31:0];
    dx4 <= 40'(theta[0]) + 40'(pvx3 >>> 24) + 40'(qax3 >>> 25) - 40'($signed(z3[63:32]));
    dy4 <= 40'(theta[1]) + 40'(pvy3 >>> 24) + 40'(qay3 >>> 25) - 40'($signed(z3[95:64]));
  end

  cordic_atan2 #(.IN_W(40), .W(42), .STAGES(CORDIC_STAGES)) u_cordic (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (v4),
    .x        (dx4),
    .y        (dy4),
    .out_valid(vc),
    .angle    (h_c)
  );

  // Measured bearing delayed to meet the CORDIC result.
  always_ff @(posedge clk) begin
    zdly[0] <= zb4;
    for (int i = 1; i < CORDIC_LAT; i++) zdly[i] <= zdly[i-1];
  end

  logic signed [32:0] e_raw;
  logic signed [32:0] e_wrap;
  always_comb begin
    e_raw  = 33'(zdly[CORDIC_LAT-1]) - 33'(h_c);
    e_wrap = e_raw;
    if (e_raw >= 33'(PI_Q29))       e_wrap = e_raw - TWO_PI_Q29;
    else if (e_raw < -33'(PI_Q29))  e_wrap = e_raw + TWO_PI_Q29;
  end

  logic [67:0] wprod;
  assign wprod = 68'(e2_6 >> 26) * 68'(weight);   // Q6.32 * Q16.16 = Q22.48

  always_ff @(posedge clk) begin
    e5    <= 32'(e_wrap);
    e2_6  <= 64'($unsigned(64'(e5) * 64'(e5)));   // Q6.58
    term7 <= (wprod[67:64] != 0) ? 32'hFFFF_FFFF : wprod[63:32];
  end

  // Saturating accumulator.
  logic [32:0] acc_sum;
  assign acc_sum = {1'b0, fitness} + {1'b0, term7};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fitness <= '0;
      acc_cnt <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        fitness <= '0;
        acc_cnt <= '0;
      end else if (v7) begin
        fitness <= acc_sum[32] ? 32'hFFFF_FFFF : acc_sum[31:0];
        acc_cnt <= acc_cnt + 1'b1;
        if (acc_cnt + 1'b1 == num_samples) done <= 1'b1;
      end
    end
  end
endmodule
