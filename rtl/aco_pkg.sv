// aco_pkg: number formats, constants and shared types of the ACO bearings-only
// target motion analysis (BOTMA) accelerator.
//
// All arithmetic is 32-bit fixed point (the format is this design's choice):
//   position     signed Q24.8   metres        (x_t0, y_t0, x_o, y_o)
//   velocity     signed Q16.16  m/s           (xdot_t0, ydot_t0)
//   acceleration signed Q16.16  m/s^2         (xddot_t, yddot_t)
//   angle        signed Q3.29   radians       (bearings z(k) and h(theta,k))
//   time         unsigned Q16.16 seconds      (sampling time T)
//   fitness      unsigned Q16.16, saturating  (cost of eq. (8))
//   weight       unsigned Q16.16              (1/(2 sigma^2))
//   rho          unsigned Q0.16               (evaporation rate)
//   pheromone    unsigned Q16.16
// The parameter vector theta is ordered as in psi = [x_t0 y_t0 xdot_t0 ydot_t0
// xddot_t yddot_t]; the first NUM_DIMS entries are searched, the rest are zero.
package aco_pkg;

  localparam int MAX_DIMS = 6;

  // pi and 2*pi in Q3.29
  localparam logic signed [31:0] PI_Q29     = 32'sd1686629713;
  localparam logic signed [32:0] TWO_PI_Q29 = 33'sd3373259426;

  // atan(2^-i) in Q3.29, i = 0..29: round(atan(2**-i) * 2**29)
  localparam logic [31:0] ATAN_TAB [30] = '{
    32'd421657428, 32'd248918915, 32'd131521918, 32'd66762579, 32'd33510843,
    32'd16771758,  32'd8387925,   32'd4194219,   32'd2097141,  32'd1048575,
    32'd524288,    32'd262144,    32'd131072,    32'd65536,    32'd32768,
    32'd16384,     32'd8192,      32'd4096,      32'd2048,     32'd1024,
    32'd512,       32'd256,       32'd128,       32'd64,       32'd32,
    32'd16,        32'd8,         32'd4,         32'd2,        32'd1
  };

  localparam logic [31:0] FIT_MAX = 32'hFFFF_FFFF;  // "infinity" of Algorithm 1 line 2
  localparam logic [31:0] ONE_Q16 = 32'h0001_0000;  // initial pheromone 1.0

  typedef logic signed [31:0] theta_t [MAX_DIMS];

  // Run configuration written through AXI-Lite.
  typedef struct packed {
    logic [31:0] num_ants;    // N
    logic [31:0] num_iters;   // T (iterations)
    logic [15:0] rho;         // evaporation rate, Q0.16
    logic [31:0] t_sample;    // sampling time, Q16.16 s
    logic [31:0] weight;      // 1/(2 sigma^2), Q16.16
    logic [31:0] seed;        // LCG seed
  } aco_cfg_t;

  // AXI-Lite register byte offsets
  localparam logic [7:0] REG_CTRL      = 8'h00;  // [0] start (W), [1] done, [2] idle
  localparam logic [7:0] REG_NUM_ANTS  = 8'h10;
  localparam logic [7:0] REG_NUM_ITERS = 8'h14;
  localparam logic [7:0] REG_RHO       = 8'h18;
  localparam logic [7:0] REG_T_SAMPLE  = 8'h1C;
  localparam logic [7:0] REG_WEIGHT    = 8'h20;
  localparam logic [7:0] REG_SEED      = 8'h24;
  localparam logic [7:0] REG_NSAMPLES  = 8'h28;  // read only: samples received
  localparam logic [7:0] REG_BEST_FIT  = 8'h2C;  // read only
  localparam logic [7:0] REG_BEST_ITER = 8'h30;  // read only
  localparam logic [7:0] REG_LO_BASE   = 8'h40;  // lo_d at 0x40 + 8d
  localparam logic [7:0] REG_HI_BASE   = 8'h44;  // hi_d at 0x44 + 8d
  localparam logic [7:0] REG_TAU_BASE  = 8'h80;  // tau_d at 0x80 + 4d (read only)
  localparam logic [7:0] REG_BEST_BASE = 8'hA0;  // x_best_d at 0xA0 + 4d (read only)

endpackage
