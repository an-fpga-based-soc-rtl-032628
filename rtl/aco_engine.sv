// aco_engine: controller and datapath of the ant colony optimisation loop.
//
// It runs the ACO minimisation loop on the measurement buffer:
//   tau_d <- 1.0; f_best <- infinity
//   for each of T iterations:
//     for each of N ants:
//       for d < NUM_DIMS: x_d = lo_d + r*(hi_d - lo_d), r from the LCG
//       f = fitness(x); keep the iteration's best (strict <)
//       deposit += 1/(1+f)
//     if f_local < f_best: x_best <- x_local (with the iteration number)
//     tau_d <- (1 - rho) tau_d + deposit
// Ants are evaluated one after another by the streaming fitness unit; the
// reciprocal of an ant's fitness is computed while the next ant is sampled and
// evaluated. Only the iteration's best and the running deposit are kept, not
// the whole set of solutions.
// Interface: `start` pulses with the configuration and bounds stable; `done`
// pulses when the last pheromone update is written. best_iter counts
// iterations from 1 (0 if no solution was ever kept). A run of T iterations of
// N ants takes about T*N*(K + NUM_DIMS + 43) clocks for K samples.
// The loop follows the document; sampling uniformly over [lo_d, hi_d), the
// sequential ants and the LCG reseeding at every start are this design's choices.
module aco_engine #(
  parameter int DEPTH    = 2048,
  parameter int NUM_DIMS = 4,
  localparam int AW      = $clog2(DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  aco_pkg::aco_cfg_t    cfg,
  input  aco_pkg::theta_t      lo,
  input  aco_pkg::theta_t      hi,
  input  logic [AW:0]          num_samples,
  output logic [AW-1:0]        mem_raddr,
  input  logic [95:0]          mem_rdata,
  output logic                 busy,
  output logic                 done,
  output aco_pkg::theta_t      best_theta,
  output logic [31:0]          best_fit,
  output logic [31:0]          best_iter,
  output logic [31:0]          tau [NUM_DIMS]
);
  import aco_pkg::*;

  typedef enum logic [2:0] {
    S_IDLE, S_ITER, S_SAMPLE, S_EVAL, S_WAIT_DEP, S_UPDATE
  } state_t;
  state_t state;

  logic [31:0] iter, ant;
  logic [2:0]  d_issue, d_got;
  theta_t      cand, local_theta;
  logic [31:0] local_fit;
  logic [31:0] deposit;

  // ---------------- LCG and range sampler ----------------
  logic        lcg_next;
  logic [31:0] rnd;
  logic        smp_valid;
  logic signed [31:0] smp_x;

  assign lcg_next = (state == S_SAMPLE) && (32'(d_issue) < NUM_DIMS);

  lcg u_lcg (
    .clk      (clk),
    .rst_n    (rst_n),
    .seed_load(start && state == S_IDLE),
    .seed     (cfg.seed),
    .next     (lcg_next),
    .value    (rnd)
  );

  range_sampler u_smp (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (lcg_next),
    .r        (rnd),
    .lo       (lo[d_issue]),
    .hi       (hi[d_issue]),
    .out_valid(smp_valid),
    .x        (smp_x)
  );

  // ---------------- fitness and reciprocal ----------------
  logic        fit_start, fit_busy, fit_done;
  logic [31:0] fit_val;

  assign fit_start = (state == S_SAMPLE) && (32'(d_got) == NUM_DIMS);

  fitness_unit #(.DEPTH(DEPTH), .NUM_DIMS(NUM_DIMS)) u_fit (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (fit_start),
    .theta      (cand),
    .num_samples(num_samples),
    .t_sample   (cfg.t_sample),
    .weight     (cfg.weight),
    .mem_raddr  (mem_raddr),
    .mem_rdata  (mem_rdata),
    .busy       (fit_busy),
    .done       (fit_done),
    .fitness    (fit_val)
  );

  logic        rcp_busy, rcp_done;
  logic [31:0] rcp_q;

  recip_unit u_rcp (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (fit_done),
    .fitness(fit_val),
    .busy   (rcp_busy),
    .done   (rcp_done),
    .quot   (rcp_q)
  );

  // ---------------- pheromones ----------------
  logic ph_init, ph_update;
  assign ph_init   = start && state == S_IDLE;
  assign ph_update = (state == S_UPDATE);

  pheromone_unit #(.NUM_DIMS(NUM_DIMS)) u_ph (
    .clk    (clk),
    .rst_n  (rst_n),
    .init   (ph_init),
    .update (ph_update),
    .rho    (cfg.rho),
    .deposit(deposit),
    .tau    (tau)
  );

  logic [32:0] dep_sum;
  assign dep_sum = {1'b0, deposit} + {1'b0, rcp_q};

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      iter        <= '0;
      ant         <= '0;
      d_issue     <= '0;
      d_got       <= '0;
      cand        <= '{default: '0};
      local_theta <= '{default: '0};
      local_fit   <= FIT_MAX;
      deposit     <= '0;
      best_theta  <= '{default: '0};
      best_fit    <= FIT_MAX;
      best_iter   <= '0;
      done        <= 1'b0;
    end else begin
      done <= 1'b0;
      if (rcp_done) deposit <= dep_sum[32] ? 32'hFFFF_FFFF : dep_sum[31:0];
      if (smp_valid) begin
        cand[d_got] <= smp_x;
        d_got       <= d_got + 1'b1;
      end
      if (lcg_next) d_issue <= d_issue + 1'b1;

      unique case (state)
        S_IDLE: if (start) begin
          iter       <= '0;
          best_theta <= '{default: '0};
          best_fit   <= FIT_MAX;
          best_iter  <= '0;
          cand       <= '{default: '0};
          state      <= S_ITER;
        end
        S_ITER: begin
          if (iter == cfg.num_iters) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            ant       <= '0;
            local_fit <= FIT_MAX;
            deposit   <= '0;
            d_issue   <= '0;
            d_got     <= '0;
            state     <= (cfg.num_ants == 0) ? S_WAIT_DEP : S_SAMPLE;
          end
        end
        S_SAMPLE: if (fit_start) state <= S_EVAL;
        S_EVAL: if (fit_done) begin
          if (fit_val < local_fit) begin
            local_fit   <= fit_val;
            local_theta <= cand;
          end
          d_issue <= '0;
          d_got   <= '0;
          ant     <= ant + 1'b1;
          state   <= (ant + 1'b1 == cfg.num_ants) ? S_WAIT_DEP : S_SAMPLE;
        end
        S_WAIT_DEP: if (!rcp_busy && !rcp_done && !fit_done) begin
          if (local_fit < best_fit) begin
            best_fit   <= local_fit;
            best_theta <= local_theta;
            best_iter  <= iter + 1'b1;
          end
          state <= S_UPDATE;
        end
        S_UPDATE: begin
          iter  <= iter + 1'b1;
          state <= S_ITER;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // A fitness result must never arrive while the divider is still busy.
  a_rcp_free: assert property (@(posedge clk) disable iff (!rst_n) fit_done |-> !rcp_busy);
endmodule
