# ACO accelerator for bearings-only target motion analysis

A sensor platform (the "own-ship") measures only the bearing to a moving
target. From a record of noisy bearings z(k), k = 1..K, it has to estimate the
target's initial position and velocity
theta = [x_t0, y_t0, xdot_t0, ydot_t0] (optionally also two accelerations).
The maximum-likelihood estimate minimises

    f(theta) = sum_k (z(k) - h(theta, k))^2 / (2 sigma^2)
    h(theta, k) = atan2(y_t(kT) - y_o(k), x_t(kT) - x_o(k))
    x_t(t) = x_t0 + xdot_t0 * t + xddot_t * t^2 / 2      (same for y)

This cost is non-convex and has no closed-form minimum. This design searches it
with ant colony optimisation (ACO) in programmable logic. Ants draw random
candidates inside a configured search box. Each candidate is scored against the
whole measurement record, and the best one seen is kept. The block is an
AXI-Streaming IP for a Zynq-7000 system. A DMA streams the measurement record
in and takes the estimate back. The processor sets the run parameters over
AXI4-Lite.

## System context

    Zynq PS --AXI-Lite--> [aco_ip registers]
    DRAM --DMA MM2S--> 128-bit AXI-Stream --> [aco_ip] --> 64-bit AXI-Stream --DMA S2MM--> DRAM

Neither the processing system, the AXI DMA nor the AXI interconnect is part of
this RTL. `aco_ip` brings out their connections as plain AXI4-Stream and
AXI4-Lite ports.

## Block structure

    aco_ip
    ├── axil_regs        AXI4-Lite register file, start/done/idle
    ├── axis_meas_rx     128-bit stream slave -> measurement buffer
    ├── meas_mem         2048 x 96-bit dual-port RAM
    ├── aco_engine       the optimisation loop
    │   ├── lcg              random numbers
    │   ├── range_sampler    r in [0,1) -> lo + r*(hi-lo)
    │   ├── fitness_unit     streaming cost evaluation
    │   │   └── cordic_atan2     pipelined atan2
    │   ├── recip_unit       1/(1+f) divider
    │   └── pheromone_unit   tau_d evaporation and deposit
    └── axis_result_tx   64-bit stream master for the estimate

`aco_pkg` holds the number formats, the CORDIC table, the configuration struct
and the register offsets.

A run has three phases, sequenced in `aco_ip`: load, search and send.
1. Software writes 1 to `CTRL.start`.
2. The IP accepts one record. TLAST ends it.
3. It runs the search, then sends the result beats.
4. It sets `CTRL.done` and returns to idle.

## The optimisation loop (`aco_engine`)

    tau_d = 1.0 for every dimension;  f_best = +inf
    repeat T iterations:
        for each of N ants:
            x_d = lo_d + r * (hi_d - lo_d)      r from the LCG, one per dimension
            f   = fitness(x)
            keep the iteration's lowest f       (strict <)
            deposit += 1 / (1 + f)
        if f_local < f_best: x_best, f_best, best_iter <- local
        tau_d = (1 - rho) * tau_d + deposit     for every d

Points to know when reading or changing it:

* **Sampling is uniform.** The loop keeps one pheromone value per dimension.
  Normalising a single weight over a continuous interval gives a constant
  probability, so the pheromone does not bias where ants sample. The levels are
  still kept and updated, and software can read them (`TAU_d`), but they do not
  steer the search. This is the most consequential reading in this design.
  Change it in `range_sampler` and `aco_engine` if a pheromone-guided sampler
  is wanted.
* **The deposit does not depend on d.** Every dimension receives the same
  deposit, the sum over ants of 1/(1+f). All tau_d are therefore equal after
  each update.
* **Random numbers.** The LCG is x <- 1664525*x + 1013904223 (mod 2^32). It is
  reseeded from `SEED` at every start, so a run is reproducible. Ant a of
  iteration i takes NUM_DIMS consecutive states as r, one per dimension. The
  first r is the seed itself.
* **Ants run one after another.** The fitness unit takes one ant at a time. The
  1/(1+f) divider of one ant overlaps the sampling and evaluation of the next.
  Only the iteration's best solution and the running deposit are stored, not
  the whole colony.
* `N = 0` or `T = 0` ends the run without a solution: `best_fit` is all ones and
  `best_iter` is 0.

Cost of a run with K samples: about T * N * (K + 46) clocks plus up to 45 per
iteration. For example, K = 1806, N = 20 and T = 20 take about 0.74 M clocks,
which is 7.4 ms at 100 MHz.

## The fitness pipeline (`fitness_unit`)

The unit streams the measurement buffer once per candidate, one sample per
clock, through these stages:

| stage | work |
|---|---|
| read | address j; sample j is k = j+1, so t = (j+1)*T (t accumulated by adding T) |
| 2 | velocity*t and acceleration*t products (65-bit) |
| 3 | (acceleration*t)*t |
| 4 | dx = x_t - x_o, dy = y_t - y_o (40-bit Q32.8) |
| 5..35 | CORDIC atan2: a quadrant pre-rotation, then 30 vectoring stages |
| 36 | e = z - h, wrapped into [-pi, pi) |
| 37 | e^2 |
| 38 | e^2 * weight, saturated to 32 bits |
| acc | saturating sum |

`done` comes K + 39 clocks after `start`. `weight` is 1/(2 sigma^2), which
saves a divider. With `NUM_DIMS = 4` the acceleration products are tied to
zero and synthesis removes them. At ranges of kilometres the CORDIC angle
error stays below 2e-6 rad; its testbench checks this. dx and dy are quantised
to 1/256 m, so the angle error grows at very short ranges.

## Number formats

All values are 32-bit fixed point.

| quantity | format |
|---|---|
| x_t0, y_t0, x_o, y_o | signed Q24.8 metres |
| xdot, ydot | signed Q16.16 m/s |
| xddot, yddot | signed Q16.16 m/s^2 |
| bearings z, h | signed Q3.29 radians, measured from the x axis: atan2(dy, dx) |
| sample time T | unsigned Q16.16 s |
| weight 1/(2 sigma^2) | unsigned Q16.16: sigma must be at least 0.0028 rad |
| fitness | unsigned Q16.16; saturates at 65535.99 ("infinity") |
| rho | Q0.16 |
| tau, 1/(1+f) | unsigned Q16.16 |

The sample time t = kT must stay below 65536 s.

## Interfaces

**Input stream** (128-bit AXI4-Stream slave, one measurement per beat):
`[31:0]` z(k), `[63:32]` x_o(k), `[95:64]` y_o(k); bits `[127:96]` are ignored.
TLAST marks the last sample. Beats beyond 2048 are accepted and dropped.

**Output stream** (64-bit AXI4-Stream master). For NUM_DIMS = 4 it sends three
beats:

| beat | [63:32] | [31:0] |
|---|---|---|
| 0 | x_best[1] (y_t0) | x_best[0] (x_t0) |
| 1 | x_best[3] (ydot) | x_best[2] (xdot) |
| 2, with TLAST | best_iter | best_fit |

TDATA is held while the master waits for TREADY. An assertion checks this.

**AXI4-Lite registers**. The slave takes address and data in one handshake and
allows one outstanding write and one outstanding read. It ignores WSTRB and
always answers OKAY.

| offset | register |
|---|---|
| 0x00 | CTRL: bit 0 start (write 1 while idle); bit 1 done (cleared by the next start); bit 2 idle |
| 0x10 / 0x14 | NUM_ANTS N / NUM_ITERS T |
| 0x18 | RHO (Q0.16 in [15:0]) |
| 0x1C | T_SAMPLE |
| 0x20 | WEIGHT = 1/(2 sigma^2) |
| 0x24 | SEED |
| 0x28 | NSAMPLES (read only) |
| 0x2C | BEST_FIT (read only) |
| 0x30 | BEST_ITER (read only) |
| 0x40 + 8d / 0x44 + 8d | LO_d / HI_d: search box of dimension d (d = 0..5) |
| 0x80 + 4d | TAU_d (read only) |
| 0xA0 + 4d | X_BEST_d (read only) |

## Parameters

| parameter | default | meaning |
|---|---|---|
| `DEPTH` | 2048 | largest record. The reference scenario's cost near the truth (about 903) suggests about 1800 samples, since each sample adds about 1/2. |
| `NUM_DIMS` | 4 | 4: position and velocity. 6: accelerations added. |

N, the iteration count T, rho, sigma, the sample time and the search box are
run-time registers.

## Where this RTL is its own

The following points come from the design, not from a published reference:
* the fixed-point formats;
* CORDIC for atan2;
* the restoring divider;
* the wrapping of the residual;
* supplying 1/(2 sigma^2) instead of sigma;
* the register map;
* the beat layout of both streams;
* the load/search/send sequencing;
* the LCG constants;
* uniform sampling in a software-set search box;
* the buffer depth.

The input stream is 128 bits wide but carries only three 32-bit values. Alpha
and beta, the pheromone and heuristic exponents of ACO, enter no computation
and have no register. Device-level views of the original system are not
modelled: resource floorplan, power.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog. Reference values are
computed independently of the RTL: floating-point `$atan2` and cost sums,
exact integer quotients, and a software replay of the LCG, the sampler and the
whole loop.

`tb_aco_engine` also runs a six-parameter engine (accelerations searched) on
the same data and checks it against the same replay.

`tb_aco_ip` runs the complete IP at its default parameters:
* The scenario has a target at (30 km, 30 km) moving at (8, 7) m/s. A weaving
  own-ship provides 1806 bearings, 4 s apart, with 1 degree noise.
* The run uses 20 ants and 20 iterations, with input gaps and output
  back-pressure.
* It checks the result beats, the registers, the cost of the reported
  solution, that the solution is the best of all 400 candidates, the pheromone
  levels and the run time.
* A second run sends a record longer than the buffer.

Every mechanism is counted and must occur at least once:
* stalls on both streams;
* global-best improvements, and iterations without one;
* pheromone updates;
* the divider overlapping an evaluation;
* a start ignored while busy;
* dropped beats.

Run a testbench with plain Verilator from the directory that holds `rtl/` and
`tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        --top-module tb_aco_ip rtl/aco_pkg.sv tb/tb_aco_ip.sv
    ./obj_dir/Vtb_aco_ip

The full-size end-to-end run takes a few seconds.

Known limits:
* Costs above 65535 saturate. Candidates that far off are still ranked as
  worst, but two such candidates cannot be told apart.
* The uniform sampler explores the search box blindly, so the quality of the
  estimate depends on N*T and on how tight the box is. In the reference run the
  400 candidates reached a cost of about 1510. That is above the value at the
  true parameters.
