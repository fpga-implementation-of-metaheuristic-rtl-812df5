// Binary Simulated Kalman Filter (Binary SKF) optimizer.
//
// Minimises the sphere function sum(x[d]^2) over D integer dimensions with
// a population of N agents, using the Simulated Kalman Filter metaheuristic
// reduced to integer arithmetic with a fixed Kalman gain of 0.5. Each run
// draws a random population in -100..100, then repeats MAX_ITER times:
// evaluate every agent and keep the best-so-far solution Xtrue, measure
// Y = X + sin(2*pi*rand)*|X - Xtrue|, and estimate X = X + (Y - X)/2.
// MAX_RUN independent runs follow one another; the RNGs are not reseeded
// between runs, so every run starts from a different population.
//
// All D dimensions of an agent move through the datapath in parallel
// (parallel-in parallel-out ports), so the run time does not depend on D:
// one iteration takes 3 * (N + 2) cycles and all runs take
// MAX_RUN * (1 + N + MAX_ITER * 3 * (N + 2)) cycles, 39,002,550 cycles
// (0.780 s at 50 MHz) for the default sizes. The default sizes (50 agents,
// 10 dimensions, 5000 iterations, 50 runs) are the design's; 5 and 20
// dimensions are its other variants.
//
// Blocks: skf_ctrl (FSM), D x skf_rng8 (initial positions), skf_rng2
// (measure randomness), two skf_ram (RAM_X positions, RAM_Y measurements),
// skf_act_fn (fitness), skf_best (Xbest/Xtrue), skf_measure, skf_estimate.
//
// Interface: rst is synchronous and active high; after its release the
// optimiser starts on its own. run_done pulses at the end of each run with
// that run's result on xtrue_fit/xtrue_pos (run gives its index); done
// stays high once all runs are complete. improved pulses when Xtrue gets
// better; xbest_fit is the best fitness of the latest evaluation. SEED8
// and SEED2 set the RNG seeds.
module skf_top
  import skf_pkg::*;
#(
  parameter int           N        = 50,
  parameter int           D        = 10,
  parameter int           MAX_ITER = 5000,
  parameter int           MAX_RUN  = 50,
  parameter logic [7:0]   SEED8    = 8'h5A,
  parameter logic [15:0]  SEED2    = 16'hACE1,
  localparam int IW = (MAX_ITER > 1) ? $clog2(MAX_ITER) : 1,
  localparam int RW = (MAX_RUN > 1) ? $clog2(MAX_RUN) : 1,
  localparam int AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst,
  output logic [2:0]    state,
  output logic [IW-1:0] iter,
  output logic [RW-1:0] run,
  output logic          run_done,
  output logic          done,
  output logic          improved,
  output logic [31:0]   xbest_fit,
  output logic [31:0]   xtrue_fit,
  output logic [7:0]    xtrue_pos [D]
);

  state_t        st;
  logic          x_we, x_wsel_gen, y_we, clear_run, fit_valid, fit_last;
  logic [AW-1:0] x_waddr, x_raddr, y_waddr, y_raddr;

  pos_t          rng_pos  [D];
  logic [1:0]    rng2;
  logic [7:0]    x_wdata  [D];
  logic [7:0]    x_rdata  [D];
  logic [8:0]    y_wdata  [D];
  logic [8:0]    y_rdata  [D];
  pos_t          x_cur    [D];
  meas_t         y_cur    [D];
  pos_t          est_out  [D];
  meas_t         meas_out [D];
  fit_t          fitness;
  fit_t          xtrue_fit_q;
  pos_t          xbest_pos [D];
  pos_t          xtrue_q   [D];
  pos_t          x_cur_d   [D];  // position aligned with the fitness

  skf_ctrl #(.N(N), .MAX_ITER(MAX_ITER), .MAX_RUN(MAX_RUN)) u_ctrl (
    .clk, .rst, .state(st), .iter, .run,
    .x_we, .x_wsel_gen, .x_waddr, .x_raddr,
    .y_we, .y_waddr, .y_raddr,
    .clear_run, .fit_valid, .fit_last,
    .run_done, .done
  );

  for (genvar d = 0; d < D; d++) begin : g_rng8
    skf_rng8 u_rng8 (
      .clk, .rst,
      .seed     (SEED8 + 8'(37 * d)),
      .rng_8bit (rng_pos[d])
    );
  end

  skf_rng2 #(.SEED(SEED2)) u_rng2 (.clk, .rst, .rng_2bit(rng2));

  always_comb begin
    for (int d = 0; d < D; d++) begin
      x_wdata[d] = x_wsel_gen ? rng_pos[d] : est_out[d];
      y_wdata[d] = meas_out[d];
      x_cur[d]   = x_rdata[d];
      y_cur[d]   = y_rdata[d];
      xtrue_pos[d] = xtrue_q[d];
    end
  end

  skf_ram #(.N(N), .D(D), .W(POS_W)) u_ram_x (
    .clk, .we(x_we), .w_addr(x_waddr), .wdata(x_wdata),
    .r_addr(x_raddr), .rdata(x_rdata)
  );

  skf_ram #(.N(N), .D(D), .W(MEAS_W)) u_ram_y (
    .clk, .we(y_we), .w_addr(y_waddr), .wdata(y_wdata),
    .r_addr(y_raddr), .rdata(y_rdata)
  );

  skf_act_fn #(.D(D)) u_act_fn (.clk, .x(x_cur), .fitness);

  // The fitness appears one cycle after the position it belongs to.
  always_ff @(posedge clk) x_cur_d <= x_cur;

  skf_best #(.D(D)) u_best (
    .clk, .rst, .clear_run,
    .valid(fit_valid), .last(fit_last),
    .fitness, .pos(x_cur_d),
    .xbest_fit, .xbest_pos,
    .xtrue_fit(xtrue_fit_q), .xtrue_pos(xtrue_q),
    .improved
  );

  skf_measure #(.D(D)) u_measure (
    .clk, .rng(rng2), .x(x_cur), .xtrue(xtrue_q), .y(meas_out)
  );

  skf_estimate #(.D(D)) u_estimate (
    .clk, .x(x_cur), .y(y_cur), .x_new(est_out)
  );

  assign state     = st;
  assign xtrue_fit = xtrue_fit_q;

endmodule
