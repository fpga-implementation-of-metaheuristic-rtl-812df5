// End-to-end testbench for skf_top at reduced size (6 agents, 4
// dimensions, 30 iterations, 3 runs): the reference checker recomputes the
// whole optimisation and compares every evaluation and run result, the
// time per state and the total cycle count. Every mechanism of the design
// must occur at least once: iteration loop, run restart, completion,
// best-so-far improvement, RNG folding, the three sine values of the
// measure step, measurement saturation and estimate saturation.
module tb_skf_top;
  localparam int N = 6, D = 4, MI = 30, MR = 3;
  logic clk = 0, rst = 1;
  logic [2:0] state;
  logic [4:0] iter;
  logic [1:0] run;
  logic run_done, done, improved;
  logic [31:0] xtrue_fit, xbest_fit;
  logic [7:0] xtrue_pos [D];
  int checks, failures;
  int n_iter_loops, n_run_restarts, n_complete, n_improve, n_fold;
  int n_sin_pos, n_sin_neg, n_sin_zero, n_meas_sat, n_est_sat;
  longint total_cycles;
  int run_results [MR];
  int extra_fail = 0, extra_checks = 0;

  skf_top #(.N(N), .D(D), .MAX_ITER(MI), .MAX_RUN(MR)) dut (
    .clk, .rst, .state, .iter, .run, .run_done, .done, .improved,
    .xbest_fit, .xtrue_fit, .xtrue_pos);

  skf_ref_checker #(.N(N), .D(D), .MAX_ITER(MI), .MAX_RUN(MR)) chk (.*);

  always #5 clk = ~clk;

  task automatic need(string what, int count);
    extra_checks++;
    $display("%-22s %0d", what, count);
    if (count == 0) begin
      extra_fail++;
      $display("mechanism never occurred: %s", what);
    end
  endtask

  task automatic finish();
    chk.final_checks();
    need("iteration loops", n_iter_loops);
    need("run restarts", n_run_restarts);
    need("completion", n_complete);
    need("Xtrue improvements", n_improve);
    need("RNG folds", n_fold);
    need("sine +1", n_sin_pos);
    need("sine -1", n_sin_neg);
    need("sine 0", n_sin_zero);
    need("measure saturation", n_meas_sat);
    need("estimate saturation", n_est_sat);
    for (int r = 0; r < MR; r++) $display("run %0d best fitness %0d", r, run_results[r]);
    $display("total cycles %0d", total_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks, failures + extra_fail);
    $finish;
  endtask

  initial begin
    repeat (MR * (1 + N + MI * 3 * (N + 2)) + 1000) @(posedge clk);
    extra_fail++;
    $display("watchdog: optimiser did not finish");
    finish();
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    wait (done);
    repeat (5) @(posedge clk);
    finish();
  end
endmodule
