// Full-size testbench: skf_top with all its default sizes (50 agents, 10
// dimensions, 5000 iterations, 50 runs). The reference checker recomputes
// the whole optimisation; the testbench checks every run result, the time
// per state and the total of 39,002,550 cycles (0.780 s at 50 MHz), and
// reports the best fitness of each run.
module tb_skf_full;
  localparam int N = 50, D = 10, MI = 5000, MR = 50;
  logic clk = 0, rst = 1;
  logic [2:0] state;
  logic [12:0] iter;
  logic [5:0] run;
  logic run_done, done, improved;
  logic [31:0] xtrue_fit, xbest_fit;
  logic [7:0] xtrue_pos [D];
  int checks, failures;
  int n_iter_loops, n_run_restarts, n_complete, n_improve, n_fold;
  int n_sin_pos, n_sin_neg, n_sin_zero, n_meas_sat, n_est_sat;
  longint total_cycles;
  int run_results [MR];
  int extra_fail = 0;

  skf_top dut (
    .clk, .rst, .state, .iter, .run, .run_done, .done, .improved,
    .xbest_fit, .xtrue_fit, .xtrue_pos);

  skf_ref_checker #(.N(N), .D(D), .MAX_ITER(MI), .MAX_RUN(MR)) chk (.*);

  always #10 clk = ~clk;  // 50 MHz

  task automatic finish();
    longint sum;
    chk.final_checks();
    sum = 0;
    for (int r = 0; r < MR; r++) sum += run_results[r];
    $display("best fitness per run, first five: %0d %0d %0d %0d %0d",
             run_results[0], run_results[1], run_results[2], run_results[3], run_results[4]);
    $display("mean best fitness over %0d runs: %0d", MR, sum / MR);
    $display("total cycles %0d = %0d us at 50 MHz", total_cycles, total_cycles / 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + extra_fail);
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
