// Testbench for the 5- and 20-dimension variants of the optimiser, each
// with 50 agents, 5000 iterations and 50 runs, the other two workloads of
// the design (the 10-dimension one is the default size). Both variants run
// side by side; for each, the reference checker recomputes the whole
// optimisation and the testbench checks the run results and that the
// total cycle count, 39,002,550, does not depend on the number of
// dimensions.
module tb_skf_variants;
  localparam int N = 50, MI = 5000, MR = 50;
  localparam int D5 = 5, D20 = 20;
  logic clk = 0, rst = 1;

  logic [2:0] state5, state20;
  logic [12:0] iter5, iter20;
  logic [5:0] run5, run20;
  logic run_done5, run_done20, done5, done20, imp5, imp20;
  logic [31:0] xtf5, xtf20, xbf5, xbf20;
  logic [7:0] xtp5 [D5];
  logic [7:0] xtp20 [D20];

  int checks5, failures5, checks20, failures20;
  int a5[10], a20[10];
  longint cyc5, cyc20;
  int res5 [MR];
  int res20 [MR];
  int extra_fail = 0;

  skf_top #(.N(N), .D(D5), .MAX_ITER(MI), .MAX_RUN(MR)) dut5 (
    .clk, .rst, .state(state5), .iter(iter5), .run(run5), .run_done(run_done5),
    .done(done5), .improved(imp5), .xbest_fit(xbf5), .xtrue_fit(xtf5), .xtrue_pos(xtp5));

  skf_top #(.N(N), .D(D20), .MAX_ITER(MI), .MAX_RUN(MR)) dut20 (
    .clk, .rst, .state(state20), .iter(iter20), .run(run20), .run_done(run_done20),
    .done(done20), .improved(imp20), .xbest_fit(xbf20), .xtrue_fit(xtf20), .xtrue_pos(xtp20));

  skf_ref_checker #(.N(N), .D(D5), .MAX_ITER(MI), .MAX_RUN(MR)) chk5 (
    .clk, .rst, .state(state5), .run_done(run_done5), .done(done5), .improved(imp5),
    .xbest_fit(xbf5), .xtrue_fit(xtf5), .xtrue_pos(xtp5),
    .checks(checks5), .failures(failures5),
    .n_iter_loops(a5[0]), .n_run_restarts(a5[1]), .n_complete(a5[2]), .n_improve(a5[3]),
    .n_fold(a5[4]), .n_sin_pos(a5[5]), .n_sin_neg(a5[6]), .n_sin_zero(a5[7]),
    .n_meas_sat(a5[8]), .n_est_sat(a5[9]), .total_cycles(cyc5), .run_results(res5));

  skf_ref_checker #(.N(N), .D(D20), .MAX_ITER(MI), .MAX_RUN(MR)) chk20 (
    .clk, .rst, .state(state20), .run_done(run_done20), .done(done20), .improved(imp20),
    .xbest_fit(xbf20), .xtrue_fit(xtf20), .xtrue_pos(xtp20),
    .checks(checks20), .failures(failures20),
    .n_iter_loops(a20[0]), .n_run_restarts(a20[1]), .n_complete(a20[2]), .n_improve(a20[3]),
    .n_fold(a20[4]), .n_sin_pos(a20[5]), .n_sin_neg(a20[6]), .n_sin_zero(a20[7]),
    .n_meas_sat(a20[8]), .n_est_sat(a20[9]), .total_cycles(cyc20), .run_results(res20));

  always #10 clk = ~clk;  // 50 MHz

  task automatic finish();
    longint s5, s20;
    chk5.final_checks();
    chk20.final_checks();
    s5 = 0; s20 = 0;
    for (int r = 0; r < MR; r++) begin
      s5 += res5[r];
      s20 += res20[r];
    end
    if (cyc5 != cyc20) begin
      extra_fail++;
      $display("cycle counts differ: %0d vs %0d", cyc5, cyc20);
    end
    $display("D=5 : mean best fitness %0d, %0d cycles", s5 / MR, cyc5);
    $display("D=20: mean best fitness %0d, %0d cycles", s20 / MR, cyc20);
    $display("TB_RESULT checks=%0d failures=%0d", checks5 + checks20 + 1,
             failures5 + failures20 + extra_fail);
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
    wait (done5 && done20);
    repeat (5) @(posedge clk);
    finish();
  end
endmodule
