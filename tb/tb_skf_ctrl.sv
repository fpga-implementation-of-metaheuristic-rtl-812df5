// Testbench for skf_ctrl: with N = 4 agents, 3 iterations and 2 runs it
// checks the state sequence and the time spent in each state (s0: 1, s1: N,
// s2/s3/s4: N + 2 cycles), the write addresses 0..N-1 of every phase, the
// fitness valid/last strobes, the iteration and run counters, run_done and
// the total cycle count MAX_RUN * (1 + N + MAX_ITER * 3 * (N + 2)).
module tb_skf_ctrl;
  import skf_pkg::*;
  localparam int N = 4, MI = 3, MR = 2;
  localparam int AW = $clog2(N);
  logic clk = 0, rst = 1;
  state_t state;
  logic [1:0] iter;
  logic run;
  logic x_we, x_wsel_gen, y_we, clear_run, fit_valid, fit_last, run_done, done;
  logic [AW-1:0] x_waddr, x_raddr, y_waddr, y_raddr;
  int checks = 0, failures = 0;

  skf_ctrl #(.N(N), .MAX_ITER(MI), .MAX_RUN(MR)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int expv);
    checks++;
    if (got != expv) begin
      failures++;
      $display("%0t %s: got %0d expected %0d", $time, what, got, expv);
    end
  endtask

  // one pipelined phase: N + 2 cycles, read address c, write-back of c - 2
  task automatic phase(state_t s, int it, int rn);
    for (int c = 0; c < N + 2; c++) begin
      chk("state", int'(state), int'(s));
      chk("iter", int'(iter), it);
      chk("run", int'(run), rn);
      if (c < N) begin
        chk("x_raddr", int'(x_raddr), c);
        if (s == S4_ESTIMATE) chk("y_raddr", int'(y_raddr), c);
      end
      chk("fit_valid", int'(fit_valid), int'(s == S2_EVALUATE && c >= 2));
      chk("fit_last", int'(fit_last), int'(s == S2_EVALUATE && c == N + 1));
      chk("y_we", int'(y_we), int'(s == S3_MEASURE && c >= 2));
      chk("x_we", int'(x_we), int'(s == S4_ESTIMATE && c >= 2));
      if (c >= 2) begin
        if (s == S3_MEASURE) chk("y_waddr", int'(y_waddr), c - 2);
        if (s == S4_ESTIMATE) chk("x_waddr", int'(x_waddr), c - 2);
      end
      chk("x_wsel_gen", int'(x_wsel_gen), 0);
      chk("run_done", int'(run_done),
          int'(s == S4_ESTIMATE && c == N + 1 && it == MI - 1));
      chk("done", int'(done), 0);
      @(posedge clk); #1;
    end
  endtask

  initial begin
    int cycles = 0;
    int start;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    start = $time;
    for (int rn = 0; rn < MR; rn++) begin
      chk("state s0", int'(state), int'(S0_RESET));
      chk("clear_run", int'(clear_run), 1);
      chk("x_we s0", int'(x_we), 0);
      @(posedge clk); #1;
      for (int c = 0; c < N; c++) begin
        chk("state s1", int'(state), int'(S1_GENERATE));
        chk("x_we s1", int'(x_we), 1);
        chk("x_wsel_gen", int'(x_wsel_gen), 1);
        chk("x_waddr s1", int'(x_waddr), c);
        chk("clear_run s1", int'(clear_run), 0);
        @(posedge clk); #1;
      end
      for (int it = 0; it < MI; it++) begin
        phase(S2_EVALUATE, it, rn);
        phase(S3_MEASURE, it, rn);
        phase(S4_ESTIMATE, it, rn);
      end
    end
    cycles = ($time - start) / 10;
    chk("total cycles", cycles, MR * (1 + N + MI * 3 * (N + 2)));
    for (int i = 0; i < 5; i++) begin
      chk("state s5", int'(state), int'(S5_COMPLETE));
      chk("done", int'(done), 1);
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
