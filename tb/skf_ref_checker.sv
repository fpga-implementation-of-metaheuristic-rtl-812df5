// Reference model and checker for skf_top, shared by the end-to-end
// testbenches.
//
// It keeps its own copies of the random generators (the same polynomials
// and seeds, re-implemented here), follows the optimiser's state output
// and recomputes the algorithm in plain integer arithmetic: initial
// population from the 8-bit generators during s1, fitness and best-so-far
// on entry to s2, measurement of agent k with the 2-bit random value of
// cycle k + 1 of s3, estimate on entry to s4. It checks the time spent in
// every state, the best-so-far fitness and position after every evaluation
// and at the end of every run, the improved pulses and the total cycle
// count, and counts how often each mechanism occurred. Everything is
// sampled on the falling clock edge.
module skf_ref_checker #(
  parameter int          N        = 50,
  parameter int          D        = 10,
  parameter int          MAX_ITER = 5000,
  parameter int          MAX_RUN  = 50,
  parameter logic [7:0]  SEED8    = 8'h5A,
  parameter logic [15:0] SEED2    = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [2:0]  state,
  input  logic        run_done,
  input  logic        done,
  input  logic        improved,
  input  logic [31:0] xbest_fit,
  input  logic [31:0] xtrue_fit,
  input  logic [7:0]  xtrue_pos [D],
  output int          checks,
  output int          failures,
  // mechanism counters
  output int          n_iter_loops,   // s4 -> s2
  output int          n_run_restarts, // s4 -> s0
  output int          n_complete,     // reached s5
  output int          n_improve,      // best-so-far replaced
  output int          n_fold,         // RNG value folded into -100..100
  output int          n_sin_pos,      // measure with sine +1
  output int          n_sin_neg,      // measure with sine -1
  output int          n_sin_zero,     // measure with sine 0
  output int          n_meas_sat,     // measurement saturated
  output int          n_est_sat,      // estimate saturated
  output longint      total_cycles,
  output int          run_results [MAX_RUN]
);

  logic [7:0]  lfsr8 [D];
  logic [15:0] lfsr16;
  int X [N][D];
  int Y [N][D];
  longint true_fit, iter_best;
  int true_pos [D];
  int prev_state, c, runs_seen, dut_improved, ref_improved;
  longint cyc;
  logic started;

  always @(posedge clk) begin
    if (rst) begin
      for (int d = 0; d < D; d++) begin
        lfsr8[d] = SEED8 + 8'(37 * d);
        if (lfsr8[d] == 0) lfsr8[d] = 1;
      end
      lfsr16 = (SEED2 == 0) ? 16'd1 : SEED2;
    end else begin
      for (int d = 0; d < D; d++)
        lfsr8[d] = {lfsr8[d][6:0], lfsr8[d][7] ^ lfsr8[d][5] ^ lfsr8[d][4] ^ lfsr8[d][3]};
      lfsr16 = {lfsr16[14:0], lfsr16[15] ^ lfsr16[13] ^ lfsr16[12] ^ lfsr16[10]};
    end
  end

  task automatic chk(string what, longint got, longint expv);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 20)
        $display("checker: %s: got %0d expected %0d (state %0d cycle %0d)",
                 what, got, expv, state, c);
    end
  endtask

  function automatic int expected_len(int s);
    case (s)
      0: return 1;
      1: return N;
      2, 3, 4: return N + 2;
      default: return -1;
    endcase
  endfunction

  initial begin
    checks = 0; failures = 0;
    n_iter_loops = 0; n_run_restarts = 0; n_complete = 0; n_improve = 0;
    n_fold = 0; n_sin_pos = 0; n_sin_neg = 0; n_sin_zero = 0;
    n_meas_sat = 0; n_est_sat = 0; total_cycles = 0;
    runs_seen = 0; dut_improved = 0; ref_improved = 0;
    started = 0; prev_state = 0; c = 0; cyc = 0;
    true_fit = 0; iter_best = 0;
    for (int r = 0; r < MAX_RUN; r++) run_results[r] = -1;
  end

  always @(negedge clk) begin
    if (rst) begin
      started = 0;
    end else begin
      int s;
      s = int'(state);
      if (!started) begin
        started = 1;
        prev_state = s;
        c = 0;
        cyc = 0;
        chk("first state", s, 0);
      end else if (s != prev_state) begin
        if (prev_state != 5) chk("state length", c, expected_len(prev_state));
        if (prev_state == 4 && s == 2) n_iter_loops++;
        if (prev_state == 4 && s == 0) n_run_restarts++;
        if (s == 5) begin
          n_complete++;
          total_cycles = cyc;
        end
        chk("state order", s,
            (prev_state == 4) ? s : (prev_state == 0) ? 1 : prev_state + 1);
        prev_state = s;
        c = 0;
      end
      if (improved) dut_improved++;

      case (s)
        0: if (c == 0) true_fit = 64'hFFFF_FFFF;
        1: if (c < N) begin
          for (int d = 0; d < D; d++) begin
            int v;
            v = int'($signed(lfsr8[d]));
            if (v > 100) begin v -= 100; n_fold++; end
            else if (v < -100) begin v += 100; n_fold++; end
            X[c][d] = v;
          end
        end
        2: if (c == 0) begin
          int ba;
          iter_best = -1;
          ba = 0;
          for (int a = 0; a < N; a++) begin
            longint f;
            f = 0;
            for (int d = 0; d < D; d++) f += longint'(X[a][d] * X[a][d]);
            if (iter_best < 0 || f < iter_best) begin
              iter_best = f;
              ba = a;
            end
          end
          if (iter_best < true_fit) begin
            true_fit = iter_best;
            for (int d = 0; d < D; d++) true_pos[d] = X[ba][d];
            n_improve++;
            ref_improved++;
          end
        end
        3: begin
          if (c == 0) begin
            chk("xbest_fit", longint'(xbest_fit), iter_best);
            chk("xtrue_fit", longint'(xtrue_fit), true_fit);
            for (int d = 0; d < D; d++)
              chk("xtrue_pos", longint'($signed(xtrue_pos[d])), longint'(true_pos[d]));
          end
          if (c >= 1 && c <= N) begin
            int k, sn;
            k = c - 1;
            case (lfsr16[1:0])
              2'd1: begin sn = 1;  n_sin_pos++; end
              2'd3: begin sn = -1; n_sin_neg++; end
              default: begin sn = 0; n_sin_zero++; end
            endcase
            for (int d = 0; d < D; d++) begin
              int diff, v;
              diff = X[k][d] - true_pos[d];
              if (diff < 0) diff = -diff;
              v = X[k][d] + sn * diff;
              if (v > 255) begin v = 255; n_meas_sat++; end
              if (v < -256) begin v = -256; n_meas_sat++; end
              Y[k][d] = v;
            end
          end
        end
        4: if (c == 0) begin
          for (int a = 0; a < N; a++)
            for (int d = 0; d < D; d++) begin
              int diff, v;
              diff = Y[a][d] - X[a][d];
              // floor division by two
              v = X[a][d] + ((diff >= 0) ? diff / 2 : -((1 - diff) / 2));
              if (v > 127) begin v = 127; n_est_sat++; end
              if (v < -128) begin v = -128; n_est_sat++; end
              X[a][d] = v;
            end
        end
        default: ;
      endcase

      if (run_done) begin
        chk("run_done in s4", s, 4);
        chk("run result fit", longint'(xtrue_fit), true_fit);
        for (int d = 0; d < D; d++)
          chk("run result pos", longint'($signed(xtrue_pos[d])), longint'(true_pos[d]));
        if (runs_seen < MAX_RUN) run_results[runs_seen] = int'(xtrue_fit);
        runs_seen++;
      end
      if (s == 5) chk("done in s5", longint'(done), 1);
      else        chk("done before s5", longint'(done), 0);
      c++;
      cyc++;
    end
  end

  // Called by the testbench once the optimiser has finished.
  task automatic final_checks();
    chk("runs reported", runs_seen, MAX_RUN);
    chk("improved pulses", dut_improved, ref_improved);
    chk("total cycles", total_cycles,
        longint'(MAX_RUN) * (1 + N + longint'(MAX_ITER) * 3 * (N + 2)));
  endtask

endmodule
