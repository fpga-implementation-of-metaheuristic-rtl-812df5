// Testbench for skf_best: streams iterations of random agents (small
// fitness values, so ties occur) and compares Xbest, Xtrue and the
// improved pulse with a model; clear_run between runs restarts Xtrue.
module tb_skf_best;
  import skf_pkg::*;
  localparam int D = 3, K = 6;
  logic clk = 0, rst = 1, clear_run = 0, valid = 0, last = 0;
  fit_t fitness;
  pos_t pos [D];
  fit_t xbest_fit, xtrue_fit;
  pos_t xbest_pos [D], xtrue_pos [D];
  logic improved;
  int checks = 0, failures = 0, improvements = 0, ties = 0;

  skf_best #(.D(D)) dut (.clk, .rst, .clear_run, .valid, .last, .fitness, .pos,
                         .xbest_fit, .xbest_pos, .xtrue_fit, .xtrue_pos, .improved);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint got, longint expv);
    checks++;
    if (got != expv) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, expv);
    end
  endtask

  initial begin
    longint m_true;
    int m_true_pos [D];
    @(posedge clk); #1 rst = 0;
    for (int r = 0; r < 4; r++) begin
      clear_run = 1;
      @(posedge clk); #1 clear_run = 0;
      m_true = 64'hFFFF_FFFF;
      for (int it = 0; it < 25; it++) begin
        longint bf;
        int bp [D];
        logic imp;
        bf = -1;
        for (int a = 0; a < K; a++) begin
          valid = 1;
          last = (a == K - 1);
          fitness = fit_t'($urandom_range(40 + 200 / (it + 1)));
          for (int d = 0; d < D; d++) pos[d] = pos_t'($urandom);
          if (bf >= 0 && longint'(fitness) == bf) ties++;
          if (bf < 0 || longint'(fitness) < bf) begin
            bf = longint'(fitness);
            for (int d = 0; d < D; d++) bp[d] = int'(pos[d]);
          end
          @(posedge clk); #1;
          // idle gaps between agents must not disturb the registers
          valid = 0; last = 0;
          if (a == 2) begin @(posedge clk); #1; end
        end
        imp = (bf < m_true);
        if (imp) begin
          m_true = bf;
          for (int d = 0; d < D; d++) m_true_pos[d] = bp[d];
          improvements++;
        end
        chk("improved", longint'(improved), longint'(imp));
        chk("xbest_fit", longint'(xbest_fit), bf);
        chk("xtrue_fit", longint'(xtrue_fit), m_true);
        for (int d = 0; d < D; d++) begin
          chk("xbest_pos", longint'(xbest_pos[d]), longint'(bp[d]));
          chk("xtrue_pos", longint'(xtrue_pos[d]), longint'(m_true_pos[d]));
        end
      end
    end
    checks++;
    if (improvements < 4 || ties == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
