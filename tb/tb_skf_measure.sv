// Testbench for skf_measure: random agents, best-so-far positions and
// random codes against a model of y = x + s*|x - xtrue| with s = 0, +1, 0,
// -1 for codes 0..3, saturated to -256..255; checks the one-cycle latency
// and that each code and the saturation occur.
module tb_skf_measure;
  import skf_pkg::*;
  localparam int D = 6;
  logic clk = 0;
  logic [1:0] rng;
  pos_t x [D], xt [D];
  meas_t y [D];
  int checks = 0, failures = 0;
  int code_seen [4];
  int sat_seen = 0;

  skf_measure #(.D(D)) dut (.clk, .rng, .x, .xtrue(xt), .y);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    code_seen = '{default: 0};
    #1;
    for (int i = 0; i < 3000; i++) begin
      int e [D];
      rng = 2'($urandom);
      for (int d = 0; d < D; d++) begin
        int s, a;
        x[d] = pos_t'($urandom);
        xt[d] = pos_t'($urandom);
        a = int'(x[d]) - int'(xt[d]);
        if (a < 0) a = -a;
        s = (rng == 1) ? 1 : (rng == 3) ? -1 : 0;
        e[d] = int'(x[d]) + s * a;
        if (e[d] > 255) begin e[d] = 255; sat_seen++; end
        if (e[d] < -256) begin e[d] = -256; sat_seen++; end
      end
      code_seen[rng]++;
      @(posedge clk); #1;
      for (int d = 0; d < D; d++) begin
        checks++;
        if (int'(y[d]) != e[d]) begin
          failures++;
          $display("i %0d d %0d rng %0d x %0d xt %0d: got %0d expected %0d",
                   i, d, rng, x[d], xt[d], y[d], e[d]);
        end
      end
    end
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (code_seen[c] == 0) failures++;
    end
    checks++;
    if (sat_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
