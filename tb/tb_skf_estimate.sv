// Testbench for skf_estimate: random positions and measurements against a
// model of x + floor((y - x) / 2) saturated to -128..127, plus hand-worked
// cases; checks the one-cycle latency.
module tb_skf_estimate;
  import skf_pkg::*;
  localparam int D = 5;
  logic clk = 0;
  pos_t x [D], xn [D];
  meas_t y [D];
  int checks = 0, failures = 0;

  skf_estimate #(.D(D)) dut (.clk, .x, .y, .x_new(xn));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int floor_half(int v);
    // floor division by two, written without shifts
    if (v >= 0) return v / 2;
    return -((-v + 1) / 2);
  endfunction

  initial begin
    int e [D];
    #1;
    // hand-worked: (10,20)->15, (10,-3)->3 (floor(-6.5)=-7), (-5,-4)->-5,
    // (100,255)->127 saturated, (-100,-256)->-128 saturated
    x[0] = 10;   y[0] = 20;   e[0] = 15;
    x[1] = 10;   y[1] = -3;   e[1] = 3;
    x[2] = -5;   y[2] = -4;   e[2] = -5;
    x[3] = 100;  y[3] = 255;  e[3] = 127;
    x[4] = -100; y[4] = -256; e[4] = -128;
    @(posedge clk); #1;
    for (int d = 0; d < D; d++) begin
      checks++;
      if (int'(xn[d]) != e[d]) begin
        failures++;
        $display("case %0d: got %0d expected %0d", d, xn[d], e[d]);
      end
    end
    for (int i = 0; i < 3000; i++) begin
      for (int d = 0; d < D; d++) begin
        x[d] = pos_t'($urandom);
        y[d] = meas_t'($urandom);
        e[d] = int'(x[d]) + floor_half(int'(y[d]) - int'(x[d]));
        if (e[d] > 127) e[d] = 127;
        if (e[d] < -128) e[d] = -128;
      end
      @(posedge clk); #1;
      for (int d = 0; d < D; d++) begin
        checks++;
        if (int'(xn[d]) != e[d]) begin
          failures++;
          $display("i %0d d %0d x %0d y %0d: got %0d expected %0d", i, d, x[d], y[d], xn[d], e[d]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
