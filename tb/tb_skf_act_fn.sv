// Testbench for skf_act_fn: the three-agent, three-dimension integer
// example of the design (fitness 5331, 3874, 1842), extreme values, and
// random agents at D = 10 against a sum-of-squares model; checks the
// one-cycle latency.
module tb_skf_act_fn;
  import skf_pkg::*;
  logic clk = 0;
  pos_t x3 [3];
  pos_t x10 [10];
  fit_t f3, f10;
  int checks = 0, failures = 0;

  skf_act_fn #(.D(3))  dut3  (.clk, .x(x3),  .fitness(f3));
  skf_act_fn #(.D(10)) dut10 (.clk, .x(x10), .fitness(f10));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check3(int a, int b, int c, longint expv);
    x3[0] = pos_t'(a); x3[1] = pos_t'(b); x3[2] = pos_t'(c);
    @(posedge clk); #1;
    checks++;
    if (longint'(f3) != expv) begin
      failures++;
      $display("(%0d,%0d,%0d): got %0d expected %0d", a, b, c, f3, expv);
    end
  endtask

  initial begin
    #1;
    check3(-11, 49, 53, 5331);
    check3(15, -20, -57, 3874);
    check3(-11, 40, 11, 1842);
    check3(-128, -128, -128, 49152);
    check3(127, 0, -1, 16130);
    for (int i = 0; i < 1000; i++) begin
      longint s;
      s = 0;
      for (int d = 0; d < 10; d++) begin
        x10[d] = pos_t'($urandom);
        s += longint'(x10[d]) * longint'(x10[d]);
      end
      @(posedge clk); #1;
      checks++;
      if (longint'(f10) != s) begin
        failures++;
        $display("random %0d: got %0d expected %0d", i, f10, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
