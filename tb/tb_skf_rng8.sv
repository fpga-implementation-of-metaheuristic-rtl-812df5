// Testbench for skf_rng8: compares the output with an independent model of
// the x^8+x^6+x^5+x^4+1 LFSR folded into -100..100, checks the range, the
// 255-cycle period and that a zero seed does not lock the register.
module tb_skf_rng8;
  import skf_pkg::*;

  logic clk = 0, rst = 1;
  logic [7:0] seed;
  pos_t out;
  int checks = 0, failures = 0;
  logic [7:0] ref_s;
  pos_t first_val [600];

  skf_rng8 dut (.clk, .rst, .seed, .rng_8bit(out));

  always #5 clk = ~clk;

  function automatic int fold(logic [7:0] s);
    int v = int'($signed(s));
    if (v > 100) return v - 100;
    if (v < -100) return v + 100;
    return v;
  endfunction

  function automatic logic [7:0] step(logic [7:0] s);
    return {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_seed(logic [7:0] s, int cycles);
    seed = s; rst = 1;
    @(posedge clk); #1 rst = 0;
    ref_s = (s == 0) ? 8'd1 : s;
    for (int i = 0; i < cycles; i++) begin
      checks++;
      if (int'(out) != fold(ref_s)) begin
        failures++;
        $display("seed %0h cycle %0d: got %0d expected %0d", s, i, out, fold(ref_s));
      end
      checks++;
      if (int'(out) > 100 || int'(out) < -100) failures++;
      first_val[i] = out;
      if (i >= 255) begin
        checks++;
        if (out != first_val[i - 255]) begin
          failures++;
          $display("period: cycle %0d got %0d first %0d", i, out, first_val[i - 255]);
        end
      end
      @(posedge clk); #1;
      ref_s = step(ref_s);
    end
  endtask

  initial begin
    #1;
    run_seed(8'h5A, 600);
    run_seed(8'h00, 300);
    run_seed(8'hF3, 300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
