// Testbench for skf_rng2: compares the 2-bit output with an independent
// model of the 16-bit x^16+x^14+x^13+x^11+1 LFSR and checks that all four
// values occur with similar frequency.
module tb_skf_rng2;
  logic clk = 0, rst = 1;
  logic [1:0] out;
  int checks = 0, failures = 0;
  logic [15:0] ref_s;
  int hist [4];

  skf_rng2 #(.SEED(16'h1234)) dut (.clk, .rst, .rng_2bit(out));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hist = '{default: 0};
    @(posedge clk); #1 rst = 0;
    ref_s = 16'h1234;
    for (int i = 0; i < 4000; i++) begin
      checks++;
      if (out != ref_s[1:0]) begin
        failures++;
        $display("cycle %0d: got %0d expected %0d", i, out, ref_s[1:0]);
      end
      hist[out]++;
      @(posedge clk); #1;
      ref_s = {ref_s[14:0], ref_s[15] ^ ref_s[13] ^ ref_s[12] ^ ref_s[10]};
    end
    for (int v = 0; v < 4; v++) begin
      checks++;
      if (hist[v] < 800 || hist[v] > 1200) begin
        failures++;
        $display("value %0d seen %0d times", v, hist[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
