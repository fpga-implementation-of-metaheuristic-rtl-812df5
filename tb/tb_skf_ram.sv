// Testbench for skf_ram: random parallel writes and reads against a model
// array; checks the one-cycle registered read and read-before-write on a
// same-address collision.
module tb_skf_ram;
  localparam int N = 12, D = 4, W = 9, AW = $clog2(N);
  logic clk = 0;
  logic we;
  logic [AW-1:0] w_addr, r_addr;
  logic [W-1:0] wdata [D];
  logic [W-1:0] rdata [D];
  logic [W-1:0] model [N][D];
  logic [W-1:0] expect_q [D];
  int checks = 0, failures = 0;

  skf_ram #(.N(N), .D(D), .W(W)) dut (.clk, .we, .w_addr, .wdata, .r_addr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every agent
    we = 1;
    for (int a = 0; a < N; a++) begin
      w_addr = AW'(a); r_addr = '0;
      for (int d = 0; d < D; d++) begin
        wdata[d] = W'($urandom);
        model[a][d] = wdata[d];
      end
      @(posedge clk); #1;
    end
    for (int i = 0; i < 2000; i++) begin
      we = 1'($urandom);
      w_addr = AW'($urandom_range(N - 1));
      r_addr = AW'($urandom_range(N - 1));
      if (i % 7 == 0) r_addr = w_addr;
      for (int d = 0; d < D; d++) wdata[d] = W'($urandom);
      for (int d = 0; d < D; d++) expect_q[d] = model[r_addr][d];
      @(posedge clk); #1;
      if (we) for (int d = 0; d < D; d++) model[w_addr][d] = wdata[d];
      for (int d = 0; d < D; d++) begin
        checks++;
        if (rdata[d] != expect_q[d]) begin
          failures++;
          $display("i %0d addr %0d dim %0d: got %0h expected %0h", i, r_addr, d, rdata[d], expect_q[d]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
