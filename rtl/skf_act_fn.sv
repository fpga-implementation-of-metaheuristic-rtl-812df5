// ACT_FN: sphere fitness of one agent.
//
// Computes fitness = sum over the D dimensions of x[d]^2 (the sphere
// benchmark of the design, a minimisation problem) for all dimensions of
// one agent at once, and registers the result. Inputs are 8-bit
// two's-complement positions; the output is 32 bits wide, as printed on
// the module's output, which cannot overflow for any D up to 131072.
//
// Timing: one cycle of latency, one agent per cycle.
module skf_act_fn
  import skf_pkg::*;
#(
  parameter int D = 10
) (
  input  logic clk,
  input  pos_t x [D],
  output fit_t fitness
);

  fit_t sum;

  always_comb begin
    sum = '0;
    for (int d = 0; d < D; d++) begin
      sum = sum + fit_t'(unsigned'(int'(x[d]) * int'(x[d])));
    end
  end

  always_ff @(posedge clk) fitness <= sum;

endmodule
