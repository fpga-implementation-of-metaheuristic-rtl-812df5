// ESTIMATE: estimate step of the Simulated Kalman Filter with K = 0.5.
//
// For every dimension d of one agent it computes the new position
//   x_new[d] = x[d] + K * (y[d] - x[d]),  K = 0.5
// The design fixes the Kalman gain at 0.5 so that the product becomes a
// one-bit right shift; here the shift is arithmetic (rounding towards minus
// infinity), as two's-complement operands need. The result is saturated to
// the 8-bit position range -128..127, a choice of this implementation.
//
// Timing: one cycle of latency, one agent per cycle.
module skf_estimate
  import skf_pkg::*;
#(
  parameter int D = 10
) (
  input  logic  clk,
  input  pos_t  x     [D],
  input  meas_t y     [D],
  output pos_t  x_new [D]
);

  localparam int POS_HI = (1 <<< (POS_W - 1)) - 1;
  localparam int POS_LO = -(1 <<< (POS_W - 1));

  pos_t x_next [D];

  always_comb begin
    for (int d = 0; d < D; d++) begin
      int v;
      v = int'(x[d]) + ((int'(y[d]) - int'(x[d])) >>> 1);
      if (v > POS_HI)      v = POS_HI;
      else if (v < POS_LO) v = POS_LO;
      x_next[d] = pos_t'(v);
    end
  end

  always_ff @(posedge clk) x_new <= x_next;

endmodule
