// MEASURE: measurement step of the Simulated Kalman Filter.
//
// For every dimension d of one agent it computes
//   y[d] = x[d] + sin(2*pi*rand) * |x[d] - xtrue[d]|
// where xtrue is the best-so-far solution of the run and rand is one random
// number per agent, shared by all its dimensions. rand is a 2-bit number r,
// read as r/4 of a turn, so the sine is 0 (r = 0), +1 (r = 1), 0 (r = 2)
// or -1 (r = 3), and the product needs no multiplier. The result is
// saturated to the 9-bit measured-value range -256..255.
// The equation, the 8-bit inputs and 9-bit outputs are the design's; the
// 2-bit quantisation of rand and the saturation are this implementation's
// choice.
//
// Timing: one cycle of latency, one agent per cycle.
module skf_measure
  import skf_pkg::*;
#(
  parameter int D = 10
) (
  input  logic       clk,
  input  logic [1:0] rng,
  input  pos_t       x     [D],
  input  pos_t       xtrue [D],
  output meas_t      y     [D]
);

  localparam int MEAS_MAX = (1 <<< (MEAS_W - 1)) - 1;
  localparam int MEAS_MIN = -(1 <<< (MEAS_W - 1));

  meas_t y_next [D];

  always_comb begin
    for (int d = 0; d < D; d++) begin
      int diff, absd, v;
      diff = int'(x[d]) - int'(xtrue[d]);
      absd = (diff < 0) ? -diff : diff;
      unique case (rng)
        2'd1:    v = int'(x[d]) + absd;
        2'd3:    v = int'(x[d]) - absd;
        default: v = int'(x[d]);
      endcase
      if (v > MEAS_MAX)      v = MEAS_MAX;
      else if (v < MEAS_MIN) v = MEAS_MIN;
      y_next[d] = meas_t'(v);
    end
  end

  always_ff @(posedge clk) y <= y_next;

endmodule
