// RNG_8BIT: random initial agent position for one dimension.
//
// An 8-bit Fibonacci linear feedback shift register with the maximal-length
// polynomial x^8 + x^6 + x^5 + x^4 + 1 (period 255) steps once per clock.
// Its state, read as a two's-complement number, is folded into the search
// region -100..100: values above 100 have 100 subtracted (101..127 ->
// 1..27) and values below -100 have 100 added (-128..-101 -> -28..-1).
// An LFSR, an 8-bit output and the -100..100 bound are the design's; the
// polynomial and the folding rule are this implementation's choice.
//
// Interface: rst (synchronous, active high) loads `seed`; a zero seed is
// replaced by 1 so the register never locks up. rng_8bit is combinational
// from the register, so a new value is available every cycle.
module skf_rng8
  import skf_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] seed,
  output pos_t       rng_8bit
);

  logic [7:0] lfsr;
  logic       fb;

  assign fb = lfsr[7] ^ lfsr[5] ^ lfsr[4] ^ lfsr[3];

  always_ff @(posedge clk) begin
    if (rst) lfsr <= (seed == 8'd0) ? 8'd1 : seed;
    else     lfsr <= {lfsr[6:0], fb};
  end

  always_comb begin
    int v;
    v = int'($signed(lfsr));
    if (v > POS_MAX)      v = v - POS_MAX;
    else if (v < POS_MIN) v = v - POS_MIN;
    rng_8bit = pos_t'(v);
  end

endmodule
