// RNG_2BIT: 2-bit random number for the measure step.
//
// The measure step needs sin(2*pi*rand) per agent. With rand quantised to
// two bits (rand = r/4, r = 0..3) the sine takes only the values 0, +1, 0,
// -1, so a 2-bit random number is all the measure module needs. The value
// is the two low bits of a 16-bit Fibonacci LFSR with the maximal-length
// polynomial x^16 + x^14 + x^13 + x^11 + 1, stepped every clock. The design
// names this generator and its 2-bit output; the LFSR length, polynomial
// and seed are this implementation's choice.
//
// Interface: rst (synchronous, active high) loads SEED (zero is replaced
// by 1). rng_2bit is combinational from the register.
module skf_rng2 #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic       clk,
  input  logic       rst,
  output logic [1:0] rng_2bit
);

  logic [15:0] lfsr;
  logic        fb;

  assign fb = lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10];

  always_ff @(posedge clk) begin
    if (rst) lfsr <= (SEED == 16'd0) ? 16'd1 : SEED;
    else     lfsr <= {lfsr[14:0], fb};
  end

  assign rng_2bit = lfsr[1:0];

endmodule
