// exp_adder: signed exponent adder with wrap-around (modular) result.
//
// The DBNS multiplier adds exponents instead of multiplying mantissas. Three
// such adders sit in every cell: data + coefficient binary exponents, data +
// coefficient ternary exponents, and binary sum + ROM binary exponent. The
// binary ones are only 6 bits wide: the individual binary exponents may lie far
// outside that range, but their total, which sets the final shift, is small, so
// computing modulo 2^W gives the exact shift. The adder therefore simply drops
// the carry out of the top bit.
//
// Interface: a, b and sum are W-bit two's-complement numbers; sum = (a + b) mod 2^W.
// Timing: purely combinational.
module exp_adder #(
  parameter int unsigned W = 6
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] sum
);

  always_comb sum = a + b;

endmodule
