// sign_fix: applies the sign and zero logic of a DBNS product.
//
// The index path only computes the magnitude 2^(b_c+b_d) * 3^(t_c+t_d). The sign
// of the product is the exclusive-or of the two sign flags (a_c * a_d), and the
// product is zero whenever either digit is zero. This block takes the shifted
// magnitude and returns the signed two's-complement product that is added to
// the accumulator.
//
// Interface: mag is an unsigned W-bit magnitude; prod is W-bit two's complement,
// taken modulo 2^W (a magnitude with its top bit set wraps when negated).
// Timing: purely combinational.
module sign_fix #(
  parameter int unsigned W = 24
) (
  input  logic [W-1:0]        mag,
  input  logic                zero_d,
  input  logic                neg_d,
  input  logic                zero_c,
  input  logic                neg_c,
  output logic signed [W-1:0] prod
);

  always_comb begin
    if (zero_d || zero_c)
      prod = '0;
    else if (neg_d ^ neg_c)
      prod = -$signed(mag);
    else
      prod = $signed(mag);
  end

endmodule
