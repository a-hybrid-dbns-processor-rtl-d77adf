// mant_shifter: barrel shifter that turns the ROM's floating-point product into
// a fixed-point magnitude for the binary accumulator.
//
// The product of two DBNS digits is M_T * 2^s, where M_T is the MANT_W-bit
// mantissa of 3^(t_c+t_d) read from the ternary ROM and s is the SH_W-bit signed
// exponent sum. The shifter computes floor(M_T * 2^s): a left shift for s >= 0,
// a right shift (bits below the accumulator's LSB are dropped) for s < 0. It
// places the mantissa above 2^(SH_W-1) zero bits and shifts that word right by
// 2^(SH_W-1) - s, so one right shifter covers the whole range. Results wider
// than OUT_W bits keep only their low OUT_W bits; scaling the coefficients so
// that products fit is left to the user.
//
// Interface: m unsigned mantissa, s signed shift, p unsigned magnitude.
// Timing: purely combinational.
module mant_shifter #(
  parameter int unsigned MANT_W = 12,
  parameter int unsigned SH_W   = 6,
  parameter int unsigned OUT_W  = 24
) (
  input  logic [MANT_W-1:0]      m,
  input  logic signed [SH_W-1:0] s,
  output logic [OUT_W-1:0]       p
);

  localparam int unsigned OFF = 2 ** (SH_W - 1);
  localparam int unsigned WW  = MANT_W + OFF;

  logic [WW-1:0]   wide;
  logic [SH_W:0]   amt;      // OFF - s, in 1 .. 2*OFF

  always_comb begin
    wide    = {m, {OFF{1'b0}}};
    amt     = (SH_W + 1)'(OFF) - (SH_W + 1)'(s);
    p       = OUT_W'(wide >> amt);
  end

endmodule
