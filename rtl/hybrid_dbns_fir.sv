// hybrid_dbns_fir: hybrid (1-digit coefficient / 2-digit data) DBNS FIR filter.
//
// Each data sample is given as the sum of two DBNS digits,
//     x = s1*2^b1*3^t1 + s2*2^b2*3^t2,
// whose ternary exponents stay small, while each coefficient is a single digit
// with a large ternary exponent. Because multiplication distributes over the
// two data digits, the filter is two identical 1-digit systolic channels that
// share the coefficient set: channel 1 filters the first digits, channel 2 the
// second, and an ACC_W-bit adder sums their outputs. Keeping the data ternary
// exponents small keeps |t_c + t_d| < 256, so each cell needs only a 512-word
// ternary ROM. The structure (two channels, shared coefficients, output adder,
// 5 taps, 24-bit output) follows the design; the output adder is combinational
// here, which is this implementation's choice.
//
// Interface: d1_in, d2_in the two digits of the current sample; coef[TAPS] the
// coefficient digits, coef[0] applied to the newest sample; y_out the filter
// output in two's complement, LSB weight 2^0 of the digit arithmetic.
// Timing: one sample per clock; y_out in cycle n + TAPS is the response to
// samples up to cycle n. Synchronous active-low reset.
module hybrid_dbns_fir
  import dbns_pkg::*;
#(
  parameter int unsigned TAPS   = 5,
  parameter int unsigned MANT_W = 12,
  parameter int unsigned ACC_W  = 24
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  dbns_digit_t             d1_in,
  input  dbns_digit_t             d2_in,
  input  dbns_digit_t             coef [TAPS],
  output logic signed [ACC_W-1:0] y_out
);

  logic signed [ACC_W-1:0] y1;
  logic signed [ACC_W-1:0] y2;

  dbns_fir_channel #(.TAPS(TAPS), .MANT_W(MANT_W), .ACC_W(ACC_W)) u_ch1 (
    .clk(clk), .rst_n(rst_n), .d_in(d1_in), .coef(coef), .y(y1)
  );

  dbns_fir_channel #(.TAPS(TAPS), .MANT_W(MANT_W), .ACC_W(ACC_W)) u_ch2 (
    .clk(clk), .rst_n(rst_n), .d_in(d2_in), .coef(coef), .y(y2)
  );

  always_comb y_out = y1 + y2;

endmodule
