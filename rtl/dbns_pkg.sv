// dbns_pkg: shared types and widths of the hybrid double-base (DBNS) FIR processor.
//
// A DBNS digit stands for the value s * 2^b * 3^t, with s in {-1, 0, +1}. In
// hardware a digit is carried as its index triple: a zero flag and a sign flag
// (the "+/-" and "0?" logic bits of a data or coefficient word), a signed binary
// exponent b and a signed ternary exponent t.
//
// Widths follow the design: the binary exponent path is 6 bits wide and works
// modulo 64 (only the sum of all binary exponents of a product has to be exact,
// and it is small); the ternary exponent is 9 bits, enough for |t_c + t_d| < 256
// and thus for a 512-entry ternary conversion ROM. The flag encoding (zero wins
// over sign) is this design's own choice.
package dbns_pkg;

  localparam int unsigned BEXP_W = 6;  // binary exponent width (modulo-64 arithmetic)
  localparam int unsigned TEXP_W = 9;  // ternary exponent width = ROM address width

  typedef logic signed [BEXP_W-1:0] bexp_t;
  typedef logic signed [TEXP_W-1:0] texp_t;

  // One DBNS digit in index form: value = (zero ? 0 : (neg ? -1 : 1) * 2^b * 3^t)
  typedef struct packed {
    logic  zero;
    logic  neg;
    bexp_t b;
    texp_t t;
  } dbns_digit_t;

  localparam dbns_digit_t DIGIT_ZERO = '{zero: 1'b1, neg: 1'b0, b: '0, t: '0};

endpackage
