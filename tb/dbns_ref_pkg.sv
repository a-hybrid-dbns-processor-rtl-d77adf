// dbns_ref_pkg: reference arithmetic for the DBNS testbenches.
//
// Works in real (double precision) arithmetic, independently of the RTL:
//  - rom_ref:    3^t as mantissa * 2^exp, mantissa rounded to MANT_W bits
//  - prod_ref:   the bit-exact product a cell adds to its partial sum
//  - digit_val:  the real value of a DBNS digit
//  - to_2digit:  greedy conversion of an integer into two DBNS digits with
//                ternary exponents in -20 .. 28 (a model of the data converter,
//                which the processor takes as given)
package dbns_ref_pkg;
  import dbns_pkg::*;

  localparam real LOG2_3 = 1.5849625007211562;

  // wrap an integer into a signed W-bit range
  function automatic longint wrap_s(input longint v, input int w);
    longint m;
    m = longint'(1) << w;
    v = v % m;
    if (v < 0) v += m;
    if (v >= (m >> 1)) v -= m;
    return v;
  endfunction

  // 3^t = mant * 2^e, 2^(mw-1) <= mant < 2^mw
  function automatic void rom_ref(input int t, input int mw, output longint mant, output int e);
    real v;
    v    = 3.0 ** t;
    e    = int'($floor(t * LOG2_3)) - (mw - 1);
    mant = longint'($floor(v / (2.0 ** e) + 0.5));
    if (mant >= (longint'(1) << mw)) begin
      mant = mant >> 1;
      e    = e + 1;
    end
  endfunction

  // bit-exact product of two digits as the cell computes it, modulo 2^aw
  function automatic longint prod_ref(input dbns_digit_t d, input dbns_digit_t c,
                                      input int mw, input int aw);
    longint mant, mag;
    int     e, t, s;
    if (d.zero || c.zero) return 0;
    t = int'(wrap_s(longint'(d.t) + longint'(c.t), TEXP_W));
    rom_ref(t, mw, mant, e);
    s = int'(wrap_s(longint'(d.b) + longint'(c.b) + longint'(e), BEXP_W));
    if (s >= 0) mag = mant << s;
    else        mag = mant >> (-s);
    mag = mag & ((longint'(1) << aw) - 1);
    return wrap_s((d.neg ^ c.neg) ? -mag : mag, aw);
  endfunction

  function automatic real digit_val(input dbns_digit_t d);
    int b, t;
    if (d.zero) return 0.0;
    b = int'(d.b);
    t = int'(d.t);
    return (d.neg ? -1.0 : 1.0) * (2.0 ** b) * (3.0 ** t);
  endfunction

  // best single digit approximating v (v != 0), ternary exponent in tlo .. thi
  function automatic dbns_digit_t best_digit(input real v, input int tlo, input int thi);
    dbns_digit_t best;
    real         av, err, best_err, cand;
    int          b;
    av       = (v < 0.0) ? -v : v;
    best     = DIGIT_ZERO;
    best_err = av;
    for (int t = tlo; t <= thi; t++) begin
      b = int'($floor($ln(av / (3.0 ** t)) / $ln(2.0) + 0.5));
      if (b < -(1 << (BEXP_W - 1)) || b >= (1 << (BEXP_W - 1))) continue;
      cand = (2.0 ** b) * (3.0 ** t);
      err  = (av > cand) ? av - cand : cand - av;
      if (err < best_err) begin
        best_err = err;
        best.zero = 1'b0;
        best.neg  = (v < 0.0);
        best.b    = bexp_t'(b);
        best.t    = texp_t'(t);
      end
    end
    return best;
  endfunction

  function automatic void to_2digit(input int x, output dbns_digit_t d1, output dbns_digit_t d2);
    real r;
    d1 = DIGIT_ZERO;
    d2 = DIGIT_ZERO;
    if (x == 0) return;
    d1 = best_digit(real'(x), -20, 28);
    r  = real'(x) - digit_val(d1);
    if (r != 0.0) d2 = best_digit(r, -20, 28);
  endfunction

  // a random digit with the given ternary range (any binary exponent, mod 64)
  function automatic dbns_digit_t rand_digit(input int tlo, input int thi);
    dbns_digit_t d;
    d.zero = ($urandom_range(0, 15) == 0);
    d.neg  = $urandom_range(0, 1) == 1;
    d.b    = bexp_t'($urandom);
    d.t    = texp_t'(tlo + int'($urandom_range(0, thi - tlo)));
    return d;
  endfunction

endpackage
