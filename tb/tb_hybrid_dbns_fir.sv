// tb_hybrid_dbns_fir: end-to-end test of the hybrid DBNS FIR filter at its
// default size (5 taps, 12-bit mantissas, 24-bit accumulation).
//
// Random 12-bit signed samples are converted to two DBNS digits by a greedy
// model of the data converter and fed to both channels, one sample per clock.
// The five single-digit coefficients have magnitudes between 2^0 and 2^6 but
// large ternary exponents, so their true binary exponents lie far outside the
// 6-bit range and only their value modulo 64 is given to the filter.
// Every output is checked twice:
//   - bit-exactly against the reference product arithmetic, with the latency
//     of TAPS clocks;
//   - against the real-valued filter of the digit values: each of the 2*TAPS
//     products is off by less than one (truncation to an integer) plus 2^-12
//     of its size (12-bit rounding of the 3^t mantissa).
// The mechanisms of the design are counted over all products fed to the
// cells, and one that never happens is a failure: modular wrap of a binary
// exponent sum, left and right shift of the mantissa, negative product, zero
// data digit (sample exactly one digit), zero sample, and both channels
// contributing to one output.
module tb_hybrid_dbns_fir;
  import dbns_pkg::*;
  import dbns_ref_pkg::*;

  localparam int TAPS = 5;
  localparam int MW   = 12;
  localparam int AW   = 24;
  localparam int N    = 2000;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  dbns_digit_t d1_in, d2_in;
  dbns_digit_t coef [TAPS];
  real         coef_val [TAPS];
  logic signed [AW-1:0] y_out;

  dbns_digit_t x1 [N];
  dbns_digit_t x2 [N];
  int          xint [N];

  int n_wrap = 0, n_left = 0, n_right = 0, n_neg = 0, n_zero_digit = 0;
  int n_zero_sample = 0, n_both = 0;
  real max_err_digits = 0.0, max_err_exact = 0.0;

  hybrid_dbns_fir dut (
    .clk(clk), .rst_n(rst_n), .d1_in(d1_in), .d2_in(d2_in), .coef(coef), .y_out(y_out)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (N + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // classify one product for the mechanism counters
  function automatic void note_product(input dbns_digit_t c, input dbns_digit_t d);
    longint mant;
    int     e, t, raw, bsum;
    if (c.zero || d.zero) return;
    t = int'(wrap_s(longint'(c.t) + longint'(d.t), TEXP_W));
    rom_ref(t, MW, mant, e);
    bsum = int'(c.b) + int'(d.b);
    raw  = int'(wrap_s(longint'(bsum), BEXP_W)) + int'(wrap_s(longint'(e), BEXP_W));
    if (bsum != int'(wrap_s(longint'(bsum), BEXP_W)) ||
        raw != int'(wrap_s(longint'(raw), BEXP_W)))
      n_wrap++;
    if (wrap_s(longint'(raw), BEXP_W) >= 0) n_left++; else n_right++;
    if (c.neg ^ d.neg) n_neg++;
  endfunction

  initial begin
    int  t, btrue, idx;
    real target, err, yr_dig, yr_exact, tol, pr;
    longint y_l;
    longint exp_y;
    bit  ch1, ch2;

    d1_in = DIGIT_ZERO; d2_in = DIGIT_ZERO;
    // coefficients: value 2^btrue * 3^t with log2|value| in [0, 6)
    for (int k = 0; k < TAPS; k++) begin
      t      = int'($urandom_range(0, 300)) - 150;
      target = real'($urandom_range(0, 5999)) / 1000.0;
      btrue  = int'($floor(target - t * LOG2_3 + 0.5));
      coef[k].zero = 1'b0;
      coef[k].neg  = (k == 2);
      coef[k].t    = texp_t'(t);
      coef[k].b    = bexp_t'(btrue);
      coef_val[k]  = (coef[k].neg ? -1.0 : 1.0) * (2.0 ** btrue) * (3.0 ** t);
    end
    for (int i = 0; i < N; i++) begin
      case ($urandom_range(0, 19))
        0:       xint[i] = 0;
        1:       xint[i] = (1 << $urandom_range(0, 6)) * (3 ** $urandom_range(0, 5));
        default: xint[i] = int'($urandom_range(0, 8190)) - 4095;
      endcase
      to_2digit(xint[i], x1[i], x2[i]);
      if (xint[i] == 0) n_zero_sample++;
      if (!x1[i].zero && x2[i].zero) n_zero_digit++;
    end

    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int j = 0; j < N; j++) begin
      d1_in = x1[j];
      d2_in = x2[j];
      for (int k = 0; k < TAPS; k++) begin
        note_product(coef[k], x1[j]);
        note_product(coef[k], x2[j]);
      end
      @(posedge clk); #1;
      exp_y = 0; yr_dig = 0.0; yr_exact = 0.0; tol = 0.0; ch1 = 0; ch2 = 0;
      for (int k = 0; k < TAPS; k++) begin
        idx = j - TAPS + 1 - k;
        if (idx >= 0) begin
          exp_y    += prod_ref(coef[k], x1[idx], MW, AW) + prod_ref(coef[k], x2[idx], MW, AW);
          yr_dig   += coef_val[k] * (digit_val(x1[idx]) + digit_val(x2[idx]));
          yr_exact += coef_val[k] * real'(xint[idx]);
          // per product: truncation (< 1) plus mantissa rounding (<= 2^-MW relative)
          pr  = coef_val[k] * digit_val(x1[idx]);
          tol += 1.0 + ((pr < 0.0) ? -pr : pr) / real'(1 << MW);
          pr  = coef_val[k] * digit_val(x2[idx]);
          tol += 1.0 + ((pr < 0.0) ? -pr : pr) / real'(1 << MW);
          ch1 |= prod_ref(coef[k], x1[idx], MW, AW) != 0;
          ch2 |= prod_ref(coef[k], x2[idx], MW, AW) != 0;
        end
      end
      if (ch1 && ch2) n_both++;
      exp_y = wrap_s(exp_y, AW);
      checks += 2;
      if (longint'(y_out) != exp_y) begin
        failures++;
        if (failures < 10) $display("cycle %0d: y=%0d expected %0d", j, y_out, exp_y);
      end
      y_l = longint'(y_out);
      err = real'(y_l) - yr_dig;
      if (err < 0.0) err = -err;
      if (err > max_err_digits) max_err_digits = err;
      if (err > tol) begin
        failures++;
        if (failures < 10) $display("cycle %0d: y=%0d real %f", j, y_out, yr_dig);
      end
      err = real'(y_l) - yr_exact;
      if (err < 0.0) err = -err;
      if (err > max_err_exact) max_err_exact = err;
      @(negedge clk);
    end

    $display("mechanisms: exp_wrap=%0d left_shift=%0d right_shift=%0d negative=%0d zero_digit=%0d zero_sample=%0d both_channels=%0d",
             n_wrap, n_left, n_right, n_neg, n_zero_digit, n_zero_sample, n_both);
    $display("max |y - digit-valued filter| = %f, max |y - exact-sample filter| = %f",
             max_err_digits, max_err_exact);
    checks += 7;
    if (n_wrap == 0)        begin failures++; $display("no exponent wrap seen"); end
    if (n_left == 0)        begin failures++; $display("no left shift seen"); end
    if (n_right == 0)       begin failures++; $display("no right shift seen"); end
    if (n_neg == 0)         begin failures++; $display("no negative product seen"); end
    if (n_zero_digit == 0)  begin failures++; $display("no zero second digit seen"); end
    if (n_zero_sample == 0) begin failures++; $display("no zero sample seen"); end
    if (n_both == 0)        begin failures++; $display("no output with both channels seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
