// tb_fir57_workload: runs the design's example filter, a 57-tap linear-phase
// half-band lowpass, on the hybrid DBNS filter built with TAPS = 57.
//
// The filter's 29 distinct coefficients h[0..28] are single DBNS digits
// a*2^b*3^t (listed below); h[28] = 0.499 is the centre tap and
// h[56-k] = h[k]. Every binary exponent is raised by K = 8 so that the integer
// accumulator holds the output with 8 fractional bits; only b modulo 64 reaches
// the hardware. Samples are 12-bit integers converted to two digits.
//
// Three segments of input are applied: a passband tone (0.2 of Nyquist), a
// stopband tone (0.7 of Nyquist) and random samples. Checks:
//   - every output bit-exactly against the reference product arithmetic;
//   - every output against the real-valued filter of the digit values, within
//     the truncation and mantissa-rounding bound of the 114 products;
//   - passband gain within 0.5 dB of 0 dB and stopband attenuation above 35 dB,
//     measured on the hardware output once the tones have filled the filter.
module tb_fir57_workload;
  import dbns_pkg::*;
  import dbns_ref_pkg::*;

  localparam int TAPS = 57;
  localparam int HALF = 29;
  localparam int MW   = 12;
  localparam int AW   = 24;
  localparam int K    = 8;
  localparam int SEG  = 400;
  localparam int N    = 3 * SEG;
  localparam real PI  = 3.141592653589793;

  // {sign, binary exponent, ternary exponent} of h[0..28]
  localparam int TAB_A [HALF] = '{ 1, -1, -1,  1,  1, -1, -1,  1, -1, -1,  1,  1,  1, -1, -1,
                                   1, -1, -1, -1,  1,  1, -1, -1,  1,  1, -1, -1,  1,  1};
  localparam int TAB_B [HALF] = '{-55, -273, -260, 194, -283, -248, -280, 67, 157, 100, -45, 10, 250, -21, 6,
                                  -95, -155, 110, -36, 158, 182, -152, 23, -264, -97, -184, -139, 309, 83};
  localparam int TAB_T [HALF] = '{28, 160, 156, -135, 171, 150, 170, -48, -111, -68, 15, -11, -169, 9, -13,
                                  56, 85, -73, 16, -103, -125, 93, -25, 164, 51, 114, 76, -196, -53};

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  dbns_digit_t d1_in, d2_in;
  dbns_digit_t coef [TAPS];
  real         coef_val [TAPS];
  logic signed [AW-1:0] y_out;

  dbns_digit_t x1 [N];
  dbns_digit_t x2 [N];
  real         yhw [N];

  hybrid_dbns_fir #(.TAPS(TAPS)) dut (
    .clk(clk), .rst_n(rst_n), .d1_in(d1_in), .d2_in(d2_in), .coef(coef), .y_out(y_out)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (N + 300) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // peak |y| / 2^K over the outputs whose whole window lies in segment s
  function automatic real seg_peak(input int s);
    real pk = 0.0, v;
    for (int m = s * SEG + TAPS; m < (s + 1) * SEG; m++) begin
      v = yhw[m] / real'(1 << K);
      if (v < 0.0) v = -v;
      if (v > pk) pk = v;
    end
    return pk;
  endfunction

  initial begin
    int  src, idx, b, t, xi;
    real yr, tol, pr, err, amp_pass, amp_stop, g_pass, g_stop;
    longint exp_y, y_l;

    for (int k = 0; k < TAPS; k++) begin
      src = (k < HALF) ? k : TAPS - 1 - k;
      b   = TAB_B[src] + K;
      t   = TAB_T[src];
      coef[k].zero = 1'b0;
      coef[k].neg  = TAB_A[src] < 0;
      coef[k].b    = bexp_t'(b);
      coef[k].t    = texp_t'(t);
      coef_val[k]  = real'(TAB_A[src]) * (2.0 ** b) * (3.0 ** t);
    end
    amp_pass = 2000.0;
    amp_stop = 2000.0;
    for (int n = 0; n < N; n++) begin
      if (n < SEG)          xi = int'($floor(amp_pass * $cos(PI * 0.2 * n) + 0.5));
      else if (n < 2 * SEG) xi = int'($floor(amp_stop * $cos(PI * 0.7 * n) + 0.5));
      else                  xi = int'($urandom_range(0, 8190)) - 4095;
      to_2digit(xi, x1[n], x2[n]);
    end

    d1_in = DIGIT_ZERO; d2_in = DIGIT_ZERO;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int j = 0; j < N + TAPS - 1; j++) begin
      d1_in = (j < N) ? x1[j] : DIGIT_ZERO;
      d2_in = (j < N) ? x2[j] : DIGIT_ZERO;
      @(posedge clk); #1;
      exp_y = 0; yr = 0.0; tol = 0.0;
      for (int k = 0; k < TAPS; k++) begin
        idx = j - TAPS + 1 - k;
        if (idx >= 0 && idx < N) begin
          exp_y += prod_ref(coef[k], x1[idx], MW, AW) + prod_ref(coef[k], x2[idx], MW, AW);
          pr  = coef_val[k] * digit_val(x1[idx]);
          yr  += pr;
          tol += 1.0 + ((pr < 0.0) ? -pr : pr) / real'(1 << MW);
          pr  = coef_val[k] * digit_val(x2[idx]);
          yr  += pr;
          tol += 1.0 + ((pr < 0.0) ? -pr : pr) / real'(1 << MW);
        end
      end
      exp_y = wrap_s(exp_y, AW);
      y_l   = longint'(y_out);
      checks += 2;
      if (y_l != exp_y) begin
        failures++;
        if (failures < 10) $display("cycle %0d: y=%0d expected %0d", j, y_l, exp_y);
      end
      err = real'(y_l) - yr;
      if (err < 0.0) err = -err;
      if (err > tol) begin
        failures++;
        if (failures < 10) $display("cycle %0d: y=%0d real %f tol %f", j, y_l, yr, tol);
      end
      if (j - TAPS + 1 >= 0 && j - TAPS + 1 < N) yhw[j - TAPS + 1] = real'(y_l);
      @(negedge clk);
    end

    g_pass = 20.0 * $log10(seg_peak(0) / amp_pass);
    g_stop = 20.0 * $log10((seg_peak(1) + 1e-9) / amp_stop);
    $display("passband gain at 0.2 Nyquist: %0.2f dB, stopband gain at 0.7 Nyquist: %0.2f dB", g_pass, g_stop);
    checks += 2;
    if (g_pass > 0.5 || g_pass < -0.5) begin failures++; $display("passband gain out of range"); end
    if (g_stop > -35.0) begin failures++; $display("stopband attenuation too small"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
