// tb_dbns_fir_channel: drives one 5-tap systolic channel with a stream of
// random data digits (one per clock) and checks every output against
//     y(j) = sum_k coef[k] * d(j - TAPS + 1 - k)
// evaluated with the bit-exact reference product. This fixes the latency:
// the response to the digit presented before clock edge j appears right after
// edge j + TAPS - 1. An isolated impulse at the end checks the same timing
// tap by tap.
module tb_dbns_fir_channel;
  import dbns_pkg::*;
  import dbns_ref_pkg::*;

  localparam int TAPS = 5;
  localparam int MW   = 12;
  localparam int AW   = 24;
  localparam int N    = 3000;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  dbns_digit_t d_in;
  dbns_digit_t coef [TAPS];
  logic signed [AW-1:0] y;
  dbns_digit_t xs [N];
  longint exp_y;
  int idx;

  dbns_fir_channel #(.TAPS(TAPS), .MANT_W(MW), .ACC_W(AW)) dut (
    .clk(clk), .rst_n(rst_n), .d_in(d_in), .coef(coef), .y(y)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (N + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d_in = DIGIT_ZERO;
    for (int k = 0; k < TAPS; k++) coef[k] = rand_digit(-200, 200);
    coef[1].zero = 1'b0;
    for (int i = 0; i < N; i++) xs[i] = (i >= N - 12) ? DIGIT_ZERO : rand_digit(-20, 28);
    xs[N - 10] = '{zero: 1'b0, neg: 1'b0, b: 6'sd5, t: 9'sd3};   // impulse
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int j = 0; j < N; j++) begin
      d_in = xs[j];
      @(posedge clk); #1;
      exp_y = 0;
      for (int k = 0; k < TAPS; k++) begin
        idx = j - TAPS + 1 - k;
        if (idx >= 0) exp_y += prod_ref(coef[k], xs[idx], MW, AW);
      end
      exp_y = wrap_s(exp_y, AW);
      checks++;
      if (longint'(y) != exp_y) begin
        failures++;
        if (failures < 10) $display("cycle %0d: y=%0d expected %0d", j, y, exp_y);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
