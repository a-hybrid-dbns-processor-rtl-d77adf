// tb_dbns_mac_cell: checks one DBNS multiply-accumulate cell against the
// double-precision reference product, cycle by cycle: acc_out must equal
// acc_in + coef*d_in of the previous clock (modulo 2^24), and d_out must be
// d_in delayed by exactly two clocks. Starts with the worked example
// data 2^2*3^0 times coefficient 2^21*3^27 (binary exponent 21 stands for
// -43 modulo 64), whose product truncates to 3.
module tb_dbns_mac_cell;
  import dbns_pkg::*;
  import dbns_ref_pkg::*;

  localparam int MW = 12;
  localparam int AW = 24;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  dbns_digit_t d_in, coef, d_out;
  logic signed [AW-1:0] acc_in, acc_out;
  longint exp_acc;
  dbns_digit_t hist [1];

  dbns_mac_cell #(.MANT_W(MW), .ACC_W(AW)) dut (
    .clk(clk), .rst_n(rst_n), .d_in(d_in), .coef(coef),
    .acc_in(acc_in), .d_out(d_out), .acc_out(acc_out)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d_in = DIGIT_ZERO; coef = DIGIT_ZERO; acc_in = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (acc_out !== '0 || d_out.zero !== 1'b1) begin failures++; $display("reset state wrong"); end
    rst_n = 1'b1;

    // worked example
    @(negedge clk);
    d_in = '{zero: 1'b0, neg: 1'b0, b: 6'sd2, t: 9'sd0};
    coef = '{zero: 1'b0, neg: 1'b0, b: 6'sd21, t: 9'sd27};
    acc_in = '0;
    @(posedge clk); #1;
    checks++;
    if (acc_out !== 24'sd3) begin failures++; $display("example gave %0d, expected 3", acc_out); end

    hist[0] = d_in;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      if (i % 2 == 0) begin
        d_in = rand_digit(-20, 28);
        coef = rand_digit(-230, 220);
      end else begin
        d_in = rand_digit(-256, 255);
        coef = rand_digit(-256, 255);
      end
      acc_in  = AW'($urandom);
      exp_acc = wrap_s(longint'(acc_in) + prod_ref(d_in, coef, MW, AW), AW);
      @(posedge clk); #1;
      checks += 2;
      if (longint'(acc_out) != exp_acc) begin
        failures++;
        $display("acc_out=%0d expected %0d (d=%p c=%p)", acc_out, exp_acc, d_in, coef);
      end
      // d_out now shows the digit presented one cycle before this one
      if (d_out !== hist[0]) begin
        failures++;
        $display("d_out=%p expected %p", d_out, hist[0]);
      end
      hist[0] = d_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
