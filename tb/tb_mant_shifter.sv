// tb_mant_shifter: checks floor(m * 2^s) modulo 2^24 for every shift in
// -32 .. 31 over random 12-bit normalised mantissas, plus the worked example
// 3554 * 2^-10 -> 3.
module tb_mant_shifter;
  int checks = 0, failures = 0;

  logic [11:0]       m;
  logic signed [5:0] s;
  logic [23:0]       p;
  longint            exp_v;

  mant_shifter #(.MANT_W(12), .SH_W(6), .OUT_W(24)) dut (.m(m), .s(s), .p(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = 12'd3554; s = -6'sd10;
    #1;
    checks++;
    if (p !== 24'd3) begin failures++; $display("3554>>10 gave %0d", p); end
    for (int i = 0; i < 200; i++) begin
      m = 12'($urandom_range(2048, 4095));
      for (int k = -32; k < 32; k++) begin
        s = 6'(k);
        #1;
        exp_v = (k >= 0) ? (longint'(m) << k) : (longint'(m) >> (-k));
        exp_v = exp_v & 64'hFF_FFFF;
        checks++;
        if (longint'(p) != exp_v) begin
          failures++;
          $display("m=%0d s=%0d p=%0d expected %0d", m, k, p, exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
