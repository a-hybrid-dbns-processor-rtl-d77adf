// tb_exp_adder: checks the wrap-around exponent adder at the 6-bit binary
// exponent width and the 9-bit ternary width, including the carry-dropping
// example 31 + 23 = -10 (54 modulo 64) of a binary exponent sum.
module tb_exp_adder;
  int checks = 0, failures = 0;

  logic signed [5:0] a6, b6, s6;
  logic signed [8:0] a9, b9, s9;

  exp_adder #(.W(6)) dut6 (.a(a6), .b(b6), .sum(s6));
  exp_adder #(.W(9)) dut9 (.a(a9), .b(b9), .sum(s9));

  function automatic int wrap(input int v, input int w);
    int m = 1 << w;
    v = ((v % m) + m) % m;
    return (v >= m / 2) ? v - m : v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a6 = 6'sd31; b6 = 6'sd23; a9 = '0; b9 = '0;
    #1;
    checks++;
    if (s6 !== -6'sd10) begin failures++; $display("31+23 gave %0d", s6); end
    for (int i = 0; i < 2000; i++) begin
      a6 = 6'($urandom); b6 = 6'($urandom); a9 = 9'($urandom); b9 = 9'($urandom);
      #1;
      checks += 2;
      if (int'(s6) != wrap(int'(a6) + int'(b6), 6)) begin
        failures++; $display("W6 %0d+%0d gave %0d", a6, b6, s6);
      end
      if (int'(s9) != wrap(int'(a9) + int'(b9), 9)) begin
        failures++; $display("W9 %0d+%0d gave %0d", a9, b9, s9);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
