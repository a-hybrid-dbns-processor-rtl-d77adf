// tb_ternary_rom: reads every word of the ternary ROM and compares it with
// 3^t computed in double precision: the mantissa must be 3^t / 2^e rounded to
// 12 bits and the binary exponent e = floor(t*log2 3) - 11 modulo 64. Also
// checks that the value mt * 2^e is within half a mantissa LSB of 3^t, and the
// worked example t = 27 -> exponent 31.
module tb_ternary_rom;
  import dbns_pkg::*;
  import dbns_ref_pkg::*;
  int checks = 0, failures = 0;

  texp_t       t;
  bexp_t       bt;
  logic [11:0] mt;
  longint      mref;
  int          eref;
  real         rel;

  ternary_rom #(.MANT_W(12)) dut (.t(t), .bt(bt), .mt(mt));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    t = 9'sd27;
    #1;
    checks++;
    if (bt !== 6'sd31) begin failures++; $display("t=27 gave bt=%0d", bt); end
    for (int k = -256; k < 256; k++) begin
      t = texp_t'(k);
      #1;
      rom_ref(k, 12, mref, eref);
      checks += 3;
      if (longint'(mt) != mref) begin
        failures++; $display("t=%0d mt=%0d expected %0d", k, mt, mref);
      end
      if (longint'(bt) != wrap_s(longint'(eref), BEXP_W)) begin
        failures++; $display("t=%0d bt=%0d expected %0d", k, bt, eref);
      end
      rel = real'(mt) * (2.0 ** eref) / (3.0 ** k);
      if (rel < 1.0 - 0.5 / 2048.0 || rel > 1.0 + 0.5 / 2048.0) begin
        failures++; $display("t=%0d relative value %f", k, rel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
