// ternary_rom: ternary-to-binary conversion ROM of the DBNS multiplier.
//
// Given a ternary exponent t (the sum t_c + t_d of coefficient and data), the
// ROM returns a binary floating-point approximation of 3^t:
//     3^t ~= mt * 2^bt,   2^(MANT_W-1) <= mt < 2^MANT_W,
// with mt rounded to nearest and bt = floor(t * log2 3) - (MANT_W - 1), stored
// modulo 2^BEXP_W like every binary exponent in the design. Example: t = 27
// gives bt = 31 and mt = 3551 (3^27 = 3551.0 * 2^31).
//
// The ROM has 2^TEXP_W = 512 words, one per t in -256 .. 255. Its contents are
// computed at elaboration by exact integer arithmetic: 3^t is held as a 64-bit
// normalised fraction times a power of two and built by repeated multiplication
// (or division) by 3, then rounded to MANT_W bits. The ROM function and its
// 9-bit address follow the design; the mantissa width, the rounding and the
// normalisation are this implementation's choices.
//
// Interface: t is the signed address; {bt, mt} is the word read.
// Timing: purely combinational (asynchronous read).
module ternary_rom
  import dbns_pkg::*;
#(
  parameter int unsigned MANT_W = 12
) (
  input  texp_t             t,
  output bexp_t             bt,
  output logic [MANT_W-1:0] mt
);

  localparam int unsigned DEPTH = 2 ** TEXP_W;

  typedef logic [BEXP_W+MANT_W-1:0] rom_word_t;
  typedef rom_word_t rom_table_t [DEPTH];

  // {bt, mt} for one ternary exponent
  function automatic rom_word_t rom_entry(input int te);
    logic [65:0]     frac;   // 3^te = (frac / 2^62) * 2^k, frac / 2^62 in [1, 2)
    int              k;
    logic [MANT_W:0] mant;
    int              e;
    frac = 66'd1 << 62;
    k    = 0;
    if (te >= 0) begin
      for (int i = 0; i < te; i++) begin
        frac = frac * 66'd3;                // [3, 6) * 2^62
        if (frac >= (66'd1 << 64)) begin
          frac = frac >> 2;
          k    = k + 2;
        end else begin
          frac = frac >> 1;
          k    = k + 1;
        end
      end
    end else begin
      for (int i = 0; i < -te; i++) begin
        frac = (frac << 2) / 66'd3;         // [4/3, 8/3) * 2^62
        k    = k - 2;
        if (frac >= (66'd1 << 63)) begin
          frac = frac >> 1;
          k    = k + 1;
        end
      end
    end
    mant = (MANT_W + 1)'((frac + (66'd1 << (62 - MANT_W))) >> (63 - MANT_W));
    e    = k - int'(MANT_W - 1);
    if (mant[MANT_W]) begin                 // rounded up to 2^MANT_W
      mant = mant >> 1;
      e    = e + 1;
    end
    return {BEXP_W'(e), mant[MANT_W-1:0]};
  endfunction

  function automatic rom_table_t build_table();
    rom_table_t tbl;
    for (int a = 0; a < int'(DEPTH); a++)
      tbl[a] = rom_entry(a < int'(DEPTH / 2) ? a : a - int'(DEPTH));
    return tbl;
  endfunction

  localparam rom_table_t TABLE = build_table();

  always_comb {bt, mt} = TABLE[$unsigned(t)];

endmodule
