# Hybrid DBNS FIR filter

This is a FIR filter whose multipliers contain no multiplier array. Each
coefficient is stored as one signed power term, `±2^b·3^t`, a single digit of
the double-base number system (DBNS). A product of two such digits is
`±2^(b1+b2)·3^(t1+t2)`, so it costs two small exponent additions. The power of
three is turned back into binary by a ROM lookup and a shift. Partial sums stay
in ordinary two's-complement binary, and the filter output is a plain binary
number.

The data side is "hybrid". A 12-bit sample written as *one* DBNS digit would
need a large ternary exponent, and the conversion ROM would grow with it. So
each sample is written as the sum of *two* digits instead,

    x = s1·2^b1·3^t1 + s2·2^b2·3^t2,    -20 <= t1, t2 <= 28

Two digits with small ternary exponents can reach every 12-bit value to about
half an LSB. The price is a second channel: the filter runs two identical
single-digit systolic FIR channels, one per data digit. Both use the same
coefficients, and an adder sums their outputs. Because each channel's ternary
sums stay within ±255, every cell needs only a 512-word conversion ROM.

The default build is a 5-tap filter with two channels. `TAPS` sets the filter
length. The testbenches also run the design's 57-tap half-band example filter.

## Digits and exponent widths

A digit travels as a `dbns_digit_t` (defined in `rtl/dbns_pkg.sv`):

| field  | width | meaning                                   |
|--------|-------|-------------------------------------------|
| `zero` | 1     | the digit is 0 (this flag overrides the rest) |
| `neg`  | 1     | the digit is negative                     |
| `b`    | 6     | binary exponent, two's complement, **modulo 64** |
| `t`    | 9     | ternary exponent, two's complement, -256..255 |

The 6-bit binary exponent is the least obvious part of the design. A
coefficient such as `2^-43·3^27` (about 0.87) has a binary exponent far outside
±32, and the table coefficients reach `2^309·3^-196`. Yet all binary exponent
arithmetic is done modulo 64:

* The cell adds `b_d + b_c`, then adds the ROM's exponent `b_T` of `3^(t_d+t_c)`.
  The result is the shift that scales the ROM mantissa.
* That shift is about `log2|product| - 11`. For any sensible scaling it lies
  between -32 and +31.
* Integer addition modulo 64 is exact whenever the true result lies in that
  range, however large the individual terms are.

So a coefficient's binary exponent is given to the hardware only as its low 6
bits. The ROM stores `b_T` modulo 64 as well. The ternary exponent cannot be
wrapped, because it selects the ROM word. It needs 9 bits.

**Choosing coefficients.** The accumulator's LSB has weight 2^0 in digit
arithmetic. To keep `F` fractional output bits, add `F` to every coefficient's
binary exponent before taking it modulo 64. Check two things:

* The largest product still needs a shift of at most +31, and the output fits
  in 24 bits.
* Every ternary sum `t_c + t_d` stays inside ±255.

The 57-tap example uses `F = 8`.

## The multiply-accumulate cell (`dbns_mac_cell`)

One cell does one tap of one channel. Everything between the input digits and
the accumulator register is combinational:

```
 t_d ─┐                      ┌─ b_T (6b) ─┐
 t_c ─┴─ ternary add (9b) ─ ROM ─ M_T (12b) ─┐
 b_d ─┐                                    │   │
 b_c ─┴─ binary add (6b) ── exponent add (6b) ─ shifter ─ sign fix ─┐
 zero/neg flags (data, coef) ───────────────────────────┘           │
 acc_in ────────────────────────────────────── + (24b) ── reg ── acc_out
 d_in ── reg ── reg ── d_out
```

* `exp_adder` is a W-bit adder that drops its carry. It is used at W=9 for
  the ternary sum and at W=6 for the two binary sums.
* `ternary_rom` returns `3^t ≈ M_T·2^b_T` with `2048 <= M_T < 4096`.
* `mant_shifter` computes `floor(M_T·2^s)` for `s` in -32..31. Right shifts
  truncate. A result wider than 24 bits keeps its low 24 bits.
* `sign_fix` negates when exactly one digit is negative. It gives 0 when
  either digit is zero.

Worked example (data `2^2·3^0` = 4, coefficient `2^-43·3^27` ≈ 0.866):

| step | value |
|------|-------|
| ternary sum | 0 + 27 = 27 |
| binary sum | 2 + 21 = 23 (21 is -43 modulo 64) |
| ROM(27) | `M_T` = 3551, `b_T` = 31 |
| exponent sum | 23 + 31 = 54, which is **-10** modulo 64 |
| shifter | 3551·2^-10 = 3.47, truncated to **3** |
| accumulator | 0 + 3 = 3 |

The exact product is 3.46. The `tb_dbns_mac_cell` testbench checks this example.

### ROM contents

For each address `t` in -256..255:

    e    = floor(t·log2 3) - 11
    M_T  = round(3^t / 2^e)          (if this gives 4096: M_T = 2048, e = e+1)
    b_T  = e mod 64

The table is not read from a file. A constant function builds it at
elaboration, using exact integer arithmetic. It keeps `3^t` as a 64-bit
normalised fraction times a power of two, then multiplies or divides that
fraction by 3 once per step. This keeps the rounding error far below one
mantissa LSB. The table holds 512 words of 18 bits, one copy per cell. The
mantissa is 12 bits wide (`MANT_W`).

## The systolic channel (`dbns_fir_channel`)

`TAPS` cells form a chain. Both the data digit and the partial sum enter at
cell 0 and move toward the last cell:

* The partial sum starts at zero. It crosses one register per cell.
* The data digit crosses two registers per cell.

Each partial sum therefore meets an older sample at every cell. If `d(j)` is
the digit presented in cycle `j`, then right after clock edge `j + TAPS - 1`:

    y = Σ_{k=0}^{TAPS-1} coef[k] · d(j - k)

`coef[0]` multiplies the newest sample. The channel takes one sample per clock
and has a latency of `TAPS` clocks. Every path is short: one cell's
combinational logic ends in one register.

## The hybrid filter (`hybrid_dbns_fir`, top)

| port    | dir | type                         | meaning |
|---------|-----|------------------------------|---------|
| `clk`   | in  | logic                        | clock |
| `rst_n` | in  | logic                        | synchronous, active low: clears partial sums and sets held data digits to zero |
| `d1_in` | in  | `dbns_digit_t`               | first digit of the current sample |
| `d2_in` | in  | `dbns_digit_t`               | second digit of the current sample (`zero=1` if one digit suffices) |
| `coef`  | in  | `dbns_digit_t [TAPS]`        | coefficients, held static while filtering |
| `y_out` | out | `logic signed [ACC_W-1:0]`   | filter output |

| parameter | default | meaning |
|-----------|---------|---------|
| `TAPS`    | 5       | taps per channel |
| `MANT_W`  | 12      | ROM mantissa width |
| `ACC_W`   | 24      | accumulator and output width |

The exponent widths (6 and 9 bits) are constants in `dbns_pkg`.

The two channel outputs are added combinationally. `y_out` in cycle
`n + TAPS` is the response to the samples up to cycle `n`. The output wraps
modulo 2^24.

Converting binary samples into two digits is not part of the RTL. The
testbench package `tb/dbns_ref_pkg.sv` contains a greedy converter:

1. Take the single digit with -20 <= t <= 28 that lies nearest the sample.
2. Take the nearest such digit to what remains.

## Accuracy

Each product is off by less than one output LSB, because the shifter
truncates. The 12-bit ROM mantissa adds a relative error of at most 2^-12.
The testbenches check each output against the real-valued filter of the same
digits within exactly that bound.

With the 57-tap half-band filter, 8 fractional output bits and tones of
amplitude 2000, the hardware shows these gains:

* -0.04 dB at 0.2 of Nyquist (passband);
* -40.7 dB at 0.7 of Nyquist (stopband).

These match the filter's ideal response.

## What follows the source design and what is chosen here

These points follow the source design:

* two single-digit channels that share the coefficients, plus an output adder;
* five taps in a systolic arrangement;
* the data-to-ROM-to-shifter dataflow of the cell;
* 6-bit modular binary exponent adders;
* a 9-bit ternary exponent and ROM address;
* a 24-bit accumulator and output;
* sign/zero logic applied after the shifter;
* the coefficient set of the example filter.

These are choices made here, because the source does not specify them:

* Ternary adder width. One drawing of the source labels the ternary adder
  12 bits. Here it is 9 bits, because only 9 bits address the ROM.
* The 12-bit mantissa, the rounding rule and the normalisation of the ROM.
* Register placement. The data digit is delayed two clocks per cell, the
  partial sum one clock, and the output adder is combinational.
* Synchronous active-low reset.
* Flag encoding, with `zero` taking priority over `neg`.
* Wrap-around on overflow.
* Coefficients as plain input ports, with no storage or load interface.
* Reading the example coefficient table as half of a symmetric 57-tap filter.
  The 29 listed coefficients rise to 0.499 at the last one, and the mirrored
  filter has the expected half-band response.

Not included:

* the binary-to-two-digit converter, which the source does not describe;
* the full-custom dynamic-logic cells (ROM, adder, barrel shifter, latch) that
  the source used to estimate area and power;
* the single-digit-data processor with its large ROM, which serves only as a
  point of comparison.

## Simulating

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. From the top folder:

```
verilator --binary --timing -y rtl -y tb rtl/dbns_pkg.sv tb/dbns_ref_pkg.sv \
    tb/tb_hybrid_dbns_fir.sv --top-module tb_hybrid_dbns_fir
./obj_dir/Vtb_hybrid_dbns_fir
```

Replace the testbench name to run another one:

| testbench | what it covers |
|-----------|----------------|
| `tb_hybrid_dbns_fir` | top at default size. 2000 random 12-bit samples. Bit-exact and real-valued checks. Counts modular exponent wraps, left and right shifts, negative products, one-digit samples, zero samples and outputs fed by both channels, and fails if any of these never happens. |
| `tb_fir57_workload` | top with `TAPS = 57` running the example half-band filter (tones and random data). Checks passband and stopband gain. |
| `tb_dbns_fir_channel` | one channel. Stream of random digits. Checks the latency exactly. |
| `tb_dbns_mac_cell` | one cell. Worked example, then 5000 random operand sets, including full-range ternary exponents and wrap-around. |
| `tb_ternary_rom` | all 512 ROM words against double-precision `3^t`. |
| `tb_mant_shifter`, `tb_exp_adder`, `tb_sign_fix` | the datapath pieces. |

All reference values come from `tb/dbns_ref_pkg.sv`. It uses real (double
precision) arithmetic and does not reuse the RTL.

## Files

* `rtl/dbns_pkg.sv`: digit type and exponent widths
* `rtl/exp_adder.sv`, `rtl/ternary_rom.sv`, `rtl/mant_shifter.sv`, `rtl/sign_fix.sv`: cell datapath
* `rtl/dbns_mac_cell.sv`: one tap
* `rtl/dbns_fir_channel.sv`: one systolic channel
* `rtl/hybrid_dbns_fir.sv`: two channels and the output adder (top)
* `tb/`: testbenches and the reference package
