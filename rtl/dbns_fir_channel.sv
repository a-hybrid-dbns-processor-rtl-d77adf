// dbns_fir_channel: one channel of the systolic DBNS FIR filter.
//
// TAPS dbns_mac_cell instances in a row. The data digit enters the first cell
// and moves right one cell every two clocks; the partial sum starts from zero
// at the first cell and moves right one cell every clock. With this timing the
// last cell delivers
//     y(n + TAPS) = sum_{k=0}^{TAPS-1} coef[k] * d(n - k)
// where d(n) is the digit presented in clock cycle n (coef[0] multiplies the
// newest sample). The 5-tap chain, the zero into the first cell and the shared
// clock follow the design; the two-register data path is this
// implementation's choice of systolic timing.
//
// Interface: d_in data digit per clock, coef[TAPS] coefficient digits (static
// while filtering), y channel output (ACC_W-bit two's complement, wraps).
// Timing: one sample per clock, latency TAPS clocks; synchronous active-low reset.
module dbns_fir_channel
  import dbns_pkg::*;
#(
  parameter int unsigned TAPS   = 5,
  parameter int unsigned MANT_W = 12,
  parameter int unsigned ACC_W  = 24
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  dbns_digit_t             d_in,
  input  dbns_digit_t             coef [TAPS],
  output logic signed [ACC_W-1:0] y
);

  dbns_digit_t             d_chain   [TAPS+1];
  logic signed [ACC_W-1:0] acc_chain [TAPS+1];

  assign d_chain[0]   = d_in;
  assign acc_chain[0] = '0;

  for (genvar k = 0; k < int'(TAPS); k++) begin : g_tap
    dbns_mac_cell #(.MANT_W(MANT_W), .ACC_W(ACC_W)) u_cell (
      .clk    (clk),
      .rst_n  (rst_n),
      .d_in   (d_chain[k]),
      .coef   (coef[k]),
      .acc_in (acc_chain[k]),
      .d_out  (d_chain[k+1]),
      .acc_out(acc_chain[k+1])
    );
  end

  assign y = acc_chain[TAPS];

endmodule
