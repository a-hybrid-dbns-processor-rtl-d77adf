// dbns_mac_cell: one tap of the systolic DBNS FIR channel (1-digit DBNS
// multiply-accumulate with a binary accumulator).
//
// The coefficient and the data sample are single DBNS digits s*2^b*3^t. Their
// product is formed in the index domain and converted straight to binary, so
// the accumulation is an ordinary binary addition:
//   1. ternary adder  : t = t_d + t_c                    (9 bits)
//   2. binary adder   : b = b_d + b_c                    (6 bits, modulo 64)
//   3. ternary ROM    : 3^t ~= M_T * 2^b_T
//   4. exponent sum   : s = b + b_T                      (6 bits, modulo 64)
//   5. shifter        : |h_c*h_d| = floor(M_T * 2^s)
//   6. sign fix       : apply a_c*a_d, force 0 for a zero digit
//   7. accumulator    : acc_out <= acc_in + product      (ACC_W bits)
// This dataflow follows the design. The registers are this implementation's
// choice for a data-and-sum-forward systolic array: the partial sum is
// registered once per cell and the data digit twice, so that consecutive cells
// see consecutive older samples.
//
// Interface: d_in/d_out data digit chain, coef the tap coefficient (held by the
// user), acc_in/acc_out partial-sum chain (two's complement).
// Timing: acc_out is acc_in + coef*d_in from the previous clock; d_out is d_in
// delayed by two clocks. Synchronous active-low reset clears the partial sum and
// makes the held data digits zero.
module dbns_mac_cell
  import dbns_pkg::*;
#(
  parameter int unsigned MANT_W = 12,
  parameter int unsigned ACC_W  = 24
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  dbns_digit_t             d_in,
  input  dbns_digit_t             coef,
  input  logic signed [ACC_W-1:0] acc_in,
  output dbns_digit_t             d_out,
  output logic signed [ACC_W-1:0] acc_out
);

  texp_t             t_sum;
  bexp_t             b_sum;
  bexp_t             b_rom;
  bexp_t             shift;
  logic [MANT_W-1:0] m_rom;
  logic [ACC_W-1:0]  mag;
  logic signed [ACC_W-1:0] prod;
  dbns_digit_t       d_mid;

  exp_adder #(.W(TEXP_W)) u_tern_add (.a(d_in.t), .b(coef.t), .sum(t_sum));
  exp_adder #(.W(BEXP_W)) u_bin_add  (.a(d_in.b), .b(coef.b), .sum(b_sum));

  ternary_rom #(.MANT_W(MANT_W)) u_rom (.t(t_sum), .bt(b_rom), .mt(m_rom));

  exp_adder #(.W(BEXP_W)) u_exp_sum  (.a(b_sum), .b(b_rom), .sum(shift));

  mant_shifter #(.MANT_W(MANT_W), .SH_W(BEXP_W), .OUT_W(ACC_W)) u_shift (
    .m(m_rom), .s(shift), .p(mag)
  );

  sign_fix #(.W(ACC_W)) u_fix (
    .mag(mag), .zero_d(d_in.zero), .neg_d(d_in.neg),
    .zero_c(coef.zero), .neg_c(coef.neg), .prod(prod)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_out <= '0;
      d_mid   <= DIGIT_ZERO;
      d_out   <= DIGIT_ZERO;
    end else begin
      acc_out <= acc_in + prod;
      d_mid   <= d_in;
      d_out   <= d_mid;
    end
  end

endmodule
