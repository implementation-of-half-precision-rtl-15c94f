// fp_mul_result_norm: normalisation of the half-precision product.
//
// The 22-bit product of two 11-bit mantissas lies in [1, 4) with 20
// fraction bits. When its top bit is set the value is shifted right by one
// and the exponent raised by one; the 10 fraction bits below the leading
// one are kept and the rest are dropped (rounding toward zero). A resulting
// biased exponent of 31 or more saturates to infinity; one of 0 or less
// gives zero, since subnormal results are not produced. Output is the
// 15-bit magnitude (exponent and fraction); the sign is added outside.
// Purely combinational.
module fp_mul_result_norm
  import hp_pkg::*;
(
  input  logic [2*MANT_W-1:0] prod,
  input  logic signed [7:0]   expo_sum,
  input  logic                zero,
  output logic [EXP_W+FRAC_W-1:0] result
);

  logic signed [7:0]  e;
  logic [FRAC_W-1:0]  f;

  always_comb begin
    if (prod[2*MANT_W-1]) begin
      e = expo_sum + 8'sd1;
      f = prod[2*MANT_W-2 -: FRAC_W];
    end else begin
      e = expo_sum;
      f = prod[2*MANT_W-3 -: FRAC_W];
    end
    if (zero || e <= 0)
      result = '0;
    else if (e >= 8'(EXP_MAX))
      result = {EXP_W'(EXP_MAX), {FRAC_W{1'b0}}};
    else
      result = {e[EXP_W-1:0], f};
  end

endmodule
