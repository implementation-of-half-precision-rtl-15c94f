// fp_mul_expo_adjust: operand unpacking and exponent adjustment of the
// half-precision multiplier.
//
// Restores the hidden leading one of each operand's 10-bit fraction, giving
// the 11-bit mantissas fed to the mantissa multiplier, and forms the
// unbiased-corrected exponent of the product, ea + eb - 15, as a signed
// value so that later stages can see over- and underflow. An operand with a
// zero exponent field is taken as zero (subnormals are flushed), and the
// zero flag then forces a zero product. Purely combinational.
module fp_mul_expo_adjust
  import hp_pkg::*;
(
  input  half_t              a,
  input  half_t              b,
  output logic signed [7:0]  expo_sum,
  output logic [MANT_W-1:0]  a_fraction,
  output logic [MANT_W-1:0]  b_fraction,
  output logic               zero
);

  logic a_nz, b_nz;

  always_comb begin
    a_nz       = (a.exp != '0);
    b_nz       = (b.exp != '0);
    a_fraction = a_nz ? {1'b1, a.frac} : '0;
    b_fraction = b_nz ? {1'b1, b.frac} : '0;
    expo_sum   = $signed({3'b000, a.exp}) + $signed({3'b000, b.exp}) - 8'(BIAS);
    zero       = !(a_nz && b_nz);
  end

endmodule
