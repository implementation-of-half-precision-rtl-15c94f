// fp_mul: half-precision floating-point multiplier.
//
// The sign of the product is the XOR of the operand signs. The exponent
// adjustment stage restores the hidden bits and adds the exponents minus
// one bias; a sequential shift-and-add multiplier forms the 22-bit product
// of the 11-bit mantissas; the normalisation stage shifts that product into
// place and corrects the exponent. A product whose magnitude is zero gets a
// positive sign. This follows the design's structure: sign XOR, exponent
// adjustment, shift-and-add mantissa multiplier, result normalisation, and a
// zero compare that selects the output sign.
//
// Interface: pulse start with the operands a and b; they are captured, and
// done pulses MUL_CYCLES (11) cycles later. result is valid from done
// until the next start. Rounding is toward zero, subnormal inputs and
// results are flushed to zero, overflow saturates to infinity; operands
// with an all-ones exponent (infinity, NaN) are not treated specially.
// These numeric conventions are this implementation's choices.
module fp_mul
  import hp_pkg::*;
(
  input  logic  clk,
  input  logic  reset,
  input  logic  start,
  input  half_t a,
  input  half_t b,
  output logic  busy,
  output logic  done,
  output half_t result
);

  logic signed [7:0]       expo_sum, expo_sum_q;
  logic [MANT_W-1:0]       a_fraction, b_fraction;
  logic                    zero, zero_q, sign_q;
  logic [2*MANT_W-1:0]     prod;
  logic [EXP_W+FRAC_W-1:0] mag;

  fp_mul_expo_adjust u_expo (
    .a          (a),
    .b          (b),
    .expo_sum   (expo_sum),
    .a_fraction (a_fraction),
    .b_fraction (b_fraction),
    .zero       (zero)
  );

  // Sign and exponent are captured with the operands and held while the
  // mantissa multiplier iterates.
  always_ff @(posedge clk) begin
    if (reset) begin
      expo_sum_q <= '0;
      zero_q     <= 1'b1;
      sign_q     <= 1'b0;
    end else if (start && !busy) begin
      expo_sum_q <= expo_sum;
      zero_q     <= zero;
      sign_q     <= a.sign ^ b.sign;
    end
  end

  shift_add_mult #(.W(MANT_W)) u_mult (
    .clk     (clk),
    .reset   (reset),
    .start   (start),
    .a       (a_fraction),
    .b       (b_fraction),
    .busy    (busy),
    .done    (done),
    .product (prod)
  );

  fp_mul_result_norm u_norm (
    .prod     (prod),
    .expo_sum (expo_sum_q),
    .zero     (zero_q),
    .result   (mag)
  );

  always_comb begin
    result.sign = (mag == '0) ? 1'b0 : sign_q;
    {result.exp, result.frac} = mag;
  end

endmodule
