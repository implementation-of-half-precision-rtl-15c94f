// fp_addsub: half-precision floating-point adder/subtractor.
//
// Computes a + b when sub is 0 and a - b when sub is 1. Subtraction flips
// the sign of b; the XOR of the two operand signs then decides whether the
// mantissas are added or subtracted. The exponent comparison picks the
// operand of larger magnitude (lg; the other is sm), whose exponent becomes the provisional result
// exponent, and the exponent difference is the shift that aligns the other
// mantissa. After the mantissa addition or subtraction a leading-one search
// renormalises the result and corrects the exponent. The result takes the
// sign of the larger operand; an exact zero is +0.
//
// The aligned mantissas are kept at full width (11 bits plus 31 bits below
// them), so no shifted-out bit is lost and the final truncation is exact
// rounding toward zero. Subnormal inputs and results are flushed to zero,
// overflow saturates to infinity, and all-ones exponents are not treated
// specially: these numeric conventions are this implementation's choices,
// the datapath order is the design's. Purely combinational.
module fp_addsub
  import hp_pkg::*;
(
  input  half_t a,
  input  half_t b,
  input  logic  sub,
  output half_t result
);

  localparam int EXT = 31;                 // guard bits below the mantissa
  localparam int AW  = MANT_W + EXT;       // aligned mantissa width (42)
  localparam int SW  = AW + 1;             // with carry (43)
  localparam int TOP = AW - 1;             // position of the hidden bit

  half_t             bx, lg, sm;
  logic              eff_sub;
  logic [EXP_W-1:0]  shift;
  logic [AW-1:0]     lg_m, sm_m;
  logic [SW-1:0]     sum;
  int                lead;
  logic signed [7:0] e;
  logic [SW-1:0]     norm;

  always_comb begin
    bx      = b;
    bx.sign = b.sign ^ sub;

    // Exponent comparison logic: order operands by magnitude.
    if ({a.exp, a.frac} >= {bx.exp, bx.frac}) begin
      lg   = a;
      sm = bx;
    end else begin
      lg   = bx;
      sm = a;
    end
    shift   = lg.exp - sm.exp;
    eff_sub = a.sign ^ bx.sign;

    // Proper alignment of mantissa (zero-exponent operands count as 0).
    lg_m   = (lg.exp   != '0) ? {1'b1, lg.frac,   {EXT{1'b0}}} : '0;
    sm_m = (sm.exp != '0) ? {1'b1, sm.frac, {EXT{1'b0}}} : '0;
    sm_m = sm_m >> shift;

    // Adder/subtractor of the aligned mantissas.
    sum = eff_sub ? ({1'b0, lg_m} - {1'b0, sm_m})
                  : ({1'b0, lg_m} + {1'b0, sm_m});

    // Leading-one search and normalisation.
    lead = -1;
    for (int i = 0; i < SW; i++)
      if (sum[i]) lead = i;
    e    = $signed({3'b000, lg.exp}) + 8'(lead - TOP);
    norm = sum << (SW - 1 - lead);

    if (lead < 0 || e <= 0)
      result = HALF_ZERO;
    else if (e >= 8'(EXP_MAX))
      result = '{sign: lg.sign, exp: EXP_W'(EXP_MAX), frac: '0};
    else
      result = '{sign: lg.sign, exp: e[EXP_W-1:0], frac: norm[SW-2 -: FRAC_W]};
  end

endmodule
