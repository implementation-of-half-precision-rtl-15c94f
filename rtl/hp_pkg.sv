// hp_pkg: types and constants shared by the half-precision arithmetic and the
// 8-point FFT.
//
// A half-precision (IEEE 754 binary16) word is 1 sign bit, a 5-bit exponent
// biased by 15 and a 10-bit fraction with a hidden leading one. A complex
// value is a pair of such words. The default FFT size (8 points) and the
// iteration count of the shift-and-add mantissa multiplier (one cycle per
// multiplier bit, 11 bits with the hidden one) are also kept here so that
// modules and testbenches agree on them.
package hp_pkg;

  localparam int EXP_W  = 5;
  localparam int FRAC_W = 10;
  localparam int MANT_W = FRAC_W + 1;       // fraction plus hidden bit
  localparam int BIAS   = 15;
  localparam int EXP_MAX = (1 << EXP_W) - 1; // all-ones exponent: infinity

  localparam int FFT_N = 8;                 // default transform size

  // Cycles the shift-and-add multiplier needs: one per multiplier bit.
  localparam int MUL_CYCLES = MANT_W;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } half_t;

  typedef struct packed {
    half_t re;
    half_t im;
  } cplx_t;

  localparam half_t HALF_ZERO = '{sign: 1'b0, exp: '0, frac: '0};
  localparam half_t HALF_ONE  = '{sign: 1'b0, exp: 5'd15, frac: '0};   // 1.0
  localparam half_t HALF_TWO  = '{sign: 1'b0, exp: 5'd16, frac: '0};   // 2.0
  localparam half_t HALF_INF  = '{sign: 1'b0, exp: 5'd31, frac: '0};

  // Negate a half-precision value; zero stays +0.
  function automatic half_t half_neg(half_t h);
    half_t r;
    r = h;
    if (h.exp != '0) r.sign = ~h.sign;
    return r;
  endfunction

endpackage
