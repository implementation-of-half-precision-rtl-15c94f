// twiddle_rom: half-precision twiddle factors of an N-point FFT.
//
// Returns W_N^k = cos(2*pi*k/N) - j*sin(2*pi*k/N) for k = 0 .. N/2-1, the
// factors a radix-2 decimation-in-frequency transform needs. The table is
// computed once, at elaboration, by a constant function: cosine and sine
// come from their Taylor series in real arithmetic (20 terms, exact to
// double precision for angles below pi), and each value is converted to
// half precision by truncation toward zero, values below 2^-14 becoming 0.
// For N = 8 this gives 1, 0x39A8 (0.70703125, for 0.70710678), 0 and -1 in
// the expected places. In hardware the result is a constant look-up table
// addressed by k; reading it is purely combinational.
//
// Storing the twiddle factors in half precision follows the design; the
// way the table is generated is this implementation's.
module twiddle_rom
  import hp_pkg::*;
#(
  parameter int N = FFT_N
) (
  input  logic [$clog2(N/2 > 1 ? N/2 : 2)-1:0] k,
  output cplx_t                                w
);

  localparam int KW = $clog2(N/2 > 1 ? N/2 : 2);

  // The table is one flat vector, entry i in bits [32*i +: 32].
  typedef logic [32*(N/2)-1:0] table_t;

  // Truncate a real to half precision (flush below 2^-14, saturate).
  function automatic half_t to_half(real r);
    half_t h;
    real   a;
    int    e;
    if (r == 0.0) return HALF_ZERO;
    h.sign = (r < 0.0);
    a = h.sign ? -r : r;
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    if (e + BIAS <= 0) return HALF_ZERO;
    if (e + BIAS >= EXP_MAX) return '{sign: h.sign, exp: EXP_W'(EXP_MAX), frac: '0};
    h.exp  = EXP_W'(e + BIAS);
    h.frac = FRAC_W'($rtoi((a - 1.0) * real'(1 << FRAC_W)));
    return h;
  endfunction

  function automatic table_t make_table();
    table_t t;
    real th, cosv, sinv, tc, ts;
    for (int i = 0; i < N/2; i++) begin
      th = 2.0 * 3.14159265358979323846 * real'(i) / real'(N);
      cosv = 1.0; sinv = th; tc = 1.0; ts = th;
      for (int m = 1; m < 20; m++) begin
        tc = -tc * th * th / real'((2*m - 1) * (2*m));
        ts = -ts * th * th / real'((2*m) * (2*m + 1));
        cosv = cosv + tc;
        sinv = sinv + ts;
      end
      t[32*i +: 32] = {to_half(cosv), to_half(-sinv)};
    end
    return t;
  endfunction

  localparam table_t TABLE = make_table();

  assign w = TABLE[32*k[KW-1:0] +: 32];

endmodule
