// hp_ref_pkg: reference arithmetic for the testbenches.
//
// Converts between 16-bit half-precision words and SystemVerilog reals
// without using any of the design's RTL. Conventions match the design's
// numeric choices: zero-exponent words read as zero, results are truncated
// toward zero, results below 2^-14 in magnitude become +0 and results of
// 2^16 or more saturate to infinity. A double holds every sum, difference
// and product of two half-precision values exactly, so real arithmetic
// followed by half_from_real gives the bit-exact expected word.
package hp_ref_pkg;

  function automatic real real_from_half(logic [15:0] h);
    real m, r;
    int  e;
    if (h[14:10] == 5'd0) return 0.0;
    m = 1.0 + real'(h[9:0]) / 1024.0;
    e = int'(h[14:10]) - 15;
    r = m;
    while (e > 0) begin r = r * 2.0; e--; end
    while (e < 0) begin r = r / 2.0; e++; end
    return h[15] ? -r : r;
  endfunction

  function automatic logic [15:0] half_from_real(real r);
    logic s;
    real  a;
    int   e;
    int   f;
    if (r == 0.0) return 16'h0000;
    s = (r < 0.0);
    a = s ? -r : r;
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    if (e + 15 >= 31) return {s, 5'd31, 10'd0};
    if (e + 15 <= 0)  return 16'h0000;
    f = $rtoi((a - 1.0) * 1024.0);
    return {s, 5'(e + 15), 10'(f)};
  endfunction

  // Random finite, normal half-precision word with exponent in [lo, hi].
  function automatic logic [15:0] rand_half(int lo, int hi);
    logic [15:0] h;
    h[15]    = 1'($urandom);
    h[14:10] = 5'(lo + int'($urandom % (hi - lo + 1)));
    h[9:0]   = 10'($urandom);
    return h;
  endfunction

endpackage
