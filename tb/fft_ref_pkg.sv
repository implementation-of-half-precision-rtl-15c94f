// fft_ref_pkg: reference N-point transforms for the FFT testbenches.
//
// dif_model follows the radix-2 decimation-in-frequency flow of the design
// step by step with every addition, subtraction and multiplication truncated
// to half precision (via hp_ref_pkg), so its result must match the hardware
// bit for bit. dft_exact is the textbook DFT in double precision.
package fft_ref_pkg;
  import hp_ref_pkg::*;

  typedef struct { logic [15:0] re, im; } hc_t;

  function automatic logic [15:0] hadd(logic [15:0] p, logic [15:0] q);
    return half_from_real(real_from_half(p) + real_from_half(q));
  endfunction
  function automatic logic [15:0] hsub(logic [15:0] p, logic [15:0] q);
    return half_from_real(real_from_half(p) - real_from_half(q));
  endfunction
  function automatic logic [15:0] hmul(logic [15:0] p, logic [15:0] q);
    return half_from_real(real_from_half(p) * real_from_half(q));
  endfunction
  function automatic hc_t cadd(hc_t p, hc_t q);
    return '{hadd(p.re, q.re), hadd(p.im, q.im)};
  endfunction
  function automatic hc_t csub(hc_t p, hc_t q);
    return '{hsub(p.re, q.re), hsub(p.im, q.im)};
  endfunction
  function automatic hc_t cmul(hc_t p, hc_t q);
    return '{hsub(hmul(p.re, q.re), hmul(p.im, q.im)),
             hadd(hmul(p.re, q.im), hmul(p.im, q.re))};
  endfunction

  // W_N^k from the simulator's cos/sin, truncated to half precision.
  function automatic hc_t tw(int n, int k);
    real pi = 3.14159265358979323846;
    return '{half_from_real($cos(2.0 * pi * k / n)), half_from_real(-$sin(2.0 * pi * k / n))};
  endfunction

  // x: N bits, sample n = x[n]. y: natural-order outputs.
  function automatic void dif_model(int n, logic [63:0] x, ref hc_t y [64]);
    hc_t v [64], t;
    int  s, blk, h, r;
    s = $clog2(n);
    // Stage 1: the exact values the pass logic selects.
    for (int i = 0; i < n / 2; i++) begin
      hc_t w;
      int  df;
      w  = tw(n, i);
      df = int'(x[i]) - int'(x[i + n/2]);
      v[i] = '{half_from_real(real'(int'(x[i]) + int'(x[i + n/2]))), 16'h0000};
      v[i + n/2] = '{half_from_real(df * real_from_half(w.re)), half_from_real(df * real_from_half(w.im))};
    end
    // Stages 2 .. s-1 with multipliers, stage s without.
    for (int st = 2; st <= s; st++) begin
      blk = n >> (st - 1);
      h   = blk / 2;
      for (int b = 0; b < n; b += blk)
        for (int p = 0; p < h; p++) begin
          t = v[b + p];
          v[b + p] = cadd(t, v[b + p + h]);
          if (st < s) v[b + p + h] = cmul(csub(t, v[b + p + h]), tw(n, p << (st - 1)));
          else        v[b + p + h] = csub(t, v[b + p + h]);
        end
    end
    for (int i = 0; i < n; i++) begin
      r = 0;
      for (int b = 0; b < s; b++) r |= ((i >> b) & 1) << (s - 1 - b);
      y[r] = v[i];
    end
  endfunction

  function automatic void dft_exact(int n, logic [63:0] x, int k, output real re, output real im);
    real pi = 3.14159265358979323846;
    re = 0.0; im = 0.0;
    for (int i = 0; i < n; i++) begin
      re += x[i] * $cos(2.0 * pi * k * i / n);
      im -= x[i] * $sin(2.0 * pi * k * i / n);
    end
  endfunction

endpackage
