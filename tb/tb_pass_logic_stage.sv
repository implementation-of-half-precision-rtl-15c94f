// tb_pass_logic_stage: exhaustive test of the first FFT stage over all 256
// binary input words. For each n the expected s[n] = x[n] + x[n+4] and
// d[n] = (x[n] - x[n+4]) * W8^n are computed in real arithmetic with the
// half-precision twiddle values, and compared bit for bit.
module tb_pass_logic_stage;
  import hp_ref_pkg::*;
  import hp_pkg::*;

  logic [7:0] x;
  cplx_t s [4];
  cplx_t d [4];
  int checks = 0, failures = 0;

  pass_logic_stage dut (.x(x), .s(s), .d(d));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real pi, c, sn, df;
    logic [15:0] e [4];
    pi = 3.14159265358979323846;
    for (int v = 0; v < 256; v++) begin
      x = 8'(v);
      #1;
      for (int n = 0; n < 4; n++) begin
        c  = real_from_half(half_from_real($cos(2.0 * pi * n / 8.0)));
        sn = real_from_half(half_from_real(-$sin(2.0 * pi * n / 8.0)));
        df = real'(int'(x[n]) - int'(x[n+4]));
        e[0] = half_from_real(real'(int'(x[n]) + int'(x[n+4])));
        e[1] = 16'h0000;
        e[2] = half_from_real(df * c);
        e[3] = half_from_real(df * sn);
        checks += 4;
        if ({s[n].re, s[n].im, d[n].re, d[n].im} !== {e[0], e[1], e[2], e[3]}) begin
          failures++;
          $display("x=%b n=%0d s=%h/%h d=%h/%h expected %h/%h %h/%h", x, n,
                   s[n].re, s[n].im, d[n].re, d[n].im, e[0], e[1], e[2], e[3]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
