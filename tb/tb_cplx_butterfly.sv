// tb_cplx_butterfly: random complex operands; each part of a + b and a - b
// is compared bit for bit with the real-arithmetic reference.
module tb_cplx_butterfly;
  import hp_ref_pkg::*;
  import hp_pkg::*;

  cplx_t a, b, sum, diff;
  int checks = 0, failures = 0;

  cplx_butterfly dut (.a(a), .b(b), .sum(sum), .diff(diff));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] e [4];
    for (int i = 0; i < 5000; i++) begin
      a = {rand_half(5, 25), rand_half(5, 25)};
      b = {rand_half(5, 25), rand_half(5, 25)};
      if (i % 7 == 0) b.re = a.re;            // exact cancellation
      #1;
      e[0] = half_from_real(real_from_half(a.re) + real_from_half(b.re));
      e[1] = half_from_real(real_from_half(a.im) + real_from_half(b.im));
      e[2] = half_from_real(real_from_half(a.re) - real_from_half(b.re));
      e[3] = half_from_real(real_from_half(a.im) - real_from_half(b.im));
      checks += 4;
      if ({sum.re, sum.im, diff.re, diff.im} !== {e[0], e[1], e[2], e[3]}) begin
        failures++;
        $display("a=%h b=%h sum=%h diff=%h", a, b, sum, diff);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
