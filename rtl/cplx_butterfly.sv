// cplx_butterfly: complex half-precision adder and subtractor.
//
// Forms sum = a + b and diff = a - b for complex operands, using four
// half-precision adder/subtractors (two for the real parts, two for the
// imaginary parts). This is the add/subtract half of a radix-2 butterfly;
// any twiddle multiplication of diff is done outside. Purely combinational.
module cplx_butterfly
  import hp_pkg::*;
(
  input  cplx_t a,
  input  cplx_t b,
  output cplx_t sum,
  output cplx_t diff
);

  fp_addsub u_add_re (.a(a.re), .b(b.re), .sub(1'b0), .result(sum.re));
  fp_addsub u_add_im (.a(a.im), .b(b.im), .sub(1'b0), .result(sum.im));
  fp_addsub u_sub_re (.a(a.re), .b(b.re), .sub(1'b1), .result(diff.re));
  fp_addsub u_sub_im (.a(a.im), .b(b.im), .sub(1'b1), .result(diff.im));

endmodule
