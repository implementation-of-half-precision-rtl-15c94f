// cplx_mul: complex half-precision multiplier.
//
// Computes (A + jB)(C + jD) = (AC - BD) + j(AD + BC) with four
// half-precision multipliers working in parallel and two half-precision
// adder/subtractors, as the design prescribes. The multipliers are
// sequential (shift-and-add mantissa product), so this block inherits their
// handshake: pulse start with a = A + jB and b = C + jD; done pulses
// MUL_CYCLES (11) cycles later, and y is valid from done until the next
// start. The final add and subtract are combinational on the held products.
module cplx_mul
  import hp_pkg::*;
(
  input  logic  clk,
  input  logic  reset,
  input  logic  start,
  input  cplx_t a,
  input  cplx_t b,
  output logic  busy,
  output logic  done,
  output cplx_t y
);

  half_t ac, bd, ad, bc;
  logic [3:0] busy_v, done_v;

  fp_mul u_ac (.clk, .reset, .start, .a(a.re), .b(b.re), .busy(busy_v[0]), .done(done_v[0]), .result(ac));
  fp_mul u_bd (.clk, .reset, .start, .a(a.im), .b(b.im), .busy(busy_v[1]), .done(done_v[1]), .result(bd));
  fp_mul u_ad (.clk, .reset, .start, .a(a.re), .b(b.im), .busy(busy_v[2]), .done(done_v[2]), .result(ad));
  fp_mul u_bc (.clk, .reset, .start, .a(a.im), .b(b.re), .busy(busy_v[3]), .done(done_v[3]), .result(bc));

  fp_addsub u_re (.a(ac), .b(bd), .sub(1'b1), .result(y.re));
  fp_addsub u_im (.a(ad), .b(bc), .sub(1'b0), .result(y.im));

  assign busy = busy_v[0];
  assign done = done_v[0];

  // The four multipliers share start and have a fixed latency, so they
  // always run in lock step.
  a_lockstep: assert property (@(posedge clk) disable iff (reset)
                               (&busy_v || ~|busy_v) && (&done_v || ~|done_v))
    else $error("cplx_mul: multipliers out of step");

endmodule
