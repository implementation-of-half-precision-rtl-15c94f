// tb_cplx_mul: random complex operands, including the FFT's twiddle
// factors. The expected result follows (AC - BD) + j(AD + BC) in real
// arithmetic with every product and the final sums truncated to half
// precision, as the four multipliers and two adders do. Also checks the
// 11-cycle latency.
module tb_cplx_mul;
  import hp_ref_pkg::*;
  import hp_pkg::*;

  logic clk = 0, reset = 1, start = 0;
  cplx_t a, b, y;
  logic busy, done;
  int checks = 0, failures = 0;

  cplx_mul dut (.clk, .reset, .start, .a(a), .b(b), .busy, .done, .y(y));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] hmul(logic [15:0] p, logic [15:0] q);
    return half_from_real(real_from_half(p) * real_from_half(q));
  endfunction

  task automatic run(input cplx_t x, input cplx_t w);
    int cyc;
    logic [15:0] er, ei;
    @(negedge clk);
    a = x; b = w; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    er = half_from_real(real_from_half(hmul(x.re, w.re)) - real_from_half(hmul(x.im, w.im)));
    ei = half_from_real(real_from_half(hmul(x.re, w.im)) + real_from_half(hmul(x.im, w.re)));
    checks += 2;
    if (cyc != MUL_CYCLES) begin failures++; $display("latency %0d", cyc); end
    if ({y.re, y.im} !== {er, ei}) begin
      failures++;
      $display("(%h,%h)*(%h,%h) = (%h,%h), expected (%h,%h)",
               x.re, x.im, w.re, w.im, y.re, y.im, er, ei);
    end
  endtask

  initial begin
    cplx_t tw [4];
    tw[0] = {16'h3C00, 16'h0000};
    tw[1] = {16'h39A8, 16'hB9A8};
    tw[2] = {16'h0000, 16'hBC00};
    tw[3] = {16'hB9A8, 16'hB9A8};
    a = '0; b = '0;
    repeat (3) @(negedge clk);
    reset = 0;
    for (int i = 0; i < 4; i++) run({16'h3C00, 16'h0000}, tw[i]);
    for (int i = 0; i < 400; i++) run({rand_half(8, 22), rand_half(8, 22)}, tw[i % 4]);
    for (int i = 0; i < 1000; i++) run({rand_half(5, 25), rand_half(5, 25)},
                                        {rand_half(5, 25), rand_half(5, 25)});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
