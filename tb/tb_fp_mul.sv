// tb_fp_mul: self-checking testbench of the half-precision multiplier.
// Expected results come from real arithmetic (hp_ref_pkg): the exact
// product truncated toward zero, with flush-to-zero and saturation. Covers
// signs, zero operands, exponent overflow and underflow, and random
// operands; also checks the 11-cycle latency from start to done.
module tb_fp_mul;
  import hp_ref_pkg::*;

  logic clk = 0, reset = 1, start = 0;
  logic [15:0] a = '0, b = '0;
  logic busy, done;
  logic [15:0] result;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_unf = 0;

  fp_mul dut (.clk, .reset, .start, .a(a), .b(b), .busy, .done, .result(result));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [15:0] x, input logic [15:0] y);
    int cyc;
    logic [15:0] exp_h;
    real p;
    @(negedge clk);
    a = x; b = y; start = 1;
    @(negedge clk);
    start = 0;
    a = $urandom; b = $urandom;       // operands may change once captured
    cyc = 0;   // clock edges after the edge that sampled start
    while (!done) begin @(negedge clk); cyc++; end
    p = real_from_half(x) * real_from_half(y);
    exp_h = half_from_real(p);
    if (exp_h[14:10] == 5'd31) n_ovf++;
    if (exp_h == 16'h0 && p != 0.0) n_unf++;
    checks++;
    if (cyc != 11) begin failures++; $display("latency %0d", cyc); end
    checks++;
    if (result !== exp_h) begin
      failures++;
      $display("%h * %h = %h, expected %h", x, y, result, exp_h);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    reset = 0;
    run(16'h3C00, 16'h3C00);   // 1 * 1
    run(16'h4000, 16'hC200);   // 2 * -3
    run(16'h39A8, 16'h39A8);   // 0.707^2
    run(16'h0000, 16'h5555);   // zero
    run(16'hBC00, 16'h0000);   // -1 * 0 -> +0
    run(16'h7800, 16'h7800);   // overflow
    run(16'h0400, 16'h0400);   // underflow
    run(16'h3FFF, 16'h3FFF);   // product >= 2, renormalise
    for (int i = 0; i < 3000; i++) run(rand_half(1, 30), rand_half(1, 30));
    checks++;
    if (n_ovf == 0 || n_unf == 0) begin failures++; $display("overflow/underflow not covered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
