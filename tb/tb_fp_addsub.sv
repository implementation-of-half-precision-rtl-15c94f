// tb_fp_addsub: self-checking testbench of the half-precision
// adder/subtractor. Expected results come from real arithmetic
// (hp_ref_pkg): the exact sum or difference truncated toward zero. Covers
// equal and opposite operands, zero operands, large exponent differences,
// cancellation, overflow, and random operands in both modes.
module tb_fp_addsub;
  import hp_ref_pkg::*;

  logic [15:0] a, b, result;
  logic sub;
  int checks = 0, failures = 0;

  fp_addsub dut (.a(a), .b(b), .sub(sub), .result(result));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [15:0] x, input logic [15:0] y, input logic s);
    logic [15:0] exp_h;
    real r;
    a = x; b = y; sub = s;
    #1;
    r = s ? real_from_half(x) - real_from_half(y) : real_from_half(x) + real_from_half(y);
    exp_h = half_from_real(r);
    checks++;
    if (result !== exp_h) begin
      failures++;
      $display("%h %s %h = %h, expected %h", x, s ? "-" : "+", y, result, exp_h);
    end
  endtask

  initial begin
    run(16'h3C00, 16'h3C00, 0);   // 1 + 1
    run(16'h3C00, 16'h3C00, 1);   // 1 - 1 = +0
    run(16'h3C00, 16'hBC00, 0);   // 1 + -1 = +0
    run(16'h4000, 16'h3C00, 1);   // 2 - 1
    run(16'h0000, 16'hC500, 0);   // 0 + -5
    run(16'hC500, 16'h0000, 1);   // -5 - 0
    run(16'h7BFF, 16'h7BFF, 0);   // overflow
    run(16'h7BFF, 16'h0400, 1);   // huge exponent difference
    run(16'h3C01, 16'h3C00, 1);   // cancellation
    run(16'h3C00, 16'h1001, 1);   // borrow across a long alignment
    run(16'h39A8, 16'hB9A8, 0);
    for (int i = 0; i < 20000; i++) run(rand_half(1, 30), rand_half(1, 30), 1'($urandom));
    // Close exponents exercise the cancellation path.
    for (int i = 0; i < 20000; i++) begin
      logic [15:0] x, y;
      x = rand_half(10, 20);
      y = rand_half(10, 20);
      y[14:10] = x[14:10] + 5'($urandom % 2);
      run(x, y, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
