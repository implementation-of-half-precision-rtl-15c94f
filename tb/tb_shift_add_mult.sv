// tb_shift_add_mult: self-checking testbench of the shift-and-add mantissa
// multiplier. Drives corner and random 11-bit operand pairs, compares the
// 22-bit product with the * operator, and checks that done arrives exactly
// W = 11 cycles after start and that a start while busy is ignored.
module tb_shift_add_mult;
  localparam int W = 11;

  logic clk = 0, reset = 1, start = 0;
  logic [W-1:0] a = '0, b = '0;
  logic busy, done;
  logic [2*W-1:0] product;
  int checks = 0, failures = 0;

  shift_add_mult #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [W-1:0] x, input logic [W-1:0] y);
    int cyc;
    @(negedge clk);
    a = x; b = y; start = 1;
    @(negedge clk);
    start = 0;
    // A second start while busy must not disturb the running operation.
    a = ~x; b = ~y; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;   // clock edges since the edge that sampled start
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != W) begin
      failures++;
      $display("latency %0d, expected %0d", cyc, W);
    end
    checks++;
    if (product !== (2*W)'(x) * (2*W)'(y)) begin
      failures++;
      $display("%0d * %0d gave %0d", x, y, product);
    end
    @(negedge clk);
    checks++;
    if (busy || done) begin failures++; $display("not idle after done"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    reset = 0;
    run('0, '0);
    run('1, '1);
    run(11'h400, 11'h400);
    run(11'h7FF, 11'h400);
    run(11'h001, 11'h7FF);
    for (int i = 0; i < 500; i++) run(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
