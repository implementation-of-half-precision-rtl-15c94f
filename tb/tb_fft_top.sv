// tb_fft_top: end-to-end test of the FFT at its default size (N = 8),
// with no parameter changed. fft_tb_driver applies all 256 input words
// and the control scenarios and checks every output; see that module for
// what is checked. The latency at N = 8 is 14 cycles.
module tb_fft_top;
  import hp_pkg::*;

  logic clk = 0;
  logic reset, start, busy, done;
  logic [FFT_N-1:0] x_in;
  cplx_t X [FFT_N];
  int checks, failures;
  bit finished;

  fft_top dut (.clk, .reset, .start, .x_in, .busy, .done, .X(X));

  fft_tb_driver #(.N(FFT_N)) drv (.clk, .reset, .start, .x_in, .busy, .done, .X(X),
                                  .checks, .failures, .finished);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
