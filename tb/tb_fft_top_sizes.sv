// tb_fft_top_sizes: the FFT at sizes other than the default, N = 16 and
// N = 32, run side by side. Each has its own fft_tb_driver with random
// binary input words plus fixed patterns and the control scenarios; the
// expected latencies are 27 and 40 cycles.
module tb_fft_top_sizes;
  import hp_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic reset16, start16, busy16, done16;
  logic [15:0] x16;
  cplx_t X16 [16];
  int checks16, failures16;
  bit fin16;

  logic reset32, start32, busy32, done32;
  logic [31:0] x32;
  cplx_t X32 [32];
  int checks32, failures32;
  bit fin32;

  fft_top #(.N(16)) dut16 (.clk, .reset(reset16), .start(start16), .x_in(x16),
                           .busy(busy16), .done(done16), .X(X16));
  fft_tb_driver #(.N(16), .NRAND(60)) drv16 (.clk, .reset(reset16), .start(start16),
                           .x_in(x16), .busy(busy16), .done(done16), .X(X16),
                           .checks(checks16), .failures(failures16), .finished(fin16));

  fft_top #(.N(32)) dut32 (.clk, .reset(reset32), .start(start32), .x_in(x32),
                           .busy(busy32), .done(done32), .X(X32));
  fft_tb_driver #(.N(32), .NRAND(30)) drv32 (.clk, .reset(reset32), .start(start32),
                           .x_in(x32), .busy(busy32), .done(done32), .X(X32),
                           .checks(checks32), .failures(failures32), .finished(fin32));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks16 + checks32, failures16 + failures32 + 1);
    $finish;
  end

  initial begin
    wait (fin16 && fin32);
    $display("TB_RESULT checks=%0d failures=%0d", checks16 + checks32, failures16 + failures32);
    $finish;
  end
endmodule
