// tb_twiddle_rom: checks every twiddle factor W_N^k, k = 0 .. N/2-1, for
// N = 8 (the default), 16 and 64, against cos(2*pi*k/N) - j*sin(2*pi*k/N)
// computed with the simulator's $cos/$sin and truncated to half precision.
module tb_twiddle_rom;
  import hp_ref_pkg::*;
  import hp_pkg::*;

  logic [1:0] k8;
  logic [2:0] k16;
  logic [4:0] k64;
  cplx_t w8, w16, w64;
  int checks = 0, failures = 0;

  twiddle_rom             dut8  (.k(k8),  .w(w8));
  twiddle_rom #(.N(16))   dut16 (.k(k16), .w(w16));
  twiddle_rom #(.N(64))   dut64 (.k(k64), .w(w64));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(int n, int i, cplx_t w);
    real pi = 3.14159265358979323846;
    logic [15:0] er, ei;
    // cos(pi/2) is not exactly 0 in floating point; anything below half
    // precision's range reads as zero.
    er = half_from_real($cos(2.0 * pi * i / n));
    ei = half_from_real(-$sin(2.0 * pi * i / n));
    checks += 2;
    if (w.re !== er) begin failures++; $display("N=%0d W%0d re %h expected %h", n, i, w.re, er); end
    if (w.im !== ei) begin failures++; $display("N=%0d W%0d im %h expected %h", n, i, w.im, ei); end
  endtask

  initial begin
    for (int i = 0; i < 4; i++)  begin k8  = 2'(i); #1; compare(8, i, w8);   end
    for (int i = 0; i < 8; i++)  begin k16 = 3'(i); #1; compare(16, i, w16); end
    for (int i = 0; i < 32; i++) begin k64 = 5'(i); #1; compare(64, i, w64); end
    // Spot values for N = 8.
    k8 = 2'd1; #1;
    checks++;
    if ({w8.re, w8.im} !== {16'h39A8, 16'hB9A8}) begin failures++; $display("W8^1 = %h", w8); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
