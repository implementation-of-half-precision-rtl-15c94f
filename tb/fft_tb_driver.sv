// fft_tb_driver: stimulus and checking for an fft_top of size N, shared by
// the FFT testbenches. The testbench instantiates fft_top and this module
// side by side and wires them together.
//
// Input words: for N = 8 all 256, otherwise NRAND random words plus all
// zeros, all ones, alternating bits and a half-ones step. Each output X[k]
// is checked bit for bit against the stage-by-stage half-precision model
// and within a tolerance of the exact DFT: 0.01 for N = 8, S*N/512 above
// (S = log2 N). The start-to-
// done latency must be (S-2)*(MUL_CYCLES+2)+1 cycles.
//
// Mechanisms counted, each of which must occur: pass logic passing +W, -W
// and 0; its sums 0, 1 and 2; a start ignored while busy; back-to-back
// transforms (start in the cycle done is high); a reset that aborts a
// running transform. finished rises when all is done; checks and failures
// then hold the totals.
module fft_tb_driver
  import hp_pkg::*;
  import hp_ref_pkg::*;
  import fft_ref_pkg::*;
#(
  parameter int N     = 8,
  parameter int NRAND = 100
) (
  input  logic         clk,
  output logic         reset,
  output logic         start,
  output logic [N-1:0] x_in,
  input  logic         busy,
  input  logic         done,
  input  cplx_t        X [N],
  output int           checks,
  output int           failures,
  output bit           finished
);

  localparam int S       = $clog2(N);
  localparam int LATENCY = (S - 2) * (MUL_CYCLES + 2) + 1;
  localparam real TOL    = (N == 8) ? 0.01 : real'(S * N) / 512.0;

  int n_pos_w = 0, n_neg_w = 0, n_zero_w = 0;
  int n_sum [3] = '{0, 0, 0};
  int n_ignored = 0, n_back2back = 0, n_abort = 0;

  task automatic check_outputs(logic [N-1:0] x);
    hc_t y [64];
    real er, ei, dr, di;
    dif_model(N, 64'(x), y);
    for (int k = 0; k < N; k++) begin
      dft_exact(N, 64'(x), k, er, ei);
      dr = real_from_half(X[k].re) - er;
      di = real_from_half(X[k].im) - ei;
      checks += 2;
      if (dr > TOL || -dr > TOL || di > TOL || -di > TOL) begin
        failures++;
        $display("N=%0d x=%h X[%0d]=(%f,%f) exact (%f,%f)", N, x, k,
                 real_from_half(X[k].re), real_from_half(X[k].im), er, ei);
      end
      if ({X[k].re, X[k].im} !== {y[k].re, y[k].im}) begin
        failures++;
        $display("N=%0d x=%h X[%0d]=(%h,%h) model (%h,%h)", N, x, k,
                 X[k].re, X[k].im, y[k].re, y[k].im);
      end
    end
  endtask

  task automatic count_pass_logic(logic [N-1:0] x);
    for (int n = 0; n < N/2; n++) begin
      n_sum[int'(x[n]) + int'(x[n + N/2])]++;
      case ({x[n], x[n + N/2]})
        2'b10:   n_pos_w++;
        2'b01:   n_neg_w++;
        default: n_zero_w++;
      endcase
    end
  endtask

  task automatic wait_done(output int cyc);
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  task automatic transform(logic [N-1:0] x, bit stray_start);
    int cyc;
    @(negedge clk);
    x_in = x; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0;
    if (stray_start) begin
      x_in = ~x; start = 1;       // must be ignored
      @(negedge clk);
      start = 0;
      n_ignored++;
      wait_done(cyc);
      cyc++;
    end else
      wait_done(cyc);
    checks++;
    if (cyc != LATENCY) begin failures++; $display("N=%0d latency %0d, expected %0d", N, cyc, LATENCY); end
    count_pass_logic(x);
    check_outputs(x);
  endtask

  function automatic logic [N-1:0] rand_word();
    logic [N-1:0] w;
    for (int i = 0; i < N; i += 32) w[i +: 32 > N ? N : 32] = $urandom;
    return w;
  endfunction

  initial begin
    logic [N-1:0] seq [3];
    int cnt;
    checks = 0; failures = 0; finished = 0;
    reset = 1; start = 0; x_in = '0;
    repeat (3) @(negedge clk);
    reset = 0;

    if (N == 8) begin
      for (int v = 0; v < 256; v++) transform(N'(v), (v % 3) == 0);
    end else begin
      transform('0, 0);
      transform('1, 1);
      for (int i = 0; i < N; i++) x_in[i] = i[0];
      transform(x_in, 0);
      transform({{(N/2){1'b0}}, {(N/2){1'b1}}}, 0);
      for (int i = 0; i < NRAND; i++) transform(rand_word(), (i % 3) == 0);
    end

    // Back-to-back: the next start is given in the cycle done is high.
    seq[0] = rand_word(); seq[1] = ~seq[0]; seq[2] = rand_word();
    @(negedge clk);
    x_in = seq[0]; start = 1;
    for (int i = 0; i < 3; i++) begin
      @(negedge clk);
      start = 0;
      wait_done(cnt);
      checks++;
      if (cnt != LATENCY) begin failures++; $display("N=%0d back-to-back latency %0d", N, cnt); end
      count_pass_logic(seq[i]);
      check_outputs(seq[i]);
      if (i < 2) begin
        x_in = seq[i+1]; start = 1;
        n_back2back++;
      end
    end

    // Reset in the middle of a transform: nothing may follow it.
    @(negedge clk);
    x_in = rand_word(); start = 1;
    @(negedge clk);
    start = 0;
    repeat (LATENCY / 2) @(negedge clk);
    reset = 1;
    @(negedge clk);
    reset = 0;
    n_abort++;
    begin
      bit seen = 0;
      repeat (LATENCY + 5) begin @(negedge clk); if (done || busy) seen = 1; end
      checks++;
      if (seen) begin failures++; $display("N=%0d activity after reset abort", N); end
    end
    transform(rand_word(), 0);    // works again after the abort

    checks++;
    if (n_pos_w == 0 || n_neg_w == 0 || n_zero_w == 0 || n_sum[0] == 0 || n_sum[1] == 0 ||
        n_sum[2] == 0 || n_ignored == 0 || n_back2back == 0 || n_abort == 0) begin
      failures++;
      $display("N=%0d: a mechanism was never exercised", N);
    end
    $display("N=%0d pass logic: +W %0d, -W %0d, 0 %0d; sums 0/1/2: %0d/%0d/%0d", N,
             n_pos_w, n_neg_w, n_zero_w, n_sum[0], n_sum[1], n_sum[2]);
    $display("N=%0d ignored starts %0d, back-to-back %0d, reset aborts %0d", N,
             n_ignored, n_back2back, n_abort);
    finished = 1;
  end

endmodule
