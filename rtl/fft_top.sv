// fft_top: N-point radix-2 decimation-in-frequency FFT in half-precision
// floating point, for binary (one bit per sample) input data. N is a power
// of two, at least 8; the default is 8.
//
// The transform has S = log2(N) stages. With p the position of a butterfly
// inside its block of M = N / 2^(st-1) values and h = M/2:
//   stage 1      s[n] = x[n] + x[n+N/2],  d[n] = (x[n] - x[n+N/2]) * W_N^n.
//                Samples are 0/1, so this is pass logic: the twiddle is
//                passed unchanged, negated or zeroed; no multiplier.
//   stage 2..S-1 butterflies v[b+p] + v[b+p+h] and v[b+p] - v[b+p+h]; the
//                difference is multiplied by W_N^(p * 2^(st-1)) in one of
//                N/2 complex floating-point multipliers of that stage.
//   stage S      butterflies on neighbouring pairs (twiddle 1, no multiply).
// The DIF result appears in bit-reversed order and is written to the
// outputs in natural order, X[k] for k = 0 .. N-1.
//
// Every stage has its own butterflies and multipliers; one register array
// v holds the values between stages. Control is a state machine:
//   IDLE   with start high, the stage-1 (pass logic) outputs of x_in are
//          written to v.
//   LOAD   the butterfly sums of the current stage are written to v and
//          that stage's multipliers are started on the differences.
//   MUL    when the multipliers report done (MUL_CYCLES = 11 cycles after
//          start), the products are written to v; on to the next
//          multiplier stage (LOAD) or to FINAL.
//   FINAL  the last stage's butterflies are written, bit-reversed, to X;
//          done pulses.
// Latency from the edge that samples start to done is
// (S-2) * (MUL_CYCLES + 2) + 1 cycles: 14 for N = 8. X holds its value
// until the next transform completes; start is ignored while busy.
//
// The stage structure (pass logic first, then complex adder/subtractor
// followed by complex multipliers, N/2 of each per stage) and half-precision
// arithmetic follow the design. The one-bit sample encoding (x[n] = bit
// n), the scheduling, the natural-order outputs, and using multipliers in
// stages 2..S-1 also where the twiddle is 1, are this implementation's
// choices; the last stage has only the factor 1 and uses no multiplier.
module fft_top
  import hp_pkg::*;
#(
  parameter int N = FFT_N
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         start,
  input  logic [N-1:0] x_in,
  output logic         busy,
  output logic         done,
  output cplx_t        X [N]
);

  localparam int H  = N / 2;
  localparam int S  = $clog2(N);          // number of stages
  localparam int MS = S - 2;              // stages with multipliers
  localparam int KW = $clog2(H);          // twiddle index width
  localparam int SW = $clog2(MS + 1);     // stage counter width

  if (N < 8 || (1 << S) != N) begin : g_bad_n
    $error("fft_top: N must be a power of two, at least 8");
  end

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_MUL, S_FINAL} state_t;
  state_t state;

  logic [SW-1:0] stage;                   // multiplier stage 0 .. MS-1
  cplx_t v [N];

  // ---------------- stage 1: pass logic on the input word ----------------
  cplx_t s1 [H];
  cplx_t d1 [H];

  pass_logic_stage #(.N(N)) u_stage1 (.x(x_in), .s(s1), .d(d1));

  // ---------------- stages 2 .. S-1: butterflies and multipliers ----------
  cplx_t        bf_sum  [MS][H];
  cplx_t        bf_prod [MS][H];
  logic [H-1:0] mul_done [MS];
  logic [H-1:0] mul_busy [MS];
  logic [MS-1:0] mul_start;

  for (genvar m = 0; m < MS; m++) begin : g_stage
    localparam int ST  = m + 2;           // stage number
    localparam int BLK = N >> (ST - 1);   // block size M
    localparam int HB  = BLK / 2;
    for (genvar j = 0; j < H; j++) begin : g_bf
      localparam int P   = j % HB;
      localparam int TOP = (j / HB) * BLK + P;
      cplx_t diff, tw;

      cplx_butterfly u_bf (.a(v[TOP]), .b(v[TOP+HB]), .sum(bf_sum[m][j]), .diff(diff));

      twiddle_rom #(.N(N)) u_tw (.k(KW'(P << (ST - 1))), .w(tw));

      cplx_mul u_mul (
        .clk   (clk),
        .reset (reset),
        .start (mul_start[m]),
        .a     (diff),
        .b     (tw),
        .busy  (mul_busy[m][j]),
        .done  (mul_done[m][j]),
        .y     (bf_prod[m][j])
      );
    end

    assign mul_start[m] = (state == S_LOAD) && (stage == SW'(m));
  end

  // ---------------- stage S: final butterflies ----------------
  cplx_t v_last [N];

  for (genvar j = 0; j < H; j++) begin : g_last
    cplx_butterfly u_bf (.a(v[2*j]), .b(v[2*j+1]), .sum(v_last[2*j]), .diff(v_last[2*j+1]));
  end

  // Bit reversal of an S-bit index.
  function automatic int bitrev(int i);
    int r = 0;
    for (int b = 0; b < S; b++) r |= ((i >> b) & 1) << (S - 1 - b);
    return r;
  endfunction

  // Positions of butterfly j of multiplier stage m.
  function automatic int top_idx(int m, int j);
    int blk = N >> (m + 1);
    return (j / (blk / 2)) * blk + j % (blk / 2);
  endfunction

  // ---------------- control ----------------
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= S_IDLE;
      stage <= '0;
      done  <= 1'b0;
      for (int i = 0; i < N; i++) v[i] <= '0;
      for (int i = 0; i < N; i++) X[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          for (int n = 0; n < H; n++) begin
            v[n]     <= s1[n];
            v[n + H] <= d1[n];
          end
          stage <= '0;
          state <= S_LOAD;
        end
        S_LOAD: begin
          for (int m = 0; m < MS; m++)
            if (stage == SW'(m))
              for (int j = 0; j < H; j++) v[top_idx(m, j)] <= bf_sum[m][j];
          state <= S_MUL;
        end
        S_MUL: begin
          for (int m = 0; m < MS; m++)
            if (stage == SW'(m) && mul_done[m][0]) begin
              for (int j = 0; j < H; j++) v[top_idx(m, j) + (N >> (m + 2))] <= bf_prod[m][j];
              if (m == MS - 1) state <= S_FINAL;
              else begin
                stage <= stage + 1'b1;
                state <= S_LOAD;
              end
            end
        end
        S_FINAL: begin
          for (int i = 0; i < N; i++) X[bitrev(i)] <= v_last[i];
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The complex multipliers of a stage start together and finish together.
  for (genvar m = 0; m < MS; m++) begin : g_lockstep
    a_lockstep: assert property (@(posedge clk) disable iff (reset)
                                 (&mul_done[m] || ~|mul_done[m]) && (&mul_busy[m] || ~|mul_busy[m]))
      else $error("fft_top: complex multipliers of one stage out of step");
  end

endmodule
