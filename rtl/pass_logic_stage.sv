// pass_logic_stage: first stage of an N-point decimation-in-frequency FFT
// for binary input samples.
//
// The input is N one-bit samples x[0..N-1] (x[n] = bit n). A DIF first
// stage forms s[n] = x[n] + x[n+N/2] and d[n] = (x[n] - x[n+N/2]) * W_N^n
// for n = 0 .. N/2-1. Because each sample is 0 or 1, s[n] can only be 0, 1
// or 2 and x[n] - x[n+N/2] only -1, 0 or +1, so no adder or multiplier is
// needed: s[n] is selected from the constants 0.0, 1.0 and 2.0, and d[n]
// passes the twiddle factor W_N^n, its negation, or zero. Replacing the
// first-stage multipliers by this pass logic is the design's central
// saving; the encoding of the selections is this implementation's.
//
// Outputs are complex half-precision values (imaginary part of s[n] is 0).
// Purely combinational.
module pass_logic_stage
  import hp_pkg::*;
#(
  parameter int N = FFT_N
) (
  input  logic [N-1:0] x,
  output cplx_t        s [N/2],
  output cplx_t        d [N/2]
);

  localparam int H  = N / 2;
  localparam int KW = $clog2(H > 1 ? H : 2);

  cplx_t w [H];

  for (genvar n = 0; n < H; n++) begin : g_bf
    twiddle_rom #(.N(N)) u_tw (
      .k (KW'(n)),
      .w (w[n])
    );

    always_comb begin
      // Sum: 0, 1 or 2.
      unique case ({x[n], x[n+H]})
        2'b00:          s[n] = '{re: HALF_ZERO, im: HALF_ZERO};
        2'b01, 2'b10:   s[n] = '{re: HALF_ONE,  im: HALF_ZERO};
        default:        s[n] = '{re: HALF_TWO,  im: HALF_ZERO};
      endcase
      // Difference times twiddle: pass +W, -W or 0.
      unique case ({x[n], x[n+H]})
        2'b10:   d[n] = w[n];
        2'b01:   d[n] = '{re: half_neg(w[n].re), im: half_neg(w[n].im)};
        default: d[n] = '{re: HALF_ZERO, im: HALF_ZERO};
      endcase
    end
  end

endmodule
