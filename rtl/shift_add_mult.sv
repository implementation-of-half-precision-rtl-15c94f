// shift_add_mult: unsigned W x W multiplier built on the shift-and-add
// algorithm, used for the 11-bit mantissas (hidden bit included) of the
// half-precision multiplier.
//
// On a cycle with start high the operands are loaded: the multiplicand into
// a 2W-bit register, the multiplier into a W-bit register, and the
// accumulator is cleared. Each of the next W cycles looks at the lowest
// multiplier bit, adds the multiplicand to the accumulator when it is 1,
// then shifts the multiplicand left and the multiplier right. After W
// iterations done is high for one cycle and product holds the 2W-bit result,
// which stays valid until the next start. A start while busy is ignored.
//
// Timing: start sampled at clock edge 0, done high after edge W (W = 11 by
// default), so a new multiplication can begin every W+1 cycles.
// The shift-and-add method is the one the design calls for; the
// start/busy/done handshake, the one-bit-per-cycle schedule and the
// active-high synchronous reset are this implementation's choices.
module shift_add_mult #(
  parameter int W = hp_pkg::MANT_W
) (
  input  logic           clk,
  input  logic           reset,
  input  logic           start,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic           busy,
  output logic           done,
  output logic [2*W-1:0] product
);

  localparam int CW = $clog2(W + 1);

  logic [2*W-1:0] mcand;
  logic [W-1:0]   mplier;
  logic [CW-1:0]  count;

  always_ff @(posedge clk) begin
    if (reset) begin
      mcand   <= '0;
      mplier  <= '0;
      count   <= '0;
      product <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          mcand   <= {{W{1'b0}}, a};
          mplier  <= b;
          product <= '0;
          count   <= CW'(W);
          busy    <= 1'b1;
        end
      end else begin
        if (mplier[0]) product <= product + mcand;
        mcand  <= mcand << 1;
        mplier <= mplier >> 1;
        count  <= count - 1'b1;
        if (count == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
