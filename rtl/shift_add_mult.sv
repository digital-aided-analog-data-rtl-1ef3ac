// shift_add_mult: sequential two's-complement shift-and-add multiplier.
//
// Multiplies two W-bit signed numbers using only an adder and shifts, one
// multiplier bit per clock. While idle, a high `en` loads the operands and
// clears the accumulator and the bit counter `state`. On each of the next
// W clocks the bit b[state] is examined: if set, the multiplicand, shifted
// left by `state` places, is added to the accumulator (subtracted for the
// sign bit, state = W-1, which carries weight -2^(W-1) in two's complement).
// When `state` reaches W-1 the product is final: `product` holds it from then
// until the next start and `done` is high for exactly one clock.
//
// Timing: en sampled high at clock edge 0 -> done high after edge W
// (16 clocks for the default W = 16). If `en` is still high when the unit
// returns to idle, a new operation starts on the following edge.
//
// The 16-bit operands, 32-bit result, enable/reset/clock inputs, the done
// flag and a state variable counting to 15 follow the multiplier described
// for the filter; signed operands and the subtract-on-sign-bit rule are
// this design's choice, needed because samples and coefficients are signed.
module shift_add_mult #(
  parameter int unsigned W = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic signed [W-1:0]   a,        // multiplicand
  input  logic signed [W-1:0]   b,        // multiplier
  output logic signed [2*W-1:0] product,
  output logic                  done,
  output logic                  busy
);

  localparam int unsigned SW = $clog2(W);

  logic [SW-1:0]         state;
  logic signed [2*W-1:0] mcand;    // multiplicand shifted left by `state`
  logic [W-1:0]          mplier;   // multiplier shifted right by `state`
  logic signed [2*W-1:0] acc;
  logic signed [2*W-1:0] addend;
  logic signed [2*W-1:0] acc_next;

  always_comb begin
    if (!mplier[0])                     addend = '0;
    else if (state == SW'(W - 1))       addend = -mcand;
    else                                addend = mcand;
    acc_next = acc + addend;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= '0;
      mcand  <= '0;
      mplier <= '0;
      acc    <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (en) begin
          mcand  <= (2*W)'(a);       // sign-extend
          mplier <= b;
          acc    <= '0;
          state  <= '0;
          busy   <= 1'b1;
        end
      end else begin
        acc    <= acc_next;
        mcand  <= mcand <<< 1;
        mplier <= mplier >> 1;
        if (state == SW'(W - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          state <= state + 1'b1;
        end
      end
    end
  end

  assign product = acc;

endmodule
