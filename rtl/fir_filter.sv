// fir_filter: reconfigurable N-tap FIR filter built on shift-and-add multipliers.
//
// Direct form: a delay line of N samples (the newest sample plus N-1 delay
// registers), one shift_add_mult per tap and one sum of the N products
// (N-1 adders). Nothing in the datapath uses a hardware multiplier.
//
// Operation per input sample (state machine IDLE -> START -> MULT -> IDLE):
//   edge 0      in_valid && in_ready: the delay line shifts, the sample
//               enters tap 0
//   edge 1      all N multipliers start together (tap k times coefficient k)
//   edges 2..17 the multipliers step through the 16 coefficient bits
//   edge 18     the N products are summed, rounded and saturated to Q1.15;
//               out_valid is high for one clock after this edge
// so the latency is FIR_LATENCY = W + 2 clocks and a new sample is accepted
// every W + 3 clocks at most; in_ready is high only in IDLE.
//
// Output scaling: the Q2.30 sum is rounded to Q1.15 by adding 2^14 and
// shifting right 15 places, then clipped to -32768 .. 32767.
//
// Coefficients sit in a register bank, loaded with DEFAULT_COEFFS at reset
// and rewritable one word at a time through coef_we/coef_addr/coef_data.
// The multipliers copy their operands when they start, so a write made while
// a sample is in progress takes effect from the next sample on.
//
// The tap count (60), the shift-and-add multipliers, the 59 adders and 59
// delay units and the 16-bit Q1.15 coefficients follow the filter
// specification. Running all multipliers in parallel, the run-time
// coefficient port, and rounding and saturation of the output are this
// design's choices.
module fir_filter
  import daq_pkg::*;
#(
  parameter int unsigned TAPS = daq_pkg::N_TAPS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // sample input
  input  logic                    in_valid,
  output logic                    in_ready,
  input  sample_t                 in_sample,
  // coefficient write port
  input  logic                    coef_we,
  input  logic [$clog2(TAPS)-1:0] coef_addr,
  input  sample_t                 coef_data,
  // filtered output
  output logic                    out_valid,
  output sample_t                 out_sample
);

  localparam int unsigned SUM_W = PROD_W + $clog2(TAPS);

  typedef enum logic [1:0] {IDLE, START, MULT} state_t;

  state_t  state;
  sample_t taps  [TAPS];
  sample_t coefs [TAPS];
  prod_t   prods [TAPS];
  logic [TAPS-1:0] mdone;
  logic [TAPS-1:0] mbusy;

  logic signed [SUM_W-1:0] sum;
  logic signed [SUM_W-1:0] rounded;
  sample_t                 result;

  assign in_ready = (state == IDLE);

  // Delay line and coefficient bank.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) begin
        taps[k]  <= '0;
        coefs[k] <= (k < int'(N_TAPS)) ? DEFAULT_COEFFS[k] : '0;
      end
    end else begin
      if (in_valid && in_ready) begin
        taps[0] <= in_sample;
        for (int k = 1; k < TAPS; k++) taps[k] <= taps[k-1];
      end
      if (coef_we && (32'(coef_addr) < TAPS)) coefs[coef_addr] <= coef_data;
    end
  end

  // One multiplier per tap, all started together.
  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    shift_add_mult #(.W(SAMPLE_W)) u_mult (
      .clk     (clk),
      .rst_n   (rst_n),
      .en      (state == START),
      .a       (taps[k]),
      .b       (coefs[k]),
      .product (prods[k]),
      .done    (mdone[k]),
      .busy    (mbusy[k])
    );
  end

  // Sum of the products (TAPS-1 adders), rounding and saturation.
  always_comb begin
    sum = '0;
    for (int k = 0; k < TAPS; k++) sum += SUM_W'(prods[k]);
    rounded = (sum + SUM_W'(1 << (FRAC_W - 1))) >>> FRAC_W;
    if (rounded > SUM_W'(32767))       result = 16'sh7fff;
    else if (rounded < -SUM_W'(32768)) result = 16'sh8000;
    else                               result = sample_t'(rounded);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      out_valid  <= 1'b0;
      out_sample <= '0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        IDLE:  if (in_valid) state <= START;
        START: state <= MULT;
        MULT:  if (mdone[0]) begin
                 out_sample <= result;
                 out_valid  <= 1'b1;
                 state      <= IDLE;
               end
        default: state <= IDLE;
      endcase
    end
  end

  // All multipliers run in lock step.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                               (mdone == '0) || (mdone == '1));
  a_no_start_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
                               (state == START) |-> (mbusy == '0));

endmodule
