// daq_top: digital back end of a sigma-delta telemetry acquisition channel.
//
// The 1-bit stream of the sigma-delta modulator enters the sinc decimation
// unit, which reduces the rate by a run-time factor R (2 .. 1024, 32 after
// reset) and delivers 16-bit samples at the data rate. These feed the
// reconfigurable 60-tap shift-and-add FIR filter, whose sharp equiripple
// response replaces the fixed analog filter of a conventional channel: the
// passband, stopband and data rate are changed by writing a new factor and
// new coefficients, not by changing components.
//
// Rates: the FIR filter needs FIR_LATENCY + 1 = 19 clocks per sample, so the
// clock must run at least 19/R times the modulator bit rate (one bit per
// clock is enough for R >= 19; smaller factors need bit_valid at a lower
// duty). If a decimated sample arrives while the filter is still busy it is
// dropped: `overrun` pulses for that clock and `overrun_seen` stays set until
// reset.
//
// Interface:
//   bit_valid/bit_in        modulator bitstream, one bit per bit_valid clock
//   dec_we/dec_factor       load a new decimation factor (clears the sinc state)
//   coef_we/coef_addr/data  write one FIR coefficient (Q1.15)
//   dec_valid/dec_sample    decimator output, before the FIR filter
//   out_valid/out_sample    filtered output sample (Q1.15), one clock pulse
//   factor                  decimation factor in use
//
// The chain (modulator, decimation unit, FIR filter) follows the proposed
// design; the clock-enable input, the overrun handling and the
// configuration ports are this design's choices.
module daq_top
  import daq_pkg::*;
#(
  parameter int unsigned TAPS      = daq_pkg::N_TAPS,
  parameter int unsigned CIC_ORDER = 3,
  parameter int unsigned DEC_RESET = daq_pkg::DEC_DEFAULT
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    bit_valid,
  input  logic                    bit_in,
  input  logic                    dec_we,
  input  dec_factor_t             dec_factor,
  input  logic                    coef_we,
  input  logic [$clog2(TAPS)-1:0] coef_addr,
  input  sample_t                 coef_data,
  output dec_factor_t             factor,
  output logic                    dec_valid,
  output sample_t                 dec_sample,
  output logic                    out_valid,
  output sample_t                 out_sample,
  output logic                    overrun,
  output logic                    overrun_seen
);

  logic fir_ready;

  sinc_decimator #(
    .ORDER         (CIC_ORDER),
    .DEC_DEFAULT_R (DEC_RESET)
  ) u_dec (
    .clk        (clk),
    .rst_n      (rst_n),
    .bit_valid  (bit_valid),
    .bit_in     (bit_in),
    .cfg_we     (dec_we),
    .cfg_factor (dec_factor),
    .factor     (factor),
    .out_valid  (dec_valid),
    .out_sample (dec_sample)
  );

  fir_filter #(.TAPS(TAPS)) u_fir (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (dec_valid),
    .in_ready   (fir_ready),
    .in_sample  (dec_sample),
    .coef_we    (coef_we),
    .coef_addr  (coef_addr),
    .coef_data  (coef_data),
    .out_valid  (out_valid),
    .out_sample (out_sample)
  );

  assign overrun = dec_valid && !fir_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       overrun_seen <= 1'b0;
    else if (overrun) overrun_seen <= 1'b1;
  end

endmodule
