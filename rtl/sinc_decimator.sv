// sinc_decimator: sinc^N (CIC) decimation unit for a 1-bit sigma-delta stream.
//
// The modulator bitstream (1 -> +1, 0 -> -1) runs through N cascaded
// integrators at the bit rate; every R-th bit the integrator output is taken
// and passed through N cascaded first differences (combs). The result is the
// sum of the last N*(R-1)+1 bits weighted by the sinc^N kernel, whose DC
// gain is R^N. It is scaled to a Q1.15 sample by a power of two,
//     sample = floor(full * 2^15 / 2^(N*ceil(log2 R))),
// and saturated to the 16-bit range, so a power-of-two R gives unity gain
// (full-scale +1 is clipped to 32767) and other factors a gain just below 1.
// Integrators and combs wrap in two's complement; with ACC_W = 1 + N*log2(1024)
// bits the comb output is exact for every allowed factor.
//
// The decimation factor R is a run-time register: a `cfg_we` pulse loads
// `cfg_factor`, clamped to 2..1024, clears all filter state and restarts
// the decimation phase. Reset selects DEC_DEFAULT (32).
//
// Interface: `bit_valid` marks a clock carrying a new modulator bit in
// `bit_in`. `out_valid` pulses for one clock, registered, on the clock after
// the R-th accepted bit of each group; `out_sample` holds the sample until
// the next one. `factor` shows the factor in use.
//
// The decimation range 2..1024 and the default of 32 follow the
// specification of the decimation unit; the sinc (CIC) structure, its order
// N = 3 and the power-of-two scaling are this design's choices.
module sinc_decimator
  import daq_pkg::*;
#(
  parameter int unsigned ORDER       = 3,
  parameter int unsigned DEC_DEFAULT_R = daq_pkg::DEC_DEFAULT
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bit_valid,
  input  logic        bit_in,
  input  logic        cfg_we,
  input  dec_factor_t cfg_factor,
  output dec_factor_t factor,
  output logic        out_valid,
  output sample_t     out_sample
);

  localparam int unsigned ACC_W = 1 + ORDER * $clog2(DEC_MAX);
  localparam int unsigned SCL_W = ACC_W + FRAC_W + 1;
  localparam int unsigned SH_W  = $clog2(ORDER * $clog2(DEC_MAX) + 1);

  typedef logic signed [ACC_W-1:0] acc_t;

  acc_t        integ [ORDER];       // integrator chain
  acc_t        comb_dly [ORDER];    // previous input of each comb
  acc_t        comb_out [ORDER];    // combinational comb chain
  dec_factor_t phase;               // bits accepted in the current group
  logic [SH_W-1:0] shift;           // N * ceil(log2 R)

  // ceil(log2 r) for the factor register
  function automatic int unsigned clog2_factor(dec_factor_t r);
    int unsigned n = 0;
    while ((32'd1 << n) < 32'(r)) n++;
    return n;
  endfunction

  function automatic dec_factor_t clamp_factor(dec_factor_t r);
    if (r < dec_factor_t'(DEC_MIN)) return dec_factor_t'(DEC_MIN);
    if (r > dec_factor_t'(DEC_MAX)) return dec_factor_t'(DEC_MAX);
    return r;
  endfunction

  always_comb shift = SH_W'(ORDER * clog2_factor(factor));

  // Integrator chain, unpipelined: every stage sees the new bit at once.
  acc_t integ_next [ORDER];
  always_comb begin
    integ_next[0] = integ[0] + (bit_in ? acc_t'(1) : -acc_t'(1));
    for (int i = 1; i < ORDER; i++) integ_next[i] = integ[i] + integ_next[i-1];
  end

  // Comb chain on the last integrator output.
  always_comb begin
    comb_out[0] = integ[ORDER-1] - comb_dly[0];
    for (int i = 1; i < ORDER; i++) comb_out[i] = comb_out[i-1] - comb_dly[i];
  end

  // Scaling of the final comb output to Q1.15 with saturation.
  logic signed [SCL_W-1:0] scaled;
  sample_t                 sat;
  always_comb begin
    scaled = (SCL_W'(comb_out[ORDER-1]) <<< FRAC_W) >>> shift;
    if (scaled > SCL_W'(32767))       sat = 16'sh7fff;
    else if (scaled < -SCL_W'(32768)) sat = 16'sh8000;
    else                              sat = sample_t'(scaled);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      factor     <= dec_factor_t'(DEC_DEFAULT_R);
      phase      <= '0;
      out_valid  <= 1'b0;
      out_sample <= '0;
      for (int i = 0; i < ORDER; i++) begin
        integ[i]    <= '0;
        comb_dly[i] <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      if (cfg_we) begin
        factor <= clamp_factor(cfg_factor);
        phase  <= '0;
        for (int i = 0; i < ORDER; i++) begin
          integ[i]    <= '0;
          comb_dly[i] <= '0;
        end
      end else begin
        // Take the decimated sample once R bits have been integrated.
        if (phase == factor) begin
          phase      <= '0;
          out_valid  <= 1'b1;
          out_sample <= sat;
          comb_dly[0] <= integ[ORDER-1];
          for (int i = 1; i < ORDER; i++) comb_dly[i] <= comb_out[i-1];
        end
        if (bit_valid) begin
          for (int i = 0; i < ORDER; i++) integ[i] <= integ_next[i];
          if (phase != factor) phase <= phase + 1'b1;
          else                 phase <= dec_factor_t'(1);
        end
      end
    end
  end

endmodule
