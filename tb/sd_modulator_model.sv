// sd_modulator_model: behavioural model of the analog sigma-delta modulator.
//
// Not synthesizable. It stands in for the analog modulator of the ADC, which
// is outside the digital design: a second-order single-bit loop
//     v  = +1 if the last bit was 1, else -1
//     i1 = i1 + vin - v
//     i2 = i2 + i1 - v
//     bit_out = (i2 >= 0)
// updated on every clock edge with `en` high. `vin` is the analog input,
// normalised to the feedback level (keep |vin| below about 0.5 for a stable
// loop). The bit appears one clock after the edge that produced it.
module sd_modulator_model (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  real  vin,
  output logic bit_out
);

  real i1 = 0.0;
  real i2 = 0.0;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i1 = 0.0;
      i2 = 0.0;
      bit_out <= 1'b0;
    end else if (en) begin
      real v;
      v  = bit_out ? 1.0 : -1.0;
      i1 = i1 + vin - v;
      i2 = i2 + i1 - v;
      bit_out <= (i2 >= 0.0);
    end
  end

endmodule
