// tb_daq_top: end-to-end test of the acquisition back end at its default size.
//
// A behavioural second-order sigma-delta modulator turns an analog test
// signal into the bitstream. Two independent reference models follow the
// chain: the decimator model forms sinc^3 samples as three cascaded moving
// sums over the accepted bits; the FIR model convolves the samples the
// filter accepted with its own copy of the coefficients. Every decimated and
// every filtered sample is compared with them.
//
// Phases:
//   1. telemetry workload at the reset configuration (R = 32, reset
//      coefficients): a passband tone plus an out-of-band interferer of the
//      same amplitude. Single-bin DFTs of 512 filtered samples measure how
//      much the interferer is suppressed relative to the wanted tone.
//   2. factor switch to 16: the filter needs 19 clocks per sample, so with
//      one bit per clock samples arrive too fast and overruns must appear.
//   3. factor switch to 64 and a complete coefficient reload (a half-gain
//      copy of the reset filter); outputs must follow the new coefficients.
// Each mechanism (sample, output, factor switch, coefficient write, overrun)
// is counted; one that never happened counts as a failure.
module tb_daq_top;
  import daq_pkg::*;

  localparam int TAPS = N_TAPS;
  localparam int ORDER = 3;
  localparam int NDFT = 512;
  localparam real PI = 3.14159265358979;
  localparam int BIN_PASS = 26;     // 0.051 * data rate, inside the passband
  localparam int BIN_STOP = 179;    // 0.350 * data rate, inside the stopband

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        bit_valid = 1'b0;
  logic        bit_in;
  logic        dec_we = 1'b0;
  dec_factor_t dec_factor = '0;
  logic        coef_we = 1'b0;
  logic [$clog2(TAPS)-1:0] coef_addr = '0;
  sample_t     coef_data = '0;
  dec_factor_t factor;
  logic        dec_valid;
  sample_t     dec_sample;
  logic        out_valid;
  sample_t     out_sample;
  logic        overrun;
  logic        overrun_seen;

  real vin = 0.0;

  int checks = 0;
  int failures = 0;

  // mechanism counters
  int n_dec = 0, n_out = 0, n_switch = 0, n_coef = 0, n_overrun = 0;

  sd_modulator_model u_mod (
    .clk(clk), .rst_n(rst_n), .en(bit_valid), .vin(vin), .bit_out(bit_in)
  );

  daq_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- decimator reference ----------------
  int     r_cur;
  int     xs[$];
  longint y1[$], y2[$], y3[$];
  int     n_grp;

  function automatic longint window(const ref longint v[$], input int n, input int r);
    longint s = 0;
    for (int j = 0; j < r; j++) if (n - j >= 0) s += v[n-j];
    return s;
  endfunction

  function automatic int scale_cic(input longint full, input int r);
    int lg = 0;
    longint sc;
    while ((1 << lg) < r) lg++;
    sc = (full <<< 15) >>> (ORDER * lg);
    if (sc > 32767) sc = 32767;
    if (sc < -32768) sc = -32768;
    return int'(sc);
  endfunction

  function automatic void cic_clear(input int r);
    r_cur = r;
    xs.delete(); y1.delete(); y2.delete(); y3.delete();
    n_grp = 0;
  endfunction

  always @(posedge clk) begin
    if (rst_n && !dec_we && bit_valid) begin
      longint s;
      int n;
      xs.push_back(bit_in ? 1 : -1);
      n = xs.size() - 1;
      s = 0;
      for (int j = 0; j < r_cur; j++) if (n - j >= 0) s += xs[n-j];
      y1.push_back(s);
      y2.push_back(window(y1, n, r_cur));
      y3.push_back(window(y2, n, r_cur));
    end
  end

  // ---------------- FIR reference ----------------
  int mcoef [TAPS];
  int hist [$];
  int exp_out [$];
  int outs [$];            // filtered samples of the workload window
  bit record = 0;

  function automatic int fir_ref();
    longint s = 0;
    for (int k = 0; k < TAPS && k < hist.size(); k++)
      s += longint'(hist[k]) * longint'(mcoef[k]);
    s = (s + 16384) >>> 15;
    if (s > 32767) s = 32767;
    if (s < -32768) s = -32768;
    return int'(s);
  endfunction

  always @(negedge clk) begin
    if (rst_n) begin
      if (dec_valid) begin
        int idx;
        n_dec++;
        idx = (n_grp + 1) * r_cur - 1;
        if (idx < y3.size())
          check(int'(dec_sample) == scale_cic(y3[idx], r_cur),
                $sformatf("R=%0d decimated %0d: got %0d expected %0d", r_cur, n_grp,
                          dec_sample, scale_cic(y3[idx], r_cur)));
        else check(0, "decimated sample too early");
        n_grp++;
        if (overrun) n_overrun++;
        else begin
          hist.push_front(int'(dec_sample));
          if (hist.size() > TAPS) void'(hist.pop_back());
          exp_out.push_back(fir_ref());
        end
      end else begin
        check(!overrun, "overrun without a sample");
      end
      if (out_valid) begin
        n_out++;
        if (exp_out.size() == 0) check(0, "filtered sample without input");
        else begin
          int e;
          e = exp_out.pop_front();
          check(int'(out_sample) == e,
                $sformatf("filtered %0d: got %0d expected %0d", n_out, out_sample, e));
        end
        if (record) outs.push_back(int'(out_sample));
      end
    end
  end

  // ---------------- stimulus ----------------
  real t_pass, t_stop;   // tone phases in cycles of the data rate

  task automatic run_bits(input int nbits, input int r);
    // one bit per clock; tones defined relative to the data rate fs/r
    repeat (nbits) begin
      @(negedge clk);
      bit_valid = 1'b1;
      t_pass += 1.0 / real'(r);
      t_stop += 1.0 / real'(r);
      vin = 0.25 * $sin(2.0 * PI * t_pass * BIN_PASS / NDFT)
          + 0.25 * $sin(2.0 * PI * t_stop * BIN_STOP / NDFT);
    end
    @(negedge clk);
    bit_valid = 1'b0;
  endtask

  task automatic quiesce();
    @(negedge clk);
    bit_valid = 1'b0;
    repeat (3 * SAMPLE_W) @(negedge clk);
    check(exp_out.size() == 0, "pipeline drained");
  endtask

  task automatic switch_factor(input int r);
    quiesce();
    dec_we = 1'b1;
    dec_factor = dec_factor_t'(r);
    cic_clear(r);
    @(negedge clk);
    dec_we = 1'b0;
    n_switch++;
    check(int'(factor) == r, $sformatf("factor %0d, expected %0d", factor, r));
  endtask

  task automatic write_coef(input int k, input int v);
    @(negedge clk);
    coef_we = 1'b1;
    coef_addr = k[$clog2(TAPS)-1:0];
    coef_data = sample_t'(v);
    mcoef[k] = v;
    @(negedge clk);
    coef_we = 1'b0;
    n_coef++;
  endtask

  function automatic real tone_amp(const ref int x[$], input int bin);
    real re = 0.0, im = 0.0, w;
    for (int n = 0; n < NDFT; n++) begin
      w = 0.5 - 0.5 * $cos(2.0 * PI * n / NDFT);     // Hann window
      re += w * x[n] * $cos(2.0 * PI * bin * n / NDFT);
      im += w * x[n] * $sin(2.0 * PI * bin * n / NDFT);
    end
    return $sqrt(re * re + im * im);
  endfunction

  initial begin
    real a_pass, a_stop, rej_db;
    t_pass = 0.0;
    t_stop = 0.0;
    for (int k = 0; k < TAPS; k++) mcoef[k] = int'(DEFAULT_COEFFS[k]);
    cic_clear(DEC_DEFAULT);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(int'(factor) == DEC_DEFAULT, "reset factor is 32");

    // 1. workload at the reset configuration
    run_bits(DEC_DEFAULT * (TAPS + 8), DEC_DEFAULT);       // fill the filter
    quiesce();
    record = 1;
    run_bits(DEC_DEFAULT * NDFT, DEC_DEFAULT);
    quiesce();
    record = 0;
    check(outs.size() == NDFT, $sformatf("%0d workload samples", outs.size()));
    check(!overrun_seen, "no overrun at R = 32");
    if (outs.size() >= NDFT) begin
      a_pass = tone_amp(outs, BIN_PASS);
      a_stop = tone_amp(outs, BIN_STOP);
      rej_db = 20.0 * $log10(a_pass / (a_stop + 1e-9));
      $display("workload: passband tone %0.1f, stopband tone %0.3f, rejection %0.1f dB",
               a_pass, a_stop, rej_db);
      check(rej_db > 50.0, "interferer suppressed by more than 50 dB");
      // passband tone of amplitude 0.25 full scale: about 0.25*32768*NDFT/4
      check(a_pass > 0.8 * 0.25 * 32768.0 * NDFT / 4.0 &&
            a_pass < 1.2 * 0.25 * 32768.0 * NDFT / 4.0, "passband tone passes at unity gain");
    end

    // 2. factor 16: samples faster than the filter, overruns expected
    switch_factor(16);
    run_bits(16 * 80, 16);
    quiesce();
    check(overrun_seen, "overrun flag set at R = 16");

    // 3. factor 64 and a full coefficient reload (half gain)
    switch_factor(64);
    for (int k = 0; k < TAPS; k++) write_coef(k, int'(DEFAULT_COEFFS[k]) / 2);
    run_bits(64 * 80, 64);
    quiesce();

    $display("decimated %0d, filtered %0d, factor switches %0d, coefficient writes %0d, overruns %0d",
             n_dec, n_out, n_switch, n_coef, n_overrun);
    check(n_dec > 0, "decimated samples seen");
    check(n_out > 0, "filtered samples seen");
    check(n_switch >= 2, "factor switches done");
    check(n_coef >= TAPS, "coefficient reload done");
    check(n_overrun > 0, "overruns seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
