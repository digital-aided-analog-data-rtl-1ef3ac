// tb_fir_response: measures the frequency response of the 60-tap filter with
// its reset coefficients, directly at the filter input.
//
// For each test frequency, a sine of half full scale (16384) is fed to
// fir_filter, one sample per clock-limited slot. After the 60-sample start-up,
// 256 output samples are taken. Each test frequency is a whole number of
// cycles in 256 samples, so a single-bin DFT gives the output amplitude
// exactly. The passband (up to 0.205 of the sample rate) must stay within
// +-0.2 dB of unity gain. The stopband (0.25 to 0.5 of the sample rate) must
// be at least 50 dB down. A last run adds a stopband interferer to a
// passband tone, like a telemetry signal with out-of-band noise, and checks
// that the interferer is removed and the tone is not.
module tb_fir_response;
  import daq_pkg::*;

  localparam int TAPS = N_TAPS;
  localparam int NDFT = 256;
  localparam real PI = 3.14159265358979;
  localparam real AMP = 16384.0;

  logic                    clk = 1'b0;
  logic                    rst_n = 1'b0;
  logic                    in_valid = 1'b0;
  logic                    in_ready;
  sample_t                 in_sample = '0;
  logic                    coef_we = 1'b0;
  logic [$clog2(TAPS)-1:0] coef_addr = '0;
  sample_t                 coef_data = '0;
  logic                    out_valid;
  sample_t                 out_sample;

  int checks = 0;
  int failures = 0;

  fir_filter dut (.*);

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
      $display("FAIL: %s", what);
    end
  endtask

  int outs [$];
  always @(negedge clk) if (rst_n && out_valid) outs.push_back(int'(out_sample));

  // Feed n samples of a1*sin(bin1) + a2*sin(bin2), one whenever the filter is ready.
  task automatic feed(input int n, input int bin1, input real a1, input int bin2, input real a2);
    for (int i = 0; i < n; i++) begin
      real v;
      v = a1 * $sin(2.0 * PI * bin1 * i / NDFT) + a2 * $sin(2.0 * PI * bin2 * i / NDFT);
      @(negedge clk);
      in_valid = 1'b1;
      in_sample = sample_t'($rtoi(v + (v >= 0.0 ? 0.5 : -0.5)));
      do @(posedge clk); while (!in_ready);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (2 * SAMPLE_W + 4) @(negedge clk);
  endtask

  function automatic real amp_at(int bin);
    real re = 0.0, im = 0.0;
    int base = outs.size() - NDFT;
    for (int n = 0; n < NDFT; n++) begin
      re += outs[base + n] * $cos(2.0 * PI * bin * n / NDFT);
      im += outs[base + n] * $sin(2.0 * PI * bin * n / NDFT);
    end
    return 2.0 * $sqrt(re * re + im * im) / NDFT;
  endfunction

  initial begin
    int pass_bins [6] = '{2, 13, 26, 39, 48, 52};      // up to 0.203 fs
    int stop_bins [6] = '{64, 72, 90, 100, 115, 127};  // 0.25 fs .. 0.496 fs
    real g_db, g_min, g_max, s_max;
    g_min = 100.0; g_max = -100.0; s_max = -200.0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    foreach (pass_bins[i]) begin
      feed(TAPS + NDFT, pass_bins[i], AMP, 0, 0.0);
      g_db = 20.0 * $log10(amp_at(pass_bins[i]) / AMP);
      $display("bin %0d (%.3f fs): %.3f dB", pass_bins[i], real'(pass_bins[i]) / NDFT, g_db);
      if (g_db < g_min) g_min = g_db;
      if (g_db > g_max) g_max = g_db;
    end
    check(g_max - g_min <= 0.2, $sformatf("passband ripple %.3f dB", g_max - g_min));
    check(g_max < 0.2 && g_min > -0.2, "passband gain within 0.2 dB of unity");

    foreach (stop_bins[i]) begin
      feed(TAPS + NDFT, stop_bins[i], AMP, 0, 0.0);
      g_db = 20.0 * $log10(amp_at(stop_bins[i]) / AMP + 1e-9);
      $display("bin %0d (%.3f fs): %.1f dB", stop_bins[i], real'(stop_bins[i]) / NDFT, g_db);
      if (g_db > s_max) s_max = g_db;
      check(g_db < -50.0, $sformatf("stopband bin %0d at %.1f dB", stop_bins[i], g_db));
    end

    // passband tone plus an interferer of the same size in the stopband
    feed(TAPS + NDFT, 20, 12000.0, 96, 12000.0);
    check(amp_at(20) > 0.97 * 12000.0 && amp_at(20) < 1.03 * 12000.0, "wanted tone kept");
    check(amp_at(96) < 12000.0 * 0.00316, "interferer removed (>50 dB)");
    $display("ripple %.3f dB, worst stopband %.1f dB, tone %.1f, interferer %.2f",
             g_max - g_min, s_max, amp_at(20), amp_at(96));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
