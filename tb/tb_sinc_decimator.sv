// tb_sinc_decimator: self-checking test of the sinc^3 decimation unit.
//
// A reference model keeps every bit accepted since the last clear and forms
// the sinc^3 output directly as three cascaded moving sums of R values each
// (no integrators or combs), then applies the same power-of-two scaling and
// saturation. Each decimated sample is compared with it, and its timing is
// checked: out_valid must rise on the clock edge right after the edge that
// accepted the R-th bit of its group. Factors exercised: the reset default
// 32, 2, 5, 31, 1024 and two out-of-range values that must clamp to 2 and
// 1024. Runs of all-ones hit the positive saturation limit.
module tb_sinc_decimator;
  import daq_pkg::*;

  localparam int ORDER = 3;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        bit_valid = 1'b0;
  logic        bit_in = 1'b0;
  logic        cfg_we = 1'b0;
  dec_factor_t cfg_factor = '0;
  dec_factor_t factor;
  logic        out_valid;
  sample_t     out_sample;

  int checks = 0;
  int failures = 0;
  int n_sat = 0;

  sinc_decimator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  // ---------------- reference model ----------------
  int    r_cur;                 // factor the model believes in
  int    xs[$];                 // accepted bits as +-1
  longint y1[$], y2[$], y3[$];  // the three moving sums
  int    bit_edge[$];           // edge number at which each bit was accepted
  int    n_out;                 // outputs since the last clear
  int    edge_no = 0;

  function automatic longint window(ref longint v[$], input int n, input int r);
    longint s = 0;
    for (int j = 0; j < r; j++) if (n - j >= 0) s += v[n-j];
    return s;
  endfunction

  function automatic int expected_sample(input longint full, input int r);
    int lg = 0;
    longint sc;
    while ((1 << lg) < r) lg++;
    sc = (full <<< 15) >>> (ORDER * lg);
    if (sc > 32767) sc = 32767;
    if (sc < -32768) sc = -32768;
    return int'(sc);
  endfunction

  function automatic void model_clear(input int r);
    r_cur = r;
    xs.delete(); y1.delete(); y2.delete(); y3.delete(); bit_edge.delete();
    n_out = 0;
  endfunction

  // record every accepted bit at the clock edge
  always @(posedge clk) begin
    edge_no++;
    if (rst_n && !cfg_we && bit_valid) begin
      longint s;
      int n;
      xs.push_back(bit_in ? 1 : -1);
      bit_edge.push_back(edge_no);
      n = xs.size() - 1;
      s = 0;
      for (int j = 0; j < r_cur; j++) if (n - j >= 0) s += xs[n-j];
      y1.push_back(s);
      y2.push_back(window(y1, n, r_cur));
      y3.push_back(window(y2, n, r_cur));
    end
  end

  // compare every decimated sample
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      int idx;
      idx = (n_out + 1) * r_cur - 1;
      if (idx < y3.size()) begin
        int e;
        e = expected_sample(y3[idx], r_cur);
        if (e == 32767 || e == -32768) n_sat++;
        check(out_sample == sample_t'(e),
              $sformatf("R=%0d out %0d: got %0d expected %0d", r_cur, n_out, out_sample, e));
        check(bit_edge[idx] == edge_no - 1,
              $sformatf("R=%0d out %0d: bit edge %0d, out edge %0d", r_cur, n_out,
                        bit_edge[idx], edge_no));
      end else begin
        check(0, $sformatf("R=%0d: output n_before %0d bits", r_cur, idx + 1));
      end
      n_out++;
    end
  end

  // ---------------- stimulus ----------------
  task automatic stream(input int nbits, input int density, input int valid_pct);
    int sent = 0;
    while (sent < nbits) begin
      @(negedge clk);
      bit_valid = ($urandom_range(99) < valid_pct);
      bit_in    = ($urandom_range(99) < density);
      if (bit_valid) sent++;
    end
    @(negedge clk);
    bit_valid = 1'b0;
  endtask

  task automatic set_factor(input int req, input int expect_r);
    @(negedge clk);
    cfg_we = 1'b1;
    cfg_factor = dec_factor_t'(req);
    model_clear(expect_r);
    @(negedge clk);
    cfg_we = 1'b0;
    check(int'(factor) == expect_r, $sformatf("factor %0d after writing %0d", factor, req));
  endtask

  task automatic run_factor(input int req, input int r, input int groups);
    int n_before;
    set_factor(req, r);
    n_before = n_out;
    stream(r * groups / 3, 50, 80);
    stream(r * groups / 3, 85, 100);
    stream(r * groups - 2 * (r * groups / 3), 100, 60);
    repeat (4) @(negedge clk);
    check(n_out - n_before == groups,
          $sformatf("R=%0d: %0d outputs, expected %0d", r, n_out - n_before, groups));
  endtask

  initial begin
    model_clear(DEC_DEFAULT);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(int'(factor) == DEC_DEFAULT, "reset factor");
    stream(32 * 12, 30, 100);
    repeat (4) @(negedge clk);
    check(n_out == 12, $sformatf("R=32 after reset: %0d outputs", n_out));
    run_factor(2, 2, 60);
    run_factor(5, 5, 30);
    run_factor(31, 31, 12);
    run_factor(1024, 1024, 6);
    run_factor(1, 2, 30);
    run_factor(2000, 1024, 3);
    run_factor(32, 32, 12);
    check(n_sat > 0, "saturation reached");
    $display("saturated samples: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
