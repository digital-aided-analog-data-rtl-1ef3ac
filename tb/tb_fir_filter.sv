// tb_fir_filter: self-checking test of the 60-tap shift-and-add FIR filter.
//
// A reference model keeps the accepted samples and its own copy of the
// coefficient bank and computes each output as a plain convolution,
// rounded (+2^14, >> 15) and saturated to 16 bits. Phases:
//   1. an impulse with the reset coefficients (output = the coefficients)
//   2. random samples, with in_valid held high to measure the throughput
//   3. random coefficient writes, some of them while a sample is in flight
//   4. full-scale inputs and coefficients, which must saturate
// Every output is checked for value and for its latency of 18 clocks after
// the accepting edge; with in_valid held high a sample must be accepted
// every 19 clocks.
module tb_fir_filter;
  import daq_pkg::*;

  localparam int TAPS = N_TAPS;
  localparam int LAT  = SAMPLE_W + 2;

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
  int n_sat = 0;
  int n_outputs = 0;

  fir_filter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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
  int     mcoef [TAPS];
  int     hist  [$];          // newest first
  int     exp_val [$];
  int     exp_edge [$];
  int     accept_edges [$];
  int     edge_no = 0;
  bit     start_next = 0;
  bit     ready_q = 0;
  int     last_accept;

  function automatic int reference(const ref int h[$], const ref int c[TAPS]);
    longint s = 0;
    for (int k = 0; k < TAPS && k < h.size(); k++) s += longint'(h[k]) * longint'(c[k]);
    s = (s + 16384) >>> 15;
    if (s > 32767) s = 32767;
    if (s < -32768) s = -32768;
    return int'(s);
  endfunction

  always @(negedge clk) ready_q = in_ready;

  always @(posedge clk) begin
    edge_no++;
    if (rst_n) begin
      if (start_next) begin
        exp_val.push_back(reference(hist, mcoef));
        start_next = 0;
      end
      if (coef_we && int'(coef_addr) < TAPS) mcoef[coef_addr] = int'(coef_data);
      if (in_valid && ready_q) begin
        hist.push_front(int'(in_sample));
        if (hist.size() > TAPS) void'(hist.pop_back());
        start_next = 1;
        exp_edge.push_back(edge_no + LAT);
        accept_edges.push_back(edge_no);
      end
    end
  end

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      if (exp_val.size() == 0) check(0, "output without a sample");
      else begin
        int e, t;
        e = exp_val.pop_front();
        t = exp_edge.pop_front();
        if (e == 32767 || e == -32768) n_sat++;
        check(int'(out_sample) == e,
              $sformatf("output %0d: got %0d expected %0d", n_outputs, out_sample, e));
        check(t == edge_no, $sformatf("output %0d at edge %0d, expected %0d",
                                      n_outputs, edge_no, t));
      end
      n_outputs++;
    end
  end

  // ---------------- stimulus ----------------
  task automatic send(input int value);
    @(negedge clk);
    in_valid = 1'b1;
    in_sample = sample_t'(value);
    do @(posedge clk); while (!ready_q);    // ready during this cycle: accepted
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic drain();
    while (exp_val.size() != 0 || start_next || !ready_q) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  task automatic write_coef(input int addr, input int value);
    @(negedge clk);
    coef_we = 1'b1;
    coef_addr = addr[$clog2(TAPS)-1:0];
    coef_data = sample_t'(value);
    @(negedge clk);
    coef_we = 1'b0;
  endtask

  initial begin
    for (int k = 0; k < TAPS; k++) mcoef[k] = int'(DEFAULT_COEFFS[k]);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // 1. impulse response with the reset coefficients
    send(32767);
    repeat (TAPS + 4) send(0);
    drain();
    check(n_outputs == TAPS + 5, $sformatf("impulse outputs %0d", n_outputs));

    // 2. random samples, in_valid held high: one sample every LAT+1 clocks
    accept_edges.delete();
    @(negedge clk);
    in_valid = 1'b1;
    repeat (120) begin
      in_sample = sample_t'($urandom);
      @(negedge clk);
      if (!ready_q && in_valid) in_sample = sample_t'($urandom);
    end
    in_valid = 1'b0;
    drain();
    for (int i = 1; i < accept_edges.size(); i++)
      check(accept_edges[i] - accept_edges[i-1] == LAT + 1,
            $sformatf("accept period %0d", accept_edges[i] - accept_edges[i-1]));
    check(accept_edges.size() >= 5, "enough samples accepted back to back");

    // 3. new coefficients, some written while a sample is being multiplied
    for (int k = 0; k < TAPS; k++) write_coef(k, int'($urandom_range(0, 8191)) - 4096);
    repeat (200) begin
      fork
        send(int'($urandom_range(0, 65535)) - 32768);
        begin
          repeat ($urandom_range(0, 20)) @(negedge clk);
          write_coef($urandom_range(0, 63), int'($urandom_range(0, 65535)) - 32768);
        end
      join
    end
    drain();

    // 4. saturation: full-scale coefficients and inputs
    for (int k = 0; k < TAPS; k++) write_coef(k, (k % 2) ? 32767 : -32768);
    repeat (TAPS) send(-32768);
    repeat (10) send(32767);
    drain();
    check(n_sat > 0, "saturation reached");

    $display("outputs %0d, saturated %0d", n_outputs, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
