// tb_shift_add_mult: self-checking test of the shift-and-add multiplier.
//
// Applies corner operands (0, +-1, the most negative and most positive
// values) and random pairs, pulsing `en` for one clock per operation, and
// compares the product with the simulator's own signed multiply. It also
// checks that `done` comes exactly 16 clocks after the start edge and lasts
// one clock, that the product holds after completion, and that an `en` held
// high starts back-to-back operations.
module tb_shift_add_mult;

  localparam int W = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic signed [W-1:0]   a = '0, b = '0;
  logic signed [2*W-1:0] product;
  logic done, busy;

  int checks = 0;
  int failures = 0;

  shift_add_mult dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  // One multiplication; returns the number of clocks from start to done.
  task automatic run_one(input logic signed [W-1:0] x, input logic signed [W-1:0] y);
    int cycles;
    longint expect_p;
    @(negedge clk);
    a = x; b = y; en = 1'b1;
    @(posedge clk);                     // start edge
    @(negedge clk);
    en = 1'b0;
    a = $urandom; b = $urandom;         // operands must have been captured
    cycles = 0;
    while (!done) begin
      @(posedge clk); cycles++;
      @(negedge clk);
      if (cycles > 40) break;
    end
    expect_p = longint'(x) * longint'(y);
    check(cycles == W, $sformatf("latency %0d, expected %0d", cycles, W));
    check(longint'(product) == expect_p,
          $sformatf("%0d * %0d = %0d, got %0d", x, y, expect_p, product));
    @(posedge clk); @(negedge clk);
    check(!done && !busy, "done lasts one clock and unit returns to idle");
    check(longint'(product) == expect_p, "product holds after completion");
  endtask

  initial begin
    automatic logic signed [W-1:0] corner [6] = '{16'sd0, 16'sd1, -16'sd1,
                                                  16'sh7fff, 16'sh8000, 16'sd12345};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    foreach (corner[i]) foreach (corner[j]) run_one(corner[i], corner[j]);
    repeat (300) run_one($urandom, $urandom);

    // en held high: back-to-back operations, each 16 steps long
    @(negedge clk);
    a = 16'sd300; b = -16'sd7; en = 1'b1;
    begin
      int ndone = 0;
      int gap = 0;
      int gaps[$];
      repeat (60) begin
        @(posedge clk); @(negedge clk);
        gap++;
        if (done) begin
          check(product == -32'sd2100, "back-to-back product");
          gaps.push_back(gap);
          gap = 0;
          ndone++;
        end
      end
      en = 1'b0;
      check(ndone == 3, $sformatf("three operations in 60 clocks, got %0d", ndone));
      if (gaps.size() >= 2) check(gaps[1] == W + 1, $sformatf("restart period %0d", gaps[1]));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
