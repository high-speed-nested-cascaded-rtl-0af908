// Self-checking testbench for mash_combiner.
//
// Drives random one-bit stage outputs and checks the output against the
// expanded difference equation
//   y[n] = y1[n-2] + y2[n-1] - y2[n-2] + y3[n] - 2 y3[n-1] + y3[n-2],
// which is Y = z^-2 Y1 + z^-1(1-z^-1) Y2 + (1-z^-1)^2 Y3 written out.
// Also checks that the extremes -3 and +4 are produced, and the response to
// a single pulse on each input (delays of 2, 1 and 0 clocks).
module mash_combiner_tb;
  logic clk, rst_n;
  initial begin clk = 0; rst_n = 0; end
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic y1, y2, y3;
  logic signed [3:0] y;
  bit h1 [3], h2 [3], h3 [3];   // [0] = value applied now
  int seen_min = 0, seen_max = 0;

  mash_combiner dut (.clk, .rst_n, .ys({y3, y2, y1}), .y);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int expect_y();
    return int'(h1[2]) + int'(h2[1]) - int'(h2[2]) + int'(h3[0]) - 2 * int'(h3[1]) + int'(h3[2]);
  endfunction

  task automatic apply(bit a, bit b, bit c);
    for (int i = 2; i > 0; i--) begin h1[i] = h1[i-1]; h2[i] = h2[i-1]; h3[i] = h3[i-1]; end
    h1[0] = a; h2[0] = b; h3[0] = c;
    y1 = a; y2 = b; y3 = c;
    #1;
    check(int'(y) == expect_y(), "output equation");
    if (int'(y) == -3) seen_min++;
    if (int'(y) == 4) seen_max++;
  endtask

  initial begin
    y1 = 0; y2 = 0; y3 = 0;
    foreach (h1[i]) begin h1[i] = 0; h2[i] = 0; h3[i] = 0; end
    #12 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      apply(1'($urandom), 1'($urandom), 1'($urandom));
    end
    // forced extremes: (y1,y2,y3) = (0,1,0), (0,0,1), (0,0,0) gives -3
    @(negedge clk); apply(0, 1, 0);
    @(negedge clk); apply(0, 0, 1);
    @(negedge clk); apply(0, 0, 0);
    check(int'(y) == -3, "minimum -3 reached");
    // (1,0,1), (0,1,0), (0,0,1) gives +4
    @(negedge clk); apply(1, 0, 1);
    @(negedge clk); apply(0, 1, 0);
    @(negedge clk); apply(0, 0, 1);
    check(int'(y) == 4, "maximum +4 reached");
    // impulse on y1 alone appears two clocks later
    @(negedge clk); apply(0, 0, 0);
    @(negedge clk); apply(0, 0, 0);
    @(negedge clk); apply(0, 0, 0);
    @(negedge clk); apply(1, 0, 0);
    check(y == 0, "y1 impulse: no output at 0");
    @(negedge clk); apply(0, 0, 0);
    check(y == 0, "y1 impulse: no output at 1");
    @(negedge clk); apply(0, 0, 0);
    check(y == 1, "y1 impulse: output at 2");
    check(seen_min > 0 && seen_max > 0, "extremes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
