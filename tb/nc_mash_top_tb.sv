// End-to-end testbench for nc_mash_top at its default parameters (16-bit
// word, four levels, 23-bit dither register).
//
// Runs a schedule of input words: long constant stretches with and without
// dither, and stretches where the word changes at random. Every clock the
// output must equal that of a whole-word 16-bit MASH 1-1-1 model (with the
// same dither bit stream, regenerated from the LFSR recurrence) delayed by
// exactly N-1 = 3 clocks; counted from the input, that is a latency of
// N+2 = 6 clocks, which a step test checks on its own. Over 2**17 clocks of
// constant input the output must average x / 2**16 to within a few counts.
// A reset in mid-run must bring the design back to the model's zero state.
//
// Each mechanism of the design is counted and must occur: dither bits
// injected, input word changes (latency alignment), carries across each of
// the three slice boundaries, outputs at both ends of the -3..+4 range and
// the mid-run reset.
module nc_mash_top_tb;
  import mash_ref_pkg::*;
  logic clk, rst_n;
  initial begin clk = 0; rst_n = 0; end
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int unsigned N = 4;
  localparam int unsigned M = 16;

  logic [M-1:0]      x;
  logic              dither_en;
  logic signed [3:0] y;

  nc_mash_top dut (.clk, .rst_n, .x, .dither_en, .y);

  initial begin
    repeat (1_000_000) @(posedge clk);
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

  mash_ref ref_m;
  prbs_ref    prbs;
  int         yh [0:7];        // model outputs, yh[i] = i steps ago
  int unsigned n_dither, n_change, n_min, n_max, n_reset;
  longint     acc_y;

  // Model of one rising edge with the inputs now applied.
  task automatic model_edge();
    bit d;
    d = dither_en & prbs.out();
    if (d) n_dither++;
    ref_m.step(64'(x), d);
    prbs.step();
    for (int i = 7; i > 0; i--) yh[i] = yh[i-1];
    yh[0] = ref_m.y();
  endtask

  task automatic restart();
    ref_m.reset();
    prbs = new(23, '{23, 18}, 1);
    foreach (yh[i]) yh[i] = 0;
  endtask

  // One clock: compare at the falling edge, then apply new inputs.
  task automatic cycle(logic [M-1:0] nx, logic nen);
    @(negedge clk);
    check(int'(y) == yh[N-1], "output = 16-bit MASH delayed N-1");
    if (y == -3) n_min++;
    if (y == 4)  n_max++;
    acc_y += longint'(y);
    if (nx != x) n_change++;
    x = nx;
    dither_en = nen;
    model_edge();
  endtask

  logic [M-1:0] xv;
  int first;

  initial begin
    ref_m = new(M);
    x = 0; dither_en = 0;
    n_dither = 0; n_change = 0; n_min = 0; n_max = 0; n_reset = 0;
    restart();
    #12 rst_n = 1;
    model_edge();               // rising edge at 15 with zero inputs

    // 1. step test: x = 0x8000 from zero state, first +1 expected after
    //    N+2 = 6 clocks (stage-1 carry after two accumulations, then the
    //    output register chain).
    first = -1;
    for (int n = 0; n < 20; n++) begin
      cycle(n == 0 ? 16'h8000 : x, 1'b0);
      if (first < 0 && y != 0) first = n;
    end
    // accumulations at edges 1 and 2 (after n = 0 and n = 1); the carry of the
    // second leaves the last level at edge 2 and level 1 at edge 2+N-1; the
    // combiner delays y1 by 2 more: visible at the falling edge n = N+3.
    check(first == int'(N) + 3, "step latency");

    // 2. constant inputs, no dither, mean over 2**17 clocks
    for (int r = 0; r < 2; r++) begin
      xv = (r == 0) ? 16'h1234 : 16'hC001;
      cycle(xv, 1'b0);
      for (int n = 0; n < 8; n++) cycle(xv, 1'b0);
      acc_y = 0;
      for (int n = 0; n < (1 << 17); n++) cycle(xv, 1'b0);
      check((acc_y * 65536 - longint'(xv) * (1 << 17)) <= 8 * 65536 &&
            (acc_y * 65536 - longint'(xv) * (1 << 17)) >= -8 * 65536, "mean = x / 2**16");
    end

    // 3. constant input with dither, mean still x / 2**16
    xv = 16'h0101;
    for (int n = 0; n < 8; n++) cycle(xv, 1'b1);
    acc_y = 0;
    for (int n = 0; n < (1 << 17); n++) cycle(xv, 1'b1);
    check((acc_y * 65536 - longint'(xv) * (1 << 17)) <= 8 * 65536 &&
          (acc_y * 65536 - longint'(xv) * (1 << 17)) >= -8 * 65536, "mean with dither");

    // 4. changing input word, dither toggled
    for (int n = 0; n < 50000; n++)
      cycle(($urandom_range(0, 7) == 0) ? 16'($urandom) : x, (n / 5000) % 2 == 0);

    // 5. reset in mid-run, then random again
    @(negedge clk);
    rst_n = 0; #1 rst_n = 1;
    n_reset++;
    x = 0; dither_en = 0;
    restart();
    model_edge();               // the rising edge before the next falling one
    for (int n = 0; n < 10000; n++)
      cycle(($urandom_range(0, 3) == 0) ? 16'($urandom) : x, 1'b1);

    $display("mechanisms: dither bits=%0d input changes=%0d carries bit4=%0d bit8=%0d bit12=%0d y=-3:%0d y=+4:%0d resets=%0d",
             n_dither, n_change, ref_m.bc[4], ref_m.bc[8], ref_m.bc[12], n_min, n_max, n_reset);
    check(n_dither > 0, "dither injected");
    check(n_change > 0, "input word changed");
    check(ref_m.bc[4] > 0 && ref_m.bc[8] > 0 && ref_m.bc[12] > 0, "carries across every slice boundary");
    check(n_min > 0, "output -3 reached");
    check(n_max > 0, "output +4 reached");
    check(n_reset > 0, "mid-run reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
