// Cascade-depth sweep for nc_mash_top: the 16-bit modulator built with 1
// (conventional MASH 1-1-1), 2, 4 and 8 levels, the configurations whose
// delay and area are compared for the published design, plus 3 levels, a
// depth that does not divide the word (slices of 6, 5 and 5 bits).
//
// All five instances get the same input word, changing at random times, with
// the dither enabled. Each output must equal the output of the one-level
// instance delayed by exactly N-1 clocks, and the one-level instance must
// match the whole-word MASH 1-1-1 model. This is the claim that the nested
// cascade behaves identically to the conventional modulator, with N-1 extra
// clocks of latency.
//
// Two more four-level instances use a MASH 1-1 (order 2) and a MASH 1-1-1-1
// (order 4); each must match a whole-word model of its own order delayed by
// three clocks.
module nc_mash_levels_tb;
  import mash_ref_pkg::*;
  logic clk, rst_n;
  initial begin clk = 0; rst_n = 0; end
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int unsigned NCYC = 100000;

  logic [15:0]       x;
  logic              dither_en;
  logic signed [3:0] y1, y2, y3, y4, y8;
  logic signed [2:0] yo2;
  logic signed [4:0] yo4;
  int                h1 [0:15];     // h1[i] = output of the one-level instance i clocks ago
  int                r2h [0:7];     // order-2 model output, i steps ago
  int                r4h [0:7];     // order-4 model output, i steps ago

  nc_mash_top #(.N_LEVELS(1)) u1 (.clk, .rst_n, .x, .dither_en, .y(y1));
  nc_mash_top #(.N_LEVELS(2)) u2 (.clk, .rst_n, .x, .dither_en, .y(y2));
  nc_mash_top #(.N_LEVELS(3)) u3 (.clk, .rst_n, .x, .dither_en, .y(y3));
  nc_mash_top #(.N_LEVELS(4)) u4 (.clk, .rst_n, .x, .dither_en, .y(y4));
  nc_mash_top #(.N_LEVELS(8)) u8 (.clk, .rst_n, .x, .dither_en, .y(y8));
  nc_mash_top #(.ORDER(2))    uo2 (.clk, .rst_n, .x, .dither_en, .y(yo2));
  nc_mash_top #(.ORDER(4))    uo4 (.clk, .rst_n, .x, .dither_en, .y(yo4));

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("output ranges: order 2 %0d..%0d, order 4 %0d..%0d", o2_min, o2_max, o4_min, o4_max);
    check(o2_min == -1 && o2_max == 2, "order-2 output spans -1..+2");
    check(o4_min < -3 && o4_max > 4, "order-4 output wider than order 3");
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

  mash_ref ref_m, ref2, ref4;
  prbs_ref prbs;
  int      o2_min, o2_max, o4_min, o4_max;

  task automatic model_edge();
    bit d;
    d = dither_en & prbs.out();
    ref_m.step(64'(x), d);
    ref2.step(64'(x), d);
    ref4.step(64'(x), d);
    prbs.step();
    for (int i = 7; i > 0; i--) begin r2h[i] = r2h[i-1]; r4h[i] = r4h[i-1]; end
    r2h[0] = ref2.y();
    r4h[0] = ref4.y();
  endtask

  initial begin
    ref_m = new(16);
    ref2  = new(16, 2);
    ref4  = new(16, 4);
    foreach (r2h[i]) begin r2h[i] = 0; r4h[i] = 0; end
    o2_min = 0; o2_max = 0; o4_min = 0; o4_max = 0;
    prbs  = new(23, '{23, 18}, 1);
    x = 0; dither_en = 1;
    foreach (h1[i]) h1[i] = 0;
    #12 rst_n = 1;
    model_edge();
    for (int n = 0; n < int'(NCYC); n++) begin
      @(negedge clk);
      for (int i = 15; i > 0; i--) h1[i] = h1[i-1];
      h1[0] = int'(y1);
      check(int'(y1) == ref_m.y(), "N=1 = whole-word MASH 1-1-1");
      check(int'(y2) == h1[1], "N=2 = N=1 delayed 1");
      check(int'(y3) == h1[2], "N=3 = N=1 delayed 2");
      check(int'(y4) == h1[3], "N=4 = N=1 delayed 3");
      check(int'(y8) == h1[7], "N=8 = N=1 delayed 7");
      check(int'(yo2) == r2h[3], "order 2, N=4 = whole-word MASH 1-1 delayed 3");
      check(int'(yo4) == r4h[3], "order 4, N=4 = whole-word MASH 1-1-1-1 delayed 3");
      if (int'(yo2) < o2_min) o2_min = int'(yo2);
      if (int'(yo2) > o2_max) o2_max = int'(yo2);
      if (int'(yo4) < o4_min) o4_min = int'(yo4);
      if (int'(yo4) > o4_max) o4_max = int'(yo4);
      if ($urandom_range(0, 31) == 0) x = 16'($urandom);
      model_edge();
    end
    $display("output ranges: order 2 %0d..%0d, order 4 %0d..%0d", o2_min, o2_max, o4_min, o4_max);
    check(o2_min == -1 && o2_max == 2, "order-2 output spans -1..+2");
    check(o4_min < -3 && o4_max > 4, "order-4 output wider than order 3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
