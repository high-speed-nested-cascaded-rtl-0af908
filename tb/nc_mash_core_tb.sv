// Self-checking testbench for nc_mash_core, the grid of narrow DDSMs.
//
// Drives the default 16-bit four-level core, a three-level core (slices of
// 6, 5, 5 bits) and a one-level core with a random input word that changes
// at random times and a random dither bit. The testbench aligns the input
// itself (slice k delayed N-k clocks). The three level-1 outputs must equal
// the three stage carries of a whole-word 16-bit MASH 1-1-1 model delayed by
// exactly N-1 clocks, from reset on. Carries between slices are counted in
// the model and must occur at every slice boundary.
module nc_mash_core_tb;
  import mash_ref_pkg::*;
  logic clk, rst_n;
  initial begin clk = 0; rst_n = 0; end
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int unsigned NCYC = 20000;

  logic [15:0] xa4, xa3, xa1;
  logic        dither;
  logic [2:0]  o4, o3, o1;       // ys = {y3, y2, y1}
  logic [15:0] xh [0:7];         // xh[i] = word applied i clocks ago
  logic [2:0]  rh [0:7];         // model carries, rh[i] = i steps ago

  nc_mash_core              u4 (.clk, .rst_n, .xa(xa4), .dither, .ys(o4));
  nc_mash_core #(.N_LEVELS(3)) u3 (.clk, .rst_n, .xa(xa3), .dither, .ys(o3));
  nc_mash_core #(.N_LEVELS(1)) u1 (.clk, .rst_n, .xa(xa1), .dither, .ys(o1));

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
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
  logic [15:0] x;

  initial begin
    ref_m = new(16);
    x = 0; dither = 0;
    foreach (xh[i]) xh[i] = 0;
    foreach (rh[i]) rh[i] = 0;
    xa4 = 0; xa3 = 0; xa1 = 0;
    #12 rst_n = 1;
    // the rising edge at 15 is modelled with zero input
    ref_m.step(0, 0);
    for (int i = 7; i > 0; i--) rh[i] = rh[i-1];
    rh[0] = {ref_m.cy(2), ref_m.cy(1), ref_m.cy(0)};
    for (int n = 0; n < int'(NCYC); n++) begin
      @(negedge clk);
      check(o4 == rh[3], "N=4 outputs = 16-bit MASH delayed 3");
      check(o3 == rh[2], "N=3 outputs = 16-bit MASH delayed 2");
      check(o1 == rh[0], "N=1 outputs = 16-bit MASH");
      if ($urandom_range(0, 15) == 0) x = 16'($urandom);
      dither = 1'($urandom);
      for (int i = 7; i > 0; i--) xh[i] = xh[i-1];
      xh[0] = x;
      xa4 = {xh[3][15:12], xh[2][11:8], xh[1][7:4], xh[0][3:0]};
      xa3 = {xh[2][15:10], xh[1][9:5], xh[0][4:0]};
      xa1 = xh[0];
      ref_m.step(64'(x), dither);
      for (int i = 7; i > 0; i--) rh[i] = rh[i-1];
      rh[0] = {ref_m.cy(2), ref_m.cy(1), ref_m.cy(0)};
    end
    foreach (ref_m.bc[b]) if (b == 4 || b == 5 || b == 8 || b == 10 || b == 12)
      check(ref_m.bc[b] > 0, "carry across a slice boundary");
    $display("slice-boundary carries: bit4=%0d bit8=%0d bit12=%0d", ref_m.bc[4], ref_m.bc[8], ref_m.bc[12]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
