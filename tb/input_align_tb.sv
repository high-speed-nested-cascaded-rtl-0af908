// Self-checking testbench for input_align.
//
// Feeds a random word every clock into the default 16-bit, four-level
// instance and into a 16-bit, three-level one (slices of 6, 5 and 5 bits)
// and checks that slice k of the output equals slice k of the input of
// N-k clocks earlier, that is 3, 2, 1, 0 clocks for levels 1..4 of the
// default. Words from before reset count as zero.
module input_align_tb;
  logic clk, rst_n;
  initial begin clk = 0; rst_n = 0; end
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] x, xa4, xa3;
  logic [15:0] hist [0:7];   // hist[i] = input applied i edges ago

  input_align                          u4 (.clk, .rst_n, .x, .xa(xa4));
  input_align #(.N_LEVELS(3))          u3 (.clk, .rst_n, .x, .xa(xa3));

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

  initial begin
    x = 0;
    foreach (hist[i]) hist[i] = 0;
    #12 rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      x = 16'($urandom);
      for (int i = 7; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = x;
      #1;
      // hist[0] is the word just applied; the last slice is not delayed
      check(xa4[15:12] == hist[3][15:12], "N=4 level 1 (3 clocks)");
      check(xa4[11:8]  == hist[2][11:8],  "N=4 level 2 (2 clocks)");
      check(xa4[7:4]   == hist[1][7:4],   "N=4 level 3 (1 clock)");
      check(xa4[3:0]   == hist[0][3:0],   "N=4 level 4 (0 clocks)");
      check(xa3[15:10] == hist[2][15:10], "N=3 level 1 (2 clocks)");
      check(xa3[9:5]   == hist[1][9:5],   "N=3 level 2 (1 clock)");
      check(xa3[4:0]   == hist[0][4:0],   "N=3 level 3 (0 clocks)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
