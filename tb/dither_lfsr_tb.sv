// Self-checking testbench for dither_lfsr.
//
// Default 23-bit instance: compares 5000 dither bits with the bit stream of
// the recurrence b[n] = b[n-23] ^ b[n-18] started from the seed, checks that
// the enable gates the output without stopping the register, and counts the
// share of ones. A 7-bit instance with x^7 + x^6 + 1 is run over its whole
// period: the state must return to the seed after exactly 127 clocks and
// not before, with 64 ones per period.
module dither_lfsr_tb;
  import mash_ref_pkg::*;
  logic clk, rst_n;
  initial begin clk = 0; rst_n = 0; end
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic en, d23, d7;

  dither_lfsr u23 (.clk, .rst_n, .en, .dither(d23));
  dither_lfsr #(.LFSR_W(7), .TAPS(7'h60), .SEED(7'h01)) u7 (.clk, .rst_n, .en(1'b1), .dither(d7));

  initial begin
    repeat (20000) @(posedge clk);
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

  prbs_ref r23, r7;
  int ones23, ones7, period;
  bit [6:0] st7;

  initial begin
    r23 = new(23, '{23, 18}, 1);
    r7  = new(7, '{7, 6}, 1);
    en = 1; ones23 = 0; ones7 = 0; period = 0;
    #12 rst_n = 1;
    // one rising edge has passed before the first comparison
    r23.step();
    r7.step();
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      en = (n % 97) > 10;
      #1;
      check(d23 == (en & r23.out()), "23-bit stream / enable gating");
      if (n < 127) begin
        check(d7 == r7.out(), "7-bit stream");
        ones7 += d7;
      end
      ones23 += d23;
      r23.step();
      r7.step();
    end
    check(ones7 == 64, "7-bit: 64 ones per period");
    check(ones23 > 1800 && ones23 < 2600, "23-bit: roughly balanced");
    // period of the 7-bit register
    @(posedge clk);
    #1 rst_n = 0;
    #1 rst_n = 1;
    for (int n = 1; n <= 200; n++) begin
      @(posedge clk);
      #1;
      st7 = u7.s;
      if (st7 == 7'h01 && period == 0) period = n;
    end
    check(period == 127, "7-bit period 127");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
