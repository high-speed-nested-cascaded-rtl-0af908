// Self-checking testbench for ddsm_acc, the first-order DDSM adder.
//
// Drives random inputs and carries into a 4-bit (default) and a 7-bit
// instance and compares y and e after every clock with an integer model:
// acc' = acc + x + cin, y' = acc' >= 2**W, e' = acc' mod 2**W. Also checks
// the one-clock latency (a change of x shows first after one edge), the
// reset values, and the mean of y over 2**W clocks for constant x.
module ddsm_acc_tb;
  logic clk, rst_n;
  initial begin clk = 0; rst_n = 0; end
  int checks = 0, failures = 0;

  logic [3:0] x4;  logic c4, y4;  logic [3:0] e4;
  logic [6:0] x7;  logic c7, y7;  logic [6:0] e7;

  ddsm_acc                u4 (.clk, .rst_n, .x(x4), .cin(c4), .y(y4), .e(e4));
  ddsm_acc #(.W(7))       u7 (.clk, .rst_n, .x(x7), .cin(c7), .y(y7), .e(e7));

  always #5 clk = ~clk;

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

  int unsigned m4, m7, ones;
  bit exp_y4, exp_y7;

  initial begin
    x4 = 0; c4 = 0; x7 = 0; c7 = 0;
    m4 = 0; m7 = 0; exp_y4 = 0; exp_y7 = 0;
    #12;
    check(y4 == 0 && e4 == 0 && y7 == 0 && e7 == 0, "reset values");
    rst_n = 1;
    // random stimulus
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      check(y4 == exp_y4 && e4 == m4[3:0], "W=4 y/e");
      check(y7 == exp_y7 && e7 == m7[6:0], "W=7 y/e");
      x4 = 4'($urandom); c4 = 1'($urandom);
      x7 = 7'($urandom); c7 = 1'($urandom);
      m4 = m4 + 32'(x4) + 32'(c4); exp_y4 = m4 >= 16; m4 = m4 % 16;
      m7 = m7 + 32'(x7) + 32'(c7); exp_y7 = m7 >= 128; m7 = m7 % 128;
    end
    // latency: from a zero state, x = 15 gives no carry on the first edge,
    // a carry on the second edge only.
    x4 = 0; c4 = 0;
    rst_n = 0; #1; rst_n = 1;
    @(negedge clk);
    x4 = 4'd15;
    @(negedge clk);
    check(y4 == 0 && e4 == 4'd15, "latency: sum after one edge");
    @(negedge clk);
    check(y4 == 1 && e4 == 4'd14, "latency: carry after second edge");
    // mean: constant x = 5 for 16 clocks gives exactly 5 carries
    rst_n = 0; #1; rst_n = 1;
    x4 = 4'd5; c4 = 0; ones = 0;
    repeat (16) begin
      @(negedge clk);
      ones += y4;
    end
    @(negedge clk); ones += y4;
    check(ones == 5, "mean of y over 2**W clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
