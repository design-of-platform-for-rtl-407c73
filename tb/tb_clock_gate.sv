// tb_clock_gate: checks the latch-based clock gate. The gated clock must
// equal clk AND the enable sampled while clk was low; enable changes while
// clk is high must not reach the output until the next low phase; test_en
// forces the clock on.
//
// The expected behaviour (clock passes only while enabled, no glitch) is
// that of a standard latch-based gate; the stimulus is this test's own.
module tb_clock_gate;
  logic clk = 0, en = 0, test_en = 0, gclk;
  int checks = 0, failures = 0;
  logic en_low;   // enable as seen at the last low phase

  clock_gate dut (.clk(clk), .en(en), .test_en(test_en), .gclk(gclk));

  always #5 clk = ~clk;

  always @(negedge clk or en or test_en) if (!clk) en_low = en | test_en;

  initial begin
    repeat (300) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  initial begin
    en_low = 0;
    for (int k = 0; k < 200; k++) begin
      // change inputs at random points of the period
      // stay clear of the clock edges: 1-2 or 5-7 ns after the check point
      #($urandom_range(0, 1) ? $urandom_range(1, 2) : $urandom_range(5, 7));
      en = 1'($urandom_range(0, 1));
      if (k % 17 == 0) test_en = ~test_en;
      #1;
      checks++;
      if (gclk !== (clk & en_low)) begin
        failures++;
        $display("FAIL: gclk=%b clk=%b en_low=%b at %0t", gclk, clk, en_low, $time);
      end
      @(posedge clk); #1;
      checks++;
      if (gclk !== en_low) begin
        failures++;
        $display("FAIL: high phase gclk=%b en_low=%b at %0t", gclk, en_low, $time);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
