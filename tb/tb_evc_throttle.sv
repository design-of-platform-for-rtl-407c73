// tb_evc_throttle: drives EVC grants (only while not blocked, as the
// allocator does) with random gaps and checks against a reference: after
// ON_LIMIT grants in consecutive cycles the block output stays high for
// OFF_LIMIT cycles, and never otherwise. Runs with the default 3:1 limit.
//
// The 3:1 ON:OFF limit follows the original design's starvation control; the
// reference counter model is this test's own.
module tb_evc_throttle;
  logic clk = 0, rst_n = 0, gnt = 0, blk;
  int checks = 0, failures = 0, blocks = 0;
  int run = 0, off = 0;

  always #5 clk = ~clk;

  evc_throttle #(.ON_LIMIT(3), .OFF_LIMIT(1)) dut (.clk(clk), .rst_n(rst_n), .evc_gnt(gnt), .evc_block(blk));

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      // expected block in this cycle
      checks++;
      if (blk !== (off > 0)) begin
        failures++;
        $display("FAIL: cycle %0d block=%b expected %b", k, blk, off > 0);
      end
      gnt = !blk && ($urandom_range(0, 9) < 8);
      if (blk) blocks++;
      @(posedge clk); #1;
      // reference update
      if (off > 0) begin off--; run = 0; end
      else if (gnt) begin
        run++;
        if (run == 3) begin off = 1; run = 0; end
      end else run = 0;
    end
    checks++;
    if (blocks == 0) begin failures++; $display("FAIL: never blocked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
