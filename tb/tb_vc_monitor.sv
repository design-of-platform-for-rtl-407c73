// tb_vc_monitor: random VC occupancies with measure on and off; the
// histogram of active-VC counts and the per-VC maximum occupancy must match
// a reference, and clear must zero both.
//
// Active-VC counting follows the original platform's utilisation reports;
// the reference histogram is this test's own.
module tb_vc_monitor;
  import noc_pkg::*;
  localparam int DEPTH = 4, CW = $clog2(DEPTH + 1);
  logic clk = 0, rst_n = 0, measure = 0, clear = 0;
  logic [MAX_VC-1:0][CW-1:0] cnt;
  logic [MAX_VC:0][31:0] hist;
  logic [MAX_VC-1:0][CW-1:0] mx;
  int checks = 0, failures = 0;
  int rh [MAX_VC+1];
  int rm [MAX_VC];

  always #5 clk = ~clk;

  vc_monitor #(.DEPTH(DEPTH)) dut (.clk(clk), .rst_n(rst_n), .measure(measure), .clear(clear),
    .vc_count(cnt), .hist(hist), .max_occ(mx));

  task automatic compare();
    for (int a = 0; a <= MAX_VC; a++) begin
      checks++;
      if (hist[a] != 32'(rh[a])) begin failures++; $display("FAIL: hist[%0d]=%0d expected %0d", a, hist[a], rh[a]); end
    end
    for (int v = 0; v < MAX_VC; v++) begin
      checks++;
      if (int'(mx[v]) != rm[v]) begin failures++; $display("FAIL: max[%0d]", v); end
    end
  endtask

  initial begin
    cnt = '0;
    foreach (rh[a]) rh[a] = 0;
    foreach (rm[v]) rm[v] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 600; k++) begin
      int act;
      act = 0;
      for (int v = 0; v < MAX_VC; v++) cnt[v] = CW'($urandom_range(0, DEPTH));
      measure = (k % 50) < 40;
      clear = (k == 300);
      @(posedge clk); #1;
      if (clear) begin
        foreach (rh[a]) rh[a] = 0;
        foreach (rm[v]) rm[v] = 0;
      end else if (measure) begin
        for (int v = 0; v < MAX_VC; v++) begin
          if (cnt[v] != 0) act++;
          if (int'(cnt[v]) > rm[v]) rm[v] = int'(cnt[v]);
        end
        rh[act]++;
      end
      compare();
    end
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
