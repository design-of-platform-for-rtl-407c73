// tb_vc_buffer: random writes and reads on the four VC lanes (never writing
// a full lane or reading an empty one), checked against a queue per lane:
// head flit, empty flag and count of every lane, every cycle. Lanes are
// idle for stretches so the gated storage clocks stop and restart.
//
// Per-VC buffering with clock gating follows the original design; the
// reference queues are this test's own.
module tb_vc_buffer;
  import noc_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0, wr_en;
  flit_t wf;
  logic [MAX_VC-1:0] rd_en, empty;
  flit_t [MAX_VC-1:0] head;
  logic [MAX_VC-1:0][$clog2(DEPTH+1)-1:0] count;
  flit_t q [MAX_VC][$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vc_buffer #(.DEPTH(DEPTH)) dut (.clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_flit(wf),
    .rd_en(rd_en), .head(head), .empty(empty), .count(count));

  initial begin
    wr_en = 0; wf = '0; rd_en = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      bit quiet;
      quiet = (k / 100) % 3 == 2;
      // compare state
      for (int v = 0; v < MAX_VC; v++) begin
        checks++;
        if (int'(count[v]) != q[v].size() || empty[v] != (q[v].size() == 0) ||
            (q[v].size() > 0 && head[v] !== q[v][0])) begin
          failures++;
          $display("FAIL: cycle %0d lane %0d count=%0d expected %0d", k, v, count[v], q[v].size());
        end
      end
      wf = flit_t'($urandom);
      wf.valid = 1'b1;
      wr_en = !quiet && q[wf.vc].size() < DEPTH && $urandom_range(0, 1);
      for (int v = 0; v < MAX_VC; v++) rd_en[v] = !quiet && q[v].size() > 0 && $urandom_range(0, 2) == 0;
      @(posedge clk); #1;
      for (int v = 0; v < MAX_VC; v++) if (rd_en[v]) void'(q[v].pop_front());
      if (wr_en) q[wf.vc].push_back(wf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
