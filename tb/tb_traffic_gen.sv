// tb_traffic_gen: runs the generator of node 6 = (1,2) in a 4x4 mesh under
// each pattern and checks every packet (destination valid and not itself,
// head offsets and port consistent with the destination, source word,
// time stamp, sequence numbers counting up) and the statistics: measured
// injection rate close to rate/65536, transpose destination (2,1), and the
// group pattern hitting its groups in proportion to their probabilities.
//
// The patterns follow the original platform; the statistical bounds used to
// check the injection rate are this test's own.
module tb_traffic_gen;
  import noc_pkg::*;
  localparam int ROWS = 4, COLS = 4, N = 16, NODE = 6, NGRP = N - 1;
  logic clk = 0, rst_n = 0, enable = 0, pv;
  logic [1:0] pattern;
  logic [15:0] rate;
  logic [NGRP-1:0][15:0] grp_cum;
  logic [NGRP-1:0][N-1:0] grp_mask;
  logic [31:0] time_now = 0;
  logic [PKT_LEN-1:0][FLIT_DATA_W-1:0] pkt;
  int checks = 0, failures = 0;
  int hits [N];
  int npk = 0, exp_seq = 0;

  always #5 clk = ~clk;
  always @(posedge clk) time_now <= time_now + 1;

  traffic_gen #(.ROWS(ROWS), .COLS(COLS), .NODE(NODE), .SEED(7)) dut (.clk(clk), .rst_n(rst_n),
    .enable(enable), .pattern(pattern), .rate(rate), .grp_cum(grp_cum), .grp_mask(grp_mask),
    .time_now(time_now), .pkt_valid(pv), .pkt(pkt));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (pv) begin
    head_data_t h;
    int d;
    h = head_data_t'(pkt[0]);
    d = int'(pkt[3][19:12]);
    check(d < N && d != NODE, $sformatf("destination %0d", d));
    check(int'(h.hx) == d % COLS - NODE % COLS && int'(h.hy) == d / COLS - NODE / COLS, "head offsets");
    check(h.port == xy_port(h.hx, h.hy), "head port");
    check(pkt[1] == {8'(NODE), 12'(exp_seq)} && pkt[3][11:0] == 12'(exp_seq), "source and sequence words");
    check(pkt[2] == 20'(time_now - 1), "time stamp");
    exp_seq++;
    npk++;
    if (d < N) hits[d]++;
  end

  task automatic run(int cycles);
    npk = 0;
    foreach (hits[k]) hits[k] = 0;
    enable = 1;
    repeat (cycles) @(posedge clk);
    #1 enable = 0;
    @(posedge clk); #1;
  endtask

  initial begin
    pattern = 0; rate = 16'h2666; grp_cum = '0; grp_mask = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // uniform at 0.15 packet/cycle
    run(20000);
    check(npk > 2700 && npk < 3300, $sformatf("uniform rate: %0d packets in 20000 cycles", npk));
    for (int d = 0; d < N; d++)
      if (d != NODE) check(hits[d] > 120 && hits[d] < 290, $sformatf("uniform spread to %0d: %0d", d, hits[d]));
    // transpose at 0.3
    pattern = 1; rate = 16'h4CCD;
    run(10000);
    check(npk > 2700 && npk < 3300, $sformatf("transpose rate: %0d", npk));
    check(hits[9] == npk, "transpose destination (2,1)");
    // groups: 0.25 to node 0, 0.25 to {3, 15}
    pattern = 2;
    grp_cum[0] = 16'h4000; grp_mask[0] = 16'h0001;
    grp_cum[1] = 16'h8000; grp_mask[1] = 16'h8008;
    run(20000);
    check(hits[0] > 4600 && hits[0] < 5400, $sformatf("group 0: %0d", hits[0]));
    check(hits[3] > 2200 && hits[3] < 2800 && hits[15] > 2200 && hits[15] < 2800, "group 1 split");
    check(npk == hits[0] + hits[3] + hits[15], "only group members");
    // disabled: nothing
    run(0);
    repeat (100) @(posedge clk);
    check(npk == 0, "no packets when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
