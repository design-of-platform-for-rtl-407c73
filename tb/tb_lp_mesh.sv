// tb_lp_mesh: self-checking test of the 4x4 low-power mesh.
//
// Each node gets a source queue (source_fifo) into which the test pushes
// packets. The receiving side reassembles packets per ejection VC and
// checks them: flit order head-body-body-tail, zero remaining offsets at
// the head, destination word equal to the ejecting node, no duplicates.
// Directed tests check head latency against the pipeline: 4 cycles per
// normal hop plus 3 at the last router, and 1 cycle per bypassed router on
// an express path. Then a saturating stream on an express path checks the
// ON:OFF limit (EVC flits at the source never more than EVC_ON in a row)
// and that normal flits are held while EVC flits bypass; finally random
// all-to-all traffic must be delivered completely.
//
// Expected latencies follow the original design's pipeline (4 stages per
// hop, 1 cycle per aggressively bypassed router); the traffic mix and the
// packet bookkeeping are this test's own.
module tb_lp_mesh;
  import noc_pkg::*;

  localparam int ROWS = 4, COLS = 4, N = 16, DEPTH = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  flit_t   [N-1:0] inj_flit, ej_flit;
  credit_t [N-1:0] inj_credit;
  logic    [N-1:0] head_sent, push;
  logic    [N-1:0][PKT_LEN-1:0][FLIT_DATA_W-1:0] push_pkt;
  logic    [N-1:0][NPORTS-1:0][MAX_VC-1:0][$clog2(DEPTH+1)-1:0] vc_count;
  logic    [N-1:0][NPORTS-1:0] ev_bypass, ev_evc_gnt, ev_throttle, ev_st_stall;
  logic    [N-1:0] ev_sa_conflict;

  lp_mesh dut (
    .clk(clk), .rst_n(rst_n), .inj_flit(inj_flit), .inj_credit(inj_credit), .ej_flit(ej_flit),
    .vc_count(vc_count), .ev_bypass(ev_bypass), .ev_evc_gnt(ev_evc_gnt),
    .ev_throttle(ev_throttle), .ev_st_stall(ev_st_stall), .ev_sa_conflict(ev_sa_conflict)
  );

  for (genvar n = 0; n < N; n++) begin : g_ni
    source_fifo #(.DEPTH(256), .VC_DEPTH(DEPTH)) u_ni (
      .clk(clk), .rst_n(rst_n), .push(push[n]), .push_pkt(push_pkt[n]),
      .overflow(), .pkt_count(), .inj_flit(inj_flit[n]), .head_sent(head_sent[n]),
      .credit_in(inj_credit[n])
    );
  end

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", msg, cycle);
    end
  endtask

  // ---------------- packet construction
  int seqno [N];
  function automatic logic [PKT_LEN-1:0][FLIT_DATA_W-1:0] mkpkt(int s, int d, int sq);
    logic [PKT_LEN-1:0][FLIT_DATA_W-1:0] p;
    head_data_t h;
    int dr, dc;
    dr = d / COLS - s / COLS;
    dc = d % COLS - s % COLS;
    h.hx = OFS_W'(dc); h.hy = OFS_W'(dr);
    h.port = xy_port(OFS_W'(dc), OFS_W'(dr));
    h.pay = HEAD_PAY_W'(sq);
    p[0] = h;
    p[1] = {8'(s), 12'(sq)};
    p[2] = 20'(cycle);
    p[3] = {8'(d), 12'(sq)};
    return p;
  endfunction

  int sent_total = 0, recv_total = 0;
  bit got [N][4096];

  // queue a packet from s to d at the next clock edge
  task automatic send(int s, int d);
    push[s] = 1'b1;
    push_pkt[s] = mkpkt(s, d, seqno[s]);
    seqno[s]++;
    sent_total++;
  endtask

  // ---------------- head injection times, per node, FIFO order
  int inj_time [N][$];
  always @(posedge clk) begin
    for (int n = 0; n < N; n++)
      if (head_sent[n]) inj_time[n].push_back(cycle);
  end

  // ---------------- receiver: reassemble per (node, vc)
  int  rx_idx [N][MAX_VC];
  logic [PKT_LEN-1:0][FLIT_DATA_W-1:0] rx_pkt [N][MAX_VC];
  int  rx_head_cycle [N][MAX_VC];
  int  last_latency;   // head latency of last delivered packet
  int  last_src, last_dst;

  always @(posedge clk) begin
    if (rst_n) begin
      for (int n = 0; n < N; n++) begin
        flit_t f;
        f = ej_flit[n];
        if (f.valid) begin
          int v;
          v = int'(f.vc);
          if (rx_idx[n][v] == 0) begin
            head_data_t h;
            h = head_data_t'(f.data);
            check(f.ftype == FT_HEAD, $sformatf("node %0d vc %0d: expected head", n, v));
            check(h.hx == 0 && h.hy == 0 && h.port == P_LOCAL, "head offsets zero at destination");
            rx_head_cycle[n][v] = cycle;
          end else if (rx_idx[n][v] == PKT_LEN - 1) begin
            check(f.ftype == FT_TAIL, "expected tail");
          end else begin
            check(f.ftype == FT_BODY, "expected body");
          end
          rx_pkt[n][v][rx_idx[n][v]] = f.data;
          rx_idx[n][v]++;
          if (rx_idx[n][v] == PKT_LEN) begin
            int s, sq;
            rx_idx[n][v] = 0;
            s  = int'(rx_pkt[n][v][1][19:12]);
            sq = int'(rx_pkt[n][v][1][11:0]);
            check(int'(rx_pkt[n][v][3][19:12]) == n, $sformatf("packet from %0d delivered to wrong node %0d", s, n));
            check(rx_pkt[n][v][3][11:0] == 12'(sq), "sequence words agree");
            check(s < N && !got[s][sq], $sformatf("duplicate packet %0d/%0d", s, sq));
            if (s < N) got[s][sq] = 1'b1;
            recv_total++;
            last_src = s; last_dst = n;
            last_latency = rx_head_cycle[n][v] - inj_time[s].pop_front();
          end
        end
      end
    end
  end

  // ---------------- activity counters
  int n_bypass = 0, n_evc = 0, n_throttle = 0, n_stall = 0, n_conflict = 0;
  int max_evc_run = 0, run = 0;   // consecutive EVC grants at (0,0) East
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) begin
      n_bypass   += $countones(ev_bypass[n]);
      n_evc      += $countones(ev_evc_gnt[n]);
      n_throttle += $countones(ev_throttle[n]);
      n_stall    += $countones(ev_st_stall[n]);
      n_conflict += int'(ev_sa_conflict[n]);
    end
    if (ev_evc_gnt[0][P_EAST]) begin
      run++;
      if (run > max_evc_run) max_evc_run = run;
    end else run = 0;
  end

  task automatic tick();
    @(posedge clk);
    #1;
    push = '0;
  endtask

  task automatic drain(int max_cycles);
    int k;
    k = 0;
    while (recv_total < sent_total && k < max_cycles) begin tick(); k++; end
    check(recv_total == sent_total, $sformatf("all delivered (%0d of %0d)", recv_total, sent_total));
  endtask

  task automatic one(int s, int d, int exp_lat, string what);
    send(s, d);
    tick();
    drain(200);
    check(last_src == s && last_dst == d, {what, ": right packet"});
    check(last_latency == exp_lat, $sformatf("%s: head latency %0d, expected %0d", what, last_latency, exp_lat));
  endtask

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = '0;
    push_pkt = '0;
    for (int n = 0; n < N; n++) seqno[n] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) tick();

    // normal hops: 4 cycles per hop, 3 at the destination router
    one(1, 2, 7,  "1 hop (0,1)->(0,2)");
    one(1, 3, 11, "2 hops (0,1)->(0,3)");
    one(5, 15, 4*4 + 3, "4 hops (1,1)->(3,3)");
    // express path (0,0)->(0,2): source 4 + bypass 1 + sink 3
    one(0, 2, 8,  "EVC (0,0)->(0,2)");
    one(0, 3, 12, "EVC then normal (0,0)->(0,3)");
    one(2, 0, 8,  "EVC (0,2)->(0,0)");
    one(0, 8, 8,  "EVC (0,0)->(2,0)");
    one(13, 12, 7, "1 hop (3,1)->(3,0)");
    one(12, 14, 8, "EVC (3,0)->(3,2)");

    // saturate the express path (0,0)->(0,2) while (0,1) sends east too
    for (int k = 0; k < 40; k++) begin
      send(0, 3);
      if (k % 2 == 0) send(1, 3);
      send(4, 6);
      tick();
    end
    drain(3000);
    check(max_evc_run <= 3, $sformatf("EVC run at source limited to 3 (saw %0d)", max_evc_run));
    check(max_evc_run == 3, "EVC runs reach the limit under load");

    // random all-to-all traffic
    for (int k = 0; k < 600; k++) begin
      for (int s = 0; s < N; s++)
        if ($urandom_range(0, 99) < 8) begin
          int d;
          d = $urandom_range(0, N - 2);
          if (d >= s) d++;
          send(s, d);
        end
      tick();
    end
    drain(20000);

    $display("events: bypass=%0d evc_gnt=%0d throttle=%0d st_stall=%0d sa_conflict=%0d sent=%0d",
             n_bypass, n_evc, n_throttle, n_stall, n_conflict, sent_total);
    check(n_bypass > 0, "EVC bypass happened");
    check(n_evc > 0, "EVC allocation happened");
    check(n_throttle > 0, "starvation limit engaged");
    check(n_stall > 0, "normal flit held by bypassing EVC flit");
    check(n_conflict > 0, "switch contention happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
