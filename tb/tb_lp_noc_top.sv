// tb_lp_noc_top: end-to-end test of the whole platform at its default
// configuration (4x4 mesh, 4 VCs of depth 4, 16 EVC paths, aggressive
// bypass, ON:OFF 3:1, last-idle VC selection, clock gating, one link stage,
// 2048-packet source queues).
//
// The traffic generators run three workloads one after another, each for
// 3000 cycles at 0.075 packet/cycle/node (0.3 flit/cycle/node): uniform
// random, transpose, and locality traffic with alpha = 1 (destinations at
// hop distance d weighted by 1 + 1/(d+1), set up through the group
// pattern). Then injection stops and the network drains.
//
// Every ejected packet is reassembled per ejection VC and checked: head
// type and zero offsets, destination word equal to the ejecting node,
// source and sequence words consistent, no duplicates. At the end all
// generated packets must have arrived, no source queue may have overflowed,
// the VC occupancy histograms must add up to the measured cycles, and each
// mechanism must have happened at least once: EVC bypass, EVC allocation,
// ON:OFF throttling, a normal flit stalled by a bypassing EVC flit, and
// switch allocation conflicts. Finally one node is overloaded until its
// source queue overflows: the overflow flag must rise, and every packet the
// queue accepted must still arrive. Average packet latency per workload is
// printed.
//
// The traffic patterns and the reported quantities (latency, active-VC
// counts) follow the original platform's experiments; the rate, run lengths
// and the overload phase are this test's own choice.
module tb_lp_noc_top;
  import noc_pkg::*;
  localparam int ROWS = 4, COLS = 4, N = 16, NGRP = N - 1;
  localparam int PHASE = 3000, WARMUP = 500;
  localparam logic [15:0] RATE = 16'd4915;   // 0.075 * 65536

  logic clk = 0, rst_n = 0;
  logic tg_enable = 0, measure = 0, measure_clear = 0;
  logic [1:0] pattern = 0;
  logic [N-1:0][15:0] rate;
  logic [N-1:0][NGRP-1:0][15:0] grp_cum;
  logic [N-1:0][NGRP-1:0][N-1:0] grp_mask;
  logic [31:0] time_now;
  logic [N-1:0] gen_valid, head_sent, sq_overflow;
  flit_t [N-1:0] ej_flit;
  logic [N-1:0][11:0] sq_count;
  logic [N-1:0][NPORTS-1:0][MAX_VC:0][31:0] vc_hist;
  logic [N-1:0][NPORTS-1:0][MAX_VC-1:0][2:0] vc_max_occ;
  logic [N-1:0][NPORTS-1:0] ev_bypass, ev_evc_gnt, ev_throttle, ev_st_stall;
  logic [N-1:0] ev_sa_conflict;

  always #5 clk = ~clk;

  lp_noc_top dut (
    .clk(clk), .rst_n(rst_n), .tg_enable(tg_enable), .pattern(pattern), .rate(rate),
    .grp_cum(grp_cum), .grp_mask(grp_mask), .measure(measure), .measure_clear(measure_clear),
    .time_now(time_now), .gen_valid(gen_valid), .head_sent(head_sent), .ej_flit(ej_flit),
    .sq_count(sq_count), .sq_overflow(sq_overflow), .vc_hist(vc_hist), .vc_max_occ(vc_max_occ),
    .ev_bypass(ev_bypass), .ev_evc_gnt(ev_evc_gnt), .ev_throttle(ev_throttle),
    .ev_st_stall(ev_st_stall), .ev_sa_conflict(ev_sa_conflict));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (time %0d)", msg, time_now); end
  endtask

  // ---------------- scoreboard
  int generated = 0, delivered = 0, dropped = 0;
  bit got [N][4096];
  int exp_seq [N];
  longint lat_sum = 0;
  int lat_n = 0;
  int rx_idx [N][MAX_VC];
  logic [PKT_LEN-1:0][FLIT_DATA_W-1:0] rx [N][MAX_VC];

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) begin
      if (gen_valid[n]) generated++;
      if (gen_valid[n] && sq_count[n] == 12'd2048) dropped++;   // push into a full queue
      if (ej_flit[n].valid) begin
        flit_t f;
        int v;
        f = ej_flit[n];
        v = int'(f.vc);
        if (rx_idx[n][v] == 0) begin
          head_data_t h;
          h = head_data_t'(f.data);
          check(f.ftype == FT_HEAD, "head flit first");
          check(h.hx == 0 && h.hy == 0 && h.port == P_LOCAL, "offsets zero at destination");
        end else begin
          check(f.ftype == ((rx_idx[n][v] == PKT_LEN - 1) ? FT_TAIL : FT_BODY), "flit type");
        end
        rx[n][v][rx_idx[n][v]] = f.data;
        rx_idx[n][v]++;
        if (rx_idx[n][v] == PKT_LEN) begin
          int s, sq;
          rx_idx[n][v] = 0;
          s  = int'(rx[n][v][1][19:12]);
          sq = int'(rx[n][v][1][11:0]);
          check(int'(rx[n][v][3][19:12]) == n, "packet at its destination");
          check(rx[n][v][3][11:0] == 12'(sq), "sequence words agree");
          check(s < N && s != n, "valid source");
          if (s < N) begin
            check(!got[s][sq], "no duplicate");
            got[s][sq] = 1'b1;
          end
          if (measure) begin
            lat_sum += longint'((time_now[19:0] - rx[n][v][2]) & 20'hFFFFF);
            lat_n++;
          end
          delivered++;
        end
      end
    end
  end

  // ---------------- mechanism counters
  int n_bypass = 0, n_evc = 0, n_throttle = 0, n_stall = 0, n_conflict = 0;
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) begin
      n_bypass   += $countones(ev_bypass[n]);
      n_evc      += $countones(ev_evc_gnt[n]);
      n_throttle += $countones(ev_throttle[n]);
      n_stall    += $countones(ev_st_stall[n]);
      n_conflict += int'(ev_sa_conflict[n]);
    end
  end

  // ---------------- locality traffic setup (alpha = 1)
  task automatic setup_locality();
    grp_cum = '0;
    grp_mask = '0;
    for (int s = 0; s < N; s++) begin
      real w [7], tot, acc;
      int nd [7];
      tot = 0.0;
      for (int d = 0; d < 7; d++) begin nd[d] = 0; w[d] = 1.0 + 1.0 / real'(d + 1); end
      for (int t = 0; t < N; t++) begin
        int d;
        d = ((t / COLS > s / COLS) ? t / COLS - s / COLS : s / COLS - t / COLS) +
            ((t % COLS > s % COLS) ? t % COLS - s % COLS : s % COLS - t % COLS);
        if (d > 0) begin
          nd[d]++;
          grp_mask[s][d - 1][t] = 1'b1;
        end
      end
      for (int d = 1; d < 7; d++) tot += real'(nd[d]) * w[d];
      acc = 0.0;
      for (int d = 1; d < 7; d++) begin
        acc += real'(nd[d]) * w[d] / tot;
        grp_cum[s][d - 1] = 16'(int'(acc * real'(RATE)));
      end
    end
  endtask

  task automatic run_phase(input int pat, input string name);
    longint s0;
    int n0;
    pattern = 2'(pat);
    tg_enable = 1;
    repeat (WARMUP) @(posedge clk);
    #1;
    s0 = lat_sum; n0 = lat_n;
    measure = 1;
    repeat (PHASE - WARMUP) @(posedge clk);
    #1;
    measure = 0;
    $display("%s: average latency %0d.%02d cycles over %0d packets", name,
             (lat_sum - s0) / longint'(lat_n - n0 > 0 ? lat_n - n0 : 1),
             ((lat_sum - s0) * 100 / longint'(lat_n - n0 > 0 ? lat_n - n0 : 1)) % 100, lat_n - n0);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  initial begin
    for (int n = 0; n < N; n++) rate[n] = RATE;
    grp_cum = '0; grp_mask = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    measure_clear = 1;
    @(posedge clk); #1;
    measure_clear = 0;

    run_phase(0, "uniform 0.075");
    run_phase(1, "transpose 0.075");
    setup_locality();
    run_phase(2, "locality alpha=1 0.075");
    tg_enable = 0;

    // drain
    for (int k = 0; k < 20000 && delivered < generated; k++) @(posedge clk);
    #1;
    $display("generated %0d delivered %0d", generated, delivered);
    check(generated > 3000, "traffic was generated");
    check(delivered == generated, "every generated packet delivered");
    check(sq_overflow == '0, "no source queue overflow");

    // overload: node 5 alone sends to node 6 at almost one packet per cycle,
    // four times what its link can carry, until its source queue overflows
    for (int n = 0; n < N; n++) rate[n] = 16'd0;
    rate[5] = 16'hFFFF;
    grp_cum = '0; grp_mask = '0;
    grp_cum[5][0] = 16'hFFFF; grp_mask[5][0][6] = 1'b1;
    pattern = 2'd2;
    tg_enable = 1;
    for (int k = 0; k < 6000 && !sq_overflow[5]; k++) @(posedge clk);
    repeat (20) @(posedge clk);
    #1;
    tg_enable = 0;
    check(sq_overflow[5], "source queue overflow under overload");
    check(sq_overflow[4:0] == '0 && sq_overflow[15:6] == '0, "only the overloaded queue overflowed");
    for (int k = 0; k < 20000 && delivered + dropped < generated; k++) @(posedge clk);
    #1;
    $display("overload: generated %0d delivered %0d dropped %0d", generated, delivered, dropped);
    check(dropped > 0, "packets dropped at the full queue");
    check(delivered + dropped == generated, "every accepted packet delivered");
    // occupancy histograms count every measured cycle once
    for (int n = 0; n < N; n++)
      for (int p = 0; p < NPORTS; p++) begin
        longint s;
        s = 0;
        for (int a = 0; a <= MAX_VC; a++) s += vc_hist[n][p][a];
        check(s == 3 * (PHASE - WARMUP), "histogram covers the measured cycles");
      end
    $display("events: bypass=%0d evc_gnt=%0d throttle=%0d st_stall=%0d sa_conflict=%0d",
             n_bypass, n_evc, n_throttle, n_stall, n_conflict);
    check(n_bypass > 0, "EVC bypass happened");
    check(n_evc > 0, "EVC allocation happened");
    check(n_throttle > 0, "ON:OFF throttle engaged");
    check(n_stall > 0, "normal flit stalled by EVC bypass");
    check(n_conflict > 0, "switch allocation conflict happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
