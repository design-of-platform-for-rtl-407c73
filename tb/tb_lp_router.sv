// tb_lp_router: one router in the place of node (0,1) of the default 4x4
// mesh: its West input bypasses the row path (0,0)->(0,2) and its South
// output sources the column path (0,1)->(2,1). The testbench plays all
// neighbours: upstream drivers honour the router's credits, downstream
// models take every flit and return its credit two cycles later.
// Checks:
//   - a normal packet Local->East leaves 3 cycles after each flit enters
//     (BW, SVA, ST), head offsets moved by one hop, on VC 1, the highest
//     normal VC of the downstream sink port (last idle VC policy);
//   - an EVC flit on the West input leaves East in the same cycle, marked
//     as EVC, and express credits from East are passed to West;
//   - a packet Local->(3,1) goes express South: on lane 3 (express lanes
//     are 2 and 3 downstream), HY moved by the 2 hops of the path;
//   - a second router with non-aggressive bypass (and maximum-credit VC
//     selection) delivers the same EVC flit one cycle later;
//   - under mixed random load every packet arrives whole at the right
//     output, EVC grants at the source come in runs of at most 3, and the
//     bypass, EVC grant, throttle, stall and conflict events all occur.
//
// The expected stage timing and EVC roles follow the original design; the
// router position in the mesh and the traffic are this test's own choice.
module tb_lp_router;
  import noc_pkg::*;
  localparam int DEPTH = 4;
  localparam in_cfg_arr_t  ICFG = router_in_cfg(0, 1, default_evc_paths(), 16, 4, 2);
  localparam out_cfg_arr_t OCFG = router_out_cfg(0, 1, 4, 4, default_evc_paths(), 16, 4, 2);

  logic clk = 0, rst_n = 0;
  flit_t   [NPORTS-1:0] fin, fout;
  logic    [NPORTS-1:0] ein, eout;
  credit_t [NPORTS-1:0] cin, cout;
  logic    [NPORTS-1:0][MAX_VC-1:0][$clog2(DEPTH+1)-1:0] vcc;
  logic    [NPORTS-1:0] ev_bypass, ev_evc_gnt, ev_throttle, ev_st_stall;
  logic    ev_sa_conflict;
  int checks = 0, failures = 0, cyc = 0;
  typedef struct { flit_t f; bit e; int t; } obs_t;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  lp_router #(.DEPTH(DEPTH), .IN_CFG(ICFG), .OUT_CFG(OCFG)) dut (
    .clk(clk), .rst_n(rst_n), .flits_in(fin), .evc_flag_in(ein), .credits_in(cin),
    .flits_out(fout), .evc_flag_out(eout), .credits_out(cout), .vc_count(vcc),
    .ev_bypass(ev_bypass), .ev_evc_gnt(ev_evc_gnt), .ev_throttle(ev_throttle),
    .ev_st_stall(ev_st_stall), .ev_sa_conflict(ev_sa_conflict));

  // second router with non-aggressive bypass and maximum-credit VC
  // selection, fed only the EVC flits arriving on West (which it does not
  // buffer); only its bypass timing is checked
  flit_t [NPORTS-1:0] fout_na, fin_na;
  always_comb begin
    fin_na = '0;
    if (ein[P_WEST]) fin_na[P_WEST] = fin[P_WEST];
  end
  logic  [NPORTS-1:0] eout_na;
  lp_router #(.DEPTH(DEPTH), .IN_CFG(ICFG), .OUT_CFG(OCFG), .AGGRESSIVE(1'b0),
              .VC_SELECT(VCSEL_MAX_CREDIT)) dut_na (
    .clk(clk), .rst_n(rst_n), .flits_in(fin_na), .evc_flag_in(ein), .credits_in('0),
    .flits_out(fout_na), .evc_flag_out(eout_na), .credits_out(), .vc_count(),
    .ev_bypass(), .ev_evc_gnt(), .ev_throttle(), .ev_st_stall(), .ev_sa_conflict());
  obs_t olog_na [$];
  always @(posedge clk) if (rst_n && fout_na[P_EAST].valid) olog_na.push_back('{fout_na[P_EAST], eout_na[P_EAST], cyc});

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (cycle %0d)", msg, cyc); end
  endtask

  // ---------------- upstream drivers: queue of (flit, evc) per input
  flit_t qf [NPORTS][$];
  bit    qe [NPORTS][$];
  int    upc [NPORTS][MAX_VC];   // credits held by the upstream driver
  always @(negedge clk) begin
    for (int i = 0; i < NPORTS; i++) begin
      fin[i] = '0;
      ein[i] = 1'b0;
      if (qf[i].size() > 0 && rst_n) begin
        if (qe[i][0] && ICFG[i].bypass) begin
          fin[i] = qf[i].pop_front();
          ein[i] = qe[i].pop_front();
        end else if (upc[i][qf[i][0].vc] > 0) begin
          upc[i][qf[i][0].vc]--;
          fin[i] = qf[i].pop_front();
          ein[i] = qe[i].pop_front();
        end
      end
    end
  end
  always @(posedge clk) if (rst_n)
    for (int i = 0; i < NPORTS; i++)
      for (int v = 0; v < MAX_VC; v++)
        if (cout[i].nvc[v] || cout[i].evc[v]) upc[i][v]++;

  // ---------------- downstream: credits back after two cycles
  credit_t [NPORTS-1:0] c1, c2, extra;
  always @(posedge clk) begin
    for (int o = 0; o < NPORTS; o++) begin
      c1[o] <= '0;
      if (fout[o].valid && !(eout[o] && OCFG[o].bypass)) begin
        if (eout[o]) c1[o].evc[fout[o].vc] <= 1'b1;
        else         c1[o].nvc[fout[o].vc] <= 1'b1;
      end
    end
    c2 <= c1;
  end
  always_comb for (int o = 0; o < NPORTS; o++) cin[o] = c2[o] | extra[o];

  // ---------------- output log
  obs_t olog [NPORTS][$];
  always @(posedge clk) if (rst_n)
    for (int o = 0; o < NPORTS; o++)
      if (fout[o].valid) olog[o].push_back('{fout[o], eout[o], cyc});

  function automatic flit_t mk(flit_type_e t, int vc, logic [19:0] d);
    flit_t f;
    f.valid = 1'b1; f.ftype = t; f.vc = VC_W'(vc); f.data = d;
    return f;
  endfunction

  function automatic logic [19:0] head(int hx, int hy, int id);
    head_data_t h;
    h.hx = OFS_W'(hx); h.hy = OFS_W'(hy); h.port = xy_port(OFS_W'(hx), OFS_W'(hy));
    h.pay = HEAD_PAY_W'(id);
    return h;
  endfunction

  function automatic int hx_of(logic [19:0] d);
    head_data_t h;
    h = head_data_t'(d);
    return int'(h.hx);
  endfunction

  function automatic int pay_of(logic [19:0] d);
    head_data_t h;
    h = head_data_t'(d);
    return int'(h.pay);
  endfunction

  task automatic send_pkt(int i, int vc, int hx, int hy, int id, bit evc = 0);
    for (int k = 0; k < PKT_LEN; k++) begin
      qf[i].push_back(mk(k == 0 ? FT_HEAD : (k == PKT_LEN - 1 ? FT_TAIL : FT_BODY), vc,
                         k == 0 ? head(hx, hy, id) : {12'(id), 8'(k)}));
      qe[i].push_back(evc);
    end
  endtask

  // event counters
  int n_byp = 0, n_gnt = 0, n_thr = 0, n_stall = 0, n_conf = 0, run = 0, maxrun = 0;
  always @(posedge clk) if (rst_n) begin
    n_byp += $countones(ev_bypass); n_gnt += $countones(ev_evc_gnt);
    n_thr += $countones(ev_throttle); n_stall += $countones(ev_st_stall);
    n_conf += int'(ev_sa_conflict);
    if (ev_evc_gnt[P_SOUTH]) begin run++; if (run > maxrun) maxrun = run; end else run = 0;
  end

  task automatic idle(int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  initial begin
    int t0;
    extra = '0;
    for (int i = 0; i < NPORTS; i++)
      for (int v = 0; v < MAX_VC; v++) upc[i][v] = DEPTH;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    idle(2);

    // ---- normal packet Local -> East, destination (0,3)
    t0 = cyc;   // driven at the next negedge, sampled at the edge after
    send_pkt(P_LOCAL, 3, 2, 0, 1);
    idle(12);
    check(olog[P_EAST].size() == PKT_LEN, "normal packet out East");
    for (int k = 0; k < PKT_LEN && k < olog[P_EAST].size(); k++) begin
      check(olog[P_EAST][k].t == t0 + k + 3, $sformatf("flit %0d leaves 3 cycles after entering (%0d)", k, olog[P_EAST][k].t - t0 - k));
      check(olog[P_EAST][k].f.vc == 1 && !olog[P_EAST][k].e, "on normal VC 1");
    end
    if (olog[P_EAST].size() > 0) begin
      head_data_t h;
      h = head_data_t'(olog[P_EAST][0].f.data);
      check(h.hx == 1 && h.hy == 0 && h.port == P_EAST, "head moved one hop");
    end
    olog[P_EAST].delete();

    // ---- EVC flit bypassing West -> East
    t0 = cyc;
    send_pkt(P_WEST, 2, 1, 0, 2, 1);
    idle(8);
    check(olog[P_EAST].size() == PKT_LEN, "bypassed packet out East");
    for (int k = 0; k < PKT_LEN && k < olog[P_EAST].size(); k++) begin
      check(olog[P_EAST][k].t == t0 + k, "bypass in the same cycle");
      check(olog[P_EAST][k].e && olog[P_EAST][k].f.vc == 2, "bypass keeps EVC flag and lane");
    end
    check(olog[P_EAST].size() > 0 && hx_of(olog[P_EAST][0].f.data) == 1, "bypass leaves head unchanged");
    // non-aggressive bypass: through the output register, one cycle later
    check(olog_na.size() >= PKT_LEN, "non-aggressive router bypassed the packet");
    for (int k = 0; k < PKT_LEN && k < olog_na.size(); k++)
      check(olog_na[olog_na.size() - PKT_LEN + k].t == t0 + k + 1 && olog_na[olog_na.size() - PKT_LEN + k].e,
            "non-aggressive bypass takes two cycles");
    olog[P_EAST].delete();
    @(negedge clk);
    extra[P_EAST].evc[3] = 1'b1;
    #1;
    check(cout[P_WEST].evc[3], "express credit passed upstream");
    @(negedge clk);
    extra = '0;

    // ---- EVC packet sourced South: Local -> (3,1)
    send_pkt(P_LOCAL, 0, 0, 3, 3);
    idle(12);
    check(olog[P_SOUTH].size() == PKT_LEN, "EVC packet out South");
    for (int k = 0; k < PKT_LEN && k < olog[P_SOUTH].size(); k++)
      check(olog[P_SOUTH][k].e && olog[P_SOUTH][k].f.vc == 3, "EVC packet on express lane 3");
    if (olog[P_SOUTH].size() > 0) begin
      head_data_t h;
      h = head_data_t'(olog[P_SOUTH][0].f.data);
      check(h.hx == 0 && h.hy == 1 && h.port == P_SOUTH, "head moved over the 2-hop path");
    end
    // the express lane credits come back from the sink
    olog[P_SOUTH].delete();

    // ---- mixed load
    begin
      int id, exp_out [int];
      bit exp_evc [int];
      id = 10;
      for (int k = 0; k < 30; k++) begin
        // express stream Local -> South (to (2,1)); normal North->South and West->South
        send_pkt(P_LOCAL, k % 4, 0, 2, id, 0); exp_out[id] = P_SOUTH; exp_evc[id] = 1; id++;
        send_pkt(P_WEST, k % 4, 0, 1, id, 0);  exp_out[id] = P_SOUTH; exp_evc[id] = 0; id++;
        // row traffic: bypass flits and normal East packets from Local and West
        if (k % 3 == 0) begin send_pkt(P_WEST, 2 + k % 2, 1, 0, id, 1); exp_out[id] = P_EAST; exp_evc[id] = 1; id++; end
        if (k % 2 == 0) begin send_pkt(P_NORTH, k % 4, 1, 0, id, 0); exp_out[id] = P_EAST; exp_evc[id] = 0; id++; end
        if (k % 5 == 0) begin send_pkt(P_EAST, k % 2, -1, 0, id, 0); exp_out[id] = P_WEST; exp_evc[id] = 0; id++; end
      end
      idle(3000);
      // reassemble per output and VC
      begin
        int cnt, cur [NPORTS][2*MAX_VC], pos [NPORTS][2*MAX_VC];
        cnt = 0;
        for (int o = 0; o < NPORTS; o++)
          for (int v = 0; v < 2*MAX_VC; v++) begin cur[o][v] = -1; pos[o][v] = 0; end
        for (int o = 0; o < NPORTS; o++)
          foreach (olog[o][j]) begin
            flit_t f;
            int v;
            f = olog[o][j].f;
            v = int'(f.vc) + (olog[o][j].e ? MAX_VC : 0);   // express lanes share indices
            if (pos[o][v] == 0) begin
              cur[o][v] = pay_of(f.data);
              check(f.ftype == FT_HEAD, "head first");
              check(exp_out.exists(cur[o][v]) && exp_out[cur[o][v]] == o, $sformatf("packet %0d at output %0d", cur[o][v], o));
              check(exp_evc.exists(cur[o][v]) && exp_evc[cur[o][v]] == olog[o][j].e, $sformatf("packet %0d express flag", cur[o][v]));
              if (exp_out.exists(cur[o][v])) exp_out.delete(cur[o][v]);
            end else begin
              check(f.data == {12'(cur[o][v]), 8'(pos[o][v])}, "body flit follows its head");
            end
            pos[o][v] = (pos[o][v] + 1) % PKT_LEN;
            if (pos[o][v] == 0) cnt++;
          end
        check(exp_out.size() == 0, $sformatf("all packets out (%0d left)", exp_out.size()));
      end
      check(maxrun <= 3, $sformatf("EVC run at source %0d <= 3", maxrun));
      $display("events: bypass=%0d evc_gnt=%0d throttle=%0d st_stall=%0d sa_conflict=%0d", n_byp, n_gnt, n_thr, n_stall, n_conf);
      check(n_byp > 0 && n_gnt > 0 && n_thr > 0 && n_stall > 0 && n_conf > 0, "all router events seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
