// lp_router: low-power virtual-channel router for a 2-D mesh, with express
// virtual channel (EVC) support.
//
// Pipeline. A flit spends four cycles per hop:
//   BW  - the flit on flits_in is written into the VC lane of its input port
//         (vc_buffer); storage clocks are gated off for idle lanes.
//   SVA - combined VC and switch allocation (sva_allocator). The winner is
//         popped from its lane into the input's switch register, a credit
//         goes back upstream, and a head flit is given its downstream VC.
//   ST  - the flit crosses the crossbar into the output register; a head
//         flit's route fields are rewritten for the next router (route_xy).
//   LT  - the output register drives flits_out onto the link (link_pipe).
// Routing is X-Y and one hop ahead: the head flit already names its output
// port here, so no separate route stage exists.
//
// Flow control is credit based per VC. A downstream VC is allocated to a
// head flit only when it is idle; with VC_SELECT = VCSEL_LAST_IDLE it must
// also be empty (all credits back) and the highest-numbered such VC is
// taken; with VCSEL_MAX_CREDIT the idle VC holding most credits is taken. A
// VC released by a tail flit can be allocated again from the next cycle.
//
// Express virtual channels. Static EVC paths (straight runs of the mesh)
// are given through the port configuration:
//   source - a head flit whose X-Y route runs along the whole path at an
//            output with out_cfg.evc_len > 0 is an EVC packet. It is given an
//            express lane at the sink router instead of a normal VC, the
//            HX/HY rewrite covers the whole path, and at this output EVC
//            requests beat normal ones, limited by evc_throttle.
//   bypass - at an input with in_cfg.bypass, a flit marked by evc_flag_in is
//            not buffered. With AGGRESSIVE set it goes straight to the output
//            link in the same cycle (one cycle per bypass router); otherwise
//            it takes the output register first (two cycles). A normal flit
//            waiting for that output is held in its switch register.
//            Express-lane credits coming back are passed upstream unchanged.
//   sink   - an input with in_cfg.nevc > 0 has express lanes numbered after
//            its normal VCs; from there the packet proceeds normally.
// The configuration structures are computed by noc_pkg from the mesh size
// and the EVC path list (see lp_mesh).
//
// What follows the document: 4-stage BW/SVA/ST/LT pipeline with merged
// allocators, X-Y routing, EVC source/bypass/sink roles, aggressive and
// non-aggressive bypass, the ON:OFF starvation limit, clock gating, the two
// VC selection options and configurable buffer sizes. This design's own
// choices: look-ahead routing, input-first separable allocation with
// round-robin arbiters, the credit encoding, and holding normal flits in the
// switch register while EVC flits pass.
module lp_router
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH        = 4,            // flits per VC lane
  parameter in_cfg_arr_t  IN_CFG  = {NPORTS{in_cfg_t'{nvc: 4'(MAX_VC), nevc: 4'd0, bypass: 1'b0}}},
  parameter out_cfg_arr_t OUT_CFG = {NPORTS{out_cfg_t'{down_nvc: 4'(MAX_VC), evc_len: 4'd0,
                                                              evc_base: 4'd0, nevc: 4'd0, bypass: 1'b0}}},
  parameter bit          AGGRESSIVE   = 1'b1,
  parameter vc_sel_e     VC_SELECT    = VCSEL_LAST_IDLE,
  parameter int unsigned EVC_ON       = 3,
  parameter int unsigned EVC_OFF      = 1,
  parameter bit          CLOCK_GATING = 1'b1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  flit_t   [NPORTS-1:0]      flits_in,
  input  logic    [NPORTS-1:0]      evc_flag_in,
  input  credit_t [NPORTS-1:0]      credits_in,    // from downstream of each output
  output flit_t   [NPORTS-1:0]      flits_out,
  output logic    [NPORTS-1:0]      evc_flag_out,
  output credit_t [NPORTS-1:0]      credits_out,   // to upstream of each input
  // activity, for utilisation monitoring and tests
  output logic    [NPORTS-1:0][MAX_VC-1:0][$clog2(DEPTH+1)-1:0] vc_count,
  output logic    [NPORTS-1:0]      ev_bypass,     // EVC flit bypassed through output
  output logic    [NPORTS-1:0]      ev_evc_gnt,    // EVC flit granted at source output
  output logic    [NPORTS-1:0]      ev_throttle,   // EVC masked by starvation limit
  output logic    [NPORTS-1:0]      ev_st_stall,   // normal flit held by passing EVC flit
  output logic                      ev_sa_conflict
);
  localparam int unsigned CW = $clog2(DEPTH+1);

  // ---------------------------------------------------------------- BW
  flit_t [NPORTS-1:0][MAX_VC-1:0] vhead;
  logic  [NPORTS-1:0][MAX_VC-1:0] vempty, vpop;
  logic  [NPORTS-1:0]             is_byp_in;

  for (genvar i = 0; i < NPORTS; i++) begin : g_buf
    assign is_byp_in[i] = IN_CFG[i].bypass && flits_in[i].valid && evc_flag_in[i];
    vc_buffer #(.DEPTH(DEPTH), .NUM_VC(int'(IN_CFG[i].nvc) + int'(IN_CFG[i].nevc)),
                .CLOCK_GATING(CLOCK_GATING)) u_buf (
      .clk(clk), .rst_n(rst_n),
      .wr_en(flits_in[i].valid && !is_byp_in[i]), .wr_flit(flits_in[i]),
      .rd_en(vpop[i]), .head(vhead[i]), .empty(vempty[i]), .count(vc_count[i])
    );
  end

  // ---------------------------------------------------------------- VC state
  logic  [NPORTS-1:0][MAX_VC-1:0]            act, act_evc;
  port_e [NPORTS-1:0][MAX_VC-1:0]            act_port;
  logic  [NPORTS-1:0][MAX_VC-1:0][VC_W-1:0]  act_ovc;

  // output side: credits and reservations of downstream VCs / express lanes
  logic [NPORTS-1:0][MAX_VC-1:0][CW-1:0] ncred, ecred;
  logic [NPORTS-1:0][MAX_VC-1:0]         nres, eres;

  // requests
  logic  [NPORTS-1:0][MAX_VC-1:0]            rq, rq_new, rq_evc;
  port_e [NPORTS-1:0][MAX_VC-1:0]            rq_port;
  logic  [NPORTS-1:0][MAX_VC-1:0][VC_W-1:0]  rq_ovc;

  always_comb begin
    for (int i = 0; i < NPORTS; i++)
      for (int v = 0; v < MAX_VC; v++) begin
        head_data_t hd;
        port_e p;
        logic is_head;
        hd = head_data_t'(vhead[i][v].data);
        is_head = vhead[i][v].ftype == FT_HEAD || vhead[i][v].ftype == FT_HT;
        p = act[i][v] ? act_port[i][v] : port_e'(hd.port);
        rq[i][v]      = !vempty[i][v] && (act[i][v] || is_head);
        rq_new[i][v]  = !act[i][v];
        rq_port[i][v] = p;
        rq_ovc[i][v]  = act_ovc[i][v];
        if (act[i][v]) rq_evc[i][v] = act_evc[i][v];
        else begin
          // EVC packet: its X-Y route covers the whole path sourced at p
          rq_evc[i][v] = 1'b0;
          if (OUT_CFG[p].evc_len != 0) begin
            case (p)
              P_EAST:  rq_evc[i][v] = hd.hx >= $signed({1'b0, OUT_CFG[p].evc_len});
              P_WEST:  rq_evc[i][v] = -hd.hx >= $signed({1'b0, OUT_CFG[p].evc_len});
              P_SOUTH: rq_evc[i][v] = hd.hx == 0 && hd.hy >= $signed({1'b0, OUT_CFG[p].evc_len});
              P_NORTH: rq_evc[i][v] = hd.hx == 0 && -hd.hy >= $signed({1'b0, OUT_CFG[p].evc_len});
              default: rq_evc[i][v] = 1'b0;
            endcase
          end
        end
      end
  end

  // ---------------------------------------------------------------- VC selection
  logic [NPORTS-1:0]             nany, eany;
  logic [NPORTS-1:0][VC_W-1:0]   npick, epick;
  logic [NPORTS-1:0][MAX_VC-1:0] nok, eok;

  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      logic [CW-1:0] best;
      nany[o] = 1'b0; eany[o] = 1'b0;
      npick[o] = '0;  epick[o] = '0;
      best = '0;
      for (int v = 0; v < MAX_VC; v++) begin
        nok[o][v] = ncred[o][v] != '0;
        eok[o][v] = ecred[o][v] != '0;
        if (v < int'(OUT_CFG[o].down_nvc) && !nres[o][v]) begin
          if (VC_SELECT == VCSEL_LAST_IDLE) begin
            if (ncred[o][v] == CW'(DEPTH)) begin
              nany[o] = 1'b1; npick[o] = VC_W'(v);
            end
          end else if (ncred[o][v] != '0 && (!nany[o] || ncred[o][v] > best)) begin
            nany[o] = 1'b1; npick[o] = VC_W'(v); best = ncred[o][v];
          end
        end
      end
      for (int v = 0; v < MAX_VC; v++) begin
        if (v >= int'(OUT_CFG[o].evc_base) &&
            v < int'(OUT_CFG[o].evc_base) + int'(OUT_CFG[o].nevc) &&
            OUT_CFG[o].evc_len != 0 && !eres[o][v] && ecred[o][v] == CW'(DEPTH)) begin
          eany[o] = 1'b1; epick[o] = VC_W'(v);
        end
      end
    end
  end

  // ---------------------------------------------------------------- SVA
  logic  [NPORTS-1:0]            in_ready, out_ready, in_gnt, out_gnt_evc, evc_block;
  logic  [NPORTS-1:0][VC_W-1:0]  gnt_vc;
  port_e [NPORTS-1:0]            gnt_port;

  sva_allocator u_alloc (
    .clk(clk), .rst_n(rst_n),
    .req(rq), .req_port(rq_port), .req_new(rq_new), .req_evc(rq_evc), .req_ovc(rq_ovc),
    .in_ready(in_ready), .out_ready(out_ready),
    .nvc_any_free(nany), .evc_any_free(eany),
    .nvc_credit_ok(nok), .evc_credit_ok(eok), .evc_block(evc_block),
    .in_gnt(in_gnt), .in_gnt_vc(gnt_vc), .in_gnt_port(gnt_port),
    .out_gnt_evc(out_gnt_evc), .sa_conflict(ev_sa_conflict)
  );

  for (genvar o = 0; o < NPORTS; o++) begin : g_thr
    if (OUT_CFG[o].evc_len != 0) begin : g_src
      evc_throttle #(.ON_LIMIT(EVC_ON), .OFF_LIMIT(EVC_OFF)) u_thr (
        .clk(clk), .rst_n(rst_n), .evc_gnt(out_gnt_evc[o]), .evc_block(evc_block[o])
      );
    end else begin : g_nosrc
      assign evc_block[o] = 1'b0;
    end
  end
  assign ev_evc_gnt  = out_gnt_evc;
  assign ev_throttle = evc_block;

  // ---------------------------------------------------------------- ST registers
  flit_t [NPORTS-1:0]      st_flit;
  logic  [NPORTS-1:0]      st_evc;
  port_e [NPORTS-1:0]      st_port;
  logic  [NPORTS-1:0]      st_fire;
  flit_t [NPORTS-1:0]      out_reg;
  logic  [NPORTS-1:0]      out_evc;
  logic  [NPORTS-1:0]      byp_v, out_go, out_free;
  flit_t [NPORTS-1:0]      byp_flit;
  logic  [NPORTS-1:0][NPORTS-1:0] xsel;
  flit_t [NPORTS-1:0]      xin, xout, st_rw;
  logic  [NPORTS-1:0]      xevc;

  // EVC flit arriving to bypass through output o
  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      port_e ip;
      ip = opposite(port_e'(o));
      byp_v[o]    = OUT_CFG[o].bypass && o != int'(P_LOCAL) && is_byp_in[ip];
      byp_flit[o] = flits_in[ip];
    end
  end

  // head rewrite for the next router, in each input's switch register
  for (genvar i = 0; i < NPORTS; i++) begin : g_rw
    route_xy u_rw (
      .flit_in(st_flit[i]), .out_port(st_port[i]),
      .hops(st_evc[i] ? OUT_CFG[st_port[i]].evc_len : 4'd1),
      .flit_out(st_rw[i])
    );
  end

  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      if (AGGRESSIVE) begin
        out_go[o]   = !byp_v[o];                 // link free of EVC flits
        out_free[o] = !out_reg[o].valid || out_go[o];
      end else begin
        out_go[o]   = 1'b1;
        out_free[o] = !byp_v[o];                 // EVC flit takes the register
      end
    end
    for (int i = 0; i < NPORTS; i++) begin
      st_fire[i] = st_flit[i].valid && out_free[st_port[i]];
      in_ready[i] = !st_flit[i].valid || st_fire[i];
    end
    for (int o = 0; o < NPORTS; o++) begin
      out_ready[o] = 1'b1;
      for (int i = 0; i < NPORTS; i++)
        if (st_flit[i].valid && st_port[i] == port_e'(o) && !st_fire[i]) out_ready[o] = 1'b0;
      if (!out_free[o]) out_ready[o] = 1'b0;
      ev_st_stall[o] = 1'b0;
      for (int i = 0; i < NPORTS; i++)
        if (!out_free[o] && st_flit[i].valid && st_port[i] == port_e'(o)) ev_st_stall[o] = 1'b1;
      for (int i = 0; i < NPORTS; i++)
        xsel[o][i] = st_fire[i] && st_port[i] == port_e'(o);
      xevc[o] = 1'b0;
      for (int i = 0; i < NPORTS; i++)
        if (xsel[o][i]) xevc[o] = st_evc[i];
    end
    for (int i = 0; i < NPORTS; i++) xin[i] = st_rw[i];
  end

  crossbar u_xbar (.in(xin), .sel(xsel), .out(xout));

  // ---------------------------------------------------------------- sequential
  always_comb begin
    vpop = '0;
    for (int i = 0; i < NPORTS; i++)
      if (in_gnt[i]) vpop[i][gnt_vc[i]] = 1'b1;
  end

  // per-grant decisions: downstream VC and express flag of each granted flit
  logic [NPORTS-1:0]             g_evc;
  logic [NPORTS-1:0][VC_W-1:0]   g_ovc;
  logic [NPORTS-1:0][MAX_VC-1:0] ndec, edec;
  flit_t [NPORTS-1:0]            g_flit;

  always_comb begin
    ndec = '0; edec = '0;
    for (int i = 0; i < NPORTS; i++) begin
      int v;
      port_e o;
      v = int'(gnt_vc[i]);
      o = gnt_port[i];
      g_evc[i]  = act[i][v] ? act_evc[i][v] : rq_evc[i][v];
      g_ovc[i]  = act[i][v] ? act_ovc[i][v] : (g_evc[i] ? epick[o] : npick[o]);
      g_flit[i] = vhead[i][v];
      g_flit[i].vc = g_ovc[i];
      if (in_gnt[i]) begin
        if (g_evc[i]) edec[o][g_ovc[i]] = 1'b1;
        else          ndec[o][g_ovc[i]] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act      <= '0;
      act_evc  <= '0;
      act_ovc  <= '0;
      nres     <= '0;
      eres     <= '0;
      st_flit  <= '0;
      st_evc   <= '0;
      out_reg  <= '0;
      out_evc  <= '0;
      for (int i = 0; i < NPORTS; i++) begin
        st_port[i] <= P_EAST;
        for (int v = 0; v < MAX_VC; v++) act_port[i][v] <= P_EAST;
      end
      for (int o = 0; o < NPORTS; o++)
        for (int v = 0; v < MAX_VC; v++) begin
          ncred[o][v] <= (v < int'(OUT_CFG[o].down_nvc)) ? CW'(DEPTH) : '0;
          ecred[o][v] <= (OUT_CFG[o].evc_len != 0 && v >= int'(OUT_CFG[o].evc_base) &&
                          v < int'(OUT_CFG[o].evc_base) + int'(OUT_CFG[o].nevc)) ? CW'(DEPTH) : '0;
        end
    end else begin
      // SVA grants: pop into the switch register, reserve / release VCs
      for (int i = 0; i < NPORTS; i++) begin
        if (st_fire[i]) st_flit[i].valid <= 1'b0;
        if (in_gnt[i]) begin
          if (!act[i][gnt_vc[i]]) begin
            if (g_evc[i]) eres[gnt_port[i]][g_ovc[i]] <= 1'b1;
            else          nres[gnt_port[i]][g_ovc[i]] <= 1'b1;
            act[i][gnt_vc[i]]      <= 1'b1;
            act_evc[i][gnt_vc[i]]  <= g_evc[i];
            act_port[i][gnt_vc[i]] <= gnt_port[i];
            act_ovc[i][gnt_vc[i]]  <= g_ovc[i];
          end
          if (g_flit[i].ftype == FT_TAIL || g_flit[i].ftype == FT_HT) begin
            act[i][gnt_vc[i]] <= 1'b0;
            if (g_evc[i]) eres[gnt_port[i]][g_ovc[i]] <= 1'b0;
            else          nres[gnt_port[i]][g_ovc[i]] <= 1'b0;
          end
          st_flit[i] <= g_flit[i];
          st_evc[i]  <= g_evc[i];
          st_port[i] <= gnt_port[i];
        end
      end
      // credit counters
      for (int o = 0; o < NPORTS; o++)
        for (int v = 0; v < MAX_VC; v++) begin
          ncred[o][v] <= ncred[o][v] + CW'(credits_in[o].nvc[v]) - CW'(ndec[o][v]);
          if (OUT_CFG[o].evc_len != 0)
            ecred[o][v] <= ecred[o][v] + CW'(credits_in[o].evc[v]) - CW'(edec[o][v]);
        end
      // ST: crossbar into output registers; bypass traffic
      for (int o = 0; o < NPORTS; o++) begin
        if (!AGGRESSIVE && byp_v[o]) begin
          out_reg[o] <= byp_flit[o];
          out_evc[o] <= 1'b1;
        end else if (|xsel[o]) begin
          out_reg[o] <= xout[o];
          out_evc[o] <= xevc[o];
        end else if (out_go[o]) begin
          out_reg[o].valid <= 1'b0;
          out_evc[o]       <= 1'b0;
        end
      end
    end
  end

  // ---------------------------------------------------------------- LT outputs
  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      if (AGGRESSIVE && byp_v[o]) begin
        flits_out[o]    = byp_flit[o];
        evc_flag_out[o] = 1'b1;
      end else begin
        flits_out[o]    = out_reg[o];
        evc_flag_out[o] = out_reg[o].valid && out_evc[o];
      end
      ev_bypass[o] = byp_v[o];
    end
    // credits upstream: own pops, plus express-lane credits passed through
    for (int i = 0; i < NPORTS; i++) begin
      credits_out[i] = '0;
      for (int v = 0; v < MAX_VC; v++)
        if (vpop[i][v]) begin
          if (v < int'(IN_CFG[i].nvc)) credits_out[i].nvc[v] = 1'b1;
          else                         credits_out[i].evc[v] = 1'b1;
        end
      if (IN_CFG[i].bypass && i != int'(P_LOCAL))
        credits_out[i].evc = credits_out[i].evc | credits_in[opposite(port_e'(i))].evc;
    end
  end

  // credits never exceed the buffer depth
  for (genvar o = 0; o < NPORTS; o++) begin : g_chk
    for (genvar v = 0; v < MAX_VC; v++) begin : g_v
      a_ncred: assert property (@(posedge clk) disable iff (!rst_n) ncred[o][v] <= CW'(DEPTH));
    end
  end
endmodule
