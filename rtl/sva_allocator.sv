// sva_allocator: combined virtual channel and switch allocator (SVA stage).
//
// The router merges virtual channel allocation (VA) and switch allocation
// (SA) into one pipeline stage. Every input VC whose head flit can move
// asks for its output port. A head flit with no downstream VC yet asks only
// if the matching pool at that output (normal VCs, or express lanes for an
// EVC packet) has an allocatable VC; a flit of a packet that already holds a
// downstream VC asks only if that VC has a credit. The downstream VC is
// taken from the pool in the same cycle the head wins the switch, so no two
// heads can be given the same VC.
//
// Switch allocation is separable, input first: a round-robin arbiter per
// input port picks one requesting VC, then a round-robin arbiter per output
// port picks one input. At an EVC source output, requests from EVC packets
// win over normal ones unless evc_block (the starvation limit) masks them.
// An input arbiter's priority only moves when its pick also wins its output.
//
// Combinational requests to grants; the arbiter pointers update at the clock
// edge.
//
// Merging VC and switch allocation into one stage and giving EVC flits
// priority follow the original design; the separable input-first structure
// and round-robin arbiters are this design's.
module sva_allocator
  import noc_pkg::*;
(
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic  [NPORTS-1:0][MAX_VC-1:0]        req,        // VC has a flit at its head
  input  port_e [NPORTS-1:0][MAX_VC-1:0]        req_port,   // its output port
  input  logic  [NPORTS-1:0][MAX_VC-1:0]        req_new,    // head without downstream VC
  input  logic  [NPORTS-1:0][MAX_VC-1:0]        req_evc,    // packet travels express
  input  logic  [NPORTS-1:0][MAX_VC-1:0][VC_W-1:0] req_ovc, // downstream VC, if held
  input  logic  [NPORTS-1:0]                    in_ready,   // input's ST register free
  input  logic  [NPORTS-1:0]                    out_ready,  // output can take a flit
  input  logic  [NPORTS-1:0]                    nvc_any_free,
  input  logic  [NPORTS-1:0]                    evc_any_free,
  input  logic  [NPORTS-1:0][MAX_VC-1:0]        nvc_credit_ok,
  input  logic  [NPORTS-1:0][MAX_VC-1:0]        evc_credit_ok,
  input  logic  [NPORTS-1:0]                    evc_block,
  output logic  [NPORTS-1:0]                    in_gnt,
  output logic  [NPORTS-1:0][VC_W-1:0]          in_gnt_vc,
  output port_e [NPORTS-1:0]                    in_gnt_port,
  output logic  [NPORTS-1:0]                    out_gnt_evc,  // EVC flit granted at output
  output logic                                  sa_conflict   // an input lost at its output
);
  logic [NPORTS-1:0][MAX_VC-1:0] elig, s1_gnt;
  logic [NPORTS-1:0]             s1_valid, s1_evc;
  port_e [NPORTS-1:0]            s1_port;
  logic [NPORTS-1:0][NPORTS-1:0] s2_req, s2_gnt;   // [output][input]
  logic [NPORTS-1:0][NPORTS-1:0] s2_req_evc;

  // eligibility of each input VC
  always_comb begin
    for (int i = 0; i < NPORTS; i++)
      for (int v = 0; v < MAX_VC; v++) begin
        port_e o;
        logic ok;
        o = req_port[i][v];
        if (req_new[i][v])
          ok = req_evc[i][v] ? (evc_any_free[o] && !evc_block[o]) : nvc_any_free[o];
        else
          ok = req_evc[i][v] ? (evc_credit_ok[o][req_ovc[i][v]] && !evc_block[o])
                             : nvc_credit_ok[o][req_ovc[i][v]];
        elig[i][v] = req[i][v] && in_ready[i] && out_ready[o] && ok;
      end
  end

  // stage 1: one VC per input port
  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    rr_arbiter #(.N(MAX_VC)) u_arb (
      .clk(clk), .rst_n(rst_n), .req(elig[i]), .advance(in_gnt[i]), .gnt(s1_gnt[i])
    );
  end

  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      s1_valid[i] = |s1_gnt[i];
      s1_port[i]  = P_EAST;
      s1_evc[i]   = 1'b0;
      in_gnt_vc[i] = '0;
      for (int v = 0; v < MAX_VC; v++)
        if (s1_gnt[i][v]) begin
          s1_port[i]   = req_port[i][v];
          s1_evc[i]    = req_evc[i][v];
          in_gnt_vc[i] = VC_W'(v);
        end
    end
    for (int o = 0; o < NPORTS; o++)
      for (int i = 0; i < NPORTS; i++) begin
        s2_req_evc[o][i] = s1_valid[i] && s1_port[i] == port_e'(o) && s1_evc[i];
        s2_req[o][i]     = s1_valid[i] && s1_port[i] == port_e'(o);
      end
  end

  // stage 2: one input per output port, EVC requests first
  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    logic [NPORTS-1:0] r;
    assign r = (|s2_req_evc[o]) ? s2_req_evc[o] : s2_req[o];
    rr_arbiter #(.N(NPORTS)) u_arb (
      .clk(clk), .rst_n(rst_n), .req(r), .advance(1'b1), .gnt(s2_gnt[o])
    );
    assign out_gnt_evc[o] = |(s2_gnt[o] & s2_req_evc[o]);
  end

  always_comb begin
    sa_conflict = 1'b0;
    for (int i = 0; i < NPORTS; i++) begin
      in_gnt[i] = 1'b0;
      for (int o = 0; o < NPORTS; o++)
        if (s2_gnt[o][i]) in_gnt[i] = 1'b1;
      in_gnt_port[i] = s1_port[i];
      if (s1_valid[i] && !in_gnt[i]) sa_conflict = 1'b1;
    end
  end

  // at most one input per output, and a grant only to an eligible VC
  for (genvar o = 0; o < NPORTS; o++) begin : g_chk
    a_onehot_out: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(s2_gnt[o]));
  end
endmodule
