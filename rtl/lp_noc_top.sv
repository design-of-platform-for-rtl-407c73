// lp_noc_top: low-power network-on-chip with its synthetic-traffic
// environment.
//
// The network is a ROWS x COLS mesh of low-power virtual-channel routers
// (lp_mesh) with express virtual channels. Every node carries a traffic
// generator (traffic_gen) in place of its processing element, feeding a
// deep source queue (source_fifo) that serves as the network interface and
// injects into the router's Local port. Packets leaving the network at a
// node appear on ej_flit (the receiving side always accepts). A virtual
// channel monitor (vc_monitor) on every router input port records buffer
// utilisation while measure is high.
//
// Control: tg_enable starts traffic; pattern/rate/grp_cum/grp_mask set the
// traffic of every node (see traffic_gen: one pattern for all nodes, rates
// and groups per node). time_now counts cycles since reset and stamps each
// packet's creation; head_sent marks the cycle a packet enters the network,
// so latency with and without the source queue can both be measured from
// ej_flit. sq_count and sq_overflow expose the source queues.
//
// Defaults are the document's configuration example: 4x4 mesh, 4 VCs of 4
// flits per port, 2 express lanes at EVC sink ports, uniform EVC insertion,
// aggressive bypass, ON:OFF 3:1, last idle/empty VC selection, clock gating,
// one link stage, 4-flit packets of 20-bit flit data.
module lp_noc_top
  import noc_pkg::*;
#(
  parameter int unsigned    ROWS          = 4,
  parameter int unsigned    COLS          = 4,
  parameter int unsigned    DEPTH         = 4,
  parameter int unsigned    NVC           = 4,
  parameter int unsigned    NEVC          = 2,
  parameter evc_path_list_t EVC_PATHS     = default_evc_paths(),
  parameter int unsigned    NUM_EVC_PATHS = 16,
  parameter bit             AGGRESSIVE    = 1'b1,
  parameter vc_sel_e        VC_SELECT     = VCSEL_LAST_IDLE,
  parameter int unsigned    EVC_ON        = 3,
  parameter int unsigned    EVC_OFF       = 1,
  parameter bit             CLOCK_GATING  = 1'b1,
  parameter int unsigned    LINK_STAGES   = 1,
  parameter int unsigned    SQ_DEPTH      = 2048,
  parameter int unsigned    SEED          = 3,
  localparam int unsigned   N             = ROWS * COLS,
  localparam int unsigned   NGRP          = N - 1,
  localparam int unsigned   CW            = $clog2(DEPTH + 1)
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  // traffic configuration
  input  logic                                  tg_enable,
  input  logic [1:0]                            pattern,
  input  logic [N-1:0][15:0]                    rate,
  input  logic [N-1:0][NGRP-1:0][15:0]          grp_cum,
  input  logic [N-1:0][NGRP-1:0][N-1:0]         grp_mask,
  // measurement
  input  logic                                  measure,
  input  logic                                  measure_clear,
  output logic [31:0]                           time_now,
  output logic [N-1:0]                          gen_valid,
  output logic [N-1:0]                          head_sent,
  output flit_t [N-1:0]                         ej_flit,
  output logic [N-1:0][$clog2(SQ_DEPTH+1)-1:0]  sq_count,
  output logic [N-1:0]                          sq_overflow,
  output logic [N-1:0][NPORTS-1:0][MAX_VC:0][31:0]      vc_hist,
  output logic [N-1:0][NPORTS-1:0][MAX_VC-1:0][CW-1:0]  vc_max_occ,
  // mechanism activity
  output logic [N-1:0][NPORTS-1:0]              ev_bypass,
  output logic [N-1:0][NPORTS-1:0]              ev_evc_gnt,
  output logic [N-1:0][NPORTS-1:0]              ev_throttle,
  output logic [N-1:0][NPORTS-1:0]              ev_st_stall,
  output logic [N-1:0]                          ev_sa_conflict
);
  flit_t   [N-1:0] inj_flit;
  credit_t [N-1:0] inj_credit;
  logic    [N-1:0][NPORTS-1:0][MAX_VC-1:0][CW-1:0] vc_count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) time_now <= '0;
    else        time_now <= time_now + 1'b1;
  end

  for (genvar n = 0; n < N; n++) begin : g_node
    logic [PKT_LEN-1:0][FLIT_DATA_W-1:0] pkt;

    traffic_gen #(.ROWS(ROWS), .COLS(COLS), .NODE(n), .SEED(SEED), .NGRP(NGRP)) u_tg (
      .clk(clk), .rst_n(rst_n), .enable(tg_enable), .pattern(pattern), .rate(rate[n]),
      .grp_cum(grp_cum[n]), .grp_mask(grp_mask[n]), .time_now(time_now),
      .pkt_valid(gen_valid[n]), .pkt(pkt)
    );

    source_fifo #(.DEPTH(SQ_DEPTH), .VC_DEPTH(DEPTH), .NUM_VC(NVC)) u_ni (
      .clk(clk), .rst_n(rst_n), .push(gen_valid[n]), .push_pkt(pkt),
      .overflow(sq_overflow[n]), .pkt_count(sq_count[n]),
      .inj_flit(inj_flit[n]), .head_sent(head_sent[n]), .credit_in(inj_credit[n])
    );

    for (genvar p = 0; p < NPORTS; p++) begin : g_mon
      vc_monitor #(.DEPTH(DEPTH)) u_mon (
        .clk(clk), .rst_n(rst_n), .measure(measure), .clear(measure_clear),
        .vc_count(vc_count[n][p]), .hist(vc_hist[n][p]), .max_occ(vc_max_occ[n][p])
      );
    end
  end

  lp_mesh #(
    .ROWS(ROWS), .COLS(COLS), .DEPTH(DEPTH), .NVC(NVC), .NEVC(NEVC),
    .EVC_PATHS(EVC_PATHS), .NUM_EVC_PATHS(NUM_EVC_PATHS), .AGGRESSIVE(AGGRESSIVE),
    .VC_SELECT(VC_SELECT), .EVC_ON(EVC_ON), .EVC_OFF(EVC_OFF),
    .CLOCK_GATING(CLOCK_GATING), .LINK_STAGES(LINK_STAGES)
  ) u_mesh (
    .clk(clk), .rst_n(rst_n),
    .inj_flit(inj_flit), .inj_credit(inj_credit), .ej_flit(ej_flit),
    .vc_count(vc_count), .ev_bypass(ev_bypass), .ev_evc_gnt(ev_evc_gnt),
    .ev_throttle(ev_throttle), .ev_st_stall(ev_st_stall), .ev_sa_conflict(ev_sa_conflict)
  );
endmodule
