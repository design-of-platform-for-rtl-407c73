// lp_mesh: ROWS x COLS 2-D mesh of low-power routers (lp_router) joined by
// pipelined links (link_pipe), with static express virtual channel paths.
//
// Router (r,c) has node index n = r*COLS + c. Its East output feeds the West
// input of (r,c+1) and its South output the North input of (r+1,c); each of
// these links carries flits forward and credits back through LINK_STAGES
// registers. Ports on the mesh boundary are left unconnected.
//
// Every input port holds NVC virtual channels of DEPTH flits. The EVC path
// list (EVC_PATHS, first NUM_EVC_PATHS entries) configures the routers: the
// input port where a path ends gives NEVC of its NVC channels to express
// lanes, the routers between the ends bypass EVC flits, and the starting
// router allocates those lanes. The default is the uniform insertion of
// the 4x4 example: in each row and column, paths 0->2 and 2->0.
//
// The Local port of every router is brought out: inj_flit/inj_credit is the
// injection side of the network interface (a flit names the local input VC
// it uses; a credit comes back when that flit leaves the buffer), ej_flit
// the ejection side, which always accepts, so its credits are returned at
// once. Activity signals of all routers are brought out for monitoring.
//
// Latency: a flit takes 4 cycles per router hop (BW, SVA, ST, LT with one
// link stage); an EVC flit takes 1 cycle per bypassed router.
//
// The mesh topology, link pipeline stage, EVC roles and the uniform 4x4 path
// map follow the original design; tied-off boundary ports, the ideal ejection
// side and express-lane numbering after the normal VCs are this design's.
module lp_mesh
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
  localparam int unsigned   N             = ROWS * COLS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  flit_t   [N-1:0]            inj_flit,
  output credit_t [N-1:0]            inj_credit,
  output flit_t   [N-1:0]            ej_flit,
  output logic    [N-1:0][NPORTS-1:0][MAX_VC-1:0][$clog2(DEPTH+1)-1:0] vc_count,
  output logic    [N-1:0][NPORTS-1:0] ev_bypass,
  output logic    [N-1:0][NPORTS-1:0] ev_evc_gnt,
  output logic    [N-1:0][NPORTS-1:0] ev_throttle,
  output logic    [N-1:0][NPORTS-1:0] ev_st_stall,
  output logic    [N-1:0]             ev_sa_conflict
);
  flit_t   [N-1:0][NPORTS-1:0] r_fin, r_fout;
  logic    [N-1:0][NPORTS-1:0] r_ein, r_eout;
  credit_t [N-1:0][NPORTS-1:0] r_cin, r_cout;

  // neighbour of node n in direction d, or -1 at the boundary
  function automatic int nbr(input int n, input int d);
    int r, c;
    r = n / int'(COLS);
    c = n % int'(COLS);
    case (d)
      0: return (c + 1 < int'(COLS)) ? n + 1 : -1;
      1: return (r > 0) ? n - int'(COLS) : -1;
      2: return (c > 0) ? n - 1 : -1;
      3: return (r + 1 < int'(ROWS)) ? n + int'(COLS) : -1;
      default: return -1;
    endcase
  endfunction

  for (genvar n = 0; n < N; n++) begin : g_node
    localparam int R = n / int'(COLS);
    localparam int C = n % int'(COLS);

    lp_router #(
      .DEPTH(DEPTH), .IN_CFG(router_in_cfg(R, C, EVC_PATHS, NUM_EVC_PATHS, NVC, NEVC)),
      .OUT_CFG(router_out_cfg(R, C, ROWS, COLS, EVC_PATHS, NUM_EVC_PATHS, NVC, NEVC)), .AGGRESSIVE(AGGRESSIVE),
      .VC_SELECT(VC_SELECT), .EVC_ON(EVC_ON), .EVC_OFF(EVC_OFF), .CLOCK_GATING(CLOCK_GATING)
    ) u_router (
      .clk(clk), .rst_n(rst_n),
      .flits_in(r_fin[n]), .evc_flag_in(r_ein[n]), .credits_in(r_cin[n]),
      .flits_out(r_fout[n]), .evc_flag_out(r_eout[n]), .credits_out(r_cout[n]),
      .vc_count(vc_count[n]), .ev_bypass(ev_bypass[n]), .ev_evc_gnt(ev_evc_gnt[n]),
      .ev_throttle(ev_throttle[n]), .ev_st_stall(ev_st_stall[n]),
      .ev_sa_conflict(ev_sa_conflict[n])
    );

    // local port: network interface side
    assign r_fin[n][P_LOCAL] = inj_flit[n];
    assign r_ein[n][P_LOCAL] = 1'b0;
    assign inj_credit[n]     = r_cout[n][P_LOCAL];
    assign ej_flit[n]        = r_fout[n][P_LOCAL];
    always_comb begin
      r_cin[n][P_LOCAL] = '0;
      if (r_fout[n][P_LOCAL].valid) r_cin[n][P_LOCAL].nvc[r_fout[n][P_LOCAL].vc] = 1'b1;
    end

    // mesh links: one per existing output direction
    for (genvar d = 0; d < 4; d++) begin : g_dir
      localparam int M = nbr(n, d);
      localparam int OD = (d + 2) % 4;      // opposite direction
      if (M >= 0) begin : g_link
        link_pipe #(.STAGES(LINK_STAGES)) u_link (
          .clk(clk), .rst_n(rst_n),
          .flit_in(r_fout[n][d]), .evc_in(r_eout[n][d]),
          .flit_out(r_fin[M][OD]), .evc_out(r_ein[M][OD]),
          .credit_in(r_cout[M][OD]), .credit_out(r_cin[n][d])
        );
      end else begin : g_edge
        // boundary: nothing arrives on input d, no credits on output d
        assign r_fin[n][d] = '0;
        assign r_ein[n][d] = 1'b0;
        assign r_cin[n][d] = '0;
      end
    end
  end
endmodule
