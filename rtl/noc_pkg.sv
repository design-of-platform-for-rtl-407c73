// noc_pkg: types and constants shared by the low-power mesh network-on-chip.
//
// Flit format. Every flit is 25 bits wide: a valid bit, a 2-bit flit type,
// a 2-bit virtual channel (VC) index naming the VC reserved at the receiving
// input port, and 20 data bits. A packet is four flits (80 payload bits).
// These widths are the configuration example's (packet length 4 flits,
// flit data width 20, flit width 25); how the 5 control bits are split is
// this design's choice.
//
// The head flit's data field carries the route: HX and HY, the signed hop
// offsets from the router receiving the flit to the destination, and
// PORT_INDEX, the output port that flit takes at that router (routing is
// computed one hop ahead, so the allocator reads it straight from the
// buffer). The remaining 7 head bits are payload.
//
// Port numbering follows the order East, North, West, South, Local. East is
// towards higher column numbers, South towards higher row numbers.
package noc_pkg;

  // ---- configuration constants (document's example configuration) ----
  localparam int unsigned FLIT_DATA_W = 20;   // flit data width in bits
  localparam int unsigned MAX_VC      = 4;    // virtual channels per input port
  localparam int unsigned VC_W        = (MAX_VC > 1) ? $clog2(MAX_VC) : 1;
  localparam int unsigned NPORTS      = 5;    // router radix in a 2-D mesh
  localparam int unsigned PORT_W      = 3;
  localparam int unsigned OFS_W       = 5;    // signed hop offset, covers 10x10
  localparam int unsigned PKT_LEN     = 4;    // flits per packet
  localparam int unsigned MAX_EVC_PATHS = 32; // entries in an EVC path list

  typedef enum logic [PORT_W-1:0] {
    P_EAST  = 3'd0,
    P_NORTH = 3'd1,
    P_WEST  = 3'd2,
    P_SOUTH = 3'd3,
    P_LOCAL = 3'd4
  } port_e;

  typedef enum logic [1:0] {
    FT_BODY = 2'b00,
    FT_HEAD = 2'b01,
    FT_TAIL = 2'b10,
    FT_HT   = 2'b11     // single-flit packet: head and tail at once
  } flit_type_e;

  typedef struct packed {
    logic                   valid;
    flit_type_e             ftype;
    logic [VC_W-1:0]        vc;
    logic [FLIT_DATA_W-1:0] data;
  } flit_t;

  localparam int unsigned FLIT_W = $bits(flit_t);   // 25
  localparam int unsigned HEAD_PAY_W = FLIT_DATA_W - 2*OFS_W - PORT_W;  // 7

  typedef struct packed {
    logic signed [OFS_W-1:0] hx;     // columns still to go (+ = east)
    logic signed [OFS_W-1:0] hy;     // rows still to go (+ = south)
    logic [PORT_W-1:0]       port;   // output port at the receiving router
    logic [HEAD_PAY_W-1:0]   pay;
  } head_data_t;

  // Credits returned upstream, one bit per VC. Normal (NVC) credits go to the
  // neighbour; express (EVC) lane credits travel back to the EVC source and
  // are passed on unchanged by bypass routers.
  typedef struct packed {
    logic [MAX_VC-1:0] nvc;
    logic [MAX_VC-1:0] evc;
  } credit_t;

  // Static configuration of one router input port.
  typedef struct packed {
    logic [3:0] nvc;      // number of normal VCs, indices 0..nvc-1
    logic [3:0] nevc;     // express lanes (sink port only), indices nvc..nvc+nevc-1
    logic       bypass;   // EVC flits arriving here bypass to the opposite port
  } in_cfg_t;

  // Static configuration of one router output port.
  typedef struct packed {
    logic [3:0] down_nvc;   // normal VCs at the downstream input port
    logic [3:0] evc_len;    // hops of the EVC path sourced here, 0 = none
    logic [3:0] evc_base;   // first express lane index at the sink port
    logic [3:0] nevc;       // express lanes at that sink port
    logic       bypass;     // this output carries EVC flits bypassing the router
  } out_cfg_t;

  // One express virtual channel path: a straight run of the mesh.
  typedef struct packed {
    logic [3:0] src_row;
    logic [3:0] src_col;
    logic [3:0] snk_row;
    logic [3:0] snk_col;
  } evc_path_t;

  typedef evc_path_t [MAX_EVC_PATHS-1:0] evc_path_list_t;

  typedef enum logic {
    VCSEL_LAST_IDLE = 1'b0,   // highest-index idle and empty VC
    VCSEL_MAX_CREDIT = 1'b1   // idle VC holding the most credits
  } vc_sel_e;

  function automatic port_e opposite(input port_e p);
    case (p)
      P_EAST:  return P_WEST;
      P_WEST:  return P_EAST;
      P_NORTH: return P_SOUTH;
      P_SOUTH: return P_NORTH;
      default: return P_LOCAL;
    endcase
  endfunction

  // X-Y dimension order routing on relative offsets.
  function automatic port_e xy_port(input logic signed [OFS_W-1:0] hx,
                                    input logic signed [OFS_W-1:0] hy);
    if (hx > 0)      return P_EAST;
    else if (hx < 0) return P_WEST;
    else if (hy > 0) return P_SOUTH;
    else if (hy < 0) return P_NORTH;
    else             return P_LOCAL;
  endfunction

  // Uniform EVC insertion of the 4x4 example: in every row and every column,
  // a path from index 0 to index 2 and one from 2 to 0 (16 paths, each with a
  // single bypass router).
  function automatic evc_path_list_t default_evc_paths();
    evc_path_list_t l;
    int n;
    l = '0;
    n = 0;
    for (int k = 0; k < 4; k++) begin
      l[n] = '{src_row: 4'(k), src_col: 4'd0, snk_row: 4'(k), snk_col: 4'd2}; n++;
      l[n] = '{src_row: 4'(k), src_col: 4'd2, snk_row: 4'(k), snk_col: 4'd0}; n++;
      l[n] = '{src_row: 4'd0, src_col: 4'(k), snk_row: 4'd2, snk_col: 4'(k)}; n++;
      l[n] = '{src_row: 4'd2, src_col: 4'(k), snk_row: 4'd0, snk_col: 4'(k)}; n++;
    end
    return l;
  endfunction

  // Direction a straight EVC path leaves its source.
  function automatic port_e path_dir(input evc_path_t p);
    if (p.snk_col > p.src_col)      return P_EAST;
    else if (p.snk_col < p.src_col) return P_WEST;
    else if (p.snk_row > p.src_row) return P_SOUTH;
    else                            return P_NORTH;
  endfunction

  function automatic int path_len(input evc_path_t p);
    int dr, dc;
    dr = int'(p.snk_row) - int'(p.src_row);
    dc = int'(p.snk_col) - int'(p.src_col);
    if (dr < 0) dr = -dr;
    if (dc < 0) dc = -dc;
    return dr + dc;
  endfunction

  // Does straight path p run through router (r,c), strictly between its ends?
  function automatic bit path_bypasses(input evc_path_t p, input int r, input int c);
    int sr, sc, kr, kc;
    sr = int'(p.src_row); sc = int'(p.src_col);
    kr = int'(p.snk_row); kc = int'(p.snk_col);
    if (sr == kr && r == sr)
      return (c > sc && c < kc) || (c < sc && c > kc);
    if (sc == kc && c == sc)
      return (r > sr && r < kr) || (r < sr && r > kr);
    return 1'b0;
  endfunction

  // Input port configuration of router (r,c).
  function automatic in_cfg_t calc_in_cfg(input int r, input int c, input int p,
                                          input evc_path_list_t paths, input int npaths,
                                          input int nvc, input int nevc);
    in_cfg_t cfg;
    cfg.nvc = 4'(nvc);
    cfg.nevc = '0;
    cfg.bypass = 1'b0;
    for (int k = 0; k < npaths; k++) begin
      if (int'(paths[k].snk_row) == r && int'(paths[k].snk_col) == c &&
          int'(opposite(path_dir(paths[k]))) == p) begin
        // sink port: part of the port's VCs become express lanes
        cfg.nvc  = 4'(nvc - nevc);
        cfg.nevc = 4'(nevc);
      end
      if (path_bypasses(paths[k], r, c) && int'(opposite(path_dir(paths[k]))) == p)
        cfg.bypass = 1'b1;
    end
    return cfg;
  endfunction

  // Output port configuration of router (r,c) in a rows x cols mesh. nvc_down
  // is the VC count configured at the downstream input port.
  function automatic out_cfg_t calc_out_cfg(input int r, input int c, input int p,
                                            input int rows, input int cols,
                                            input evc_path_list_t paths, input int npaths,
                                            input int nvc_down, input int nevc);
    out_cfg_t cfg;
    int nr, nc;
    bit exists;
    logic [3:0] dnvc;
    cfg = '0;
    nr = r; nc = c;
    case (p)
      0: nc = c + 1;
      1: nr = r - 1;
      2: nc = c - 1;
      3: nr = r + 1;
      default: ;
    endcase
    exists = (nr >= 0 && nr < rows && nc >= 0 && nc < cols);
    if (p == int'(P_LOCAL)) begin
      cfg.down_nvc = 4'(MAX_VC);
    end else if (exists) begin
      dnvc = calc_in_cfg(nr, nc, int'(opposite(port_e'(p))), paths, npaths, nvc_down, nevc).nvc;
      cfg.down_nvc = dnvc;
    end
    for (int k = 0; k < npaths; k++) begin
      if (int'(paths[k].src_row) == r && int'(paths[k].src_col) == c &&
          int'(path_dir(paths[k])) == p) begin
        cfg.evc_len  = 4'(path_len(paths[k]));
        cfg.evc_base = 4'(nvc_down - nevc);
        cfg.nevc     = 4'(nevc);
      end
      if (path_bypasses(paths[k], r, c) && int'(path_dir(paths[k])) == p)
        cfg.bypass = 1'b1;
    end
    return cfg;
  endfunction

  typedef in_cfg_t  [NPORTS-1:0] in_cfg_arr_t;
  typedef out_cfg_t [NPORTS-1:0] out_cfg_arr_t;

  // Configuration of all ports of router (r,c).
  function automatic in_cfg_arr_t router_in_cfg(input int r, input int c,
                                                input evc_path_list_t paths, input int npaths,
                                                input int nvc, input int nevc);
    in_cfg_arr_t x;
    for (int p = 0; p < NPORTS; p++)
      x[p] = calc_in_cfg(r, c, p, paths, npaths, nvc, nevc);
    return x;
  endfunction

  function automatic out_cfg_arr_t router_out_cfg(input int r, input int c,
                                                  input int rows, input int cols,
                                                  input evc_path_list_t paths, input int npaths,
                                                  input int nvc, input int nevc);
    out_cfg_arr_t x;
    for (int p = 0; p < NPORTS; p++)
      x[p] = calc_out_cfg(r, c, p, rows, cols, paths, npaths, nvc, nevc);
    return x;
  endfunction

endpackage
