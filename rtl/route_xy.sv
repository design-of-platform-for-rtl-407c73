// route_xy: look-ahead X-Y route computation for a head flit.
//
// Routing is X-Y dimension order on a 2-D mesh: a packet first travels
// along its row until the column offset HX is zero, then along its column
// until the row offset HY is zero, then leaves through the Local port.
// The head flit carries HX/HY relative to the router that receives it and
// the output port it takes there. When a head flit leaves through output
// port out_port covering hops links (1 for a normal hop, the path length
// when it enters an express virtual channel), this block rewrites HX/HY for
// the router it will reach and computes that router's output port, so the
// next router need not compute a route before allocation. Purely
// combinational; body and tail flits pass unchanged.
//
// X-Y routing on relative offsets HX/HY carried in the head flit follows the
// original design; computing the port one hop ahead and rewriting over a
// whole EVC path are this design's choices.
module route_xy
  import noc_pkg::*;
(
  input  flit_t      flit_in,
  input  port_e      out_port,
  input  logic [3:0] hops,
  output flit_t      flit_out
);
  head_data_t h_in, h_out;

  always_comb begin
    h_in  = head_data_t'(flit_in.data);
    h_out = h_in;
    case (out_port)
      P_EAST:  h_out.hx = h_in.hx - OFS_W'(hops);
      P_WEST:  h_out.hx = h_in.hx + OFS_W'(hops);
      P_SOUTH: h_out.hy = h_in.hy - OFS_W'(hops);
      P_NORTH: h_out.hy = h_in.hy + OFS_W'(hops);
      default: ;
    endcase
    h_out.port = xy_port(h_out.hx, h_out.hy);
    flit_out = flit_in;
    if ((flit_in.ftype == FT_HEAD || flit_in.ftype == FT_HT) && out_port != P_LOCAL)
      flit_out.data = h_out;
  end
endmodule
