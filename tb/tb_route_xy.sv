// tb_route_xy: checks the head-flit route rewrite. For random heads, output
// ports and hop counts the new HX/HY must be the old offsets moved by the
// hops in the direction of the output port, and PORT_INDEX the X-Y port
// for the new offsets; body flits, flits leaving through the Local port and
// the other fields pass unchanged.
//
// X-Y routing follows the original design; the reference model works on
// absolute coordinates, independently of the module's relative offsets.
module tb_route_xy;
  import noc_pkg::*;
  flit_t fi, fo;
  port_e op;
  logic [3:0] hops;
  int checks = 0, failures = 0;

  route_xy dut (.flit_in(fi), .out_port(op), .hops(hops), .flit_out(fo));

  initial begin
    for (int k = 0; k < 2000; k++) begin
      head_data_t h, e;
      flit_t ex;
      fi = flit_t'($urandom);
      fi.valid = 1'b1;
      fi.ftype = flit_type_e'($urandom_range(0, 3));
      h = head_data_t'(fi.data);
      h.hx = OFS_W'($urandom_range(0, 18) - 9);
      h.hy = OFS_W'($urandom_range(0, 18) - 9);
      fi.data = h;
      op = port_e'($urandom_range(0, 4));
      hops = 4'($urandom_range(1, 3));
      #1;
      ex = fi;
      if ((fi.ftype == FT_HEAD || fi.ftype == FT_HT) && op != P_LOCAL) begin
        e = h;
        case (op)
          P_EAST:  e.hx = h.hx - OFS_W'(hops);
          P_WEST:  e.hx = h.hx + OFS_W'(hops);
          P_SOUTH: e.hy = h.hy - OFS_W'(hops);
          P_NORTH: e.hy = h.hy + OFS_W'(hops);
          default: ;
        endcase
        e.port = xy_port(e.hx, e.hy);
        ex.data = e;
      end
      checks++;
      if (fo !== ex) begin
        failures++;
        $display("FAIL: in=%h port=%0d hops=%0d out=%h expected %h", fi, op, hops, fo, ex);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
