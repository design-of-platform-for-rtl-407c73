// vc_buffer: the buffer of one router input port, divided into virtual
// channels.
//
// The storage of the input port is split into MAX_VC independent lanes
// (virtual channels), each a small FIFO of DEPTH flits. An arriving flit
// names its lane in its VC field and is written there in the buffer-write
// (BW) stage; the allocator pops any lane's head flit when that flit wins
// the switch. Only the first NUM_VC lanes are built; a port configured with
// fewer VCs simply has no storage for the rest.
//
// Clock gating: with CLOCK_GATING set, the storage of each lane is clocked
// through a clock_gate cell enabled only in cycles that write that lane, so
// idle lanes see no clock edges. Pointers and counts stay on the free clock.
//
// Timing: a flit presented on wr_* in cycle t is visible on head[] in cycle
// t+1. Pops take effect at the end of the cycle rd_en is high.
//
// Per-port buffers split into VC queues and clock gating of idle storage
// follow the original design; gating per lane on its write enable is this
// design's choice.
module vc_buffer
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH        = 4,
  parameter int unsigned NUM_VC       = MAX_VC,
  parameter bit          CLOCK_GATING = 1'b1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr_en,
  input  flit_t                 wr_flit,     // wr_flit.vc selects the lane
  input  logic [MAX_VC-1:0]     rd_en,
  output flit_t [MAX_VC-1:0]    head,
  output logic  [MAX_VC-1:0]    empty,
  output logic  [MAX_VC-1:0][$clog2(DEPTH+1)-1:0] count
);
  for (genvar v = 0; v < MAX_VC; v++) begin : g_vc
    if (v < NUM_VC) begin : g_lane
      logic we, sclk;
      assign we = wr_en && (wr_flit.vc == VC_W'(v));
      if (CLOCK_GATING) begin : g_cg
        clock_gate u_cg (.clk(clk), .en(we), .test_en(1'b0), .gclk(sclk));
      end else begin : g_nocg
        assign sclk = clk;
      end
      vc_fifo #(.DEPTH(DEPTH)) u_fifo (
        .clk(clk), .sclk(sclk), .rst_n(rst_n),
        .wr_en(we), .wr_flit(wr_flit), .rd_en(rd_en[v]),
        .head(head[v]), .empty(empty[v]), .count(count[v])
      );
    end else begin : g_none
      assign head[v]  = '0;
      assign empty[v] = 1'b1;
      assign count[v] = '0;
    end
  end
endmodule
