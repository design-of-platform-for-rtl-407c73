// vc_monitor: virtual channel utilisation of one router input port.
//
// Buffer sizing relies on knowing how much of each port's buffer is really
// used. While measure is high, every cycle this monitor counts how many of
// the port's VCs hold at least one flit, as a histogram: hist[k] is the
// number of cycles in which exactly k VCs were active. It also keeps, per
// VC, the largest number of flits seen in it (max_occ). Dividing hist by
// the number of measured cycles gives the share of time k VCs were in use;
// a VC whose max_occ stays 0 was never used and could be removed. Counters
// saturate. clear resets all of them.
//
// Recording active-VC counts per cycle and per-VC depth use follows the
// original platform's utilisation reports; counting into registers rather
// than report files is this design's choice.
module vc_monitor
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = 4,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           measure,
  input  logic                           clear,
  input  logic [MAX_VC-1:0][CW-1:0]      vc_count,
  output logic [MAX_VC:0][31:0]          hist,
  output logic [MAX_VC-1:0][CW-1:0]      max_occ
);
  logic [$clog2(MAX_VC+1)-1:0] active;

  always_comb begin
    active = '0;
    for (int v = 0; v < MAX_VC; v++)
      if (vc_count[v] != '0) active = active + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist    <= '0;
      max_occ <= '0;
    end else if (clear) begin
      hist    <= '0;
      max_occ <= '0;
    end else if (measure) begin
      if (hist[active] != '1) hist[active] <= hist[active] + 1'b1;
      for (int v = 0; v < MAX_VC; v++)
        if (vc_count[v] > max_occ[v]) max_occ[v] <= vc_count[v];
    end
  end
endmodule
