// traffic_gen: synthetic traffic generator standing in for the processing
// element of one node.
//
// Temporal distribution: every cycle a pseudo-random number (32-bit
// xorshift, seeded per node from SEED) decides whether a packet is created,
// so over a long interval the node injects the configured number of packets
// per cycle. Spatial distribution, selected by pattern:
//   TG_UNIFORM   - rate (packets/cycle x 65536) at every cycle; destination
//                  uniformly drawn from all other nodes.
//   TG_TRANSPOSE - rate as above; node (r,c) sends only to (c,r). Diagonal
//                  nodes and nodes whose transpose lies outside a non-square
//                  mesh send nothing.
//   TG_GROUP     - locality and full custom traffic. Destinations are split
//                  into up to NGRP groups; group g has a member mask
//                  grp_mask[g] and a cumulative threshold grp_cum[g] (sum of
//                  the injection rates of groups 0..g, x 65536). One random
//                  number picks the group whose range it falls in (or no
//                  packet above the last threshold), a second picks a member
//                  of the group uniformly. For locality the groups are the
//                  destinations at equal distance with the locality-factor
//                  rates; for custom traffic each group is one flow.
// A packet is PKT_LEN words: the head word with HX/HY and the output port
// for the node's own router, then the source node and a sequence number,
// the creation cycle (time_now), and the destination node with the sequence
// number again; a receiver can check delivery and measure latency from them.
// pkt_valid is a registered one-cycle pulse carrying the packet.
//
// The uniform, transpose, locality and custom patterns and per-flow
// injection rates follow the original platform; the Bernoulli process, the
// xorshift generator and the packet word layout are this design's.
module traffic_gen
  import noc_pkg::*;
#(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 4,
  parameter int unsigned NODE = 0,
  parameter int unsigned SEED = 1,
  parameter int unsigned NGRP = ROWS * COLS - 1,
  localparam int unsigned N   = ROWS * COLS
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                enable,
  input  logic [1:0]                          pattern,   // 0 uniform, 1 transpose, 2 group
  input  logic [15:0]                         rate,
  input  logic [NGRP-1:0][15:0]               grp_cum,
  input  logic [NGRP-1:0][N-1:0]              grp_mask,
  input  logic [31:0]                         time_now,
  output logic                                pkt_valid,
  output logic [PKT_LEN-1:0][FLIT_DATA_W-1:0] pkt
);
  localparam int unsigned MY_R = NODE / COLS;
  localparam int unsigned MY_C = NODE % COLS;
  localparam int unsigned NW   = $clog2(N + 1);

  logic [31:0] rnd;
  logic        fire;
  logic [NW-1:0] dst;
  logic [15:0]  r1, r2;
  logic [11:0]  seq;

  assign r1 = rnd[15:0];
  assign r2 = rnd[31:16];

  function automatic logic [31:0] xorshift(input logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  always_comb begin
    logic [31:0] prod;
    logic [NW-1:0] k, cnt;
    logic found;
    fire = 1'b0;
    dst  = NW'(NODE);
    case (pattern)
      2'd0: begin
        fire = r1 < rate && N > 1;
        prod = 32'(r2) * 32'(N - 1);
        k    = NW'(prod >> 16);
        dst  = (k < NW'(NODE)) ? k : k + 1'b1;
      end
      2'd1: begin
        fire = r1 < rate && MY_R != MY_C && MY_C < ROWS && MY_R < COLS;
        dst  = NW'(MY_C * COLS + MY_R);
      end
      default: begin
        found = 1'b0;
        for (int g = 0; g < int'(NGRP); g++) begin
          if (!found && r1 < grp_cum[g] && grp_mask[g] != '0) begin
            found = 1'b1;
            prod  = 32'(r2) * 32'($countones(grp_mask[g]));
            k     = NW'(prod >> 16);
            cnt   = '0;
            for (int m = 0; m < int'(N); m++)
              if (grp_mask[g][m]) begin
                if (cnt == k) dst = NW'(m);
                cnt = cnt + 1'b1;
              end
          end
        end
        fire = found && dst != NW'(NODE);
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rnd       <= (SEED * 32'h9E3779B9) ^ ((NODE + 1) * 32'h85EBCA6B) | 32'h1;
      pkt_valid <= 1'b0;
      pkt       <= '0;
      seq       <= '0;
    end else begin
      rnd       <= xorshift(rnd);
      pkt_valid <= 1'b0;
      if (enable && fire) begin
        head_data_t h;
        int dr, dc;
        dr = int'(dst) / int'(COLS) - int'(MY_R);
        dc = int'(dst) % int'(COLS) - int'(MY_C);
        h.hx   = OFS_W'(dc);
        h.hy   = OFS_W'(dr);
        h.port = xy_port(OFS_W'(dc), OFS_W'(dr));
        h.pay  = seq[HEAD_PAY_W-1:0];
        pkt_valid <= 1'b1;
        pkt[0]    <= h;
        pkt[1]    <= {8'(NODE), seq};
        pkt[2]    <= time_now[FLIT_DATA_W-1:0];
        pkt[3]    <= {8'(dst), seq};
        seq       <= seq + 1'b1;
      end
    end
  end
endmodule
