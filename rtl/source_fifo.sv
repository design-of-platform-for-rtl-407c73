// source_fifo: network interface of a node, reduced to a source queue.
//
// With synthetic traffic the processing element is replaced by a traffic
// generator whose packets are already in network format, so the network
// interface needs no packetiser: it is a FIFO that queues whole packets
// while the network cannot take them. The traffic generator never stops, so
// the queue is very deep (DEPTH packets); filling it means the network cannot
// carry the offered load, and is flagged by overflow.
//
// Write side: push with a packet (PKT_LEN data words, word 0 being the head
// word with the route) is written at the clock edge (synchronous write).
// Read side: the oldest packet is read combinationally (asynchronous read)
// and sent one flit per cycle into the router's Local input port. For each
// packet the interface picks a local input VC that it does not hold and
// whose buffer is empty (highest index first), sends a flit only while that
// VC has a credit, and frees the VC after the tail. Credits come back on
// credit_in. inj_flit is registered; head_sent pulses in the cycle a head
// flit is presented, marking the packet's entry into the network.
//
// A very large synchronous-write source queue as the whole network
// interface follows the original platform; flit serialisation, local VC
// choice and drop-on-overflow are this design's.
module source_fifo
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH    = 2048,   // packets
  parameter int unsigned VC_DEPTH = 4,      // flits per local input VC
  parameter int unsigned NUM_VC   = MAX_VC
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                push,
  input  logic [PKT_LEN-1:0][FLIT_DATA_W-1:0] push_pkt,
  output logic                                overflow,     // push while full (packet lost)
  output logic [$clog2(DEPTH+1)-1:0]          pkt_count,    // packets waiting
  output flit_t                               inj_flit,
  output logic                                head_sent,
  input  credit_t                             credit_in
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(VC_DEPTH+1);
  localparam int unsigned FW = (PKT_LEN > 1) ? $clog2(PKT_LEN) : 1;

  logic [PKT_LEN-1:0][FLIT_DATA_W-1:0] mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          full, empty, pop;

  assign full  = pkt_count == ($clog2(DEPTH+1))'(DEPTH);
  assign empty = pkt_count == '0;

  always_ff @(posedge clk) begin
    if (push && !full) mem[wptr] <= push_pkt;
  end

  // injection state
  logic [NUM_VC-1:0][CW-1:0] cred;
  logic                      busy;          // a packet is being sent
  logic [VC_W-1:0]           cur_vc;
  logic [FW-1:0]             fidx;
  logic                      any_free, send;
  logic [VC_W-1:0]           free_vc;
  logic [NUM_VC-1:0]         dec;

  always_comb begin
    any_free = 1'b0;
    free_vc  = '0;
    for (int v = 0; v < NUM_VC; v++)
      if (cred[v] == CW'(VC_DEPTH)) begin
        any_free = 1'b1;
        free_vc  = VC_W'(v);
      end
  end

  logic [VC_W-1:0] use_vc;
  assign use_vc = busy ? cur_vc : free_vc;
  assign send   = !empty && (busy ? cred[cur_vc] != '0 : any_free);
  assign pop    = send && fidx == FW'(PKT_LEN - 1);

  always_comb begin
    dec = '0;
    if (send) dec[use_vc] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr      <= '0;
      rptr      <= '0;
      pkt_count <= '0;
      overflow  <= 1'b0;
      busy      <= 1'b0;
      cur_vc    <= '0;
      fidx      <= '0;
      inj_flit  <= '0;
      head_sent <= 1'b0;
      for (int v = 0; v < NUM_VC; v++) cred[v] <= CW'(VC_DEPTH);
    end else begin
      if (push && !full) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (push && full) overflow <= 1'b1;
      if (pop) rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      pkt_count <= pkt_count + {{($bits(pkt_count)-1){1'b0}}, push && !full}
                             - {{($bits(pkt_count)-1){1'b0}}, pop};
      for (int v = 0; v < NUM_VC; v++)
        cred[v] <= cred[v] + CW'(credit_in.nvc[v]) - CW'(dec[v]);
      inj_flit  <= '0;
      head_sent <= 1'b0;
      if (send) begin
        inj_flit.valid <= 1'b1;
        inj_flit.vc    <= use_vc;
        inj_flit.data  <= mem[rptr][fidx];
        if (fidx == '0) begin
          inj_flit.ftype <= (PKT_LEN == 1) ? FT_HT : FT_HEAD;
          head_sent      <= 1'b1;
        end else begin
          inj_flit.ftype <= (fidx == FW'(PKT_LEN - 1)) ? FT_TAIL : FT_BODY;
        end
        busy   <= !pop;
        cur_vc <= use_vc;
        fidx   <= pop ? '0 : fidx + 1'b1;
      end
    end
  end
endmodule
