// vc_fifo: one virtual channel lane of a router input buffer.
//
// A circular buffer of DEPTH flits with a write and a read pointer. The
// flit at the head is readable combinationally (asynchronous read), writes
// and pops take effect at the rising clock edge, and a write and a pop may
// happen in the same cycle. The storage array may be clocked by a gated
// clock (sclk) that only has to pulse in cycles with a write; the pointers
// and occupancy count run on the free-running clock. Credit-based flow
// control upstream guarantees that a full lane is never written; an
// assertion checks this.
//
// Helper; its structure is this design's choice.
module vc_fifo
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic   clk,
  input  logic   sclk,      // storage clock, may be gated
  input  logic   rst_n,
  input  logic   wr_en,
  input  flit_t  wr_flit,
  input  logic   rd_en,
  output flit_t  head,
  output logic   empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t mem [DEPTH];
  logic [AW-1:0] wptr, rptr;

  always_ff @(posedge sclk) begin
    if (wr_en) mem[wptr] <= wr_flit;
  end

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (wr_en) wptr <= incr(wptr);
      if (rd_en) rptr <= incr(rptr);
      count <= count + {{($bits(count)-1){1'b0}}, wr_en} - {{($bits(count)-1){1'b0}}, rd_en};
    end
  end

  assign empty = (count == '0);
  always_comb begin
    head = mem[rptr];
    head.valid = !empty;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n)
                                   wr_en && !rd_en |-> count < ($clog2(DEPTH+1))'(DEPTH));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !empty);
endmodule
