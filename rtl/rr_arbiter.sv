// rr_arbiter: round-robin arbiter over N requesters.
//
// Grants one of the requesting inputs (one-hot), searching from the input
// after the one granted last. The priority pointer moves only when the
// caller confirms the grant was used (advance), so a grant that loses a
// later allocation stage keeps its priority. Combinational grant, pointer
// updated at the rising clock edge.
//
// Helper; the arbitration scheme is this design's choice (none is
// specified for the allocator's arbiters).
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] last;

  always_comb begin
    gnt = '0;
    for (int k = 1; k <= N; k++) begin
      logic [IW-1:0] idx;
      idx = IW'((int'(last) + k) % N);
      if (req[idx] && gnt == '0) gnt[idx] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last <= IW'(N - 1);
    else if (advance && gnt != '0) begin
      for (int unsigned k = 0; k < N; k++)
        if (gnt[k]) last <= IW'(k);
    end
  end
endmodule
