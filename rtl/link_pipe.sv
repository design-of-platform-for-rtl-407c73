// link_pipe: physical link between two neighbouring routers.
//
// Carries flits (with their express flag) downstream and credits upstream.
// Each direction has STAGES register stages; with the default of one stage
// the link traversal (LT) takes one cycle, as in the document's router
// pipeline. STAGES = 0 gives a plain wire.
module link_pipe
  import noc_pkg::*;
#(
  parameter int unsigned STAGES = 1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  flit_t   flit_in,
  input  logic    evc_in,
  output flit_t   flit_out,
  output logic    evc_out,
  input  credit_t credit_in,     // from the downstream router
  output credit_t credit_out     // to the upstream router
);
  if (STAGES == 0) begin : g_wire
    assign flit_out   = flit_in;
    assign evc_out    = evc_in;
    assign credit_out = credit_in;
  end else begin : g_pipe
    flit_t   f_q [STAGES];
    logic    e_q [STAGES];
    credit_t c_q [STAGES];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int s = 0; s < STAGES; s++) begin
          f_q[s] <= '0;
          e_q[s] <= 1'b0;
          c_q[s] <= '0;
        end
      end else begin
        f_q[0] <= flit_in;
        e_q[0] <= evc_in;
        c_q[0] <= credit_in;
        for (int s = 1; s < STAGES; s++) begin
          f_q[s] <= f_q[s-1];
          e_q[s] <= e_q[s-1];
          c_q[s] <= c_q[s-1];
        end
      end
    end
    assign flit_out   = f_q[STAGES-1];
    assign evc_out    = e_q[STAGES-1];
    assign credit_out = c_q[STAGES-1];
  end
endmodule
