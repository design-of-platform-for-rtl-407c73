// evc_throttle: starvation ("deadlock") avoidance at an express virtual
// channel (EVC) source output.
//
// EVC flits have priority over normal (NVC) flits at the output where their
// express path starts, and bypass routers downstream let them pass ahead of
// their own traffic. To keep NVC flows sharing the path from waiting without
// bound, EVC flits may use the output for at most ON_LIMIT cycles in a row;
// they are then masked for OFF_LIMIT cycles, in which NVC flits are served,
// before EVC priority returns. With ON_LIMIT=4, OFF_LIMIT=2 a saturated
// output sends EEEENNEEEENN... A cycle without an EVC grant restarts the
// ON count. ON_LIMIT=0 disables the limit. The limits follow the document
// (up to 9 each); the defaults 3:1 are its configuration example.
//
// Timing: evc_block is a registered state output, valid for the whole
// cycle; evc_gnt is sampled at the rising edge.
module evc_throttle #(
  parameter int unsigned ON_LIMIT  = 3,
  parameter int unsigned OFF_LIMIT = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic evc_gnt,      // an EVC flit was granted this output this cycle
  output logic evc_block     // EVC flits masked (NVC turn)
);
  logic [3:0] on_cnt, off_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      on_cnt    <= '0;
      off_cnt   <= '0;
      evc_block <= 1'b0;
    end else if (evc_block) begin
      if (off_cnt + 1'b1 >= 4'(OFF_LIMIT)) begin
        evc_block <= 1'b0;
        off_cnt   <= '0;
      end else begin
        off_cnt <= off_cnt + 1'b1;
      end
    end else if (evc_gnt) begin
      if (ON_LIMIT != 0 && OFF_LIMIT != 0 && on_cnt + 1'b1 >= 4'(ON_LIMIT)) begin
        evc_block <= 1'b1;
        on_cnt    <= '0;
      end else begin
        on_cnt <= on_cnt + 1'b1;
      end
    end else begin
      on_cnt <= '0;
    end
  end
endmodule
