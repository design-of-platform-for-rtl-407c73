// crossbar: the router switch.
//
// Connects each output port to at most one input port for the cycle, as
// chosen by the switch allocator. Built as a matrix: every output is the OR
// of the inputs whose crosspoint is closed (sel[o][i]), so with a one-hot or
// all-zero select column it forwards exactly the selected input or an idle
// (all-zero) flit. Purely combinational; the switch traversal (ST) stage is
// the cycle in which the flit crosses it into the output register.
//
// The matrix-type crossbar is the configuration's default choice; the
// AND-OR form with one-hot selects is this design's.
module crossbar
  import noc_pkg::*;
#(
  parameter int unsigned NIN  = NPORTS,
  parameter int unsigned NOUT = NPORTS
) (
  input  flit_t [NIN-1:0]            in,
  input  logic  [NOUT-1:0][NIN-1:0]  sel,
  output flit_t [NOUT-1:0]           out
);
  always_comb begin
    for (int o = 0; o < NOUT; o++) begin
      out[o] = '0;
      for (int i = 0; i < NIN; i++)
        out[o] = out[o] | (in[i] & {FLIT_W{sel[o][i]}});
    end
  end
endmodule
