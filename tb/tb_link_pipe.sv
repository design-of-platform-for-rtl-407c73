// tb_link_pipe: random flits, EVC flags and credits; with one stage every
// signal must come out exactly one cycle later, flits forward and credits
// backward, and hold steady between clock edges.
//
// One register stage per link follows the original design; the checks of
// credit timing are this test's own.
module tb_link_pipe;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  flit_t fi, fo;
  logic ei, eo;
  credit_t ci, co;
  int checks = 0, failures = 0;
  flit_t pf; logic pe; credit_t pc;

  always #5 clk = ~clk;

  link_pipe #(.STAGES(1)) dut (.clk(clk), .rst_n(rst_n), .flit_in(fi), .evc_in(ei),
    .flit_out(fo), .evc_out(eo), .credit_in(ci), .credit_out(co));

  initial begin
    fi = '0; ei = 0; ci = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 500; k++) begin
      fi = flit_t'($urandom); ei = 1'($urandom); ci = credit_t'($urandom);
      pf = fi; pe = ei; pc = ci;
      @(posedge clk); #1;
      checks++;
      if (fo !== pf || eo !== pe || co !== pc) begin
        failures++;
        $display("FAIL: cycle %0d link output not the previous input", k);
      end
      // new inputs must not show before the next edge
      fi = flit_t'($urandom); ei = 1'($urandom); ci = credit_t'($urandom);
      #1;
      checks++;
      if (fo !== pf || eo !== pe || co !== pc) begin
        failures++;
        $display("FAIL: cycle %0d link output changed between edges", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
