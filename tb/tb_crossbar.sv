// tb_crossbar: random one-hot (or empty) selections per output; each output
// must carry the selected input, or nothing when no input is selected.
//
// The reference model is a plain selection per output; the matrix crossbar
// follows the original design, the stimulus is this test's own.
module tb_crossbar;
  import noc_pkg::*;
  flit_t [NPORTS-1:0] in, out;
  logic [NPORTS-1:0][NPORTS-1:0] sel;
  int checks = 0, failures = 0;

  crossbar dut (.in(in), .sel(sel), .out(out));

  initial begin
    for (int k = 0; k < 1000; k++) begin
      int pick [NPORTS];
      for (int i = 0; i < NPORTS; i++) in[i] = flit_t'($urandom);
      for (int o = 0; o < NPORTS; o++) begin
        pick[o] = $urandom_range(0, NPORTS);   // NPORTS = none
        sel[o] = '0;
        if (pick[o] < NPORTS) sel[o][pick[o]] = 1'b1;
      end
      #1;
      for (int o = 0; o < NPORTS; o++) begin
        checks++;
        if (out[o] !== (pick[o] < NPORTS ? in[pick[o]] : flit_t'('0))) begin
          failures++;
          $display("FAIL: output %0d select %0d", o, pick[o]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
