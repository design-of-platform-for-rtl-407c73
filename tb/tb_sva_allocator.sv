// tb_sva_allocator: random request patterns against the rules of the
// combined VC/switch allocator, checked every cycle:
//   - a granted input's VC is eligible (request, input ready, output ready,
//     a free downstream VC or credit, EVC not blocked) and the granted port
//     is the one it asked for;
//   - no output is granted to two inputs;
//   - whenever some VC is eligible, something is granted;
//   - out_gnt_evc marks exactly the outputs granted to an EVC request;
//   - sa_conflict is set exactly when an input with an eligible VC lost.
// A directed phase checks that two inputs competing for one output are
// served in turn, and that an EVC request beats a normal one.
//
// Merged VC and switch allocation with EVC priority follows the original
// design; the request patterns and the reference checks are this test's own.
module tb_sva_allocator;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic  [NPORTS-1:0][MAX_VC-1:0] req, req_new, req_evc, nvc_ok, evc_ok;
  port_e [NPORTS-1:0][MAX_VC-1:0] req_port;
  logic  [NPORTS-1:0][MAX_VC-1:0][VC_W-1:0] req_ovc;
  logic  [NPORTS-1:0] in_ready, out_ready, nvc_free, evc_free, evc_block;
  logic  [NPORTS-1:0] in_gnt, out_gnt_evc;
  logic  [NPORTS-1:0][VC_W-1:0] in_gnt_vc;
  port_e [NPORTS-1:0] in_gnt_port;
  logic sa_conflict;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sva_allocator dut (.clk(clk), .rst_n(rst_n), .req(req), .req_port(req_port), .req_new(req_new),
    .req_evc(req_evc), .req_ovc(req_ovc), .in_ready(in_ready), .out_ready(out_ready),
    .nvc_any_free(nvc_free), .evc_any_free(evc_free), .nvc_credit_ok(nvc_ok), .evc_credit_ok(evc_ok),
    .evc_block(evc_block), .in_gnt(in_gnt), .in_gnt_vc(in_gnt_vc), .in_gnt_port(in_gnt_port),
    .out_gnt_evc(out_gnt_evc), .sa_conflict(sa_conflict));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic bit elig(int i, int v);
    port_e o;
    bit ok;
    o = req_port[i][v];
    if (req_new[i][v]) ok = req_evc[i][v] ? (evc_free[o] && !evc_block[o]) : nvc_free[o];
    else ok = req_evc[i][v] ? (evc_ok[o][req_ovc[i][v]] && !evc_block[o]) : nvc_ok[o][req_ovc[i][v]];
    return req[i][v] && in_ready[i] && out_ready[o] && ok;
  endfunction

  task automatic check_rules();
    bit any_elig, conflict;
    int owner [NPORTS];
    any_elig = 0; conflict = 0;
    foreach (owner[o]) owner[o] = -1;
    for (int i = 0; i < NPORTS; i++) begin
      bit e;
      e = 0;
      for (int v = 0; v < MAX_VC; v++) e |= elig(i, v);
      any_elig |= e;
      if (e && !in_gnt[i]) conflict = 1;
      if (in_gnt[i]) begin
        check(elig(i, int'(in_gnt_vc[i])), $sformatf("input %0d granted ineligible VC %0d", i, in_gnt_vc[i]));
        check(in_gnt_port[i] == req_port[i][in_gnt_vc[i]], "granted port is the requested one");
        check(owner[in_gnt_port[i]] < 0, $sformatf("output %0d granted twice", in_gnt_port[i]));
        owner[in_gnt_port[i]] = i;
      end
    end
    for (int o = 0; o < NPORTS; o++)
      check(out_gnt_evc[o] == (owner[o] >= 0 && req_evc[owner[o]][in_gnt_vc[owner[o]]]), "out_gnt_evc");
    check(!any_elig || |in_gnt, "eligible requests but no grant");
    check(sa_conflict == conflict, "sa_conflict");
  endtask

  initial begin
    req = '0; req_new = '0; req_evc = '0; nvc_ok = '0; evc_ok = '0; req_port = '{default: P_EAST};
    req_ovc = '0; in_ready = '0; out_ready = '0; nvc_free = '0; evc_free = '0; evc_block = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      req = {NPORTS*MAX_VC{1'b0}} | ($urandom & $urandom);
      req_new = NPORTS*MAX_VC'($urandom);
      req_evc = NPORTS*MAX_VC'($urandom & $urandom & $urandom);
      nvc_ok = NPORTS*MAX_VC'($urandom | $urandom);
      evc_ok = NPORTS*MAX_VC'($urandom | $urandom);
      req_ovc = NPORTS*MAX_VC*VC_W'($urandom);
      for (int i = 0; i < NPORTS; i++)
        for (int v = 0; v < MAX_VC; v++) begin
          int p;
          p = $urandom_range(0, NPORTS - 2);
          req_port[i][v] = port_e'(p >= i ? p + 1 : p);   // no U-turns
        end
      in_ready = NPORTS'($urandom | $urandom);
      out_ready = NPORTS'($urandom | $urandom);
      nvc_free = NPORTS'($urandom | $urandom);
      evc_free = NPORTS'($urandom);
      evc_block = NPORTS'($urandom & $urandom);
      #1;
      check_rules();
      @(posedge clk); #1;
    end

    // directed: West and North inputs, one normal VC each, both to East
    begin
      int gw, gn;
      gw = 0; gn = 0;
      req = '0; req_evc = '0; req_new = '0; in_ready = '1; out_ready = '1; nvc_ok = '1; evc_ok = '1;
      nvc_free = '1; evc_free = '1; evc_block = '0;
      req[P_WEST][0] = 1; req_port[P_WEST][0] = P_EAST;
      req[P_NORTH][1] = 1; req_port[P_NORTH][1] = P_EAST;
      for (int k = 0; k < 20; k++) begin
        #1;
        check_rules();
        if (in_gnt[P_WEST]) gw++;
        if (in_gnt[P_NORTH]) gn++;
        @(posedge clk); #1;
      end
      check(gw == 10 && gn == 10, $sformatf("round robin between two inputs (%0d/%0d)", gw, gn));
      // EVC request from Local beats the normal ones
      req[P_LOCAL][2] = 1; req_port[P_LOCAL][2] = P_EAST; req_evc[P_LOCAL][2] = 1;
      for (int k = 0; k < 5; k++) begin
        #1;
        check(in_gnt[P_LOCAL] && out_gnt_evc[P_EAST] && !in_gnt[P_WEST] && !in_gnt[P_NORTH], "EVC priority");
        @(posedge clk); #1;
      end
      evc_block[P_EAST] = 1;
      #1;
      check(!in_gnt[P_LOCAL] && (in_gnt[P_WEST] || in_gnt[P_NORTH]), "blocked EVC yields to normal");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
