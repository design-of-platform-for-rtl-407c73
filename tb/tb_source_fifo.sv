// tb_source_fifo: pushes random packets in bursts into the source queue and
// plays the router's local input port: every flit sent is counted against a
// credit model (never more than 4 flits outstanding per VC) and its credit
// comes back after a random delay. Checks: packets leave in push order with
// their words intact, flits of a packet are head-body-body-tail on one VC,
// a new packet starts only on a VC with all credits back, head_sent marks
// heads, and a push into a full queue raises overflow.
//
// The deep source queue follows the original platform; the credit model of
// the downstream router is this test's own.
module tb_source_fifo;
  import noc_pkg::*;
  localparam int DEPTH = 16, VCD = 4;
  logic clk = 0, rst_n = 0, push = 0, overflow, head_sent;
  logic [PKT_LEN-1:0][FLIT_DATA_W-1:0] pkt;
  logic [$clog2(DEPTH+1)-1:0] pkt_count;
  flit_t f;
  credit_t cr;
  int checks = 0, failures = 0;
  logic [PKT_LEN-1:0][FLIT_DATA_W-1:0] exp_q [$];
  int outst [MAX_VC];
  int last_ret [MAX_VC];
  int ret [$];        // pending credit returns: cycle*8 + vc
  int cyc = 0, idx = 0, cur_vc = 0, npkt = 0;

  always #5 clk = ~clk;

  source_fifo #(.DEPTH(DEPTH), .VC_DEPTH(VCD)) dut (.clk(clk), .rst_n(rst_n), .push(push),
    .push_pkt(pkt), .overflow(overflow), .pkt_count(pkt_count), .inj_flit(f),
    .head_sent(head_sent), .credit_in(cr));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (cycle %0d)", msg, cyc); end
  endtask

  // local input port model
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (f.valid) begin
        int v, d;
        v = int'(f.vc);
        check(outst[v] < VCD, "flit sent without credit");
        outst[v]++;
        // at most one credit per VC and cycle, in order, as a router returns them
        d = cyc + $urandom_range(1, 6);
        last_ret[v] = (d > last_ret[v]) ? d : last_ret[v] + 1;
        ret.push_back(last_ret[v] * 8 + v);
        check(head_sent == (idx == 0), "head_sent marks head flits");
        if (idx == 0) begin
          check(f.ftype == FT_HEAD, "head first");
          check(outst[v] == 1, "packet starts on an empty VC");
          cur_vc = v;
        end else begin
          check(v == cur_vc, "packet stays on its VC");
          check(f.ftype == (idx == PKT_LEN - 1 ? FT_TAIL : FT_BODY), "flit type");
        end
        check(exp_q.size() > 0 && f.data == exp_q[0][idx], "flit data in push order");
        idx++;
        if (idx == PKT_LEN) begin idx = 0; void'(exp_q.pop_front()); npkt++; end
      end
    end
  end
  always @(negedge clk) begin
    cr = '0;
    foreach (ret[k]) if (ret[k] / 8 == cyc) cr.nvc[ret[k] % 8] = 1'b1;
  end
  always @(posedge clk) begin
    for (int k = ret.size() - 1; k >= 0; k--)
      if (ret[k] / 8 == cyc) begin outst[ret[k] % 8]--; ret.delete(k); end
  end

  initial begin
    foreach (outst[v]) begin outst[v] = 0; last_ret[v] = 0; end
    pkt = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      push = ((k / 64) % 2 == 0) && $urandom_range(0, 3) == 0 && pkt_count < DEPTH - 1;
      for (int w = 0; w < PKT_LEN; w++) pkt[w] = FLIT_DATA_W'($urandom);
      if (push) exp_q.push_back(pkt);
      @(posedge clk); #1;
    end
    push = 0;
    repeat (50) @(posedge clk);
    #1;
    check(exp_q.size() == 0, "queue drained");
    check(!overflow, "no overflow while not full");
    // fill without credits returning too fast: push more than DEPTH at once
    for (int k = 0; k < DEPTH + 8; k++) begin
      push = 1;
      for (int w = 0; w < PKT_LEN; w++) pkt[w] = FLIT_DATA_W'($urandom);
      if (pkt_count < DEPTH) exp_q.push_back(pkt);   // accepted unless full
      @(posedge clk); #1;
    end
    push = 0;
    check(overflow, "overflow on push into full queue");
    repeat (200) @(posedge clk);
    check(exp_q.size() == 0, "accepted packets drained after overflow");
    $display("packets delivered: %0d", npkt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
