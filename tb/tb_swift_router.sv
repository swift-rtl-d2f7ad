// tb_swift_router: self-checking test of one SWIFT router on its own.
//
// The test plays the upstream and downstream neighbours. All downstream
// tokens are ON, and VC releases are returned by the test.
//   1. Bypass: a 5-flit packet enters at the West port bound two hops East.
//      Each flit must leave on the East port two cycles after its lookahead
//      arrived (one cycle after the flit itself: the one-cycle router), in
//      order and unchanged, and never be written into a buffer. The
//      lookahead sent on must carry one East hop less, the East output port
//      for the next router and a VC taken from the free-VC queue.
//   2. No bypass: the same packet with bypassing disabled must go through the
//      three-stage pipeline (BW+SA-I, SA-O+VA+BR, ST): each flit leaves three
//      cycles after it arrived. The head must take the other VC (the first
//      one has not been released downstream).
//   3. Conflict: two packets from North and West both bound East arrive at
//      once. Both must be delivered complete and in order, one of the
//      lookaheads losing its bypass.
// VC releases reported upstream (vcfree_out) must appear when each tail
// crosses the switch. Watchdog included.
module tb_swift_router;
  import swift_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic bypass_en;
  logic        [NPORTS-1:0] la_in_v, flit_in_v, vcfree_out_v, vcfree_out_id;
  la_t         [NPORTS-1:0] la_in, la_out;
  flit_t       [NPORTS-1:0] flit_in, flit_out;
  logic        [NPORTS-1:0] la_out_v, flit_out_v, vcfree_in_v, vcfree_in_id;
  tok_bundle_t [NPORTS-1:0] tok_in, tok_out;
  logic        [NPORTS-1:0] ev_bypass, ev_buffered, ev_sao_killed, ev_la_lost;
  int checks = 0, failures = 0;
  int cyc = 0;

  swift_router dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // monitor of the East output
  flit_t out_q[$];
  int    out_cyc[$];
  la_t   la_q[$];
  int    n_buffered = 0, n_lost = 0, n_vcfree = 0;
  always @(negedge clk) if (rst_n) begin
    if (flit_out_v[P_E]) begin out_q.push_back(flit_out[P_E]); out_cyc.push_back(cyc); end
    if (la_out_v[P_E]) la_q.push_back(la_out[P_E]);
    n_buffered += $countones(ev_buffered);
    n_lost     += $countones(ev_la_lost);
    n_vcfree   += $countones(vcfree_out_v);
  end

  function automatic flit_t mk(int src, int i);
    flit_t f;
    f.data  = 61'({src[7:0], 8'(i), 45'h0_1234_5678});
    f.ftype = (i == 0) ? FT_HEAD : (i == PKT_LEN - 1) ? FT_TAIL : FT_BODY;
    return f;
  endfunction

  // send one packet on input port p (lookahead one cycle ahead of each flit)
  task automatic send(input int p, input bit vc, output int la_cyc0);
    la_t la;
    la = '0;
    la.outport = NPORTS'(1) << P_E;
    la.vcid    = vc;
    la.x_hops  = 3'd2;
    la.x_dir   = 1'b1;
    for (int i = 0; i <= PKT_LEN; i++) begin
      @(negedge clk);
      if (i == 0) la_cyc0 = cyc;
      la_in_v[p]   = i < PKT_LEN;
      la_in[p]     = la;
      flit_in_v[p] = i > 0;
      flit_in[p]   = (i > 0) ? mk(p, i - 1) : '0;
    end
    @(negedge clk);
    la_in_v[p] = 1'b0; flit_in_v[p] = 1'b0;
  endtask

  task automatic expect_pkt(input int p, input int la_cyc0, input int delay, input string what);
    for (int i = 0; i < PKT_LEN; i++) begin
      if (out_q.size() == 0) begin check(0, {what, ": flit missing"}); return; end
      check(out_q[0] == mk(p, i), $sformatf("%s: flit %0d data and order", what, i));
      if (delay > 0)
        check(out_cyc[0] - (la_cyc0 + i) == delay,
              $sformatf("%s: flit %0d left %0d cycles after its lookahead, expected %0d",
                        what, i, out_cyc[0] - (la_cyc0 + i), delay));
      out_q.pop_front(); out_cyc.pop_front();
    end
  endtask

  initial begin
    int c0, c1, vf0;
    bypass_en = 1'b1;
    la_in_v = '0; flit_in_v = '0; la_in = '0; flit_in = '0;
    vcfree_in_v = '0; vcfree_in_id = '0;
    for (int p = 0; p < NPORTS; p++) begin
      tok_in[p] = '0;
      tok_in[p].own = 1'b1; tok_in[p].res = '1;
      tok_in[p].t1 = '1;    tok_in[p].t2 = '1;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1. bypass
    send(P_W, 1'b0, c0);
    repeat (8) @(negedge clk);
    check(n_buffered == 0, "bypassed packet never buffered");
    check(la_q.size() == PKT_LEN, "one lookahead sent on per flit");
    if (la_q.size() > 0)
      check(la_q[0].x_hops == 3'd1 && la_q[0].x_dir && la_q[0].outport == NPORTS'(1) << P_E &&
            la_q[0].vcid == 1'b0, "next lookahead: one hop less, East at the next router, VC 0");
    la_q.delete();
    expect_pkt(P_W, c0, 2, "bypass");
    check(n_vcfree == 1, "VC released upstream at the tail");

    // 2. no bypass, head must take VC 1
    bypass_en = 1'b0;
    send(P_W, 1'b1, c1);
    repeat (12) @(negedge clk);
    check(n_buffered == PKT_LEN, "every flit buffered without bypass");
    if (la_q.size() > 0) check(la_q[0].vcid == 1'b1, "second packet gets the other VC");
    la_q.delete();
    expect_pkt(P_W, c1, 4, "buffered");
    // return both downstream VCs
    @(negedge clk); vcfree_in_v[P_E] = 1'b1; vcfree_in_id[P_E] = 1'b0;
    @(negedge clk); vcfree_in_id[P_E] = 1'b1;
    @(negedge clk); vcfree_in_v[P_E] = 1'b0;

    // 3. two packets racing for East
    bypass_en = 1'b1;
    n_lost = 0;
    fork
      send(P_W, 1'b0, c0);
      send(P_N, 1'b0, c1);
    join
    repeat (30) @(negedge clk);
    check(out_q.size() == 2 * PKT_LEN, "both packets delivered");
    check(n_lost > 0, "a lookahead lost the conflict");
    begin
      // packets leave whole (the second gets VC after the first's head)
      int first;
      first = (out_q.size() > 0) ? int'(out_q[0].data[60:53]) : 0;
      vf0 = (first == P_W) ? P_N : P_W;
      expect_pkt(first, 0, 0, "first of two");
      expect_pkt(vf0, 0, 0, "second of two");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
