// tb_input_port: self-checking test of one router input port.
//
// The test plays both the upstream router and the rest of this router.
// Upstream, it sends random packets of PKT_LEN flits on both VCs, each flit
// announced by a lookahead one cycle before it, obeying the port's flow
// control: a head only on an idle VC, a body or tail flit only while the
// port's token is ON or, failing that, while its VC's reserved buffer is free
// and no flit went to that VC in the previous cycle. As the lookahead conflict
// check it grants bypasses at random, only where allowed (a body flit whose
// VC still has flits buffered must not bypass). As SA-O it grants the SA-I
// winner at random, never in a cycle where this port's lookahead won.
// Checked:
//   - la_is_head marks exactly the first flit of each packet;
//   - a bypassing flit reaches the crossbar input in the cycle it arrives;
//   - a granted buffered flit reaches it the cycle after its SA-O grant;
//   - every VC's flits leave in order and none is lost or duplicated;
//   - SA-I never offers a head while its output has no free VC;
//   - a VC release is reported with every tail, for the tail's VC;
//   - after the traffic drains all buffers are free (token and both
//     reserved-buffer flags ON).
// Watchdog included.
module tb_input_port;
  import swift_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic        la_in_v, flit_in_v, la_is_head, la_vc_busy, bypass_gnt;
  la_t         la_in, sai_route;
  flit_t       flit_in, xbar_data;
  logic [NPORTS-1:0] la_vc_nxt_outport, vcs_wr_nxt_outport, sai_nxt_outport, out_vc_avail;
  logic        la_vc_out_vc, vcs_wr_v, vcs_wr_vc, vcs_wr_out_vc;
  logic        sai_v, sai_vc, sai_head, sai_out_vc, sao_gnt;
  logic [NPORTS-1:0][NVC-1:0] out_tok;
  logic        xbar_v, own_tok, vcfree_v, vcfree_id, ev_buffered, ev_bypassed;
  logic [NVC-1:0] res_tok;
  int checks = 0, failures = 0;

  input_port dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  flit_t exp_q [NVC][$];       // flits sent, per VC, not yet out
  int    vc_left [NVC];        // flits of the current packet still to send
  bit    vc_busy_up [NVC];     // upstream's view: VC holds a packet
  bit    rel_q [NVC];          // VC releases on their way upstream
  int    seq = 0, n_out = 0, n_sent = 0, n_byp = 0, n_buf = 0, n_rel = 0;

  function automatic flit_t mk(int vc, int i);
    flit_t f;
    f.data  = 61'({8'(vc), 16'(seq), 8'(i), 29'h155});
    f.ftype = (i == 0) ? FT_HEAD : (i == PKT_LEN - 1) ? FT_TAIL : FT_BODY;
    return f;
  endfunction

  initial begin
    logic  pend_v, pend_byp, last_v, last_vc, sao_q, sao_vc_q;
    flit_t pend_f;
    la_in_v = 1'b0; la_in = '0; flit_in_v = 1'b0; flit_in = '0; bypass_gnt = 1'b0;
    vcs_wr_v = 1'b0; vcs_wr_vc = 1'b0; vcs_wr_out_vc = 1'b0; vcs_wr_nxt_outport = '0;
    sao_gnt = 1'b0; out_vc_avail = '1; out_tok = '1;
    pend_v = 1'b0; pend_byp = 1'b0; pend_f = '0; last_v = 1'b0; last_vc = 1'b0;
    sao_q = 1'b0; sao_vc_q = 1'b0;
    for (int v = 0; v < NVC; v++) begin vc_left[v] = 0; vc_busy_up[v] = 0; rel_q[v] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int  v;
      bit  send, head;
      @(negedge clk);
      // releases seen last cycle reach the upstream now (link delay)
      for (int r = 0; r < NVC; r++) if (rel_q[r]) begin vc_busy_up[r] = 0; rel_q[r] = 0; end
      // ---- upstream: flit of last cycle's lookahead ----
      flit_in_v = pend_v;
      flit_in   = pend_f;
      #1;
      // ---- outputs of the cycle: crossbar input ----
      if (xbar_v) begin
        int xv;
        xv = int'(xbar_data.data[60:53]);
        check(pend_byp || sao_q, "crossbar input only after a bypass or SA-O grant");
        if (pend_byp) check(xbar_data == pend_f, "bypassing flit goes straight to the crossbar");
        if (xv < NVC && exp_q[xv].size() != 0) begin
          check(xbar_data == exp_q[xv][0], $sformatf("VC %0d flit order", xv));
          exp_q[xv].pop_front();
        end else check(0, "unexpected flit");
        check(vcfree_v == is_tail(xbar_data.ftype), "VC release with the tail only");
        if (vcfree_v) begin
          check(int'(vcfree_id) == xv, "released VC is the tail's");
          rel_q[xv] = 1;
          n_rel++;
        end
        n_out++;
      end else begin
        check(!pend_byp && !sao_q, "granted flit reaches the crossbar");
        check(!vcfree_v, "no release without a flit");
      end
      if (sai_v && sai_head) check(|(sai_route.outport & out_vc_avail), "SA-I offers a head only with a free VC");
      // ---- upstream: next lookahead ----
      v    = $urandom_range(0, NVC - 1);
      head = vc_left[v] == 0;
      send = cyc < 5000 && $urandom_range(0, 2) != 0 &&
             (head ? !vc_busy_up[v]
                   : (own_tok || (res_tok[v] && !(last_v && last_vc == 1'(v)))));
      la_in_v = send;
      la_in   = '0;
      la_in.vcid    = 1'(v);
      la_in.outport = NPORTS'(1) << $urandom_range(0, NPORTS - 1);
      out_vc_avail  = NPORTS'($urandom) | NPORTS'($urandom);
      #1;
      bypass_gnt = send && $urandom_range(0, 1) == 1 && (la_is_head || !la_vc_busy);
      if (send) check(la_is_head == head, "head detected from the VC state");
      vcs_wr_v = 1'b0;
      if (send && bypass_gnt && la_is_head) begin
        vcs_wr_v = 1'b1; vcs_wr_vc = 1'(v); vcs_wr_out_vc = 1'($urandom); vcs_wr_nxt_outport = '0;
      end
      sao_gnt = sai_v && !bypass_gnt && $urandom_range(0, 1) == 1;
      if (sao_gnt && sai_head) begin
        vcs_wr_v = 1'b1; vcs_wr_vc = sai_vc; vcs_wr_out_vc = 1'($urandom); vcs_wr_nxt_outport = '0;
      end
      sao_q    = sao_gnt;
      sao_vc_q = sai_vc;
      // bookkeeping for the flit that follows next cycle
      pend_byp = send && bypass_gnt;
      pend_v   = send;
      last_v   = send;
      last_vc  = 1'(v);
      if (send) begin
        if (head) begin vc_left[v] = PKT_LEN; vc_busy_up[v] = 1; seq++; end
        pend_f = mk(v, PKT_LEN - vc_left[v]);
        vc_left[v]--;
        exp_q[v].push_back(pend_f);
        n_sent++;
        if (bypass_gnt) n_byp++; else n_buf++;
      end
    end
    @(negedge clk);
    la_in_v = 1'b0; flit_in_v = 1'b0; bypass_gnt = 1'b0; vcs_wr_v = 1'b0; sao_gnt = 1'b0;
    repeat (5) @(negedge clk);
    check(n_sent > 1000 && n_byp > 100 && n_buf > 100, $sformatf("traffic mix: %0d sent, %0d bypass, %0d buffered", n_sent, n_byp, n_buf));
    check(exp_q[0].size() == 0 && exp_q[1].size() == 0 && n_out == n_sent,
          $sformatf("all flits out (%0d of %0d)", n_out, n_sent));
    check(own_tok && res_tok == '1, "all buffers free after draining");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
