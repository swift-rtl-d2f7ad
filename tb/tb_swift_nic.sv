// tb_swift_nic: self-checking test of the network interface with its traffic
// generator, at node (1,2) of a 4x4 mesh.
//
// The test plays the router. Sending side, checked on every flit:
//   - each flit follows its lookahead by exactly one cycle;
//   - packets are PKT_LEN flits, typed head, body..., tail, all on the VC the
//     head took, carrying this node as source and another node as
//     destination, with the lookahead's hops and directions matching that
//     destination and its output port obeying west-first routing;
//   - with no VC released, at most two packets (one per VC) start;
//   - with the token and the reserved buffers OFF, no body or tail is sent.
// Receiving side: well-formed packets addressed to the node are counted with
// no error; a flit addressed to another node and a flit of the wrong type are
// each counted as errors. Watchdog included.
module tb_swift_nic;
  import swift_pkg::*;
  localparam int MX = 4, MY = 4, NX = 1, NY = 2, SELF = NY * MX + NX;
  logic clk = 1'b0, rst_n = 1'b0;
  logic        inj_en;
  logic [7:0]  inj_rate;
  logic [31:0] now;
  logic        la_out_v, flit_out_v, vcfree_in_v, vcfree_in_id, flit_in_v;
  la_t         la_out;
  flit_t       flit_out, flit_in;
  tok_bundle_t tok_in;
  logic [31:0] pkts_sent, flits_sent, pkts_recv, flits_recv, errors, offers_dropped;
  logic [63:0] lat_sum;
  int checks = 0, failures = 0;

  swift_nic #(.MESH_X(MX), .MESH_Y(MY), .NODE_X(NX), .NODE_Y(NY), .SEED(32'h1234)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- sending-side monitor ----------------
  logic  la_q_v;
  la_t   la_q;
  int    idx = 0, heads = 0, tails = 0, body_while_off = 0;
  logic  pkt_vc;
  bit    tok_off = 0;
  int    tails_q[$];  // VCs to release
  always @(negedge clk) if (rst_n) begin
    check(flit_out_v == la_q_v, "flit one cycle after its lookahead");
    if (flit_out_v) begin
      int dst, dx, dy;
      flit_type_e et;
      dst = int'(flit_out.data[54:49]);
      dx  = dst % MX - NX;
      dy  = dst / MX - NY;
      et  = (idx == 0) ? FT_HEAD : (idx == PKT_LEN - 1) ? FT_TAIL : FT_BODY;
      check(flit_out.ftype == et, $sformatf("flit %0d type", idx));
      check(int'(flit_out.data[60:55]) == SELF && dst != SELF && dst < MX * MY, "source and destination");
      check(int'(flit_out.data[32:30]) == idx, "flit index in payload");
      check(la_q.x_hops == 3'(dx < 0 ? -dx : dx) && la_q.y_hops == 3'(dy < 0 ? -dy : dy) &&
            (dx == 0 || la_q.x_dir == (dx > 0)) && (dy == 0 || la_q.y_dir == (dy < 0)),
            "lookahead hops match the destination");
      if (dx < 0) check(la_q.outport == NPORTS'(1) << P_W, "west first");
      else if (dx > 0 && dy == 0) check(la_q.outport == NPORTS'(1) << P_E, "only East is productive");
      if (idx == 0) begin pkt_vc = la_q.vcid; heads++; end
      else begin
        check(la_q.vcid == pkt_vc, "packet stays on its VC");
        if (tok_off) body_while_off++;
      end
      if (idx == PKT_LEN - 1) begin tails++; tails_q.push_back(int'(pkt_vc)); idx = 0; end
      else idx++;
    end
    la_q_v = la_out_v;
    la_q   = la_out;
  end

  task automatic rx(input int dst, input flit_type_e t, input int i);
    @(negedge clk);
    flit_in_v = 1'b1;
    flit_in.data  = {6'd0, 6'(dst), 16'd0, 3'(i), 30'(now - 7)};
    flit_in.ftype = t;
    @(negedge clk);
    flit_in_v = 1'b0;
  endtask

  always @(posedge clk) now <= rst_n ? now + 1 : 0;

  initial begin
    la_q_v = 1'b0; la_q = '0;
    now = 0; inj_en = 1'b0; inj_rate = 8'd255;
    vcfree_in_v = 1'b0; vcfree_in_id = 1'b0; flit_in_v = 1'b0; flit_in = '0;
    tok_in = '0; tok_in.own = 1'b1; tok_in.res = '1; tok_in.t1 = 3'b101; tok_in.t2 = 3'b010;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // no VC releases: only two packets may start
    inj_en = 1'b1;
    repeat (60) @(negedge clk);
    check(heads == 2 && tails == 2, $sformatf("two packets without VC release (got %0d)", heads));
    check(offers_dropped > 0, "offers dropped while blocked");
    // release VCs as packets finish, then block the token mid-packet
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      vcfree_in_v = tails_q.size() != 0 && $urandom_range(0, 3) == 0;
      if (vcfree_in_v) begin vcfree_in_id = 1'(tails_q[0]); tails_q.pop_front(); end
      if (n == 200) begin tok_in.own = 1'b0; tok_in.res = '0; end
      if (n == 203) tok_off = 1;
      if (n == 300) begin tok_off = 0; tok_in.own = 1'b1; tok_in.res = '1; end
    end
    @(negedge clk); vcfree_in_v = 1'b0; inj_en = 1'b0;
    repeat (20) @(negedge clk);
    check(body_while_off == 0, "no body or tail sent while the token is OFF");
    check(pkts_sent == 32'(tails) && flits_sent == 32'(tails * PKT_LEN) && tails > 10,
          $sformatf("sent counters (%0d packets)", tails));
    // receiving side
    for (int i = 0; i < PKT_LEN; i++)
      rx(SELF, (i == 0) ? FT_HEAD : (i == PKT_LEN - 1) ? FT_TAIL : FT_BODY, i);
    check(pkts_recv == 1 && flits_recv == PKT_LEN && errors == 0, "good packet received");
    check(lat_sum >= 64'd7, "latency accumulated");
    rx(SELF + 1, FT_HEAD, 0);
    check(errors == 1, "misrouted flit counted");
    rx(SELF, FT_TAIL, 1);
    check(errors == 2, "malformed flit counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
