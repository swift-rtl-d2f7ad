// swift_router: a 5-port SWIFT router with token flow control and lookahead
// buffer bypassing.
//
// Ports 0..4 are North, East, South, West and Local. A flit reaching an input
// port was announced by a 14-bit lookahead one cycle earlier. In that cycle
// the router runs, in parallel:
//   LA-CC  (la_conflict_check) on the lookaheads: a winner gets its output port
//          for the next cycle, and its flit crosses the crossbar straight from
//          the link without being buffered (one-cycle router);
//   SA-O   (one matrix_arbiter per output port) on the SA-I winners of the
//          input ports, i.e. on buffered flits; grants that collide with a
//          lookahead are killed;
//   VA     a head that wins an output port takes the next free VC of the
//          downstream input port from that port's vc_free_queue;
//   LA-RC  (la_route_compute) for each winner: the output port the flit will
//          take at the next router, chosen with the tokens around that router.
// At the end of the cycle the winners' lookaheads for the next router are
// registered on la_out, and the crossbar is set up. In the next cycle the
// flits cross the crossbar (ST) into the output registers, then spend one
// cycle on the link (LT). A bypassed flit therefore spends two cycles per hop;
// a buffered one goes through BW+SA-I, SA-O+VA+BR, ST, then LT.
//
// Flow control: a head needs a free VC downstream; a body or tail flit needs
// the downstream input port's token (more than three spare buffers) or, when
// that is OFF, the buffer reserved for its VC there. The
// Local output port (ejection to the NIC) never lacks either. VC releases
// arrive on vcfree_in and are reported upstream on vcfree_out.
//
// The pipeline, priorities and flow control follow SWIFT; the exact cycle in
// which each lookahead is generated and the killing of SA-O grants that share
// an input port with a bypass are this design's own reading. ev_* outputs
// pulse once per event for statistics. Bit 4 (Local) of vcfree_in_v/_id is
// unused and no VC queue exists for the Local output: the NIC sinks every
// flit, so ejection needs no VC bookkeeping.
module swift_router
  import swift_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          bypass_en,
  // input side of each port
  input  logic        [NPORTS-1:0]      la_in_v,
  input  la_t         [NPORTS-1:0]      la_in,
  input  logic        [NPORTS-1:0]      flit_in_v,
  input  flit_t       [NPORTS-1:0]      flit_in,
  output logic        [NPORTS-1:0]      vcfree_out_v,
  output logic        [NPORTS-1:0]      vcfree_out_id,
  // output side of each port
  output logic        [NPORTS-1:0]      la_out_v,
  output la_t         [NPORTS-1:0]      la_out,
  output logic        [NPORTS-1:0]      flit_out_v,
  output flit_t       [NPORTS-1:0]      flit_out,
  input  logic        [NPORTS-1:0]      vcfree_in_v,
  input  logic        [NPORTS-1:0]      vcfree_in_id,
  // tokens
  input  tok_bundle_t [NPORTS-1:0]      tok_in,
  output tok_bundle_t [NPORTS-1:0]      tok_out,
  // statistics
  output logic        [NPORTS-1:0]      ev_bypass,
  output logic        [NPORTS-1:0]      ev_buffered,
  output logic        [NPORTS-1:0]      ev_sao_killed,
  output logic        [NPORTS-1:0]      ev_la_lost
);
  localparam int PW = $clog2(NPORTS);

  // ---------------- input ports ----------------
  logic [NPORTS-1:0]              la_is_head, la_busy, bypass_gnt;
  logic [NPORTS-1:0][NPORTS-1:0]  la_vc_nxt_op;
  logic [NPORTS-1:0]              la_vc_out_vc;
  logic [NPORTS-1:0]              vcs_wr_v, vcs_wr_vc, vcs_wr_out_vc;
  logic [NPORTS-1:0][NPORTS-1:0]  vcs_wr_nxt_op;
  logic [NPORTS-1:0]              sai_v, sai_vc, sai_head, sai_out_vc, sao_gnt_in;
  la_t  [NPORTS-1:0]              sai_route;
  logic [NPORTS-1:0][NPORTS-1:0]  sai_nxt_op;
  logic [NPORTS-1:0]              xbar_v;
  flit_t [NPORTS-1:0]             xbar_data;
  logic [NPORTS-1:0]              own_tok;
  logic [NPORTS-1:0][NVC-1:0]     res_tok;

  // ---------------- per output port: downstream readiness ----------------
  logic [NPORTS-1:0] vc_avail, tok_on, vcq_head, vcq_deq;
  // a body/tail flit may go to VC v of output o when the downstream token is
  // ON, or when the buffer reserved for v there is free and no flit went to v
  // in the previous cycle (that one is not yet visible downstream)
  logic [NPORTS-1:0][NVC-1:0] tok_vc;
  logic [NPORTS-1:0]          last_v, last_vc;

  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    input_port u_ip (
      .clk, .rst_n,
      .la_in_v(la_in_v[p]), .la_in(la_in[p]), .flit_in_v(flit_in_v[p]), .flit_in(flit_in[p]),
      .la_is_head(la_is_head[p]), .la_vc_busy(la_busy[p]),
      .la_vc_nxt_outport(la_vc_nxt_op[p]), .la_vc_out_vc(la_vc_out_vc[p]),
      .bypass_gnt(bypass_gnt[p]),
      .vcs_wr_v(vcs_wr_v[p]), .vcs_wr_vc(vcs_wr_vc[p]), .vcs_wr_out_vc(vcs_wr_out_vc[p]),
      .vcs_wr_nxt_outport(vcs_wr_nxt_op[p]),
      .sai_v(sai_v[p]), .sai_vc(sai_vc[p]), .sai_route(sai_route[p]), .sai_head(sai_head[p]),
      .sai_out_vc(sai_out_vc[p]), .sai_nxt_outport(sai_nxt_op[p]), .sao_gnt(sao_gnt_in[p]),
      .out_vc_avail(vc_avail), .out_tok(tok_vc),
      .xbar_v(xbar_v[p]), .xbar_data(xbar_data[p]),
      .own_tok(own_tok[p]), .res_tok(res_tok[p]), .vcfree_v(vcfree_out_v[p]), .vcfree_id(vcfree_out_id[p]),
      .ev_buffered(ev_buffered[p]), .ev_bypassed(ev_bypass[p])
    );
  end

  // ---------------- tokens ----------------
  logic [3:0]      tok1;
  logic [3:0][2:0] nbr_t1, nbr_t2;

  token_relay u_tok (
    .clk, .rst_n, .own_tok, .res_tok, .tok_in, .tok_out, .tok1, .nbr_t1, .nbr_t2
  );

  // ---------------- VC selection queues ----------------

  for (genvar o = 0; o < NPORTS; o++) begin : g_vcq
    if (o == P_L) begin : g_local
      // the NIC sinks every flit: always a VC and buffer space
      assign vc_avail[o] = 1'b1;
      assign tok_on[o]   = 1'b1;
      assign vcq_head[o] = 1'b0;
    end else begin : g_net
      vc_free_queue #(.NVC(NVC)) u_vcq (
        .clk, .rst_n, .deq(vcq_deq[o]), .head_vc(vcq_head[o]), .nonempty(vc_avail[o]),
        .enq(vcfree_in_v[o]), .enq_vc(vcfree_in_id[o])
      );
      assign tok_on[o] = tok1[o];
    end
    for (genvar v = 0; v < NVC; v++) begin : g_tv
      assign tok_vc[o][v] = (o == P_L) || tok_on[o] ||
                            (tok_in[o].res[v] && !(last_v[o] && last_vc[o] == 1'(v)));
    end
  end

  // ---------------- SA-O ----------------
  logic [NPORTS-1:0][NPORTS-1:0] sao_req, sao_gnt, sao_final;  // [output][input]
  logic [NPORTS-1:0]             sao_upd;

  always_comb begin
    for (int o = 0; o < NPORTS; o++)
      for (int p = 0; p < NPORTS; p++)
        sao_req[o][p] = sai_v[p] && sai_route[p].outport[o] && p != o &&
                        (sai_head[p] ? vc_avail[o] : tok_vc[o][sai_out_vc[p]]);
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_sao
    matrix_arbiter #(.N(NPORTS)) u_sao (
      .clk, .rst_n, .req(sao_req[o]), .update(sao_upd[o]), .gnt(sao_gnt[o])
    );
    assign sao_upd[o] = |sao_final[o];
  end

  // ---------------- LA-CC ----------------
  logic [NPORTS-1:0][NPORTS-1:0] la_op;
  logic [NPORTS-1:0]             out_by_la;
  logic [PW-1:0]                 la_win [NPORTS];
  logic [NPORTS-1:0]             la_tok_ok;

  always_comb
    for (int p = 0; p < NPORTS; p++) begin
      la_op[p]     = la_in[p].outport;
      la_tok_ok[p] = 1'b0;
      for (int o = 0; o < NPORTS; o++)
        if (la_op[p][o] && tok_vc[o][la_vc_out_vc[p]]) la_tok_ok[p] = 1'b1;
    end

  la_conflict_check u_lacc (
    .clk, .rst_n, .bypass_en, .la_v(la_in_v), .outport(la_op), .head(la_is_head),
    .busy(la_busy), .vc_avail, .tok_ok(la_tok_ok), .sao_gnt, .la_gnt(bypass_gnt),
    .sao_final, .out_by_la, .la_win, .sao_killed(ev_sao_killed)
  );

  assign ev_la_lost = la_in_v & ~bypass_gnt;

  // ---------------- per output: winner, VA, LA-RC ----------------
  logic [NPORTS-1:0]           win_v, win_head;
  logic [PW-1:0]               win_in   [NPORTS];
  la_t                         win_route[NPORTS];
  logic [NPORTS-1:0]           win_out_vc;
  logic [NPORTS-1:0][NPORTS-1:0] win_nxt_op, rc_op;
  la_t  [NPORTS-1:0]           nxt_hops;

  always_comb begin
    for (int p = 0; p < NPORTS; p++) sao_gnt_in[p] = 1'b0;
    for (int o = 0; o < NPORTS; o++) begin
      win_v[o]     = 1'b0;
      win_in[o]    = '0;
      win_head[o]  = 1'b0;
      win_route[o] = '0;
      if (out_by_la[o]) begin
        win_v[o]     = 1'b1;
        win_in[o]    = la_win[o];
        win_head[o]  = la_is_head[la_win[o]];
        win_route[o] = la_in[la_win[o]];
      end else begin
        for (int p = 0; p < NPORTS; p++)
          if (sao_final[o][p]) begin
            win_v[o]      = 1'b1;
            win_in[o]     = PW'(p);
            win_head[o]   = sai_head[p];
            win_route[o]  = sai_route[p];
            sao_gnt_in[p] = 1'b1;
          end
      end
      nxt_hops[o] = step_hops(win_route[o], o);
      vcq_deq[o]  = win_v[o] && win_head[o] && o != P_L;
    end
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_rc
    if (o == P_L) begin : g_local
      assign rc_op[o] = NPORTS'(1) << P_L;
    end else begin : g_net
      la_route_compute u_rc (
        .x_hops(nxt_hops[o].x_hops), .x_dir(nxt_hops[o].x_dir),
        .y_hops(nxt_hops[o].y_hops), .y_dir(nxt_hops[o].y_dir),
        .tok1(nbr_t1[o]), .tok2(nbr_t2[o]), .outport(rc_op[o])
      );
    end
  end

  always_comb begin
    vcs_wr_v      = '0;
    vcs_wr_vc     = '0;
    vcs_wr_out_vc = '0;
    vcs_wr_nxt_op = '0;
    for (int o = 0; o < NPORTS; o++) begin
      int unsigned p;
      p = 32'(win_in[o]);
      if (win_head[o]) begin
        win_out_vc[o] = vcq_head[o];
        win_nxt_op[o] = rc_op[o];
      end else if (out_by_la[o]) begin
        win_out_vc[o] = la_vc_out_vc[p];
        win_nxt_op[o] = la_vc_nxt_op[p];
      end else begin
        win_out_vc[o] = sai_out_vc[p];
        win_nxt_op[o] = sai_nxt_op[p];
      end
      if (win_v[o] && win_head[o]) begin
        vcs_wr_v[p]      = 1'b1;
        vcs_wr_vc[p]     = out_by_la[o] ? la_in[p].vcid : sai_vc[p];
        vcs_wr_out_vc[p] = vcq_head[o];
        vcs_wr_nxt_op[p] = rc_op[o];
      end
    end
  end

  // ---------------- lookahead out, crossbar control ----------------
  logic [NPORTS-1:0]          st_en;
  logic [NPORTS-1:0][PW-1:0]  st_sel;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      la_out_v <= '0;
      st_en    <= '0;
      st_sel   <= '0;
      last_v   <= '0;
      last_vc  <= '0;
    end else begin
      la_out_v <= win_v;
      last_v   <= win_v;
      last_vc  <= win_out_vc;
      st_en    <= win_v;
      for (int o = 0; o < NPORTS; o++) st_sel[o] <= win_in[o];
    end
    for (int o = 0; o < NPORTS; o++) begin
      la_out[o]         <= nxt_hops[o];
      la_out[o].outport <= win_nxt_op[o];
      la_out[o].vcid    <= win_out_vc[o];
    end
  end

  lowswing_xbar #(.W(FLIT_W), .N(NPORTS)) u_xbar (
    .clk, .rst_n, .in_data(xbar_data), .sel(st_sel), .en(st_en),
    .out_data(flit_out), .out_v(flit_out_v)
  );

  // the crossbar input chosen for switch traversal must hold a flit
  for (genvar o = 0; o < NPORTS; o++) begin : g_chk
    a_st_has_flit: assert property (@(posedge clk) disable iff (!rst_n)
                                    st_en[o] |-> xbar_v[st_sel[o]]);
  end

endmodule
