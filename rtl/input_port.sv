// input_port: one input port of a SWIFT router.
//
// Holds the port's shared flit buffers (flit_buffer_rf) with their free list
// (free_buffer_list), a state table per VC, the SA-I arbiter (rr_arbiter) and
// the port's token. Every flit is announced by a lookahead one cycle before it
// arrives:
//   cycle t   la_in_v: the lookahead names the flit's VC. If that VC is idle
//             the flit is a head: the VC becomes active and stores the
//             lookahead's route. The router's lookahead conflict check reports
//             its decision on bypass_gnt in the same cycle.
//   cycle t+1 flit_in_v: a bypassing flit goes straight to the crossbar input
//             (xbar_data); any other flit is written into a free buffer (BW),
//             its address appended to its VC's address queue, and it may
//             already bid in SA-I.
// Non-bypass pipeline: SA-I picks one VC whose front buffered flit could win
// its output port (a head needs a free VC downstream, a body or tail flit the
// downstream token or the downstream buffer reserved for its VC), registered
// as sai_vc; next cycle the router runs SA-O on it, the buffer is read
// pre-emptively (BR) and, if sao_gnt, the flit is popped and crosses the
// crossbar the cycle after (ST). When a tail crosses the crossbar the VC
// becomes idle and vcfree_v tells the upstream router.
// The port's token (own_tok) is ON while more than TOK_THRESH buffers are
// free beyond the reserved ones; res_tok[v] is set while VC v's reserved
// buffer is free (no flit held, announced or arriving for v).
//
// The buffer organisation, the SA-I bias and the token threshold follow SWIFT.
// One buffer per VC is reserved: a VC holding no flit can always take one,
// so a head flit needs only a free VC downstream, and the token counts only
// the free buffers beyond these reservations. Reporting the reserved buffers
// upstream (res_tok), so that a packet whose VC is empty here can advance
// while the shared pool is full of another VC's flits, is this design's way
// of making the reservation work with a single on/off token; without it the
// two VCs of a port can block each other. Other own choices: head
// detection from the VC state (the lookahead has no type field) and releasing
// a VC in its tail's crossbar cycle.
//
// Timing: sai_* and xbar_* are valid in the cycles described above; la_is_head
// and la_vc_busy are combinational on la_in. Synchronous active-low reset.
module input_port
  import swift_pkg::*;
#(
  parameter int NVC_P  = NVC,
  parameter int NBUF_P = NBUF
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // from the link
  input  logic                       la_in_v,
  input  la_t                        la_in,
  input  logic                       flit_in_v,
  input  flit_t                      flit_in,
  // lookahead conflict check result for la_in (cycle t)
  output logic                       la_is_head,
  output logic                       la_vc_busy,
  output logic [NPORTS-1:0]          la_vc_nxt_outport,
  output logic [$clog2(NVC_P)-1:0]   la_vc_out_vc,
  input  logic                       bypass_gnt,
  // VC state write for a head that won its output port
  input  logic                       vcs_wr_v,
  input  logic [$clog2(NVC_P)-1:0]   vcs_wr_vc,
  input  logic [$clog2(NVC_P)-1:0]   vcs_wr_out_vc,
  input  logic [NPORTS-1:0]          vcs_wr_nxt_outport,
  // SA-I winner (registered), seen by SA-O
  output logic                       sai_v,
  output logic [$clog2(NVC_P)-1:0]   sai_vc,
  output la_t                        sai_route,
  output logic                       sai_head,
  output logic [$clog2(NVC_P)-1:0]   sai_out_vc,
  output logic [NPORTS-1:0]          sai_nxt_outport,
  input  logic                       sao_gnt,
  // readiness of each output port: a free VC downstream, the downstream token
  input  logic [NPORTS-1:0]          out_vc_avail,
  input  logic [NPORTS-1:0][NVC_P-1:0] out_tok,  // per output, per downstream VC
  // crossbar input (ST cycle)
  output logic                       xbar_v,
  output flit_t                      xbar_data,
  // upstream signalling
  output logic                       own_tok,
  output logic [NVC_P-1:0]           res_tok,
  output logic                       vcfree_v,
  output logic [$clog2(NVC_P)-1:0]   vcfree_id,
  // events for statistics
  output logic                       ev_buffered,
  output logic                       ev_bypassed
);
  localparam int VW = $clog2(NVC_P);
  localparam int AW = $clog2(NBUF_P);
  localparam int CW = $clog2(NBUF_P) + 1;

  // ---------------- VC state table ----------------
  logic [NVC_P-1:0]      vc_active;
  logic [NVC_P-1:0]      vc_head_pend;  // the VC's head flit is buffered here
  la_t                   vc_route    [NVC_P];
  logic [VW-1:0]         vc_out_vc   [NVC_P];
  logic [NPORTS-1:0]     vc_nxt_op   [NVC_P];
  logic [AW-1:0]         vc_addr     [NVC_P][NBUF_P];
  logic [AW-1:0]         vc_rd       [NVC_P];
  logic [AW-1:0]         vc_wr       [NVC_P];
  logic [CW-1:0]         vc_cnt      [NVC_P];

  // lookahead of the previous cycle, i.e. for the flit arriving now
  logic          byp_r;
  logic [VW-1:0] arr_vc_r;

  // buffer, free list
  logic          fl_alloc;
  logic [AW-1:0] fl_addr;
  logic [CW-1:0] fl_count;
  logic          fl_empty;
  logic          pop;
  logic [AW-1:0] pop_addr;
  flit_t         rd_data;

  logic arr_buf;  // arriving flit is written into the buffer
  assign arr_buf  = flit_in_v && !byp_r;
  assign fl_alloc = arr_buf;
  assign pop      = sai_v && sao_gnt;
  assign pop_addr = vc_addr[sai_vc][vc_rd[sai_vc]];

  free_buffer_list #(.NBUF(NBUF_P)) u_fl (
    .clk, .rst_n, .alloc(fl_alloc), .alloc_addr(fl_addr),
    .free_v(pop), .free_addr(pop_addr), .count(fl_count), .empty(fl_empty)
  );

  flit_buffer_rf #(.NBUF(NBUF_P), .W(FLIT_W)) u_rf (
    .clk, .we(arr_buf), .waddr(fl_addr), .wdata(flit_in),
    .re(sai_v), .raddr(pop_addr), .rdata(rd_data)
  );

  // ---------------- lookahead side ----------------
  assign la_is_head        = !vc_active[la_in.vcid];
  assign la_vc_busy        = vc_cnt[la_in.vcid] != 0 || (arr_buf && arr_vc_r == la_in.vcid);
  assign la_vc_nxt_outport = vc_nxt_op[la_in.vcid];
  assign la_vc_out_vc      = vc_out_vc[la_in.vcid];

  // ---------------- SA-I ----------------
  logic [NVC_P-1:0] sai_req;
  logic [VW-1:0]    sai_idx;
  logic             sai_any;

  always_comb begin
    for (int v = 0; v < NVC_P; v++) begin
      logic [CW-1:0] left;
      logic          popped;
      logic [NPORTS-1:0] ready;
      popped = pop && sai_vc == VW'(v);
      left   = vc_cnt[v] - CW'(popped);
      // bid only when the front flit could win its output port
      ready  = '0;
      for (int o = 0; o < NPORTS; o++)
        ready[o] = vc_head_pend[v] ? out_vc_avail[o] : out_tok[o][vc_out_vc[v]];
      sai_req[v] = (left != 0 || (arr_buf && arr_vc_r == VW'(v))) &&
                   |(vc_route[v].outport & ready);
    end
  end

  rr_arbiter #(.N(NVC_P)) u_sai (
    .clk, .rst_n, .req(sai_req), .advance(pop),
    .gnt(), .gnt_idx(sai_idx), .gnt_v(sai_any)
  );

  assign sai_route       = vc_route[sai_vc];
  assign sai_head        = vc_head_pend[sai_vc];
  assign sai_out_vc      = vc_out_vc[sai_vc];
  assign sai_nxt_outport = vc_nxt_op[sai_vc];

  // ---------------- switch traversal ----------------
  logic          sao_r;
  logic [VW-1:0] sao_vc_r;
  logic [VW-1:0] st_vc;

  assign xbar_v      = (byp_r && flit_in_v) || sao_r;
  assign xbar_data   = (byp_r && flit_in_v) ? flit_in : rd_data;
  assign st_vc       = (byp_r && flit_in_v) ? arr_vc_r : sao_vc_r;
  assign vcfree_v    = xbar_v && is_tail(xbar_data.ftype);
  assign vcfree_id   = st_vc;
  // one buffer per VC is held back for the VC's next flit; the token reports
  // the rest of the pool
  always_comb begin
    logic [CW-1:0] resv;
    resv = '0;
    for (int v = 0; v < NVC_P; v++) resv = resv + CW'(vc_cnt[v] == 0);
    own_tok = fl_count > resv + CW'(TOK_THRESH);
  end
  // a VC's reserved buffer is free while the VC holds no flit and none is
  // announced or arriving for it
  always_comb
    for (int v = 0; v < NVC_P; v++)
      res_tok[v] = vc_cnt[v] == 0 && !(la_in_v && la_in.vcid == VW'(v)) &&
                   !(arr_buf && arr_vc_r == VW'(v));
  assign ev_buffered = arr_buf;
  assign ev_bypassed = byp_r && flit_in_v;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vc_active <= '0;
      vc_head_pend <= '0;
      byp_r     <= 1'b0;
      arr_vc_r  <= '0;
      sai_v     <= 1'b0;
      sai_vc    <= '0;
      sao_r     <= 1'b0;
      sao_vc_r  <= '0;
      for (int v = 0; v < NVC_P; v++) begin
        vc_rd[v]     <= '0;
        vc_wr[v]     <= '0;
        vc_cnt[v]    <= '0;
        vc_route[v]  <= '0;
        vc_out_vc[v] <= '0;
        vc_nxt_op[v] <= '0;
      end
    end else begin
      byp_r    <= la_in_v && bypass_gnt;
      if (la_in_v) arr_vc_r <= la_in.vcid;
      sai_v    <= sai_any;
      sai_vc   <= sai_idx;
      sao_r    <= pop;
      sao_vc_r <= sai_vc;

      // a tail leaving through the crossbar releases its VC
      if (vcfree_v) vc_active[st_vc] <= 1'b0;
      // a head lookahead claims its VC and records the route
      if (pop) vc_head_pend[sai_vc] <= 1'b0;
      if (la_in_v && la_is_head) begin
        vc_active[la_in.vcid]    <= 1'b1;
        vc_route[la_in.vcid]     <= la_in;
        vc_head_pend[la_in.vcid] <= !bypass_gnt;
      end
      if (vcs_wr_v) begin
        vc_out_vc[vcs_wr_vc] <= vcs_wr_out_vc;
        vc_nxt_op[vcs_wr_vc] <= vcs_wr_nxt_outport;
      end

      // per-VC address queues
      for (int v = 0; v < NVC_P; v++) begin
        logic push_v, pop_v;
        push_v = arr_buf && arr_vc_r == VW'(v);
        pop_v  = pop && sai_vc == VW'(v);
        if (push_v) begin
          vc_addr[v][vc_wr[v]] <= fl_addr;
          vc_wr[v] <= AW'((int'(vc_wr[v]) + 1) % NBUF_P);
        end
        if (pop_v) vc_rd[v] <= AW'((int'(vc_rd[v]) + 1) % NBUF_P);
        vc_cnt[v] <= vc_cnt[v] + CW'(push_v) - CW'(pop_v);
      end
    end
  end

  // a flit is always preceded by its lookahead one cycle earlier
  a_la_before_flit: assert property (@(posedge clk) disable iff (!rst_n)
                                     flit_in_v |-> $past(la_in_v));
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  arr_buf |-> !fl_empty);
  a_pop_nonempty: assert property (@(posedge clk) disable iff (!rst_n)
                                   pop |-> vc_cnt[sai_vc] != 0);

endmodule
