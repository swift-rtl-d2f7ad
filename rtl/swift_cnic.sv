// swift_cnic: congestion NIC for a mesh slice. It sits on an unconnected
// edge port of a router of a small mesh and stands for all the nodes of a
// larger virtual mesh (VMESH_X x VMESH_Y, 8x8 by default) that lie beyond
// that edge, so that a few routers see the traffic of the full network.
//
// Injection: every cycle, with probability inj_rate/256 drawn from a 32-bit
// xorshift generator, a destination is drawn uniformly over the virtual mesh.
// It is kept only if a minimal west-first route from the node beyond the edge
// to it passes through the attached router (entering from the West: the
// destination is not further West; from the East: not further East; from the
// North or South: not further West and not back across the edge), otherwise
// the offer is ignored. Packets of PKT_LEN flits are sent exactly as a router
// would send them: lookahead one cycle before each flit, the head taking a
// free VC of the router's input port, body and tail flits waiting for the
// port's token or its VC's reserved buffer. The destination field holds the
// slice node id when the destination is inside the slice, 63 otherwise.
//
// Ejection: the port is a sink standing for the rest of the network. Flits
// leaving the slice through the edge are counted, a tail completes a packet
// (latency added to lat_sum) and releases its VC at once (vcfree_out); the
// tokens sent to the router are always ON, with all reserved buffers free.
// Flits bound beyond the slice cannot be checked here, so the errors output
// is always zero; it is kept so that the statistics match swift_nic's.
//
// That edge ports of the fabricated slice carry pseudo-random traffic
// generators follows SWIFT; how they choose destinations, their infinite
// sink and the rest of the behaviour are this design's own choices.
// Times are kept modulo 2^30, so now[31:30] is unused; of la_in only the VC
// field is read, to know which VC a sunk packet is using.
module swift_cnic
  import swift_pkg::*;
#(
  parameter int MESH_X = 2,    // slice size
  parameter int MESH_Y = 2,
  parameter int NODE_X = 0,    // attached router, slice coordinates
  parameter int NODE_Y = 0,
  parameter int EDGE   = P_W,  // router port this C-NIC is attached to
  parameter int ORG_X  = 3,    // slice origin in the virtual mesh
  parameter int ORG_Y  = 3,
  parameter int VMESH_X = 8,
  parameter int VMESH_Y = 8,
  parameter logic [31:0] SEED = 32'h1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               inj_en,
  input  logic [7:0]         inj_rate,
  input  logic [31:0]        now,
  // to the router's edge input port
  output logic               la_out_v,
  output la_t                la_out,
  output logic               flit_out_v,
  output flit_t              flit_out,
  input  logic               vcfree_in_v,
  input  logic               vcfree_in_id,
  input  tok_bundle_t        tok_in,
  // from the router's edge output port
  input  logic               la_in_v,
  input  la_t                la_in,
  input  logic               flit_in_v,
  input  flit_t              flit_in,
  output logic               vcfree_out_v,
  output logic               vcfree_out_id,
  output tok_bundle_t        tok_out,
  // statistics
  output logic [31:0]        pkts_sent,
  output logic [31:0]        flits_sent,
  output logic [31:0]        pkts_recv,
  output logic [31:0]        flits_recv,
  output logic [63:0]        lat_sum,
  output logic [31:0]        errors,
  output logic [31:0]        offers_dropped
);

  // ---------------- packet generation ----------------
  logic [31:0] lfsr;
  logic        pend;
  logic [5:0]  pend_dst;
  logic [HOP_W-1:0] pend_xh, pend_yh;
  logic        pend_xd, pend_yd;
  logic [29:0] pend_time;
  logic [15:0] seq;
  logic        offer;

  // xorshift32 step
  function automatic logic [31:0] lfsr_next(logic [31:0] s);
    logic [31:0] r;
    r = s ^ (s << 13);
    r = r ^ (r >> 17);
    return r ^ (r << 5);
  endfunction

  logic [5:0]  rnd_dst;
  logic        rnd_ok;
  int          rdx, rdy;   // hops from the attached router to the drawn node

  always_comb begin
    int vx, vy;
    vx  = int'(lfsr[10:8]) % VMESH_X;
    vy  = int'(lfsr[13:11]) % VMESH_Y;
    rdx = vx - ORG_X - NODE_X;
    rdy = vy - ORG_Y - NODE_Y;
    case (EDGE)
      P_W:     rnd_ok = rdx >= 0;
      P_E:     rnd_ok = rdx <= 0;
      P_N:     rnd_ok = rdx >= 0 && rdy >= 0;
      default: rnd_ok = rdx >= 0 && rdy <= 0;
    endcase
    if (vx - ORG_X >= 0 && vx - ORG_X < MESH_X && vy - ORG_Y >= 0 && vy - ORG_Y < MESH_Y)
      rnd_dst = 6'((vy - ORG_Y) * MESH_X + (vx - ORG_X));
    else
      rnd_dst = 6'h3F;
    offer = inj_en && (lfsr[7:0] < inj_rate) && rnd_ok;
  end

  // ---------------- sending ----------------
  logic [2:0]        idx;       // next flit of the pending packet
  logic              cur_vc;
  logic [NPORTS-1:0] cur_op;
  logic              vcq_nonempty, vcq_head, vcq_deq;
  logic              send;
  la_t               la_hops;
  logic [NPORTS-1:0] rc_op;
  flit_t             stage;
  logic              stage_v;

  always_comb begin
    la_hops        = '0;
    la_hops.x_dir  = pend_xd;
    la_hops.x_hops = pend_xh;
    la_hops.y_dir  = pend_yd;
    la_hops.y_hops = pend_yh;
  end

  la_route_compute u_rc (
    .x_hops(la_hops.x_hops), .x_dir(la_hops.x_dir),
    .y_hops(la_hops.y_hops), .y_dir(la_hops.y_dir),
    .tok1(tok_in.t1), .tok2(tok_in.t2), .outport(rc_op)
  );

  vc_free_queue #(.NVC(NVC)) u_vcq (
    .clk, .rst_n, .deq(vcq_deq), .head_vc(vcq_head), .nonempty(vcq_nonempty),
    .enq(vcfree_in_v), .enq_vc(vcfree_in_id)
  );

  // a body/tail flit needs the token, or the buffer reserved for its VC if no
  // flit went out in the previous cycle (one not yet visible at the router)
  assign send    = pend && (idx == 0 ? vcq_nonempty :
                            (tok_in.own || (tok_in.res[cur_vc] && !la_out_v)));
  assign vcq_deq = send && idx == 0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lfsr           <= SEED | 32'h1;
      pend           <= 1'b0;
      pend_dst       <= '0;
      pend_xd        <= 1'b0;
      pend_xh        <= '0;
      pend_yd        <= 1'b0;
      pend_yh        <= '0;
      pend_time      <= '0;
      seq            <= '0;
      idx            <= '0;
      cur_vc         <= 1'b0;
      cur_op         <= '0;
      la_out_v       <= 1'b0;
      la_out         <= '0;
      stage_v        <= 1'b0;
      stage          <= '0;
      flit_out_v     <= 1'b0;
      flit_out       <= '0;
      pkts_sent      <= '0;
      flits_sent     <= '0;
      offers_dropped <= '0;
    end else begin
      lfsr <= lfsr_next(lfsr);
      if (offer) begin
        if (!pend || (send && idx == 3'(PKT_LEN - 1))) begin
          pend      <= 1'b1;
          pend_dst  <= rnd_dst;
          pend_xd   <= rdx > 0;
          pend_xh   <= HOP_W'(rdx < 0 ? -rdx : rdx);
          pend_yd   <= rdy < 0;
          pend_yh   <= HOP_W'(rdy < 0 ? -rdy : rdy);
          pend_time <= now[29:0];
        end else begin
          offers_dropped <= offers_dropped + 1;
        end
      end else if (send && idx == 3'(PKT_LEN - 1)) begin
        pend <= 1'b0;
      end

      la_out_v <= send;
      stage_v  <= send;
      if (send) begin
        logic [NPORTS-1:0] op;
        logic              vc;
        op = (idx == 0) ? rc_op : cur_op;
        vc = (idx == 0) ? vcq_head : cur_vc;
        cur_op <= op;
        cur_vc <= vc;
        la_out         <= la_hops;
        la_out.outport <= op;
        la_out.vcid    <= vc;
        stage.data     <= {6'h3E, pend_dst, seq, idx, pend_time};
        stage.ftype    <= (PKT_LEN == 1) ? FT_HEAD_TAIL :
                          (idx == 0) ? FT_HEAD :
                          (idx == 3'(PKT_LEN - 1)) ? FT_TAIL : FT_BODY;
        flits_sent <= flits_sent + 1;
        if (idx == 3'(PKT_LEN - 1)) begin
          idx       <= '0;
          seq       <= seq + 1'b1;
          pkts_sent <= pkts_sent + 1;
        end else begin
          idx <= idx + 1'b1;
        end
      end
      flit_out_v <= stage_v;
      flit_out   <= stage;
    end
  end

  // ---------------- ejection: sink ----------------
  logic [29:0] rx_time;
  logic        rx_vc;     // VC of the arriving flit, from its lookahead
  assign rx_time = flit_in.data[29:0];

  always_comb begin
    tok_out     = '0;
    tok_out.own = 1'b1;
    tok_out.res = '1;
    tok_out.t1  = '1;
    tok_out.t2  = '1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pkts_recv     <= '0;
      flits_recv    <= '0;
      lat_sum       <= '0;
      vcfree_out_v  <= 1'b0;
      vcfree_out_id <= 1'b0;
      rx_vc         <= 1'b0;
    end else begin
      if (la_in_v) rx_vc <= la_in.vcid;
      vcfree_out_v  <= flit_in_v && is_tail(flit_in.ftype);
      vcfree_out_id <= rx_vc;
      if (flit_in_v) begin
        flits_recv <= flits_recv + 1;
        if (is_tail(flit_in.ftype)) begin
          pkts_recv <= pkts_recv + 1;
          lat_sum   <= lat_sum + 64'(30'(now[29:0] - rx_time));
        end
      end
    end
  end
  assign errors = '0;

endmodule
