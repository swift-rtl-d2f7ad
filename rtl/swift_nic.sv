// swift_nic: local network interface with a pseudo-random traffic generator.
//
// Injection: every cycle, with probability inj_rate/256 drawn from a 32-bit
// xorshift generator, a packet of PKT_LEN flits is offered to a uniformly random other node.
// One packet waits at a time; offers made while it waits are counted in
// offers_dropped. Each flit is announced to the router by a lookahead one
// cycle before the flit, exactly as a router would: the head takes the next
// free VC of the router's Local input port (kept in a vc_free_queue fed by the
// router's VC releases), body and tail flits wait for the port's token or for
// the buffer reserved for their VC. The
// lookahead carries the hops to the destination and the output port at the
// router, computed with la_route_compute from the tokens the router forwards
// to the NIC.
//
// Ejection: every flit received is checked (right destination, flit type
// matching its position in the packet); a tail completes a packet and adds its
// latency (cycles from the offer to the tail's arrival) to lat_sum.
//
// Payload (bits 63..3 of the flit): src[60:55], dst[54:49], seq[48:33],
// idx[32:30], time[29:0]. Random traffic, the packet length and the token and
// VC rules follow SWIFT; the payload, the xorshift generator and the single waiting packet
// are this design's own choices. Ids are y*MESH_X+x, rows numbered from the
// North edge. Times are kept modulo 2^30 (the payload's time field), so
// now[31:30] is unused.
module swift_nic
  import swift_pkg::*;
#(
  parameter int MESH_X = 8,
  parameter int MESH_Y = 8,
  parameter int NODE_X = 0,
  parameter int NODE_Y = 0,
  parameter logic [31:0] SEED = 32'h1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               inj_en,
  input  logic [7:0]         inj_rate,
  input  logic [31:0]        now,
  // to the router's Local input
  output logic               la_out_v,
  output la_t                la_out,
  output logic               flit_out_v,
  output flit_t              flit_out,
  input  logic               vcfree_in_v,
  input  logic               vcfree_in_id,
  input  tok_bundle_t        tok_in,
  // from the router's Local output
  input  logic               flit_in_v,
  input  flit_t              flit_in,
  // statistics
  output logic [31:0]        pkts_sent,
  output logic [31:0]        flits_sent,
  output logic [31:0]        pkts_recv,
  output logic [31:0]        flits_recv,
  output logic [63:0]        lat_sum,
  output logic [31:0]        errors,
  output logic [31:0]        offers_dropped
);
  localparam int NN   = MESH_X * MESH_Y;
  localparam int SELF = NODE_Y * MESH_X + NODE_X;

  // ---------------- packet generation ----------------
  logic [31:0] lfsr;
  logic        pend;
  logic [5:0]  pend_dst;
  logic [29:0] pend_time;
  logic [15:0] seq;
  logic        offer;
  logic [5:0]  rnd_dst;

  // xorshift32 step
  function automatic logic [31:0] lfsr_next(logic [31:0] s);
    logic [31:0] r;
    r = s ^ (s << 13);
    r = r ^ (r >> 17);
    return r ^ (r << 5);
  endfunction

  always_comb begin
    int unsigned d;
    offer = inj_en && (lfsr[7:0] < inj_rate);
    d     = (int'(lfsr[23:8]) * NN) >> 16;
    if (d == SELF) d = (d + 1) % NN;
    rnd_dst = 6'(d);
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
  int                dx, dy;

  always_comb begin
    dx = int'(pend_dst) % MESH_X - NODE_X;
    dy = int'(pend_dst) / MESH_X - NODE_Y;
    la_hops         = '0;
    la_hops.x_dir   = dx > 0;
    la_hops.x_hops  = HOP_W'(dx < 0 ? -dx : dx);
    la_hops.y_dir   = dy < 0;
    la_hops.y_hops  = HOP_W'(dy < 0 ? -dy : dy);
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
        stage.data     <= {6'(SELF), pend_dst, seq, idx, pend_time};
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

  // ---------------- ejection ----------------
  logic [5:0]  rx_dst;
  logic [2:0]  rx_idx;
  logic [29:0] rx_time;
  flit_type_e  exp_type;

  assign rx_dst  = flit_in.data[54:49];
  assign rx_idx  = flit_in.data[32:30];
  assign rx_time = flit_in.data[29:0];
  assign exp_type = (PKT_LEN == 1) ? FT_HEAD_TAIL :
                    (rx_idx == 0) ? FT_HEAD :
                    (rx_idx == 3'(PKT_LEN - 1)) ? FT_TAIL : FT_BODY;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pkts_recv  <= '0;
      flits_recv <= '0;
      lat_sum    <= '0;
      errors     <= '0;
    end else if (flit_in_v) begin
      flits_recv <= flits_recv + 1;
      if (rx_dst != 6'(SELF) || flit_in.ftype != exp_type) errors <= errors + 1;
      if (is_tail(flit_in.ftype)) begin
        pkts_recv <= pkts_recv + 1;
        lat_sum   <= lat_sum + 64'(30'(now[29:0] - rx_time));
      end
    end
  end

endmodule
