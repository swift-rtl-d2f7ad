// swift_noc: the SWIFT network-on-chip, a MESH_X x MESH_Y mesh (8x8 by
// default) of swift_router tiles, each with a swift_nic traffic generator on
// its Local port, joined by one-cycle swift_link stages in both directions.
//
// Node (x, y) has id y*MESH_X + x; row 0 is the North edge, column 0 the West
// edge. Router output port d of a node feeds input port opposite(d) of the
// neighbour through a link; VC releases travel back through the same link.
// Token bundles go straight from router to router (each router registers what
// it forwards). Ports on the mesh edge are idle: their inputs are tied low and
// their tokens OFF, and minimal routing never uses them. With EDGE_GEN set
// the mesh is instead a slice of a larger network, as on the SWIFT test chip
// (a 2x2 slice of the 8x8 network): every edge port gets a swift_cnic, which
// injects the traffic the rest of the network would send through that edge
// and sinks what leaves through it. Sums then include the edge generators.
//
// The top brings out the traffic controls, the sums of the NICs' counters and
// counts of the mechanisms at work: flits bypassing router buffers, flits
// written into buffers, SA-O grants killed by lookaheads and lookaheads that
// lost their bypass. Mesh size, router and link structure follow SWIFT; the
// counters are this design's own. All counters restart on reset.
module swift_noc
  import swift_pkg::*;
#(
  parameter int MESH_X = 8,
  parameter int MESH_Y = 8,
  // test-chip slice: a congestion NIC on every unconnected edge port, standing
  // for the rest of a VMESH_X x VMESH_Y network whose origin is (ORG_X, ORG_Y)
  parameter bit EDGE_GEN = 1'b0,
  parameter int ORG_X    = 3,
  parameter int ORG_Y    = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bypass_en,
  input  logic        inj_en,
  input  logic [7:0]  inj_rate,
  output logic [31:0] cycles,
  output logic [31:0] pkts_sent,
  output logic [31:0] flits_sent,
  output logic [31:0] pkts_recv,
  output logic [31:0] flits_recv,
  output logic [63:0] lat_sum,
  output logic [31:0] errors,
  output logic [31:0] offers_dropped,
  output logic [31:0] n_bypass,
  output logic [31:0] n_buffered,
  output logic [31:0] n_sao_killed,
  output logic [31:0] n_la_lost
);
  localparam int NN = MESH_X * MESH_Y;

  logic        [NPORTS-1:0] in_la_v   [NN];
  la_t         [NPORTS-1:0] in_la     [NN];
  logic        [NPORTS-1:0] in_flit_v [NN];
  flit_t       [NPORTS-1:0] in_flit   [NN];
  logic        [NPORTS-1:0] vf_out_v  [NN];
  logic        [NPORTS-1:0] vf_out_id [NN];
  logic        [NPORTS-1:0] out_la_v  [NN];
  la_t         [NPORTS-1:0] out_la    [NN];
  logic        [NPORTS-1:0] out_flit_v[NN];
  flit_t       [NPORTS-1:0] out_flit  [NN];
  logic        [NPORTS-1:0] vf_in_v   [NN];
  logic        [NPORTS-1:0] vf_in_id  [NN];
  tok_bundle_t [NPORTS-1:0] tok_in    [NN];
  tok_bundle_t [NPORTS-1:0] tok_out   [NN];
  logic        [NPORTS-1:0] ev_byp [NN], ev_buf [NN], ev_kill [NN], ev_lost [NN];

  logic [31:0] s_pkts_sent [NN], s_flits_sent [NN], s_pkts_recv [NN], s_flits_recv [NN];
  logic [31:0] s_errors [NN], s_dropped [NN];
  logic [63:0] s_lat [NN];
  // edge congestion NICs, per node and network port (zero when absent)
  logic [31:0] c_pkts_sent [NN][4], c_flits_sent [NN][4], c_pkts_recv [NN][4], c_flits_recv [NN][4];
  logic [31:0] c_dropped [NN][4];
  logic [63:0] c_lat [NN][4];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int N = y * MESH_X + x;

      swift_router u_router (
        .clk, .rst_n, .bypass_en,
        .la_in_v(in_la_v[N]), .la_in(in_la[N]), .flit_in_v(in_flit_v[N]), .flit_in(in_flit[N]),
        .vcfree_out_v(vf_out_v[N]), .vcfree_out_id(vf_out_id[N]),
        .la_out_v(out_la_v[N]), .la_out(out_la[N]), .flit_out_v(out_flit_v[N]), .flit_out(out_flit[N]),
        .vcfree_in_v(vf_in_v[N]), .vcfree_in_id(vf_in_id[N]),
        .tok_in(tok_in[N]), .tok_out(tok_out[N]),
        .ev_bypass(ev_byp[N]), .ev_buffered(ev_buf[N]), .ev_sao_killed(ev_kill[N]),
        .ev_la_lost(ev_lost[N])
      );

      // ---- network ports: link from this router's output d ----
      for (genvar d = 0; d < 4; d++) begin : g_port
        localparam int NX = (d == P_E) ? x + 1 : (d == P_W) ? x - 1 : x;
        localparam int NY = (d == P_S) ? y + 1 : (d == P_N) ? y - 1 : y;
        localparam int OD = (d == P_N) ? P_S : (d == P_S) ? P_N : (d == P_E) ? P_W : P_E;
        if (NX >= 0 && NX < MESH_X && NY >= 0 && NY < MESH_Y) begin : g_link
          localparam int M = NY * MESH_X + NX;
          swift_link u_link (
            .clk, .rst_n,
            .flit_tx_v(out_flit_v[N][d]), .flit_tx(out_flit[N][d]),
            .la_tx_v(out_la_v[N][d]), .la_tx(out_la[N][d]),
            .flit_rx_v(in_flit_v[M][OD]), .flit_rx(in_flit[M][OD]),
            .la_rx_v(in_la_v[M][OD]), .la_rx(in_la[M][OD]),
            .vcfree_tx_v(vf_out_v[M][OD]), .vcfree_tx_id(vf_out_id[M][OD]),
            .vcfree_rx_v(vf_in_v[N][d]), .vcfree_rx_id(vf_in_id[N][d])
          );
          assign tok_in[N][d] = tok_out[M][OD];
          assign c_pkts_sent[N][d]  = '0;
          assign c_flits_sent[N][d] = '0;
          assign c_pkts_recv[N][d]  = '0;
          assign c_flits_recv[N][d] = '0;
          assign c_dropped[N][d]    = '0;
          assign c_lat[N][d]        = '0;
        end else if (EDGE_GEN) begin : g_cnic
          logic        c_la_v, c_flit_v, c_vf_v, c_vf_id, e_la_v, e_flit_v, e_vf_v, e_vf_id;
          la_t         c_la, e_la;
          flit_t       c_flit, e_flit;
          logic [31:0] c_err_unused;
          swift_cnic #(.MESH_X(MESH_X), .MESH_Y(MESH_Y), .NODE_X(x), .NODE_Y(y), .EDGE(d),
                       .ORG_X(ORG_X), .ORG_Y(ORG_Y),
                       .SEED(32'h85EB_CA6B * (N * 4 + d + 1))) u_cnic (
            .clk, .rst_n, .inj_en, .inj_rate, .now(cycles),
            .la_out_v(c_la_v), .la_out(c_la), .flit_out_v(c_flit_v), .flit_out(c_flit),
            .vcfree_in_v(c_vf_v), .vcfree_in_id(c_vf_id), .tok_in(tok_out[N][d]),
            .la_in_v(e_la_v), .la_in(e_la), .flit_in_v(e_flit_v), .flit_in(e_flit),
            .vcfree_out_v(e_vf_v), .vcfree_out_id(e_vf_id), .tok_out(tok_in[N][d]),
            .pkts_sent(c_pkts_sent[N][d]), .flits_sent(c_flits_sent[N][d]),
            .pkts_recv(c_pkts_recv[N][d]), .flits_recv(c_flits_recv[N][d]),
            .lat_sum(c_lat[N][d]), .errors(c_err_unused), .offers_dropped(c_dropped[N][d])
          );
          // into the router's edge input port
          swift_link u_cin (
            .clk, .rst_n,
            .flit_tx_v(c_flit_v), .flit_tx(c_flit), .la_tx_v(c_la_v), .la_tx(c_la),
            .flit_rx_v(in_flit_v[N][d]), .flit_rx(in_flit[N][d]),
            .la_rx_v(in_la_v[N][d]), .la_rx(in_la[N][d]),
            .vcfree_tx_v(vf_out_v[N][d]), .vcfree_tx_id(vf_out_id[N][d]),
            .vcfree_rx_v(c_vf_v), .vcfree_rx_id(c_vf_id)
          );
          // out of the router's edge output port
          swift_link u_cout (
            .clk, .rst_n,
            .flit_tx_v(out_flit_v[N][d]), .flit_tx(out_flit[N][d]),
            .la_tx_v(out_la_v[N][d]), .la_tx(out_la[N][d]),
            .flit_rx_v(e_flit_v), .flit_rx(e_flit), .la_rx_v(e_la_v), .la_rx(e_la),
            .vcfree_tx_v(e_vf_v), .vcfree_tx_id(e_vf_id),
            .vcfree_rx_v(vf_in_v[N][d]), .vcfree_rx_id(vf_in_id[N][d])
          );
        end else begin : g_edge
          assign in_flit_v[N][d] = 1'b0;
          assign in_flit[N][d]   = '0;
          assign in_la_v[N][d]   = 1'b0;
          assign in_la[N][d]     = '0;
          assign vf_in_v[N][d]   = 1'b0;
          assign vf_in_id[N][d]  = 1'b0;
          assign tok_in[N][d]    = '0;
          assign c_pkts_sent[N][d]  = '0;
          assign c_flits_sent[N][d] = '0;
          assign c_pkts_recv[N][d]  = '0;
          assign c_flits_recv[N][d] = '0;
          assign c_dropped[N][d]    = '0;
          assign c_lat[N][d]        = '0;
        end
      end

      // ---- Local port: NIC ----
      logic        nic_la_v, nic_flit_v;
      la_t         nic_la;
      flit_t       nic_flit;
      logic        ej_v;
      flit_t       ej_flit;
      logic        nic_vf_v, nic_vf_id;
      logic        ej_la_v_unused;
      la_t         ej_la_unused;
      logic        ej_vf_v_unused, ej_vf_id_unused;

      swift_nic #(.MESH_X(MESH_X), .MESH_Y(MESH_Y), .NODE_X(x), .NODE_Y(y),
                  .SEED(32'h9E37_79B9 * (N + 1))) u_nic (
        .clk, .rst_n, .inj_en, .inj_rate, .now(cycles),
        .la_out_v(nic_la_v), .la_out(nic_la), .flit_out_v(nic_flit_v), .flit_out(nic_flit),
        .vcfree_in_v(nic_vf_v), .vcfree_in_id(nic_vf_id), .tok_in(tok_out[N][P_L]),
        .flit_in_v(ej_v), .flit_in(ej_flit),
        .pkts_sent(s_pkts_sent[N]), .flits_sent(s_flits_sent[N]), .pkts_recv(s_pkts_recv[N]),
        .flits_recv(s_flits_recv[N]), .lat_sum(s_lat[N]), .errors(s_errors[N]),
        .offers_dropped(s_dropped[N])
      );

      swift_link u_inj (
        .clk, .rst_n,
        .flit_tx_v(nic_flit_v), .flit_tx(nic_flit), .la_tx_v(nic_la_v), .la_tx(nic_la),
        .flit_rx_v(in_flit_v[N][P_L]), .flit_rx(in_flit[N][P_L]),
        .la_rx_v(in_la_v[N][P_L]), .la_rx(in_la[N][P_L]),
        .vcfree_tx_v(vf_out_v[N][P_L]), .vcfree_tx_id(vf_out_id[N][P_L]),
        .vcfree_rx_v(nic_vf_v), .vcfree_rx_id(nic_vf_id)
      );

      // ejection: the lookahead to the NIC is not needed, the NIC never
      // releases VCs (it sinks every flit)
      swift_link u_ej (
        .clk, .rst_n,
        .flit_tx_v(out_flit_v[N][P_L]), .flit_tx(out_flit[N][P_L]),
        .la_tx_v(out_la_v[N][P_L]), .la_tx(out_la[N][P_L]),
        .flit_rx_v(ej_v), .flit_rx(ej_flit),
        .la_rx_v(ej_la_v_unused), .la_rx(ej_la_unused),
        .vcfree_tx_v(1'b0), .vcfree_tx_id(1'b0),
        .vcfree_rx_v(ej_vf_v_unused), .vcfree_rx_id(ej_vf_id_unused)
      );
      assign vf_in_v[N][P_L]  = 1'b0;
      assign vf_in_id[N][P_L] = 1'b0;
      assign tok_in[N][P_L]   = '0;
    end
  end

  // ---------------- totals ----------------
  always_comb begin
    pkts_sent = '0; flits_sent = '0; pkts_recv = '0; flits_recv = '0;
    lat_sum = '0; errors = '0; offers_dropped = '0;
    for (int n = 0; n < NN; n++) begin
      pkts_sent      += s_pkts_sent[n];
      flits_sent     += s_flits_sent[n];
      pkts_recv      += s_pkts_recv[n];
      flits_recv     += s_flits_recv[n];
      lat_sum        += s_lat[n];
      errors         += s_errors[n];
      offers_dropped += s_dropped[n];
      for (int d = 0; d < 4; d++) begin
        pkts_sent      += c_pkts_sent[n][d];
        flits_sent     += c_flits_sent[n][d];
        pkts_recv      += c_pkts_recv[n][d];
        flits_recv     += c_flits_recv[n][d];
        lat_sum        += c_lat[n][d];
        offers_dropped += c_dropped[n][d];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cycles       <= '0;
      n_bypass     <= '0;
      n_buffered   <= '0;
      n_sao_killed <= '0;
      n_la_lost    <= '0;
    end else begin
      logic [31:0] a, b, c, e;
      a = '0; b = '0; c = '0; e = '0;
      for (int n = 0; n < NN; n++) begin
        a += 32'($countones(ev_byp[n]));
        b += 32'($countones(ev_buf[n]));
        c += 32'($countones(ev_kill[n]));
        e += 32'($countones(ev_lost[n]));
      end
      cycles       <= cycles + 1;
      n_bypass     <= n_bypass + a;
      n_buffered   <= n_buffered + b;
      n_sao_killed <= n_sao_killed + c;
      n_la_lost    <= n_la_lost + e;
    end
  end

endmodule
