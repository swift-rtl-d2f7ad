// la_conflict_check: lookahead conflict check (LA-CC) of a SWIFT router.
//
// A lookahead arriving at input port p one cycle ahead of its flit asks for
// output port outport[p]. It is eligible for bypass when bypassing is enabled
// and
//   - for a head flit: the next router has a free VC (vc_avail), or
//   - for a body/tail flit: the next router can take it (tok_ok: its token is
//     ON, or the buffer reserved for the packet's VC there is free) and no
//     earlier flit of the same packet is still buffered here (busy).
// Among eligible lookaheads asking for the same output port, the input port
// nearest at or after that output's switch priority pointer wins; each pointer
// moves on to the next input port every EPOCH cycles. Lookaheads take priority
// over the buffered flits of the non-bypass pipeline: a SA-O grant on an output
// port won by a lookahead is killed, and so is a SA-O grant of an input port
// whose lookahead won (a crossbar input carries one flit per cycle; that second
// rule is this design's addition). Losing lookaheads leave their flits to be
// buffered. The decision order follows SWIFT's LA-CC flow chart.
//
// Purely combinational apart from the epoch counter and the priority
// pointers. bypass_en = 0 forces every flit through the buffers.
module la_conflict_check
  import swift_pkg::*;
#(
  parameter int EPOCH_P = EPOCH
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           bypass_en,
  input  logic [NPORTS-1:0]              la_v,
  input  logic [NPORTS-1:0][NPORTS-1:0]  outport,    // [input] one-hot
  input  logic [NPORTS-1:0]              head,
  input  logic [NPORTS-1:0]              busy,
  input  logic [NPORTS-1:0]              vc_avail,   // [output]
  input  logic [NPORTS-1:0]              tok_ok,     // [input] downstream can take the body flit
  input  logic [NPORTS-1:0][NPORTS-1:0]  sao_gnt,    // [output][input]
  output logic [NPORTS-1:0]              la_gnt,     // [input]
  output logic [NPORTS-1:0][NPORTS-1:0]  sao_final,  // [output][input]
  output logic [NPORTS-1:0]              out_by_la,  // [output]
  output logic [$clog2(NPORTS)-1:0]      la_win [NPORTS],  // [output] input index
  output logic [NPORTS-1:0]              sao_killed  // [output]
);
  localparam int PW = $clog2(NPORTS);

  logic [$clog2(EPOCH_P)-1:0] ep_cnt;
  logic [PW-1:0]              prio [NPORTS];
  logic [NPORTS-1:0]          elig;
  logic [NPORTS-1:0][NPORTS-1:0] req;  // [output][input]
  logic [NPORTS-1:0]          sao_any;

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      logic va;
      va = |(outport[p] & vc_avail);
      elig[p] = bypass_en && la_v[p] && (head[p] ? va : (tok_ok[p] && !busy[p]));
    end
    for (int o = 0; o < NPORTS; o++)
      for (int p = 0; p < NPORTS; p++)
        req[o][p] = elig[p] && outport[p][o];

    la_gnt = '0;
    for (int o = 0; o < NPORTS; o++) begin
      out_by_la[o] = 1'b0;
      la_win[o]    = '0;
      for (int k = 0; k < NPORTS; k++) begin
        int unsigned p;
        p = (int'(prio[o]) + k) % NPORTS;
        if (!out_by_la[o] && req[o][p]) begin
          out_by_la[o] = 1'b1;
          la_win[o]    = PW'(p);
          la_gnt[p]    = 1'b1;
        end
      end
    end

    for (int o = 0; o < NPORTS; o++) begin
      for (int p = 0; p < NPORTS; p++)
        sao_final[o][p] = sao_gnt[o][p] && !out_by_la[o] && !la_gnt[p];
      sao_any[o]    = |sao_final[o];
      sao_killed[o] = |sao_gnt[o] && !sao_any[o];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ep_cnt <= '0;
      for (int o = 0; o < NPORTS; o++) prio[o] <= PW'(o);
    end else if (int'(ep_cnt) == EPOCH_P - 1) begin
      ep_cnt <= '0;
      for (int o = 0; o < NPORTS; o++) prio[o] <= PW'((int'(prio[o]) + 1) % NPORTS);
    end else begin
      ep_cnt <= ep_cnt + 1'b1;
    end
  end

  // an output port carries either a bypassing flit or a buffered one
  a_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
                                (out_by_la & sao_any) == '0);

endmodule
