// token_relay: token distribution of one SWIFT router.
//
// Every router input port has a one-bit token, ON while the port has more free
// buffers than the threshold. Tokens reach routers up to three hops away
// through a register at every router they pass. Each cycle a router sends
// through each port a bundle with
//   own : the token of its own input port on that side,
//   t1  : the tokens it received from its North, East and South neighbours,
//   t2  : the tokens those neighbours received from their neighbours straight
//         on (two hops away in N, E, S),
//   res : for each VC of that input port, whether the buffer reserved for the
//         VC is free (see input_port),
// `own` and `res` are decoded combinationally from the port's registers; t1
// and t2 pass through a register here at every hop. A router receiving
// bundles from its four neighbours thus knows its four neighbours' facing tokens (tok1), and for each
// neighbour the tokens one and two hops beyond it (nbr_t1, nbr_t2): the three
// hop neighbourhood that lookahead route computation needs. With west-first
// routing nothing beyond the West neighbour is ever used, so bundles sent East
// carry only `own`, and 22 network tokens plus the local one are in use. The
// three-hop depth and the west pruning follow SWIFT; taking tokens along
// straight lines from each neighbour is this design's reading of it.
//
// The bundle to the Local port (the NIC) carries the local input port's token
// and the router's own one- and two-hop tokens, for the NIC's route choice.
//
// Timing: own/res follow own_tok/res_tok (itself decoded from registers); t1/t2 are
// registered; tok1/nbr_t1/nbr_t2 are the incoming bundles as received.
module token_relay
  import swift_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [NPORTS-1:0]         own_tok,
  input  logic [NPORTS-1:0][NVC-1:0] res_tok,
  input  tok_bundle_t [NPORTS-1:0]  tok_in,
  output tok_bundle_t [NPORTS-1:0]  tok_out,
  output logic [3:0]                tok1,
  output logic [3:0][2:0]           nbr_t1,
  output logic [3:0][2:0]           nbr_t2
);
  logic [2:0]        t1_r, t2_r;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      t1_r  <= '0;
      t2_r  <= '0;
    end else begin
      t1_r  <= {tok_in[P_S].own, tok_in[P_E].own, tok_in[P_N].own};
      t2_r  <= {tok_in[P_S].t1[2], tok_in[P_E].t1[1], tok_in[P_N].t1[0]};
    end
  end

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      tok_out[p].own = own_tok[p];
      tok_out[p].res = res_tok[p];
      tok_out[p].t1  = (p == P_E) ? 3'b000 : t1_r;
      tok_out[p].t2  = (p == P_E) ? 3'b000 : t2_r;
    end
    for (int d = 0; d < 4; d++) begin
      tok1[d]   = tok_in[d].own;
      nbr_t1[d] = tok_in[d].t1;
      nbr_t2[d] = tok_in[d].t2;
    end
  end

endmodule
