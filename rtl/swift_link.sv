// swift_link: one direction of a router-to-router (or NIC-to-router) link.
//
// The link traversal (LT) stage: the flit and its lookahead leave the sender's
// output registers, cross the wire and are sampled by the receiver's clocked
// sense amplifiers at the next clock edge, so both arrive one cycle later.
// The VC-release signal travels the other way and is registered at the
// sender's end. Reduced-swing differential signalling is analog and not
// modelled; only this one-cycle behaviour is. Tokens are registered inside
// the routers and do not pass through this module.
//
// Timing: every output is its input delayed by one clock. Valid bits reset
// (synchronous, active low); data bits do not.
module swift_link
  import swift_pkg::*;
#(
  parameter int NVC_P = NVC
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // forward
  input  logic                     flit_tx_v,
  input  flit_t                    flit_tx,
  input  logic                     la_tx_v,
  input  la_t                      la_tx,
  output logic                     flit_rx_v,
  output flit_t                    flit_rx,
  output logic                     la_rx_v,
  output la_t                      la_rx,
  // backward VC release
  input  logic                     vcfree_tx_v,
  input  logic [$clog2(NVC_P)-1:0] vcfree_tx_id,
  output logic                     vcfree_rx_v,
  output logic [$clog2(NVC_P)-1:0] vcfree_rx_id
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      flit_rx_v   <= 1'b0;
      la_rx_v     <= 1'b0;
      vcfree_rx_v <= 1'b0;
    end else begin
      flit_rx_v   <= flit_tx_v;
      la_rx_v     <= la_tx_v;
      vcfree_rx_v <= vcfree_tx_v;
    end
    flit_rx      <= flit_tx;
    la_rx        <= la_tx;
    vcfree_rx_id <= vcfree_tx_id;
  end

endmodule
