// la_route_compute: lookahead route computation (LA-RC) with minimal,
// west-first adaptive routing steered by tokens.
//
// A router computes, one hop ahead, the output port its flit will take at the
// next router, so the lookahead it sends can bid for that port at once. The
// inputs are the hops left from the next router to the destination and the
// tokens around that next router: tok1[d] says whether the input port of the
// router one hop beyond it in direction d has buffers to spare, tok2[d] the
// same two hops beyond (d = 0 North, 1 East, 2 South).
//
// West-first turn rule: a packet with hops to the West goes West, regardless
// of tokens; West tokens are therefore never needed. Otherwise the packet has
// at most two productive ports, East and North or South. When it has both it
// takes the one with the better token score 2*tok1 + tok2, East on a tie. The
// turn rule and the two-way choice follow SWIFT; the score formula is this
// design's own choice. Purely combinational.
module la_route_compute
  import swift_pkg::*;
(
  input  logic [HOP_W-1:0]  x_hops,
  input  logic              x_dir,
  input  logic [HOP_W-1:0]  y_hops,
  input  logic              y_dir,
  input  logic [2:0]        tok1,
  input  logic [2:0]        tok2,
  output logic [NPORTS-1:0] outport
);
  logic [1:0] score_e, score_y;
  int unsigned yi, yp;

  always_comb begin
    yi      = y_dir ? 0 : 2;
    yp      = y_dir ? P_N : P_S;
    score_e = {tok1[1], tok2[1]};
    score_y = {tok1[yi], tok2[yi]};
    outport = '0;
    if (x_hops != 0 && !x_dir)           outport[P_W] = 1'b1;
    else if (x_hops == 0 && y_hops == 0) outport[P_L] = 1'b1;
    else if (x_hops == 0)                outport[yp]  = 1'b1;
    else if (y_hops == 0)                outport[P_E] = 1'b1;
    else if (score_y > score_e)          outport[yp]  = 1'b1;
    else                                 outport[P_E] = 1'b1;
  end

endmodule
