// swift_pkg: types and constants shared by the SWIFT token-flow-control NoC.
//
// A flit is 64 bits: a 61-bit payload in bits 63..3 and a 3-bit flit type in
// bits 2..0. Every flit is announced one cycle ahead by a 14-bit lookahead that
// carries the output port the flit should take at the router receiving it
// (one-hot, bits 13..9), the VC it occupies there (bit 8) and the remaining
// hops to its destination in Y (bits 7..5, direction bit 4) and X (bits 3..1,
// direction bit 0). These field positions follow the published SWIFT formats;
// the flit-type encoding, the port numbering and the meaning of the direction
// bits are this design's own choices.
//
// Tokens are one-bit hints "this input port has more than TOK_THRESH free
// buffers". A token bundle travels between neighbouring routers each cycle:
// the sender's own input-port token plus the tokens it has seen one and two
// hops further in the North, East and South directions.
package swift_pkg;

  localparam int FLIT_W     = 64;   // link and crossbar width
  localparam int NPORTS     = 5;    // N, E, S, W, Local
  localparam int NVC        = 2;    // virtual channels per input port
  localparam int NBUF       = 8;    // shared flit buffers per input port
  localparam int TOK_THRESH = 3;    // token ON when free buffers > TOK_THRESH
  localparam int EPOCH      = 20;   // cycles per switch-priority epoch
  localparam int PKT_LEN    = 5;    // flits per packet
  localparam int HOP_W      = 3;    // hop counter width (8x8 mesh)
  localparam int LA_W       = 14;   // lookahead width

  // Port numbering, also the bit position in a one-hot port vector.
  localparam int P_N = 0;
  localparam int P_E = 1;
  localparam int P_S = 2;
  localparam int P_W = 3;
  localparam int P_L = 4;

  typedef enum logic [2:0] {
    FT_HEAD      = 3'b001,
    FT_BODY      = 3'b010,
    FT_TAIL      = 3'b100,
    FT_HEAD_TAIL = 3'b101
  } flit_type_e;

  typedef struct packed {
    logic [FLIT_W-4:0] data;
    flit_type_e        ftype;
  } flit_t;

  typedef struct packed {
    logic [NPORTS-1:0] outport;  // one-hot output port at the receiving router
    logic              vcid;     // VC at the receiving router's input port
    logic [HOP_W-1:0]  y_hops;
    logic              y_dir;    // 1 = North (row index decreasing)
    logic [HOP_W-1:0]  x_hops;
    logic              x_dir;    // 1 = East (column index increasing)
  } la_t;

  // Token bundle sent from a router (or to a NIC) through one port.
  // t1/t2 are indexed 0 = North, 1 = East, 2 = South.
  typedef struct packed {
    logic       own;  // token of the sender's input port facing the receiver
    logic [NVC-1:0] res;  // per VC of that port: its reserved buffer is free
    logic [2:0] t1;   // sender's neighbours' facing input-port tokens
    logic [2:0] t2;   // tokens two hops from the sender, straight on
  } tok_bundle_t;

  function automatic logic is_head(flit_type_e t);
    return t == FT_HEAD || t == FT_HEAD_TAIL;
  endfunction

  function automatic logic is_tail(flit_type_e t);
    return t == FT_TAIL || t == FT_HEAD_TAIL;
  endfunction

  // Port on the far side of a link.
  function automatic int unsigned opposite(int unsigned p);
    case (p)
      P_N:     return P_S;
      P_S:     return P_N;
      P_E:     return P_W;
      P_W:     return P_E;
      default: return P_L;
    endcase
  endfunction

  // Hops left after one hop through output port p.
  function automatic la_t step_hops(la_t la, int unsigned p);
    la_t r = la;
    if (p == P_N || p == P_S) r.y_hops = la.y_hops - 1'b1;
    if (p == P_E || p == P_W) r.x_hops = la.x_hops - 1'b1;
    return r;
  endfunction

endpackage
