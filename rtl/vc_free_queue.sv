// vc_free_queue: VC selection for one router output port.
//
// Instead of a full VC allocator, each output port keeps a FIFO of the VC ids
// that are free at the input port of the next router. A head flit that wins the
// output port takes the id at the head of the queue (deq); when the next
// router reports that one of its VCs has been released, that id is appended at
// the tail (enq). A switch request for a head flit is only raised while the
// queue is non-empty. This follows SWIFT's VC-selection scheme.
//
// Timing: head_vc/nonempty are registered state; deq and enq act on the clock
// edge and may happen together. After reset (synchronous, active low) all NVC
// VCs are free, queued 0..NVC-1.
module vc_free_queue #(
  parameter int NVC = 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   deq,
  output logic [$clog2(NVC)-1:0] head_vc,
  output logic                   nonempty,
  input  logic                   enq,
  input  logic [$clog2(NVC)-1:0] enq_vc
);
  localparam int VW = $clog2(NVC);
  localparam int CW = $clog2(NVC + 1);

  logic [VW-1:0] q [NVC];
  logic [VW-1:0] rd, wr;
  logic [CW-1:0] cnt;

  assign head_vc  = q[rd];
  assign nonempty = cnt != 0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd  <= '0;
      wr  <= '0;
      cnt <= CW'(NVC);
      for (int i = 0; i < NVC; i++) q[i] <= VW'(i);
    end else begin
      logic d;
      d = deq && cnt != 0;
      if (enq) begin
        q[wr] <= enq_vc;
        wr    <= VW'((int'(wr) + 1) % NVC);
      end
      if (d) rd <= VW'((int'(rd) + 1) % NVC);
      cnt <= cnt + CW'(enq) - CW'(d);
    end
  end

  a_deq_nonempty: assert property (@(posedge clk) disable iff (!rst_n) deq |-> cnt != 0);
  a_enq_not_full: assert property (@(posedge clk) disable iff (!rst_n)
                                   enq |-> (cnt < CW'(NVC) || deq));

endmodule
