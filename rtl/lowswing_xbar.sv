// lowswing_xbar: the router's 5x5, 64-bit crossbar with registered outputs.
//
// In silicon this crossbar is bit-sliced: 64 one-bit 5x5 slices, each with a
// sense-amplifier receiver per input, a matrix of pass-gates driven by the
// switch allocator, and a reduced-swing driver on each output that drives the
// link. The receivers are clocked and take the place of the flip-flop at the
// end of the switch-traversal stage. This module keeps that logic function:
// each output port takes the input named by sel[o] and registers it at the
// clock edge. Only output ports with en[o] set are clocked, mirroring the
// per-port clock gating the early switch decision makes possible; a gated
// port keeps its data and reports out_v = 0. The analog drivers, receivers
// and wiring are not modelled.
//
// Timing: sel/en/in_data are the switch-traversal cycle's inputs; out_data and
// out_v appear one cycle later (the link-traversal cycle).
module lowswing_xbar #(
  parameter int W = 64,
  parameter int N = 5
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [N-1:0][W-1:0]         in_data,
  input  logic [N-1:0][$clog2(N)-1:0] sel,
  input  logic [N-1:0]                en,
  output logic [N-1:0][W-1:0]         out_data,
  output logic [N-1:0]                out_v
);
  // bit slices: slice b switches bit b of every port
  for (genvar b = 0; b < W; b++) begin : g_slice
    for (genvar o = 0; o < N; o++) begin : g_out
      always_ff @(posedge clk)
        if (en[o]) out_data[o][b] <= in_data[sel[o]][b];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_v <= '0;
    else        out_v <= en;
  end

endmodule
