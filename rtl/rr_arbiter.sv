// rr_arbiter: N:1 round-robin arbiter used for SA-I (switch allocation, input
// side), where each input port picks one of its VCs to bid for the crossbar.
//
// The grant is combinational from req and a registered priority pointer. The
// pointer only moves (to just past the current winner) when `advance` is high,
// i.e. when the winner actually used the switch. Until then the same VC keeps
// winning, which keeps the pre-emptive buffer read on one address; the
// round-robin choice follows the SWIFT non-bypass pipeline, advancing only on
// success is how that bias is realised here.
//
// Timing: gnt/gnt_idx/gnt_v are valid in the cycle req is; pointer update on
// the clock edge. Reset (synchronous, active low) gives index 0 top priority.
module rr_arbiter #(
  parameter int N = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [N-1:0]            req,
  input  logic                    advance,
  output logic [N-1:0]            gnt,
  output logic [$clog2(N)-1:0]    gnt_idx,
  output logic                    gnt_v
);
  localparam int IW = $clog2(N);

  logic [IW-1:0] ptr;

  always_comb begin
    gnt     = '0;
    gnt_idx = '0;
    gnt_v   = 1'b0;
    // search N positions starting at the pointer
    for (int k = 0; k < N; k++) begin
      int unsigned i;
      i = (int'(ptr) + k) % N;
      if (!gnt_v && req[i]) begin
        gnt_v   = 1'b1;
        gnt_idx = IW'(i);
        gnt[i]  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) ptr <= '0;
    else if (advance && gnt_v) ptr <= IW'((int'(gnt_idx) + 1) % N);
  end

endmodule
