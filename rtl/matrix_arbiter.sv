// matrix_arbiter: N-input matrix arbiter used for SA-O (switch allocation,
// output side), one per crossbar output port.
//
// A priority matrix w[i][j] = 1 means requester i beats requester j. Requester
// i is granted when no other active requester beats it. When `update` is high
// the winner becomes the lowest priority (its row is cleared and its column
// set), which gives the fair least-recently-served order of a matrix arbiter.
// The router never raises the request of an output port's own input port (no
// U-turns), so at most four of the five inputs compete, as in SWIFT's 4:1
// arbiters.
//
// Timing: gnt is combinational; the matrix updates on the clock edge. Reset
// (synchronous, active low) gives lower indices priority over higher ones.
module matrix_arbiter #(
  parameter int N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         update,
  output logic [N-1:0] gnt
);
  // w[i][j], i != j; only the upper triangle is stored, lower is its inverse
  logic [N-1:0][N-1:0] w;

  function automatic logic beats(logic [N-1:0][N-1:0] m, int i, int j);
    return (i < j) ? m[i][j] : !m[j][i];
  endfunction

  always_comb begin
    for (int i = 0; i < N; i++) begin
      gnt[i] = req[i];
      for (int j = 0; j < N; j++)
        if (j != i && req[j] && beats(w, j, i)) gnt[i] = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      w <= '1;
    end else if (update && |gnt) begin
      for (int i = 0; i < N; i++)
        for (int j = i + 1; j < N; j++) begin
          if (gnt[i]) w[i][j] <= 1'b0;       // winner i now loses to j
          else if (gnt[j]) w[i][j] <= 1'b1;  // winner j now loses to i
        end
    end
  end

endmodule
