// flit_buffer_rf: the flit storage of one router input port, NBUF entries of
// W bits shared by the port's VCs.
//
// It stands in for the memory-generator register file of the SWIFT router:
// one write port for buffer write (BW) and one read port whose data appears a
// cycle after the read is issued, so that buffer read (BR) of a flit that won
// SA-I overlaps SA-O and the data is ready for switch traversal in the next
// cycle.
//
// Timing: write on the clock edge when we; rdata updates on the clock edge
// when re and holds otherwise. Contents are not reset.
module flit_buffer_rf #(
  parameter int NBUF = 8,
  parameter int W    = 64
) (
  input  logic                    clk,
  input  logic                    we,
  input  logic [$clog2(NBUF)-1:0] waddr,
  input  logic [W-1:0]            wdata,
  input  logic                    re,
  input  logic [$clog2(NBUF)-1:0] raddr,
  output logic [W-1:0]            rdata
);
  logic [W-1:0] mem [NBUF];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
