// free_buffer_list: linked list of the free buffer addresses of one input
// port's shared buffer pool.
//
// The input buffers of a port are one pool shared by all its VCs. Free
// addresses are chained through a next-pointer table: an arriving flit takes
// the address at the head of the list, a buffer that is read out for the last
// time appends its address at the tail. One allocation and one free may happen
// in the same cycle. The linked-list organisation follows SWIFT's shared input
// buffer; the behaviour when an address is freed into an empty list while
// another is allocated (it is handed straight over) is this design's choice.
//
// Timing: alloc_addr, count and empty are registered state; alloc/free act on
// the clock edge. After reset the list holds 0, 1, .., NBUF-1 in that order.
module free_buffer_list #(
  parameter int NBUF = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    alloc,
  output logic [$clog2(NBUF)-1:0] alloc_addr,
  input  logic                    free_v,
  input  logic [$clog2(NBUF)-1:0] free_addr,
  output logic [$clog2(NBUF):0]   count,
  output logic                    empty
);
  localparam int AW = $clog2(NBUF);

  logic [AW-1:0] nxt [NBUF];
  logic [AW-1:0] head, tail;

  assign alloc_addr = head;
  assign empty      = (count == 0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= AW'(NBUF - 1);
      count <= (AW+1)'(NBUF);
      for (int i = 0; i < NBUF; i++) nxt[i] <= AW'((i + 1) % NBUF);
    end else begin
      logic do_alloc;
      do_alloc = alloc && count != 0;
      if (free_v) begin
        // append at the tail
        if (count == 0 || (count == 1 && do_alloc)) begin
          head <= free_addr;
        end else begin
          nxt[tail] <= free_addr;
          if (do_alloc) head <= nxt[head];
        end
        tail <= free_addr;
      end else if (do_alloc) begin
        head <= nxt[head];
      end
      count <= count + (AW+1)'(free_v) - (AW+1)'(do_alloc);
    end
  end

  // an allocation from an empty list is a flow-control error upstream
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) alloc |-> count != 0);
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n)
                                   free_v |-> (count < (AW+1)'(NBUF) || alloc));

endmodule
