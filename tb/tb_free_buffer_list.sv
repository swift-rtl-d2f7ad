// tb_free_buffer_list: self-checking test of the linked free list of buffer
// addresses.
//
// The reference model is a queue of free addresses, 0..7 after reset: an
// allocation takes the front, a free appends at the back, both may happen in
// one cycle. Random allocations (only while addresses are free) and frees of
// addresses currently held by the test are compared each cycle with the
// model's front, count and empty flag. At the end every address must be free
// and appear exactly once. Watchdog included.
module tb_free_buffer_list;
  localparam int NBUF = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic         alloc, free_v, empty;
  logic [2:0]   alloc_addr, free_addr;
  logic [3:0]   count;
  int checks = 0, failures = 0;
  int fq[$];    // model: free addresses in order
  int held[$];  // addresses allocated by the test

  free_buffer_list #(.NBUF(NBUF)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    alloc = 1'b0; free_v = 1'b0; free_addr = '0;
    for (int i = 0; i < NBUF; i++) fq.push_back(i);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      int fi;
      @(negedge clk);
      check(int'(count) == fq.size(), $sformatf("count %0d, expected %0d", count, fq.size()));
      check(empty == (fq.size() == 0), "empty flag");
      if (fq.size() != 0) check(int'(alloc_addr) == fq[0], "allocation takes the list head");
      alloc  = fq.size() != 0 && $urandom_range(0, 1) == 1;
      free_v = held.size() != 0 && $urandom_range(0, 1) == 1;
      fi = 0;
      if (free_v) begin
        fi = $urandom_range(0, held.size() - 1);
        free_addr = 3'(held[fi]);
      end
      @(posedge clk);
      if (alloc) begin
        held.push_back(fq[0]);
        fq.pop_front();
      end
      if (free_v) begin
        fq.push_back(int'(free_addr));
        held.delete(fi);
      end
    end
    @(negedge clk);
    alloc = 1'b0;
    while (held.size() != 0) begin
      free_v = 1'b1; free_addr = 3'(held[0]);
      @(posedge clk);
      fq.push_back(held[0]); held.pop_front();
      @(negedge clk);
    end
    free_v = 1'b0;
    check(count == 4'(NBUF), "all buffers free at the end");
    for (int i = 0; i < NBUF; i++) begin
      @(negedge clk);
      check(int'(alloc_addr) == fq[0], "list order after draining");
      alloc = 1'b1;
      @(posedge clk);
      fq.pop_front();
      #1 alloc = 1'b0;
    end
    @(negedge clk);
    check(empty && count == 0, "list empty after NBUF allocations");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
