// tb_vc_free_queue: self-checking test of the free-VC queue used for VC
// allocation.
//
// After reset the queue holds every VC in order. The test dequeues VCs at
// random (only while the queue is non-empty) and returns held VCs in random
// order, sometimes in the same cycle as a dequeue, and compares head_vc and
// nonempty with a model queue each cycle. Watchdog included.
module tb_vc_free_queue;
  localparam int NVC = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic deq, nonempty, enq;
  logic head_vc, enq_vc;
  int checks = 0, failures = 0;
  int q[$], held[$];

  vc_free_queue #(.NVC(NVC)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    deq = 1'b0; enq = 1'b0; enq_vc = 1'b0;
    for (int i = 0; i < NVC; i++) q.push_back(i);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      int hi;
      @(negedge clk);
      check(nonempty == (q.size() != 0), "nonempty flag");
      if (q.size() != 0) check(int'(head_vc) == q[0], $sformatf("head VC %0d, expected %0d", head_vc, q[0]));
      deq = q.size() != 0 && $urandom_range(0, 1) == 1;
      enq = held.size() != 0 && $urandom_range(0, 1) == 1;
      hi  = 0;
      if (enq) begin
        hi = $urandom_range(0, held.size() - 1);
        enq_vc = 1'(held[hi]);
      end
      @(posedge clk);
      if (deq) begin held.push_back(q[0]); q.pop_front(); end
      if (enq) begin q.push_back(int'(enq_vc)); held.delete(hi); end
    end
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
