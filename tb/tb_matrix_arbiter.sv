// tb_matrix_arbiter: self-checking test of the 5-way matrix arbiter used for
// SA-O.
//
// A matrix arbiter grants the least recently served requester. The reference
// model is therefore a list of the requesters ordered from highest to lowest
// priority (0..4 after reset); the grant is the first listed requester, and
// when update is set the winner moves to the end of the list. Random requests
// and update strobes are compared with the model every cycle. Watchdog
// included.
module tb_matrix_arbiter;
  localparam int N = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] req, gnt;
  logic         update;
  int checks = 0, failures = 0;
  int order[$];

  matrix_arbiter #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    req = '0; update = 1'b0;
    for (int i = 0; i < N; i++) order.push_back(i);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      int w, pos;
      @(negedge clk);
      req    = N'($urandom);
      update = $urandom_range(0, 3) != 0;
      #1;
      w = -1; pos = -1;
      foreach (order[k]) if (w < 0 && req[order[k]]) begin w = order[k]; pos = k; end
      if (w < 0) check(gnt == '0, "no grant without request");
      else begin
        check(gnt == N'(1) << w, $sformatf("grant to least recently served %0d (got %b)", w, gnt));
        if (update) begin
          order.delete(pos);
          order.push_back(w);
        end
      end
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
