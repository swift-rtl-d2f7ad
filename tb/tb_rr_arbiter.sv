// tb_rr_arbiter: self-checking test of the round-robin arbiter used for SA-I.
//
// Drives random request vectors and random advance strobes into a 4-way
// arbiter and compares the grant with a reference model that keeps its own
// pointer: the grant goes to the first requester at or after the pointer, and
// after an advance the pointer moves to one past the granted requester. Also
// checks that a single requester always wins at once. Watchdog included.
module tb_rr_arbiter;
  localparam int N = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] req, gnt;
  logic [1:0]   gnt_idx;
  logic         gnt_v, advance;
  int checks = 0, failures = 0;
  int ptr;

  rr_arbiter #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    req = '0; advance = 1'b0; ptr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      int exp_i;
      @(negedge clk);
      req     = N'($urandom);
      advance = $urandom_range(0, 1) == 1;
      if (n % 50 == 0) req = N'(1) << $urandom_range(0, N - 1);
      #1;
      exp_i = -1;
      for (int k = 0; k < N; k++)
        if (exp_i < 0 && req[(ptr + k) % N]) exp_i = (ptr + k) % N;
      check(gnt_v == (exp_i >= 0), "grant valid iff any request");
      if (exp_i >= 0) begin
        check(gnt == N'(1) << exp_i, $sformatf("one-hot grant to %0d (got %b)", exp_i, gnt));
        check(int'(gnt_idx) == exp_i, "grant index");
        if (advance) ptr = (exp_i + 1) % N;
      end else begin
        check(gnt == '0, "no grant without request");
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
