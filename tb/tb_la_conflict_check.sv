// tb_la_conflict_check: self-checking test of the lookahead conflict check.
//
// Random lookaheads (valid, one-hot output port, head/busy flags), downstream
// VC and token conditions, and SA-O grants (at most one input per output) are
// applied each cycle with bypassing enabled, and now and then disabled. The
// expected result is worked out from the flow chart: eligibility (head: free
// VC downstream; body/tail: downstream can take it and no earlier flit of the
// packet is buffered), then per output the eligible input nearest at or after
// that output's priority pointer wins. The pointers start at their own output
// index and all move on by one every EPOCH cycles. SA-O grants on an output
// taken by a lookahead, or from an input whose lookahead won, are killed.
// Watchdog included.
module tb_la_conflict_check;
  import swift_pkg::*;
  localparam int EP = 20;
  logic clk = 1'b0, rst_n = 1'b0;
  logic                          bypass_en;
  logic [NPORTS-1:0]             la_v, head, busy, vc_avail, tok_ok, la_gnt, out_by_la, sao_killed;
  logic [NPORTS-1:0][NPORTS-1:0] outport, sao_gnt, sao_final;
  logic [2:0]                    la_win [NPORTS];
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_killed = 0, n_win = 0, n_conflict = 0;

  la_conflict_check #(.EPOCH_P(EP)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    bypass_en = 1'b1; la_v = '0; head = '0; busy = '0; vc_avail = '0; tok_ok = '0;
    outport = '0; sao_gnt = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (cyc = 0; cyc < 3000; cyc++) begin
      logic [NPORTS-1:0] elig, e_gnt, e_obl, e_kill;
      logic [NPORTS-1:0][NPORTS-1:0] e_fin;
      int e_win [NPORTS];
      int nreq;
      @(negedge clk);
      bypass_en = (cyc % 200) < 180;
      la_v     = NPORTS'($urandom);
      head     = NPORTS'($urandom);
      busy     = NPORTS'($urandom) & NPORTS'($urandom);
      vc_avail = NPORTS'($urandom) | NPORTS'($urandom);
      tok_ok   = NPORTS'($urandom) | NPORTS'($urandom);
      for (int p = 0; p < NPORTS; p++) outport[p] = NPORTS'(1) << $urandom_range(0, NPORTS - 1);
      sao_gnt = '0;
      for (int o = 0; o < NPORTS; o++)
        if ($urandom_range(0, 1) == 1) sao_gnt[o] = NPORTS'(1) << $urandom_range(0, NPORTS - 1);
      #1;
      // reference
      for (int p = 0; p < NPORTS; p++)
        elig[p] = bypass_en && la_v[p] &&
                  (head[p] ? |(outport[p] & vc_avail) : (tok_ok[p] && !busy[p]));
      e_gnt = '0; e_obl = '0;
      for (int o = 0; o < NPORTS; o++) begin
        int ptr;
        ptr = (o + ((cyc + 1) / EP)) % NPORTS;  // the reset-release edge counts
        e_win[o] = 0;
        nreq = 0;
        for (int k = 0; k < NPORTS; k++) begin
          int p;
          p = (ptr + k) % NPORTS;
          if (elig[p] && outport[p][o]) begin
            nreq++;
            if (!e_obl[o]) begin e_obl[o] = 1'b1; e_win[o] = p; e_gnt[p] = 1'b1; end
          end
        end
        if (nreq > 1) n_conflict++;
      end
      for (int o = 0; o < NPORTS; o++) begin
        for (int p = 0; p < NPORTS; p++) e_fin[o][p] = sao_gnt[o][p] && !e_obl[o] && !e_gnt[p];
        e_kill[o] = |sao_gnt[o] && !(|e_fin[o]);
      end
      check(la_gnt == e_gnt, $sformatf("cycle %0d: la_gnt %b, expected %b", cyc, la_gnt, e_gnt));
      check(out_by_la == e_obl, "outputs taken by lookaheads");
      check(sao_final == e_fin, "SA-O grants after killing");
      check(sao_killed == e_kill, "killed SA-O grants reported");
      for (int o = 0; o < NPORTS; o++)
        if (e_obl[o]) check(int'(la_win[o]) == e_win[o], $sformatf("winner of output %0d", o));
      n_killed += $countones(e_kill);
      n_win    += $countones(e_gnt);
    end
    check(n_killed > 0 && n_win > 0 && n_conflict > 0, "kills, wins and conflicts all exercised");
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
