// tb_swift_link: self-checking test of the one-cycle inter-router link.
//
// Random flits, lookaheads and VC-release signals enter the link each cycle;
// each must leave exactly one clock edge later, unchanged, with its valid
// bit. After reset no valid bit may be set. Watchdog included.
module tb_swift_link;
  import swift_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic  flit_tx_v, la_tx_v, vcfree_tx_v, flit_rx_v, la_rx_v, vcfree_rx_v;
  flit_t flit_tx, flit_rx, e_flit;
  la_t   la_tx, la_rx, e_la;
  logic  vcfree_tx_id, vcfree_rx_id;
  logic  e_fv, e_lv, e_vv, e_vid;
  int checks = 0, failures = 0;

  swift_link dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    {flit_tx_v, la_tx_v, vcfree_tx_v, vcfree_tx_id} = '0;
    flit_tx = '0; la_tx = '0;
    repeat (2) @(posedge clk);
    #1;
    check(!flit_rx_v && !la_rx_v && !vcfree_rx_v, "nothing valid in reset");
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      flit_tx_v = $urandom_range(0, 1) == 1; flit_tx = {$urandom, $urandom};
      la_tx_v   = $urandom_range(0, 1) == 1; la_tx   = LA_W'($urandom);
      vcfree_tx_v = $urandom_range(0, 1) == 1; vcfree_tx_id = 1'($urandom);
      {e_fv, e_flit, e_lv, e_la, e_vv, e_vid} =
        {flit_tx_v, flit_tx, la_tx_v, la_tx, vcfree_tx_v, vcfree_tx_id};
      @(posedge clk);
      #1;
      check(flit_rx_v == e_fv && (!e_fv || flit_rx == e_flit), "flit delayed one cycle");
      check(la_rx_v == e_lv && (!e_lv || la_rx == e_la), "lookahead delayed one cycle");
      check(vcfree_rx_v == e_vv && (!e_vv || vcfree_rx_id == e_vid), "VC release delayed one cycle");
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
