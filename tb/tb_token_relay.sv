// tb_token_relay: self-checking test of token distribution in one router.
//
// Random own tokens, reserved-buffer flags and incoming token bundles are
// applied each cycle. Checked against values worked out from the relay rules:
// own and res pass straight to the bundle of the same port; t1 of every
// bundle (except the one sent East, which carries none) holds the own tokens
// received from North, East and South as registered at the last clock edge;
// t2 likewise the t1 bits those neighbours sent straight on; tok1, nbr_t1 and
// nbr_t2 are the incoming bundles as they are. Watchdog included.
module tb_token_relay;
  import swift_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NPORTS-1:0]          own_tok;
  logic [NPORTS-1:0][NVC-1:0] res_tok;
  tok_bundle_t [NPORTS-1:0]   tok_in, tok_out;
  logic [3:0]                 tok1;
  logic [3:0][2:0]            nbr_t1, nbr_t2;
  int checks = 0, failures = 0;

  token_relay dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    own_tok = '0; res_tok = '0; tok_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      own_tok = NPORTS'($urandom);
      res_tok = (NPORTS * NVC)'($urandom);
      for (int p = 0; p < NPORTS; p++) tok_in[p] = $bits(tok_bundle_t)'($urandom);
      @(posedge clk);
      #1;
      for (int p = 0; p < NPORTS; p++) begin
        logic [2:0] e1, e2;
        e1 = {tok_in[P_S].own, tok_in[P_E].own, tok_in[P_N].own};
        e2 = {tok_in[P_S].t1[2], tok_in[P_E].t1[1], tok_in[P_N].t1[0]};
        if (p == P_E) begin e1 = '0; e2 = '0; end
        check(tok_out[p].own == own_tok[p] && tok_out[p].res == res_tok[p], "own/res pass through");
        check(tok_out[p].t1 == e1, $sformatf("port %0d t1 %b, expected %b", p, tok_out[p].t1, e1));
        check(tok_out[p].t2 == e2, $sformatf("port %0d t2 %b, expected %b", p, tok_out[p].t2, e2));
      end
      for (int d = 0; d < 4; d++)
        check(tok1[d] == tok_in[d].own && nbr_t1[d] == tok_in[d].t1 && nbr_t2[d] == tok_in[d].t2,
              "incoming bundles decoded");
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
