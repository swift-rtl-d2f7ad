// tb_lowswing_xbar: self-checking test of the 5x5 crossbar with registered,
// clock-gated outputs.
//
// Random input data, select lines and per-output enables are applied each
// cycle. After the clock edge an enabled output must carry the selected
// input's data with out_v set; a disabled output must keep its previous data
// (its receiver is not clocked) with out_v clear. Several outputs selecting
// the same input (multicast) are allowed and tested. Watchdog included.
module tb_lowswing_xbar;
  localparam int W = 64, N = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0][W-1:0] in_data, out_data, exp_d;
  logic [N-1:0][2:0]   sel;
  logic [N-1:0]        en, out_v;
  int checks = 0, failures = 0;

  lowswing_xbar #(.W(W), .N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    in_data = '0; sel = '0; en = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // load every output once so that the hold check has defined data
    @(negedge clk);
    en = '1;
    for (int o = 0; o < N; o++) begin
      sel[o] = 3'(o);
      in_data[o] = {$urandom, $urandom};
    end
    exp_d = in_data;
    for (int n = 0; n < 3000; n++) begin
      logic [N-1:0] en_q;
      @(posedge clk);
      en_q = en;
      @(negedge clk);
      for (int o = 0; o < N; o++) begin
        check(out_v[o] == en_q[o], "out_v follows the enable");
        check(out_data[o] == exp_d[o], $sformatf("output %0d data", o));
      end
      for (int o = 0; o < N; o++) begin
        in_data[o] = {$urandom, $urandom};
        sel[o]     = 3'($urandom_range(0, N - 1));
        en[o]      = $urandom_range(0, 2) != 0;
      end
      for (int o = 0; o < N; o++) if (en[o]) exp_d[o] = in_data[sel[o]];
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
