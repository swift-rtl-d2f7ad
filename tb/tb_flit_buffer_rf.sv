// tb_flit_buffer_rf: self-checking test of the input-port flit register file.
//
// Random writes and reads (sometimes to the same address in the same cycle)
// are mirrored in a model array. A read's data must appear on rdata after the
// clock edge and hold while no read is issued; a read and a write of the same
// address in one cycle return the old contents. Watchdog included.
module tb_flit_buffer_rf;
  localparam int NBUF = 8, W = 64;
  logic clk = 1'b0;
  logic         we, re;
  logic [2:0]   waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] model [NBUF];
  logic [W-1:0] exp_rd;
  int checks = 0, failures = 0;

  flit_buffer_rf #(.NBUF(NBUF), .W(W)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    we = 1'b0; re = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    // fill every entry first so that reads are defined
    for (int i = 0; i < NBUF; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 3'(i); wdata = {$urandom, $urandom};
      model[i] = wdata;
    end
    @(negedge clk);
    we = 1'b0; re = 1'b1; raddr = 3'd0;
    exp_rd = model[0];
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      check(rdata == exp_rd, $sformatf("read data %h, expected %h", rdata, exp_rd));
      we    = $urandom_range(0, 1) == 1;
      re    = $urandom_range(0, 2) != 0;
      waddr = 3'($urandom);
      raddr = (n % 7 == 0) ? waddr : 3'($urandom);
      wdata = {$urandom, $urandom};
      if (re) exp_rd = model[raddr];
      if (we) model[waddr] = wdata;
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
