// tb_la_route_compute: exhaustive self-checking test of lookahead route
// computation.
//
// Every combination of hop counts, directions and the six token bits is
// applied. The expected port is worked out from the routing rules directly:
// West whenever West hops remain (west first), Local at the destination, the
// only productive port when just one remains, and otherwise North/South only
// when its token score (2*one-hop + two-hop token) beats East's. The chosen
// port must also be productive (minimal routing). Watchdog included.
module tb_la_route_compute;
  import swift_pkg::*;
  logic [2:0] x_hops, y_hops, tok1, tok2;
  logic       x_dir, y_dir;
  logic [NPORTS-1:0] outport;
  int checks = 0, failures = 0;

  la_route_compute dut (.*);

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int v = 0; v < (1 << 14); v++) begin
      int exp_p, ys, es, yd;
      {x_hops, x_dir, y_hops, y_dir, tok1, tok2} = 14'(v);
      #1;
      yd = y_dir ? 0 : 2;                       // token index of N or S
      ys = 2 * int'(tok1[yd]) + int'(tok2[yd]);
      es = 2 * int'(tok1[1]) + int'(tok2[1]);
      if (x_hops != 0 && x_dir == 1'b0)       exp_p = 3;              // West
      else if (x_hops == 0 && y_hops == 0)    exp_p = 4;              // Local
      else if (x_hops == 0)                   exp_p = y_dir ? 0 : 2;  // N/S
      else if (y_hops == 0)                   exp_p = 1;              // East
      else                                    exp_p = (ys > es) ? (y_dir ? 0 : 2) : 1;
      check(outport == NPORTS'(1) << exp_p,
            $sformatf("x=%0d/%0d y=%0d/%0d t1=%b t2=%b: port %b, expected %0d",
                      x_hops, x_dir, y_hops, y_dir, tok1, tok2, outport, exp_p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
