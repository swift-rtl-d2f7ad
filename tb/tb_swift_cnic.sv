// tb_swift_cnic: the 2x2 test-chip configuration, exercising the congestion
// NICs (swift_cnic) in the setting they were made for.
//
// A 2x2 swift_noc slice of a virtual 8x8 network, with a swift_cnic on each
// of the eight unconnected edge ports and a swift_nic on each of the four
// Local ports: twelve traffic generators. Three runs, each from reset, with
// uniform random traffic: low load with buffer bypassing, the same load
// without it, and a high load with it. After each run injection stops and
// the slice drains. Checks: every packet and flit injected is delivered
// (inside the slice or out through an edge), no Local NIC sees a misrouted
// or malformed flit, bypassing lowers low-load latency, and the slice
// carries more data per cycle at high load than at low load. The delivered
// bandwidth in bits per cycle is printed for comparison with the 113
// bits/cycle peak of the fabricated slice. Mechanisms counted as in the
// full-network test. Watchdog included.
module tb_swift_cnic;
  import swift_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        bypass_en, inj_en;
  logic [7:0]  inj_rate;
  logic [31:0] cycles, pkts_sent, flits_sent, pkts_recv, flits_recv, errors, offers_dropped;
  logic [31:0] n_bypass, n_buffered, n_sao_killed, n_la_lost;
  logic [63:0] lat_sum;

  int checks = 0, failures = 0;

  swift_noc #(.MESH_X(2), .MESH_Y(2), .EDGE_GEN(1'b1)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // mechanism counters
  int m_bypass = 0, m_buffered = 0, m_killed = 0, m_lost = 0, m_backpressure = 0;
  int m_mode_on = 0, m_mode_off = 0;
  real lat_low_byp, lat_low_nobyp, lat_high;
  real bw_low, bw_high, bw;

  task automatic run(input bit byp, input logic [7:0] rate, input int inj_cycles,
                     input int drain_cycles, output real avg_lat);
    rst_n     = 1'b0;
    bypass_en = byp;
    inj_en    = 1'b0;
    inj_rate  = rate;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    inj_en = 1'b1;
    repeat (inj_cycles) @(posedge clk);
    inj_en = 1'b0;
    repeat (drain_cycles) @(posedge clk);
    #1;
    avg_lat = (pkts_recv == 0) ? 0.0 : real'(lat_sum) / real'(pkts_recv);
    bw      = real'(flits_recv) * 64.0 / real'(inj_cycles + drain_cycles);
    $display("  delivered %0.1f bits/cycle over the run", bw);
    $display("run bypass=%0d rate=%0d/256: sent %0d pkts, recv %0d pkts, avg latency %0.2f cycles, bypass %0d, buffered %0d, sao_killed %0d, la_lost %0d, dropped offers %0d",
             byp, rate, pkts_sent, pkts_recv, avg_lat, n_bypass, n_buffered, n_sao_killed,
             n_la_lost, offers_dropped);
    check(pkts_sent > 0, "traffic was injected");
    check(pkts_recv == pkts_sent, "all packets delivered");
    check(flits_recv == flits_sent, "all flits delivered");
    check(flits_sent == pkts_sent * PKT_LEN, "packets have PKT_LEN flits");
    check(errors == 0, "no misrouted or malformed flit");
    if (!byp) check(n_bypass == 0, "no bypass when bypassing is disabled");
    m_bypass       += int'(n_bypass);
    m_buffered     += int'(n_buffered);
    m_killed       += int'(n_sao_killed);
    m_lost         += int'(n_la_lost);
    m_backpressure += int'(offers_dropped);
    if (byp) m_mode_on++; else m_mode_off++;
  endtask

  initial begin
    run(1'b1, 8'd6, 4000, 400, lat_low_byp);
    bw_low = bw;
    check(n_bypass > 2 * n_buffered, "low load: most flits bypass the buffers");
    run(1'b0, 8'd6, 4000, 400, lat_low_nobyp);
    check(lat_low_byp < lat_low_nobyp, "bypassing lowers low-load latency");
    run(1'b1, 8'd80, 4000, 1500, lat_high);
    bw_high = bw;
    check(lat_high > lat_low_byp, "latency grows with load");
    check(bw_high > bw_low, "more data carried at high load");

    $display("mechanisms: bypass=%0d buffered=%0d sao_killed=%0d la_lost=%0d backpressure=%0d mode_on=%0d mode_off=%0d",
             m_bypass, m_buffered, m_killed, m_lost, m_backpressure, m_mode_on, m_mode_off);
    check(m_bypass > 0, "mechanism: buffer bypass");
    check(m_buffered > 0, "mechanism: buffer write");
    check(m_killed > 0, "mechanism: SA-O grant killed by lookahead");
    check(m_lost > 0, "mechanism: lookahead lost bypass");
    check(m_backpressure > 0, "mechanism: source back-pressure");
    check(m_mode_on > 0 && m_mode_off > 0, "mechanism: bypass enable/disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
