// tb_noc_mesh -- end-to-end test of the 4x4 mesh at its default parameters.
//
// Phase 1, complement traffic at a low rate: every master M talks to slave
// 7-M only, so the unloaded round trip is known: with R routers on the path
// the smallest latency a master sees must be exactly 2R+2 cycles.
// Phase 2, hot-spot traffic at the highest rate (one transaction per cycle
// per master) for a short burst: drives FIFOs to FIFO_FULL, makes masters
// and slaves stall on back-pressure, makes arbiters choose between
// competing sockets and overflows the masters' storage buffers.
// Phase 3, uniform-random traffic at rate 0.1.
// After each phase generation stops and the network must drain completely:
// every transaction a master sent gets exactly one correct response, slaves
// executed as many operations as were sent, and nothing is dropped.
// Each mechanism is counted and one that never happened is a failure.
module tb_noc_mesh;
  import noc_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic enable = 1'b0;
  logic [15:0] inj_period = 16'd10;
  pattern_e pattern = PAT_UNIFORM;

  master_stats_t        m_stats [NUM_MASTERS];
  logic [NUM_MASTERS-1:0] m_idle;
  slave_stats_t         s_stats [NUM_SLAVES];
  logic [NUM_PORTS-1:0] r_drop [NUM_NODES];
  logic [NUM_PORTS-1:0] r_fifo_full [NUM_NODES];
  logic [NUM_PORTS-1:0] r_contention [NUM_NODES];

  noc_mesh dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned cycles = 0;

  // mechanism counters
  longint full_cycles = 0, full_rises = 0, available = 0, contentions = 0, drops = 0;
  logic [NUM_PORTS-1:0] full_prev [NUM_NODES];

  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (rst_n) begin
      for (int n = 0; n < NUM_NODES; n++) begin
        full_cycles += $countones(r_fifo_full[n]);
        full_rises  += $countones(r_fifo_full[n] & ~full_prev[n]);
        available   += $countones(~r_fifo_full[n] & full_prev[n]);
        contentions += $countones(r_contention[n]);
        drops       += $countones(r_drop[n]);
        full_prev[n] = r_fifo_full[n];
      end
    end else begin
      for (int n = 0; n < NUM_NODES; n++) full_prev[n] = '0;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic longint total_sent();
    longint s = 0;
    for (int m = 0; m < NUM_MASTERS; m++) s += m_stats[m].sent;
    return s;
  endfunction

  function automatic longint total_received();
    longint s = 0;
    for (int m = 0; m < NUM_MASTERS; m++) s += m_stats[m].received;
    return s;
  endfunction

  function automatic longint total_executed();
    longint s = 0;
    for (int k = 0; k < NUM_SLAVES; k++) s += s_stats[k].reads + s_stats[k].writes;
    return s;
  endfunction

  // stop generating and wait until every response is back
  task automatic drain(input string phase);
    int guard = 0;
    enable = 1'b0;
    while (!(&m_idle && total_sent() == total_received()) && guard < 20000) begin
      @(posedge clk);
      guard++;
    end
    repeat (5) @(posedge clk);
    check(&m_idle && total_sent() == total_received(),
          $sformatf("%s: network did not drain (sent %0d received %0d)", phase,
                    total_sent(), total_received()));
    check(total_executed() == total_sent(),
          $sformatf("%s: slaves executed %0d of %0d", phase, total_executed(), total_sent()));
    for (int m = 0; m < NUM_MASTERS; m++)
      check(m_stats[m].errors == 0, $sformatf("%s: master %0d saw %0d bad responses",
                                              phase, m, m_stats[m].errors));
  endtask

  // routers on the X-Y path between two nodes, counted independently
  function automatic int routers_on_path(int a, int b);
    int dx = (a % 4) - (b % 4);
    int dy = (a / 4) - (b / 4);
    if (dx < 0) dx = -dx;
    if (dy < 0) dy = -dy;
    return dx + dy + 1;
  endfunction

  initial begin
    // watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sent_before, lost_total, mstall, sstall;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // ---------------------------------------------------------- phase 1
    pattern    = PAT_COMPLEMENT;
    inj_period = 16'd200;
    enable     = 1'b1;
    repeat (4000) @(posedge clk);
    drain("complement");
    for (int m = 0; m < NUM_MASTERS; m++) begin
      automatic int r = routers_on_path(m, NUM_MASTERS + (7 - m));
      check(m_stats[m].received >= 15, $sformatf("master %0d too few responses", m));
      check(m_stats[m].lat_min == 32'(2 * r + 2),
            $sformatf("master %0d min latency %0d, expected %0d", m, m_stats[m].lat_min, 2 * r + 2));
      check(m_stats[m].generated >= 19 && m_stats[m].generated <= 21, $sformatf("master %0d generated %0d in 20 periods",
                                                  m, m_stats[m].generated));
    end
    for (int k = 0; k < NUM_SLAVES; k++)
      check(s_stats[k].reads + s_stats[k].writes == m_stats[7 - k].sent,
            $sformatf("slave %0d did not serve exactly master %0d", k, 7 - k));

    // ---------------------------------------------------------- phase 2
    sent_before = total_sent();
    pattern     = PAT_HOTSPOT;
    inj_period  = 16'd1;
    enable      = 1'b1;
    repeat (300) @(posedge clk);
    drain("hot spot");
    check(total_sent() > sent_before, "hot spot: nothing sent");
    // S0 and S7 together must have taken well over a third of the requests
    check(longint'(s_stats[0].reads + s_stats[0].writes + s_stats[7].reads + s_stats[7].writes)
          * 10 > (total_executed() - sent_before) * 4, "hot spot: S0/S7 not favoured");

    // ---------------------------------------------------------- phase 3
    pattern    = PAT_UNIFORM;
    inj_period = 16'd10;
    enable     = 1'b1;
    repeat (3000) @(posedge clk);
    drain("uniform");

    lost_total = 0; mstall = 0; sstall = 0;
    for (int m = 0; m < NUM_MASTERS; m++) begin
      lost_total += m_stats[m].lost;
      mstall     += m_stats[m].stall_cycles;
    end
    for (int k = 0; k < NUM_SLAVES; k++) sstall += s_stats[k].stall_cycles;

    $display("transactions %0d, FIFO_FULL %0d (cycles %0d), FIFO_AVAILABLE %0d, contention %0d, master stall cycles %0d, slave stall cycles %0d, buffer overflow %0d, drops %0d",
             total_sent(), full_rises, full_cycles, available, contentions, mstall, sstall, lost_total, drops);
    for (int m = 0; m < NUM_MASTERS; m++)
      $display("  M%0d sent %0d avg latency %0d max %0d", m, m_stats[m].sent,
               m_stats[m].lat_sum / (m_stats[m].received == 0 ? 1 : m_stats[m].received),
               m_stats[m].lat_max);

    check(full_rises > 0,  "FIFO_FULL never happened");
    check(available > 0,   "FIFO_AVAILABLE never happened");
    check(contentions > 0, "arbitration between sockets never happened");
    check(mstall > 0,      "a master never stalled on FIFO_FULL");
    check(lost_total > 0,  "storage buffer never overflowed");
    check(drops == 0,      "transactions were dropped");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
