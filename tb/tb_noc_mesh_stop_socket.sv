// tb_noc_mesh_stop_socket -- the 4x4 mesh with the broadcast back-pressure
// scheme (SCOPE = STOP_SOCKET).
//
// In this scheme a router that receives FIFO_FULL sends nothing of the
// stopped class through that socket until FIFO_AVAILABLE arrives.
//
// Phase 1: uniform-random traffic at rate 0.1. At this rate no FIFO fills, so
// the scheme behaves like the default one. The checks:
//   - the network drains;
//   - every response is correct;
//   - the slaves executed all that was sent;
//   - nothing is dropped;
//   - the smallest round-trip latency of every master is that of its
//     nearest slave, the one straight below it: 2R+2 cycles, with R = 3
//     routers on the path for a master on row 0 and R = 2 on row 1.
//
// Phase 2: hot-spot traffic at rate 1 for 300 cycles, then generation
// stops. Two adjacent routers can each hold a full FIFO aimed at the other
// and stop each other for good. The testbench checks that the network locks
// up: no response arrives during 2000 cycles while requests are still
// outstanding. This is the reason the design's default is STOP_FIFO. The
// test documents the limitation and guards the option against silent
// changes. It also checks that no response delivered before the lock-up was
// wrong.
module tb_noc_mesh_stop_socket;
  import noc_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic enable = 1'b0;
  logic [15:0] inj_period = 16'd10;
  pattern_e pattern = PAT_UNIFORM;

  master_stats_t          m_stats [NUM_MASTERS];
  logic [NUM_MASTERS-1:0] m_idle;
  slave_stats_t           s_stats [NUM_SLAVES];
  logic [NUM_PORTS-1:0]   r_drop [NUM_NODES];
  logic [NUM_PORTS-1:0]   r_fifo_full [NUM_NODES];
  logic [NUM_PORTS-1:0]   r_contention [NUM_NODES];

  noc_mesh #(.SCOPE(STOP_SOCKET)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint drops = 0;

  always @(posedge clk) begin
    if (rst_n)
      for (int n = 0; n < NUM_NODES; n++) drops += $countones(r_drop[n]);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic longint sum_sent();
    longint s = 0;
    for (int m = 0; m < NUM_MASTERS; m++) s += longint'(m_stats[m].sent);
    return s;
  endfunction

  function automatic longint sum_received();
    longint s = 0;
    for (int m = 0; m < NUM_MASTERS; m++) s += longint'(m_stats[m].received);
    return s;
  endfunction

  function automatic longint sum_executed();
    longint s = 0;
    for (int k = 0; k < NUM_SLAVES; k++) s += longint'(s_stats[k].reads) + longint'(s_stats[k].writes);
    return s;
  endfunction

  function automatic longint sum_errors();
    longint s = 0;
    for (int m = 0; m < NUM_MASTERS; m++) s += longint'(m_stats[m].errors);
    return s;
  endfunction

  initial begin
    // watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int guard;
    longint rx;
    int quiet;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // ---------------------------------------------------------- phase 1
    pattern    = PAT_UNIFORM;
    inj_period = 16'd10;
    enable     = 1'b1;
    repeat (3000) @(posedge clk);
    enable = 1'b0;
    guard  = 0;
    while (!(&m_idle && sum_sent() == sum_received()) && guard < 5000) begin
      @(posedge clk);
      guard++;
    end
    repeat (5) @(posedge clk);
    check(&m_idle && sum_sent() == sum_received(), "low load: network did not drain");
    check(sum_executed() == sum_sent(), "low load: slaves executed a different number");
    check(sum_sent() > 2000, $sformatf("low load: only %0d transactions", sum_sent()));
    check(sum_errors() == 0, "low load: wrong responses");
    check(drops == 0, "low load: transactions dropped");
    for (int m = 0; m < NUM_MASTERS; m++) begin
      // nearest slave is straight below: rows 0 -> 2 is 3 routers, 1 -> 2 is 2
      automatic int r = (m < 4) ? 3 : 2;
      check(m_stats[m].lat_min == 32'(2 * r + 2),
            $sformatf("master %0d min latency %0d, expected %0d", m, m_stats[m].lat_min, 2 * r + 2));
    end

    // ---------------------------------------------------------- phase 2
    pattern    = PAT_HOTSPOT;
    inj_period = 16'd1;
    enable     = 1'b1;
    repeat (300) @(posedge clk);
    enable = 1'b0;
    repeat (2000) @(posedge clk);   // let whatever can still move finish
    rx    = sum_received();
    quiet = 0;
    repeat (2000) begin
      @(posedge clk);
      if (sum_received() == rx) quiet++;
    end
    $display("high load: sent %0d, received %0d, idle for %0d of the last 2000 cycles",
             sum_sent(), sum_received(), quiet);
    check(sum_sent() != sum_received(), "high load: network drained, lock-up not reproduced");
    check(quiet == 2000, "high load: responses still trickling in");
    check(sum_errors() == 0, "high load: wrong responses before the lock-up");
    check(drops == 0, "high load: transactions dropped");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
