// tb_noc_workloads -- runs the evaluation workloads on the 4x4 mesh at its
// default parameters.
//
// Part 1: for each traffic pattern (uniform random, hot spot, complement),
// sweeps the injection rate over 0.01, 0.02, 0.04, 0.05, 0.1, 0.2, 0.25,
// 0.33, 0.5 and 1 (periods 100 .. 1 cycles). Each point runs WINDOW cycles of
// generation. Generation then stops and the network drains. The testbench
// prints one table row per point:
//   - average master-to-slave latency;
//   - transactions completed;
//   - transactions lost to full master buffers;
//   - cycles in which some FIFO was full.
// Checks at every point:
//   - the network drains;
//   - no response is wrong;
//   - nothing is dropped;
//   - the slaves executed exactly what the masters sent.
// Checks at the lowest rate:
//   - the average latency is within 0.4 cycles of the unloaded value (the
//     margin covers the random choice of about 160 destinations);
//   - the unloaded value is the mean of R+1 over the pattern's destination
//     probabilities, with R the number of routers on the X-Y path, computed
//     here independently of the design.
// Checks at the rates below saturation (0.1 and lower):
//   - the number of transactions generated matches the rate within 10%;
//   - nothing is lost.
// Check over the whole sweep: the latency at rate 1 exceeds the one at 0.01.
//
// Part 2: for each pattern, runs rate 0.1 until the slaves have completed
// 10^6 transactions, then drains and checks as above. This is the run length
// used for speed comparisons between NoC models of different abstraction.
//
// The latency definition (creation at the master to arrival at the slave),
// the rates and the run length follow the usual NoC evaluation. The window
// length and the tolerances are this testbench's choices.
module tb_noc_workloads;
  import noc_pkg::*;

  localparam int WINDOW = 2000;
  localparam int NRATES = 10;
  localparam int PERIODS [NRATES] = '{100, 50, 25, 20, 10, 5, 4, 3, 2, 1};

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

  noc_mesh dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint drops = 0, full_cycles = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      logic any_full;
      any_full = 1'b0;
      for (int n = 0; n < NUM_NODES; n++) begin
        drops += $countones(r_drop[n]);
        if (r_fifo_full[n] != '0) any_full = 1'b1;
      end
      if (any_full) full_cycles++;
    end
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

  function automatic longint sum_generated();
    longint s = 0;
    for (int m = 0; m < NUM_MASTERS; m++) s += longint'(m_stats[m].generated);
    return s;
  endfunction

  function automatic longint sum_lost();
    longint s = 0;
    for (int m = 0; m < NUM_MASTERS; m++) s += longint'(m_stats[m].lost);
    return s;
  endfunction

  function automatic longint sum_errors();
    longint s = 0;
    for (int m = 0; m < NUM_MASTERS; m++) s += longint'(m_stats[m].errors);
    return s;
  endfunction

  function automatic longint sum_executed();
    longint s = 0;
    for (int k = 0; k < NUM_SLAVES; k++) s += longint'(s_stats[k].reads) + longint'(s_stats[k].writes);
    return s;
  endfunction

  function automatic longint sum_slave_lat();
    longint s = 0;
    for (int k = 0; k < NUM_SLAVES; k++) s += longint'(s_stats[k].lat_sum);
    return s;
  endfunction

  // routers on the X-Y path from master m to slave k, worked out from the
  // placement (masters on nodes 0..7, slaves on 8..15, 4 nodes per row)
  function automatic real hops(int m, int k);
    int a = m, b = 8 + k;
    int dx = (a % 4) - (b % 4);
    int dy = (a / 4) - (b / 4);
    if (dx < 0) dx = -dx;
    if (dy < 0) dy = -dy;
    return real'(dx + dy + 1);
  endfunction

  // mean unloaded master-to-slave latency (R + 1) of a pattern
  function automatic real unloaded(pattern_e p);
    real s = 0.0;
    for (int m = 0; m < 8; m++) begin
      case (p)
        PAT_COMPLEMENT: s += hops(m, 7 - m) + 1.0;
        PAT_HOTSPOT: begin
          s += 0.3 * (hops(m, 0) + 1.0) + 0.3 * (hops(m, 7) + 1.0);
          for (int k = 1; k < 7; k++) s += (0.4 / 6.0) * (hops(m, k) + 1.0);
        end
        default:
          for (int k = 0; k < 8; k++) s += (hops(m, k) + 1.0) / 8.0;
      endcase
    end
    return s / 8.0;
  endfunction

  task automatic drain(input string what);
    int guard = 0;
    enable = 1'b0;
    while (!(&m_idle && sum_sent() == sum_received()) && guard < 50000) begin
      @(posedge clk);
      guard++;
    end
    repeat (5) @(posedge clk);
    check(&m_idle && sum_sent() == sum_received(), {what, ": network did not drain"});
    check(sum_executed() == sum_sent(), {what, ": slaves executed a different number than sent"});
    check(sum_errors() == 0, {what, ": wrong responses"});
    check(drops == 0, {what, ": transactions dropped"});
  endtask

  initial begin
    // watchdog
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic pattern_e pats [3] = '{PAT_UNIFORM, PAT_HOTSPOT, PAT_COMPLEMENT};
    automatic string    names [3] = '{"uniform", "hot spot", "complement"};
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // ------------------------------------------------------------ part 1
    for (int pi = 0; pi < 3; pi++) begin
      real lat_first, lat_last;
      $display("%s traffic, unloaded latency %0.2f cycles", names[pi], unloaded(pats[pi]));
      $display("  rate    avg latency  completed  lost  full-cycles");
      for (int ri = 0; ri < NRATES; ri++) begin
        automatic longint ex0 = sum_executed(), lat0 = sum_slave_lat();
        automatic longint gen0 = sum_generated(), lost0 = sum_lost(), full0 = full_cycles;
        automatic longint ex, gen, lost;
        automatic real avg;
        pattern    = pats[pi];
        inj_period = 16'(PERIODS[ri]);
        enable     = 1'b1;
        repeat (WINDOW) @(posedge clk);
        drain($sformatf("%s rate 1/%0d", names[pi], PERIODS[ri]));
        ex   = sum_executed() - ex0;
        gen  = sum_generated() - gen0;
        lost = sum_lost() - lost0;
        avg  = (ex == 0) ? 0.0 : real'(sum_slave_lat() - lat0) / real'(ex);
        $display("  %0.2f    %6.2f     %7d  %5d  %6d", 1.0 / PERIODS[ri], avg, ex, lost,
                 full_cycles - full0);
        if (ri == 0) lat_first = avg;
        if (ri == NRATES - 1) lat_last = avg;
        if (ri == 0)
          check(avg > unloaded(pats[pi]) - 0.4 && avg < unloaded(pats[pi]) + 0.4,
                $sformatf("%s: latency %0.2f at rate 0.01, unloaded %0.2f", names[pi], avg,
                          unloaded(pats[pi])));
        if (PERIODS[ri] >= 10) begin
          automatic real want = 8.0 * WINDOW / PERIODS[ri];
          check(real'(gen) > 0.9 * want && real'(gen) < 1.1 * want,
                $sformatf("%s rate 1/%0d: generated %0d, expected about %0.0f", names[pi],
                          PERIODS[ri], gen, want));
          check(lost == 0, $sformatf("%s rate 1/%0d: %0d lost below saturation", names[pi],
                                     PERIODS[ri], lost));
        end
      end
      check(lat_last > lat_first, $sformatf("%s: latency does not grow with load", names[pi]));
    end

    // ------------------------------------------------------------ part 2
    for (int pi = 0; pi < 3; pi++) begin
      automatic longint ex0 = sum_executed(), lat0 = sum_slave_lat();
      automatic int unsigned c0 = 0;
      pattern    = pats[pi];
      inj_period = 16'd10;
      enable     = 1'b1;
      while (sum_executed() - ex0 < 1_000_000) begin
        @(posedge clk);
        c0++;
      end
      drain($sformatf("%s 10^6 transactions", names[pi]));
      $display("%s: %0d transactions in %0d cycles, average latency %0.2f", names[pi],
               sum_executed() - ex0, c0,
               real'(sum_slave_lat() - lat0) / real'(sum_executed() - ex0));
      check(sum_executed() - ex0 >= 1_000_000, {names[pi], ": 10^6 transactions not completed"});
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
