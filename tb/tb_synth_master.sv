// tb_synth_master -- checks the synthetic traffic master.
//
// Master A (M2, complement pattern, injection period 10) talks to a model
// router here that sends FIFO_FULL at random and answers every request
// after a fixed delay with a correct response. Checked: exactly one new
// transaction per injection period; nothing offered while FIFO_FULL is set;
// every request carries M2's node, consecutive sequence numbers and an
// address inside slave S5's window (1's complement of 2); the statistics
// (generated, sent, received, summed and extreme latency, stall cycles)
// equal the counts kept here; a corrupted response is counted as an error.
// Masters B (M0, hot spot) and C (M1, uniform) run at one transaction per
// cycle and their destinations are tallied: S0 and S7 must each get about
// 30% under hot spot, every slave about 12.5% under uniform.
module tb_synth_master;
  import noc_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic          enable = 1'b0;
  flit_t         a_req, a_resp, b_req, c_req;
  stop_t         a_stop;
  master_stats_t a_st, b_st, c_st;
  logic          a_idle, b_idle, c_idle;

  synth_master #(.MASTER_ID(2)) u_a (.clk, .rst_n, .enable, .inj_period(16'd10),
    .pattern(PAT_COMPLEMENT), .req_out(a_req), .stop_in(a_stop), .resp_in(a_resp),
    .stats(a_st), .idle(a_idle));
  synth_master #(.MASTER_ID(0)) u_b (.clk, .rst_n, .enable, .inj_period(16'd1),
    .pattern(PAT_HOTSPOT), .req_out(b_req), .stop_in('0), .resp_in('0),
    .stats(b_st), .idle(b_idle));
  synth_master #(.MASTER_ID(1)) u_c (.clk, .rst_n, .enable, .inj_period(16'd1),
    .pattern(PAT_UNIFORM), .req_out(c_req), .stop_in('0), .resp_in('0),
    .stats(c_st), .idle(c_idle));

  localparam int DELAY = 3;
  localparam int RUN   = 4000;

  int   cyc = 0;
  txn_t pending [$];
  int   due     [$];
  int   n_req = 0, n_resp = 0, stalls = 0, next_seq = 0;
  longint lat_sum = 0;
  int   lat_max = 0, lat_min = 1 << 30;
  int   per_period [int];
  int   b_dest [8], c_dest [8];
  bit   corrupt_next = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      if (a_stop.req && a_req.valid) begin
        checks++; failures++;
        $display("FAIL: request offered while FIFO_FULL");
      end
      if (!a_idle && a_stop.req) stalls++;
      if (a_req.valid) begin
        automatic txn_t t = a_req.txn;
        n_req++;
        checks++;
        if (t.kind != KIND_REQ || t.src != 4'd2 || int'(t.seq) != next_seq ||
            t.addr[31:8] != 24'd13 ||
            (t.cmd == CMD_WRITE && t.data != (t.addr ^ 32'hA5A5A5A5))) begin
          failures++;
          $display("FAIL: bad request %p", t);
        end
        next_seq++;
        per_period[int'(t.tstamp) / 10]++;
        pending.push_back(t);
        due.push_back(cyc + DELAY);
      end
      if (b_req.valid) b_dest[b_req.txn.addr[31:8] - 8]++;
      if (c_req.valid) c_dest[c_req.txn.addr[31:8] - 8]++;
    end
  end

  // model router: FIFO_FULL in random bursts, responses after DELAY cycles
  always @(negedge clk) begin
    a_resp <= '0;
    if (rst_n) begin
      if ($urandom_range(0, 9) == 0) a_stop.req <= ~a_stop.req;
      if (due.size() > 0 && due[0] <= cyc) begin
        automatic txn_t r = pending.pop_front();
        void'(due.pop_front());
        r.kind = KIND_RESP;
        if (r.cmd == CMD_READ) r.data = 32'd0;
        if (corrupt_next) r.data = 32'h1234_5678;
        a_resp.valid <= 1'b1;
        a_resp.txn   <= r;
        n_resp++;
        begin
          automatic int l = cyc - int'(r.tstamp);
          lat_sum += l;
          if (l > lat_max) lat_max = l;
          if (l < lat_min) lat_min = l;
        end
      end
    end
  end

  initial begin
    repeat (RUN * 3) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_stop = '0;
    a_resp = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n  = 1'b1;
    enable = 1'b1;
    repeat (RUN) @(negedge clk);
    enable = 1'b0;
    // let A drain
    while (!(a_idle && due.size() == 0)) @(negedge clk);
    repeat (4) @(negedge clk);

    check(a_st.generated == 32'(RUN / 10), $sformatf("generated %0d in %0d periods", a_st.generated, RUN / 10));
    foreach (per_period[p]) check(per_period[p] == 1, $sformatf("period %0d had %0d transactions", p, per_period[p]));
    check(a_st.sent == 32'(n_req), "sent count");
    check(a_st.received == 32'(n_resp), "received count");
    check(a_st.lat_sum == 48'(lat_sum), $sformatf("latency sum %0d, expected %0d", a_st.lat_sum, lat_sum));
    check(a_st.lat_max == 32'(lat_max), $sformatf("latency max %0d, expected %0d", a_st.lat_max, lat_max));
    check(a_st.lat_min == 32'(lat_min), $sformatf("latency min %0d, expected %0d", a_st.lat_min, lat_min));
    check(a_st.lat_min >= 32'(DELAY + 1), "latency below the loop delay");
    check(a_st.stall_cycles == 32'(stalls) && stalls > 0, $sformatf("stall cycles %0d, expected %0d", a_st.stall_cycles, stalls));
    check(a_st.errors == 0, "correct responses counted as errors");
    check(a_st.lost == 0, "transactions lost at a low rate");

    // a corrupted response must be caught
    corrupt_next = 1;
    enable = 1'b1;
    repeat (30) @(negedge clk);
    enable = 1'b0;
    repeat (30) @(negedge clk);
    check(a_st.errors > 0, "corrupted response not detected");

    // destination statistics of B and C (one transaction per cycle each)
    begin
      int tb = 0, tc = 0;
      for (int s = 0; s < 8; s++) begin tb += b_dest[s]; tc += c_dest[s]; end
      check(tb >= RUN, "hot-spot master did not send every cycle");
      check(b_dest[0] * 100 > tb * 25 && b_dest[0] * 100 < tb * 35, $sformatf("hot spot S0 %0d of %0d", b_dest[0], tb));
      check(b_dest[7] * 100 > tb * 25 && b_dest[7] * 100 < tb * 35, $sformatf("hot spot S7 %0d of %0d", b_dest[7], tb));
      for (int s = 1; s < 7; s++)
        check(b_dest[s] * 100 > tb * 4 && b_dest[s] * 100 < tb * 10, $sformatf("hot spot S%0d %0d of %0d", s, b_dest[s], tb));
      for (int s = 0; s < 8; s++)
        check(c_dest[s] * 100 > tc * 9 && c_dest[s] * 100 < tc * 16, $sformatf("uniform S%0d %0d of %0d", s, c_dest[s], tc));
      check(b_st.lost == 0 && c_st.lost == 0, "lost with no back-pressure");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
