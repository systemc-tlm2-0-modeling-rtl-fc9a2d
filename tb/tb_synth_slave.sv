// tb_synth_slave -- checks the synthetic memory slave.
//
// Writes fill the memory with known words, then reads must return them (and
// 0 for words never written); each response appears exactly one cycle after
// its request arrived and is the request turned into a response. Holding
// FIFO_FULL for responses makes the four-entry response queue fill, after
// which the slave must send FIFO_FULL for requests; releasing it must
// deliver every queued response in order and send FIFO_AVAILABLE. A random
// phase with random FIFO_FULL checks every read against a memory model kept
// here. The statistics are compared with the counts kept here.
module tb_synth_slave;
  import noc_pkg::*;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  flit_t        req_in;
  stop_t        stop_out;
  flit_t        resp_out;
  stop_t        stop_in;
  slave_stats_t stats;

  synth_slave dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  logic [31:0] model [64];
  txn_t expq [$];
  int   n_rd = 0, n_wr = 0, stalls = 0;
  longint lat_sum = 0;
  int   last_req_cycle = -10, last_resp_cycle = -10;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      if (resp_out.valid) begin
        automatic txn_t e = expq.pop_front();
        checks++;
        if (resp_out.txn != e) begin
          failures++;
          $display("FAIL: response %p, expected %p", resp_out.txn, e);
        end
        if (stop_in.resp) begin
          failures++;
          $display("FAIL: response sent while FIFO_FULL");
        end
        last_resp_cycle = cyc;
      end
      if (expq.size() > 0 && stop_in.resp) stalls++;
      if (req_in.valid) begin
        automatic txn_t r = req_in.txn;
        automatic int w = int'(r.addr[7:2]);
        r.kind = KIND_RESP;
        if (r.cmd == CMD_WRITE) begin
          model[w] = r.data;
          n_wr++;
        end else begin
          r.data = model[w];
          n_rd++;
        end
        lat_sum += cyc - int'(req_in.txn.tstamp);
        expq.push_back(r);
        last_req_cycle = cyc;
      end
    end
  end

  function automatic txn_t make(input bit wr, input int word, input logic [31:0] d);
    txn_t t = '0;
    t.kind   = KIND_REQ;
    t.cmd    = wr ? CMD_WRITE : CMD_READ;
    t.addr   = 32'(12 * 256 + word * 4);
    t.data   = wr ? d : 32'd0;
    t.src    = NODE_BITS'(word % 8);
    t.seq    = 16'(word);
    t.tstamp = 32'(cyc - 2);
    return t;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = '0;
    req_in  = '0;
    stop_in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // one write: response one cycle later
    req_in.valid = 1'b1;
    req_in.txn   = make(1'b1, 3, 32'hCAFE_0003);
    @(negedge clk);
    req_in = '0;
    #1 check(resp_out.valid, "write response not offered one cycle after the request");
    @(negedge clk);
    check(!resp_out.valid, "write response repeated");

    // writes to even words, then read everything back
    for (int w = 0; w < 64; w += 2) begin
      req_in.valid = 1'b1;
      req_in.txn   = make(1'b1, w, 32'hBEEF_0000 + 32'(w));
      @(negedge clk);
    end
    for (int w = 0; w < 64; w++) begin
      req_in.valid = 1'b1;
      req_in.txn   = make(1'b0, w, '0);
      @(negedge clk);
    end
    req_in = '0;
    repeat (3) @(negedge clk);
    check(expq.size() == 0, "responses missing after reads");

    // back-pressure: responses blocked, queue fills, slave sends FIFO_FULL
    stop_in.resp = 1'b1;
    for (int k = 0; k < 6; k++) begin
      if (!stop_out.req) begin
        req_in.valid = 1'b1;
        req_in.txn   = make(1'b0, k, '0);
      end else req_in = '0;
      @(negedge clk);
    end
    req_in = '0;
    check(stop_out.req, "slave did not send FIFO_FULL with a full response queue");
    check(expq.size() == 4, $sformatf("%0d responses queued, expected 4", expq.size()));
    stop_in.resp = 1'b0;
    @(negedge clk);
    check(!stop_out.req, "slave did not send FIFO_AVAILABLE");
    repeat (6) @(negedge clk);
    check(expq.size() == 0, "queued responses not delivered");

    // random phase
    for (int c = 0; c < 3000; c++) begin
      stop_in.resp = ($urandom_range(0, 3) == 0);
      req_in = '0;
      if (!stop_out.req && $urandom_range(0, 1)) begin
        req_in.valid = 1'b1;
        req_in.txn   = make(1'($urandom_range(0, 1)), $urandom_range(0, 63), $urandom);
      end
      @(negedge clk);
    end
    req_in  = '0;
    stop_in = '0;
    repeat (8) @(negedge clk);
    check(expq.size() == 0, "responses missing after the random phase");
    check(stats.reads == 32'(n_rd) && stats.writes == 32'(n_wr), "read/write counts");
    check(stats.lat_sum == 48'(lat_sum), $sformatf("latency sum %0d, expected %0d", stats.lat_sum, lat_sum));
    check(stats.stall_cycles == 32'(stalls), $sformatf("stall cycles %0d, expected %0d", stats.stall_cycles, stalls));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
