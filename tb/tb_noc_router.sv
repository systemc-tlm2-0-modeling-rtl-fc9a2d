// tb_noc_router -- checks the cycle-accurate router at mesh position 5
// (column 1, row 1: four router neighbours and a master on the local socket).
//
//  1. latency: a lone request leaves by the X-Y socket one cycle after it
//     entered;
//  2. round robin: four requests for the same output entering in the same
//     cycle leave one per cycle, in cyclic socket-ID order;
//  3. drop: an address outside every window never leaves and raises `drop`;
//  4. back-pressure: with the east neighbour reporting its FIFOs full, the
//     east FIFO fills to FIFO_DEPTH, FIFO_FULL goes out on every socket, and
//     after release everything leaves and FIFO_AVAILABLE follows;
//  5. random traffic on all sockets with random FIFO_FULL from neighbours:
//     every transaction leaves exactly once, by the socket that X-Y routing
//     (worked out here) gives, and never while its class is stopped.
module tb_noc_router;
  import noc_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  flit_t in_flit  [NUM_PORTS];
  stop_t stop_out [NUM_PORTS];
  flit_t out_flit [NUM_PORTS];
  stop_t stop_in  [NUM_PORTS];
  logic [NUM_PORTS-1:0] drop, fifo_full, contention;

  noc_router dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned seqn = 1;

  // expected socket of each transaction in flight, by sequence number
  int  exp_port [int];
  int  out_log  [$];        // sockets IDs seen leaving by east, in order
  int  out_cycle[int];
  int  cyc = 0;
  int  drops_seen = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int xy(int here, int dest);
    if (dest % 4 > here % 4) return PORT_E;
    if (dest % 4 < here % 4) return PORT_W;
    if (dest / 4 > here / 4) return PORT_S;
    if (dest / 4 < here / 4) return PORT_N;
    return PORT_L;
  endfunction

  function automatic txn_t make(input bit resp, input int node);
    txn_t t = '0;
    t.kind = resp ? KIND_RESP : KIND_REQ;
    t.cmd  = CMD_READ;
    if (resp) begin
      t.src  = NODE_BITS'(node);
      t.addr = 32'h0000_0C00;
    end else begin
      t.src  = NODE_BITS'(5);
      t.addr = 32'(node * 256 + 16);
    end
    t.seq  = 16'(seqn);
    t.tstamp = 32'(cyc);
    seqn++;
    return t;
  endfunction

  // monitor: every transaction leaving is checked against its expected socket
  always @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      for (int p = 0; p < NUM_PORTS; p++) begin
        if (out_flit[p].valid) begin
          automatic int s = int'(out_flit[p].txn.seq);
          checks++;
          if (!exp_port.exists(s)) begin
            failures++;
            $display("FAIL: seq %0d left by socket %0d but was not expected", s, p);
          end else begin
            if (exp_port[s] != p) begin
              failures++;
              $display("FAIL: seq %0d left by socket %0d, expected %0d", s, p, exp_port[s]);
            end
            exp_port.delete(s);
          end
          out_cycle[s] = cyc;
          if ((stop_in[p].req && out_flit[p].txn.kind == KIND_REQ && p == PORT_L) ||
              (stop_in[p].resp && out_flit[p].txn.kind == KIND_RESP && p == PORT_L)) begin
            failures++;
            $display("FAIL: seq %0d sent to the master while stopped", s);
          end
          if (p != PORT_L && stop_in[p].full[xy(p == PORT_E ? 6 : p == PORT_W ? 4 :
                                                  p == PORT_N ? 1 : 9,
                                                  out_flit[p].txn.kind == KIND_REQ ?
                                                  int'(out_flit[p].txn.addr) / 256 :
                                                  int'(out_flit[p].txn.src))]) begin
            failures++;
            $display("FAIL: seq %0d sent into a full FIFO of the neighbour", s);
          end
        end
      end
      if (drop != 0) drops_seen++;
    end
  end

  task automatic idle_inputs();
    foreach (in_flit[p]) in_flit[p] = '0;
  endtask

  task automatic send(input int p, input txn_t t, input int expect_p);
    in_flit[p].valid = 1'b1;
    in_flit[p].txn   = t;
    if (expect_p >= 0) exp_port[int'(t.seq)] = expect_p;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    txn_t t;
    int   order [$];
    int   c0;
    idle_inputs();
    foreach (stop_in[p]) stop_in[p] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // 1. latency of a lone request: north in, to node 6 -> east
    @(negedge clk);
    t = make(1'b0, 6);
    send(PORT_N, t, PORT_E);
    c0 = cyc;
    @(negedge clk); idle_inputs();
    repeat (3) @(negedge clk);
    check(out_cycle.exists(int'(t.seq)) && out_cycle[int'(t.seq)] == c0 + 1,
          $sformatf("lone request left at cycle %0d, expected %0d",
                    out_cycle.exists(int'(t.seq)) ? out_cycle[int'(t.seq)] : -1, c0 + 1));

    // 2. round robin: N, S, W, L all send to node 7 (east) in one cycle
    begin
      txn_t ts [4];
      int   ins [4] = '{PORT_N, PORT_S, PORT_W, PORT_L};
      for (int k = 0; k < 4; k++) begin
        ts[k] = make(1'b0, 7);
        send(ins[k], ts[k], PORT_E);
      end
      @(negedge clk); idle_inputs();
      c0 = cyc;
      for (int k = 0; k < 4; k++) begin
        check(out_flit[PORT_E].valid, $sformatf("round robin: nothing left in cycle %0d", k));
        for (int j = 0; j < 4; j++)
          if (out_flit[PORT_E].txn.seq == ts[j].seq) order.push_back(ins[j]);
        check(contention[PORT_E] == (k < 3), $sformatf("contention flag in cycle %0d", k));
        @(negedge clk);
      end
      check(order.size() == 4, "round robin: not all four left");
      // cyclic order: each next socket ID follows the previous one cyclically
      for (int k = 1; k < order.size(); k++) begin
        automatic int gap_prev = (order[k] - order[k - 1] + 5) % 5;
        automatic bit skipped = 0;
        for (int j = 0; j < 4; j++) begin
          automatic int g = (ins[j] - order[k - 1] + 5) % 5;
          if (g > 0 && g < gap_prev) begin
            // a waiting socket between the two was passed over
            bit still_waiting = 1;
            for (int m = 0; m < k; m++) if (order[m] == ins[j]) still_waiting = 0;
            if (still_waiting) skipped = 1;
          end
        end
        check(!skipped, $sformatf("round robin order %p is not cyclic", order));
      end
    end

    // 3. drop
    repeat (2) @(negedge clk);
    drops_seen = 0;
    t = make(1'b0, 0);
    t.addr = 32'h0000_2000;
    send(PORT_W, t, -1);
    #1 check(drop[PORT_W], "drop flag for an unmapped address");
    @(negedge clk); idle_inputs();
    repeat (3) @(negedge clk);
    check(!out_cycle.exists(int'(t.seq)), "an unmapped transaction left the router");
    check(drops_seen == 1, "drop seen once");

    // 4. back-pressure on the east socket
    stop_in[PORT_E].full = '1;
    stop_in[PORT_E].req  = 1'b1;
    stop_in[PORT_E].resp = 1'b1;
    for (int k = 0; k < 10; k++) begin
      automatic int p = (k % 2 == 0) ? PORT_W : PORT_L;
      if (!stop_out[p].req) begin
        send(p, make(1'b0, 6), PORT_E);
      end
      @(negedge clk); idle_inputs();
    end
    check(fifo_full[PORT_E], "east FIFO did not reach FIFO_DEPTH");
    check(int'(dut.g_out[PORT_E].g_fifo.u_fifo.count) == FIFO_DEPTH, "east FIFO holds exactly FIFO_DEPTH");
    for (int p = 0; p < NUM_PORTS; p++)
      check(stop_out[p].req && stop_out[p].resp && stop_out[p].full[PORT_E],
            $sformatf("FIFO_FULL not sent on socket %0d", p));
    check(!out_flit[PORT_E].valid, "east socket sent while stopped");
    stop_in[PORT_E] = '0;
    #1 check(out_flit[PORT_E].valid, "east socket idle after FIFO_AVAILABLE from neighbour");
    @(negedge clk);
    check(!fifo_full[PORT_E] && !stop_out[0].req, "FIFO_AVAILABLE not sent at FIFO_DEPTH-1");
    repeat (10) @(negedge clk);
    check(exp_port.size() == 0, $sformatf("%0d transactions stuck after release", exp_port.size()));

    // 5. random traffic
    for (int c = 0; c < 3000; c++) begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        stop_in[p] = '0;
        if (p != PORT_L && $urandom_range(0, 4) == 0) stop_in[p].full = 5'($urandom);
      end
      for (int p = 0; p < NUM_PORTS; p++) begin
        in_flit[p] = '0;
        if ($urandom_range(0, 2) == 0) begin
          automatic bit resp = (p == PORT_L) ? 1'b0 : 1'($urandom_range(0, 1));
          automatic int node, outp;
          do begin
            node = resp ? $urandom_range(0, 7) : $urandom_range(0, 15);
            outp = xy(5, node);
          end while (outp == p);
          if (!(resp ? stop_out[p].resp : stop_out[p].req))
            send(p, make(resp, node), outp);
        end
      end
      @(negedge clk);
    end
    idle_inputs();
    foreach (stop_in[p]) stop_in[p] = '0;
    repeat (30) @(negedge clk);
    check(exp_port.size() == 0, $sformatf("%0d random transactions never left", exp_port.size()));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
