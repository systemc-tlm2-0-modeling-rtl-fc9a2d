// tb_out_fifo -- checks the socket-ID searchable output FIFO.
//
// Two FIFOs get the same random traffic: up to five writes per cycle, random
// FIFO_FULL levels from the next stage and a removal by a random socket ID
// that is present. One FIFO feeds a master or slave (holds back whole
// classes: requests or responses), the other feeds router 5 in the
// STOP_FIFO scope (holds back only entries bound for a full FIFO of router
// 5). A reference queue per FIFO, kept here, predicts `present`, the entry
// that leaves (the oldest sendable one with the requested ID), `count` and
// `full` (count >= 8) every cycle. Writers stop while `full` is set, as the
// routers do, and the FIFO is also driven past DEPTH into its slack.
module tb_out_fifo;
  import noc_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  typedef struct {
    int   id;
    txn_t t;
  } entry_t;

  logic [4:0] wr_en;
  txn_t       wr_txn [5];
  stop_t      stop_in;
  logic       rd_en  [2];
  logic [2:0] rd_id  [2];
  logic [4:0] present[2];
  txn_t       rd_txn [2];
  logic [3:0] count  [2];
  logic       full   [2];

  out_fifo #(.NEXT_ROUTER(-1)) u_pe (
    .clk, .rst_n, .wr_en, .wr_txn, .stop_in,
    .present(present[0]), .rd_en(rd_en[0]), .rd_id(rd_id[0]), .rd_txn(rd_txn[0]),
    .count(count[0]), .full(full[0]));
  out_fifo #(.NEXT_ROUTER(5)) u_rt (
    .clk, .rst_n, .wr_en, .wr_txn, .stop_in,
    .present(present[1]), .rd_en(rd_en[1]), .rd_id(rd_id[1]), .rd_txn(rd_txn[1]),
    .count(count[1]), .full(full[1]));

  entry_t model [2][$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // X-Y output socket of router 5 (column 1, row 1) for a node
  function automatic int port_at_5(int node);
    if (node % 4 > 1) return 1;
    if (node % 4 < 1) return 3;
    if (node / 4 > 1) return 2;
    if (node / 4 < 1) return 0;
    return 4;
  endfunction

  function automatic bit blocked(int f, txn_t t);
    int node;
    if (f == 0)
      return (stop_in.req && t.kind == KIND_REQ) || (stop_in.resp && t.kind == KIND_RESP);
    node = (t.kind == KIND_REQ) ? int'(t.addr) / 256 : int'(t.src);
    return stop_in.full[port_at_5(node)];
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seq = 0;
    int reached_slack = 0, holds = 0;
    wr_en = '0;
    stop_in = '0;
    foreach (wr_txn[i]) wr_txn[i] = '0;
    rd_en = '{1'b0, 1'b0};
    rd_id = '{3'd0, 3'd0};
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      automatic int pick [2];
      // stimulus
      stop_in = '0;
      if ($urandom_range(0, 3) == 0) stop_in.req  = 1'b1;
      if ($urandom_range(0, 3) == 0) stop_in.resp = 1'b1;
      stop_in.full = ($urandom_range(0, 2) == 0) ? 5'($urandom) : 5'd0;
      for (int i = 0; i < 5; i++) begin
        wr_txn[i]      = '0;
        wr_txn[i].kind = $urandom_range(0, 1) ? KIND_RESP : KIND_REQ;
        wr_txn[i].cmd  = $urandom_range(0, 1) ? CMD_WRITE : CMD_READ;
        wr_txn[i].addr = 32'($urandom_range(0, 15) * 256 + $urandom_range(0, 63) * 4);
        wr_txn[i].src  = NODE_BITS'($urandom_range(0, 7));
        wr_txn[i].seq  = 16'(seq++);
        // bursts fill the FIFO, quiet phases let it drain
        wr_en[i] = ((c / 200) % 2 == 0) ? ($urandom_range(0, 2) != 0) : ($urandom_range(0, 5) == 0);
      end
      wr_en[c % 5] = 1'b0;                  // no transaction leaves by the socket it came in
      if (full[0] || full[1]) wr_en = '0;   // writers honour FIFO_FULL
      for (int f = 0; f < 2; f++) begin
        automatic logic [4:0] exp_present = '0;
        foreach (model[f][k]) if (!blocked(f, model[f][k].t)) exp_present[model[f][k].id] = 1'b1;
        #1;
        check(present[f] == exp_present,
              $sformatf("fifo %0d cycle %0d: present %b, expected %b", f, c, present[f], exp_present));
        check(int'(count[f]) == model[f].size(),
              $sformatf("fifo %0d cycle %0d: count %0d, expected %0d", f, c, count[f], model[f].size()));
        check(full[f] == (model[f].size() >= 8), $sformatf("fifo %0d cycle %0d: full flag", f, c));
        if (model[f].size() > 8) reached_slack++;
        pick[f] = -1;
        rd_en[f] = 1'b0;
        if (exp_present != 0 && $urandom_range(0, 3) != 0) begin
          automatic int id;
          do id = $urandom_range(0, 4); while (!exp_present[id]);
          rd_id[f] = 3'(id);
          rd_en[f] = 1'b1;
          foreach (model[f][k])
            if (pick[f] < 0 && model[f][k].id == id && !blocked(f, model[f][k].t)) pick[f] = k;
          if (pick[f] > 0) holds++;
        end
      end
      #1;
      for (int f = 0; f < 2; f++)
        if (pick[f] >= 0)
          check(rd_txn[f] == model[f][pick[f]].t,
                $sformatf("fifo %0d cycle %0d: wrong entry leaves (seq %0d, expected %0d)",
                          f, c, rd_txn[f].seq, model[f][pick[f]].t.seq));
      @(posedge clk);
      for (int f = 0; f < 2; f++) begin
        if (pick[f] >= 0) model[f].delete(pick[f]);
        for (int i = 0; i < 5; i++)
          if (wr_en[i]) model[f].push_back('{id: i, t: wr_txn[i]});
      end
      @(negedge clk);
    end
    check(reached_slack > 0, "FIFO never went past DEPTH into its slack");
    check(holds > 0, "no entry ever left from behind the head");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
