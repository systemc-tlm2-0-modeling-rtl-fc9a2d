// tb_rr_arbiter -- checks the variable-priority round-robin arbiter.
//
// Part 1 replays the worked example of the reference study with six socket
// IDs: the priority is 2 and the FIFO holds IDs 4, 1, 5, 2, so ID 2 is
// granted and the priority becomes 3; next cycle the FIFO holds 5, 2, 1, 4,
// 1, 5 and, with no ID 3 waiting, ID 4 is granted. An idle cycle moves the
// priority on by one.
// Part 2 drives random request vectors into a five-socket arbiter for 2000
// cycles and compares every grant with a reference model kept here: search
// cyclically from the priority, grant the first requester, then priority =
// grant + 1; with no request the priority still advances by one.
module tb_rr_arbiter;

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

  // ------------------------------------------------------------ six sockets
  logic [5:0] req6;
  logic       gv6;
  logic [2:0] gid6, prio6;
  rr_arbiter #(.N(6)) u6 (.clk, .rst_n, .req(req6), .gnt_valid(gv6), .gnt_id(gid6), .prio(prio6));

  // ------------------------------------------------------------ five sockets
  logic [4:0] req5;
  logic       gv5;
  logic [2:0] gid5, prio5;
  rr_arbiter #(.N(5)) u5 (.clk, .rst_n, .req(req5), .gnt_valid(gv5), .gnt_id(gid5), .prio(prio5));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ref_prio;
    req6 = '0;
    req5 = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // two idle cycles: priority 0 -> 1 -> 2
    #1 check(prio6 == 0 && !gv6, "reset priority 0, no grant when idle");
    @(negedge clk); check(prio6 == 1, "idle cycle advances priority to 1");
    @(negedge clk); check(prio6 == 2, "idle cycle advances priority to 2");
    // FIFO holds 4, 1, 5, 2
    req6 = 6'b110110;
    #1 check(gv6 && gid6 == 2, $sformatf("priority 2: expected grant 2, got %0d", gid6));
    @(negedge clk); check(prio6 == 3, "priority 3 after granting 2");
    // FIFO holds 5, 2, 1, 4, 1, 5
    req6 = 6'b110110;
    #1 check(gv6 && gid6 == 4, $sformatf("priority 3: expected grant 4, got %0d", gid6));
    @(negedge clk); check(prio6 == 5, "priority 5 after granting 4");
    req6 = 6'b000110;
    #1 check(gv6 && gid6 == 1, $sformatf("priority 5: expected wrap to 1, got %0d", gid6));
    @(negedge clk);
    req6 = '0;

    // random test against the reference model
    ref_prio = int'(prio5);
    for (int c = 0; c < 2000; c++) begin
      int exp_id;
      bit exp_v;
      req5 = 5'($urandom);
      if (c % 7 == 0) req5 = '0;
      #1;
      exp_v  = 1'b0;
      exp_id = 0;
      for (int k = 0; k < 5; k++) begin
        automatic int id = (ref_prio + k) % 5;
        if (!exp_v && req5[id]) begin
          exp_v  = 1'b1;
          exp_id = id;
        end
      end
      check(gv5 == exp_v && (!exp_v || int'(gid5) == exp_id),
            $sformatf("cycle %0d req %b prio %0d: grant %0b/%0d, expected %0b/%0d",
                      c, req5, ref_prio, gv5, gid5, exp_v, exp_id));
      ref_prio = exp_v ? (exp_id + 1) % 5 : (ref_prio + 1) % 5;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
