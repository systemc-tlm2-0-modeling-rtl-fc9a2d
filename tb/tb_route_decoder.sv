// tb_route_decoder -- checks the routing table and decoder of three routers
// (a corner, an interior and the opposite corner of the 4x4 mesh).
// Expected output sockets are worked out here from the mesh coordinates:
// X first (east/west), then Y (south/north), local when both match.
// Requests are checked at the first, a middle and the last byte of every
// node window, responses for every issuing master, and addresses outside
// all windows must miss. The decoder is combinational, so every check is
// made in the cycle the input is applied.
module tb_route_decoder;
  import noc_pkg::*;

  localparam int IDS [3] = '{0, 5, 15};

  logic              in_valid;
  txn_t              in_txn;
  logic [2:0]        hit;
  logic [PORT_BITS-1:0] port [3];

  route_decoder #(.ROUTER_ID(0))  u0 (.in_valid, .in_txn, .out_hit(hit[0]), .out_port(port[0]));
  route_decoder #(.ROUTER_ID(5))  u5 (.in_valid, .in_txn, .out_hit(hit[1]), .out_port(port[1]));
  route_decoder #(.ROUTER_ID(15)) u15(.in_valid, .in_txn, .out_hit(hit[2]), .out_port(port[2]));

  int checks = 0, failures = 0;

  function automatic int expect_port(int here, int dest);
    int hx = here % 4, hy = here / 4, dx = dest % 4, dy = dest / 4;
    if (dx > hx) return 1;  // east
    if (dx < hx) return 3;  // west
    if (dy > hy) return 2;  // south
    if (dy < hy) return 0;  // north
    return 4;               // local
  endfunction

  task automatic apply_and_check(input int dest, input string what);
    #1;
    for (int r = 0; r < 3; r++) begin
      checks++;
      if (dest < 0) begin
        if (hit[r] !== 1'b0) begin
          failures++;
          $display("FAIL: router %0d %s: expected a miss", IDS[r], what);
        end
      end else if (hit[r] !== 1'b1 || int'(port[r]) != expect_port(IDS[r], dest)) begin
        failures++;
        $display("FAIL: router %0d %s: hit %0b port %0d, expected port %0d",
                 IDS[r], what, hit[r], port[r], expect_port(IDS[r], dest));
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 1'b1;
    in_txn   = '0;
    // requests: routed by target address
    for (int n = 0; n < 16; n++) begin
      in_txn.kind = KIND_REQ;
      in_txn.addr = n * 256;        apply_and_check(n, $sformatf("req to node %0d first byte", n));
      in_txn.addr = n * 256 + 8'h7c; apply_and_check(n, $sformatf("req to node %0d middle", n));
      in_txn.addr = n * 256 + 255;  apply_and_check(n, $sformatf("req to node %0d last byte", n));
    end
    // responses: routed back to the issuing master
    for (int m = 0; m < 8; m++) begin
      in_txn.kind = KIND_RESP;
      in_txn.addr = 32'h0000_0C40;  // a slave address, must not matter
      in_txn.src  = NODE_BITS'(m);
      apply_and_check(m, $sformatf("resp to master %0d", m));
    end
    // outside every window: dropped
    in_txn.kind = KIND_REQ;
    in_txn.addr = 32'h0000_1000; apply_and_check(-1, "addr 0x1000");
    in_txn.addr = 32'hFFFF_FFFC; apply_and_check(-1, "addr 0xFFFFFFFC");
    // nothing valid, nothing hit
    in_valid = 1'b0;
    in_txn.addr = 32'h0000_0100; apply_and_check(-1, "invalid input");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
