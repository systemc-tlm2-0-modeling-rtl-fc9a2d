// route_decoder -- routing table and address decoder of one router input.
//
// The routing table holds one (start address, end address, output socket)
// entry per node window; it is built at elaboration time from the router's
// position with X-Y routing (see noc_pkg::build_route_table). The decoder
// compares the routing address of the incoming transaction -- the target
// address of a request, the issuing master's window for a response --
// against every entry in parallel. On a match it returns that entry's output
// socket; with no match it reports a miss (the "-1" of the reference model)
// and the router drops the transaction.
//
// Interface: purely combinational. `in_valid`/`in_txn` in, `out_hit` and
// `out_port` out, valid in the same cycle.
module route_decoder
  import noc_pkg::*;
#(
  parameter int unsigned ROUTER_ID = 0
) (
  input  logic              in_valid,
  input  txn_t              in_txn,
  output logic              out_hit,
  output logic [PORT_BITS-1:0] out_port
);

  localparam route_table_t TABLE = build_route_table(ROUTER_ID);

  logic [31:0] key;

  always_comb begin
    key      = route_key(in_txn);
    out_hit  = 1'b0;
    out_port = '0;
    // first matching entry wins
    for (int i = NUM_NODES - 1; i >= 0; i--) begin
      if (key >= TABLE[i].start_addr && key <= TABLE[i].end_addr) begin
        out_hit  = in_valid;
        out_port = TABLE[i].port;
      end
    end
  end

endmodule
