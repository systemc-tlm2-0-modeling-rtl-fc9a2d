// noc_router -- cycle-accurate five-port mesh router.
//
// Ports (sockets) 0..4 are north, east, south, west and local. A transaction
// arriving on an input is decoded in the same cycle (route_decoder, X-Y
// routing table of this router), switched by the crossbar and written at the
// clock edge into the FIFO of the output socket it must leave by. Every
// output socket has its own FIFO (out_fifo) and round-robin arbiter
// (rr_arbiter); each cycle the arbiter picks one transaction by the ID of the
// socket it entered through, so exactly one transaction leaves each output
// per cycle at most. A transaction therefore spends at least one cycle in a
// router. A transaction whose address matches no table entry is dropped and
// flagged on `drop`.
//
// The FIFO kind of each socket follows from the router's position: a
// socket to a neighbouring router has a FIFO_skt_pair holding requests and
// responses, the local socket of a master router a FIFO_targ_skt
// (responses only), that of a slave router a FIFO_init_skt (requests only).
// Edge sockets without a neighbour have no FIFO.
//
// Back-pressure: when a FIFO holds FIFO_DEPTH entries the router sends
// FIFO_FULL to all adjacent nodes: for a FIFO_skt_pair both classes are
// stopped, for a FIFO_init_skt requests, for a FIFO_targ_skt responses.
// FIFO_AVAILABLE follows as soon as the FIFO holds FIFO_DEPTH-1 or fewer.
// Both are carried as levels on `stop_out` (same on every socket). The
// router in turn sends nothing of a stopped class through a socket whose
// `stop_in` says FIFO_FULL; other entries of the same FIFO may still go.
// `stop_out[p].full` also names the full FIFOs; with SCOPE = STOP_FIFO a
// router holds back only what would enter a full FIFO of its neighbour
// (an option of this design, see out_fifo).
//
// Interface: `in_flit[p]` / `stop_out[p]` face the node feeding socket p,
// `out_flit[p]` / `stop_in[p]` the node it feeds. `out_flit` and `stop_out`
// are combinational from registers; the next node captures `out_flit` at the
// next edge. `drop`, `fifo_full` and `contention` are per-socket status
// flags for observation: a dropped input, a FIFO holding FIFO_DEPTH entries,
// and an arbitration in which more than one socket ID was waiting.
module noc_router
  import noc_pkg::*;
#(
  parameter int unsigned ROUTER_ID = 5,
  parameter int unsigned DEPTH     = FIFO_DEPTH,
  parameter stop_scope_e SCOPE     = STOP_FIFO
) (
  input  logic                clk,
  input  logic                rst_n,
  input  flit_t               in_flit  [NUM_PORTS],
  output stop_t               stop_out [NUM_PORTS],
  output flit_t               out_flit [NUM_PORTS],
  input  stop_t               stop_in  [NUM_PORTS],
  output logic [NUM_PORTS-1:0] drop,
  output logic [NUM_PORTS-1:0] fifo_full,
  output logic [NUM_PORTS-1:0] contention   // several sockets competed this cycle
);


  logic [NUM_PORTS-1:0] dec_hit;
  logic [PORT_BITS-1:0] dec_port [NUM_PORTS];
  txn_t                 in_txn   [NUM_PORTS];
  logic [NUM_PORTS-1:0] in_ok;

  logic [NUM_PORTS-1:0] wr_en  [NUM_PORTS];
  txn_t                 wr_txn [NUM_PORTS][NUM_PORTS];

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_in
    localparam port_type_e PT = port_type(ROUTER_ID, p);
    assign in_txn[p] = in_flit[p].txn;
    route_decoder #(.ROUTER_ID(ROUTER_ID)) u_dec (
      .in_valid (in_flit[p].valid && PT != PT_NONE),
      .in_txn   (in_flit[p].txn),
      .out_hit  (dec_hit[p]),
      .out_port (dec_port[p])
    );
    // a hit towards a socket without a FIFO cannot happen with X-Y tables
    assign in_ok[p] = dec_hit[p] && port_type(ROUTER_ID, 32'(dec_port[p])) != PT_NONE;
    assign drop[p]  = in_flit[p].valid && PT != PT_NONE && !in_ok[p];
  end

  noc_crossbar #(.N(NUM_PORTS)) u_xbar (
    .in_valid (in_ok),
    .in_port  (dec_port),
    .in_txn   (in_txn),
    .wr_en    (wr_en),
    .wr_txn   (wr_txn)
  );

  logic [NUM_PORTS-1:0] stops_req, stops_resp;

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_out
    localparam port_type_e PT = port_type(ROUTER_ID, p);
    if (PT == PT_NONE) begin : g_none
      assign out_flit[p]   = '0;
      assign contention[p] = 1'b0;
      assign fifo_full[p]  = 1'b0;
      assign stops_req[p]  = 1'b0;
      assign stops_resp[p] = 1'b0;
    end else begin : g_fifo
      logic [NUM_PORTS-1:0] present;
      logic                 gnt_valid;
      logic [PORT_BITS-1:0] gnt_id;
      txn_t                 rd_txn;
      logic                 full;

      out_fifo #(
        .NUM_IN      (NUM_PORTS),
        .DEPTH       (DEPTH),
        .SCOPE       (SCOPE),
        .NEXT_ROUTER ((PT == PT_PAIR) ? int'(neighbour(ROUTER_ID, p)) : -1)
      ) u_fifo (
        .clk     (clk),
        .rst_n   (rst_n),
        .wr_en   (wr_en[p]),
        .wr_txn  (wr_txn[p]),
        .stop_in (stop_in[p]),
        .present (present),
        .rd_en   (gnt_valid),
        .rd_id   (gnt_id),
        .rd_txn  (rd_txn),
        .count   (),
        .full    (full)
      );

      rr_arbiter #(.N(NUM_PORTS)) u_arb (
        .clk       (clk),
        .rst_n     (rst_n),
        .req       (present),
        .gnt_valid (gnt_valid),
        .gnt_id    (gnt_id),
        .prio      ()
      );

      assign out_flit[p].valid = gnt_valid;
      assign contention[p]     = gnt_valid && ($countones(present) > 1);
      assign out_flit[p].txn   = rd_txn;
      assign fifo_full[p]      = full;
      assign stops_req[p]      = full && (PT == PT_PAIR || PT == PT_INIT);
      assign stops_resp[p]     = full && (PT == PT_PAIR || PT == PT_TARG);
    end
  end

  // FIFO_FULL / FIFO_AVAILABLE go to every adjacent node
  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_stop
    assign stop_out[p].req  = |stops_req;
    assign stop_out[p].resp = |stops_resp;
    assign stop_out[p].full = fifo_full;
  end

endmodule
