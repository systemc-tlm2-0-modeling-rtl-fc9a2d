// out_fifo -- output FIFO of one router socket, searchable by socket ID.
//
// Each entry holds the ID of the socket through which the transaction entered
// the router and the transaction itself. Entry 0 is the oldest. Up to NUM_IN
// transactions (one per input socket, in socket order) may be appended in a
// cycle, and one entry may be removed from any position: the arbiter names a
// socket ID and the oldest sendable entry with that ID leaves, the entries
// behind it close the gap.
//
// `present[i]` tells the arbiter that a sendable entry with ID i exists. An
// entry is not sendable while the next stage has signalled FIFO_FULL for its
// class (`stop_in.req` for requests, `stop_in.resp` for responses). With
// SCOPE = STOP_FIFO and a router as next stage (NEXT_ROUTER >= 0) only the
// entries that would enter one of that router's full FIFOs (`stop_in.full`)
// are held back; this narrower reaction is an option of this design.
//
// `full` is the FIFO_FULL condition: it rises when the FIFO holds DEPTH
// entries and falls (FIFO_AVAILABLE) as soon as it holds DEPTH-1 or fewer.
// It is a function of the registered count, so the senders see it in the
// same cycle. Because several input sockets may write in the cycle in which
// the count reaches DEPTH, the storage has NUM_IN-2 entries of slack beyond
// DEPTH (the most that can arrive while the count is DEPTH-1, given that
// a transaction never leaves by the socket it came in, so at most NUM_IN-1
// sockets write in one cycle); this slack is
// this design's addition, the reference model keeps its FIFOs in unbounded
// C++ vectors.
//
// Timing: reads are combinational from the registered entries, writes and
// removals take effect at the clock edge. Synchronous active-low reset
// empties the FIFO.
module out_fifo
  import noc_pkg::*;
#(
  parameter int unsigned NUM_IN = NUM_PORTS,
  parameter int unsigned DEPTH  = FIFO_DEPTH,
  parameter stop_scope_e SCOPE  = STOP_FIFO,
  parameter int          NEXT_ROUTER = -1,     // router fed by this FIFO, -1: a master or slave
  localparam int unsigned CAP   = DEPTH + ((NUM_IN > 2) ? NUM_IN - 2 : 0),
  localparam int unsigned IDW   = (NUM_IN > 1) ? $clog2(NUM_IN) : 1,
  localparam int unsigned CW    = $clog2(CAP + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // writes, one per input socket
  input  logic [NUM_IN-1:0] wr_en,
  input  txn_t              wr_txn [NUM_IN],
  // back-pressure from the next stage
  input  stop_t             stop_in,
  // arbitration
  output logic [NUM_IN-1:0] present,
  input  logic              rd_en,
  input  logic [IDW-1:0]    rd_id,
  output txn_t              rd_txn,
  // status
  output logic [CW-1:0]     count,
  output logic              full
);

  logic [IDW-1:0] id_q  [CAP];
  txn_t           txn_q [CAP];
  logic [CW-1:0]  cnt_q;

  logic [CAP-1:0] elig;
  logic           sel_found;
  logic [CW-1:0]  sel;

  always_comb begin
    for (int k = 0; k < CAP; k++) begin
      if (SCOPE == STOP_FIFO && NEXT_ROUTER >= 0)
        elig[k] = (CW'(k) < cnt_q) &&
                  !stop_in.full[next_port(NEXT_ROUTER, txn_q[k])];
      else
        elig[k] = (CW'(k) < cnt_q) &&
                  !(stop_in.req  && txn_q[k].kind == KIND_REQ) &&
                  !(stop_in.resp && txn_q[k].kind == KIND_RESP);
    end
    present = '0;
    for (int k = 0; k < CAP; k++)
      if (elig[k]) present[id_q[k]] = 1'b1;
  end

  always_comb begin
    // oldest sendable entry with the requested ID
    sel_found = 1'b0;
    sel       = '0;
    for (int k = CAP - 1; k >= 0; k--) begin
      if (elig[k] && id_q[k] == rd_id) begin
        sel_found = 1'b1;
        sel       = CW'(k);
      end
    end
    rd_txn = txn_q[sel];
  end

  // next state: remove the selected entry, then append the writes
  logic [IDW-1:0] id_d  [CAP];
  txn_t           txn_d [CAP];
  logic [CW-1:0]  cnt_d;

  always_comb begin
    logic          pop;
    logic [CW-1:0] wp;
    pop = rd_en && sel_found;
    for (int k = 0; k < CAP; k++) begin
      if (pop && CW'(k) >= sel && k < CAP - 1) begin
        id_d[k]  = id_q[k + 1];
        txn_d[k] = txn_q[k + 1];
      end else begin
        id_d[k]  = id_q[k];
        txn_d[k] = txn_q[k];
      end
    end
    wp = pop ? cnt_q - 1'b1 : cnt_q;
    for (int i = 0; i < NUM_IN; i++) begin
      if (wr_en[i] && wp < CW'(CAP)) begin
        id_d[wp]  = IDW'(i);
        txn_d[wp] = wr_txn[i];
        wp        = wp + 1'b1;
      end
    end
    cnt_d = wp;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_q <= '0;
      for (int k = 0; k < CAP; k++) begin
        id_q[k]  <= '0;
        txn_q[k] <= '0;
      end
    end else begin
      cnt_q <= cnt_d;
      for (int k = 0; k < CAP; k++) begin
        id_q[k]  <= id_d[k];
        txn_q[k] <= txn_d[k];
      end
    end
  end

  assign count = cnt_q;
  assign full  = (cnt_q >= CW'(DEPTH));

  // the slack beyond DEPTH is never exceeded
  assert property (@(posedge clk) disable iff (!rst_n)
                   (32'(cnt_q) - 32'(rd_en && sel_found) + 32'($countones(wr_en))) <= CAP);

endmodule
