// synth_slave -- synthetic memory slave (cycle-accurate processing element).
//
// The slave owns the address window of its router's node and holds WORDS
// 32-bit words of memory. A request that arrives at a clock edge is executed
// at that edge (a write stores its data, a read fetches the word) and its
// response, with the read data or the echoed write data, is offered to the
// router in the following cycle: one clock cycle per operation. Responses
// wait in a small queue of RESP_DEPTH entries while the router has sent
// FIFO_FULL for responses (`stop_in.resp`). When that queue is full the
// slave itself sends FIFO_FULL for requests (`stop_out.req`) and
// FIFO_AVAILABLE again once an entry has left.
//
// `stats` counts reads and writes and the master-to-slave latency of each
// request (cycles from its creation by the master to its arrival here),
// which is the latency figure of the reference study.
//
// The memory size, the response queue and clearing the memory at reset are
// this design's choices. Synchronous active-low reset.
module synth_slave
  import noc_pkg::*;
#(
  parameter int unsigned WORDS      = SLAVE_WORDS,
  parameter int unsigned RESP_DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  flit_t        req_in,
  output stop_t        stop_out,
  output flit_t        resp_out,
  input  stop_t        stop_in,
  output slave_stats_t stats
);

  localparam int unsigned AW = $clog2(WORDS);
  localparam int unsigned QW = (RESP_DEPTH > 1) ? $clog2(RESP_DEPTH) : 1;

  logic [31:0] mem [WORDS];
  logic [31:0] cycle;

  always_ff @(posedge clk) begin
    if (!rst_n) cycle <= '0;
    else        cycle <= cycle + 1'b1;
  end

  // ------------------------------------------------------------ execute
  logic [AW-1:0] word;
  txn_t          resp;
  logic [31:0]   lat;

  always_comb begin
    word      = req_in.txn.addr[AW+1:2];
    resp      = req_in.txn;
    resp.kind = KIND_RESP;
    if (req_in.txn.cmd == CMD_READ) resp.data = mem[word];
    lat = cycle - req_in.txn.tstamp;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < WORDS; i++) mem[i] <= '0;
    end else if (req_in.valid && req_in.txn.cmd == CMD_WRITE) begin
      mem[word] <= req_in.txn.data;
    end
  end

  // ------------------------------------------------------------ response queue
  txn_t          q [RESP_DEPTH];
  logic [QW-1:0] rd_ptr, wr_ptr;
  logic [QW:0]   used;
  logic          push, pop;

  assign push           = req_in.valid;
  assign pop            = (used != 0) && !stop_in.resp;
  assign resp_out.valid = pop;
  assign resp_out.txn   = q[rd_ptr];
  assign stop_out.req   = (used == (QW+1)'(RESP_DEPTH));
  assign stop_out.resp  = 1'b0;
  assign stop_out.full  = '0;

  always_ff @(posedge clk) begin
    if (push) q[wr_ptr] <= resp;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      used   <= '0;
      stats  <= '0;
    end else begin
      if (push) wr_ptr <= (wr_ptr == QW'(RESP_DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (pop)  rd_ptr <= (rd_ptr == QW'(RESP_DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      used <= used + (QW+1)'(push) - (QW+1)'(pop);
      if (push) begin
        if (req_in.txn.cmd == CMD_WRITE) stats.writes <= stats.writes + 1'b1;
        else                             stats.reads  <= stats.reads + 1'b1;
        stats.lat_sum <= stats.lat_sum + 48'(lat);
        if (lat > stats.lat_max) stats.lat_max <= lat;
      end
      if (used != 0 && stop_in.resp) stats.stall_cycles <= stats.stall_cycles + 1'b1;
    end
  end

  // a request never arrives while FIFO_FULL is asserted
  assert property (@(posedge clk) disable iff (!rst_n) req_in.valid |-> !stop_out.req);

endmodule
