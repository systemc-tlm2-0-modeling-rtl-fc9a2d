// synth_master -- synthetic traffic master (cycle-accurate processing element).
//
// A transaction generator puts one new transaction into a storage buffer per
// injection period of `inj_period` cycles (injection rate 1/inj_period); the
// cycle inside each period at which it does so is drawn uniformly at random.
// Whenever the buffer is not empty, its oldest transaction is offered to the
// router, one per cycle, unless the router has sent FIFO_FULL for requests
// (`stop_in.req`); then the master waits for FIFO_AVAILABLE. Responses are
// always accepted; each one is checked and its round-trip latency (cycles
// from creation to the response's arrival) is accumulated in `stats`.
//
// Destinations follow `pattern`:
//   uniform random  - every slave S0..S7 with equal probability;
//   hot spot        - S0 and S7 with 30% each, the rest spread evenly over
//                     S1..S6;
//   complement      - slave number = 1's complement of the master number
//                     (3 bits), so M0 talks to S7, M1 to S6 and so on.
// Reads and writes are equally likely and the word inside the slave is
// random. A write stores noc_pkg::write_pattern(addr), so every read must
// return either that value or 0 (never written). Random numbers come from a
// 64-bit xorshift generator seeded by SEED.
//
// The reference master has an unbounded buffer; here it holds BUF_DEPTH
// transactions and any generated while it is full are counted in
// `stats.lost`. The injection period, the slot rule and the random
// generator are this design's choices.
//
// Timing: a transaction created at cycle t carries tstamp t and can reach
// the router at the edge ending cycle t+1 at the earliest. Synchronous
// active-low reset.
module synth_master
  import noc_pkg::*;
#(
  parameter int unsigned MASTER_ID = 0,
  parameter int unsigned BUF_DEPTH = 64,
  parameter logic [63:0] SEED      = 64'h9E37_79B9_7F4A_7C15
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,       // generate new transactions
  input  logic [15:0]   inj_period,   // cycles per transaction (>= 1)
  input  pattern_e      pattern,
  output flit_t         req_out,
  input  stop_t         stop_in,
  input  flit_t         resp_in,
  output master_stats_t stats,
  output logic          idle          // buffer empty
);

  localparam int unsigned NODE = master_node(MASTER_ID);
  localparam int unsigned BW   = $clog2(BUF_DEPTH);

  // ------------------------------------------------------------ random source
  logic [63:0] rnd;
  always_ff @(posedge clk) begin
    if (!rst_n) rnd <= SEED ^ (64'(MASTER_ID + 1) * 64'hD1B5_4A32_D192_ED03);
    else begin
      logic [63:0] x;
      x = rnd;
      x = x ^ (x << 13);
      x = x ^ (x >> 7);
      x = x ^ (x << 17);
      rnd <= x;
    end
  end

  logic [31:0] cycle;
  always_ff @(posedge clk) begin
    if (!rst_n) cycle <= '0;
    else        cycle <= cycle + 1'b1;
  end

  // ------------------------------------------------------------ injection slot
  logic [15:0] phase, slot_q, slot_now;
  logic        gen;
  logic [15:0] period;

  always_comb begin
    period   = (inj_period == 0) ? 16'd1 : inj_period;
    slot_now = 16'((32'(rnd[15:0]) * 32'(period)) >> 16);
    gen      = enable && ((phase == 0) ? (slot_now == 0) : (phase == slot_q));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase  <= '0;
      slot_q <= '0;
    end else begin
      if (phase == 0) slot_q <= slot_now;
      phase <= (phase + 1'b1 >= period) ? '0 : phase + 1'b1;
    end
  end

  // ------------------------------------------------------------ destination
  logic [2:0]  dest;
  txn_t        new_txn;
  logic [15:0] seq;

  always_comb begin
    logic [6:0]  pct;
    logic [2:0]  other;
    logic [31:0] addr;
    pct   = 7'((32'(rnd[39:24]) * 32'd100) >> 16);   // 0..99
    other = 3'(1 + ((32'(rnd[55:48]) * 32'd6) >> 8)); // 1..6
    case (pattern)
      PAT_HOTSPOT:    dest = (pct < 30) ? 3'd0 : (pct < 60) ? 3'd7 : other;
      PAT_COMPLEMENT: dest = ~3'(MASTER_ID);
      default:        dest = rnd[18:16];
    endcase
    addr            = 32'(slave_node(32'(dest))) * NODE_SPAN + {24'd0, rnd[47:42], 2'b00};
    new_txn.kind    = KIND_REQ;
    new_txn.cmd     = rnd[60] ? CMD_WRITE : CMD_READ;
    new_txn.addr    = addr;
    new_txn.data    = rnd[60] ? write_pattern(addr) : 32'd0;
    new_txn.src     = NODE_BITS'(NODE);
    new_txn.seq     = seq;
    new_txn.tstamp  = cycle;
  end

  // ------------------------------------------------------------ storage buffer
  txn_t          buf_q [BUF_DEPTH];
  logic [BW-1:0] rd_ptr, wr_ptr;
  logic [BW:0]   used;
  logic          push, pop, buf_full;

  assign buf_full      = (used == (BW+1)'(BUF_DEPTH));
  assign push          = gen && !buf_full;
  assign pop           = (used != 0) && !stop_in.req;
  assign req_out.valid = pop;
  assign req_out.txn   = buf_q[rd_ptr];
  assign idle          = (used == 0);

  always_ff @(posedge clk) begin
    if (push) buf_q[wr_ptr] <= new_txn;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      used   <= '0;
      seq    <= '0;
    end else begin
      if (push) begin
        wr_ptr <= (wr_ptr == BW'(BUF_DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
        seq    <= seq + 1'b1;
      end
      if (pop) rd_ptr <= (rd_ptr == BW'(BUF_DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      used <= used + (BW+1)'(push) - (BW+1)'(pop);
    end
  end

  // ------------------------------------------------------------ responses
  logic        resp_ok;
  logic [31:0] lat;

  always_comb begin
    txn_t r;
    r       = resp_in.txn;
    lat     = cycle - r.tstamp;
    resp_ok = (r.kind == KIND_RESP) && (r.src == NODE_BITS'(NODE)) &&
              (r.addr[31:8] >= 24'(NUM_MASTERS)) && (r.addr[31:8] < 24'(NUM_NODES)) &&
              (r.cmd == CMD_WRITE ? r.data == write_pattern(r.addr)
                                  : (r.data == 32'd0 || r.data == write_pattern(r.addr)));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      stats         <= '0;
      stats.lat_min <= '1;
    end else begin
      if (push)                   stats.generated    <= stats.generated + 1'b1;
      if (gen && buf_full)        stats.lost         <= stats.lost + 1'b1;
      if (pop)                    stats.sent         <= stats.sent + 1'b1;
      if (used != 0 && stop_in.req) stats.stall_cycles <= stats.stall_cycles + 1'b1;
      if (resp_in.valid) begin
        stats.received <= stats.received + 1'b1;
        stats.lat_sum  <= stats.lat_sum + 48'(lat);
        if (lat > stats.lat_max) stats.lat_max <= lat;
        if (lat < stats.lat_min) stats.lat_min <= lat;
        if (!resp_ok) stats.errors <= stats.errors + 1'b1;
      end
    end
  end

endmodule
