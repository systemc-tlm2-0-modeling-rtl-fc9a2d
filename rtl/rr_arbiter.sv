// rr_arbiter -- variable-priority round-robin arbiter over socket IDs.
//
// One arbiter sits in front of each output socket. `req[i]` says that the
// output FIFO holds a transaction that entered through socket i and may be
// sent now. A priority register holds the socket ID that is favoured this
// cycle. If that ID is requesting it is granted; otherwise the priority is
// stepped (cyclically) to the next requesting ID, which is granted. After a
// grant the priority becomes the granted ID + 1. When nothing requests, no
// grant is made and the priority still advances by one, so it changes every
// cycle as in the reference model.
//
// Interface: `req` in, `gnt_valid`/`gnt_id` out combinationally in the same
// cycle; the priority register updates at the clock edge. Reset sets the
// priority to socket 0.
module rr_arbiter #(
  parameter int unsigned N = 5,
  localparam int unsigned W = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,
  output logic          gnt_valid,
  output logic [W-1:0]  gnt_id,
  output logic [W-1:0]  prio       // current priority, for observation
);

  logic [W-1:0] prio_q, prio_d;

  function automatic logic [W-1:0] inc(logic [W-1:0] v);
    return (v == W'(N - 1)) ? '0 : v + 1'b1;
  endfunction

  always_comb begin
    logic [W-1:0] idx;
    gnt_valid = 1'b0;
    gnt_id    = '0;
    idx       = prio_q;
    for (int k = 0; k < N; k++) begin
      if (!gnt_valid && req[idx]) begin
        gnt_valid = 1'b1;
        gnt_id    = idx;
      end
      idx = inc(idx);
    end
    prio_d = gnt_valid ? inc(gnt_id) : inc(prio_q);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) prio_q <= '0;
    else        prio_q <= prio_d;
  end

  assign prio = prio_q;

  // a grant always goes to a requester
  assert property (@(posedge clk) disable iff (!rst_n) gnt_valid |-> req[gnt_id]);

endmodule
