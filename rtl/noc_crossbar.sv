// noc_crossbar -- switch between the decoders and the output FIFOs.
//
// Every input socket carries at most one decoded transaction per cycle,
// together with the output socket its decoder chose. The crossbar raises the
// write enable of that input on the chosen output FIFO only, so each output
// FIFO sees one write port per input socket and can accept transactions from
// several inputs in the same cycle. Transactions whose decoder missed are not
// forwarded anywhere (they are dropped, as in the reference model).
//
// Interface: combinational. `in_valid[i]`, `in_port[i]`, `in_txn[i]` in;
// `wr_en[o][i]`, `wr_txn[o][i]` out.
module noc_crossbar
  import noc_pkg::*;
#(
  parameter int unsigned N = NUM_PORTS,
  localparam int unsigned W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0] in_valid,
  input  logic [W-1:0] in_port [N],
  input  txn_t         in_txn  [N],
  output logic [N-1:0] wr_en   [N],
  output txn_t         wr_txn  [N][N]
);

  always_comb begin
    for (int o = 0; o < N; o++) begin
      for (int i = 0; i < N; i++) begin
        wr_en[o][i]  = in_valid[i] && (in_port[i] == W'(o));
        wr_txn[o][i] = in_txn[i];
      end
    end
  end

endmodule
