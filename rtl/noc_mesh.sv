// noc_mesh -- 4x4 mesh network-on-chip with synthetic masters and slaves.
//
// Sixteen cycle-accurate routers (noc_router) are laid out in four rows of
// four, numbered 0..15 left to right and top to bottom. Each router is wired
// to its north, east, south and west neighbours by one link in each
// direction; each link carries one transaction (request or response) per
// cycle plus the FIFO_FULL / FIFO_AVAILABLE levels going the other way.
// The local socket of routers 0..7 holds synthetic masters M0..M7, that of
// routers 8..15 synthetic slaves S0..S7. Requests travel from a master to
// the slave owning the target address, responses back to the master; both
// use X-Y routing (row first, then column), which cannot deadlock on routing
// alone.
//
// All masters share the injection period and traffic pattern inputs. The
// outputs give per-master and per-slave statistics and, per router and
// socket, the drop, FIFO_FULL and contention flags.
//
// Unloaded timing: a request created at cycle t that crosses R routers
// reaches the slave R+1 cycles later, and its response returns to the
// master 2R+2 cycles after t (one cycle in the master's buffer, one per
// router in each direction, one in the slave).
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH      = FIFO_DEPTH,
  parameter stop_scope_e SCOPE      = STOP_FIFO,
  parameter int unsigned BUF_DEPTH  = 64,
  parameter logic [63:0] SEED       = 64'h9E37_79B9_7F4A_7C15
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enable,
  input  logic [15:0]          inj_period,
  input  pattern_e             pattern,
  output master_stats_t        m_stats   [NUM_MASTERS],
  output logic [NUM_MASTERS-1:0] m_idle,
  output slave_stats_t         s_stats   [NUM_SLAVES],
  output logic [NUM_PORTS-1:0] r_drop       [NUM_NODES],
  output logic [NUM_PORTS-1:0] r_fifo_full  [NUM_NODES],
  output logic [NUM_PORTS-1:0] r_contention [NUM_NODES]
);

  flit_t r_in      [NUM_NODES][NUM_PORTS];
  flit_t r_out     [NUM_NODES][NUM_PORTS];
  stop_t r_stop_in [NUM_NODES][NUM_PORTS];
  stop_t r_stop_out[NUM_NODES][NUM_PORTS];

  for (genvar n = 0; n < NUM_NODES; n++) begin : g_node
    noc_router #(.ROUTER_ID(n), .DEPTH(DEPTH), .SCOPE(SCOPE)) u_router (
      .clk        (clk),
      .rst_n      (rst_n),
      .in_flit    (r_in[n]),
      .stop_out   (r_stop_out[n]),
      .out_flit   (r_out[n]),
      .stop_in    (r_stop_in[n]),
      .drop       (r_drop[n]),
      .fifo_full  (r_fifo_full[n]),
      .contention (r_contention[n])
    );

    // links to the neighbouring routers
    for (genvar p = 0; p < PORT_L; p++) begin : g_link
      if (port_type(n, p) == PT_PAIR) begin : g_on
        assign r_in[n][p]      = r_out[neighbour(n, p)][opposite(p)];
        assign r_stop_in[n][p] = r_stop_out[neighbour(n, p)][opposite(p)];
      end else begin : g_off
        assign r_in[n][p]      = '0;
        assign r_stop_in[n][p] = '0;
      end
    end

    // processing element on the local socket
    if (is_master_node(n)) begin : g_master
      synth_master #(.MASTER_ID(n), .BUF_DEPTH(BUF_DEPTH), .SEED(SEED)) u_master (
        .clk        (clk),
        .rst_n      (rst_n),
        .enable     (enable),
        .inj_period (inj_period),
        .pattern    (pattern),
        .req_out    (r_in[n][PORT_L]),
        .stop_in    (r_stop_out[n][PORT_L]),
        .resp_in    (r_out[n][PORT_L]),
        .stats      (m_stats[n]),
        .idle       (m_idle[n])
      );
      assign r_stop_in[n][PORT_L] = '0;   // a master always takes its responses
    end else begin : g_slave
      synth_slave u_slave (
        .clk      (clk),
        .rst_n    (rst_n),
        .req_in   (r_out[n][PORT_L]),
        .stop_out (r_stop_in[n][PORT_L]),
        .resp_out (r_in[n][PORT_L]),
        .stop_in  (r_stop_out[n][PORT_L]),
        .stats    (s_stats[n - NUM_MASTERS])
      );
    end
  end

endmodule
