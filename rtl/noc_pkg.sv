// noc_pkg -- types, constants and routing functions shared by the mesh NoC.
//
// The network is a 4x4 mesh of five-port routers (north, east, south, west,
// local). Routers are numbered 0..15 left to right, top to bottom; router n
// sits at column n % 4, row n / 4. Synthetic masters M0..M7 hang off routers
// 0..7 and synthetic slaves S0..S7 off routers 8..15.
//
// A transaction ("transaction object") travels as one wide word per link per
// cycle: a request from master to slave, or the response back. Every node owns
// an address window of NODE_SPAN bytes starting at node*NODE_SPAN; a request
// is routed by its target address, a response by the window of the master
// that issued it. The routing table of each router is computed here from the
// router's position (X-Y, dimension-order routing: first along the row, then
// along the column). The FIFO depth of 8 and the mesh size are the reference
// numbers; the field widths, the address windows and the 1's-complement and
// hot-spot constants for the traffic generators are choices of this design.
package noc_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned MESH_X      = 4;
  localparam int unsigned MESH_Y      = 4;
  localparam int unsigned NUM_NODES   = MESH_X * MESH_Y;
  localparam int unsigned NUM_MASTERS = 8;
  localparam int unsigned NUM_SLAVES  = 8;
  localparam int unsigned NUM_PORTS   = 5;
  localparam int unsigned FIFO_DEPTH  = 8;
  localparam int unsigned NODE_SPAN   = 32'h100;   // bytes of address space per node
  localparam int unsigned SLAVE_WORDS = NODE_SPAN / 4;

  localparam int unsigned PORT_BITS = $clog2(NUM_PORTS);
  localparam int unsigned NODE_BITS = $clog2(NUM_NODES);

  // port numbers (socket IDs inside a router)
  localparam int unsigned PORT_N = 0;
  localparam int unsigned PORT_E = 1;
  localparam int unsigned PORT_S = 2;
  localparam int unsigned PORT_W = 3;
  localparam int unsigned PORT_L = 4;

  // ---------------------------------------------------------------- transaction
  typedef enum logic { KIND_REQ = 1'b0, KIND_RESP = 1'b1 } kind_e;
  typedef enum logic { CMD_READ = 1'b0, CMD_WRITE = 1'b1 } cmd_e;

  typedef struct packed {
    kind_e              kind;    // request or response
    cmd_e               cmd;     // read or write
    logic [31:0]        addr;    // target address
    logic [31:0]        data;    // write data (request) / read data (response)
    logic [NODE_BITS-1:0]  src;     // node of the issuing master
    logic [15:0]        seq;     // per-master sequence number
    logic [31:0]        tstamp;  // cycle at which the master created it
  } txn_t;

  typedef struct packed {
    logic valid;
    txn_t txn;
  } flit_t;

  // FIFO_FULL / FIFO_AVAILABLE as levels: a set bit means FIFO_FULL has been
  // sent for that class of transaction and FIFO_AVAILABLE not yet.
  // `full` additionally names which of the sender's output FIFOs are full,
  // for the STOP_FIFO scope below.
  typedef struct packed {
    logic                 req;    // stop sending requests  (forward path)
    logic                 resp;   // stop sending responses (backward path)
    logic [NUM_PORTS-1:0] full;   // output FIFOs of the adjacent router that are full
  } stop_t;

  // How a router reacts to FIFO_FULL from an adjacent router.
  //   STOP_SOCKET - nothing of the stopped class goes through that socket
  //                 (the reference behaviour);
  //   STOP_FIFO   - only transactions that would enter one of the full FIFOs
  //                 of the adjacent router are held back.
  typedef enum logic { STOP_SOCKET = 1'b0, STOP_FIFO = 1'b1 } stop_scope_e;

  // Kind of output FIFO behind a port.
  typedef enum logic [1:0] {
    PT_NONE = 2'd0,   // port unconnected (mesh edge)
    PT_PAIR = 2'd1,   // FIFO_skt_pair : router-router link, requests and responses
    PT_INIT = 2'd2,   // FIFO_init_skt : towards a slave, requests only
    PT_TARG = 2'd3    // FIFO_targ_skt : towards a master, responses only
  } port_type_e;

  // traffic patterns of the synthetic masters
  typedef enum logic [1:0] {
    PAT_UNIFORM    = 2'd0,
    PAT_HOTSPOT    = 2'd1,
    PAT_COMPLEMENT = 2'd2
  } pattern_e;

  // ---------------------------------------------------------------- statistics
  typedef struct packed {
    logic [31:0] generated;   // transactions put into the storage buffer
    logic [31:0] sent;        // transactions handed to the router
    logic [31:0] received;    // responses received
    logic [47:0] lat_sum;     // sum of round-trip latencies (cycles)
    logic [31:0] lat_max;     // largest round-trip latency
    logic [31:0] lat_min;     // smallest round-trip latency (all ones before the first)
    logic [31:0] lost;        // generated while the storage buffer was full
    logic [31:0] errors;      // responses with wrong fields or data
    logic [31:0] stall_cycles;// cycles with work pending but FIFO_FULL received
  } master_stats_t;

  typedef struct packed {
    logic [31:0] reads;
    logic [31:0] writes;
    logic [47:0] lat_sum;     // sum of master-to-slave latencies (cycles)
    logic [31:0] lat_max;
    logic [31:0] stall_cycles;// cycles a response waited on FIFO_FULL
  } slave_stats_t;

  // ---------------------------------------------------------------- topology
  function automatic int unsigned node_x(int unsigned n);
    return n % MESH_X;
  endfunction

  function automatic int unsigned node_y(int unsigned n);
    return n / MESH_X;
  endfunction

  function automatic bit is_master_node(int unsigned n);
    return n < NUM_MASTERS;
  endfunction

  function automatic int unsigned master_node(int unsigned m);
    return m;
  endfunction

  function automatic int unsigned slave_node(int unsigned s);
    return NUM_MASTERS + s;
  endfunction

  // Output port chosen by X-Y routing at router `here` for destination `dest`.
  function automatic int unsigned xy_port(int unsigned here, int unsigned dest);
    if (node_x(dest) > node_x(here)) return PORT_E;
    if (node_x(dest) < node_x(here)) return PORT_W;
    if (node_y(dest) > node_y(here)) return PORT_S;
    if (node_y(dest) < node_y(here)) return PORT_N;
    return PORT_L;
  endfunction

  // Kind of FIFO at port p of router n.
  function automatic port_type_e port_type(int unsigned n, int unsigned p);
    case (p)
      PORT_N: return (node_y(n) > 0)          ? PT_PAIR : PT_NONE;
      PORT_S: return (node_y(n) < MESH_Y - 1) ? PT_PAIR : PT_NONE;
      PORT_W: return (node_x(n) > 0)          ? PT_PAIR : PT_NONE;
      PORT_E: return (node_x(n) < MESH_X - 1) ? PT_PAIR : PT_NONE;
      default: return is_master_node(n) ? PT_TARG : PT_INIT;
    endcase
  endfunction

  // Neighbour of router n through port p (only valid when port_type != PT_NONE).
  function automatic int unsigned neighbour(int unsigned n, int unsigned p);
    case (p)
      PORT_N:  return n - MESH_X;
      PORT_S:  return n + MESH_X;
      PORT_W:  return n - 1;
      PORT_E:  return n + 1;
      default: return n;
    endcase
  endfunction

  // Port of the neighbour that faces back towards us.
  function automatic int unsigned opposite(int unsigned p);
    case (p)
      PORT_N:  return PORT_S;
      PORT_S:  return PORT_N;
      PORT_W:  return PORT_E;
      PORT_E:  return PORT_W;
      default: return PORT_L;
    endcase
  endfunction

  // ---------------------------------------------------------------- routing table
  // One entry per node window: (start address, end address, output socket).
  typedef struct packed {
    logic [31:0]       start_addr;
    logic [31:0]       end_addr;
    logic [PORT_BITS-1:0] port;
  } route_entry_t;

  typedef route_entry_t [NUM_NODES-1:0] route_table_t;

  function automatic route_table_t build_route_table(int unsigned here);
    route_table_t t;
    for (int unsigned n = 0; n < NUM_NODES; n++) begin
      t[n].start_addr = 32'(n * NODE_SPAN);
      t[n].end_addr   = 32'(n * NODE_SPAN + NODE_SPAN - 1);
      t[n].port       = PORT_BITS'(xy_port(here, n));
    end
    return t;
  endfunction

  // Address a transaction is routed by: the target for a request, the
  // window of the issuing master for a response.
  function automatic logic [31:0] route_key(txn_t t);
    if (t.kind == KIND_REQ) return t.addr;
    return 32'(t.src) * NODE_SPAN;
  endfunction

  // Output socket a transaction will take at router `here`; transactions
  // outside every node window (dropped there) report the local socket.
  function automatic int unsigned next_port(int unsigned here, txn_t t);
    logic [31:0] node;
    node = route_key(t) / NODE_SPAN;
    if (node >= NUM_NODES) return PORT_L;
    return xy_port(here, node);
  endfunction

  // Data a master writes to an address, so that any read can be checked.
  function automatic logic [31:0] write_pattern(logic [31:0] addr);
    return addr ^ 32'hA5A5_A5A5;
  endfunction

endpackage
