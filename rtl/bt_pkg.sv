// bt_pkg: types and constants shared by the Bluetree memory architecture.
//
// A memory request travels from a client (leaf of the tree) through the
// Bluetree multiplexers and the root queue to the shared memory. It carries
// the index of the client that issued it, so that the response can be routed
// back down the tree: at tree level l (root = 0) a multiplexer looks at one
// bit of the client index to choose the client direction. Client 2k sits on
// path 0 (local high priority) and client 2k+1 on path 1 (local low
// priority) of its leaf multiplexer, which matches the priority path
// P1 = {L, H, H} of client 1 in the 8-client example.
//
// Field widths (address, data) are not specified by the architecture; the
// values below are this design's choice and can be changed here.
package bt_pkg;

  // Number of clients at the tree leaves and memory latency t_D (cycles).
  localparam int unsigned N_CLIENTS_DEF = 8;
  localparam int unsigned T_D_DEF       = 20;
  // Root queue size Q used by the evaluated modified architecture.
  localparam int unsigned ROOT_Q_DEF    = 20;
  // Blocking factor alpha of every Bluetree arbiter.
  localparam int unsigned ALPHA_DEF     = 1;

  localparam int unsigned ID_W   = 3;   // enough for N_CLIENTS_DEF clients
  localparam int unsigned ADDR_W = 10;  // word address into the shared memory
  localparam int unsigned DATA_W = 32;

  typedef logic [ID_W-1:0]   client_id_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;

  // Request from a client to the shared memory.
  typedef struct packed {
    client_id_t id;     // issuing client, used to route the response
    logic       write;  // 1: write wdata to addr, 0: read addr
    addr_t      addr;
    data_t      wdata;
  } mem_req_t;

  // Response from the shared memory back to one client.
  typedef struct packed {
    client_id_t id;     // destination client
    logic       write;  // response to a write (acknowledge) or a read
    data_t      rdata;  // read data (0 for a write acknowledge)
  } mem_rsp_t;

  // Worst-case blocking number of one request path under flooding:
  // prio_from_leaf[i] is the local priority of the path at the stage i levels above
  // the leaf stage (1 = local high priority H, 0 = local low priority L),
  // evaluated from the client towards the root. Starting from n = 0, each
  // stage adds its own arbiter blocking, ceil((n+1)/alpha) on an H stage or
  // (n+1)*alpha on an L stage, plus 1 for its occupied buffer. Returns the
  // total n; the worst-case latency is then (n + 1) * t_D + levels.
  function automatic int unsigned wc_blocking(input int unsigned levels,
                                              input logic [31:0] prio_from_leaf,
                                              input int unsigned alpha);
    int unsigned n;
    int unsigned na;
    n = 0;
    for (int unsigned i = 0; i < levels; i++) begin
      if (prio_from_leaf[i]) na = (n + 1 + alpha - 1) / alpha;
      else                   na = (n + 1) * alpha;
      n = n + na + 1;
    end
    return n;
  endfunction

endpackage
