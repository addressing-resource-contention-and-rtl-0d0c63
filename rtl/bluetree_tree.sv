// bluetree_tree: the Bluetree interconnect B, a binary tree of
// bluetree_mux stages between N_CLIENTS clients and one memory port.
//
// The tree has LEVELS = log2(N_CLIENTS) stages (the Bluetree depth N_beta);
// stage 0 is the root. Nodes are numbered as in a binary heap: node 1 is the
// root multiplexer, node n has children 2n (its path 0, local high priority)
// and 2n+1 (its path 1, local low priority), and client j is leaf node
// N_CLIENTS + j. A multiplexer at level l routes responses on bit
// LEVELS-1-l of the client index. With 8 clients, client 1 therefore sees
// the priority path {L, H, H} from leaf to root, as in the architecture's
// example.
//
// Timing: with no contention a request reaches the root port LEVELS cycles
// after the client offers it, and a response reaches the client LEVELS
// cycles after the root port presents it (one buffer per stage each way).
//
// The tree shape, 2-to-1 stages and per-stage buffering follow the
// architecture; the heap numbering and the assignment of even clients to
// path 0 are read from the 8-client tree drawing.
module bluetree_tree
  import bt_pkg::*;
#(
  parameter int unsigned N_CLIENTS = N_CLIENTS_DEF,
  parameter int unsigned ALPHA     = ALPHA_DEF
) (
  input  logic     clk,
  input  logic     rst_n,
  // clients (tree leaves)
  input  logic     cl_rq_valid [N_CLIENTS],
  output logic     cl_rq_ready [N_CLIENTS],
  input  mem_req_t cl_rq       [N_CLIENTS],
  output logic     cl_rs_valid [N_CLIENTS],
  output mem_rsp_t cl_rs       [N_CLIENTS],
  // memory side (tree root)
  output logic     root_rq_valid,
  input  logic     root_rq_ready,
  output mem_req_t root_rq,
  input  logic     root_rs_valid,
  input  mem_rsp_t root_rs
);

  localparam int unsigned LEVELS = $clog2(N_CLIENTS);
  localparam int unsigned NODES  = 2 * N_CLIENTS;

  if (N_CLIENTS < 2 || (1 << LEVELS) != N_CLIENTS || LEVELS > ID_W) begin : g_bad_size
    $error("bluetree_tree: N_CLIENTS must be a power of two between 2 and 2**ID_W");
  end

  // Per node: the request it sends upwards and the response it receives
  // from above. Index 0 is unused.
  logic     up_valid [NODES];
  logic     up_ready [NODES];
  mem_req_t up_rq    [NODES];
  logic     dn_valid [NODES];
  mem_rsp_t dn_rs    [NODES];

  for (genvar j = 0; j < N_CLIENTS; j++) begin : g_leaf
    assign up_valid[N_CLIENTS + j] = cl_rq_valid[j];
    assign up_rq[N_CLIENTS + j]    = cl_rq[j];
    assign cl_rq_ready[j]          = up_ready[N_CLIENTS + j];
    assign cl_rs_valid[j]          = dn_valid[N_CLIENTS + j];
    assign cl_rs[j]                = dn_rs[N_CLIENTS + j];
  end

  assign root_rq_valid = up_valid[1];
  assign root_rq       = up_rq[1];
  assign up_ready[1]   = root_rq_ready;
  assign dn_valid[1]   = root_rs_valid;
  assign dn_rs[1]      = root_rs;

  // Node 0 is not part of the tree.
  assign up_valid[0] = 1'b0;
  assign up_ready[0] = 1'b0;
  assign up_rq[0]    = '0;
  assign dn_valid[0] = 1'b0;
  assign dn_rs[0]    = '0;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    for (genvar k = 0; k < (1 << l); k++) begin : g_mux
      localparam int unsigned N = (1 << l) + k;
      bluetree_mux #(
        .ALPHA    (ALPHA),
        .ROUTE_BIT(LEVELS - 1 - l)
      ) u_mux (
        .clk      (clk),
        .rst_n    (rst_n),
        .rq0_valid(up_valid[2*N]),
        .rq0_ready(up_ready[2*N]),
        .rq0      (up_rq[2*N]),
        .rs0_valid(dn_valid[2*N]),
        .rs0      (dn_rs[2*N]),
        .rq1_valid(up_valid[2*N+1]),
        .rq1_ready(up_ready[2*N+1]),
        .rq1      (up_rq[2*N+1]),
        .rs1_valid(dn_valid[2*N+1]),
        .rs1      (dn_rs[2*N+1]),
        .rqm_valid(up_valid[N]),
        .rqm_ready(up_ready[N]),
        .rqm      (up_rq[N]),
        .rsm_valid(dn_valid[N]),
        .rsm      (dn_rs[N])
      );
    end
  end

endmodule
