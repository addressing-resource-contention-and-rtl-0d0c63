// bluetree_system: Bluetree shared-memory multi-core architecture with a
// root queue, as evaluated with synthetic traffic.
//
// N_CLIENTS clients (traffic generators standing in for processors) reach
// one shared memory through the Bluetree interconnect, a binary tree of
// pipelined 2-to-1 multiplexers with local arbitration. Between the tree
// root and the memory sits the root queue, a bypass FIFO of ROOT_Q entries.
// The memory serves one request at a time with fixed latency T_D; requests
// that cannot be served at once wait in the root queue, in arrival order,
// instead of blocking the tree. When ROOT_Q is at least the number of
// outstanding requests in the system minus 3, every request is served in
// strict FIFO order ("queued service") and its latency stays below
// (outstanding requests) x T_D. ROOT_Q = 0 gives the original tree without
// a root queue.
//
// Data flow: traffic_generator[j] -> bluetree_tree leaf j -> root ->
// root_queue -> shared_memory -> root -> leaf j -> traffic_generator[j].
//
// A free-running cycle counter (now) gives every client a common time base
// for release times. Each client reports every completed request
// (release time, latency) and keeps minimum/maximum latency, a count of
// completions and a count of data mismatches. all_done is high once every
// client with a non-zero request budget has finished.
//
// The structure and the default sizes (8 clients, t_D = 20, alpha = 1)
// follow the architecture; the default ROOT_Q = 20 is the largest root
// queue the evaluation used. Port widths are this design's choice.
module bluetree_system
  import bt_pkg::*;
#(
  parameter int unsigned N_CLIENTS = N_CLIENTS_DEF,
  parameter int unsigned ALPHA     = ALPHA_DEF,
  parameter int unsigned ROOT_Q    = ROOT_Q_DEF,
  parameter int unsigned T_D       = T_D_DEF,
  parameter int unsigned MAX_OUT   = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [3:0]  cfg_n_out   [N_CLIENTS],
  input  logic [15:0] cfg_total   [N_CLIENTS],
  input  logic [7:0]  cfg_t_mask  [N_CLIENTS],
  input  logic [15:0] cfg_seed    [N_CLIENTS],
  output logic [31:0] now,
  output logic        rpt_valid   [N_CLIENTS],
  output logic [31:0] rpt_release [N_CLIENTS],
  output logic [15:0] rpt_latency [N_CLIENTS],
  output logic [15:0] completed   [N_CLIENTS],
  output logic [15:0] lat_min     [N_CLIENTS],
  output logic [15:0] lat_max     [N_CLIENTS],
  output logic [15:0] data_err    [N_CLIENTS],
  output logic        at_limit    [N_CLIENTS],
  output logic        all_done,
  output logic [((ROOT_Q == 0) ? 1 : $clog2(ROOT_Q+1))-1:0] rq_level,
  output logic        mem_busy
);

  logic     cl_rq_valid [N_CLIENTS];
  logic     cl_rq_ready [N_CLIENTS];
  mem_req_t cl_rq       [N_CLIENTS];
  logic     cl_rs_valid [N_CLIENTS];
  mem_rsp_t cl_rs       [N_CLIENTS];
  logic     done        [N_CLIENTS];

  logic     root_rq_valid, root_rq_ready;
  mem_req_t root_rq;
  logic     mem_rq_valid, mem_rq_ready;
  mem_req_t mem_rq;
  logic     mem_rs_valid;
  mem_rsp_t mem_rs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) now <= '0;
    else        now <= now + 32'd1;
  end

  for (genvar j = 0; j < N_CLIENTS; j++) begin : g_client
    traffic_generator #(
      .CLIENT_ID(j),
      .MAX_OUT  (MAX_OUT)
    ) u_tg (
      .clk        (clk),
      .rst_n      (rst_n),
      .now        (now),
      .start      (start),
      .cfg_n_out  (cfg_n_out[j]),
      .cfg_total  (cfg_total[j]),
      .cfg_t_mask (cfg_t_mask[j]),
      .cfg_seed   (cfg_seed[j]),
      .rq_valid   (cl_rq_valid[j]),
      .rq_ready   (cl_rq_ready[j]),
      .rq         (cl_rq[j]),
      .rs_valid   (cl_rs_valid[j]),
      .rs         (cl_rs[j]),
      .rpt_valid  (rpt_valid[j]),
      .rpt_release(rpt_release[j]),
      .rpt_latency(rpt_latency[j]),
      .completed  (completed[j]),
      .lat_min    (lat_min[j]),
      .lat_max    (lat_max[j]),
      .data_err   (data_err[j]),
      .at_limit   (at_limit[j]),
      .done       (done[j])
    );
  end

  always_comb begin
    all_done = 1'b1;
    for (int j = 0; j < N_CLIENTS; j++)
      if (cfg_total[j] != '0 && !done[j]) all_done = 1'b0;
  end

  bluetree_tree #(
    .N_CLIENTS(N_CLIENTS),
    .ALPHA    (ALPHA)
  ) u_tree (
    .clk          (clk),
    .rst_n        (rst_n),
    .cl_rq_valid  (cl_rq_valid),
    .cl_rq_ready  (cl_rq_ready),
    .cl_rq        (cl_rq),
    .cl_rs_valid  (cl_rs_valid),
    .cl_rs        (cl_rs),
    .root_rq_valid(root_rq_valid),
    .root_rq_ready(root_rq_ready),
    .root_rq      (root_rq),
    .root_rs_valid(mem_rs_valid),
    .root_rs      (mem_rs)
  );

  root_queue #(.Q(ROOT_Q)) u_rootq (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (root_rq_valid),
    .in_ready (root_rq_ready),
    .in_rq    (root_rq),
    .out_valid(mem_rq_valid),
    .out_ready(mem_rq_ready),
    .out_rq   (mem_rq),
    .level    (rq_level)
  );

  shared_memory #(.T_D(T_D)) u_mem (
    .clk     (clk),
    .rst_n   (rst_n),
    .rq_valid(mem_rq_valid),
    .rq_ready(mem_rq_ready),
    .rq      (mem_rq),
    .rs_valid(mem_rs_valid),
    .rs      (mem_rs),
    .busy    (mem_busy)
  );

endmodule
