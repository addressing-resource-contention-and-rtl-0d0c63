// traffic_generator: synthetic memory client used in place of a processor.
//
// After a start pulse the generator issues cfg_total requests. Two limits
// shape the traffic, as in the workload model of the architecture:
//   - path outstanding request number N_RQ (cfg_n_out): at most this many
//     requests may be issued and not yet answered. At the limit the
//     generator stalls; a response lets it issue again in the next cycle.
//   - request interval T_RQ: successive requests are issued at least T_RQ
//     cycles apart. T_RQ = 1 + (lfsr & cfg_t_mask), drawn anew for every
//     request from a 16-bit LFSR seeded with cfg_seed, so cfg_t_mask = 0
//     gives the fixed interval 1 and cfg_t_mask = 63 gives T_RQ in [1, 64].
// Requests alternate between a write (even sequence numbers) and a read of
// the same address (odd sequence numbers); the read data is compared with
// the word written just before, so the path is checked end to end.
//
// For every response the generator reports the release time (value of the
// global cycle counter `now` in the first cycle the request was offered)
// and the latency (cycles from release to the cycle the response arrives).
// The release times of outstanding requests wait in a small FIFO; responses
// of one client return in order because every path through the tree and
// the root queue is first in, first out.
//
// The two workload parameters and the release-time/latency metrics follow
// the architecture's evaluation; the LFSR, the power-of-two interval ranges
// and the write/read pattern are this design's choices (the workload
// contents were not specified).
module traffic_generator
  import bt_pkg::*;
#(
  parameter int unsigned CLIENT_ID = 0,
  parameter int unsigned MAX_OUT   = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] now,
  // configuration, held stable during a run
  input  logic        start,
  input  logic [3:0]  cfg_n_out,
  input  logic [15:0] cfg_total,
  input  logic [7:0]  cfg_t_mask,
  input  logic [15:0] cfg_seed,
  // request port towards the tree leaf
  output logic        rq_valid,
  input  logic        rq_ready,
  output mem_req_t    rq,
  // response port from the tree leaf
  input  logic        rs_valid,
  input  mem_rsp_t    rs,
  // measurements
  output logic        rpt_valid,
  output logic [31:0] rpt_release,
  output logic [15:0] rpt_latency,
  output logic [15:0] completed,
  output logic [15:0] lat_min,
  output logic [15:0] lat_max,
  output logic [15:0] data_err,
  output logic        at_limit,
  output logic        done
);

  localparam int unsigned PTR_W = $clog2(MAX_OUT);

  typedef struct packed {
    logic [31:0] release_t;
    logic [15:0] seq;
  } rel_t;

  logic             running;
  logic [15:0]      issued;
  logic [4:0]       out_cnt;
  logic [4:0]       out_after;
  logic [8:0]       gap;
  logic [15:0]      lfsr;
  logic [4:0]       n_lim;
  rel_t             rel_q [MAX_OUT];
  logic [PTR_W-1:0] rel_wr, rel_rd;
  logic             fire, slot_free, present;
  logic [8:0]       interval;
  rel_t             head;
  logic [15:0]      lat;
  data_t            expect_d;

  // N_RQ is limited to the depth of the release-time FIFO.
  assign n_lim     = (32'(cfg_n_out) > MAX_OUT) ? 5'(MAX_OUT) : 5'(cfg_n_out);
  assign fire      = rq_valid && rq_ready;
  assign slot_free = !rq_valid || fire;
  assign out_after = out_cnt - 5'(rs_valid);
  assign present   = running && slot_free && (issued < cfg_total)
                     && (out_after < n_lim) && (gap == '0);
  assign at_limit  = running && (issued < cfg_total) && (out_after >= n_lim);
  assign interval  = 9'd1 + 9'(lfsr[7:0] & cfg_t_mask);
  assign done      = !running && (completed == cfg_total) && (completed != '0);

  assign head      = rel_q[rel_rd];
  assign lat       = 16'(now - head.release_t);
  assign expect_d  = {16'(CLIENT_ID), head.seq - 16'd1};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running     <= 1'b0;
      issued      <= '0;
      out_cnt     <= '0;
      gap         <= '0;
      lfsr        <= 16'h1;
      rel_wr      <= '0;
      rel_rd      <= '0;
      rq_valid    <= 1'b0;
      rq          <= '0;
      rpt_valid   <= 1'b0;
      rpt_release <= '0;
      rpt_latency <= '0;
      completed   <= '0;
      lat_min     <= '1;
      lat_max     <= '0;
      data_err    <= '0;
    end else if (start) begin
      running     <= 1'b1;
      issued      <= '0;
      out_cnt     <= '0;
      gap         <= '0;
      lfsr        <= (cfg_seed == '0) ? 16'h1 : cfg_seed;
      rel_wr      <= '0;
      rel_rd      <= '0;
      rq_valid    <= 1'b0;
      rpt_valid   <= 1'b0;
      completed   <= '0;
      lat_min     <= '1;
      lat_max     <= '0;
      data_err    <= '0;
    end else begin
      // issue side
      if (present) begin
        rq_valid       <= 1'b1;
        rq.id          <= ID_W'(CLIENT_ID);
        rq.write       <= !issued[0];
        rq.addr        <= {ID_W'(CLIENT_ID), issued[ADDR_W-ID_W:1]};
        rq.wdata       <= {16'(CLIENT_ID), issued};
        issued         <= issued + 16'd1;
        out_cnt        <= out_after + 5'd1;
        gap            <= interval - 9'd1;
        lfsr           <= {lfsr[14:0], 1'b0} ^ (lfsr[15] ? 16'h002D : 16'h0000);
        rel_q[rel_wr]  <= '{release_t: now + 32'd1, seq: issued};
        rel_wr         <= PTR_W'((32'(rel_wr) + 1) % MAX_OUT);
      end else begin
        if (fire) rq_valid <= 1'b0;
        out_cnt <= out_after;
        if (gap != '0) gap <= gap - 9'd1;
      end
      if (running && issued == cfg_total && out_after == '0 && !rq_valid)
        running <= 1'b0;
      // response side
      rpt_valid <= rs_valid;
      if (rs_valid) begin
        rpt_release <= head.release_t;
        rpt_latency <= lat;
        completed   <= completed + 16'd1;
        rel_rd      <= PTR_W'((32'(rel_rd) + 1) % MAX_OUT);
        if (lat < lat_min) lat_min <= lat;
        if (lat > lat_max) lat_max <= lat;
        if (!rs.write && rs.rdata != expect_d) data_err <= data_err + 16'd1;
        if (rs.write != !head.seq[0])          data_err <= data_err + 16'd1;
      end
    end
  end

  a_rq_stable: assert property (@(posedge clk) disable iff (!rst_n)
    rq_valid && !rq_ready |=> rq_valid && $stable(rq));
  a_rs_for_me: assert property (@(posedge clk) disable iff (!rst_n)
    rs_valid |-> rs.id == ID_W'(CLIENT_ID));

endmodule
