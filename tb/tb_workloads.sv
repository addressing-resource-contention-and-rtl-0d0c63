// tb_workloads: runs the evaluated workloads on the 8-client system side by
// side with different root queue sizes, and prints the latency picture of
// each (highest latency, and per client the latency range).
//
// Workloads (outstanding limit per client P0..P7, interval, requests):
//   group a   0,0,0,2,1,0,0,0   T = 1         36 per client
//   group b   1,0,1,2,2,0,0,1   T = 1         36
//   group c   2,1,1,3,3,1,1,1   T = 1         36
//   group c   as above          T in [1,64]  100
//   balanced  2 for every client T in [1,64]  100
//   balanced  2 for every client T in [1,256] 100
// Root queue sizes: 0 (original tree), 5, 10 and 20.
//
// Checks:
//   - every request completes with correct data, for every queue size;
//   - whenever Q >= N_RQ(B) - 3 (queued service), every latency of a
//     request released in the loaded steady state stays below
//     N_RQ(B) x t_D, and no latency at all exceeds that by more than the
//     6 cycles of tree path (3 stages each way) that the start-up
//     requests, meeting an idle memory, cannot hide behind it;
//   - group c at T = 1: with Q = 10 the highest latency is 259 cycles and
//     all clients share one steady-state latency; with Q = 0 the highest
//     latency exceeds the queued-service bound of 260 and the clients'
//     steady-state latencies differ (the unfair sharing the root queue
//     removes).
`timescale 1ns/1ps
module tb_workloads;
  import bt_pkg::*;

  localparam int N  = 8;
  localparam int NQ = 4;
  localparam int QS [NQ] = '{0, 5, 10, 20};

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [3:0]  cfg_n_out   [N];
  logic [15:0] cfg_total   [N];
  logic [7:0]  cfg_t_mask  [N];
  logic [15:0] cfg_seed    [N];

  logic [31:0] now         [NQ];
  logic        rpt_valid   [NQ][N];
  logic [31:0] rpt_release [NQ][N];
  logic [15:0] rpt_latency [NQ][N];
  logic [15:0] completed   [NQ][N];
  logic [15:0] lat_min     [NQ][N];
  logic [15:0] lat_max     [NQ][N];
  logic [15:0] data_err    [NQ][N];
  logic        at_limit    [NQ][N];
  logic        all_done    [NQ];
  logic        mem_busy    [NQ];
  logic        lvl0;
  logic [2:0]  lvl5;
  logic [3:0]  lvl10;
  logic [4:0]  lvl20;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  bluetree_system #(.ROOT_Q(0)) dut_q0 (.clk, .rst_n, .start, .cfg_n_out, .cfg_total, .cfg_t_mask, .cfg_seed,
    .now(now[0]), .rpt_valid(rpt_valid[0]), .rpt_release(rpt_release[0]), .rpt_latency(rpt_latency[0]),
    .completed(completed[0]), .lat_min(lat_min[0]), .lat_max(lat_max[0]), .data_err(data_err[0]),
    .at_limit(at_limit[0]), .all_done(all_done[0]), .rq_level(lvl0), .mem_busy(mem_busy[0]));
  bluetree_system #(.ROOT_Q(5)) dut_q5 (.clk, .rst_n, .start, .cfg_n_out, .cfg_total, .cfg_t_mask, .cfg_seed,
    .now(now[1]), .rpt_valid(rpt_valid[1]), .rpt_release(rpt_release[1]), .rpt_latency(rpt_latency[1]),
    .completed(completed[1]), .lat_min(lat_min[1]), .lat_max(lat_max[1]), .data_err(data_err[1]),
    .at_limit(at_limit[1]), .all_done(all_done[1]), .rq_level(lvl5), .mem_busy(mem_busy[1]));
  bluetree_system #(.ROOT_Q(10)) dut_q10 (.clk, .rst_n, .start, .cfg_n_out, .cfg_total, .cfg_t_mask, .cfg_seed,
    .now(now[2]), .rpt_valid(rpt_valid[2]), .rpt_release(rpt_release[2]), .rpt_latency(rpt_latency[2]),
    .completed(completed[2]), .lat_min(lat_min[2]), .lat_max(lat_max[2]), .data_err(data_err[2]),
    .at_limit(at_limit[2]), .all_done(all_done[2]), .rq_level(lvl10), .mem_busy(mem_busy[2]));
  bluetree_system #(.ROOT_Q(20)) dut_q20 (.clk, .rst_n, .start, .cfg_n_out, .cfg_total, .cfg_t_mask, .cfg_seed,
    .now(now[3]), .rpt_valid(rpt_valid[3]), .rpt_release(rpt_release[3]), .rpt_latency(rpt_latency[3]),
    .completed(completed[3]), .lat_min(lat_min[3]), .lat_max(lat_max[3]), .data_err(data_err[3]),
    .at_limit(at_limit[3]), .all_done(all_done[3]), .rq_level(lvl20), .mem_busy(mem_busy[3]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // steady-state latency range per queue size and client
  int st_lo [NQ][N];
  int st_hi [NQ][N];
  int hi_all [NQ];
  int win_from, win_to;
  always @(posedge clk) if (rst_n) begin
    for (int q = 0; q < NQ; q++)
      for (int j = 0; j < N; j++) if (rpt_valid[q][j]) begin
        int l;
        l = int'(rpt_latency[q][j]);
        if (l > hi_all[q]) hi_all[q] = l;
        if (int'(rpt_release[q][j]) >= win_from && int'(rpt_release[q][j]) < win_to) begin
          if (l < st_lo[q][j]) st_lo[q][j] = l;
          if (l > st_hi[q][j]) st_hi[q][j] = l;
        end
      end
  end

  function automatic bit all_finished();
    for (int q = 0; q < NQ; q++) if (!all_done[q]) return 0;
    return 1;
  endfunction

  // Runs one workload on all four systems; returns nothing, records ranges.
  task automatic run(input string name, input int unsigned nout [N], input int total, input int mask);
    int nsum;
    nsum = 0;
    for (int j = 0; j < N; j++) begin
      cfg_n_out[j] = 4'(nout[j]);
      cfg_total[j] = (nout[j] == 0) ? 16'd0 : 16'(total);
      cfg_t_mask[j] = 8'(mask);
      cfg_seed[j] = 16'(16'h1D0F + 31 * j);
      nsum += int'(nout[j]);
    end
    for (int q = 0; q < NQ; q++) begin
      hi_all[q] = 0;
      for (int j = 0; j < N; j++) begin st_lo[q][j] = 1 << 30; st_hi[q][j] = 0; end
    end
    win_from = int'(now[0]) + 400;
    win_to   = int'(now[0]) + 2000;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!all_finished()) @(posedge clk);
    repeat (2) @(posedge clk);
    $display("%s (N_RQ(B) = %0d, queued service needs Q >= %0d):", name, nsum, nsum - 3);
    for (int q = 0; q < NQ; q++) begin
      string line;
      line = $sformatf("  Q=%-2d highest %0d, steady-state per client:", QS[q], hi_all[q]);
      for (int j = 0; j < N; j++)
        if (nout[j] != 0) line = {line, $sformatf(" P%0d %0d..%0d", j, st_lo[q][j], st_hi[q][j])};
      $display("%s", line);
      for (int j = 0; j < N; j++) begin
        check(int'(completed[q][j]) == int'(cfg_total[j]), $sformatf("%s Q=%0d P%0d incomplete", name, QS[q], j));
        check(data_err[q][j] == 0, $sformatf("%s Q=%0d P%0d data errors", name, QS[q], j));
      end
      if (QS[q] >= nsum - 3) begin
        int st_max;
        st_max = 0;
        for (int j = 0; j < N; j++) if (nout[j] != 0 && st_hi[q][j] > st_max) st_max = st_hi[q][j];
        check(st_max < nsum * 20, $sformatf("%s Q=%0d steady latency %0d not below %0d", name, QS[q], st_max, nsum * 20));
        check(hi_all[q] <= nsum * 20 + 6,
              $sformatf("%s Q=%0d latency %0d above %0d + 6", name, QS[q], hi_all[q], nsum * 20));
      end
    end
  endtask

  int unsigned grp_a [N] = '{0, 0, 0, 2, 1, 0, 0, 0};
  int unsigned grp_b [N] = '{1, 0, 1, 2, 2, 0, 0, 1};
  int unsigned grp_c [N] = '{2, 1, 1, 3, 3, 1, 1, 1};
  int unsigned bal   [N] = '{2, 2, 2, 2, 2, 2, 2, 2};

  initial begin
    for (int j = 0; j < N; j++) begin
      cfg_n_out[j] = '0; cfg_total[j] = '0; cfg_t_mask[j] = '0; cfg_seed[j] = '0;
    end
    win_from = 0; win_to = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    run("group a, T=1, 36 requests", grp_a, 36, 0);
    run("group b, T=1, 36 requests", grp_b, 36, 0);
    run("group c, T=1, 36 requests", grp_c, 36, 0);
    begin
      int lo0, hi0, lo10, hi10;
      lo0 = 1 << 30; hi0 = 0; lo10 = 1 << 30; hi10 = 0;
      for (int j = 0; j < N; j++) begin
        if (st_lo[0][j] < lo0) lo0 = st_lo[0][j];
        if (st_hi[0][j] > hi0) hi0 = st_hi[0][j];
        if (st_lo[2][j] < lo10) lo10 = st_lo[2][j];
        if (st_hi[2][j] > hi10) hi10 = st_hi[2][j];
      end
      check(hi_all[2] == 259, $sformatf("group c Q=10: highest latency %0d, expected 259", hi_all[2]));
      check(lo10 == hi10, $sformatf("group c Q=10: steady-state latencies %0d..%0d differ", lo10, hi10));
      check(hi_all[0] > 260, $sformatf("group c Q=0: highest latency %0d not above 260", hi_all[0]));
      check(hi0 > lo0, "group c Q=0: no latency variation without root queue");
      // Analytical flood bound t_WC = (N_RQ_WC + 1) x t_D + N_beta, printed
      // for comparison: the workload is not a flood, so it is not checked.
      for (int j = 0; j < N; j++) begin
        logic [31:0] prio;
        int unsigned nwc;
        prio = '0;
        for (int i = 0; i < 3; i++) prio[i] = !(((N + j) >> i) & 1);
        nwc = wc_blocking(3, prio, 1);
        $display("  P%0d priority path (leaf..root) %s%s%s: N_RQ_WC = %0d, t_WC = %0d; observed highest at Q=0: %0d",
                 j, prio[0] ? "H" : "L", prio[1] ? "H" : "L", prio[2] ? "H" : "L",
                 nwc, (nwc + 1) * 20 + 3, int'(lat_max[0][j]));
      end
      check(wc_blocking(3, 32'b111, 1) == 14 && wc_blocking(3, 32'b110, 2) == 11,
            "worst-case blocking recursion");
    end
    run("group c, T in [1,64], 100 requests", grp_c, 100, 63);
    run("balanced N=2, T in [1,64], 100 requests", bal, 100, 63);
    run("balanced N=2, T in [1,256], 100 requests", bal, 100, 255);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
