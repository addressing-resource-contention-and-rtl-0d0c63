// tb_bluetree_system: end-to-end test of the 8-client Bluetree system with
// the root queue, all parameters at their defaults (8 clients, alpha = 1,
// root queue of 20 entries, memory latency 20 cycles).
//
// Phase A: workload "group c" (outstanding limits 2,1,1,3,3,1,1,1, 13 in
//          total), fixed request interval 1, 36 requests per client. The
//          root queue (20) exceeds the queued-service minimum 13 - 3 = 10,
//          so every latency must stay below 13 x 20 = 260 cycles, and in
//          the loaded steady state all clients must see the same latency.
// Phase B: group c with random intervals in [1, 64], 100 requests each;
//          the same latency bound applies.
// Phase C: every client at 8 outstanding (64 in total, more than the
//          23 buffers of queue, memory and the two nearest tree stages),
//          interval 1, 40 requests each: the root queue fills and the tree
//          back-pressures. Bound: 64 x 20 = 1280 cycles.
// In every phase the test checks completions and read data per client, and
// that the memory accepts requests in exactly the order they entered the
// root queue. It counts how often each mechanism occurred (inter-path
// contention, a low-priority grant forced by alpha, a stall inside the
// tree, root-queue bypass, root-queue storage, root queue full, memory
// busy, outstanding limit reached, interval wait, responses routed both
// ways at the root) and fails for any that never occurred.
`timescale 1ns/1ps
module tb_bluetree_system;
  import bt_pkg::*;

  localparam int N = 8;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [3:0]  cfg_n_out   [N];
  logic [15:0] cfg_total   [N];
  logic [7:0]  cfg_t_mask  [N];
  logic [15:0] cfg_seed    [N];
  logic [31:0] now;
  logic        rpt_valid   [N];
  logic [31:0] rpt_release [N];
  logic [15:0] rpt_latency [N];
  logic [15:0] completed   [N];
  logic [15:0] lat_min     [N];
  logic [15:0] lat_max     [N];
  logic [15:0] data_err    [N];
  logic        at_limit    [N];
  logic        all_done;
  logic [4:0]  rq_level;
  logic        mem_busy;

  int checks = 0;
  int failures = 0;

  bluetree_system dut (.*);

  always #5 clk = ~clk;

  // ---------------- mechanism counters ----------------
  int n_inter, n_alpha, n_intra, n_bypass, n_store, n_full, n_membusy;
  int n_limit, n_gapwait, n_rs0, n_rs1;
  int mux_inter [7];
  int mux_alpha [7];
  int mux_intra [7];

  for (genvar l = 0; l < 3; l++) begin : g_lv
    for (genvar k = 0; k < (1 << l); k++) begin : g_mx
      always @(posedge clk) if (rst_n) begin
        if (dut.u_tree.g_level[l].g_mux[k].u_mux.rq0_valid &&
            dut.u_tree.g_level[l].g_mux[k].u_mux.rq1_valid &&
            dut.u_tree.g_level[l].g_mux[k].u_mux.en)
          mux_inter[(1 << l) + k - 1]++;
        if (dut.u_tree.g_level[l].g_mux[k].u_mux.rq1_ready &&
            dut.u_tree.g_level[l].g_mux[k].u_mux.rq0_valid)
          mux_alpha[(1 << l) + k - 1]++;
        if (dut.u_tree.g_level[l].g_mux[k].u_mux.rqm_valid &&
            !dut.u_tree.g_level[l].g_mux[k].u_mux.rqm_ready)
          mux_intra[(1 << l) + k - 1]++;
      end
    end
  end

  for (genvar j = 0; j < N; j++) begin : g_tgmon
    always @(posedge clk) if (rst_n) begin
      if (at_limit[j]) n_limit++;
      if (dut.g_client[j].u_tg.running && dut.g_client[j].u_tg.gap != '0) n_gapwait++;
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (dut.u_rootq.in_valid && dut.u_rootq.out_ready && dut.u_rootq.level == '0) n_bypass++;
    if (rq_level != 0) n_store++;
    if (dut.u_rootq.in_valid && !dut.u_rootq.in_ready) n_full++;
    if (dut.mem_rq_valid && !dut.mem_rq_ready) n_membusy++;
    if (dut.u_tree.g_level[0].g_mux[0].u_mux.rs0_valid) n_rs0++;
    if (dut.u_tree.g_level[0].g_mux[0].u_mux.rs1_valid) n_rs1++;
  end

  // ---------------- root-queue order check ----------------
  mem_req_t order_q[$];
  int order_err = 0;
  int order_cnt = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.root_rq_valid && dut.root_rq_ready) order_q.push_back(dut.root_rq);
    if (dut.mem_rq_valid && dut.mem_rq_ready) begin
      order_cnt++;
      if (order_q.size() == 0) order_err++;
      else begin
        mem_req_t e;
        e = order_q.pop_front();
        if (e != dut.mem_rq) order_err++;
      end
    end
  end

  // ---------------- latency log ----------------
  int lat_hist_max;
  int steady_lat [$];
  int steady_from, steady_to;
  always @(posedge clk) if (rst_n) begin
    for (int j = 0; j < N; j++) if (rpt_valid[j]) begin
      if (int'(rpt_latency[j]) > lat_hist_max) lat_hist_max = int'(rpt_latency[j]);
      if (int'(rpt_release[j]) >= steady_from && int'(rpt_release[j]) < steady_to)
        steady_lat.push_back(int'(rpt_latency[j]));
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_phase(input string name, input int unsigned nout [N],
                           input int unsigned total, input int unsigned mask,
                           input int unsigned bound);
    int unsigned t0;
    int unsigned nsum;
    nsum = 0;
    for (int j = 0; j < N; j++) begin
      cfg_n_out[j]  = 4'(nout[j]);
      cfg_total[j]  = 16'(total);
      cfg_t_mask[j] = 8'(mask);
      cfg_seed[j]   = 16'(16'hACE1 + 97 * j);
      nsum += nout[j];
    end
    lat_hist_max = 0;
    order_err = 0;
    order_cnt = 0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    t0 = now;
    while (!all_done) @(posedge clk);
    repeat (2) @(posedge clk);
    $display("%s: %0d cycles, N_RQ(B)=%0d, highest latency %0d (bound %0d)",
             name, now - t0, nsum, lat_hist_max, bound);
    for (int j = 0; j < N; j++) begin
      $display("  P%0d: N_RQ=%0d latency min %0d max %0d", j, nout[j], lat_min[j], lat_max[j]);
      check(completed[j] == 16'(total), $sformatf("%s P%0d completions %0d", name, j, completed[j]));
      check(data_err[j] == 0, $sformatf("%s P%0d data errors %0d", name, j, data_err[j]));
    end
    check(lat_hist_max < int'(bound), $sformatf("%s latency %0d not below %0d", name, lat_hist_max, bound));
    check(order_err == 0 && order_cnt == N * int'(total),
          $sformatf("%s root queue order errors %0d, served %0d", name, order_err, order_cnt));
    check(order_q.size() == 0, $sformatf("%s requests left in flight", name));
  endtask

  int unsigned grp_c [N] = '{2, 1, 1, 3, 3, 1, 1, 1};
  int unsigned all8  [N] = '{8, 8, 8, 8, 8, 8, 8, 8};

  initial begin
    for (int j = 0; j < N; j++) begin
      cfg_n_out[j] = '0; cfg_total[j] = '0; cfg_t_mask[j] = '0; cfg_seed[j] = '0;
    end
    steady_from = 0;
    steady_to = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // Phase A: queued service, all latency lines coincide once loaded.
    steady_from = int'(now) + 300;
    steady_to   = int'(now) + 1500;
    run_phase("A group c T=1", grp_c, 36, 0, 13 * 20);
    begin
      int lo, hi;
      lo = 1 << 30; hi = 0;
      foreach (steady_lat[i]) begin
        if (steady_lat[i] < lo) lo = steady_lat[i];
        if (steady_lat[i] > hi) hi = steady_lat[i];
      end
      $display("  steady state: %0d requests, latency %0d..%0d", steady_lat.size(), lo, hi);
      check(steady_lat.size() > 50 && lo == hi,
            $sformatf("steady-state latencies differ: %0d..%0d", lo, hi));
    end
    steady_to = 0;

    // Phase B: random intervals in [1, 64].
    run_phase("B group c T in [1,64]", grp_c, 100, 63, 13 * 20);

    // Phase C: overload beyond the root queue.
    run_phase("C 8 outstanding each", all8, 40, 0, 64 * 20);

    n_inter = 0; n_alpha = 0; n_intra = 0;
    for (int m = 0; m < 7; m++) begin
      n_inter += mux_inter[m]; n_alpha += mux_alpha[m]; n_intra += mux_intra[m];
    end
    $display("mechanisms: inter-path %0d, alpha switch %0d, tree stall %0d, bypass %0d, queued %0d, queue full %0d, memory busy %0d, limit %0d, interval wait %0d, responses left/right %0d/%0d",
             n_inter, n_alpha, n_intra, n_bypass, n_store, n_full, n_membusy,
             n_limit, n_gapwait, n_rs0, n_rs1);
    check(n_inter > 0, "no inter-path contention");
    check(n_alpha > 0, "no low-priority grant forced by alpha");
    check(n_intra > 0, "no stall inside the tree");
    check(n_bypass > 0, "no root queue bypass");
    check(n_store > 0, "no request stored in the root queue");
    check(n_full > 0, "root queue never full");
    check(n_membusy > 0, "memory never busy");
    check(n_limit > 0, "outstanding limit never reached");
    check(n_gapwait > 0, "no interval wait");
    check(n_rs0 > 0 && n_rs1 > 0, "responses not routed both ways");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
