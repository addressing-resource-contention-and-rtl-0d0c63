// tb_traffic_generator: checks one traffic generator (client 5) against a
// memory model in the testbench that accepts requests at random, stores
// writes and answers every request 6 cycles after accepting it.
//
// Run 1: N_RQ = 3, interval 1, 40 requests. The generator must issue
//        back to back, never have more than 3 requests outstanding, issue
//        again in the cycle after a response frees a slot, and report for
//        every response the release time (the first cycle the request was
//        offered) and the latency measured independently here.
// Run 2: N_RQ = 8, interval mask 7 (T_RQ in [1, 8]), 60 requests: every
//        gap between offers lies in [1, 8] and more than one gap length
//        occurs.
// Run 3: the model corrupts one read response: the data-error counter must
//        count it.
// Each run must end with all requests answered and done raised, the
// counters (completed, minimum and maximum latency) matching the
// testbench's own record, and read data matching the writes.
`timescale 1ns/1ps
module tb_traffic_generator;
  import bt_pkg::*;

  localparam int MD = 6;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [31:0] now;
  logic        start;
  logic [3:0]  cfg_n_out;
  logic [15:0] cfg_total;
  logic [7:0]  cfg_t_mask;
  logic [15:0] cfg_seed;
  logic        rq_valid, rq_ready, rs_valid;
  mem_req_t    rq;
  mem_rsp_t    rs;
  logic        rpt_valid, at_limit, done;
  logic [31:0] rpt_release;
  logic [15:0] rpt_latency, completed, lat_min, lat_max, data_err;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  traffic_generator #(.CLIENT_ID(5)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  always @(posedge clk or negedge rst_n)
    if (!rst_n) now <= '0; else now <= now + 1;

  // memory model
  data_t    mem [1024];
  int       due_t[$];
  mem_rsp_t due_rs[$];
  int       outstanding, max_out, offers, last_offer, gap_min, gap_max, ngap_kinds;
  bit       gap_seen [16];
  int       rel_q[$];
  int       my_min, my_max, nresp;
  bit       corrupt_next, rsp_free_next;
  int       resp_cycle;
  bit       prev_valid_hold;
  int       limit_reissue, limit_late;

  always @(posedge clk) if (rst_n) begin
    // a new offer: valid rises, or valid stays high after a transfer
    if (rq_valid && !prev_valid_hold) begin
      offers++;
      rel_q.push_back(int'(now));
      if (offers > 1) begin
        int g;
        g = int'(now) - last_offer;
        if (g < gap_min) gap_min = g;
        if (g > gap_max) gap_max = g;
        if (g < 16) gap_seen[g] = 1;
      end
      last_offer = int'(now);
      outstanding++;
      if (outstanding > max_out) max_out = outstanding;
      if (rsp_free_next) limit_reissue++;
    end
    prev_valid_hold <= rq_valid && !rq_ready;
    rsp_free_next <= 0;
    if (rq_valid && rq_ready) begin
      mem_rsp_t e;
      e.id = rq.id;
      e.write = rq.write;
      e.rdata = rq.write ? '0 : mem[rq.addr];
      if (rq.write) mem[rq.addr] = rq.wdata;
      if (!rq.write && corrupt_next) begin e.rdata = ~e.rdata; corrupt_next = 0; end
      due_t.push_back(int'(now) + MD);
      due_rs.push_back(e);
    end
    if (rs_valid) begin
      int r, lat;
      r = rel_q.pop_front();
      lat = int'(now) - r;
      nresp++;
      if (lat < my_min) my_min = lat;
      if (lat > my_max) my_max = lat;
      if (outstanding == int'(cfg_n_out) && rel_q.size() + 1 == outstanding
          && offers < int'(cfg_total)) rsp_free_next <= 1;
      outstanding--;
      resp_cycle = int'(now);
      // the report appears one cycle later
      fork
        begin
          int rr, ll;
          rr = r; ll = lat;
          @(posedge clk);
          check(rpt_valid && int'(rpt_release) == rr && int'(rpt_latency) == ll,
                $sformatf("report %0d/%0d expected %0d/%0d", rpt_release, rpt_latency, rr, ll));
        end
      join_none
    end
  end

  always @(negedge clk) begin
    rq_ready = ($urandom % 3) != 0;
    rs_valid = 0;
    if (due_t.size() > 0 && due_t[0] == int'(now)) begin
      void'(due_t.pop_front());
      rs = due_rs.pop_front();
      rs_valid = 1;
    end
  end

  task automatic run(input int nout, input int total, input int mask, input bit corrupt);
    offers = 0; outstanding = 0; max_out = 0; gap_min = 1 << 30; gap_max = 0;
    my_min = 1 << 30; my_max = 0; nresp = 0; limit_reissue = 0;
    for (int i = 0; i < 16; i++) gap_seen[i] = 0;
    corrupt_next = 0;
    @(negedge clk) begin
      cfg_n_out = 4'(nout); cfg_total = 16'(total); cfg_t_mask = 8'(mask); cfg_seed = 16'h1234;
      start = 1;
    end
    @(negedge clk) start = 0;
    if (corrupt) begin
      repeat (30) @(posedge clk);
      corrupt_next = 1;
    end
    while (!done) @(posedge clk);
    repeat (2) @(posedge clk);
    ngap_kinds = 0;
    for (int i = 0; i < 16; i++) if (gap_seen[i]) ngap_kinds++;
    $display("run N=%0d mask=%0d: offers %0d, max outstanding %0d, gaps %0d..%0d (%0d kinds), latency %0d..%0d, reissue-after-response %0d",
             nout, mask, offers, max_out, gap_min, gap_max, ngap_kinds, my_min, my_max, limit_reissue);
    check(offers == total && nresp == total && int'(completed) == total, "wrong number of requests");
    check(max_out <= nout, $sformatf("%0d outstanding, limit %0d", max_out, nout));
    check(int'(lat_min) == my_min && int'(lat_max) == my_max, "min/max latency counters wrong");
    check(gap_min >= 1 && gap_max <= mask + 1 + (nout < 8 ? 1000 : 0), "interval out of range");
    if (mask == 0) begin
      check(max_out == nout, "outstanding limit never reached");
      check(gap_min == 1, "no back-to-back issue at interval 1");
      check(limit_reissue > 5, "no reissue in the cycle after a response");
    end else begin
      check(ngap_kinds > 1, "interval never varies");
    end
    if (corrupt) check(data_err == 1, $sformatf("data error count %0d, expected 1", data_err));
    else         check(data_err == 0, $sformatf("data error count %0d", data_err));
  endtask

  initial begin
    start = 0; cfg_n_out = 0; cfg_total = 0; cfg_t_mask = 0; cfg_seed = 0;
    rs = '0; rs_valid = 0; prev_valid_hold = 0; rsp_free_next = 0;
    for (int i = 0; i < 1024; i++) mem[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    run(3, 40, 0, 0);
    run(8, 60, 7, 0);
    run(2, 40, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
