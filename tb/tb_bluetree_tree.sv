// tb_bluetree_tree: checks the 8-client Bluetree interconnect (alpha = 1).
//
// 1. Timing: a lone request from each client reaches the root port exactly
//    3 cycles (one per stage) after it is offered, carrying its client
//    index, and a response presented at the root reaches exactly that client
//    3 cycles later and no other client.
// 2. Fairness: all 8 clients request every cycle and the root accepts every
//    cycle. With local round robin at every stage each client must receive
//    an equal share (1/8) of the root bandwidth, within one request.
// 3. Random traffic: clients offer requests at random, the root accepts at
//    random and an echo model in the testbench returns each request as a
//    response (rdata = wdata) in acceptance order. Every client must get
//    back exactly its own requests, in the order it sent them.
`timescale 1ns/1ps
module tb_bluetree_tree;
  import bt_pkg::*;

  localparam int N = 8;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  logic     cl_rq_valid [N];
  logic     cl_rq_ready [N];
  mem_req_t cl_rq       [N];
  logic     cl_rs_valid [N];
  mem_rsp_t cl_rs       [N];
  logic     root_rq_valid, root_rq_ready;
  mem_req_t root_rq;
  logic     root_rs_valid;
  mem_rsp_t root_rs;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  bluetree_tree dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // per-client bookkeeping
  data_t sent_q [N][$];
  int    nsent  [N];
  int    nrecv  [N];
  int    nroot  [N];
  bit    random_mode;
  bit    echo_mode;
  mem_rsp_t echo_q[$];

  function automatic mem_req_t mk(input int j, input int n);
    mem_req_t r;
    r.id = ID_W'(j); r.write = 1'b0; r.addr = ADDR_W'(n); r.wdata = {16'(j), 16'(n)};
    return r;
  endfunction

  // client-side bookkeeping and checks
  always @(posedge clk) if (rst_n) begin
    for (int j = 0; j < N; j++) begin
      if (cl_rq_valid[j] && cl_rq_ready[j]) begin
        sent_q[j].push_back(cl_rq[j].wdata);
        nsent[j]++;
      end
      if (echo_mode && cl_rs_valid[j]) begin
        nrecv[j]++;
        check(cl_rs[j].id == ID_W'(j), "response delivered to the wrong client");
        if (sent_q[j].size() == 0) check(0, "response without request");
        else begin data_t e; e = sent_q[j].pop_front(); check(cl_rs[j].rdata == e, $sformatf("client %0d response %h expected %h", j, cl_rs[j].rdata, e)); end
      end
    end
    if (root_rq_valid && root_rq_ready) begin
      nroot[root_rq.id]++;
      if (echo_mode) echo_q.push_back('{id: root_rq.id, write: 1'b0, rdata: root_rq.wdata});
    end
  end

  // random sources and echo memory model
  always @(negedge clk) if (rst_n && random_mode) begin
    for (int j = 0; j < N; j++)
      if (!cl_rq_valid[j] || sent_now[j]) begin
        cl_rq_valid[j] = ($urandom % 4) == 0;
        cl_rq[j] = mk(j, nsent[j] + 1);
      end
    root_rq_ready = ($urandom % 2) != 0;
    root_rs_valid = 1'b0;
    if (echo_q.size() > 0 && ($urandom % 4) != 0) begin
      root_rs_valid = 1'b1;
      root_rs = echo_q.pop_front();
    end
  end
  logic sent_now [N];
  always @(posedge clk) for (int j = 0; j < N; j++) sent_now[j] <= cl_rq_valid[j] && cl_rq_ready[j];

  initial begin
    for (int j = 0; j < N; j++) begin
      cl_rq_valid[j] = 0; cl_rq[j] = '0; nsent[j] = 0; nrecv[j] = 0; nroot[j] = 0;
    end
    root_rq_ready = 1; root_rs_valid = 0; root_rs = '0;
    random_mode = 0; echo_mode = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // 1. timing per client
    for (int j = 0; j < N; j++) begin
      int t;
      @(negedge clk) begin cl_rq[j] = mk(j, 0); cl_rq_valid[j] = 1; end
      t = 0;
      @(posedge clk) #1 cl_rq_valid[j] = 0;
      while (!root_rq_valid && t < 10) begin @(posedge clk); #1; t++; end
      check(t == 2 && root_rq.id == ID_W'(j), $sformatf("client %0d: request at root after %0d cycles", j, t + 1));
      @(negedge clk) begin root_rs_valid = 1; root_rs = '{id: ID_W'(j), write: 1'b0, rdata: 32'hBEEF0000 + j}; end
      @(negedge clk) root_rs_valid = 0;
      t = 0;
      while (!cl_rs_valid[j] && t < 10) begin @(posedge clk); #1; t++; end
      check(t == 2 && cl_rs[j].rdata == 32'hBEEF0000 + j, $sformatf("client %0d: response after %0d cycles", j, t + 1));
      for (int i = 0; i < N; i++) if (i != j) check(!cl_rs_valid[i], "response also at another client");
      repeat (4) @(posedge clk);
      sent_q[j].delete();
    end

    // 2. fairness under full load
    @(negedge clk);
    for (int j = 0; j < N; j++) begin cl_rq_valid[j] = 1; cl_rq[j] = mk(j, 0); nroot[j] = 0; end
    root_rq_ready = 1;
    repeat (20) @(posedge clk);
    for (int j = 0; j < N; j++) nroot[j] = 0;
    repeat (800) @(posedge clk);
    for (int j = 0; j < N; j++)
      check(nroot[j] >= 99 && nroot[j] <= 101, $sformatf("client %0d got %0d of 800 slots", j, nroot[j]));
    @(negedge clk) for (int j = 0; j < N; j++) cl_rq_valid[j] = 0;
    repeat (10) @(posedge clk);
    for (int j = 0; j < N; j++) begin sent_q[j].delete(); nsent[j] = 0; end

    // 3. random traffic with echo responses
    echo_mode = 1;
    random_mode = 1;
    repeat (5000) @(posedge clk);
    random_mode = 0;
    @(negedge clk) begin
      root_rs_valid = 0;
      for (int j = 0; j < N; j++) cl_rq_valid[j] = 0;
      root_rq_ready = 1;
    end
    repeat (2000) begin
      @(negedge clk);
      root_rs_valid = 0;
      if (echo_q.size() > 0) begin root_rs_valid = 1; root_rs = echo_q.pop_front(); end
    end
    for (int j = 0; j < N; j++)
      check(nrecv[j] == nsent[j] && nsent[j] > 100 && sent_q[j].size() == 0,
            $sformatf("client %0d sent %0d received %0d", j, nsent[j], nrecv[j]));
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
