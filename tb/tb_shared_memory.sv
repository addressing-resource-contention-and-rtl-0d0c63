// tb_shared_memory: checks the shared root memory with its default latency
// t_D = 20 cycles.
//
// A random requester offers reads and writes (held until accepted) to a
// small address range. A reference array in the testbench predicts read
// data. For every accepted request the response must appear exactly 20
// cycles after the acceptance cycle, carry the request's client index and
// kind, and return the predicted data for a read. The memory must never
// hold more than one request: while it is busy it accepts only in the cycle
// it delivers a response, so with a continuous stream of requests the
// acceptances are exactly 20 cycles apart (one request per t_D).
`timescale 1ns/1ps
module tb_shared_memory;
  import bt_pkg::*;

  localparam int TD = 20;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  logic     rq_valid, rq_ready, rs_valid, busy;
  mem_req_t rq;
  mem_rsp_t rs;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  shared_memory dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  data_t ref_mem [16];
  bit    ref_init [16];
  int    cycle = 0;
  int    exp_t[$];
  mem_rsp_t exp_rs[$];
  bit    rsp_known[$];
  int    last_accept = -1000;
  int    n_b2b = 0, n_rsp = 0;
  bit    drive = 0;
  logic  took;

  always @(posedge clk) if (rst_n) begin
    cycle++;
    if (rq_valid && rq_ready) begin
      mem_rsp_t e;
      int a;
      a = int'(rq.addr[3:0]);
      e.id = rq.id;
      e.write = rq.write;
      e.rdata = rq.write ? '0 : ref_mem[a];
      rsp_known.push_back(rq.write || ref_init[a]);
      if (rq.write) begin ref_mem[a] = rq.wdata; ref_init[a] = 1; end
      exp_t.push_back(cycle + TD);
      exp_rs.push_back(e);
      if (cycle - last_accept == TD) n_b2b++;
      check(cycle - last_accept >= TD, "second request accepted while busy");
      last_accept = cycle;
    end
    if (rs_valid) begin
      n_rsp++;
      if (exp_t.size() == 0) check(0, "response without request");
      else begin
        int t; mem_rsp_t e; bit k;
        t = exp_t.pop_front(); e = exp_rs.pop_front(); k = rsp_known.pop_front();
        check(t == cycle, $sformatf("response after %0d cycles, expected %0d", TD - (t - cycle), TD));
        check(rs.id == e.id && rs.write == e.write && (!k || rs.rdata == e.rdata),
              $sformatf("response %p expected %p", rs, e));
      end
    end else begin
      check(exp_t.size() == 0 || exp_t[0] != cycle, "missing response");
    end
  end

  always @(posedge clk) took <= rq_valid && rq_ready;

  always @(negedge clk) if (rst_n && drive) begin
    if (!rq_valid || took) begin
      rq_valid = ($urandom % 4) != 0;
      rq.id = ID_W'($urandom);
      rq.write = 1'($urandom);
      rq.addr = ADDR_W'($urandom % 16);
      rq.wdata = $urandom;
    end
  end

  initial begin
    for (int i = 0; i < 16; i++) begin ref_mem[i] = '0; ref_init[i] = 0; end
    rq_valid = 0; rq = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    drive = 1;
    repeat (6000) @(posedge clk);
    @(negedge clk) begin drive = 0; rq_valid = 0; end
    repeat (TD + 5) @(posedge clk);
    check(exp_t.size() == 0, "responses missing at the end");
    check(n_b2b > 100, $sformatf("only %0d back-to-back services at one per t_D", n_b2b));
    check(n_rsp > 200, "too few responses");
    check(!busy, "still busy when idle");
    $display("responses %0d, back-to-back %0d", n_rsp, n_b2b);
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
