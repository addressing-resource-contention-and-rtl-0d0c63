// tb_bluetree_mux: checks one Bluetree multiplexer stage (alpha = 1,
// responses routed on client-index bit 1).
//
// Request path: two random sources on client directions 0 and 1 hold each
// request until it is accepted; the memory direction accepts at random.
// Every request leaving the stage must be the oldest unsent request of one
// of the two sources (order kept per path, nothing lost or duplicated), and
// all requests must come out. A waiting path-1 request may be passed
// over by at most one path-0 grant (alpha = 1), and path 0 goes first when
// both wait after a path-1 grant. An uncontended request must appear
// at the memory direction one cycle after it is offered.
// Response path: random responses from the memory direction must appear on
// the client direction selected by bit 1 of their client index, unchanged,
// exactly one cycle later, and never on the other direction.
`timescale 1ns/1ps
module tb_bluetree_mux;
  import bt_pkg::*;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  logic     rq0_valid, rq0_ready, rq1_valid, rq1_ready, rqm_valid, rqm_ready;
  mem_req_t rq0, rq1, rqm;
  logic     rs0_valid, rs1_valid, rsm_valid;
  mem_rsp_t rs0, rs1, rsm;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  bluetree_mux #(.ALPHA(1), .ROUTE_BIT(1)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  mem_req_t q0[$], q1[$];     // sent by each source, not yet seen at output
  int sent0, sent1, got;
  int last_src;               // source of the previous contended grant
  bit en_drive;
  mem_rsp_t rs_exp;
  bit       rs_exp_v;

  function automatic mem_req_t rnd_req(input int src, input int n);
    mem_req_t r;
    r.id    = ID_W'(src);
    r.write = 1'($urandom);
    r.addr  = ADDR_W'($urandom);
    r.wdata = {16'(src), 16'(n)};
    return r;
  endfunction

  // scoreboard
  always @(posedge clk) if (rst_n) begin
    if (rq0_valid && rq0_ready) begin q0.push_back(rq0); sent0++; end
    if (rq1_valid && rq1_ready) begin q1.push_back(rq1); sent1++; end
    if (rqm_valid && rqm_ready) begin
      got++;
      if (q0.size() > 0 && rqm == q0[0]) void'(q0.pop_front());
      else if (q1.size() > 0 && rqm == q1[0]) void'(q1.pop_front());
      else check(0, "output request is not the oldest of either path");
    end
  end

  // sources: hold each request until accepted
  always @(negedge clk) if (rst_n && en_drive) begin
    if (!rq0_valid || rq0_ready_d) begin
      rq0_valid = ($urandom % 3) != 0;
      rq0 = rnd_req(0, sent0 + int'(rq0_valid));
    end
    if (!rq1_valid || rq1_ready_d) begin
      rq1_valid = ($urandom % 3) != 0;
      rq1 = rnd_req(1, sent1 + int'(rq1_valid));
    end
    rqm_ready = ($urandom % 4) != 0;
  end

  // ready sampled at the clock edge, used to decide on the next request
  logic rq0_ready_d, rq1_ready_d;
  always @(posedge clk) begin
    rq0_ready_d <= rq0_valid && rq0_ready;
    rq1_ready_d <= rq1_valid && rq1_ready;
  end

  // Blocking factor 1: a waiting path-1 request is passed over at most once,
  // and after a path-1 grant a waiting path-0 request goes first.
  int passes;
  always @(posedge clk) if (rst_n && en_drive && (!rqm_valid || rqm_ready)) begin
    if (rq0_valid && rq1_valid && last_src == 1)
      check(rq0_ready, "path 0 not preferred after a path-1 grant");
    if (rq1_valid && rq0_ready) passes++;
    if (rq1_ready) passes = 0;
    check(passes <= 1, "path 1 passed over more than once");
    if (rq0_ready) last_src = 0;
    if (rq1_ready) last_src = 1;
  end

  // response path
  always @(posedge clk) if (rst_n) begin
    if (rs_exp_v) begin
      if (rs_exp.id[1]) check(rs1_valid && !rs0_valid && rs1 == rs_exp, "response not on direction 1");
      else              check(rs0_valid && !rs1_valid && rs0 == rs_exp, "response not on direction 0");
    end else begin
      check(!rs0_valid && !rs1_valid, "spurious response");
    end
  end
  always @(posedge clk) begin
    rs_exp_v <= rsm_valid;
    rs_exp   <= rsm;
  end
  always @(negedge clk) if (rst_n) begin
    rsm_valid = ($urandom % 2) != 0;
    rsm.id    = ID_W'($urandom);
    rsm.write = 1'($urandom);
    rsm.rdata = $urandom;
  end

  initial begin
    rq0_valid = 0; rq1_valid = 0; rqm_ready = 0; rsm_valid = 0;
    rq0 = '0; rq1 = '0; rsm = '0;
    sent0 = 0; sent1 = 0; got = 0; last_src = -1; passes = 0; en_drive = 0;
    rs_exp_v = 0; rs_exp = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // uncontended latency: one request on path 1, output free
    @(negedge clk) begin rq1 = rnd_req(1, 99); rq1_valid = 1; rqm_ready = 1; end
    @(posedge clk) #1 check(rqm_valid && rqm == rq1, "request not at output one cycle later");
    @(negedge clk) rq1_valid = 0;
    @(posedge clk);
    @(negedge clk);
    en_drive = 1;
    repeat (3000) @(posedge clk);
    @(negedge clk) begin en_drive = 0; rq0_valid = 0; rq1_valid = 0; rqm_ready = 1; end
    repeat (5) @(posedge clk);
    check(q0.size() == 0 && q1.size() == 0, $sformatf("requests lost: %0d/%0d", q0.size(), q1.size()));
    check(got == sent0 + sent1 && got > 1000, $sformatf("sent %0d+%0d got %0d", sent0, sent1, got));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
