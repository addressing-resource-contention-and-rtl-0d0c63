// tb_root_queue: checks the root queue (bypass FIFO) with Q = 4 and Q = 0.
//
// A random source offers requests (held until accepted) and a random sink
// takes them. For Q = 4 a reference queue in the testbench predicts:
//   - order: requests leave exactly in the order they entered;
//   - bypass: with nothing stored, an offered request is visible at the
//     output in the same cycle, unchanged;
//   - capacity: the queue accepts only while it stores fewer than 4
//     requests, and its level output equals the reference count.
// The test counts the cycles in which the queue was full and in which a
// request bypassed it, and fails if either never happened. For Q = 0 the
// block must be a direct connection (ready and valid pass straight
// through).
`timescale 1ns/1ps
module tb_root_queue;
  import bt_pkg::*;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  logic     in_valid, in_ready, out_valid, out_ready;
  mem_req_t in_rq, out_rq;
  logic [2:0] level;
  logic     z_in_ready, z_out_valid;
  mem_req_t z_out_rq;
  logic     z_level;
  int checks = 0;
  int failures = 0;
  int n_full = 0, n_bypass = 0, n_out = 0;

  always #5 clk = ~clk;

  root_queue #(.Q(4)) dut (.*);
  root_queue #(.Q(0)) dut0 (.clk, .rst_n, .in_valid, .in_ready(z_in_ready), .in_rq,
                            .out_valid(z_out_valid), .out_ready, .out_rq(z_out_rq), .level(z_level));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  mem_req_t model[$];   // requests stored in the queue
  int nsent = 0;
  bit drive = 0;
  logic took;

  // combinational expectations, checked just before each clock edge
  always @(posedge clk) if (rst_n) begin
    check(int'(level) == model.size(), $sformatf("level %0d expected %0d", level, model.size()));
    check(in_ready == (model.size() < 4), "in_ready does not reflect free space");
    if (model.size() == 0) begin
      check(out_valid == in_valid, "bypass: out_valid differs from in_valid");
      if (in_valid) check(out_rq == in_rq, "bypass: request changed");
      if (in_valid) n_bypass++;
    end else begin
      check(out_valid && out_rq == model[0], "output is not the oldest stored request");
    end
    if (model.size() == 4 && in_valid) n_full++;
    // Q = 0: direct connection
    check(z_in_ready == out_ready && z_out_valid == in_valid && (!in_valid || z_out_rq == in_rq),
          "Q=0 is not a direct connection");
    // update the reference: a request offered to an empty queue while the
    // sink is ready passes straight through and is never stored
    begin
      int pre;
      pre = model.size();
      if (out_valid && out_ready) n_out++;
      if (out_valid && out_ready && pre > 0) void'(model.pop_front());
      if (in_valid && in_ready && !(pre == 0 && out_ready)) model.push_back(in_rq);
    end
  end

  always @(posedge clk) took <= in_valid && in_ready;

  always @(negedge clk) if (rst_n && drive) begin
    if (!in_valid || took) begin
      in_valid = ($urandom % 3) != 0;
      if (in_valid) begin
        nsent++;
        in_rq = '{id: ID_W'($urandom), write: 1'($urandom), addr: ADDR_W'(nsent), wdata: $urandom};
      end
    end
    out_ready = ($urandom % 5) < 2;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_rq = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    drive = 1;
    repeat (3000) @(posedge clk);
    @(negedge clk) begin drive = 0; in_valid = 0; out_ready = 1; end
    repeat (10) @(posedge clk);
    check(model.size() == 0 && level == 0, "queue did not drain");
    check(n_full > 0, "queue never full");
    check(n_bypass > 0, "no bypass");
    check(n_out > 500, "too few requests passed");
    $display("full %0d bypass %0d passed %0d", n_full, n_bypass, n_out);
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
