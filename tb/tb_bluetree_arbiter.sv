// tb_bluetree_arbiter: checks the blocking-factor arbiter for alpha = 1 and
// alpha = 3 against a reference model kept in the testbench.
//
// Directed part: both paths request all the time; the grant sequence must
// be alpha grants to path 0, then one to path 1, repeating. A path-1
// request alone is granted at once; a path-0 request alone likewise.
// Random part: random requests and random output stalls (en = 0); the
// model counts path-0 grants made while path 1 waited, and the arbiter's
// one-hot grant must match the model every cycle. The test also checks the
// fairness rule directly: a waiting path-1 request is never passed over
// more than alpha times.
`timescale 1ns/1ps
module tb_bluetree_arbiter;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic req0, req1, en;
  logic g0_a1, g1_a1, g0_a3, g1_a3;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  bluetree_arbiter #(.ALPHA(1)) u_a1 (.clk, .rst_n, .req0, .req1, .en, .gnt0(g0_a1), .gnt1(g1_a1));
  bluetree_arbiter #(.ALPHA(3)) u_a3 (.clk, .rst_n, .req0, .req1, .en, .gnt0(g0_a3), .gnt1(g1_a3));

  // reference model state: path-0 grants given while path 1 waited
  int m1, m3;
  int pass1, pass3;  // consecutive pass-overs of a waiting path-1 request

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic void model(input int alpha, input int m, output bit e0, output bit e1);
    e0 = 0; e1 = 0;
    if (req0 && req1) begin
      if (m >= alpha) e1 = 1; else e0 = 1;
    end else if (req0) e0 = 1;
    else if (req1) e1 = 1;
  endfunction

  always @(negedge clk) if (rst_n) begin
    bit e0, e1;
    model(1, m1, e0, e1);
    check(g0_a1 == e0 && g1_a1 == e1, $sformatf("alpha=1 grant %b%b expected %b%b", g0_a1, g1_a1, e0, e1));
    model(3, m3, e0, e1);
    check(g0_a3 == e0 && g1_a3 == e1, $sformatf("alpha=3 grant %b%b expected %b%b", g0_a3, g1_a3, e0, e1));
  end

  always @(posedge clk) if (rst_n && en) begin
    bit e0, e1;
    model(1, m1, e0, e1);
    if (e1) m1 = 0; else if (e0 && req1) m1++;
    if (req1 && g0_a1) pass1++; else if (g1_a1) pass1 = 0;
    model(3, m3, e0, e1);
    if (e1) m3 = 0; else if (e0 && req1) m3++;
    if (req1 && g0_a3) pass3++; else if (g1_a3) pass3 = 0;
  end

  always @(negedge clk) if (rst_n) begin
    check(pass1 <= 1, "alpha=1: path 1 passed over more than once");
    check(pass3 <= 3, "alpha=3: path 1 passed over more than 3 times");
  end

  initial begin
    string seq1, seq3;
    req0 = 0; req1 = 0; en = 0;
    m1 = 0; m3 = 0; pass1 = 0; pass3 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // directed: both paths always requesting, output always free
    @(negedge clk) begin req0 = 1; req1 = 1; en = 1; end
    seq1 = ""; seq3 = "";
    repeat (8) begin
      #1;
      seq1 = {seq1, g1_a1 ? "1" : "0"};
      seq3 = {seq3, g1_a3 ? "1" : "0"};
      @(negedge clk);
    end
    check(seq1 == "01010101", {"alpha=1 sequence ", seq1});
    check(seq3 == "00010001", {"alpha=3 sequence ", seq3});
    // path 1 alone is granted at once
    @(negedge clk) begin req0 = 0; req1 = 1; end
    #1 check(g1_a1 && g1_a3, "path 1 alone not granted");
    // random
    repeat (4000) begin
      @(negedge clk);
      req0 = ($urandom % 4) != 0;
      req1 = ($urandom % 3) != 0;
      en   = ($urandom % 5) != 0;
    end
    @(negedge clk);
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
