// bluetree_arbiter: local arbiter of one Bluetree multiplexer.
//
// Two request paths compete for the single memory-direction output of a
// multiplexer. Path 0 is the local high-priority path and path 1 the local
// low-priority path. With blocking factor ALPHA, a request waiting on path 1
// is passed over by at most ALPHA path-0 grants; the next arbitration then
// goes to path 1. When path 0 has no request, a path-1 request is granted at
// once. With ALPHA = 1 this is a plain two-way round robin whenever both
// paths are busy.
//
// The count of path-0 grants made while path 1 waited is kept in hp_cnt and
// only changes in a cycle where a grant is actually taken (en = 1), so a
// stalled output freezes the arbiter state, as the architecture requires.
// The blocking rule follows the architecture description; counting only
// grants made while path 1 is waiting, and the reset value 0, are this
// design's choices.
//
// Interface: req0/req1 request flags, en = the output can take a request
// this cycle. gnt0/gnt1 are combinational and one-hot (or both 0 when no
// request); the grant is taken in the cycle en is high.
module bluetree_arbiter #(
  parameter int unsigned ALPHA = bt_pkg::ALPHA_DEF
) (
  input  logic clk,
  input  logic rst_n,
  input  logic req0,
  input  logic req1,
  input  logic en,
  output logic gnt0,
  output logic gnt1
);

  localparam int unsigned CNT_W = (ALPHA < 2) ? 1 : $clog2(ALPHA + 1);

  logic [CNT_W-1:0] hp_cnt;

  always_comb begin
    gnt0 = 1'b0;
    gnt1 = 1'b0;
    if (req0 && req1) begin
      if (32'(hp_cnt) >= ALPHA) gnt1 = 1'b1;
      else                      gnt0 = 1'b1;
    end else if (req0) begin
      gnt0 = 1'b1;
    end else if (req1) begin
      gnt1 = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hp_cnt <= '0;
    end else if (en) begin
      if (gnt1)              hp_cnt <= '0;
      else if (gnt0 && req1) hp_cnt <= hp_cnt + 1'b1;
    end
  end

  // A path-1 request is never passed over more than ALPHA times in a row.
  a_alpha_bound: assert property (@(posedge clk) disable iff (!rst_n)
    32'(hp_cnt) <= ALPHA);
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    !(gnt0 && gnt1));

endmodule
