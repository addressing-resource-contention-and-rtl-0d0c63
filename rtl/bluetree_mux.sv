// bluetree_mux: one Bluetree multiplexer stage.
//
// Request path (RQ): requests from client direction 0 and client direction 1
// are arbitrated by bluetree_arbiter (path 0 = local high priority) and the
// winner is written into a one-entry pipeline buffer that drives the memory
// direction. The buffer takes a new request when it is empty or is being
// emptied in the same cycle, so a stage moves one request per cycle and a
// request spends one cycle per stage when nothing blocks it. When the
// memory direction does not accept, the buffer holds and both client
// directions stall.
//
// Response path (RS): non-blocking. A response from the memory direction is
// steered by bit ROUTE_BIT of its client index into one of two one-entry
// buffers, one per client direction, so a response also spends one cycle per
// stage. There is no backpressure on responses: clients always take them.
//
// The structure (arbiter, one RQ buffer, demultiplexer, one RS buffer per
// client direction) follows the multiplexer diagram of the architecture;
// the valid/ready handshake on requests and the valid-only response
// channel are this design's choices.
module bluetree_mux
  import bt_pkg::*;
#(
  parameter int unsigned ALPHA     = ALPHA_DEF,
  parameter int unsigned ROUTE_BIT = 0
) (
  input  logic     clk,
  input  logic     rst_n,
  // client direction 0 (local high priority)
  input  logic     rq0_valid,
  output logic     rq0_ready,
  input  mem_req_t rq0,
  output logic     rs0_valid,
  output mem_rsp_t rs0,
  // client direction 1 (local low priority)
  input  logic     rq1_valid,
  output logic     rq1_ready,
  input  mem_req_t rq1,
  output logic     rs1_valid,
  output mem_rsp_t rs1,
  // memory direction
  output logic     rqm_valid,
  input  logic     rqm_ready,
  output mem_req_t rqm,
  input  logic     rsm_valid,
  input  mem_rsp_t rsm
);

  logic gnt0, gnt1, en;

  // The RQ buffer can be written when empty or drained this cycle.
  assign en = !rqm_valid || rqm_ready;

  bluetree_arbiter #(.ALPHA(ALPHA)) u_arb (
    .clk  (clk),
    .rst_n(rst_n),
    .req0 (rq0_valid),
    .req1 (rq1_valid),
    .en   (en),
    .gnt0 (gnt0),
    .gnt1 (gnt1)
  );

  assign rq0_ready = en && gnt0;
  assign rq1_ready = en && gnt1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rqm_valid <= 1'b0;
      rqm       <= '0;
    end else if (en) begin
      rqm_valid <= gnt0 || gnt1;
      if (gnt0)      rqm <= rq0;
      else if (gnt1) rqm <= rq1;
    end
  end

  // Response demultiplexer with one buffer per client direction.
  logic dir;
  assign dir = rsm.id[ROUTE_BIT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs0_valid <= 1'b0;
      rs1_valid <= 1'b0;
      rs0       <= '0;
      rs1       <= '0;
    end else begin
      rs0_valid <= rsm_valid && !dir;
      rs1_valid <= rsm_valid &&  dir;
      if (rsm_valid && !dir) rs0 <= rsm;
      if (rsm_valid &&  dir) rs1 <= rsm;
    end
  end

  // A request offered to the memory direction stays until it is taken.
  a_rqm_stable: assert property (@(posedge clk) disable iff (!rst_n)
    rqm_valid && !rqm_ready |=> rqm_valid && $stable(rqm));

endmodule
