// root_queue: bypass FIFO between the Bluetree root and the shared memory.
//
// Requests leaving the tree root enter the queue; the memory takes them in
// arrival order. When the queue is empty the incoming request is offered to
// the memory in the same cycle (bypass), so an idle system pays no extra
// latency. When the memory is busy, up to Q requests wait here instead of
// stalling inside the tree, which keeps the tree paths free and makes the
// memory serve requests strictly first come, first served.
//
// Q = 0 gives the original architecture without a root queue: the block is
// then a direct connection. For Q > 0 the queue accepts a request only when
// it holds fewer than Q entries (a full queue does not take a new request
// even in a cycle where it sends one), as a sized bypass FIFO does.
//
// Interface: valid/ready on both sides; a transfer happens when both are 1.
// level reports the number of stored entries (not counting a request that
// passes straight through). Bypass behaviour and FIFO order follow the
// architecture; the full-queue rule and the circular-buffer layout are this
// design's choices.
module root_queue
  import bt_pkg::*;
#(
  parameter int unsigned Q = ROOT_Q_DEF
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  output logic     in_ready,
  input  mem_req_t in_rq,
  output logic     out_valid,
  input  logic     out_ready,
  output mem_req_t out_rq,
  output logic [((Q == 0) ? 1 : $clog2(Q+1))-1:0] level
);

  if (Q == 0) begin : g_none
    assign in_ready  = out_ready;
    assign out_valid = in_valid;
    assign out_rq    = in_rq;
    assign level     = '0;
  end else begin : g_fifo
    localparam int unsigned PTR_W = (Q < 2) ? 1 : $clog2(Q);
    localparam int unsigned CNT_W = $clog2(Q + 1);

    mem_req_t         buf_q [Q];
    logic [PTR_W-1:0] rd_ptr, wr_ptr;
    logic [CNT_W-1:0] count;
    logic             empty, full, in_fire, out_fire, store, take;

    assign empty     = (count == '0);
    assign full      = (32'(count) == Q);
    assign in_ready  = !full;
    assign out_valid = empty ? in_valid : 1'b1;
    assign out_rq    = empty ? in_rq : buf_q[rd_ptr];
    assign in_fire   = in_valid && in_ready;
    assign out_fire  = out_valid && out_ready;
    // A request is stored unless it bypasses an empty queue.
    assign store     = in_fire && !(empty && out_ready);
    assign take      = out_fire && !empty;
    assign level     = count;

    function automatic logic [PTR_W-1:0] next_ptr(input logic [PTR_W-1:0] p);
      return (32'(p) == Q - 1) ? '0 : p + 1'b1;
    endfunction

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        rd_ptr <= '0;
        wr_ptr <= '0;
        count  <= '0;
      end else begin
        if (store) wr_ptr <= next_ptr(wr_ptr);
        if (take)  rd_ptr <= next_ptr(rd_ptr);
        if (store && !take)      count <= count + 1'b1;
        else if (take && !store) count <= count - 1'b1;
      end
    end

    always_ff @(posedge clk) begin
      if (store) buf_q[wr_ptr] <= in_rq;
    end

    a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
      32'(count) <= Q);
  end

endmodule
