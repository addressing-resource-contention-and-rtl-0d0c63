// shared_memory: the shared root memory module D with a fixed latency t_D.
//
// The memory serves one request at a time. It accepts a request when it is
// idle, or in the very cycle it delivers the response to the previous one,
// so back-to-back requests are served every T_D cycles and the module holds
// exactly one request in service. A read returns the word stored at the
// address when the request was accepted; a write stores the word and
// returns an acknowledge. The response is valid for one cycle, T_D cycles
// after the cycle the request was accepted, and is not back-pressured.
//
// The storage is a plain synchronous array (a block RAM); the fixed extra
// delay models the constant root memory latency of the architecture. The
// fixed latency, one request in service and t_D = 20 come from the
// architecture description; the array size, the data width and the
// write acknowledge are this design's choices.
module shared_memory
  import bt_pkg::*;
#(
  parameter int unsigned T_D   = T_D_DEF,
  parameter int unsigned DEPTH = 1 << ADDR_W
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     rq_valid,
  output logic     rq_ready,
  input  mem_req_t rq,
  output logic     rs_valid,
  output mem_rsp_t rs,
  output logic     busy
);

  localparam int unsigned CNT_W = (T_D < 2) ? 1 : $clog2(T_D);

  data_t            mem [DEPTH];
  logic [CNT_W-1:0] cnt;
  mem_rsp_t         rs_q;
  logic             accept;

  assign rq_ready = !busy || (cnt == '0);
  assign accept   = rq_valid && rq_ready;
  assign rs_valid = busy && (cnt == '0);
  assign rs       = rs_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
      rs_q <= '0;
    end else if (accept) begin
      busy     <= 1'b1;
      cnt      <= CNT_W'(T_D - 1);
      rs_q.id    <= rq.id;
      rs_q.write <= rq.write;
      rs_q.rdata <= rq.write ? '0 : mem[rq.addr];
    end else if (busy) begin
      if (cnt == '0) busy <= 1'b0;
      else           cnt  <= cnt - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (accept && rq.write) mem[rq.addr] <= rq.wdata;
  end

endmodule
