// mem_arbiter: shares one global-memory port among several requesters.
//
// Requesters present whole-word read or write requests with valid/ready.  A
// round-robin pointer picks one valid requester per cycle and forwards it to
// the memory port; the requester's ready follows the memory's ready for the
// granted request.  The memory returns read data in request order, so the
// arbiter remembers the requester of every read in a queue and steers each
// returned word to it.  Reads are held back while that queue is full.
// The published design only states that the compute units share the board's
// memory bandwidth; the round-robin policy and the routing queue are this
// design's choices.
//
// Interface and timing: combinational grant (request to memory in the same
// cycle), read data steered in the cycle it returns.
module mem_arbiter
  import hobbes_pkg::*;
#(
  parameter int unsigned N        = 5,
  parameter int unsigned RT_DEPTH = 64
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N-1:0]   s_req_valid,
  output logic [N-1:0]   s_req_ready,
  input  mem_req_t       s_req [N],
  output logic [N-1:0]   s_rsp_valid,
  output field_t         s_rsp_data,
  output logic           m_req_valid,
  input  logic           m_req_ready,
  output mem_req_t       m_req,
  input  logic           m_rsp_valid,
  input  field_t         m_rsp_data
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  typedef logic [IW-1:0] idx_t;

  idx_t rr;           // requester with the highest priority this cycle
  idx_t gnt;
  logic gnt_valid;

  logic rt_full, rt_empty, rt_wr;
  idx_t rt_head;

  // A requester can be granted unless it wants a read and the routing queue
  // is full.
  logic [N-1:0] eligible;
  always_comb begin
    for (int i = 0; i < N; i++)
      eligible[i] = s_req_valid[i] && (s_req[i].we || !rt_full);
  end

  always_comb begin
    gnt       = '0;
    gnt_valid = 1'b0;
    for (int k = 0; k < N; k++) begin
      int unsigned i;
      i = (int'(rr) + k) % N;
      if (!gnt_valid && eligible[i]) begin
        gnt       = idx_t'(i);
        gnt_valid = 1'b1;
      end
    end
  end

  assign m_req_valid = gnt_valid;
  assign m_req       = s_req[gnt];
  always_comb begin
    s_req_ready = '0;
    if (gnt_valid) s_req_ready[gnt] = m_req_ready;
  end

  assign rt_wr = gnt_valid && m_req_ready && !m_req.we;

  sync_fifo #(.T(idx_t), .DEPTH(RT_DEPTH)) u_route (
    .clk, .rst_n,
    .wr_en(rt_wr), .wr_data(gnt),
    .rd_en(m_rsp_valid), .rd_data(rt_head),
    .full(rt_full), .empty(rt_empty), .count()
  );

  always_comb begin
    s_rsp_valid = '0;
    if (m_rsp_valid) s_rsp_valid[rt_head] = 1'b1;
  end
  assign s_rsp_data = m_rsp_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr <= '0;
    else if (gnt_valid && m_req_ready) rr <= (gnt == idx_t'(N - 1)) ? '0 : gnt + 1'b1;
  end

  a_rsp_routed: assert property (@(posedge clk) disable iff (!rst_n) m_rsp_valid |-> !rt_empty);
endmodule
