// det_cu: one compute unit of the deterministic transaction kernel.
//
// Every transaction in a batch has already been granted its lock, so a
// compute unit executes without any locking: for work item i it
//   1. loads the 1024-bit transaction object (two 512-bit words at
//      txn_base + 2i),
//   2. reads or writes the whole 512-bit field at table_base + key*8 + col,
//   3. stores the 1024-bit result object (two words at res_base + 2i):
//      header {id, success=1} and, for a read, the field read.
// The three steps are pipelined: loads of later work items are issued while
// earlier items wait for the table, so many transactions are in flight, and
// nothing orders one item's memory accesses after another's (the batch has no
// conflicts).  This follows the published kernel: one straight-line pipeline
// for both transaction types, whole-object loads/stores and one full-width
// table access per transaction.  The queue depths, the issue priority
// (result stores, then table accesses, then object loads) and the zero value
// returned by a write are this design's choices.
//
// Interface and timing:
//   wg_valid/wg_ready/wg_id  a work group from the dispatcher; items
//                            wg_id*WG_SIZE .. min(+WG_SIZE, count)-1.  A new
//                            group is taken once the previous one's loads
//                            have all been issued.
//   busy                     any work still in the unit.
//   req_*                    one memory request per cycle, valid/ready.
//   rsp_valid/rsp_data       read data, in request order, always accepted.
module det_cu
  import hobbes_pkg::*;
#(
  parameter int unsigned BATCH_SIZE = 131072,
  parameter int unsigned WG_SIZE    = 256,
  parameter int unsigned TQ_DEPTH   = 8,
  parameter int unsigned RQ_DEPTH   = 8,
  localparam int unsigned CNT_W     = $clog2(BATCH_SIZE + 1),
  localparam int unsigned WG_W      = $clog2(BATCH_SIZE / WG_SIZE + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  maddr_t           txn_base,
  input  maddr_t           res_base,
  input  maddr_t           table_base,
  input  logic [CNT_W-1:0] count,
  input  logic             wg_valid,
  output logic             wg_ready,
  input  logic [WG_W-1:0]  wg_id,
  output logic             busy,
  output logic             req_valid,
  input  logic             req_ready,
  output mem_req_t         req,
  input  logic             rsp_valid,
  input  field_t           rsp_data
);
  typedef logic [CNT_W-1:0] idx_t;
  typedef enum logic [1:0] {K_HDR, K_VAL, K_TAB} kind_e;
  typedef struct packed { kind_e kind; idx_t idx; } tag_t;
  typedef struct packed { idx_t idx; txn_t txn; } work_t;
  typedef struct packed { idx_t idx; result_t res; } rwork_t;
  typedef struct packed { idx_t idx; logic [ID_W-1:0] id; } pend_t;

  localparam int unsigned TAG_DEPTH = 2 * TQ_DEPTH + RQ_DEPTH;
  localparam int unsigned TQC_W = $clog2(TQ_DEPTH + 1);
  localparam int unsigned RQC_W = $clog2(RQ_DEPTH + 1);

  // ---------------- fetch: issue object loads -------------------------
  logic fetching, f_phase;
  idx_t f_idx, f_end;
  logic [TQC_W:0] f_inflight;     // items loading, not yet in the txn queue
  logic [RQC_W:0] t_inflight;     // table reads outstanding

  // ---------------- queues --------------------------------------------
  logic  tq_wr, tq_rd, tq_full, tq_empty;  work_t tq_wdata, tq_head;
  logic [TQC_W-1:0] tq_count;
  logic  rq_wr, rq_rd, rq_full, rq_empty;  rwork_t rq_wdata, rq_head;
  logic [RQC_W-1:0] rq_count;
  logic  pq_wr, pq_rd, pq_full, pq_empty;  pend_t pq_wdata, pq_head;
  logic  gq_wr, gq_rd, gq_full, gq_empty;  tag_t gq_wdata, gq_head;

  sync_fifo #(.T(work_t),  .DEPTH(TQ_DEPTH)) u_tq (.clk, .rst_n, .wr_en(tq_wr), .wr_data(tq_wdata),
    .rd_en(tq_rd), .rd_data(tq_head), .full(tq_full), .empty(tq_empty), .count(tq_count));
  sync_fifo #(.T(rwork_t), .DEPTH(RQ_DEPTH)) u_rq (.clk, .rst_n, .wr_en(rq_wr), .wr_data(rq_wdata),
    .rd_en(rq_rd), .rd_data(rq_head), .full(rq_full), .empty(rq_empty), .count(rq_count));
  sync_fifo #(.T(pend_t),  .DEPTH(RQ_DEPTH)) u_pq (.clk, .rst_n, .wr_en(pq_wr), .wr_data(pq_wdata),
    .rd_en(pq_rd), .rd_data(pq_head), .full(pq_full), .empty(pq_empty), .count());
  sync_fifo #(.T(tag_t),   .DEPTH(TAG_DEPTH)) u_gq (.clk, .rst_n, .wr_en(gq_wr), .wr_data(gq_wdata),
    .rd_en(gq_rd), .rd_data(gq_head), .full(gq_full), .empty(gq_empty), .count());

  // ---------------- response handling ---------------------------------
  field_t hdr_q;   // header word of the object being loaded
  logic rsp_hdr, rsp_val, rsp_tab;
  assign gq_rd   = rsp_valid;
  assign rsp_hdr = rsp_valid && gq_head.kind == K_HDR;
  assign rsp_val = rsp_valid && gq_head.kind == K_VAL;
  assign rsp_tab = rsp_valid && gq_head.kind == K_TAB;

  assign tq_wr    = rsp_val;
  assign tq_wdata = '{idx: gq_head.idx, txn: unpack_txn(hdr_q, rsp_data)};
  assign pq_rd    = rsp_tab;

  // ---------------- result writer --------------------------------------
  logic w_phase;
  logic w_active;
  assign w_active = !rq_empty;

  // ---------------- table stage ----------------------------------------
  logic t_can, t_is_wr;
  assign t_is_wr = tq_head.txn.ttype == TXN_WRITE;
  // a result slot must be free for the item; a write pushes its result
  // directly and so must not collide with a table read's result.
  assign t_can = !tq_empty &&
                 ((RQC_W+1)'(rq_count) + t_inflight < (RQC_W+1)'(RQ_DEPTH)) &&
                 (t_is_wr ? !rsp_tab : !pq_full);

  logic f_can;
  assign f_can = fetching &&
                 (f_phase || ((TQC_W+1)'(tq_count) + f_inflight < (TQC_W+1)'(TQ_DEPTH)));

  // ---------------- issue mux ------------------------------------------
  typedef enum logic [1:0] {I_NONE, I_RES, I_TAB, I_FETCH} src_e;
  src_e src;
  always_comb begin
    src = I_NONE;
    if (w_active)   src = I_RES;
    else if (t_can) src = I_TAB;
    else if (f_can) src = I_FETCH;
  end

  always_comb begin
    req = '0;
    unique case (src)
      I_RES: begin
        req.we    = 1'b1;
        req.addr  = res_base + maddr_t'({rq_head.idx, w_phase});
        req.wdata = w_phase ? rq_head.res.value : pack_res_hdr(rq_head.res);
      end
      I_TAB: begin
        req.we    = t_is_wr;
        req.addr  = table_base + table_offset(tq_head.txn.key, tq_head.txn.col);
        req.wdata = tq_head.txn.value;
      end
      I_FETCH: begin
        req.we    = 1'b0;
        req.addr  = txn_base + maddr_t'({f_idx, f_phase});
      end
      default: ;
    endcase
  end
  assign req_valid = (src != I_NONE);

  logic fire;
  assign fire = req_valid && req_ready;

  assign gq_wr    = fire && ((src == I_FETCH) || (src == I_TAB && !t_is_wr));
  assign gq_wdata = (src == I_FETCH) ? '{kind: (f_phase ? K_VAL : K_HDR), idx: f_idx}
                                     : '{kind: K_TAB, idx: tq_head.idx};
  assign tq_rd    = fire && src == I_TAB;
  assign pq_wr    = fire && src == I_TAB && !t_is_wr;
  assign pq_wdata = '{idx: tq_head.idx, id: tq_head.txn.id};
  assign rq_rd    = fire && src == I_RES && w_phase;

  always_comb begin
    rq_wr    = 1'b0;
    rq_wdata = '0;
    if (rsp_tab) begin
      rq_wr    = 1'b1;
      rq_wdata = '{idx: pq_head.idx, res: '{id: pq_head.id, success: 1'b1, value: rsp_data}};
    end else if (fire && src == I_TAB && t_is_wr) begin
      rq_wr    = 1'b1;
      rq_wdata = '{idx: tq_head.idx, res: '{id: tq_head.txn.id, success: 1'b1, value: '0}};
    end
  end

  // ---------------- work group intake -----------------------------------
  assign wg_ready = !fetching;

  idx_t g_start, g_end;
  always_comb begin
    g_start = idx_t'(wg_id) * idx_t'(WG_SIZE);
    g_end   = g_start + idx_t'(WG_SIZE);
    if (g_end > count) g_end = count;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fetching   <= 1'b0;
      f_phase    <= 1'b0;
      f_idx      <= '0;
      f_end      <= '0;
      f_inflight <= '0;
      t_inflight <= '0;
      w_phase    <= 1'b0;
      hdr_q      <= '0;
    end else begin
      if (wg_valid && wg_ready && g_start < count) begin
        fetching <= 1'b1;
        f_phase  <= 1'b0;
        f_idx    <= g_start;
        f_end    <= g_end;
      end
      if (fire && src == I_FETCH) begin
        f_phase <= !f_phase;
        if (f_phase) begin
          f_idx <= f_idx + 1'b1;
          if (f_idx + 1'b1 == f_end) fetching <= 1'b0;
        end
      end
      f_inflight <= f_inflight + $bits(f_inflight)'(fire && src == I_FETCH && !f_phase)
                               - $bits(f_inflight)'(rsp_val);
      t_inflight <= t_inflight + $bits(t_inflight)'(fire && src == I_TAB && !t_is_wr)
                               - $bits(t_inflight)'(rsp_tab);
      if (fire && src == I_RES) w_phase <= !w_phase;
      if (rsp_hdr) hdr_q <= rsp_data;
    end
  end

  assign busy = fetching || !tq_empty || !rq_empty || !gq_empty || (f_inflight != '0);

  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n) rsp_valid |-> !gq_empty);
  // The credits reserve room in every queue before a request is issued.
  a_tq_credit:    assert property (@(posedge clk) disable iff (!rst_n) tq_wr |-> !tq_full);
  a_rq_credit:    assert property (@(posedge clk) disable iff (!rst_n) rq_wr |-> !rq_full);
  a_tag_room:     assert property (@(posedge clk) disable iff (!rst_n) gq_wr |-> !gq_full);
  a_pend_read:    assert property (@(posedge clk) disable iff (!rst_n) rsp_tab |-> !pq_empty);
endmodule
