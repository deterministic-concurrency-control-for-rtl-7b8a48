// batch_scheduler: moves locked batches into device memory and runs them.
//
// Two batch slots, each a transactions buffer (BATCH_SIZE objects of two
// 512-bit words) and a results buffer in global memory, are used in turn.
// While the kernel executes the batch of one slot, the lock manager fills the
// other: every admitted transaction is written as a 1024-bit object (header
// word, then value word) at txn_base(slot) + 2*i.  When the lock manager
// closes the batch and its last object is written, the slot is ready; the
// kernel is launched on ready slots strictly in batch order, so batch n+1
// reads the table only after every write of batch n.  When the kernel
// finishes, `batch_done` reports the slot, its buffers and its size, and the
// slot is free for the batch after next.
// Locking one batch while the previous one executes, a transactions buffer
// and a results buffer per launch, and 1024-bit aligned objects follow the
// published design.  There, the lock manager runs on the host and a whole
// batch is copied over PCIe; here admitted transactions are written straight
// into device memory, and two slots are used so that copying and executing
// overlap: both are this design's choices.  Results stay valid until the slot
// is used again (the batch after next).
//
// Interface and timing:
//   lm_*       control and admitted stream of the lock manager.
//   req_*      write-only memory port (one word per cycle when accepted).
//   k_*        kernel launch (pulse, bases, count) and completion pulse.
//   batch_done + done_*  one-cycle report of a finished batch.
module batch_scheduler
  import hobbes_pkg::*;
#(
  parameter int unsigned BATCH_SIZE = 131072,
  parameter maddr_t      TXN_BASE   = maddr_t'(26'h100_0000),
  parameter maddr_t      RES_BASE   = maddr_t'(26'h110_0000),
  localparam int unsigned CNT_W     = $clog2(BATCH_SIZE + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // lock manager
  input  logic             lm_idle,
  output logic             lm_start,
  input  logic             adm_valid,
  output logic             adm_ready,
  input  txn_t             adm_txn,
  input  logic             lm_closed,
  input  logic [CNT_W-1:0] lm_count,
  // memory (writes only)
  output logic             req_valid,
  input  logic             req_ready,
  output mem_req_t         req,
  // kernel
  output logic             k_start,
  output logic [CNT_W-1:0] k_count,
  output maddr_t           k_txn_base,
  output maddr_t           k_res_base,
  input  logic             k_done,
  // report
  output logic             batch_done,
  output logic             done_slot,
  output logic [CNT_W-1:0] done_count,
  output maddr_t           done_txn_base,
  output maddr_t           done_res_base
);
  typedef enum logic [1:0] {SL_FREE, SL_FILLING, SL_READY, SL_RUNNING} slot_e;

  slot_e             slot_st  [2];
  logic [CNT_W-1:0]  slot_cnt [2];
  logic              fp, ep;          // slot being filled, slot to execute next
  logic              k_busy;
  logic              closed_pend;
  logic [CNT_W-1:0]  closed_cnt;

  function automatic maddr_t txn_base_of(logic s);
    return TXN_BASE + (s ? maddr_t'(2 * BATCH_SIZE) : '0);
  endfunction
  function automatic maddr_t res_base_of(logic s);
    return RES_BASE + (s ? maddr_t'(2 * BATCH_SIZE) : '0);
  endfunction

  // ---------------- object writer ---------------------------------------
  logic             w_busy, w_phase;
  txn_t             w_txn;
  logic [CNT_W-1:0] w_idx;

  assign adm_ready = !w_busy && (slot_st[fp] == SL_FILLING);
  assign req_valid = w_busy;
  always_comb begin
    req.we    = 1'b1;
    req.addr  = txn_base_of(fp) + maddr_t'({w_idx, w_phase});
    req.wdata = w_phase ? w_txn.value : pack_txn_hdr(w_txn);
  end

  assign lm_start = lm_idle && (slot_st[fp] == SL_FREE) && !closed_pend;

  // ---------------- kernel launch ----------------------------------------
  assign k_start    = !k_busy && (slot_st[ep] == SL_READY);
  assign k_count    = slot_cnt[ep];
  assign k_txn_base = txn_base_of(ep);
  assign k_res_base = res_base_of(ep);

  assign batch_done    = k_busy && k_done;
  assign done_slot     = ep;
  assign done_count    = slot_cnt[ep];
  assign done_txn_base = txn_base_of(ep);
  assign done_res_base = res_base_of(ep);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_st[0]  <= SL_FREE;
      slot_st[1]  <= SL_FREE;
      slot_cnt[0] <= '0;
      slot_cnt[1] <= '0;
      fp          <= 1'b0;
      ep          <= 1'b0;
      k_busy      <= 1'b0;
      closed_pend <= 1'b0;
      closed_cnt  <= '0;
      w_busy      <= 1'b0;
      w_phase     <= 1'b0;
      w_txn       <= '0;
      w_idx       <= '0;
    end else begin
      if (lm_start) begin
        slot_st[fp] <= SL_FILLING;
        w_idx       <= '0;
      end
      if (adm_valid && adm_ready) begin
        w_busy  <= 1'b1;
        w_phase <= 1'b0;
        w_txn   <= adm_txn;
      end
      if (w_busy && req_ready) begin
        w_phase <= !w_phase;
        if (w_phase) begin
          w_busy <= 1'b0;
          w_idx  <= w_idx + 1'b1;
        end
      end
      if (lm_closed) begin
        closed_pend <= 1'b1;
        closed_cnt  <= lm_count;
      end
      if (closed_pend && !w_busy) begin
        closed_pend   <= 1'b0;
        slot_st[fp]   <= SL_READY;
        slot_cnt[fp]  <= closed_cnt;
        fp            <= !fp;
      end
      if (k_start) begin
        k_busy      <= 1'b1;
        slot_st[ep] <= SL_RUNNING;
      end
      if (batch_done) begin
        k_busy      <= 1'b0;
        slot_st[ep] <= SL_FREE;
        ep          <= !ep;
      end
    end
  end

  a_count_matches: assert property (@(posedge clk) disable iff (!rst_n)
    closed_pend && !w_busy |-> closed_cnt == w_idx);
endmodule
