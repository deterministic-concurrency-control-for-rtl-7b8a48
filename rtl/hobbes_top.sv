// hobbes_top: deterministic batch transaction processor.
//
// Single-field YCSB transactions (read or write one 64-byte field of one
// record) stream in.  The batch lock manager admits them into batches in
// which no two transactions conflict on a record (read/write locks kept as
// two bitmaps, refused transactions retried later).  The batch scheduler
// writes each admitted transaction into a transactions buffer in global
// memory and, once the batch is closed, launches the kernel on it while the
// next batch is being locked into the other buffer.  The kernel's compute
// units execute the batch without any locking: load the transaction object,
// read or write the table, store the result object.  Batches execute one
// after another in order, so the outcome is that of running the batches
// serially, and each batch's contents depend only on the input order.
// All memory traffic goes through one global-memory port, shared by the
// scheduler's writes and the compute units.
//
// Global memory layout (512-bit words): the table at TABLE_BASE (word
// key*8 + col), two transactions buffers at TXN_BASE and two results buffers
// at RES_BASE, 2*BATCH_SIZE words each.
//
// Interface and timing:
//   in_valid/in_ready/in_txn   incoming transactions.
//   drain                      no more input for now: close a partial batch.
//   mem_req_* / mem_rsp_*      global memory: valid/ready requests; read data
//                              returned in request order, always accepted.
//   batch_done + done_*        a batch has been executed; its result objects
//                              are at done_res_base + 2i (header {id,success}
//                              then value), its transactions at done_txn_base.
//   stat_retry, stat_closed_full, stat_closed_early  event pulses: a lock
//                              refused, a batch closed full / early.
//   stat_admit, stat_kernel_running, stat_cu_active  activity: a transaction
//                              admitted, the kernel executing a batch, and a
//                              memory request accepted per compute unit.
module hobbes_top
  import hobbes_pkg::*;
#(
  parameter int unsigned NUM_KEYS    = 1 << 20,
  parameter int unsigned BATCH_SIZE  = 131072,
  parameter int unsigned QUEUE_DEPTH = 8192,
  parameter int unsigned BMP_W       = 64,
  parameter int unsigned NUM_CU      = 4,
  parameter int unsigned WG_SIZE     = 256,
  parameter int unsigned CU_DEPTH    = 8,
  parameter maddr_t      TABLE_BASE  = maddr_t'(0),
  parameter maddr_t      TXN_BASE    = maddr_t'(26'h100_0000),
  parameter maddr_t      RES_BASE    = maddr_t'(26'h110_0000),
  localparam int unsigned CNT_W      = $clog2(BATCH_SIZE + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  txn_t             in_txn,
  input  logic             drain,
  output logic             mem_req_valid,
  input  logic             mem_req_ready,
  output mem_req_t         mem_req,
  input  logic             mem_rsp_valid,
  input  field_t           mem_rsp_data,
  output logic             batch_done,
  output logic [CNT_W-1:0] done_count,
  output maddr_t           done_txn_base,
  output maddr_t           done_res_base,
  output logic             stat_retry,
  output logic             stat_closed_full,
  output logic             stat_closed_early,
  output logic             stat_admit,
  output logic             stat_kernel_running,
  output logic [NUM_CU-1:0] stat_cu_active
);
  // lock manager <-> scheduler
  logic lm_idle, lm_start, adm_valid, adm_ready, lm_closed, lm_full;
  txn_t adm_txn;
  logic [CNT_W-1:0] lm_count;

  batch_lock_manager #(.NUM_KEYS(NUM_KEYS), .BATCH_SIZE(BATCH_SIZE),
                       .QUEUE_DEPTH(QUEUE_DEPTH), .BMP_W(BMP_W)) u_lock (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_txn, .drain,
    .batch_start (lm_start),
    .idle        (lm_idle),
    .out_valid   (adm_valid),
    .out_ready   (adm_ready),
    .out_txn     (adm_txn),
    .batch_closed(lm_closed),
    .batch_count (lm_count),
    .batch_full  (lm_full),
    .retry       (stat_retry)
  );
  assign stat_closed_full  = lm_closed && lm_full;
  assign stat_closed_early = lm_closed && !lm_full;
  assign stat_admit        = adm_valid && adm_ready;

  // scheduler <-> kernel, memory requesters
  localparam int unsigned NREQ = NUM_CU + 1;
  logic [NREQ-1:0] s_req_valid, s_req_ready, s_rsp_valid;
  mem_req_t        s_req [NREQ];
  field_t          s_rsp_data;

  logic             k_start, k_done, done_slot;
  logic [CNT_W-1:0] k_count;
  maddr_t           k_txn_base, k_res_base;

  batch_scheduler #(.BATCH_SIZE(BATCH_SIZE), .TXN_BASE(TXN_BASE), .RES_BASE(RES_BASE)) u_sched (
    .clk, .rst_n,
    .lm_idle, .lm_start, .adm_valid, .adm_ready, .adm_txn, .lm_closed, .lm_count,
    .req_valid (s_req_valid[0]),
    .req_ready (s_req_ready[0]),
    .req       (s_req[0]),
    .k_start, .k_count, .k_txn_base, .k_res_base, .k_done,
    .batch_done, .done_slot, .done_count, .done_txn_base, .done_res_base
  );

  mem_req_t k_req [NUM_CU];
  for (genvar c = 0; c < NUM_CU; c++) begin : g_req
    assign s_req[c+1] = k_req[c];
  end

  det_kernel #(.NUM_CU(NUM_CU), .BATCH_SIZE(BATCH_SIZE), .WG_SIZE(WG_SIZE),
               .TQ_DEPTH(CU_DEPTH), .RQ_DEPTH(CU_DEPTH)) u_kernel (
    .clk, .rst_n,
    .start      (k_start),
    .count      (k_count),
    .txn_base   (k_txn_base),
    .res_base   (k_res_base),
    .table_base (TABLE_BASE),
    .running    (stat_kernel_running),
    .done       (k_done),
    .req_valid  (s_req_valid[NREQ-1:1]),
    .req_ready  (s_req_ready[NREQ-1:1]),
    .req        (k_req),
    .rsp_valid  (s_rsp_valid[NREQ-1:1]),
    .rsp_data   (s_rsp_data)
  );

  assign stat_cu_active = s_req_valid[NREQ-1:1] & s_req_ready[NREQ-1:1];

  mem_arbiter #(.N(NREQ), .RT_DEPTH(NUM_CU * (3 * CU_DEPTH))) u_arb (
    .clk, .rst_n,
    .s_req_valid, .s_req_ready, .s_req, .s_rsp_valid, .s_rsp_data,
    .m_req_valid (mem_req_valid),
    .m_req_ready (mem_req_ready),
    .m_req       (mem_req),
    .m_rsp_valid (mem_rsp_valid),
    .m_rsp_data  (mem_rsp_data)
  );
endmodule
