// batch_lock_manager: deterministic read/write locking of one batch at a time.
//
// Transactions enter a queue in arrival order.  The manager takes the head of
// the queue and tries to lock its record key for the current batch:
//   - a write succeeds if no admitted transaction of this batch reads or
//     writes the key, and then marks the key in the writers set;
//   - a read succeeds if no admitted transaction of this batch writes the
//     key, and then marks the key in the readers set.
// An admitted transaction leaves on the out_* stream; one that conflicts is
// pushed to the back of the same queue and tried again later.  Because every
// batch executes in isolation, the lock state is just two bitmaps with one bit
// per record (readers, writers), and releasing all locks is a clear of both
// bitmaps at the start of the next batch.  This is the published batch
// locking algorithm; here it is hardware rather than host software.
//
// Own choices (the published algorithm runs over a complete, pre-generated
// list of transactions and fills the batch until it is full):
//   - a batch also closes early when every transaction in the queue has been
//     tried and refused since the last admission or arrival, and either
//     `drain` is high (no more input is coming) or the queue is full (nothing
//     else can get in); otherwise the queue would spin forever;
//   - bitmaps are BMP_W-bit words of a RAM, cleared one word per cycle
//     (NUM_KEYS/BMP_W cycles per batch);
//   - keys are reduced to their low log2(NUM_KEYS) bits.
//
// Interface and timing:
//   in_valid/in_ready/in_txn   transactions from the application, in order.
//   batch_start                pulse while `idle`: clear the bitmaps, open a
//                              new batch.
//   out_valid/out_ready/out_txn admitted transactions, in admission order.
//   batch_closed, batch_count,  one-cycle pulse when the batch is closed, with
//   batch_full                 the number admitted and whether it is full.
//   retry                      one-cycle pulse for each refused transaction.
// A lock attempt takes two cycles (bitmap read, then decide and update).
module batch_lock_manager
  import hobbes_pkg::*;
#(
  parameter int unsigned NUM_KEYS    = 1 << 20,
  parameter int unsigned BATCH_SIZE  = 131072,
  parameter int unsigned QUEUE_DEPTH = 8192,
  parameter int unsigned BMP_W       = 64,
  localparam int unsigned CNT_W      = $clog2(BATCH_SIZE + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  txn_t             in_txn,
  input  logic             drain,
  input  logic             batch_start,
  output logic             idle,
  output logic             out_valid,
  input  logic             out_ready,
  output txn_t             out_txn,
  output logic             batch_closed,
  output logic [CNT_W-1:0] batch_count,
  output logic             batch_full,
  output logic             retry
);
  localparam int unsigned WORDS = NUM_KEYS / BMP_W;
  localparam int unsigned WA_W  = (WORDS > 1) ? $clog2(WORDS) : 1;
  localparam int unsigned BI_W  = (BMP_W > 1) ? $clog2(BMP_W) : 1;
  localparam int unsigned QC_W  = $clog2(QUEUE_DEPTH + 1);

  typedef enum logic [1:0] {S_WAIT, S_CLEAR, S_FETCH, S_DECIDE} state_e;
  state_e state;

  // Lock bitmaps: one bit per record.
  logic [BMP_W-1:0] readers [WORDS];
  logic [BMP_W-1:0] writers [WORDS];
  logic [BMP_W-1:0] rd_word, wr_word;   // registered bitmap reads

  // Transaction queue (arrivals and retries share it).
  logic       q_wr, q_rd, q_full, q_empty;
  txn_t       q_wdata, q_head;
  logic [QC_W-1:0] q_count;

  sync_fifo #(.T(txn_t), .DEPTH(QUEUE_DEPTH)) u_queue (
    .clk, .rst_n,
    .wr_en(q_wr), .wr_data(q_wdata),
    .rd_en(q_rd), .rd_data(q_head),
    .full(q_full), .empty(q_empty), .count(q_count)
  );

  txn_t            cur;          // transaction being locked
  logic [WA_W-1:0] clr_addr;
  logic [CNT_W-1:0] admitted;
  logic [QC_W:0]   streak;       // refusals since last admission or arrival

  function automatic logic [WA_W-1:0] word_of(logic [KEY_W-1:0] k);
    return WA_W'(k[$clog2(NUM_KEYS)-1:0] >> BI_W);
  endfunction
  function automatic logic [BI_W-1:0] bit_of(logic [KEY_W-1:0] k);
    return k[BI_W-1:0];
  endfunction

  // Lock decision for the held transaction.
  logic key_read, key_written, grant;
  assign key_read    = rd_word[bit_of(cur.key)];
  assign key_written = wr_word[bit_of(cur.key)];
  assign grant = (cur.ttype == TXN_WRITE) ? !(key_read || key_written) : !key_written;

  // Queue write port: a retry has priority; a slot is kept free for the
  // transaction being locked so that its retry always fits.
  logic holding, push_retry;
  assign holding    = (state == S_DECIDE);
  assign push_retry = (state == S_DECIDE) && !grant;
  assign in_ready   = !push_retry && ((q_count + QC_W'(holding)) < QC_W'(QUEUE_DEPTH));
  assign q_wr       = push_retry || (in_valid && in_ready);
  assign q_wdata    = push_retry ? cur : in_txn;

  // Batch close conditions, checked before each fetch.
  logic is_full, stuck, close_now;
  assign is_full   = (admitted == CNT_W'(BATCH_SIZE));
  assign stuck     = (admitted != '0) &&
                     ((q_empty && drain) ||
                      (!q_empty && (streak >= (QC_W+1)'(q_count)) && (drain || q_full)));
  assign close_now = (state == S_FETCH) && (is_full || stuck);
  assign q_rd      = (state == S_FETCH) && !close_now && !q_empty;

  assign idle      = (state == S_WAIT);
  assign out_valid = (state == S_DECIDE) && grant;
  assign out_txn   = cur;
  assign retry     = push_retry;
  assign batch_closed = close_now;
  assign batch_count  = admitted;
  assign batch_full   = is_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_WAIT;
      clr_addr <= '0;
      admitted <= '0;
      streak   <= '0;
      cur      <= '0;
    end else begin
      if (in_valid && in_ready) streak <= '0;
      unique case (state)
        S_WAIT: if (batch_start) begin
          state    <= S_CLEAR;
          clr_addr <= '0;
          admitted <= '0;
          streak   <= '0;
        end
        S_CLEAR: begin
          clr_addr <= clr_addr + 1'b1;
          if (clr_addr == WA_W'(WORDS - 1)) state <= S_FETCH;
        end
        S_FETCH: begin
          if (close_now) state <= S_WAIT;
          else if (!q_empty) begin
            cur   <= q_head;
            state <= S_DECIDE;
          end
        end
        S_DECIDE: begin
          if (!grant) begin
            state <= S_FETCH;
            if (!(in_valid && in_ready)) streak <= streak + 1'b1;
          end else if (out_ready) begin
            state    <= S_FETCH;
            admitted <= admitted + 1'b1;
            streak   <= '0;
          end
        end
        default: state <= S_WAIT;
      endcase
    end
  end

  // Bitmap RAMs: clear sweep, registered read at fetch, set on admission.
  always_ff @(posedge clk) begin
    if (state == S_CLEAR) begin
      readers[clr_addr] <= '0;
      writers[clr_addr] <= '0;
    end else if (state == S_DECIDE && grant && out_ready) begin
      if (cur.ttype == TXN_WRITE) writers[word_of(cur.key)] <= wr_word | (BMP_W'(1) << bit_of(cur.key));
      else                        readers[word_of(cur.key)] <= rd_word | (BMP_W'(1) << bit_of(cur.key));
    end
    if (q_rd) begin
      rd_word <= readers[word_of(q_head.key)];
      wr_word <= writers[word_of(q_head.key)];
    end
  end

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && out_txn == $past(out_txn));
endmodule
