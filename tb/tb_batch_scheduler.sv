// tb_batch_scheduler: self-checking test of the batch scheduler.
//
// A model lock manager produces batches of known transactions (sizes 5, 9, 1,
// 7, 9, 3) and a model kernel runs each launch for a long, random time.  The
// testbench checks that every transaction object is in the memory model at
// the slot's buffer when its batch is launched, that launches happen in batch
// order with the right sizes and alternate between the two slots, that each
// batch_done report matches, and that the next batch is locked while the
// kernel is still running the previous one.
`timescale 1ns/1ps
module tb_batch_scheduler;
  import hobbes_pkg::*;

  localparam int unsigned BATCH = 16;
  localparam int unsigned CNT_W = $clog2(BATCH + 1);
  localparam maddr_t TXN_BASE = maddr_t'(26'h000_2000);
  localparam maddr_t RES_BASE = maddr_t'(26'h000_4000);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic lm_idle, lm_start, adm_valid, adm_ready, lm_closed;
  txn_t adm_txn;
  logic [CNT_W-1:0] lm_count, k_count, done_count;
  logic req_valid, req_ready, rsp_valid;
  mem_req_t req;
  field_t rsp_data;
  logic k_start, k_done, batch_done, done_slot;
  maddr_t k_txn_base, k_res_base, done_txn_base, done_res_base;

  batch_scheduler #(.BATCH_SIZE(BATCH), .TXN_BASE(TXN_BASE), .RES_BASE(RES_BASE)) dut (
    .clk, .rst_n, .lm_idle, .lm_start, .adm_valid, .adm_ready, .adm_txn, .lm_closed, .lm_count,
    .req_valid, .req_ready, .req, .k_start, .k_count, .k_txn_base, .k_res_base, .k_done,
    .batch_done, .done_slot, .done_count, .done_txn_base, .done_res_base);

  ddr_model #(.LAT(4), .STALL_PCT(30)) u_mem (.clk, .rst_n, .req_valid, .req_ready, .req,
    .rsp_valid, .rsp_data);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sizes [6] = '{5, 9, 1, 7, 9, 3};
  txn_t batches [6][$];

  // ---------------- model lock manager -------------------------------------
  int lm_b = 0, lm_i = 0;
  typedef enum {LM_IDLE, LM_SEND, LM_CLOSE} lm_st_e;
  lm_st_e lm_st = LM_IDLE;
  assign lm_idle   = (lm_st == LM_IDLE) && lm_b < 6;
  assign adm_valid = (lm_st == LM_SEND);
  // the object on offer, set up between clock edges
  always @(negedge clk) adm_txn <= (lm_st == LM_SEND) ? batches[lm_b][lm_i] : '0;
  assign lm_closed = (lm_st == LM_CLOSE);
  assign lm_count  = CNT_W'(lm_i);
  int overlap = 0;
  bit k_busy = 0;
  always @(posedge clk) if (rst_n) begin
    case (lm_st)
      LM_IDLE:  if (lm_start) begin
        lm_st <= LM_SEND; lm_i <= 0;
      end
      LM_SEND:  if (adm_ready) begin
        if (k_busy) overlap++;   // object written while the kernel runs
        if (lm_i + 1 == sizes[lm_b]) lm_st <= LM_CLOSE;
        lm_i <= lm_i + 1;
      end
      LM_CLOSE: begin lm_st <= LM_IDLE; lm_b <= lm_b + 1; end
    endcase
  end

  // ---------------- model kernel ---------------------------------------
  int k_b = 0, k_left = 0, n_done = 0;
  maddr_t last_txn_base;
  assign k_done = k_busy && k_left == 0;
  always @(posedge clk) if (rst_n) begin
    if (k_start) begin
      check(!k_busy, "no launch while running");
      check(k_b < 6 && int'(k_count) == sizes[k_b], $sformatf("launch %0d size %0d", k_b, k_count));
      check(k_txn_base == TXN_BASE + ((k_b % 2 == 1) ? maddr_t'(2 * BATCH) : '0), $sformatf("launch %0d slot", k_b));
      check(k_res_base == RES_BASE + ((k_b % 2 == 1) ? maddr_t'(2 * BATCH) : '0), $sformatf("launch %0d result slot", k_b));
      for (int i = 0; i < sizes[k_b]; i++) begin
        txn_t t;
        t = batches[k_b][i];
        check(u_mem.peek(k_txn_base + maddr_t'(2 * i)) == field_t'({t.id, t.ttype, t.key, t.col}),
              $sformatf("batch %0d object %0d header", k_b, i));
        check(u_mem.peek(k_txn_base + maddr_t'(2 * i + 1)) == t.value,
              $sformatf("batch %0d object %0d value", k_b, i));
      end
      k_busy <= 1; k_left <= 20 + $urandom_range(40);
    end else if (k_busy) begin
      if (k_left == 0) k_busy <= 0;
      else k_left <= k_left - 1;
    end
    if (batch_done) begin
      check(k_done, "batch_done follows kernel done");
      check(int'(done_count) == sizes[k_b] && done_slot == k_b[0], $sformatf("report of batch %0d", k_b));
      check(done_txn_base == last_txn_base, "report buffer");
      n_done++;
      k_b <= k_b + 1;
    end
    if (k_start) last_txn_base <= k_txn_base;
  end

  initial begin
    for (int b = 0; b < 6; b++)
      for (int i = 0; i < sizes[b]; i++) begin
        txn_t t;
        t.id = ID_W'(b * 100 + i); t.ttype = txn_type_e'(i % 2); t.key = KEY_W'($urandom_range(1000));
        t.col = COL_W'(i % 8); t.value = {16{$urandom()}};
        batches[b].push_back(t);
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (n_done < 6) @(posedge clk);
    repeat (5) @(posedge clk);
    check(n_done == 6, "six batches done");
    check(overlap >= 10, $sformatf("%0d objects written while the kernel ran", overlap));
    $display("overlaps=%0d", overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
