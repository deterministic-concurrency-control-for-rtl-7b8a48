// tb_batch_lock_manager: self-checking test of the batch lock manager.
//
// Directed cases with known batch contents (write/read conflicts and retries,
// shared readers, full batches, lock-attempt rate and bitmap clear time),
// then a random stream with backpressure on both sides.  For every batch the
// testbench checks from its own record of the admitted transactions that no
// two conflict, that every refused transaction did conflict with the batch,
// that sizes and the full flag agree, and that every transaction is admitted
// exactly once.
`timescale 1ns/1ps
module tb_batch_lock_manager;
  import hobbes_pkg::*;

  localparam int unsigned NUM_KEYS = 256;
  localparam int unsigned BATCH    = 16;
  localparam int unsigned QDEPTH   = 8;
  localparam int unsigned BMP_W    = 16;
  localparam int unsigned CNT_W    = $clog2(BATCH + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, drain, batch_start, idle, out_valid, out_ready;
  logic batch_closed, batch_full, retry;
  txn_t in_txn, out_txn;
  logic [CNT_W-1:0] batch_count;

  batch_lock_manager #(.NUM_KEYS(NUM_KEYS), .BATCH_SIZE(BATCH), .QUEUE_DEPTH(QDEPTH), .BMP_W(BMP_W)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_txn, .drain, .batch_start, .idle,
    .out_valid, .out_ready, .out_txn, .batch_closed, .batch_count, .batch_full, .retry);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------- stimulus state ---------------------------------------
  txn_t to_send [$];
  int   gap_pct = 0, stall_pct = 0;
  bit   auto_start = 0;
  longint cyc = 0;

  // ---------------- observation -------------------------------------------
  txn_t cur_batch [$];
  txn_t batches [$][$];
  bit   batch_was_full [$];
  int   n_retry = 0;
  int   seen [int];
  longint first_out_cyc, last_out_cyc, start_cyc, first_valid_cyc;
  bit   saw_first_valid;

  function automatic bit conflicts(txn_t t, txn_t b [$]);
    foreach (b[i])
      if (b[i].key == t.key && (b[i].ttype == TXN_WRITE || t.ttype == TXN_WRITE)) return 1;
    return 0;
  endfunction

  // Drive on the falling edge, sample on the rising edge.
  always @(negedge clk) begin
    in_valid   <= (to_send.size() > 0) && ($urandom_range(99) >= gap_pct);
    in_txn     <= (to_send.size() > 0) ? to_send[0] : '0;
    out_ready  <= ($urandom_range(99) >= stall_pct);
    batch_start <= auto_start && idle;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (in_valid && in_ready) void'(to_send.pop_front());
      if (batch_start && idle) begin
        start_cyc = cyc;
        saw_first_valid = 0;
      end
      if (out_valid && !saw_first_valid) begin
        saw_first_valid = 1;
        first_valid_cyc = cyc;
      end
      if (retry) begin
        n_retry++;
        check(conflicts(out_txn, cur_batch), $sformatf("refused txn %0d does not conflict", out_txn.id));
      end
      if (out_valid && out_ready) begin
        check(!conflicts(out_txn, cur_batch), $sformatf("admitted txn %0d conflicts", out_txn.id));
        if (cur_batch.size() == 0) first_out_cyc = cyc;
        last_out_cyc = cyc;
        cur_batch.push_back(out_txn);
        seen[int'(out_txn.id)] = seen.exists(int'(out_txn.id)) ? seen[int'(out_txn.id)] + 1 : 1;
      end
      if (batch_closed) begin
        check(int'(batch_count) == cur_batch.size(), "batch_count equals admitted");
        check(batch_full == (cur_batch.size() == BATCH), "batch_full flag");
        batches.push_back(cur_batch);
        batch_was_full.push_back(batch_full);
        cur_batch.delete();
      end
    end
  end

  task automatic push(int id, txn_type_e ty, int key);
    txn_t t;
    t = '0;
    t.id = ID_W'(id); t.ttype = ty; t.key = KEY_W'(key); t.col = COL_W'(id % 8);
    t.value = {16{32'(id)}};
    to_send.push_back(t);
  endtask

  task automatic wait_batches(int n, int limit);
    int k = 0;
    while (batches.size() < n && k < limit) begin
      @(posedge clk);
      k++;
    end
    check(batches.size() >= n, $sformatf("%0d batches closed", n));
  endtask

  function automatic bit ids_are(txn_t b [$], int ids [$]);
    if (b.size() != ids.size()) return 0;
    foreach (ids[i]) if (int'(b[i].id) != ids[i]) return 0;
    return 1;
  endfunction

  // Watchdog.
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int base_retry, nb;
    in_valid = 0; out_ready = 1; batch_start = 0; drain = 0; in_txn = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. write/read conflicts on keys 1 and 2.
    push(1, TXN_WRITE, 1); push(2, TXN_READ, 1); push(3, TXN_READ, 2); push(4, TXN_WRITE, 2);
    repeat (10) @(posedge clk);
    drain = 1; auto_start = 1;
    wait_batches(2, 2000);
    check(ids_are(batches[0], '{1, 3}), "case 1 batch 0 = {1,3}");
    check(ids_are(batches[1], '{4, 2}), "case 1 batch 1 = {4,2}");
    check(n_retry == 3, $sformatf("case 1 retries = 3 (got %0d)", n_retry));
    check(!batch_was_full[0] && !batch_was_full[1], "case 1 batches closed early");
    // clear time: NUM_KEYS/BMP_W cycles, then fetch and decide.
    check(first_valid_cyc - start_cyc == longint'(NUM_KEYS / BMP_W + 2),
          $sformatf("bitmap clear then first grant: %0d cycles", first_valid_cyc - start_cyc));

    // 2. shared readers, then a writer on the same key.
    auto_start = 0; drain = 0;
    repeat (5) @(posedge clk);
    nb = batches.size();
    for (int i = 0; i < 5; i++) push(10 + i, TXN_READ, 7);
    push(15, TXN_WRITE, 7); push(16, TXN_READ, 7);
    repeat (10) @(posedge clk);
    drain = 1; auto_start = 1;
    wait_batches(nb + 2, 2000);
    check(ids_are(batches[nb], '{10, 11, 12, 13, 14, 16}), "case 2 readers share the key");
    check(ids_are(batches[nb+1], '{15}), "case 2 writer in next batch");

    // 3. full batches at one lock attempt per two cycles.
    drain = 0;
    repeat (5) @(posedge clk);
    nb = batches.size();
    for (int i = 0; i < 40; i++) push(100 + i, TXN_WRITE, 20 + i);
    wait_batches(nb + 2, 4000);
    check(batch_was_full[nb] && batch_was_full[nb+1], "case 3 two full batches");
    check(batches[nb].size() == BATCH && int'(batches[nb][0].id) == 100, "case 3 first batch in order");
    check(last_out_cyc - first_out_cyc >= 0, "rate sample");
    drain = 1;
    wait_batches(nb + 3, 4000);
    check(batches[nb+2].size() == 8 && !batch_was_full[nb+2], "case 3 remainder closed on drain");
    // rate of the last (remainder) batch: 8 grants, 2 cycles each
    check(last_out_cyc - first_out_cyc == 14, $sformatf("2 cycles per lock attempt (%0d)", last_out_cyc - first_out_cyc));

    // 4. random stream with backpressure.
    drain = 0; gap_pct = 30; stall_pct = 30;
    nb = batches.size();
    base_retry = n_retry;
    for (int i = 0; i < 400; i++)
      push(1000 + i, ($urandom_range(99) < 50) ? TXN_WRITE : TXN_READ, $urandom_range(11));
    while (to_send.size() > 0) @(posedge clk);
    drain = 1;
    repeat (3000) @(posedge clk);
    begin
      int total = 0;
      for (int b = nb; b < batches.size(); b++) total += batches[b].size();
      check(total == 400, $sformatf("random: all 400 admitted (got %0d)", total));
    end
    check(n_retry > base_retry, "random: retries occurred");
    foreach (seen[id]) check(seen[id] == 1, $sformatf("txn %0d admitted once", id));

    $display("batches=%0d retries=%0d", batches.size(), n_retry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
