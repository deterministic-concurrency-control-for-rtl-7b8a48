// hobbes_env: YCSB workload source, global memory model and end-to-end
// checker for the batch transaction processor (simulation only).
//
// Workload: N_TXN single-field transactions; a write with probability
// WRITE_PCT %, otherwise a read; the record key follows the YCSB scrambled
// Zipfian distribution with skew THETA over NUM_KEYS records (Gray et al.'s
// generator, the rank hashed with 64-bit FNV-1a and reduced modulo NUM_KEYS);
// field and value are uniform.  Transactions are offered in id order with
// random gaps, then `drain` is raised.
//
// Checking, for every reported batch: the transaction objects in the batch's
// buffer are generated transactions, each admitted exactly once; no two in
// the batch conflict; every result object matches a serial reference model
// of the table (reads see the table as left by the previous batches, writes
// return zero); the table is updated.  At the end every transaction must have
// been executed and the table must equal the model.  The mechanisms of the
// design are counted (lock retries, full and early batch closes, locking
// overlapped with execution, memory backpressure, work on every compute
// unit); one that never happened counts as a failure.
module hobbes_env
  import hobbes_pkg::*;
#(
  parameter int unsigned NUM_KEYS   = 1024,
  parameter int unsigned BATCH_SIZE = 64,
  parameter int unsigned NUM_CU     = 2,
  parameter int unsigned N_TXN      = 500,
  parameter int unsigned WRITE_PCT  = 50,
  parameter real         THETA      = 0.5,
  parameter int unsigned GAP_PCT    = 10,
  parameter int unsigned LAT        = 8,
  parameter int unsigned STALL_PCT  = 10,
  parameter maddr_t      TABLE_BASE = maddr_t'(0),
  parameter string       NAME       = "run",
  parameter bit          REQUIRE_ALL = 1'b1,   // every mechanism must occur
  localparam int unsigned CNT_W     = $clog2(BATCH_SIZE + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              in_valid,
  input  logic              in_ready,
  output txn_t              in_txn,
  output logic              drain,
  input  logic              mem_req_valid,
  output logic              mem_req_ready,
  input  mem_req_t          mem_req,
  output logic              mem_rsp_valid,
  output field_t            mem_rsp_data,
  input  logic              batch_done,
  input  logic [CNT_W-1:0]  done_count,
  input  maddr_t            done_txn_base,
  input  maddr_t            done_res_base,
  input  logic              stat_retry,
  input  logic              stat_closed_full,
  input  logic              stat_closed_early,
  input  logic              kernel_running,
  input  logic              admit,
  input  logic [NUM_CU-1:0] cu_fire,
  output logic              finished,
  output int                checks,
  output int                failures
);
  ddr_model #(.LAT(LAT), .STALL_PCT(STALL_PCT)) u_mem (.clk, .rst_n,
    .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req(mem_req),
    .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL[%s]: %s", NAME, what);
    end
  endtask

  // ---------------- workload generation ----------------------------------
  txn_t gen [];
  bit   seen [];
  field_t ref_tab [maddr_t];

  function automatic longint unsigned fnv64(longint unsigned v);
    longint unsigned h;
    h = 64'hCBF2_9CE4_8422_2325;
    for (int i = 0; i < 8; i++) begin
      h = h ^ (v & 64'hFF);
      h = h * 64'h0000_0100_0000_01B3;
      v = v >> 8;
    end
    return h;
  endfunction

  real zetan, zeta2, alpha, eta;
  function automatic longint unsigned zipf_rank();
    real u, uz;
    u  = real'($urandom()) / 4294967296.0;
    uz = u * zetan;
    if (uz < 1.0) return 0;
    if (uz < 1.0 + (0.5 ** THETA)) return 1;
    return longint'(real'(NUM_KEYS) * ((eta * u - eta + 1.0) ** alpha)) % NUM_KEYS;
  endfunction

  initial begin
    zetan = 0.0;
    for (int i = 1; i <= int'(NUM_KEYS); i++) zetan += 1.0 / (real'(i) ** THETA);
    zeta2 = 1.0 + 1.0 / (2.0 ** THETA);
    alpha = 1.0 / (1.0 - THETA);
    eta   = (1.0 - ((2.0 / real'(NUM_KEYS)) ** (1.0 - THETA))) / (1.0 - zeta2 / zetan);
    gen  = new[N_TXN];
    seen = new[N_TXN];
    for (int i = 0; i < int'(N_TXN); i++) begin
      gen[i].id    = ID_W'(i);
      gen[i].ttype = ($urandom_range(99) < WRITE_PCT) ? TXN_WRITE : TXN_READ;
      gen[i].key   = KEY_W'(fnv64(zipf_rank()) % NUM_KEYS);
      gen[i].col   = COL_W'($urandom_range(7));
      gen[i].value = {16{$urandom()}};
      seen[i] = 0;
    end
  end

  // ---------------- input driver ----------------------------------------
  int next_in = 0;
  longint cyc = 0, first_cyc = -1, last_done_cyc = 0;
  always @(negedge clk) begin
    in_valid <= rst_n && next_in < int'(N_TXN) && ($urandom_range(99) >= GAP_PCT);
    in_txn   <= (next_in < int'(N_TXN)) ? gen[next_in] : '0;
    drain    <= (next_in >= int'(N_TXN));
  end

  // ---------------- mechanisms ------------------------------------------
  int n_retry = 0, n_full = 0, n_early = 0, n_overlap = 0, n_batches = 0, n_exec = 0;
  int n_cu [NUM_CU];
  int worst_batch = 0;

  function automatic field_t ref_at(maddr_t a);
    return ref_tab.exists(a) ? ref_tab[a] : u_mem.init_word(a);
  endfunction

  task automatic check_batch(int n, maddr_t tb_, maddr_t rb);
    bit wr_key [int], rd_key [int];
    txn_t bt [];
    bt = new[n];
    for (int i = 0; i < n; i++) begin
      field_t h, rh, rv;
      txn_t t;
      int id;
      maddr_t a;
      h = u_mem.peek(tb_ + maddr_t'(2 * i));
      t = unpack_txn(h, u_mem.peek(tb_ + maddr_t'(2 * i + 1)));
      id = int'(t.id);
      bt[i] = t;
      check(id < int'(N_TXN) && t == gen[id], $sformatf("batch %0d object %0d is transaction %0d", n_batches, i, id));
      if (id < int'(N_TXN)) begin
        check(!seen[id], $sformatf("transaction %0d executed once", id));
        seen[id] = 1;
      end
      // conflicts within the batch
      check(!wr_key.exists(int'(t.key)) && !(t.ttype == TXN_WRITE && rd_key.exists(int'(t.key))),
            $sformatf("batch %0d: transaction %0d conflicts", n_batches, id));
      if (t.ttype == TXN_WRITE) wr_key[int'(t.key)] = 1; else rd_key[int'(t.key)] = 1;
      // result object
      rh = u_mem.peek(rb + maddr_t'(2 * i));
      rv = u_mem.peek(rb + maddr_t'(2 * i + 1));
      a  = TABLE_BASE + maddr_t'(t.key) * 8 + maddr_t'(t.col);
      check(rh[ID_W:1] == t.id && rh[0], $sformatf("result header of %0d", id));
      check(rv == ((t.ttype == TXN_READ) ? ref_at(a) : '0), $sformatf("result value of %0d", id));
    end
    for (int i = 0; i < n; i++)
      if (bt[i].ttype == TXN_WRITE)
        ref_tab[TABLE_BASE + maddr_t'(bt[i].key) * 8 + maddr_t'(bt[i].col)] = bt[i].value;
    n_exec += n;
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (in_valid && in_ready) begin
        if (first_cyc < 0) first_cyc = cyc;
        next_in <= next_in + 1;
      end
      if (stat_retry) n_retry++;
      if (stat_closed_full) n_full++;
      if (stat_closed_early) n_early++;
      if (admit && kernel_running) n_overlap++;
      for (int c = 0; c < NUM_CU; c++) if (cu_fire[c]) n_cu[c]++;
      if (batch_done) begin
        check(int'(done_count) <= int'(BATCH_SIZE) && done_count != '0, "batch size in range");
        if (int'(done_count) > worst_batch) worst_batch = int'(done_count);
        check_batch(int'(done_count), done_txn_base, done_res_base);
        n_batches++;
        last_done_cyc = cyc;
      end
    end
  end

  initial begin
    finished = 0; checks = 0; failures = 0;
    foreach (n_cu[c]) n_cu[c] = 0;
    wait (rst_n);
    wait (n_exec >= int'(N_TXN));
    repeat (5) @(posedge clk);
    begin
      int missing;
      missing = 0;
      foreach (seen[i]) if (!seen[i]) missing++;
      check(missing == 0, $sformatf("%0d transactions never executed", missing));
    end
    foreach (ref_tab[a]) check(u_mem.peek(a) == ref_tab[a], $sformatf("table word %0h", a));
    if (REQUIRE_ALL) begin
      check(n_retry > 0,   "mechanism: lock refused and retried");
      check(n_full > 0,    "mechanism: batch closed full");
      check(n_early > 0,   "mechanism: batch closed early");
      check(n_overlap > 0, "mechanism: locking overlapped kernel execution");
      check(STALL_PCT == 0 || u_mem.n_stall > 0, "mechanism: memory backpressure");
      for (int c = 0; c < NUM_CU; c++) check(n_cu[c] > 0, $sformatf("mechanism: compute unit %0d worked", c));
    end
    $display("[%s] keys=%0d batch=%0d cu=%0d txns=%0d writes=%0d%% theta=%0.2f: batches=%0d (full %0d, early %0d) retries=%0d (%0.3f per txn) overlap=%0d cycles=%0d (%0.2f per txn) mem reads=%0d writes=%0d stalls=%0d",
             NAME, NUM_KEYS, BATCH_SIZE, NUM_CU, N_TXN, WRITE_PCT, THETA, n_batches, n_full, n_early,
             n_retry, real'(n_retry) / real'(N_TXN), n_overlap, last_done_cyc - first_cyc,
             real'(last_done_cyc - first_cyc) / real'(N_TXN), u_mem.n_reads, u_mem.n_writes, u_mem.n_stall);
    finished = 1;
  end
endmodule
