// tb_det_kernel: self-checking test of the deterministic kernel.
//
// Three compute units share the memory model (with random backpressure)
// through the arbiter.  Two launches run back to back on different buffers;
// each batch is conflict free, and the second one reads records the first one
// wrote.  The testbench keeps its own copy of the table, computes every
// expected result object from it and checks results and table contents after
// each launch, that `done` pulses once per launch, and that every compute unit
// did part of the work.
`timescale 1ns/1ps
module tb_det_kernel;
  import hobbes_pkg::*;

  localparam int unsigned NUM_CU = 3;
  localparam int unsigned BATCH  = 128;
  localparam int unsigned WG     = 8;
  localparam int unsigned CNT_W  = $clog2(BATCH + 1);
  localparam maddr_t TABLE_BASE  = maddr_t'(0);
  localparam maddr_t TXN_BASE0   = maddr_t'(26'h010_0000);
  localparam maddr_t RES_BASE0   = maddr_t'(26'h020_0000);
  localparam maddr_t TXN_BASE1   = maddr_t'(26'h030_0000);
  localparam maddr_t RES_BASE1   = maddr_t'(26'h040_0000);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, running, done;
  logic [CNT_W-1:0] count;
  maddr_t txn_base, res_base;
  logic [NUM_CU-1:0] req_valid, req_ready, rsp_valid;
  mem_req_t req [NUM_CU];
  field_t rsp_data;
  logic m_req_valid, m_req_ready, m_rsp_valid;
  mem_req_t m_req;
  field_t m_rsp_data;

  det_kernel #(.NUM_CU(NUM_CU), .BATCH_SIZE(BATCH), .WG_SIZE(WG)) dut (
    .clk, .rst_n, .start, .count, .txn_base, .res_base, .table_base(TABLE_BASE),
    .running, .done, .req_valid, .req_ready, .req, .rsp_valid, .rsp_data);

  mem_arbiter #(.N(NUM_CU), .RT_DEPTH(64)) u_arb (.clk, .rst_n,
    .s_req_valid(req_valid), .s_req_ready(req_ready), .s_req(req), .s_rsp_valid(rsp_valid),
    .s_rsp_data(rsp_data), .m_req_valid, .m_req_ready, .m_req, .m_rsp_valid, .m_rsp_data);

  ddr_model #(.LAT(10), .STALL_PCT(25)) u_mem (.clk, .rst_n, .req_valid(m_req_valid),
    .req_ready(m_req_ready), .req(m_req), .rsp_valid(m_rsp_valid), .rsp_data(m_rsp_data));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_done = 0;
  int cu_ops [NUM_CU];
  always @(posedge clk) if (rst_n) begin
    if (done) n_done++;
    for (int c = 0; c < NUM_CU; c++) if (req_valid[c] && req_ready[c]) cu_ops[c]++;
  end

  field_t shadow [maddr_t];
  function automatic field_t tab(maddr_t a);
    return shadow.exists(a) ? shadow[a] : u_mem.init_word(a);
  endfunction

  // Build a conflict-free batch: key k of item i is base_key + i; even items
  // read, odd ones write (random type when rnd is set).
  task automatic launch(maddr_t tb_, maddr_t rb, int n, int base_key, bit rnd);
    txn_t t [];
    field_t exp_v [];
    int d0;
    t = new[n];
    exp_v = new[n];
    for (int i = 0; i < n; i++) begin
      t[i].id    = ID_W'(base_key * 1000 + i);
      t[i].ttype = rnd ? (($urandom_range(1) == 1) ? TXN_WRITE : TXN_READ) : ((i % 2 == 1) ? TXN_WRITE : TXN_READ);
      t[i].key   = KEY_W'(base_key + i);
      t[i].col   = COL_W'(i % 8);
      t[i].value = {16{$urandom()}};
      u_mem.poke(tb_ + maddr_t'(2 * i),     field_t'({t[i].id, t[i].ttype, t[i].key, t[i].col}));
      u_mem.poke(tb_ + maddr_t'(2 * i + 1), t[i].value);
    end
    // expected results from the pre-batch table, then apply the writes
    for (int i = 0; i < n; i++) begin
      maddr_t a = TABLE_BASE + maddr_t'(t[i].key) * 8 + maddr_t'(t[i].col);
      exp_v[i] = (t[i].ttype == TXN_READ) ? tab(a) : '0;
    end
    for (int i = 0; i < n; i++)
      if (t[i].ttype == TXN_WRITE) shadow[TABLE_BASE + maddr_t'(t[i].key) * 8 + maddr_t'(t[i].col)] = t[i].value;
    d0 = n_done;
    @(negedge clk);
    start = 1; count = CNT_W'(n); txn_base = tb_; res_base = rb;
    @(negedge clk);
    start = 0;
    while (n_done == d0) @(negedge clk);
    repeat (20) @(negedge clk);
    check(n_done == d0 + 1, "one done pulse per launch");
    for (int i = 0; i < n; i++) begin
      field_t h = u_mem.peek(rb + maddr_t'(2 * i));
      check(h[ID_W:1] == t[i].id && h[0], $sformatf("result %0d header", i));
      check(u_mem.peek(rb + maddr_t'(2 * i + 1)) == exp_v[i], $sformatf("result %0d value", i));
      check(u_mem.peek(TABLE_BASE + maddr_t'(t[i].key) * 8 + maddr_t'(t[i].col)) ==
            tab(TABLE_BASE + maddr_t'(t[i].key) * 8 + maddr_t'(t[i].col)), $sformatf("table after %0d", i));
    end
  endtask

  initial begin
    start = 0; count = '0; txn_base = '0; res_base = '0;
    foreach (cu_ops[c]) cu_ops[c] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    launch(TXN_BASE0, RES_BASE0, 101, 500, 1'b0);
    // second batch: same records, shifted by one so that reads see the
    // values written by the first batch
    launch(TXN_BASE1, RES_BASE1, 128, 499, 1'b1);
    for (int c = 0; c < NUM_CU; c++) check(cu_ops[c] > 0, $sformatf("compute unit %0d worked", c));
    $display("ops per unit: %0d %0d %0d", cu_ops[0], cu_ops[1], cu_ops[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
