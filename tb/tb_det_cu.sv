// tb_det_cu: self-checking test of one compute unit of the kernel.
//
// Transaction objects of a conflict-free batch (distinct keys, mixed reads
// and writes) are placed in the memory model; the testbench hands out the
// work groups, then checks every result object and every table write against
// values it computes itself.  A first run with an always-ready memory checks
// that the unit is pipelined: five memory operations per transaction issued
// back to back (about 5 cycles per transaction, not one memory latency per
// step).  A second run repeats with random memory backpressure.
`timescale 1ns/1ps
module tb_det_cu;
  import hobbes_pkg::*;

  localparam int unsigned BATCH = 64;
  localparam int unsigned WG    = 8;
  localparam int unsigned LAT   = 8;
  localparam int unsigned CNT_W = $clog2(BATCH + 1);
  localparam int unsigned WG_W  = $clog2(BATCH / WG + 1);
  localparam maddr_t TABLE_BASE = maddr_t'(26'h000_1000);
  localparam maddr_t TXN_BASE   = maddr_t'(26'h010_0000);
  localparam maddr_t RES_BASE   = maddr_t'(26'h020_0000);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [CNT_W-1:0] count;
  logic wg_valid, wg_ready, busy;
  logic [WG_W-1:0] wg_id;
  logic c_req_valid, c_req_ready, m_req_valid, m_req_ready, rsp_valid;
  mem_req_t req;
  field_t rsp_data;
  logic gate;

  det_cu #(.BATCH_SIZE(BATCH), .WG_SIZE(WG), .TQ_DEPTH(4), .RQ_DEPTH(4)) dut (
    .clk, .rst_n, .txn_base(TXN_BASE), .res_base(RES_BASE), .table_base(TABLE_BASE),
    .count, .wg_valid, .wg_ready, .wg_id, .busy,
    .req_valid(c_req_valid), .req_ready(c_req_ready), .req, .rsp_valid, .rsp_data);

  assign m_req_valid = c_req_valid && gate;
  assign c_req_ready = m_req_ready && gate;

  ddr_model #(.LAT(LAT)) u_mem (.clk, .rst_n, .req_valid(m_req_valid), .req_ready(m_req_ready),
    .req, .rsp_valid, .rsp_data);

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

  int gate_pct = 0;
  always @(negedge clk) gate <= ($urandom_range(99) >= gate_pct);

  txn_t txns [];
  field_t expect_rd [];

  task automatic run(int n, int seed_key, output longint cycles);
    int ngroups, g;
    longint t0;
    txns = new[n];
    expect_rd = new[n];
    for (int i = 0; i < n; i++) begin
      txn_t t;
      maddr_t a;
      t.id    = ID_W'(5000 + seed_key * 100 + i);
      t.ttype = ($urandom_range(1) == 1) ? TXN_WRITE : TXN_READ;
      t.key   = KEY_W'(seed_key + 3 * i);
      t.col   = COL_W'($urandom_range(7));
      t.value = {16{$urandom()}};
      txns[i] = t;
      // header word: id, type, key, col packed at the bottom
      u_mem.poke(TXN_BASE + maddr_t'(2 * i),     field_t'({t.id, t.ttype, t.key, t.col}));
      u_mem.poke(TXN_BASE + maddr_t'(2 * i + 1), t.value);
      a = TABLE_BASE + maddr_t'(t.key) * 8 + maddr_t'(t.col);
      expect_rd[i] = u_mem.peek(a);
    end
    count = CNT_W'(n);
    ngroups = (n + WG - 1) / WG;
    g = 0;
    @(negedge clk);
    t0 = u_mem.cycle;
    while (g < ngroups) begin
      wg_valid = 1'b1;
      wg_id    = WG_W'(g);
      @(posedge clk);
      if (wg_ready) g++;
      @(negedge clk);
    end
    wg_valid = 1'b0;
    @(posedge clk);
    while (busy) @(posedge clk);
    cycles = u_mem.cycle - t0;
    for (int i = 0; i < n; i++) begin
      field_t h, v;
      maddr_t a;
      h = u_mem.peek(RES_BASE + maddr_t'(2 * i));
      v = u_mem.peek(RES_BASE + maddr_t'(2 * i + 1));
      check(h[ID_W:1] == txns[i].id && h[0] == 1'b1, $sformatf("result %0d header", i));
      a = TABLE_BASE + maddr_t'(txns[i].key) * 8 + maddr_t'(txns[i].col);
      if (txns[i].ttype == TXN_READ) begin
        check(v == expect_rd[i], $sformatf("result %0d read value", i));
        check(u_mem.peek(a) == expect_rd[i], $sformatf("read %0d leaves table", i));
      end else begin
        check(v == '0, $sformatf("result %0d write value", i));
        check(u_mem.peek(a) == txns[i].value, $sformatf("write %0d reached table", i));
      end
    end
  endtask

  initial begin
    longint cyc;
    wg_valid = 0; wg_id = '0; count = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    run(37, 11, cyc);
    $display("37 transactions, ready memory: %0d cycles", cyc);
    check(cyc <= 5 * 37 + 4 * LAT + 20, $sformatf("pipelined: %0d cycles for 37 txns", cyc));
    check(cyc >= 5 * 37, "one memory operation per cycle at most");
    begin
      int nrd = 0;
      foreach (txns[k]) if (txns[k].ttype == TXN_READ) nrd++;
      check(u_mem.n_reads == longint'(2 * 37 + nrd), "two object reads per txn plus one table read per read txn");
      check(u_mem.n_writes == longint'(2 * 37 + 37 - nrd), "two result writes per txn plus one table write per write txn");
    end

    gate_pct = 40;
    run(61, 2000, cyc);
    $display("61 transactions, stalling memory: %0d cycles", cyc);
    check(!busy, "idle at end");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
