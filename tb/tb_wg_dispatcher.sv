// tb_wg_dispatcher: self-checking test of the work-group dispatcher.
//
// Four model compute units take a group when idle and stay busy for a random
// number of cycles.  For several launch sizes (a multiple of the group size,
// a short last group, a single item) the testbench checks that every group
// id is handed out exactly once, at most one per cycle, that work spreads over
// several units, and that `done` pulses once, only after every unit is idle.
`timescale 1ns/1ps
module tb_wg_dispatcher;
  localparam int unsigned NUM_CU = 4;
  localparam int unsigned BATCH  = 256;
  localparam int unsigned WG     = 8;
  localparam int unsigned CNT_W  = $clog2(BATCH + 1);
  localparam int unsigned WG_W   = $clog2(BATCH / WG + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, running, done;
  logic [CNT_W-1:0] count;
  logic [NUM_CU-1:0] wg_valid, wg_ready, cu_busy;
  logic [WG_W-1:0] wg_id;

  wg_dispatcher #(.NUM_CU(NUM_CU), .BATCH_SIZE(BATCH), .WG_SIZE(WG)) dut (
    .clk, .rst_n, .start, .count, .wg_valid, .wg_ready, .wg_id, .cu_busy, .running, .done);

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

  // model compute units
  int busy_left [NUM_CU];
  int groups_seen [int];
  int per_cu [NUM_CU];
  int n_done;
  always_comb begin
    for (int c = 0; c < NUM_CU; c++) begin
      cu_busy[c]  = busy_left[c] > 0;
      wg_ready[c] = busy_left[c] == 0;
    end
  end
  always @(posedge clk) begin
    if (rst_n) begin
      check($countones(wg_valid & wg_ready) <= 1, "one grant per cycle");
      for (int c = 0; c < NUM_CU; c++) begin
        if (wg_valid[c] && wg_ready[c]) begin
          groups_seen[int'(wg_id)] = groups_seen.exists(int'(wg_id)) ? groups_seen[int'(wg_id)] + 1 : 1;
          busy_left[c] <= 3 + $urandom_range(12);
          per_cu[c]++;
        end else if (busy_left[c] > 0) busy_left[c] <= busy_left[c] - 1;
      end
      if (done) begin
        n_done++;
        check(cu_busy == '0, "done only when all units idle");
      end
    end
  end

  task automatic launch(int n);
    int ng;
    groups_seen.delete();
    n_done = 0;
    foreach (per_cu[c]) per_cu[c] = 0;
    @(negedge clk);
    start = 1; count = CNT_W'(n);
    @(negedge clk);
    start = 0;
    while (!(running == 0 && n_done > 0)) @(negedge clk);
    repeat (5) @(negedge clk);
    ng = (n + WG - 1) / WG;
    check(n_done == 1, $sformatf("one done pulse for %0d items", n));
    check(groups_seen.num() == ng, $sformatf("%0d groups issued for %0d items (got %0d)", ng, n, groups_seen.num()));
    for (int g = 0; g < ng; g++)
      check(groups_seen.exists(g) && groups_seen[g] == 1, $sformatf("group %0d issued once", g));
    if (ng >= NUM_CU) begin
      int used = 0;
      foreach (per_cu[c]) if (per_cu[c] > 0) used++;
      check(used == NUM_CU, "all compute units used");
    end
  endtask

  initial begin
    start = 0; count = '0;
    foreach (busy_left[c]) busy_left[c] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    launch(256);
    launch(77);
    launch(1);
    launch(40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
