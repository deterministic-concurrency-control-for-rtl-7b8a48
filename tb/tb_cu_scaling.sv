// tb_cu_scaling: kernel execution time against the number of compute units.
//
// Three copies of the processor, with 1, 2 and 4 compute units and otherwise
// default parameters, run the same read-heavy, low-skew YCSB-B stream
// (32768 transactions, theta 0.1) against a memory of latency 20 with 10 %
// random stalls.  Each copy has its own checking environment (results against
// a serial reference model).  The testbench also counts the cycles in which
// the kernel is running and the transactions it executed, and checks:
//   - every copy executes all transactions;
//   - the kernel never beats the memory port: each transaction needs five
//     word accesses (two object loads, one table access, two result stores),
//     so kernel cycles >= 5 per transaction;
//   - the kernel keeps the port busy: with 10 % of cycles stalled the bound
//     is 5 / 0.9 = 5.56 cycles per transaction, and the kernel must stay
//     within about 6 % of it (<= 5.9 cycles per transaction);
//   - more compute units are never slower than fewer (with a 2 % margin).
// The printed kernel cycles per transaction show how far extra units help
// once the shared memory port is the limit.
`timescale 1ns/1ps
module tb_cu_scaling;
  import hobbes_pkg::*;

  localparam int unsigned BATCH = 131072;
  localparam int unsigned CNT_W = $clog2(BATCH + 1);
  localparam int unsigned N_TXN = 32768;
  localparam int unsigned NRUN  = 3;

  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;

  logic [NRUN-1:0] finished;
  int checks [NRUN], failures [NRUN];
  longint k_cycles [NRUN], k_txns [NRUN];

  for (genvar r = 0; r < NRUN; r++) begin : g_run
    localparam int unsigned NUM_CU = 1 << r;
    localparam string       NAME   = (r == 0) ? "1 CU" : (r == 1) ? "2 CU" : "4 CU";

    logic in_valid, in_ready, drain, mem_req_valid, mem_req_ready, mem_rsp_valid;
    txn_t in_txn;
    mem_req_t mem_req;
    field_t mem_rsp_data;
    logic batch_done, stat_retry, stat_closed_full, stat_closed_early, stat_admit, stat_kernel_running;
    logic [NUM_CU-1:0] stat_cu_active;
    logic [CNT_W-1:0] done_count;
    maddr_t done_txn_base, done_res_base;

    hobbes_top #(.NUM_CU(NUM_CU)) u_top (
      .clk, .rst_n, .in_valid, .in_ready, .in_txn, .drain,
      .mem_req_valid, .mem_req_ready, .mem_req, .mem_rsp_valid, .mem_rsp_data,
      .batch_done, .done_count, .done_txn_base, .done_res_base,
      .stat_retry, .stat_closed_full, .stat_closed_early,
      .stat_admit, .stat_kernel_running, .stat_cu_active);

    hobbes_env #(.NUM_KEYS(1 << 20), .BATCH_SIZE(BATCH), .NUM_CU(NUM_CU), .N_TXN(N_TXN),
                 .WRITE_PCT(5), .THETA(0.1), .GAP_PCT(0), .LAT(20), .STALL_PCT(10),
                 .NAME(NAME), .REQUIRE_ALL(1'b0)) u_env (
      .clk, .rst_n, .in_valid, .in_ready, .in_txn, .drain,
      .mem_req_valid, .mem_req_ready, .mem_req, .mem_rsp_valid, .mem_rsp_data,
      .batch_done, .done_count, .done_txn_base, .done_res_base,
      .stat_retry, .stat_closed_full, .stat_closed_early,
      .kernel_running (stat_kernel_running),
      .admit          (stat_admit),
      .cu_fire        (stat_cu_active),
      .finished (finished[r]), .checks (checks[r]), .failures (failures[r]));

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        k_cycles[r] <= 0;
        k_txns[r]   <= 0;
      end else begin
        if (stat_kernel_running) k_cycles[r] <= k_cycles[r] + 1;
        if (batch_done)          k_txns[r]   <= k_txns[r] + longint'(done_count);
      end
    end
  end

  function automatic int sum(int a [NRUN]);
    int s;
    s = 0;
    foreach (a[i]) s += a[i];
    return s;
  endfunction

  int my_checks, my_failures;

  task automatic check(bit ok, string what);
    my_checks++;
    if (!ok) begin
      my_failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    $display("FAIL: watchdog, runs finished: %b", finished);
    $display("TB_RESULT checks=%0d failures=%0d", sum(checks) + my_checks, sum(failures) + my_failures + 1);
    $finish;
  end

  initial begin
    my_checks   = 0;
    my_failures = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&finished);
    for (int r = 0; r < NRUN; r++) begin
      $display("[%0d CU] kernel cycles=%0d for %0d txns: %0.2f cycles per txn",
               1 << r, k_cycles[r], k_txns[r], real'(k_cycles[r]) / real'(k_txns[r]));
      check(k_txns[r] == longint'(N_TXN), $sformatf("%0d CU executed %0d of %0d", 1 << r, k_txns[r], N_TXN));
      check(k_cycles[r] >= 5 * k_txns[r], $sformatf("%0d CU faster than the memory port", 1 << r));
      check(k_cycles[r] * 10 <= k_txns[r] * 59, $sformatf("%0d CU leaves the memory port idle", 1 << r));
      if (r > 0)
        check(k_cycles[r] * 100 <= k_cycles[r-1] * 102,
              $sformatf("%0d CU slower than %0d CU", 1 << r, 1 << (r - 1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", sum(checks) + my_checks, sum(failures) + my_failures);
    $finish;
  end
endmodule
