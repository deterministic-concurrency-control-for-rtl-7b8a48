// tb_hobbes_full: the batch transaction processor at its full default size
// (2^20 records, batches of 131072 transactions, four compute units) running
// YCSB workload B (95 % reads, 5 % updates) with low skew (theta 0.1).
//
// 139264 transactions are offered: enough for one full batch of 131072 and a
// partial batch closed when the input runs dry.  The checking environment
// verifies every result against a serial reference model and counts the
// mechanisms of the design (lock retries, full and early closes, locking of
// the second batch while the first executes, memory backpressure, work on
// every compute unit).
`timescale 1ns/1ps
module tb_hobbes_full;
  import hobbes_pkg::*;

  localparam int unsigned NUM_CU = 4;
  localparam int unsigned BATCH  = 131072;
  localparam int unsigned CNT_W  = $clog2(BATCH + 1);

  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;

  logic in_valid, in_ready, drain, mem_req_valid, mem_req_ready, mem_rsp_valid;
  txn_t in_txn;
  mem_req_t mem_req;
  field_t mem_rsp_data;
  logic batch_done, stat_retry, stat_closed_full, stat_closed_early, stat_admit, stat_kernel_running;
  logic [NUM_CU-1:0] stat_cu_active;
  logic [CNT_W-1:0] done_count;
  maddr_t done_txn_base, done_res_base;
  logic finished;
  int checks, failures;

  hobbes_top u_top (
    .clk, .rst_n, .in_valid, .in_ready, .in_txn, .drain,
    .mem_req_valid, .mem_req_ready, .mem_req, .mem_rsp_valid, .mem_rsp_data,
    .batch_done, .done_count, .done_txn_base, .done_res_base,
    .stat_retry, .stat_closed_full, .stat_closed_early,
    .stat_admit, .stat_kernel_running, .stat_cu_active);

  hobbes_env #(.NUM_KEYS(1 << 20), .BATCH_SIZE(BATCH), .NUM_CU(NUM_CU), .N_TXN(BATCH + 8192),
               .WRITE_PCT(5), .THETA(0.1), .GAP_PCT(0), .LAT(20), .STALL_PCT(10),
               .NAME("full YCSB-B")) u_env (
    .clk, .rst_n, .in_valid, .in_ready, .in_txn, .drain,
    .mem_req_valid, .mem_req_ready, .mem_req, .mem_rsp_valid, .mem_rsp_data,
    .batch_done, .done_count, .done_txn_base, .done_res_base,
    .stat_retry, .stat_closed_full, .stat_closed_early,
    .kernel_running (stat_kernel_running),
    .admit          (stat_admit),
    .cu_fire        (stat_cu_active),
    .finished, .checks, .failures);

  initial begin
    repeat (6000000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
