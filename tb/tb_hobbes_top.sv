// tb_hobbes_top: end-to-end test of the batch transaction processor at
// reduced size (1024 records, batches of 64, two compute units, queue of 32).
//
// A write-heavy, skewed YCSB stream (50 % writes, theta 0.9) forces many lock
// conflicts; the checking environment compares every result with a serial
// reference model and counts each mechanism of the design.
`timescale 1ns/1ps
module tb_hobbes_top;
  import hobbes_pkg::*;

  localparam int unsigned NUM_KEYS = 1024;
  localparam int unsigned BATCH    = 64;
  localparam int unsigned NUM_CU   = 2;
  localparam int unsigned CNT_W    = $clog2(BATCH + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

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

  hobbes_top #(.NUM_KEYS(NUM_KEYS), .BATCH_SIZE(BATCH), .QUEUE_DEPTH(32), .BMP_W(32),
               .NUM_CU(NUM_CU), .WG_SIZE(8), .CU_DEPTH(4),
               .TXN_BASE(maddr_t'(26'h010_0000)), .RES_BASE(maddr_t'(26'h020_0000))) u_top (
    .clk, .rst_n, .in_valid, .in_ready, .in_txn, .drain,
    .mem_req_valid, .mem_req_ready, .mem_req, .mem_rsp_valid, .mem_rsp_data,
    .batch_done, .done_count, .done_txn_base, .done_res_base,
    .stat_retry, .stat_closed_full, .stat_closed_early,
    .stat_admit, .stat_kernel_running, .stat_cu_active);

  hobbes_env #(.NUM_KEYS(NUM_KEYS), .BATCH_SIZE(BATCH), .NUM_CU(NUM_CU), .N_TXN(1500),
               .WRITE_PCT(50), .THETA(0.9), .GAP_PCT(10), .LAT(12), .STALL_PCT(15),
               .NAME("small")) u_env (
    .clk, .rst_n, .in_valid, .in_ready, .in_txn, .drain,
    .mem_req_valid, .mem_req_ready, .mem_req, .mem_rsp_valid, .mem_rsp_data,
    .batch_done, .done_count, .done_txn_base, .done_res_base,
    .stat_retry, .stat_closed_full, .stat_closed_early,
    .kernel_running (stat_kernel_running),
    .admit          (stat_admit),
    .cu_fire        (stat_cu_active),
    .finished, .checks, .failures);

  initial begin
    repeat (200000) @(posedge clk);
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
