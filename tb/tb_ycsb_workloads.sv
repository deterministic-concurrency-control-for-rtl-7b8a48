// tb_ycsb_workloads: the processor at its default size running the YCSB
// workloads used in the evaluation of the design on the FPGA: A (50 %
// updates) and B (5 % updates), each at low and medium skew (theta 0.1 and
// 0.5).
//
// Four copies of the design run side by side, one per workload, each with its
// own memory model and checking environment (results against a serial
// reference model).  Each run offers one full batch worth of transactions
// plus 8192; the printed summary gives the batches formed, lock retries per
// transaction and clock cycles per transaction.
`timescale 1ns/1ps
module tb_ycsb_workloads;
  import hobbes_pkg::*;

  localparam int unsigned NUM_CU = 4;
  localparam int unsigned BATCH  = 131072;
  localparam int unsigned CNT_W  = $clog2(BATCH + 1);
  localparam int unsigned NRUN   = 4;

  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;

  logic [NRUN-1:0] finished;
  int checks [NRUN], failures [NRUN];

  for (genvar r = 0; r < NRUN; r++) begin : g_run
    localparam int unsigned WPCT  = (r < 2) ? 50 : 5;
    localparam real         THETA = (r % 2 == 0) ? 0.1 : 0.5;
    localparam string       NAME  = (r == 0) ? "YCSB-A theta=0.1" : (r == 1) ? "YCSB-A theta=0.5" :
                                    (r == 2) ? "YCSB-B theta=0.1" : "YCSB-B theta=0.5";

    logic in_valid, in_ready, drain, mem_req_valid, mem_req_ready, mem_rsp_valid;
    txn_t in_txn;
    mem_req_t mem_req;
    field_t mem_rsp_data;
    logic batch_done, stat_retry, stat_closed_full, stat_closed_early, stat_admit, stat_kernel_running;
    logic [NUM_CU-1:0] stat_cu_active;
    logic [CNT_W-1:0] done_count;
    maddr_t done_txn_base, done_res_base;

    hobbes_top u_top (
      .clk, .rst_n, .in_valid, .in_ready, .in_txn, .drain,
      .mem_req_valid, .mem_req_ready, .mem_req, .mem_rsp_valid, .mem_rsp_data,
      .batch_done, .done_count, .done_txn_base, .done_res_base,
      .stat_retry, .stat_closed_full, .stat_closed_early,
      .stat_admit, .stat_kernel_running, .stat_cu_active);

    hobbes_env #(.NUM_KEYS(1 << 20), .BATCH_SIZE(BATCH), .NUM_CU(NUM_CU), .N_TXN(BATCH + 8192),
                 .WRITE_PCT(WPCT), .THETA(THETA), .GAP_PCT(0), .LAT(20), .STALL_PCT(10),
                 .NAME(NAME), .REQUIRE_ALL(1'b0)) u_env (
      .clk, .rst_n, .in_valid, .in_ready, .in_txn, .drain,
      .mem_req_valid, .mem_req_ready, .mem_req, .mem_rsp_valid, .mem_rsp_data,
      .batch_done, .done_count, .done_txn_base, .done_res_base,
      .stat_retry, .stat_closed_full, .stat_closed_early,
      .kernel_running (stat_kernel_running),
      .admit          (stat_admit),
      .cu_fire        (stat_cu_active),
      .finished (finished[r]), .checks (checks[r]), .failures (failures[r]));
  end

  function automatic int sum(int a [NRUN]);
    int s;
    s = 0;
    foreach (a[i]) s += a[i];
    return s;
  endfunction

  initial begin
    repeat (8000000) @(posedge clk);
    $display("FAIL: watchdog, runs finished: %b", finished);
    $display("TB_RESULT checks=%0d failures=%0d", sum(checks), sum(failures) + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&finished);
    $display("TB_RESULT checks=%0d failures=%0d", sum(checks), sum(failures));
    $finish;
  end
endmodule
