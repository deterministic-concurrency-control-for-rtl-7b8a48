// det_kernel: the deterministic transaction kernel.
//
// NUM_CU identical compute units (det_cu), each a pipeline executing one
// transaction object after another, fed with work groups by the run-time
// dispatcher (wg_dispatcher).  A launch processes `count` transactions whose
// objects sit at txn_base, writes their result objects at res_base and
// accesses the table at table_base.  Each unit has its own memory port; the
// ports are shared with the rest of the system outside the kernel.
// Scaling by replicating whole pipelines as compute units, with a hardware
// dispatcher, follows the published design.
//
// Interface and timing: start pulse with the bases and count (held during
// the launch), done pulse when every result object has been issued to memory.
module det_kernel
  import hobbes_pkg::*;
#(
  parameter int unsigned NUM_CU     = 4,
  parameter int unsigned BATCH_SIZE = 131072,
  parameter int unsigned WG_SIZE    = 256,
  parameter int unsigned TQ_DEPTH   = 8,
  parameter int unsigned RQ_DEPTH   = 8,
  localparam int unsigned CNT_W     = $clog2(BATCH_SIZE + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [CNT_W-1:0]  count,
  input  maddr_t            txn_base,
  input  maddr_t            res_base,
  input  maddr_t            table_base,
  output logic              running,
  output logic              done,
  output logic [NUM_CU-1:0] req_valid,
  input  logic [NUM_CU-1:0] req_ready,
  output mem_req_t          req [NUM_CU],
  input  logic [NUM_CU-1:0] rsp_valid,
  input  field_t            rsp_data
);
  localparam int unsigned WG_W = $clog2(BATCH_SIZE / WG_SIZE + 1);

  logic [NUM_CU-1:0] wg_valid, wg_ready, cu_busy;
  logic [WG_W-1:0]   wg_id;
  logic [CNT_W-1:0]  count_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count_q <= '0;
    else if (start && !running) count_q <= count;
  end

  wg_dispatcher #(.NUM_CU(NUM_CU), .BATCH_SIZE(BATCH_SIZE), .WG_SIZE(WG_SIZE)) u_disp (
    .clk, .rst_n, .start, .count,
    .wg_valid, .wg_ready, .wg_id, .cu_busy, .running, .done
  );

  for (genvar c = 0; c < NUM_CU; c++) begin : g_cu
    det_cu #(.BATCH_SIZE(BATCH_SIZE), .WG_SIZE(WG_SIZE),
             .TQ_DEPTH(TQ_DEPTH), .RQ_DEPTH(RQ_DEPTH)) u_cu (
      .clk, .rst_n,
      .txn_base, .res_base, .table_base,
      .count     (count_q),
      .wg_valid  (wg_valid[c]),
      .wg_ready  (wg_ready[c]),
      .wg_id,
      .busy      (cu_busy[c]),
      .req_valid (req_valid[c]),
      .req_ready (req_ready[c]),
      .req       (req[c]),
      .rsp_valid (rsp_valid[c]),
      .rsp_data
    );
  end
endmodule
