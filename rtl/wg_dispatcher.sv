// wg_dispatcher: run-time scheduler of work groups onto compute units.
//
// A kernel launch covers `count` work items, cut into work groups of WG_SIZE
// items (the last group may be short).  The dispatcher keeps the next group
// id and offers it to the compute units; the lowest-numbered unit that is
// ready takes it, so a unit that finishes early simply receives more groups.
// When every group has been handed out and no unit is busy, `done` pulses for
// one cycle and the dispatcher is idle again.  Multiple compute units with a
// hardware scheduler that hands out work groups at run time is how the
// published kernel scales; the lowest-index-first choice is this design's.
//
// Interface and timing:
//   start, count      launch pulse with the number of work items (held by the
//                     dispatcher from the pulse on); ignored while running.
//   wg_valid[c], wg_ready[c], wg_id   offer of the next group to unit c; at
//                     most one unit takes a group per cycle.
//   cu_busy[c]        unit c still has work.
//   running, done     launch in progress; one-cycle completion pulse.
module wg_dispatcher #(
  parameter int unsigned NUM_CU     = 4,
  parameter int unsigned BATCH_SIZE = 131072,
  parameter int unsigned WG_SIZE    = 256,
  localparam int unsigned CNT_W     = $clog2(BATCH_SIZE + 1),
  localparam int unsigned WG_W      = $clog2(BATCH_SIZE / WG_SIZE + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [CNT_W-1:0]  count,
  output logic [NUM_CU-1:0] wg_valid,
  input  logic [NUM_CU-1:0] wg_ready,
  output logic [WG_W-1:0]   wg_id,
  input  logic [NUM_CU-1:0] cu_busy,
  output logic              running,
  output logic              done
);
  logic [WG_W-1:0] next_wg, num_wg;
  logic            all_issued;
  logic            settle;   // one cycle for a just-issued group to show busy

  assign all_issued = (next_wg == num_wg);
  assign wg_id      = next_wg;

  always_comb begin
    wg_valid = '0;
    if (running && !all_issued) begin
      for (int c = 0; c < NUM_CU; c++) begin
        if (wg_ready[c]) begin
          wg_valid[c] = 1'b1;
          break;
        end
      end
    end
  end

  assign done = running && all_issued && !settle && (cu_busy == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      next_wg <= '0;
      num_wg  <= '0;
      settle  <= 1'b0;
    end else begin
      settle <= 1'b0;
      if (!running && start) begin
        running <= 1'b1;
        next_wg <= '0;
        num_wg  <= WG_W'((count + CNT_W'(WG_SIZE - 1)) / CNT_W'(WG_SIZE));
        settle  <= 1'b1;
      end else if (running) begin
        if ((wg_valid & wg_ready) != '0) begin
          next_wg <= next_wg + 1'b1;
          settle  <= 1'b1;
        end
        if (done) running <= 1'b0;
      end
    end
  end

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(wg_valid));
endmodule
