// line_sync_pan_ms: line synchronisation for the PAN and MS imaging channels.
//
// The PMU supplies a line-sync signal at the PAN line rate. Each rising edge
// (after a two-flop synchroniser) produces a PAN line-sync pulse of PULSE_W
// clocks while LINE_SYNC_EN_PAN is set. The MS channel has a ground sample
// four times coarser (4 m against 1 m) and images at a synchronous rate, so
// it takes one line for every MS_RATIO PAN lines: every MS_RATIO-th PMU edge
// also produces an MS line-sync pulse while LINE_SYNC_EN_MS is set. The
// divider restarts while LINE_SYNC_EN_MS is low, so the first MS line after
// enabling coincides with a PAN line.
//
// Forwarding the PMU line sync to both channels under the two enables is the
// controller's description; deriving the MS rate by division (ratio from the
// 1 m / 4 m resolutions), the pulse width and the alignment rule are this
// design's choice. Timing: pulses start three clocks after the PMU edge.
module line_sync_pan_ms #(
  parameter int unsigned MS_RATIO = 4,
  parameter int unsigned PULSE_W  = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic pmu_line_sync,  // asynchronous line sync from the PMU
  input  logic en_pan,         // LINE_SYNC_EN_PAN
  input  logic en_ms,          // LINE_SYNC_EN_MS
  output logic pan_sync,
  output logic ms_sync
);

  localparam int unsigned RW = (MS_RATIO > 1) ? $clog2(MS_RATIO) : 1;
  localparam int unsigned PW = $clog2(PULSE_W + 1);

  logic [2:0]    sync_q;
  logic          edge_det;
  logic [RW-1:0] ratio_cnt;
  logic [PW-1:0] pan_cnt, ms_cnt;

  assign edge_det = sync_q[1] & ~sync_q[2];
  assign pan_sync = (pan_cnt != '0);
  assign ms_sync  = (ms_cnt  != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_q    <= '0;
      ratio_cnt <= '0;
      pan_cnt   <= '0;
      ms_cnt    <= '0;
    end else begin
      sync_q <= {sync_q[1:0], pmu_line_sync};
      if (pan_cnt != '0) pan_cnt <= pan_cnt - 1'b1;
      if (ms_cnt  != '0) ms_cnt  <= ms_cnt  - 1'b1;
      if (!en_ms) ratio_cnt <= '0;
      if (edge_det) begin
        if (en_pan) pan_cnt <= PW'(PULSE_W);
        if (en_ms) begin
          if (ratio_cnt == '0) ms_cnt <= PW'(PULSE_W);
          ratio_cnt <= (ratio_cnt == RW'(MS_RATIO - 1)) ? '0 : ratio_cnt + 1'b1;
        end
      end
    end
  end

endmodule
