// Interval timer: free-running cycle counter that pulses `interval_end` in
// the last cycle of every INTERVAL-cycle window.
//
// Both interval-based mechanisms of the speculation control use it: the
// branch prediction accuracy monitor (which picks the gating threshold) and
// the phase-based usefulness counter. The 100K-cycle interval is the
// document's; sharing one timer between the two is this design's choice.
// Timing: after reset, the first pulse comes in cycle INTERVAL-1, then
// every INTERVAL cycles.
module interval_timer #(
  parameter int unsigned INTERVAL = 100_000
) (
  input  logic clk,
  input  logic rst_n,
  output logic interval_end
);
  localparam int unsigned W = (INTERVAL > 1) ? $clog2(INTERVAL) : 1;

  logic [W-1:0] cnt;

  assign interval_end = (cnt == W'(INTERVAL - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            cnt <= '0;
    else if (interval_end) cnt <= '0;
    else                   cnt <= cnt + 1'b1;
  end
endmodule
