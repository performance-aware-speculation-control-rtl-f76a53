// Phase-based wrong-path usefulness predictor.
//
// A CNT_W-bit wrong-path usefulness counter (WPUC, 5 bits in the document)
// counts, during one interval, the hits of later requests on wrong-path
// MSHR entries (`useful_event`). At the end of the interval the count is
// compared with THRESHOLD (phase_wpup_threshold, swept from 5 to 20 in the
// document; 5 performed best and is the default): if it is larger, wrong
// path is predicted useful and fetch gating is disabled for the whole next
// interval. Then the counter restarts from 0. All of that is the
// document's. This design's own choices: the counter saturates; an event in
// the interval's last cycle counts toward that interval; the prediction is
// "not useful" after reset.
// Timing: `useful` is a register that changes the cycle after
// `interval_end`.
module phase_wpup #(
  parameter int unsigned CNT_W     = 5,
  parameter int unsigned THRESHOLD = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             useful_event,
  input  logic             interval_end,
  output logic             useful,
  output logic [CNT_W-1:0] wpuc
);
  logic [CNT_W-1:0] cnt_now;

  assign cnt_now = (useful_event && wpuc != '1) ? wpuc + 1'b1 : wpuc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wpuc   <= '0;
      useful <= 1'b0;
    end else if (interval_end) begin
      useful <= (cnt_now > CNT_W'(THRESHOLD));
      wpuc   <= '0;
    end else begin
      wpuc   <= cnt_now;
    end
  end
endmodule
