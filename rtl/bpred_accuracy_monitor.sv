// Branch prediction accuracy monitor and gating-threshold selector.
//
// Two CNT_W-bit counters accumulate, over one interval, the number of
// resolved branches and the number of those that were predicted correctly.
// In the interval's last cycle (`interval_end`) the accuracy
// correct/total is placed in one of seven bins and the branch-count gating
// threshold for the next interval is taken from THRESH; then both counters
// restart from zero. The bin bounds ACC_PCT and the thresholds THRESH are
// the document's table for the baseline processor (99%+ -> 18, 97-99 -> 16,
// 95-97 -> 13, 93-95 -> 12, 90-93 -> 11, 85-90 -> 7, below 85 -> 3); the
// table for the aggressive processor (60,50,40,30,20,15,13) is a parameter
// override. The two 18-bit counters are the document's.
//
// This design's own choices: a bin is chosen by the exact comparison
// correct*100 >= total*ACC_PCT[i] (so a bound belongs to the higher bin);
// the events of the interval's last cycle count toward the next interval;
// an interval with no resolved branch keeps the previous threshold; the
// threshold after reset is THRESH[0], the least aggressive one; the
// counters saturate.
// Timing: `threshold` is a register that changes the cycle after
// `interval_end`.
module bpred_accuracy_monitor #(
  parameter int unsigned CNT_W  = 18,
  parameter int unsigned RES_W  = 2,
  parameter int unsigned T_W    = 8,
  parameter int unsigned ACC_PCT [6] = '{99, 97, 95, 93, 90, 85},
  parameter int unsigned THRESH  [7] = '{18, 16, 13, 12, 11, 7, 3}
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [$clog2(RES_W+1)-1:0]   resolve_cnt,   // branches resolved this cycle
  input  logic [$clog2(RES_W+1)-1:0]   correct_cnt,   // of them, correctly predicted
  input  logic                         interval_end,
  output logic [T_W-1:0]               threshold,
  output logic [2:0]                   acc_bin        // bin of the last interval, 0 = best
);
  localparam int unsigned PW = CNT_W + 7;   // width of count * 100

  logic [CNT_W-1:0] total_q, correct_q;
  logic [2:0]       bin;

  function automatic logic [CNT_W-1:0] sat_add(logic [CNT_W-1:0] a, logic [CNT_W-1:0] b);
    logic [CNT_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[CNT_W] ? '1 : s[CNT_W-1:0];
  endfunction

  always_comb begin
    logic [PW-1:0] c100;
    c100 = PW'(correct_q) * PW'(100);
    bin  = 3'd6;
    for (int i = 5; i >= 0; i--)
      if (c100 >= PW'(total_q) * PW'(ACC_PCT[i])) bin = 3'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      total_q   <= '0;
      correct_q <= '0;
      threshold <= T_W'(THRESH[0]);
      acc_bin   <= '0;
    end else if (interval_end) begin
      total_q   <= CNT_W'(resolve_cnt);
      correct_q <= CNT_W'(correct_cnt);
      if (total_q != '0) begin
        threshold <= T_W'(THRESH[bin]);
        acc_bin   <= bin;
      end
    end else begin
      total_q   <= sat_add(total_q,   CNT_W'(resolve_cnt));
      correct_q <= sat_add(correct_q, CNT_W'(correct_cnt));
    end
  end
endmodule
