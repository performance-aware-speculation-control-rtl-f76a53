// Branch-count based fetch gating.
//
// Predicts that the processor is on the wrong path whenever the number of
// outstanding branches (BCR) is larger than a threshold T, and T is set
// every interval from the measured branch prediction accuracy: a high
// accuracy gives a high T (gating is harder), a low accuracy a low T. This
// is the document's scheme; it needs only the 8-bit BCR and the two 18-bit
// accuracy counters. The interval pulse comes from outside so that the
// phase-based usefulness predictor can share the same timer.
// Interface: per-cycle counts of fetched, resolved and correctly predicted
// branches, and of unresolved branches squashed by a recovery.
// Timing: `wrong_path` is combinational from the BCR and threshold
// registers, so it reflects events of the previous cycle.
module fetch_gate_bc #(
  parameter int unsigned CNT_W   = 8,
  parameter int unsigned ACC_W   = 18,
  parameter int unsigned FETCH_W = 2,
  parameter int unsigned RES_W   = 2,
  parameter int unsigned ACC_PCT [6] = '{99, 97, 95, 93, 90, 85},
  parameter int unsigned THRESH  [7] = '{18, 16, 13, 12, 11, 7, 3}
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [$clog2(FETCH_W+1)-1:0]  fetch_br_cnt,
  input  logic [$clog2(RES_W+1)-1:0]    resolve_cnt,
  input  logic [$clog2(RES_W+1)-1:0]    correct_cnt,
  input  logic [CNT_W-1:0]              squash_cnt,
  input  logic                          interval_end,
  output logic                          wrong_path,
  output logic [CNT_W-1:0]              bcr,
  output logic [CNT_W-1:0]              threshold,
  output logic [2:0]                    acc_bin
);
  branch_count_reg #(.CNT_W(CNT_W), .FETCH_W(FETCH_W), .RES_W(RES_W)) u_bcr (
    .clk, .rst_n, .fetch_br_cnt, .resolve_cnt, .squash_cnt, .bcr
  );

  bpred_accuracy_monitor #(
    .CNT_W(ACC_W), .RES_W(RES_W), .T_W(CNT_W), .ACC_PCT(ACC_PCT), .THRESH(THRESH)
  ) u_acc (
    .clk, .rst_n, .resolve_cnt, .correct_cnt, .interval_end, .threshold, .acc_bin
  );

  assign wrong_path = (bcr > threshold);
endmodule
