// Performance-aware speculation control.
//
// Combines branch-count based fetch gating with wrong-path usefulness
// prediction (WPUP): the fetch engine is gated only when the gating logic
// predicts that the processor is on the wrong path AND the selected WPUP
// predicts that this wrong path would not prefetch anything useful. As in
// the document, the WPUP is looked up only when the gating logic predicts
// wrong path (to save lookup energy), with the latest fetched branch PC
// (LBPC) as key. Both WPUPs proposed by the document are built and trained
// all the time from the MSHRs' useful-wrong-path events: the branch-PC
// based WPUP cache and the phase-based counter; `wpup_sel` chooses which
// one decides. Making the choice a run-time input is this design's own.
// One interval timer (100K cycles) serves the accuracy monitor and the
// phase counter.
// Timing: `gate_fetch` is combinational from registered state and from
// `lbpc`; events take effect on the next cycle's decision.
module speculation_control
  import spec_ctrl_pkg::*;
#(
  parameter int unsigned INTERVAL        = 100_000,
  parameter int unsigned BCR_W           = 8,
  parameter int unsigned ACC_W           = 18,
  parameter int unsigned FETCH_W         = 2,
  parameter int unsigned RES_W           = 2,
  parameter int unsigned ACC_PCT [6]     = '{99, 97, 95, 93, 90, 85},
  parameter int unsigned THRESH  [7]     = '{18, 16, 13, 12, 11, 7, 3},
  parameter int unsigned WPUP_ENTRIES    = 32,
  parameter int unsigned WPUP_WAYS       = 4,
  parameter int unsigned WPUC_W          = 5,
  parameter int unsigned PHASE_THRESHOLD = 5
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  wpup_sel_e                     wpup_sel,
  // branch events
  input  logic [$clog2(FETCH_W+1)-1:0]  fetch_br_cnt,
  input  logic [$clog2(RES_W+1)-1:0]    resolve_cnt,
  input  logic [$clog2(RES_W+1)-1:0]    correct_cnt,
  input  logic [BCR_W-1:0]              squash_cnt,
  input  bpc_t                          lbpc,
  // useful wrong-path events from the MSHRs
  input  logic                          useful_valid,
  input  bpc_t                          useful_bpc,
  // decision
  output logic                          gate_fetch,
  output logic                          wrong_path,
  output logic                          wpup_useful,
  // state, for observation
  output logic [BCR_W-1:0]              bcr,
  output logic [BCR_W-1:0]              threshold,
  output logic [2:0]                    acc_bin,
  output logic                          phase_useful,
  output logic [WPUC_W-1:0]             wpuc,
  output logic                          pc_lookup,
  output logic                          pc_hit,
  output logic                          pc_evict,
  output logic                          interval_end
);
  interval_timer #(.INTERVAL(INTERVAL)) u_timer (.clk, .rst_n, .interval_end);

  fetch_gate_bc #(
    .CNT_W(BCR_W), .ACC_W(ACC_W), .FETCH_W(FETCH_W), .RES_W(RES_W),
    .ACC_PCT(ACC_PCT), .THRESH(THRESH)
  ) u_fg (
    .clk, .rst_n, .fetch_br_cnt, .resolve_cnt, .correct_cnt, .squash_cnt,
    .interval_end, .wrong_path, .bcr, .threshold, .acc_bin
  );

  assign pc_lookup = wrong_path && (wpup_sel == WPUP_PC);

  wpup_cache #(.ENTRIES(WPUP_ENTRIES), .WAYS(WPUP_WAYS)) u_pc_wpup (
    .clk, .rst_n,
    .lookup_en  (pc_lookup),
    .lookup_bpc (lbpc),
    .lookup_hit (pc_hit),
    .train_valid(useful_valid),
    .train_bpc  (useful_bpc),
    .train_evict(pc_evict)
  );

  phase_wpup #(.CNT_W(WPUC_W), .THRESHOLD(PHASE_THRESHOLD)) u_phase_wpup (
    .clk, .rst_n,
    .useful_event(useful_valid),
    .interval_end,
    .useful      (phase_useful),
    .wpuc
  );

  assign wpup_useful = (wpup_sel == WPUP_PC) ? pc_hit : phase_useful;
  assign gate_fetch  = wrong_path && !wpup_useful;
endmodule
