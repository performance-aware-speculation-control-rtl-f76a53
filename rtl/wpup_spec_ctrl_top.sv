// Performance-aware speculation control for an out-of-order core: top level.
//
// Wires together every structure the scheme adds to a baseline processor:
//  * the fetch engine's latest branch PC register (LBPC), which tags every
//    fetched packet with the PC of the youngest branch before it;
//  * the BPC field of the front-end inter-stage latches, which carries that
//    tag to rename, where loads and stores enter the LSQ;
//  * the BPC/branch-ID fields of the LSQ entries;
//  * the L2 MSHRs with BPC, BID and wrong-path bit, which turn "a later
//    request hit an outstanding wrong-path miss" into a useful-wrong-path
//    event carrying the BPC of the branch that led to it;
//  * the speculation controller: branch-count based fetch gating whose
//    threshold follows the branch prediction accuracy, overridden by the
//    branch-PC or the phase-based wrong-path usefulness predictor.
// The fetch engine, branch predictor, branch resolution, LSQ core and L2
// cache are the host processor's; their signals are the ports of this
// module. The core drives one fetch packet, branch resolutions, LSQ
// allocations and one L2 request per cycle; `gate_fetch` tells the fetch
// engine to stop fetching. A misprediction (`mispred_valid`) flushes the
// front-end BPC latches and reloads LBPC with the mispredicted branch's BPC
// in the same cycle: that coupling, and taking the LSQ entry's BPC from the
// packet leaving the front end, are this design's choices.
// Timing: `gate_fetch` responds one cycle after the events that change it;
// the tag of a fetched packet reaches `fe_out_bpc` FE_STAGES cycles later.
module wpup_spec_ctrl_top
  import spec_ctrl_pkg::*;
#(
  parameter int unsigned PC_W            = 64,
  parameter int unsigned FETCH_W         = 2,
  parameter int unsigned RES_W           = 2,
  parameter int unsigned FE_STAGES       = 11,
  parameter int unsigned LSQ_ENTRIES     = 32,
  parameter int unsigned MSHR_ENTRIES    = 32,
  parameter int unsigned LINE_W          = 58,
  parameter int unsigned INTERVAL        = 100_000,
  parameter int unsigned BCR_W           = 8,
  parameter int unsigned ACC_W           = 18,
  parameter int unsigned ACC_PCT [6]     = '{99, 97, 95, 93, 90, 85},
  parameter int unsigned THRESH  [7]     = '{18, 16, 13, 12, 11, 7, 3},
  parameter int unsigned WPUP_ENTRIES    = 32,
  parameter int unsigned WPUP_WAYS       = 4,
  parameter int unsigned WPUC_W          = 5,
  parameter int unsigned PHASE_THRESHOLD = 5
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  wpup_sel_e                         wpup_sel,
  // fetch engine
  input  logic                              fetch_valid,
  input  logic [FETCH_W-1:0]                br_valid,
  input  logic [FETCH_W-1:0][PC_W-1:0]      br_pc,
  input  logic                              fe_stall,
  output logic                              gate_fetch,
  output bpc_t                              lbpc,
  output logic                              fe_out_valid,
  output bpc_t                              fe_out_bpc,
  // branch resolution
  input  logic [$clog2(RES_W+1)-1:0]        resolve_cnt,
  input  logic [$clog2(RES_W+1)-1:0]        correct_cnt,
  input  logic                              mispred_valid,
  input  bid_t                              mispred_bid,
  input  bpc_t                              mispred_bpc,
  input  logic [BCR_W-1:0]                  squash_cnt,
  // LSQ allocation (packet leaving the front end)
  input  logic                              lsq_alloc_valid,
  input  logic [$clog2(LSQ_ENTRIES)-1:0]    lsq_alloc_idx,
  input  bid_t                              lsq_alloc_bid,
  // L2 request from an LSQ entry
  input  logic                              l2_req_valid,
  input  logic [LINE_W-1:0]                 l2_req_line,
  input  logic                              l2_req_miss,
  input  logic [$clog2(LSQ_ENTRIES)-1:0]    l2_req_lsq_idx,
  output logic                              l2_req_merge,
  output logic                              l2_req_alloc,
  output logic                              l2_req_full,
  output logic [$clog2(MSHR_ENTRIES)-1:0]   l2_req_mshr,
  input  logic                              l2_fill_valid,
  input  logic [$clog2(MSHR_ENTRIES)-1:0]   l2_fill_mshr,
  // status
  output logic                              wrong_path,
  output logic                              wpup_useful,
  output logic                              useful_valid,
  output bpc_t                              useful_bpc,
  output logic [BCR_W-1:0]                  bcr,
  output logic [BCR_W-1:0]                  threshold,
  output logic [2:0]                        acc_bin,
  output logic                              phase_useful,
  output logic [WPUC_W-1:0]                 wpuc,
  output logic                              pc_lookup,
  output logic                              pc_hit,
  output logic                              pc_evict,
  output logic                              interval_end,
  output logic [MSHR_ENTRIES-1:0]           mshr_valid,
  output logic [MSHR_ENTRIES-1:0]           mshr_wp
);
  bpc_t pkt_bpc;
  bpc_t lsq_bpc;
  bid_t lsq_bid;
  logic [$clog2(FETCH_W+1)-1:0] fetch_br_cnt;

  always_comb begin
    fetch_br_cnt = '0;
    if (fetch_valid && !mispred_valid)
      for (int i = 0; i < int'(FETCH_W); i++)
        fetch_br_cnt += {{($clog2(FETCH_W+1)-1){1'b0}}, br_valid[i]};
  end

  lbpc_reg #(.PC_W(PC_W), .FETCH_W(FETCH_W)) u_lbpc (
    .clk, .rst_n, .fetch_valid, .br_valid, .br_pc,
    .recover_valid(mispred_valid), .recover_bpc(mispred_bpc),
    .lbpc, .pkt_bpc
  );

  bpc_pipe #(.STAGES(FE_STAGES)) u_fe_bpc (
    .clk, .rst_n, .stall(fe_stall), .flush(mispred_valid),
    .in_valid(fetch_valid && !mispred_valid), .in_bpc(pkt_bpc),
    .out_valid(fe_out_valid), .out_bpc(fe_out_bpc)
  );

  lsq_branch_tags #(.ENTRIES(LSQ_ENTRIES)) u_lsq_tags (
    .clk, .alloc_valid(lsq_alloc_valid), .alloc_idx(lsq_alloc_idx),
    .alloc_bpc(fe_out_bpc), .alloc_bid(lsq_alloc_bid),
    .rd_idx(l2_req_lsq_idx), .rd_bpc(lsq_bpc), .rd_bid(lsq_bid)
  );

  l2_mshr_wp #(.ENTRIES(MSHR_ENTRIES), .LINE_W(LINE_W)) u_mshr (
    .clk, .rst_n,
    .req_valid(l2_req_valid), .req_line(l2_req_line), .req_l2_miss(l2_req_miss),
    .req_bpc(lsq_bpc), .req_bid(lsq_bid),
    .req_merge(l2_req_merge), .req_alloc(l2_req_alloc), .req_full(l2_req_full),
    .req_idx(l2_req_mshr),
    .fill_valid(l2_fill_valid), .fill_idx(l2_fill_mshr),
    .mispred_valid, .mispred_bid,
    .useful_valid, .useful_bpc,
    .entry_valid(mshr_valid), .entry_wp(mshr_wp)
  );

  speculation_control #(
    .INTERVAL(INTERVAL), .BCR_W(BCR_W), .ACC_W(ACC_W), .FETCH_W(FETCH_W),
    .RES_W(RES_W), .ACC_PCT(ACC_PCT), .THRESH(THRESH),
    .WPUP_ENTRIES(WPUP_ENTRIES), .WPUP_WAYS(WPUP_WAYS),
    .WPUC_W(WPUC_W), .PHASE_THRESHOLD(PHASE_THRESHOLD)
  ) u_sc (
    .clk, .rst_n, .wpup_sel, .fetch_br_cnt, .resolve_cnt, .correct_cnt,
    .squash_cnt, .lbpc, .useful_valid, .useful_bpc,
    .gate_fetch, .wrong_path, .wpup_useful, .bcr, .threshold, .acc_bin,
    .phase_useful, .wpuc, .pc_lookup, .pc_hit, .pc_evict, .interval_end
  );
endmodule
