// L2 miss status holding registers extended for wrong-path usefulness
// detection.
//
// Each of the ENTRIES MSHRs (32 in the document's baseline) holds an
// outstanding L2 miss: the cache-line address and, added by the scheme, the
// BPC tag and branch ID (BID) of the load/store that caused it and a
// wrong-path bit WP. Three things happen to them:
//  * Request. One L2 request per cycle (the L2 has one port). If its line
//    matches an outstanding entry the request is merged into it
//    (`req_merge`). If it does not and the request missed in the L2 tags
//    (`req_l2_miss`), the lowest free entry is allocated (`req_alloc`) with
//    the request's BPC and BID; with no free entry `req_full` tells the
//    requester to retry.
//  * Misprediction. When a branch resolves as mispredicted its BID is
//    broadcast; every valid entry whose BID is the same or younger was
//    allocated on the wrong path and gets WP set. The document gives the
//    rule twice, once as "a branch older than or equal to the associated
//    branch in the MSHR entry" and once as "older than"; this design follows
//    "older than or equal", since the entry's BID names the youngest branch
//    before the load, and a load fetched after the mispredicted branch
//    itself is on its wrong path. A request allocated in the same cycle as
//    the broadcast is checked too.
//  * Usefulness. When a request merges into an entry whose WP is set, the
//    wrong-path miss is taken to be useful for the correct path: the
//    entry's BPC is sent out with `useful_valid` to train the WPUP cache and
//    the phase counter. Every such hit counts, as the document states.
// An entry is freed by `fill_valid`/`fill_idx` when its line arrives.
// Line-address matching, allocation order and the retry signal are this
// design's choices; the document extends existing MSHRs and does not
// describe them.
// Timing: request results are combinational in the request cycle; entry
// state and `useful_*` are registered (one cycle after the hit).
module l2_mshr_wp
  import spec_ctrl_pkg::*;
#(
  parameter int unsigned ENTRIES = 32,
  parameter int unsigned LINE_W  = 58    // 64-bit address, 64-byte lines
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // L2 request
  input  logic                        req_valid,
  input  logic [LINE_W-1:0]           req_line,
  input  logic                        req_l2_miss,
  input  bpc_t                        req_bpc,
  input  bid_t                        req_bid,
  output logic                        req_merge,
  output logic                        req_alloc,
  output logic                        req_full,
  output logic [$clog2(ENTRIES)-1:0]  req_idx,
  // line returned from memory
  input  logic                        fill_valid,
  input  logic [$clog2(ENTRIES)-1:0]  fill_idx,
  // branch misprediction broadcast
  input  logic                        mispred_valid,
  input  bid_t                        mispred_bid,
  // useful wrong-path event
  output logic                        useful_valid,
  output bpc_t                        useful_bpc,
  // state, for observation
  output logic [ENTRIES-1:0]          entry_valid,
  output logic [ENTRIES-1:0]          entry_wp
);
  localparam int unsigned IW = $clog2(ENTRIES);

  typedef struct packed {
    logic [LINE_W-1:0] line;
    bpc_t              bpc;
    bid_t              bid;
  } mshr_t;

  mshr_t             ent [ENTRIES];
  logic [ENTRIES-1:0] vld, wp;

  logic          hit, free_found;
  logic [IW-1:0] hit_idx, free_idx;

  always_comb begin
    hit        = 1'b0;
    hit_idx    = '0;
    free_found = 1'b0;
    free_idx   = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (vld[i] && ent[i].line == req_line) begin
        hit     = 1'b1;
        hit_idx = IW'(i);
      end
      if (!vld[i]) begin
        free_found = 1'b1;
        free_idx   = IW'(i);
      end
    end
  end

  assign req_merge = req_valid && hit;
  assign req_alloc = req_valid && !hit && req_l2_miss && free_found;
  assign req_full  = req_valid && !hit && req_l2_miss && !free_found;
  assign req_idx   = hit ? hit_idx : free_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld          <= '0;
      wp           <= '0;
      useful_valid <= 1'b0;
      useful_bpc   <= '0;
    end else begin
      for (int i = 0; i < int'(ENTRIES); i++)
        if (vld[i] && mispred_valid && bid_older_or_equal(mispred_bid, ent[i].bid))
          wp[i] <= 1'b1;
      if (fill_valid) begin
        vld[fill_idx] <= 1'b0;
        wp[fill_idx]  <= 1'b0;
      end
      if (req_alloc) begin
        vld[free_idx] <= 1'b1;
        wp[free_idx]  <= mispred_valid && bid_older_or_equal(mispred_bid, req_bid);
      end
      useful_valid <= req_merge && wp[hit_idx];
      if (req_merge && wp[hit_idx]) useful_bpc <= ent[hit_idx].bpc;
    end
  end

  always_ff @(posedge clk)
    if (req_alloc) ent[free_idx] <= '{line: req_line, bpc: req_bpc, bid: req_bid};

  assign entry_valid = vld;
  assign entry_wp    = wp;

  // A freed entry must have been outstanding.
  a_fill_valid_entry: assert property (@(posedge clk) disable iff (!rst_n)
    fill_valid |-> vld[fill_idx]);
endmodule
