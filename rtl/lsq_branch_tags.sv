// Branch tags of the load/store queue entries.
//
// For each of the ENTRIES LSQ entries (32 in the document's baseline) it
// stores the BPC tag (youngest branch fetched before the load/store) and the
// branch ID of that load/store. Both are written when the LSQ allocates the
// entry and read when the entry's memory request misses in the L2 cache, to
// be copied into the MSHR. The fields are bookkeeping only and take no part
// in the LSQ's address search, as the document points out. The LSQ itself
// (addresses, ordering, allocation policy) is outside this block.
// Timing: write at the clock edge; the read is combinational.
module lsq_branch_tags
  import spec_ctrl_pkg::*;
#(
  parameter int unsigned ENTRIES = 32
) (
  input  logic                        clk,
  input  logic                        alloc_valid,
  input  logic [$clog2(ENTRIES)-1:0]  alloc_idx,
  input  bpc_t                        alloc_bpc,
  input  bid_t                        alloc_bid,
  input  logic [$clog2(ENTRIES)-1:0]  rd_idx,
  output bpc_t                        rd_bpc,
  output bid_t                        rd_bid
);
  typedef struct packed {
    bpc_t bpc;
    bid_t bid;
  } tag_t;

  tag_t mem [ENTRIES];

  always_ff @(posedge clk)
    if (alloc_valid) mem[alloc_idx] <= '{bpc: alloc_bpc, bid: alloc_bid};

  assign rd_bpc = mem[rd_idx].bpc;
  assign rd_bid = mem[rd_idx].bid;
endmodule
