// Shared widths and types of the wrong-path-usefulness speculation control.
//
// A branch is identified by the lower 16 bits of its PC (the BPC tag) and,
// inside the out-of-order core, by a 10-bit branch ID (BID) that is handed
// out in program order and wraps around. Both widths follow the hardware
// cost breakdown of the scheme. The ID age comparison below is this
// design's own: IDs are compared modulo 2**BID_W, which is exact as long as
// fewer than 2**(BID_W-1) branches are in flight (the 8-bit branch counter
// bounds that to 255).
package spec_ctrl_pkg;

  localparam int unsigned BPC_W = 16;   // branch PC tag width
  localparam int unsigned BID_W = 10;   // branch ID width

  typedef logic [BPC_W-1:0] bpc_t;
  typedef logic [BID_W-1:0] bid_t;

  // Which wrong-path usefulness predictor overrides the gating decision.
  typedef enum logic {
    WPUP_PHASE = 1'b0,   // phase-based: one counter per 100K-cycle interval
    WPUP_PC    = 1'b1    // branch-PC based: WPUP cache looked up with LBPC
  } wpup_sel_e;

  // True when branch `b` is older than or equal to branch `a`, i.e. when
  // `a` was fetched at or after `b` in program order.
  function automatic logic bid_older_or_equal(bid_t b, bid_t a);
    bid_t diff;
    diff = a - b;
    return diff[BID_W-1] == 1'b0;
  endfunction

endpackage
