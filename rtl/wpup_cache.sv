// Branch-PC based wrong-path usefulness predictor: the WPUP cache.
//
// A set-associative, tag-only cache (no data store) of the BPC tags of
// branches whose wrong path was seen to prefetch useful lines. Training
// (`train_valid`) inserts a BPC; when its set is full the least recently
// used way is overwritten. A lookup (`lookup_en`, keyed by the fetch
// engine's LBPC) reports whether the BPC is present; lookups do not touch
// the LRU state, since frequent lookups say nothing about usefulness. These
// rules and the 32-entry, 4-way size with 13 tag bits, a valid bit and
// 2 LRU bits per entry are the document's.
// This design's own choices: the 3 set-index bits are BPC bits
// [INDEX_LSB+2:INDEX_LSB] with INDEX_LSB = 2, because instruction PCs are
// word aligned and their two lowest bits would leave most sets unused; the
// 13-bit tag is the other 13 BPC bits. The LRU state is a 2-bit age per
// way (0 = most recent); training a BPC that is already present makes it
// the most recent; an invalid way is filled before any valid one.
// It needs at least two sets (ENTRIES >= 2*WAYS).
// Timing: lookup is combinational; training takes effect at the clock edge.
module wpup_cache
  import spec_ctrl_pkg::*;
#(
  parameter int unsigned ENTRIES   = 32,
  parameter int unsigned WAYS      = 4,
  parameter int unsigned INDEX_LSB = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic lookup_en,
  input  bpc_t lookup_bpc,
  output logic lookup_hit,
  input  logic train_valid,
  input  bpc_t train_bpc,
  output logic train_evict      // training overwrote a valid entry
);
  localparam int unsigned SETS  = ENTRIES / WAYS;
  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned TAG_W = BPC_W - IDX_W;
  localparam int unsigned AGE_W = (WAYS > 1) ? $clog2(WAYS) : 1;

  typedef logic [TAG_W-1:0] tag_t;
  typedef logic [AGE_W-1:0] age_t;

  logic [WAYS-1:0] vld [SETS];
  tag_t            tag [SETS][WAYS];
  age_t            age [SETS][WAYS];


  // The BPC with its index bits taken out.
  function automatic tag_t tag_of(bpc_t b);
    tag_t t;
    int   k;
    t = '0;
    k = 0;
    for (int i = 0; i < int'(BPC_W); i++)
      if (i < int'(INDEX_LSB) || i >= int'(INDEX_LSB + IDX_W)) begin
        t[k] = b[i];
        k++;
      end
    return t;
  endfunction

  // lookup
  always_comb begin
    logic [IDX_W-1:0] s;
    s = lookup_bpc[INDEX_LSB +: IDX_W];
    lookup_hit = 1'b0;
    for (int w = 0; w < int'(WAYS); w++)
      if (vld[s][w] && tag[s][w] == tag_of(lookup_bpc)) lookup_hit = lookup_en;
  end

  // training: find the way to write
  logic [IDX_W-1:0] ts;
  tag_t             tt;
  logic             t_hit, t_free;
  int unsigned      t_way;

  always_comb begin
    ts     = train_bpc[INDEX_LSB +: IDX_W];
    tt     = tag_of(train_bpc);
    t_hit  = 1'b0;
    t_free = 1'b0;
    t_way  = 0;
    for (int w = int'(WAYS) - 1; w >= 0; w--)
      if (age[ts][w] == age_t'(WAYS - 1)) t_way = w;
    for (int w = int'(WAYS) - 1; w >= 0; w--)
      if (!vld[ts][w]) begin
        t_free = 1'b1;
        t_way  = w;
      end
    for (int w = 0; w < int'(WAYS); w++)
      if (vld[ts][w] && tag[ts][w] == tt) begin
        t_hit = 1'b1;
        t_way = w;
      end
  end

  assign train_evict = train_valid && !t_hit && !t_free;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(SETS); s++) begin
        vld[s] <= '0;
        for (int w = 0; w < int'(WAYS); w++) age[s][w] <= age_t'(w);
      end
    end else if (train_valid) begin
      vld[ts][t_way] <= 1'b1;
      for (int w = 0; w < int'(WAYS); w++)
        if (w == int'(t_way))                 age[ts][w] <= '0;
        else if (age[ts][w] < age[ts][t_way]) age[ts][w] <= age[ts][w] + 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (train_valid) tag[ts][t_way] <= tt;
endmodule
