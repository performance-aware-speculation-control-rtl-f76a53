// Self-checking testbench of wpup_cache at the sizes the predictor is
// meant for: 8, 16, 32 (default), 64 and 128 entries, all 4-way. For each
// size a reference keeps, per set, the trained branch tags in recency
// order; training moves a tag to the front and drops the last one of a
// full set. Random lookups are interleaved and must neither change that
// order nor miss a present tag. Checks the hit result of every lookup and
// the evict flag of every training, and that every size saw hits, misses
// and evictions.
module tb_wpup_cache;
  import spec_ctrl_pkg::*;
  localparam int NS = 5;
  localparam int SIZES [NS] = '{8, 16, 32, 64, 128};
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge for the asynchronous reset
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit done [NS];

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NS; g++) begin : sz
    localparam int SETS = SIZES[g] / 4;
    localparam int POOL = SIZES[g] + 16;
    logic le, lh, tv, te;
    bpc_t lb, tb_bpc;
    bpc_t lru [SETS][$];   // front = most recent
    bpc_t pool [POOL];
    int   n_hit = 0, n_miss = 0, n_evict = 0;

    wpup_cache #(.ENTRIES(SIZES[g])) dut (
      .clk, .rst_n, .lookup_en(le), .lookup_bpc(lb), .lookup_hit(lh),
      .train_valid(tv), .train_bpc(tb_bpc), .train_evict(te));

    function automatic int set_of(bpc_t b);
      return (int'(b) >> 2) % SETS;
    endfunction

    function automatic bit present(bpc_t b);
      int st;
      st = set_of(b);
      for (int k = 0; k < lru[st].size(); k++) if (lru[st][k] == b) return 1;
      return 0;
    endfunction

    initial begin
      le = 0; lb = 0; tv = 0; tb_bpc = 0;
      for (int k = 0; k < POOL; k++) pool[k] = {16'($urandom) & 16'hFFFC};
      @(negedge clk); rst_n = 1;
      for (int c = 0; c < 20000; c++) begin
        bit exp_hit, exp_ev;
        int s;
        le = $urandom_range(0, 3) != 0;
        lb = pool[$urandom_range(0, POOL - 1)];
        tv = $urandom_range(0, 2) == 0;
        tb_bpc = pool[$urandom_range(0, POOL - 1)];
        if (c == 10000) for (int k = 0; k < POOL; k++) pool[k] = {16'($urandom) & 16'hFFFC};
        exp_hit = le && present(lb);
        s = set_of(tb_bpc);
        exp_ev = tv && !present(tb_bpc) && lru[s].size() == 4;
        #1;
        checks += 2;
        if (lh !== exp_hit) begin
          failures++;
          if (failures < 10) $display("%0d entries c%0d lookup %h: hit %0b expected %0b",
                                      SIZES[g], c, lb, lh, exp_hit);
        end
        if (te !== exp_ev) begin
          failures++;
          if (failures < 10) $display("%0d entries c%0d train %h: evict %0b expected %0b",
                                      SIZES[g], c, tb_bpc, te, exp_ev);
        end
        if (exp_hit) n_hit++; else if (le) n_miss++;
        if (exp_ev) n_evict++;
        @(posedge clk); #1;
        if (tv) begin
          for (int k = 0; k < lru[s].size(); k++)
            if (lru[s][k] == tb_bpc) begin lru[s].delete(k); break; end
          if (lru[s].size() == 4) void'(lru[s].pop_back());
          lru[s].push_front(tb_bpc);
        end
        @(negedge clk);
      end
      checks++;
      if (n_hit == 0 || n_miss == 0 || n_evict == 0) failures++;
      $display("%0d entries: hits %0d misses %0d evictions %0d", SIZES[g], n_hit, n_miss, n_evict);
      done[g] = 1;
    end
  end

  initial begin
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
