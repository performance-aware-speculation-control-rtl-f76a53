// Self-checking testbench of l2_mshr_wp (32 entries). Random L2 requests to
// a small pool of lines (so that merges and a full MSHR file happen),
// fills, and misprediction broadcasts whose branch IDs lie around the
// youngest ID handed out so far. A reference model of the entries decides
// merge/allocate/full, the entry index, the wrong-path bits and the
// useful-wrong-path events with their BPC; all are compared every cycle.
module tb_l2_mshr_wp;
  import spec_ctrl_pkg::*;
  localparam int N = 32;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge for the asynchronous reset
  logic rv, rmiss, rmerge, ralloc, rfull, fv, mv, uv;
  logic [57:0] rline;
  bpc_t rbpc, ubpc;
  bid_t rbid, mbid;
  logic [4:0] ridx, fidx;
  logic [N-1:0] ev, ew;
  int checks = 0, failures = 0;
  int n_merge = 0, n_alloc = 0, n_full = 0, n_wp = 0, n_useful = 0;

  typedef struct { bit v; bit wp; longint line; int bpc; int bid; } ent_t;
  ent_t m [N];
  bit   exp_uv = 0;
  int   exp_ubpc = 0;
  int   cur = 0;

  l2_mshr_wp dut (.clk, .rst_n, .req_valid(rv), .req_line(rline), .req_l2_miss(rmiss),
                  .req_bpc(rbpc), .req_bid(rbid), .req_merge(rmerge), .req_alloc(ralloc),
                  .req_full(rfull), .req_idx(ridx), .fill_valid(fv), .fill_idx(fidx),
                  .mispred_valid(mv), .mispred_bid(mbid), .useful_valid(uv),
                  .useful_bpc(ubpc), .entry_valid(ev), .entry_wp(ew));

  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // b older than or equal to a, IDs modulo 1024
  function automatic bit older_eq(int b, int a);
    return ((a - b + 1024) % 1024) < 512;
  endfunction

  initial begin
    int pool, fill_bias;
    rv = 0; rmiss = 0; rline = 0; rbpc = 0; rbid = 0; fv = 0; fidx = 0; mv = 0; mbid = 0;
    foreach (m[i]) m[i] = '{v: 0, wp: 0, line: 0, bpc: 0, bid: 0};
    @(posedge clk); rst_n = 1; #1;
    for (int c = 0; c < 30000; c++) begin
      int hit_i, free_i, vcount, pick;
      bit e_merge, e_alloc, e_full;
      pool      = ((c / 3000) % 2 == 0) ? 48 : 200;
      fill_bias = ((c / 3000) % 3 == 2) ? 10 : 2;
      cur = (cur + $urandom_range(0, 2)) % 1024;
      rv    = $urandom_range(0, 3) != 0;
      rline = 58'($urandom_range(0, pool - 1)) + 58'h123_4567_0000;
      rmiss = $urandom_range(0, 4) != 0;
      rbpc  = 16'($urandom);
      rbid  = 10'((cur - $urandom_range(0, 20) + 1024) % 1024);
      mv    = $urandom_range(0, 40) == 0;
      mbid  = 10'((cur - $urandom_range(0, 30) + 1024) % 1024);
      vcount = 0;
      foreach (m[i]) if (m[i].v) vcount++;
      fv = 0; fidx = 0;
      if (vcount > 0 && $urandom_range(0, 9) < fill_bias) begin
        pick = $urandom_range(0, vcount - 1);
        foreach (m[i]) if (m[i].v) begin
          if (pick == 0) begin fv = 1; fidx = 5'(i); end
          pick--;
        end
      end
      // reference decision
      hit_i = -1; free_i = -1;
      for (int i = N - 1; i >= 0; i--) begin
        if (m[i].v && m[i].line == longint'(rline)) hit_i = i;
        if (!m[i].v) free_i = i;
      end
      e_merge = rv && hit_i >= 0;
      e_alloc = rv && hit_i < 0 && rmiss && free_i >= 0;
      e_full  = rv && hit_i < 0 && rmiss && free_i < 0;
      #1;
      checks++;
      if (rmerge !== e_merge || ralloc !== e_alloc || rfull !== e_full ||
          (e_merge && int'(ridx) != hit_i) || (e_alloc && int'(ridx) != free_i)) begin
        failures++;
        if (failures < 10) $display("c%0d: merge %0b/%0b alloc %0b/%0b full %0b/%0b idx %0d", c,
                                    rmerge, e_merge, ralloc, e_alloc, rfull, e_full, ridx);
      end
      checks++;
      if (uv !== exp_uv || (exp_uv && int'(ubpc) != exp_ubpc)) begin
        failures++;
        if (failures < 10) $display("c%0d: useful %0b/%0b bpc %h/%h", c, uv, exp_uv, ubpc, exp_ubpc);
      end
      if (uv) n_useful++;
      if (e_merge) n_merge++;
      if (e_alloc) n_alloc++;
      if (e_full) n_full++;
      // reference update
      exp_uv = e_merge && m[hit_i].wp;
      if (exp_uv) exp_ubpc = m[hit_i].bpc;
      for (int i = 0; i < N; i++)
        if (m[i].v && mv && older_eq(int'(mbid), m[i].bid)) begin
          if (!m[i].wp) n_wp++;
          m[i].wp = 1;
        end
      if (fv) begin m[fidx].v = 0; m[fidx].wp = 0; end
      if (e_alloc) m[free_i] = '{v: 1, wp: mv && older_eq(int'(mbid), int'(rbid)),
                                 line: longint'(rline), bpc: int'(rbpc), bid: int'(rbid)};
      @(posedge clk); #1;
      checks++;
      for (int i = 0; i < N; i++)
        if (ev[i] !== m[i].v || (m[i].v && ew[i] !== m[i].wp)) begin
          failures++;
          if (failures < 10) $display("c%0d: entry %0d state %0b%0b expected %0b%0b", c, i,
                                      ev[i], ew[i], m[i].v, m[i].wp);
          break;
        end
    end
    $display("merge %0d alloc %0d full %0d wp-set %0d useful %0d", n_merge, n_alloc, n_full,
             n_wp, n_useful);
    checks++;
    if (n_merge == 0 || n_alloc == 0 || n_full == 0 || n_wp == 0 || n_useful == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
