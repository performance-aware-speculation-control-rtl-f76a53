// End-to-end testbench of wpup_spec_ctrl_top at its default parameters
// (100K-cycle intervals, 11 front-end stages, 32 LSQ entries, 32 MSHRs,
// 32-entry 4-way WPUP cache, phase threshold 5). It is also the full-size
// test.
//
// The testbench plays the core. Its program repeats a four-packet loop:
// a hammock branch H (six PCs that share one WPUP cache set), a load of
// the hammock's data line, a packet with two filler branches, and a load
// of a line of its own. A mispredicted branch sends fetch down a wrong
// path that is the same instruction stream with different load addresses,
// except the hammock load: in "useful" intervals it reads the same line as
// the correct path (the wrong path prefetches it), in "useless" intervals
// it does not. Branches resolve in order 25-45 cycles after fetch; a
// misprediction squashes every younger branch, flushes the front end and
// restarts fetch after the branch. Loads enter the LSQ when they leave the
// front end and go to the L2 a few cycles later, one per cycle; a
// wrong-path load still waiting for the L2 at a recovery is dropped. The
// L2 misses on lines never filled; a miss is filled 300 cycles after its
// MSHR is allocated. Fetch stops while gate_fetch is high, and the front
// end stalls while 20 loads wait for the L2.
//
// Checked against the testbench's own bookkeeping: the outstanding-branch
// count every cycle, the threshold after every interval (accuracy table),
// the BPC tag of every packet leaving the front end (youngest branch
// fetched before it), merge/allocate/full of every L2 request, and every
// useful-wrong-path event (a merge into a line allocated by a wrong-path
// load whose branch has been resolved mispredicted, with that load's BPC).
// Six intervals alternate useful and useless wrong paths and both
// predictors; each mechanism must occur at least once.
module tb_wpup_spec_ctrl_top;
  import spec_ctrl_pkg::*;
  localparam int INTERVAL = 100_000;
  localparam int N_IV     = 6;
  localparam int MEM_LAT  = 300;
  localparam int FE       = 11;
  localparam int LSQ_N    = 32;
  localparam int RES_LAT  = 25;     // minimum fetch-to-resolve latency
  localparam int T_TAB [7] = '{18, 16, 13, 12, 11, 7, 3};

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge for the asynchronous reset
  always #5 clk = ~clk;

  wpup_sel_e   wpup_sel;
  logic        fetch_valid, fe_stall, gate_fetch, fe_out_valid;
  logic [1:0]  br_valid;
  logic [1:0][63:0] br_pc;
  bpc_t        lbpc, fe_out_bpc, mispred_bpc, useful_bpc;
  logic [1:0]  resolve_cnt, correct_cnt;
  logic        mispred_valid, lsq_alloc_valid, l2_req_valid, l2_req_miss;
  bid_t        mispred_bid, lsq_alloc_bid;
  logic [7:0]  squash_cnt, bcr, threshold;
  logic [$clog2(LSQ_N)-1:0] lsq_alloc_idx, l2_req_lsq_idx;
  logic [4:0]  l2_req_mshr, l2_fill_mshr;
  logic [57:0] l2_req_line;
  logic        l2_req_merge, l2_req_alloc, l2_req_full, l2_fill_valid;
  logic        wrong_path, wpup_useful, useful_valid, phase_useful, pc_lookup, pc_hit;
  logic        pc_evict, interval_end;
  logic [2:0]  acc_bin;
  logic [4:0]  wpuc;
  logic [31:0] mshr_valid, mshr_wp;

  wpup_spec_ctrl_top dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int n_gate = 0, n_pc_ovr = 0, n_ph_ovr = 0, n_mispred = 0, n_squash = 0, n_stall = 0;
  int n_full = 0, n_merge = 0, n_useful = 0, n_evict = 0, n_two_br = 0, n_thr_chg = 0;
  int n_wp_mark = 0, n_phase_on = 0, n_bid_wrap = 0;

  task automatic fail(string msg);
    failures++;
    if (failures <= 20) $display("[%0t] %s", $time, msg);
  endtask

  // ---------------------------------------------------------------- program
  function automatic bpc_t h_pc(int p);  // six hammock branch PCs, one cache set
    return bpc_t'(16'h4000 + 16'(((p / 4) % 6) * 32));
  endfunction

  // ---------------------------------------------------------- bookkeeping
  typedef struct { int bid; int pos; bit mis; int due; bpc_t pc; } br_t;
  typedef struct { bit load; longint line; bit wp; bpc_t bpc; int bid; int age; } pkt_t;
  typedef struct { longint line; int lsq; bit wp; bpc_t bpc; int bid; int ready; } req_t;
  typedef struct { bit wp_alloc; bit wp_known; bpc_t bpc; int bid; int fill_at; int idx; } miss_t;

  br_t    brq [$];          // outstanding branches, oldest first
  pkt_t   fe  [$];          // packets in the front end
  req_t   l2q [$];          // loads waiting for the L2

  function automatic bit lsq_in_use(int slot);
    foreach (l2q[i]) if (l2q[i].lsq == slot) return 1;
    return 0;
  endfunction
  miss_t  out [longint];    // outstanding misses by line
  bit     present [longint];
  int     pos = 0;          // fetch position in the program
  bit     on_wp = 0;        // fetching down a wrong path
  int     next_bid = 0, last_bid = 0;
  bpc_t   m_lbpc = '0;
  int     uniq = 0, lsq_ptr = 0;
  int     tot = 0, cor = 0, m_thr = T_TAB[0];
  bit     exp_useful = 0;
  bpc_t   exp_useful_bpc;

  function automatic int table_thr(int c, int t);
    real a;
    a = 100.0 * real'(c) / real'(t);
    if (a >= 99.0) return T_TAB[0];
    if (a >= 97.0) return T_TAB[1];
    if (a >= 95.0) return T_TAB[2];
    if (a >= 93.0) return T_TAB[3];
    if (a >= 90.0) return T_TAB[4];
    if (a >= 85.0) return T_TAB[5];
    return T_TAB[6];
  endfunction

  initial begin
    repeat (N_IV * INTERVAL + 10_000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h_mis_pm [N_IV] = '{300, 150, 250, 120, 300, 200};
    wpup_sel = WPUP_PHASE;
    fetch_valid = 0; fe_stall = 0; br_valid = 0; br_pc = '0; mispred_bpc = 0;
    resolve_cnt = 0; correct_cnt = 0; mispred_valid = 0; mispred_bid = 0; squash_cnt = 0;
    lsq_alloc_valid = 0; lsq_alloc_idx = 0; lsq_alloc_bid = 0;
    l2_req_valid = 0; l2_req_miss = 0; l2_req_line = 0; l2_req_lsq_idx = 0;
    l2_fill_valid = 0; l2_fill_mshr = 0;
    @(negedge clk); rst_n = 1;

    for (int cyc = 0; cyc < N_IV * INTERVAL; cyc++) begin
      int  iv, nres, ncor, fill_line_found;
      bit  useful_iv, iend, mis_now, fetch_now, adv;
      longint fill_line;
      br_t mb;
      iv        = cyc / INTERVAL;
      useful_iv = (iv % 2) == 0;
      iend      = (cyc % INTERVAL) == INTERVAL - 1;
      wpup_sel  = (iv % 4 == 1 || iv % 4 == 2) ? WPUP_PC : WPUP_PHASE;

      // ---- branch resolution, in order
      nres = 0; ncor = 0; mis_now = 0;
      while (nres < 2 && brq.size() > 0 && brq[0].due <= cyc && !mis_now) begin
        if (brq[0].mis) begin
          if (nres > 0) break;
          mis_now = 1;
          mb = brq.pop_front();
        end else begin
          void'(brq.pop_front());
          ncor++;
        end
        nres++;
      end
      resolve_cnt   = 2'(nres);
      correct_cnt   = 2'(ncor);
      mispred_valid = mis_now;
      mispred_bid   = mis_now ? bid_t'(mb.bid) : '0;
      mispred_bpc   = mis_now ? mb.pc : '0;
      squash_cnt    = mis_now ? 8'(brq.size()) : 8'd0;

      // ---- fill
      l2_fill_valid = 0; fill_line_found = 0; fill_line = 0;
      foreach (out[l]) if (out[l].fill_at == cyc) begin
        l2_fill_valid = 1; l2_fill_mshr = 5'(out[l].idx); fill_line = l; fill_line_found = 1;
      end

      // ---- front-end output into the LSQ
      fe_stall = l2q.size() >= 20;
      adv = !fe_stall && !mis_now;
      lsq_alloc_valid = 0;
      if (fe.size() > 0 && fe[0].age >= FE) begin
        checks++;
        if (!fe_out_valid || fe_out_bpc != fe[0].bpc)
          fail($sformatf("front-end tag %0b %h expected %h", fe_out_valid, fe_out_bpc, fe[0].bpc));
        if (adv && fe[0].load) begin
          // an LSQ entry stays in use while its load waits for the L2
          while (lsq_in_use(lsq_ptr)) lsq_ptr = (lsq_ptr + 1) % LSQ_N;
          lsq_alloc_valid = 1;
          lsq_alloc_idx   = $bits(lsq_alloc_idx)'(lsq_ptr);
          lsq_alloc_bid   = bid_t'(fe[0].bid);
        end
      end else begin
        checks++;
        if (fe_out_valid) fail("front end output without packet");
      end

      // ---- L2 request
      l2_req_valid = 0;
      if (!mis_now && l2q.size() > 0 && l2q[0].ready <= cyc) begin
        l2_req_valid   = 1;
        l2_req_line    = 58'(l2q[0].line);
        l2_req_lsq_idx = $bits(l2_req_lsq_idx)'(l2q[0].lsq);
        l2_req_miss    = !present.exists(l2q[0].line);
      end

      // ---- fetch
      #1;
      fetch_now = !gate_fetch && !fe_stall && !mis_now;
      fetch_valid = fetch_now;
      br_valid = 0;
      br_pc = {$urandom, $urandom, $urandom, $urandom};
      if (pos % 4 == 0) begin br_valid = 2'b01; br_pc[0][15:0] = h_pc(pos); end
      if (pos % 4 == 2) begin
        br_valid = 2'b11;
        br_pc[0][15:0] = 16'h8000 + 16'((pos % 24) * 4);
        br_pc[1][15:0] = 16'h9000 + 16'((pos % 40) * 4);
      end
      #1;

      // ---- combinational checks
      if (l2_req_valid) begin
        bit e_merge, e_alloc, e_full;
        e_merge = out.exists(l2q[0].line);
        e_alloc = !e_merge && l2_req_miss && out.num() < 32;
        e_full  = !e_merge && l2_req_miss && out.num() >= 32;
        checks++;
        if (l2_req_merge !== e_merge || l2_req_alloc !== e_alloc || l2_req_full !== e_full)
          fail($sformatf("L2 request m%0b a%0b f%0b expected m%0b a%0b f%0b", l2_req_merge,
                         l2_req_alloc, l2_req_full, e_merge, e_alloc, e_full));
      end
      checks++;
      if (useful_valid !== exp_useful || (exp_useful && useful_bpc !== exp_useful_bpc))
        fail($sformatf("useful %0b %h expected %0b %h", useful_valid, useful_bpc, exp_useful,
                       exp_useful_bpc));
      if (gate_fetch) n_gate++;
      if (wrong_path && wpup_useful && wpup_sel == WPUP_PC) n_pc_ovr++;
      if (wrong_path && wpup_useful && wpup_sel == WPUP_PHASE) n_ph_ovr++;
      if (fe_stall) n_stall++;
      if (useful_valid) n_useful++;
      if (pc_evict) n_evict++;
      if (phase_useful) n_phase_on++;

      @(posedge clk);
      #1;
      // ---------------------------------------------- bookkeeping update
      exp_useful = 0;
      // accuracy counters
      if (iend) begin
        int nt;
        nt = (tot > 0) ? table_thr(cor, tot) : m_thr;
        if (nt != m_thr) n_thr_chg++;
        m_thr = nt;
        tot = nres; cor = ncor;
      end else begin
        tot += nres; cor += ncor;
      end
      // L2 request outcome
      if (l2_req_valid) begin
        req_t r;
        r = l2q[0];
        if (out.exists(r.line)) begin
          n_merge++;
          if (out[r.line].wp_known) begin
            exp_useful = 1; exp_useful_bpc = out[r.line].bpc;
          end
          void'(l2q.pop_front());
        end else if (!l2_req_miss) begin
          void'(l2q.pop_front());
        end else if (out.num() < 32) begin
          out[r.line] = '{wp_alloc: r.wp, wp_known: 0, bpc: r.bpc, bid: r.bid, fill_at: cyc + MEM_LAT,
                          idx: int'(l2_req_mshr)};
          void'(l2q.pop_front());
        end else n_full++;
      end
      if (fill_line_found) begin
        out.delete(fill_line);
        present[fill_line] = 1;
      end
      // LSQ allocation queues an L2 request
      if (lsq_alloc_valid) begin
        l2q.push_back('{line: fe[0].line, lsq: lsq_ptr, wp: fe[0].wp, bpc: fe[0].bpc, bid: fe[0].bid,
                        ready: cyc + 3});
        lsq_ptr = (lsq_ptr + 1) % LSQ_N;
      end
      // front end advances
      if (mis_now) fe.delete();
      else if (!fe_stall) begin
        if (fe.size() > 0 && fe[0].age >= FE) void'(fe.pop_front());
        foreach (fe[i]) fe[i].age++;
      end
      // misprediction recovery
      if (mis_now) begin
        n_mispred++;
        n_squash += brq.size();
        brq.delete();
        // An outstanding miss is marked when its branch ID is the same as or
        // younger than the mispredicted one, modulo 1024. A wrong-path miss
        // must always be marked; a correct-path miss is marked only when it
        // has been outstanding while 512 or more branch IDs went by, so that
        // its ID wraps around (counted, not an error).
        foreach (out[l]) if (!out[l].wp_known) begin
          checks++;
          if (bid_older_or_equal(bid_t'(mb.bid), bid_t'(out[l].bid))) begin
            out[l].wp_known = 1;
            if (out[l].wp_alloc) n_wp_mark++;
            else n_bid_wrap++;
          end else if (out[l].wp_alloc) begin
            fail($sformatf("wrong-path miss %h not marked", l));
          end
        end
        for (int i = l2q.size() - 1; i >= 0; i--) if (l2q[i].wp) l2q.delete(i);
        on_wp    = 0;
        pos      = mb.pos + 1;
        m_lbpc   = mb.pc;
        last_bid = mb.bid;
        next_bid = (mb.bid + 1) % 1024;
      end
      // fetch of one packet
      if (fetch_now) begin
        pkt_t pk;
        pk = '{load: 0, line: 0, wp: on_wp, bpc: m_lbpc, bid: last_bid, age: 1};
        if (pos % 4 == 1) begin
          pk.load = 1;
          if (on_wp && !useful_iv) begin pk.line = 64'h300_0000 + longint'(uniq); uniq++; end
          else pk.line = 64'h10_0000 + longint'(pos);
        end
        if (pos % 4 == 3) begin
          pk.load = 1;
          if (on_wp) begin pk.line = 64'h300_0000 + longint'(uniq); uniq++; end
          else pk.line = 64'h40_0000 + longint'(pos);
        end
        fe.push_back(pk);
        for (int s = 0; s < 2; s++) if (br_valid[s]) begin
          br_t b;
          int  pm;
          pm = (pos % 4 == 0) ? h_mis_pm[iv] : 20;
          b = '{bid: next_bid, pos: pos, mis: $urandom_range(0, 999) < pm,
                due: cyc + RES_LAT + $urandom_range(0, 20), pc: bpc_t'(br_pc[s][15:0])};
          if (b.mis && !on_wp) on_wp = 1;
          else b.mis = 0;   // a wrong-path branch is squashed before it resolves
          brq.push_back(b);
          last_bid = next_bid;
          next_bid = (next_bid + 1) % 1024;
          m_lbpc   = bpc_t'(br_pc[s][15:0]);
        end
        if (br_valid == 2'b11) n_two_br++;
        pos++;
      end
      // checks on registered state
      checks += 2;
      if (int'(bcr) != brq.size()) fail($sformatf("bcr %0d expected %0d", bcr, brq.size()));
      if (int'(threshold) != m_thr) fail($sformatf("threshold %0d expected %0d", threshold, m_thr));
      @(negedge clk);
    end

    $display("gated cycles %0d, PC-WPUP overrides %0d, phase-WPUP overrides %0d", n_gate,
             n_pc_ovr, n_ph_ovr);
    $display("mispredictions %0d, squashed branches %0d, stalls %0d, MSHR full %0d", n_mispred,
             n_squash, n_stall, n_full);
    $display("merges %0d, wrong-path marks %0d, useful events %0d, WPUP evictions %0d",
             n_merge, n_wp_mark, n_useful, n_evict);
    $display("two-branch packets %0d, threshold changes %0d, phase-useful cycles %0d", n_two_br,
             n_thr_chg, n_phase_on);
    $display("correct-path misses marked after branch-ID wrap-around %0d", n_bid_wrap);
    checks++;
    if (n_gate == 0)     fail("fetch never gated");
    checks++;
    if (n_pc_ovr == 0)   fail("PC-based WPUP never overrode gating");
    checks++;
    if (n_ph_ovr == 0)   fail("phase-based WPUP never overrode gating");
    checks++;
    if (n_mispred == 0 || n_squash == 0) fail("no misprediction recovery with squash");
    checks++;
    if (n_stall == 0)    fail("front end never stalled");
    checks++;
    if (n_full == 0)     fail("MSHRs never full");
    checks++;
    if (n_wp_mark == 0 || n_useful == 0) fail("no useful wrong-path event");
    checks++;
    if (n_evict == 0)    fail("no WPUP cache eviction");
    checks++;
    if (n_two_br == 0)   fail("no two-branch packet");
    checks++;
    if (n_thr_chg == 0)  fail("threshold never changed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
