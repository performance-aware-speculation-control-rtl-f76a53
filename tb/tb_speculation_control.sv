// Self-checking testbench of speculation_control with a 2000-cycle
// interval. A reference model holds the outstanding-branch count, the
// accuracy-table threshold, the phase counter and the set of branch PCs
// trained into the WPUP cache (8 PCs in 8 different sets, so nothing is
// evicted). Every cycle the gate, the wrong-path prediction, the WPUP
// verdict and the lookup enable are compared with the model. The selected
// predictor alternates between intervals. Counts gated cycles and cycles
// where each predictor overrode the gating.
module tb_speculation_control;
  import spec_ctrl_pkg::*;
  localparam int I = 2000;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge for the asynchronous reset
  wpup_sel_e sel;
  logic [1:0] fcnt, rcnt, ccnt;
  logic [7:0] scnt, bcr, thr;
  logic [2:0] bin;
  bpc_t lbpc, ubpc;
  logic uv, gate, wp, useful, ph, pl, ph_hit, pev, iend;
  logic [4:0] wpuc;
  int checks = 0, failures = 0;
  int n_gate = 0, n_pc_ovr = 0, n_ph_ovr = 0;
  int m_bcr = 0, m_thr = 18, tot = 0, cor = 0, m_wpuc = 0;
  bit m_phase = 0;
  bit trained [bpc_t];
  bpc_t pool [16];

  speculation_control #(.INTERVAL(I)) dut (
    .clk, .rst_n, .wpup_sel(sel), .fetch_br_cnt(fcnt), .resolve_cnt(rcnt), .correct_cnt(ccnt),
    .squash_cnt(scnt), .lbpc, .useful_valid(uv), .useful_bpc(ubpc), .gate_fetch(gate),
    .wrong_path(wp), .wpup_useful(useful), .bcr, .threshold(thr), .acc_bin(bin),
    .phase_useful(ph), .wpuc, .pc_lookup(pl), .pc_hit(ph_hit), .pc_evict(pev),
    .interval_end(iend));

  always #5 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int table_thr(int c, int t);
    real a;
    a = 100.0 * real'(c) / real'(t);
    if (a >= 99.0) return 18;
    if (a >= 97.0) return 16;
    if (a >= 95.0) return 13;
    if (a >= 93.0) return 12;
    if (a >= 90.0) return 11;
    if (a >= 85.0) return 7;
    return 3;
  endfunction

  initial begin
    int miss_pm, use_pm;
    sel = WPUP_PHASE; fcnt = 0; rcnt = 0; ccnt = 0; scnt = 0; lbpc = 0; uv = 0; ubpc = 0;
    for (int i = 0; i < 16; i++) pool[i] = bpc_t'({11'($urandom), 3'(i % 8), 2'b00});
    @(negedge clk); rst_n = 1;
    for (int c = 0; c < 24 * I; c++) begin
      int f, r, k;
      bit e_iend, e_use, e_gate;
      if (c % I == 0) begin
        miss_pm = $urandom_range(0, 200);
        use_pm  = ($urandom_range(0, 1) == 0) ? 1 : 8;
        sel     = ((c / I) % 2 == 0) ? WPUP_PHASE : WPUP_PC;
      end
      f = $urandom_range(0, 2);
      r = (m_bcr > 25) ? 2 : $urandom_range(0, 2);
      if (r > m_bcr + f) r = m_bcr + f;
      k = 0;
      for (int j = 0; j < r; j++) if ($urandom_range(0, 999) >= miss_pm) k++;
      fcnt = 2'(f); rcnt = 2'(r); ccnt = 2'(k); scnt = 0;
      uv   = $urandom_range(0, 999) < use_pm;
      ubpc = pool[$urandom_range(0, 7)];
      lbpc = pool[$urandom_range(0, 15)];
      #1;
      e_iend = (c % I) == I - 1;
      e_use  = (sel == WPUP_PC) ? (m_bcr > m_thr && trained.exists(lbpc)) : m_phase;
      e_gate = (m_bcr > m_thr) && !e_use;
      checks++;
      if (gate !== e_gate || wp !== (m_bcr > m_thr) || iend !== e_iend ||
          pl !== (m_bcr > m_thr && sel == WPUP_PC) || useful !== e_use) begin
        failures++;
        if (failures < 10)
          $display("c%0d: gate %0b/%0b wp %0b bcr %0d/%0d thr %0d/%0d use %0b/%0b iend %0b", c,
                   gate, e_gate, wp, bcr, m_bcr, thr, m_thr, useful, e_use, iend);
      end
      if (e_gate) n_gate++;
      if (m_bcr > m_thr && e_use && sel == WPUP_PC) n_pc_ovr++;
      if (m_bcr > m_thr && e_use && sel == WPUP_PHASE) n_ph_ovr++;
      @(posedge clk); #1;
      m_bcr = m_bcr + f - r;
      if (e_iend) begin
        if (tot > 0) m_thr = table_thr(cor, tot);
        tot = r; cor = k;
      end else begin
        tot += r; cor += k;
      end
      begin
        int now;
        now = (uv && m_wpuc < 31) ? m_wpuc + 1 : m_wpuc;
        if (e_iend) begin m_phase = now > 5; m_wpuc = 0; end
        else m_wpuc = now;
      end
      if (uv) trained[ubpc] = 1;
      @(negedge clk);
    end
    $display("gated %0d, PC-WPUP overrides %0d, phase-WPUP overrides %0d", n_gate, n_pc_ovr,
             n_ph_ovr);
    checks++;
    if (n_gate == 0 || n_pc_ovr == 0 || n_ph_ovr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
