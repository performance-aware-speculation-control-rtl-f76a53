// Self-checking testbench of fetch_gate_bc. Random branch traffic with a
// different prediction accuracy in every 2000-cycle interval; a reference
// model in the testbench tracks the outstanding-branch count and the
// threshold of the accuracy table, and the wrong-path prediction must equal
// (count > threshold) every cycle. Counts how often gating was predicted
// and how many distinct thresholds were used.
module tb_fetch_gate_bc;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge for the asynchronous reset
  logic [1:0] fcnt, rcnt, ccnt;
  logic [7:0] scnt, bcr, thr;
  logic [2:0] bin;
  logic       iend, wp;
  int checks = 0, failures = 0, n_gate = 0;
  int ref_bcr = 0, ref_thr = 18, tot = 0, cor = 0;
  bit thr_used [int];

  fetch_gate_bc dut (.clk, .rst_n, .fetch_br_cnt(fcnt), .resolve_cnt(rcnt), .correct_cnt(ccnt),
                     .squash_cnt(scnt), .interval_end(iend), .wrong_path(wp), .bcr,
                     .threshold(thr), .acc_bin(bin));

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
    int miss_pm;   // mispredictions per mille
    fcnt = 0; rcnt = 0; ccnt = 0; scnt = 0; iend = 0;
    @(posedge clk); rst_n = 1; #1;
    for (int iv = 0; iv < 40; iv++) begin
      miss_pm = $urandom_range(0, 250);
      for (int c = 0; c < 2000; c++) begin
        int f, r, k;
        f = $urandom_range(0, 2);
        r = (ref_bcr > 30) ? $urandom_range(1, 2) : $urandom_range(0, 2);
        if (r > ref_bcr + f) r = ref_bcr + f;
        k = 0;
        for (int j = 0; j < r; j++) if ($urandom_range(0, 999) >= miss_pm) k++;
        fcnt = 2'(f); rcnt = 2'(r); ccnt = 2'(k);
        scnt = (k < r && $urandom_range(0, 3) == 0) ? 8'($urandom_range(0, 6)) : 8'd0;
        iend = (c == 1999);
        @(posedge clk); #1;
        if (iend) begin
          if (tot > 0) ref_thr = table_thr(cor, tot);
          tot = r; cor = k;
        end else begin
          tot += r; cor += k;
        end
        ref_bcr = ref_bcr + f - r - int'(scnt);
        if (ref_bcr < 0) ref_bcr = 0;
        thr_used[ref_thr] = 1;
        checks++;
        if (wp !== (ref_bcr > ref_thr) || int'(bcr) != ref_bcr || int'(thr) != ref_thr) begin
          failures++;
          if (failures < 10)
            $display("iv %0d c %0d: bcr=%0d/%0d thr=%0d/%0d wp=%0b", iv, c, bcr, ref_bcr,
                     thr, ref_thr, wp);
        end
        if (wp) n_gate++;
      end
    end
    checks++;
    if (n_gate == 0 || thr_used.num() < 4) begin
      failures++; $display("gating %0d cycles, %0d thresholds", n_gate, thr_used.num());
    end
    $display("gated cycles %0d, thresholds used %0d", n_gate, thr_used.num());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
