// Self-checking testbench of bpred_accuracy_monitor. Each interval feeds a
// chosen number of resolved and correctly predicted branches, then pulses
// interval_end and checks the threshold taken for the next interval
// against the accuracy bins worked out here in floating point. Directed
// cases: exactly 99% must give 18 and exactly 95% must give 13, as the
// scheme's description states; an interval without branches keeps the
// threshold. A second instance uses the aggressive-processor table.
module tb_bpred_accuracy_monitor;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge for the asynchronous reset
  logic [1:0] resolve_cnt, correct_cnt;
  logic       interval_end;
  logic [7:0] thr, thr_a;
  logic [2:0] bin, bin_a;
  int checks = 0, failures = 0;
  int bins_seen [7];

  localparam int unsigned T_BASE [7] = '{18, 16, 13, 12, 11, 7, 3};
  localparam int unsigned T_AGGR [7] = '{60, 50, 40, 30, 20, 15, 13};

  bpred_accuracy_monitor dut (.clk, .rst_n, .resolve_cnt, .correct_cnt,
                              .interval_end, .threshold(thr), .acc_bin(bin));
  bpred_accuracy_monitor #(.THRESH(T_AGGR)) dut_a (.clk, .rst_n, .resolve_cnt,
                              .correct_cnt, .interval_end, .threshold(thr_a), .acc_bin(bin_a));

  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_bin(int c, int t);
    real a;
    a = 100.0 * real'(c) / real'(t);
    if (a >= 99.0) return 0;
    if (a >= 97.0) return 1;
    if (a >= 95.0) return 2;
    if (a >= 93.0) return 3;
    if (a >= 90.0) return 4;
    if (a >= 85.0) return 5;
    return 6;
  endfunction

  // Feed `t` branches of which `c` correct, two per cycle at most.
  task automatic interval(int c, int t, int exp_bin);
    int left_t, left_c, r, k;
    left_t = t; left_c = c;
    while (left_t > 0) begin
      r = (left_t >= 2) ? $urandom_range(1, 2) : 1;
      k = (left_c >= r) ? r : left_c;
      resolve_cnt = 2'(r); correct_cnt = 2'(k);
      left_t -= r; left_c -= k;
      @(posedge clk); #1;
    end
    resolve_cnt = 0; correct_cnt = 0;
    interval_end = 1;
    @(posedge clk); #1;
    interval_end = 0;
    checks += 2;
    if (int'(thr) != int'(T_BASE[exp_bin]) || int'(bin) != exp_bin) begin
      failures++;
      $display("c=%0d t=%0d: thr=%0d bin=%0d expected %0d/%0d", c, t, thr, bin,
               T_BASE[exp_bin], exp_bin);
    end
    if (int'(thr_a) != int'(T_AGGR[exp_bin])) begin
      failures++;
      $display("aggressive: c=%0d t=%0d thr=%0d expected %0d", c, t, thr_a, T_AGGR[exp_bin]);
    end
    bins_seen[exp_bin]++;
  endtask

  initial begin
    resolve_cnt = 0; correct_cnt = 0; interval_end = 0;
    @(posedge clk); rst_n = 1; #1;
    checks++;
    if (thr != 18) begin failures++; $display("reset threshold %0d", thr); end
    interval(99, 100, 0);      // 99% -> 18
    interval(95, 100, 2);      // 95% -> 13
    interval(97, 100, 1);
    interval(93, 100, 3);
    interval(90, 100, 4);
    interval(85, 100, 5);
    interval(84, 100, 6);
    interval(0, 0, 6);         // no branches: threshold kept
    interval(100, 100, 0);
    repeat (60) begin
      int t, c;
      real a;
      t = $urandom_range(50, 2000);
      c = t - $urandom_range(0, t / 5);
      a = 100.0 * real'(c) / real'(t);
      if (a < 99.001 && a > 98.999 || a < 97.001 && a > 96.999 || a < 95.001 && a > 94.999 ||
          a < 93.001 && a > 92.999 || a < 90.001 && a > 89.999 || a < 85.001 && a > 84.999)
        c = t;
      interval(c, t, ref_bin(c, t));
    end
    // one long interval: 180000 branches, 90% correct
    interval(162_000, 180_000, 4);
    for (int i = 0; i < 7; i++) begin
      checks++;
      if (bins_seen[i] == 0) begin failures++; $display("bin %0d never exercised", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
