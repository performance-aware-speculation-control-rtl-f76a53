// Self-checking testbench of branch_count_reg: random fetch, resolve and
// squash counts against a saturating reference count kept in the
// testbench, plus directed saturation at 0 and 255.
module tb_branch_count_reg;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge for the asynchronous reset
  logic [1:0] fetch_br_cnt, resolve_cnt;
  logic [7:0] squash_cnt, bcr;
  int checks = 0, failures = 0;
  int ref_cnt = 0, hit_max = 0, hit_zero = 0;

  branch_count_reg dut (.clk, .rst_n, .fetch_br_cnt, .resolve_cnt, .squash_cnt, .bcr);

  always #5 clk = ~clk;

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(int f, int r, int s);
    fetch_br_cnt = 2'(f); resolve_cnt = 2'(r); squash_cnt = 8'(s);
    @(posedge clk); #1;
    ref_cnt = ref_cnt + f - r - s;
    if (ref_cnt < 0) ref_cnt = 0;
    if (ref_cnt > 255) ref_cnt = 255;
    if (ref_cnt == 255) hit_max++;
    if (ref_cnt == 0) hit_zero++;
    checks++;
    if (int'(bcr) != ref_cnt) begin
      failures++;
      $display("f=%0d r=%0d s=%0d: bcr=%0d expected %0d", f, r, s, bcr, ref_cnt);
    end
  endtask

  initial begin
    fetch_br_cnt = 0; resolve_cnt = 0; squash_cnt = 0;
    @(posedge clk); rst_n = 1; #1;
    checks++; if (bcr != 0) failures++;
    repeat (300) step(2, 0, 0);          // climb to saturation
    repeat (10)  step(2, 2, 0);
    step(1, 0, 100);
    repeat (3000) begin
      int f, r, s;
      f = $urandom_range(0, 2);
      r = $urandom_range(0, 2);
      s = ($urandom_range(0, 19) == 0) ? $urandom_range(0, 40) : 0;
      step(f, r, s);
    end
    repeat (200) step(0, 2, 0);          // drain to zero, then clamp
    step(0, 2, 5);
    checks++;
    if (hit_max == 0 || hit_zero == 0) begin failures++; $display("saturation not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
