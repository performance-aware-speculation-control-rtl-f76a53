// Self-checking testbench of phase_wpup: a 5-bit usefulness counter with
// threshold 5, and a second instance with threshold 20 (the range the
// threshold is meant for). Intervals with 0..40 useful events (random spacing) must
// predict "useful" for the next interval exactly when the count exceeded
// 5, and the counter must restart each interval and saturate at 31.
module tb_phase_wpup;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge for the asynchronous reset
  logic ev, iend, useful, useful20;
  logic [4:0] wpuc, wpuc20;
  int checks = 0, failures = 0, n_useful = 0, n_not = 0, n_sat = 0;

  phase_wpup dut (.clk, .rst_n, .useful_event(ev), .interval_end(iend), .useful, .wpuc);
  phase_wpup #(.THRESHOLD(20)) dut20 (.clk, .rst_n, .useful_event(ev), .interval_end(iend),
                                      .useful(useful20), .wpuc(wpuc20));

  always #5 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_interval(int n);
    int done;
    done = 0;
    while (done < n) begin
      ev = ($urandom_range(0, 2) == 0);
      if (ev) done++;
      @(posedge clk); #1;
      checks++;
      if (int'(wpuc) != ((done > 31) ? 31 : done)) begin
        failures++; $display("wpuc %0d expected %0d", wpuc, done);
      end
    end
    ev = 0;
    iend = 1;
    @(posedge clk); #1;
    iend = 0;
    checks += 2;
    if (useful !== (n > 5)) begin failures++; $display("n=%0d useful=%0b", n, useful); end
    checks++;
    if (useful20 !== (n > 20)) begin failures++; $display("n=%0d useful20=%0b", n, useful20); end
    if (wpuc != 0) begin failures++; $display("wpuc not cleared"); end
    if (n > 5) n_useful++; else n_not++;
    if (n > 31) n_sat++;
  endtask

  initial begin
    ev = 0; iend = 0;
    @(posedge clk); rst_n = 1; #1;
    checks++; if (useful) failures++;
    run_interval(5);
    run_interval(6);
    run_interval(0);
    run_interval(40);
    run_interval(20);
    run_interval(21);
    repeat (100) run_interval($urandom_range(0, 12));
    checks++;
    if (n_useful == 0 || n_not == 0 || n_sat == 0) begin failures++; $display("case missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
