// Self-checking testbench of interval_timer: with a 10-cycle interval the
// pulse must appear exactly in cycles 9, 19, 29, ... after reset, and once
// per interval. Also runs a second instance at the default 100K interval
// for one full interval.
module tb_interval_timer;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge for the asynchronous reset
  logic end_s, end_d;
  int   checks = 0, failures = 0;
  longint cyc = 0, first_d = -1;

  interval_timer #(.INTERVAL(10)) dut_s (.clk, .rst_n, .interval_end(end_s));
  interval_timer                   dut_d (.clk, .rst_n, .interval_end(end_d));

  always #5 clk = ~clk;

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); @(posedge clk); rst_n <= 1;
    @(negedge clk);
    for (cyc = 0; cyc < 200_005; cyc++) begin
      checks++;
      if (end_s !== ((cyc % 10) == 9)) begin
        failures++;
        $display("cycle %0d: short pulse %0b", cyc, end_s);
      end
      if (end_d) begin
        if (first_d < 0) first_d = cyc;
        checks++;
        if ((cyc % 100_000) != 99_999) begin
          failures++;
          $display("cycle %0d: default pulse off schedule", cyc);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (first_d != 99_999) begin failures++; $display("first default pulse at %0d", first_d); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
