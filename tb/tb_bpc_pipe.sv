// Self-checking testbench of bpc_pipe (11 stages): every tag entering must
// leave exactly 11 non-stalled cycles later, in order; stalls hold the
// pipe and a flush drops everything in flight. A queue of
// (tag, exit cycle) pairs is the reference.
module tb_bpc_pipe;
  import spec_ctrl_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge for the asynchronous reset
  logic stall, flush, iv, ov;
  bpc_t ib, ob;
  int checks = 0, failures = 0, n_out = 0, n_stall = 0, n_flush = 0;
  typedef struct { bpc_t b; int age; } slot_t;
  slot_t q [$];

  bpc_pipe dut (.clk, .rst_n, .stall, .flush, .in_valid(iv), .in_bpc(ib),
                .out_valid(ov), .out_bpc(ob));

  always #5 clk = ~clk;

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    stall = 0; flush = 0; iv = 0; ib = '0;
    @(posedge clk); rst_n = 1; #1;
    repeat (6000) begin
      bit exp_v;
      stall = $urandom_range(0, 7) == 0;
      flush = $urandom_range(0, 60) == 0;
      iv = $urandom_range(0, 1);
      ib = 16'($urandom);
      // the head is at the output when it has spent 11 cycles inside
      exp_v = (q.size() > 0) && (q[0].age == 11);
      checks++;
      if (ov !== exp_v || (exp_v && ob !== q[0].b)) begin
        failures++;
        $display("out %0b %h expected %0b %h", ov, ob, exp_v, exp_v ? q[0].b : 16'h0);
      end
      if (ov) n_out++;
      @(posedge clk); #1;
      if (flush) begin q.delete(); n_flush++; end
      else if (!stall) begin
        if (exp_v) void'(q.pop_front());
        foreach (q[i]) q[i].age++;
        if (iv) q.push_back('{b: ib, age: 1});
      end else n_stall++;
    end
    checks++;
    if (n_out == 0 || n_stall == 0 || n_flush == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
