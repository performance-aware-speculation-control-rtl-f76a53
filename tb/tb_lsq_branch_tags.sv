// Self-checking testbench of lsq_branch_tags: random allocations and reads
// of the 32 entries against a reference array; only written entries are
// read.
module tb_lsq_branch_tags;
  import spec_ctrl_pkg::*;
  logic clk = 0;
  logic av;
  logic [4:0] ai, ri;
  bpc_t ab, rb;
  bid_t ad, rd;
  int checks = 0, failures = 0;
  bpc_t ref_b [32];
  bid_t ref_d [32];
  bit   wr [32];

  lsq_branch_tags dut (.clk, .alloc_valid(av), .alloc_idx(ai), .alloc_bpc(ab), .alloc_bid(ad),
                       .rd_idx(ri), .rd_bpc(rb), .rd_bid(rd));

  always #5 clk = ~clk;

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    av = 0; ai = 0; ri = 0; ab = 0; ad = 0;
    for (int i = 0; i < 32; i++) begin
      av = 1; ai = 5'(i); ab = 16'($urandom); ad = 10'($urandom);
      ref_b[i] = ab; ref_d[i] = ad; wr[i] = 1;
      @(posedge clk); #1;
    end
    repeat (4000) begin
      av = $urandom_range(0, 1); ai = 5'($urandom); ab = 16'($urandom); ad = 10'($urandom);
      ri = 5'($urandom);
      #1;
      checks++;
      if (rb !== ref_b[ri] || rd !== ref_d[ri]) begin
        failures++; $display("entry %0d: %h/%h expected %h/%h", ri, rb, rd, ref_b[ri], ref_d[ri]);
      end
      @(posedge clk); #1;
      if (av) begin ref_b[ai] = ab; ref_d[ai] = ad; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
