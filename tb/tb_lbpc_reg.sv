// Self-checking testbench of lbpc_reg: random packets with zero, one or
// two branches and occasional recoveries; the packet tag must be the PC of
// the youngest branch of an earlier packet (or the recovery value), and
// LBPC the lower 16 bits of the youngest branch PC fetched.
module tb_lbpc_reg;
  import spec_ctrl_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge for the asynchronous reset
  logic fv, rv;
  logic [1:0] bv;
  logic [1:0][63:0] bpc;
  bpc_t rbpc, lbpc, pkt;
  int checks = 0, failures = 0, n_two = 0, n_rec = 0;
  bpc_t ref_l = '0;

  lbpc_reg dut (.clk, .rst_n, .fetch_valid(fv), .br_valid(bv), .br_pc(bpc),
                .recover_valid(rv), .recover_bpc(rbpc), .lbpc, .pkt_bpc(pkt));

  always #5 clk = ~clk;

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fv = 0; rv = 0; bv = 0; bpc = '0; rbpc = '0;
    @(posedge clk); rst_n = 1; #1;
    repeat (5000) begin
      fv = $urandom_range(0, 3) != 0;
      bv = 2'($urandom_range(0, 3));
      bpc[0] = {$urandom, $urandom};
      bpc[1] = {$urandom, $urandom};
      rv = $urandom_range(0, 30) == 0;
      rbpc = 16'($urandom);
      #1;
      checks++;
      if (pkt !== ref_l) begin failures++; $display("packet tag %h expected %h", pkt, ref_l); end
      if (rv) begin ref_l = rbpc; n_rec++; end
      else if (fv) begin
        if (bv[1]) ref_l = bpc[1][15:0];
        else if (bv[0]) ref_l = bpc[0][15:0];
        if (bv == 2'b11) n_two++;
      end
      @(posedge clk); #1;
      checks++;
      if (lbpc !== ref_l) begin failures++; $display("lbpc %h expected %h", lbpc, ref_l); end
    end
    checks++;
    if (n_two == 0 || n_rec == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
