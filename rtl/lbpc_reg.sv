// Latest branch PC register (LBPC) of the fetch engine.
//
// Holds the lower 16 bits of the PC of the most recently fetched branch.
// Every fetched packet is tagged with the value LBPC has when the packet is
// fetched (`pkt_bpc`), i.e. the youngest branch before the packet, as the
// document describes; then LBPC takes the PC of the youngest branch inside
// the packet, if it has one. The same register is the lookup key of the
// branch-PC WPUP cache.
// This design's own choices: branch slot FETCH_W-1 is the youngest; on a
// misprediction recovery (`recover_valid`) LBPC is loaded with the BPC of
// the resolved branch, which is then the latest branch on the correct path,
// and a fetch in the same cycle is ignored; LBPC resets to 0.
// Timing: `lbpc` and `pkt_bpc` are the register; it updates at the clock
// edge that ends the fetch cycle.
module lbpc_reg
  import spec_ctrl_pkg::*;
#(
  parameter int unsigned PC_W    = 64,
  parameter int unsigned FETCH_W = 2
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          fetch_valid,
  input  logic [FETCH_W-1:0]            br_valid,
  input  logic [FETCH_W-1:0][PC_W-1:0]  br_pc,
  input  logic                          recover_valid,
  input  bpc_t                          recover_bpc,
  output bpc_t                          lbpc,
  output bpc_t                          pkt_bpc
);
  bpc_t next;

  always_comb begin
    next = lbpc;
    if (recover_valid) next = recover_bpc;
    else if (fetch_valid)
      for (int i = 0; i < int'(FETCH_W); i++)
        if (br_valid[i]) next = br_pc[i][BPC_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lbpc <= '0;
    else        lbpc <= next;
  end

  assign pkt_bpc = lbpc;
endmodule
