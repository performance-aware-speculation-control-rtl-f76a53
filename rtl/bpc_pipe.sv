// Branch PC field of the front-end inter-stage latches.
//
// Carries the BPC tag of each instruction packet alongside it through the
// STAGES front-end pipeline latches (11 in the document's baseline, between
// fetch, decode and rename), so that the tag reaches the LSQ when loads and
// stores are allocated there. Each latch holds a valid bit and the 16-bit
// tag. `stall` holds every latch (the whole front end stalls together, this
// design's simplification), `flush` empties all of them (misprediction
// recovery). Timing: a packet entering with `in_valid` leaves at `out_*`
// STAGES non-stalled cycles later.
module bpc_pipe
  import spec_ctrl_pkg::*;
#(
  parameter int unsigned STAGES = 11
) (
  input  logic clk,
  input  logic rst_n,
  input  logic stall,
  input  logic flush,
  input  logic in_valid,
  input  bpc_t in_bpc,
  output logic out_valid,
  output bpc_t out_bpc
);
  logic [STAGES-1:0] vld;
  bpc_t              bpc [STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else if (flush) vld <= '0;
    else if (!stall) vld <= STAGES'({vld, in_valid});
  end

  always_ff @(posedge clk) begin
    if (!stall) begin
      bpc[0] <= in_bpc;
      for (int s = 1; s < int'(STAGES); s++) bpc[s] <= bpc[s-1];
    end
  end

  assign out_valid = vld[STAGES-1];
  assign out_bpc   = bpc[STAGES-1];
endmodule
