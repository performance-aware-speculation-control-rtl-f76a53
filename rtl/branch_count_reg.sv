// Branch count register (BCR): number of conditional branches currently
// outstanding (fetched but not yet resolved) in the pipeline.
//
// Each cycle it adds the branches fetched that cycle and subtracts those
// resolved that cycle, following the document. It also subtracts the
// unresolved branches squashed by a misprediction recovery (`squash_cnt`):
// the document does not say how flushed branches leave the count, so this
// input is this design's choice; without it the count would drift upward
// after every misprediction. The result saturates at 0 and at 2**CNT_W-1.
// The 8-bit width and the two-branch fetch width are the document's.
// Timing: `bcr` is a register, updated one cycle after the events.
module branch_count_reg #(
  parameter int unsigned CNT_W   = 8,   // BCR width
  parameter int unsigned FETCH_W = 2,   // max branches fetched per cycle
  parameter int unsigned RES_W   = 2    // max branches resolved per cycle
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic [$clog2(FETCH_W+1)-1:0]       fetch_br_cnt,
  input  logic [$clog2(RES_W+1)-1:0]         resolve_cnt,
  input  logic [CNT_W-1:0]                   squash_cnt,
  output logic [CNT_W-1:0]                   bcr
);
  localparam int unsigned SW = CNT_W + 2;
  localparam logic [SW-1:0] MAXV = SW'((1 << CNT_W) - 1);

  logic signed [SW:0] next;

  always_comb begin
    next = $signed({2'b00, bcr}) + $signed({1'b0, SW'(fetch_br_cnt)})
         - $signed({1'b0, SW'(resolve_cnt)}) - $signed({3'b000, squash_cnt});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                            bcr <= '0;
    else if (next < 0)                     bcr <= '0;
    else if (next > $signed({1'b0, MAXV})) bcr <= '1;
    else                                   bcr <= CNT_W'(next);
  end
endmodule
