// qsub: saturating two's-complement subtractor for LLR messages.
//
// diff = a - b, clamped to the symmetric range [-(2^(W-1)-1), 2^(W-1)-1];
// 'sat' is high when the clamp was applied. Purely combinational.
//
// A variable node uses it to remove one check node's own message from its
// total, producing the extrinsic message sent back to that check node. The
// unit's name comes from the original design's module list; its number format
// and the symmetric clamp are this design's choice.
module qsub #(
  parameter int W = 4
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] diff,
  output logic                sat
);
  localparam logic signed [W:0] LIM = (W+1)'((1 <<< (W - 1)) - 1);

  logic signed [W:0] full;

  always_comb begin
    full = (W+1)'(a) - (W+1)'(b);
    if (full > LIM) begin
      diff = LIM[W-1:0];
      sat  = 1'b1;
    end else if (full < -LIM) begin
      diff = -LIM[W-1:0];
      sat  = 1'b1;
    end else begin
      diff = full[W-1:0];
      sat  = 1'b0;
    end
  end
endmodule
