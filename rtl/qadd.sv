// qadd: saturating two's-complement adder for LLR messages.
//
// sum = a + b, clamped to the symmetric range [-(2^(W-1)-1), 2^(W-1)-1] so
// that a message and its negation are always both representable; 'sat' is
// high when the clamp was applied. Purely combinational.
//
// The decoder uses it to accumulate a variable node's incoming messages. The
// unit's name comes from the original design's module list; its number format
// and the symmetric clamp are this design's choice.
module qadd #(
  parameter int W = 4
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] sum,
  output logic                sat
);
  localparam logic signed [W:0] LIM = (W+1)'((1 <<< (W - 1)) - 1);

  logic signed [W:0] full;

  always_comb begin
    full = (W+1)'(a) + (W+1)'(b);
    if (full > LIM) begin
      sum = LIM[W-1:0];
      sat = 1'b1;
    end else if (full < -LIM) begin
      sum = -LIM[W-1:0];
      sat = 1'b1;
    end else begin
      sum = full[W-1:0];
      sat = 1'b0;
    end
  end
endmodule
