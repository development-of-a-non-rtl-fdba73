// comparator: two-input compare-select on unsigned message magnitudes.
//
// lo = min(a, b), hi = max(a, b), b_lt_a = (b < a). On a tie, a is taken as
// the smaller one (b_lt_a = 0). Purely combinational.
//
// The check node chains these to find the smallest and second-smallest
// magnitude among its inputs, which is all that min-sum needs. That the check
// node is built from comparators follows the original design's module list;
// the compare-select form is this design's choice.
module comparator #(
  parameter int W = 3
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] lo,
  output logic [W-1:0] hi,
  output logic         b_lt_a
);
  always_comb begin
    b_lt_a = (b < a);
    lo     = b_lt_a ? b : a;
    hi     = b_lt_a ? a : b;
  end
endmodule
