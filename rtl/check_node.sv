// check_node: min-sum check-node unit with registered outputs.
//
// For each of its DEG edges k the unit returns
//     r[k] = (product of the signs of q[j], j != k) * min(|q[j]|, j != k)
// which is the min-sum approximation of belief propagation. Instead of DEG
// separate minimum searches it finds, with a chain of comparators, the
// smallest magnitude (min1), its edge index and the second-smallest magnitude
// (min2); edge k receives min2 if it holds the minimum and min1 otherwise.
// The sign is the XOR of all input signs with edge k's own sign removed.
// No normalisation or offset is applied.
//
// Interface: q[] are variable-to-check messages (PREC-bit two's complement),
// r[] the check-to-variable messages. Timing: r[] is registered; it takes the
// new value at the clock edge where en is high, and is cleared to 0 where clr
// is high (start of a codeword, so that the first variable-node pass sees the
// channel LLR only). clr has priority over en.
//
// The min-sum algorithm, the use of comparators and the node degree 6 follow
// the original design; the min1/min2 structure and the clear are this
// design's own.
module check_node #(
  parameter int DEG  = 6,
  parameter int PREC = 4
) (
  input  logic                   clk,
  input  logic                   clr,
  input  logic                   en,
  input  logic signed [PREC-1:0] q [DEG],
  output logic signed [PREC-1:0] r [DEG]
);
  localparam int MW = PREC - 1;             // magnitude width
  localparam int IW = $clog2(DEG + 1);      // edge index width

  logic [MW-1:0] mag [DEG];
  logic          sgn [DEG];
  logic          sgn_all;

  // Magnitude and sign of each input; the one code with no positive
  // counterpart (most negative) is read as the largest magnitude.
  always_comb begin
    sgn_all = 1'b0;
    for (int k = 0; k < DEG; k++) begin
      sgn[k] = q[k][PREC-1];
      if (q[k] == {1'b1, {(PREC-1){1'b0}}}) mag[k] = {MW{1'b1}};
      else if (sgn[k])                      mag[k] = MW'(-q[k]);
      else                                  mag[k] = MW'(q[k]);
      sgn_all ^= sgn[k];
    end
  end

  // Comparator chain: stage k merges input k into (min1, idx, min2).
  logic [MW-1:0] m1  [DEG+1];
  logic [MW-1:0] m2  [DEG+1];
  logic [IW-1:0] idx [DEG+1];

  assign m1[0]  = {MW{1'b1}};
  assign m2[0]  = {MW{1'b1}};
  assign idx[0] = '0;

  for (genvar k = 0; k < DEG; k++) begin : g_chain
    logic [MW-1:0] loser;
    logic          new_min;
    logic          unused_lt;
    logic [MW-1:0] unused_hi;

    comparator #(.W(MW)) u_cmp1 (
      .a(m1[k]), .b(mag[k]), .lo(m1[k+1]), .hi(loser), .b_lt_a(new_min)
    );
    comparator #(.W(MW)) u_cmp2 (
      .a(m2[k]), .b(loser), .lo(m2[k+1]), .hi(unused_hi), .b_lt_a(unused_lt)
    );
    assign idx[k+1] = new_min ? IW'(k) : idx[k];
  end

  // Output messages.
  logic signed [PREC-1:0] r_next [DEG];

  always_comb begin
    for (int k = 0; k < DEG; k++) begin
      logic [MW-1:0] m;
      m = (idx[DEG] == IW'(k)) ? m2[DEG] : m1[DEG];
      r_next[k] = (sgn_all ^ sgn[k]) ? -$signed({1'b0, m}) : $signed({1'b0, m});
    end
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      for (int k = 0; k < DEG; k++) r[k] <= '0;
    end else if (en) begin
      r <= r_next;
    end
  end
endmodule
