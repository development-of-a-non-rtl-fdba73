// var_node: variable-node unit with registered outputs.
//
// The unit adds its channel LLR and the DEG incoming check-to-variable
// messages r[] into a total held in an accumulator wide enough never to
// overflow (a chain of qadd cells). It then sends each check node the total
// minus that check's own message (a qsub cell per edge, clamped to PREC bits),
// outputs the total clamped to PREC bits as the posterior LLR, and decides the
// code bit: x = 1 when the total is negative, 0 otherwise.
//
// Interface: llr is the channel LLR, r[] the check-to-variable messages, q[]
// the variable-to-check messages, all PREC-bit two's complement with positive
// meaning "bit 0". Timing: q, post and x are registered and take their new
// values at the clock edge where en is high.
//
// The sum/extrinsic-subtract structure and the add/subtract units follow the
// original design; the accumulator width, the clamp and the sign convention
// are this design's choice.
module var_node #(
  parameter int DEG  = 3,
  parameter int PREC = 4
) (
  input  logic                   clk,
  input  logic                   en,
  input  logic signed [PREC-1:0] llr,
  input  logic signed [PREC-1:0] r [DEG],
  output logic signed [PREC-1:0] q [DEG],
  output logic signed [PREC-1:0] post,
  output logic                   x
);
  // DEG+1 terms of PREC bits never overflow this width.
  localparam int AW = PREC + $clog2(DEG + 1) + 1;

  logic signed [AW-1:0] acc [DEG+1];
  logic                 unused_sat [DEG+1];

  assign acc[0]        = AW'(llr);
  assign unused_sat[0] = 1'b0;

  for (genvar k = 0; k < DEG; k++) begin : g_sum
    qadd #(.W(AW)) u_add (
      .a(acc[k]), .b(AW'(r[k])), .sum(acc[k+1]), .sat(unused_sat[k+1])
    );
  end

  logic signed [AW-1:0] total;
  assign total = acc[DEG];

  // Extrinsic messages: total minus own message, then clamp to PREC bits.
  logic signed [AW-1:0]   ext  [DEG];
  logic                   unused_sat2 [DEG];
  logic signed [PREC-1:0] q_next [DEG];

  for (genvar k = 0; k < DEG; k++) begin : g_ext
    qsub #(.W(AW)) u_sub (
      .a(total), .b(AW'(r[k])), .diff(ext[k]), .sat(unused_sat2[k])
    );
    assign q_next[k] = PREC'(ldpc_pkg::sat_int(int'(ext[k]), PREC));
  end

  always_ff @(posedge clk) begin
    if (en) begin
      q    <= q_next;
      post <= PREC'(ldpc_pkg::sat_int(int'(total), PREC));
      x    <= total[AW-1];
    end
  end
endmodule
