// llr_buffer: register bank holding the channel LLR of every code bit.
//
// When load is high, all N input LLRs are captured at the clock edge; they are
// then held for the whole decode, so the input bus is free to change while the
// nodes iterate. One PREC-bit register per code bit, as the decoder's block
// diagram draws one LLR block in front of each variable node. Capturing on a
// load strobe is this design's choice.
module llr_buffer #(
  parameter int N    = 576,
  parameter int PREC = 4
) (
  input  logic                   clk,
  input  logic                   load,
  input  logic signed [PREC-1:0] llr_in [N],
  output logic signed [PREC-1:0] llr    [N]
);
  always_ff @(posedge clk) begin
    if (load) llr <= llr_in;
  end
endmodule
