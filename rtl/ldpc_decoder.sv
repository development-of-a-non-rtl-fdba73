// ldpc_decoder: fully parallel min-sum LDPC decoder for a (576, 288) code.
//
// Every code bit has its own variable-node unit (576) and every parity check
// its own check-node unit (288); the 1824 edges of the Tanner graph are fixed
// wires (edge_router). A codeword is decoded by message passing:
//   1. start: the channel LLRs are captured (llr_buffer) and all
//      check-to-variable messages are cleared.
//   2. VN cycle: each variable node adds its LLR and incoming messages,
//      registers its hard decision, posterior LLR and one extrinsic message per
//      edge.
//   3. CN cycle: if the hard decisions satisfy all check equations
//      (syndrome_check), or IMAX iterations have been made, the decode ends.
//      Otherwise every check node registers new min-sum messages and step 2
//      repeats.
// One iteration takes two clock cycles; done rises 2 + 2k cycles after start,
// k = iterations (0..IMAX), so a codeword takes at most 14 cycles at IMAX = 6.
//
// Interface: llr_in[i] is the PREC-bit two's-complement LLR of code bit i,
// positive meaning 0. After done: x is the decoded word, llr_out the
// posterior LLRs, syndrome the check-equation outputs, success = all checks
// satisfied, iterations = check-node updates made. Outputs hold until the next
// start. Reset is synchronous, active high.
//
// The code size, 4-bit messages, the limit of 6 iterations, the stop on a zero
// syndrome and the fully parallel node-per-bit/node-per-check structure follow
// the original design. The parity-check matrix is the 802.16e rate-1/2 matrix
// at 24 x 24 circulants, which matches every check equation and wire the
// original design lists. The two-cycle iteration and the start/success
// handshake are this design's own.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int PREC = ldpc_pkg::PREC_DEF,
  parameter int IMAX = ldpc_pkg::IMAX_DEF
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        start,
  input  logic signed [PREC-1:0]      llr_in [N],
  output logic                        busy,
  output logic                        done,
  output logic                        success,
  output logic [$clog2(IMAX+1)-1:0]   iterations,
  output logic [N-1:0]                x,
  output logic signed [PREC-1:0]      llr_out [N],
  output logic [M-1:0]                syndrome
);
  logic load, vn_en, cn_en, syn_zero;

  logic signed [PREC-1:0] llr  [N];
  logic signed [PREC-1:0] q_vn [N][VDMAX];
  logic signed [PREC-1:0] r_vn [N][VDMAX];
  logic signed [PREC-1:0] q_cn [M][CDMAX];
  logic signed [PREC-1:0] r_cn [M][CDMAX];

  llr_buffer #(.N(N), .PREC(PREC)) u_llr (
    .clk(clk), .load(load), .llr_in(llr_in), .llr(llr)
  );

  // Variable-node units, one per code bit, generated per block column.
  for (genvar bc = 0; bc < NB; bc++) begin : g_vcol
    localparam int D = col_deg(bc);
    for (genvar o = 0; o < Z; o++) begin : g_vn
      localparam int V = bc*Z + o;
      logic signed [PREC-1:0] r_in  [D];
      logic signed [PREC-1:0] q_out [D];

      for (genvar j = 0; j < D; j++) begin : g_edge
        assign r_in[j]    = r_vn[V][j];
        assign q_vn[V][j] = q_out[j];
      end
      for (genvar j = D; j < VDMAX; j++) begin : g_none
        assign q_vn[V][j] = '0;
      end

      var_node #(.DEG(D), .PREC(PREC)) u_vn (
        .clk(clk), .en(vn_en), .llr(llr[V]), .r(r_in),
        .q(q_out), .post(llr_out[V]), .x(x[V])
      );
    end
  end

  edge_router #(.PREC(PREC)) u_router (
    .q_vn(q_vn), .q_cn(q_cn), .r_cn(r_cn), .r_vn(r_vn)
  );

  // Check-node units, one per parity check, generated per block row.
  for (genvar br = 0; br < MB; br++) begin : g_crow
    localparam int D = row_deg(br);
    for (genvar r = 0; r < Z; r++) begin : g_cn
      localparam int C = br*Z + r;
      logic signed [PREC-1:0] q_in  [D];
      logic signed [PREC-1:0] r_out [D];

      for (genvar k = 0; k < D; k++) begin : g_edge
        assign q_in[k]    = q_cn[C][k];
        assign r_cn[C][k] = r_out[k];
      end
      for (genvar k = D; k < CDMAX; k++) begin : g_none
        assign r_cn[C][k] = '0;
      end

      check_node #(.DEG(D), .PREC(PREC)) u_cn (
        .clk(clk), .clr(load), .en(cn_en), .q(q_in), .r(r_out)
      );
    end
  end

  syndrome_check u_syn (
    .x(x), .syndrome(syndrome), .zero(syn_zero)
  );

  iteration_controller #(.IMAX(IMAX)) u_ctl (
    .clk(clk), .rst(rst), .start(start), .syn_zero(syn_zero),
    .load(load), .vn_en(vn_en), .cn_en(cn_en),
    .busy(busy), .done(done), .success(success), .iterations(iterations)
  );
endmodule
