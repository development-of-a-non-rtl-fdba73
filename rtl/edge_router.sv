// edge_router: the fixed interconnect between variable and check nodes.
//
// Every edge of the Tanner graph (a one in the parity-check matrix) is one
// wire bundle in each direction. Variable node v keeps its edges in increasing
// check order (slot j), check node c in increasing variable order (slot k).
// The router maps
//     q_cn[c][k] = q_vn[v][j]   and   r_vn[v][j] = r_cn[c][k]
// for every edge (v, c); slots beyond a node's degree are driven with 0.
// The wiring is generated block by block from the base matrix in ldpc_pkg:
// a non-zero block (br, bc) with shift s joins check br*Z + r to variable
// bc*Z + ((r + s) mod Z) for r = 0..Z-1, always in the same slots. The router
// therefore holds no logic, only wires, as in a fully parallel decoder where
// messages pass only where the matrix has a connection.
//
// Interface: arrays of PREC-bit messages, VDMAX slots per variable node and
// CDMAX slots per check node. Timing: combinational (wires only).
module edge_router
  import ldpc_pkg::*;
#(
  parameter int PREC = 4
) (
  input  logic signed [PREC-1:0] q_vn [N][VDMAX],
  output logic signed [PREC-1:0] q_cn [M][CDMAX],
  input  logic signed [PREC-1:0] r_cn [M][CDMAX],
  output logic signed [PREC-1:0] r_vn [N][VDMAX]
);
  for (genvar br = 0; br < MB; br++) begin : g_br
    for (genvar bc = 0; bc < NB; bc++) begin : g_bc
      localparam int S = shift_of(br, bc);
      if (S >= 0) begin : g_blk
        localparam int K = row_slot(br, bc);
        localparam int J = col_slot(br, bc);
        for (genvar r = 0; r < Z; r++) begin : g_row
          assign q_cn[br*Z + r][K]           = q_vn[bc*Z + (r + S) % Z][J];
          assign r_vn[bc*Z + (r + S) % Z][J] = r_cn[br*Z + r][K];
        end
      end
    end
  end

  // Unused slots of lower-degree nodes.
  for (genvar br = 0; br < MB; br++) begin : g_cpad
    for (genvar k = row_deg(br); k < CDMAX; k++) begin : g_k
      for (genvar r = 0; r < Z; r++) begin : g_r
        assign q_cn[br*Z + r][k] = '0;
      end
    end
  end
  for (genvar bc = 0; bc < NB; bc++) begin : g_vpad
    for (genvar j = col_deg(bc); j < VDMAX; j++) begin : g_j
      for (genvar o = 0; o < Z; o++) begin : g_o
        assign r_vn[bc*Z + o][j] = '0;
      end
    end
  end
endmodule
