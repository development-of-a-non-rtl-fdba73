// syndrome_check: the check-equation logic of the decoder.
//
// For each of the M parity checks it XORs the hard decisions of the variables
// in that check (a modulo-2 sum; the original design writes these as sums of
// 1-bit terms), giving the syndrome bit syndrome[c]. zero is high when every
// check is satisfied, i.e. x is a codeword. The terms are wired block by block
// from the base matrix in ldpc_pkg: a non-zero block (br, bc) with shift s puts
// x[bc*Z + ((r + s) mod Z)] into check br*Z + r. Purely combinational.
module syndrome_check
  import ldpc_pkg::*;
(
  input  logic [N-1:0] x,
  output logic [M-1:0] syndrome,
  output logic         zero
);
  logic [CDMAX-1:0] terms [M];

  for (genvar br = 0; br < MB; br++) begin : g_br
    for (genvar bc = 0; bc < NB; bc++) begin : g_bc
      localparam int S = shift_of(br, bc);
      if (S >= 0) begin : g_blk
        localparam int K = row_slot(br, bc);
        for (genvar r = 0; r < Z; r++) begin : g_row
          assign terms[br*Z + r][K] = x[bc*Z + (r + S) % Z];
        end
      end
    end
    for (genvar k = row_deg(br); k < CDMAX; k++) begin : g_pad
      for (genvar r = 0; r < Z; r++) begin : g_r
        assign terms[br*Z + r][k] = 1'b0;
      end
    end
  end

  for (genvar c = 0; c < M; c++) begin : g_chk
    assign syndrome[c] = ^terms[c];
  end

  assign zero = ~|syndrome;
endmodule
