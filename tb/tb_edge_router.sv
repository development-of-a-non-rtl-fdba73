// tb_edge_router: drives every message slot with a value that names its
// source and checks, edge by edge, that each one arrives at the slot the
// parity-check matrix assigns (derived per edge with the ldpc_pkg node
// functions, independently of the router's block-wise wiring). Unused slots
// must read 0. Also checks the variable-to-check wiring printed for the first
// code bits of the decoder (bit 0 -> checks 81, 213, 278; bit 3 -> checks 84,
// 192, 281; bit 9 -> checks 90, 198, 287).
module tb_edge_router;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int PREC = 13;
  logic signed [PREC-1:0] q_vn [N][VDMAX], r_vn [N][VDMAX];
  logic signed [PREC-1:0] q_cn [M][CDMAX], r_cn [M][CDMAX];

  edge_router #(.PREC(PREC)) dut (.q_vn(q_vn), .q_cn(q_cn), .r_cn(r_cn), .r_vn(r_vn));

  function automatic int vtag(int v, int j); return v * VDMAX + j + 1; endfunction
  function automatic int ctag(int c, int k); return c * CDMAX + k + 1; endfunction

  initial begin
    for (int v = 0; v < N; v++) for (int j = 0; j < VDMAX; j++) q_vn[v][j] = PREC'(vtag(v, j));
    for (int c = 0; c < M; c++) for (int k = 0; k < CDMAX; k++) r_cn[c][k] = PREC'(ctag(c, k));
    #1;
    for (int c = 0; c < M; c++) begin
      for (int k = 0; k < CDMAX; k++) begin
        checks++;
        if (k >= cn_deg(c)) begin
          if (q_cn[c][k] != 0) failures++;
        end else begin
          automatic int v = cn_var(c, k);
          automatic int j = -1;
          for (int jj = 0; jj < vn_deg(v); jj++) if (vn_chk(v, jj) == c) j = jj;
          if (int'(q_cn[c][k]) != vtag(v, j)) begin
            failures++;
            if (failures < 10) $display("FAIL q_cn[%0d][%0d]=%0d exp v%0d slot %0d", c, k, q_cn[c][k], v, j);
          end
        end
      end
    end
    for (int v = 0; v < N; v++) begin
      for (int j = 0; j < VDMAX; j++) begin
        checks++;
        if (j >= vn_deg(v)) begin
          if (r_vn[v][j] != 0) failures++;
        end else begin
          automatic int c = vn_chk(v, j);
          automatic int k = -1;
          for (int kk = 0; kk < cn_deg(c); kk++) if (cn_var(c, kk) == v) k = kk;
          if (int'(r_vn[v][j]) != ctag(c, k)) begin
            failures++;
            if (failures < 10) $display("FAIL r_vn[%0d][%0d]=%0d exp c%0d slot %0d", v, j, r_vn[v][j], c, k);
          end
        end
      end
    end
    // Printed wiring of the first code bits.
    begin
      int bits [3] = '{0, 3, 9};
      int chk [3][3] = '{'{81, 213, 278}, '{84, 192, 281}, '{90, 198, 287}};
      for (int b = 0; b < 3; b++)
        for (int j = 0; j < 3; j++) begin
          checks++;
          if ((int'(r_vn[bits[b]][j]) - 1) / CDMAX != chk[b][j]) begin
            failures++;
            $display("FAIL bit %0d edge %0d comes from check %0d, expected %0d", bits[b], j, (int'(r_vn[bits[b]][j]) - 1) / CDMAX, chk[b][j]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
