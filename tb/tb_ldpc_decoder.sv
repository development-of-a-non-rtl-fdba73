// tb_ldpc_decoder: end-to-end test of the full-size decoder (576 bits, 4-bit
// messages, 6 iterations, default parameters).
//
// The testbench builds H edge by edge from the ldpc_pkg node functions, turns
// it into reduced row-echelon form to encode random codewords, and feeds the
// decoder LLRs for four kinds of word:
//   clean   - a codeword with confident LLRs: must stop at once (0 iterations);
//   light   - a codeword with 1-3 bits of wrong sign: must decode to it;
//   medium  - a codeword with 15-40 wrong bits: whatever happens, must match;
//   garbage - random LLRs: must run to the iteration limit.
// Every decode is compared bit-exactly with a reference min-sum model written
// here (hard decisions, posterior LLRs, syndrome, iterations, success) and
// the start-to-done latency must be 2 + 2k cycles. The mechanisms the decoder
// has are counted and each must occur: stop on a zero syndrome with no
// iteration, stop on a zero syndrome after corrections, stop at the iteration
// limit, message saturation, and a new start issued right after done.
module tb_ldpc_decoder;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int PREC = PREC_DEF;
  localparam int IMAX = IMAX_DEF;

  logic rst, start, busy, done, success;
  logic [2:0] iterations;
  logic [N-1:0] x;
  logic [M-1:0] syndrome;
  logic signed [PREC-1:0] llr_in [N], llr_out [N];

  ldpc_decoder dut (
    .clk(clk), .rst(rst), .start(start), .llr_in(llr_in), .busy(busy), .done(done),
    .success(success), .iterations(iterations), .x(x), .llr_out(llr_out), .syndrome(syndrome)
  );

  // ---------------------------------------------------------------- graph
  int cdeg [M], cvar [M][CDMAX], vdeg [N], vchk [N][VDMAX], vslot [N][VDMAX];
  logic [N-1:0] hrow [M];     // reduced row-echelon form of H
  int pivot [M];
  int rank;

  task automatic build_graph();
    for (int c = 0; c < M; c++) begin
      cdeg[c] = cn_deg(c);
      hrow[c] = '0;
      for (int k = 0; k < cdeg[c]; k++) begin
        cvar[c][k] = cn_var(c, k);
        hrow[c][cvar[c][k]] = 1'b1;
      end
    end
    for (int v = 0; v < N; v++) begin
      vdeg[v] = vn_deg(v);
      for (int j = 0; j < vdeg[v]; j++) begin
        vchk[v][j] = vn_chk(v, j);
        vslot[v][j] = -1;
        for (int k = 0; k < cdeg[vchk[v][j]]; k++) if (cvar[vchk[v][j]][k] == v) vslot[v][j] = k;
      end
    end
    // Gaussian elimination over GF(2).
    rank = 0;
    for (int col = 0; col < N && rank < M; col++) begin
      int p = -1;
      for (int r = rank; r < M; r++) if (hrow[r][col]) begin p = r; break; end
      if (p < 0) continue;
      begin logic [N-1:0] t = hrow[p]; hrow[p] = hrow[rank]; hrow[rank] = t; end
      for (int r = 0; r < M; r++) if (r != rank && hrow[r][col]) hrow[r] ^= hrow[rank];
      pivot[rank] = col;
      rank++;
    end
  endtask

  function automatic logic [N-1:0] encode();
    logic [N-1:0] cw, ispiv = '0;
    for (int r = 0; r < rank; r++) ispiv[pivot[r]] = 1'b1;
    for (int v = 0; v < N; v++) cw[v] = ispiv[v] ? 1'b0 : 1'($urandom_range(1));
    for (int r = 0; r < rank; r++) cw[pivot[r]] = ^(hrow[r] & cw);
    return cw;
  endfunction

  function automatic logic [M-1:0] ref_syn(logic [N-1:0] w);
    logic [M-1:0] s = '0;
    for (int c = 0; c < M; c++) for (int k = 0; k < cdeg[c]; k++) s[c] ^= w[cvar[c][k]];
    return s;
  endfunction

  // ---------------------------------------------------------------- model
  int m_llr [N], m_post [N], m_iter, m_sat;
  logic [N-1:0] m_x;
  logic m_ok;

  function automatic int clamp(int v);
    int lim = (1 << (PREC - 1)) - 1;
    return (v > lim) ? lim : (v < -lim) ? -lim : v;
  endfunction

  task automatic model();
    int R [M][CDMAX], Q [M][CDMAX];
    for (int c = 0; c < M; c++) for (int k = 0; k < CDMAX; k++) R[c][k] = 0;
    m_iter = 0;
    forever begin
      for (int v = 0; v < N; v++) begin
        int tot = m_llr[v];
        for (int j = 0; j < vdeg[v]; j++) tot += R[vchk[v][j]][vslot[v][j]];
        for (int j = 0; j < vdeg[v]; j++) begin
          int e = tot - R[vchk[v][j]][vslot[v][j]];
          if (clamp(e) != e) m_sat++;
          Q[vchk[v][j]][vslot[v][j]] = clamp(e);
        end
        m_post[v] = clamp(tot);
        m_x[v] = (tot < 0);
      end
      m_ok = (ref_syn(m_x) == '0);
      if (m_ok || m_iter == IMAX) break;
      for (int c = 0; c < M; c++) begin
        for (int k = 0; k < cdeg[c]; k++) begin
          int mn = 1000, s = 0;
          for (int kk = 0; kk < cdeg[c]; kk++) begin
            if (kk == k) continue;
            if (Q[c][kk] < 0) s ^= 1;
            if ((Q[c][kk] < 0 ? -Q[c][kk] : Q[c][kk]) < mn) mn = (Q[c][kk] < 0 ? -Q[c][kk] : Q[c][kk]);
          end
          R[c][k] = s ? -mn : mn;
        end
      end
      m_iter++;
    end
  endtask

  // ---------------------------------------------------------------- stimulus
  int n_clean_stop, n_corrected, n_limit, n_sat, n_b2b;

  task automatic make_llrs(logic [N-1:0] cw, int flips, bit garbage);
    for (int v = 0; v < N; v++) begin
      int mag = int'($urandom_range(7, 2));
      m_llr[v] = cw[v] ? -mag : mag;
      if (garbage) m_llr[v] = int'($urandom_range(14)) - 7;
    end
    for (int f = 0; f < flips; f++) begin
      int v = int'($urandom_range(N - 1));
      int mag = int'($urandom_range(3, 1));
      m_llr[v] = cw[v] ? mag : -mag;
    end
    for (int v = 0; v < N; v++) llr_in[v] = PREC'(m_llr[v]);
  endtask

  task automatic decode(logic [N-1:0] cw, string kind, bit must_decode, bit back_to_back);
    int cycles = 0;
    m_sat = 0;
    model();
    if (back_to_back) begin
      checks++;
      if (!done) failures++;
      n_b2b++;
    end
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    // cycles counts clock edges after the one that sampled start.
    while (!done && cycles < 100) begin @(posedge clk); #1; cycles++; end
    checks++;
    if (cycles != 2 + 2 * m_iter) begin
      failures++; $display("FAIL %s: latency %0d cycles, model %0d iterations", kind, cycles, m_iter);
    end
    checks++;
    if (int'(iterations) != m_iter || success != m_ok) begin
      failures++; $display("FAIL %s: iterations %0d success %0b, model %0d %0b", kind, iterations, success, m_iter, m_ok);
    end
    checks++;
    if (x != m_x) begin failures++; $display("FAIL %s: hard decisions differ from model", kind); end
    checks++;
    if (syndrome != ref_syn(x)) begin failures++; $display("FAIL %s: syndrome output wrong", kind); end
    for (int v = 0; v < N; v++) begin
      checks++;
      if (int'(llr_out[v]) != m_post[v]) begin
        failures++;
        if (failures < 20) $display("FAIL %s: llr_out[%0d]=%0d model %0d", kind, v, llr_out[v], m_post[v]);
      end
    end
    if (must_decode) begin
      checks++;
      if (!success || x != cw) begin failures++; $display("FAIL %s: word not corrected", kind); end
    end
    if (success && iterations == 0) n_clean_stop++;
    if (success && iterations != 0) n_corrected++;
    if (!success && int'(iterations) == IMAX) n_limit++;
    if (m_sat > 0) n_sat++;
    $display("%s: iterations=%0d success=%0b cycles=%0d", kind, iterations, success, cycles);
  endtask

  initial begin
    logic [N-1:0] cw;
    n_clean_stop = 0; n_corrected = 0; n_limit = 0; n_sat = 0; n_b2b = 0;
    rst = 1'b1; start = 1'b0;
    foreach (llr_in[i]) llr_in[i] = '0;
    build_graph();
    checks++;
    if (rank != M) begin failures++; $display("FAIL rank %0d", rank); end
    repeat (3) @(posedge clk); #1;
    rst = 1'b0;
    @(posedge clk); #1;
    for (int t = 0; t < 3; t++) begin
      cw = encode();
      checks++; if (ref_syn(cw) != '0) failures++;
      make_llrs(cw, 0, 0);
      decode(cw, "clean", 1, t > 0);
    end
    for (int t = 0; t < 10; t++) begin
      cw = encode();
      make_llrs(cw, 1 + t % 3, 0);
      decode(cw, "light", 1, 1);
      repeat (2) @(posedge clk); #1;
    end
    for (int t = 0; t < 6; t++) begin
      cw = encode();
      make_llrs(cw, 15 + 5 * t, 0);
      decode(cw, "medium", 0, 0);
    end
    for (int t = 0; t < 3; t++) begin
      cw = encode();
      make_llrs(cw, 0, 1);
      decode(cw, "garbage", 0, 0);
    end
    $display("mechanisms: clean_stop=%0d corrected=%0d limit=%0d saturation=%0d back_to_back=%0d",
             n_clean_stop, n_corrected, n_limit, n_sat, n_b2b);
    checks++; if (n_clean_stop == 0) failures++;
    checks++; if (n_corrected == 0) failures++;
    checks++; if (n_limit == 0) failures++;
    checks++; if (n_sat == 0) failures++;
    checks++; if (n_b2b == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
