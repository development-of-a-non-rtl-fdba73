// ldpc_pkg: constants and elaboration-time helpers shared by the LDPC decoder.
//
// The code is a quasi-cyclic binary LDPC code of length N = 576 with M = 288
// check equations (rate 1/2). Its parity-check matrix H is a 12 x 24 array of
// 24 x 24 blocks. A block is either all-zero (shift -1) or the identity matrix
// rotated by the shift s: row r of the block has its single one in column
// (r + s) mod 24. The shifts are those of the IEEE 802.16e rate-1/2 base matrix
// scaled to a 24 x 24 circulant (shift = floor(s96 * 24 / 96)). Check row
// c = 24*br + r therefore contains variable 24*bc + ((r + s) mod 24) for every
// non-zero block (br, bc).
//
// Degrees that follow: variable nodes have 2, 3 or 6 edges, check nodes 6 or 7,
// 1824 edges in all. Messages are PREC-bit two's complement LLRs; positive
// means "bit is 0".
//
// The functions below are constant functions, evaluated only while the design
// is elaborated. The per-block ones (row_deg, col_deg, row_slot, col_slot) are
// what the RTL uses: the node instances and their wiring are generated block by
// block from the table, not listed. The per-node ones (cn_var, vn_chk, ...)
// describe the same graph edge by edge and serve the testbenches.
package ldpc_pkg;

  // Code dimensions.
  localparam int Z      = 24;          // circulant size
  localparam int MB     = 12;          // block rows
  localparam int NB     = 24;          // block columns
  localparam int N      = NB * Z;      // 576 variable nodes (code bits)
  localparam int M      = MB * Z;      // 288 check nodes
  localparam int VDMAX  = 6;           // largest variable-node degree
  localparam int CDMAX  = 7;           // largest check-node degree

  // Message precision and iteration limit of the main configuration.
  localparam int PREC_DEF = 4;
  localparam int IMAX_DEF = 6;

  // Circulant shifts, -1 for an all-zero block.
  localparam int BASE [MB][NB] = '{
    '{-1, 23, 18, -1, -1, -1, -1, -1, 13, 20, -1, -1,  1,  0, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1},
    '{-1,  6, -1, -1, -1,  5, 19,  2, -1, -1, -1,  3, -1,  0,  0, -1, -1, -1, -1, -1, -1, -1, -1, -1},
    '{-1, -1, -1,  6,  5, 20, -1,  8, -1, -1, -1,  0, -1, -1,  0,  0, -1, -1, -1, -1, -1, -1, -1, -1},
    '{15, -1, 11, -1, -1, -1, -1, -1, 16,  6, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1, -1, -1},
    '{-1, -1,  9, -1, -1, -1, 21, -1, -1, 10, 18, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1, -1},
    '{-1, -1, -1, -1, 11, 10, -1, 20, -1, -1, -1, 19,  0, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1},
    '{-1, -1, 23, 13, -1, -1, -1, -1, -1,  3,  4, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1},
    '{-1,  2, 18, -1, -1, -1,  0, -1, -1, 11, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1},
    '{ 3, -1, -1, -1, 20,  6, -1, 10, -1, -1, -1, 12, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1, -1},
    '{-1, -1, -1, -1, -1, 23, -1, 14, -1, -1, 17, 18, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1},
    '{-1, -1,  1, 16, -1, -1, -1, -1,  9, 12, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0},
    '{10, -1, -1, -1, -1, 16, -1, 10, -1, -1, -1,  6,  1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0}
  };

  // Number of edges of check node c.
  function automatic int cn_deg(int c);
    int d = 0;
    for (int bc = 0; bc < NB; bc++) if (BASE[c / Z][bc] >= 0) d++;
    return d;
  endfunction

  // Variable joined to check c by its k-th edge (edges in increasing column order).
  function automatic int cn_var(int c, int k);
    int br = c / Z, r = c % Z, n = 0;
    for (int bc = 0; bc < NB; bc++) begin
      if (BASE[br][bc] >= 0) begin
        if (n == k) return bc * Z + (r + BASE[br][bc]) % Z;
        n++;
      end
    end
    return -1;
  endfunction

  // Number of edges of variable node v.
  function automatic int vn_deg(int v);
    int d = 0;
    for (int br = 0; br < MB; br++) if (BASE[br][v / Z] >= 0) d++;
    return d;
  endfunction

  // Check joined to variable v by its j-th edge (edges in increasing row order).
  function automatic int vn_chk(int v, int j);
    int bc = v / Z, o = v % Z, n = 0;
    for (int br = 0; br < MB; br++) begin
      if (BASE[br][bc] >= 0) begin
        if (n == j) return br * Z + (o - BASE[br][bc] + Z) % Z;
        n++;
      end
    end
    return -1;
  endfunction

  // Position (j) of check c in the edge list of the variable on c's k-th edge.
  function automatic int cn_edge_vslot(int c, int k);
    int br = c / Z, n = 0, bc = -1, j = 0;
    for (int b = 0; b < NB; b++) begin
      if (BASE[br][b] >= 0) begin
        if (n == k) bc = b;
        n++;
      end
    end
    if (bc < 0) return -1;
    for (int b = 0; b < br; b++) if (BASE[b][bc] >= 0) j++;
    return j;
  endfunction

  // Position (k) of variable v in the edge list of the check on v's j-th edge.
  function automatic int vn_edge_cslot(int v, int j);
    int bc = v / Z, n = 0, br = -1, k = 0;
    for (int b = 0; b < MB; b++) begin
      if (BASE[b][bc] >= 0) begin
        if (n == j) br = b;
        n++;
      end
    end
    if (br < 0) return -1;
    for (int b = 0; b < bc; b++) if (BASE[br][b] >= 0) k++;
    return k;
  endfunction

  // Shift of block (br, bc), -1 when the block is zero.
  function automatic int shift_of(int br, int bc);
    return BASE[br][bc];
  endfunction

  // Degree of block row br (= degree of each of its check nodes).
  function automatic int row_deg(int br);
    int d = 0;
    for (int b = 0; b < NB; b++) if (BASE[br][b] >= 0) d++;
    return d;
  endfunction

  // Degree of block column bc (= degree of each of its variable nodes).
  function automatic int col_deg(int bc);
    int d = 0;
    for (int b = 0; b < MB; b++) if (BASE[b][bc] >= 0) d++;
    return d;
  endfunction

  // Edge slot, at a check node of block row br, of the edges of block (br, bc):
  // the number of non-zero blocks left of bc in that row.
  function automatic int row_slot(int br, int bc);
    int k = 0;
    for (int b = 0; b < bc; b++) if (BASE[br][b] >= 0) k++;
    return k;
  endfunction

  // Edge slot, at a variable node of block column bc, of the edges of block
  // (br, bc): the number of non-zero blocks above br in that column.
  function automatic int col_slot(int br, int bc);
    int j = 0;
    for (int b = 0; b < br; b++) if (BASE[b][bc] >= 0) j++;
    return j;
  endfunction

  // Clamp a wide value into the symmetric range of a w-bit message.
  function automatic int sat_int(int v, int w);
    int lim = (1 << (w - 1)) - 1;
    if (v > lim)  return lim;
    if (v < -lim) return -lim;
    return v;
  endfunction

endpackage
