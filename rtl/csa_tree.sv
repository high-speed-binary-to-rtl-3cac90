// csa_tree: multi-operand carry-save tree, compressed column by column.
//
// N operands of W bits are reduced to two vectors c and s with c + s equal
// to the sum of the operands. Only the operand bits marked in LIVE enter the
// tree: a segment generator drives some of its output bits with constant 0,
// and those bits are dropped instead of being added. Each bit weight 2^j is a
// column of bits. At every level a column is taken three bits at a time by
// full adders: the sum stays in the column and the carry moves to column j+1.
// One or two left-over bits pass on. A column of n bits then holds
// floor(n/3) + (n mod 3) + floor(n'/3) bits, where n' is the count in column
// j-1. The tree stops when no column holds more than two bits: bit 0 of a
// column goes to s, bit 1 to c. The number of levels is set by the tallest
// column; for the 12-bit, m = 29 channel the column heights are 4, 5, 3, 4, 4
// (weights 2^0..2^4) and three levels are needed.
//
// W must hold the largest possible total. Every partial sum is then below
// 2^W, so the carries out of column W-1, which are dropped, are always zero.
// Arranging full adders per bit column follows the converter's tree; the
// level-by-level grouping (Wallace style, no half adders) is this design's
// own choice. Timing: combinational, one full-adder delay per level.
module csa_tree #(
  parameter int                  N    = 5,
  parameter int                  W    = 7,
  parameter bit [N-1:0][W-1:0]   LIVE = '1   // LIVE[k][j]: bit j of operand k may be 1
) (
  input  logic [W-1:0] ops [N],
  output logic [W-1:0] c,
  output logic [W-1:0] s
);
  // number of bits in column j entering level l
  function automatic int cnt(input int l, input int j);
    int n [W];
    int nx [W];
    for (int q = 0; q < W; q++) begin
      n[q] = 0;
      for (int k = 0; k < N; k++) if (LIVE[k][q]) n[q]++;
    end
    for (int lv = 0; lv < l; lv++) begin
      for (int q = 0; q < W; q++)
        nx[q] = n[q] / 3 + n[q] % 3 + ((q > 0) ? n[q-1] / 3 : 0);
      n = nx;
    end
    return n[j];
  endfunction

  // position of operand k's bit j within column j at level 0
  function automatic int pos0(input int k, input int j);
    int p;
    p = 0;
    for (int q = 0; q < k; q++) if (LIVE[q][j]) p++;
    return p;
  endfunction

  function automatic int tallest(input int l);
    int t;
    t = 0;
    for (int j = 0; j < W; j++) if (cnt(l, j) > t) t = cnt(l, j);
    return t;
  endfunction

  function automatic int n_levels();
    int l;
    l = 0;
    while (tallest(l) > 2) l++;
    return l;
  endfunction

  function automatic int max_height();
    int h;
    h = 2;
    for (int l = 0; l <= n_levels(); l++) if (tallest(l) > h) h = tallest(l);
    return h;
  endfunction

  localparam int NLEV = n_levels();
  localparam int H    = max_height();

  // columns entering level 0
  wire [H-1:0] col0 [W];

  for (genvar j = 0; j < W; j++) begin : g_in
    for (genvar k = 0; k < N; k++) begin : g_op
      if (LIVE[k][j]) begin : g_live
        assign col0[j][pos0(k, j)] = ops[k][j];
      end
    end
    if (cnt(0, j) < H) begin : g_pad
      assign col0[j][H-1:cnt(0, j)] = '0;
    end
  end

  for (genvar l = 0; l < NLEV; l++) begin : g_lev
    wire [H-1:0] ic [W];   // columns entering this level
    wire [H-1:0] oc [W];   // columns leaving it
    if (l == 0) begin : g_first
      assign ic = col0;
    end else begin : g_next
      assign ic = g_lev[l-1].oc;
    end
    for (genvar j = 0; j < W; j++) begin : g_col
      localparam int NI  = cnt(l, j);
      localparam int G   = NI / 3;
      localparam int R   = NI % 3;
      localparam int NO  = cnt(l + 1, j);
      // full adders: sum stays, carry goes to column j+1 after its own bits
      for (genvar g = 0; g < G; g++) begin : g_fa
        logic a0, a1, a2;
        assign a0 = ic[j][3*g];
        assign a1 = ic[j][3*g+1];
        assign a2 = ic[j][3*g+2];
        assign oc[j][g] = a0 ^ a1 ^ a2;
        if (j + 1 < W) begin : g_cy
          assign oc[j+1][cnt(l, j+1) / 3 + cnt(l, j+1) % 3 + g] =
            (a0 & a1) | (a0 & a2) | (a1 & a2);
        end
      end
      for (genvar r = 0; r < R; r++) begin : g_pass
        assign oc[j][G + r] = ic[j][3*G + r];
      end
      if (NO < H) begin : g_pad
        assign oc[j][H-1:NO] = '0;
      end
    end
  end

  if (NLEV > 0) begin : g_out
    for (genvar j = 0; j < W; j++) begin : g_bit
      assign s[j] = g_lev[NLEV-1].oc[j][0];
      assign c[j] = g_lev[NLEV-1].oc[j][1];
    end
  end else begin : g_flat
    for (genvar j = 0; j < W; j++) begin : g_bit
      assign s[j] = col0[j][0];
      assign c[j] = col0[j][1];
    end
  end
endmodule
