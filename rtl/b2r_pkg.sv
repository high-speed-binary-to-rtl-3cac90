// b2r_pkg: constants and elaboration-time functions shared by the
// binary-to-residue (B/RNS) converter.
//
// The converter reduces an unsigned p-bit word A modulo a small modulus m.
// The word is cut into a first segment of ceil(log2 m)-1 bits, which is
// already a residue, and 2-bit segments, each reduced by its own small
// generator. The functions below derive every width of the datapath from
// p and m at elaboration time, so no table has to be written by hand:
//   pow2mod      |2^i|_m
//   seg_res      residue of the value v (0..3) of the 2-bit segment at bit i
//   num_seg      number of 2-bit segments (a trailing 1-bit segment is padded)
//   sum_max      largest possible sum of all segment residues
//   tree_w       width that holds every carry-save vector without loss
//   split_k      split point of the tree outputs: the low parts c_L, s_L
//                satisfy C_L + S_L < m, i.e. 2 * (2^k - 1) < m
//   lut_aw       address width of the look-up table for the high parts
// The segmentation and the split rule follow the converter's description;
// deriving the widths from worst-case sums is this design's own choice.
package b2r_pkg;

  // Residue width b = ceil(log2 m); residues lie in [0, m-1].
  function automatic int res_w(input int m);
    return $clog2(m);
  endfunction

  // Width of the first (unreduced) segment: ceil(log2 m) - 1 bits.
  function automatic int q0_w(input int m);
    return $clog2(m) - 1;
  endfunction

  function automatic int pow2mod(input int i, input int m);
    int r;
    r = 1 % m;
    for (int k = 0; k < i; k++) r = (2 * r) % m;
    return r;
  endfunction

  // Residue of the 2-bit segment value v placed at bit position i.
  function automatic int seg_res(input logic [1:0] v, input int i, input int m);
    int r;
    r = 0;
    if (v[0]) r = r + pow2mod(i, m);
    if (v[1]) r = r + pow2mod(i + 1, m);
    return r % m;
  endfunction

  function automatic int num_seg(input int p, input int m);
    return (p - q0_w(m) + 1) / 2;
  endfunction

  function automatic int sum_max(input int p, input int m);
    int s, best, i, lim;
    s = (1 << q0_w(m)) - 1;
    for (int g = 0; g < num_seg(p, m); g++) begin
      i    = q0_w(m) + 2 * g;
      lim  = (i + 1 < p) ? 4 : 2;   // a trailing 1-bit segment takes 0..1
      best = 0;
      for (int v = 0; v < lim; v++)
        if (seg_res(2'(v), i, m) > best) best = seg_res(2'(v), i, m);
      s = s + best;
    end
    return s;
  endfunction

  function automatic int tree_w(input int p, input int m);
    return $clog2(sum_max(p, m) + 1);
  endfunction

  // Largest k with 2 * (2^k - 1) < m, kept below the tree width.
  function automatic int split_k(input int p, input int m);
    int k;
    k = 1;
    while (((1 << (k + 2)) - 2 < m) && (k + 1 < tree_w(p, m))) k++;
    return k;
  endfunction

  // Live-bit mask of the tree operands: bit j of operand k can be 1.
  // Operand 0 is the first segment; operand g+1 the generator of segment g.
  function automatic bit live_bit(input int p, input int m, input int k, input int j);
    int i, lim;
    if (k == 0) return j < q0_w(m);
    i   = q0_w(m) + 2 * (k - 1);
    lim = (i + 1 < p) ? 4 : 2;
    for (int v = 0; v < lim; v++)
      if ((seg_res(2'(v), i, m) >> j) & 1) return 1'b1;
    return 1'b0;
  endfunction

  // The high parts satisfy (C_H + S_H) * 2^k <= sum_max.
  function automatic int lut_aw(input int p, input int m);
    int hmax;
    hmax = sum_max(p, m) >> split_k(p, m);
    return (hmax < 1) ? 1 : $clog2(hmax + 1);
  endfunction

endpackage
