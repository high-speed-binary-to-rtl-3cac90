// b2r_channel: one channel of the binary-to-residue converter, A -> |A|_M.
//
// Datapath, from input to output:
//   SMG layer  first segment of ceil(log2 M)-1 bits passed on, every 2-bit
//              segment reduced mod M by a two-variable logic function
//   CSA tree   the non-constant bits of the NSEG+1 residues compressed,
//              column by column, to a carry vector c and a sum vector s
//   split      c = (c_H, c_L), s = (s_H, s_L) at bit K, with K the largest
//              split for which C_L + S_L < M
//   BA1 + LT   h = C_H + S_H, then |h * 2^K|_M from a small table
//   FMG        CSA1 (LT + c_L + s_L), CSA2 (X - M), BA2 / BA3 in parallel,
//              MUX picks the residue
// For P = 12, M = 29 there are four 2-bit segments, five tree operands with
// 4, 5, 3, 4, 4 live bits of weight 2^0..2^4, and three tree levels; the
// tree vectors are 7 bits, K = 3 and the table has 16 entries.
//
// Pipelining: PIPE[0] registers after the tree, PIPE[1] after BA1, PIPE[2]
// after CSA2 and PIPE[3] at the output, so the longest stage is BA3 plus the
// MUX. These cut points are this design's own choice; the architecture
// allows a register after every gate layer. Latency is the number of set
// PIPE bits; a new word is accepted every clock. in_valid travels with the
// data to out_valid. rst_n (asynchronous, active low) clears only the valid
// pipeline.
module b2r_channel
  import b2r_pkg::*;
#(
  parameter int       P    = 12,
  parameter int       M    = 29,
  parameter bit [3:0] PIPE = 4'b1111
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [P-1:0]        a,
  output logic                out_valid,
  output logic [res_w(M)-1:0] res
);
  localparam int B    = res_w(M);
  localparam int NOPS = num_seg(P, M) + 1;
  localparam int TW   = tree_w(P, M);
  localparam int K    = split_k(P, M);
  localparam int HW   = lut_aw(P, M);
  localparam int LAT  = 32'(PIPE[0]) + 32'(PIPE[1]) + 32'(PIPE[2]) + 32'(PIPE[3]);

  // SMG layer
  logic [B-1:0]  seg_r [NOPS];
  logic [TW-1:0] tree_in [NOPS];
  smg_layer #(.P(P), .M(M)) u_smg (.a (a), .ops (seg_r));

  for (genvar j = 0; j < NOPS; j++) begin : g_ext
    assign tree_in[j] = TW'(seg_r[j]);
  end

  // CSA tree, fed only with the generator bits that are not constant 0
  typedef bit [NOPS-1:0][TW-1:0] live_t;
  function automatic live_t live_mask();
    live_t l;
    for (int k = 0; k < NOPS; k++)
      for (int j = 0; j < TW; j++) l[k][j] = live_bit(P, M, k, j);
    return l;
  endfunction

  logic [TW-1:0] tc, ts, tc_q, ts_q;
  csa_tree #(.N(NOPS), .W(TW), .LIVE(live_mask())) u_tree (.ops (tree_in), .c (tc), .s (ts));

  pipe_reg #(.W(2*TW), .EN(PIPE[0])) u_r0 (.clk (clk), .d ({tc, ts}), .q ({tc_q, ts_q}));

  // split and BA1: h = C_H + S_H; (C_H + S_H) * 2^K <= total, so HW bits hold h
  logic [TW-K:0]  ba1_sum;
  logic [HW-1:0]  h, h_q;
  logic [K-1:0]   cl_q, sl_q;
  rca #(.W(TW-K)) u_ba1 (.a (tc_q[TW-1:K]), .b (ts_q[TW-1:K]), .sum (ba1_sum));
  assign h = ba1_sum[HW-1:0];

  pipe_reg #(.W(HW + 2*K), .EN(PIPE[1])) u_r1 (
    .clk (clk),
    .d   ({h, tc_q[K-1:0], ts_q[K-1:0]}),
    .q   ({h_q, cl_q, sl_q})
  );

  // LT
  logic [B-1:0] lt;
  mod_lut #(.M(M), .K(K), .AW(HW)) u_lt (.h (h_q), .y (lt));

  // FMG (sel_sub, the MUX select, is left for observation only)
  logic sel_sub;
  fmg #(.M(M), .K(K), .PIPE_MID(PIPE[2]), .PIPE_OUT(PIPE[3])) u_fmg (
    .clk (clk), .lt (lt), .cl (cl_q), .sl (sl_q), .r (res), .sel_sub (sel_sub)
  );

  // valid pipeline
  if (LAT > 0) begin : g_vld
    logic [LAT-1:0] vpipe;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) vpipe <= '0;
      else        vpipe <= LAT'({vpipe, in_valid});
    end
    assign out_valid = vpipe[LAT-1];
  end else begin : g_novld
    assign out_valid = in_valid;
  end
endmodule
