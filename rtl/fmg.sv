// fmg: final modulo generator of one converter channel.
//
// Inputs are three numbers whose sum X is below 2M: the table output
// lt = |(C_H + S_H) * 2^K|_M (< M) and the low parts c_L, s_L of the
// carry-save tree outputs (C_L + S_L < M). The unit
//   CSA1  adds lt, c_L and s_L into two vectors X1 (sum) and X2 (carry),
//   CSA2  adds X1, X2 and the constant -M (two's complement, B+1 bits),
//   BA2   forms X  = X1 + X2        (B-bit ripple-carry adder),
//   BA3   forms X - M               (B+1-bit ripple-carry adder),
//   MUX   takes X - M when its sign bit is 0, X otherwise.
// X - M lies in [-M, M-1], so B+1 bits hold it; X is only taken when it is
// below M, so B bits of BA2 suffice. sel_sub shows which result was taken.
//
// Timing: PIPE_MID registers X1, X2 and the CSA2 vectors; PIPE_OUT registers
// the result and sel_sub. Latency PIPE_MID + PIPE_OUT cycles, one result per
// clock. The choice of these two cut points is this design's own.
module fmg
  import b2r_pkg::*;
#(
  parameter int M        = 29,
  parameter int K        = 3,
  parameter bit PIPE_MID = 1'b1,
  parameter bit PIPE_OUT = 1'b1
) (
  input  logic                clk,
  input  logic [res_w(M)-1:0] lt,
  input  logic [K-1:0]        cl,
  input  logic [K-1:0]        sl,
  output logic [res_w(M)-1:0] r,
  output logic                sel_sub
);
  localparam int B  = res_w(M);
  localparam int W1 = B + 1;
  localparam logic [W1-1:0] NEG_M = W1'((1 << W1) - M);

  logic [W1-1:0] x1, x2, s2, c2;
  logic [W1-1:0] x1_q, x2_q, s2_q, c2_q;
  logic [B:0]    ba2_sum;
  logic [W1:0]   ba3_sum;
  logic [B:0]    res_d, res_q;

  // CSA1: lt + c_L + s_L
  csa #(.W(W1)) u_csa1 (
    .x (W1'(lt)), .y (W1'(cl)), .z (W1'(sl)),
    .s (x1), .c (x2)
  );

  // CSA2: X1 + X2 - M, modulo 2^(B+1)
  csa #(.W(W1)) u_csa2 (
    .x (x1), .y (x2), .z (NEG_M),
    .s (s2), .c (c2)
  );

  pipe_reg #(.W(4*W1), .EN(PIPE_MID)) u_mid (
    .clk (clk),
    .d   ({x1, x2, s2, c2}),
    .q   ({x1_q, x2_q, s2_q, c2_q})
  );

  // BA2: X = X1 + X2 (only needed when X < M, i.e. below 2^B)
  rca #(.W(B)) u_ba2 (.a (x1_q[B-1:0]), .b (x2_q[B-1:0]), .sum (ba2_sum));

  // BA3: X - M as a (B+1)-bit two's complement number
  rca #(.W(W1)) u_ba3 (.a (s2_q), .b (c2_q), .sum (ba3_sum));

  // MUX: a non-negative X - M is the residue
  always_comb begin
    res_d[B] = ~ba3_sum[B];
    res_d[B-1:0] = ba3_sum[B] ? ba2_sum[B-1:0] : ba3_sum[B-1:0];
  end

  pipe_reg #(.W(B+1), .EN(PIPE_OUT)) u_out (.clk (clk), .d (res_d), .q (res_q));

  assign r       = res_q[B-1:0];
  assign sel_sub = res_q[B];
endmodule
