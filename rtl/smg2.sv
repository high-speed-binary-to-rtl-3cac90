// smg2: 2-bit segment modulo generator (one "LF" block of the SMG layer).
//
// The segment (b_{i+1}, b_i) of the input word stands for the number
// b_{i+1}*2^(i+1) + b_i*2^i. Its residue modulo M can take only four values,
// 0, |2^i|_M, |2^(i+1)|_M and |2^i + 2^(i+1)|_M, so every output bit is a
// logic function of just two variables (0, b1&b0, b1&~b0, b1, ~b1&b0, b0,
// b1^b0 or b1|b0). The four residues are computed at elaboration from M
// and I; the tool then reduces each output bit to one of those functions.
//
// Interface: seg = (b_{i+1}, b_i), y = residue, ceil(log2 M) bits.
// Timing: purely combinational, one two-input gate level at most.
module smg2
  import b2r_pkg::*;
#(
  parameter int M = 29,   // modulus
  parameter int I = 4     // bit position of the segment's low bit
) (
  input  logic [1:0]          seg,
  output logic [res_w(M)-1:0] y
);
  localparam int B = res_w(M);
  localparam logic [B-1:0] R1 = B'(seg_res(1, I, M));
  localparam logic [B-1:0] R2 = B'(seg_res(2, I, M));
  localparam logic [B-1:0] R3 = B'(seg_res(3, I, M));

  always_comb begin
    unique case (seg)
      2'b00:   y = '0;
      2'b01:   y = R1;
      2'b10:   y = R2;
      default: y = R3;
    endcase
  end
endmodule
