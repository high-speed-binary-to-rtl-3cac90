// csa: word-level carry-save adder (3:2 compressor), one full adder per bit.
//
// x + y + z = s + c, where s is the bitwise sum and c the bitwise majority
// shifted up by one position (c[0] = 0). Both outputs are W bits wide, so
// the carry out of bit W-1 is dropped: the identity then holds modulo 2^W.
// Callers either size W so that no vector can reach 2^W (the CSA tree) or
// want arithmetic modulo 2^W (the x - m computation of the final modulo
// generator). Timing: combinational, one full-adder delay.
module csa #(
  parameter int W = 5
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  logic [W-1:0] maj;

  assign s   = x ^ y ^ z;
  assign maj = (x & y) | (x & z) | (y & z);

  if (W > 1) begin : g_shift
    assign c = {maj[W-2:0], 1'b0};
  end else begin : g_one
    assign c = 1'b0;
  end
endmodule
