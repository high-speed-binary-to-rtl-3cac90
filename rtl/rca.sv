// rca: ripple-carry binary adder, the "BA" of the converter.
//
// Bit 0 is a half adder and bits 1..W-1 are full adders, chained through
// their carries, so a W-bit adder costs (W-1) full adders and one half
// adder. sum is W+1 bits: the top bit is the carry out.
// Timing: combinational; the delay grows linearly with W.
module rca #(
  parameter int W = 5
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W:0]   sum
);
  logic [W:1] cy;

  // half adder at bit 0
  assign sum[0] = a[0] ^ b[0];
  assign cy[1]  = a[0] & b[0];

  for (genvar i = 1; i < W; i++) begin : g_fa
    assign sum[i]  = a[i] ^ b[i] ^ cy[i];
    assign cy[i+1] = (a[i] & b[i]) | (cy[i] & (a[i] ^ b[i]));
  end

  assign sum[W] = cy[W];
endmodule
