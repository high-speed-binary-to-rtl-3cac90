// smg_layer: segmentation of the input word and the layer of segment modulo
// generators.
//
// The P-bit word A is cut, from the least significant end, into a first
// segment of ceil(log2 M)-1 bits and NSEG 2-bit segments. The first segment
// is smaller than M and is passed on unchanged, zero-extended to the residue
// width. Each 2-bit segment is reduced by its own smg2. When P leaves a
// single bit at the top, that last segment is padded with a zero, which
// makes its generator a 1-bit function. The NSEG+1 residues are the
// operands of the multi-operand modulo adder that follows.
//
// Interface: a = input word; ops[0] = first segment, ops[g+1] = residue of
// segment g (bits q0+2g+1 .. q0+2g). Timing: combinational.
module smg_layer
  import b2r_pkg::*;
#(
  parameter int P = 12,   // input word length
  parameter int M = 29    // modulus
) (
  input  logic [P-1:0]          a,
  output logic [res_w(M)-1:0]   ops [num_seg(P, M) + 1]
);
  localparam int B    = res_w(M);
  localparam int Q0   = q0_w(M);
  localparam int NSEG = num_seg(P, M);
  localparam int PW   = Q0 + 2 * NSEG;   // padded word length

  logic [PW-1:0] a_pad;
  assign a_pad = PW'(a);

  assign ops[0] = B'(a_pad[Q0-1:0]);

  for (genvar g = 0; g < NSEG; g++) begin : g_seg
    smg2 #(.M(M), .I(Q0 + 2 * g)) u_lf (
      .seg (a_pad[Q0 + 2*g +: 2]),
      .y   (ops[g + 1])
    );
  end
endmodule
