// b2r_converter: binary-to-residue converter for an RNS base of NCH moduli.
//
// A P-bit unsigned word A (0 .. 2^P-1) is converted to its residue representation
// (|A|_m1, ..., |A|_mn). Each modulus has its own b2r_channel; all channels
// see the same input word and work in parallel with the same latency, so
// the residues of one word leave together, one word per clock.
//
// The default base {29, 31, 17} is this design's own choice: five-bit,
// pairwise prime moduli whose product (15283) exceeds 2^12, so every 12-bit
// input has a unique residue representation. Every channel output is RW
// bits, the width of the largest modulus; a smaller modulus' residue is
// zero-extended.
//
// Interface: in_valid/a in, out_valid/res out, LAT clock cycles later
// (4 with the default PIPE). rst_n is asynchronous, active low.
module b2r_converter
  import b2r_pkg::*;
#(
  parameter int       P             = 12,
  parameter int       NCH           = 3,
  parameter int       MODULI [NCH]  = '{29, 31, 17},
  parameter bit [3:0] PIPE          = 4'b1111
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [P-1:0]  a,
  output logic          out_valid,
  output logic [max_rw()-1:0] res [NCH]
);
  function automatic int max_rw();
    int w;
    w = 1;
    for (int i = 0; i < NCH; i++)
      if (res_w(MODULI[i]) > w) w = res_w(MODULI[i]);
    return w;
  endfunction

  localparam int RW = max_rw();

  logic [NCH-1:0] ch_valid;

  for (genvar i = 0; i < NCH; i++) begin : g_ch
    localparam int MI = MODULI[i];
    logic [res_w(MI)-1:0] r;
    b2r_channel #(.P(P), .M(MI), .PIPE(PIPE)) u_ch (
      .clk (clk), .rst_n (rst_n), .in_valid (in_valid), .a (a),
      .out_valid (ch_valid[i]), .res (r)
    );
    assign res[i] = RW'(r);
  end

  // all channels have the same latency, so one valid stands for all
  assign out_valid = ch_valid[0];

  a_valid_agree: assert property (@(posedge clk) disable iff (!rst_n)
    (ch_valid == '0) || (ch_valid == '1))
    else $error("b2r_converter: channel valid signals disagree");
endmodule
