// mod_lut: the look-up table "LT" of the modulo adder.
//
// The tree outputs are split at bit K; the high parts C_H and S_H carry the
// weight 2^K. After they are added (C_H + S_H = h), this table returns
// |h * 2^K|_M. Its 2^AW entries are computed at elaboration from M and K;
// in hardware each output bit is a logic function of the AW address bits.
//
// Interface: h = address, y = residue (ceil(log2 M) bits).
// Timing: combinational.
module mod_lut
  import b2r_pkg::*;
#(
  parameter int M  = 29,
  parameter int K  = 3,    // weight of the address LSB is 2^K
  parameter int AW = 4     // address width
) (
  input  logic [AW-1:0]       h,
  output logic [res_w(M)-1:0] y
);
  localparam int B = res_w(M);
  typedef logic [2**AW-1:0][B-1:0] table_t;

  function automatic table_t build_table();
    table_t t;
    for (int e = 0; e < 2**AW; e++)
      t[e] = B'((e * pow2mod(K, M)) % M);
    return t;
  endfunction

  localparam table_t TBL = build_table();

  assign y = TBL[h];
endmodule
