// tb_word_lengths: the m = 29 channel at the input word lengths
// p = 12, 14, 16, 24 and 32 (4, 5, 6, 10 and 14 two-bit segments).
// All five instances receive the same random words (truncated to p bits),
// one per clock after reset; every residue is compared, four cycles later,
// with the word reduced modulo 29 by integer arithmetic. The all-ones word
// of each length, which gives the largest segment-residue sum, comes first.
module tb_word_lengths;
  localparam int LAT  = 4;
  localparam int NW   = 5;
  localparam int PS [NW] = '{12, 14, 16, 24, 32};
  localparam int NCYC = 20000;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [31:0] a = '0;
  logic       v [NW];
  logic [4:0] r [NW];

  for (genvar k = 0; k < NW; k++) begin : g_p
    b2r_channel #(.P(PS[k]), .M(29)) u_ch (
      .clk (clk), .rst_n (rst_n), .in_valid (in_valid), .a (a[PS[k]-1:0]),
      .out_valid (v[k]), .res (r[k]));
  end

  always #5 clk = ~clk;

  logic [31:0] ha [NCYC];

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCYC; c++) begin
      @(posedge clk);
      #1;
      in_valid = 1'b1;
      a = (c == 0) ? 32'hFFFF_FFFF : $urandom;
      ha[c] = a;
      @(negedge clk);
      if (c >= LAT) begin
        for (int k = 0; k < NW; k++) begin
          longint e;
          e = (longint'(ha[c-LAT]) & ((longint'(1) << PS[k]) - 1)) % 29;
          checks++;
          if (!v[k] || longint'(r[k]) != e) begin
            failures++;
            $display("FAIL p=%0d a=%0h valid=%0d res=%0d expected %0d", PS[k],
                     ha[c-LAT], v[k], r[k], e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
