// tb_csa: random check of the 3:2 carry-save adder: s is the bitwise sum,
// c[0] = 0 and s + c = x + y + z modulo 2^W.
module tb_csa;
  localparam int W = 6;
  int checks = 0, failures = 0;
  logic [W-1:0] x, y, z, s, c;

  csa #(.W(W)) u_dut (.x (x), .y (y), .z (z), .s (s), .c (c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int e;
      {x, y, z} = 18'($urandom);
      #1;
      e = (int'(x) + int'(y) + int'(z)) % (1 << W);
      checks++;
      if ((int'(s) + int'(c)) % (1 << W) != e || c[0] != 1'b0 || s != (x ^ y ^ z)) begin
        failures++;
        $display("FAIL x=%0d y=%0d z=%0d s=%0d c=%0d", x, y, z, s, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
