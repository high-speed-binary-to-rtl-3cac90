// tb_smg2: exhaustive check of the 2-bit segment modulo generator.
// Instances for the segment positions of a 12-bit word (bits 4..11) and
// for three moduli; each output is compared with (v * 2^I) mod M worked
// out with integer arithmetic. The m = 29, i = 4 case is also checked
// against the literal residues 0, 16, 3, 19.
module tb_smg2;
  localparam int NM = 3;
  localparam int MS [NM] = '{29, 17, 31};
  localparam int NI = 4;

  int checks = 0, failures = 0;
  logic [1:0] seg;
  logic [4:0] y [NM][NI];

  for (genvar mi = 0; mi < NM; mi++) begin : g_m
    for (genvar ii = 0; ii < NI; ii++) begin : g_i
      smg2 #(.M(MS[mi]), .I(4 + 2*ii)) u_dut (.seg (seg), .y (y[mi][ii]));
    end
  end

  localparam int T3 [4] = '{0, 16, 3, 19};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      seg = 2'(v);
      #1;
      for (int mi = 0; mi < NM; mi++)
        for (int ii = 0; ii < NI; ii++) begin
          longint exp_v;
          exp_v = (longint'(v) << (4 + 2*ii)) % MS[mi];
          checks++;
          if (y[mi][ii] != 5'(exp_v)) begin
            failures++;
            $display("FAIL m=%0d i=%0d v=%0d y=%0d exp=%0d", MS[mi], 4+2*ii, v, y[mi][ii], exp_v);
          end
        end
      checks++;
      if (y[0][0] != 5'(T3[v])) begin
        failures++;
        $display("FAIL m=29 i=4 v=%0d y=%0d table=%0d", v, y[0][0], T3[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
