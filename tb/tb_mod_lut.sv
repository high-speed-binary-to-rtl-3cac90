// tb_mod_lut: exhaustive check of the look-up table for m = 29, K = 3,
// 4 address bits (16 entries) and for m = 17, K = 3, 3 address bits:
// y = (h * 2^K) mod m.
module tb_mod_lut;
  int checks = 0, failures = 0;
  logic [3:0] h;
  logic [4:0] y29, y17;

  mod_lut #(.M(29), .K(3), .AW(4)) u_dut  (.h (h),      .y (y29));
  mod_lut #(.M(17), .K(3), .AW(3)) u_dut2 (.h (h[2:0]), .y (y17));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      h = 4'(i);
      #1;
      checks++;
      if (int'(y29) != (i * 8) % 29) begin
        failures++;
        $display("FAIL m=29 h=%0d y=%0d", i, y29);
      end
      checks++;
      if (int'(y17) != ((i % 8) * 8) % 17) begin
        failures++;
        $display("FAIL m=17 h=%0d y=%0d", i % 8, y17);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
