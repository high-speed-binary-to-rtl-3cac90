// tb_rca: exhaustive check of the ripple-carry adder for W = 5 and W = 6.
module tb_rca;
  int checks = 0, failures = 0;
  logic [4:0] a5, b5;
  logic [5:0] s5;
  logic [5:0] a6, b6;
  logic [6:0] s6;

  rca #(.W(5)) u_dut5 (.a (a5), .b (b5), .sum (s5));
  rca #(.W(6)) u_dut6 (.a (a6), .b (b6), .sum (s6));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        a6 = 6'(i); b6 = 6'(j);
        a5 = 5'(i); b5 = 5'(j);
        #1;
        checks++;
        if (int'(s6) != i + j) begin
          failures++;
          $display("FAIL W=6 %0d+%0d=%0d", i, j, s6);
        end
        if (i < 32 && j < 32) begin
          checks++;
          if (int'(s5) != i + j) begin
            failures++;
            $display("FAIL W=5 %0d+%0d=%0d", i, j, s5);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
