// tb_smg_layer: checks the segmentation and the segment residues.
// For a 12-bit word and m = 29, every operand is compared with the residue
// of its segment computed by integer arithmetic, for the worked example
// A = 3545 (operands 9, 16, 18, 24, 27) and for random words. A 13-bit
// instance (last segment one bit wide) is checked through the sum of its
// operands, which must be congruent to A modulo 17.
module tb_smg_layer;
  int checks = 0, failures = 0;

  logic [11:0] a;
  logic [4:0]  ops [5];
  smg_layer #(.P(12), .M(29)) u_dut (.a (a), .ops (ops));

  logic [12:0] a13;
  logic [4:0]  ops13 [6];
  smg_layer #(.P(13), .M(17)) u_dut13 (.a (a13), .ops (ops13));

  localparam int EX [5] = '{9, 16, 18, 24, 27};

  task automatic check12(input bit use_example);
    longint e;
    #1;
    for (int j = 0; j < 5; j++) begin
      if (j == 0) e = longint'(a[3:0]);
      else        e = (longint'((a >> (4 + 2*(j-1))) & 12'd3) << (4 + 2*(j-1))) % 29;
      if (use_example) e = EX[j];
      checks++;
      if (ops[j] != 5'(e)) begin
        failures++;
        $display("FAIL a=%0d op%0d=%0d exp=%0d", a, j, ops[j], e);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 12'd3545;
    check12(1'b1);
    for (int t = 0; t < 500; t++) begin
      a = 12'($urandom);
      check12(1'b0);
    end
    for (int t = 0; t < 500; t++) begin
      int s;
      a13 = 13'($urandom);
      #1;
      s = 0;
      for (int j = 0; j < 6; j++) begin
        s += int'(ops13[j]);
        checks++;
        if (j > 0 && ops13[j] >= 17) begin
          failures++;
          $display("FAIL p=13 op%0d=%0d not reduced", j, ops13[j]);
        end
      end
      checks++;
      if (s % 17 != int'(a13) % 17) begin
        failures++;
        $display("FAIL p=13 a=%0d sum=%0d", a13, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
