// tb_csa_tree: random check of the carry-save tree: c + s equals the sum of
// the operands. Tree sizes: 5 operands of 7 bits, 15 operands of 9 bits
// (a 32-bit word), 3 and 2 operands, all with every bit live, and the
// 12-bit, m = 29 channel's tree, whose operands have only the bits
// 0x0F, 0x13, 0x1E, 0x1F, 0x1B live. Operand values are bounded so that
// the total fits the width, and respect the live masks.
module tb_csa_tree;
  int checks = 0, failures = 0;

  logic [6:0] o5 [5];
  logic [6:0] c5, s5;
  csa_tree #(.N(5), .W(7)) u_dut5 (.ops (o5), .c (c5), .s (s5));

  logic [8:0] o15 [15];
  logic [8:0] c15, s15;
  csa_tree #(.N(15), .W(9)) u_dut15 (.ops (o15), .c (c15), .s (s15));

  localparam bit [4:0][6:0] LIVE29 = {7'h1B, 7'h1F, 7'h1E, 7'h13, 7'h0F};
  logic [6:0] om [5];
  logic [6:0] cm, sm;
  csa_tree #(.N(5), .W(7), .LIVE(LIVE29)) u_dutm (.ops (om), .c (cm), .s (sm));

  logic [5:0] o3 [3];
  logic [5:0] c3, s3;
  csa_tree #(.N(3), .W(6)) u_dut3 (.ops (o3), .c (c3), .s (s3));

  logic [5:0] o2 [2];
  logic [5:0] c2, s2;
  csa_tree #(.N(2), .W(6)) u_dut2 (.ops (o2), .c (c2), .s (s2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int e5, e15, e3, e2, em;
      e5 = 0; e15 = 0; e3 = 0; e2 = 0; em = 0;
      foreach (om[j]) begin om[j] = 7'($urandom) & LIVE29[j]; em += int'(om[j]); end
      foreach (o5[j])  begin o5[j]  = 7'($urandom_range(25)); e5 += int'(o5[j]); end
      foreach (o15[j]) begin o15[j] = 9'($urandom_range(31)); e15 += int'(o15[j]); end
      foreach (o3[j])  begin o3[j]  = 6'($urandom_range(21)); e3 += int'(o3[j]); end
      foreach (o2[j])  begin o2[j]  = 6'($urandom_range(31)); e2 += int'(o2[j]); end
      #1;
      checks += 5;
      if (int'(cm) + int'(sm) != em) begin
        failures++; $display("FAIL masked c=%0d s=%0d exp=%0d", cm, sm, em);
      end
      if (int'(c5) + int'(s5) != e5) begin
        failures++; $display("FAIL N=5 c=%0d s=%0d exp=%0d", c5, s5, e5);
      end
      if (int'(c15) + int'(s15) != e15) begin
        failures++; $display("FAIL N=15 c=%0d s=%0d exp=%0d", c15, s15, e15);
      end
      if (int'(c3) + int'(s3) != e3) begin
        failures++; $display("FAIL N=3 c=%0d s=%0d exp=%0d", c3, s3, e3);
      end
      if (int'(c2) + int'(s2) != e2) begin
        failures++; $display("FAIL N=2 c=%0d s=%0d exp=%0d", c2, s2, e2);
      end
    end
    // the m = 29 tree is three full-adder levels deep
    checks++;
    if (u_dutm.NLEV != 3) begin
      failures++; $display("FAIL masked tree has %0d levels", u_dutm.NLEV);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
