// tb_fmg: final modulo generator for m = 29, K = 3, both pipeline registers
// on. Every combination of lt (0..28), c_L (0..7) and s_L (0..7) is applied,
// one per clock; each result is compared with (lt + c_L + s_L) mod 29
// exactly two clocks later, and sel_sub with (lt + c_L + s_L >= 29). Both
// multiplexer choices must occur.
module tb_fmg;
  localparam int LAT = 2;
  int checks = 0, failures = 0;
  int n_sub = 0, n_pass = 0;
  logic clk = 1'b0;
  logic [4:0] lt, r;
  logic [2:0] cl, sl;
  logic sel_sub;

  fmg #(.M(29), .K(3), .PIPE_MID(1'b1), .PIPE_OUT(1'b1)) u_dut (
    .clk (clk), .lt (lt), .cl (cl), .sl (sl), .r (r), .sel_sub (sel_sub)
  );

  always #5 clk = ~clk;

  int exp_sum [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare LAT cycles after the inputs were applied
  always @(negedge clk) begin
    if (exp_sum.size() >= LAT) begin
      int e;
      e = exp_sum.pop_front();
      checks++;
      if (int'(r) != e % 29 || sel_sub != (e >= 29)) begin
        failures++;
        $display("FAIL sum=%0d r=%0d sel_sub=%0d", e, r, sel_sub);
      end
      if (sel_sub) n_sub++; else n_pass++;
    end
  end

  initial begin
    for (int i = 0; i < 29; i++)
      for (int j = 0; j < 8; j++)
        for (int k = 0; k < 8; k++) begin
          @(negedge clk);
          #1;
          lt = 5'(i); cl = 3'(j); sl = 3'(k);
          exp_sum.push_back(i + j + k);
        end
    repeat (LAT + 2) begin
      @(negedge clk);
      #1;
      exp_sum.push_back(int'(lt) + int'(cl) + int'(sl));
    end
    @(negedge clk);
    checks++;
    if (n_sub == 0 || n_pass == 0) begin
      failures++;
      $display("FAIL a multiplexer path never used: sub=%0d pass=%0d", n_sub, n_pass);
    end
    $display("mux: X-m taken %0d times, X taken %0d times", n_sub, n_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
