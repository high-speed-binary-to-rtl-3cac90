// tb_b2r_converter: end-to-end test of the converter at its default size
// (12-bit input, base {29, 31, 17}, four pipeline registers).
// Every 12-bit word is applied once, with random idle cycles in between,
// after the worked example A = 3545. Each residue is compared with the input
// reduced by integer arithmetic, out_valid must follow in_valid by exactly
// four cycles, and the residue triple is mapped back to an integer by the
// Chinese remainder theorem and must give the input again. In each channel
// both choices of the final multiplexer (X and X - m) must occur, as must
// idle cycles and back-to-back words.
module tb_b2r_converter;
  localparam int LAT  = 4;
  localparam int NCH  = 3;
  localparam int MS [NCH] = '{29, 31, 17};
  localparam int NCYC = 4096 * 5 / 4 + 64;

  int checks = 0, failures = 0;
  int n_sub [NCH], n_pass [NCH];
  int n_idle = 0, n_b2b = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [11:0] a = '0;
  logic out_valid;
  logic [4:0] res [NCH];

  b2r_converter dut (
    .clk (clk), .rst_n (rst_n), .in_valid (in_valid), .a (a),
    .out_valid (out_valid), .res (res));

  always #5 clk = ~clk;

  logic        hv [NCYC];
  logic [11:0] ha [NCYC];
  logic        sel [NCH];
  assign sel[0] = dut.g_ch[0].u_ch.sel_sub;
  assign sel[1] = dut.g_ch[1].u_ch.sel_sub;
  assign sel[2] = dut.g_ch[2].u_ch.sel_sub;

  // CRT weights: w_i = (Mtot/m_i) * |(Mtot/m_i)^-1|_{m_i}
  longint mtot, wt [NCH];

  function automatic longint crt(input logic [4:0] r [NCH]);
    longint x;
    x = 0;
    for (int i = 0; i < NCH; i++) x += longint'(r[i]) * wt[i];
    return x % mtot;
  endfunction

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int next;
    mtot = 1;
    for (int i = 0; i < NCH; i++) mtot *= MS[i];
    for (int i = 0; i < NCH; i++) begin
      longint q;
      q = mtot / MS[i];
      for (int v = 1; v < MS[i]; v++)
        if ((q * v) % MS[i] == 1) wt[i] = q * v;
      n_sub[i] = 0; n_pass[i] = 0;
    end
    next = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCYC; c++) begin
      @(posedge clk);
      #1;
      if (c == 0) begin
        in_valid = 1'b1; a = 12'd3545;
      end else if (next < 4096 && $urandom_range(4) != 0) begin
        in_valid = 1'b1; a = 12'(next); next++;
      end else begin
        in_valid = 1'b0; a = 12'($urandom); n_idle++;
      end
      hv[c] = in_valid;
      ha[c] = a;
      if (c > 0 && hv[c] && hv[c-1]) n_b2b++;
      @(negedge clk);
      if (c >= LAT) begin
        checks++;
        if (out_valid !== hv[c-LAT]) begin
          failures++;
          $display("FAIL cycle %0d: out_valid=%0d expected %0d", c, out_valid, hv[c-LAT]);
        end else if (out_valid) begin
          for (int i = 0; i < NCH; i++) begin
            checks++;
            if (int'(res[i]) != int'(ha[c-LAT]) % MS[i]) begin
              failures++;
              $display("FAIL a=%0d m=%0d res=%0d expected %0d", ha[c-LAT], MS[i], res[i],
                       int'(ha[c-LAT]) % MS[i]);
            end
            if (sel[i]) n_sub[i]++; else n_pass[i]++;
          end
          checks++;
          if (crt(res) != longint'(ha[c-LAT])) begin
            failures++;
            $display("FAIL a=%0d CRT of residues gives %0d", ha[c-LAT], crt(res));
          end
        end
      end
      if (c == LAT) begin
        checks++;
        if (!(out_valid && res[0] == 5'd7)) begin
          failures++;
          $display("FAIL example 3545 mod 29: valid=%0d res=%0d", out_valid, res[0]);
        end
      end
    end
    checks++;
    if (next != 4096) begin
      failures++;
      $display("FAIL only %0d words applied", next);
    end
    for (int i = 0; i < NCH; i++) begin
      checks++;
      if (n_sub[i] == 0 || n_pass[i] == 0) begin
        failures++;
        $display("FAIL m=%0d: a multiplexer choice never occurred", MS[i]);
      end
      $display("m=%0d: X-m taken %0d times, X taken %0d times", MS[i], n_sub[i], n_pass[i]);
    end
    checks++;
    if (n_idle == 0 || n_b2b == 0) begin
      failures++;
      $display("FAIL idle=%0d back-to-back=%0d", n_idle, n_b2b);
    end
    $display("idle cycles %0d, back-to-back words %0d", n_idle, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
