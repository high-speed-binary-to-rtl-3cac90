// tb_b2r_channel: converter channel checked cycle by cycle.
// Three instances share the input:
//   u_a  P = 12, M = 29, all four pipeline registers (latency 4)
//   u_b  P = 13, M = 17, no pipeline registers (latency 0)
//   u_c  P = 12, M = 31, PIPE = 4'b0101 (latency 2)
// Every 12-bit and 13-bit word is applied once, with random idle cycles in
// between. At each cycle the outputs must equal the input applied L cycles
// earlier, reduced modulo M with integer arithmetic, and out_valid must
// follow in_valid by L cycles. The worked example A = 3545 -> 7 (m = 29)
// comes first. Both choices of the final multiplexer must occur in u_a.
module tb_b2r_channel;
  localparam int NCYC = 8192 * 5 / 4 + 64;
  int checks = 0, failures = 0;
  int n_sub = 0, n_pass = 0, n_idle = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [12:0] a = '0;

  logic v_a, v_b, v_c;
  logic [4:0] r_a, r_b, r_c;

  b2r_channel #(.P(12), .M(29)) u_a (
    .clk (clk), .rst_n (rst_n), .in_valid (in_valid), .a (a[11:0]),
    .out_valid (v_a), .res (r_a));
  b2r_channel #(.P(13), .M(17), .PIPE(4'b0000)) u_b (
    .clk (clk), .rst_n (rst_n), .in_valid (in_valid), .a (a),
    .out_valid (v_b), .res (r_b));
  b2r_channel #(.P(12), .M(31), .PIPE(4'b0101)) u_c (
    .clk (clk), .rst_n (rst_n), .in_valid (in_valid), .a (a[11:0]),
    .out_valid (v_c), .res (r_c));

  always #5 clk = ~clk;

  logic        hv [NCYC];
  logic [12:0] ha [NCYC];

  task automatic check(input string name, input int c, input int lat, input int m,
                       input int pw, input logic v, input logic [4:0] r);
    logic ev;
    int   ea;
    if (c < lat) return;
    ev = hv[c - lat];
    ea = int'(ha[c - lat]) % (1 << pw);
    checks++;
    if (v !== ev) begin
      failures++;
      $display("FAIL %s cycle %0d: out_valid=%0d expected %0d", name, c, v, ev);
    end else if (ev) begin
      checks++;
      if (int'(r) != ea % m) begin
        failures++;
        $display("FAIL %s a=%0d res=%0d expected %0d", name, ea, r, ea % m);
      end
    end
  endtask

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int next;
    next = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCYC; c++) begin
      @(posedge clk);
      #1;
      if (c == 0) begin
        in_valid = 1'b1; a = 13'd3545;
      end else if (next < 8192 && $urandom_range(4) != 0) begin
        in_valid = 1'b1; a = 13'(next); next++;
      end else begin
        in_valid = 1'b0; a = 13'($urandom); n_idle++;
      end
      hv[c] = in_valid;
      ha[c] = a;
      @(negedge clk);
      check("m29", c, 4, 29, 12, v_a, r_a);
      check("m17", c, 0, 17, 13, v_b, r_b);
      check("m31", c, 2, 31, 12, v_c, r_c);
      if (c == 4) begin
        checks++;
        if (!(v_a && r_a == 5'd7)) begin
          failures++;
          $display("FAIL example 3545 mod 29: valid=%0d res=%0d", v_a, r_a);
        end
      end
      if (v_a) begin
        if (u_a.sel_sub) n_sub++; else n_pass++;
      end
    end
    checks++;
    if (next != 8192) begin
      failures++;
      $display("FAIL only %0d words applied", next);
    end
    checks++;
    if (n_sub == 0 || n_pass == 0 || n_idle == 0) begin
      failures++;
      $display("FAIL mechanism missing: sub=%0d pass=%0d idle=%0d", n_sub, n_pass, n_idle);
    end
    $display("mux X-m: %0d, mux X: %0d, idle cycles: %0d", n_sub, n_pass, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
