// pipe_reg: optional pipeline register. With EN = 1, q follows d one clock
// later (no reset: only data passes through it, validity is tracked
// separately). With EN = 0 it is a wire and clk is unused.
module pipe_reg #(
  parameter int W  = 8,
  parameter bit EN = 1'b1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (EN) begin : g_reg
    always_ff @(posedge clk) q <= d;
  end else begin : g_wire
    assign q = d;
  end
endmodule
