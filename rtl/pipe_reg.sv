// pipe_reg - pipeline register array (R1, R2 and R3 of the multiplier).
//
// A bank of WIDTH D flip-flops loaded on every rising clock edge, with no
// enable and no reset: the design moves a new operand pair through every
// cycle, so the data registers need neither. q follows d one clock later.
module pipe_reg #(
  parameter int WIDTH = 64
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) q <= d;
endmodule
