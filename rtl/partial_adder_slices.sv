// partial_adder_slices - the one-bit partial adders of the carry select adder.
//
// Every bit position is added on its own, once for an input carry of 0 and
// once for an input carry of 1, all in parallel and in one gate delay:
//   m_i = a_i ^ b_i      sum   for input carry 0
//   o_i = a_i & b_i      carry for input carry 0
//   n_i = ~(a_i ^ b_i)   sum   for input carry 1
//   i_i = a_i | b_i      carry for input carry 1
// The carry flag channel picks between o and i, the sum block between m and
// n. Purely combinational.
module partial_adder_slices #(
  parameter int W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] m,
  output logic [W-1:0] o,
  output logic [W-1:0] n,
  output logic [W-1:0] i
);
  assign m = a ^ b;
  assign o = a & b;
  assign n = ~(a ^ b);
  assign i = a | b;
endmodule
