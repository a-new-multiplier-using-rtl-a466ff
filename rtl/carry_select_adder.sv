// carry_select_adder - the fast two-operand adder that finishes the product.
//
// Three blocks: partial adder slices form both possible sums and carries of
// every bit (input carry 0 and 1); the carry flag channel picks the real
// carries in logarithmic multiplexer depth; the sum block selects each sum
// bit with the carry from below. Total delay for W = 64: one gate for the
// slices, six multiplexers for the carries, one for the sum selection.
// Purely combinational; s = (a + b) mod 2^W, cout is the carry out of the
// top bit. There is no carry input.
module carry_select_adder #(
  parameter int W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W-1:0] m, o, n, i, c;

  partial_adder_slices #(.W(W)) u_slices (.a(a), .b(b), .m(m), .o(o), .n(n), .i(i));
  carry_flag_channel   #(.W(W)) u_carry  (.o(o), .i(i), .c(c), .cout(cout));
  sum_block            #(.W(W)) u_sum    (.m(m), .n(n), .c(c), .s(s));
endmodule
