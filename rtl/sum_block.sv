// sum_block - final sum selection of the carry select adder.
//
// Each sum bit is chosen between the two partial sums by the carry flag of
// the bit below: s_i = c_{i-1} ? n_i : m_i, and s_0 = m_0 as the adder has no
// carry in. Since n_i = ~m_i the selection is the same as m_i ^ c_{i-1}, one
// XOR gate per bit. Purely combinational.
module sum_block #(
  parameter int W = 64
) (
  input  logic [W-1:0] m,
  input  logic [W-1:0] n,
  input  logic [W-1:0] c,
  output logic [W-1:0] s
);
  always_comb begin
    s[0] = m[0];
    for (int k = 1; k < W; k++) s[k] = c[k-1] ? n[k] : m[k];
  end
endmodule
