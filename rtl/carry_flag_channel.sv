// carry_flag_channel - logarithmic carry generation with 2-to-1 multiplexers.
//
// Each bit slice i offers two primary carries: o_i (carry out if the carry
// into the slice is 0) and i_i (carry out if it is 1). A group of slices is
// described the same way by a pair (z0, z1). Two neighbouring groups merge
// with two multiplexers steered by the lower group's pair:
//   z0 = lo.z0 ? hi.z1 : hi.z0        z1 = lo.z1 ? hi.z1 : hi.z0
// and once the lower group starts at bit 0 its z0 is a real carry flag, which
// then selects between the pair of the upper group. The merges are arranged
// as a divide-by-two prefix tree: at level l, every bit whose index has bit l
// set merges with the last bit of the lower half of its block of 2^(l+1)
// bits. The carry out of bit i is therefore ready after ceil(log2(i+1))
// multiplexer delays: c_1 after one, c_2..c_3 after two, c_4..c_7 after
// three, up to c_32..c_63 after six for W = 64.
//
// c[i] is the carry out of bit i with no carry into bit 0; c[0] is o_0 and
// cout equals c[W-1]. Purely combinational. The tree arrangement is this
// implementation's reading of the logarithmic scheme; the carry-in of the
// whole adder is fixed at 0 because the multiplier needs none.
module carry_flag_channel #(
  parameter int W = 64
) (
  input  logic [W-1:0] o,
  input  logic [W-1:0] i,
  output logic [W-1:0] c,
  output logic         cout
);
  localparam int LEVELS = (W > 1) ? $clog2(W) : 1;

  // pair of every bit position after each level
  logic [W-1:0] z0 [LEVELS+1];
  logic [W-1:0] z1 [LEVELS+1];

  assign z0[0] = o;
  assign z1[0] = i;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    for (genvar k = 0; k < W; k++) begin : g_bit
      // last bit of the lower half of k's block of 2^(l+1) bits
      localparam int P = ((k >> (l + 1)) << (l + 1)) + (1 << l) - 1;
      if (((k >> l) & 1) == 1) begin : g_merge
        assign z0[l+1][k] = z0[l][P] ? z1[l][k] : z0[l][k];
        assign z1[l+1][k] = z1[l][P] ? z1[l][k] : z0[l][k];
      end else begin : g_keep
        assign z0[l+1][k] = z0[l][k];
        assign z1[l+1][k] = z1[l][k];
      end
    end
  end

  assign c    = z0[LEVELS];
  assign cout = c[W-1];
endmodule
